// Input synchronizer for the TIA hosts.
//
// Each wire arrives from a host with an unrelated clock, so every input of a
// protocol machine passes through a chain of STAGES flip-flops before the
// machine looks at it.  WIDTH independent bits share one instance.  The
// output follows the input STAGES clock cycles later.  Reset loads RESET_VAL.
// The synchronizer is this design's own choice; the protocol itself assumes
// software hosts that read their IO pins directly.
module tia_sync #(
  parameter int unsigned STAGES    = 2,
  parameter int unsigned WIDTH     = 2,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) chain[i] <= RESET_VAL;
    end else begin
      chain[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];

endmodule
