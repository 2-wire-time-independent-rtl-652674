// 2B-2B TIA slave: the counterpart of tia_bb_master on two ordinary
// bidirectional pins (clock pin pulled low or released, data pin driven or
// released).
//
// One cycle, in protocol order (s1..s6):
//   s1  C reads high (the master released it): release SD so the master bit
//       shows at the slave end of the data wire
//   s2  read the master bit, then drive the slave's own bit on SD
//   s3  pull C low: "master bit read, slave bit available"
//   s4  release C and look at it after a settle time.  High means the master
//       has not yet pulled C low, i.e. has not read the slave bit: pull C low
//       again (back to s3) and repeat.
//   s5  C reads low although the slave released it: the master holds it low,
//       so it has read the slave bit.  SC stays released.
//   s6  drive the inverse of the slave bit on SD: "slave finished".  SD keeps
//       driving this value until the next s1.
// Every action is followed by SETTLE enabled cycles; the machine steps only
// when en is high.  repoll_o pulses each time the s4 poll finds the master
// not done.  User side as in tia_slave: the slave waits before s2's read
// until its previous received bit was taken, and before driving its bit
// until it has one.  After reset both pins are released.
// The cycle follows the document; synchronizers, settle counter, handshakes
// and the reset state are this design's own choices.
module tia_bb_slave
  import tia_pkg::*;
#(
  parameter int unsigned SETTLE      = SETTLE_DEFAULT,
  parameter int unsigned SYNC_STAGES = SYNC_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic tx_valid,
  input  logic tx_bit,
  output logic tx_ready,
  output logic rx_valid,
  output logic rx_bit,
  input  logic rx_ready,
  output logic c_low_o,
  input  logic c_i,
  output logic d_oe,
  output logic d_o,
  input  logic d_i,
  output logic repoll_o,
  output logic busy_o
);

  if (SETTLE < SYNC_STAGES) begin : g_bad_settle
    $error("tia_bb_slave: SETTLE must cover the synchronizer depth");
  end

  localparam int unsigned SW = $clog2(SETTLE + 1);

  tia_bsstate_e  state_q;
  logic [SW-1:0] settle_q;
  logic          c_s, d_s;
  logic          settled;

  tia_sync #(.STAGES(SYNC_STAGES), .WIDTH(2), .RESET_VAL(2'b00)) u_sync (
    .clk, .rst_n, .d({c_i, d_i}), .q({c_s, d_s})
  );

  assign settled  = (settle_q == '0);
  assign tx_ready = rst_n && en && settled && (state_q == T_S2D);
  assign busy_o   = (state_q != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= T_IDLE;
      settle_q <= '0;
      c_low_o  <= 1'b0;
      d_oe     <= 1'b0;
      d_o      <= 1'b0;
      rx_valid <= 1'b0;
      rx_bit   <= 1'b0;
      repoll_o <= 1'b0;
    end else begin
      repoll_o <= 1'b0;
      if (rx_valid && rx_ready) rx_valid <= 1'b0;

      if (en) begin
        if (!settled) begin
          settle_q <= settle_q - 1'b1;
        end else begin
          unique case (state_q)
            T_IDLE: if (c_s) begin                       // s1
              d_oe     <= 1'b0;
              settle_q <= SW'(SETTLE);
              state_q  <= T_S2;
            end
            T_S2: if (!rx_valid) begin                   // s2: read
              rx_bit   <= d_s;
              rx_valid <= 1'b1;
              state_q  <= T_S2D;
            end
            T_S2D: if (tx_valid) begin                   // s2: drive
              d_o      <= tx_bit;
              d_oe     <= 1'b1;
              settle_q <= SW'(SETTLE);
              state_q  <= T_S3;
            end
            T_S3: begin                                  // s3
              c_low_o  <= 1'b1;
              settle_q <= SW'(SETTLE);
              state_q  <= T_S4;
            end
            T_S4: begin                                  // s4 / s5 poll
              c_low_o  <= 1'b0;
              settle_q <= SW'(SETTLE);
              state_q  <= T_S4C;
            end
            T_S4C: begin
              if (c_s) begin                             // master not done
                repoll_o <= 1'b1;
                state_q  <= T_S3;
              end else begin                             // s5
                state_q  <= T_S6;
              end
            end
            T_S6: begin                                  // s6
              d_o      <= ~d_o;
              settle_q <= SW'(SETTLE);
              state_q  <= T_IDLE;
            end
            default: state_q <= T_IDLE;
          endcase
        end
      end
    end
  end

  // The slave pulls C low only while its own bit is on SD.
  a_data_first: assert property (@(posedge clk) disable iff (!rst_n)
    c_low_o |-> d_oe);

endmodule
