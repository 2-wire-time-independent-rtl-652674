// 2B-2B TIA master: the variant of the 2-wire link in which the master, like
// the slave, uses two ordinary bidirectional pins.
//
// Clock wire C: both hosts only pull it low or release it, a pull-up makes it
// high when neither pulls (wired-AND).  Data wire D: each host drives it or
// releases it; a series resistance lets each end keep its own level while
// both drive.  One cycle, in protocol order (M1..M6):
//   M1  the master holds C low and drives its bit on MD (the slave may still
//       be driving its previous, inverted bit: the two ends differ)
//   M2  release C: "master bit available"; C goes high
//   M3  poll C until it reads low (the slave pulls C low once it has read the
//       master bit and put its own bit on SD; while the slave polls by
//       releasing C the wire reads high and the master polls again), then
//       release MD so the slave bit shows at the master end
//   M4  read the slave bit
//   M5  pull C low: "slave bit read"
//   M6  wait until MD reads the inverse of the slave bit: the slave has seen
//       the acknowledge and finished; the next M1 may follow.
// Every action is followed by SETTLE enabled cycles before the next action or
// sample.  Between cycles the master holds C low and leaves MD released.
// A wait in M3 or M6 longer than TIMEOUT enabled cycles returns the master to
// idle (C low, MD released), pulses timeout_o and drops the bit in flight.
// User side and timing are as in tia_master.  The cycle follows the document;
// the synchronizers, settle counter, user handshakes, the idle drive levels
// and the timeout length are this design's own choices.
module tia_bb_master
  import tia_pkg::*;
#(
  parameter int unsigned SETTLE      = SETTLE_DEFAULT,
  parameter int unsigned SYNC_STAGES = SYNC_DEFAULT,
  parameter int unsigned TIMEOUT     = TIMEOUT_DEFAULT
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
  // clock pin: pull low or release
  output logic c_low_o,
  input  logic c_i,
  // data pin
  output logic d_oe,
  output logic d_o,
  input  logic d_i,
  output logic timeout_o,
  output logic busy_o
);

  if (SETTLE < SYNC_STAGES) begin : g_bad_settle
    $error("tia_bb_master: SETTLE must cover the synchronizer depth");
  end

  localparam int unsigned SW = $clog2(SETTLE + 1);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  tia_bmstate_e  state_q;
  logic [SW-1:0] settle_q;
  logic [TW-1:0] wait_q;
  logic          sbit_q;
  logic          c_s, d_s;
  logic          settled, waiting, expired;

  tia_sync #(.STAGES(SYNC_STAGES), .WIDTH(2), .RESET_VAL(2'b11)) u_sync (
    .clk, .rst_n, .d({c_i, d_i}), .q({c_s, d_s})
  );

  assign settled  = (settle_q == '0);
  assign waiting  = (state_q == B_M3) || (state_q == B_M6);
  assign expired  = waiting && (wait_q == TW'(TIMEOUT));
  assign tx_ready = rst_n && en && settled && (state_q == B_IDLE) && !rx_valid;
  assign busy_o   = (state_q != B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= B_IDLE;
      settle_q  <= '0;
      wait_q    <= '0;
      sbit_q    <= 1'b0;
      c_low_o   <= 1'b1;
      d_oe      <= 1'b0;
      d_o       <= 1'b0;
      rx_valid  <= 1'b0;
      rx_bit    <= 1'b0;
      timeout_o <= 1'b0;
    end else begin
      timeout_o <= 1'b0;
      if (rx_valid && rx_ready) rx_valid <= 1'b0;

      if (en) begin
        if (!settled) begin
          settle_q <= settle_q - 1'b1;
        end else if (expired) begin
          state_q   <= B_IDLE;
          c_low_o   <= 1'b1;
          d_oe      <= 1'b0;
          wait_q    <= '0;
          settle_q  <= SW'(SETTLE);
          timeout_o <= 1'b1;
        end else begin
          unique case (state_q)
            B_IDLE: if (tx_valid && tx_ready) begin      // M1
              d_o      <= tx_bit;
              d_oe     <= 1'b1;
              settle_q <= SW'(SETTLE);
              state_q  <= B_M2;
            end
            B_M2: begin                                  // M2
              c_low_o  <= 1'b0;
              settle_q <= SW'(SETTLE);
              wait_q   <= '0;
              state_q  <= B_M3;
            end
            B_M3: begin
              if (!c_s) begin                            // M3
                d_oe     <= 1'b0;
                settle_q <= SW'(SETTLE);
                state_q  <= B_M4;
              end else begin
                wait_q <= wait_q + 1'b1;
              end
            end
            B_M4: begin                                  // M4
              sbit_q  <= d_s;
              state_q <= B_M5;
            end
            B_M5: begin                                  // M5
              c_low_o  <= 1'b1;
              settle_q <= SW'(SETTLE);
              wait_q   <= '0;
              state_q  <= B_M6;
            end
            B_M6: begin
              if (d_s == ~sbit_q) begin                  // M6
                rx_valid <= 1'b1;
                rx_bit   <= sbit_q;
                state_q  <= B_IDLE;
              end else begin
                wait_q <= wait_q + 1'b1;
              end
            end
            default: state_q <= B_IDLE;
          endcase
        end
      end
    end
  end

  // The master only releases MD after it has seen the slave pull C low.
  a_release_after_c_low: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(d_oe) && !timeout_o |-> ($past(state_q) == B_M3) && !$past(c_s));
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_valid && !rx_ready) |=> (rx_valid && $stable(rx_bit)));

endmodule
