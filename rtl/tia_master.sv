// 2I2O-2B TIA master: one bit out and one bit in per handshake cycle over two
// wires, the clock wire C and the data wire D.
//
// The master drives both wires through weak drives (outputs mc_o, md_o, each
// behind a series resistor) and reads both wires on separate inputs (sc_i,
// sd_i).  The slave can overdrive either wire with its ordinary tristate pins.
// One cycle, in the order the protocol defines:
//   Md  put the bit to send on MD            (needs tx_valid, rx slot empty)
//   Mw  raise MC: "master bit available"
//   Mr  poll SC until it reads low (the slave pulls it low once its own bit is
//       on SD; while the slave polls by releasing SC the wire reads high and
//       the master simply polls again), then read the slave bit from SD
//   Ma  lower MC: "slave bit read"
//   Mi  put the inverse of the slave bit on MD
//   Mx  wait until SD reads the same as MD: only then has the slave released
//       SD, and the next cycle may start.
// Every action is followed by SETTLE enabled clock cycles before the next
// action or sample, which keeps the order of signal changes intact across the
// input synchronizers and the wire.  After SC has been seen low the master
// waits one more settle time before sampling SD.
//
// Timing: the machine only advances on cycles with en high, so a host of any
// speed, or one that is paused, is modelled by gating en.  A normal cycle
// takes at least 6 settle periods of the master plus the slave's reaction
// time; there is no upper bound.  If the master waits in Mr or Mx for more
// than TIMEOUT enabled cycles it returns to idle (MC low), pulses timeout_o
// and drops the bit it was receiving; a bit already sent is not resent.
//
// User side: tx_valid/tx_ready hand over the bit to send; rx_valid/rx_ready
// hand out the received bit.  A new cycle starts only when the previous
// received bit has been taken, so data can never be overrun.
// The cycle and the master timeout follow the document; the synchronizers,
// the settle counter, the handshakes on the user side and the timeout length
// are this design's own choices.
module tia_master
  import tia_pkg::*;
#(
  parameter int unsigned SETTLE      = SETTLE_DEFAULT,
  parameter int unsigned SYNC_STAGES = SYNC_DEFAULT,
  parameter int unsigned TIMEOUT     = TIMEOUT_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,         // host activity: the machine steps only when high
  // bit to send
  input  logic tx_valid,
  input  logic tx_bit,
  output logic tx_ready,
  // bit received
  output logic rx_valid,
  output logic rx_bit,
  input  logic rx_ready,
  // wires
  output logic mc_o,       // weak drive onto the clock wire
  output logic md_o,       // weak drive onto the data wire
  input  logic sc_i,       // level of the clock wire
  input  logic sd_i,       // level of the data wire
  // status
  output logic timeout_o,  // one-cycle pulse: gave up waiting for the slave
  output logic busy_o      // a handshake cycle is in progress
);

  if (SETTLE < SYNC_STAGES) begin : g_bad_settle
    $error("tia_master: SETTLE must cover the synchronizer depth");
  end

  localparam int unsigned SW = $clog2(SETTLE + 1);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  tia_mstate_e    state_q;
  logic [SW-1:0]  settle_q;
  logic [TW-1:0]  wait_q;
  logic           sbit_q;
  logic           sc_s, sd_s;
  logic           settled, waiting, expired;

  tia_sync #(.STAGES(SYNC_STAGES), .WIDTH(2), .RESET_VAL(2'b11)) u_sync (
    .clk, .rst_n, .d({sc_i, sd_i}), .q({sc_s, sd_s})
  );

  assign settled  = (settle_q == '0);
  assign waiting  = (state_q == M_MR) || (state_q == M_MX);
  assign expired  = waiting && (wait_q == TW'(TIMEOUT));
  assign tx_ready = rst_n && en && settled && (state_q == M_IDLE) && !rx_valid;
  assign busy_o   = (state_q != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= M_IDLE;
      settle_q  <= '0;
      wait_q    <= '0;
      sbit_q    <= 1'b0;
      mc_o      <= 1'b0;
      md_o      <= 1'b0;
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
          // gross error (lost or frozen slave): back to idle
          state_q   <= M_IDLE;
          mc_o      <= 1'b0;
          wait_q    <= '0;
          settle_q  <= SW'(SETTLE);
          timeout_o <= 1'b1;
        end else begin
          unique case (state_q)
            M_IDLE: if (tx_valid && tx_ready) begin      // Md
              md_o     <= tx_bit;
              settle_q <= SW'(SETTLE);
              state_q  <= M_MW;
            end
            M_MW: begin                                  // Mw
              mc_o     <= 1'b1;
              settle_q <= SW'(SETTLE);
              wait_q   <= '0;
              state_q  <= M_MR;
            end
            M_MR: begin
              if (!sc_s) begin                           // slave bit ready
                settle_q <= SW'(SETTLE);
                state_q  <= M_MRD;
              end else begin
                wait_q <= wait_q + 1'b1;
              end
            end
            M_MRD: begin                                 // Mr
              sbit_q  <= sd_s;
              state_q <= M_MA;
            end
            M_MA: begin                                  // Ma
              mc_o     <= 1'b0;
              settle_q <= SW'(SETTLE);
              state_q  <= M_MI;
            end
            M_MI: begin                                  // Mi
              md_o     <= ~sbit_q;
              settle_q <= SW'(SETTLE);
              wait_q   <= '0;
              state_q  <= M_MX;
            end
            M_MX: begin
              if (sd_s == md_o) begin                    // Mx
                rx_valid <= 1'b1;
                rx_bit   <= sbit_q;
                state_q  <= M_IDLE;
              end else begin
                wait_q <= wait_q + 1'b1;
              end
            end
            default: state_q <= M_IDLE;
          endcase
        end
      end
    end
  end

  // A received bit is only replaced after it has been taken.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_valid && !rx_ready) |=> (rx_valid && $stable(rx_bit)));
  // MC only rises at Mw, with the master bit already on MD for a settle time.
  a_mc_rise: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(mc_o) |-> ($past(state_q) == M_MW));

endmodule
