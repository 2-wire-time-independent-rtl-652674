// 2I2O-2B TIA slave: the counterpart of tia_master, using two ordinary
// tristate IO pins (SC on the clock wire, SD on the data wire).
//
// While a pin is released it reads whatever the master's weak drive puts on
// the wire; while it drives, it overrides the master.  One cycle:
//   Sr  SC (released) reads high: the master raised MC, so read the master
//       bit from SD (released, so it shows MD)
//   Sd  drive the slave's own bit on SD
//   Sw  drive SC low: "slave bit available"
//   Sf  release SC and look at it after a settle time.  High means the master
//       has not yet lowered MC, i.e. has not read the bit: drive SC low again
//       (back to Sw) and repeat.  The released phase reads exactly like the
//       slave not being ready, so a master poll that lands on it is harmless.
//   Sx  SC reads low: the master has acknowledged (MC low)
//   Sy  release SD.  The master has meanwhile put the inverse of the slave bit
//       on MD, so SD visibly changes, which tells the master the slave is done.
// The slave then waits for the next rise of MC.  SC is only ever driven low.
//
// Timing: the machine steps only on cycles with en high and waits SETTLE
// enabled cycles after every pin change and after seeing MC high before it
// samples.  repoll_o pulses each time the Sf poll finds the master not done.
// User side: rx_valid/rx_ready hand out the master's bit, tx_valid/tx_ready
// take the bit to send back.  The slave waits in Sr until its previous
// received bit has been taken and in Sd until it has a bit to send: the
// master simply waits, as the protocol has no response time.
// The cycle follows the document; the synchronizers, the settle counter and
// the user-side handshakes are this design's own choices.
module tia_slave
  import tia_pkg::*;
#(
  parameter int unsigned SETTLE      = SETTLE_DEFAULT,
  parameter int unsigned SYNC_STAGES = SYNC_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  // bit to send back
  input  logic tx_valid,
  input  logic tx_bit,
  output logic tx_ready,
  // bit received from the master
  output logic rx_valid,
  output logic rx_bit,
  input  logic rx_ready,
  // pins
  output logic sc_oe,      // drive SC
  output logic sc_o,       // value driven on SC (always low)
  input  logic sc_i,       // level of SC
  output logic sd_oe,      // drive SD
  output logic sd_o,       // value driven on SD
  input  logic sd_i,       // level of SD
  // status
  output logic repoll_o,   // one-cycle pulse: Sf found the master not done
  output logic busy_o
);

  if (SETTLE < SYNC_STAGES) begin : g_bad_settle
    $error("tia_slave: SETTLE must cover the synchronizer depth");
  end

  localparam int unsigned SW = $clog2(SETTLE + 1);

  tia_sstate_e   state_q;
  logic [SW-1:0] settle_q;
  logic          sc_s, sd_s;
  logic          settled;

  tia_sync #(.STAGES(SYNC_STAGES), .WIDTH(2), .RESET_VAL(2'b00)) u_sync (
    .clk, .rst_n, .d({sc_i, sd_i}), .q({sc_s, sd_s})
  );

  assign settled  = (settle_q == '0);
  assign tx_ready = rst_n && en && settled && (state_q == S_SD);
  assign busy_o   = (state_q != S_IDLE);
  assign sc_o     = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      settle_q <= '0;
      sc_oe    <= 1'b0;
      sd_oe    <= 1'b0;
      sd_o     <= 1'b0;
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
            S_IDLE: if (sc_s) begin                      // MC high
              settle_q <= SW'(SETTLE);
              state_q  <= S_SR;
            end
            S_SR: if (!rx_valid) begin                   // Sr
              rx_bit   <= sd_s;
              rx_valid <= 1'b1;
              state_q  <= S_SD;
            end
            S_SD: if (tx_valid) begin                    // Sd
              sd_o     <= tx_bit;
              sd_oe    <= 1'b1;
              settle_q <= SW'(SETTLE);
              state_q  <= S_SW;
            end
            S_SW: begin                                  // Sw
              sc_oe    <= 1'b1;
              settle_q <= SW'(SETTLE);
              state_q  <= S_SF;
            end
            S_SF: begin                                  // Sf / Sx poll
              sc_oe    <= 1'b0;
              settle_q <= SW'(SETTLE);
              state_q  <= S_CHK;
            end
            S_CHK: begin
              if (sc_s) begin                            // not read yet
                repoll_o <= 1'b1;
                state_q  <= S_SW;
              end else begin                             // Sx: acknowledged
                state_q  <= S_SY;
              end
            end
            S_SY: begin                                  // Sy
              sd_oe    <= 1'b0;
              settle_q <= SW'(SETTLE);
              state_q  <= S_IDLE;
            end
            default: state_q <= S_IDLE;
          endcase
        end
      end
    end
  end

  // The slave never drives the clock wire high.
  a_sc_low_only: assert property (@(posedge clk) disable iff (!rst_n)
    sc_oe |-> !sc_o);
  // Whenever SC is driven low, the slave bit is already on SD.
  a_data_first: assert property (@(posedge clk) disable iff (!rst_n)
    sc_oe |-> sd_oe);

endmodule
