// Test of the 2I2O-2B master against a scripted slave.
//
// The testbench plays the slave and the wires: SC reads low while the script
// pulls it low, else it shows MC; SD shows the script's drive, else MD.  For
// each bit it checks the protocol order: MD carries the bit before MC rises
// (exactly SETTLE+1 cycles after the hand-over when the master runs every
// cycle), MC stays high until SC has been pulled low, MD then carries the
// inverse of the slave bit, and the received bit is only delivered after the
// slave releases SD.  Also checked: the slave bit on SD alone, with SC
// released, is not taken as "ready", back-pressure on the received bit
// holds off the next cycle, and a silent slave makes the master time out.
`timescale 1ns/1ps
module tb_tia_master;

  localparam int unsigned SETTLE  = 3;
  localparam int unsigned TIMEOUT = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en, tx_valid, tx_bit, tx_ready, rx_valid, rx_bit, rx_ready;
  logic mc_o, md_o, sc_i, sd_i, timeout_o, busy_o;
  logic s_pull_c, s_d_oe, s_d_o;   // scripted slave

  assign sc_i = s_pull_c ? 1'b0 : mc_o;
  assign sd_i = s_d_oe ? s_d_o : md_o;

  tia_master #(.SETTLE(SETTLE), .TIMEOUT(TIMEOUT)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // wait for a condition, at most n cycles
  task automatic wait_for(ref logic sig, input logic val, input int n, input string what);
    int k = 0;
    while (sig !== val && k < n) begin @(posedge clk); #1; k++; end
    chk(sig === val, what);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic one_bit(input bit b, input bit sb, input bit exact, input bit hold_rx);
    int k;
    // hand over the bit
    tx_valid = 1'b1; tx_bit = b;
    k = 0;
    while (!(tx_ready) && k < 1000) begin @(posedge clk); #1; k++; end
    @(posedge clk); #1;
    tx_valid = 1'b0;
    chk(md_o == b && mc_o == 1'b0, "Md: bit on MD while MC low");
    // Mw: k counts clock edges after the hand-over edge
    k = 0;
    while (!mc_o && k < 1000) begin
      chk(md_o == b, "MD stable before MC rises");
      @(posedge clk); #1; k++;
    end
    if (exact) chk(k == SETTLE + 1, $sformatf("MC rises SETTLE+1 cycles after Md (%0d)", k));
    // slave: takes its time, puts its bit on SD, pulls SC low
    repeat ($urandom_range(12)) begin @(posedge clk); #1; chk(mc_o, "MC high while slave silent"); end
    s_d_oe = 1'b1; s_d_o = sb;
    repeat (2) begin @(posedge clk); #1; end
    repeat (6) begin @(posedge clk); #1; chk(mc_o, "SD driven but SC released: not ready"); end
    s_pull_c = 1'b1;
    wait_for(mc_o, 1'b0, 100, "Ma: MC falls after SC pulled low");
    s_pull_c = 1'b0;
    k = 0;
    while (md_o != !sb && k < 100) begin @(posedge clk); #1; k++; end
    chk(md_o == !sb, "Mi: inverse slave bit on MD");
    repeat ($urandom_range(20)) begin
      @(posedge clk); #1; chk(!rx_valid, "no delivery before SD released");
    end
    rx_ready = !hold_rx;
    s_d_oe = 1'b0;            // Sy
    wait_for(rx_valid, 1'b1, 100, "Mx: bit delivered after SD released");
    chk(rx_bit == sb, "received bit");
    if (hold_rx) begin
      tx_valid = 1'b1; tx_bit = !b;
      repeat (30) begin
        @(posedge clk); #1;
        chk(!tx_ready && mc_o == 1'b0 && md_o == !sb, "no new cycle while bit not taken");
      end
      tx_valid = 1'b0;
      rx_ready = 1'b1;
    end
    @(posedge clk); #1;
    rx_ready = 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; tx_valid = 1'b0; tx_bit = 1'b0; rx_ready = 1'b1;
    s_pull_c = 1'b0; s_d_oe = 1'b0; s_d_o = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 24; i++)
      one_bit(1'($urandom), 1'($urandom), 1'b1, (i % 5) == 3);
    // silent slave: the master must give up and return to idle
    tx_valid = 1'b1; tx_bit = 1'b1;
    wait_for(mc_o, 1'b1, 100, "cycle started for timeout test");
    tx_valid = 1'b0;
    begin
      int k = 0;
      while (!timeout_o && k < TIMEOUT + 50) begin @(posedge clk); #1; k++; end
      chk(timeout_o && k >= TIMEOUT, $sformatf("timeout after %0d cycles", k));
    end
    @(posedge clk); #1;
    chk(!mc_o && !busy_o && !rx_valid, "idle with MC low after timeout");
    // normal operation afterwards
    for (int i = 0; i < 4; i++) one_bit(1'($urandom), 1'($urandom), 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
