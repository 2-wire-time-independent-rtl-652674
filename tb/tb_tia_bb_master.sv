// Test of the 2B-2B master against a scripted slave.
//
// The testbench plays the slave and the wires: C is low while either side
// pulls it low; each end of D shows its own drive, else the other end's,
// else high.  For each bit it checks: the master drives its bit on MD while
// holding C low, releases C exactly SETTLE+1 cycles later, keeps MD driven
// and C released until the slave pulls C low, then releases MD, pulls C low, and delivers
// the slave bit only after the slave end shows the inverse bit.  Also
// checked: a silent slave makes the master time out back to idle.
`timescale 1ns/1ps
module tb_tia_bb_master;

  localparam int unsigned SETTLE  = 3;
  localparam int unsigned TIMEOUT = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en, tx_valid, tx_bit, tx_ready, rx_valid, rx_bit, rx_ready;
  logic c_low_o, c_i, d_oe, d_o, d_i, timeout_o, busy_o;
  logic s_c_low, s_d_oe, s_d_o;  // scripted slave
  logic sd_pin;

  assign c_i    = !(c_low_o || s_c_low);
  assign d_i    = d_oe ? d_o : (s_d_oe ? s_d_o : 1'b1);
  assign sd_pin = s_d_oe ? s_d_o : (d_oe ? d_o : 1'b1);

  tia_bb_master #(.SETTLE(SETTLE), .TIMEOUT(TIMEOUT)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_bit(input bit b, input bit sb);
    int k;
    tx_valid = 1'b1; tx_bit = b;
    k = 0;
    while (!tx_ready && k < 1000) begin @(posedge clk); #1; k++; end
    @(posedge clk); #1;
    tx_valid = 1'b0;
    chk(d_oe && d_o == b && c_low_o, "M1: bit on MD while C held low");
    k = 0;
    while (c_low_o && k < 1000) begin @(posedge clk); #1; k++; end
    chk(k == SETTLE + 1, $sformatf("M2: C released SETTLE+1 cycles after M1 (%0d)", k));
    chk(c_i && d_oe, "C high, MD still driven");
    // slave: s1 release SD (it was driving the previous inverse), s2 read
    s_d_oe = 1'b0;
    repeat ($urandom_range(10) + 1) begin @(posedge clk); #1; end
    chk(sd_pin == b, "s2: master bit at the slave end");
    s_d_oe = 1'b1; s_d_o = sb;
    repeat (2) begin @(posedge clk); #1; end
    chk(d_oe && !c_low_o, "master waits while slave not ready");
    s_c_low = 1'b1;                  // s3
    k = 0;
    while (d_oe && k < 100) begin @(posedge clk); #1; k++; end
    chk(!d_oe, "M3: MD released after C seen low");
    k = 0;
    while (!c_low_o && k < 100) begin @(posedge clk); #1; k++; end
    chk(c_low_o, "M5: master pulls C low");
    s_c_low = 1'b0;                  // s4/s5: released, C stays low
    repeat (2) begin @(posedge clk); #1; end
    chk(!c_i, "s5: C held low by the master");
    repeat ($urandom_range(20)) begin
      @(posedge clk); #1; chk(!rx_valid, "no delivery before inverse bit");
    end
    s_d_o = !sb;                     // s6
    k = 0;
    while (!rx_valid && k < 100) begin @(posedge clk); #1; k++; end
    chk(rx_valid && rx_bit == sb, "M6: slave bit delivered");
    @(posedge clk); #1;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; tx_valid = 1'b0; tx_bit = 1'b0; rx_ready = 1'b1;
    s_c_low = 1'b0; s_d_oe = 1'b0; s_d_o = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(c_low_o && !d_oe, "idle: C held low, MD released");
    for (int i = 0; i < 24; i++) one_bit(1'($urandom), 1'($urandom));
    // silent slave
    s_d_oe = 1'b0;
    tx_valid = 1'b1; tx_bit = 1'b0;
    begin
      int k = 0;
      while (!timeout_o && k < TIMEOUT + 100) begin
        @(posedge clk); #1; k++;
        if (tx_ready) tx_valid = 1'b0;
      end
      chk(timeout_o && k >= TIMEOUT, $sformatf("timeout after %0d cycles", k));
    end
    tx_valid = 1'b0;
    @(posedge clk); #1;
    chk(c_low_o && !d_oe && !busy_o, "idle after timeout");
    s_d_oe = 1'b1; s_d_o = 1'b0;
    for (int i = 0; i < 4; i++) one_bit(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
