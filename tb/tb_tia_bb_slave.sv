// Test of the 2B-2B slave against a scripted master.
//
// The testbench plays the master and the wires (C low while either side
// pulls it low; each end of D shows its own drive, else the other end's,
// else high).  For each bit it checks: the slave releases SD once C goes high
// and reads the master bit, drives its own bit before pulling C low, keeps
// re-polling for as long as the master leaves C released, leaves C released
// once the master holds it low, and then drives the inverse of its bit,
// which the master end sees.  Also checked: a slave without a bit to send
// waits without pulling C low.
`timescale 1ns/1ps
module tb_tia_bb_slave;

  localparam int unsigned SETTLE = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en, tx_valid, tx_bit, tx_ready, rx_valid, rx_bit, rx_ready;
  logic c_low_o, c_i, d_oe, d_o, d_i, repoll_o, busy_o;
  logic m_c_low, m_d_oe, m_d_o;  // scripted master
  logic md_pin;

  assign c_i    = !(c_low_o || m_c_low);
  assign d_i    = d_oe ? d_o : (m_d_oe ? m_d_o : 1'b1);
  assign md_pin = m_d_oe ? m_d_o : (d_oe ? d_o : 1'b1);

  tia_bb_slave #(.SETTLE(SETTLE)) dut (.*);

  int checks = 0, failures = 0, repolls = 0;
  always @(posedge clk) if (repoll_o) repolls++;

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

  task automatic one_bit(input bit b, input bit sb, input int hold, input bit late_tx);
    int k, r0;
    m_d_oe = 1'b1; m_d_o = b;                  // M1
    repeat (4) begin @(posedge clk); #1; end
    m_c_low = 1'b0;                            // M2
    k = 0;
    while (!rx_valid && k < 100) begin @(posedge clk); #1; k++; end
    chk(rx_valid && rx_bit == b, "s2: master bit received");
    chk(!c_low_o, "C not pulled before the slave bit is on SD");
    if (late_tx) begin
      repeat (20) begin @(posedge clk); #1; chk(!c_low_o, "no C pull while nothing to send"); end
    end
    tx_valid = 1'b1; tx_bit = sb;
    k = 0;
    while (c_i && k < 100) begin
      @(posedge clk); #1; k++;
      if (tx_ready) tx_valid = 1'b0;
    end
    tx_valid = 1'b0;
    chk(!c_i && d_oe && d_o == sb, "s3: C low with slave bit on SD");
    r0 = repolls;
    repeat (hold) begin
      @(posedge clk); #1;
      chk(d_oe && d_o == sb, "slave bit held while master slow");
    end
    if (hold > 6 * SETTLE) chk(repolls > r0, "slave re-polled while master slow");
    k = 0;
    while (c_i && k < 100) begin @(posedge clk); #1; k++; end
    m_d_oe = 1'b0;                             // M3
    repeat (2) begin @(posedge clk); #1; end
    chk(md_pin == sb, "M4: slave bit at the master end");
    m_c_low = 1'b1;                            // M5
    k = 0;
    while (md_pin == sb && k < 100) begin @(posedge clk); #1; k++; end
    chk(md_pin == !sb, "s6: inverse bit at the master end");
    chk(!c_low_o && d_oe, "s5: C released, SD still driven");
    repeat (SETTLE + 2) begin @(posedge clk); #1; end
    chk(!busy_o, "slave idle after the cycle");
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; tx_valid = 1'b0; tx_bit = 1'b0; rx_ready = 1'b1;
    m_c_low = 1'b1; m_d_oe = 1'b0; m_d_o = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 24; i++)
      one_bit(1'($urandom), 1'($urandom), $urandom_range(60), (i % 4) == 2);
    $display("re-polls seen: %0d", repolls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
