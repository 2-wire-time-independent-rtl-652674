// Test of the 2I2O-2B slave against a scripted master.
//
// The testbench plays the master's weak drives and the wires: each wire shows
// the slave's drive when the slave drives it, else the master's level.  For
// each bit it checks: the slave reads the master bit once MC rises, puts its
// own bit on SD before it pulls SC low, keeps polling (releasing SC and
// pulling it low again, counted as re-polls) for as long as MC stays high,
// never releases SD while MC is high, and after MC falls releases SC and then
// SD, so that SD shows the inverse bit the master put on MD.  Also checked:
// a received bit that is not taken holds the slave before it answers, and a
// slave without a bit to send waits without touching the wires.
`timescale 1ns/1ps
module tb_tia_slave;

  localparam int unsigned SETTLE = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en, tx_valid, tx_bit, tx_ready, rx_valid, rx_bit, rx_ready;
  logic sc_oe, sc_o, sc_i, sd_oe, sd_o, sd_i, repoll_o, busy_o;
  logic m_c, m_d;   // scripted master weak drives

  assign sc_i = sc_oe ? sc_o : m_c;
  assign sd_i = sd_oe ? sd_o : m_d;

  tia_slave #(.SETTLE(SETTLE)) dut (.*);

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

  task automatic one_bit(input bit b, input bit sb, input int hold, input bit late_tx,
                         input bit hold_rx);
    int k, r0;
    rx_ready = !hold_rx;
    tx_valid = 1'b0;
    m_d = b;                                   // Md
    repeat (4) begin @(posedge clk); #1; end
    m_c = 1'b1;                                // Mw
    k = 0;
    while (!rx_valid && k < 100) begin @(posedge clk); #1; k++; end
    chk(rx_valid && rx_bit == b, "Sr: master bit received");
    if (hold_rx) begin
      // the slave may not answer a new cycle while this bit is pending; the
      // current cycle still completes below
      rx_ready = 1'b1;
    end
    if (late_tx) begin
      repeat (20) begin
        @(posedge clk); #1;
        chk(!sd_oe && !sc_oe, "no drive while nothing to send");
      end
    end
    tx_valid = 1'b1; tx_bit = sb;
    k = 0;
    while (sc_i && k < 100) begin
      @(posedge clk); #1; k++;
      if (tx_valid && tx_ready) tx_valid = 1'b0;
    end
    @(posedge clk); #1; tx_valid = 1'b0;
    chk(!sc_i && sd_oe && sd_i == sb, "Sw: SC low with slave bit already on SD");
    // master is slow to read: the slave keeps polling
    r0 = repolls;
    repeat (hold) begin
      @(posedge clk); #1;
      chk(sd_oe && sd_i == sb, "SD held while MC high");
      chk(!(sc_oe && sc_o), "SC never driven high");
    end
    if (hold > 6 * SETTLE) chk(repolls > r0, "slave re-polled while master slow");
    // master reads at a moment SC is low
    k = 0;
    while (sc_i && k < 100) begin @(posedge clk); #1; k++; end
    chk(sd_i == sb, "Mr: slave bit on SD");
    m_c = 1'b0;                                // Ma
    repeat (2) begin @(posedge clk); #1; end
    m_d = !sb;                                 // Mi
    k = 0;
    while (sd_oe && k < 100) begin @(posedge clk); #1; k++; end
    chk(!sd_oe && !sc_oe, "Sy: both pins released");
    chk(sd_i == !sb, "Mx: SD shows the inverse bit from MD");
    repeat (SETTLE + 2) begin @(posedge clk); #1; end
    chk(!busy_o, "slave idle after the cycle");
    rx_ready = 1'b1;
    @(posedge clk); #1;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; tx_valid = 1'b0; tx_bit = 1'b0; rx_ready = 1'b1;
    m_c = 1'b0; m_d = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 24; i++)
      one_bit(1'($urandom), 1'($urandom), $urandom_range(60), (i % 4) == 1, 1'b0);
    // back-pressure: received bit not taken, next cycle must wait at Sr
    m_d = 1'b1; rx_ready = 1'b0;
    repeat (4) begin @(posedge clk); #1; end
    m_c = 1'b1;
    begin
      int k = 0;
      while (!rx_valid && k < 100) begin @(posedge clk); #1; k++; end
    end
    chk(rx_valid && rx_bit, "bit received before back-pressure test");
    // complete this cycle without taking the bit
    tx_valid = 1'b1; tx_bit = 1'b0;
    begin
      int k = 0;
      while (sc_i && k < 100) begin
        @(posedge clk); #1; k++;
        if (tx_ready) tx_valid = 1'b0;
      end
    end
    tx_valid = 1'b0;
    m_c = 1'b0;
    repeat (2) begin @(posedge clk); #1; end
    m_d = 1'b1;
    repeat (20) begin @(posedge clk); #1; end
    // next cycle: the slave may not read or answer while rx is pending
    m_d = 1'b0;
    repeat (4) begin @(posedge clk); #1; end
    m_c = 1'b1;
    tx_valid = 1'b1; tx_bit = 1'b1;
    repeat (40) begin
      @(posedge clk); #1;
      chk(!sc_oe && !sd_oe && rx_bit == 1'b1, "held off while received bit pending");
    end
    rx_ready = 1'b1;
    @(posedge clk); #1;
    rx_ready = 1'b0;
    begin
      int k = 0;
      while (!rx_valid && k < 100) begin @(posedge clk); #1; k++; end
    end
    chk(rx_valid && rx_bit == 1'b0, "next bit read once the pending one was taken");
    $display("re-polls seen: %0d", repolls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
