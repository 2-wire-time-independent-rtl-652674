// Test of the weak-drive wire model against the DC table of the cable the
// link was measured with: for every combination of master level and slave
// drive the wire voltage, rounded to 0.1 V, must match the published value,
// for both the 820 ohm and the 470 ohm cable resistor.  Also checked: the
// current in the master branch when master and slave disagree (5.24 mA and
// 8.26 mA), the logic level seen at a 1.1 V threshold, and the in-spec flag
// (the 820 ohm cable just misses a clean low when the slave is tristate).
`timescale 1ns/1ps
module tb_tia_line_weak;

  logic m_o, s_oe, s_o;
  logic lv8, lv4, ok8, ok4;
  logic [15:0] mv8, mv4, ua8, ua4;

  tia_line_weak #(.R_CABLE(820)) u820 (
    .m_o, .s_oe, .s_o, .level(lv8), .v_mv(mv8), .in_spec(ok8), .i_ua(ua8));
  tia_line_weak u470 (
    .m_o, .s_oe, .s_o, .level(lv4), .v_mv(mv4), .in_spec(ok4), .i_ua(ua4));

  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Published DC table: voltage in tenths of a volt, in order
  // lo/lo, lo/hi, lo/tristate, hi/lo, hi/hi, hi/tristate (PC drive / slave).
  int tab820 [6] = '{0, 48, 8, 2, 50, 50};
  int tab470 [6] = '{0, 47, 5, 3, 50, 50};

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      m_o  = (i >= 3);
      s_oe = ((i % 3) != 2);
      s_o  = ((i % 3) == 1);
      #1;
      chk((int'(mv8) + 50) / 100 == tab820[i], $sformatf("820 ohm case %0d: %0d mV", i, mv8));
      chk((int'(mv4) + 50) / 100 == tab470[i], $sformatf("470 ohm case %0d: %0d mV", i, mv4));
      // the logic level follows the slave when it drives, else the master
      chk(lv8 == (s_oe ? s_o : m_o), $sformatf("820 ohm level case %0d", i));
      chk(lv4 == (s_oe ? s_o : m_o), $sformatf("470 ohm level case %0d", i));
      chk(ok4, $sformatf("470 ohm in spec case %0d", i));
      chk(ok8 == (i != 2), $sformatf("820 ohm spec flag case %0d", i));
    end
    // master low, slave high: current through the resistors
    m_o = 1'b0; s_oe = 1'b1; s_o = 1'b1; #1;
    chk((int'(ua8) + 5) / 10 == 524, $sformatf("820 ohm current %0d uA", ua8));
    chk((int'(ua4) + 5) / 10 == 826, $sformatf("470 ohm current %0d uA", ua4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
