// Exhaustive test of the 2B-2B wire model: all 64 combinations of the six
// drive inputs against the expected wire levels, worked out here from the
// rules: the clock wire is low if either host pulls it low, each end of the
// data wire shows its own drive, else the other end's drive, else high.
`timescale 1ns/1ps
module tb_tia_bb_cable;

  logic m_c_low, s_c_low, m_d_oe, m_d_o, s_d_oe, s_d_o;
  logic c, md_pin, sd_pin, c_both_low, d_contend;

  tia_bb_cable dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic ec, emd, esd, eboth, econ;
      {m_c_low, s_c_low, m_d_oe, m_d_o, s_d_oe, s_d_o} = 6'(v);
      #1;
      ec    = (m_c_low == 1'b0) && (s_c_low == 1'b0);
      eboth = m_c_low & s_c_low;
      if (m_d_oe)      emd = m_d_o;
      else if (s_d_oe) emd = s_d_o;
      else             emd = 1'b1;
      if (s_d_oe)      esd = s_d_o;
      else if (m_d_oe) esd = m_d_o;
      else             esd = 1'b1;
      econ  = m_d_oe & s_d_oe & (m_d_o ^ s_d_o);
      checks++;
      if ({c, md_pin, sd_pin, c_both_low, d_contend} != {ec, emd, esd, eboth, econ}) begin
        failures++;
        $display("FAIL inputs %06b: got %05b want %05b", v[5:0],
                 {c, md_pin, sd_pin, c_both_low, d_contend}, {ec, emd, esd, eboth, econ});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
