// Behavioural model of the two wires of the 2B-2B link (it stands for wires,
// a pull-up and a series resistance, not for logic).
//
// Clock wire C: each host either pulls it low or releases it; a pull-up makes
// it high when both release it (wired-AND), so both ends always see the same
// level.  c_both_low flags the phase where both hosts pull low.
// Data wire D: each host drives its end or releases it, and a series
// resistance between the ends lets each driving end keep its own level.  An
// end that is released reads the other end's drive; with both released the
// wire floats high through a pull-up.  d_contend flags both ends driving
// different levels (current flows through the series resistance).
// The model is static, without delays.  The wired-AND clock wire and the two
// ends of the data wire showing different values follow the protocol's
// waveforms; the pull-up on the data wire is this design's own choice.
module tia_bb_cable (
  input  logic m_c_low,   // master pulls C low
  input  logic s_c_low,   // slave pulls C low
  input  logic m_d_oe,    // master drives its end of D
  input  logic m_d_o,
  input  logic s_d_oe,    // slave drives its end of D
  input  logic s_d_o,
  output logic c,         // level of C, seen by both hosts
  output logic md_pin,    // level at the master end of D
  output logic sd_pin,    // level at the slave end of D
  output logic c_both_low,
  output logic d_contend
);

  always_comb begin
    c          = !(m_c_low || s_c_low);
    c_both_low = m_c_low && s_c_low;
    md_pin     = m_d_oe ? m_d_o : (s_d_oe ? s_d_o : 1'b1);
    sd_pin     = s_d_oe ? s_d_o : (m_d_oe ? m_d_o : 1'b1);
    d_contend  = m_d_oe && s_d_oe && (m_d_o != s_d_o);
  end

endmodule
