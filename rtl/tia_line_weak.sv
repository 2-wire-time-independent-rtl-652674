// Behavioural model of one wire of the 2I2O-2B cable (not a logic block: it
// stands for a resistor network and computes its DC levels).
//
// The master drives the wire through its own output resistance R_MASTER and
// the cable resistor R_CABLE (together the "weak drive").  The slave pin, of
// output resistance R_SLAVE, sits at the far end and either drives or is
// tristate.  The master's input reads the wire at the slave end and has a
// pull-up R_PULLUP to VCC.  The node voltage is the conductance-weighted mean
// of the source voltages:
//     V = sum(Vi / Ri) / sum(1 / Ri)
// over the master branch, the pull-up and, when it drives, the slave.  The
// six possible voltages are worked out at elaboration time, so the model is a
// small multiplexer.  level is the logic value a gate with threshold VTH_MV
// sees; in_spec says whether V is a clean low (<= VIL_MV) or a clean high
// (>= VIH_MV); i_ua is the current that flows from one driver into the
// other while master and slave drive different levels (pull-up neglected).  The model is purely
// static: no delays, no RC settling.
// Resistor and supply values and the VIL/VIH targets follow the PC to
// microcontroller cable the design was measured with (470 ohm being the
// cable resistor finally chosen); VTH_MV is the typical switching point of a
// logic input.
module tia_line_weak #(
  parameter int unsigned VCC_MV   = 5000,
  parameter int unsigned R_MASTER = 100,
  parameter int unsigned R_CABLE  = 470,
  parameter int unsigned R_SLAVE  = 35,
  parameter int unsigned R_PULLUP = 4700,
  parameter int unsigned VTH_MV   = 1100,
  parameter int unsigned VIL_MV   = 800,
  parameter int unsigned VIH_MV   = 3300
) (
  input  logic        m_o,     // master weak drive level
  input  logic        s_oe,    // slave drives the wire
  input  logic        s_o,     // slave drive level
  output logic        level,   // logic level of the wire
  output logic [15:0] v_mv,    // wire voltage in millivolts
  output logic        in_spec, // voltage is a clean logic level
  output logic [15:0] i_ua     // driver-to-driver current, microamps
);

  localparam longint K = 64'd1_000_000_000;

  // Node voltage (mV, rounded) for master level m, slave drive enable e and
  // slave level s.
  function automatic longint node_mv(bit m, bit e, bit s);
    longint gm, gs, gp, num, den;
    gm  = K / (longint'(R_MASTER) + longint'(R_CABLE));
    gs  = K / longint'(R_SLAVE);
    gp  = K / longint'(R_PULLUP);
    num = gm * (m ? longint'(VCC_MV) : 0) + gp * longint'(VCC_MV);
    den = gm + gp;
    if (e) begin
      num = num + gs * (s ? longint'(VCC_MV) : 0);
      den = den + gs;
    end
    return (num + den / 2) / den;
  endfunction

  // Current flowing from one driver into the other when they disagree,
  // neglecting the pull-up (microamps, rounded).
  localparam longint R_LOOP  = longint'(R_MASTER) + longint'(R_CABLE) + longint'(R_SLAVE);
  localparam longint I_FIGHT = (longint'(VCC_MV) * 1000 + R_LOOP / 2) / R_LOOP;

  localparam longint V_0T = node_mv(1'b0, 1'b0, 1'b0);
  localparam longint V_1T = node_mv(1'b1, 1'b0, 1'b0);
  localparam longint V_00 = node_mv(1'b0, 1'b1, 1'b0);
  localparam longint V_01 = node_mv(1'b0, 1'b1, 1'b1);
  localparam longint V_10 = node_mv(1'b1, 1'b1, 1'b0);
  localparam longint V_11 = node_mv(1'b1, 1'b1, 1'b1);

  always_comb begin
    unique case ({m_o, s_oe, s_o})
      3'b000, 3'b001: v_mv = 16'(V_0T);
      3'b100, 3'b101: v_mv = 16'(V_1T);
      3'b010:         v_mv = 16'(V_00);
      3'b011:         v_mv = 16'(V_01);
      3'b110:         v_mv = 16'(V_10);
      default:        v_mv = 16'(V_11);
    endcase
    i_ua    = (s_oe && (s_o != m_o)) ? 16'(I_FIGHT) : 16'd0;
    level   = (v_mv > 16'(VTH_MV));
    in_spec = (v_mv <= 16'(VIL_MV)) || (v_mv >= 16'(VIH_MV));
  end

endmodule
