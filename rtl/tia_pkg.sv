// Shared types and defaults for the 2-wire time independent asynchronous
// (TIA) link.
//
// A TIA link moves one bit from a master to a slave and one bit back in every
// handshake cycle, using only two wires and no timing assumptions: each host
// reacts to the order of signal changes, never to their timing.  Two wire
// arrangements are built here:
//   * 2I2O-2B: the master has two weak-drive outputs (an output pin behind a
//     series resistor) plus two inputs that read the wires; the slave has two
//     ordinary tristate IO pins and may overdrive the master.
//   * 2B-2B:   both hosts have two ordinary bidirectional pins; the clock wire
//     is wired-AND (driven low or released) and the data wire has a series
//     resistance so each end can see its own drive.
// The package holds the state encodings of the four protocol machines and the
// default sizes that the modules share.  The state names follow the event
// names of the protocol waveforms (Md, Mw, Sr, ... and M1..M6, s1..s6).
package tia_pkg;

  // Host clock cycles a host waits after changing one of its outputs before
  // it acts again or samples a wire.  It covers the input synchronizer and
  // the wire settling time.  Own choice: the protocol only asks that signal
  // order be preserved.
  localparam int unsigned SETTLE_DEFAULT  = 3;
  // Flip-flops in each input synchronizer.  Own choice.
  localparam int unsigned SYNC_DEFAULT    = 2;
  // Master cycles spent waiting for the slave before the master gives up and
  // returns to idle.  Own choice: the protocol only asks for a long timeout.
  localparam int unsigned TIMEOUT_DEFAULT = 65535;

  // 2I2O-2B master (weak drive)
  typedef enum logic [2:0] {
    M_IDLE,  // MC low, waiting for a bit to send (next action: Md)
    M_MW,    // MD holds the master bit; next action: MC high (Mw)
    M_MR,    // polling SC for low (slave bit ready)
    M_MRD,   // SC seen low; read SD once it has settled (Mr)
    M_MA,    // next action: MC low (Ma)
    M_MI,    // next action: MD = inverse of the slave bit (Mi)
    M_MX     // waiting for SD to equal MD: slave released both wires (Mx)
  } tia_mstate_e;

  // 2I2O-2B slave (tristate pins)
  typedef enum logic [2:0] {
    S_IDLE,  // SC and SD released, waiting for MC high on the SC pin
    S_SR,    // MC seen high; read SD once settled (Sr)
    S_SD,    // next action: drive own bit on SD (Sd)
    S_SW,    // next action: drive SC low (Sw)
    S_SF,    // next action: release SC to poll the master (Sf / Sx)
    S_CHK,   // SC released: high = master not done, low = acknowledged
    S_SY     // next action: release SD (Sy)
  } tia_sstate_e;

  // 2B-2B master
  typedef enum logic [2:0] {
    B_IDLE,  // holds C low, MD released; next action: drive MD (M1)
    B_M2,    // next action: release C (M2)
    B_M3,    // polling C for low (slave bit ready); then release MD (M3)
    B_M4,    // read the slave bit on MD (M4)
    B_M5,    // next action: drive C low (M5)
    B_M6     // waiting for the inverse slave bit on MD (M6)
  } tia_bmstate_e;

  // 2B-2B slave
  typedef enum logic [2:0] {
    T_IDLE,  // SC released, waiting for C high; then release SD (s1)
    T_S2,    // read the master bit on SD (s2)
    T_S2D,   // next action: drive own bit on SD (s2)
    T_S3,    // next action: drive C low (s3)
    T_S4,    // next action: release C to poll the master (s4 / s5)
    T_S4C,   // C released: high = master not done, low = master holds it
    T_S6     // next action: drive the inverse bit on SD (s6)
  } tia_bsstate_e;

endpackage
