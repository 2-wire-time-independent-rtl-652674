// Two complete 2-wire time independent asynchronous (TIA) links, side by
// side, each a master host, its two wires and a slave host:
//   link A, 2I2O-2B: tia_master (weak-drive outputs plus two inputs), two
//           tia_line_weak wire models, tia_slave (two tristate pins);
//   link B, 2B-2B:   tia_bb_master, the tia_bb_cable wire model,
//           tia_bb_slave; all four pins are ordinary bidirectional pins.
// The masters run on m_clk and the slaves on s_clk, two unrelated clocks, as
// the two ends of such a link are separate chips; each host also has its own
// reset and its own activity enable, which models a host that runs slowly or
// is busy with other work.  The links never assume anything about the
// relative speed of the hosts.
//
// Per link and per host the user side is a valid/ready bit stream in each
// direction: every handshake cycle moves one bit from master to slave and one
// bit from slave to master.  The wires are brought out for observation, with
// the analog levels of link A's wires as the cable model computes them.
// Status: masters pulse *_m_timeout when they give up on a silent slave;
// slaves pulse *_s_repoll each time their poll finds the master not done.
// The division into hosts and cable follows the document's test setup; the
// separate clocks and enables are this design's own way to exercise it.
module tia_top
  import tia_pkg::*;
#(
  parameter int unsigned SETTLE      = SETTLE_DEFAULT,
  parameter int unsigned SYNC_STAGES = SYNC_DEFAULT,
  parameter int unsigned TIMEOUT     = TIMEOUT_DEFAULT
) (
  input  logic        m_clk,
  input  logic        s_clk,

  // ---------------- link A: 2I2O-2B ----------------
  input  logic        a_m_rst_n,
  input  logic        a_m_en,
  input  logic        a_m_tx_valid,
  input  logic        a_m_tx_bit,
  output logic        a_m_tx_ready,
  output logic        a_m_rx_valid,
  output logic        a_m_rx_bit,
  input  logic        a_m_rx_ready,
  output logic        a_m_timeout,
  output logic        a_m_busy,
  input  logic        a_s_rst_n,
  input  logic        a_s_en,
  input  logic        a_s_tx_valid,
  input  logic        a_s_tx_bit,
  output logic        a_s_tx_ready,
  output logic        a_s_rx_valid,
  output logic        a_s_rx_bit,
  input  logic        a_s_rx_ready,
  output logic        a_s_repoll,
  output logic        a_s_busy,
  output logic        a_c,          // clock wire level
  output logic        a_d,          // data wire level
  output logic [15:0] a_c_mv,
  output logic [15:0] a_d_mv,
  output logic        a_in_spec,    // both wires at clean logic levels
  output logic [15:0] a_c_ua,       // driver-to-driver current on C, uA
  output logic [15:0] a_d_ua,       // driver-to-driver current on D, uA

  // ---------------- link B: 2B-2B ------------------
  input  logic        b_m_rst_n,
  input  logic        b_m_en,
  input  logic        b_m_tx_valid,
  input  logic        b_m_tx_bit,
  output logic        b_m_tx_ready,
  output logic        b_m_rx_valid,
  output logic        b_m_rx_bit,
  input  logic        b_m_rx_ready,
  output logic        b_m_timeout,
  output logic        b_m_busy,
  input  logic        b_s_rst_n,
  input  logic        b_s_en,
  input  logic        b_s_tx_valid,
  input  logic        b_s_tx_bit,
  output logic        b_s_tx_ready,
  output logic        b_s_rx_valid,
  output logic        b_s_rx_bit,
  input  logic        b_s_rx_ready,
  output logic        b_s_repoll,
  output logic        b_s_busy,
  output logic        b_c,          // clock wire level
  output logic        b_md,         // data wire, master end
  output logic        b_sd,         // data wire, slave end
  output logic        b_c_both_low,
  output logic        b_d_contend
);

  // ---------------- link A ----------------
  logic a_mc, a_md;
  logic a_sc_oe, a_sc_o, a_sd_oe, a_sd_o;
  logic a_c_ok, a_d_ok;

  tia_master #(.SETTLE(SETTLE), .SYNC_STAGES(SYNC_STAGES), .TIMEOUT(TIMEOUT)) u_a_master (
    .clk(m_clk), .rst_n(a_m_rst_n), .en(a_m_en),
    .tx_valid(a_m_tx_valid), .tx_bit(a_m_tx_bit), .tx_ready(a_m_tx_ready),
    .rx_valid(a_m_rx_valid), .rx_bit(a_m_rx_bit), .rx_ready(a_m_rx_ready),
    .mc_o(a_mc), .md_o(a_md), .sc_i(a_c), .sd_i(a_d),
    .timeout_o(a_m_timeout), .busy_o(a_m_busy)
  );

  tia_line_weak u_a_line_c (
    .m_o(a_mc), .s_oe(a_sc_oe), .s_o(a_sc_o),
    .level(a_c), .v_mv(a_c_mv), .in_spec(a_c_ok), .i_ua(a_c_ua)
  );

  tia_line_weak u_a_line_d (
    .m_o(a_md), .s_oe(a_sd_oe), .s_o(a_sd_o),
    .level(a_d), .v_mv(a_d_mv), .in_spec(a_d_ok), .i_ua(a_d_ua)
  );

  assign a_in_spec = a_c_ok && a_d_ok;

  tia_slave #(.SETTLE(SETTLE), .SYNC_STAGES(SYNC_STAGES)) u_a_slave (
    .clk(s_clk), .rst_n(a_s_rst_n), .en(a_s_en),
    .tx_valid(a_s_tx_valid), .tx_bit(a_s_tx_bit), .tx_ready(a_s_tx_ready),
    .rx_valid(a_s_rx_valid), .rx_bit(a_s_rx_bit), .rx_ready(a_s_rx_ready),
    .sc_oe(a_sc_oe), .sc_o(a_sc_o), .sc_i(a_c),
    .sd_oe(a_sd_oe), .sd_o(a_sd_o), .sd_i(a_d),
    .repoll_o(a_s_repoll), .busy_o(a_s_busy)
  );

  // ---------------- link B ----------------
  logic b_m_c_low, b_m_d_oe, b_m_d_o;
  logic b_s_c_low, b_s_d_oe, b_s_d_o;

  tia_bb_master #(.SETTLE(SETTLE), .SYNC_STAGES(SYNC_STAGES), .TIMEOUT(TIMEOUT)) u_b_master (
    .clk(m_clk), .rst_n(b_m_rst_n), .en(b_m_en),
    .tx_valid(b_m_tx_valid), .tx_bit(b_m_tx_bit), .tx_ready(b_m_tx_ready),
    .rx_valid(b_m_rx_valid), .rx_bit(b_m_rx_bit), .rx_ready(b_m_rx_ready),
    .c_low_o(b_m_c_low), .c_i(b_c), .d_oe(b_m_d_oe), .d_o(b_m_d_o), .d_i(b_md),
    .timeout_o(b_m_timeout), .busy_o(b_m_busy)
  );

  tia_bb_cable u_b_cable (
    .m_c_low(b_m_c_low), .s_c_low(b_s_c_low),
    .m_d_oe(b_m_d_oe), .m_d_o(b_m_d_o), .s_d_oe(b_s_d_oe), .s_d_o(b_s_d_o),
    .c(b_c), .md_pin(b_md), .sd_pin(b_sd),
    .c_both_low(b_c_both_low), .d_contend(b_d_contend)
  );

  tia_bb_slave #(.SETTLE(SETTLE), .SYNC_STAGES(SYNC_STAGES)) u_b_slave (
    .clk(s_clk), .rst_n(b_s_rst_n), .en(b_s_en),
    .tx_valid(b_s_tx_valid), .tx_bit(b_s_tx_bit), .tx_ready(b_s_tx_ready),
    .rx_valid(b_s_rx_valid), .rx_bit(b_s_rx_bit), .rx_ready(b_s_rx_ready),
    .c_low_o(b_s_c_low), .c_i(b_c), .d_oe(b_s_d_oe), .d_o(b_s_d_o), .d_i(b_sd),
    .repoll_o(b_s_repoll), .busy_o(b_s_busy)
  );

endmodule
