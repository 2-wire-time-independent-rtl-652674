// Forged-signal test of both links: an outside signal source overrides the
// wires at random moments, and the link must never lock up.
//
// Both links are built from their blocks (master, cable model, slave), and a
// forcing generator sits between the cable and the controllers.  While a
// forcing burst is active on a wire, both ends read the level it forces
// instead of the real wire level.  A strong external generator does the same
// to a real cable.  Bursts hit C or D of either link at random, last 1 to 300
// master cycles, and every eighth burst holds C longer than the master
// timeout.  Both hosts send random bits all the time and always take what
// they receive.
//
// Phases and checks:
//   1. clean traffic: every bit arrives intact and in order, both ways;
//   2. forgery: 60000 master cycles of bursts.  Data errors are expected and
//      are not checked.  The test counts bursts, master timeouts and slave
//      re-polls;
//   3. recovery: with the wires left alone, each link must again deliver
//      16 bits both ways, then 64 more with no timeout.  From bit 16 to bit
//      63 the received stream must match the sent stream at one fixed shift
//      of at most 8 bits: the bits of one cycle belong together again.
// A link that delivers nothing for 4*TIMEOUT cycles counts as locked up.
// Each mechanism (burst on each wire, timeout, re-poll) must occur at least
// once.  The timeout is shortened to 2000 cycles to keep the run short; all
// other parameters are the defaults.  The test follows the fault-induction
// test of the protocol's evaluation; its burst lengths and counts are this
// bench's own choice.
`timescale 1ns/1ps
module tb_tia_forge;
  import tia_pkg::*;

  localparam int unsigned TIMEOUT = 2000;
  localparam int FORGE_CYCLES = 60000;
  localparam int POST_BITS    = 64;

  logic m_clk = 1'b0, s_clk = 1'b0;
  always #5 m_clk = ~m_clk;
  always #6.5 s_clk = ~s_clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  logic rst_n = 1'b0;

  // Forcing generator state, per link: [0] = link A, [1] = link B.
  logic [1:0] fc_on = '0, fc_val = '0, fd_on = '0, fd_val = '0;

  // ---------------- link A: 2I2O-2B ----------------
  logic a_m_txv, a_m_txb, a_m_txr, a_m_rxv, a_m_rxb, a_m_to, a_m_busy;
  logic a_s_txv, a_s_txb, a_s_txr, a_s_rxv, a_s_rxb, a_s_rep, a_s_busy;
  logic a_mc, a_md, a_sc_oe, a_sc_o, a_sd_oe, a_sd_o;
  logic a_c, a_d, a_c_seen, a_d_seen;
  logic [15:0] a_c_mv, a_d_mv, a_c_ua, a_d_ua;
  logic a_c_ok, a_d_ok;

  assign a_c_seen = fc_on[0] ? fc_val[0] : a_c;
  assign a_d_seen = fd_on[0] ? fd_val[0] : a_d;

  tia_master #(.TIMEOUT(TIMEOUT)) u_a_master (
    .clk(m_clk), .rst_n(rst_n), .en(1'b1),
    .tx_valid(a_m_txv), .tx_bit(a_m_txb), .tx_ready(a_m_txr),
    .rx_valid(a_m_rxv), .rx_bit(a_m_rxb), .rx_ready(1'b1),
    .mc_o(a_mc), .md_o(a_md), .sc_i(a_c_seen), .sd_i(a_d_seen),
    .timeout_o(a_m_to), .busy_o(a_m_busy)
  );
  tia_line_weak u_a_line_c (
    .m_o(a_mc), .s_oe(a_sc_oe), .s_o(a_sc_o),
    .level(a_c), .v_mv(a_c_mv), .in_spec(a_c_ok), .i_ua(a_c_ua)
  );
  tia_line_weak u_a_line_d (
    .m_o(a_md), .s_oe(a_sd_oe), .s_o(a_sd_o),
    .level(a_d), .v_mv(a_d_mv), .in_spec(a_d_ok), .i_ua(a_d_ua)
  );
  tia_slave u_a_slave (
    .clk(s_clk), .rst_n(rst_n), .en(1'b1),
    .tx_valid(a_s_txv), .tx_bit(a_s_txb), .tx_ready(a_s_txr),
    .rx_valid(a_s_rxv), .rx_bit(a_s_rxb), .rx_ready(1'b1),
    .sc_oe(a_sc_oe), .sc_o(a_sc_o), .sc_i(a_c_seen),
    .sd_oe(a_sd_oe), .sd_o(a_sd_o), .sd_i(a_d_seen),
    .repoll_o(a_s_rep), .busy_o(a_s_busy)
  );

  // ---------------- link B: 2B-2B ----------------
  logic b_m_txv, b_m_txb, b_m_txr, b_m_rxv, b_m_rxb, b_m_to, b_m_busy;
  logic b_s_txv, b_s_txb, b_s_txr, b_s_rxv, b_s_rxb, b_s_rep, b_s_busy;
  logic b_m_c_low, b_m_d_oe, b_m_d_o, b_s_c_low, b_s_d_oe, b_s_d_o;
  logic b_c, b_md, b_sd, b_both, b_cont;
  logic b_c_seen, b_md_seen, b_sd_seen;

  assign b_c_seen  = fc_on[1] ? fc_val[1] : b_c;
  assign b_md_seen = fd_on[1] ? fd_val[1] : b_md;
  assign b_sd_seen = fd_on[1] ? fd_val[1] : b_sd;

  tia_bb_master #(.TIMEOUT(TIMEOUT)) u_b_master (
    .clk(m_clk), .rst_n(rst_n), .en(1'b1),
    .tx_valid(b_m_txv), .tx_bit(b_m_txb), .tx_ready(b_m_txr),
    .rx_valid(b_m_rxv), .rx_bit(b_m_rxb), .rx_ready(1'b1),
    .c_low_o(b_m_c_low), .c_i(b_c_seen), .d_oe(b_m_d_oe), .d_o(b_m_d_o),
    .d_i(b_md_seen), .timeout_o(b_m_to), .busy_o(b_m_busy)
  );
  tia_bb_cable u_b_cable (
    .m_c_low(b_m_c_low), .s_c_low(b_s_c_low),
    .m_d_oe(b_m_d_oe), .m_d_o(b_m_d_o), .s_d_oe(b_s_d_oe), .s_d_o(b_s_d_o),
    .c(b_c), .md_pin(b_md), .sd_pin(b_sd),
    .c_both_low(b_both), .d_contend(b_cont)
  );
  tia_bb_slave u_b_slave (
    .clk(s_clk), .rst_n(rst_n), .en(1'b1),
    .tx_valid(b_s_txv), .tx_bit(b_s_txb), .tx_ready(b_s_txr),
    .rx_valid(b_s_rxv), .rx_bit(b_s_rxb), .rx_ready(1'b1),
    .c_low_o(b_s_c_low), .c_i(b_c_seen), .d_oe(b_s_d_oe), .d_o(b_s_d_o),
    .d_i(b_sd_seen), .repoll_o(b_s_rep), .busy_o(b_s_busy)
  );

  // ---------------- bit sources and records ----------------
  // Each host always offers a random bit; a new one is drawn once it is
  // taken.  Sent and received bits are logged per link and direction.
  // Index: [link][0] = master to slave, [link][1] = slave to master.
  bit sent[2][2][$];
  bit got [2][2][$];
  int timeouts[2], repolls[2], bursts_c[2], bursts_d[2];

  assign a_m_txv = rst_n;
  assign a_s_txv = rst_n;
  assign b_m_txv = rst_n;
  assign b_s_txv = rst_n;

  always_ff @(posedge m_clk or negedge rst_n)
    if (!rst_n) begin
      a_m_txb <= 1'($urandom);
      b_m_txb <= 1'($urandom);
    end else begin
      if (a_m_txv && a_m_txr) begin sent[0][0].push_back(a_m_txb); a_m_txb <= 1'($urandom); end
      if (b_m_txv && b_m_txr) begin sent[1][0].push_back(b_m_txb); b_m_txb <= 1'($urandom); end
      if (a_m_rxv) got[0][1].push_back(a_m_rxb);
      if (b_m_rxv) got[1][1].push_back(b_m_rxb);
      if (a_m_to) timeouts[0]++;
      if (b_m_to) timeouts[1]++;
    end

  always_ff @(posedge s_clk or negedge rst_n)
    if (!rst_n) begin
      a_s_txb <= 1'($urandom);
      b_s_txb <= 1'($urandom);
    end else begin
      if (a_s_txv && a_s_txr) begin sent[0][1].push_back(a_s_txb); a_s_txb <= 1'($urandom); end
      if (b_s_txv && b_s_txr) begin sent[1][1].push_back(b_s_txb); b_s_txb <= 1'($urandom); end
      if (a_s_rxv) got[0][0].push_back(a_s_rxb);
      if (b_s_rxv) got[1][0].push_back(b_s_rxb);
      if (a_s_rep) repolls[0]++;
      if (b_s_rep) repolls[1]++;
    end

  task automatic clear_logs();
    for (int l = 0; l < 2; l++)
      for (int dir = 0; dir < 2; dir++) begin
        sent[l][dir].delete();
        got[l][dir].delete();
      end
  endtask

  // Wait until every direction of every link has received at least n bits
  // since the logs were cleared; a direction that stalls for 4*TIMEOUT
  // master cycles counts as locked up.
  task automatic wait_bits(input int n, input string what);
    for (int l = 0; l < 2; l++)
      for (int dir = 0; dir < 2; dir++) begin
        int last = got[l][dir].size();
        int idle = 0;
        while (got[l][dir].size() < n && idle < 4 * TIMEOUT) begin
          @(posedge m_clk);
          if (got[l][dir].size() != last) begin
            last = got[l][dir].size();
            idle = 0;
          end else idle++;
        end
        check(got[l][dir].size() >= n,
              $sformatf("%s: link %s dir %0d delivered %0d of %0d bits",
                        what, l ? "B" : "A", dir, got[l][dir].size(), n));
      end
  endtask

  // Watchdog.
  initial begin : watchdog
    repeat (FORGE_CYCLES + 60 * TIMEOUT + 200000) @(posedge m_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_bursts;
    repeat (5) @(posedge m_clk);
    rst_n = 1'b1;

    // ---- 1. clean traffic, checked bit for bit
    clear_logs();
    wait_bits(40, "clean");
    for (int l = 0; l < 2; l++)
      for (int dir = 0; dir < 2; dir++)
        for (int i = 0; i < 40; i++)
          check(got[l][dir][i] == sent[l][dir][i],
                $sformatf("clean link %s dir %0d bit %0d", l ? "B" : "A", dir, i));
    check(timeouts[0] == 0 && timeouts[1] == 0, "no timeout in clean traffic");

    // ---- 2. forged signals
    timeouts[0] = 0; timeouts[1] = 0;
    repolls[0] = 0; repolls[1] = 0;
    n_bursts = 0;
    for (int cyc = 0; cyc < FORGE_CYCLES; ) begin
      int gap, len, l;
      bit on_c;
      gap  = 1 + int'($urandom_range(400));
      len  = 1 + int'($urandom_range(299));
      l    = int'($urandom_range(1));
      on_c = 1'($urandom);
      if (n_bursts % 8 == 7) begin
        on_c = 1'b1;
        len  = int'(TIMEOUT) + 500;
      end
      repeat (gap) @(posedge m_clk);
      @(negedge m_clk);
      if (on_c) begin
        fc_on[l] = 1'b1; fc_val[l] = 1'($urandom); bursts_c[l]++;
      end else begin
        fd_on[l] = 1'b1; fd_val[l] = 1'($urandom); bursts_d[l]++;
      end
      repeat (len) @(posedge m_clk);
      @(negedge m_clk);
      fc_on = '0;
      fd_on = '0;
      n_bursts++;
      cyc += gap + len + 2;
    end
    $display("forgery: %0d bursts (C A/B %0d/%0d, D A/B %0d/%0d), timeouts A/B %0d/%0d, repolls A/B %0d/%0d",
             n_bursts, bursts_c[0], bursts_c[1], bursts_d[0], bursts_d[1],
             timeouts[0], timeouts[1], repolls[0], repolls[1]);
    for (int l = 0; l < 2; l++) begin
      check(bursts_c[l] > 0, $sformatf("mechanism: C forged on link %s", l ? "B" : "A"));
      check(bursts_d[l] > 0, $sformatf("mechanism: D forged on link %s", l ? "B" : "A"));
      check(timeouts[l] > 0, $sformatf("mechanism: master timeout on link %s", l ? "B" : "A"));
      check(repolls[l] > 0,  $sformatf("mechanism: slave re-poll on link %s", l ? "B" : "A"));
    end

    // ---- 3. recovery
    clear_logs();
    wait_bits(16, "recovery");
    timeouts[0] = 0; timeouts[1] = 0;
    wait_bits(16 + POST_BITS, "after recovery");
    check(timeouts[0] == 0 && timeouts[1] == 0, "no timeout after recovery");
    for (int l = 0; l < 2; l++)
      for (int dir = 0; dir < 2; dir++) begin
        bit aligned;
        int shift_found;
        aligned = 1'b0;
        shift_found = 0;
        for (int sh = -8; sh <= 8 && !aligned; sh++) begin
          bit ok;
          ok = 1'b1;
          for (int i = 16; i < 16 + POST_BITS - 16; i++)
            if (i + sh < 0 || i + sh >= sent[l][dir].size() ||
                got[l][dir][i] != sent[l][dir][i + sh]) ok = 1'b0;
          if (ok) begin
            aligned = 1'b1;
            shift_found = sh;
          end
        end
        check(aligned, $sformatf("recovered stream matches, link %s dir %0d",
                                 l ? "B" : "A", dir));
        $display("link %s dir %0d: stream realigned at shift %0d",
                 l ? "B" : "A", dir, shift_found);
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
