// Slave scan-delay sweep on the 2I2O-2B link: how the length of the slave's
// poll loop affects throughput and the number of re-polls.
//
// Seven copies of the link (master, two wire models, slave) run side by
// side.  They differ only in the slave's SETTLE, from 2 to 8 enabled cycles.
// SETTLE sets how long the slave holds C low and how long it leaves C
// released in each pass of its poll loop, so it plays the part of the delay
// count in the slave's scan loop.  The master keeps the default SETTLE and
// steps only on every 5th clock, like a host polling in a software loop.
// Master and slave clocks run at unrelated rates (10 ns and 13 ns).
//
// Each copy exchanges 128 random bits both ways.  Checks:
//   - every bit arrives intact and in order, both ways;
//   - no master timeout;
//   - the slave re-polls at least once in each copy;
//   - the longest scan delay needs more master clocks per bit than the
//     shortest.
// The bench prints master clocks per bit and re-polls per bit for each delay.
// Throughput need not fall steadily with the delay.  With a short slave loop
// the master's sparse samples often land in the released half of the loop,
// so the slave re-polls more and the bit takes longer.  With the defaults
// here, SETTLE 2 is slower than 3 and 4 (4 re-polls per bit against 2).  The
// sweep range follows the evaluation of the
// protocol (delay counts 1 to 8, with 1 mapped to the smallest legal
// SETTLE); the poll divider and bit count are this bench's own choice.
`timescale 1ns/1ps
module tb_tia_scan;
  import tia_pkg::*;

  localparam int N     = 7;       // copies: slave SETTLE = 2 .. 8
  localparam int BITS  = 128;
  localparam int M_DIV = 5;       // master steps every M_DIV-th clock

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
  logic m_en;
  int unsigned div_cnt;
  always_ff @(posedge m_clk or negedge rst_n)
    if (!rst_n) div_cnt <= 0;
    else        div_cnt <= (div_cnt == M_DIV - 1) ? 0 : div_cnt + 1;
  assign m_en = (div_cnt == 0);

  logic [N-1:0] m_txr, m_rxv, m_rxb, m_to, s_txr, s_rxv, s_rxb, s_rep;
  logic [N-1:0] m_txb, s_txb;
  logic [N-1:0] done;

  // Per copy logs and counters.
  bit m_sent[N][$], s_sent[N][$], m_got[N][$], s_got[N][$];
  int unsigned cycles[N], repolls[N], timeouts[N];

  for (genvar g = 0; g < N; g++) begin : g_link
    logic mc, md, sc_oe, sc_o, sd_oe, sd_o, c, d, c_ok, d_ok;
    logic [15:0] c_mv, d_mv, c_ua, d_ua;
    logic m_busy, s_busy;

    tia_master u_master (
      .clk(m_clk), .rst_n(rst_n), .en(m_en),
      .tx_valid(!done[g]), .tx_bit(m_txb[g]), .tx_ready(m_txr[g]),
      .rx_valid(m_rxv[g]), .rx_bit(m_rxb[g]), .rx_ready(1'b1),
      .mc_o(mc), .md_o(md), .sc_i(c), .sd_i(d),
      .timeout_o(m_to[g]), .busy_o(m_busy)
    );
    tia_line_weak u_line_c (
      .m_o(mc), .s_oe(sc_oe), .s_o(sc_o),
      .level(c), .v_mv(c_mv), .in_spec(c_ok), .i_ua(c_ua)
    );
    tia_line_weak u_line_d (
      .m_o(md), .s_oe(sd_oe), .s_o(sd_o),
      .level(d), .v_mv(d_mv), .in_spec(d_ok), .i_ua(d_ua)
    );
    tia_slave #(.SETTLE(2 + g)) u_slave (
      .clk(s_clk), .rst_n(rst_n), .en(1'b1),
      .tx_valid(1'b1), .tx_bit(s_txb[g]), .tx_ready(s_txr[g]),
      .rx_valid(s_rxv[g]), .rx_bit(s_rxb[g]), .rx_ready(1'b1),
      .sc_oe(sc_oe), .sc_o(sc_o), .sc_i(c),
      .sd_oe(sd_oe), .sd_o(sd_o), .sd_i(d),
      .repoll_o(s_rep[g]), .busy_o(s_busy)
    );

    assign done[g] = (m_got[g].size() >= BITS);

    always_ff @(posedge m_clk or negedge rst_n)
      if (!rst_n) m_txb[g] <= 1'($urandom);
      else begin
        if (!done[g]) cycles[g]++;
        if (!done[g] && m_txr[g]) begin
          m_sent[g].push_back(m_txb[g]);
          m_txb[g] <= 1'($urandom);
        end
        if (m_rxv[g]) m_got[g].push_back(m_rxb[g]);
        if (m_to[g]) timeouts[g]++;
      end

    always_ff @(posedge s_clk or negedge rst_n)
      if (!rst_n) s_txb[g] <= 1'($urandom);
      else begin
        if (s_txr[g]) begin
          s_sent[g].push_back(s_txb[g]);
          s_txb[g] <= 1'($urandom);
        end
        if (s_rxv[g]) s_got[g].push_back(s_rxb[g]);
        if (s_rep[g] && !done[g]) repolls[g]++;
      end
  end

  // Watchdog: far above BITS * (cycles per bit at the slowest setting).
  initial begin : watchdog
    repeat (BITS * 2000) @(posedge m_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge m_clk);
    rst_n = 1'b1;
    wait (&done);
    repeat (20 * M_DIV) @(posedge m_clk);

    $display("slave SETTLE | master clocks/bit | re-polls/bit");
    for (int g = 0; g < N; g++) begin
      $display("      %0d      |      %6.1f       |    %5.2f", 2 + g,
               real'(cycles[g]) / BITS, real'(repolls[g]) / BITS);
      for (int i = 0; i < BITS; i++) begin
        check(i < s_got[g].size() && s_got[g][i] == m_sent[g][i],
              $sformatf("SETTLE %0d: master bit %0d", 2 + g, i));
        check(m_got[g][i] == s_sent[g][i],
              $sformatf("SETTLE %0d: slave bit %0d", 2 + g, i));
      end
      check(timeouts[g] == 0, $sformatf("SETTLE %0d: no timeout", 2 + g));
      check(repolls[g] > 0, $sformatf("SETTLE %0d: slave re-polled", 2 + g));
    end
    check(cycles[N-1] > cycles[0], "longest scan delay is slower than shortest");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
