// End-to-end test of tia_top at its default parameters: both 2-wire links,
// masters on a 10 ns clock and slaves on an unrelated 13 ns clock.
//
// Phases:
//   1. normal traffic with random host pauses (en), random gaps in the data
//      offered and random back-pressure on the received bits; every bit that
//      crosses a link in either direction is checked against a scoreboard;
//   2. throughput with both hosts at full speed, then with the slaves frozen
//      by a 50% duty-cycle square wave, which must slow the link down;
//   3. a slave frozen for longer than the master timeout: the masters must
//      time out, and the links must carry traffic again once the slaves run;
//   4. resets of single hosts at random moments of the cycle: the links must
//      never lock up;
//   5. a full reset, then checked traffic again.
// Data corruption is allowed around the faults of phases 3 and 4, lock-up is
// not.  Each mechanism (stalls, back-pressure, slave re-polls, contention on
// the 2B-2B data wire, timeouts, resets) is counted and must have occurred.
`timescale 1ns/1ps
module tb_tia_top;

  logic m_clk = 1'b0, s_clk = 1'b0;
  always #5   m_clk = ~m_clk;
  always #6.5 s_clk = ~s_clk;

  // link A
  logic a_m_rst_n, a_m_en, a_m_tx_valid, a_m_tx_bit, a_m_tx_ready;
  logic a_m_rx_valid, a_m_rx_bit, a_m_rx_ready, a_m_timeout, a_m_busy;
  logic a_s_rst_n, a_s_en, a_s_tx_valid, a_s_tx_bit, a_s_tx_ready;
  logic a_s_rx_valid, a_s_rx_bit, a_s_rx_ready, a_s_repoll, a_s_busy;
  logic a_c, a_d, a_in_spec;
  logic [15:0] a_c_mv, a_d_mv, a_c_ua, a_d_ua;
  // link B
  logic b_m_rst_n, b_m_en, b_m_tx_valid, b_m_tx_bit, b_m_tx_ready;
  logic b_m_rx_valid, b_m_rx_bit, b_m_rx_ready, b_m_timeout, b_m_busy;
  logic b_s_rst_n, b_s_en, b_s_tx_valid, b_s_tx_bit, b_s_tx_ready;
  logic b_s_rx_valid, b_s_rx_bit, b_s_rx_ready, b_s_repoll, b_s_busy;
  logic b_c, b_md, b_sd, b_c_both_low, b_d_contend;

  tia_top dut (.*);

  int checks = 0, failures = 0;
  bit check_data = 1'b1;

  // Traffic knobs, in percent.
  int m_en_pct = 100, s_en_pct = 100, offer_pct = 100, take_pct = 100;
  bit s_square = 1'b0;       // slaves frozen by a square wave
  bit s_freeze = 1'b0;       // slaves frozen completely
  int unsigned s_cyc = 0;

  // Scoreboards: bits in flight, master->slave and slave->master, per link.
  bit a_m2s[$], a_s2m[$], b_m2s[$], b_s2m[$];
  int a_m_rx_n = 0, a_s_rx_n = 0, b_m_rx_n = 0, b_s_rx_n = 0;

  // Mechanism counters.
  int n_m_stall = 0, n_s_stall = 0, n_backpressure = 0, n_offer_gap = 0;
  int n_a_repoll = 0, n_b_repoll = 0, n_b_contend = 0, n_b_both_low = 0;
  int n_a_timeout = 0, n_b_timeout = 0, n_resets = 0, n_spec_bad = 0;

  function automatic bit chance(int pct);
    return ($urandom_range(99) < pct);
  endfunction

  // ---------------- master side drivers and monitors ----------------
  always @(posedge m_clk) begin
    // monitors (values before this edge)
    if (a_m_tx_valid && a_m_tx_ready) a_m2s.push_back(a_m_tx_bit);
    if (b_m_tx_valid && b_m_tx_ready) b_m2s.push_back(b_m_tx_bit);
    if (a_m_rx_valid && a_m_rx_ready) begin
      a_m_rx_n++;
      if (check_data) begin
        checks++;
        if (a_s2m.size() == 0 || a_s2m.pop_front() != a_m_rx_bit) begin
          failures++; $display("FAIL link A slave->master bit %0d", a_m_rx_n);
        end
      end
    end
    if (b_m_rx_valid && b_m_rx_ready) begin
      b_m_rx_n++;
      if (check_data) begin
        checks++;
        if (b_s2m.size() == 0 || b_s2m.pop_front() != b_m_rx_bit) begin
          failures++; $display("FAIL link B slave->master bit %0d", b_m_rx_n);
        end
      end
    end
    if (a_m_timeout) n_a_timeout++;
    if (b_m_timeout) n_b_timeout++;
    if ((!a_m_en && a_m_busy) || (!b_m_en && b_m_busy)) n_m_stall++;
    if ((a_m_rx_valid && !a_m_rx_ready) || (b_m_rx_valid && !b_m_rx_ready)) n_backpressure++;
    if (b_d_contend) n_b_contend++;
    if (b_c_both_low) n_b_both_low++;
    if (!a_in_spec) n_spec_bad++;
    // drivers
    a_m_en <= chance(m_en_pct);
    b_m_en <= chance(m_en_pct);
    if (!a_m_tx_valid || a_m_tx_ready) begin
      a_m_tx_valid <= chance(offer_pct);
      a_m_tx_bit   <= 1'($urandom);
      if (offer_pct < 100) n_offer_gap++;
    end
    if (!b_m_tx_valid || b_m_tx_ready) begin
      b_m_tx_valid <= chance(offer_pct);
      b_m_tx_bit   <= 1'($urandom);
    end
    a_m_rx_ready <= chance(take_pct);
    b_m_rx_ready <= chance(take_pct);
  end

  // ---------------- slave side drivers and monitors ----------------
  always @(posedge s_clk) begin
    s_cyc++;
    if (a_s_tx_valid && a_s_tx_ready) a_s2m.push_back(a_s_tx_bit);
    if (b_s_tx_valid && b_s_tx_ready) b_s2m.push_back(b_s_tx_bit);
    if (a_s_rx_valid && a_s_rx_ready) begin
      a_s_rx_n++;
      if (check_data) begin
        checks++;
        if (a_m2s.size() == 0 || a_m2s.pop_front() != a_s_rx_bit) begin
          failures++; $display("FAIL link A master->slave bit %0d", a_s_rx_n);
        end
      end
    end
    if (b_s_rx_valid && b_s_rx_ready) begin
      b_s_rx_n++;
      if (check_data) begin
        checks++;
        if (b_m2s.size() == 0 || b_m2s.pop_front() != b_s_rx_bit) begin
          failures++; $display("FAIL link B master->slave bit %0d", b_s_rx_n);
        end
      end
    end
    if (a_s_repoll) n_a_repoll++;
    if (b_s_repoll) n_b_repoll++;
    if ((!a_s_en && a_s_busy) || (!b_s_en && b_s_busy)) n_s_stall++;
    begin
      bit run;
      if (s_freeze)      run = 1'b0;
      else if (s_square) run = ((s_cyc / 40) % 2) == 0;
      else               run = chance(s_en_pct);
      a_s_en <= run;
      b_s_en <= s_freeze ? 1'b0 : (s_square ? run : chance(s_en_pct));
    end
    if (!a_s_tx_valid || a_s_tx_ready) begin
      a_s_tx_valid <= chance(offer_pct);
      a_s_tx_bit   <= 1'($urandom);
    end
    if (!b_s_tx_valid || b_s_tx_ready) begin
      b_s_tx_valid <= chance(offer_pct);
      b_s_tx_bit   <= 1'($urandom);
    end
    a_s_rx_ready <= chance(take_pct);
    b_s_rx_ready <= chance(take_pct);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Wait until every end of both links has received n more bits; a lock-up
  // shows as a failure after limit master cycles.
  task automatic wait_traffic(input int n, input int limit, input string what);
    int a0, a1, b0, b1, k;
    a0 = a_m_rx_n; a1 = a_s_rx_n; b0 = b_m_rx_n; b1 = b_s_rx_n;
    k = 0;
    while ((a_m_rx_n - a0 < n || a_s_rx_n - a1 < n ||
            b_m_rx_n - b0 < n || b_s_rx_n - b1 < n) && k < limit) begin
      @(posedge m_clk); k++;
    end
    check(k < limit, {what, ": links keep moving bits"});
  endtask

  task automatic reset_all();
    a_m_rst_n = 1'b0; a_s_rst_n = 1'b0; b_m_rst_n = 1'b0; b_s_rst_n = 1'b0;
    repeat (4) @(posedge s_clk);
    a_m2s.delete(); a_s2m.delete(); b_m2s.delete(); b_s2m.delete();
    @(negedge m_clk);
    a_m_rst_n = 1'b1; a_s_rst_n = 1'b1; b_m_rst_n = 1'b1; b_s_rst_n = 1'b1;
  endtask

  // Master cycles to move n bits each way over link A with current knobs.
  task automatic time_bits(input int n, output int cycles);
    int a0;
    a0 = a_m_rx_n; cycles = 0;
    while (a_m_rx_n - a0 < n && cycles < 200000) begin
      @(posedge m_clk); cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge m_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int t_full, t_half;
    {a_m_en, a_s_en, b_m_en, b_s_en} = '0;
    {a_m_tx_valid, a_s_tx_valid, b_m_tx_valid, b_s_tx_valid} = '0;
    {a_m_tx_bit, a_s_tx_bit, b_m_tx_bit, b_s_tx_bit} = '0;
    {a_m_rx_ready, a_s_rx_ready, b_m_rx_ready, b_s_rx_ready} = '0;
    reset_all();

    // 1. random pauses, gaps and back-pressure, data checked
    m_en_pct = 70; s_en_pct = 60; offer_pct = 80; take_pct = 75;
    wait_traffic(300, 400000, "phase 1");

    // 2. throughput: full speed, then slaves frozen half of the time
    m_en_pct = 100; s_en_pct = 100; offer_pct = 100; take_pct = 100;
    wait_traffic(4, 20000, "phase 2 warm-up");
    time_bits(64, t_full);
    s_square = 1'b1;
    time_bits(64, t_half);
    s_square = 1'b0;
    $display("link A: %0d master cycles for 64 bits at full speed, %0d with 50%% slave duty",
             t_full, t_half);
    check(t_half > t_full + t_full / 4, "50% slave duty slows the link");

    // 3. frozen slaves: masters time out, then the links recover
    check_data = 1'b0;
    s_freeze = 1'b1;
    begin
      int k = 0;
      while ((n_a_timeout == 0 || n_b_timeout == 0) && k < 200000) begin
        @(posedge m_clk); k++;
      end
    end
    check(n_a_timeout > 0, "link A master timed out on a frozen slave");
    check(n_b_timeout > 0, "link B master timed out on a frozen slave");
    s_freeze = 1'b0;
    wait_traffic(16, 50000, "phase 3 after timeout");

    // 4. random single-host resets in the middle of cycles
    m_en_pct = 80; s_en_pct = 80;
    for (int r = 0; r < 40; r++) begin
      repeat ($urandom_range(200, 10)) @(posedge m_clk);
      @(negedge m_clk);
      case ($urandom_range(3))
        0: a_m_rst_n = 1'b0;
        1: a_s_rst_n = 1'b0;
        2: b_m_rst_n = 1'b0;
        default: b_s_rst_n = 1'b0;
      endcase
      n_resets++;
      repeat (3) @(posedge s_clk);
      @(negedge m_clk);
      a_m_rst_n = 1'b1; a_s_rst_n = 1'b1; b_m_rst_n = 1'b1; b_s_rst_n = 1'b1;
      wait_traffic(4, 200000, "phase 4 after a reset");
    end

    // 5. full reset, checked traffic again
    m_en_pct = 90; s_en_pct = 70; offer_pct = 90; take_pct = 90;
    reset_all();
    check_data = 1'b1;
    wait_traffic(100, 300000, "phase 5");

    // every mechanism must have happened
    $display("bits  A m->s %0d s->m %0d   B m->s %0d s->m %0d",
             a_s_rx_n, a_m_rx_n, b_s_rx_n, b_m_rx_n);
    $display("master stalls %0d, slave stalls %0d, back-pressure %0d, offer gaps %0d",
             n_m_stall, n_s_stall, n_backpressure, n_offer_gap);
    $display("re-polls A %0d B %0d, B data contention %0d, B clock both low %0d",
             n_a_repoll, n_b_repoll, n_b_contend, n_b_both_low);
    $display("timeouts A %0d B %0d, resets %0d, A levels out of spec %0d",
             n_a_timeout, n_b_timeout, n_resets, n_spec_bad);
    check(n_m_stall > 0,      "master stall happened");
    check(n_s_stall > 0,      "slave stall happened");
    check(n_backpressure > 0, "receive back-pressure happened");
    check(n_offer_gap > 0,    "gaps in offered data happened");
    check(n_a_repoll > 0,     "link A slave re-poll happened");
    check(n_b_repoll > 0,     "link B slave re-poll happened");
    check(n_b_contend > 0,    "link B data wire contention happened");
    check(n_b_both_low > 0,   "link B clock wire held low by both hosts");
    check(n_resets > 0,       "host resets happened");
    check(n_spec_bad == 0,    "link A wire levels always in spec with 470 ohm cable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
