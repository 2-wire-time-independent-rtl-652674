// Echo workload on both links of tia_top, at its default parameters.
//
// As in the link's conformance test, the master sends a stream of bytes and
// the slave answers every bit with a modified copy: here the inverse of the
// bit it has just received, returned in the same handshake cycle (the slave
// reads the master bit before it drives its own).  Bytes go out least
// significant bit first; each returned byte must be the complement of the
// byte sent.  The test is repeated with the slave running on every cycle,
// and on every 2nd, 4th, 8th and 20th cycle, a stand-in for slave clocks
// from full speed down to 1/20 of it; the master cycles per byte are printed
// and throughput must fall as the slave slows down.
`timescale 1ns/1ps
module tb_tia_echo;

  localparam int BYTES = 64;

  logic m_clk = 1'b0, s_clk = 1'b0;
  always #5   m_clk = ~m_clk;
  always #6.5 s_clk = ~s_clk;

  logic a_m_rst_n, a_m_en, a_m_tx_valid, a_m_tx_bit, a_m_tx_ready;
  logic a_m_rx_valid, a_m_rx_bit, a_m_rx_ready, a_m_timeout, a_m_busy;
  logic a_s_rst_n, a_s_en, a_s_tx_valid, a_s_tx_bit, a_s_tx_ready;
  logic a_s_rx_valid, a_s_rx_bit, a_s_rx_ready, a_s_repoll, a_s_busy;
  logic a_c, a_d, a_in_spec;
  logic [15:0] a_c_mv, a_d_mv, a_c_ua, a_d_ua;
  logic b_m_rst_n, b_m_en, b_m_tx_valid, b_m_tx_bit, b_m_tx_ready;
  logic b_m_rx_valid, b_m_rx_bit, b_m_rx_ready, b_m_timeout, b_m_busy;
  logic b_s_rst_n, b_s_en, b_s_tx_valid, b_s_tx_bit, b_s_tx_ready;
  logic b_s_rx_valid, b_s_rx_bit, b_s_rx_ready, b_s_repoll, b_s_busy;
  logic b_c, b_md, b_sd, b_c_both_low, b_d_contend;

  tia_top dut (.*);

  int checks = 0, failures = 0;
  int s_div = 1;
  int unsigned s_cyc = 0;

  // slave side: echo the inverse of each received bit
  always @(posedge s_clk) begin
    s_cyc++;
    a_s_en <= (s_cyc % s_div) == 0;
    b_s_en <= (s_cyc % s_div) == 0;
    if (a_s_rx_valid && a_s_rx_ready) begin a_s_tx_valid <= 1'b1; a_s_tx_bit <= !a_s_rx_bit; end
    else if (a_s_tx_valid && a_s_tx_ready) a_s_tx_valid <= 1'b0;
    if (b_s_rx_valid && b_s_rx_ready) begin b_s_tx_valid <= 1'b1; b_s_tx_bit <= !b_s_rx_bit; end
    else if (b_s_tx_valid && b_s_tx_ready) b_s_tx_valid <= 1'b0;
  end

  // master side: send a byte bit by bit, collect the returned bits
  task automatic send_byte(input bit link_b, input logic [7:0] v, output logic [7:0] r);
    for (int i = 0; i < 8; i++) begin
      if (!link_b) begin
        a_m_tx_valid <= 1'b1; a_m_tx_bit <= v[i];
        do @(posedge m_clk); while (!a_m_tx_ready);
        a_m_tx_valid <= 1'b0;
        do @(posedge m_clk); while (!a_m_rx_valid);
        r[i] = a_m_rx_bit;
      end else begin
        b_m_tx_valid <= 1'b1; b_m_tx_bit <= v[i];
        do @(posedge m_clk); while (!b_m_tx_ready);
        b_m_tx_valid <= 1'b0;
        do @(posedge m_clk); while (!b_m_rx_valid);
        r[i] = b_m_rx_bit;
      end
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge m_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int divs [5] = '{1, 2, 4, 8, 20};
    longint cyc [2][5];
    {a_m_en, b_m_en} = 2'b11;
    {a_s_en, b_s_en} = 2'b00;
    {a_m_tx_valid, b_m_tx_valid, a_s_tx_valid, b_s_tx_valid} = '0;
    {a_m_tx_bit, b_m_tx_bit, a_s_tx_bit, b_s_tx_bit} = '0;
    {a_m_rx_ready, b_m_rx_ready, a_s_rx_ready, b_s_rx_ready} = 4'b1111;
    {a_m_rst_n, a_s_rst_n, b_m_rst_n, b_s_rst_n} = '0;
    repeat (4) @(posedge s_clk);
    @(negedge m_clk);
    {a_m_rst_n, a_s_rst_n, b_m_rst_n, b_s_rst_n} = 4'b1111;
    for (int l = 0; l < 2; l++) begin
      for (int d = 0; d < 5; d++) begin
        longint t0;
        s_div = divs[d];
        @(posedge m_clk);
        t0 = $time;
        for (int n = 0; n < BYTES; n++) begin
          logic [7:0] v, r;
          v = 8'($urandom);
          send_byte(l == 1, v, r);
          checks++;
          if (r !== ~v) begin
            failures++;
            $display("FAIL link %s byte %0d: sent %02h got %02h", l ? "B" : "A", n, v, r);
          end
        end
        cyc[l][d] = ($time - t0) / 10 / BYTES;
        $display("link %s, slave active 1 cycle in %0d: %0d master cycles per byte",
                 l ? "B (2B-2B)" : "A (2I2O-2B)", divs[d], cyc[l][d]);
      end
      for (int d = 1; d < 5; d++) begin
        checks++;
        if (cyc[l][d] <= cyc[l][d-1]) begin
          failures++;
          $display("FAIL throughput does not fall with a slower slave");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
