// tb_tc_tx_controller -- replay of a stored test vector: packets handed out
// word by word after their timestamps with a gap between packets, the
// emulated buffer limit and its loss count, triggers one period after their
// timestamps with their FLF words, end of the test window.
module tb_tc_tx_controller;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, ce, start = 0;
  logic [31:0] window = 900, ts;
  logic [15:0] n_vlf = 0, n_trg = 0, buf_limit = 64, lost_words, tx_packets;
  logic busy, done;
  logic [7:0] vlf_addr, trg_addr;
  logic [9:0] dw_addr;
  logic [31:0] vlf_ts_q, vlf_len_q, dw_q, trg_ts_q, flf_q;
  logic vlf_valid, vlf_get_data = 1, trg;
  logic [15:0] vlf_data;
  logic [5:0] flf_data;
  int checks = 0, failures = 0, cnt = 0;
  logic [31:0] m_ts [256], m_len [256], m_dw [1024], m_tts [256], m_flf [256];
  int exp_w [$], tq [$], fq [$];
  int cur_len = 0, pk = 0, gap_ok = 1, lost_exp = 0, ends = 0;

  tc_tx_controller dut (.*);
  always #5 clk = ~clk;
  assign ce = (cnt == S - 1);
  always @(posedge clk) begin
    cnt <= (cnt == S - 1) ? 0 : cnt + 1;
    vlf_ts_q <= m_ts[vlf_addr]; vlf_len_q <= m_len[vlf_addr]; dw_q <= m_dw[dw_addr];
    trg_ts_q <= m_tts[trg_addr]; flf_q <= m_flf[trg_addr];
  end
  initial begin #20000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  // host side of the FF-TX, sampled on the strobe
  always @(posedge clk) if (rst_n && ce) begin
    if (vlf_valid && vlf_get_data) begin
      chk(exp_w.size() > 0 && vlf_data == 16'(exp_w[0]), $sformatf("word %h", vlf_data));
      if (cur_len == 0) chk(ts > m_ts[pk], "packet after its timestamp");
      void'(exp_w.pop_front());
      cur_len++;
    end else if (!vlf_valid && cur_len > 0) begin
      cur_len = 0; pk++; ends++;
    end
    if (trg) begin
      chk(tq.size() > 0 && ts == 32'(tq[0] + 1) && flf_data == 6'(fq[0]),
          $sformatf("trigger at %0d", ts));
      void'(tq.pop_front()); void'(fq.pop_front());
    end
  end
  always @(negedge clk) vlf_get_data = ($urandom_range(0, 3) != 0);

  task automatic run(int limit);
    int base = 0;
    exp_w = {}; tq = {}; fq = {};
    lost_exp = 0; pk = 0; ends = 0;
    for (int p = 0; p < n_vlf; p++) begin
      for (int w = 0; w < int'(m_len[p]); w++) begin
        if (w < limit) exp_w.push_back(m_dw[base + w]);
      end
      if (m_len[p] > limit) lost_exp += m_len[p] - limit;
      base += m_len[p];
    end
    for (int t = 0; t < n_trg; t++) begin tq.push_back(m_tts[t]); fq.push_back(m_flf[t] & 63); end
    buf_limit = 16'(limit);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    chk(ts == window, "window length");
    repeat (S * 4) @(negedge clk);
    chk(exp_w.size() == 0 && tq.size() == 0, "everything replayed");
    chk(lost_words == 16'(lost_exp), $sformatf("lost %0d exp %0d", lost_words, lost_exp));
    chk(tx_packets == n_vlf && ends == n_vlf, "packet count");
  endtask

  initial begin
    int base = 0, t = 3;
    for (int p = 0; p < 20; p++) begin
      m_ts[p] = p * 40 + $urandom_range(0, 20);
      m_len[p] = $urandom_range(1, 24);
      for (int w = 0; w < int'(m_len[p]); w++) m_dw[base + w] = $urandom_range(0, 65535);
      base += m_len[p];
    end
    for (int k = 0; k < 60; k++) begin
      t += $urandom_range(2, 20); m_tts[k] = t; m_flf[k] = $urandom;
    end
    n_vlf = 20; n_trg = 60;
    repeat (3) @(negedge clk); rst_n = 1;
    run(64);
    run(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
