// tb_tc_rx_controller -- recording of received words, packet timestamps and
// lengths, and trigger timestamps with FLF words into the RX tables.
module tb_tc_rx_controller;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, ce, start = 0;
  logic [31:0] ts = 0;
  logic vlf_valid = 0, vlf_eop = 0, vlf_get_data, trg = 0;
  logic [15:0] vlf_data = 0, rx_packets, rx_words, rx_triggers;
  logic [5:0] flf_data = 0;
  logic pkt_we, dw_we, trg_we;
  logic [7:0] pkt_addr, trg_addr;
  logic [9:0] dw_addr;
  logic [31:0] pkt_ts_d, pkt_len_d, dw_d, trg_ts_d, flf_d;
  logic [31:0] m_ts [256], m_len [256], m_dw [1024], m_tts [256], m_flf [256];
  int e_ts [$], e_len [$], e_dw [$], e_tts [$], e_flf [$];
  int checks = 0, failures = 0, cnt = 0;

  tc_rx_controller dut (.*);
  always #5 clk = ~clk;
  assign ce = (cnt == S - 1);
  always @(posedge clk) begin
    cnt <= (cnt == S - 1) ? 0 : cnt + 1;
    if (ce) ts <= ts + 1;
    if (pkt_we) begin m_ts[pkt_addr] <= pkt_ts_d; m_len[pkt_addr] <= pkt_len_d; end
    if (dw_we) m_dw[dw_addr] <= dw_d;
    if (trg_we) begin m_tts[trg_addr] <= trg_ts_d; m_flf[trg_addr] <= flf_d; end
  end
  initial begin #20000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  initial begin
    int plen;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(vlf_get_data, "always ready");
    for (int p = 0; p < 40; p++) begin
      plen = $urandom_range(1, 20);
      for (int w = 0; w < plen; w++) begin
        while (cnt != S - 1) @(negedge clk);
        vlf_valid = 1; vlf_data = 16'($urandom); vlf_eop = (w == plen - 1);
        e_dw.push_back(vlf_data);
        if (vlf_eop) begin e_ts.push_back(ts); e_len.push_back(plen); end
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          trg = 1; flf_data = 6'($urandom); e_tts.push_back(ts); e_flf.push_back(flf_data);
        end
        @(negedge clk);
        vlf_valid = 0; trg = 0;
        repeat ($urandom_range(0, 12)) @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    chk(rx_packets == e_ts.size() && rx_words == e_dw.size() && rx_triggers == e_tts.size(), "counters");
    foreach (e_ts[i]) chk(m_ts[i] == e_ts[i] && m_len[i] == e_len[i], $sformatf("packet %0d", i));
    foreach (e_dw[i]) chk(m_dw[i] == e_dw[i], $sformatf("word %0d %h exp %h", i, m_dw[i], e_dw[i]));
    foreach (e_tts[i]) chk(m_tts[i] == e_tts[i] && m_flf[i] == e_flf[i], $sformatf("trigger %0d", i));
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(rx_packets == 0 && rx_words == 0 && rx_triggers == 0, "cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
