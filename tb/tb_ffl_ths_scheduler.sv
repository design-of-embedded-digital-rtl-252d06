// tb_ffl_ths_scheduler -- fixed trigger latency, header/sync sequences that
// never collide with triggers, header start/done timing, deferral.
module tb_ffl_ths_scheduler;
  import ffl_pkg::*;
  localparam int S = 4;
  logic clk = 0, rst_n = 0, ce = 0, trg_in = 0, hdr_req = 0, sync_en = 1;
  logic [5:0] flf_in = 0, flf_out;
  ths_t ths;
  logic trg_out, hdr_start, hdr_done, deferred;
  int checks = 0, failures = 0, k = 0;
  int n_hdr = 0, n_sync = 0, n_trg = 0, n_def = 0;
  logic t_hist [int];
  logic [5:0] d_hist [int];
  int hdr_at = -100, seq_at = -100, spos = 0;
  logic [5:0] seq;
  ffl_ths_scheduler #(.FLF_W(6)) dut (.*);
  always #5 clk = ~clk;
  initial begin #4000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s at %0d", s, k); end endtask

  // monitor on the strobe: the current symbol belongs to the word loaded now
  always @(posedge clk) if (rst_n && ce) begin
    t_hist[k] = trg_in; d_hist[k] = flf_in;
    if (k >= 3) begin
      chk(trg_out == t_hist[k-3], "trigger latency");
      if (t_hist[k-3]) chk(flf_out == d_hist[k-3], "flf data");
    end
    if (trg_out) begin chk(ths == THS_TRG, "trigger symbol"); n_trg++; end
    if (k - seq_at >= 1 && k - seq_at <= 3) begin
      chk(ths == seq[5 - 2*(k-seq_at-1) -: 2], "header symbol");
      chk(spos == 0, "header inside sync");
    end else if (!trg_out) begin
      if (spos == 0 && ths == SEQ_SYNC[5:4]) spos = 1;
      else if (spos == 1) begin chk(ths == SEQ_SYNC[3:2], "sync symbol 2"); spos = 2; end
      else if (spos == 2) begin chk(ths == SEQ_SYNC[1:0], "sync symbol 3"); spos = 0; n_sync++; end
      else chk(ths == THS_IDLE, "idle symbol");
    end else chk(spos == 0, "trigger inside sync");
    chk(hdr_done == (k - hdr_at == 3), "hdr_done timing");
    if (hdr_start) begin hdr_at = k; seq_at = k; seq = SEQ_HDR; n_hdr++; end
    n_def += deferred;
    k++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 3000; p++) begin
      for (int c = 0; c < S - 1; c++) @(negedge clk);
      trg_in = (p % 200 < 100) ? ($urandom_range(0, 2) == 0) : ($urandom_range(0, 9) == 0);
      flf_in = 6'($urandom);
      if (!hdr_req && $urandom_range(0, 9) == 0) hdr_req = 1;
      ce = 1;
      #1;
      if (hdr_start) begin @(negedge clk); hdr_req = 0; end
      else @(negedge clk);
      ce = 0;
    end
    chk(n_hdr > 50 && n_trg > 300 && n_def > 0 && n_sync > 50, $sformatf("coverage hdr %0d trg %0d def %0d sync %0d", n_hdr, n_trg, n_def, n_sync));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
