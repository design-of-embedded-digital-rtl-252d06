// tb_ffl_ths_detector -- decoding of sync, header and trigger symbols.
module tb_ffl_ths_detector;
  import ffl_pkg::*;
  localparam int S = 8;
  logic [3*S-1:0] sr = 0;
  logic word_stb = 0, sync_hit, trg, hdr;
  logic [S-3:0] frm;
  int checks = 0, failures = 0, n_sync = 0, n_hdr = 0, n_trg = 0;
  ffl_ths_detector #(.SPEED(S)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #1000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [1:0] s2, s1, s0;
      int k;
      k = $urandom_range(0, 3);
      {s2, s1, s0} = (k == 0) ? SEQ_SYNC : (k == 1) ? SEQ_HDR : 6'($urandom);
      if (k == 2) s0 = THS_TRG;
      sr = 24'($urandom);
      sr[23:22] = s2; sr[15:14] = s1; sr[7:6] = s0;
      word_stb = $urandom_range(0, 1);
      #1;
      chk(sync_hit == ({s2, s1, s0} == SEQ_SYNC), "sync");
      chk(hdr == (word_stb && {s2, s1, s0} == SEQ_HDR), "hdr");
      chk(trg == (word_stb && s0 == THS_TRG), "trg");
      chk(frm == sr[5:0], "frm");
      n_sync += sync_hit; n_hdr += hdr; n_trg += trg;
    end
    chk(n_sync > 0 && n_hdr > 0 && n_trg > 0, $sformatf("coverage %0d %0d %0d", n_sync, n_hdr, n_trg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
