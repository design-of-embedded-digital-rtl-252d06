// tb_ffl_frame_analyzer -- frames fed as FRM chunks after a header, with
// trigger periods and idle noise in between: payload words, end-of-packet,
// label, CRC check (some frames carry a wrong CRC), bad frame types.
module tb_ffl_frame_analyzer;
  localparam int S = 8, FW = S - 2;
  logic clk = 0, rst_n = 0, word_stb = 0, trg = 0, hdr = 0;
  logic [FW-1:0] frm = 0;
  logic out_valid, out_eop, crc_err, fd_err, frame_rx;
  logic [15:0] out_word, label_rx;
  int checks = 0, failures = 0;
  int exp_w [$], exp_e [$];
  int n_crc = 0, n_fd = 0, exp_crc = 0, exp_fd = 0, n_frames = 0;

  ffl_frame_analyzer #(.FRM_W(FW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  function automatic logic [7:0] crc8(logic [7:0] c, logic [15:0] w);
    for (int i = 15; i >= 0; i--) c = {c[6:0], 1'b0} ^ ((c[7] ^ w[i]) ? 8'h07 : 8'h00);
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      chk(exp_w.size() > 0 && out_word == 16'(exp_w[0]) && out_eop == exp_e[0], "word");
      if (exp_w.size() > 0) begin void'(exp_w.pop_front()); void'(exp_e.pop_front()); end
    end
    n_crc += crc_err; n_fd += fd_err; n_frames += frame_rx;
  end

  // one word period with the given strobe-time inputs
  task automatic period(bit t, bit h, logic [FW-1:0] f);
    repeat (S - 1) @(negedge clk);
    word_stb = 1; trg = t; hdr = h; frm = f;
    @(negedge clk);
    word_stb = 0; trg = 0; hdr = 0; frm = 6'($urandom);
  endtask

  task automatic send_frame(int n, bit lab, bit crc, bit last, bit bad_crc, bit bad_type);
    bit b [$];
    logic [11:0] fd;
    logic [15:0] lv, w;
    logic [7:0] c;
    fd = {bad_type ? 2'b10 : 2'b01, lab, crc, last, 3'b000, 4'(n - 1)};
    for (int i = 11; i >= 0; i--) b.push_back(fd[i]);
    lv = 16'($urandom);
    if (lab) for (int i = 15; i >= 0; i--) b.push_back(lv[i]);
    c = 0;
    for (int k = 0; k < n; k++) begin
      w = 16'($urandom);
      for (int i = 15; i >= 0; i--) b.push_back(w[i]);
      c = crc8(c, w);
      if (!bad_type) begin exp_w.push_back(w); exp_e.push_back(last && k == n - 1); end
    end
    if (crc) begin
      if (bad_crc) c ^= 8'h10;
      for (int i = 7; i >= 0; i--) b.push_back(c[i]);
    end
    while (b.size() % FW != 0) b.push_back(1'b0);
    if (bad_crc && crc && !bad_type) exp_crc++;
    if (bad_type) exp_fd++;
    period(0, 1, 6'($urandom));            // last header symbol
    while (b.size() > 0) begin
      logic [FW-1:0] ch;
      if ($urandom_range(0, 4) == 0) period(1, 0, 6'($urandom));   // trigger period
      for (int i = FW - 1; i >= 0; i--) ch[i] = b.pop_front();
      period(0, 0, ch);
    end
    repeat ($urandom_range(0, 3)) period(0, 0, 6'($urandom));
    if (lab && !bad_type) chk(label_rx == lv, "label");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 300; f++)
      send_frame($urandom_range(1, 16), $urandom_range(0, 1), $urandom_range(0, 3) != 0,
                 $urandom_range(0, 1), $urandom_range(0, 9) == 0, $urandom_range(0, 19) == 0);
    repeat (3) period(0, 0, 0);
    chk(exp_w.size() == 0, "all words out");
    chk(n_crc == exp_crc && n_fd == exp_fd, $sformatf("crc errors %0d/%0d fd errors %0d/%0d", n_crc, exp_crc, n_fd, exp_fd));
    chk(exp_crc > 0 && exp_fd > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
