// tb_ffl_frame_builder -- frames built from buffered packets, checked bit by
// bit: FD fields, label, payload, CRC-8, splitting into frames of at most 16
// words, header handshake, and pausing of the frame in trigger periods.
module tb_ffl_frame_builder;
  localparam int S = 8, FW = S - 2;
  logic clk = 0, rst_n = 0, ce;
  logic label_on = 1, crc_on = 1;
  logic [15:0] label = 16'h3C5A;
  logic len_empty, len_pop, dat_pop, hdr_req, hdr_start, hdr_done, trg_now = 0;
  logic [15:0] len_data, dat_data;
  logic frm_valid, frame_sent;
  logic [FW-1:0] frm_bits;
  int checks = 0, failures = 0, cnt = 0, per = 0, done_at = -10;
  int dq [$], lq [$], exp_pk [$];
  bit bits [$];
  int frames = 0, paused = 0, words_seen = 0;

  ffl_frame_builder #(.FRM_W(FW)) dut (.*);
  always #5 clk = ~clk;
  assign ce = (cnt == S - 1);
  assign len_empty = (lq.size() == 0);
  assign len_data = len_empty ? 16'd0 : 16'(lq[0]);
  assign dat_data = (dq.size() == 0) ? 16'd0 : 16'(dq[0]);
  assign hdr_start = ce && hdr_req && !trg_now;
  assign hdr_done = ce && (per == done_at);

  initial begin #20000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  function automatic logic [7:0] crc8(logic [7:0] c, logic [15:0] w);
    for (int i = 15; i >= 0; i--) c = {c[6:0], 1'b0} ^ ((c[7] ^ w[i]) ? 8'h07 : 8'h00);
    return c;
  endfunction
  function automatic int take(int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin v = (v << 1) | bits.pop_front(); end
    return v;
  endfunction

  // parse one finished frame
  task automatic parse();
    int fd, n, w;
    logic [7:0] c;
    fd = take(12);
    n = (fd & 15) + 1;
    chk(fd[11:10] == 2'b01, "frame type");
    chk(fd[9] == label_on && fd[8] == crc_on, "fd flags");
    chk(fd[6:4] == 0, "fd spare");
    chk(n == ((exp_pk[0] > 16) ? 16 : exp_pk[0]), $sformatf("frame words %0d", n));
    chk(fd[7] == (exp_pk[0] <= 16), "last flag");
    if (label_on) chk(take(16) == label, "label");
    c = 0;
    for (int i = 0; i < n; i++) begin
      w = take(16);
      chk(w == exp_w[0], $sformatf("payload %h exp %h", w, exp_w[0]));
      c = crc8(c, 16'(w));
      void'(exp_w.pop_front());
      words_seen++;
    end
    if (crc_on) chk(take(8) == c, "crc");
    chk(bits.size() < FW, "padding shorter than a chunk");
    while (bits.size() > 0) chk(bits.pop_front() == 0, "zero padding");
    exp_pk[0] -= n;
    if (exp_pk[0] == 0) void'(exp_pk.pop_front());
    frames++;
  endtask
  int exp_w [$];

  always @(posedge clk) if (rst_n) begin
    cnt <= (cnt == S - 1) ? 0 : cnt + 1;
    if (ce) per <= per + 1;
    if (hdr_start) done_at = per + 3;
    if (ce && frm_valid) chk(per > done_at, "frame data only after the header");
    if (ce && frm_valid && !trg_now) for (int i = FW - 1; i >= 0; i--) bits.push_back(frm_bits[i]);
    if (ce && frm_valid && trg_now) paused++;
    if (len_pop) void'(lq.pop_front());
    if (dat_pop) void'(dq.pop_front());
  end
  always @(posedge clk) if (rst_n && frame_sent) begin
    #1 parse();
  end
  // trigger periods
  always @(negedge clk) if (rst_n && cnt == 0) trg_now = ($urandom_range(0, 3) == 0);

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      int len;
      len = $urandom_range(1, 50);
      if (p % 10 == 0) begin
        wait (exp_pk.size() == 0);
        label_on = p[4]; crc_on = (p != 10);
      end
      for (int w = 0; w < len; w++) begin int v; v = $urandom_range(0, 65535); dq.push_back(v); exp_w.push_back(v); end
      exp_pk.push_back(len);
      lq.push_back(len);
      repeat ($urandom_range(1, 200)) @(negedge clk);
    end
    wait (exp_pk.size() == 0);
    chk(words_seen > 300 && paused > 0, $sformatf("coverage words %0d paused %0d frames %0d", words_seen, paused, frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
