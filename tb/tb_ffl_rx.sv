// tb_ffl_rx -- FF-LYNX receiver fed by a transmitter: lock, decoding, and
// loss and recovery of the lock when the line delay changes by one bit.
// Random packets (1..40 words, several frames each) with label and CRC on
// or off, and random triggers: every word arrives in order with the right
// end-of-packet marks, each trigger arrives exactly TRG_DELAY+1 periods
// plus the fixed line/receiver delay after its request with its FLF word,
// and no CRC or FD error is seen.
module tb_ffl_rx;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, ce;
  logic label_on = 1, crc_on = 1, sync_en = 1;
  logic [15:0] label = 16'hA5C3;
  logic vlf_valid = 0, vlf_get_data, trg = 0, dat, frame_sent, hdr_deferred;
  logic [15:0] vlf_data = 0;
  logic [5:0] flf_data = 0;
  // receiver
  logic r_trg, r_valid, r_eop, locked, lock_event, unlock_event, frame_rx, crc_err, fd_err, ovf;
  logic [5:0] r_flf;
  logic [15:0] r_data, label_rx;
  logic [3:0] line = 0;
  int tap = 3, n_lock = 0, n_unlock = 0;
  int checks = 0, failures = 0, per = 0, cnt = 0;
  int exp_w [$], exp_e [$], trg_t [$], trg_d [$];
  int lat = -1, n_frames = 0, n_def = 0, n_trg = 0;

  ffl_tx #(.SPEED(S)) dut (.*);
  ffl_rx #(.SPEED(S)) u_rx (.clk, .rst_n, .ce, .din(line[tap]), .trg(r_trg), .flf_data(r_flf),
    .vlf_valid(r_valid), .vlf_data(r_data), .vlf_eop(r_eop), .vlf_get_data(1'b1), .locked,
    .lock_event, .unlock_event, .frame_rx, .crc_err, .fd_err, .label_rx, .overflow(ovf));

  always #5 clk = ~clk;
  initial begin #20000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  always @(posedge clk) begin
    line <= {line[2:0], dat};
    if (rst_n) begin
      cnt <= (cnt == S - 1) ? 0 : cnt + 1;
      if (ce) per <= per + 1;
      if (r_valid && ce) begin
        chk(exp_w.size() > 0 && r_data == 16'(exp_w[0]) && r_eop == exp_e[0],
            $sformatf("word %h eop %0d", r_data, r_eop));
        if (exp_w.size() > 0) begin void'(exp_w.pop_front()); void'(exp_e.pop_front()); end
      end
      if (r_trg) begin
        chk(trg_t.size() > 0 && r_flf == 6'(trg_d[0]), "trigger data");
        if (lat < 0) lat = per - trg_t[0];
        chk(per - trg_t[0] == lat, $sformatf("trigger latency %0d", per - trg_t[0]));
        void'(trg_t.pop_front()); void'(trg_d.pop_front()); n_trg++;
      end
      if (crc_err || fd_err) chk(0, "frame error");
      if (frame_rx) chk(label_rx == label || !label_on, "label");
      n_lock += lock_event; n_unlock += unlock_event;
      n_frames += frame_sent; n_def += hdr_deferred;
    end
  end
  assign ce = (cnt == S - 1);

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (locked);
    for (int p = 0; p < 40; p++) begin
      int len;
      len = $urandom_range(1, 40);
      if (p % 8 == 0) begin
        wait (exp_w.size() == 0);
        repeat (100) @(negedge clk);
        label_on = p[3]; crc_on = !p[4];
      end
      for (int w = 0; w < len; w++) begin
        vlf_valid = 1; vlf_data = 16'($urandom);
        trg = ($urandom_range(0, 5) == 0); flf_data = 6'($urandom);
        do @(posedge clk); while (!ce);
        if (trg) begin trg_t.push_back(per); trg_d.push_back(flf_data); end
        if (vlf_get_data) begin exp_w.push_back(vlf_data); exp_e.push_back(w == len - 1); end
        else w--;
        @(negedge clk);
      end
      vlf_valid = 0; trg = 0;
      repeat ($urandom_range(1, 30)) begin do @(posedge clk); while (!ce); @(negedge clk); end
      wait (exp_w.size() < 60);
    end
    wait (exp_w.size() == 0);
    repeat (200) @(negedge clk);
    chk(trg_t.size() == 0, "all triggers received");
    // one bit less delay on the line: the receiver must unlock and relock
    tap = 2;
    repeat (S * 3 * 10) @(negedge clk);
    chk(n_unlock == 1 && n_lock == 2 && locked, $sformatf("relock: lock %0d unlock %0d", n_lock, n_unlock));
    chk(n_frames >= 60 && n_def > 0, $sformatf("frames %0d deferred %0d", n_frames, n_def));
    $display("trigger latency %0d periods, %0d triggers, %0d frames", lat, n_trg, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
