// tb_tc_config_regs -- register write/readback, start pulse, status readout.
module tb_tc_config_regs;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] addr = 0;
  logic [31:0] wdata = 0, rdata, window;
  logic start, sync_en, label_on, crc_on;
  logic [15:0] n_vlf, n_trg, buf_limit, label;
  logic busy = 0, done = 0, locked = 0;
  logic [15:0] lost_words = 0, rx_packets = 0, rx_triggers = 0, crc_errors = 0, fd_errors = 0;
  logic [15:0] tx_packets = 0, rx_words = 0;
  int checks = 0, failures = 0, starts = 0, exp_starts = 0;
  tc_config_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;
  initial begin #1000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  task automatic wr(int a, int d); @(negedge clk); we = 1; addr = 4'(a); wdata = d; @(negedge clk); we = 0; endtask
  task automatic rd(int a, output int d); @(negedge clk); addr = 4'(a); @(negedge clk); d = rdata; endtask
  initial begin
    int d, v [6];
    repeat (2) @(negedge clk); rst_n = 1;
    rd(4, d); chk(d == 64, "default limit");
    rd(0, d); chk(d == 32'b1010, "default control");
    for (int r = 0; r < 20; r++) begin
      for (int a = 1; a < 6; a++) begin v[a] = (a == 1) ? $urandom : $urandom_range(0, 65535); wr(a, v[a]); end
      v[0] = $urandom_range(0, 15); wr(0, v[0]); exp_starts += v[0] & 1;
      for (int a = 1; a < 6; a++) begin rd(a, d); chk(d == v[a], $sformatf("reg %0d", a)); end
      rd(0, d); chk(d == (v[0] & 14), "control");
      chk(window == v[1] && n_vlf == v[2] && n_trg == v[3] && buf_limit == v[4] && label == v[5], "outputs");
      chk({crc_on, label_on, sync_en} == 3'(v[0] >> 1), "flags");
    end
    chk(starts == exp_starts, $sformatf("start pulses %0d exp %0d", starts, exp_starts));
    {busy, done, locked} = 3'b101; lost_words = 7; rx_packets = 9; rx_triggers = 11; crc_errors = 2;
    fd_errors = 3; tx_packets = 5; rx_words = 77;
    rd(8, d); chk(d == 5, "status");
    rd(9, d); chk(d == 7, "lost");
    rd(10, d); chk(d == 9, "rx packets");
    rd(11, d); chk(d == 11, "rx triggers");
    rd(12, d); chk(d == 2, "crc");
    rd(13, d); chk(d == 3, "fd");
    rd(14, d); chk(d == 5, "tx packets");
    rd(15, d); chk(d == 77, "rx words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
