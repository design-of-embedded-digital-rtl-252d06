// tb_ff_emulator -- loopback test of the FF-LYNX emulator.
// Loads packets and triggers into the TX tables, runs the test window and
// compares the RX tables with what was sent: every packet and word arrives
// in order, every trigger arrives with its FLF word after the same fixed
// latency, no CRC/FD errors. A second run with a small TX buffer checks the
// overflow loss count.
module tb_ff_emulator;
  localparam int SPEED = 8;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, link_flip = 0, link_slip = 0;
  logic [3:0] host_sel = 0;
  logic [9:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic link_dat, busy, done, locked;
  logic [7:0] events;
  int checks = 0, failures = 0;
  int ev_cnt [8];

  ff_emulator #(.SPEED(SPEED)) dut (.*);

  always #1 clk = ~clk;
  initial begin #4000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) for (int i = 0; i < 8; i++) if (events[i]) ev_cnt[i]++;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic hw(int sel, int addr, int data);
    @(negedge clk); host_we = 1; host_sel = 4'(sel); host_addr = 10'(addr); host_wdata = data;
    @(negedge clk); host_we = 0;
  endtask

  task automatic hr(int sel, int addr, output int data);
    @(negedge clk); host_sel = 4'(sel); host_addr = 10'(addr);
    @(negedge clk); data = host_rdata;
  endtask

  int plen [8], pts [8], words [$], tts [32], tflf [32];
  int npk, ntr, d, lat0;

  task automatic run_test(int limit, int exp_lost, int window);
    int nw;
    hw(10, 4, limit);
    hw(10, 1, window);
    hw(10, 2, npk);
    hw(10, 3, ntr);
    hw(10, 0, 32'b1011);       // start, sync, crc
    wait (!done);
    wait (done);
    repeat (SPEED * 20) @(negedge clk);
    hr(10, 9, d);  chk(d == exp_lost, $sformatf("lost words %0d exp %0d", d, exp_lost));
    hr(10, 12, d); chk(d == 0, $sformatf("crc errors %0d", d));
    hr(10, 13, d); chk(d == 0, $sformatf("fd errors %0d", d));
    hr(10, 10, d); chk(d == npk, $sformatf("rx packets %0d exp %0d", d, npk));
    hr(10, 11, d); chk(d == ntr, $sformatf("rx triggers %0d exp %0d", d, ntr));
    // packets and words
    nw = 0;
    for (int p = 0; p < npk; p++) begin
      int exp_len = (plen[p] > limit) ? limit : plen[p];
      hr(6, p, d); chk(d == exp_len, $sformatf("pkt %0d len %0d exp %0d", p, d, exp_len));
      hr(5, p, d); chk(d > pts[p], $sformatf("pkt %0d rx ts %0d after tx ts %0d", p, d, pts[p]));
      nw += plen[p];
    end
    // words: replay the expected stream respecting the limit
    begin
      int rxi = 0, base = 0;
      for (int p = 0; p < npk; p++) begin
        int exp_len = (plen[p] > limit) ? limit : plen[p];
        for (int w = 0; w < exp_len; w++) begin
          hr(7, rxi, d);
          chk(d == words[base + w], $sformatf("word %0d = %h exp %h", rxi, d, words[base + w]));
          rxi++;
        end
        base += plen[p];
      end
    end
    // triggers: same FLF, constant latency
    for (int t = 0; t < ntr; t++) begin
      hr(9, t, d); chk(d == tflf[t], $sformatf("trg %0d flf %h exp %h", t, d, tflf[t]));
      hr(8, t, d);
      if (t == 0) lat0 = d - tts[0];
      chk(d - tts[t] == lat0, $sformatf("trg %0d latency %0d exp %0d", t, d - tts[t], lat0));
    end
    $display("trigger latency %0d periods", lat0);
  endtask

  initial begin
    int nw;
    repeat (5) @(negedge clk); rst_n = 1;
    npk = 6;
    plen = '{5, 8, 20, 3, 16, 1, 0, 0};
    pts  = '{10, 30, 60, 120, 150, 200, 0, 0};
    nw = 0;
    for (int p = 0; p < npk; p++) begin
      hw(0, p, pts[p]); hw(1, p, plen[p]);
      for (int w = 0; w < plen[p]; w++) begin
        words.push_back($urandom_range(0, 65535));
        hw(2, nw, words[nw]); nw++;
      end
    end
    ntr = 20;
    d = 5;
    for (int t = 0; t < ntr; t++) begin
      d += $urandom_range(1, 25);
      tts[t] = d; tflf[t] = $urandom_range(0, 63);
      hw(3, t, tts[t]); hw(4, t, tflf[t]);
    end
    // wait for the receiver to lock on the sync sequences
    wait (locked);
    chk(ev_cnt[5] >= 1, "lock event");
    run_test(64, 0, 700);
    chk(ev_cnt[3] == 7 && ev_cnt[4] == 7, $sformatf("frames sent %0d rx %0d exp 7", ev_cnt[3], ev_cnt[4]));
    // small buffer: the 20-word packet keeps 10 words
    run_test(10, 10 + 6, 700);
    $display("events: fd %0d crc %0d defer %0d fsent %0d frx %0d lock %0d unlock %0d ovf %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6], ev_cnt[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
