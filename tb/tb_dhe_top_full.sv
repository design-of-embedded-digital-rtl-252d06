// tb_dhe_top_full -- the top level at its default size: a 100-cell ring
// solving the KdV equation from the standard initial status, next to the
// FF-LYNX emulator at 8x speed. Same checks as the end-to-end test.
//
// Distributed Computing System: configuration, forward
// first step, leap-frog steps, halt after n_steps and restart, readout of
// every cell compared with the reference model, cycle counts.
// FF-LYNX emulator: receiver lock on sync sequences, packets cut into
// frames and rebuilt, triggers with FLF data at a fixed latency, headers
// deferred by trigger bursts, TX buffer overflow loss, CRC error detection
// after a line bit flip, loss and recovery of lock after a one-bit slip.
// Every mechanism is counted; each must occur at least once.
module tb_dhe_top_full;
  import dcmark_pkg::*;
  import tb_kdv_pkg::*;
  localparam int N = 100;
  localparam int SW = $clog2(N);
  localparam int SPEED = 8;
  localparam int PRO = 307;

  logic kdv_clk = 0, kdv_rst_n = 0, kdv_start = 0;
  logic [31:0] kdv_n_steps = 0, kdv_step_count, kdv_run_cycles;
  logic kdv_busy, kdv_done;
  logic [SW-1:0] kdv_rd_cell = 0;
  addr_t kdv_rd_addr = 0;
  word_t kdv_rd_data;
  logic ffl_clk = 0, ffl_rst_n = 0;
  logic ffl_host_we = 0, ffl_link_flip = 0, ffl_link_slip = 0;
  logic [3:0] ffl_host_sel = 0;
  logic [9:0] ffl_host_addr = 0;
  logic [31:0] ffl_host_wdata = 0, ffl_host_rdata;
  logic ffl_link_dat, ffl_busy, ffl_done, ffl_locked;
  logic [7:0] ffl_events;

  dhe_top dut (.*);

  always #5 kdv_clk = ~kdv_clk;
  always #1 ffl_clk = ~ffl_clk;

  int checks = 0, failures = 0;
  int ev_cnt [8];
  int m_cfg = 0, m_fwd = 0, m_leap = 0, m_halt = 0, m_read = 0;
  int m_trg = 0, m_frames = 0, m_ovf = 0;
  logic [31:0] u0 [N];
  int clk_no = 0, c0;
  bit ffl_finished = 0;

  initial begin
    #20000000;
    $display("TB_ERROR watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge ffl_clk) begin
    if (ffl_rst_n) begin
      clk_no++;
      for (int i = 0; i < 8; i++) if (ffl_events[i]) ev_cnt[i]++;
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- Distributed Computing System ----------------
  task automatic kdv_run(int steps);
    logic [31:0] u [N], uo [N], un [N];
    int cyc;
    u = u0;
    uo = u0;
    for (int s = 1; s <= steps; s++) begin
      for (int i = 0; i < N; i++)
        un[i] = kdv_step(s == 1, u[i], uo[i], u[(i+N-2)%N], u[(i+N-1)%N], u[(i+1)%N], u[(i+2)%N]);
      uo = u;
      u = un;
    end
    @(negedge kdv_clk);
    kdv_n_steps = steps;
    kdv_start = 1;
    @(negedge kdv_clk);
    kdv_start = 0;
    cyc = 0;
    while (!kdv_done) begin
      @(negedge kdv_clk);
      cyc++;
    end
    chk(cyc - kdv_run_cycles == MC_LEN + N_CONST + N + 3, $sformatf("config clocks %0d", cyc - kdv_run_cycles));
    if (cyc - kdv_run_cycles == MC_LEN + N_CONST + N + 3) m_cfg++;
    chk(kdv_step_count == steps, "step count");
    chk(kdv_run_cycles == 1 + PRO + 368*(steps-1) + 1, $sformatf("compute clocks %0d", kdv_run_cycles));
    if (kdv_step_count == steps) m_halt++;
    for (int i = 0; i < N; i++) begin
      bit ok;
      kdv_rd_cell = SW'(i);
      kdv_rd_addr = A_U;
      @(negedge kdv_clk);
      ok = (kdv_rd_data[31:0] == u[i]);
      chk(ok, $sformatf("u[%0d] %h exp %h", i, kdv_rd_data[31:0], u[i]));
      kdv_rd_addr = A_UOLD;
      @(negedge kdv_clk);
      ok &= (kdv_rd_data[31:0] == uo[i]);
      chk(kdv_rd_data[31:0] == uo[i], $sformatf("uold[%0d]", i));
      if (ok) begin m_read++; if (steps == 1) m_fwd++; else m_leap++; end
    end
  endtask

  // ---------------- FF-LYNX emulator ----------------
  task automatic hw(int sel, int addr, int data);
    @(negedge ffl_clk); ffl_host_we = 1; ffl_host_sel = 4'(sel); ffl_host_addr = 10'(addr);
    ffl_host_wdata = data;
    @(negedge ffl_clk); ffl_host_we = 0;
  endtask

  task automatic hr(int sel, int addr, output int data);
    @(negedge ffl_clk); ffl_host_sel = 4'(sel); ffl_host_addr = 10'(addr);
    @(negedge ffl_clk); data = ffl_host_rdata;
  endtask

  int plen [6] = '{5, 8, 20, 3, 16, 1};
  int pts  [6] = '{10, 30, 60, 120, 150, 200};
  int words [$];
  int tts [40], tflf [40];
  int ntr;

  task automatic ffl_start(int limit);
    hw(10, 4, limit);
    hw(10, 1, 700);
    hw(10, 2, 6);
    hw(10, 3, ntr);
    hw(10, 0, 32'b1011);
    wait (!ffl_done);
  endtask

  task automatic ffl_check(int limit, int exp_lost);
    int d, rxi, base, lat0;
    wait (ffl_done);
    repeat (SPEED * 20) @(negedge ffl_clk);
    hr(10, 9, d);  chk(d == exp_lost, $sformatf("lost words %0d exp %0d", d, exp_lost));
    if (exp_lost > 0 && d == exp_lost) m_ovf++;
    hr(10, 12, d); chk(d == 0, $sformatf("crc errors %0d", d));
    hr(10, 10, d); chk(d == 6, $sformatf("rx packets %0d", d));
    hr(10, 11, d); chk(d == ntr, $sformatf("rx triggers %0d exp %0d", d, ntr));
    rxi = 0; base = 0;
    for (int p = 0; p < 6; p++) begin
      int exp_len = (plen[p] > limit) ? limit : plen[p];
      hr(6, p, d); chk(d == exp_len, $sformatf("pkt %0d len %0d", p, d));
      for (int w = 0; w < exp_len; w++) begin
        hr(7, rxi, d);
        chk(d == words[base + w], $sformatf("word %0d", rxi));
        rxi++;
      end
      base += plen[p];
      m_frames++;
    end
    for (int t = 0; t < ntr; t++) begin
      hr(9, t, d); chk(d == tflf[t], $sformatf("trg %0d flf", t));
      hr(8, t, d);
      if (t == 0) lat0 = d - tts[0];
      chk(d - tts[t] == lat0, $sformatf("trg %0d latency %0d", t, d - tts[t]));
      if (d - tts[t] == lat0) m_trg++;
    end
  endtask

  initial begin : ffl_thread
    int nw, d, e0, ev_before [8];
    repeat (5) @(negedge ffl_clk);
    ffl_rst_n = 1;
    nw = 0;
    for (int p = 0; p < 6; p++) begin
      hw(0, p, pts[p]); hw(1, p, plen[p]);
      for (int w = 0; w < plen[p]; w++) begin
        words.push_back($urandom_range(0, 65535));
        hw(2, nw, words[nw]); nw++;
      end
    end
    // trigger bursts right where packets become ready, plus random ones
    ntr = 0;
    for (int p = 0; p < 6; p++)
      for (int k = 2; k < 6; k++) begin tts[ntr] = pts[p] + k; ntr++; end
    d = 240;
    while (ntr < 36) begin d += $urandom_range(1, 20); tts[ntr] = d; ntr++; end
    for (int t = 0; t < ntr; t++) begin
      tflf[t] = $urandom_range(0, 63);
      hw(3, t, tts[t]); hw(4, t, tflf[t]);
    end
    wait (ffl_locked);
    // run 1: large buffer, nothing lost
    ffl_start(64);
    ffl_check(64, 0);
    // run 2: 10-word buffer, the 20- and 16-word packets lose 10 + 6 words
    ffl_start(10);
    ffl_check(10, 16);
    // run 3: a flipped bit inside the frame of the 20-word packet
    c0 = clk_no;
    ffl_start(64);
    wait ((clk_no - c0) / SPEED >= pts[2] + 50);
    while ((clk_no % SPEED) != SPEED - 4) @(negedge ffl_clk);
    ffl_link_flip = 1;
    @(negedge ffl_clk);
    ffl_link_flip = 0;
    wait (ffl_done);
    repeat (SPEED * 20) @(negedge ffl_clk);
    hr(10, 12, d);
    chk(d >= 1, $sformatf("crc errors after bit flip %0d", d));
    // slip: the receiver must drop the lock and find the new boundary
    ev_before = ev_cnt;
    @(negedge ffl_clk); ffl_link_slip = 1; @(negedge ffl_clk); ffl_link_slip = 0;
    repeat (SPEED * 60) @(negedge ffl_clk);
    chk(ev_cnt[6] == ev_before[6] + 1, "unlock after slip");
    chk(ev_cnt[5] == ev_before[5] + 1 && ffl_locked, "relock after slip");
    ffl_start(64);
    ffl_check(64, 0);
    ffl_finished = 1;
  end

  initial begin
    $readmemh("rtl/kdv_init_u100.hex", u0);
    repeat (3) @(negedge kdv_clk);
    kdv_rst_n = 1;
    kdv_run(4);
    kdv_run(1);
    wait (ffl_finished);
    $display("mechanisms: kdv config %0d, forward step %0d, leap-frog %0d, halt %0d, readout %0d",
             m_cfg, m_fwd, m_leap, m_halt, m_read);
    $display("mechanisms: lock %0d, unlock %0d, frames sent %0d, frames received %0d, packets %0d",
             ev_cnt[5], ev_cnt[6], ev_cnt[3], ev_cnt[4], m_frames);
    $display("mechanisms: triggers %0d, header deferred %0d, overflow loss %0d, crc error %0d",
             m_trg, ev_cnt[2], m_ovf, ev_cnt[1]);
    chk(m_cfg >= 1 && m_fwd >= 1 && m_leap >= 1 && m_halt >= 1 && m_read >= 1, "kdv mechanisms");
    chk(ev_cnt[5] >= 1 && ev_cnt[6] >= 1 && ev_cnt[3] >= 1 && ev_cnt[4] >= 1, "link mechanisms");
    chk(m_trg >= 1 && ev_cnt[2] >= 1 && m_ovf >= 1 && ev_cnt[1] >= 1, "data mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
