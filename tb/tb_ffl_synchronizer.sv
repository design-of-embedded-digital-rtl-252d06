// tb_ffl_synchronizer -- lock after N_LOCK syncs at one phase, immunity to
// stray hits that are cleared by in-charge syncs, unlock after N_UNLOCK
// stray hits at one phase, relock at the new phase.
module tb_ffl_synchronizer;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, sync_hit = 0;
  logic [2:0] phase = 0, lock_phase;
  logic locked, word_stb, lock_event, unlock_event;
  int checks = 0, failures = 0, n_lock = 0, n_unlock = 0;
  ffl_synchronizer #(.SPEED(S)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin n_lock += lock_event; n_unlock += unlock_event; end
  initial begin #2000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  // one word period; hits at the listed phases
  task automatic period(int good, int stray);
    for (int p = 0; p < S; p++) begin
      phase = 3'(p);
      sync_hit = (p == good) || (p == stray);
      #1;
      if (locked) chk(word_stb == (phase == lock_phase), "word strobe");
      @(negedge clk);
    end
    sync_hit = 0;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // 3 syncs at phase 5 and 2 at phase 2: not locked yet
    for (int i = 0; i < 3; i++) begin period(5, -1); period(-1, -1); period(-1, -1); end
    period(2, -1); period(2, -1);
    chk(!locked, "no lock before N_LOCK");
    period(5, -1);
    chk(locked && lock_phase == 5 && n_lock == 1, "lock at phase 5");
    // 2 stray hits per good sync never unlock
    for (int i = 0; i < 6; i++) begin period(5, 1); period(-1, 1); period(-1, -1); end
    chk(locked && n_unlock == 0, "stays locked");
    // phase moves to 3: 3 hits there unlock
    period(-1, 3); period(-1, 3);
    chk(locked, "still locked after 2");
    period(-1, 3);
    chk(!locked && n_unlock == 1, "unlock after N_UNLOCK");
    for (int i = 0; i < 4; i++) period(-1, 3);
    chk(locked && lock_phase == 3 && n_lock == 2, "relock at phase 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
