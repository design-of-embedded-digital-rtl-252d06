// tb_dcmark_cell -- self-checking test of one DCMARK cell running the KdV micro-program.
//
// The RAM is loaded through the configuration port with the micro-program,
// the constants and the cell status; the four neighbour inputs are driven by
// the testbench. After the first step (forward Euler) and after each of two
// loop iterations (leap-frog) the cell is halted and u, u_old and the
// neighbour copies are read back and compared with tb_kdv_pkg. The clocks
// between two JUMPs must equal the loop length worked out from the
// instruction table (74 fetches of 2 clocks plus the execute times: 368).
module tb_dcmark_cell;
  import dcmark_pkg::*;
  import tb_fp_pkg::*;
  import tb_kdv_pkg::*;

  logic clk = 0, rst_n = 0;
  logic run = 0, hold;
  int target = 0, active = 0, last_active = 0;
  logic cfg_we = 0;
  addr_t cfg_addr = 0, rd_addr = 0;
  word_t cfg_data = 0, rd_data;
  fp_t nb_m2, nb_m1, nb_p1, nb_p2, i_reg;
  logic iter, halted;
  int checks = 0, failures = 0;
  int n_iter = 0;
  int expected_loop;

  dcmark_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // halt right after the JUMP that completes step number 'target'
  assign hold = (n_iter + int'(iter)) >= target;

  // loop length in clocks the cell actually ran (halted clocks excluded)
  always @(posedge clk) if (run && !halted && !hold) active <= active + 1;
  always @(posedge clk) if (iter) begin
    if (n_iter >= 1) begin
      checks++;
      if (active - last_active != expected_loop) begin
        failures++;
        $display("FAIL loop length %0d expected %0d", active - last_active, expected_loop);
      end
    end
    last_active <= active;
    n_iter <= n_iter + 1;
  end

  // stimulus changes on the falling edge, away from the sampling edge
  task automatic cfg(addr_t a, word_t d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic rd(addr_t a, output fp_t v);
    @(negedge clk);
    rd_addr = a;
    @(negedge clk);
    v = rd_data[31:0];
  endtask

  task automatic expect_word(string what, addr_t a, fp_t e);
    fp_t v;
    rd(a, v);
    checks++;
    if (v !== e) begin
      failures++;
      $display("FAIL %s = %h expected %h", what, v, e);
    end
  endtask

  task automatic wait_iter(int n);
    @(negedge clk);
    target = n;
    repeat (3) @(negedge clk);
    while (!halted) @(negedge clk);
  endtask

  initial begin
    mcode_t mc;
    fp_t u, uold, un;
    expected_loop = 74*2 + 2 + 4*2 + 17*5 + 11*8 + 6*6 + 1;
    mc = kdv_mcode();
    nb_m2 = 32'h3F000000;   // 0.5
    nb_m1 = 32'h3FC00000;   // 1.5
    nb_p1 = 32'h3F99999A;   // 1.2
    nb_p2 = 32'h3E4CCCCD;   // 0.2
    u = 32'h40000000;       // 2.0
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < MC_LEN; i++) cfg(addr_t'(i), mc[i]);
    cfg(A_KI1, {8'd0, F_KI1});
    cfg(A_KI2, {8'd0, F_KI2});
    cfg(A_K1, {8'd0, F_K1});
    cfg(A_K2, {8'd0, F_K2});
    cfg(A_DT, {8'd0, F_DT});
    cfg(A_ZERO, '0);
    cfg(A_U, {8'd0, u});
    checks++;
    if (expected_loop != LOOP_CYCLES) begin
      failures++;
      $display("FAIL package loop length %0d", LOOP_CYCLES);
    end
    @(negedge clk);
    run = 1;
    wait_iter(1);
    un = kdv_step(1, u, 0, nb_m2, nb_m1, nb_p1, nb_p2);
    uold = u; u = un;
    expect_word("u step1", A_U, u);
    expect_word("uold step1", A_UOLD, uold);
    expect_word("M2 copy", A_UM2, nb_m2);
    expect_word("P2 copy", A_UP2, nb_p2);
    checks++;
    if (i_reg !== uold) begin failures++; $display("FAIL I register %h", i_reg); end
    for (int k = 2; k <= 3; k++) begin
      nb_m1 = fadd(nb_m1, 32'h3DCCCCCD);   // neighbours move between steps
      nb_p2 = fmul(nb_p2, 32'h3F400000);
      wait_iter(k);
      un = kdv_step(0, u, uold, nb_m2, nb_m1, nb_p1, nb_p2);
      uold = u; u = un;
      expect_word($sformatf("u step%0d", k), A_U, u);
      expect_word($sformatf("uold step%0d", k), A_UOLD, uold);
      expect_word("M1 copy", A_UM1, nb_m1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
