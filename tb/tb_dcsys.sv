// tb_dcsys -- end-to-end test of a DCMARK ring: configuration, KdV integration, readout.
//
// A 12-cell ring is configured from the configuration ROM (initial status
// file tb/kdv_init_u12.hex) and integrates STEPS time steps. Afterwards u and
// u_old of every cell are read back and compared with the reference model
// run on the whole ring (first step forward Euler, then leap-frog). Checked
// timing: the configuration pass length, and the compute time, which must be
// 1 start clock + 307 clocks for the first step + 368 clocks per further step
// + 1 halting fetch, whatever the ring size. A second run with a different
// step count checks re-configuration.
module tb_dcsys;
  import dcmark_pkg::*;
  import tb_fp_pkg::*;
  import tb_kdv_pkg::*;
  localparam int N = 12;
  localparam int PRO = 62*2 + 2 + 4*2 + 14*5 + 9*8 + 5*6 + 1;   // 307
  localparam int SW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] n_steps = 0, step_count, run_cycles;
  logic busy, done;
  logic [SW-1:0] rd_cell = 0;
  addr_t rd_addr = 0;
  word_t rd_data;
  int checks = 0, failures = 0;
  logic [31:0] u0 [N];
  int cfg_cycles;

  dcsys #(.N_CELLS(N), .U_INIT_FILE("tb/kdv_init_u12.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_and_check(int steps);
    logic [31:0] u [N], uo [N], un [N];
    u = u0;
    uo = u0;
    for (int s = 1; s <= steps; s++) begin
      for (int i = 0; i < N; i++)
        un[i] = kdv_step(s == 1, u[i], uo[i], u[(i+N-2)%N], u[(i+N-1)%N], u[(i+1)%N], u[(i+2)%N]);
      uo = u;
      u = un;
    end
    @(negedge clk);
    n_steps = steps;
    start = 1;
    @(negedge clk);
    start = 0;
    cfg_cycles = 0;
    while (!done) begin
      @(negedge clk);
      cfg_cycles++;
    end
    // busy clocks = configuration pass (ROM depth + 2) + compute clocks + 1
    check("config clocks", cfg_cycles - run_cycles, MC_LEN + N_CONST + N + 3);
    check("steps", step_count, steps);
    check("compute clocks", run_cycles, 1 + PRO + 368*(steps-1) + 1);
    for (int i = 0; i < N; i++) begin
      rd_cell = SW'(i);
      rd_addr = A_U;
      @(negedge clk);
      check($sformatf("u[%0d]", i), rd_data[31:0], u[i]);
      rd_addr = A_UOLD;
      @(negedge clk);
      check($sformatf("uold[%0d]", i), rd_data[31:0], uo[i]);
    end
  endtask

  initial begin
    $readmemh("tb/kdv_init_u12.hex", u0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_and_check(4);
    run_and_check(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
