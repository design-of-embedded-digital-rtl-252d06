// tb_pccm -- checks the write sequence produced by the configuration module.
// A shadow RAM per cell is written from the decoded enables; afterwards every
// cell must hold the same micro-code and constants and its own initial status,
// and the pass must take ROM depth + 2 clocks from start to done.
module tb_pccm;
  import dcmark_pkg::*;
  import tb_kdv_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [N-1:0] cell_we;
  addr_t cfg_addr;
  word_t cfg_data;
  word_t shadow [N][256];
  logic [31:0] u0 [N];
  mcode_t mc;
  int checks = 0, failures = 0, cyc = 0, t_start = 0, t_done = 0;

  pccm #(.N_CELLS(N), .U_INIT_FILE("tb/kdv_init_u12.hex")) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < N; c++) if (cell_we[c]) shadow[c][cfg_addr] <= cfg_data;
    if (start) t_start <= cyc;
    if (done) t_done <= cyc;
  end

  task automatic check(string what, logic [39:0] got, logic [39:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, e);
    end
  endtask

  initial begin
    $readmemh("tb/kdv_init_u12.hex", u0);
    mc = kdv_mcode();
    for (int c = 0; c < N; c++) for (int a = 0; a < 256; a++) shadow[c][a] = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    while (!done) @(negedge clk);
    @(negedge clk);
    check("pass length", 32'(t_done - t_start), MC_LEN + N_CONST + N + 2);
    for (int c = 0; c < N; c++) begin
      for (int a = 0; a < MC_LEN; a++) check($sformatf("cell %0d mc[%0d]", c, a), shadow[c][a], mc[a]);
      check("Ki1", shadow[c][A_KI1], {8'd0, F_KI1});
      check("Dt", shadow[c][A_DT], {8'd0, F_DT});
      check("zero", shadow[c][A_ZERO], 40'd0);
      check($sformatf("u[%0d]", c), shadow[c][A_U], {8'd0, u0[c]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
