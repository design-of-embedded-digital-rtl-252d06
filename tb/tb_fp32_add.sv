// tb_fp32_add -- self-checking test of fp32_add.
// Random and hand-picked operands are issued one per clock; each result is
// compared with the double-precision sum rounded to single precision, and
// out_valid must rise exactly LATENCY (7) clocks after in_valid, which with the
// issue cycle makes the 8-cycle ADD/SUB of the cell's instruction table.
module tb_fp32_add;
  import tb_fp_pkg::*;
  localparam int LAT = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, sub = 0;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  int issue_cyc [$];
  int cyc = 0;

  fp32_add #(.LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    int ic;
    e = exp_q.pop_front();
    ic = issue_cyc.pop_front();
    checks += 2;
    if (y !== e) begin
      failures++;
      $display("FAIL result %h expected %h", y, e);
    end
    if (cyc - ic != LAT) begin
      failures++;
      $display("FAIL latency %0d", cyc - ic);
    end
  end

  // reference capture on the same clock edge the DUT samples its inputs
  always @(posedge clk) if (rst_n && in_valid) begin
    real r;
    logic s;
    s = sub;
    r = s ? f2r(a) - f2r(b) : f2r(a) + f2r(b);
    exp_q.push_back(r2f(r));
    issue_cyc.push_back(cyc);
  end

  task automatic issue(logic [31:0] x, logic [31:0] z, logic s);
    a <= x; b <= z; sub <= s; in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h3F800000, 32'h3F800000, 0);   // 1 + 1
    issue(32'h40400000, 32'h40400000, 1);   // 3 - 3 = +0
    issue(32'h3F800000, 32'h33800000, 0);   // 1 + 2^-24 : tie, to even
    issue(32'h3F800001, 32'h33800000, 0);   // tie rounds up to even
    issue(32'h3F800000, 32'h00000000, 1);
    issue(32'h00000000, 32'h80000000, 0);
    issue(32'h3F800000, 32'h3F7FFFFF, 1);   // massive cancellation
    for (int i = 0; i < 3000; i++) begin
      issue(rand_f(20), rand_f(20), 1'($urandom));
      if ($urandom_range(3, 0) == 0) @(posedge clk);
    end
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
