// tb_fp32_mul -- self-checking test of fp32_mul.
// Random and hand-picked operands are issued one per clock; each result is
// compared with the double-precision product rounded to single precision, and
// out_valid must rise exactly LATENCY (5) clocks after in_valid, which with the
// issue cycle makes the 6-cycle MUL of the cell's instruction table.
module tb_fp32_mul;
  import tb_fp_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] a = 0, b = 0, y;
  logic out_valid;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  int issue_cyc [$];
  int cyc = 0;

  fp32_mul #(.LATENCY(LAT)) dut (.*);

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
    s = 1'b0;
    r = f2r(a) * f2r(b);
    exp_q.push_back(r2f(r));
    issue_cyc.push_back(cyc);
  end

  task automatic issue(logic [31:0] x, logic [31:0] z, logic s);
    if (s) $display("note: unused flag");
    a <= x; b <= z; in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h3F800000, 32'h3F800000, 0);   // 1 * 1
    issue(32'h40400000, 32'hC0000000, 0);   // 3 * -2
    issue(32'h3FFFFFFF, 32'h3FFFFFFF, 0);   // rounding carries into the exponent
    issue(32'h3F800001, 32'h3F800001, 0);
    issue(32'h3F800000, 32'h00000000, 0);   // times zero
    issue(32'h3C23D70A, 32'h41000000, 0);   // 0.01 * 8
    issue(32'h3F800003, 32'h3FC00000, 0);   // exact tie, rounds down to even
    issue(32'h3F800001, 32'h3FC00000, 0);   // exact tie, rounds up to even
    issue(32'h3F800005, 32'h3FC00000, 0);   // exact tie, rounds down to even
    for (int i = 0; i < 3000; i++) begin
      issue(rand_f(20), rand_f(20), 1'b0);
      if ($urandom_range(3, 0) == 0) @(posedge clk);
    end
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
