// tb_ffl_deserializer -- shift window and bit-phase counter against a model.
module tb_ffl_deserializer;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, din = 0;
  logic [3*S-1:0] sr, m = 0;
  logic [2:0] phase;
  int checks = 0, failures = 0, ph = 0;
  ffl_deserializer #(.SPEED(S)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      din = $urandom_range(0, 1);
      @(negedge clk);
      m = {m[3*S-2:0], din}; ph = (ph + 1) % S;
      checks++;
      if (sr !== m || phase !== 3'(ph)) begin failures++; $display("FAIL at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
