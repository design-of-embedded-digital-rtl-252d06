// tb_ffl_serializer -- the word loaded on ce appears MSB first, one bit per clock.
module tb_ffl_serializer;
  import ffl_pkg::*;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, ce = 0, trg_now = 0, frm_valid = 0, dat;
  ths_t ths = 0;
  logic [S-3:0] flf_bits = 0, frm_bits = 0;
  logic [S-1:0] exp_w;
  int checks = 0, failures = 0;
  ffl_serializer #(.SPEED(S)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      ths = 2'($urandom); trg_now = $urandom_range(0, 3) == 0; frm_valid = $urandom_range(0, 1);
      flf_bits = 6'($urandom); frm_bits = 6'($urandom);
      exp_w = {ths, trg_now ? flf_bits : (frm_valid ? frm_bits : 6'd0)};
      ce = 1; @(negedge clk); ce = 0;
      for (int b = S - 1; b >= 0; b--) begin
        checks++;
        if (dat !== exp_w[b]) begin failures++; $display("FAIL word %0d bit %0d", w, b); end
        if (b > 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
