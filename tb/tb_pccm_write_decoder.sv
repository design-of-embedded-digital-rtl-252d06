// tb_pccm_write_decoder -- exhaustive test of the PCCM write decoder for a 12-cell ring:
// every select value with and without broadcast and write enable.
module tb_pccm_write_decoder;
  localparam int N = 12;
  logic we, broadcast;
  logic [3:0] sel;
  logic [N-1:0] cell_we, exp_we;
  int checks = 0, failures = 0;

  pccm_write_decoder #(.N_CELLS(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2; w++)
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < 16; s++) begin
          we = 1'(w); broadcast = 1'(b); sel = 4'(s);
          #1;
          exp_we = '0;
          if (w == 1 && b == 1) exp_we = '1;
          else if (w == 1 && s < N) exp_we[s] = 1'b1;
          checks++;
          if (cell_we !== exp_we) begin
            failures++;
            $display("FAIL we=%0d bc=%0d sel=%0d: %b expected %b", w, b, s, cell_we, exp_we);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
