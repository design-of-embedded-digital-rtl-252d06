// tb_pccm_config_rom -- checks the contents of the configuration ROM.
// The micro-code region is compared with an independent encoding of a few
// known instructions and the loop structure (first word LDI u, a JUMP back to
// the loop start closing each part), the constants with their single-precision
// values, and the status region with the initial-status file, all with one
// clock of read latency.
module tb_pccm_config_rom;
  import dcmark_pkg::*;
  import tb_kdv_pkg::*;
  localparam int N = 12;
  localparam int DEPTH = MC_LEN + N_CONST + N;
  logic clk = 0;
  logic [$clog2(DEPTH)-1:0] addr = 0;
  word_t data;
  logic [31:0] u0 [N];
  int checks = 0, failures = 0;

  pccm_config_rom #(.N_CELLS(N), .U_INIT_FILE("tb/kdv_init_u12.hex")) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_at(int a, logic [39:0] e);
    @(negedge clk);
    addr = $bits(addr)'(a);
    @(negedge clk);
    checks++;
    if (data !== e) begin
      failures++;
      $display("FAIL rom[%0d] = %h expected %h", a, data, e);
    end
  endtask

  initial begin
    $readmemh("tb/kdv_init_u12.hex", u0);
    expect_at(0,  40'h0C_0000_00A0);          // LDI  u
    expect_at(1,  40'h14_0000_00A2);          // STM2 u(i-2)
    expect_at(4,  40'h20_0000_00A5);          // STP2 u(i+2)
    expect_at(5,  40'h04_0000_00A2);          // LDA  u(i-2)
    expect_at(6,  40'h08_0000_00A5);          // LDB  u(i+2)
    expect_at(7,  40'h28_0000_0000);          // SUB
    expect_at(8,  40'h10_0000_00C1);          // ST   ROp1
    expect_at(61, 40'h30_0000_003E);          // JUMP loop (62)
    expect_at(62, 40'h0C_0000_00A0);          // loop starts with LDI u
    expect_at(MC_LEN-1, 40'h30_0000_003E);    // JUMP loop
    expect_at(MC_LEN+0, {8'd0, F_KI1});
    expect_at(MC_LEN+1, {8'd0, F_KI2});
    expect_at(MC_LEN+2, {8'd0, F_K1});
    expect_at(MC_LEN+3, {8'd0, F_K2});
    expect_at(MC_LEN+4, {8'd0, F_DT});
    expect_at(MC_LEN+5, 40'd0);
    for (int i = 0; i < N; i++) expect_at(MC_LEN + N_CONST + i, {8'd0, u0[i]});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
