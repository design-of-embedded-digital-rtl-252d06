// tb_dcmark_ram -- self-checking test of the 40x256 cell RAM.
// Writes a pattern to every address, reads it back with the one-clock read
// latency, checks read-before-write on a simultaneous write, and compares
// random accesses with a testbench shadow array.
module tb_dcmark_ram;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0;
  logic [39:0] wdata = 0, rdata;
  logic [39:0] shadow [256];
  int checks = 0, failures = 0;

  dcmark_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [39:0] e);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL addr %0d: %h expected %h", addr, rdata, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; addr = 8'(i); wdata = {8'(i), 32'($urandom)};
      shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      @(negedge clk);
      check(shadow[i]);
    end
    // write and read the same address: old data comes out
    addr = 8'd7; we = 1; wdata = 40'hAB_CDEF_0123;
    @(negedge clk);
    check(shadow[7]);
    shadow[7] = wdata;
    we = 0;
    @(negedge clk);
    check(shadow[7]);
    for (int k = 0; k < 2000; k++) begin
      addr = 8'($urandom);
      we = 1'($urandom);
      wdata = {8'($urandom), 32'($urandom)};
      @(negedge clk);
      check(shadow[addr]);
      if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
