// tb_tc_ram -- random writes and reads on both ports against an array model.
module tb_tc_ram;
  logic clk = 0;
  logic we_a = 0, we_b = 0;
  logic [7:0] addr_a = 0, addr_b = 0;
  logic [31:0] wdata_a = 0, wdata_b = 0, rdata_a, rdata_b;
  int checks = 0, failures = 0;
  logic [31:0] m [256];
  logic [31:0] ea, eb;
  tc_ram #(.WIDTH(32), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we_a = 1; addr_a = 8'(i); wdata_a = $urandom; m[i] = wdata_a;
    end
    @(negedge clk); we_a = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      we_a = $urandom_range(0, 3) == 0; we_b = $urandom_range(0, 3) == 0;
      addr_a = 8'($urandom); addr_b = 8'($urandom);
      if (addr_b == addr_a) we_b = 0;
      wdata_a = $urandom; wdata_b = $urandom;
      ea = m[addr_a]; eb = m[addr_b];
      @(posedge clk); #1;
      if (we_a) m[addr_a] = wdata_a;
      if (we_b) m[addr_b] = wdata_b;
      chk(rdata_a == ea, $sformatf("port a %0d", addr_a));
      chk(rdata_b == eb, $sformatf("port b %0d", addr_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
