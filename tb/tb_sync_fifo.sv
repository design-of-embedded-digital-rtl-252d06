// tb_sync_fifo -- random push/pop against a queue model, with a run-time limit.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic [6:0] limit = 7'd64;
  logic wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [6:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  sync_fifo #(.WIDTH(16), .DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_ERROR watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL %s", m); end endtask
  always @(posedge clk) if (rst_n) begin
    bit w, r;
    r = rd_en && q.size() > 0;
    w = wr_en && q.size() < int'(limit);
    if (r) void'(q.pop_front());
    if (w) q.push_back(wr_data);
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int phase = 0; phase < 3; phase++) begin
      limit = (phase == 1) ? 7'd10 : 7'd64;
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        chk(empty == (q.size() == 0), "empty");
        chk(full == (q.size() >= int'(limit)), $sformatf("full size %0d", q.size()));
        chk(count == q.size(), "count");
        if (q.size() > 0) chk(rd_data == q[0], "data");
        wr_en = ($urandom_range(0, 99) < (phase == 2 ? 30 : 60));
        rd_en = ($urandom_range(0, 99) < (phase == 2 ? 60 : 40));
        wr_data = 16'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
