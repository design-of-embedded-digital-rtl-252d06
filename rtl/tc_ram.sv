// tc_ram -- dual-port table memory of the emulator test controller.
//
// Port A belongs to the TX or RX controller, port B to the host (the
// processor that loads the test vectors and reads back the results). Both
// ports are synchronous: a read returns the word one clock after the
// address. Writing the same address from both ports in one clock is not
// allowed (the controller and the host never share a table while a test
// runs).
module tc_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_b <= mem[addr_b];
  end

  a_no_collision: assert property (@(posedge clk) !(we_a && we_b && addr_a == addr_b));

endmodule
