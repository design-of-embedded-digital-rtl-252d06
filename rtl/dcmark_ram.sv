// dcmark_ram -- the 40-bit x 256 memory of a DCMARK cell.
//
// Single-port synchronous RAM: one address per clock, a write stores wdata at
// addr, and rdata shows the word at the address of the previous clock (one
// clock read latency, read-before-write on the same address). Being a von
// Neumann cell, the same array holds the micro-code and the data.
module dcmark_ram #(
  parameter int unsigned DATA_W = 40,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
