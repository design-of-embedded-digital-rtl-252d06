// sync_fifo -- synchronous FIFO with a run-time capacity limit.
//
// Single clock, first-word fall-through: rd_data shows the oldest entry while
// empty is low, and rd_en removes it. wr_en with full high is refused (the
// word is lost; the caller counts it). 'limit' sets the usable capacity
// (1..DEPTH, values outside are treated as DEPTH), so that a buffer size can
// be chosen at run time without rebuilding; count gives the fill level.
// Used for the FF-LYNX TX/RX buffers and the test controller's VLF buffers.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CW-1:0]    limit,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [CW-1:0]    cap;
  logic             do_wr, do_rd;

  assign cap   = (limit == '0 || 32'(limit) > DEPTH) ? CW'(DEPTH) : limit;
  assign empty = (count == '0);
  assign full  = (count >= cap);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

endmodule
