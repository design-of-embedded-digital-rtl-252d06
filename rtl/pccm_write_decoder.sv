// pccm_write_decoder -- cell write-enable decoder of the Parallel Cell Configuration Module.
//
// Turns one configuration write into the RAM write enables of the cells:
// with broadcast = 1 every cell is written at once (parallel programming of
// micro-code and constants); with broadcast = 0 only cell number 'sel' is
// written (one-to-one programming of each cell's own initial status).
// Purely combinational.
module pccm_write_decoder #(
  parameter int unsigned N_CELLS = 100,
  localparam int unsigned SW     = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  input  logic               we,
  input  logic               broadcast,
  input  logic [SW-1:0]      sel,
  output logic [N_CELLS-1:0] cell_we
);

  always_comb begin
    for (int i = 0; i < N_CELLS; i++)
      cell_we[i] = we && (broadcast || (32'(sel) == i));
  end

endmodule
