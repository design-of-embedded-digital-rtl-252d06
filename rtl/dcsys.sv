// dcsys -- Distributed Computing System: a ring of DCMARK cells with its configuration module.
//
// N_CELLS identical cells form a closed ring; each sees the I register of its
// first and second neighbours on both sides (cell i reads cells i-2, i-1, i+1,
// i+2 modulo N_CELLS), which is the neighbourhood of the 1-D discretised KdV
// equation. All cells run the same micro-program in lock-step, so every cell
// advances its grid point by one time step per program pass and the time per
// step does not depend on the number of cells.
//
// Operation: a one-clock 'start' stops the cells, lets the PCCM program every
// cell RAM from the configuration ROM, then releases the cells. Each
// executed JUMP of cell 0 ends one integration step; when 'n_steps' steps are
// complete 'hold' stops all cells at the same fetch and 'done' is raised.
// While done, rd_cell/rd_addr read any word of any cell RAM (rd_data one clock
// later). step_count counts completed steps and run_cycles the clocks spent
// computing. The host-side register interface (a plain port list here, not
// the SoPC bus) is a choice of this design.
module dcsys
  import dcmark_pkg::*;
#(
  parameter int unsigned N_CELLS     = 100,
  parameter string       U_INIT_FILE = "rtl/kdv_init_u100.hex",
  localparam int unsigned SW = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   n_steps,
  output logic          busy,
  output logic          done,
  output logic [31:0]   step_count,
  output logic [31:0]   run_cycles,
  input  logic [SW-1:0] rd_cell,
  input  addr_t         rd_addr,
  output word_t         rd_data
);

  typedef enum logic [1:0] {D_IDLE, D_CONFIG, D_RUN, D_DONE} dstate_e;
  dstate_e st;

  logic               cfg_start, cfg_busy, cfg_done;
  logic [N_CELLS-1:0] cell_we, iter, halted;
  addr_t              cfg_addr;
  word_t              cfg_data;
  fp_t                i_reg   [N_CELLS];
  word_t              cell_rd [N_CELLS];
  logic               run, hold;

  pccm #(.N_CELLS(N_CELLS), .U_INIT_FILE(U_INIT_FILE)) u_pccm (
    .clk, .rst_n, .start(cfg_start), .busy(cfg_busy), .done(cfg_done),
    .cell_we, .cfg_addr, .cfg_data);

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    dcmark_cell u_cell (
      .clk, .rst_n, .run, .hold,
      .cfg_we(cell_we[i]), .cfg_addr, .cfg_data,
      .rd_addr, .rd_data(cell_rd[i]),
      .nb_m2(i_reg[(i + 2*N_CELLS - 2) % N_CELLS]),
      .nb_m1(i_reg[(i + N_CELLS - 1) % N_CELLS]),
      .nb_p1(i_reg[(i + 1) % N_CELLS]),
      .nb_p2(i_reg[(i + 2) % N_CELLS]),
      .i_reg(i_reg[i]), .iter(iter[i]), .halted(halted[i]));
  end

  assign run       = (st == D_RUN) || (st == D_DONE);
  // stop at the fetch that follows the JUMP completing step n_steps
  assign hold      = (step_count + 32'(iter[0])) >= n_steps;
  assign cfg_start = (st == D_IDLE || st == D_DONE) && start;
  assign busy      = (st == D_CONFIG) || (st == D_RUN);
  assign done      = (st == D_DONE);
  assign rd_data   = (32'(rd_cell) < N_CELLS) ? cell_rd[rd_cell] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= D_IDLE;
      step_count <= '0;
      run_cycles <= '0;
    end else begin
      case (st)
        D_IDLE, D_DONE: if (start) begin
          st         <= D_CONFIG;
          step_count <= '0;
          run_cycles <= '0;
        end
        D_CONFIG: if (cfg_done) st <= D_RUN;
        D_RUN: begin
          if (iter[0]) step_count <= step_count + 1;
          if (!(&halted)) run_cycles <= run_cycles + 1;
          else st <= D_DONE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  // cells run in lock-step: all must halt on the same clock and count the same steps
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    ((|halted) |-> (&halted)) and ((|iter) |-> (&iter)));

endmodule
