// pccm -- Parallel Cell Configuration Module: programs the RAMs of all DCMARK cells.
//
// A configuration FSM walks the configuration ROM from the first word to the
// last, one word per clock (the ROM read adds one clock of pipeline):
//   words 0 .. MC_LEN-1      micro-code, broadcast to RAM address 0.. of every cell
//   next N_CONST words       constants, broadcast to the constant area (A_KI1..)
//   next N_CELLS words       initial status, written one-to-one to A_U of cell i
// The write decoder turns each write into per-cell enables. 'start' (one
// clock) begins a pass; busy is high until the last write, and done pulses
// for one clock after it. A pass takes MC_LEN + N_CONST + N_CELLS + 2 clocks.
module pccm
  import dcmark_pkg::*;
#(
  parameter int unsigned N_CELLS     = 100,
  parameter string       U_INIT_FILE = "rtl/kdv_init_u100.hex",
  localparam int unsigned SW = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // to the cells
  output logic [N_CELLS-1:0] cell_we,
  output addr_t              cfg_addr,
  output word_t              cfg_data
);

  localparam int unsigned DEPTH = MC_LEN + N_CONST + N_CELLS;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef enum logic [1:0] {C_IDLE, C_READ, C_LAST} cstate_e;
  cstate_e       st;
  logic [AW-1:0] rom_addr, wr_idx;
  logic          wr_valid;
  word_t         rom_data;
  logic          bcast;
  logic [SW-1:0] sel;

  pccm_config_rom #(.N_CELLS(N_CELLS), .U_INIT_FILE(U_INIT_FILE)) u_rom (
    .clk, .addr(rom_addr), .data(rom_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      rom_addr <= '0;
      wr_idx   <= '0;
      wr_valid <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      wr_valid <= 1'b0;
      case (st)
        C_IDLE: if (start) begin
          rom_addr <= '0;
          st       <= C_READ;
        end
        C_READ: begin
          // the word addressed now is written on the next clock
          wr_valid <= 1'b1;
          wr_idx   <= rom_addr;
          if (32'(rom_addr) == DEPTH - 1) st <= C_LAST;
          else rom_addr <= rom_addr + 1'b1;
        end
        C_LAST: begin
          st   <= C_IDLE;
          done <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // write address and target selection for the word on rom_data
  always_comb begin
    bcast    = 1'b1;
    sel      = '0;
    cfg_addr = addr_t'(wr_idx);
    if (32'(wr_idx) >= MC_LEN + N_CONST) begin
      bcast    = 1'b0;
      sel      = SW'(32'(wr_idx) - MC_LEN - N_CONST);
      cfg_addr = A_U;
    end else if (32'(wr_idx) >= MC_LEN) begin
      cfg_addr = A_KI1 + addr_t'(32'(wr_idx) - MC_LEN);
    end
  end

  assign cfg_data = rom_data;
  assign busy     = (st != C_IDLE);

  pccm_write_decoder #(.N_CELLS(N_CELLS)) u_dec (
    .we(wr_valid), .broadcast(bcast), .sel, .cell_we);

endmodule
