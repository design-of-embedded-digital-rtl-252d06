// dhe_top -- top level: the two data-handling systems side by side.
//
// 1) dcsys: the Distributed Computing System, a ring of N_CELLS DCMARK
//    floating-point cells configured by the PCCM and running the
//    Korteweg-de Vries (KdV) solver microcode (kdv_* ports, kdv_clk, 100 MHz
//    in the reference implementation).
// 2) ff_emulator: the FF-LYNX interface emulator, a test controller
//    driving an FF-TX / FF-RX pair in loopback (ffl_* ports, ffl_clk =
//    SPEED x 40 MHz bit clock).
// The two have no signals in common; each keeps its own clock and reset.
module dhe_top
  import dcmark_pkg::*;
#(
  parameter int unsigned N_CELLS     = 100,
  parameter string       U_INIT_FILE = "rtl/kdv_init_u100.hex",
  parameter int unsigned SPEED       = 8,
  parameter int unsigned PKT_AW      = 8,
  parameter int unsigned DW_AW       = 10,
  parameter int unsigned BUF_DEPTH   = 64,
  parameter int unsigned LINK_DELAY  = 5,
  localparam int unsigned SW = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  // Distributed Computing System
  input  logic             kdv_clk,
  input  logic             kdv_rst_n,
  input  logic             kdv_start,
  input  logic [31:0]      kdv_n_steps,
  output logic             kdv_busy,
  output logic             kdv_done,
  output logic [31:0]      kdv_step_count,
  output logic [31:0]      kdv_run_cycles,
  input  logic [SW-1:0]    kdv_rd_cell,
  input  addr_t            kdv_rd_addr,
  output word_t            kdv_rd_data,
  // FF-LYNX emulator
  input  logic             ffl_clk,
  input  logic             ffl_rst_n,
  input  logic             ffl_host_we,
  input  logic [3:0]       ffl_host_sel,
  input  logic [DW_AW-1:0] ffl_host_addr,
  input  logic [31:0]      ffl_host_wdata,
  output logic [31:0]      ffl_host_rdata,
  input  logic             ffl_link_flip,
  input  logic             ffl_link_slip,
  output logic             ffl_link_dat,
  output logic             ffl_busy,
  output logic             ffl_done,
  output logic             ffl_locked,
  output logic [7:0]       ffl_events
);

  dcsys #(.N_CELLS(N_CELLS), .U_INIT_FILE(U_INIT_FILE)) u_dcsys (
    .clk(kdv_clk), .rst_n(kdv_rst_n), .start(kdv_start), .n_steps(kdv_n_steps),
    .busy(kdv_busy), .done(kdv_done), .step_count(kdv_step_count),
    .run_cycles(kdv_run_cycles), .rd_cell(kdv_rd_cell), .rd_addr(kdv_rd_addr),
    .rd_data(kdv_rd_data));

  ff_emulator #(.SPEED(SPEED), .PKT_AW(PKT_AW), .DW_AW(DW_AW), .BUF_DEPTH(BUF_DEPTH),
                .LINK_DELAY(LINK_DELAY)) u_ffl (
    .clk(ffl_clk), .rst_n(ffl_rst_n), .host_we(ffl_host_we), .host_sel(ffl_host_sel),
    .host_addr(ffl_host_addr), .host_wdata(ffl_host_wdata), .host_rdata(ffl_host_rdata),
    .link_flip(ffl_link_flip), .link_slip(ffl_link_slip), .link_dat(ffl_link_dat), .busy(ffl_busy), .done(ffl_done),
    .locked(ffl_locked), .events(ffl_events));

endmodule
