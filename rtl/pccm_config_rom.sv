// pccm_config_rom -- configuration ROM of the Parallel Cell Configuration Module.
//
// Holds the configuration file that programs a DCMARK ring, in this order:
// the cell micro-program (MC_LEN words, built at elaboration by
// dcmark_pkg::kdv_mcode), the six constants Ki1, Ki2, K1, K2, Dt and a zero
// word, then the initial status u(1)..u(N) of each cell. The constants are
// parameters with the values of the reference KdV run (dx = 0.5: Ki1 = 4,
// Ki2 = 3, K1 = 8, K2 = 6; Dt = 0.01). The initial status is read from a hex
// file with one single-precision word per line; the delivered file holds
// u_i = 2*sech^2(x_i), x_i = -5 + 10*(i+0.5)/N for N = 100.
// Synchronous read: data is valid one clock after addr.
module pccm_config_rom
  import dcmark_pkg::*;
#(
  parameter int unsigned N_CELLS     = 100,
  parameter string       U_INIT_FILE = "rtl/kdv_init_u100.hex",
  parameter fp_t         KI1 = 32'h40800000,   // 4.0
  parameter fp_t         KI2 = 32'h40400000,   // 3.0
  parameter fp_t         K1  = 32'h41000000,   // 8.0
  parameter fp_t         K2  = 32'h40C00000,   // 6.0
  parameter fp_t         DT  = 32'h3C23D70A,   // 0.01
  localparam int unsigned DEPTH = MC_LEN + N_CONST + N_CELLS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output word_t         data
);

  localparam mcode_t MC = kdv_mcode();
  localparam fp_t CONSTS [N_CONST] = '{KI1, KI2, K1, K2, DT, 32'h0};

  fp_t u_init [N_CELLS];
  initial $readmemh(U_INIT_FILE, u_init);

  always_ff @(posedge clk) begin
    if (32'(addr) < MC_LEN)
      data <= MC[addr];
    else if (32'(addr) < MC_LEN + N_CONST)
      data <= {8'd0, CONSTS[32'(addr) - MC_LEN]};
    else if (32'(addr) < DEPTH)
      data <= {8'd0, u_init[32'(addr) - MC_LEN - N_CONST]};
    else
      data <= '0;
  end

endmodule
