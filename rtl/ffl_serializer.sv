// ffl_serializer -- TDM word composition and serial output of the FF-LYNX transmitter.
//
// On every reference-period strobe (ce) it loads one SPEED-bit TDM word:
// the THS symbol from the scheduler in the top two bits, and in the FRM bits
// either the fixed-latency trigger data (trigger period), the next frame
// chunk from the frame builder, or zeros. The word is then shifted out MSB
// first, one bit per fast clock, on 'dat'. With a 40 MHz reference and
// SPEED = 8 the fast clock is 320 MHz (320 Mbit/s).
module ffl_serializer
  import ffl_pkg::*;
#(
  parameter int unsigned SPEED = 8,
  localparam int unsigned FRM_W = SPEED - 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  ths_t             ths,
  input  logic             trg_now,
  input  logic [FRM_W-1:0] flf_bits,
  input  logic             frm_valid,
  input  logic [FRM_W-1:0] frm_bits,
  output logic             dat
);

  logic [SPEED-1:0] sh;
  logic [FRM_W-1:0] frm;

  always_comb begin
    if (trg_now)        frm = flf_bits;
    else if (frm_valid) frm = frm_bits;
    else                frm = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sh <= '0;
    else if (ce) sh <= {ths, frm};
    else         sh <= sh << 1;
  end

  assign dat = sh[SPEED-1];

endmodule
