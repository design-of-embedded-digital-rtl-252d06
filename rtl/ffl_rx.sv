// ffl_rx -- FF-LYNX receiver interface.
//
// Link side: the serial line 'din' at SPEED bits per reference period.
// Chain: deserializer (3-word window, bit-phase counter), THS detector, PDT
// synchronizer (locks on N_LOCK sync sequences at one phase, unlocks on
// N_UNLOCK stray ones), frame analyzer, and the RX buffer FIFO holding
// {end-of-packet, word}. Host side: trg/flf_data pulse for one fast clock
// when a trigger symbol is received (with its fixed-latency data); the VLF
// port offers buffered words (vlf_valid, vlf_data, vlf_eop) and pops one per
// reference strobe ce while vlf_get_data is high. Status outputs report lock
// state and frame/CRC errors.
module ffl_rx
  import ffl_pkg::*;
#(
  parameter int unsigned SPEED     = 8,
  parameter int unsigned BUF_DEPTH = 64,
  parameter int unsigned N_LOCK    = 4,
  parameter int unsigned N_UNLOCK  = 3,
  localparam int unsigned FRM_W    = SPEED - 2,
  localparam int unsigned PW       = (SPEED > 1) ? $clog2(SPEED) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             din,
  // host
  output logic             trg,
  output logic [FRM_W-1:0] flf_data,
  output logic             vlf_valid,
  output logic [15:0]      vlf_data,
  output logic             vlf_eop,
  input  logic             vlf_get_data,
  // status
  output logic             locked,
  output logic             lock_event,
  output logic             unlock_event,
  output logic             frame_rx,
  output logic             crc_err,
  output logic             fd_err,
  output logic [15:0]      label_rx,
  output logic             overflow
);

  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic [3*SPEED-1:0] sr;
  logic [PW-1:0]      phase, lock_phase;
  logic               sync_hit, word_stb, t_trg, t_hdr;
  logic [FRM_W-1:0]   frm;
  logic               a_valid, a_eop, empty, full;
  logic [15:0]        a_word;

  ffl_deserializer #(.SPEED(SPEED)) u_des (.clk, .rst_n, .din, .sr, .phase);

  ffl_ths_detector #(.SPEED(SPEED)) u_det (
    .sr, .word_stb, .sync_hit, .trg(t_trg), .hdr(t_hdr), .frm);

  ffl_synchronizer #(.SPEED(SPEED), .N_LOCK(N_LOCK), .N_UNLOCK(N_UNLOCK)) u_syn (
    .clk, .rst_n, .phase, .sync_hit, .locked, .lock_phase, .word_stb,
    .lock_event, .unlock_event);

  ffl_frame_analyzer #(.FRM_W(FRM_W)) u_fa (
    .clk, .rst_n, .word_stb, .trg(t_trg), .hdr(t_hdr), .frm,
    .out_valid(a_valid), .out_word(a_word), .out_eop(a_eop), .label_rx,
    .crc_err, .fd_err, .frame_rx);

  assign trg      = t_trg;
  assign flf_data = frm;

  logic [16:0] q;
  sync_fifo #(.WIDTH(17), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .limit(CW'(BUF_DEPTH)), .wr_en(a_valid), .wr_data({a_eop, a_word}),
    .rd_en(ce && vlf_get_data && !empty), .rd_data(q), .empty, .full, .count());

  assign vlf_valid = !empty;
  assign vlf_data  = q[15:0];
  assign vlf_eop   = q[16];
  assign overflow  = a_valid && full;

endmodule
