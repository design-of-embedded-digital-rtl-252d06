// ffl_tx -- FF-LYNX transmitter interface.
//
// Host side (sampled on the reference strobe ce): a 16-bit VLF port where
// the host presents the words of a packet on consecutive periods with
// vlf_valid high while vlf_get_data is high, and drops vlf_valid for at least
// one period between packets; and a trigger input with its FRM_W-bit
// fixed-latency (FLF) data word. Link side: one serial line 'dat' at SPEED
// bits per reference period.
//
// Inside: the TX buffer (a data FIFO and a FIFO of packet lengths, so a
// frame is only started for a complete packet), the frame builder, the THS
// scheduler (fixed 3-period trigger latency, headers/sync in trigger-free
// windows) and the serializer. vlf_get_data goes low when the data FIFO is
// full. label_on/label and crc_on select the optional frame fields; sync_en
// lets the scheduler fill idle THS periods with sync sequences.
module ffl_tx
  import ffl_pkg::*;
#(
  parameter int unsigned SPEED     = 8,
  parameter int unsigned BUF_DEPTH = 64,
  localparam int unsigned FRM_W    = SPEED - 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  // configuration
  input  logic             label_on,
  input  logic [15:0]      label,
  input  logic             crc_on,
  input  logic             sync_en,
  // host VLF port
  input  logic             vlf_valid,
  input  logic [15:0]      vlf_data,
  output logic             vlf_get_data,
  // host trigger / FLF port
  input  logic             trg,
  input  logic [FRM_W-1:0] flf_data,
  // serial link
  output logic             dat,
  // status
  output logic             frame_sent,
  output logic             hdr_deferred
);

  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic        dat_full, dat_empty, len_empty, len_full, len_pop, dat_pop;
  logic [15:0] dat_q, len_q, pkt_cnt;
  logic        in_pkt;
  logic        hdr_req, hdr_start, hdr_done, trg_now, frm_valid;
  logic [FRM_W-1:0] flf_now, frm_bits;
  ths_t        ths;
  logic        push;

  assign vlf_get_data = !dat_full && !len_full;
  assign push = ce && vlf_valid && vlf_get_data;

  // packet length counter: a packet ends at the first period without vlf_valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_cnt <= '0;
      in_pkt  <= 1'b0;
    end else if (ce) begin
      if (push) begin
        pkt_cnt <= pkt_cnt + 1'b1;
        in_pkt  <= 1'b1;
      end else if (!vlf_valid && in_pkt) begin
        pkt_cnt <= '0;
        in_pkt  <= 1'b0;
      end
    end
  end

  sync_fifo #(.WIDTH(16), .DEPTH(BUF_DEPTH)) u_dat (
    .clk, .rst_n, .limit(CW'(BUF_DEPTH)), .wr_en(push), .wr_data(vlf_data),
    .rd_en(dat_pop), .rd_data(dat_q), .empty(dat_empty), .full(dat_full), .count());

  sync_fifo #(.WIDTH(16), .DEPTH(8)) u_len (
    .clk, .rst_n, .limit(4'd8), .wr_en(ce && !vlf_valid && in_pkt), .wr_data(pkt_cnt),
    .rd_en(len_pop), .rd_data(len_q), .empty(len_empty), .full(len_full), .count());

  ffl_frame_builder #(.FRM_W(FRM_W)) u_fb (
    .clk, .rst_n, .ce, .label_on, .label, .crc_on,
    .len_empty, .len_data(len_q), .len_pop, .dat_data(dat_q), .dat_pop,
    .hdr_req, .hdr_start, .hdr_done, .trg_now,
    .frm_valid, .frm_bits, .frame_sent);

  ffl_ths_scheduler #(.FLF_W(FRM_W)) u_sch (
    .clk, .rst_n, .ce, .trg_in(trg), .flf_in(flf_data), .hdr_req, .sync_en,
    .ths, .trg_out(trg_now), .flf_out(flf_now), .hdr_start, .hdr_done,
    .deferred(hdr_deferred));

  ffl_serializer #(.SPEED(SPEED)) u_ser (
    .clk, .rst_n, .ce, .ths, .trg_now, .flf_bits(flf_now),
    .frm_valid, .frm_bits, .dat);

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    dat_pop |-> !dat_empty);

endmodule
