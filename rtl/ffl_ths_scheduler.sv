// ffl_ths_scheduler -- THS channel arbiter of the FF-LYNX transmitter.
//
// Chooses, for every reference period (ce), the THS symbol: a trigger, one
// symbol of a 3-period header or sync sequence, or idle. Triggers have the
// highest priority and a fixed latency: each trigger request (with its
// fixed-latency data word) goes through a TRG_DELAY = 3 period delay line,
// which lets the scheduler see the next three trigger slots. A header (or,
// when nothing else is pending, a sync sequence) is started only when those
// three slots are free, so sequences never overlap a trigger and a trigger
// is never delayed beyond its fixed latency. Header requests wait (hdr_req
// held high) until a free window; hdr_start pulses on the ce of the first
// header symbol and hdr_done on the ce of the last. trg_out/flf_out mark the
// period in which the trigger symbol is sent. 'deferred' pulses when a
// pending header had to wait for triggers.
module ffl_ths_scheduler
  import ffl_pkg::*;
#(
  parameter int unsigned FLF_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             trg_in,      // sampled on ce
  input  logic [FLF_W-1:0] flf_in,
  input  logic             hdr_req,
  input  logic             sync_en,
  output ths_t             ths,         // symbol for the current period
  output logic             trg_out,
  output logic [FLF_W-1:0] flf_out,
  output logic             hdr_start,
  output logic             hdr_done,
  output logic             deferred
);

  logic [TRG_DELAY-1:0] dly_t;
  logic [FLF_W-1:0]     dly_d [TRG_DELAY];
  typedef enum logic [1:0] {K_NONE, K_HDR, K_SYNC} kind_e;
  kind_e      kind;
  logic [1:0] pos;
  logic [5:0] seq;
  logic       window_free;

  // current period's values (registered at the ce that starts the period)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_t <= '0;
      for (int i = 0; i < TRG_DELAY; i++) dly_d[i] <= '0;
      kind  <= K_NONE;
      pos   <= '0;
    end else if (ce) begin
      dly_t <= {dly_t[TRG_DELAY-2:0], trg_in};
      dly_d[0] <= flf_in;
      for (int i = 1; i < TRG_DELAY; i++) dly_d[i] <= dly_d[i-1];
      if (kind != K_NONE && pos != 2'd2) pos <= pos + 1'b1;
      else if (window_free && hdr_req) begin kind <= K_HDR;  pos <= 2'd0; end
      else if (window_free && sync_en) begin kind <= K_SYNC; pos <= 2'd0; end
      else kind <= K_NONE;
    end
  end

  // the three trigger slots after the current one: positions 1..0 of the
  // delay line and the request being sampled now
  assign window_free = !(|dly_t[TRG_DELAY-2:0]) && !trg_in
                       && !(kind != K_NONE && pos != 2'd2);

  assign seq     = (kind == K_HDR) ? SEQ_HDR : SEQ_SYNC;
  assign trg_out = dly_t[TRG_DELAY-1];
  assign flf_out = dly_d[TRG_DELAY-1];

  always_comb begin
    ths = THS_IDLE;
    if (trg_out) ths = THS_TRG;
    else if (kind != K_NONE) ths = seq[5 - 2*pos -: 2];
  end

  assign hdr_start = ce && window_free && hdr_req;
  assign hdr_done  = ce && kind == K_HDR && pos == 2'd2;
  assign deferred  = ce && hdr_req && !window_free && !(kind != K_NONE && pos != 2'd2);

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    trg_out |-> (kind == K_NONE));

endmodule
