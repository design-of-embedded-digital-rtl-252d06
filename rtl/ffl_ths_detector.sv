// ffl_ths_detector -- THS channel decoder of the FF-LYNX receiver.
//
// Looks at the THS bits (top two bits) of the last three words in the
// deserializer window. Every clock it reports whether those three symbols
// form the sync sequence (candidate word boundary at the current bit phase,
// used by the synchronizer). On the word strobe (once the link is locked)
// it decodes the current period: trigger (with the FRM bits as fixed-latency
// data), end of a header sequence (the frame starts with the next word), or
// neither (FRM bits are frame data or idle).
module ffl_ths_detector
  import ffl_pkg::*;
#(
  parameter int unsigned SPEED = 8,
  localparam int unsigned FRM_W = SPEED - 2
) (
  input  logic [3*SPEED-1:0] sr,
  input  logic               word_stb,
  output logic               sync_hit,
  output logic               trg,
  output logic               hdr,
  output logic [FRM_W-1:0]   frm
);

  ths_t s0, s1, s2;   // s2 oldest, s0 newest
  assign s2 = sr[3*SPEED-1 -: 2];
  assign s1 = sr[2*SPEED-1 -: 2];
  assign s0 = sr[SPEED-1 -: 2];

  assign sync_hit = ({s2, s1, s0} == SEQ_SYNC);
  assign trg      = word_stb && (s0 == THS_TRG);
  assign hdr      = word_stb && ({s2, s1, s0} == SEQ_HDR);
  assign frm      = sr[FRM_W-1:0];

endmodule
