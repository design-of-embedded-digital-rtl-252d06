// ffl_frame_analyzer -- frame disassembly of the FF-LYNX receiver.
//
// After a header sequence ends, the FRM bits of the following words (skipping
// trigger periods, whose FRM bits are fixed-latency data) are appended to a
// bit queue. Fields are taken out of the queue at the fast clock rate: the
// FD (frame type, label/CRC flags, last-frame flag, word count), the optional
// label, the payload words, which are passed on with an end-of-packet flag
// on the last word of the last frame, and the optional CRC-8, which is
// checked against the CRC of the received payload. Padding after the last
// field is dropped. A bad frame type or a header inside a frame is reported
// on fd_err, a CRC mismatch on crc_err.
module ffl_frame_analyzer
  import ffl_pkg::*;
#(
  parameter int unsigned FRM_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             word_stb,
  input  logic             trg,
  input  logic             hdr,
  input  logic [FRM_W-1:0] frm,
  output logic             out_valid,
  output logic [15:0]      out_word,
  output logic             out_eop,
  output logic [15:0]      label_rx,
  output logic             crc_err,
  output logic             fd_err,
  output logic             frame_rx
);

  localparam int unsigned QW = 48;
  typedef enum logic [2:0] {A_IDLE, A_FD, A_LABEL, A_WORDS, A_CRC} astate_e;
  astate_e       st;
  logic [QW-1:0] q;
  logic [6:0]    qn;
  logic [4:0]    nwords, wcnt;
  logic          f_crc, f_last;
  logic [7:0]    crc;
  logic [4:0]    need;
  logic          ext;
  logic [15:0]   fval;

  always_comb begin
    case (st)
      A_FD:    need = 5'(FD_W);
      A_LABEL: need = 5'(LABEL_W);
      A_WORDS: need = 5'(WORD_W);
      A_CRC:   need = 5'(CRC_W);
      default: need = 5'd31;
    endcase
  end
  assign ext  = (st != A_IDLE) && !word_stb && (qn >= 7'(need));
  assign fval = 16'(q >> (QW - 32'(need)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; q <= '0; qn <= '0; nwords <= '0; wcnt <= '0;
      f_crc <= 1'b0; f_last <= 1'b0; crc <= '0;
      out_valid <= 1'b0; out_word <= '0; out_eop <= 1'b0; label_rx <= '0;
      crc_err <= 1'b0; fd_err <= 1'b0; frame_rx <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_eop   <= 1'b0;
      crc_err   <= 1'b0;
      fd_err    <= 1'b0;
      frame_rx  <= 1'b0;
      if (hdr) begin
        if (st != A_IDLE) fd_err <= 1'b1;   // previous frame cut short
        st <= A_FD; q <= '0; qn <= '0; wcnt <= '0; crc <= '0;
      end else if (word_stb && !trg && st != A_IDLE) begin
        q  <= q | (QW'(frm) << (QW - 32'(qn) - FRM_W));
        qn <= qn + 7'(FRM_W);
      end else if (ext) begin
        q  <= q << need;
        qn <= qn - 7'(need);
        case (st)
          A_FD: begin
            if (fval[11:10] != FT_VLF) begin
              fd_err <= 1'b1;
              st     <= A_IDLE;
            end else begin
              nwords <= 5'(fval[3:0]) + 5'd1;
              f_crc  <= fval[8];
              f_last <= fval[7];
              st     <= fval[9] ? A_LABEL : A_WORDS;
            end
          end
          A_LABEL: begin
            label_rx <= fval;
            st <= A_WORDS;
          end
          A_WORDS: begin
            out_valid <= 1'b1;
            out_word  <= fval;
            crc       <= crc8_word(crc, fval);
            wcnt      <= wcnt + 1'b1;
            if (wcnt + 1'b1 == nwords) begin
              out_eop <= f_last;
              if (f_crc) st <= A_CRC;
              else begin st <= A_IDLE; frame_rx <= 1'b1; end
            end
          end
          default: begin
            crc_err  <= (fval[7:0] != crc);
            frame_rx <= 1'b1;
            st       <= A_IDLE;
          end
        endcase
      end
    end
  end

endmodule
