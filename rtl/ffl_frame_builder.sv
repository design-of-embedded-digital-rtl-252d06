// ffl_frame_builder -- frame assembly of the FF-LYNX transmitter.
//
// Waits until the TX buffer holds a complete packet (its length is in the
// length FIFO), then cuts it into frames of at most 16 words. For each frame
// it requests a header from the THS scheduler and, from the period after the
// header's last symbol, delivers the frame bits to the serializer FRM_W bits
// per reference period: FD, optional label, the payload words popped from the
// data FIFO, optional CRC-8 over the payload; the last chunk is padded with
// zeros. In a trigger period (trg_now) no chunk is taken and the frame
// simply pauses, which is how fixed-latency data gets priority over
// variable-latency data. A bit queue refilled at the fast clock rate sits
// between fields and chunks. 'frame_sent' pulses at the end of each frame.
module ffl_frame_builder
  import ffl_pkg::*;
#(
  parameter int unsigned FRM_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             label_on,
  input  logic [15:0]      label,
  input  logic             crc_on,
  // TX buffer: length FIFO and data FIFO (first-word fall-through)
  input  logic             len_empty,
  input  logic [15:0]      len_data,
  output logic             len_pop,
  input  logic [15:0]      dat_data,
  output logic             dat_pop,
  // THS scheduler
  output logic             hdr_req,
  input  logic             hdr_start,
  input  logic             hdr_done,
  input  logic             trg_now,
  // serializer
  output logic             frm_valid,
  output logic [FRM_W-1:0] frm_bits,
  output logic             frame_sent
);

  localparam int unsigned QW = 48;

  typedef enum logic [2:0] {B_IDLE, B_REQ, B_WAIT, B_SEND} bstate_e;
  typedef enum logic [1:0] {F_FD, F_LABEL, F_WORDS, F_CRC} field_e;
  bstate_e        st;
  field_e         fld;
  logic           fields_done;
  logic [15:0]    rem;            // words of the packet still to frame
  logic [4:0]     nwords, wcnt;   // words in this frame, words loaded
  logic           last;
  logic [QW-1:0]  q;
  logic [6:0]     qn;
  logic [7:0]     crc;
  logic           take;

  assign hdr_req   = (st == B_REQ);
  assign frm_valid = (st == B_SEND);
  assign take      = ce && (st == B_SEND) && !trg_now;
  assign frm_bits  = q[QW-1 -: FRM_W];
  assign len_pop   = (st == B_IDLE) && !len_empty && (len_data != 16'd0);

  // one field is appended per clock while it fits
  logic           load;
  logic [15:0]    fval;
  logic [4:0]     fw;
  always_comb begin
    fval = '0;
    fw   = '0;
    case (fld)
      F_FD:    begin fval = 16'(make_fd(label_on, crc_on, last, 4'(nwords - 1'b1))); fw = 5'(FD_W); end
      F_LABEL: begin fval = label; fw = 5'(LABEL_W); end
      F_WORDS: begin fval = dat_data; fw = 5'(WORD_W); end
      default: begin fval = {8'd0, crc}; fw = 5'(CRC_W); end
    endcase
  end
  assign load    = (st != B_IDLE) && !fields_done && (7'(qn) + 7'(fw) <= 7'(QW))
                   && !(take);   // keep the queue update simple: no load on a take clock
  assign dat_pop = load && (fld == F_WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= B_IDLE;
      fld         <= F_FD;
      fields_done <= 1'b0;
      rem         <= '0;
      nwords      <= '0;
      wcnt        <= '0;
      last        <= 1'b0;
      q           <= '0;
      qn          <= '0;
      crc         <= '0;
      frame_sent  <= 1'b0;
    end else begin
      frame_sent <= 1'b0;
      // field loading
      if (load) begin
        q  <= q | (QW'(fval) << (QW - 32'(qn) - 32'(fw)));
        qn <= qn + 7'(fw);
        case (fld)
          F_FD:    fld <= label_on ? F_LABEL : F_WORDS;
          F_LABEL: fld <= F_WORDS;
          F_WORDS: begin
            crc  <= crc8_word(crc, dat_data);
            wcnt <= wcnt + 1'b1;
            if (wcnt + 1'b1 == nwords) begin
              if (crc_on) fld <= F_CRC;
              else fields_done <= 1'b1;
            end
          end
          default: fields_done <= 1'b1;
        endcase
      end
      case (st)
        B_IDLE: if (len_pop) begin
          rem <= len_data;
          st  <= B_REQ;
          nwords <= (len_data > 16'(MAX_FRAME_WORDS)) ? 5'(MAX_FRAME_WORDS) : 5'(len_data);
          last   <= (len_data <= 16'(MAX_FRAME_WORDS));
          fld <= F_FD; fields_done <= 1'b0; wcnt <= '0; crc <= '0; q <= '0; qn <= '0;
        end
        B_REQ:  if (hdr_start) st <= B_WAIT;
        B_WAIT: if (hdr_done) st <= B_SEND;
        B_SEND: if (take) begin
          q <= q << FRM_W;
          if (fields_done && 32'(qn) <= FRM_W) begin
            // last chunk of the frame
            frame_sent <= 1'b1;
            qn <= '0;
            q  <= '0;
            if (rem > 16'(nwords)) begin
              rem    <= rem - 16'(nwords);
              nwords <= (rem - 16'(nwords) > 16'(MAX_FRAME_WORDS)) ? 5'(MAX_FRAME_WORDS) : 5'(rem - 16'(nwords));
              last   <= (rem - 16'(nwords) <= 16'(MAX_FRAME_WORDS));
              fld <= F_FD; fields_done <= 1'b0; wcnt <= '0; crc <= '0;
              st  <= B_REQ;
            end else begin
              rem <= '0;
              st  <= B_IDLE;
            end
          end else begin
            qn <= (32'(qn) >= FRM_W) ? qn - 7'(FRM_W) : '0;
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> (fields_done || 32'(qn) >= FRM_W));

endmodule
