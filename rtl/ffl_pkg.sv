// ffl_pkg -- constants shared by the FF-LYNX transmitter/receiver and the emulator test controller.
//
// Link format: every reference-clock period carries one TDM word of SPEED
// bits (SPEED = 4, 8 or 16 for the 4x/8x/16x rates), sent MSB first: the top
// two bits are the THS channel (triggers, frame headers, sync), the other
// SPEED-2 bits the FRM channel (frame data, or fixed-latency trigger data in
// a trigger period). The THS symbol values and the 3-period header and sync
// sequences below are choices of this design; they are picked so that no
// concatenation of sequences, triggers and idle symbols contains a false
// header or sync.
//
// Frame (FRM channel, MSB first): frame descriptor FD (12 bits), optional
// label (16), payload of 1..16 16-bit words, optional CRC-8 of the payload.
// FD layout (this design): [11:10] frame type (01 = VLF data), [9] label
// present, [8] CRC present, [7] last frame of the packet, [6:4] zero,
// [3:0] number of payload words - 1.
package ffl_pkg;

  typedef logic [1:0] ths_t;
  localparam ths_t THS_IDLE = 2'b00;
  localparam ths_t THS_TRG  = 2'b11;
  localparam logic [5:0] SEQ_HDR  = 6'b01_01_10;   // oldest symbol first
  localparam logic [5:0] SEQ_SYNC = 6'b10_10_01;

  localparam int unsigned FD_W    = 12;
  localparam int unsigned LABEL_W = 16;
  localparam int unsigned WORD_W  = 16;
  localparam int unsigned CRC_W   = 8;
  localparam int unsigned MAX_FRAME_WORDS = 16;
  localparam logic [1:0]  FT_VLF  = 2'b01;

  // trigger-to-link latency of the THS scheduler (look-ahead window)
  localparam int unsigned TRG_DELAY = 3;

  function automatic logic [FD_W-1:0] make_fd(logic label_on, logic crc_on, logic last,
                                              logic [3:0] words_m1);
    return {FT_VLF, label_on, crc_on, last, 3'b000, words_m1};
  endfunction

  // CRC-8, polynomial x^8 + x^2 + x + 1, MSB first, initial value 0
  function automatic logic [7:0] crc8_word(logic [7:0] crc, logic [15:0] w);
    logic [7:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ w[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

endpackage
