// tc_tx_controller -- transmit side of the emulator test controller.
//
// Replays a test vector stored in the TX tables against the FF-TX host
// port. Time is counted in reference periods (timestamp ts, advanced on ce
// from 'start' until 'window' periods have elapsed). Tables (read through
// synchronous RAM ports): VLF_TS/VLF_LEN per packet, VLF_DW with all packet
// words back to back, TRG_TS/FLF_DW per trigger.
//
// When ts reaches the next packet's timestamp the packet's words are copied
// (one word every two fast clocks) into the emulated sensor buffer, a FIFO
// whose size is limited to buf_limit words; words that do not fit are
// counted in lost_words. The number of words kept is queued in a length
// FIFO, and a sender hands each stored packet to the FF-TX as consecutive
// words with vlf_valid high (waiting while vlf_get_data is low), followed by
// at least one period with vlf_valid low. When ts reaches the next trigger's
// timestamp trg is raised for one period together with its FLF word.
module tc_tx_controller #(
  parameter int unsigned PKT_AW  = 8,
  parameter int unsigned DW_AW   = 10,
  parameter int unsigned FLF_W   = 6,
  parameter int unsigned BUF_MAX = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              start,
  input  logic [31:0]       window,
  input  logic [15:0]       n_vlf,
  input  logic [15:0]       n_trg,
  input  logic [15:0]       buf_limit,
  output logic              busy,
  output logic              done,
  output logic [31:0]       ts,
  output logic [15:0]       lost_words,
  output logic [15:0]       tx_packets,
  // table read ports
  output logic [PKT_AW-1:0] vlf_addr,
  input  logic [31:0]       vlf_ts_q,
  input  logic [31:0]       vlf_len_q,
  output logic [DW_AW-1:0]  dw_addr,
  input  logic [31:0]       dw_q,
  output logic [PKT_AW-1:0] trg_addr,
  input  logic [31:0]       trg_ts_q,
  input  logic [31:0]       flf_q,
  // FF-TX host port
  output logic              vlf_valid,
  output logic [15:0]       vlf_data,
  input  logic              vlf_get_data,
  output logic              trg,
  output logic [FLF_W-1:0]  flf_data
);

  localparam int unsigned BCW = $clog2(BUF_MAX + 1);

  logic        vstale, tstale;
  logic [15:0] vp, tp;
  typedef enum logic [1:0] {C_WAIT, C_READ, C_PUSH, C_LEN} cstate_e;
  cstate_e     cst;
  logic [15:0] crem, ckept;
  logic        b_push, b_pop, b_empty, b_full, l_empty, l_full;
  logic [15:0] b_q, l_q;
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_GAP} sstate_e;
  sstate_e     sst;
  logic [15:0] srem;

  assign vlf_addr = PKT_AW'(vp);
  assign trg_addr = PKT_AW'(tp);

  // test timing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; ts <= '0;
    end else if (start) begin
      busy <= 1'b1; done <= 1'b0; ts <= '0;
    end else if (busy && ce) begin
      if (ts + 1 >= window) begin busy <= 1'b0; done <= 1'b1; end
      ts <= ts + 1'b1;
    end
  end

  // packet copy into the emulated sensor buffer
  assign b_push = (cst == C_PUSH) && !b_full;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_WAIT; vp <= '0; vstale <= 1'b1; dw_addr <= '0;
      crem <= '0; ckept <= '0; lost_words <= '0;
    end else if (start) begin
      cst <= C_WAIT; vp <= '0; vstale <= 1'b1; dw_addr <= '0;
      lost_words <= '0;
    end else begin
      vstale <= 1'b0;
      case (cst)
        C_WAIT: if (busy && !vstale && vp < n_vlf && ts >= vlf_ts_q && !l_full) begin
          crem  <= vlf_len_q[15:0];
          ckept <= '0;
          cst   <= (vlf_len_q[15:0] == 16'd0) ? C_LEN : C_READ;
        end
        C_READ: cst <= C_PUSH;             // dw_q valid next clock
        C_PUSH: begin
          if (b_full) lost_words <= lost_words + 1'b1;
          else        ckept      <= ckept + 1'b1;
          dw_addr <= dw_addr + 1'b1;
          crem    <= crem - 1'b1;
          cst     <= (crem == 16'd1) ? C_LEN : C_READ;
        end
        default: begin                     // C_LEN: queue the packet length
          vp     <= vp + 1'b1;
          vstale <= 1'b1;
          cst    <= C_WAIT;
        end
      endcase
    end
  end

  sync_fifo #(.WIDTH(16), .DEPTH(BUF_MAX)) u_buf (
    .clk, .rst_n, .limit(BCW'(buf_limit)), .wr_en(b_push), .wr_data(dw_q[15:0]),
    .rd_en(b_pop), .rd_data(b_q), .empty(b_empty), .full(b_full), .count());

  sync_fifo #(.WIDTH(16), .DEPTH(16)) u_len (
    .clk, .rst_n, .limit(5'd16), .wr_en(cst == C_LEN && ckept != 16'd0), .wr_data(ckept),
    .rd_en(sst == S_IDLE && ce && !l_empty), .rd_data(l_q), .empty(l_empty), .full(l_full),
    .count());

  // sender towards the FF-TX
  assign vlf_valid = (sst == S_SEND);
  assign vlf_data  = b_q;
  assign b_pop     = ce && (sst == S_SEND) && vlf_get_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sst <= S_IDLE; srem <= '0; tx_packets <= '0;
    end else if (start) begin
      tx_packets <= '0;
    end else if (ce) begin
      case (sst)
        S_IDLE: if (!l_empty) begin srem <= l_q; sst <= S_SEND; end
        S_SEND: if (vlf_get_data) begin
          srem <= srem - 1'b1;
          if (srem == 16'd1) begin sst <= S_GAP; tx_packets <= tx_packets + 1'b1; end
        end
        default: sst <= S_IDLE;
      endcase
    end
  end

  // triggers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tp <= '0; tstale <= 1'b1; trg <= 1'b0; flf_data <= '0;
    end else if (start) begin
      tp <= '0; tstale <= 1'b1; trg <= 1'b0;
    end else begin
      tstale <= 1'b0;
      if (ce) begin
        trg <= 1'b0;
        if (busy && !tstale && tp < n_trg && ts >= trg_ts_q) begin
          trg      <= 1'b1;
          flf_data <= flf_q[FLF_W-1:0];
          tp       <= tp + 1'b1;
          tstale   <= 1'b1;
        end
      end
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) b_pop |-> !b_empty);

endmodule
