// tc_rx_controller -- receive side of the emulator test controller.
//
// Stores everything the FF-RX delivers, together with the timestamp (in
// reference periods, shared with the TX controller) at which it arrived, so
// the host can compute latencies and losses. VLF words are read from the
// FF-RX on every reference strobe while available and written to RX_DW; at
// each end-of-packet the packet's timestamp and length go to RX_TS/RX_LEN.
// Each received trigger writes its timestamp to RX_TRG_TS and its FLF word
// to RX_FLF. Writes beyond the table size are dropped (counters saturate at
// the table size).
module tc_rx_controller #(
  parameter int unsigned PKT_AW = 8,
  parameter int unsigned DW_AW  = 10,
  parameter int unsigned FLF_W  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              start,
  input  logic [31:0]       ts,
  // FF-RX host port
  input  logic              vlf_valid,
  input  logic [15:0]       vlf_data,
  input  logic              vlf_eop,
  output logic              vlf_get_data,
  input  logic              trg,
  input  logic [FLF_W-1:0]  flf_data,
  // table write ports
  output logic              pkt_we,
  output logic [PKT_AW-1:0] pkt_addr,
  output logic [31:0]       pkt_ts_d,
  output logic [31:0]       pkt_len_d,
  output logic              dw_we,
  output logic [DW_AW-1:0]  dw_addr,
  output logic [31:0]       dw_d,
  output logic              trg_we,
  output logic [PKT_AW-1:0] trg_addr,
  output logic [31:0]       trg_ts_d,
  output logic [31:0]       flf_d,
  // counters
  output logic [15:0]       rx_packets,
  output logic [15:0]       rx_words,
  output logic [15:0]       rx_triggers
);

  logic [15:0] plen;
  logic        take;

  assign vlf_get_data = 1'b1;
  assign take = ce && vlf_valid;

  assign pkt_we    = take && vlf_eop && (32'(rx_packets) < (1 << PKT_AW));
  assign pkt_addr  = PKT_AW'(rx_packets);
  assign pkt_ts_d  = ts;
  assign pkt_len_d = {16'd0, plen + 1'b1};
  assign dw_we     = take && (32'(rx_words) < (1 << DW_AW));
  assign dw_addr   = DW_AW'(rx_words);
  assign dw_d      = {16'd0, vlf_data};
  assign trg_we    = trg && (32'(rx_triggers) < (1 << PKT_AW));
  assign trg_addr  = PKT_AW'(rx_triggers);
  assign trg_ts_d  = ts;
  assign flf_d     = 32'(flf_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_packets <= '0; rx_words <= '0; rx_triggers <= '0; plen <= '0;
    end else if (start) begin
      rx_packets <= '0; rx_words <= '0; rx_triggers <= '0; plen <= '0;
    end else begin
      if (take) begin
        if (dw_we) rx_words <= rx_words + 1'b1;
        if (vlf_eop) begin
          plen <= '0;
          if (pkt_we) rx_packets <= rx_packets + 1'b1;
        end else begin
          plen <= plen + 1'b1;
        end
      end
      if (trg_we) rx_triggers <= rx_triggers + 1'b1;
    end
  end

endmodule
