// ff_emulator -- FF-LYNX interface emulator: test controller plus FF-TX and
// FF-RX in loopback.
//
// Runs entirely on the fast bit clock; a divider produces the reference
// strobe ce once every SPEED clocks (40 MHz reference, SPEED x 40 Mbit/s
// link). The host loads the TX tables and configuration registers, pulses
// start, and after the test window reads back the RX tables and counters.
// The TX controller replays packets and triggers into the FF-TX; the serial
// line goes through a LINK_DELAY-bit delay (so the receiver has to find the
// word boundary itself) and can be corrupted bit by bit with link_flip, or
// made to slip by one bit with link_slip (each pulse adds or removes one
// bit of delay), which moves the word boundary seen by the receiver; the
// FF-RX output is recorded by the RX controller.
//
// Host port (synchronous, read data one clock after the address): host_sel
// picks the table -- 0 VLF_TS, 1 VLF_LEN, 2 VLF_DW, 3 TRG_TS, 4 FLF_DW
// (written by the host), 5 RX_TS, 6 RX_LEN, 7 RX_DW, 8 RX_TRG_TS, 9 RX_FLF
// (filled by the test), 10 registers (see tc_config_regs).
// events (one-clock pulses): 0 FD error, 1 CRC error, 2 header deferred by
// a trigger, 3 frame sent, 4 frame received, 5 lock, 6 unlock, 7 RX buffer
// overflow.
module ff_emulator #(
  parameter int unsigned SPEED      = 8,
  parameter int unsigned PKT_AW     = 8,
  parameter int unsigned DW_AW      = 10,
  parameter int unsigned BUF_DEPTH  = 64,
  parameter int unsigned LINK_DELAY = 5,
  localparam int unsigned FLF_W     = SPEED - 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             host_we,
  input  logic [3:0]       host_sel,
  input  logic [DW_AW-1:0] host_addr,
  input  logic [31:0]      host_wdata,
  output logic [31:0]      host_rdata,
  input  logic             link_flip,
  input  logic             link_slip,
  output logic             link_dat,
  output logic             busy,
  output logic             done,
  output logic             locked,
  output logic [7:0]       events
);

  // reference strobe
  logic [$clog2(SPEED)-1:0] div;
  logic ce;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (32'(div) == SPEED - 1) ? '0 : div + 1'b1;
  end
  assign ce = (32'(div) == SPEED - 1);

  // configuration
  logic        start, sync_en, label_on, crc_on;
  logic [31:0] window, ts;
  logic [15:0] n_vlf, n_trg, buf_limit, label, lost_words, tx_packets;
  logic [15:0] rx_packets, rx_words, rx_triggers, crc_errors, fd_errors;
  logic [31:0] reg_q;

  tc_config_regs #(.DEF_LIMIT(BUF_DEPTH)) u_regs (
    .clk, .rst_n, .we(host_we && host_sel == 4'd10), .addr(host_addr[3:0]),
    .wdata(host_wdata), .rdata(reg_q),
    .start, .sync_en, .label_on, .crc_on, .window, .n_vlf, .n_trg, .buf_limit, .label,
    .busy, .done, .locked, .lost_words, .rx_packets, .rx_triggers, .crc_errors, .fd_errors,
    .tx_packets, .rx_words);

  // TX tables
  logic [PKT_AW-1:0] vlf_addr, trg_addr;
  logic [DW_AW-1:0]  dw_addr;
  logic [31:0] vlf_ts_q, vlf_len_q, dw_q, trg_ts_q, flf_q;
  logic [31:0] hq [10];
  logic        hw [10];
  for (genvar t = 0; t < 10; t++) begin : g_hw
    assign hw[t] = host_we && host_sel == 4'(t);
  end

  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_vlf_ts (.clk,
    .we_a(1'b0), .addr_a(vlf_addr), .wdata_a('0), .rdata_a(vlf_ts_q),
    .we_b(hw[0]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[0]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_vlf_len (.clk,
    .we_a(1'b0), .addr_a(vlf_addr), .wdata_a('0), .rdata_a(vlf_len_q),
    .we_b(hw[1]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[1]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << DW_AW)) u_vlf_dw (.clk,
    .we_a(1'b0), .addr_a(dw_addr), .wdata_a('0), .rdata_a(dw_q),
    .we_b(hw[2]), .addr_b(host_addr), .wdata_b(host_wdata), .rdata_b(hq[2]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_trg_ts (.clk,
    .we_a(1'b0), .addr_a(trg_addr), .wdata_a('0), .rdata_a(trg_ts_q),
    .we_b(hw[3]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[3]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_flf (.clk,
    .we_a(1'b0), .addr_a(trg_addr), .wdata_a('0), .rdata_a(flf_q),
    .we_b(hw[4]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[4]));

  // TX controller and FF-TX
  logic             t_valid, t_get, t_trg, hdr_deferred, frame_sent;
  logic [15:0]      t_data;
  logic [FLF_W-1:0] t_flf;
  logic             tx_dat;

  tc_tx_controller #(.PKT_AW(PKT_AW), .DW_AW(DW_AW), .FLF_W(FLF_W), .BUF_MAX(256)) u_txc (
    .clk, .rst_n, .ce, .start, .window, .n_vlf, .n_trg, .buf_limit,
    .busy, .done, .ts, .lost_words, .tx_packets,
    .vlf_addr, .vlf_ts_q, .vlf_len_q, .dw_addr, .dw_q, .trg_addr, .trg_ts_q, .flf_q,
    .vlf_valid(t_valid), .vlf_data(t_data), .vlf_get_data(t_get),
    .trg(t_trg), .flf_data(t_flf));

  ffl_tx #(.SPEED(SPEED), .BUF_DEPTH(BUF_DEPTH)) u_tx (
    .clk, .rst_n, .ce, .label_on, .label, .crc_on, .sync_en,
    .vlf_valid(t_valid), .vlf_data(t_data), .vlf_get_data(t_get),
    .trg(t_trg), .flf_data(t_flf), .dat(tx_dat),
    .frame_sent, .hdr_deferred);

  // link
  logic [LINK_DELAY:0] line;
  logic                extra;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line  <= '0;
      extra <= 1'b0;
    end else begin
      line <= {line[LINK_DELAY-1:0], tx_dat ^ link_flip};
      if (link_slip) extra <= !extra;
    end
  end
  assign link_dat = extra ? line[LINK_DELAY] : line[LINK_DELAY-1];

  // FF-RX and RX controller
  logic             r_trg, r_valid, r_eop, r_get, lock_event, unlock_event, frame_rx;
  logic             crc_err, fd_err, r_ovf;
  logic [FLF_W-1:0] r_flf;
  logic [15:0]      r_data, label_rx;

  ffl_rx #(.SPEED(SPEED), .BUF_DEPTH(BUF_DEPTH)) u_rx (
    .clk, .rst_n, .ce, .din(link_dat),
    .trg(r_trg), .flf_data(r_flf), .vlf_valid(r_valid), .vlf_data(r_data), .vlf_eop(r_eop),
    .vlf_get_data(r_get), .locked, .lock_event, .unlock_event, .frame_rx,
    .crc_err, .fd_err, .label_rx, .overflow(r_ovf));

  logic              pkt_we, dw_we, trg_we;
  logic [PKT_AW-1:0] pkt_addr, rtrg_addr;
  logic [DW_AW-1:0]  rdw_addr;
  logic [31:0]       pkt_ts_d, pkt_len_d, dw_d, trg_ts_d, flf_d;
  logic [31:0]       unused_q [5];

  tc_rx_controller #(.PKT_AW(PKT_AW), .DW_AW(DW_AW), .FLF_W(FLF_W)) u_rxc (
    .clk, .rst_n, .ce, .start, .ts,
    .vlf_valid(r_valid), .vlf_data(r_data), .vlf_eop(r_eop), .vlf_get_data(r_get),
    .trg(r_trg), .flf_data(r_flf),
    .pkt_we, .pkt_addr, .pkt_ts_d, .pkt_len_d, .dw_we, .dw_addr(rdw_addr), .dw_d,
    .trg_we, .trg_addr(rtrg_addr), .trg_ts_d, .flf_d,
    .rx_packets, .rx_words, .rx_triggers);

  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_rx_ts (.clk,
    .we_a(pkt_we), .addr_a(pkt_addr), .wdata_a(pkt_ts_d), .rdata_a(unused_q[0]),
    .we_b(hw[5]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[5]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_rx_len (.clk,
    .we_a(pkt_we), .addr_a(pkt_addr), .wdata_a(pkt_len_d), .rdata_a(unused_q[1]),
    .we_b(hw[6]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[6]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << DW_AW)) u_rx_dw (.clk,
    .we_a(dw_we), .addr_a(rdw_addr), .wdata_a(dw_d), .rdata_a(unused_q[2]),
    .we_b(hw[7]), .addr_b(host_addr), .wdata_b(host_wdata), .rdata_b(hq[7]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_rx_trg (.clk,
    .we_a(trg_we), .addr_a(rtrg_addr), .wdata_a(trg_ts_d), .rdata_a(unused_q[3]),
    .we_b(hw[8]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[8]));
  tc_ram #(.WIDTH(32), .DEPTH(1 << PKT_AW)) u_rx_flf (.clk,
    .we_a(trg_we), .addr_a(rtrg_addr), .wdata_a(flf_d), .rdata_a(unused_q[4]),
    .we_b(hw[9]), .addr_b(PKT_AW'(host_addr)), .wdata_b(host_wdata), .rdata_b(hq[9]));

  assign events = {r_ovf, unlock_event, lock_event, frame_rx, frame_sent, hdr_deferred,
                   crc_err, fd_err};

  // error counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_errors <= '0; fd_errors <= '0;
    end else if (start) begin
      crc_errors <= '0; fd_errors <= '0;
    end else begin
      if (crc_err) crc_errors <= crc_errors + 1'b1;
      if (fd_err)  fd_errors  <= fd_errors + 1'b1;
    end
  end

  // host read mux (selection registered to match the RAM read latency)
  logic [3:0] sel_q;
  always_ff @(posedge clk) sel_q <= host_sel;
  always_comb begin
    if (sel_q == 4'd10)     host_rdata = reg_q;
    else if (sel_q < 4'd10) host_rdata = hq[sel_q];
    else                    host_rdata = '0;
  end

endmodule
