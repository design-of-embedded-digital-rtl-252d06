// tc_config_regs -- host-visible configuration and status registers of the
// emulator test controller.
//
// Write registers (word address): 0 control (bit0 start, a one-clock pulse
// that is not stored; bit1 sync_en; bit2 label_on; bit3 crc_on), 1 test
// window in reference periods, 2 number of VLF packets, 3 number of
// triggers, 4 TX buffer size limit in words, 5 frame label. All of them read
// back at the same address. Read-only status: 8 {locked, done, busy},
// 9 words lost on TX buffer overflow, 10 received packets, 11 received
// triggers, 12 CRC errors, 13 FD errors, 14 packets sent, 15 words
// received. Reads are registered (one clock).
module tc_config_regs #(
  parameter int unsigned DEF_LIMIT = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // configuration
  output logic        start,
  output logic        sync_en,
  output logic        label_on,
  output logic        crc_on,
  output logic [31:0] window,
  output logic [15:0] n_vlf,
  output logic [15:0] n_trg,
  output logic [15:0] buf_limit,
  output logic [15:0] label,
  // status
  input  logic        busy,
  input  logic        done,
  input  logic        locked,
  input  logic [15:0] lost_words,
  input  logic [15:0] rx_packets,
  input  logic [15:0] rx_triggers,
  input  logic [15:0] crc_errors,
  input  logic [15:0] fd_errors,
  input  logic [15:0] tx_packets,
  input  logic [15:0] rx_words
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      sync_en   <= 1'b1;
      label_on  <= 1'b0;
      crc_on    <= 1'b1;
      window    <= 32'd1000;
      n_vlf     <= '0;
      n_trg     <= '0;
      buf_limit <= 16'(DEF_LIMIT);
      label     <= '0;
    end else begin
      start <= 1'b0;
      if (we) begin
        case (addr)
          4'd0: begin start <= wdata[0]; sync_en <= wdata[1]; label_on <= wdata[2]; crc_on <= wdata[3]; end
          4'd1: window    <= wdata;
          4'd2: n_vlf     <= wdata[15:0];
          4'd3: n_trg     <= wdata[15:0];
          4'd4: buf_limit <= wdata[15:0];
          4'd5: label     <= wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    case (addr)
      4'd0:  rdata <= {28'd0, crc_on, label_on, sync_en, 1'b0};
      4'd1:  rdata <= window;
      4'd2:  rdata <= {16'd0, n_vlf};
      4'd3:  rdata <= {16'd0, n_trg};
      4'd4:  rdata <= {16'd0, buf_limit};
      4'd5:  rdata <= {16'd0, label};
      4'd8:  rdata <= {29'd0, locked, done, busy};
      4'd9:  rdata <= {16'd0, lost_words};
      4'd10: rdata <= {16'd0, rx_packets};
      4'd11: rdata <= {16'd0, rx_triggers};
      4'd12: rdata <= {16'd0, crc_errors};
      4'd13: rdata <= {16'd0, fd_errors};
      4'd14: rdata <= {16'd0, tx_packets};
      4'd15: rdata <= {16'd0, rx_words};
      default: rdata <= '0;
    endcase
  end

endmodule
