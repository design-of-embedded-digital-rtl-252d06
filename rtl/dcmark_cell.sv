// dcmark_cell -- one DCMARK calculation cell: a micro-coded floating-point processor.
//
// Each cell owns one node of the spatial grid of a discretised differential
// equation. Its 40x256 RAM holds both the micro-program and the data; a
// control FSM repeats FETCH (2 clocks: RAM[PC] -> IR, PC+1) and EXECUTE, whose
// length is fixed per opcode (LDA/LDB/LDI 2, ST 1, STM2/STM1/STP1/STP2 2,
// ADD/SUB 8, MUL 6, JUMP 1 clocks). Because every cell runs the same code with
// fixed cycle counts, all cells of a ring stay in lock-step and need no
// handshake to exchange data.
//
// Registers: PC (8 bit), IR (40 bit), operation registers A, B and result C
// (32 bit), and the I/O registers I, M2, M1, P1, P2. LDI copies the cell's own
// status from RAM to I, which the neighbours see; M2/M1/P1/P2 sample the I
// registers of the cells two left, one left, one right and two right every
// clock, and STM2/STM1/STP1/STP2 store them to RAM. ADD/SUB/MUL issue A and B
// to the pipelined floating-point units and the 2:1 result multiplexer
// writes C; ST stores C. The RAM write data comes from a 6:1 multiplexer (C,
// M2, M1, P1, P2, configuration data) and the RAM address from the PC, the IR
// operand field or, while the cell is idle or halted, the external
// configuration/readout port.
//
// Interface and timing: while run is low the cell is idle with PC = 0 and the
// configuration port (cfg_we/cfg_addr/cfg_data) writes its RAM. Raising run
// starts execution at address 0. When hold is high at the start of a fetch the
// cell halts there (halted = 1) and rd_addr reads its RAM (rd_data one clock
// later); dropping hold resumes. iter pulses for one clock when a JUMP
// executes. The instruction word layout and the halt/readout port are choices
// of this design; opcodes and cycle counts follow the cell's instruction table.
module dcmark_cell
  import dcmark_pkg::*;
#(
  parameter int unsigned ADD_LAT = CYC_ADD - 1,   // adder latency after issue
  parameter int unsigned MUL_LAT = CYC_MUL - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  logic  hold,
  // configuration port (from the write decoder)
  input  logic  cfg_we,
  input  addr_t cfg_addr,
  input  word_t cfg_data,
  // readout port, valid while idle or halted
  input  addr_t rd_addr,
  output word_t rd_data,
  // ring links: I registers of the neighbours, and own I register
  input  fp_t   nb_m2,
  input  fp_t   nb_m1,
  input  fp_t   nb_p1,
  input  fp_t   nb_p2,
  output fp_t   i_reg,
  output logic  iter,
  output logic  halted
);

  typedef enum logic [2:0] {S_IDLE, S_F0, S_F1, S_EX, S_HALT} state_e;
  typedef enum logic [2:0] {W_C, W_M2, W_M1, W_P1, W_P2, W_CFG} wsel_e;

  state_e      state;
  addr_t       pc;
  word_t       ir;
  fp_t         reg_a, reg_b, reg_c;
  fp_t         reg_m2, reg_m1, reg_p1, reg_p2;
  logic [3:0]  cnt;

  // RAM port
  logic        ram_we;
  addr_t       ram_addr;
  word_t       ram_wdata, ram_rdata;
  wsel_e       wsel;

  // ALU
  logic        add_iv, mul_iv, add_ov, mul_ov;
  fp_t         add_y, mul_y, alu_y;

  logic [5:0]  op;
  addr_t       ir_addr;
  logic        last;   // last clock of the current execute phase

  assign op      = ir[39:34];
  assign ir_addr = ir[ADDR_W-1:0];
  assign last    = (32'(cnt) == exec_cycles(op) - 1);

  dcmark_ram #(.DATA_W(DATA_W), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  fp32_add #(.LATENCY(ADD_LAT)) u_add (
    .clk, .rst_n, .in_valid(add_iv), .sub(op == OP_SUB), .a(reg_a), .b(reg_b),
    .out_valid(add_ov), .y(add_y));

  fp32_mul #(.LATENCY(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(mul_iv), .a(reg_a), .b(reg_b),
    .out_valid(mul_ov), .y(mul_y));

  // 2:1 result multiplexer
  assign alu_y = (op == OP_MUL) ? mul_y : add_y;

  // 6:1 data multiplexer
  always_comb begin
    case (wsel)
      W_M2:    ram_wdata = {8'd0, reg_m2};
      W_M1:    ram_wdata = {8'd0, reg_m1};
      W_P1:    ram_wdata = {8'd0, reg_p1};
      W_P2:    ram_wdata = {8'd0, reg_p2};
      W_CFG:   ram_wdata = cfg_data;
      default: ram_wdata = {8'd0, reg_c};
    endcase
  end

  // address multiplexer and control decode
  always_comb begin
    ram_we   = 1'b0;
    ram_addr = rd_addr;
    wsel     = W_C;
    add_iv   = 1'b0;
    mul_iv   = 1'b0;
    case (state)
      S_IDLE: begin
        ram_we   = cfg_we;
        ram_addr = cfg_we ? cfg_addr : rd_addr;
        wsel     = W_CFG;
      end
      S_F0: ram_addr = pc;
      S_EX: begin
        ram_addr = ir_addr;
        case (op)
          OP_ST:   ram_we = 1'b1;
          OP_STM2: begin ram_we = (cnt == 4'd1); wsel = W_M2; end
          OP_STM1: begin ram_we = (cnt == 4'd1); wsel = W_M1; end
          OP_STP1: begin ram_we = (cnt == 4'd1); wsel = W_P1; end
          OP_STP2: begin ram_we = (cnt == 4'd1); wsel = W_P2; end
          OP_ADD, OP_SUB: add_iv = (cnt == 4'd0);
          OP_MUL:  mul_iv = (cnt == 4'd0);
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pc     <= '0;
      ir     <= '0;
      cnt    <= '0;
      reg_a  <= '0;
      reg_b  <= '0;
      reg_c  <= '0;
      i_reg  <= '0;
      reg_m2 <= '0;
      reg_m1 <= '0;
      reg_p1 <= '0;
      reg_p2 <= '0;
      iter   <= 1'b0;
    end else begin
      reg_m2 <= nb_m2;
      reg_m1 <= nb_m1;
      reg_p1 <= nb_p1;
      reg_p2 <= nb_p2;
      iter   <= 1'b0;
      if (!run) begin
        state <= S_IDLE;
        pc    <= '0;
      end else begin
        case (state)
          S_IDLE: state <= S_F0;
          S_HALT: if (!hold) state <= S_F0;
          S_F0:   state <= hold ? S_HALT : S_F1;
          S_F1: begin
            ir    <= ram_rdata;
            pc    <= pc + 1'b1;
            cnt   <= '0;
            state <= S_EX;
          end
          S_EX: begin
            cnt <= cnt + 1'b1;
            case (op)
              OP_LDA: if (cnt == 4'd1) reg_a <= ram_rdata[FP_W-1:0];
              OP_LDB: if (cnt == 4'd1) reg_b <= ram_rdata[FP_W-1:0];
              OP_LDI: if (cnt == 4'd1) i_reg <= ram_rdata[FP_W-1:0];
              OP_ADD, OP_SUB, OP_MUL: if (last) reg_c <= alu_y;
              OP_JUMP: begin
                pc   <= ir_addr;
                iter <= 1'b1;
              end
              default: ;
            endcase
            if (last) state <= S_F0;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign rd_data = ram_rdata;
  assign halted  = (state == S_HALT);

  // the fixed cycle counts of the table must match the unit latencies
  property p_alu_ready;
    @(posedge clk) disable iff (!rst_n)
      (state == S_EX && last && (op == OP_ADD || op == OP_SUB)) |-> add_ov;
  endproperty
  a_add_ready: assert property (p_alu_ready);
  a_mul_ready: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_EX && last && op == OP_MUL) |-> mul_ov);

endmodule
