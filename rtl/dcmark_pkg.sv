// dcmark_pkg -- shared types and constants of the DCMARK cellular processor.
//
// A DCMARK cell is a small von Neumann machine: one 40-bit x 256 RAM holds
// both its micro-code and its data. This package fixes the instruction word,
// the opcodes and their cycle counts (from the cell's instruction table), the
// RAM map used by the Korteweg-de Vries (KdV) micro-program, and contains a
// small assembler that builds that micro-program as a constant array.
//
// Instruction word (40 bits; the field layout is a choice of this design):
// [39:34] opcode, [33:8] unused (zero),
// [7:0] RAM address (operand address or jump target).
// Data words are IEEE-754 single precision in bits [31:0], bits [39:32] zero.
package dcmark_pkg;

  localparam int unsigned DATA_W = 40;   // cell data bus
  localparam int unsigned ADDR_W = 8;    // cell address bus
  localparam int unsigned FP_W   = 32;   // floating-point operand width
  localparam int unsigned RAM_DEPTH = 256;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [FP_W-1:0]   fp_t;

  typedef enum logic [5:0] {
    OP_FETCH = 6'b000000,   // fetch phase code; as an instruction: 2-cycle no-op
    OP_LDA   = 6'b000001,
    OP_LDB   = 6'b000010,
    OP_LDI   = 6'b000011,
    OP_ST    = 6'b000100,
    OP_STM2  = 6'b000101,
    OP_STM1  = 6'b000110,
    OP_STP1  = 6'b000111,
    OP_STP2  = 6'b001000,
    OP_ADD   = 6'b001001,
    OP_SUB   = 6'b001010,
    OP_MUL   = 6'b001011,
    OP_JUMP  = 6'b001100
  } opcode_e;

  // Clock cycles of each phase (fetch and execute), as tabulated for the cell.
  localparam int unsigned CYC_FETCH = 2;
  localparam int unsigned CYC_LD    = 2;
  localparam int unsigned CYC_ST    = 1;
  localparam int unsigned CYC_STN   = 2;
  localparam int unsigned CYC_ADD   = 8;
  localparam int unsigned CYC_MUL   = 6;
  localparam int unsigned CYC_JUMP  = 1;

  function automatic int unsigned exec_cycles(logic [5:0] op);
    case (op)
      OP_LDA, OP_LDB, OP_LDI:            return CYC_LD;
      OP_ST:                             return CYC_ST;
      OP_STM2, OP_STM1, OP_STP1, OP_STP2: return CYC_STN;
      OP_ADD, OP_SUB:                    return CYC_ADD;
      OP_MUL:                            return CYC_MUL;
      OP_JUMP:                           return CYC_JUMP;
      default:                           return CYC_FETCH;  // FETCH/no-op
    endcase
  endfunction

  function automatic word_t instr(opcode_e op, addr_t a);
    return {op, 26'd0, a};
  endfunction

  // ---------------------------------------------------------------- RAM map
  // Micro-code from address 0; status variables, constants and the partial
  // results of the arithmetic operations above it.
  localparam addr_t A_U     = 8'hA0;  // u_i^k     (cell status)
  localparam addr_t A_UOLD  = 8'hA1;  // u_i^(k-1)
  localparam addr_t A_UM2   = 8'hA2;  // u_(i-2)^k
  localparam addr_t A_UM1   = 8'hA3;  // u_(i-1)^k
  localparam addr_t A_UP1   = 8'hA4;  // u_(i+1)^k
  localparam addr_t A_UP2   = 8'hA5;  // u_(i+2)^k
  localparam addr_t A_KI1   = 8'hB0;  // constants, in configuration-file order
  localparam addr_t A_KI2   = 8'hB1;
  localparam addr_t A_K1    = 8'hB2;
  localparam addr_t A_K2    = 8'hB3;
  localparam addr_t A_DT    = 8'hB4;
  localparam addr_t A_ZERO  = 8'hB5;
  localparam addr_t A_R0    = 8'hC0;  // ROp1..ROp17 at A_R0+1 .. A_R0+17
  localparam int unsigned N_CONST = 6;  // Ki1, Ki2, K1, K2, Dt, ZERO

  function automatic addr_t R(int unsigned n);
    return A_R0 + addr_t'(n);
  endfunction

  // ------------------------------------------------------- KdV micro-program
  // Prologue: one forward-Euler step (eq. 15, constants Ki1/Ki2), then the
  // loop: one leap-frog step (eq. 16, constants K1/K2) closed by JUMP.
  // Each arithmetic operation is LDA x / LDB y / op / ST r.
  localparam int unsigned MC_PRO_LEN  = 5 + 14*4 + 1;  // 62
  localparam int unsigned MC_LOOP_LEN = 5 + 17*4 + 1;  // 74
  localparam int unsigned MC_LEN      = MC_PRO_LEN + MC_LOOP_LEN;  // 136
  localparam addr_t       MC_LOOP     = addr_t'(MC_PRO_LEN);

  typedef word_t mcode_t [MC_LEN];

  function automatic mcode_t kdv_mcode();
    mcode_t m;
    int unsigned p;
    p = 0;
    for (int unsigned s = 0; s < 2; s++) begin
      // exchange of status with the four neighbours
      m[p++] = instr(OP_LDI,  A_U);
      m[p++] = instr(OP_STM2, A_UM2);
      m[p++] = instr(OP_STM1, A_UM1);
      m[p++] = instr(OP_STP1, A_UP1);
      m[p++] = instr(OP_STP2, A_UP2);
      for (int unsigned k = 1; k <= (s == 0 ? 14 : 17); k++) begin
        opcode_e op;
        addr_t x, y, r;
        r = R(k);
        case (k)
          1:  begin op = OP_SUB; x = A_UM2; y = A_UP2; end
          2:  begin op = OP_SUB; x = A_UP1; y = A_UM1; end
          3:  begin op = OP_ADD; x = R(2);  y = R(2);  end
          4:  begin op = OP_ADD; x = R(1);  y = R(3);  end
          5:  begin op = OP_MUL; x = (s == 0) ? A_KI1 : A_K1; y = R(4); end
          6:  begin op = OP_MUL; x = A_UM1; y = A_UM1; end
          7:  begin op = OP_MUL; x = A_UP1; y = A_UP1; end
          8:  begin op = OP_SUB; x = R(6);  y = R(7);  end
          default: begin op = OP_ADD; x = A_ZERO; y = A_ZERO; end
        endcase
        if (s == 0) begin
          case (k)
            9:  begin op = OP_MUL; x = A_KI2; y = R(8);  end
            10: begin op = OP_ADD; x = R(5);  y = R(9);  end
            11: begin op = OP_MUL; x = A_DT;  y = R(10); end
            12: begin op = OP_ADD; x = A_U;   y = R(11); end
            13: begin op = OP_ADD; x = A_U;   y = A_ZERO; r = A_UOLD; end
            14: begin op = OP_ADD; x = R(12); y = A_ZERO; r = A_U;    end
            default: ;
          endcase
        end else begin
          case (k)
            9:  begin op = OP_SUB; x = A_UM1;  y = A_UP1; end
            10: begin op = OP_MUL; x = A_U;    y = R(9);  end
            11: begin op = OP_ADD; x = R(8);   y = R(10); end
            12: begin op = OP_MUL; x = A_K2;   y = R(11); end
            13: begin op = OP_ADD; x = R(5);   y = R(12); end
            14: begin op = OP_MUL; x = A_DT;   y = R(13); end
            15: begin op = OP_ADD; x = A_UOLD; y = R(14); end
            16: begin op = OP_ADD; x = A_U;    y = A_ZERO; r = A_UOLD; end
            17: begin op = OP_ADD; x = R(15);  y = A_ZERO; r = A_U;    end
            default: ;
          endcase
        end
        m[p++] = instr(OP_LDA, x);
        m[p++] = instr(OP_LDB, y);
        m[p++] = instr(op, '0);
        m[p++] = instr(OP_ST, r);
      end
      m[p++] = instr(OP_JUMP, MC_LOOP);
    end
    return m;
  endfunction

  // Cycles of one loop iteration (fetch + execute of the 74 loop instructions):
  // 74*2 fetch + LDI/STM*: 2+4*2 + 17*(LDA+LDB+ST = 5) + 11 add/sub*8 + 6 mul*6 + JUMP 1
  localparam int unsigned LOOP_CYCLES = MC_LOOP_LEN*CYC_FETCH + CYC_LD + 4*CYC_STN
                                      + 17*(2*CYC_LD + CYC_ST) + 11*CYC_ADD + 6*CYC_MUL + CYC_JUMP;

endpackage
