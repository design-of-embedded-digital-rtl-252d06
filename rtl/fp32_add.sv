// fp32_add -- pipelined IEEE-754 single-precision adder/subtractor of a DCMARK cell.
//
// Computes a + b (sub = 0) or a - b (sub = 1) with round-to-nearest-even.
// The arithmetic is done in one combinational stage (swap so |x| >= |y|,
// align y with guard/round/sticky bits, add or subtract the significands,
// normalise, round) and the result is then carried through a register chain
// so that it appears LATENCY clocks after in_valid; the pipeline accepts a new
// operation every clock. With the default LATENCY = 7 an ADD or SUB takes the
// eight cell cycles of the instruction table (issue cycle + 7).
// Simplifications of this design: subnormal inputs and results are flushed to
// zero, an infinite or NaN input gives a quiet NaN / infinity without the
// finer IEEE distinctions, overflow gives infinity.
module fp32_add #(
  parameter int unsigned LATENCY = 7      // in_valid -> out_valid, >= 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        sub,      // 1: a - b
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);

  function automatic logic [31:0] add_core(logic [31:0] fa, logic [31:0] fb_in, logic s);
    logic [31:0] fb, x, z;
    logic        sx, sz;
    logic [7:0]  ex, ez, d;
    logic [26:0] mx, mz, mzs;          // 1.23 significand + guard, round, sticky
    logic [27:0] sum;
    logic [26:0] m;
    int          e;
    int          lz;
    logic [24:0] r;
    logic        rnd;
    fb = {fb_in[31] ^ s, fb_in[30:0]};
    // flush subnormals to signed zero
    if (fa[30:23] == 8'd0) fa = {fa[31], 31'd0};
    if (fb[30:23] == 8'd0) fb = {fb[31], 31'd0};
    if (fa[30:23] == 8'hFF || fb[30:23] == 8'hFF) begin
      if (fa[30:23] == 8'hFF && fa[22:0] != 0) return 32'h7FC00000;
      if (fb[30:23] == 8'hFF && fb[22:0] != 0) return 32'h7FC00000;
      if (fa[30:23] == 8'hFF && fb[30:23] == 8'hFF && fa[31] != fb[31]) return 32'h7FC00000;
      return (fa[30:23] == 8'hFF) ? fa : fb;
    end
    if (fa[30:0] >= fb[30:0]) begin x = fa; z = fb; end
    else                      begin x = fb; z = fa; end
    sx = x[31]; sz = z[31];
    ex = x[30:23]; ez = z[30:23];
    if (ex == 8'd0) return (sx & sz) ? 32'h80000000 : 32'h00000000;  // both zero
    mx = {1'b1, x[22:0], 3'b000};
    mz = (ez == 8'd0) ? 27'd0 : {1'b1, z[22:0], 3'b000};
    d  = ex - ez;
    if (ez == 8'd0)      mzs = 27'd0;
    else if (d >= 8'd27) mzs = 27'd1;   // only the sticky bit survives
    else begin
      mzs = mz >> d;
      mzs[0] = mzs[0] | ((mz & ((27'd1 << d) - 27'd1)) != 0);
    end
    e = int'(ex);
    if (sx == sz) begin
      sum = {1'b0, mx} + {1'b0, mzs};
      if (sum[27]) begin
        m = sum[27:1];
        m[0] = m[0] | sum[0];
        e = e + 1;
      end else m = sum[26:0];
    end else begin
      m = mx - mzs;
      if (m == 27'd0) return 32'h00000000;   // exact cancellation gives +0
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (m[i]) break;
        lz++;
      end
      m = m << lz;
      e = e - lz;
    end
    // round to nearest even: lsb m[3], guard m[2], round/sticky m[1:0]
    rnd = m[2] & (m[1] | m[0] | m[3]);
    r = {1'b0, m[26:3]} + {24'd0, rnd};
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sx, 8'hFF, 23'd0};
    if (e <= 0)   return {sx, 31'd0};
    return {sx, 8'(e), r[22:0]};
  endfunction

  logic [31:0] pipe_y [LATENCY];
  logic        pipe_v [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        pipe_v[i] <= 1'b0;
        pipe_y[i] <= '0;
      end
    end else begin
      pipe_v[0] <= in_valid;
      pipe_y[0] <= add_core(a, b, sub);
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_y[i] <= pipe_y[i-1];
      end
    end
  end

  assign out_valid = pipe_v[LATENCY-1];
  assign y         = pipe_y[LATENCY-1];

endmodule
