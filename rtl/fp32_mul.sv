// fp32_mul -- pipelined IEEE-754 single-precision multiplier of a DCMARK cell.
//
// Computes a * b with round-to-nearest-even: the 24x24-bit significand
// product is normalised by at most one position, rounded on its guard bit and
// the sticky OR of the bits below, and the exponents are added. The result is
// carried through a register chain so that it appears LATENCY clocks after
// in_valid (default 5: with the issue cycle a MUL takes the six cell cycles of
// the instruction table). A new operation can be accepted every clock.
// Simplifications of this design: subnormals are flushed to zero, overflow
// gives infinity, NaN/infinity inputs give a quiet NaN or infinity.
module fp32_mul #(
  parameter int unsigned LATENCY = 5      // in_valid -> out_valid, >= 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);

  function automatic logic [31:0] mul_core(logic [31:0] fa, logic [31:0] fb);
    logic        s;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st, rnd;
    logic [24:0] r;
    int          e;
    s = fa[31] ^ fb[31];
    if ((fa[30:23] == 8'hFF && fa[22:0] != 0) || (fb[30:23] == 8'hFF && fb[22:0] != 0))
      return 32'h7FC00000;
    if (fa[30:23] == 8'hFF || fb[30:23] == 8'hFF) begin
      if (fa[30:23] == 8'd0 || fb[30:23] == 8'd0) return 32'h7FC00000;  // inf * 0
      return {s, 8'hFF, 23'd0};
    end
    if (fa[30:23] == 8'd0 || fb[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, fa[22:0]} * {1'b1, fb[22:0]};
    e = int'(fa[30:23]) + int'(fb[30:23]) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    rnd = g & (st | m[0]);
    r = {1'b0, m} + {24'd0, rnd};
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), r[22:0]};
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
      pipe_y[0] <= mul_core(a, b);
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_y[i] <= pipe_y[i-1];
      end
    end
  end

  assign out_valid = pipe_v[LATENCY-1];
  assign y         = pipe_y[LATENCY-1];

endmodule
