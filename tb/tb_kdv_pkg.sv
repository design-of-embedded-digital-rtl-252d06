// tb_kdv_pkg -- reference model of one KdV integration step for the DCMARK testbenches.
//
// Repeats, in single precision with one rounding per operation, the
// arithmetic of the cell micro-program: the forward-Euler first step
//   u' = u + dt*( Ki1*[(u_{i-2}-u_{i+2}) + 2(u_{i+1}-u_{i-1})] + Ki2*(u_{i-1}^2 - u_{i+1}^2) )
// and the leap-frog step
//   u' = u_old + dt*( K1*[(u_{i-2}-u_{i+2}) + 2(u_{i+1}-u_{i-1})]
//                     + K2*[u_{i-1}^2 - u_{i+1}^2 + u_i*(u_{i-1}-u_{i+1})] ),
// evaluated in the same order as the hardware so results match bit for bit.
package tb_kdv_pkg;
  import tb_fp_pkg::*;

  localparam logic [31:0] F_KI1 = 32'h40800000;  // 4 = 1/(2 dx^3), dx = 0.5
  localparam logic [31:0] F_KI2 = 32'h40400000;  // 3 = 3/(2 dx)
  localparam logic [31:0] F_K1  = 32'h41000000;  // 8 = 1/dx^3
  localparam logic [31:0] F_K2  = 32'h40C00000;  // 6 = 3/dx
  localparam logic [31:0] F_DT  = 32'h3C23D70A;  // 0.01

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // first != 0: forward step (returns new u); else leap-frog using uold
  function automatic logic [31:0] kdv_step(bit first, logic [31:0] u, logic [31:0] uold,
                                           logic [31:0] m2, logic [31:0] m1,
                                           logic [31:0] p1, logic [31:0] p2);
    logic [31:0] r1, r2, r3, r4, r5, r6, r7, r8, t;
    r1 = fsub(m2, p2);
    r2 = fsub(p1, m1);
    r3 = fadd(r2, r2);
    r4 = fadd(r1, r3);
    r5 = fmul(first ? F_KI1 : F_K1, r4);
    r6 = fmul(m1, m1);
    r7 = fmul(p1, p1);
    r8 = fsub(r6, r7);
    if (first) begin
      t = fmul(F_KI2, r8);
      t = fadd(r5, t);
      t = fmul(F_DT, t);
      return fadd(u, t);
    end
    t = fsub(m1, p1);
    t = fmul(u, t);
    t = fadd(r8, t);
    t = fmul(F_K2, t);
    t = fadd(r5, t);
    t = fmul(F_DT, t);
    return fadd(uold, t);
  endfunction

endpackage
