// tb_gf_ref_pkg -- reference GF(2^m) arithmetic for the testbenches.
//
// Written independently of the RTL: multiplication is the classic shift-and-add
// with interleaved reduction (one bit of b per step, reduce a*x every step),
// squaring is a multiplication, inversion is a^(2^m - 2) by square-and-multiply.
// All values are carried in MAXM-bit vectors; m and the low part of F(x) are
// arguments, so one package serves every field size.
package tb_gf_ref_pkg;
  localparam int MAXM = 409;
  typedef logic [MAXM-1:0] fe_t;

  function automatic fe_t fmul(fe_t a, fe_t b, int m, fe_t flow);
    fe_t r, t;
    logic top;
    r = '0;
    t = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) r ^= t;
      top = t[m-1];
      t = t << 1;
      t[m] = 1'b0;
      if (top) t ^= flow;
    end
    return r;
  endfunction

  function automatic fe_t fsqr(fe_t a, int m, fe_t flow);
    return fmul(a, a, m, flow);
  endfunction

  function automatic fe_t finv(fe_t a, int m, fe_t flow);
    fe_t r, s;
    r = fe_t'(1);
    s = a;
    // exponent 2^m - 2 = binary 11..10 (m-1 ones then a zero)
    for (int i = 1; i < m; i++) begin
      s = fsqr(s, m, flow);
      r = fmul(r, s, m, flow);
    end
    return r;
  endfunction

  function automatic fe_t frand(int m);
    fe_t r;
    for (int i = 0; i < MAXM; i += 32) r[i +: 32] = $urandom();
    for (int i = m; i < MAXM; i++) r[i] = 1'b0;
    return r;
  endfunction

  function automatic fe_t flow163();
    fe_t f;
    f = '0;
    f[7] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; f[0] = 1'b1;
    return f;
  endfunction

  function automatic fe_t flow409();
    fe_t f;
    f = '0;
    f[87] = 1'b1; f[0] = 1'b1;
    return f;
  endfunction
endpackage
