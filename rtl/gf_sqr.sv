// gf_sqr -- combinational GF(2^m) squarer.
//
// Squaring in characteristic two is linear: (sum a_i x^i)^2 = sum a_i x^(2i).
// The operand is expanded by interleaving zeros between its bits (no gates at
// all), then the upper half is folded back with gf_reduce. With the sparse
// NIST polynomials the whole squarer is a few levels of XOR gates.
//   a : operand
//   q : a^2 mod F
//
// Follows the published expand-reduce-add squarer.
module gf_sqr #(
  parameter int unsigned M    = gf_pkg::M163,
  parameter logic [M-1:0] FLOW = M'(gf_pkg::f_low(M))
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] q
);
  logic [2*M-2:0] spread;

  always_comb begin
    spread = '0;
    for (int i = 0; i < int'(M); i++) spread[2*i] = a[i];
  end

  gf_reduce #(.M(M), .FLOW(FLOW), .W(2*M-1)) u_red (.c(spread), .r(q));
endmodule
