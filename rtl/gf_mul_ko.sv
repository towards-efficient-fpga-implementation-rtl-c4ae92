// gf_mul_ko -- combinational Karatsuba-Ofman GF(2^m) multiplier.
//
// c = a*b mod F(x): the 2m-1 coefficient carry-less product comes from the
// recursive Karatsuba-Ofman tree kmul_poly, which splits the operands in halves
// until they are at most BASE bits wide (163 -> 82 -> 41 -> 21 with BASE = 22,
// i.e. 27 small schoolbook products), and is then reduced by gf_reduce.
// No clock: the result is valid one combinational delay after the operands.
//
// Follows the published Karatsuba-Ofman multiplier with 22-bit base products;
// the balanced split (instead of splitting off the largest power of two) is
// this design's own choice.
module gf_mul_ko #(
  parameter int unsigned M    = gf_pkg::M163,
  parameter logic [M-1:0] FLOW = M'(gf_pkg::f_low(M)),
  parameter int unsigned BASE = 22
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  logic [2*M-2:0] prod;

  kmul_poly #(.W(M), .BASE(BASE)) u_kmul (.a(a), .b(b), .c(prod));
  gf_reduce #(.M(M), .FLOW(FLOW), .W(2*M-1)) u_red (.c(prod), .r(c));
endmodule
