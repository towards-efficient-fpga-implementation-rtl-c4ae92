// gf_add -- GF(2^m) adder.
//
// Addition of two field elements in a polynomial basis is the coefficient-wise
// sum modulo 2, i.e. m XOR gates and no carry chain. Purely combinational.
//   a, b : operands, bit i is the coefficient of x^i
//   c    : a + b
//
// Follows the published design (m XOR gates).
module gf_add #(
  parameter int unsigned M = gf_pkg::M163
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  always_comb c = a ^ b;
endmodule
