// gf_reduce -- reduction of a binary polynomial modulo F(x) = x^m + FLOW(x).
//
// Takes a polynomial of up to W coefficients (W = 2m-1 for the product of two
// field elements) and returns its remainder of degree < m. The loop folds the
// highest coefficient down one at a time: when bit i (i >= m) is set, F(x)x^(i-m)
// is added, which clears bit i and touches only lower bits. With a constant F
// this unrolls into a fixed XOR network; for the sparse NIST polynomials it is
// the "fast reduction" of a few XOR levels. Purely combinational.
//   c : input polynomial, W bits
//   r : c mod F, M bits
//
// The published design uses shift-and-XOR reduction with the NIST polynomials;
// writing it as one generic folding loop is this design's own choice.
module gf_reduce #(
  parameter int unsigned M    = gf_pkg::M163,
  parameter logic [M-1:0] FLOW = M'(gf_pkg::f_low(M)),
  parameter int unsigned W    = 2*M-1
) (
  input  logic [W-1:0] c,
  output logic [M-1:0] r
);
  localparam int unsigned WT = (W > M) ? W : M+1;

  always_comb begin
    logic [WT-1:0] t;
    t = WT'(c);
    for (int i = WT-1; i >= int'(M); i--) begin
      if (t[i]) t[i -: M+1] = t[i -: M+1] ^ {1'b1, FLOW};
    end
    r = t[M-1:0];
  end
endmodule
