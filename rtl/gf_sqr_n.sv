// gf_sqr_n -- N-time squarer, a^(2^N), as a chain of N combinational squarers.
//
// Raising to 2^N is needed N times in a row by Itoh-Tsujii inversion. Rather
// than clocking one squarer N times, N squarers are cascaded so that up to N
// squarings happen in one clock. Every intermediate power is brought out, so a
// user can pick any count from 1 to N with a multiplexer.
//   a  : operand
//   pw : pw[j] = a^(2^j), j = 1..N (pw[0] is a itself)
//   q  : a^(2^N)
//
// The published design names an N-time squarer but gives no N; N = 4 and
// bringing out every intermediate power are this design's own choices.
module gf_sqr_n #(
  parameter int unsigned M    = gf_pkg::M163,
  parameter logic [M-1:0] FLOW = M'(gf_pkg::f_low(M)),
  parameter int unsigned N    = 4
) (
  input  logic [M-1:0]       a,
  output logic [N:0][M-1:0]  pw,
  output logic [M-1:0]       q
);
  assign pw[0] = a;

  for (genvar j = 1; j <= int'(N); j++) begin : g_sq
    gf_sqr #(.M(M), .FLOW(FLOW)) u_sq (.a(pw[j-1]), .q(pw[j]));
  end

  assign q = pw[N];
endmodule
