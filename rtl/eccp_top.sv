// eccp_top -- elliptic curve crypto-processor: Q = kP on a binary curve
// y^2 + xy = x^3 + a x^2 + b over GF(2^m), Montgomery ladder, López-Dahab
// x-only projective coordinates.
//
// Structure: a block RAM (eccp_bram) holds the scalar k, the base point (x, y)
// and the result; a control unit (eccp_ctrl) reads them and sequences the
// ladder on the point addition/doubling unit (eccp_padd_dbl: four-register
// register file, three field multipliers, squarers, adders and forward paths),
// and finally starts the projective-to-affine conversion (eccp_convert: one
// multiplier and an Itoh-Tsujii inverter) and writes (xk, yk) back.
//
// Use: write k, x, y through the host port to words 0, 1, 2 (eccp_pkg::A_*),
// drive curve_b, pulse start; busy is high until done pulses; then read xk and
// yk from words 3 and 4. err = 1 with done means k = 0 or kP = infinity, and
// the result words are not written. The curve's a does not enter the ladder.
//
// Parameters: M and FLOW choose the field (GF(2^163) by default), DS the digit
// size of the multipliers (DS = M: bit-parallel, one cycle per product),
// MUL_KO = 1 (with DS = M) Karatsuba-Ofman multipliers instead, SQN
// the squarings per cycle of the inverter, KO_BASE the size at which its
// Karatsuba-Ofman recursion stops. With the defaults a key whose leading one
// is bit t takes 80 + 4t cycles from start to done: 728 for a 163-bit key.
//
// The three-part structure (control unit, block RAM, point unit) and the
// parallel Montgomery ladder follow the published architecture; the host
// interface and the separate conversion unit are this design's own.
module eccp_top
  import eccp_pkg::*;
#(
  parameter int unsigned M       = gf_pkg::M163,
  parameter logic [M-1:0] FLOW   = M'(gf_pkg::f_low(M)),
  parameter int unsigned DS      = M,
  parameter bit MUL_KO = 1'b0,
  parameter int unsigned SQN     = 4,
  parameter int unsigned KO_BASE = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] curve_b,
  output logic         busy,
  output logic         done,
  output logic         err,
  input  logic         host_we,
  input  logic [2:0]   host_addr,
  input  logic [M-1:0] host_wdata,
  output logic [M-1:0] host_rdata
);
  logic         ram_we;
  logic [2:0]   ram_addr;
  logic [M-1:0] ram_wdata, ram_rdata;

  logic         pd_valid, pd_kbit, pd_ready, pd_done;
  pd_cmd_t      pd_cmd;
  logic [M-1:0] px, py, pb, X1, Z1, X2, Z2;

  logic         cv_start, cv_done, cv_inf;
  logic [M-1:0] cv_xk, cv_yk;

  eccp_bram #(.W(M), .DEPTH(BRAM_DEPTH)) u_bram (
    .clk,
    .a_we(host_we), .a_addr(host_addr), .a_wdata(host_wdata), .a_rdata(host_rdata),
    .b_we(ram_we),  .b_addr(ram_addr),  .b_wdata(ram_wdata),  .b_rdata(ram_rdata)
  );

  eccp_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .curve_b, .busy, .done, .err,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .pd_valid, .pd_cmd, .pd_kbit, .px, .py, .pb, .pd_ready, .pd_done,
    .cv_start, .cv_done, .cv_xk, .cv_yk, .cv_inf
  );

  eccp_padd_dbl #(.M(M), .FLOW(FLOW), .DS(DS), .MUL_KO(MUL_KO), .KO_BASE(KO_BASE)) u_pd (
    .clk, .rst_n, .cmd_valid(pd_valid), .cmd(pd_cmd), .k_bit(pd_kbit),
    .x(px), .b(pb), .ready(pd_ready), .done(pd_done),
    .X1, .Z1, .X2, .Z2
  );

  eccp_convert #(.M(M), .FLOW(FLOW), .DS(DS), .MUL_KO(MUL_KO), .SQN(SQN), .KO_BASE(KO_BASE)) u_cv (
    .clk, .rst_n, .start(cv_start), .X1, .Z1, .X2, .Z2, .x(px), .y(py),
    .busy(), .done(cv_done), .xk(cv_xk), .yk(cv_yk), .inf(cv_inf)
  );
endmodule
