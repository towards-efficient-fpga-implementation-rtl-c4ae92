// gf_mul_ds -- digit-serial GF(2^m) multiplier; bit-parallel when DS = M.
//
// Computes c = a*b mod F(x). The multiplier b is consumed most significant
// digit first, DS bits per clock (ND = ceil(M/DS) digits):
//     acc <- (acc * x^DS + a * b_digit) mod F
// The carry-less product a*b_digit and the reduction are combinational within
// the clock, so the multiplication takes ND cycles. DS = M gives the fully
// bit-parallel multiplier (one cycle), the configuration of the processor's
// fastest variant; smaller digits trade time for area.
//
// With MUL_KO = 1 and DS = M the one-cycle product comes from the
// Karatsuba-Ofman multiplier (gf_mul_ko) instead of the shift-and-add array;
// the handshake is unchanged (MUL_KO is ignored when DS < M).
//
// Handshake: pulse start for one cycle with a and b valid; the operands are
// captured, the first digit is processed in that same cycle, and done pulses
// ND cycles after start with c valid. c then holds until the next start. A
// start while busy restarts the multiplication.
//
// The published design uses bit-parallel (DS = M) and pipelined digit-serial
// multipliers; the most-significant-digit-first form and the handshake are this
// design's own choices, and there is no pipelining inside a digit.
module gf_mul_ds #(
  parameter int unsigned M    = gf_pkg::M163,
  parameter logic [M-1:0] FLOW = M'(gf_pkg::f_low(M)),
  parameter int unsigned DS   = M,
  parameter bit           MUL_KO  = 1'b0,
  parameter int unsigned  KO_BASE = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  localparam int unsigned ND = (M + DS - 1) / DS;   // number of digits
  localparam int unsigned BW = ND * DS;             // b padded to whole digits
  localparam int unsigned WW = M + DS;              // width before reduction
  localparam int unsigned CW = (ND > 1) ? $clog2(ND) + 1 : 1;

  logic [M-1:0]  a_r;
  logic [BW-1:0] b_r;
  logic [M-1:0]  acc;
  logic [CW-1:0] cnt;

  logic [M-1:0]  src_a, src_acc, acc_nxt;
  logic [BW-1:0] src_b;
  logic [DS-1:0] digit;
  logic [WW-1:0] wide;

  always_comb begin
    src_a   = start ? a : a_r;
    src_b   = start ? BW'(b) : b_r;
    src_acc = start ? '0 : acc;
    digit   = src_b[BW-1 -: DS];
    wide    = WW'(src_acc) << DS;
    for (int j = 0; j < int'(DS); j++) begin
      if (digit[j]) wide = wide ^ (WW'(src_a) << j);
    end
  end

  if (MUL_KO && DS == M) begin : g_ko
    // whole product in one cycle from the Karatsuba-Ofman tree
    gf_mul_ko #(.M(M), .FLOW(FLOW), .BASE(KO_BASE)) u_ko (
      .a(src_a), .b(src_b[M-1:0]), .c(acc_nxt));
  end else begin : g_ds
    gf_reduce #(.M(M), .FLOW(FLOW), .W(WW)) u_red (.c(wide), .r(acc_nxt));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r  <= '0;
      b_r  <= '0;
      acc  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        acc <= acc_nxt;
        a_r <= src_a;
        b_r <= src_b << DS;
        if (start) begin
          cnt  <= CW'(ND - 1);
          busy <= (ND > 1);
          done <= (ND == 1);
        end else begin
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign c = acc;
endmodule
