// eccp_convert -- projective to affine conversion after the Montgomery ladder.
//
// From the ladder result (X1,Z1) = kP and (X2,Z2) = (k+1)P (x-only, projective)
// and the base point (x,y) it recovers Q = kP = (xk, yk):
//     xk = X1/Z1 = X1 (x Z2) / (x Z1 Z2)
//     yk = (x + xk) [ (X1 + x Z1)(X2 + x Z2) + (x^2 + y) Z1 Z2 ] / (x Z1 Z2) + y
// so a single inversion, of x Z1 Z2, is needed. The work is a fixed sequence of
// ten multiplications on one gf_mul_ds multiplier and one Itoh-Tsujii inversion
// (gf_inv_ita), which is started as soon as x Z1 Z2 is known and runs in
// parallel with the multiplications that do not need it:
//   1 t1 = Z1*Z2      2 t2 = x*Z1      3 t3 = x*Z2      4 t4 = x*t1  -> invert
//   5 t5 = (X1+t2)(X2+t3)   6 t6 = (x^2+y) t1   7 t7 = X1*t3
//   (wait for i = t4^-1)    8 xk = t7*i   9 t8 = (x+xk)(t5+t6)   10 yk = t8*i + y
// inf is raised when Z1 = 0, i.e. kP is the point at infinity; xk and yk are
// then meaningless.
// Handshake: pulse start with the inputs valid (they must stay valid until
// done); done pulses once with xk, yk, inf valid; they hold until the next start.
//
// Follows the published single-inversion conversion formulas; the order of
// the products, the separate multiplier and the overlap with the inversion are
// this design's own choices.
module eccp_convert #(
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
  input  logic [M-1:0] X1,
  input  logic [M-1:0] Z1,
  input  logic [M-1:0] X2,
  input  logic [M-1:0] Z2,
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] xk,
  output logic [M-1:0] yk,
  output logic         inf
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_WINV} state_t;
  state_t state;

  logic [3:0]   step;                  // multiplication 1..10
  logic [M-1:0] t1, t2, t3, t4, t5, t6, t7, t8, iv;
  logic [M-1:0] ma, mb, mc, xsq;
  logic         m_start, m_done, inv_start, inv_done, have_inv;
  logic [M-1:0] inv_out;

  gf_sqr #(.M(M), .FLOW(FLOW)) u_xsq (.a(x), .q(xsq));

  // operand selection for each step of the sequence
  always_comb begin
    case (step)
      4'd1:    begin ma = Z1;       mb = Z2;        end
      4'd2:    begin ma = x;        mb = Z1;        end
      4'd3:    begin ma = x;        mb = Z2;        end
      4'd4:    begin ma = x;        mb = t1;        end
      4'd5:    begin ma = X1 ^ t2;  mb = X2 ^ t3;   end
      4'd6:    begin ma = xsq ^ y;  mb = t1;        end
      4'd7:    begin ma = X1;       mb = t3;        end
      4'd8:    begin ma = t7;       mb = iv;        end
      4'd9:    begin ma = x ^ xk;   mb = t5 ^ t6;   end
      default: begin ma = t8;       mb = iv;        end
    endcase
  end

  assign m_start = (state == S_ISSUE);

  gf_mul_ds #(.M(M), .FLOW(FLOW), .DS(DS), .MUL_KO(MUL_KO), .KO_BASE(KO_BASE)) u_mul (
    .clk, .rst_n, .start(m_start), .a(ma), .b(mb), .busy(), .done(m_done), .c(mc));

  gf_inv_ita #(.M(M), .FLOW(FLOW), .SQN(SQN), .KO_BASE(KO_BASE)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(t4), .busy(), .done(inv_done), .inv(inv_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      {t1, t2, t3, t4, t5, t6, t7, t8, iv} <= '0;
      xk <= '0;
      yk <= '0;
      inf <= 1'b0;
      busy <= 1'b0;
      done <= 1'b0;
      inv_start <= 1'b0;
      have_inv  <= 1'b0;
    end else begin
      done      <= 1'b0;
      inv_start <= 1'b0;
      if (inv_done) begin
        iv       <= inv_out;
        have_inv <= 1'b1;
      end
      case (state)
        S_IDLE: if (start) begin
          step     <= 4'd1;
          busy     <= 1'b1;
          have_inv <= 1'b0;
          inf      <= (Z1 == '0);
          state    <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (m_done) begin
          case (step)
            4'd1: t1 <= mc;
            4'd2: t2 <= mc;
            4'd3: t3 <= mc;
            4'd4: begin t4 <= mc; inv_start <= 1'b1; end
            4'd5: t5 <= mc;
            4'd6: t6 <= mc;
            4'd7: t7 <= mc;
            4'd8: xk <= mc;
            4'd9: t8 <= mc;
            default: yk <= mc ^ y;
          endcase
          if (step == 4'd10) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            step  <= step + 1'b1;
            state <= (step == 4'd7) ? S_WINV : S_ISSUE;
          end
        end
        // the last three products need the inverse
        S_WINV: if (have_inv || inv_done) state <= S_ISSUE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
