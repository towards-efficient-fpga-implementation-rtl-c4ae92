// gf_inv_ita -- Itoh-Tsujii inverter for GF(2^m).
//
// a^-1 = a^(2^m - 2) = (a^(2^(m-1) - 1))^2. Writing beta_k = a^(2^k - 1), the
// addition chain built from the binary expansion of m-1 uses
//     beta_2k   = (beta_k)^(2^k) * beta_k        (k squarings, one multiply)
//     beta_k+1  = (beta_k)^2     * a             (one squaring, one multiply)
// starting from beta_1 = a. For m = 163 (m-1 = 10100010b) this is 7 doublings
// and 2 increments: 9 multiplications and 162 squarings in all, plus the final
// squaring. When ADD_K is not 0 the binary chain is run for m-1-ADD_K instead,
// beta_ADD_K is kept when the chain passes it, and one more step
//     beta_m-1  = (beta_(m-1-ADD_K))^(2^ADD_K) * beta_ADD_K
// ends the chain. ADD_K must be one of the chain's values (a leading part of
// the binary expansion of m-1-ADD_K). For m = 409 the default ADD_K = 24 gives
// the chain 1, 2, 3, 6, 12, ..., 384, 408: 10 multiplications, where the plain
// binary chain of 408 = 110011000b needs 11.
//
// The multiplications use one combinational Karatsuba-Ofman multiplier
// (gf_mul_ko), one clock each. The k-fold squarings use an N-time squarer
// (gf_sqr_n) that does up to SQN squarings per clock.
//
// Latency from start to done (for a chain of doublings k = 1, 2, ...):
//   sum over doublings of (ceil(k/SQN) + 1)  +  1 per increment
//   + (ceil(ADD_K/SQN) + 1 if ADD_K is not 0)  +  1 (final squaring) + 1.
// For m = 163, SQN = 4: 54 cycles; m = 409: 115 cycles.
// Handshake: pulse start with a valid; done pulses once with inv valid, inv
// holds until the next start. The inverse of 0 is returned as 0.
//
// Follows the published Itoh-Tsujii inverter built from a Karatsuba-Ofman
// multiplier and squarers, with the published 9 and 10 multiplications for
// m = 163 and 409. The chains themselves, SQN and the state machine are this
// design's own choices.
module gf_inv_ita #(
  parameter int unsigned M       = gf_pkg::M163,
  parameter logic [M-1:0] FLOW   = M'(gf_pkg::f_low(M)),
  parameter int unsigned SQN     = 4,
  parameter int unsigned KO_BASE = 22,
  parameter int unsigned ADD_K   = (M == 409) ? 24 : 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] inv
);
  localparam int unsigned E   = M - 1 - ADD_K;  // exponent of the binary chain
  localparam int unsigned TOP = $clog2(E + 1) - 1; // index of the leading 1 of E
  localparam int unsigned KW  = $clog2(M) + 1;
  localparam logic [63:0] EV  = 64'(E);

  typedef enum logic [2:0] {S_IDLE, S_SQR, S_MUL, S_INC, S_FIN} state_t;
  state_t state;

  logic [M-1:0]  a_r, beta, s;
  logic [M-1:0]  kept;                      // beta_ADD_K
  logic          adding;                    // in the closing ADD_K step
  logic [KW-1:0] k, rem;
  logic [5:0]    idx;                       // bit of E being applied

  logic [SQN:0][M-1:0] pw;
  logic [M-1:0]  sq_in, mul_a, mul_b, mul_c;
  logic [KW-1:0] nsq;                       // squarings done this cycle

  always_comb begin
    sq_in = (state == S_SQR) ? s : beta;
    nsq   = (rem > KW'(SQN)) ? KW'(SQN) : rem;
    if (state == S_INC) begin
      mul_a = pw[1];
      mul_b = a_r;
    end else begin
      mul_a = s;
      mul_b = adding ? kept : beta;
    end
  end

  gf_sqr_n #(.M(M), .FLOW(FLOW), .N(SQN)) u_sqn (.a(sq_in), .pw(pw), .q());
  gf_mul_ko #(.M(M), .FLOW(FLOW), .BASE(KO_BASE)) u_mul (.a(mul_a), .b(mul_b), .c(mul_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_r   <= '0;
      beta  <= '0;
      s     <= '0;
      kept  <= '0;
      adding <= 1'b0;
      k     <= '0;
      rem   <= '0;
      idx   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      inv   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          a_r  <= a;
          beta <= a;
          s    <= a;
          k    <= KW'(1);
          rem  <= KW'(1);
          busy <= 1'b1;
          adding <= 1'b0;
          if (ADD_K == 1) kept <= a;
          if (TOP == 0) state <= S_FIN;
          else begin
            idx   <= 6'(TOP - 1);
            state <= S_SQR;
          end
        end
        // s <- s^(2^nsq) until k squarings of beta are done
        S_SQR: begin
          s   <= pw[nsq];
          rem <= rem - nsq;
          if (rem == nsq) state <= S_MUL;
        end
        // beta_2k = beta_k^(2^k) * beta_k, or the closing ADD_K step
        S_MUL: begin
          beta <= mul_c;
          k    <= k << 1;
          if ((k << 1) == KW'(ADD_K)) kept <= mul_c;
          if (adding) state <= S_FIN;
          else if (EV[idx]) state <= S_INC;
          else if (idx == 6'd0) begin
            if (ADD_K != 0) begin
              adding <= 1'b1;
              s      <= mul_c;
              rem    <= KW'(ADD_K);
              state  <= S_SQR;
            end else state <= S_FIN;
          end else begin
            idx   <= idx - 1'b1;
            s     <= mul_c;
            rem   <= k << 1;
            state <= S_SQR;
          end
        end
        // beta_k+1 = beta_k^2 * a
        S_INC: begin
          beta <= mul_c;
          k    <= k + 1'b1;
          if (k + 1'b1 == KW'(ADD_K)) kept <= mul_c;
          if (idx == 6'd0) begin
            if (ADD_K != 0) begin
              adding <= 1'b1;
              s      <= mul_c;
              rem    <= KW'(ADD_K);
              state  <= S_SQR;
            end else state <= S_FIN;
          end else begin
            idx   <= idx - 1'b1;
            s     <= mul_c;
            rem   <= k + 1'b1;
            state <= S_SQR;
          end
        end
        // a^-1 = beta_(m-1)^2
        S_FIN: begin
          inv   <= pw[1];
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
