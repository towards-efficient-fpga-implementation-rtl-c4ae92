// eccp_ctrl -- control unit of the ECC processor (Montgomery ladder sequencer).
//
// On start it latches the curve coefficient b, reads the scalar k and the base
// point (x, y) from the block RAM, and then runs the Montgomery ladder:
//   LOAD:  (X1,Z1) = (x,1), (X2,Z2) = (x^4 + b, x^2)
//   for i = t-1 downto 0: STEP(k_i)        (t = index of the leading 1 of k)
// on the point addition/doubling unit, one command at a time. The ladder is
// defined for a key whose top bit is 1; this unit finds the leading one of k
// and starts there, so any k > 0 is accepted (the run time then depends on the
// length of k). The conversion unit then turns the result into affine (xk, yk),
// which is written to the block RAM, and done pulses.
// err is raised, and nothing is written, when k = 0 or kP is the point at
// infinity.
//
// Timing (ND = multiplier latency): 4 cycles of RAM reads, 2 for LOAD, then
// 2*ND+2 per key bit (the point unit's 2*ND+1 plus one cycle to issue the next
// command), the conversion, and 3 cycles for the two RAM writes and done. With
// the defaults a key whose leading one is bit t takes 80 + 4t cycles.
//
// The published control unit reads the key and drives the point unit; its
// state machine, the leading-one search and the error exits are this design's own.
module eccp_ctrl
  import eccp_pkg::*;
#(
  parameter int unsigned M = gf_pkg::M163,
  localparam int unsigned IW = $clog2(M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] curve_b,
  output logic         busy,
  output logic         done,
  output logic         err,
  // block RAM port B
  output logic         ram_we,
  output logic [2:0]   ram_addr,
  output logic [M-1:0] ram_wdata,
  input  logic [M-1:0] ram_rdata,
  // point addition/doubling unit
  output logic         pd_valid,
  output pd_cmd_t      pd_cmd,
  output logic         pd_kbit,
  output logic [M-1:0] px,
  output logic [M-1:0] py,
  output logic [M-1:0] pb,
  input  logic         pd_ready,
  input  logic         pd_done,
  // conversion unit
  output logic         cv_start,
  input  logic         cv_done,
  input  logic [M-1:0] cv_xk,
  input  logic [M-1:0] cv_yk,
  input  logic         cv_inf
);
  typedef enum logic [3:0] {
    S_IDLE, S_RK, S_RX, S_RY, S_LATCH, S_LOAD, S_WLOAD, S_STEP, S_WSTEP,
    S_CONV, S_WCONV, S_WRX, S_WRY
  } state_t;
  state_t state;

  logic [M-1:0]  k_r;
  logic [IW-1:0] i_r;        // bit of k to apply next
  logic [IW-1:0] lead;       // leading one of the word read from RAM
  logic          k_zero;

  // priority encoder: position of the leading one of k
  always_comb begin
    lead   = '0;
    k_zero = (ram_rdata == '0);
    for (int j = 0; j < int'(M); j++) begin
      if (ram_rdata[j]) lead = IW'(j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k_r      <= '0;
      i_r      <= '0;
      px       <= '0;
      py       <= '0;
      pb       <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      err      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pb    <= curve_b;
          busy  <= 1'b1;
          err   <= 1'b0;
          state <= S_RK;
        end
        S_RK: state <= S_RX;                  // address of k on the RAM
        S_RX: begin                           // k arrives
          k_r   <= ram_rdata;
          i_r   <= lead;
          state <= S_RY;
          if (k_zero) err <= 1'b1;
        end
        S_RY: begin                           // x arrives
          px    <= ram_rdata;
          state <= S_LATCH;
        end
        S_LATCH: begin                        // y arrives
          py <= ram_rdata;
          if (err) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else state <= S_LOAD;
        end
        S_LOAD: if (pd_ready) state <= S_WLOAD;
        S_WLOAD: if (pd_done) state <= (i_r == '0) ? S_CONV : S_STEP;
        S_STEP: if (pd_ready) begin
          i_r   <= i_r - 1'b1;
          state <= S_WSTEP;
        end
        S_WSTEP: if (pd_done) state <= (i_r == '0) ? S_CONV : S_STEP;
        S_CONV: state <= S_WCONV;
        S_WCONV: if (cv_done) begin
          if (cv_inf) begin
            err   <= 1'b1;
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else state <= S_WRX;
        end
        S_WRX: state <= S_WRY;
        S_WRY: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ram_we    = 1'b0;
    ram_addr  = A_K;
    ram_wdata = '0;
    pd_valid  = 1'b0;
    pd_cmd    = PD_LOAD;
    pd_kbit   = 1'b0;
    cv_start  = 1'b0;
    case (state)
      S_RK:    ram_addr = A_K;
      S_RX:    ram_addr = A_PX;
      S_RY:    ram_addr = A_PY;
      S_LOAD:  pd_valid = pd_ready;
      S_STEP: begin
        pd_valid = pd_ready;
        pd_cmd   = PD_STEP;
        pd_kbit  = k_r[i_r - 1'b1];
      end
      S_CONV:  cv_start = 1'b1;
      S_WRX: begin ram_we = 1'b1; ram_addr = A_QX; ram_wdata = cv_xk; end
      S_WRY: begin ram_we = 1'b1; ram_addr = A_QY; ram_wdata = cv_yk; end
      default: ;
    endcase
  end
endmodule
