// eccp_padd_dbl -- point addition/doubling unit of the Montgomery ladder.
//
// Holds the ladder state (X1,Z1,X2,Z2) in a four-register file and performs
// one ladder step, i.e. a López-Dahab x-only addition and doubling,
//     Add:    Za = (X1 Z2 + X2 Z1)^2          Xa = x Za + (X1 Z2)(X2 Z1)
//     Double: Zd = Xd^2 Zd^2                  Xd = Xd^4 + b Zd^4
// where for key bit k_i = 1 the sum goes to (X1,Z1) and the double to (X2,Z2),
// and the other way round for k_i = 0. The six multiplications run on three
// field multipliers (gf_mul_ds) in two stages:
//   stage 1: M1 = Xa*Zd, M2 = Xd*Za, M3 = Xd^2 * Zd^2
//            write Za <- (M1+M2)^2, Zd <- M3
//   stage 2: M1 = x * (M1+M2)^2, M2 = M1*M2, M3 = b * Zd_old^4
//            write Xa <- M1+M2, Xd <- Xd^4 + M3
// (M1,M2 are the two cross products in either order, which both uses of them
// tolerate.) Stage 2's operands come straight from the stage-1 multiplier
// outputs through the adder and a squarer -- the forward paths -- so the short
// lived products X1Z2 and X2Z1 never pass through the register file, the
// register file needs only four registers, and stage 2 starts in the cycle
// stage 1 finishes. Zd can be overwritten at the end of stage 1 because stage 2
// captures b*Zd_old^4 in that same cycle.
//
// Operand multiplexers: a_sel/b_sel are the register addresses of the addition
// target and the doubling target, chosen by k_i; d_sel picks the multipliers'
// operands from the register file (stage 1) or from the forward paths (stage 2);
// e_sel picks the input of the squarer pair: the base point (LOAD), Xd
// (stage 1, stage 2) or the adder output (end of stage 1, for Za).
//
// Interface: cmd_valid/cmd/k_bit are accepted when ready is high. LOAD takes
// one cycle, STEP takes 2*ND+1 cycles (ND = ceil(M/DS), the multiplier
// latency; 3 cycles with the bit-parallel multipliers). MUL_KO = 1 (with
// DS = M) makes the multipliers Karatsuba-Ofman ones; the timing is the same.
// done pulses in the
// cycle after the last register write, together with ready.
//
// Follows the published parallel Montgomery ladder (three multipliers, two
// stages) and its forward paths; how the two stages divide the six products
// and the exact multiplexer wiring are this design's own reading.
module eccp_padd_dbl
  import eccp_pkg::*;
#(
  parameter int unsigned M    = gf_pkg::M163,
  parameter logic [M-1:0] FLOW = M'(gf_pkg::f_low(M)),
  parameter int unsigned DS   = M,
  parameter bit MUL_KO = 1'b0,
  parameter int unsigned KO_BASE = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  pd_cmd_t      cmd,
  input  logic         k_bit,
  input  logic [M-1:0] x,          // affine x of the base point
  input  logic [M-1:0] b,          // curve coefficient b
  output logic         ready,
  output logic         done,
  output logic [M-1:0] X1,
  output logic [M-1:0] Z1,
  output logic [M-1:0] X2,
  output logic [M-1:0] Z2
);
  typedef enum logic [1:0] {S_IDLE, S_ST1, S_ST2} state_t;
  typedef enum logic [1:0] {E_BASE, E_XD, E_SUM} esel_t;
  state_t state;

  logic kb_r, kb;
  logic [1:0] a_sel, b_sel;          // Xa/Za and Xd/Zd register pairs

  // register file
  logic [3:0]          rf_we;
  logic [3:0][1:0]     rf_waddr;
  logic [3:0][M-1:0]   rf_wdata;
  logic [3:0][1:0]     rf_raddr;
  logic [3:0][M-1:0]   rf_rdata;
  logic [3:0][M-1:0]   rf_regs;
  logic [M-1:0] r_xa, r_za, r_xd, r_zd;

  // functional units
  logic         mul_start, d_sel;
  esel_t        e_sel;
  logic [M-1:0] m1a, m1b, m2a, m2b, m3a, m3b, m1c, m2c, m3c;
  logic         m1_done;
  logic [M-1:0] sum12, sqe_in, sqe1, sqe2, sqz1, sqz2, sum_d;

  assign kb    = (state == S_IDLE) ? k_bit : kb_r;
  assign a_sel = kb ? R_X1 : R_X2;   // pair receiving the sum
  assign b_sel = kb ? R_X2 : R_X1;   // pair being doubled

  assign rf_raddr[0] = a_sel;          // Xa
  assign rf_raddr[1] = a_sel | 2'd1;   // Za
  assign rf_raddr[2] = b_sel;          // Xd
  assign rf_raddr[3] = b_sel | 2'd1;   // Zd
  assign r_xa = rf_rdata[0];
  assign r_za = rf_rdata[1];
  assign r_xd = rf_rdata[2];
  assign r_zd = rf_rdata[3];

  eccp_regfile #(.M(M), .NREG(4), .NRD(4), .NWR(4)) u_rf (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(rf_raddr), .rdata(rf_rdata), .regs(rf_regs)
  );

  // adders and squarers
  gf_add #(.M(M)) u_add12 (.a(m1c), .b(m2c), .c(sum12));
  gf_add #(.M(M)) u_addd  (.a(sqe2), .b((state == S_IDLE) ? b : m3c), .c(sum_d));

  always_comb begin
    case (e_sel)
      E_BASE:  sqe_in = x;
      E_SUM:   sqe_in = sum12;
      default: sqe_in = r_xd;
    endcase
  end
  gf_sqr #(.M(M), .FLOW(FLOW)) u_sqe1 (.a(sqe_in), .q(sqe1));
  gf_sqr #(.M(M), .FLOW(FLOW)) u_sqe2 (.a(sqe1),   .q(sqe2));
  gf_sqr #(.M(M), .FLOW(FLOW)) u_sqz1 (.a(r_zd),   .q(sqz1));
  gf_sqr #(.M(M), .FLOW(FLOW)) u_sqz2 (.a(sqz1),   .q(sqz2));

  // control of the datapath
  always_comb begin
    mul_start = 1'b0;
    d_sel     = 1'b0;
    e_sel     = E_XD;
    rf_we     = '0;
    rf_waddr  = '{default: '0};
    rf_wdata  = '{default: '0};
    case (state)
      S_IDLE: if (cmd_valid) begin
        if (cmd == PD_LOAD) begin
          e_sel = E_BASE;
          rf_we = 4'b1111;
          rf_waddr[0] = R_X1;  rf_wdata[0] = x;
          rf_waddr[1] = R_Z1;  rf_wdata[1] = M'(1);
          rf_waddr[2] = R_X2;  rf_wdata[2] = sum_d;   // x^4 + b
          rf_waddr[3] = R_Z2;  rf_wdata[3] = sqe1;    // x^2
        end else begin
          mul_start = 1'b1;                            // stage 1 from registers
        end
      end
      S_ST1: if (m1_done) begin
        e_sel = E_SUM;
        rf_we = 4'b0011;
        rf_waddr[0] = a_sel | 2'd1;  rf_wdata[0] = sqe1;   // Za = (M1+M2)^2
        rf_waddr[1] = b_sel | 2'd1;  rf_wdata[1] = m3c;    // Zd = Xd^2 Zd^2
        mul_start = 1'b1;                                  // stage 2, forwarded
        d_sel     = 1'b1;
      end
      S_ST2: if (m1_done) begin
        rf_we = 4'b0011;
        rf_waddr[0] = a_sel;  rf_wdata[0] = sum12;         // Xa = x Za + M1 M2
        rf_waddr[1] = b_sel;  rf_wdata[1] = sum_d;         // Xd = Xd^4 + b Zd^4
      end
      default: ;
    endcase
  end

  // multiplier operand multiplexers (D_sel)
  always_comb begin
    if (!d_sel) begin
      m1a = r_xa;  m1b = r_zd;
      m2a = r_xd;  m2b = r_za;
      m3a = sqe1;  m3b = sqz1;          // Xd^2 * Zd^2
    end else begin
      m1a = x;     m1b = sqe1;          // x * (M1+M2)^2
      m2a = m1c;   m2b = m2c;           // M1 * M2
      m3a = b;     m3b = sqz2;          // b * Zd^4
    end
  end

  gf_mul_ds #(.M(M), .FLOW(FLOW), .DS(DS), .MUL_KO(MUL_KO), .KO_BASE(KO_BASE)) u_m1 (
    .clk, .rst_n, .start(mul_start), .a(m1a), .b(m1b), .busy(), .done(m1_done), .c(m1c));
  gf_mul_ds #(.M(M), .FLOW(FLOW), .DS(DS), .MUL_KO(MUL_KO), .KO_BASE(KO_BASE)) u_m2 (
    .clk, .rst_n, .start(mul_start), .a(m2a), .b(m2b), .busy(), .done(), .c(m2c));
  gf_mul_ds #(.M(M), .FLOW(FLOW), .DS(DS), .MUL_KO(MUL_KO), .KO_BASE(KO_BASE)) u_m3 (
    .clk, .rst_n, .start(mul_start), .a(m3a), .b(m3b), .busy(), .done(), .c(m3c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      kb_r  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (cmd_valid) begin
          kb_r <= k_bit;
          if (cmd == PD_LOAD) done <= 1'b1;
          else state <= S_ST1;
        end
        S_ST1: if (m1_done) state <= S_ST2;
        S_ST2: if (m1_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE);
  assign X1 = rf_regs[R_X1];
  assign Z1 = rf_regs[R_Z1];
  assign X2 = rf_regs[R_X2];
  assign Z2 = rf_regs[R_Z2];

  a_cmd_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> ready)
    else $error("eccp_padd_dbl: command issued while busy");
endmodule
