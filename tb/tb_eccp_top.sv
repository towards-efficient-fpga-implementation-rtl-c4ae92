// tb_eccp_top -- end-to-end test of the processor at its default parameters
// (GF(2^163), bit-parallel multipliers) on NIST curve B-163.
//
// For each scalar the host writes k, Gx, Gy into the block RAM, pulses start,
// waits for done and reads Q = kG back. Expected points were computed with an
// independent affine double-and-add model of B-163; every returned point is
// also checked to satisfy y^2 + xy = x^3 + x^2 + b. The run time must be
// 80 + 4*t cycles for a key whose leading one is bit t (RAM reads and LOAD,
// 4 cycles per ladder step, 70-cycle conversion, RAM writes).
// k = 0 and k = n (the group order, so kG = infinity) must raise err.
// The mechanisms of the design are counted and each must occur: LOAD,
// ladder steps with k_i = 0 and k_i = 1, stage-2 starts on forwarded operands,
// inversions, keys shorter than m bits (leading-zero skip), and both error
// exits.
module tb_eccp_top;
  import tb_gf_ref_pkg::*;
  import eccp_pkg::*;
  localparam int M = 163;
  localparam logic [M-1:0] GX = 163'h3_F0EB_A162_86A2_D57E_A099_1168_D499_4637_E834_3E36;
  localparam logic [M-1:0] GY = 163'h0_D51F_BC6C_71A0_094F_A2CD_D545_B11C_5C0C_7973_24F1;
  localparam logic [M-1:0] N  = 163'h4_0000_0000_0000_0000_0002_92FE_77E7_0C12_A423_4C33;
  localparam int NV = 7;
  localparam logic [M-1:0] KV [NV] = '{
    163'h1, 163'h2, 163'h3, 163'h1234567,
    163'h4_c386_bbc4_cd61_3e30_d8f1_6adf_91b7_584a_2265_b1f5,
    163'h7_7311_d8a3_c2ce_6f44_7ed4_d57b_1e2f_eb89_414c_343c,
    163'h0_1807_2e8c_35bf_992d_c9e9_c616_612e_7696_a6ce_cc1b};
  localparam logic [M-1:0] QX [NV] = '{
    163'h3_f0eb_a162_86a2_d57e_a099_1168_d499_4637_e834_3e36,
    163'h1_aeb3_3fed_9c49_e020_0a0c_561e_a66d_5ab8_5bd4_c2d4,
    163'h6_3400_0577_f86a_a315_009d_6f9b_9066_91f6_edd6_91fe,
    163'h3_308f_5d2b_6ae0_87b8_b3bb_7664_1618_bb3b_06c8_8e40,
    163'h3_9e72_1021_8057_f1d3_75da_ea79_e48c_2929_6bd1_c209,
    163'h6_516c_5f8d_99ac_0cc9_e83f_88ea_128a_ebe6_1038_80dd,
    163'h4_6fad_9b0a_d3ab_20c0_65d6_942f_3bad_c586_eb06_e5c6};
  localparam logic [M-1:0] QY [NV] = '{
    163'h0_d51f_bc6c_71a0_094f_a2cd_d545_b11c_5c0c_7973_24f1,
    163'h5_3060_8192_cd47_d0c2_4c20_0764_75fd_625c_c828_95e8,
    163'h4_01a3_de0d_6c2e_c014_e6fb_a565_3587_bd45_dc22_30be,
    163'h7_de3e_b2f9_596c_da08_516e_0413_4cff_ac9d_4bce_fc8e,
    163'h7_e00a_7abd_0887_eb61_3539_1239_172c_e63a_a0f4_b925,
    163'h7_7143_84d7_fb28_bc06_b549_c0dd_8c3f_fe8d_6dc3_8e0b,
    163'h3_07d8_382e_5024_79df_522b_47f8_127e_f693_7af8_bb41};

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, err;
  logic host_we;
  logic [2:0] host_addr;
  logic [M-1:0] host_wdata, host_rdata;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  eccp_top dut (.clk, .rst_n, .start, .curve_b(gf_pkg::B163), .busy, .done, .err,
    .host_we, .host_addr, .host_wdata, .host_rdata);

  // mechanism counters
  int n_load = 0, n_kb0 = 0, n_kb1 = 0, n_fwd = 0, n_inv = 0, n_short = 0;
  int n_err_zero = 0, n_err_inf = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pd_valid && dut.pd_cmd == PD_LOAD) n_load++;
    if (dut.pd_valid && dut.pd_cmd == PD_STEP && dut.pd_kbit) n_kb1++;
    if (dut.pd_valid && dut.pd_cmd == PD_STEP && !dut.pd_kbit) n_kb0++;
    if (dut.u_pd.mul_start && dut.u_pd.d_sel) n_fwd++;
    if (dut.u_cv.inv_start) n_inv++;
  end

  task automatic hwrite(input logic [2:0] a, input logic [M-1:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic hread(input logic [2:0] a, output logic [M-1:0] d);
    @(negedge clk); host_addr = a;
    @(negedge clk); d = host_rdata;
  endtask

  task automatic pm(input logic [M-1:0] k, output logic [M-1:0] qx, output logic [M-1:0] qy,
                    output int took);
    int t0;
    hwrite(A_K, k); hwrite(A_PX, GX); hwrite(A_PY, GY);
    hwrite(A_QX, '0); hwrite(A_QY, '0);
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done && cyc - t0 < 5000) @(negedge clk);
    took = cyc - t0;
    hread(A_QX, qx); hread(A_QY, qy);
  endtask

  function automatic logic on_curve(logic [M-1:0] x, logic [M-1:0] y);
    fe_t f, xx, lhs, rhs;
    f = flow163();
    xx = fmul(fe_t'(x), fe_t'(x), M, f);
    lhs = fmul(fe_t'(y), fe_t'(y), M, f) ^ fmul(fe_t'(x), fe_t'(y), M, f);
    rhs = fmul(xx, fe_t'(x), M, f) ^ xx ^ fe_t'(gf_pkg::B163);
    return lhs == rhs;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] qx, qy;
    int took, lead;
    host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      pm(KV[v], qx, qy, took);
      lead = 0;
      for (int i = 0; i < M; i++) if (KV[v][i]) lead = i;
      if (lead < M - 1) n_short++;
      checks += 4;
      if (err) begin failures++; $display("FAIL v=%0d err", v); end
      if (qx != QX[v] || qy != QY[v]) begin failures++; $display("FAIL v=%0d point", v); end
      if (!on_curve(qx, qy)) begin failures++; $display("FAIL v=%0d not on curve", v); end
      if (took != 80 + 4 * lead) begin failures++; $display("FAIL v=%0d cycles %0d exp %0d", v, took, 80 + 4*lead); end
      $display("k #%0d: %0d key bits, %0d cycles", v, lead + 1, took);
    end
    pm('0, qx, qy, took);
    checks += 2;
    if (err) n_err_zero++; else begin failures++; $display("FAIL k=0 no err"); end
    if (qx != '0 || qy != '0) begin failures++; $display("FAIL k=0 wrote result"); end
    pm(N, qx, qy, took);
    checks++;
    if (err) n_err_inf++; else begin failures++; $display("FAIL k=n no err"); end
    $display("mechanisms: load=%0d step(k=0)=%0d step(k=1)=%0d forwarded=%0d inversions=%0d short_keys=%0d err_zero=%0d err_inf=%0d",
             n_load, n_kb0, n_kb1, n_fwd, n_inv, n_short, n_err_zero, n_err_inf);
    checks += 8;
    if (n_load == 0) failures++;
    if (n_kb0 == 0) failures++;
    if (n_kb1 == 0) failures++;
    if (n_fwd == 0 || n_fwd != n_kb0 + n_kb1) begin failures++; $display("FAIL forwarding count"); end
    if (n_inv == 0) failures++;
    if (n_short == 0) failures++;
    if (n_err_zero == 0) failures++;
    if (n_err_inf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
