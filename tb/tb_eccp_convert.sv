// tb_eccp_convert -- projective to affine conversion over GF(2^163). The
// inputs are built from known multiples of the B-163 base point G: for
// (kP, (k+1)P) = (2G, 3G), (1G, 2G) and (0x1234567 G, 0x1234568 G) the affine x
// coordinates are scaled by random Z1, Z2 (X1 = x_k Z1, X2 = x_k+1 Z2) and the
// unit must return the affine (x_k, y_k) of kG. Also checks inf for Z1 = 0 and
// that the run takes the cycle count worked out below (ND = 1):
//   1 + 4 products x 2 + 1 + 54 (inversion) + 3 products x 2 = 70 cycles.
module tb_eccp_convert;
  import tb_gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M-1:0] GX  = 163'h3_F0EB_A162_86A2_D57E_A099_1168_D499_4637_E834_3E36;
  localparam logic [M-1:0] GY  = 163'h0_D51F_BC6C_71A0_094F_A2CD_D545_B11C_5C0C_7973_24F1;
  localparam logic [M-1:0] X2G = 163'h1_AEB3_3FED_9C49_E020_0A0C_561E_A66D_5AB8_5BD4_C2D4;
  localparam logic [M-1:0] Y2G = 163'h5_3060_8192_CD47_D0C2_4C20_0764_75FD_625C_C828_95E8;
  localparam logic [M-1:0] X3G = 163'h6_3400_0577_F86A_A315_009D_6F9B_9066_91F6_EDD6_91FE;
  localparam logic [M-1:0] XKG = 163'h3_308F_5D2B_6AE0_87B8_B3BB_7664_1618_BB3B_06C8_8E40;
  localparam logic [M-1:0] YKG = 163'h7_DE3E_B2F9_596C_DA08_516E_0413_4CFF_AC9D_4BCE_FC8E;

  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] X1, Z1, X2, Z2, x, y, xk, yk;
  logic busy, done, inf;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  eccp_convert #(.M(M)) dut (.clk, .rst_n, .start, .X1, .Z1, .X2, .Z2, .x, .y,
    .busy, .done, .xk, .yk, .inf);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [M-1:0] xa, input logic [M-1:0] xb,
                     input logic [M-1:0] exk, input logic [M-1:0] eyk, input logic zero_z1);
    fe_t z1, z2, p;
    int t0, took;
    z1 = frand(M); z2 = frand(M);
    if (zero_z1) z1 = '0;
    p = fmul(fe_t'(xa), z1, M, flow163()); X1 = p[M-1:0]; Z1 = z1[M-1:0];
    p = fmul(fe_t'(xb), z2, M, flow163()); X2 = p[M-1:0]; Z2 = z2[M-1:0];
    x = GX; y = GY;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done && cyc - t0 < 1000) @(negedge clk);
    took = cyc - t0;
    checks++;
    if (inf != zero_z1) begin failures++; $display("FAIL inf flag"); end
    if (!zero_z1) begin
      checks += 3;
      if (xk != exk) begin failures++; $display("FAIL xk"); end
      if (yk != eyk) begin failures++; $display("FAIL yk"); end
      // start cycle, products 1-4, 1 cycle to start the inversion, the inversion
      // (54 cycles; products 5-7 overlap it), products 8-10: 2 cycles per product
      if (took != 1 + 4*2 + 1 + 54 + 3*2) begin
        failures++; $display("FAIL cycles %0d", took);
      end
      $display("conversion took %0d cycles", took);
    end
  endtask

  initial begin
    x = '0; y = '0; X1 = '0; Z1 = '0; X2 = '0; Z2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(X2G, X3G, X2G, Y2G, 0);
    run(GX, X2G, GX, GY, 0);
    run(XKG, 163'h0, XKG, YKG, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
