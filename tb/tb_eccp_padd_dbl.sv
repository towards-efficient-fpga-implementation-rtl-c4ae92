// tb_eccp_padd_dbl -- point addition/doubling unit over GF(2^163), with
// bit-parallel (DS = 163) and two-digit (DS = 82) multipliers side by side.
// After LOAD and every STEP the four ladder registers are compared with a
// reference ladder computed here from the López-Dahab x-only formulas; each
// STEP must take 2*ceil(163/DS)+1 cycles from command to done. Finally ladders
// for k = 2 and k = 3 from the B-163 base point must give X1/Z1 equal to the
// known affine x of 2G and 3G.
module tb_eccp_padd_dbl;
  import tb_gf_ref_pkg::*;
  import eccp_pkg::*;
  localparam int M = 163;
  localparam logic [M-1:0] GX  = 163'h3_F0EB_A162_86A2_D57E_A099_1168_D499_4637_E834_3E36;
  localparam logic [M-1:0] X2G = 163'h1_AEB3_3FED_9C49_E020_0A0C_561E_A66D_5AB8_5BD4_C2D4;
  localparam logic [M-1:0] X3G = 163'h6_3400_0577_F86A_A315_009D_6F9B_9066_91F6_EDD6_91FE;

  logic clk = 0, rst_n = 0, cmd_valid = 0, k_bit = 0;
  pd_cmd_t cmd;
  logic [M-1:0] x, b;
  logic [1:0] ready, done;
  logic [1:0][M-1:0] X1, Z1, X2, Z2;
  fe_t rX1, rZ1, rX2, rZ2;
  int checks = 0, failures = 0, cyc = 0;
  int n_kb0 = 0, n_kb1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  eccp_padd_dbl #(.M(M), .DS(163)) d0 (.clk, .rst_n, .cmd_valid, .cmd, .k_bit, .x, .b,
    .ready(ready[0]), .done(done[0]), .X1(X1[0]), .Z1(Z1[0]), .X2(X2[0]), .Z2(Z2[0]));
  eccp_padd_dbl #(.M(M), .DS(82)) d1 (.clk, .rst_n, .cmd_valid, .cmd, .k_bit, .x, .b,
    .ready(ready[1]), .done(done[1]), .X1(X1[1]), .Z1(Z1[1]), .X2(X2[1]), .Z2(Z2[1]));

  function automatic fe_t mu(fe_t p, fe_t q); return fmul(p, q, M, flow163()); endfunction
  function automatic fe_t sq(fe_t p); return fsqr(p, M, flow163()); endfunction

  task automatic ref_add(inout fe_t xa, inout fe_t za, input fe_t xo, input fe_t zo);
    fe_t p1, p2;
    p1 = mu(xa, zo); p2 = mu(xo, za);
    za = sq(p1 ^ p2);
    xa = mu(fe_t'(x), za) ^ mu(p1, p2);
  endtask
  task automatic ref_dbl(inout fe_t xd, inout fe_t zd);
    fe_t x2, z2;
    x2 = sq(xd); z2 = sq(zd);
    zd = mu(x2, z2);
    xd = sq(x2) ^ mu(fe_t'(b), sq(z2));
  endtask

  // issue a command to both units; wait for both done; check cycle counts
  task automatic issue(input pd_cmd_t c, input logic kb);
    int t0, seen0, seen1;
    @(negedge clk);
    cmd = c; k_bit = kb; cmd_valid = 1;
    t0 = cyc;
    @(negedge clk);
    cmd_valid = 0;
    seen0 = 0; seen1 = 0;
    while ((seen0 == 0 || seen1 == 0) && cyc - t0 < 50) begin
      if (done[0] && seen0 == 0) seen0 = cyc - t0;
      if (done[1] && seen1 == 0) seen1 = cyc - t0;
      @(negedge clk);
    end
    if (c == PD_STEP) begin
      checks += 2;
      if (seen0 != 3) begin failures++; $display("FAIL DS163 step cycles %0d", seen0); end
      if (seen1 != 5) begin failures++; $display("FAIL DS82 step cycles %0d", seen1); end
      if (kb) n_kb1++; else n_kb0++;
    end else begin
      checks += 2;
      if (seen0 != 1 || seen1 != 1) begin failures++; $display("FAIL load cycles"); end
    end
  endtask

  task automatic ref_load();
    rX1 = fe_t'(x); rZ1 = fe_t'(1);
    rZ2 = sq(fe_t'(x)); rX2 = sq(rZ2) ^ fe_t'(b);
  endtask
  task automatic ref_step(input logic kb);
    if (kb) begin ref_add(rX1, rZ1, rX2, rZ2); ref_dbl(rX2, rZ2); end
    else    begin ref_add(rX2, rZ2, rX1, rZ1); ref_dbl(rX1, rZ1); end
  endtask
  task automatic compare(input string what);
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (X1[d] != rX1[M-1:0] || Z1[d] != rZ1[M-1:0] || X2[d] != rX2[M-1:0] || Z2[d] != rZ2[M-1:0]) begin
        failures++; $display("FAIL %s unit %0d", what, d);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t r;
    logic kb;
    cmd = PD_LOAD;
    b = gf_pkg::B163;
    r = frand(M); x = r[M-1:0];
    repeat (3) @(posedge clk);
    rst_n = 1;
    issue(PD_LOAD, 0); ref_load(); compare("load");
    for (int t = 0; t < 40; t++) begin
      kb = 1'($urandom_range(0, 1));
      issue(PD_STEP, kb); ref_step(kb); compare($sformatf("step %0d", t));
    end
    // k = 2 = 10b and k = 3 = 11b from the base point G of B-163
    x = GX;
    issue(PD_LOAD, 0);
    issue(PD_STEP, 0);
    for (int d = 0; d < 2; d++) begin
      r = mu(fe_t'(X1[d]), finv(fe_t'(Z1[d]), M, flow163()));
      checks++; if (r[M-1:0] != X2G) begin failures++; $display("FAIL x(2G) unit %0d", d); end
    end
    issue(PD_LOAD, 0);
    issue(PD_STEP, 1);
    for (int d = 0; d < 2; d++) begin
      r = mu(fe_t'(X1[d]), finv(fe_t'(Z1[d]), M, flow163()));
      checks++; if (r[M-1:0] != X3G) begin failures++; $display("FAIL x(3G) unit %0d", d); end
    end
    checks++;
    if (n_kb0 == 0 || n_kb1 == 0) begin failures++; $display("FAIL both key-bit values not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
