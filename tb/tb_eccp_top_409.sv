// tb_eccp_top_409 -- the processor over GF(2^409), F(x) = x^409 + x^87 + 1,
// in the two digit-serial configurations DS = 52 and DS = 26, run side by side.
//
// The curve is y^2 + xy = x^3 + x^2 + b with a b chosen at random and a point P
// found on it by solving the quadratic for y; the expected multiples were
// computed with an independent affine double-and-add model. Checks: 3P and kP
// for a full 409-bit k, each result on the curve, and the cycle count
//   10 + C + (2 ND + 2) t,   C = 1 + 4(ND+1) + 1 + 115 + 3(ND+1)
// (ND = ceil(409/DS) cycles per product, t = leading one of k, 115 cycles of
// Itoh-Tsujii inversion for m = 409).
module tb_eccp_top_409;
  import tb_gf_ref_pkg::*;
  import eccp_pkg::*;
  localparam int M = 409;
  localparam logic [M-1:0] CB = 409'h1ec4127dfc0bc0c6ee743b219aa00a2a25a470a6b4d2b8fe92d5b4f8c93ec4a266c18ab7aa9fabe8c20ecc08440c0c1d36f32eb;
  localparam logic [M-1:0] PX = 409'h118b63925d511834379c4f138b89f9f30e5c51560b4f56a863464471774658f8614676b32e083f7b2a83670cbac32f2fcf8e228;
  localparam logic [M-1:0] PY = 409'h0da05591c1a5ee1858a62c85d250355aef4758d7bd20902739141ac3b164b93626cf35e31a72425cbe6fd4f3fe375b84dd16c98;
  localparam logic [M-1:0] KV [2] = '{409'h3,
    409'h13dd8be97fd4f11944c28bec04e20f92dbb54550adf8dd8782021b3eba309f7f3ba790f8fdb4ce82e8149ee216a58f39510906f};
  localparam logic [M-1:0] QX [2] = '{
    409'h1d77f3cad7c85a7d047a898138e13ec7fafb8c1c503601f6d345f036a7ca0a419b4ae1290fecf519be7c5b76824f45823ea1164,
    409'h1db5a3768d0f1b99f4d932d83614f4b6e4f6ca2763019c5f49273a5742a85d3a53ab0672d0217e3139588d69ea4fbcacfcd2b22};
  localparam logic [M-1:0] QY [2] = '{
    409'h1d8e7de52d46ecd1d8c62e009b0775bc998a8cbe96bf5cc17011ddba2fc4bd955d52e8ecba43e5a6a350d83384f2a49be563cd9,
    409'h1bb9041bb7fb6cb26c635fee340d05421302da67b77b9d2b32276a54cd1f3ae660884d6d4f66520ac7ecad7e1d242a0bbf4a2d5};
  localparam int DSV [2] = '{52, 26};

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] busy, done, err;
  logic host_we;
  logic [2:0] host_addr;
  logic [M-1:0] host_wdata;
  logic [1:0][M-1:0] host_rdata;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  eccp_top #(.M(M), .DS(52)) dut52 (.clk, .rst_n, .start, .curve_b(CB), .busy(busy[0]), .done(done[0]),
    .err(err[0]), .host_we, .host_addr, .host_wdata, .host_rdata(host_rdata[0]));
  eccp_top #(.M(M), .DS(26)) dut26 (.clk, .rst_n, .start, .curve_b(CB), .busy(busy[1]), .done(done[1]),
    .err(err[1]), .host_we, .host_addr, .host_wdata, .host_rdata(host_rdata[1]));

  function automatic int expected(int ds, int t);
    int nd, c;
    nd = (M + ds - 1) / ds;
    c = 1 + 4 * (nd + 1) + 1 + 115 + 3 * (nd + 1);
    return 10 + c + (2 * nd + 2) * t;
  endfunction

  function automatic logic on_curve(logic [M-1:0] x, logic [M-1:0] y);
    fe_t f, xx, lhs, rhs;
    f = flow409();
    xx = fmul(fe_t'(x), fe_t'(x), M, f);
    lhs = fmul(fe_t'(y), fe_t'(y), M, f) ^ fmul(fe_t'(x), fe_t'(y), M, f);
    rhs = fmul(xx, fe_t'(x), M, f) ^ xx ^ fe_t'(CB);
    return lhs == rhs;
  endfunction

  task automatic hwrite(input logic [2:0] a, input logic [M-1:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lead;
    int took [2];
    logic [1:0][M-1:0] qx, qy;
    host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (!on_curve(PX, PY)) begin failures++; $display("FAIL base point not on curve"); end
    for (int v = 0; v < 2; v++) begin
      hwrite(A_K, KV[v]); hwrite(A_PX, PX); hwrite(A_PY, PY);
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      took = '{0, 0};
      while ((took[0] == 0 || took[1] == 0) && cyc - t0 < 50000) begin
        for (int d = 0; d < 2; d++) if (done[d] && took[d] == 0) took[d] = cyc - t0;
        @(negedge clk);
      end
      @(negedge clk); host_addr = A_QX;
      @(negedge clk); qx = host_rdata; host_addr = A_QY;
      @(negedge clk); qy = host_rdata;
      lead = 0;
      for (int i = 0; i < M; i++) if (KV[v][i]) lead = i;
      for (int d = 0; d < 2; d++) begin
        checks += 4;
        if (err[d]) begin failures++; $display("FAIL err DS=%0d", DSV[d]); end
        if (qx[d] != QX[v] || qy[d] != QY[v]) begin failures++; $display("FAIL point v=%0d DS=%0d", v, DSV[d]); end
        if (!on_curve(qx[d], qy[d])) begin failures++; $display("FAIL not on curve v=%0d DS=%0d", v, DSV[d]); end
        if (took[d] != expected(DSV[d], lead)) begin
          failures++; $display("FAIL cycles DS=%0d: %0d exp %0d", DSV[d], took[d], expected(DSV[d], lead));
        end
        $display("m=409 DS=%0d: %0d key bits in %0d cycles", DSV[d], lead + 1, took[d]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
