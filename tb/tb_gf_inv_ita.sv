// tb_gf_inv_ita -- Itoh-Tsujii inverter over GF(2^163) (SQN = 4 and SQN = 1)
// and GF(2^409). Checks a * a^-1 = 1 with the reference multiplier, the
// inverse against a^(2^m-2), 0^-1 = 0, and the latency, which is worked out
// here from the binary addition chain of e = m-1-ADD_K:
//   1 + sum over doublings k of (ceil(k/SQN) + 1) + (#increments)
//     + (ceil(ADD_K/SQN) + 1 if ADD_K > 0) + 1.
// With the default ADD_K = 24 for m = 409 the chain has 10 multiplications
// (115 cycles); a fourth instance runs the plain binary chain for m = 409
// (ADD_K = 0, 11 multiplications, 117 cycles) and must give the same inverse.
module tb_gf_inv_ita;
  import tb_gf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [162:0] a1;
  logic [408:0] a2;
  logic [162:0] i1, i1s;
  logic [408:0] i2, i2b;
  logic [3:0] done, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  gf_inv_ita #(.M(163))          d0 (.clk, .rst_n, .start, .a(a1), .busy(busy[0]), .done(done[0]), .inv(i1));
  gf_inv_ita #(.M(163), .SQN(1)) d1 (.clk, .rst_n, .start, .a(a1), .busy(busy[1]), .done(done[1]), .inv(i1s));
  gf_inv_ita #(.M(409))          d2 (.clk, .rst_n, .start, .a(a2), .busy(busy[2]), .done(done[2]), .inv(i2));
  gf_inv_ita #(.M(409), .ADD_K(0)) d3 (.clk, .rst_n, .start, .a(a2), .busy(busy[3]), .done(done[3]), .inv(i2b));

  function automatic int lat(int m, int sqn, int addk);
    int e, top, k, n;
    e = m - 1 - addk;
    top = $clog2(e + 1) - 1;
    k = 1;
    n = 2;                               // start cycle and final squaring
    for (int i = top - 1; i >= 0; i--) begin
      n += (k + sqn - 1) / sqn + 1;
      k = 2 * k;
      if (e[i]) begin n += 1; k += 1; end
    end
    if (addk > 0) n += (addk + sqn - 1) / sqn + 1;
    return n;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, y, e;
    int t0;
    int seen [4];
    a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      x = frand(163); y = frand(409);
      if (t == 0) begin x = '0; y = '0; end
      if (t == 1) begin x = fe_t'(1); y = fe_t'(1); end
      @(negedge clk);
      a1 = x[162:0]; a2 = y[408:0]; start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      seen = '{0, 0, 0, 0};
      while (!(seen[0] && seen[1] && seen[2] && seen[3]) && cyc - t0 < 400) begin
        for (int d = 0; d < 4; d++) if (done[d] && seen[d] == 0) seen[d] = cyc - t0;
        @(negedge clk);
      end
      checks += 5;
      if (seen[0] != lat(163, 4, 0)) begin failures++; $display("FAIL lat163 %0d exp %0d", seen[0], lat(163, 4, 0)); end
      if (seen[1] != lat(163, 1, 0)) begin failures++; $display("FAIL lat163/1 %0d exp %0d", seen[1], lat(163, 1, 0)); end
      if (seen[2] != lat(409, 4, 24)) begin failures++; $display("FAIL lat409 %0d exp %0d", seen[2], lat(409, 4, 24)); end
      if (seen[3] != lat(409, 4, 0)) begin failures++; $display("FAIL lat409/0 %0d exp %0d", seen[3], lat(409, 4, 0)); end
      if (i2b != i2) begin failures++; $display("FAIL 409 chains differ t=%0d", t); end
      if (t == 0) begin
        checks += 2;
        if (i1 != '0) failures++;
        if (i2 != '0) failures++;
      end else begin
        e = fmul(x, fe_t'(i1), 163, flow163());
        checks++; if (e != fe_t'(1)) begin failures++; $display("FAIL 163 a*inv t=%0d", t); end
        checks++; if (i1s != i1) begin failures++; $display("FAIL 163 SQN1 t=%0d", t); end
        e = fmul(y, fe_t'(i2), 409, flow409());
        checks++; if (e != fe_t'(1)) begin failures++; $display("FAIL 409 a*inv t=%0d", t); end
        if (t < 4) begin
          e = finv(x, 163, flow163());
          checks++; if (e[162:0] != i1) begin failures++; $display("FAIL 163 vs pow t=%0d", t); end
        end
      end
    end
    $display("latency: m=163 SQN=4 %0d cycles, SQN=1 %0d, m=409 SQN=4 %0d (binary chain %0d)",
             lat(163, 4, 0), lat(163, 1, 0), lat(409, 4, 24), lat(409, 4, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
