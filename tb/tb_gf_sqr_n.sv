// tb_gf_sqr_n -- checks every tap a^(2^j), j = 0..N, of the N-time squarer
// (N = 4 and N = 7) against repeated reference squaring.
module tb_gf_sqr_n;
  import tb_gf_ref_pkg::*;
  localparam int M = 163;
  logic [M-1:0] a;
  logic [4:0][M-1:0] pw4;
  logic [7:0][M-1:0] pw7;
  logic [M-1:0] q4, q7;
  int checks = 0, failures = 0;

  gf_sqr_n #(.M(M), .N(4)) dut4 (.a, .pw(pw4), .q(q4));
  gf_sqr_n #(.M(M), .N(7)) dut7 (.a, .pw(pw7), .q(q7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, e;
    for (int t = 0; t < 50; t++) begin
      x = frand(M); a = x[M-1:0];
      #1;
      e = x;
      for (int j = 0; j <= 7; j++) begin
        if (j <= 4) begin checks++; if (pw4[j] != e[M-1:0]) begin failures++; $display("FAIL N4 j=%0d", j); end end
        checks++; if (pw7[j] != e[M-1:0]) begin failures++; $display("FAIL N7 j=%0d", j); end
        if (j == 4) begin checks++; if (q4 != e[M-1:0]) failures++; end
        if (j == 7) begin checks++; if (q7 != e[M-1:0]) failures++; end
        e = fsqr(e, M, flow163());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
