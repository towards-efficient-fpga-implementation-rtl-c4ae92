// tb_gf_reduce -- feeds gf_reduce the unreduced carry-less product of two
// random elements and compares with a reference multiplier that reduces as it
// goes; also checks x^163 -> x^7 + x^6 + x^3 + 1 and the top term x^324.
module tb_gf_reduce;
  import tb_gf_ref_pkg::*;
  localparam int M = 163;
  logic [2*M-2:0] c;
  logic [M-1:0] r;
  int checks = 0, failures = 0;

  gf_reduce #(.M(M)) dut (.c, .r);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t a, b, e;
    c = '0; c[M] = 1'b1; #1;
    checks++;
    if (r != M'(flow163())) begin failures++; $display("FAIL x^163 -> %h", r); end
    c = '0; c[2*M-2] = 1'b1; #1;
    checks++;
    // x^324 = (x^162)^2
    e = '0; e[162] = 1'b1; e = fsqr(e, M, flow163());
    if (r != e[M-1:0]) begin failures++; $display("FAIL x^324"); end
    for (int t = 0; t < 200; t++) begin
      a = frand(M); b = frand(M);
      c = '0;
      for (int i = 0; i < M; i++) if (b[i]) c ^= (2*M-1)'(a[M-1:0]) << i;
      #1;
      e = fmul(a, b, M, flow163());
      checks++;
      if (r != e[M-1:0]) begin failures++; $display("FAIL t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
