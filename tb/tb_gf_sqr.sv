// tb_gf_sqr -- compares the GF(2^163) and GF(2^409) squarers with a*a from the
// reference shift-and-add multiplier.
module tb_gf_sqr;
  import tb_gf_ref_pkg::*;
  logic [162:0] a1, q1;
  logic [408:0] a2, q2;
  int checks = 0, failures = 0;

  gf_sqr #(.M(163)) dut163 (.a(a1), .q(q1));
  gf_sqr #(.M(409)) dut409 (.a(a2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, e;
    for (int t = 0; t < 100; t++) begin
      x = frand(163); a1 = x[162:0];
      a2 = frand(409);
      #1;
      e = fsqr(x, 163, flow163());
      checks++; if (q1 != e[162:0]) begin failures++; $display("FAIL 163 t=%0d", t); end
      e = fsqr(a2, 409, flow409());
      checks++; if (q2 != e) begin failures++; $display("FAIL 409 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
