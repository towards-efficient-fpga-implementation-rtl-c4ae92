// tb_gf_mul_ko -- random products of the combinational Karatsuba-Ofman
// multiplier for GF(2^163) (BASE 22 and BASE 82) and GF(2^409), against the
// reference shift-and-add multiplier; includes the all-ones operands.
module tb_gf_mul_ko;
  import tb_gf_ref_pkg::*;
  logic [162:0] a1, b1, c1, c1b;
  logic [408:0] a2, b2, c2;
  int checks = 0, failures = 0;

  gf_mul_ko #(.M(163))              dut163  (.a(a1), .b(b1), .c(c1));
  gf_mul_ko #(.M(163), .BASE(82))   dut163b (.a(a1), .b(b1), .c(c1b));
  gf_mul_ko #(.M(409))              dut409  (.a(a2), .b(b2), .c(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, y, e;
    for (int t = 0; t < 100; t++) begin
      x = frand(163); y = frand(163);
      if (t == 0) begin x = '0; x[162:0] = '1; y = x; end
      a1 = x[162:0]; b1 = y[162:0];
      a2 = frand(409); b2 = frand(409);
      #1;
      e = fmul(x, y, 163, flow163());
      checks++; if (c1 != e[162:0]) begin failures++; $display("FAIL 163 t=%0d", t); end
      checks++; if (c1b != e[162:0]) begin failures++; $display("FAIL 163/82 t=%0d", t); end
      e = fmul(a2, b2, 409, flow409());
      checks++; if (c2 != e) begin failures++; $display("FAIL 409 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
