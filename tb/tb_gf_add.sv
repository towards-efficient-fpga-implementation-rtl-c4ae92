// tb_gf_add -- checks the GF(2^163) adder against a bit-by-bit mod-2 sum and
// the field laws a + a = 0, a + 0 = a.
module tb_gf_add;
  localparam int M = 163;
  logic [M-1:0] a, b, c;
  int checks = 0, failures = 0;

  gf_add #(.M(M)) dut (.a, .b, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] exp_c;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < M; i += 32) begin a[i +: 32] = $urandom(); b[i +: 32] = $urandom(); end
      if (t == 1) b = a;
      if (t == 2) b = '0;
      #1;
      for (int i = 0; i < M; i++) exp_c[i] = (int'(a[i]) + int'(b[i])) % 2 == 1;
      checks++;
      if (c !== exp_c) begin failures++; $display("FAIL t=%0d", t); end
      if (t == 1) begin checks++; if (c != '0) failures++; end
      if (t == 2) begin checks++; if (c != a) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
