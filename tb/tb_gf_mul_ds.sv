// tb_gf_mul_ds -- digit-serial multiplier at DS = 163 (bit-parallel, 1 cycle),
// DS = 42 (4 digits) and DS = 82 (2 digits) over GF(2^163). Random products are
// compared with the reference multiplier and the start-to-done latency must be
// ceil(163/DS) cycles; c must hold after done. A fourth instance uses the
// Karatsuba-Ofman product (MUL_KO = 1, DS = 163) and must also take 1 cycle.
module tb_gf_mul_ds;
  import tb_gf_ref_pkg::*;
  localparam int M = 163;
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] a, b;
  logic [3:0] busy, done;
  logic [3:0][M-1:0] c;
  int checks = 0, failures = 0;
  int cyc = 0;
  localparam int LAT [4] = '{1, 4, 2, 1};

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  gf_mul_ds #(.M(M), .DS(163)) d0 (.clk, .rst_n, .start, .a, .b, .busy(busy[0]), .done(done[0]), .c(c[0]));
  gf_mul_ds #(.M(M), .DS(42))  d1 (.clk, .rst_n, .start, .a, .b, .busy(busy[1]), .done(done[1]), .c(c[1]));
  gf_mul_ds #(.M(M), .DS(82))  d2 (.clk, .rst_n, .start, .a, .b, .busy(busy[2]), .done(done[2]), .c(c[2]));
  gf_mul_ds #(.M(M), .DS(163), .MUL_KO(1'b1)) d3 (.clk, .rst_n, .start, .a, .b, .busy(busy[3]), .done(done[3]), .c(c[3]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t x, y, e;
    int t0;
    int seen [4];
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      x = frand(M); y = frand(M);
      if (t == 0) begin x = '0; x[0] = 1'b1; end
      @(negedge clk);
      a = x[M-1:0]; b = y[M-1:0]; start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0; a = '0; b = '0;
      seen = '{0, 0, 0, 0};
      for (int k = 1; k <= 5; k++) begin
        for (int d = 0; d < 4; d++) if (done[d]) seen[d] = cyc - t0;
        @(negedge clk);
      end
      e = fmul(x, y, M, flow163());
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (c[d] != e[M-1:0]) begin failures++; $display("FAIL value d=%0d t=%0d", d, t); end
        checks++;
        if (seen[d] != LAT[d]) begin failures++; $display("FAIL latency d=%0d got %0d", d, seen[d]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
