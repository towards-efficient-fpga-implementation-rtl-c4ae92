// tb_eccp_regfile -- register file: reset to zero, writes through each port,
// same-cycle write collision (highest port wins), all read ports against a
// scoreboard, and the regs view.
module tb_eccp_regfile;
  localparam int M = 163;
  logic clk = 0, rst_n = 0;
  logic [3:0] we;
  logic [3:0][1:0] waddr, raddr;
  logic [3:0][M-1:0] wdata, rdata, regs;
  logic [3:0][M-1:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eccp_regfile #(.M(M), .NREG(4), .NRD(4), .NWR(4)) dut (
    .clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .regs);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (regs != '0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        we[p] = $urandom_range(0, 1);
        waddr[p] = 2'($urandom_range(0, 3));
        wdata[p] = rnd();
        raddr[p] = 2'($urandom_range(0, 3));
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] != model[raddr[p]]) begin failures++; $display("FAIL read t=%0d p=%0d", t, p); end
      end
      for (int p = 0; p < 4; p++) if (we[p]) model[waddr[p]] = wdata[p];
      @(posedge clk); #1;
      checks++;
      if (regs != model) begin failures++; $display("FAIL write t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
