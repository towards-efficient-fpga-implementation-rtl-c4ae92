// tb_eccp_bram -- dual-port block RAM: one-cycle read latency on both ports,
// read-first behaviour, writes from either port visible to the other, port B
// winning a same-address write collision. Random traffic against a model.
module tb_eccp_bram;
  localparam int W = 163;
  logic clk = 0;
  logic a_we, b_we;
  logic [2:0] a_addr, b_addr;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] model [8];
  logic [W-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eccp_bram #(.W(W), .DEPTH(8)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      a_we = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_addr = 3'($urandom_range(0, 7));
      b_addr = (t % 5 == 0) ? a_addr : 3'($urandom_range(0, 7));
      a_wdata = rnd(); b_wdata = rnd();
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata != exp_a) begin failures++; $display("FAIL a t=%0d", t); end
      if (b_rdata != exp_b) begin failures++; $display("FAIL b t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
