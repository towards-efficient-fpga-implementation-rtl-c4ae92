// tb_eccp_ctrl -- control unit against simple models of the point unit and
// the conversion unit and a real block RAM. The point-unit model records the
// command stream; the bits of the STEP commands after LOAD must spell k below
// its leading one, in order. The conversion model returns tagged values that
// must land in RAM words 3 and 4. Also: k = 0 gives err without any command,
// an infinity result from the conversion gives err and no RAM write, and b is
// passed through to the point unit.
module tb_eccp_ctrl;
  import eccp_pkg::*;
  localparam int M = 163;
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] curve_b;
  logic busy, done, err;
  logic ram_we;
  logic [2:0] ram_addr;
  logic [M-1:0] ram_wdata, ram_rdata;
  logic pd_valid, pd_kbit, pd_ready, pd_done;
  pd_cmd_t pd_cmd;
  logic [M-1:0] px, py, pb;
  logic cv_start, cv_done, cv_inf;
  logic [M-1:0] cv_xk, cv_yk;
  logic h_we;
  logic [2:0] h_addr;
  logic [M-1:0] h_wdata, h_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eccp_bram #(.W(M), .DEPTH(8)) u_ram (.clk,
    .a_we(h_we), .a_addr(h_addr), .a_wdata(h_wdata), .a_rdata(h_rdata),
    .b_we(ram_we), .b_addr(ram_addr), .b_wdata(ram_wdata), .b_rdata(ram_rdata));

  eccp_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .curve_b, .busy, .done, .err,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .pd_valid, .pd_cmd, .pd_kbit, .px, .py, .pb, .pd_ready, .pd_done,
    .cv_start, .cv_done, .cv_xk, .cv_yk, .cv_inf);

  // point-unit model: busy for 3 cycles per command
  int pd_busy_cnt = 0;
  int n_load = 0, n_step = 0, n_conv = 0;
  logic [M-1:0] bits_seen;
  logic [M-1:0] x_at_load;
  logic model_inf = 0;
  assign pd_ready = (pd_busy_cnt == 0);
  always @(posedge clk) begin
    pd_done <= 1'b0;
    if (pd_busy_cnt > 0) begin
      pd_busy_cnt <= pd_busy_cnt - 1;
      if (pd_busy_cnt == 1) pd_done <= 1'b1;
    end else if (pd_valid) begin
      pd_busy_cnt <= 3;
      if (pd_cmd == PD_LOAD) begin n_load++; bits_seen <= '0; x_at_load <= px; end
      else begin n_step++; bits_seen <= {bits_seen[M-2:0], pd_kbit}; end
    end
  end
  // conversion model: done 5 cycles after start
  int cv_cnt = 0;
  always @(posedge clk) begin
    cv_done <= 1'b0;
    if (cv_start) begin cv_cnt <= 5; n_conv++; end
    else if (cv_cnt > 0) begin
      cv_cnt <= cv_cnt - 1;
      if (cv_cnt == 1) cv_done <= 1'b1;
    end
  end
  assign cv_xk  = px ^ M'(163'h5A5A);
  assign cv_yk  = py ^ M'(163'hA5A5);
  assign cv_inf = model_inf;

  task automatic hwrite(input logic [2:0] a, input logic [M-1:0] d);
    @(negedge clk); h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hread(input logic [2:0] a, output logic [M-1:0] d);
    @(negedge clk); h_addr = a;
    @(negedge clk); d = h_rdata;
  endtask

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  task automatic run(input logic [M-1:0] k, input logic inf_res);
    logic [M-1:0] x, y, r, expbits;
    int lead, l0, s0, c0;
    x = rnd(); y = rnd();
    model_inf = inf_res;
    hwrite(A_K, k); hwrite(A_PX, x); hwrite(A_PY, y);
    hwrite(A_QX, '0); hwrite(A_QY, '0);
    l0 = n_load; s0 = n_step; c0 = n_conv;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lead = -1;
    for (int i = 0; i < M; i++) if (k[i]) lead = i;
    if (k == '0) begin
      checks += 2;
      if (!err) begin failures++; $display("FAIL k=0 no err"); end
      if (n_load != l0 || n_step != s0 || n_conv != c0) begin failures++; $display("FAIL k=0 ran"); end
    end else begin
      expbits = '0;
      for (int i = 0; i < lead; i++) expbits[i] = k[i];
      checks += 5;
      if (n_load != l0 + 1) begin failures++; $display("FAIL loads"); end
      if (n_step != s0 + lead) begin failures++; $display("FAIL steps %0d exp %0d", n_step - s0, lead); end
      if (n_conv != c0 + 1) begin failures++; $display("FAIL conv"); end
      if (lead > 0 && bits_seen != expbits) begin failures++; $display("FAIL key bits"); end
      if (x_at_load != x || pb != curve_b) begin failures++; $display("FAIL x or b"); end
      checks += 3;
      if (err != inf_res) begin failures++; $display("FAIL err flag"); end
      hread(A_QX, r);
      if (r != (inf_res ? '0 : x ^ M'(163'h5A5A))) begin failures++; $display("FAIL xk word"); end
      hread(A_QY, r);
      if (r != (inf_res ? '0 : y ^ M'(163'hA5A5))) begin failures++; $display("FAIL yk word"); end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] k;
    h_we = 0; h_addr = '0; h_wdata = '0; pd_done = 0; cv_done = 0;
    curve_b = rnd();
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(M'(1), 0);
    run(M'(2), 0);
    run(M'(163'h1234567), 0);
    k = rnd(); k[M-1] = 1'b1;
    run(k, 0);
    k = rnd(); k[M-1:M-9] = '0;
    run(k, 0);
    run('0, 0);
    run(M'(163'hB), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
