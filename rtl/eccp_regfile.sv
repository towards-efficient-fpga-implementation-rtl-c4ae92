// eccp_regfile -- field-element register file of the point addition/doubling unit.
//
// NREG registers of M bits. Each of the NRD read ports is a multiplexer whose
// select is a register address (the A_sel / B_sel operand selects driven by the
// control logic); reads are combinational. Each of the NWR write ports has its
// own enable, address and data; writes take effect on the rising clock edge and,
// should two ports hit the same register, the higher-numbered port wins. The
// whole array is also brought out (regs) for the conversion step that follows
// the ladder. Registers reset to zero.
//
// The published design has a four-to-six register file with multiplexed
// operand outputs; port counts, collision rule and reset are this design's own.
module eccp_regfile #(
  parameter int unsigned M    = gf_pkg::M163,
  parameter int unsigned NREG = 4,
  parameter int unsigned NRD  = 4,
  parameter int unsigned NWR  = 4,
  localparam int unsigned AW  = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NWR-1:0]          we,
  input  logic [NWR-1:0][AW-1:0]  waddr,
  input  logic [NWR-1:0][M-1:0]   wdata,
  input  logic [NRD-1:0][AW-1:0]  raddr,
  output logic [NRD-1:0][M-1:0]   rdata,
  output logic [NREG-1:0][M-1:0]  regs
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++) begin
        if (we[p]) regs[waddr[p]] <= wdata[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) rdata[p] = regs[raddr[p]];
  end
endmodule
