// eccp_bram -- true dual-port block RAM of the processor.
//
// DEPTH words of W bits (one field element or the scalar per word). Port A is
// the host's, port B the control unit's. Both ports are synchronous: a read
// returns the addressed word in the cycle after the address (read-first: a
// write and a read of the same port in one cycle return the old word). When
// both ports write the same word in one cycle, port B wins. The contents are
// not reset, as in an FPGA block RAM; they are zero after configuration.
//
// The published design keeps k and the base point in block RAM; the word
// map, the second port and the collision rule are this design's own.
module eccp_bram #(
  parameter int unsigned W     = gf_pkg::M163,
  parameter int unsigned DEPTH = eccp_pkg::BRAM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
