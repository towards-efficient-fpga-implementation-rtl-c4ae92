// kmul_poly -- recursive Karatsuba-Ofman carry-less polynomial multiplier.
//
// Multiplies two binary polynomials of W coefficients into one of 2W-1
// coefficients (no reduction). Above BASE coefficients the operands are split
// into a low half of H = ceil(W/2) coefficients and a high half, and
//     C = AH*BH x^(2H) + ((AH+AL)(BH+BL) + AH*BH + AL*BL) x^H + AL*BL
// so three half-size products replace four. The three products are built by
// instances of this same module, down to schoolbook multipliers of at most
// BASE coefficients. Purely combinational.
//
// The default W is one base block (a plain schoolbook multiplier); users such
// as gf_mul_ko always set W. Verilator does not elaborate a module's instances
// of itself when that module is the top of a run, so a recursive default would
// leave the sub-products of a stand-alone elaboration undriven.
module kmul_poly #(
  parameter int unsigned W    = 22,
  parameter int unsigned BASE = 22
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] c
);
  if (W <= BASE || W < 4) begin : g_school
    always_comb begin
      c = '0;
      for (int j = 0; j < int'(W); j++) begin
        if (b[j]) c = c ^ ((2*W-1)'(a) << j);
      end
    end
  end else begin : g_split
    localparam int unsigned H = (W + 1) / 2;
    localparam int unsigned CW = 2*W - 1;

    logic [H-1:0]   al, ah, bl, bh, am, bm;
    logic [2*H-2:0] p_lo, p_hi, p_mid;

    assign al = a[H-1:0];
    assign bl = b[H-1:0];
    assign ah = H'(a[W-1:H]);
    assign bh = H'(b[W-1:H]);
    assign am = al ^ ah;
    assign bm = bl ^ bh;

    kmul_poly #(.W(H), .BASE(BASE)) u_lo  (.a(al), .b(bl), .c(p_lo));
    kmul_poly #(.W(H), .BASE(BASE)) u_hi  (.a(ah), .b(bh), .c(p_hi));
    kmul_poly #(.W(H), .BASE(BASE)) u_mid (.a(am), .b(bm), .c(p_mid));

    always_comb begin
      logic [2*H-2:0] mid;
      logic [CW+2*H-1:0] t;
      mid = p_mid ^ p_lo ^ p_hi;
      t = (CW+2*H)'(p_lo) ^ ((CW+2*H)'(mid) << H) ^ ((CW+2*H)'(p_hi) << (2*H));
      c = t[CW-1:0];
    end
  end
endmodule
