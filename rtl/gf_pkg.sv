// gf_pkg -- constants shared by the GF(2^m) arithmetic and the ECC processor.
//
// The processor works in a polynomial basis over GF(2^m). The two fields used
// are m = 163 with F(x) = x^163 + x^7 + x^6 + x^3 + 1 (the NIST B-163/K-163
// pentanomial) and m = 409 with F(x) = x^409 + x^87 + 1 (the NIST trinomial).
// A reduction polynomial is carried around as its low part FLOW = F(x) - x^m,
// an m-bit vector, because every module takes m as a parameter.
// f_low(m) returns that low part for the supported m (163, 409 and a small
// m = 17 field, x^17 + x^3 + 1, that is handy for short unit tests).
// B163 is the b coefficient of NIST curve B-163 (a = 1), the curve used to
// demonstrate the design; any other b can be fed to the processor at run time.
package gf_pkg;

  localparam int unsigned MAXM = 409;

  localparam int unsigned M163 = 163;
  localparam int unsigned M409 = 409;

  function automatic logic [MAXM-1:0] f_low(int unsigned m);
    logic [MAXM-1:0] f;
    f = '0;
    case (m)
      163: begin f[7] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; f[0] = 1'b1; end
      409: begin f[87] = 1'b1; f[0] = 1'b1; end
      17:  begin f[3] = 1'b1; f[0] = 1'b1; end
      default: f[0] = 1'b1;
    endcase
    return f;
  endfunction

  localparam logic [162:0] B163 = 163'h2_0A60_1907_B8C9_53CA_1481_EB10_512F_7874_4A32_05FD;

endpackage
