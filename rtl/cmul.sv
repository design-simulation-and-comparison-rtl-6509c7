// cmul: complex multiplication of a data value by a twiddle factor.
//
// p = round(a * w / 2^TW_FRAC), computed with four real multipliers and two
// adders: (ar + j ai)(wr + j wi) = (ar wr - ai wi) + j (ar wi + ai wr). Each
// part is rounded half up (add 2^(TW_FRAC-1), arithmetic shift right) and cut
// back to the data width; with |w| <= 1 the result never needs more bits
// than the input had plus one, which the internal width leaves room for.
// Purely combinational. The source article names the twiddle product; the number
// format and rounding are this design's own choice.
module cmul
  import fft_pkg::*;
#(
  parameter int unsigned FRAC = TW_FRAC  // fraction bits of the twiddle
) (
  input  cplx_t a,
  input  tw_t   w,
  output cplx_t p
);

  localparam int unsigned PW = IW + TW_W + 1;  // full product-sum width

  logic signed [PW-1:0] ar, ai, wr, wi;
  logic signed [PW-1:0] pre, pim;

  always_comb begin
    ar  = PW'(a.re);  // sign-extend all operands to the product width
    ai  = PW'(a.im);
    wr  = PW'(w.re);
    wi  = PW'(w.im);
    pre = ar * wr - ai * wi;
    pim = ar * wi + ai * wr;
    p.re = IW'((pre + PW'(1 <<< (FRAC - 1))) >>> FRAC);
    p.im = IW'((pim + PW'(1 <<< (FRAC - 1))) >>> FRAC);
  end

endmodule
