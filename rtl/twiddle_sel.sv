// twiddle_sel: returns the twiddle factor W64^e = exp(-j*2*pi*e/64) for any
// exponent e = 0..63, built from the 16 values W64^0..W64^15 of the twiddle
// input.
//
// The radix-4 stages need W^k, W^2k and W^3k for k up to 15, i.e. exponents
// up to 45, while the twiddle input holds only the first quarter turn. The
// remaining values follow from W64^(e+16) = -j * W64^e: the low four bits of
// e select a table entry and the upper two bits rotate it by that many
// quarter turns (a swap of real and imaginary part and a negation, no
// multiplier). Table entries are expected in [-64, 64] so that negation
// cannot overflow. Purely combinational. The table layout and the rotation
// are this design's own choice; the source article fixes only the 256-bit width.
module twiddle_sel
  import fft_pkg::*;
(
  input  tw_table_t              tf,  // tf[k] = W64^k, k = 0..15
  input  logic     [EXP_W-1:0]   e,   // exponent, taken modulo 64
  output tw_t                    w    // W64^e
);

  tw_t base;

  always_comb begin
    base = tf[e[3:0]];
    unique case (e[5:4])
      2'd0: w = base;                                  // * 1
      2'd1: w = '{re:  base.im, im: -base.re};         // * -j
      2'd2: w = '{re: -base.re, im: -base.im};         // * -1
      2'd3: w = '{re: -base.im, im:  base.re};         // * +j
    endcase
  end

endmodule
