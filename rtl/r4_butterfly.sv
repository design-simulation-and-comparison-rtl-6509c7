// r4_butterfly: radix-4 decimation-in-time butterfly.
//
// Inputs 1..3 are first multiplied by their twiddle factors (input 0 never
// carries one in a DIT stage), giving a, b, c, d. The four outputs are the
// 4-point DFT of those values:
//   y0 = a +  b + c +  d
//   y1 = a - jb - c + jd
//   y2 = a -  b + c -  d
//   y3 = a + jb - c - jd
// which is the sign pattern of the radix-4 butterfly figure. The source article's
// figure draws the twiddles on the outputs (decimation-in-frequency form);
// this block puts them on the inputs as the DIT equation
// X(k) = F0 + W^k F1 + W^2k F2 + W^3k F3 requires. Multiplication by +-j is a
// swap and negation. Sums are exact at the internal width; only the twiddle
// products are rounded (see cmul). Purely combinational.
module r4_butterfly
  import fft_pkg::*;
(
  input  cplx_t x [RADIX],  // x(j), x(k), x(l), x(m)
  input  tw_t   w1,         // twiddle of x[1]
  input  tw_t   w2,         // twiddle of x[2]
  input  tw_t   w3,         // twiddle of x[3]
  output cplx_t y [RADIX]
);

  cplx_t a, b, c, d;

  assign a = x[0];
  cmul u_mul1 (.a(x[1]), .w(w1), .p(b));
  cmul u_mul2 (.a(x[2]), .w(w2), .p(c));
  cmul u_mul3 (.a(x[3]), .w(w3), .p(d));

  always_comb begin
    y[0].re = a.re + b.re + c.re + d.re;
    y[0].im = a.im + b.im + c.im + d.im;
    // -j*b = b.im - j*b.re ; +j*d = -d.im + j*d.re
    y[1].re = a.re + b.im - c.re - d.im;
    y[1].im = a.im - b.re - c.im + d.re;
    y[2].re = a.re - b.re + c.re - d.re;
    y[2].im = a.im - b.im + c.im - d.im;
    y[3].re = a.re - b.im - c.re + d.im;
    y[3].im = a.im + b.re - c.im - d.re;
  end

endmodule
