// fft64_r4: 64-point radix-4 decimation-in-time FFT with 4-bit inputs and
// 8-bit outputs (256 input bits, 256 twiddle bits, 512 output bits).
//
// The input is split into the four decimated sequences x(4n), x(4n+1),
// x(4n+2), x(4n+3), n = 0..15. Each goes through a 16-point DFT (fft16_r4,
// two radix-4 stages), and a third radix-4 stage combines the four results:
//   X(k + 16q) = sum_r (-j)^(r*q) * W64^(r*k) * F_r(k),  k = 0..15, q = 0..3
// i.e. sixteen butterflies whose inputs 1..3 carry W^k, W^2k, W^3k. All
// three stages have 16 butterflies each.
//
// Interface: a[n] is sample x(n), two's complement. tf[k] is W64^k for
// k = 0..15, 8-bit real and imaginary parts with 6 fraction bits; the other
// twiddles are derived from it. x[k] is output point X(k) in natural order,
// {real, imag} with 4 bits each, equal to X(k)/2^OUT_SHIFT rounded half up
// and saturated to -8..7 (default: X(k)/64, the mean over the 64 samples).
//
// Timing: purely combinational, no clock and no state; the outputs follow
// the inputs after the logic delay of three butterfly stages. The port widths,
// the transform structure and the combinational form follow the source article; the
// number formats, twiddle layout, internal width (16 bits per part) and the
// output scaling are this design's own choices.
module fft64_r4
  import fft_pkg::*;
#(
  parameter int unsigned OUT_SHIFT = 6  // output = X(k) / 2^OUT_SHIFT
) (
  input  sample_t   [N-1:0] a,   // 256 bits: a[n] = x(n)
  input  tw_table_t         tf,  // 256 bits: tf[k] = W64^k
  output opoint_t   [N-1:0] x    // 512 bits: x[k] = X(k) scaled
);

  localparam logic signed [IW-1:0] OMAX = IW'((1 <<< (OW - 1)) - 1);
  localparam logic signed [IW-1:0] OMIN = -IW'(1 <<< (OW - 1));

  cplx_t sub_in  [RADIX][NSUB];  // sub_in[r][n]  = x(4n + r)
  cplx_t sub_out [RADIX][NSUB];  // sub_out[r][k] = F_r(k)
  cplx_t xf      [N];            // full-precision X(k)

  // Four quarter-length DFTs
  for (genvar r = 0; r < RADIX; r++) begin : g_sub
    for (genvar n = 0; n < NSUB; n++) begin : g_in
      assign sub_in[r][n] = '{re: IW'(a[RADIX*n + r]), im: '0};
    end
    fft16_r4 u_fft16 (.x(sub_in[r]), .tf(tf), .y(sub_out[r]));
  end

  // Combining stage: butterfly k takes F_0(k)..F_3(k)
  for (genvar k = 0; k < NSUB; k++) begin : g_comb
    cplx_t bi [RADIX];
    cplx_t bo [RADIX];
    tw_t   w  [RADIX];
    assign w[0] = '0;  // input 0 of a DIT butterfly carries no twiddle
    for (genvar r = 1; r < RADIX; r++) begin : g_tw
      twiddle_sel u_w (.tf(tf), .e(EXP_W'(r * k)), .w(w[r]));
    end
    for (genvar r = 0; r < RADIX; r++) begin : g_io
      assign bi[r]         = sub_out[r][k];
      assign xf[k + NSUB*r] = bo[r];
    end
    r4_butterfly u_bf (.x(bi), .w1(w[1]), .w2(w[2]), .w3(w[3]), .y(bo));
  end

  // Output scaling, rounding and saturation to OW bits per part
  function automatic logic signed [OW-1:0] scale_sat(logic signed [IW-1:0] v);
    logic signed [IW:0] t;
    t = ((IW+1)'(v) + (IW+1)'(1 <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (t > (IW+1)'(OMAX))      return OMAX[OW-1:0];
    else if (t < (IW+1)'(OMIN)) return OMIN[OW-1:0];
    else                        return t[OW-1:0];
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_out
    assign x[k] = '{re: scale_sat(xf[k].re), im: scale_sat(xf[k].im)};
  end

endmodule
