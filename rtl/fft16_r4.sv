// fft16_r4: 16-point radix-4 decimation-in-time DFT, the quarter-length DFT
// from which the 64-point transform is built.
//
// Inputs and outputs are in natural order. Writing the input index as
// n = 4*n1 + n0, the first stage takes the four samples x(n0), x(n0+4),
// x(n0+8), x(n0+12) into one butterfly with unit twiddles (this is the
// digit reversal of a DIT flow, done by wiring). The second stage takes, for
// each q = 0..3, output q of every first-stage butterfly g into one
// butterfly with twiddles W16^(g*q) = W64^(4*g*q) and delivers
// X(q), X(q+4), X(q+8), X(q+12). Two stages of four butterflies each, purely
// combinational; the twiddles come from the shared 16-entry twiddle input.
module fft16_r4
  import fft_pkg::*;
(
  input  cplx_t     x [NSUB],  // samples in natural order
  input  tw_table_t tf,        // tf[k] = W64^k, k = 0..15
  output cplx_t     y [NSUB]   // DFT in natural order
);

  cplx_t s [NSUB];  // first-stage outputs: s[4*g+q] = G_g(q)

  for (genvar g = 0; g < RADIX; g++) begin : g_stage_a
    cplx_t bi [RADIX];
    cplx_t bo [RADIX];
    tw_t   w0;
    twiddle_sel u_w0 (.tf(tf), .e(EXP_W'(0)), .w(w0));
    for (genvar i = 0; i < RADIX; i++) begin : g_io
      assign bi[i]         = x[RADIX*i + g];
      assign s[RADIX*g + i] = bo[i];
    end
    r4_butterfly u_bf (.x(bi), .w1(w0), .w2(w0), .w3(w0), .y(bo));
  end

  for (genvar q = 0; q < RADIX; q++) begin : g_stage_b
    cplx_t bi [RADIX];
    cplx_t bo [RADIX];
    tw_t   w [RADIX];
    for (genvar g = 1; g < RADIX; g++) begin : g_tw
      // W16^(g*q) taken from the 64-point table as W64^(4*g*q)
      twiddle_sel u_w (.tf(tf), .e(EXP_W'(4 * g * q)), .w(w[g]));
    end
    assign w[0] = '0;  // input 0 of a DIT butterfly carries no twiddle
    for (genvar i = 0; i < RADIX; i++) begin : g_io
      assign bi[i]          = s[RADIX*i + q];
      assign y[q + RADIX*i] = bo[i];
    end
    r4_butterfly u_bf (.x(bi), .w1(w[1]), .w2(w[2]), .w3(w[3]), .y(bo));
  end

endmodule
