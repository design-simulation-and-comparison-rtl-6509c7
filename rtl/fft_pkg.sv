// fft_pkg: sizes, number formats and shared types of the 64-point radix-4
// decimation-in-time FFT.
//
// The transform length (64), the 4-bit input samples, the 256-bit twiddle
// input and the 8-bit output points are the design's defining numbers. The
// internal precision, the twiddle number format and the output scaling are
// this design's own choices:
//   - data inside the transform: complex, 16-bit two's complement per part;
//   - twiddle factors: complex, 8-bit two's complement per part with 6
//     fraction bits (1.0 = 64); the 256 twiddle bits carry W64^0..W64^15;
//   - output point: {real, imag}, 4 bits each, equal to X(k)/64 rounded.
package fft_pkg;

  localparam int unsigned N        = 64;  // transform length
  localparam int unsigned RADIX    = 4;
  localparam int unsigned NSUB     = N / RADIX;  // length of each quarter DFT
  localparam int unsigned DW       = 4;   // input sample width
  localparam int unsigned IW       = 16;  // internal width per real/imag part
  localparam int unsigned TW_W     = 8;   // twiddle width per real/imag part
  localparam int unsigned TW_FRAC  = 6;   // twiddle fraction bits
  localparam int unsigned N_TW     = 16;  // twiddle entries carried on tf
  localparam int unsigned OW       = 4;   // output width per real/imag part
  localparam int unsigned EXP_W    = 6;   // width of a twiddle exponent (mod 64)

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } tw_t;

  // One 8-bit output point: real part in the upper nibble.
  typedef struct packed {
    logic signed [OW-1:0] re;
    logic signed [OW-1:0] im;
  } opoint_t;

  // Twiddle table as carried on the 256-bit tf input: tw_table_t[k] = W64^k.
  typedef tw_t [N_TW-1:0] tw_table_t;

endpackage
