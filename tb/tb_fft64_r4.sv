// tb_fft64_r4: end-to-end test of the 64-point radix-4 FFT at its default
// parameters.
//
// Every output is checked two ways:
//   1. bit for bit against a reference model written here: an in-place
//      iterative radix-4 DIT FFT over the whole 64-point array (digit-reversed
//      load, three passes of span 1, 4 and 16), using the same number formats
//      and rounding as the hardware but twiddles computed directly from cos
//      and sin;
//   2. against the exact DFT in real arithmetic, divided by 64 and clamped to
//      the 4-bit range: the hardware output may differ from it by the final
//      rounding (1/2) plus a small internal error, so 0.75 is allowed.
// Stimuli: impulses, constants, single tones, the alternating sequence
// (which drives X(32) into saturation), the 0..15 ramp of the source article's
// simulation, a square wave and random samples. The testbench counts how
// often outputs saturate and how often the rotated (upper three quarter)
// twiddles are needed with a nonzero operand, and fails if either never
// happened. With 4-bit inputs only the positive limit can be exceeded
// (the most negative result, -512/64, is exactly -8), so low saturation is
// counted but not required.
module tb_fft64_r4;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  sample_t   [N-1:0] a;
  tw_table_t         tf;
  opoint_t   [N-1:0] x;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_rot_tw = 0, n_vectors = 0;

  fft64_r4 dut (.a(a), .tf(tf), .x(x));

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic int sat4(longint v);
    return (v > 7) ? 7 : (v < -8) ? -8 : int'(v);
  endfunction

  // round-half-up of v/64 (arithmetic shift is a floor)
  function automatic longint rdiv64(longint v);
    return (v + 32) >>> 6;
  endfunction

  task automatic run(string name);
    longint re [N], im [N];
    longint tr, ti, br [4], bi [4];
    int     span, wr, wi, e, ok;
    real    xr, xi, c, s;
    n_vectors++;
    #1;
    // reference model: digit-reversed load (3 base-4 digits)
    for (int n = 0; n < N; n++) begin
      int p;
      p = 16 * (n % 4) + 4 * ((n / 4) % 4) + n / 16;
      re[p] = longint'(a[n]);
      im[p] = 0;
    end
    span = 1;
    for (int st = 0; st < 3; st++) begin
      for (int g0 = 0; g0 < N; g0 += 4 * span) begin
        for (int j = 0; j < span; j++) begin
          for (int r = 0; r < 4; r++) begin
            e  = (r * j * (16 / span)) % N;
            wr = rnd(64.0 * $cos(2.0 * PI * e / N));
            wi = rnd(-64.0 * $sin(2.0 * PI * e / N));
            tr = re[g0 + j + r * span];
            ti = im[g0 + j + r * span];
            if (r == 0) begin
              br[r] = tr; bi[r] = ti;
            end else begin
              if (e >= 16 && (tr != 0 || ti != 0)) n_rot_tw++;
              br[r] = rdiv64(tr * wr - ti * wi);
              bi[r] = rdiv64(tr * wi + ti * wr);
            end
          end
          re[g0 + j]            = br[0] + br[1] + br[2] + br[3];
          im[g0 + j]            = bi[0] + bi[1] + bi[2] + bi[3];
          re[g0 + j + span]     = br[0] + bi[1] - br[2] - bi[3];
          im[g0 + j + span]     = bi[0] - br[1] - bi[2] + br[3];
          re[g0 + j + 2 * span] = br[0] - br[1] + br[2] - br[3];
          im[g0 + j + 2 * span] = bi[0] - bi[1] + bi[2] - bi[3];
          re[g0 + j + 3 * span] = br[0] - bi[1] - br[2] + bi[3];
          im[g0 + j + 3 * span] = bi[0] + br[1] - bi[2] - br[3];
        end
      end
      span *= 4;
    end
    for (int k = 0; k < N; k++) begin
      int mr, mi, gr, gi;
      mr = sat4(rdiv64(re[k]));
      mi = sat4(rdiv64(im[k]));
      gr = int'(x[k].re);
      gi = int'(x[k].im);
      // bit-exact check
      checks++;
      if (gr != mr || gi != mi) begin
        failures++;
        $display("FAIL %s X(%0d) got (%0d,%0d) model (%0d,%0d)", name, k, gr, gi, mr, mi);
      end
      // check against the exact DFT
      xr = 0.0; xi = 0.0;
      for (int n = 0; n < N; n++) begin
        c = $cos(2.0 * PI * ((n * k) % N) / N);
        s = -$sin(2.0 * PI * ((n * k) % N) / N);
        xr += real'(a[n]) * c;
        xi += real'(a[n]) * s;
      end
      xr = xr / 64.0; xi = xi / 64.0;
      xr = (xr > 7.0) ? 7.0 : (xr < -8.0) ? -8.0 : xr;
      xi = (xi > 7.0) ? 7.0 : (xi < -8.0) ? -8.0 : xi;
      checks++;
      ok = (fabs(real'(gr) - xr) <= 0.75 && fabs(real'(gi) - xi) <= 0.75);
      if (!ok) begin
        failures++;
        $display("FAIL %s X(%0d) got (%0d,%0d) exact DFT/64 (%0.3f,%0.3f)", name, k, gr, gi, xr, xi);
      end
      if (re[k] >= 480 || im[k] >= 480) n_sat_hi++;
      if (re[k] < -544 || im[k] < -544) n_sat_lo++;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_TW; k++) begin
      tf[k].re = TW_W'(rnd(64.0 * $cos(2.0 * PI * k / N)));
      tf[k].im = TW_W'(rnd(-64.0 * $sin(2.0 * PI * k / N)));
    end
    // impulses of full positive and negative size
    for (int p = 0; p < N; p += 9) begin
      a = '0; a[p] = 4'sd7;  run("impulse+");
      a = '0; a[p] = -4'sd8; run("impulse-");
    end
    // constants: all energy in X(0)
    for (int v = -8; v < 8; v++) begin
      for (int n = 0; n < N; n++) a[n] = DW'(v);
      run("constant");
    end
    // alternating +7/-8: X(32) = 480, rounds to 7.5 -> saturates high
    for (int n = 0; n < N; n++) a[n] = (n % 2 == 0) ? 4'sd7 : -4'sd8;
    run("alternating");
    // alternating -8/+7: X(32) = -480 -> -7.5 -> -7 (no saturation)
    for (int n = 0; n < N; n++) a[n] = (n % 2 == 0) ? -4'sd8 : 4'sd7;
    run("alternating-");
    // single tones, rounded to 4 bits
    for (int f = 1; f < N; f += 5) begin
      for (int n = 0; n < N; n++) a[n] = DW'(rnd(7.0 * $cos(2.0 * PI * f * n / N)));
      run("cosine");
      for (int n = 0; n < N; n++) a[n] = DW'(rnd(7.0 * $sin(2.0 * PI * f * n / N)));
      run("sine");
    end
    // the ramp 0000, 0001, ..., 1111 repeated four times (256 bits)
    for (int n = 0; n < N; n++) a[n] = DW'(n % 16);
    run("ramp");
    // random samples
    for (int i = 0; i < 100; i++) begin
      for (int n = 0; n < N; n++) a[n] = DW'($urandom_range(15));
      run("random");
    end
    // square wave of period 8 (odd harmonics of X(8))
    for (int n = 0; n < N; n++) a[n] = ((n % 8) < 4) ? -4'sd8 : 4'sd7;
    run("square");

    $display("vectors=%0d saturated_high=%0d saturated_low=%0d rotated_twiddles=%0d",
             n_vectors, n_sat_hi, n_sat_lo, n_rot_tw);
    if (n_sat_hi == 0) begin failures++; $display("FAIL no positive saturation seen"); end
    if (n_rot_tw == 0) begin failures++; $display("FAIL no rotated twiddle used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
