// tb_fft64_ramp: runs the design's reference workload, one 64-point
// transform of the 256-bit ramp 0000, 0001, ..., 1111 repeated four times
// (samples 0..7, -8..-1 in two's complement), with the standard twiddle
// table W64^k = round(64*exp(-j*2*pi*k/64)), k = 0..15. Prints all 64
// output points and checks each against the exact DFT divided by 64 (within
// 0.75, the final rounding plus internal error). The ramp repeats every 16
// samples, so every X(k) with k not a multiple of 4 must be exactly zero,
// and X(0) = 4 * (0+1+...+7-8-...-1) / 64 = -0.5 rounds up to zero.
module tb_fft64_ramp;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  sample_t   [N-1:0] a;
  tw_table_t         tf;
  opoint_t   [N-1:0] x;
  int checks = 0, failures = 0;

  fft64_r4 dut (.a(a), .tf(tf), .x(x));

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, xi;
    int  pr, pi;
    for (int k = 0; k < N_TW; k++) begin
      tf[k].re = TW_W'(rnd(64.0 * $cos(2.0 * PI * k / N)));
      tf[k].im = TW_W'(rnd(-64.0 * $sin(2.0 * PI * k / N)));
    end
    for (int n = 0; n < N; n++) a[n] = DW'(n % 16);
    #1;
    for (int k = 0; k < N; k++) begin
      xr = 0.0; xi = 0.0;
      for (int n = 0; n < N; n++) begin
        xr += real'(a[n]) * $cos(2.0 * PI * ((n * k) % N) / N);
        xi -= real'(a[n]) * $sin(2.0 * PI * ((n * k) % N) / N);
      end
      xr /= 64.0; xi /= 64.0;
      pr = int'(x[k].re);
      pi = int'(x[k].im);
      $display("x%0d = %08b  (re %0d, im %0d; exact %0.3f, %0.3f)",
               k, x[k], pr, pi, xr, xi);
      checks++;
      if (fabs(real'(x[k].re) - xr) > 0.75 || fabs(real'(x[k].im) - xi) > 0.75) begin
        failures++;
        $display("FAIL X(%0d)", k);
      end
    end
    checks++;
    if (x[0] != '0) begin failures++; $display("FAIL X(0) not zero"); end
    for (int k = 1; k < N; k++) begin
      if (k % 4 != 0) begin
        checks++;
        if (x[k] != '0) begin failures++; $display("FAIL X(%0d) not zero", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
