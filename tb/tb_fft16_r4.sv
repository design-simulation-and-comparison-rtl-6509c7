// tb_fft16_r4: checks the 16-point radix-4 DFT against a direct DFT
// computed here in real arithmetic with exact twiddle factors.
// Outputs X(k) with k a multiple of 4 use only unit twiddles and must be
// exact. The others may differ by the rounding of three twiddle products
// (1.5 per part) plus the error of the 8-bit twiddles (at most 0.0111 of
// the magnitude of each first-stage result they multiply, which is
// computed here as well).
module tb_fft16_r4;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  L  = NSUB;

  cplx_t     x [L];
  cplx_t     y [L];
  tw_table_t tf;
  int        checks = 0, failures = 0;

  fft16_r4 dut (.x(x), .tf(tf), .y(y));

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  task automatic run(int amp, int mode);
    real er, ei, gr, gi, tol;
    for (int n = 0; n < L; n++) begin
      if (mode == 1 && n % 4 != 0) begin
        x[n] = '0;
      end else begin
        x[n].re = IW'($urandom_range(2 * amp) - amp);
        x[n].im = IW'($urandom_range(2 * amp) - amp);
      end
    end
    #1;
    for (int k = 0; k < L; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < L; n++) begin
        real c, s;
        c = $cos(2.0 * PI * n * k / L);
        s = -$sin(2.0 * PI * n * k / L);
        er += real'(x[n].re) * c - real'(x[n].im) * s;
        ei += real'(x[n].re) * s + real'(x[n].im) * c;
      end
      // error budget from the three twiddled first-stage results G_g(k mod 4)
      tol = 0.0;
      if (k % 4 != 0) begin
        tol = 1.5;
        for (int g = 1; g < 4; g++) begin
          gr = 0.0; gi = 0.0;
          for (int i = 0; i < 4; i++) begin
            real c, s;
            c = $cos(2.0 * PI * i * (k % 4) / 4);
            s = -$sin(2.0 * PI * i * (k % 4) / 4);
            gr += real'(x[4*i+g].re) * c - real'(x[4*i+g].im) * s;
            gi += real'(x[4*i+g].re) * s + real'(x[4*i+g].im) * c;
          end
          tol += 0.0111 * $sqrt(gr * gr + gi * gi);
        end
      end
      checks++;
      if (fabs(real'(y[k].re) - er) > tol + 1e-6 || fabs(real'(y[k].im) - ei) > tol + 1e-6) begin
        failures++;
        $display("FAIL mode=%0d X(%0d) got (%0d,%0d) expected (%0.2f,%0.2f) tol %0.2f",
                 mode, k, y[k].re, y[k].im, er, ei, tol);
      end
    end
  endtask

  initial begin
    #1000000;
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
    for (int i = 0; i < 20; i++) run(1000, 1);
    for (int i = 0; i < 100; i++) run(8, 0);
    for (int i = 0; i < 100; i++) run(1000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
