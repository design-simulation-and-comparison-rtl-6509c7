// tb_r4_butterfly: checks the radix-4 butterfly against a 4-point DFT of the
// twiddled inputs computed here in real arithmetic. With unit twiddles the
// result must be exact; with other twiddles each of the three rounded
// products may add at most 1/2 per part, so a deviation of 1.5 is allowed.
module tb_r4_butterfly;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  cplx_t x [RADIX];
  cplx_t y [RADIX];
  tw_t   w1, w2, w3;
  int    checks = 0, failures = 0;

  r4_butterfly dut (.x(x), .w1(w1), .w2(w2), .w3(w3), .y(y));

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic tw_t tw(int e);
    tw_t t;
    t.re = TW_W'(rnd(64.0 * $cos(2.0 * PI * e / N)));
    t.im = TW_W'(rnd(-64.0 * $sin(2.0 * PI * e / N)));
    return t;
  endfunction

  task automatic run(int e1, int e2, int e3, int amp);
    real vr [RADIX], vi [RADIX];
    real wr, wi, er, ei, tol;
    tw_t t [RADIX];
    for (int i = 0; i < RADIX; i++) begin
      x[i].re = IW'($urandom_range(2 * amp) - amp);
      x[i].im = IW'($urandom_range(2 * amp) - amp);
    end
    t[0] = '{re: 8'sd64, im: 8'sd0};
    t[1] = tw(e1); t[2] = tw(e2); t[3] = tw(e3);
    w1 = t[1]; w2 = t[2]; w3 = t[3];
    #1;
    for (int i = 0; i < RADIX; i++) begin
      wr = real'(t[i].re) / 64.0;
      wi = real'(t[i].im) / 64.0;
      vr[i] = real'(x[i].re) * wr - real'(x[i].im) * wi;
      vi[i] = real'(x[i].re) * wi + real'(x[i].im) * wr;
    end
    tol = (e1 == 0 && e2 == 0 && e3 == 0) ? 0.0 : 1.5;
    for (int q = 0; q < RADIX; q++) begin
      er = 0.0; ei = 0.0;
      for (int r = 0; r < RADIX; r++) begin
        // (-j)^(r*q) = exp(-j*pi/2*r*q)
        real c, s;
        c = $cos(PI / 2.0 * r * q);
        s = -$sin(PI / 2.0 * r * q);
        er += vr[r] * c - vi[r] * s;
        ei += vr[r] * s + vi[r] * c;
      end
      checks++;
      if (fabs(real'(y[q].re) - er) > tol + 1e-6 || fabs(real'(y[q].im) - ei) > tol + 1e-6) begin
        failures++;
        $display("FAIL e=(%0d,%0d,%0d) y%0d got (%0d,%0d) expected (%0.2f,%0.2f)",
                 e1, e2, e3, q, y[q].re, y[q].im, er, ei);
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
    for (int i = 0; i < 50; i++) run(0, 0, 0, 4000);
    for (int k = 0; k < 16; k++) run(k, 2 * k, 3 * k, 4000);
    for (int i = 0; i < 300; i++)
      run($urandom_range(63), $urandom_range(63), $urandom_range(63), 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
