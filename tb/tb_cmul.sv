// tb_cmul: checks the twiddle multiplier against the exact complex product
// divided by 64, rounded half up, computed here in real arithmetic. Corner
// operands (largest data magnitudes, twiddles of +-1 and +-j) are followed
// by random ones.
module tb_cmul;
  import fft_pkg::*;

  cplx_t a, p;
  tw_t   w;
  int    checks = 0, failures = 0;

  cmul dut (.a(a), .w(w), .p(p));

  task automatic check(int ar, int ai, int wr, int wi);
    real er, ei;
    a = '{re: IW'(ar), im: IW'(ai)};
    w = '{re: TW_W'(wr), im: TW_W'(wi)};
    #1;
    er = $floor(real'(ar * wr - ai * wi) / 64.0 + 0.5);
    ei = $floor(real'(ar * wi + ai * wr) / 64.0 + 0.5);
    checks++;
    if (real'(p.re) != er || real'(p.im) != ei) begin
      failures++;
      $display("FAIL (%0d,%0d)*(%0d,%0d): got (%0d,%0d) expected (%0.0f,%0.0f)",
               ar, ai, wr, wi, p.re, p.im, er, ei);
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
    check(100, -37, 64, 0);
    check(100, -37, 0, -64);
    check(100, -37, -64, 0);
    check(100, -37, 0, 64);
    check(16000, -16000, 45, -45);
    check(-16000, 16000, -45, 45);
    check(1, 0, 32, 0);   // exactly half: rounds up
    check(-1, 0, 32, 0);  // exactly minus half: rounds up to 0
    for (int i = 0; i < 2000; i++)
      check($urandom_range(32000) - 16000, $urandom_range(32000) - 16000,
            $urandom_range(128) - 64, $urandom_range(128) - 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
