// tb_twiddle_sel: checks that twiddle_sel returns W64^e for every exponent
// 0..63 (and for a second, scaled table) by comparing against
// round(64*cos(2*pi*e/64)) and round(-64*sin(2*pi*e/64)) computed here with
// real arithmetic. Combinational block: each input is applied, then the
// output is sampled one time unit later.
module tb_twiddle_sel;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  tw_table_t        tf;
  logic [EXP_W-1:0] e;
  tw_t              w;
  int               checks = 0, failures = 0;

  twiddle_sel dut (.tf(tf), .e(e), .w(w));

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  task automatic load_table(real amp);
    for (int k = 0; k < N_TW; k++) begin
      tf[k].re = TW_W'(rnd(amp * $cos(2.0 * PI * k / N)));
      tf[k].im = TW_W'(rnd(-amp * $sin(2.0 * PI * k / N)));
    end
  endtask

  task automatic sweep(real amp);
    load_table(amp);
    for (int i = 0; i < N; i++) begin
      e = EXP_W'(i);
      #1;
      checks++;
      if (int'(w.re) != rnd(amp * $cos(2.0 * PI * i / N)) ||
          int'(w.im) != rnd(-amp * $sin(2.0 * PI * i / N))) begin
        failures++;
        $display("FAIL amp=%0.1f e=%0d got (%0d,%0d)", amp, i, w.re, w.im);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sweep(64.0);
    sweep(40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
