// tb_twiddle_rom: compares every twiddle entry with round(16384*cos) and
// round(-16384*sin) of 2*pi*e/64 computed in floating point.
module tb_twiddle_rom;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  tw_exp_t e;
  cplx_t w;
  twiddle_rom dut (.e, .w);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int k = 0; k < 32; k++) begin
      int er, ei;
      e = tw_exp_t'(k); #1;
      er = rnd(16384.0 * $cos(2.0 * 3.14159265358979 * k / 64.0));
      ei = rnd(-16384.0 * $sin(2.0 * 3.14159265358979 * k / 64.0));
      checks++;
      if (int'(w.re) != er || int'(w.im) != ei) begin
        failures++;
        $display("FAIL e=%0d got (%0d,%0d) expected (%0d,%0d)", k, w.re, w.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
