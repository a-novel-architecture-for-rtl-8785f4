// tb_cmul_vedic: checks the complex twiddle product against a reference
// computed with ordinary multiplication, for every twiddle of the table and
// random data words with parts up to +-23170.
module tb_cmul_vedic;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  cplx_t x, w, y;
  tw_exp_t e;
  twiddle_rom u_rom (.e, .w);
  cmul_vedic dut (.x, .w, .y);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_part();
    return int'($urandom_range(46340)) - 23170;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint pr, pi;
      e = tw_exp_t'(n % 32);
      x.re = 16'(rnd_part());
      x.im = 16'(rnd_part());
      #1;
      pr = (longint'(x.re) * longint'(w.re) - longint'(x.im) * longint'(w.im)) >>> 14;
      pi = (longint'(x.re) * longint'(w.im) + longint'(x.im) * longint'(w.re)) >>> 14;
      checks++;
      if (longint'(y.re) != pr || longint'(y.im) != pi) begin
        failures++;
        if (failures < 10) $display("FAIL x=(%0d,%0d) e=%0d got (%0d,%0d) expected (%0d,%0d)",
                                    x.re, x.im, e, y.re, y.im, pr, pi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
