// tb_csd_w8_mult: checks the CSD W8 multiplier for k = 0..3 against the
// product with the rounded twiddle W64^(8k) (14 fraction bits, truncated),
// for corner values and random data words.
module tb_csd_w8_mult;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  cplx_t x, y;
  logic [1:0] k;
  csd_w8_mult dut (.x, .k, .y);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int wrap16(longint v);
    return int'($signed(16'(v)));
  endfunction

  task automatic check(int xr, int xi, int kk);
    int wr, wi, er, ei;
    x = '{re: 16'(xr), im: 16'(xi)}; k = 2'(kk);
    #1;
    wr = rnd(16384.0 * $cos(2.0 * 3.14159265358979 * kk / 8.0));
    wi = rnd(-16384.0 * $sin(2.0 * 3.14159265358979 * kk / 8.0));
    er = wrap16((longint'(xr) * wr - longint'(xi) * wi) >>> 14);
    ei = wrap16((longint'(xr) * wi + longint'(xi) * wr) >>> 14);
    checks++;
    if (int'(y.re) != er || int'(y.im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL x=(%0d,%0d) k=%0d got (%0d,%0d) expected (%0d,%0d)",
                                  xr, xi, kk, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    automatic int corners [6] = '{0, 1, -1, 23170, -23170, 12345};
    for (int kk = 0; kk < 4; kk++) begin
      foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j], kk);
      for (int n = 0; n < 1000; n++)
        check(int'($urandom_range(46340)) - 23170, int'($urandom_range(46340)) - 23170, kk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
