// tb_bfp: random butterflies issued back to back; each result is compared,
// one cycle after issue, with (a+b)/2 and ((a-b)/2)*W64^e computed from a
// floating-point twiddle rounded to 14 fraction bits. Also checks that the
// word indices and destination flag travel with the data.
module tb_bfp;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_to_rb2, res_valid, res_to_rb2;
  cplx_t in_a, in_b, res_a, res_b;
  oct_idx_t in_idx_a, in_idx_b, res_idx_a, res_idx_b;
  tw_exp_t in_tw_exp;

  bfp dut (.clk, .rst_n, .in_valid, .in_a, .in_b, .in_idx_a, .in_idx_b, .in_to_rb2,
           .in_tw_exp, .res_valid, .res_a, .res_b, .res_idx_a, .res_idx_b, .res_to_rb2);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int part();
    return int'($urandom_range(32000)) - 16000;
  endfunction

  initial begin
    int ar, ai, br, bi, e, wr, wi, dr, di, xr, xi, yr, yi;
    bit v, d;
    int ia, ib;
    in_valid = 0; in_to_rb2 = 0; in_a = '0; in_b = '0; in_idx_a = 0; in_idx_b = 0; in_tw_exp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ar = part(); ai = part(); br = part(); bi = part(); e = $urandom_range(31);
      v = 1'($urandom); d = 1'($urandom); ia = $urandom_range(7); ib = $urandom_range(7);
      in_a = '{re: 16'(ar), im: 16'(ai)};
      in_b = '{re: 16'(br), im: 16'(bi)};
      in_tw_exp = tw_exp_t'(e); in_valid = v; in_to_rb2 = d;
      in_idx_a = oct_idx_t'(ia); in_idx_b = oct_idx_t'(ib);
      @(negedge clk);
      in_valid = 0;
      wr = rnd(16384.0 * $cos(2.0 * 3.14159265358979 * e / 64.0));
      wi = rnd(-16384.0 * $sin(2.0 * 3.14159265358979 * e / 64.0));
      xr = (ar + br) >>> 1; xi = (ai + bi) >>> 1;
      dr = (ar - br) >>> 1; di = (ai - bi) >>> 1;
      yr = (dr * wr - di * wi) >>> 14; yi = (dr * wi + di * wr) >>> 14;
      checks++;
      if (int'(res_a.re) != xr || int'(res_a.im) != xi || int'(res_b.re) != yr || int'(res_b.im) != yi) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d got A=(%0d,%0d) B=(%0d,%0d) expected A=(%0d,%0d) B=(%0d,%0d)",
                                    e, res_a.re, res_a.im, res_b.re, res_b.im, xr, xi, yr, yi);
      end
      checks++;
      if (res_valid != v || res_to_rb2 != d || int'(res_idx_a) != ia || int'(res_idx_b) != ib) begin
        failures++;
        if (failures < 10) $display("FAIL delayed control");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
