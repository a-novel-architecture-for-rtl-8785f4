// tb_fft64_known_signals: transforms signals whose spectra are known in
// closed form and checks every output bin within 3 LSB:
//   impulse  x[n] = A*delta[n]            -> X[k] = A/64 for all k
//   DC       x[n] = A                     -> X[0] = A, other bins 0
//   tone     x[n] = A*exp(j*2*pi*m*n/64)  -> X[m] = A, other bins 0,
//            for m = 1, 5, 31, 32, 63
//   inverse of a single bin (ifft = 1)    -> a tone of amplitude A/64
// Results are read from the bit-reversed word bitrev6(k). Each transform
// must finish in 196 cycles.
module tb_fft64_known_signals;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en_fft = 0, ifft = 0, busy, done_fft;
  logic host_we = 0;
  logic [5:0] host_waddr = 0, host_raddr = 0;
  cplx_t host_wdata = '0, host_rdata;

  fft64_top dut (.clk, .rst_n, .en_fft, .ifft, .busy, .done_fft, .host_we, .host_waddr,
                 .host_wdata, .host_raddr, .host_rdata);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real A  = 12000.0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int bitrev6(int k);
    int r = 0;
    for (int i = 0; i < 6; i++) if ((k & (1 << i)) != 0) r |= 1 << (5 - i);
    return r;
  endfunction

  // Load x, transform, compare with expected spectrum e.
  task automatic run(string name, bit inverse, real xr [64], real xi [64], real er [64], real ei [64]);
    int cyc;
    ifft = inverse;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      host_we = 1; host_waddr = 6'(n);
      host_wdata = '{re: 16'(rnd(xr[n])), im: 16'(rnd(xi[n]))};
    end
    @(negedge clk); host_we = 0; en_fft = 1;
    @(negedge clk); en_fft = 0;
    cyc = 0;
    while (!done_fft && cyc < 400) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 196) begin
      failures++;
      $display("FAIL %s: done after %0d cycles", name, cyc);
    end
    for (int k = 0; k < 64; k++) begin
      real dr, di;
      host_raddr = 6'(bitrev6(k));
      #1;
      dr = real'(host_rdata.re) - er[k];
      di = real'(host_rdata.im) - ei[k];
      checks++;
      if (dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0) begin
        failures++;
        $display("FAIL %s bin %0d: (%0d,%0d) expected (%f,%f)", name, k, host_rdata.re, host_rdata.im, er[k], ei[k]);
      end
    end
  endtask

  initial begin
    real xr [64], xi [64], er [64], ei [64];
    automatic int tones [5] = '{1, 5, 31, 32, 63};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse
    foreach (xr[n]) begin xr[n] = 0.0; xi[n] = 0.0; er[n] = A / 64.0; ei[n] = 0.0; end
    xr[0] = A;
    run("impulse", 1'b0, xr, xi, er, ei);
    // DC
    foreach (xr[n]) begin xr[n] = A; xi[n] = 0.0; er[n] = 0.0; ei[n] = 0.0; end
    er[0] = A;
    run("dc", 1'b0, xr, xi, er, ei);
    // tones
    foreach (tones[t]) begin
      foreach (xr[n]) begin
        xr[n] = A * $cos(2.0 * PI * tones[t] * n / 64.0);
        xi[n] = A * $sin(2.0 * PI * tones[t] * n / 64.0);
        er[n] = 0.0; ei[n] = 0.0;
      end
      er[tones[t]] = A;
      run($sformatf("tone %0d", tones[t]), 1'b0, xr, xi, er, ei);
    end
    // inverse of a single bin at k = 3: x[n] = (A/64) * exp(+j*2*pi*3*n/64)
    foreach (xr[n]) begin
      xr[n] = 0.0; xi[n] = 0.0;
      er[n] = A / 64.0 * $cos(2.0 * PI * 3 * n / 64.0);
      ei[n] = A / 64.0 * $sin(2.0 * PI * 3 * n / 64.0);
    end
    xr[3] = A;
    run("inverse bin 3", 1'b1, xr, xi, er, ei);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
