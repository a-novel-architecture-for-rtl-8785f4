// tb_fft64_top: end-to-end test of the 64-point FFT processor at its
// default (and only) size.
//
// Three transforms are run: a forward FFT of random data, an inverse FFT
// (ifft = 1) of random data, and a forward FFT started on the cycle after
// the previous done_fft. For each, the 64 results are compared bit for bit
// with a reference radix-2 DIF computation written here with plain integer
// arithmetic (halving every stage, twiddles rounded to 14 fraction bits,
// product truncated), and within a few LSB with a floating-point DFT/64
// (or inverse DFT). done_fft must rise 196 clock edges after en_fft. A host
// write during a transform must be ignored. The mechanisms of the design
// are counted and each must occur: octet loads into register bank 1,
// octet writes from register bank 2, butterflies, stage-3 results sent to
// bank 2, bypass writes (last pair of an octet written to memory in the
// cycle it arrives), the switch from column to row octets, inverse mode
// and an ignored host write.
module tb_fft64_top;
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

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counts
  int n_load = 0, n_wr = 0, n_bf = 0, n_rb2 = 0, n_bypass = 0, n_pass_switch = 0;
  int n_inverse = 0, n_ignored = 0;
  logic pass_q = 0;
  always @(posedge clk) begin
    if (dut.ctrl.rd_en) n_load++;
    if (dut.ctrl.wr_en) n_wr++;
    if (dut.ctrl.bf_valid) n_bf++;
    if (dut.res_valid && dut.res_to_rb2) n_rb2++;
    if (dut.ctrl.wr_en && dut.res_valid && dut.res_to_rb2) n_bypass++;
    if (rst_n && dut.u_agu.rd_cnt[3] && !pass_q) n_pass_switch++;
    pass_q <= dut.u_agu.rd_cnt[3];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // --------------------------------------------------------- reference
  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int wrap16(int v);
    return int'($signed(16'(v)));
  endfunction

  // Fixed-point radix-2 DIF, in place, output in bit-reversed positions.
  task automatic ref_fft(input int xr_in [64], input int xi_in [64], output int xr [64], output int xi [64]);
    xr = xr_in; xi = xi_in;
    for (int l = 32; l >= 1; l = l / 2) begin
      for (int n = 0; n < 64; n++) begin
        if ((n / l) % 2 == 0) begin
          int e, wr, wi, sr, si, dr, di;
          e  = (n % l) * (32 / l);
          wr = rnd(16384.0 * $cos(2.0 * PI * e / 64.0));
          wi = rnd(-16384.0 * $sin(2.0 * PI * e / 64.0));
          sr = (xr[n] + xr[n+l]) >>> 1; si = (xi[n] + xi[n+l]) >>> 1;
          dr = (xr[n] - xr[n+l]) >>> 1; di = (xi[n] - xi[n+l]) >>> 1;
          xr[n] = sr; xi[n] = si;
          xr[n+l] = wrap16((dr * wr - di * wi) >>> 14);
          xi[n+l] = wrap16((dr * wi + di * wr) >>> 14);
        end
      end
    end
  endtask

  function automatic int bitrev6(int k);
    int r = 0;
    for (int i = 0; i < 6; i++) if ((k & (1 << i)) != 0) r |= 1 << (5 - i);
    return r;
  endfunction

  // ------------------------------------------------------------ one run
  task automatic run(bit inverse, bit back_to_back);
    int xr [64], xi [64], yr [64], yi [64], rr [64], ri [64];
    int cyc;
    for (int n = 0; n < 64; n++) begin
      xr[n] = int'($urandom_range(32000)) - 16000;
      xi[n] = int'($urandom_range(32000)) - 16000;
    end
    if (!back_to_back) begin
      ifft = inverse;
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        host_we = 1; host_waddr = 6'(n);
        host_wdata = '{re: 16'(xr[n]), im: 16'(xi[n])};
      end
      @(negedge clk); host_we = 0;
    end
    en_fft = 1;
    @(negedge clk); en_fft = 0;
    cyc = 0;
    while (!done_fft && cyc < 400) begin
      if (cyc == 50) begin
        // this write must not reach the memory
        host_we = 1; host_waddr = 6'd9; host_wdata = '{re: 16'sd1234, im: -16'sd1234};
        n_ignored++;
      end else host_we = 0;
      @(negedge clk);
      cyc++;
    end
    host_we = 0;
    check(cyc == 196, $sformatf("done_fft after %0d cycles, expected 196", cyc));
    if (inverse) n_inverse++;
    // reference: the inverse swaps real and imaginary parts on the way in and out
    if (inverse) ref_fft(xi, xr, ri, rr);
    else         ref_fft(xr, xi, rr, ri);
    for (int k = 0; k < 64; k++) begin
      real fr, fi, ang;
      host_raddr = 6'(bitrev6(k));
      #1;
      yr[k] = int'(host_rdata.re); yi[k] = int'(host_rdata.im);
      check(yr[k] == rr[bitrev6(k)] && yi[k] == ri[bitrev6(k)],
            $sformatf("X[%0d] = (%0d,%0d), reference (%0d,%0d)", k, yr[k], yi[k], rr[bitrev6(k)], ri[bitrev6(k)]));
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = (inverse ? 2.0 : -2.0) * PI * n * k / 64.0;
        fr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        fi += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      fr = fr / 64.0; fi = fi / 64.0;
      check((yr[k] - fr) < 6.0 && (fr - yr[k]) < 6.0 && (yi[k] - fi) < 6.0 && (fi - yi[k]) < 6.0,
            $sformatf("X[%0d] = (%0d,%0d), DFT/64 (%f,%f)", k, yr[k], yi[k], fr, fi));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(1'b0, 1'b0);
    run(1'b1, 1'b0);
    // back to back: en_fft on the cycle after done; memory holds the last result
    // whose input is not tracked here, so this run only checks the timing.
    begin
      int cyc;
      en_fft = 1;
      @(negedge clk); en_fft = 0;
      cyc = 0;
      while (!done_fft && cyc < 400) begin @(negedge clk); cyc++; end
      check(cyc == 196, "back-to-back transform takes 196 cycles");
    end
    check(n_load == 48, $sformatf("octet loads %0d", n_load));
    check(n_wr == 48, $sformatf("octet writes %0d", n_wr));
    check(n_bf == 3 * 192, $sformatf("butterflies %0d", n_bf));
    check(n_rb2 == 3 * 64, $sformatf("stage-3 results to bank 2 %0d", n_rb2));
    check(n_bypass > 0, "bypass write never happened");
    check(n_pass_switch == 3, $sformatf("column-to-row switches %0d", n_pass_switch));
    check(n_inverse > 0, "inverse mode never ran");
    check(n_ignored > 0, "no host write during a transform");
    $display("mechanisms: loads=%0d writes=%0d butterflies=%0d rb2=%0d bypass=%0d pass_switch=%0d inverse=%0d ignored_host_writes=%0d",
             n_load, n_wr, n_bf, n_rb2, n_bypass, n_pass_switch, n_inverse, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
