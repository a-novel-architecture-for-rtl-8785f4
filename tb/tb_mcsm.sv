// tb_mcsm: runs the micro-coded state machine through two transforms and
// checks the schedule it emits: done_fft 196 edges after en_fft, 16 octet
// reads and writes and 192 butterflies per transform, every butterfly
// operand ready (read at least two cycles after the butterfly that wrote
// it), no register-bank-1 load on a cycle a result lands there, register
// bank 2 complete when it is written out, and each twiddle exponent equal
// to that of the 64-point radix-2 DIF flow graph.
module tb_mcsm;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en_fft = 0;
  ucode_t ctrl;
  logic busy, done_fft;
  logic [7:0] state;

  mcsm dut (.clk, .rst_n, .en_fft, .ctrl, .busy, .done_fft, .state);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_one();
    int cyc, n_rd, n_wr, n_bf, ready [8], rb2_cnt, last_wb1;
    bit rb2_have [8];
    n_rd = 0; n_wr = 0; n_bf = 0; rb2_cnt = 0; last_wb1 = -10;
    foreach (ready[i]) ready[i] = 1 << 20;
    foreach (rb2_have[i]) rb2_have[i] = 0;
    @(negedge clk); en_fft = 1;
    @(negedge clk); en_fft = 0;
    cyc = 0;
    while (!done_fft && cyc < 400) begin
      // this is cycle "cyc" of the transform (state = cyc)
      check(int'(state) == cyc, "state counter");
      if (ctrl.bf_valid) begin
        int span, p, k, w, n, gl, e_exp;
        span = int'(ctrl.idx_b) - int'(ctrl.idx_a);
        check(span == 4 || span == 2 || span == 1, "pair distance");
        check(ready[ctrl.idx_a] <= cyc && ready[ctrl.idx_b] <= cyc, $sformatf("operand ready at %0d", cyc));
        check((span == 1) == ctrl.to_rb2, "last stage goes to bank 2");
        p = (n_rd - 1) / 8; k = (n_rd - 1) % 8; w = int'(ctrl.idx_a);
        n  = (p == 0) ? 8 * w + k : 8 * k + w;
        gl = (p == 0) ? span * 8 : span;
        e_exp = (n % gl) * (32 / gl);
        check(int'(ctrl.tw_exp) == e_exp, $sformatf("twiddle at %0d: %0d vs %0d", cyc, ctrl.tw_exp, e_exp));
        if (!ctrl.to_rb2) begin
          ready[ctrl.idx_a] = cyc + 2; ready[ctrl.idx_b] = cyc + 2; last_wb1 = cyc + 1;
        end else begin
          rb2_have[ctrl.idx_a] = 1; rb2_have[ctrl.idx_b] = 1;
        end
        n_bf++;
      end
      if (ctrl.wr_en) begin
        int have;
        have = 0;
        foreach (rb2_have[i]) have += rb2_have[i];
        check(have == 8, $sformatf("bank 2 complete at write, cycle %0d", cyc));
        foreach (rb2_have[i]) rb2_have[i] = 0;
        n_wr++;
      end
      if (ctrl.rd_en) begin
        check(last_wb1 != cyc, "load and write-back collide");
        foreach (ready[i]) ready[i] = cyc + 1;
        n_rd++;
      end
      @(negedge clk);
      cyc++;
    end
    check(cyc == 196, $sformatf("done after %0d cycles", cyc));
    check(n_rd == 16 && n_wr == 16, "16 octet reads and writes");
    check(n_bf == 192, $sformatf("%0d butterflies", n_bf));
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_one();
    repeat (3) @(negedge clk);
    check(done_fft, "done held");
    run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
