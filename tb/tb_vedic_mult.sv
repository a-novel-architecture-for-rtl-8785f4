// tb_vedic_mult: checks the signed Vedic multiplier against the simulator's
// own multiplication for corner values and random operands.
module tb_vedic_mult;
  int checks = 0, failures = 0;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  vedic_mult #(.W(16)) dut (.a, .b, .p);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic signed [15:0] x, logic signed [15:0] y);
    logic signed [31:0] exp_p;
    a = x; b = y; #1;
    exp_p = 32'(x) * 32'(y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, exp_p);
    end
  endtask

  initial begin
    automatic logic signed [15:0] corners [8] = '{16'sd0, 16'sd1, -16'sd1, 16'sd32767, -16'sd32768, 16'sd16384, -16'sd11585, 16'sd255};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    for (int n = 0; n < 3000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
