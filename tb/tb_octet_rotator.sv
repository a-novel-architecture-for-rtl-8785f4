// tb_octet_rotator: checks both rotation directions for every amount with
// random words, and that the two directions undo each other.
module tb_octet_rotator;
  int checks = 0, failures = 0;
  logic [31:0] in [8], fwd [8], back [8];
  logic [2:0] amt;
  octet_rotator #(.W(32), .DIR(1'b0)) u_fwd  (.in(in),  .amt, .out(fwd));
  octet_rotator #(.W(32), .DIR(1'b1)) u_back (.in(fwd), .amt, .out(back));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      foreach (in[i]) in[i] = $urandom;
      amt = 3'(n);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (fwd[i] !== in[(i + int'(amt)) % 8]) begin
          failures++;
          $display("FAIL amt=%0d fwd[%0d]", amt, i);
        end
        checks++;
        if (back[i] !== in[i]) begin
          failures++;
          $display("FAIL amt=%0d back[%0d]", amt, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
