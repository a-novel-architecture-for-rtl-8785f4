// tb_dp_ram_bank: random writes and reads on the two ports of one bank,
// compared with an array model; never the same word on both ports.
module tb_dp_ram_bank;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we, re;
  logic [2:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [8];
  dp_ram_bank #(.DEPTH(8), .DW(32)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; re = 0;
    for (int i = 0; i < 8; i++) begin
      waddr = 3'(i); wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 1000; n++) begin
      we = 1'($urandom); re = 1;
      waddr = 3'($urandom); wdata = $urandom;
      raddr = waddr + 3'(1 + $urandom_range(6));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read addr %0d got %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
