// tb_agu: steps the read and write counters through the 16 octets of a
// transform and checks, against the bank map of the processor, that every
// word of each octet is addressed in its bank and that the data rotation
// points at that bank.
module tb_agu;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, rd_step, wr_step;
  bank_addr_t rd_addr [N_BANKS], wr_addr [N_BANKS];
  logic [2:0] rd_rot, wr_rot;
  logic [3:0] rd_cnt, wr_cnt;

  // Word stored at [address][bank].
  int map [8][8] = '{
    '{ 0,  1,  2,  3,  4,  5,  6,  7},
    '{15,  8,  9, 10, 11, 12, 13, 14},
    '{22, 23, 16, 17, 18, 19, 20, 21},
    '{29, 30, 31, 24, 25, 26, 27, 28},
    '{36, 37, 38, 39, 32, 33, 34, 35},
    '{43, 44, 45, 46, 47, 40, 41, 42},
    '{50, 51, 52, 53, 54, 55, 48, 49},
    '{57, 58, 59, 60, 61, 62, 63, 56}};

  agu dut (.clk, .rst_n, .start, .rd_step, .wr_step, .rd_addr, .wr_addr,
           .rd_rot, .wr_rot, .rd_cnt, .wr_cnt);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Word w of octet k in pass p is word n of the frame; its bank must be
  // (w + rot) mod 8 and that bank's address must hold n.
  task automatic check_octet(string what, int p, int k, bank_addr_t addr [N_BANKS], logic [2:0] rot);
    for (int w = 0; w < 8; w++) begin
      int n, bank;
      n = (p == 0) ? 8 * w + k : 8 * k + w;
      bank = (w + int'(rot)) % 8;
      checks++;
      if (map[addr[bank]][bank] != n) begin
        failures++;
        $display("FAIL %s pass %0d octet %0d word %0d: bank %0d address %0d holds %0d",
                 what, p, k, w, bank, addr[bank], map[addr[bank]][bank]);
      end
    end
  endtask

  initial begin
    start = 0; rd_step = 0; wr_step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < 16; i++) begin
      check_octet("read", i / 8, i % 8, rd_addr, rd_rot);
      rd_step = 1;
      @(negedge clk); rd_step = 0;
      check_octet("write", i / 8, i % 8, wr_addr, wr_rot);
      wr_step = 1;
      @(negedge clk); wr_step = 0;
    end
    checks++;
    if (rd_cnt != 0 || wr_cnt != 0) begin
      failures++;
      $display("FAIL counters do not wrap after 16 octets");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
