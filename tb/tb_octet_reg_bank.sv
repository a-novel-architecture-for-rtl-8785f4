// tb_octet_reg_bank: random octet loads, paired writes and reads against an
// array model; also checks the q_next view before each clock edge.
module tb_octet_reg_bank;
  import fft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load_en, wa_en, wb_en;
  cplx_t load_data [8];
  oct_idx_t wa_idx, wb_idx, ra_idx, rb_idx;
  cplx_t wa_data, wb_data, ra_data, rb_data;
  cplx_t q [8], q_next [8];
  cplx_t model [8], model_next [8];

  octet_reg_bank dut (.clk, .rst_n, .load_en, .load_data, .wa_en, .wa_idx, .wa_data,
                      .wb_en, .wb_idx, .wb_data, .ra_idx, .rb_idx, .ra_data, .rb_data,
                      .q, .q_next);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, cplx_t got, cplx_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    load_en = 0; wa_en = 0; wb_en = 0;
    wa_idx = 0; wb_idx = 1; ra_idx = 0; rb_idx = 0; wa_data = '0; wb_data = '0;
    foreach (load_data[i]) load_data[i] = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load_en = ($urandom_range(3) == 0);
      foreach (load_data[i]) load_data[i] = cplx_t'($urandom);
      wa_en = 1'($urandom); wb_en = 1'($urandom);
      wa_idx = oct_idx_t'($urandom);
      wb_idx = wa_idx + oct_idx_t'(1 + $urandom_range(6));
      wa_data = cplx_t'($urandom); wb_data = cplx_t'($urandom);
      ra_idx = oct_idx_t'($urandom); rb_idx = oct_idx_t'($urandom);
      #1;
      expect_eq("ra_data", ra_data, model[ra_idx]);
      expect_eq("rb_data", rb_data, model[rb_idx]);
      for (int i = 0; i < 8; i++) begin
        model_next[i] = load_en ? load_data[i] : model[i];
        if (wa_en && wa_idx == oct_idx_t'(i)) model_next[i] = wa_data;
        if (wb_en && wb_idx == oct_idx_t'(i)) model_next[i] = wb_data;
        expect_eq("q_next", q_next[i], model_next[i]);
        expect_eq("q", q[i], model[i]);
      end
      @(posedge clk);
      model = model_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
