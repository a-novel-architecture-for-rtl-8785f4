// octet_reg_bank: register bank holding one octet (eight complex words).
//
// The processor uses two of them. Register bank 1 is loaded with a whole
// octet from the memory banks in one cycle (load_en) and serves the
// butterfly processor through two read ports (ra_idx, rb_idx, combinational);
// the two results of each butterfly of the first two octet stages are
// written back through the two write ports. Register bank 2 receives the
// results of the last octet stage through its write ports and gives the
// finished octet to the memory banks. q is the registered content; q_next
// is the content after the coming clock edge, so a finished octet can be
// written to memory in the same cycle its last pair arrives. Writes land
// on the rising edge; a write port wins over a load to the same word. Reset
// clears the bank. The two banks and their roles follow the published
// design; the port set and the q_next bypass are this design's choice.
module octet_reg_bank
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load_en,
  input  cplx_t    load_data [8],
  input  logic     wa_en,
  input  oct_idx_t wa_idx,
  input  cplx_t    wa_data,
  input  logic     wb_en,
  input  oct_idx_t wb_idx,
  input  cplx_t    wb_data,
  input  oct_idx_t ra_idx,
  input  oct_idx_t rb_idx,
  output cplx_t    ra_data,
  output cplx_t    rb_data,
  output cplx_t    q      [8],
  output cplx_t    q_next [8]
);

  cplx_t regs [8];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      q_next[i] = load_en ? load_data[i] : regs[i];
      if (wa_en && wa_idx == oct_idx_t'(i)) q_next[i] = wa_data;
      if (wb_en && wb_idx == oct_idx_t'(i)) q_next[i] = wb_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < 8; i++) regs[i] <= q_next[i];
    end
  end

  assign q       = regs;
  assign ra_data = regs[ra_idx];
  assign rb_data = regs[rb_idx];

  // The two results of a butterfly always go to two different words.
  a_distinct_writes: assert property (@(posedge clk)
    !(wa_en && wb_en && wa_idx == wb_idx))
    else $error("octet_reg_bank: both write ports address word %0d", wa_idx);

endmodule
