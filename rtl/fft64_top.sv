// fft64_top: 64-point FFT processor with interleaved in-place memory.
//
// The frame lives in eight dual-port banks of eight complex words
// (dp_ram_bank), word n = 8r + c in bank (c + r) mod 8 at address r. The
// transform is a 64-point radix-2 decimation-in-frequency FFT whose six
// stages are done as two passes of octets: pass 1 takes the eight column
// octets (every 8th word) through the first three stages, pass 2 takes the
// eight row octets (successive words) through the last three. For each
// octet the agu addresses all eight banks at once, octet_rotator puts the
// bank outputs in octet order and the octet is loaded into register bank 1.
// The butterfly processor (bfp) then performs the octet's 12 butterflies,
// one per clock, writing stages 1-2 back into register bank 1 and stage 3
// into register bank 2, from which the octet goes back, rotated again, to
// the same memory words (in place). While one octet is written from bank
// 2 the next is already in bank 1, so two octets are in the pipeline. The
// mcsm sequences all of this in 196 states. Every butterfly halves its
// outputs, so the result is DFT/64.
//
// Host side: while busy is low the host writes word host_waddr (0..63) and
// reads word host_raddr (combinational). Writes while busy are ignored.
// Input x[n] goes to word n; after the transform X[k] is in word
// bitrev6(k) (bit-reversed order, as an in-place DIF transform leaves it).
// With ifft high the real and imaginary parts are swapped on the way in
// and out, which turns the transform into the inverse DFT (scaled by 1/64
// times 64, i.e. the true inverse).
// Timing: en_fft is sampled on a clock edge; done_fft rises 196 edges later
// and stays high until the next en_fft.
// Bank layout, the three modules, register banks, 196 cycles, scaling and
// the swap for the inverse transform follow the published design; the host
// port and the octet schedule are this design's choices.
module fft64_top
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en_fft,
  input  logic  ifft,
  output logic  busy,
  output logic  done_fft,
  input  logic  host_we,
  input  logic [5:0] host_waddr,
  input  cplx_t host_wdata,
  input  logic [5:0] host_raddr,
  output cplx_t host_rdata
);

  // ---------------------------------------------------------------- control
  ucode_t     ctrl;
  logic [7:0] state;

  mcsm u_mcsm (
    .clk, .rst_n, .en_fft, .ctrl, .busy, .done_fft, .state
  );

  bank_addr_t rd_addr [N_BANKS];
  bank_addr_t wr_addr [N_BANKS];
  logic [2:0] rd_rot, wr_rot;
  logic [3:0] rd_cnt, wr_cnt;

  agu u_agu (
    .clk, .rst_n, .start(en_fft), .rd_step(ctrl.rd_en), .wr_step(ctrl.wr_en),
    .rd_addr, .wr_addr, .rd_rot, .wr_rot, .rd_cnt, .wr_cnt
  );

  // ---------------------------------------------------------------- memory
  function automatic cplx_t swap_ri(cplx_t v, logic sw);
    return sw ? '{re: v.im, im: v.re} : v;
  endfunction

  // Host word n -> bank (n[2:0] + n[5:3]) mod 8, address n[5:3].
  logic [2:0] host_wbank, host_rbank;
  assign host_wbank = host_waddr[2:0] + host_waddr[5:3];
  assign host_rbank = host_raddr[2:0] + host_raddr[5:3];

  logic [2*DW-1:0] bank_rdata [N_BANKS];
  logic [2*DW-1:0] oct_wdata  [N_BANKS];

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic       we, re;
    bank_addr_t waddr, raddr;
    logic [2*DW-1:0] wdata;
    always_comb begin
      if (busy) begin
        we    = ctrl.wr_en;
        waddr = wr_addr[b];
        wdata = oct_wdata[b];
        re    = ctrl.rd_en;
        raddr = rd_addr[b];
      end else begin
        we    = host_we && host_wbank == 3'(b);
        waddr = host_waddr[5:3];
        wdata = swap_ri(host_wdata, ifft);
        re    = 1'b0;
        raddr = host_raddr[5:3];
      end
    end
    dp_ram_bank #(.DEPTH(8), .DW(2*DW)) u_bank (
      .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(bank_rdata[b])
    );
  end

  assign host_rdata = swap_ri(cplx_t'(bank_rdata[host_rbank]), ifft);

  // ------------------------------------------------- permutation network
  logic [2*DW-1:0] oct_rdata [8];
  octet_rotator #(.W(2*DW), .DIR(1'b0)) u_rd_net (.in(bank_rdata), .amt(rd_rot), .out(oct_rdata));

  cplx_t rb1_load [8];
  always_comb for (int i = 0; i < 8; i++) rb1_load[i] = cplx_t'(oct_rdata[i]);

  // ------------------------------------------------------- register banks
  logic     res_valid, res_to_rb2;
  cplx_t    res_a, res_b;
  oct_idx_t res_idx_a, res_idx_b;
  cplx_t    op_a, op_b;
  cplx_t    rb1_q [8], rb1_qn [8], rb2_q [8], rb2_qn [8];
  cplx_t    no_load [8];
  always_comb for (int i = 0; i < 8; i++) no_load[i] = '0;

  octet_reg_bank u_rb1 (
    .clk, .rst_n,
    .load_en(ctrl.rd_en), .load_data(rb1_load),
    .wa_en(res_valid && !res_to_rb2), .wa_idx(res_idx_a), .wa_data(res_a),
    .wb_en(res_valid && !res_to_rb2), .wb_idx(res_idx_b), .wb_data(res_b),
    .ra_idx(ctrl.idx_a), .rb_idx(ctrl.idx_b), .ra_data(op_a), .rb_data(op_b),
    .q(rb1_q), .q_next(rb1_qn)
  );

  cplx_t rb2_ra, rb2_rb;
  octet_reg_bank u_rb2 (
    .clk, .rst_n,
    .load_en(1'b0), .load_data(no_load),
    .wa_en(res_valid && res_to_rb2), .wa_idx(res_idx_a), .wa_data(res_a),
    .wb_en(res_valid && res_to_rb2), .wb_idx(res_idx_b), .wb_data(res_b),
    .ra_idx('0), .rb_idx('0), .ra_data(rb2_ra), .rb_data(rb2_rb),
    .q(rb2_q), .q_next(rb2_qn)
  );

  logic [2*DW-1:0] rb2_words [8];
  always_comb for (int i = 0; i < 8; i++) rb2_words[i] = rb2_qn[i];

  octet_rotator #(.W(2*DW), .DIR(1'b1)) u_wr_net (.in(rb2_words), .amt(wr_rot), .out(oct_wdata));

  // ---------------------------------------------------- butterfly processor
  bfp u_bfp (
    .clk, .rst_n,
    .in_valid(ctrl.bf_valid), .in_a(op_a), .in_b(op_b),
    .in_idx_a(ctrl.idx_a), .in_idx_b(ctrl.idx_b),
    .in_to_rb2(ctrl.to_rb2), .in_tw_exp(ctrl.tw_exp),
    .res_valid, .res_a, .res_b, .res_idx_a, .res_idx_b, .res_to_rb2
  );

endmodule
