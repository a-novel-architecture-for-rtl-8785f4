// bfp: butterfly processor, one radix-2 decimation-in-frequency butterfly
// per clock, in two pipeline stages.
//
//   A = (a + b) / 2
//   B = ((a - b) / 2) * W64^tw_exp
//
// Stage 1 (registered at the end of the issue cycle) forms the halved sum
// and difference and looks the twiddle factor up in twiddle_rom; the
// halving keeps the transform free of overflow (six stages scale the result
// by 1/64). Stage 2 multiplies the difference by the twiddle during the
// next cycle: the eighth-of-a-turn factors W8^k (e a multiple of 8, all the
// factors of the last three stages but W8^1 and W8^3 need no multiplier
// at all) go through the shift-and-add CSD unit csd_w8_mult, every other
// factor through the Vedic complex multiplier cmul_vedic, and a
// multiplexer picks the result. Both paths give identical bits for a W8
// factor. The outputs (res_*) are combinational and are
// registered by the register bank they are written to, so a result issued
// in cycle t can be read again in cycle t + 2. The word indices and the
// destination travel with the data as delayed control (the "D" signals).
// Halving by two and the twiddle product by Vedic multipliers follow the
// published design, as do the CSD unit and the Vedic multipliers; the
// radix-2 form of the butterfly, its stage split, the split of twiddles
// between the CSD and Vedic paths and truncating halving are this design's
// choice.
module bfp
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    in_a,
  input  cplx_t    in_b,
  input  oct_idx_t in_idx_a,
  input  oct_idx_t in_idx_b,
  input  logic     in_to_rb2,
  input  tw_exp_t  in_tw_exp,
  output logic     res_valid,
  output cplx_t    res_a,
  output cplx_t    res_b,
  output oct_idx_t res_idx_a,
  output oct_idx_t res_idx_b,
  output logic     res_to_rb2
);

  cplx_t tw;
  twiddle_rom u_rom (.e(in_tw_exp), .w(tw));

  logic signed [DW:0] sum_re, sum_im, dif_re, dif_im;
  always_comb begin
    sum_re = (DW+1)'(in_a.re) + (DW+1)'(in_b.re);
    sum_im = (DW+1)'(in_a.im) + (DW+1)'(in_b.im);
    dif_re = (DW+1)'(in_a.re) - (DW+1)'(in_b.re);
    dif_im = (DW+1)'(in_a.im) - (DW+1)'(in_b.im);
  end

  // Stage 1 registers (the delayed "D" control travels with them).
  logic     d_valid, d_to_rb2;
  cplx_t    d_sum, d_dif, d_tw;
  oct_idx_t d_idx_a, d_idx_b;
  tw_exp_t  d_tw_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid  <= 1'b0;
      d_to_rb2 <= 1'b0;
      d_sum    <= '0;
      d_dif    <= '0;
      d_tw     <= '0;
      d_idx_a  <= '0;
      d_idx_b  <= '0;
      d_tw_exp <= '0;
    end else begin
      d_valid  <= in_valid;
      d_to_rb2 <= in_to_rb2;
      d_sum    <= '{re: sum_re[DW:1], im: sum_im[DW:1]};
      d_dif    <= '{re: dif_re[DW:1], im: dif_im[DW:1]};
      d_tw     <= tw;
      d_idx_a  <= in_idx_a;
      d_idx_b  <= in_idx_b;
      d_tw_exp <= in_tw_exp;
    end
  end

  // Stage 2: twiddle product.
  cplx_t prod_vedic, prod_csd, prod;
  cmul_vedic  u_cmul (.x(d_dif), .w(d_tw), .y(prod_vedic));
  csd_w8_mult u_csd  (.x(d_dif), .k(d_tw_exp[4:3]), .y(prod_csd));
  assign prod = (d_tw_exp[2:0] == 3'd0) ? prod_csd : prod_vedic;

  assign res_valid  = d_valid;
  assign res_a      = d_sum;
  assign res_b      = prod;
  assign res_idx_a  = d_idx_a;
  assign res_idx_b  = d_idx_b;
  assign res_to_rb2 = d_to_rb2;

endmodule
