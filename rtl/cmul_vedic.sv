// cmul_vedic: complex multiplication of a data word by a twiddle factor,
// using four Vedic multipliers.
//
//   y.re = (x.re*w.re - x.im*w.im) >>> TW_FRAC
//   y.im = (x.re*w.im + x.im*w.re) >>> TW_FRAC
//
// The four real products come from vedic_mult instances (the four-multiplier
// form of a complex product). The sums are exact and then shifted right
// arithmetically by the fraction width of the twiddle (truncation towards
// minus infinity) and cut to 16 bits. The result wraps if it leaves the
// 16-bit range, which cannot happen while |x| <= 23170 (a unit twiddle can
// grow one part of a complex number by at most sqrt(2)). Purely
// combinational. Using Vedic multipliers for the twiddle product follows the
// published design; four multipliers and truncation are this design's
// choice.
module cmul_vedic
  import fft_pkg::*;
(
  input  cplx_t x,
  input  cplx_t w,
  output cplx_t y
);

  logic signed [2*DW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [2*DW:0]   s_re, s_im;

  vedic_mult #(.W(DW)) u_rr (.a(x.re), .b(w.re), .p(p_rr));
  vedic_mult #(.W(DW)) u_ii (.a(x.im), .b(w.im), .p(p_ii));
  vedic_mult #(.W(DW)) u_ri (.a(x.re), .b(w.im), .p(p_ri));
  vedic_mult #(.W(DW)) u_ir (.a(x.im), .b(w.re), .p(p_ir));

  logic signed [2*DW:0] sh_re, sh_im;

  always_comb begin
    s_re  = (2*DW+1)'(p_rr) - (2*DW+1)'(p_ii);
    s_im  = (2*DW+1)'(p_ri) + (2*DW+1)'(p_ir);
    sh_re = s_re >>> TW_FRAC;
    sh_im = s_im >>> TW_FRAC;
    y.re  = sh_re[DW-1:0];
    y.im  = sh_im[DW-1:0];
  end

endmodule
