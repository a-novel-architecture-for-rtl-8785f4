// csd_w8_mult: multiplication by the eighth-of-a-turn twiddles W8^k
// (W64^(8k)), k = 0..3, with canonical-signed-digit shift-and-add logic
// instead of a general multiplier.
//
//   k = 0: W = 1               y = x
//   k = 1: W = (1 - j)/sqrt2   y = (c*(re+im), c*(im-re))
//   k = 2: W = -j              y = (im, -re)
//   k = 3: W = -(1 + j)/sqrt2  y = (c*(im-re), -c*(re+im))
// where c = 11585 / 2^14 (the table value of 1/sqrt2 with 14 fraction
// bits). The constant product uses the CSD form
//   11585 = 2^14 - 2^12 - 2^10 + 2^8 + 2^6 + 2^0,
// six shifted terms with no two non-zero digits side by side; the product
// is exact and is then shifted right by 14 (truncation), so the result is
// bit-identical to the general multiplier with the table twiddle.
// Two stages of multiplexing select the work: the first picks which sum or
// difference of the parts feeds the two CSD units, the second picks the
// output form for k. Purely combinational. CSD multiplication selected by
// two multiplexer stages follows the published design; restricting it to
// the W8 factors is this design's choice.
module csd_w8_mult
  import fft_pkg::*;
(
  input  cplx_t      x,
  input  logic [1:0] k,
  output cplx_t      y
);

  localparam int unsigned SW = DW + 1;       // width of re+im, im-re
  localparam int unsigned PW = SW + 15;      // width of the CSD product

  // x * 11585 by canonical signed digits.
  function automatic logic signed [PW-1:0] csd_11585(logic signed [SW-1:0] v);
    logic signed [PW-1:0] e;
    e = PW'(v);
    return (e <<< 14) - (e <<< 12) - (e <<< 10) + (e <<< 8) + (e <<< 6) + e;
  endfunction

  logic signed [SW-1:0] s_sum, s_dif;
  logic signed [PW-1:0] p_sum, p_dif, sh_sum, sh_dif;

  always_comb begin
    // first multiplexer stage: operands of the CSD units
    s_sum  = SW'(x.re) + SW'(x.im);
    s_dif  = SW'(x.im) - SW'(x.re);
    p_sum  = csd_11585(s_sum);
    p_dif  = csd_11585(s_dif);
    sh_sum = p_sum >>> TW_FRAC;
    sh_dif = p_dif >>> TW_FRAC;
    // second multiplexer stage: output form
    unique case (k)
      2'd0: y = x;
      2'd1: y = '{re: sh_sum[DW-1:0], im: sh_dif[DW-1:0]};
      2'd2: y = '{re: x.im, im: DW'(-x.re)};
      default: begin
        y.re = sh_dif[DW-1:0];
        y.im = DW'(-(p_sum) >>> TW_FRAC);
      end
    endcase
  end

endmodule
