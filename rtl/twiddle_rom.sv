// twiddle_rom: table of the 64-point twiddle factors W64^e, e = 0..31.
//
// W64^e = cos(2*pi*e/64) - j*sin(2*pi*e/64). Each part is stored as a 16-bit
// signed value with 14 fraction bits, rounded to nearest:
//   re = round(16384 * cos(2*pi*e/64)),  im = round(-16384 * sin(2*pi*e/64)).
// The radix-2 stages of a 64-point transform need W64^e for e < 32 only:
// W32, W16, W8 and W4 factors are the even, multiple-of-4, multiple-of-8
// and multiple-of-16 entries. Combinational read. Storing the twiddle
// factors in a table that feeds the Vedic multipliers follows the published
// design; the size and number format of the table are this design's choice.
module twiddle_rom
  import fft_pkg::*;
(
  input  tw_exp_t e,
  output cplx_t   w
);

  always_comb begin
    unique case (e)
      5'd0 : w = '{re: 16'sd16384, im: 16'sd0};
      5'd1 : w = '{re: 16'sd16305, im: -16'sd1606};
      5'd2 : w = '{re: 16'sd16069, im: -16'sd3196};
      5'd3 : w = '{re: 16'sd15679, im: -16'sd4756};
      5'd4 : w = '{re: 16'sd15137, im: -16'sd6270};
      5'd5 : w = '{re: 16'sd14449, im: -16'sd7723};
      5'd6 : w = '{re: 16'sd13623, im: -16'sd9102};
      5'd7 : w = '{re: 16'sd12665, im: -16'sd10394};
      5'd8 : w = '{re: 16'sd11585, im: -16'sd11585};
      5'd9 : w = '{re: 16'sd10394, im: -16'sd12665};
      5'd10: w = '{re: 16'sd9102, im: -16'sd13623};
      5'd11: w = '{re: 16'sd7723, im: -16'sd14449};
      5'd12: w = '{re: 16'sd6270, im: -16'sd15137};
      5'd13: w = '{re: 16'sd4756, im: -16'sd15679};
      5'd14: w = '{re: 16'sd3196, im: -16'sd16069};
      5'd15: w = '{re: 16'sd1606, im: -16'sd16305};
      5'd16: w = '{re: 16'sd0, im: -16'sd16384};
      5'd17: w = '{re: -16'sd1606, im: -16'sd16305};
      5'd18: w = '{re: -16'sd3196, im: -16'sd16069};
      5'd19: w = '{re: -16'sd4756, im: -16'sd15679};
      5'd20: w = '{re: -16'sd6270, im: -16'sd15137};
      5'd21: w = '{re: -16'sd7723, im: -16'sd14449};
      5'd22: w = '{re: -16'sd9102, im: -16'sd13623};
      5'd23: w = '{re: -16'sd10394, im: -16'sd12665};
      5'd24: w = '{re: -16'sd11585, im: -16'sd11585};
      5'd25: w = '{re: -16'sd12665, im: -16'sd10394};
      5'd26: w = '{re: -16'sd13623, im: -16'sd9102};
      5'd27: w = '{re: -16'sd14449, im: -16'sd7723};
      5'd28: w = '{re: -16'sd15137, im: -16'sd6270};
      5'd29: w = '{re: -16'sd15679, im: -16'sd4756};
      5'd30: w = '{re: -16'sd16069, im: -16'sd3196};
      5'd31: w = '{re: -16'sd16305, im: -16'sd1606};
      default: w = '{re: 16'sd0, im: 16'sd0};
    endcase
  end

endmodule
