// fft_pkg: types and constants shared by the 64-point FFT processor.
//
// The processor computes a 64-point FFT on data held in 8 interleaved
// memory banks of 8 complex words. A complex word is 32 bits: 16-bit two's
// complement real part in the upper half, imaginary part in the lower half.
// Twiddle factors are 16-bit signed values with 14 fraction bits (1.0 is
// 16384). The micro-coded state machine runs 196 states per transform.
// The bank count, bank depth, 16-bit components and 196 states follow the
// published design; the fraction format of the twiddles is this design's
// choice.
package fft_pkg;

  localparam int unsigned N_POINTS = 64;  // transform length
  localparam int unsigned N_BANKS  = 8;   // interleaved memory banks
  localparam int unsigned BANK_AW  = 3;   // address bits per bank
  localparam int unsigned DW       = 16;  // bits per real / imaginary part
  localparam int unsigned TW_FRAC  = 14;  // fraction bits of twiddle factors
  localparam int unsigned TW_EXP_W = 5;   // twiddle index W64^e, e = 0..31
  localparam int unsigned N_STATES = 196; // micro-code states per transform

  typedef logic [BANK_AW-1:0] bank_addr_t;
  typedef logic [2:0]         oct_idx_t;   // word index inside an octet
  typedef logic [TW_EXP_W-1:0] tw_exp_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // One micro-code word: what the datapath does in one state.
  typedef struct packed {
    logic     rd_en;     // read an octet from the banks into register bank 1
    logic     bf_valid;  // issue one radix-2 butterfly
    oct_idx_t idx_a;     // upper butterfly input / output word in the octet
    oct_idx_t idx_b;     // lower butterfly input / output word in the octet
    logic     to_rb2;    // butterfly results go to register bank 2 (last stage of the octet)
    tw_exp_t  tw_exp;    // twiddle factor W64^tw_exp for the lower output
    logic     wr_en;     // write the octet of register bank 2 back to the banks
  } ucode_t;

endpackage
