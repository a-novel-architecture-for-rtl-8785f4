// octet_rotator: logarithmic barrel rotator over eight words.
//
// This is the permutation network between the eight interleaved banks and
// an octet. With DIR = 0 it computes out[i] = in[(i + amt) mod 8], which
// turns the bank outputs into octet order; with DIR = 1 it computes
// out[i] = in[(i - amt) mod 8], which sends octet words to their banks.
// The rotation is built from three mux stages (by 1, 2 and 4 words), so it
// uses no adder. It is purely combinational. The network between the banks
// follows the published design; its barrel-shifter form is this design's
// choice.
module octet_rotator #(
  parameter int unsigned W   = 32,
  parameter bit          DIR = 1'b0
) (
  input  logic [W-1:0] in  [8],
  input  logic [2:0]   amt,
  output logic [W-1:0] out [8]
);

  logic [W-1:0] st [4][8];

  always_comb begin
    for (int i = 0; i < 8; i++) st[0][i] = in[i];
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 8; i++) begin
        if (amt[k])
          st[k+1][i] = DIR ? st[k][(i + 8 - (1 << k)) % 8] : st[k][(i + (1 << k)) % 8];
        else
          st[k+1][i] = st[k][i];
      end
    end
    for (int i = 0; i < 8; i++) out[i] = st[3][i];
  end

endmodule
