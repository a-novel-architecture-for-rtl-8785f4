// agu: address generation unit for the eight interleaved memory banks.
//
// Word n = 8*r + c of the 64-point frame (row r, column c) is stored in bank
// (c + r) mod 8 at address r. A "column octet" j holds words j, j+8, ...,
// j+56 (the first three radix-2 stages pair words 32, 16 and 8 apart); a
// "row octet" r holds words 8r .. 8r+7 (the last three stages). Either kind
// sits in eight different banks, so it is read or written in one cycle:
//   column octet j: bank b uses address (b - j) mod 8,
//   row octet r:    every bank uses address r.
// The column pattern is the fixed vector 0,1,..,7 rotated by j in a barrel
// rotator, so no modulo adder lies on the address path. In both cases bank
// b holds octet word (b - k) mod 8, k being the octet number, which is the
// rotation the data network applies (rd_rot, wr_rot).
// Two 4-bit counters {pass, octet} step through the 16 octets: start clears
// both, rd_step / wr_step advance them after each octet read / write.
// Addresses are combinational from the counters. Eight 3-bit read and write
// address buses, the mapping table and counters feeding barrel shifters
// follow the published design; the counter handshake is this design's
// choice.
module agu
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       rd_step,
  input  logic       wr_step,
  output bank_addr_t rd_addr [N_BANKS],
  output bank_addr_t wr_addr [N_BANKS],
  output logic [2:0] rd_rot,
  output logic [2:0] wr_rot,
  output logic [3:0] rd_cnt,
  output logic [3:0] wr_cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt <= '0;
      wr_cnt <= '0;
    end else if (start) begin
      rd_cnt <= '0;
      wr_cnt <= '0;
    end else begin
      if (rd_step) rd_cnt <= rd_cnt + 4'd1;
      if (wr_step) wr_cnt <= wr_cnt + 4'd1;
    end
  end

  bank_addr_t pattern [N_BANKS];
  bank_addr_t rd_col [N_BANKS];
  bank_addr_t wr_col [N_BANKS];

  always_comb begin
    for (int i = 0; i < N_BANKS; i++) pattern[i] = bank_addr_t'(i);
  end

  octet_rotator #(.W(BANK_AW), .DIR(1'b1)) u_rd_rot (.in(pattern), .amt(rd_cnt[2:0]), .out(rd_col));
  octet_rotator #(.W(BANK_AW), .DIR(1'b1)) u_wr_rot (.in(pattern), .amt(wr_cnt[2:0]), .out(wr_col));

  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      rd_addr[b] = rd_cnt[3] ? rd_cnt[2:0] : rd_col[b];
      wr_addr[b] = wr_cnt[3] ? wr_cnt[2:0] : wr_col[b];
    end
  end

  assign rd_rot = rd_cnt[2:0];
  assign wr_rot = wr_cnt[2:0];

endmodule
