// mcsm: micro-coded state machine of the FFT processor.
//
// A pulse on en_fft clears the state counter and starts a transform; the
// counter then runs through N_STATES = 196 states, one per clock, and each
// state selects one micro-code word (fft_pkg::ucode_t) that drives the
// datapath in that cycle. When the last state has run, done_fft goes high
// and stays high until the next en_fft; busy is high while states run.
// State s = 0 is the cycle after the en_fft edge, so done_fft rises on the
// 196th clock edge after en_fft was sampled.
//
// The micro-code table is computed at elaboration from the schedule below
// (constant logic, one word per state). Each octet takes 12 states, one
// radix-2 butterfly per state, three octet stages of four butterflies:
//   c = 0..3  : pairs (0,4) (2,6) (1,5) (3,7)   words 4 apart
//   c = 4..7  : pairs (0,2) (4,6) (1,3) (5,7)   words 2 apart
//   c = 8..11 : pairs (0,1) (2,3) (4,5) (6,7)   words 1 apart, to bank 2
// This order lets every butterfly read results issued two or more states
// earlier, which is the latency of the butterfly processor. The next octet
// is read into register bank 1 at c = 11 and a finished octet is written
// from register bank 2 at c = 12 of its slot (c = 0 of the next one).
//   pass 1 (column octets j = 0..7): read at s = 0 and 12 + 12j,
//          butterflies at s = 1 + 12j + c, write at s = 13 + 12j;
//   pass 2 (row octets r = 0..7): read at s = 98 and 110 + 12r,
//          butterflies at s = 99 + 12r + c, write at s = 111 + 12r.
// Row octet 0 is read one state after column octet 7 is written, because
// it needs one word of every column. 192 butterflies plus four states of
// pipeline fill and pass turn-around give the 196 states.
// Twiddle exponents: for word a of octet stage t, column octet j uses
// W64^(2^t * (8*(a mod (4>>t)) + j)) and row octet uses W64^(8 * 2^t *
// (a mod (4>>t))), the factors of a 64-point radix-2 DIF flow graph.
// The 196 states, en_fft and done_fft follow the published design; the
// schedule and the micro-code fields are this design's own.
module mcsm
  import fft_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en_fft,
  output ucode_t ctrl,
  output logic   busy,
  output logic   done_fft,
  output logic [7:0] state
);

  // Butterfly pair for slot position c (0..11).
  function automatic oct_idx_t pair_a(int c);
    int tbl [12] = '{0, 2, 1, 3, 0, 4, 1, 5, 0, 2, 4, 6};
    return oct_idx_t'(tbl[c]);
  endfunction

  function automatic ucode_t ucode_word(int s);
    ucode_t u;
    int base, o, c, t, a, span, e;
    bit is_bf;
    u = '0;
    // octet reads
    if (s == 0 || s == 98) u.rd_en = 1'b1;
    for (int k = 0; k < 7; k++) begin
      if (s == 12 + 12*k || s == 110 + 12*k) u.rd_en = 1'b1;
    end
    // octet writes
    for (int k = 0; k < 8; k++) begin
      if (s == 13 + 12*k || s == 111 + 12*k) u.wr_en = 1'b1;
    end
    // butterflies
    is_bf = 1'b0;
    base  = 0;
    if (s >= 1 && s <= 96)  begin is_bf = 1'b1; base = 1;  end
    if (s >= 99 && s <= 194) begin is_bf = 1'b1; base = 99; end
    if (is_bf) begin
      o    = (s - base) / 12;
      c    = (s - base) % 12;
      t    = c / 4;
      span = 4 >> t;
      a    = int'(pair_a(c));
      u.bf_valid = 1'b1;
      u.idx_a    = oct_idx_t'(a);
      u.idx_b    = oct_idx_t'(a + span);
      u.to_rb2   = (t == 2);
      if (base == 1) e = (1 << t) * (8 * (a % span) + o);
      else           e = 8 * (1 << t) * (a % span);
      u.tw_exp   = tw_exp_t'(e);
    end
    return u;
  endfunction

  ucode_t rom [N_STATES];
  for (genvar s = 0; s < N_STATES; s++) begin : g_rom
    assign rom[s] = ucode_word(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= '0;
      busy     <= 1'b0;
      done_fft <= 1'b0;
    end else if (en_fft) begin
      state    <= '0;
      busy     <= 1'b1;
      done_fft <= 1'b0;
    end else if (busy) begin
      if (state == 8'(N_STATES - 1)) begin
        busy     <= 1'b0;
        done_fft <= 1'b1;
        state    <= '0;
      end else begin
        state <= state + 8'd1;
      end
    end
  end

  assign ctrl = busy ? rom[state] : '0;

endmodule
