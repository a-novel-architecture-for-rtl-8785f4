# 64-point FFT processor on eight skewed memory banks

This is a 64-point complex FFT processor that works in place on a frame held in
eight small dual-port memory banks. The 64 words are spread over the banks in a
skewed (diagonal) pattern. With that pattern, a row of eight consecutive words
and a column of eight words spaced 8 apart both lie in eight different banks.
Either kind of *octet* can therefore be read or written in a single cycle. The
bank addresses come from counters and barrel rotators, with no modulo adder in
the address path, so the address logic does not get slower with the transform.

One transform takes exactly **196 clock cycles** from `en_fft` to `done_fft`.
That is 192 radix-2 butterflies at one per clock, plus four cycles of pipeline
fill and pass turn-around. Data is 16-bit complex. Every butterfly halves its
outputs, so the result is `DFT(x)/64` and cannot overflow. Twiddle products
use one of two units. A shift-and-add unit in canonical signed digit (CSD)
form handles the multiples of W8. Multipliers built on the Vedic
*Urdhva-Tiryakbhyam* ("vertically and crosswise") rule handle all the other
factors. Swapping the real and imaginary parts on the way in and out turns
the same hardware into an inverse FFT.

## The bank map

Word `n = 8r + c` of the frame (row `r`, column `c`) is stored in bank
`(c + r) mod 8` at address `r`:

| addr | bank 0 | bank 1 | bank 2 | bank 3 | bank 4 | bank 5 | bank 6 | bank 7 |
|------|-------:|-------:|-------:|-------:|-------:|-------:|-------:|-------:|
| 0    | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  |
| 1    | 15 | 8  | 9  | 10 | 11 | 12 | 13 | 14 |
| 2    | 22 | 23 | 16 | 17 | 18 | 19 | 20 | 21 |
| 3    | 29 | 30 | 31 | 24 | 25 | 26 | 27 | 28 |
| 4    | 36 | 37 | 38 | 39 | 32 | 33 | 34 | 35 |
| 5    | 43 | 44 | 45 | 46 | 47 | 40 | 41 | 42 |
| 6    | 50 | 51 | 52 | 53 | 54 | 55 | 48 | 49 |
| 7    | 57 | 58 | 59 | 60 | 61 | 62 | 63 | 56 |

* **Column octet `j`** (words `j, j+8, …, j+56`): bank `b` is read at address
  `(b − j) mod 8`. This is the vector 0,1,…,7 rotated by `j`.
* **Row octet `r`** (words `8r … 8r+7`): every bank is read at address `r`.

In both cases bank `b` holds word `(b − k) mod 8` of octet `k`. One barrel
rotator by `k` (`octet_rotator`, 3 mux levels) therefore puts the bank
outputs in octet order, and the opposite rotation sends results back to their
banks. The AGU (`agu`) keeps two 4-bit counters `{pass, octet}`, one for reads
and one for writes. It derives the eight 3-bit read addresses, the eight
3-bit write addresses and the two rotation amounts from them.

## The transform as two passes of octets

The algorithm is the ordinary 64-point radix-2 decimation-in-frequency FFT.
It has six stages, with butterfly spans of 32, 16, 8, 4, 2 and 1 words.

* Spans 32, 16 and 8 pair words in the same column. **Pass 1** therefore takes
  the eight column octets, one after another, through the first three stages.
* Spans 4, 2 and 1 pair words in the same row. **Pass 2** takes the eight row
  octets through the last three stages.

Inside an octet the three stages pair words 4, 2 and 1 apart. Word `a` of
octet-stage `t` (t = 0, 1, 2) is multiplied by `W64^e`, where:

* column octet `j`: `e = 2^t · (8·(a mod (4>>t)) + j)`
* row octet: `e = 8 · 2^t · (a mod (4>>t))`

This gives W64, W32 and W16 factors in pass 1, and W8 and W4 factors (and 1)
in pass 2. Because the transform is in place, `X[k]` ends in word
`bitrev6(k)`. No reordering is done in hardware.

## The octet pipeline and the 196-state schedule

This is the part that takes the most care. There are two register banks of
eight complex words each (`octet_reg_bank`):

* **Register bank 1 (RB1)** receives an octet from memory in one cycle. It
  feeds the butterfly processor through two read ports. It also takes back
  the results of the octet's first two stages.
* **Register bank 2 (RB2)** collects the results of the third stage. The
  finished octet goes from RB2 to memory.

The butterfly processor (`bfp`) accepts one butterfly per clock. Its first
stage registers the halved sum, the halved difference and the twiddle. Its
second stage multiplies the difference by the twiddle, and the result is
registered in RB1 or RB2. A result issued in cycle `t` can therefore be used
again in cycle `t + 2`. The word numbers and the destination flag travel
down the pipeline with the data.

An octet occupies a 12-cycle slot (`c` = 0…11), and the issue order is chosen
so that no operand is ever used before it is ready:

| c     | pairs (words)                | stage | result to |
|-------|------------------------------|-------|-----------|
| 0–3   | (0,4) (2,6) (1,5) (3,7)      | 1     | RB1 |
| 4–7   | (0,2) (4,6) (1,3) (5,7)      | 2     | RB1 |
| 8–11  | (0,1) (2,3) (4,5) (6,7)      | 3     | RB2 |

* At `c = 11` the next octet is read from memory into RB1, on the same edge
  as the last third-stage read. No first- or second-stage result lands in
  RB1 on that edge.
* At `c = 12` (which is `c = 0` of the next slot) the last pair leaves the
  butterfly. The octet is written to memory on that same edge, using RB2's
  next-state view (`q_next`) as the write data. One octet is thus in RB1 and
  the previous one in RB2: two octets are in flight.

The micro-coded state machine (`mcsm`) holds one control word per state:

| state s | action |
|---------|--------|
| 0, 12, 24, … 84 | read column octet 0…7 into RB1 |
| 1 … 96 | pass-1 butterflies (slot of octet j starts at 1 + 12j) |
| 13, 25, … 97 | write column octet 0…7 |
| 98, 110, … 194 | read row octet 0…7 |
| 99 … 194 | pass-2 butterflies (slot of octet r starts at 99 + 12r) |
| 111, 123, … 195 | write row octet 0…7 |

Row octet 0 needs one word from every column. It is therefore read at state
98, one cycle after column octet 7 is written. That turn-around, the first
read and the write overlap give 192 + 4 = 196 states. In every state the
octet being read and the octet being written are different, so no memory
word is read and written in the same cycle (`dp_ram_bank` asserts this).

## Arithmetic

* **Data:** 16-bit two's complement real and imaginary parts, packed as
  `{re, im}` in a 32-bit word.
* **Butterfly:** `A = (a+b) >>> 1` and `B = ((a−b) >>> 1) · W`. The halving
  truncates. Six stages give `DFT/64`.
* **Twiddles:** `W64^e = cos(2πe/64) − j·sin(2πe/64)` for `e` = 0…31. Each
  part is stored as `round(16384·cos)` and `round(−16384·sin)`, which is 14
  fraction bits (`twiddle_rom`).
* **General product** (`cmul_vedic`): four 16×16 signed Vedic multipliers
  (`vedic_mult` around the unsigned `vedic_umul`), then `>>> 14` with
  truncation.
  * The Vedic core forms result bit `k` from column `k`: the sum of the bit
    products `a[i]·b[k−i]` plus the carry from column `k−1`.
  * Signed operands are handled in sign-magnitude form.
* **W8 product** (`csd_w8_mult`): used when `e` is a multiple of 8, that is
  for W = 1, (1−j)/√2, −j and −(1+j)/√2.
  * It uses one constant, 11585 = 2^14 − 2^12 − 2^10 + 2^8 + 2^6 + 1, formed
    with shifts and adds.
  * A first multiplexer stage chooses `re+im` or `im−re` as the CSD operand.
    A second chooses the output form.
  * The result is bit-identical to the general path.
* **Range:** keep each input part within ±16000 (more exactly, the magnitude
  within about 23170). A twiddle rotation can then never push a part past
  16 bits. Results wrap and do not saturate.

Accuracy against a floating-point `DFT/64` is within a few LSB. The
testbench allows 6.

## Interface and timing (`fft64_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `en_fft` | in | 1 | start pulse, sampled on a rising edge |
| `ifft` | in | 1 | inverse mode: swap re/im on host writes and reads |
| `busy` | out | 1 | a transform is running |
| `done_fft` | out | 1 | rises 196 edges after `en_fft` is sampled, held until the next `en_fft` |
| `host_we`, `host_waddr[5:0]`, `host_wdata[31:0]` | in | | write word `n` while idle (ignored while busy) |
| `host_raddr[5:0]` | in | 6 | read address (combinational read) |
| `host_rdata[31:0]` | out | 32 | read data, valid while idle |

Use:

1. Write `x[n]` to word `n`, with `ifft` set as wanted.
2. Pulse `en_fft`.
3. Wait for `done_fft`.
4. Read `X[k]` from word `bitrev6(k)`.

With `ifft = 1` the same steps yield the inverse DFT, `x[n] = (1/64)·Σ X[k]·W^(−nk)`.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | sizes, complex type `cplx_t`, micro-code word `ucode_t` |
| `rtl/fft64_top.sv` | the processor: banks, AGU, rotators, RB1/RB2, butterfly, MCSM, host port |
| `rtl/mcsm.sv` | 196-state micro-coded sequencer; schedule computed at elaboration |
| `rtl/agu.sv` | octet counters and bank address generation |
| `rtl/octet_rotator.sv` | 8-word barrel rotator (the permutation network) |
| `rtl/dp_ram_bank.sv` | one 8 × 32 dual-port bank |
| `rtl/octet_reg_bank.sv` | octet register bank (used as RB1 and RB2) |
| `rtl/bfp.sv` | two-stage radix-2 DIF butterfly with twiddle selection |
| `rtl/twiddle_rom.sv` | W64^e table |
| `rtl/cmul_vedic.sv`, `rtl/vedic_mult.sv`, `rtl/vedic_umul.sv` | Vedic complex, signed and unsigned multipliers |
| `rtl/csd_w8_mult.sv` | CSD multiplier for the W8 factors |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

* `tb_fft64_top` runs three transforms at the design's only size:
  * a forward FFT of random data,
  * an inverse FFT,
  * a third transform started the cycle after `done_fft`.

  It compares all outputs bit for bit with an independent fixed-point model,
  and within 6 LSB with a floating-point DFT. It checks the 196-cycle
  latency and confirms that a host write during a run is ignored. It also
  counts octet loads, octet writes, butterflies, RB2 results, same-cycle RB2
  write-outs, pass switches and inverse runs.
* `tb_mcsm` checks the schedule itself:
  * every operand is ready when it is used;
  * RB2 is complete when it is written out;
  * each twiddle exponent matches the flow graph;
  * there are 16 reads, 16 writes and 192 butterflies per transform.
* `tb_agu` checks every octet against the bank table above.
  The address sequence it produces (for example write addresses of bank 0
  stepping 4, 3, 2, 1 over column octets 4…7 and then 0 for row octet 0,
  with the 4-bit write counter at 0101…1001) is the one the original design
  shows in its address-unit waveforms.
* `tb_fft64_known_signals` transforms signals with known spectra and checks
  every bin within 3 LSB: an impulse, a constant, complex tones at bins 1,
  5, 31, 32 and 63, and the inverse of a single bin.

To simulate, for example, the whole processor:

```
verilator --binary --timing -y rtl rtl/fft_pkg.sv tb/tb_fft64_top.sv --top-module tb_fft64_top
./obj_dir/Vtb_fft64_top
```

Every other testbench runs the same way: name the package, then the
testbench, and let `-y rtl` find the modules. Each takes well under a
second.

## Where this design makes its own choices

* **Radix.** The design is described as radix-4, with a four-input butterfly
  and a "radix-4³" core. Its memory organisation is a different matter. That
  organisation needs octets that go through three flow-graph stages, twiddles
  of the W8 to W64 classes, and 196 cycles per transform. This implementation
  follows that organisation and uses radix-2 butterflies, one per clock. A
  four-input butterfly cannot be formed inside one octet of the 8×8 bank
  layout.
* **CSD or Vedic.** The source describes the twiddle product both as CSD
  shift-and-add and as Vedic multiplication. Both are built here. CSD covers
  the W8 factors, which need only 1/√2. The Vedic multipliers cover the rest.
* **Schedule and micro-code.** The micro-code fields, the butterfly order and
  the same-cycle RB2 write-out are this design's choices. The 196-state
  count, `en_fft` and `done_fft` come from the source.
* **Latency figure.** The source also quotes about 2 µs at 40 MHz. That does
  not follow from 196 cycles, which take 4.9 µs at 40 MHz.
* **Also this design's choices:**
  * the host port,
  * the bit-reversed output order (no unscrambling),
  * twiddle precision (14 fraction bits),
  * truncation everywhere,
  * same-cycle memory reads,
  * the asynchronous `rst_n`.
* **Fixed size.** The octet schedule is written for 64 points. Other lengths
  would need a new bank map and a new schedule.
