# FIR filters protected against single-event upsets with Hamming codes

A radiation particle that strikes a flip-flop can flip the bit it holds, which is
a single-event upset (SEU). In a FIR filter almost all of the state sits in the
delay line. One flipped bit there corrupts several consecutive outputs, one for
each tap the bad sample passes. The usual Hamming protection gives every
delay-line register its own encoder in front and its own decoder behind. That
costs area and adds an encoder and a decoder to every register-to-register path.

This RTL implements a cheaper set of schemes that rely on how a delay line
works:

* **Encode once.** A sample is encoded when it enters the delay line, and the
  coded word is then moved from register to register. No register needs an
  encoder of its own.
* **Repair while shifting.** The data bits a register passes to the next one
  are the corrected ones. A flip is then cleaned up at the next clock edge
  instead of riding along with the sample.
* **Share the locator.** The decoder splits into three parts: a syndrome
  calculator, an error locator and an error corrector. Every register keeps a
  syndrome calculator and a corrector. A single locator serves all registers,
  because at most one register is expected to be hit in any one cycle.
* **Code parallel channels as one word.** Two or four filters running side by
  side are protected by one wider code. Doubling the data bits costs only one
  more parity bit. The 8-bit error vector is still shared, and a per-channel
  enable picks which channel it applies to.

All four filters are written in synthesizable SystemVerilog and instantiated
side by side in `fir_hamming_top`.

## The filter being protected

Every scheme protects the same direct-form FIR filter:

    y[n] = sum_{i=0}^{N-1} h[i] * x[n-1-i]

The delay line has N registers. Register 0 takes the input sample at each rising
edge. The sum of products (SOP) is combinational and reads all N registers, so
`y` is valid one clock after its newest sample was applied. One sample is taken
per clock, with no valid/ready handshake.

Two coefficient sets are supplied in `fir_ham_pkg`. Both are symmetric low-pass
filters. The filters are named after their number of delays:

| name      | N (coefficients = registers) | h                                          |
|-----------|------------------------------|--------------------------------------------|
| 5-tap     | 6 (`H_TAPS5`, default)       | -1 24 50 50 24 -1                          |
| 11-tap    | 12 (`H_TAPS11`)              | 1 -1 -9 6 73 120 120 73 6 -9 -1 1          |

Samples are 8-bit signed two's complement and coefficients are signed. The
output is `W + 8 + $clog2(N)` bits wide: 19 bits for the 5-tap filter and 20 for
the 11-tap one. Neither set can overflow at that width.

## The Hamming code

The code is single-error correcting (SEC) and systematic: each register holds
the W data bits unchanged, plus P parity bits. P is the smallest p that
satisfies `W + p + 1 <= 2^p`, which gives 4 for 8 data bits.

Codeword positions are counted from 1. Parity bits sit at the power-of-two
positions (1, 2, 4, 8). Data bit j sits at the j-th other position, so the
8-bit code uses positions 3, 5, 6, 7, 9, 10, 11 and 12. Parity bit i covers
every data bit whose position has bit i set. A single flipped bit therefore
yields a syndrome equal to its position:

* a syndrome of 0 means no error;
* 1, 2, 4 or 8 points at a parity bit, which needs no data correction;
* any other value points at one data bit.

**Parallel channels.** When CH channels of 8 bits are coded as one word,
`$clog2(CH)` parity bits are added. Bit j of channel b gets the parity-check
column `{b, position(j)}`. Split the syndrome in two:

* The low 4 bits behave exactly like the 8-bit code and drive the one shared
  8-bit error vector.
* The high bits give the number of the channel that holds the flipped bit, and
  so select that channel's corrector enable.

All columns are distinct and none has fewer than two bits set, so the wide code
still corrects any single flipped bit in the word.

| channels | data bits | parity bits | bits per register |
|----------|-----------|-------------|-------------------|
| 1        | 8         | 4           | 12                |
| 2        | 16        | 5           | 21                |
| 4        | 32        | 6           | 38                |

These are the minimum parity counts for 8, 16 and 32 data bits. The
construction is in `fir_ham_pkg` (`hamming_parity_bits`, `data_position`,
`check_column`). Encoder and syndrome modules turn it into constant column
tables at elaboration.

## The decoder parts

* `hamming_syndrome` recomputes the parity from the stored data and XORs it
  with the stored parity. The OR of the syndrome bits is the enable. With
  CH > 1 there is one enable per channel: the syndrome must be non-zero and its
  high bits must equal the channel number.
* `hamming_locator` compares the low syndrome bits with each data position. The
  result is a one-hot error vector, or all zeros when the syndrome points at a
  parity bit.
* `hamming_corrector` computes `data ^ (error_vector & enable)`.
* `hamming_decoder` is the three parts wired together with a private locator.
  It is used where every register has a decoder of its own.

## The four filters

All four filters share one register structure: a data field and a parity field
for each of the N registers.

### `fir_single_encoder`: one encoder, a decoder per register

The coded word moves through the delay line unchanged. Each register has a full
decoder, and only the SOP sees the corrected value. A flip is corrected at every
tap the word passes. The stored word, however, is never repaired, so a second
flip in the same word at a later tap gives a double error that the SEC code
decodes wrongly.

### `fir_data_protect`: corrected data moves on

Register k+1 takes the corrected data of register k, but the raw parity of
register k. A data flip is therefore repaired at the next edge, and a data flip
in some register in every cycle is still masked. A parity flip is not repaired
and stays with its word. If a data bit of that word is then hit, the word holds
two errors and the output is wrong.

### `fir_shared_decoder`: one locator for all registers (the main scheme)

Data and parity move on as in `fir_data_protect`, but the decoder is split up.
Each register has a syndrome calculator and, for each channel, a corrector. One
`hamming_locator` serves the whole filter.

**How the shared locator is fed.** This is the least obvious part of the design.
The low syndrome bits of all N registers are ORed together, and the result
drives the single locator. The error vector goes to every corrector. A
register's corrector acts only when that register's own enable is set, so the
other registers are left untouched.

The OR is exact only while at most one register holds a non-zero syndrome. This
is the "one upset per cycle" condition the scheme is built on:

* Isolated upsets are always corrected.
* A data upset in some register in every cycle is also corrected. Each flip is
  repaired as the word moves on, so only the newly hit register is ever wrong.
* A flipped **parity** bit is the weak point. It keeps its word's syndrome
  non-zero until the word leaves the delay line. If another register is hit
  during that time, the ORed syndrome is meaningless, and a wrong bit may be
  flipped. The same holds for a parity flip followed by a data flip in the same
  word, which `fir_data_protect` cannot correct either.

If this matters, the way to harden the design is to correct the parity bits as
well, which needs an encoder per register and gives up part of the saving.

With `CH` set to 2 or 4, the same module is the parallel filter. CH channels
with the same coefficients share one encoder, one syndrome calculator per
register, one locator and one error vector. Each channel has its own correctors
and its own SOP.

### Tolerance at a glance

| upset pattern                                       | single encoder | data protect | shared decoder |
|-----------------------------------------------------|:-----:|:-----:|:-----:|
| isolated single upsets                              | yes   | yes   | yes   |
| a data-bit upset somewhere every cycle              | no    | yes   | yes   |
| one word hit in data bits at two different taps     | no    | yes   | yes   |
| parity upset, then a data upset in the same word    | no    | no    | no    |
| parity error travelling while another register is hit | no  | yes   | no    |

The testbenches check the first four rows, both the "yes" and the "no" entries.
The last row follows from the structure and is not simulated.

## Top level

`fir_hamming_top` places the four filters side by side. Each has its own ports:

| prefix | filter                                         | FF bits (defaults) |
|--------|------------------------------------------------|--------------------|
| `se_`  | `fir_single_encoder`                           | 72                 |
| `dp_`  | `fir_data_protect`                             | 72                 |
| `sd_`  | `fir_shared_decoder`, CH = 1                   | 72                 |
| `pa_`  | `fir_shared_decoder`, CH = `PAR_CH` (4)        | 228                |

Parameters are `N` (6), `W` (8), `PAR_CH` (4), `YW` (19) and `COEF`
(`H_TAPS5`). For the 11-tap filter, set `N = 12` and `COEF = H_TAPS11`. The
flip-flop counts equal registers times (data + parity) bits. The unprotected
5-tap filter would need 48 flip-flops.

### Upset injection ports

Every filter has `seu_data` and `seu_par` inputs. Each is one mask per register
(and per channel for data), XORed into that register's next value. Setting a
mask bit for one cycle flips that bit of the register just after the edge,
which models an upset that strikes right after a clock edge. These ports are
for fault-injection experiments. Tie them to zero in a real design, and
synthesis then removes the XORs.

## Files

| file | contents |
|------|----------|
| `rtl/fir_ham_pkg.sv` | widths, coefficient sets, code-construction functions |
| `rtl/hamming_encoder.sv` | parity generator |
| `rtl/hamming_syndrome.sv` | syndrome and enable(s) |
| `rtl/hamming_locator.sv` | syndrome to one-hot error vector |
| `rtl/hamming_corrector.sv` | conditional bit flip |
| `rtl/hamming_decoder.sv` | syndrome + locator + corrector |
| `rtl/fir_sop.sv` | constant-coefficient sum of products |
| `rtl/fir_single_encoder.sv`, `rtl/fir_data_protect.sv`, `rtl/fir_shared_decoder.sv` | the filters |
| `rtl/fir_hamming_top.sv` | the filters side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fir_tb_harness.sv` | reference FIR model and upset scenarios shared by the filter testbenches |
| `tb/tb_ref_code.svh` | independent reference Hamming code for the unit testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each also
has a watchdog that counts a failure if the simulation hangs. For example, with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fir_ham_pkg.sv tb/tb_fir_hamming_top.sv --top-module tb_fir_hamming_top
    ./obj_dir/Vtb_fir_hamming_top

Replace the testbench name to run another one. Every run finishes in well under
a second.

What the testbenches cover:

* **Unit level.** The encoder, syndrome and decoder are compared with a
  separately written reference code, with every single-bit flip tried on random
  words, for 1 and 4 channels. The locator is checked exhaustively. The SOP is
  checked against integer sums, including the extreme inputs.
* **Filter level.** `fir_tb_harness` keeps its own sample history and checks
  every output in every cycle: impulse response and one-cycle latency, then
  clean random data, then the upset scenarios listed above. Each filter runs
  the 5-tap and 11-tap sets. The shared-decoder filter also runs with 4 channels
  (11 taps) and 2 channels (5 taps).
* **Top level.** `tb_fir_hamming_top` runs all four filters at the default
  parameters. It counts each mechanism: isolated data and parity flips, flips in
  the two extra parity bits of the 4-channel code, a flip every cycle, a word hit
  twice, the shared decoder's enable, and a hit in each parallel channel. It
  counts a failure for any mechanism that never occurred.

## Design choices not fixed by the published scheme

* The syndrome-to-position mapping and the column layout of the parallel code
  (above) are this design's own. The published scheme fixes the parity counts
  and the idea of one error vector with per-channel enables.
* The locator is fed by ORing the syndromes of all registers.
* The code is SEC only. Twelve bits per 8-bit register leave no room for an
  extra parity bit for double-error detection.
* The filter is in direct form, with the input registered and the SOP
  combinational. This matches the flip-flop counts quoted for the scheme, for
  example 72 for the 5-tap 8-bit filter and 228 for the 4-channel one.
* Reset is asynchronous and active low. It clears the delay line to the
  all-zero word, which is a valid codeword.
* Samples are signed, and all parallel channels share one coefficient set.
* The constant multipliers are plain `*` operators, left to synthesis.
* The upset ports are an addition for fault injection.

Not included: the transposed FIR form, which none of the protection schemes
uses; the unprotected, triple-modular-redundancy and
encoder/decoder-per-register Hamming filters that the scheme is measured
against. No timing or area figures were produced for a target library beyond
the flip-flop counts.
