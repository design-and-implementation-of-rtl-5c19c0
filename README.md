# Pipelined soft-decision Viterbi decoder, K = 7, rate 1/2 with puncturing

A Viterbi decoder corrects the errors a noisy channel puts into a
convolutionally coded bit stream. It keeps, for each of the 64 possible states
of the encoder, the cheapest path through the trellis that ends in that state.
Once a whole frame has been received, it follows the cheapest path backwards and
reads the data bits off it.

This design decodes the industry-standard K = 7 code, with generators 171 and
133 (octal), from 3-bit soft decisions. Its decoding method has two features of
its own:

- **A register inside the add-compare-select loop.** The loop is the critical
  path of any Viterbi decoder. The register splits it in two, so the clock can
  run faster, at the price of two cycles per trellis step.
- **Bits recovered through a next-state table.** After traceback has stored
  the most likely state sequence, the data bits are not taken straight from the
  state bits. Each step of the path is looked up in a small writable
  "next-state ROM", and the input that leads to the recorded next state is the
  decoded bit.

Around the decoder sit the matching transmit side (encoder and puncturer) and
the receive front end (soft quantiser and depuncturer). Together they make a
complete coded link at rates 1/2, 2/3, 3/4, 5/6 and 7/8.

## The code and its trellis

The encoder is a 6-bit shift register. Each input bit `u` produces two code bits:

    c1 = parity of {u, s} & 1111001   (G1 = 171 octal)
    c0 = parity of {u, s} & 1011011   (G2 = 133 octal)

The masks apply to the 7-bit word formed by the input followed by the six
stored bits, newest first.

The state convention used throughout is that **bit 5 of the state holds the
newest input**. The next state is therefore `{u, s[5:1]}`, and the oldest bit
`s[0]` falls out. From this it follows that:

- state `s` has the two predecessors `{s[4:0], 0}` and `{s[4:0], 1}`;
- the decision bit stored for a state is exactly the bit that traceback
  shifts back in at the bottom.

A code pair is always written `{c1, c0}`. Index 3 of a branch-metric vector is
the pair "11".

The package `viterbi_pkg` holds everything derived from the code:

- the constants;
- `enc_out`, `next_state`, and `rom_word` (one next-state table entry);
- `pm_greater` (see "Path-metric arithmetic" below);
- the puncturing matrices.

## Data path of the decoder

```
soft0,soft1,er0,er1 -> BMU -> [reg] -> ACSU (32 butterflies, loop register) -> [reg] -> SMU -> bits
                                              \-> min metric select ---------/
```

### Branch metrics (`bmu`)

Each received code bit arrives as a level from 0 (surely 0) to 7 (surely 1).
The distance of level `r` from an ideal 0 is `r`, and from an ideal 1 it is
`7 - r`. The metric of a branch is the sum over both code bits, 0 to 14.

This measures distance separately along each axis of the 8 x 8 plane of
received pairs. It needs only inversions and a 3-bit adder, with no
multiplier. A code bit flagged as erased (punctured) adds 0 for both
hypotheses, so it cannot favour either one.

### Add-compare-select (`acs_node`, `acs_butterfly`, `acsu`)

States `{x,0}` and `{x,1}` feed the same two successors, `{0,x}` and `{1,x}`:
this is a butterfly. There are 32 butterflies, and each holds two ACS nodes.
The branch into `{1,x}` from `{x,0}` carries the complementary code word of the
branch into `{0,x}`, so each butterfly needs only two distinct branch metrics.

An ACS node works as follows:

1. It adds the branch metric to each of the two predecessor metrics (8-bit
   adders).
2. **The two sums are registered.** This is the loop register.
3. In the next cycle it compares the sums and keeps the smaller.
4. It outputs a decision bit that says which predecessor won. 1 means the
   predecessor with oldest bit 1. On a tie the node keeps predecessor 0.

The ACSU stores the 64 winners and feeds them back as the next step's
predecessor metrics. Because of the loop register, one trellis step occupies
two clock cycles:

| cycle | what happens |
|---|---|
| 1 | adders produce sums, which are registered |
| 2 | compare and select; the winners are written back to the metric store |

A new set of branch metrics may therefore arrive at most every second cycle,
and an assertion checks this. The input handshake of the decoder enforces it:
`in_ready` drops for the cycle after each accepted pair.

At the start of each frame, state 0 gets metric 0 and every other state gets
`INIT_PM` (32). The encoder is known to start in state 0, and the offset lets
the correct path win early without forbidding the others outright.

### Path-metric arithmetic

Metrics are 8 bits wide and are never normalised: they simply wrap modulo 256.
Two metrics are compared by the sign of their 8-bit difference, `a > b` when
`a - b` is non-zero and its top bit is clear.

This gives the right answer as long as any two metrics that matter differ by
less than 128. For this code, every state is reachable from every other one in
six steps. Within a frame, live metrics therefore stay within
6 x 14 = 84 of the best one, plus the initial offset of 32, which is 116 < 128.
The same wrapped comparison is used in the minimum-metric tree
(`min_metric_select`).

If you widen the soft decisions or raise `INIT_PM`, recheck this bound.

### Minimum-metric selection (`min_metric_select`)

This is a six-level comparison tree over the 64 new metrics. On a tie the
lower-numbered state wins. Its result is registered together with the decision
word. Traceback uses it as its starting state only when the decoder is built
with `TERMINATED = 0`. By default, frames end with six zero tail bits, so the
last state is known to be 0 and traceback starts there.

## Survivor memory management (`smu`)

The SMU works on one whole frame at a time. A frame is `DEPTH = NBITS + 6` = 41
steps: 35 data bits and 6 tail bits. The SMU is built from five blocks:

- **`survivor_mem`** – 41 words of 64 decision bits, one word per step. Writes
  are synchronous and reads are asynchronous.
- **`traceback`** – starts from the final state and walks from step 40 down to
  step 0, one step per clock. At each step it reads the decision bit `d` of the
  current state, stores the current state in the ML-path memory, and moves to
  the predecessor `{cur[4:0], d}`. After 41 cycles the ML path, the state after
  every step, is complete.
- **`next_state_rom`** – 64 words of 16 bits. The word for state `s` is
  `{next state for input 0, code for input 0, next state for input 1, code for input 1}`.
  It is a writable memory. When write enable is high, a multiplexer replaces
  the read address with the write address.
- **`rom_loader`** – fills the ROM in the 64 cycles after reset, computing each
  word from the generators. `rom_ready` goes high when it is done. Decoding of
  a frame waits for `rom_ready`.
- **`decode_block`** – walks the ML path forward, starting from state 0. For
  each of the 35 data steps it reads the ROM word of the current state and
  compares both next-state fields with the next state recorded in the path. A
  match on the input-1 field yields data bit 1, and a match on the input-0
  field yields 0. If neither matches, `mismatch` is raised with that bit. This
  cannot happen for a path produced by the traceback, so it is a consistency
  alarm.

Traceback starts in the cycle after the last decision word is written. The
decode starts when traceback is done. The first decoded bit appears
`DEPTH + 5` cycles after the last decision write. Bits then follow one per
cycle, with `out_last` on the 35th. The SMU is busy from the last write until
`out_last`. Only in that final cycle may the next frame's first decision word
arrive, and an assertion checks this.

## Puncturing and erasures (`puncturer`, `depuncturer`)

Higher rates are obtained by not sending some code bits. A 2 x P matrix says,
column by column, whether `c1` (row 1) and `c0` (row 2) of each step are sent:

| rate | row c1 | row c0 |
|---|---|---|
| 1/2 | 1 | 1 |
| 2/3 | 10 | 11 |
| 3/4 | 101 | 110 |
| 5/6 | 10101 | 11010 |
| 7/8 | 1000101 | 1111010 |

The column counter restarts at the first step of each 41-step frame, and the
rate is sampled there. A frame is therefore always punctured and depunctured
with one rate and in the same phase on both sides. The two sides take the rate
on separate ports (`tx_rate`, `rx_rate`), which must agree frame by frame.

On the transmit side, `tx_keep` marks which bits of each pair go on the line.
On the receive side, the depuncturer takes one soft value per transfer. For
each step it takes one or two values, as the matrix says, and places them in
the `c1` and `c0` positions. Where a bit was never sent, it sets the erasure
flag and supplies a placeholder level of 0, which the flag makes irrelevant.
The decoder's BMU then gives that bit zero weight. Back-pressure from the decoder stalls the depuncturer through
`in_ready`, and through it the `rx_ready` of the top.

## Soft quantiser (`soft_demod`)

The quantiser takes a signed 8-bit sample in which +64 nominally means 1 and
-64 means 0. It divides the sample into eight equal zones of width 16 and
clamps the ends, giving levels 0..7. The analog receive chain in front of it is
not part of the design.

## Top level, interfaces and timing (`viterbi_system_top`)

| port group | signals | timing |
|---|---|---|
| transmit in | `tx_rate`, `tx_valid`, `tx_bit` | one data bit per valid cycle; 35 data bits then 6 zero tail bits per frame |
| transmit out | `tx_code_valid`, `tx_code[1:0]`, `tx_keep[1:0]` | two cycles after `tx_valid` |
| receive in | `rx_rate`, `rx_valid`, `rx_ready`, `rx_sample` | valid/ready; one sample per transfer, `c1` before `c0` |
| receive out | `rx_bit_valid`, `rx_bit`, `rx_mismatch` | decoded bits in order, one per cycle |
| frame out | `rx_data_valid`, `rx_data[34:0]` | one cycle pulse after the 35th bit; bit 0 = first bit sent |

Reset is synchronous and active high. After reset the ROM loader needs 64
cycles, which overlap with receiving the first frame.

The decoder accepts at most one trellis step every two cycles. After the last
step of a frame, the first decoded bit appears 49 cycles (`DEPTH + 8`) later,
and the 35 bits take 35 more cycles. Frames are not overlapped. While a frame
is traced back and decoded, `in_ready` stays low, and it returns with the
frame's last output bit.

Parameters with defaults:

| module | parameter | default | meaning |
|---|---|---|---|
| `viterbi_system_top` | `NBITS` | 35 | data bits per frame |
| `viterbi_system_top` | `SAMPLE_W` | 8 | received sample width |
| `viterbi_decoder` | `TERMINATED` | 1 | 1: traceback from state 0; 0: from the best-metric state |
| `viterbi_decoder` | `INIT_PM` | 32 | start metric of states other than 0 |

## Where this design departs from, or adds to, its source description

This design follows a published description of an FPGA Viterbi decoder. The
following points are its own, or differ from that description:

- **Loop register placement.** The description places a storage element in the
  ACS feedback loop. Here it is an edge-triggered register between the adders
  and the comparator. As a result, a trellis step takes two cycles.
- **Branch metric.** The description mentions both Euclidean and Hamming
  distances for the branch metric. This design uses the per-axis soft distance
  described above.
- **Puncturing in hardware.** In the description, puncturing is done only in
  software simulation. This design adds a hardware puncturer and depuncturer,
  with the standard matrices for all five rates, so that the punctured modes
  can run on the RTL.
- **Tail bits.** Frames of 35 data bits are closed by 6 zero tail bits, so
  that the path ends in state 0.
- **Other interface details.** The following are all this design's own:
  - the handshakes;
  - the frame-at-a-time sequencing;
  - the initial metric offset;
  - wrapping metric arithmetic in place of normalisation;
  - the ROM word layout and loader;
  - the `mismatch` flag;
  - the `TERMINATED = 0` option;
  - the quantiser zone width.
- **Table values.** The next-state table is computed from the generators.
  The source's printed table agrees with them in 127 of 128 entries. For
  state 111110 with input 1 it prints the output pair 10, where the
  generators give 00; the generator value is used.
- **FPGA results.** No device-specific resource or clock-rate figures are
  claimed here.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The expected values
come from independent reference models in `tb/tb_ref_pkg.sv`:

- a bit-level encoder written from the printed generator polynomials;
- a complete software Viterbi decoder that uses the same metric conventions,
  including wrapping and tie rules;
- a reference traceback.

The main testbenches:

- **`tb_viterbi_system_top`** (end to end, default parameters). It sends 30
  frames through encoder and puncturer and over a modelled AWGN channel, at
  all five rates and noise levels from none to heavy. Each decoded frame is
  compared bit-exactly with the reference decoder, and with the sent data
  when the channel is noiseless. It also counts the following, and fails if any of
  them never happens:
  - stalls;
  - erasures reaching the decoder;
  - frames in which errors were corrected;
  - each of the five code rates;
  - back-to-back frames (the decoder restarting for a new frame).

  It also fails if the decode block ever raises `mismatch`.
- **`tb_ber_sweep`**. It measures bit error rate against Eb/N0 from 1 to 7 dB
  at rates 1/2, 2/3 and 3/4, over 1000 frames per point, with every frame also
  checked against the reference decoder. Eb/N0 is per data bit, so the
  punctured rates see less noise per channel bit. Measured decoded BER
  (35,000 bits per point; 0 means no error observed):

  | Eb/N0 | rate 1/2 | rate 2/3 | rate 3/4 |
  |---|---|---|---|
  | 1 dB | 0.0335 | 0.0447 | 0.0633 |
  | 2 dB | 0.0038 | 0.0097 | 0.0183 |
  | 3 dB | 0.0005 | 0.0012 | 0.0041 |
  | 4 dB | 0 | 0.0001 | 0 |
  | 5-7 dB | 0 | 0 | 0 |
- **`tb_viterbi_decoder`**. It also checks the output latency (`DEPTH + 8`)
  and the `TERMINATED = 0` variant.

To simulate one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/viterbi_pkg.sv tb/tb_ref_pkg.sv tb/tb_viterbi_system_top.sv \
    --top-module tb_viterbi_system_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run any other one. Testbenches that do not use
the reference models still compile with `tb_ref_pkg.sv` on the command line.
