# A multiplier-free OFDM receiver: 64-point radix-4 FFT on CORDIC rotations

An OFDM symbol carries one data value on each of many orthogonal subcarriers, and
the receiver recovers those values with an FFT. This design is a complete 64-point
OFDM receiver in which the FFT uses no multiplier. Twiddle factors are not stored
as cosine/sine pairs: a small ROM holds only their **angles**, and a pipelined
CORDIC rotator turns each butterfly output through that angle using shifts and
additions. The same CORDIC structure serves as an on-chip sine/cosine generator.
The receiver can use it to make its own test symbol, a pure tone, and check
itself.

The design follows a published VLSI architecture for an OFDM receiver. That
architecture fixes the block diagram, the CORDIC iteration, the sine/cosine
generator with its 16-bit ports, the radix-4 butterfly with memory banks used in
place, and the 64-point size. Much of the rest is this design's own: widths,
handshakes, the bank addressing, sequencing, the decoder's modulation and the P/S
format. The section "What comes from the architecture and what was chosen here"
lists these choices.

## Data flow

```
              +--------------+   angle   +-------------+  cos,sin  +------------+
              | control_unit |---------->| sincos_gen  |---------->| trunc_data |
              +--------------+           +-------------+           +------------+
                 | phase, wsel                                            | test tone
                 v                                                        v
 in_sample ->  +----------+  +----------+  +-----------------------+  +------------+
 (valid/ready) | selector |->| addr_gen |<>| fft_pingpong_mem:     |  |            |
               +----------+  |  + sync  |  | 2 x fft_memory (4 bks)|  |            |
                             |          |  +-----------------------+  |            |
                             |          |<>| fft_processor         |  |            |
                             |          |  | r4_butterfly + 3 x    |  |            |
                             |          |  | (angle ROM, CORDIC)   |  |            |
                             +----------+  +-----------------------+  +------------+
                                  | X[k], k = 0..63
                                  v
                             +---------+     +-----+
                             | decoder |---->| p2s |----> ser_bit
                             +---------+     +-----+
```

Each symbol passes through three steps, stepped by `control_unit`:

1. **Load**: 64 complex time-domain samples go into one of the two memory sets
   of `fft_pingpong_mem`, in natural order. They come either from the input port
   (valid/ready handshake) or, in test mode, from the sine/cosine generator.
2. **FFT** (`PH_FFT`): three radix-4 passes, done in place in the other memory
   set by a single pipelined butterfly unit.
3. **Out** (`PH_OUT`): the 64 subcarriers are read in natural order. Each is
   shown on the `fft_*` ports, turned into two QPSK bits and sent out serially.

Loading runs on its own sequence (`LD_START` → `LD_FILL` → `LD_FULL`), beside the
FFT side's `PH_IDLE` → `PH_FFT` → `PH_OUT` → `PH_IDLE`. So symbol n+1 is loaded
while symbol n is transformed and read out. When the load set is full and the FFT
side is idle, the two sets swap roles (`wsel` toggles) in one clock: the FFT of
the new symbol starts and the next load begins. A full set waits while the FFT
side is busy (`swap_wait`); the FFT side waits in `PH_IDLE` while a load is still
running. `test_mode` and `tone_bin` are sampled in `LD_START`, the first clock of
each load.

## The CORDIC datapath

`cordic_stage` is one rotation-mode iteration. The sign of the residual angle z
picks the direction d (+1 for z >= 0):

```
x' = x - d*(y >>> i)     y' = y + d*(x >>> i)     z' = z - d*atan(2^-i)     i' = i + 1
```

Each coordinate is negated (or not) before the shift, as in the basic-block
structure. The arctangent table is given to 32 bits and rounded to the angle
width. The stage is combinational. `cordic_pipeline` chains `ITER` = 16 stages
with a register after each one, so it accepts a new vector on every enabled clock.
Its output is the rotated vector times the CORDIC gain K ≈ 1.6468.

Angles are unsigned fractions of a turn: 2^16 units per 360°, so `16'h2000` is
45°. CORDIC converges only for |z| < 99.7°. Both users therefore first fold an
angle in the second or third quadrant: they subtract 180° and negate the start
vector. Inside, the angle has 4 extra fraction bits, so the rounding errors of the
table entries do not add up.

**`sincos_gen`** has the ports of the architecture's generator: `Ain[15:0]`,
`clk`, `ena`, `cos[15:0]` and `sin[15:0]`. It rotates the start vector
(1/K, 0), so K cancels and no scaling step is needed. The outputs are Q1.15,
rounded and saturated, and 45° gives `16'h5A82` on both. Latency is `ITER + 2`
= 18 enabled clocks. There is no reset, because the generator has none.

**`cordic_rotator`** is the twiddle multiplier. It rotates a data sample
(x + jy) through an angle, which multiplies it by exp(j·angle). Here the start
vector is data, so K cannot be cancelled in advance. It is removed afterwards by
a fixed shift-and-add:
1/K ≈ 2^-1 + 2^-3 − 2^-6 − 2^-9 − 2^-12 + 2^-14 + 2^-16 − 2^-20 (error < 1e-6).
Two integer guard bits hold the growth of up to K·√2 inside the rotator. The
result is rounded and saturated to 16 bits. Latency is `ITER + 2` = 18 clocks.
Across random inputs and angles the error is at most 3 LSB.

## The radix-4 FFT

### Butterflies and twiddles

The transform is a radix-4 decimation-in-frequency FFT. Pass s (s = 0, 1, 2) uses
span = 4^(2−s): 16, then 4, then 1. Its 16 butterflies each take four points:

```
i_m = g*4*span + j + m*span        m = 0..3,  j = 0..span-1,  g = group
```

`r4_butterfly` forms y_m = Σ_n a_n·(−j)^(mn). Multiplying by ±j only swaps the
real and imaginary parts and changes a sign, so this step uses adders only. Each
output is divided by 4 with rounding, so the whole transform gives X[k]/64 and
cannot overflow. `fft_processor` then multiplies y_m by W_64^(m·j·4^s). It looks
up the exponent in `twiddle_angle_rom`, where entry e = −e·2^16/64 mod 2^16, and
rotates by that angle in `cordic_rotator`. Output 0 always has twiddle W^0 and
goes through a matching delay line. The unit accepts one butterfly per clock and
delivers it 19 clocks later (1 for the adds and ROM read, 18 for the rotation).
A tag with the four point indices travels along with the data.

### Conflict-free in-place memory

`fft_memory` holds one symbol in four banks, each a two-port RAM of 16 complex words with one
read port and one write port. All four points of a butterfly must be read in one
clock, and its four results written back to the same locations (in place).
Point `idx` is stored at

```
bank = (sum of the base-4 digits of idx) mod 4        word = idx >> 2
```

The four points of any radix-4 butterfly differ in exactly one base-4 digit, so
their digit sums differ mod 4 and they fall in four different banks, in every
pass. The memory has four lanes, given in the butterfly's point order, and routes
each lane to its bank and back. Read data arrives one clock after the request. An
assertion checks that two enabled write lanes never map to one bank. Single
points are loaded and read out on lane 0.

`fft_pingpong_mem` holds two such memories: 2N complex points, or 4N real words. The set selected
by `wsel` takes a separate one-point load port; the other set takes the four-lane
FFT port, for the butterflies and for the read-out. Read data follow the set
selected when the read was issued.

### Sequencing a pass: `addr_gen`

The address generator and synchronization unit produces every address:

* **Load:** while `ld_en` is high, each accepted sample is written through the
  load port to the next point, 0..63 in order. After the 64th, `ld_full` is high
  and further samples are ignored until `ld_en` drops. This runs at the same
  time as the FFT and output work below, on the other set.
* **FFT:** one butterfly read is issued per clock. One clock later the data
  arrives, and the unit sends it to the FFT processor together with the pass
  number, j and the index tag. Results come back 19 clocks later and are written
  to the indices in their tag. Pass s+1 reads what pass s wrote. So after the 16
  butterflies of a pass are issued, the unit holds the next pass until every
  result is written back (`drain_stall`). A pass takes 16 + 21 = 37 clocks, and
  the FFT phase takes 3 × 37 = 111 clocks in all. The butterflies themselves take
  48 = (N·log4 N)/4 issue clocks.
* **Out:** DIF leaves X[k] at the base-4 digit-reversed position of k, so output
  k reads point `digit_rev4(k)`. Only one point is in flight at a time. A read
  is issued when the P/S can take a word, and the next one after the decided
  word has been accepted.

## Input, test tone and output

* `selector` passes either the input port or the generated sample into the
  memory. `control_unit` latches the source per symbol.
* In test mode `control_unit` drives the generator with n·tone_bin·2^16/64 for
  n = 0..63, one angle per clock. It delays a valid bit by the generator's 18
  clocks. `trunc_data` packs cos into the real part and sin into the imaginary
  part, and halves both with an arithmetic shift (truncation). The loaded symbol
  is therefore exp(j2π·tone_bin·n/64)/2. Its FFT is a single line of 16384
  (0.5 in Q1.15) at bin `tone_bin`, with zero elsewhere.
* `decoder` makes Gray QPSK hard decisions: `bits[0]` = real part < 0 and
  `bits[1]` = imaginary part < 0, registered.
* `p2s` shifts each 2-bit word out with bit 0 first, marking the first bit of a
  symbol (`ser_first`) and the last (`ser_last`). Its `in_ready` is already high
  while the last bit is being sent.

## Top-level interface (`ofdm_receiver`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of all control state |
| `test_mode`, `tone_bin` | in | 1, 6 | source of the next symbol: tone at `tone_bin` when 1 |
| `in_valid`, `in_ready`, `in_sample` | in/out/in | 1, 1, 32 | time-domain samples `{re, im}`, Q1.15; a sample moves when both valid and ready are high |
| `fft_valid`, `fft_k`, `fft_data` | out | 1, 6, 32 | X[k]/64 for k = 0..63 in order |
| `ser_valid`, `ser_bit`, `ser_first`, `ser_last` | out | 1 each | decided bits, 128 per symbol |
| `ld_state`, `phase` | out | 2, 2 | status: load sequence, FFT-side phase |
| `drain_stall`, `swap_wait`, `symbols` | out | 1, 1, 16 | status: waiting between passes; a full set waiting for the FFT side; symbols done |

The complex type `cplx_t` (`{re, im}`, 16 bits each), the two state enums and the
shared constants are in `ofdm_pkg`.

Timing of one symbol at the default size:

| step | clocks |
|---|---|
| load from input | 64 accepted samples (+1 start clock) |
| load of a test tone | 1 + 64 + 18 |
| FFT | 111 (three passes of 16 issue + 21 drain clocks), plus 1 to enter it |
| out | 4 per subcarrier, 256 (one point in flight; the two serial bits take 2 of the 4) |

Since loading overlaps the other two steps, a steady stream of symbols is limited
by FFT plus output: one symbol every 369 clocks (measured), while a load needs only 65.

## What comes from the architecture and what was chosen here

From the architecture:

* the block structure and connections;
* the CORDIC basic block: sign test, negate/mux, shift by i, arctangent table,
  +1 on i;
* the cascade of n blocks;
* the sine/cosine generator with start vector (1/K, 0), 16-bit `Ain`/`cos`/`sin`,
  and `clk`, `ena` ports;
* twiddles kept as angles in a ROM and applied by CORDIC;
* the radix-4 butterfly;
* r banks of two-port memory used in place;
* the 64-point size;
* (N·log4 N)/4 = 48 butterflies per transform.

Chosen here, because the architecture leaves them open:

* 16-bit data, 16 CORDIC iterations and all guard bits;
* angles as 2^16 units per turn;
* full pipelining of the CORDIC;
* gain correction by shift-and-add in the rotator;
* scaling by 1/4 per pass;
* the digit-sum bank mapping;
* the stall between passes;
* the load/FFT/out sequencing, the swap rule of the two memory sets and every
  handshake;
* the sine/cosine generator used as a self-test tone source through the selector;
* QPSK as the decoder's modulation;
* the P/S word format.

Where the design departs from the architecture:

* **Memory organisation.** The architecture sizes memory at 4N words: 2N for
  input and 2N for output. This design also has 4N words, as two complete
  in-place memories of N complex points each, used alternately: one is loaded
  while the other is transformed and read out. The output is read from the
  memory in which the FFT ran, not from a separate output buffer.
* **The link from the FFT processor to the sine/cosine generator.** It is
  taken to mean that the two share the CORDIC structure. No signal runs between
  them.
* **Scope.** Receiver functions the architecture does not describe are not
  included: no cyclic-prefix removal, synchronization to a received frame,
  channel estimation or equalization.

## Accuracy and verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. Expected values are
computed independently in the testbench, mostly in double precision. Measured
accuracy:

* sine/cosine within 4 LSB of Q1.15, and 45° exact to ±1 LSB;
* twiddle rotation within 3 LSB;
* a whole butterfly within 6 LSB;
* the whole 64-point FFT within 48 LSB of the ideal DFT/64. In practice the
  values for a QPSK symbol scaled to ±683 come out at ±682..683.

`tb_ofdm_receiver` runs six symbols back to back at the default size. They
alternate between test tones (bins 5, 63, 0) and QPSK symbols built in the
testbench by an inverse DFT, and one input stream has random gaps. For every
symbol it checks:

* all 64 FFT outputs against a DFT of the samples actually loaded;
* all 128 serial bits;
* 48 butterflies;
* an FFT phase of exactly 111 clocks.

It also counts the source switches, input gaps, stalls between passes,
serial-line backpressure, loads that overlap the FFT side, full sets waiting
for the swap and the FFT side waiting for a load (a long input pause before the
fifth symbol), and fails if any of them never happened.

Simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`, package
first:

```
verilator --binary --timing --assert -y rtl rtl/ofdm_pkg.sv tb/tb_ofdm_receiver.sv \
          --top-module tb_ofdm_receiver -o sim && ./obj_dir/sim
```

Use the same command with any other `tb_<module>` for a unit test. Every RTL file
passes `verilator --lint-only -Wall`, with only unused-bit warnings left, and
elaborates in Yosys through its slang front end.

## Changing it

* `ofdm_pkg` holds `FFT_N`, `DATA_W`, `ANGLE_W` and `CORDIC_IT`. `FFT_N` must be
  a power of 4. The pass count, bank depth and index width follow from it.
* The end-to-end testbench and the bank mapping assume radix 4. The 4-lane memory
  interface and the butterfly equations are written for radix 4.
* `trunc_data.SHIFT` sets the test-tone amplitude.
* `decoder` is the place to add another constellation. The `PW` of `p2s` must
  then match its bits per subcarrier.
