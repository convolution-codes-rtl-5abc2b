# Rate-1/2 convolutional code link with a Viterbi decoder

This design sends a stream of information bits over a noisy serial line and
recovers them on the other side. A convolution encoder turns each information
bit into two channel bits, and each pair depends on the present bit and the
two before it. A hard-decision Viterbi decoder then finds the information
sequence whose encoding lies closest, in Hamming distance, to what was
received. Isolated channel errors are corrected.

The encoder, a pseudorandom channel error generator and the decoder sit side
by side in one top level, `conv_top`. They share one clock, and the encoder's
output can be looped back into the decoder for a self test.

## The code

The code has rate 1/2 and constraint length K = 3, with generator vectors
Gz1 = [111] and Gz0 = [101]:

    z1 = x(n) ^ x(n-1) ^ x(n-2)
    z0 = x(n)          ^ x(n-2)

The encoder state is the pair {x(n-1), x(n-2)}, written S00, S10, S01 or S11.
As a number it is J = 2·x(n-1) + x(n-2). Shifting in x moves state {a, b} to
{x, a}. The encoder starts in S00. The table below is the full trellis:

| from \ input | 0 → state / out | 1 → state / out |
|---|---|---|
| S00 | S00 / 00 | S10 / 11 |
| S10 | S01 / 10 | S11 / 01 |
| S01 | S00 / 11 | S10 / 00 |
| S11 | S01 / 01 | S11 / 10 |

Every state has exactly two predecessors, and they differ only in their oldest
bit. State {x, a} can be reached from {a, 0}, the *upper* one, and from
{a, 1}, the *lower* one. Only states whose first bit is 1 can be entered on an
input of 1. So once you know which state a path is in, you know the
information bit that led into it.

## Timing: one information bit every 17 clocks

Every block paces itself with its own divide-by-N counter (`bit_timer`). A
counter runs 0 … N−1. All counters leave reset together, so they stay in
step. With the default N = 17:

| count | encoder | line | decoder |
|---|---|---|---|
| 0 | — | z1 of the previous bit | ACS takes the symbol received in the last period; survivor memory writes a column (WriteMem) |
| 1 … 7 | — | z1 | trace back, one column per clock (ReadMem) |
| 7 | — | z1 | serial-to-parallel keeps z1 |
| 8 … 15 | — | z0 | trace back continues |
| 16 | samples `dataIn` (shift_en) | z0 | last trace-back step; serial-to-parallel forms `convSig = {z1, z0}` |

The period is 17 clocks because the decoder needs one clock to store a column
of decisions and then 16 clocks to trace back through the memory. It could go
faster only with a different trace-back scheme, which is not built here.
The encoder blocks also work on their own at N = 6 (z1 and z0 for three
clocks each), which is their default.

The line carries z1 for the first ⌊N/2⌋ clocks of a period and z0 for the
rest. The error generator and the serial-to-parallel converter both act on
the last clock of each half, so they never sample the line while it is
changing.

**Latency.** `dataIn` is sampled at the end of period i. Its symbol is on the
line during period i+1, and the decoded bit appears on `dataOut` in the first
clock of period i+19, marked by a one-clock `dataOut_valid` pulse. The first
pulse, in period 18, carries the bit of period 0. The line then holds the
symbol of the encoder's reset state, which decodes as a 0. After that, one
bit leaves every 17 clocks.

## The decoder

### Path metrics and add-compare-select (`acs`, `branch_metric`)

`branch_metric` gives the Hamming distance (0, 1 or 2) between the received
pair `convSig` and each of the four symbols an edge can carry. Each distance
takes two gates. For h00exp the high bit is z1&z0 and the low bit is z1^z0.

`acs` keeps one path metric H per state. Once per symbol it works out, for
each next state, the sum (predecessor H + branch metric) for its upper and
lower predecessor. It keeps the smaller sum. On a tie it keeps the upper one,
which is a fixed rule rather than a random pick. The choice goes out as one
bit per state in `came_from[3:0]`: 0 means up, 1 means down. The bits are in
trellis drawing order, not in order of J:

    came_from[0] = S00   came_from[1] = S10   came_from[2] = S01   came_from[3] = S11

After each update the smallest new metric is subtracted from all four.
Decisions depend only on differences between metrics, so this changes none of
them. It also keeps the metrics small: a few units once the start-up values are
gone. The default width W = 9 is therefore very generous. At reset H(S00) = 0 and the
other metrics are 2^(W−2). Only paths that start in S00 survive, and after
two symbols every state holds a real metric.

### Survivor memory and trace back (`survivor_mem`)

The survivor memory is a ring of TB_DEPTH+1 = 16 columns, each four bits
wide, for 64 bits in total. When a column has been written, the memory walks
backwards through it over 16 clocks:

1. Start in the state with the smallest H. On a tie, use the lowest J.
2. In state {a, b}, read this state's decision bit c from the current column,
   step back to state {b, c} and move to the previous column.
3. After 16 steps, output the first bit of the state reached. That is the
   information bit of the symbol 16 columns back.

The first 15 steps are there so that the surviving paths can merge. With a
depth of five times the constraint length they almost always have. The
decoded bit is then the same whichever state the walk started from.
`dataOut_valid` stays low until enough columns have been written for the
walk to stay inside written data, which takes TB_DEPTH+2 = 17 symbols.

An assertion checks that no new column arrives while a walk is still running.
That would happen if N < TB_DEPTH+2. `decoder_top` and `bit_timer` also check
their parameters at elaboration.

## The error generator (`error_gen`)

A 16-bit maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1, period 65535)
steps once per channel bit, not once per clock. Each step shifts in four new
bits. If the low four bits then equal 1110 (the low bits of 01110), the whole
channel bit is inverted. That gives one error per 16 channel bits on average,
which is one per 8 information bits. `err_count` counts the errors inserted.
`err_en = 0` passes the line through unchanged.

At this rate some errors land close together, and the K = 3 code cannot fix
all of those. In the system testbench, 173 channel errors over 1500 bits
leave 20 decoded bits wrong. Errors spaced at least 24 channel bits apart
were all corrected in the tests.

## Top-level interface (`conv_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, reset_n | in | 1 | common clock; asynchronous reset, active low |
| dataIn | in | 1 | information bit, sampled on the last clock of each period |
| err_en | in | 1 | enable the error generator |
| loopback | in | 1 | 1: the decoder reads the encoder output through the error generator; 0: it reads ExtDecodeIn |
| ExtDecodeIn | in | 1 | serial line from outside |
| ExtEncodeOut | out | 1 | encoder serial output |
| dataOut, dataOut_valid | out | 1, 1 | decoded bit and its strobe |
| err_count | out | 16 | errors inserted by the generator |

| parameter | default | meaning |
|---|---|---|
| TB_DEPTH | 15 | trace-back depth in symbols (five times K) |
| N | TB_DEPTH+2 = 17 | clocks per information bit |
| W | 9 | path-metric width |
| ERR_BITS | 4 | error probability 2^−ERR_BITS per channel bit |
| USE_FSM | 0 | use the table-driven FSM encoder instead of the shift register |

## Modules

    conv_top
    ├── encoder_top        bit_timer + encoder + z1/z0 output multiplexer
    │   ├── bit_timer
    │   └── conv_encoder_sr   (or conv_encoder_fsm when USE_FSM = 1)
    ├── error_gen          LFSR error inserter with its own bit_timer
    └── decoder_top
        ├── bit_timer
        ├── ser2par        serial to convSig[1:0]
        ├── acs            path metrics, came_from
        │   └── branch_metric
        └── survivor_mem   decision memory and trace back

`conv_pkg` holds the code constants, the trellis output function and the
came_from index mapping.

`conv_encoder_sr` is generic in K and in the generator vectors. Bit K−1 of a
vector is the tap on x(n), so Gz1 = [1101] is `4'b1101`. Set
`K = 4, GZ1 = 4'b1101, GZ0 = 4'b1111` and it becomes the constraint-length-4
encoder. `conv_encoder_fsm` is the same K = 3 encoder written as an explicit
Mealy table. Both put the present input bit in a register that loads on
shift_en, so the code bits for a bit stay steady for the whole following
period.

## Where this departs from a bare textbook decoder, and what is not here

- Only the K = 3, [111]/[101] decoder is built. The encoder handles other
  K, but decoders for the constraint-length-6 and -9 codes used in cellular
  systems (32 and 256 states) or for rate 1/3 are not built.
- Throughput is one bit per 17 clocks. A faster trace back, up to one bit
  every 2 clocks, is not built.
- Ties are always broken towards the upper path, and the trace back starts
  from the lowest-numbered best state. Neither choice changes the error
  performance.
- Each block recovers bit timing only from the common reset. There is no
  frame or bit synchronisation from the line itself, so an external source on
  ExtDecodeIn must be in step with the decoder's counter.
- The chip-level pad wrapper is not part of the RTL. `conv_top`'s ports are
  the pins.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The expected values are worked out
independently:

- The encoders are checked against hand-worked answers. For K = 3, data
  00001101001011 (rightmost bit first) encodes to
  11,01,01,00,10,11,11,10,00,01,01,11,00,00,00,00. For K = 4 it encodes to
  11,00,10,01,00,01,00,11,10,11,10,10,11,00,00,00,00. The input 1,0,1,1,0,0
  encodes to 11 10 00 01 01 11. Random streams are also checked against the
  equations.
- `acs_tb` runs a decoding example, received 11 11 01 00 10. Afterwards S01
  must be the only state at path distance 1. It then compares 3000 random
  steps with a reference decoder.
- `survivor_mem_tb` builds decision columns that hide a known path and checks
  that the trace back recovers it. It also checks the 17-clock timing.
- `decoder_top_tb` and `conv_top_tb` compare every decoded bit with
  `viterbi_ref_pkg`, a separate unnormalised Viterbi model written in plain
  SystemVerilog. They use error-free, sparse-error and dense-error streams.
- `conv_top_tb` runs the whole link at its default parameters. It counts
  encoder shifts, z1 and z0 on the line, inserted and corrected errors,
  metric ties, metric normalisation, decoded outputs and use of the external
  input. It fails if any of these never happens. The run takes well under a
  second.

To run one testbench with Verilator, for example the system test:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/conv_pkg.sv tb/viterbi_ref_pkg.sv tb/conv_top_tb.sv \
        --top-module conv_top_tb -o sim
    ./obj_dir/sim

For any other testbench, replace `conv_top_tb` with its name. The reference
package is needed only by `acs_tb`, `decoder_top_tb` and `conv_top_tb`.
Verilator runs two-state, so every register that is read is reset. The
survivor memory is the exception: it is not reset, and its output is marked
invalid until it has been filled.
