# FM0 and Manchester bi-phase line encoders

Two small serial line encoders of the kind used on RFID air interfaces and
other links that must carry their clock inside the data and stay DC-balanced.
Both are *bi-phase* codes: every data bit is sent as two half-bits, and the
line always changes level at least once per bit, so a receiver can recover
the bit timing from the signal and the long-run average level stays at one
half.

- **Manchester**: a 0 is sent high-then-low, a 1 low-then-high. The
  transition in the middle of the bit carries the data.
- **FM0** (bi-phase space): the level always changes at the start of a bit;
  a 0 adds a second change in the middle of the bit, a 1 does not. The
  output depends on the data *and* on the level the previous bit ended at, so
  FM0 needs state.

The two encoders are separate circuits, placed side by side in
`line_code_top`. They share a clock and a reset and nothing else. A combined
datapath that reuses logic between the two codes is not part of this design.

## Timing convention: the bit clock

Both encoders are described in terms of a bit clock, CLK, that is high in
the first half of each bit and low in the second half. The Manchester output
is literally `data XOR CLK`, and the FM0 output multiplexer is selected by
CLK. Feeding a clock net into logic is poor practice, so here every module
runs on a **system clock at twice the bit rate**, and CLK is a flip-flop
(`bit_clk`) that toggles on every system clock edge:

```
system clk cycle   0    1    2    3    4    5  ...   (cycle 0 = first after reset)
bit_clk            1    0    1    0    1    0
half-bit           1st  2nd  1st  2nd  1st  2nd
```

Each encoder has its own `bit_clk` register, reset to the first-half phase,
so each can be used on its own. Reset (`rst`) is synchronous and active
high in both.

## FM0 encoder (`fm0_encoder`)

### State machine

The FM0 encoder is a four-state machine. Each state's code is the pair of
half-bit levels it puts on the line, written {first half, second half}:

| state | code | next on 0 | next on 1 |
|-------|------|-----------|-----------|
| S1    | 11   | S3 (01)   | S4 (00)   |
| S2    | 10   | S2 (10)   | S1 (11)   |
| S3    | 01   | S3 (01)   | S4 (00)   |
| S4    | 00   | S2 (10)   | S1 (11)   |

Read the table through the two rules. The next first half-bit is always the
inverse of the current second half-bit (the change at the bit boundary). The
next second half-bit equals that first half-bit for a 1 and is its inverse
for a 0 (the change in the middle).

### Two flip-flops and a multiplexer

Because the next state depends only on the current *second* half-bit and
the data, the table reduces to:

```
DFF1 (second half-bit) <= x XOR DFF1
DFF2 (first half-bit)  <= NOT DFF1
fm0_out = bit_clk ? DFF2 : DFF1
```

Check: if DFF1 = b, the new pair is {~b, b ^ x}. The two halves are equal when x = 1 and differ when x = 0, and
the first half always differs from the old second half b.

DFF1 and DFF2 load once per bit, on the system clock edge that ends a
second half-bit (the rising edge of `bit_clk`). The output `x_take` is high
in the cycle that ends with that edge: **drive `x` during the `x_take`
cycle**. The bit sampled there is transmitted in the next two cycles, so
FM0 has a latency of one bit period.

Reset puts the encoder in S1 (both half-bits high). The line therefore
idles high for the first bit period after reset, and the first data bit
starts with a fall.

The module carries two concurrent assertions of the coding rules: the
output changes at every bit boundary, and changes in mid-bit exactly when
the bit is 0.

### Ports

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1 | system clock, two cycles per bit |
| `rst`        | in  | 1 | synchronous active-high reset to S1 |
| `x`          | in  | 1 | data bit, sampled at the end of an `x_take` cycle |
| `bit_clk`    | out | 1 | bit clock, high in the first half-bit |
| `x_take`     | out | 1 | sampling strobe (`~bit_clk`) |
| `fm0_out`    | out | 1 | FM0 line output |
| `state`      | out | 2 | {DFF2, DFF1} as `fm0_state_t` |
| `next_state` | out | 2 | what the flip-flops will load next |

## Manchester encoder (`manchester_encoder`)

### Output

The line output is combinational:

| x | bit_clk | z |
|---|---------|---|
| 0 | 0 | 0 |
| 0 | 1 | 1 |
| 1 | 0 | 1 |
| 1 | 1 | 0 |

With `bit_clk` high in the first half this gives 0 = high/low and
1 = low/high. There is no latency: `x` must be set at the start of a bit
(cycle with `bit_clk` = 1) and **held for both cycles of the bit**; `z`
follows it in the same cycle. A glitch on `x` appears on `z`, just as it
would through the plain XOR gate this describes. The output `code` gives
the two half-bits of the current bit at once, `{~x, x}`, and reads 00
while reset is asserted.

### The S0..S3 state machine

A binary-encoded FSM steps on every system clock edge (every half-bit) with
the data as input:

| state | code | next on 0 | next on 1 |
|-------|------|-----------|-----------|
| S0    | 00   | S2 | S1 |
| S1    | 01   | S3 | S0 |
| S2    | 10   | S0 | S3 |
| S3    | 11   | S1 | S0 |

It does not drive the line; it tracks the half-bit sequence. With the data
held over each bit, the machine is in S0 in every first half-bit and in S1
(a 1) or S2 (a 0) in every second half-bit, and returns to S0 at each bit
boundary. It enters S3 only when the data changes in the middle of a bit
(S1 on 0, or S2 on 1), i.e. when the input breaks the timing rule above.
`state` and `next_state` are brought out so the sequence can be observed;
nothing else in the design acts on S3.

### Ports

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1 | system clock, two cycles per bit |
| `rst`        | in  | 1 | synchronous active-high reset to S0 |
| `x`          | in  | 1 | data bit, held for the whole bit |
| `bit_clk`    | out | 1 | bit clock, high in the first half-bit |
| `z`          | out | 1 | Manchester line output |
| `code`       | out | 2 | {first half, second half} = {~x, x}; 00 in reset |
| `state`      | out | 2 | FSM state as `man_state_t` |
| `next_state` | out | 2 | FSM next state |

## Top level (`line_code_top`)

Instantiates one of each encoder on a shared `clk` and `rst` and brings all
their ports out with `fm0_` and `man_` prefixes. It has no parameters.
Shared enum types live in `line_code_pkg`.

## Where this departs from the encoders' original description, and why

- **Bit clock as a register.** The encoders were described with the bit clock
  driving an XOR gate and a multiplexer select directly. Here it is a
  toggling flip-flop on a double-rate clock. The logic function is the same.
  The difference is that everything is synchronous to one clock edge.
- **FM0 sampling point and latency.** The flip-flops load at the rising edge
  of the bit clock, so each bit comes out one bit period after it is
  sampled. This follows from both flip-flops being clocked by the bit clock.
  The exact data set-up window (`x_take`) is this design's choice.
- **Reset.** Polarity and timing were not specified. A synchronous
  active-high reset is used. The reset states (S0 for Manchester, S1 = 11 for
  FM0) match the state values shown right after reset in reference runs of
  both encoders.
- **Manchester FSM role.** No output column was given for the S0..S3
  machine. It is implemented exactly as tabulated, stepping once per
  half-bit. The interpretation above (S3 = data changed in mid-bit) follows
  from the table and from a reference run in which the state alternated
  00, 01, 00, 10, 00, 01 for the data 1, 0, 1.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb/tb_fm0_encoder.sv`: a directed sequence (0,0,1,0,0,1,1,1 from reset)
  takes all eight state/bit transitions, followed by random bits and a reset
  in mid-run. Every half-bit is checked against its own copy of the
  transition table: state, next state, output level, bit clock phase and
  strobe. The recorded line stream is then checked against the coding rules.
- `tb/tb_manchester_encoder.sv`: random bits, with occasional mid-bit
  changes to reach S3, and a mid-run reset. It checks the line level, the
  code word, the bit clock, and the FSM state and next state against its own
  table, and requires all eight transitions to occur.
- `tb/tb_line_code_top.sv`: the end-to-end test of the top at its
  defaults.
  - It first replays two reference runs. FM0 is sent 0,1,1,0,1,0,1 after
    reset and must pass through states 01, 00, 11, 01, 00, 10, 11.
    Manchester is sent 1,0,1 and must show states S0,S1,S0,S2,S0,S1 and
    code words 01, 10, 01.
  - It then streams 2000 random bits through both encoders and decodes the
    two line signals with independent receiver models. This checks the
    one-bit FM0 latency and the zero-latency Manchester output.
  - It counts FM0 bits with and without a centre transition, Manchester
    mid-bit violations (S3), state visits and resets, and fails if any of
    them never occurs.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_line_code_top \
    rtl/line_code_pkg.sv rtl/fm0_encoder.sv rtl/manchester_encoder.sv \
    rtl/line_code_top.sv tb/tb_line_code_top.sv
./obj_dir/Vtb_line_code_top
```

Replace the top module and the testbench file to run the block tests.
All RTL files are clean under `verilator --lint-only -Wall`.

## Size

After generic synthesis, the complete top is 6 flip-flops: two bit clocks,
two FM0 state bits and two Manchester FSM bits. The rest is a handful of
XOR, inverter, multiplexer and compare cells.
