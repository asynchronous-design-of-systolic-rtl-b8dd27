# Delay-insensitive bit-level pipelined systolic adders

A ripple-carry adder is slow in the worst case, when a carry travels through
every bit. On random operands that case almost never happens: the longest
carry chain in an n-bit addition is about log2 n bits long on average. A
clocked adder still has to be timed for the worst case. A self-timed adder can
instead finish as soon as its carries have settled, so its average speed is
what counts.

This design builds two such adders in dual-rail, delay-insensitive threshold
logic (the "NULL convention" style). Each is a one-dimensional systolic array
with one *systole* per bit, and each systole has its own handshake. The array
is therefore pipelined at the bit level: bit *i* can take the next word while
bit *i+1* still works on the current one.

Each systole computes its carry *early* when it can. If `a == b`, the carry
out is known from the operands alone (generate or kill) and leaves before the
carry in arrives. Only propagate bits (`a != b`) wait for the carry in.

Early carry and bit-level pipelining do not mix safely on their own. An early
carry out can be acknowledged downstream, and reset to NULL, before the systole
that produced it has finished its own sum. Each systole therefore gets one
extra C-element (a 2-input Muller gate). It delays the downstream request until
the systole's own completion signal agrees, which restores delay insensitivity
and keeps the early carry. That gate is the central idea of the design (see
"The delayed request").

Two systole types are provided:

| | reduced-NCL systole | DICSA systole |
|---|---|---|
| idea | full adder in two gate levels, one handshake | Manchester carry adder: input stage (generate/kill/propagate) plus output stage, two handshakes |
| gate levels to carry out / sum | 1 / 2 | 4 / 4 (early carry: 3) |
| handshake signals | `ack`, `req` | `acki`, `acko`, `reqi`, `reqo` |
| module | `rncl_systole` | `dicsa_systole` |

Each adder can be fed its operands in one of two ways:

- **Word-wise**: all bits of a word are applied together.
- **Bit-skewed**: each bit takes its next operand as soon as its own systole is
  ready.

Bit-skewed feeding lets several words overlap in the array. The throughput then
becomes almost independent of the word length.

## Dual-rail signals and threshold gates

Every logical bit is a pair of wires `{r1, r0}` (type `dr_t` in `ncl_pkg`):

| `r1 r0` | meaning |
|---|---|
| `0 1` | DATA 0 |
| `1 0` | DATA 1 |
| `0 0` | NULL, the spacer between two data words |
| `1 1` | illegal; assertions in the systoles check for it |

Data words and NULL words alternate on every wire.

All logic is built from one gate, `ncl_thgate`. It is an M-of-N threshold gate
with hysteresis:

- The output goes to 1 when the weighted count of inputs at 1 reaches `M`.
- The output goes to 0 only when every input is 0.
- Otherwise the output holds its value.

With `M = N` the gate is a C-element, and with `M = 1` it is an OR. Per-input
weights give gates such as th34w2 (4 inputs, threshold 3, first input counting
twice).

Hysteresis is what lets a systole act as its own pipeline register. If one
input of each output gate is a request signal, the output cannot change until
the next stage asks for it. This is called embedded registration.

### Timing model

The circuit the design describes has no clock. This RTL keeps its gate netlist
but evaluates the netlist on a discrete *tick*:

- Every threshold gate is a flip-flop that takes its next value on a rising
  `clk` edge when its enable is high. Every gate therefore has one tick of
  delay.
- Each systole has one enable bit: the `step` vectors of the adders and the
  top.
- Holding a step bit low makes that systole slower. The testbenches drive
  `step` randomly to check that results do not depend on relative delays. That
  is a practical stand-in for the delay-insensitivity the real circuit claims.
- For normal use, tie `step` to all ones.

Every result is produced a data-dependent number of ticks after its operands.
No output has a fixed latency.

Synthesised, this is an ordinary synchronous circuit: a few hundred
enable-flops per adder. It is a faithful model of the handshake behaviour. It
is not the transistor-level asynchronous circuit. The design targeted 0.35 µm
CMOS, quoting a per-systole completion time of 1.08 ns for the DICSA and 1.70 ns
for the reduced-NCL adder. Those figures do not carry over to this RTL.

## The reduced-NCL systole (`rncl_systole`)

Inputs are `a`, `b`, `cin` (dual-rail) and `req`. The `req` input is the `ack`
of the next, more significant, systole. Outputs are `cout`, `s` and `ack`.

```
carry (1 level):  cout.r1 = MAJ(a1,b1,c1) . REQE    cout.r0 = MAJ(a0,b0,c0) . REQE
sum   (2 levels): s.r1 = th34w2(cout.r0 x2, a1, b1, c1)
                  s.r0 = th34w2(cout.r1 x2, a0, b0, c0)
completion:       ack = NOT th22( th12(s.r1,s.r0), th12(cout.r1,cout.r0) )
delayed request:  REQE = th22(ack, req)
```

- If `a == b`, the majority is decided without `c`: that is the early carry.
- The sum gate fires either:
  - on all three inputs at 1 (`s = 1` with carry 1), or
  - on the opposite carry rail plus any one input.

  So the sum needs the carry out first, and the sum always implies that the
  carry has been computed.
- `ack = 1` asks for DATA and `ack = 0` asks for NULL.

Each carry gate is a weighted threshold gate: `REQE` has weight 2, the
operands weight 1 and the threshold is 4. It fires only when `REQE` is high and
at least two of `a`, `b`, `c` are high. It clears only when all of them are
low.

The drawing this adder comes from labels the carry gate "th34" (3 of a, b, c,
REQ). A plain th34 fires on `a = b = c = 1` with no request, which breaks the
registration. The weighted gate implements the written equation
`cout = MAJ · REQ` instead. A fault copy of the systole using plain th34 gates
makes the systole testbench fail on exactly that case.

## The DICSA systole (`dicsa_systole`)

The delay-insensitive carry-save adder (DICSA) systole has two stages, each
with its own request.

**Input stage**, gated by `reqi` (in the array: the systole's own `acko`):

```
g  = th33(a1, b1, reqi)        k = th33(a0, b0, reqi)
p  = th12(th33(a0,b1,reqi), th33(a1,b0,reqi))      p_n = th12(g, k)
acki = NOT th12(p, p_n)        -- acknowledges a and b
```

**Output stage**, gated by `REQOE = th22(acko, reqo)`, where `reqo` is the
next systole's `acko`:

```
cout.r1 = th12( th22(REQOE, g), th33(REQOE, c1, p) )
cout.r0 = th12( th22(REQOE, k), th33(REQOE, c0, p) )
s.r1    = th12( th33(REQOE, c1, p_n), th33(REQOE, c0, p) )
s.r0    = th12( th33(REQOE, c0, p_n), th33(REQOE, c1, p) )
acko    = NOT th33( valid(s), valid(cout), valid(cin) )
```

- A generate or kill bit produces its carry 3 ticks after its operands,
  whatever the carry in does.
- A propagate bit forwards the carry in within two ticks of its arrival.
- `acko` includes the validity of `cin`, so it also acknowledges the previous
  systole's carry.

The stage equations and the handshake ports follow the source design. The
gate-level netlist above is this design's own: the source gives the equations
and the handshake wiring of the systolic DICSA, but not its gates. The netlist
uses the usual construction, which raises the threshold of each first-level
gate by one so that it also takes the request. It needs 4 gate levels to the
sum and carry, and 3 for an early carry.

## The delayed request (REQE / REQOE)

This is the part that makes the pipelined adders correct.

**Without the extra gate**, the request from systole *i+1* drives systole *i*'s
output gates directly. Systole *i+1* can finish a word using an early carry
from systole *i*, then lower its `ack` to ask for NULL. At that moment systole
*i* may still be waiting for its own carry in, with a late sum not yet
computed. A NULL request can then reach gates of systole *i* that have not yet
finished their DATA phase. Completion of systole *i* no longer covers all its
inputs, so the circuit is no longer delay-insensitive:

- **DICSA**: the missing acknowledge shows up as a stuck handshake. A fault
  copy of `dicsa_systole` without the gate deadlocks its testbench.
- **Reduced-NCL adder**: its sum gates take no request, and its carry gates
  hold an early carry by hysteresis until all their inputs return to NULL.
  In this tick model no stall appears without the gate: the systole, array,
  environment and top testbenches all still compute correctly when `REQE` is
  replaced by `req`. The gate is kept because the source design adds it to
  both adders. It costs one gate and one tick on the NULL request. Treat this
  as a limit of the unit-delay model rather than as proof that the
  reduced-NCL adder is safe without it.

**The fix** puts a C-element between the downstream request and the output
gates:

```
REQE = th22(own ACK, REQ from systole i+1)      (REQOE for the DICSA)
```

- `REQE` falls only when both this systole and the next one ask for NULL.
- `REQE` rises only when both ask for DATA.

The systole's output gates are released only after the systole's own outputs
have completed. Early carries are untouched: on the DATA phase, `REQE` is
already high when operands arrive, so a generate/kill carry still leaves
without waiting.

The gate resets to 1 because after reset every systole requests DATA.

## The arrays (`rncl_adder`, `dicsa_adder`)

The N systoles are chained as a ripple-carry adder: bit *i*'s `cout` is bit
*i+1*'s `cin`.

- **Reduced-NCL array:** `req[i] = ack[i+1]`. `ack[0]` acknowledges the
  adder's carry in.
- **DICSA array:**
  - `reqo[i] = acko[i+1]` and `reqi[i] = acko[i]`.
  - `acki` acknowledges the operand bits.
  - `acko[0]` acknowledges the carry in.
- **Top bit:** its request comes from the receiver of the carry out
  (`req_msb`).

`N` defaults to 8, the largest length evaluated at gate level. Any `N >= 1`
works.

## Feeding the adders (`ncl_adder_env`)

This module sits between a synchronous producer/consumer and one adder.

- **Operand side:** `op_valid/op_ready` with `op_a`, `op_b`, `op_cin`. Words
  wait in a `DEPTH`-entry slot buffer (`DEPTH` a power of two, default 4).
- **Input lanes:** there is one lane per operand bit plus one for the carry in.
  Each lane drives its dual-rail wires DATA, then NULL, then the next DATA,
  paced by the acknowledge the adder returns for that bit.
- **Result side:** one lane per sum bit plus one for the carry out.
  - Each lane captures its bit when it turns DATA and waits for it to return to
    NULL.
  - The carry-out lane drives `req_msb`.
  - When every lane of the oldest word has captured, the word appears on
    `res_valid/res_ready` as `res_sum`, `res_cout`.

`skew` selects the mode. Change it only while no word is in flight.

- **`skew = 0`, word-wise:** all input lanes change together.
  - DATA starts only after every result lane has finished the previous word.
  - NULL starts only after every operand lane has been acknowledged and every
    result bit captured.
  - One word is in the adder at a time.
- **`skew = 1`, bit-skewed:** each lane moves on as soon as its own acknowledge
  allows.
  - The low bits start the next word while the high bits are still busy.
  - Up to three words were observed on the wires of an 8-bit adder at once.
  - The per-lane result registers put the bits of each word back together.

The two feeding styles and the de-skewing of sum bits come from the source
design. The slot buffer, the counters and the valid/ready ports are this
implementation's own.

## Top level (`systolic_adders_top`)

The top holds both adders side by side, each behind its own `ncl_adder_env`:

- Ports prefixed `r_` belong to the reduced-NCL adder.
- Ports prefixed `d_` belong to the DICSA.

For each adder the top brings out:

- `skew`, selecting word-wise or bit-skewed feeding;
- the `step` vector: tie to all ones;
- the operand valid/ready port;
- the result valid/ready port.

Parameters are `N = 8` and `DEPTH = 4`.

## Measured behaviour

Ticks per word were measured back-to-back with every systole enabled (from
`adder_sizes_tb`):

- Lengths 1 to 4 use every operand combination.
- Lengths 8 to 64 use 3000 random words.

| bits | reduced-NCL word-wise | bit-skewed | gain | DICSA word-wise | bit-skewed | gain |
|---:|---:|---:|---:|---:|---:|---:|
| 1 | 9.50 | 9.50 | 0% | 14.00 | 12.12 | 13% |
| 2 | 11.00 | 11.00 | 0% | 15.03 | 14.03 | 7% |
| 4 | 13.28 | 11.74 | 12% | 18.75 | 14.01 | 25% |
| 8 | 16.27 | 11.94 | 27% | 22.97 | 14.00 | 39% |
| 16 | 19.58 | 12.00 | 39% | 27.17 | 14.01 | 48% |
| 32 | 23.04 | 12.01 | 48% | 31.15 | 14.99 | 52% |
| 64 | 26.56 | 13.26 | 50% | 35.55 | 17.29 | 51% |

These numbers agree with what the design claims:

- **Word-wise time grows with the logarithm of the length.** From 8 to 64
  bits it grows by about 1.6×, not 8×.
- **Bit-skewed throughput is nearly constant.**
- **The skew gain matches the reported figures.** It is 25% for a 4-bit DICSA
  and 39% for an 8-bit DICSA. The reported gains are 27% and about 34%.

Ticks are not nanoseconds. Counted in ticks, the DICSA is slower than the
reduced-NCL adder because it has more gate levels. In silicon its gates are
faster, and the source reports it as the faster adder. The tick model gives
every gate the same delay, so only relative behaviour within one adder type
carries over.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Each one also has a watchdog.

| testbench | what it checks |
|---|---|
| `ncl_thgate_tb` | th33, th13, th34w2 and a reset-to-1 th22 against a reference model, random enables |
| `rncl_systole_tb` | random operand words against a model of the next systole. Checks the sum, carry, early/late carry timing and that no output changes without the matching request (registration), with random steps |
| `dicsa_systole_tb` | the same for the DICSA systole. An early carry must appear exactly 3 ticks after the operands |
| `rncl_adder_tb`, `dicsa_adder_tb` | 2000 words through an 8-bit array, word-wise. Every result and its exact completion tick is compared with a gate-timing reference |
| `ncl_adder_env_tb` | environment plus reduced-NCL array in both modes, under back-pressure and random steps. Bit-skewed must be faster and must overlap words |
| `systolic_adders_top_tb` | the whole top at default parameters, both adders at once (details below) |
| `adder_sizes_tb` | the length sweep in the table above, with its growth and gain checks |

`systolic_adders_top_tb` checks every result in order. It also counts each
mechanism and fails if one never occurs:

- early carries;
- late carries;
- delayed-request holds;
- full 8-bit carry chains;
- overlapping words;
- operand stalls;
- result back-pressure.

The testbenches were also run against deliberately broken copies of each
module, and each testbench caught its fault:

- hysteresis removed;
- plain th34 carry gates;
- REQOE gate removed;
- carry rails swapped;
- skew lanes ignoring their acknowledge;
- a miswired operand.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/ncl_pkg.sv rtl/ncl_thgate.sv rtl/rncl_systole.sv rtl/dicsa_systole.sv \
  rtl/rncl_adder.sv rtl/dicsa_adder.sv rtl/ncl_adder_env.sv rtl/systolic_adders_top.sv \
  tb/systolic_adders_top_tb.sv --top-module systolic_adders_top_tb -Mdir obj -o sim
./obj/sim
```

For another testbench, swap the testbench file and `--top-module`, and list
only the modules it needs. Every testbench runs in well under a minute;
`adder_sizes_tb` takes about 15 s.

The simulator is two-state, so every gate is reset explicitly. Hold `rst` high
for at least one `clk` edge.

## Where this departs from the source design, and how far to trust it

- **Tick model instead of real delays.** Behaviour under arbitrary delays is
  sampled only by random `step` patterns, not proven. Times are in ticks (see
  "Timing model").
- **Reduced-NCL carry gate.** Weighted (REQE weight 2, threshold 4) instead
  of the plain th34 drawn for it, so that it matches the written carry
  equation.
- **DICSA gates.** The netlist is this design's own construction from the
  published equations.
- **Environment.** `ncl_adder_env` is this design's own. The source only
  states how inputs were applied and outputs collected in simulation.
- **Not built:**
  - the transistor-level gates;
  - the delay-insensitivity analysis method, which is a paper-and-pencil
    method, not hardware;
  - the C programs that estimate average delays;
  - the unpipelined full-adder examples used as background.
- **Sizes.** The default `N = 8` matches the largest gate-level evaluation.
  Longer adders are a parameter change and were simulated up to 64 bits. The
  1024-bit additions that motivate the work were not simulated.
