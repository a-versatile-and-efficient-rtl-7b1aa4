# Wide-range CML wireline transmitter, 0.1 to 11 Gb/s (logic view)

A chip-to-chip transmitter has to produce a serial stream from parallel
data. It usually does that with a tree of 2:1 multiplexers, each level
clocked by a clock divided down from the bit clock. That works at one rate,
because the divided clocks are made by a chain of dividers and buffers whose
delays add up. At a high rate the accumulated skew eats the whole bit time.
At a low rate it does not matter. A transmitter that must run anywhere from
0.1 to 11 Gb/s (a 110x range) therefore needs divided clocks that stay
aligned to the bit clock at every frequency.

This design does it in two steps:

1. **Coarse self-retiming.** Each divided clock is re-sampled by its own
   parent clock. A child is then tied to its parent's edge, not to the
   accumulated delay of the whole chain.
2. **Fine final retiming.** One bank of flip-flops re-samples all divided
   clocks on the bit clock itself. This bank is the only frequency-dependent
   timing point. An XOR gate picks which edge of the bit clock it uses,
   0 or 180 degrees.

The aligned clocks drive a 16:1 tree built from clocked-inverter (C2MOS)
multiplexers, which pipeline by construction. A latch-based CMOS-to-CML
converter then retimes the serial data once more on the bit clock. A second,
matching converter carries the bit clock out as a forwarded clock, so the
receiver needs no clock recovery.

This repository holds the digital and timing behaviour of that transmitter
in SystemVerilog. The analog parts are not modelled:

- the input transformer,
- the 50-ohm CML output drivers,
- the current reference,
- the ESD pads.

The design stops at the complementary logic pairs that would drive the CML
output drivers.

## Signal path

```
 lo_in ──► adaptive_clock_chain ──► ck (CK_OUT) ──────────────┬──────────────────┐
 (0.1-11 GHz)   │ ck_div = CK/2, CK/4, CK/8, CK/16            │                  │
                │                                             ▼ ck               ▼ d (clock as data)
                ├─► ~CK/16 ─► prbs16 ─► 16-b word ─► c2mos_mux_tree ─► delay_line ─► cmos_to_cml ─► data_p/data_n
                │                                    (16:8,8:4,4:2,2:1)  (2-b, 0-120 ps)  (latch)
                └────────────────────────────────────────────────────────────────► cmos_to_cml ─► fclk_p/fclk_n
                                                                                  (latch held open)
```

| Module | Role |
|---|---|
| `cml_tx_top` | top level, wires the blocks below |
| `adaptive_clock_chain` | divided, aligned clocks and CK_OUT |
| `c2mos_mux_tree` / `c2mos_unit_mux` | 16:1 serializer |
| `prbs16` | 16 pattern bits per CK/16 cycle |
| `delay_line` | behavioural delay model: the clock-chain skew cells and the 2-bit data delay |
| `cmos_to_cml` | retiming latch with complementary outputs |
| `cml_tx_pkg` | shared constants, the pattern-select enum and the pattern feedback function |

## The clock chain (`adaptive_clock_chain`)

This is the part that makes the wide range possible. It is also the part
whose timing is least obvious.

```
 ck_in ─┬─► ÷2 ─► ÷2 ─► ÷2 ─► ÷2            ripple dividers (div)
        │    │      │      │      │
        ├─► FF    FF     FF     FF           coarse: FF k clocked by its parent
        │    │      │      │      │          (ck_in, div0, div1, div2)
        │   dt    2dt    3dt    4dt          skew cells (behavioural)
        │    └──────┴──────┴──────┘
 ctrl ─XOR─► ck_out ──► fine FFs ──► ck_div[3:0] = CK/16, CK/8, CK/4, CK/2
```

### Ripple dividers

Stage k toggles on the rising edge of its parent. Its parent is `ck_in` for
k = 0, and the stage k-1 output otherwise.

### Coarse retimers

Coarse flip-flop k is clocked by the same parent as divider k, and samples
the divider output. The divider changes just after that edge, so the
flip-flop takes the value from before the change. The coarse clock is
therefore the divided clock delayed by one parent period, re-launched from
the parent's edge. The skew between neighbours is then one flip-flop delay,
whatever the frequency.

### Skew cells

The cells dt, 2dt, 3dt and 4dt even out that remaining fixed skew. The
model has no gate delays, so here the cells only shift the coarse clocks
against the fine sampling edge. dt defaults to 5 ps; the value is this
design's own.

### Fine retiming and the XOR

All four clocks are sampled on `ck_out = ck_in XOR ctrl_180`:

- With `ctrl_180 = 0` they are sampled one full period after the coarse
  edge.
- With `ctrl_180 = 1` they are sampled half a period after it.

This choice is the frequency-dependent delay. The coarse clocks plus their
skew cells must be settled before the chosen edge. `ck_out` is also the
clock of both converters.

### Result

After reset, `{ck_div[3], ck_div[2], ck_div[1], ck_div[0]}` counts up by one
on every rising edge of `ck_out`, and changes at no other time:

```
ck_out  ↑    ↑    ↑    ↑    ↑    ↑    ↑    ↑    ↑
CK/2    1    0    1    0    1    0    1    0    1
CK/4    0    1    1    0    0    1    1    0    0
CK/8    0    0    0    1    1    1    1    0    0
```

So every divided clock has a 50 % duty cycle. A child clock changes exactly
when its parent falls, and all of them fall together once every 16 periods.
The multiplexer tree is clocked to match this.

## The C2MOS multiplexer tree (`c2mos_unit_mux`, `c2mos_mux_tree`)

### The unit multiplexer

A unit has two clocked inverters that share one output node and are enabled
on opposite clock phases:

- **D1 path.** One clocked inverter, enabled while `ck` is low.
- **D2 path.** A flip-flop (two clocked latches) that captures D2 on the
  rising edge, followed by a clocked inverter enabled while `ck` is high.

The inputs change on the falling edge of `ck`. In each period the output
therefore shows ~D1 during the low phase and ~D2 during the high phase:
two bits per clock, D1 first.

The D2 flip-flop keeps D2 while the inputs already move on to the next
pair. This is what lets the tree run at full speed regardless of depth.
The RTL writes the two clocked inverters as `q = ck ? ~d2_ff : ~d1`.

### The tree

There are four levels: 16:8, 8:4, 4:2 and 2:1. They are clocked by CK/16,
CK/8, CK/4 and CK/2. Unit j of a level takes inputs j and j + width/2, so
word bit 0 leaves first and bit 15 last.

Each unit inverts its data. Four levels cancel out, so the 16:1 tree is
non-inverting; an odd number of levels would invert.

### Timing at the tree boundaries

- **Input.** The word must change when all clocks fall together. That is
  why the pattern source is clocked by the complementary CK/16.
- **Output.** The output changes once per bit clock period.
- **Latency.** Bit 0 passes through the open D1 paths in the period in
  which the word is applied. The later bits wait in the D2 flip-flops.

## Converter and data delay (`cmos_to_cml`, `delay_line`)

### Why there is a delay line

In the real circuit the multiplexer's output delay is a fixed time. That
time is a growing fraction of the bit as the rate goes up. A 2-bit delay
line therefore sits between the tree and the converter. It covers 120 ps
full scale in 40 ps steps (codes 0 to 3). Its purpose is to place the data
where the converter latch has margin.

### The data converter

The converter is a latch that is transparent while CK is low, and it
produces the complementary pair. Where the output edge lands depends on
when the delayed data arrives. Let T be the bit period and let
φ = (40 ps x code) mod T be the arrival time after a rising CK edge:

- **φ < T/2 (data arrives during the hold phase).** The latch releases it
  on the falling edge. The data edge then sits exactly T/2 after the
  rising clock edge, whatever the delay: this is the retiming.
- **φ ≥ T/2 (latch already open).** The data passes at arrival time φ.

At 0.1 Gb/s every code lands in the hold phase. At 11 Gb/s (T = 91 ps):

| Code | Delay | Result |
|---|---|---|
| 0, 1 | 0, 40 ps | retimed to T/2 |
| 2 | 80 ps | passes at 80 ps |
| 3 | 120 ps | wraps into the next hold phase, retimed to T/2 one bit later |

### The forwarded-clock converter

The forwarded clock uses an identical converter with its latch held open.
It carries CK_OUT with the same circuit and polarity as the data. With the
data retimed to the falling edge, the forwarded clock rises in the middle
of each bit.

### The delay-line model

`delay_line` is a behavioural model: a chain of inertial delay cells with a
code-selected tap. Synthesis ignores its delays, which leaves only a
multiplexer of equal taps.

## Pattern source (`prbs16`)

A 31-bit Fibonacci shift register advances 16 steps per clock and delivers
those 16 bits as one word. Bit 0 is the earliest bit and is sent first.
The 2-bit select chooses one of four patterns:

| `prbs_sel` | Pattern | Recurrence |
|---|---|---|
| 0 | PRBS7 | o[t] = o[t-7] ^ o[t-6] |
| 1 | PRBS15 | o[t] = o[t-15] ^ o[t-14] |
| 2 | PRBS23 | o[t] = o[t-23] ^ o[t-18] |
| 3 | PRBS31 | o[t] = o[t-31] ^ o[t-28] |

- **Seed.** After reset the register holds all ones.
- **Lock-up guard.** Switching patterns while running can leave the shorter
  pattern's bits all zero. The feedback then injects a one, so the
  generator cannot lock up.

## Top-level interface (`cml_tx_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `lo_in` | in | 1 | full-rate clock, 0.1-11 GHz (one bit per cycle) |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `prbs_sel` | in | 2 | pattern select |
| `dly_cfg` | in | 2 | data delay code, 40 ps per step |
| `clk_cfg_180` | in | 1 | fine-retiming edge: 0 or 180 degrees |
| `data_p`, `data_n` | out | 1 each | complementary data, to the data CML driver |
| `fclk_p`, `fclk_n` | out | 1 each | complementary forwarded clock, to the clock CML driver |

| Parameter | Default | Meaning |
|---|---|---|
| `DT_STEP_PS` | 5 | clock-chain skew unit, ps |
| `DLY_STEP` | 40 | data delay step, ps |

The word width (16) and the number of divider stages (4) are constants in
`cml_tx_pkg`. After reset, with delay code 0, the first pattern bit appears
about 18 bit periods after reset is released.

## How far to trust it

### Follows the published design

- The block structure.
- The 16:1 four-level tree with its level clocks.
- The unit multiplexer's structure (D1 through one clocked stage, D2
  through a flip-flop and a clocked stage).
- The four-stage divider chain with coarse and fine retiming and the
  0/180 XOR.
- The dt-4dt cells.
- The 2-bit, 120 ps data delay line.
- The latch-based converter feeding two matched paths.

### This design's own choices

- The four patterns and the seed.
- The bit order, and the pairing of inputs in each unit.
- Which clock phase enables which inverter.
- Rising-edge dividers and retimers.
- The 5 ps dt unit.
- The reset, which the circuit as published does not show.
- Holding the forwarded-clock latch open.
- Reading the MUX's 2-bit configuration as the data delay code.

### Not modelled

- **Gate delays.** Only the delay cells have delay. The tests therefore
  show logical and cycle correctness at the two ends of the rate range,
  not the analog timing margins that limit the real circuit. The dt cells
  follow the published arrangement (dt on CK/2 up to 4dt on CK/16). With
  no divider or flip-flop delay to balance, they only widen the arrival
  window of the coarse clocks; with the default 5 ps unit that window
  (5-20 ps) stays well inside half a period at 11 GHz.
- **The analog blocks.** Transformer, CML drivers (swing, 50-ohm
  termination), current reference and pads.
- **An external data input.** The tree can carry 2 x 8-bit complex data,
  but only the pattern source drives it here.

### Warnings you will see

- A latch in `cmos_to_cml` (intended).
- `NOLATCH` for the forwarded-clock instance, whose latch is always open.
- `ZERODLY`, because a delay code may be 0.

## Simulating

Every file begins with `` `timescale 1ps/1fs ``. The delay model needs
`--timing`. Example, the full transmitter at its default parameters:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/cml_tx_pkg.sv \
          tb/cml_tx_top_tb.sv --top-module cml_tx_top_tb
obj_dir/Vcml_tx_top_tb
```

The other tests build the same way with their own top module. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `cml_tx_top_tb` | 64 configurations: 91 ps and 10,000 ps clock, both phases, all patterns, all delay codes. It captures data on each forwarded-clock rise and matches it bit for bit against an independently computed pattern. It also checks the position of every data edge against the formula above, the same latency for every code-0 configuration, and complementary outputs. It requires both converter behaviours (retimed and passed) to occur. |
| `adaptive_clock_chain_tb` | At 11, 1 and 0.1 GHz and both phases: `ck_out = ck_in ^ ctrl`, the divided clocks count up by one per cycle, and they change only on `ck_out` rising edges. A second instance has 20 ps skew cells (20-80 ps) at 11 GHz. It must count with the 0-degree edge. With the 180-degree edge, CK/8 and CK/16 must lag by exactly one cycle: this shows the constraint that the fine-retiming edge choice resolves. |
| `c2mos_mux_tree_tb` | Random words on ideal counter clocks: the serial stream equals the words in order at one bit per clock, with bit 0 appearing in the clock period in which its word is applied. |
| `c2mos_unit_mux_tb` | ~D1 in the low phase and ~D2 in the high phase, with the inputs disturbed after capture. |
| `cmos_to_cml_tb` | Transparent while CK is low, holds the value from the rising edge while high; complementary outputs. |
| `prbs16_tb` | All four patterns word by word against their recurrences, and recovery after a pattern switch. |
| `delay_line_tb` | Every output change comes exactly code x 40 ps after its input change, and none is lost. |
