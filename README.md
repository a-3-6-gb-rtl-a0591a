# 16:1 pipelined multiplexer with phase-shifted input latching

This is a 16-to-1 serializer for multi-gigabit links (for example a SONET OC-48
transmitter). Each word of 16 parallel bits leaves one output pin as 16 serial
bits, one per cycle of the fast clock CLK. The circuit it models was built as
a small chip: about 1500 transistors in a 0.18 µm SOI-CMOS process, with PECL
pads. It reached 3.6 Gb/s at 2.0 V. Three ideas let it run that fast:

1. **Selectors instead of gates.** Serialization is done by 4:1
   pass-transistor selectors. In two steps, four low-speed 4:1 selectors at
   CLK/4 feed one high-speed 4:1 selector at CLK.
2. **A pipelined high-speed stage.** In a plain selector stage, the divider, the
   decoder that makes the selects, the selector and the output flip-flop's
   set-up time must all fit into one CLK period. Here flip-flops split that path
   into three shorter stages.
3. **Phase-shifted input latching.** Two of the four input flip-flops of the
   high-speed stage load on the opposite edge of the divided clock. No input
   then changes while the selector is reading it, and no extra circuit is
   needed.

The SystemVerilog here is a cycle-accurate, synthesizable model of the
multiplexer logic (`mux16_core` and below). It comes with behavioural models of
the PECL pad buffers and a chip-level wrapper, `mux16_chip`, whose pins carry
voltages.

## Structure

```
 din[15:0] ──► mux_ls_stage (CLK/4'' domain)            mux_hs_stage (CLK domain)
               4 × 4-bit input FF (load at CLK/16'' ↓)   D1,D2 FF (load at CLK/4'' ↑)
               4 × sel4 ── lout[3:0] ─────────────────►  D3,D4 FF (load at CLK/4'' ↓)
               div4 → timing_gen → 4-bit select FF         sel4 → output FF ──► dout
               CLK/16'' FF ──► clk16_out                   div4 → 2 FF → timing_gen → 4 FF
                    ▲                                      CLK/4'' FF
                    └──────── enable at CLK/4'' ↓ ◄────────┘
```

| Module | Role |
|---|---|
| `mux16_pkg` | Select type `sel_t` (one-hot S1..S4) and the divider state encoding |
| `mux_dff` | The flip-flop used everywhere: W bits, true and complement outputs, optional synchronous reset, clock enable |
| `div4` | 1/4 divider. Two quadrature phases of the divided clock, stepping 00 → 01 → 11 → 10 |
| `timing_gen` | NOR decode of the divider phases into one-hot S1..S4 and their complements |
| `sel4` | Dual-rail 4:1 selector: SOUT = D of the active select, SOUTB = DB of the active select |
| `mux_hs_stage` | High-speed 4:1 stage: pipelined, with phase-shifted inputs |
| `mux_ls_stage` | Low-speed section: four 4:1 selectors sharing one divider and timing generator |
| `mux16_core` | The two sections wired into the 16:1 multiplexer |
| `pecl_input_buffer` | Behavioural model: PECL input amplifier as an ideal comparator |
| `pecl_output_buffer` | Behavioural model: inverter output driver into a 50 Ω terminated line |
| `mux16_chip` | Top level: pad buffers around `mux16_core` |

## The high-speed stage: pipeline and phase shift

The whole circuit hinges on this stage. Its 1/4 divider is a 2-bit twisted-ring
counter on CLK. Two flip-flops delay the divider state by one cycle before the
timing generator decodes it into S1..S4. Four more flip-flops delay the selects
by another cycle before they reach the selector. A fifth flip-flop takes the
delayed divider bit and makes the retimed divided clock **CLK/4''**. That
flip-flop sees the same divider state as the select flip-flops, so CLK/4'' and
the selects stay aligned by construction. The longest logic path is now
flip-flop → NOR gate → flip-flop set-up. In the plain stage it was two
flip-flops + NOR gate + selector + set-up.

**Phase shift.** The input flip-flops of D3 and D4 load at the falling edge of
CLK/4''. Those of D1 and D2 load at the rising edge, half a CLK/4 period
earlier. In the table, F is the clock edge at which CLK/4'' falls. D1'' to D4''
are the input flip-flop outputs and SOUT is the selector output.

| clock edge | CLK/4'' after edge | flip-flops loaded | select | SOUT | DOUT |
|---|---|---|---|---|---|
| F−2 | 1 (rises) | D1'', D2'' | S3 | D3'' (old) | … |
| F−1 | 1 | – | S4 | D4'' (old) | … |
| F | 0 (falls) | D3'', D4'' | S1 | D1'' | … |
| F+1 | 0 | – | S2 | D2'' | D1'' |
| F+2 | 1 (rises) | D1'', D2'' | S3 | D3'' | D2'' |
| F+3 | 1 | – | S4 | D4'' | D3'' |
| F+4 | 0 (falls) | D3'', D4'' | S1 | next D1'' | D4'' |

Each input flip-flop changes two cycles away from both selects that read it.
D1''/D2'' change while S3/S4 are active, and D3''/D4'' while S1/S2 are. If all
four loaded at the falling edge, D1'' would change at the very edge at which S1
opens its selector input, and the timing margin would be lost. A cycle-level
model has no delays, so it cannot show that margin. It does show that the data
still arrives correctly with the two load edges. The tests change every input
every cycle, so loading on the wrong edge makes them fail.

Which select follows which CLK/4'' edge (S1 after the fall, S3 after the rise)
is a choice made in this implementation. It is the alignment that gives each
input flip-flop the most margin.

## The low-speed section and word framing

The low-speed section runs at CLK/4'', so it differs in two ways from the
high-speed stage. Its timing generator is driven straight from its divider,
because the path has four CLK periods and extra flip-flops would only cost
power. And all sixteen input flip-flops load at the same edge of CLK/16'', which
gives the external data the widest window around CLK/16 OUT. One divider, one
timing generator and one 4-bit select register serve all four selectors.

The low-speed section advances at the **falling** edge of CLK/4''. The RTL has
a single clock, so it is clocked by CLK and enabled by `clk4pp_fall` from the
high-speed stage. This edge is a choice made in this implementation, and it
matters:

- At a falling edge, D3/D4 of the high-speed stage take the last value of the
  low-speed period that is ending.
- D1/D2 took their value from the same period at the rising edge before.

So each group of four serial bits comes from one low-speed period, and each 16
serial bits come from one input word. If the low-speed section advanced on the
rising edge instead, D1/D2 and D3/D4 would take their bits from different
periods, and serial frames would straddle input words.

## Interface and timing

`mux16_core` ports: `clk` (CLKIN), `rst_n`, `din[15:0]`, `dout`, `doutb`,
`clk16_out` (CLK/16 OUT) and `clkout` (CLK passed to the CLK OUT buffer).

- **Rate.** One bit per `clk` cycle. A word every 16 cycles. `clk16_out` has a
  period of 16 cycles, 50 % duty.
- **Input sampling.** `din` is sampled at the clock edge at which `clk16_out`
  falls. Change it near the rising edge of `clk16_out`, which gives 8 cycles of
  margin on either side.
- **Bit order.** `din[i]` feeds low-speed selector `i mod 4` at input
  `i div 4`, so `din[0]` is sent first and `din[15]` last. This order is a
  choice made here.
- **Latency.** Take the edge at which `clk16_out` falls as edge 0. `din[i]` is
  on `dout` after edge 5 + i. That is 4 cycles through the two stages and 1
  through the output flip-flop.
- **Reset.** `rst_n` is synchronous and active low. It is an addition: the
  chip has no reset pin. It sets only the control flip-flops (dividers,
  pipeline and select registers, CLK/4'' and CLK/16''). Count the first edge
  with `rst_n` high as edge 0: the first word is sampled at edge 1, and every
  16 cycles after that. The dividers cycle through all their states, so
  without reset the logic settles by itself within two cycles, at an unknown
  phase; the one-hot assertions can fire in those first cycles. Data
  flip-flops are not reset.
- **Assertions.** Both stages assert that their registered selects are one-hot
  whenever they are out of reset. Two open pass transistors would short two
  data lines.

`mux16_chip` adds the pads:

- CLK/CLKB: differential PECL input.
- IN1..IN16: single-ended against the reference VBB. `v_in[i]` is IN(i+1) and
  drives `din[i]`.
- Complementary PECL outputs: DATA OUT/DATAB OUT, CLK/16 OUT/CLKB/16 OUT and
  CLK OUT/CLKB OUT.

## Pad buffer models

These two modules are behavioural models of analog circuits, not logic.

- **`pecl_input_buffer`** stands for a two-stage NMOS current-mirror
  amplifier. It is modelled as `q = v_p > v_n`.
- **`pecl_output_buffer`** stands for an inverter chain driving a 50 Ω line
  that is terminated to ground.
  - A 0 is pulled to 0 V.
  - A 1 sits at `VDD·R_TERM/(R_TERM+R_ON)`. With the defaults (2.0 V, 40 Ω,
    50 Ω) that is 1.11 V, which meets the PECL levels for a 2.0 V supply
    (VOL ≤ 0.3 V, VOH ≥ 1.1 V).
  - The model has no delay or edge rate.

The on-chip clock termination resistors and the decoupling capacitors have no
logic function and are not modelled.

## How far this follows the circuit

Taken from the original circuit:

- the two-step 4:1 architecture;
- the flip-flops between divider, timing generator and selector in the
  high-speed stage, and their absence in the low-speed stage;
- the CLK/4'' and CLK/16'' retiming flip-flops and where their inputs come
  from;
- D1/D2 latched on the rising edge and D3/D4 on the falling edge of the
  divided clock;
- all low-speed inputs latched together;
- the dual-rail selector and flip-flop;
- the NOR-based timing generator;
- the PECL levels and the output-buffer resistances.

Choices made here:

- **Single clock.** Every flip-flop is clocked by CLK. Flip-flops that the
  circuit clocks by CLK/4'' or CLK/16'' get a one-cycle enable at the matching
  edge instead. The cycle timing is the same, and the RTL is a single clock
  domain.
- **Divider.** The circuit uses a toggle flip-flop followed by a latch-pair
  divider. Here it is a twisted-ring counter with the same two quadrature
  outputs.
- **Dual-rail logic.** DB inputs are taken as ~D. The complement rails are
  computed but mostly unused. The selector's SOUTB rail is kept so that
  `sel4` matches the circuit.
- **Idle selector.** With no select active, the selector outputs 0.
- **Free choices.** Also chosen here: the select order S1 = 00, S2 = 01,
  S3 = 11, S4 = 10; which CLK/4'' edge clocks the low-speed section; which
  CLK/16'' edge loads the inputs; the bit order; and the reset.
- **Not modelled.** Nothing here models the analog timing that the pipeline
  and the phase shift exist for: the circuit's flip-flop delays of 118 ps and
  63 ps, its NOR delay of 63 ps, its selector delay of 32 ps and its 49 ps
  set-up time. The plain and pipelined limits of 3.1 and 4.3 Gb/s come from
  those delays. Neither is modelled, nor is the floating-body behaviour of the
  SOI devices.
- **Not built.** The plain (non-pipelined, non-phase-shifted) 4:1 stage is
  only a point of comparison and is not included.

## Simulating

Every file holds one module or package named after the file. With
verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mux16_pkg.sv tb/tb_mux16_chip.sv --top-module tb_mux16_chip
./obj_dir/Vtb_mux16_chip
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_mux_dff`, `tb_div4`, `tb_timing_gen`, `tb_sel4` | Each primitive against a reference model, including the CLK/4 period of 4 cycles |
| `tb_mux_hs_stage` | CLK/4'' level and both edge strobes. D1/D2 sampled at the rising and D3/D4 at the falling edge, with inputs changing every cycle. Order and latency on DOUT. Counts both kinds of load |
| `tb_mux_ls_stage` | Load once per 16 cycles, the output sequence of each selector, CLK/16'' |
| `tb_mux16_core` | Static inputs giving the repeating pattern 1011 1010 1011 0010, then 60 random words. Checks the 16-cycle rate, the 5-cycle latency and the count of every load mechanism |
| `tb_mux16_chip` | The same at the pads, all defaults: PECL voltages in, output line voltages out (1.111 V / 0 V, complementary pads) |
| `tb_prbs23_workload` | One full period of PRBS 2^23−1 (x^23+x^18+1, 8 388 607 bits) through the core with zero errors. The longest runs on DOUT must be 23 ones and 22 zeros. About 5 s |

The core is small: after coarse synthesis it has 37 flip-flop bits and about 75
word-level cells.
