# Redundant skewed clocks for temporal pulse-latch flip-flops

This design protects every flip-flop of a digital block against radiation-induced
soft errors. It covers both kinds: single-event upsets (SEU), where a storage node
flips, and single-event transients (SET), where a glitch hits a data or clock wire.
Each bit is stored three times, in three pulse-clocked latches, and a majority gate
votes on them. The three copies are clocked at three different times, a few hundred
picoseconds apart, so one transient cannot be caught by more than one copy.

Earlier temporal pulse-latch designs made the three clock times inside every
flip-flop macro, with delay filters in each macro. Here the whole chip has **one**
clock source with **two** delay elements. It produces three skewed clocks, ClkA,
ClkB and ClkC, and each runs on its own clock tree to every macro. This has four
consequences, and the RTL models all of them:

* Far fewer delay elements, which are power-hungry parts of the clock path.
* The skew, and with it the width of SET the design tolerates, can be
  **programmed** at run time, because only two delay lines set it.
* The three clocks can be **gated separately**. Gating ClkB and ClkC gives a
  low-power **non-redundant mode**.
* Setting the skew to zero gives a fast **SEU-only mode**.

The SystemVerilog is a functional, timing-aware model. Logic (latches, gates,
registers) is written as synthesizable RTL with zero delay. The delay elements are
behavioural buffer chains with real picosecond delays, so the skews, pulse widths and
glitches can be simulated.

## One hardened bit: three pulse latches and a vote

`tpl_ff` holds one bit. Latches A, B and C all take the same `d`, and each is
transparent only during its own short pulse, PCLKA, PCLKB or PCLKC. The output is
`maj(qa, qb, qc)`.

In full-hardened mode PCLKB comes one skew `s` after PCLKA, and PCLKC comes `2s`
after it (default `s` = 600 ps). Each fault is then handled as follows:

| fault | what happens | result |
|---|---|---|
| upset of one latch | one wrong input to the vote | `q` unchanged |
| data transient shorter than `s` | caught by at most one latch | voted out |
| transient on GCLK shorter than `s` | reaches ClkA only, blocked before ClkB and ClkC (next section) | voted out |
| transient on one tree or pulse generator | only that copy is disturbed | voted out |
| transient on the clock-gate enable | skew lets it reach at most one gater's latch | voted out |

Something to keep in mind when reading waveforms: an upset latch keeps its wrong
value until its own next pulse rewrites it. Meanwhile the vote rests on the other
two copies, so in that cycle `q` may take its new value as soon as copy A captures.

The 16 bits of a `tpl_macro` share three local pulse generators (`tpl_pulse_gen`).
Each is `clk AND NOT(clk delayed by 154 ps)`. The pulse generators stay local to the
macro so that the pulse width stays well controlled. Only the clock skew is global.

## The clock source: where the skew is made

`tpl_clock_source` is the only place with delay elements:

```
GCLK ──────────────────────────────► ClkA            (buffer)
  │
  └─► D2 ──► D2CLK ──► D3 ──► D3CLK
              │                 │
ClkB = C(GCLK, D2CLK)           │     one skew after ClkA
ClkC = C(GCLK, D3CLK) ◄─────────┘     two skews after ClkA
```

`C` is a Muller C-element (`tpl_c_element`). Its output follows its inputs when they
agree and holds its value while they differ. With a clean clock, ClkB therefore rises
when D2CLK rises and falls when D2CLK falls: it is GCLK delayed by one skew. ClkC is
delayed by two.

Now take a glitch on GCLK narrower than the skew. When its delayed copy arrives at
D2CLK, GCLK is already back low, so the two C-element inputs never agree on the
glitch and ClkB never sees it. ClkC is protected the same way. ClkA has no filter, so
the glitch reaches copy A only, and the vote masks it. One side effect: a glitch
during GCLK's high phase can stretch ClkB by up to one skew. That is harmless.

D2 and D3 are `tpl_prog_delay` delay lines made of `N_TAPS` mux stages. Stage `i`
has two inputs: the previous stage's output through one `TAP_PS` delay element
(`sel[i] = 1`), or the undelayed input clock (`sel[i] = 0`). The line's delay is
`TAP_PS` times the number of consecutive ones in `sel` ending at the top bit. The
defaults are 8 taps of 75 ps, so 0 to 600 ps in steps of 75 ps. Both delay lines
share the same select.

Each delay element, `tpl_delay_cell`, is a chain of 25 ps inertial buffer stages,
not a single ideal delay. A real buffer chain behaves the same way: a transient wider
than one stage passes through, delayed. This matters in simulation: the C-elements,
not an idealised delay, are what remove clock transients.

## Timing of a capture

With `s` the programmed skew and `PW` the pulse width (154 ps), measured from the
rising edge of GCLK:

* Copy A captures at 0, copy B at `s` and copy C at `2s`.
* `q` shows the new value at `s`, once A and B agree. If copy A was hit, `q` shows it
  at `2s`.
* `d` must be stable from before 0 until `2s + PW`, because the C copy closes last.
  Between two of these flip-flops the shortest logic path therefore needs at least
  `2s + PW` of delay (1354 ps at the defaults). The testbenches model this with a
  hold buffer.
* GCLK's high and low times must each be longer than `2s`. Otherwise the
  C-elements would filter away the clock itself. At 200 MHz (2500 ps phases) the
  full 600 ps skew fits.

In SEU-only mode `s` is 0: all three pulses coincide and `q` is valid right after
the pulse.

## Operating modes and switching on the fly

`tpl_mode_ctrl` takes a 2-bit `mode_req` (type `tpl_pkg::tpl_mode_e`) and the tap
count `hard_taps`:

| mode | delay select | ClkB/ClkC | NRM | protects against |
|---|---|---|---|---|
| `MODE_FULL_HARD` (00) | `hard_taps` taps | running | 0 | SEU, data SET, clock SET |
| `MODE_SEU_ONLY` (01) | 0 taps | running | 0 | SEU only; a data transient over the pulse is caught by all three copies |
| `MODE_NON_REDUNDANT` (10) | 0 taps | gated off | 1 | nothing; lowest power, one clock tree active |
| 11 | treated as 00 | | | |

In non-redundant mode only copy A is clocked, so the vote must follow copy A alone.
Two ways of doing this are built, chosen by the `NRM_STYLE` parameter:

* `NRM_IN_LATCH` (default): the B and C latches get a pull-down, controlled by NRM,
  that forces B to 1 and C to 0. The vote of (A, 1, 0) is A. This needs only two
  small extra transistors per bit and no inverted NRM.
* `NRM_IN_MAJORITY`: the majority gate gets an NRM input that cuts off its B and C
  paths, so its output is A.

When the design leaves non-redundant mode, B and C still hold 1 and 0. The first
capture is therefore visible at copy A's edge, and after that the timing is normal.

The controller's registers are clocked on the **falling edge of the ungated ClkC**.
ClkC is the last clock to fall. At that moment GCLK, every delay tap and all three
clocks are low, and they stay low until the next GCLK rise. So the delay select, the
B/C gate enables and NRM change without clipping or stretching a pulse, and the mode
can be changed while data keeps flowing. The sequence for a new request:

1. The request is made.
2. The next ClkC falling edge samples it, and the `mode` output changes then.
3. The first GCLK rising edge after that runs in the new mode.

`rst_n` is an asynchronous reset of the mode controller only. After reset the mode
is full-hardened with all `N_TAPS` taps. The flip-flops have no reset.

## Clock gating

`tpl_clock_gater` is a standard integrated clock gate: a latch that is transparent
while the clock is low, followed by an AND gate. There is one gater per clock tree.
All three share the functional enable `clk_en`, and the mode controller's enables are
ANDed into the ClkB and ClkC gaters. Because the three clocks are skewed, a
transient on `clk_en` can be caught by at most one gater's latch, and the vote then
masks it. `clk_en` must not change between the rising edge of ClkA and the rising
edge of ClkC. The testbenches change it after ClkC has fallen.

## Modules

| module | role |
|---|---|
| `rskew_tpl_top` | clock source, mode controller, three gaters, `N_MACROS` macros; `d`/`q` arrays are where the user's logic connects |
| `tpl_clock_source` | ClkA/ClkB/ClkC from GCLK (two `tpl_prog_delay`, two `tpl_c_element`) |
| `tpl_prog_delay` | mux-chain programmable delay line |
| `tpl_delay_cell` | behavioural buffer-chain delay element |
| `tpl_c_element` | Muller C-element |
| `tpl_mode_ctrl` | mode and hardness control, glitch-free switching |
| `tpl_clock_gater` | latch + AND clock gate |
| `tpl_macro` | `WIDTH`-bit macro: PGA/PGB/PGC and `WIDTH` × `tpl_ff` |
| `tpl_pulse_gen` | pulse generator |
| `tpl_ff` | three latches and a vote |
| `tpl_pulse_latch` | pulse latch, optional NRM force |
| `tpl_majority` | 2-of-3 vote, optional NRM input |
| `tpl_pkg` | mode and style enums, default constants |

Top-level parameters and their defaults:

| parameter | default | notes |
|---|---|---|
| `N_MACROS` | 426 | 426 × 16 = 6816 flip-flops, the size of the pipelined AES-256 engine (128-bit data) the scheme was evaluated on |
| `WIDTH` | 16 | bits per macro |
| `N_TAPS` | 8 | delay-line stages (own choice) |
| `TAP_PS` | 75 | ps per stage (own choice); 8 × 75 = 600 ps, the reported clock separation |
| `PULSE_PS` | 154 | pulse width; the reported mean is 153.5 ps |
| `NRM_STYLE` | `NRM_IN_LATCH` | see the modes section |

All delays are in picoseconds. Every module declares `timeunit 1ps`.

## What is modelled and what is not

Modelled: everything with a logic function in the flip-flop and clock-generation
scheme. This covers the skewed clock generation and C-element filtering, the
programmable delay lines, the separate gating of the three clocks, the local pulse
generators, the TMR pulse latches with both non-redundant-mode variants, the vote,
and the mode control.

Not modelled:

* **The clock trees.** Clock-tree synthesis builds them from buffers in physical
  design, and they have no logic function. Here the gated clocks reach all macros
  with zero delay and zero skew. A real tree adds some skew on top of the programmed
  delay, and the width of SET that is tolerated shrinks by that amount.
* **Layout.** This includes the interleaving of the three latches of a bit in
  separate rows (against multi-node charge collection) and the decoupling cells
  between pulse generators.
* **The AES engine.** It is the block's user logic, and its `d`/`q` connections are
  the top's ports.
* **Power, and process variation of the delays.**

The latch, gate and register models have zero delay. As a result `q` switches when
copy B *opens*, not a little after its pulse closes, and set-up times are zero. Only
the delay elements and pulse generators carry time. The C-element, the pulse latch
and the gater latch are intentional latches, so lint and synthesis tools will report
them as latches. `tpl_delay_cell` uses `#` delays and is a simulation model. In
synthesis it would be replaced by a characterised delay cell.

## Choices this RTL makes

These are not fixed by the scheme itself:

* The number of delay-line taps and the tap delay.
* Which mux input is the delayed path.
* One select word shared by D2 and D3.
* The 25 ps buffer stage in the delay model.
* The mode encoding, and clocking the controller on ClkC's falling edge.
* Reset of the controller only.
* B forced to 1 and C to 0, rather than the opposite. Also, NRM taking priority over
  an open pulse: this cannot happen, because that clock is gated.
* A non-inverting vote output. The transistor-level gate is inverting.

## Simulating

Any Verilator 5 with `--timing` works. Compile the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rskew_tpl_top \
    rtl/tpl_pkg.sv $(ls rtl/*.sv | grep -v tpl_pkg) tb/tb_rskew_tpl_top.sv
./obj_dir/Vtb_rskew_tpl_top
```

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog, and each
compares against values it works out itself:

* `tb_rskew_tpl_top`: four macros chained into a shift register through hold
  buffers. It checks every word and the `q` latency in every cycle. It makes each
  mechanism happen and counts it: full-hardened capture, retuning the skew from 8
  to 4 taps, a data transient, a latch upset, a GCLK transient, clock gating, an
  upset of the ClkC gater's latch (one PCLKC pulse lost, outputs unaffected),
  SEU-only mode (including a data transient that *is* captured), non-redundant mode
  (ClkB/ClkC silent, B/C forced), on-the-fly mode switches, and the reserved
  encoding.
* `tb_rskew_tpl_top_full`: the top at its defaults, 426 macros = 6816 flip-flops.
  Every word is rewritten and checked each cycle in all three modes, with rotating
  latch upsets. Verilator takes several minutes to compile it. The simulation itself
  takes seconds.
* One testbench per module (`tb_tpl_*`): delay accuracy and glitch behaviour,
  exhaustive vote, C-element rule and filtering, every delay-line setting, clock
  source skews and clock-SET filtering, gater glitch-freedom, pulse width, latch and
  NRM behaviour, flip-flop and macro SEU/SET tolerance, and the mode-controller
  decode and timing.

Upsets are injected with `force`/`release` on a latch output inside the hierarchy
(for example `dut.g_macro[1].u_macro.g_bit[7].u_ff.u_lb.q`). Because the latch
variable keeps the forced value after `release`, this behaves like a flipped storage
node.
