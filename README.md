# On-line LocalLink protocol checker

A LocalLink connection between two FPGA IP cores can break in ways that the
cores themselves never notice: a source that forgets a frame marker, or that
raises two markers on one beat, or that starts a new frame before the old one
has ended. This design is a small passive monitor that sits beside such a
link. It watches the six control signals every clock and raises `error` as
soon as the traffic leaves the protocol. It never drives the link. In a
fault-tolerant system, that flag can trigger a reset or a reconfiguration of
the faulty core.

The checker is the hardware that a rule description would compile to. Each
rule is written as a *condition* (one signal compared with a constant). The
conditions combine into *input symbols*, which drive a deterministic
automaton. The automaton has an initial state `S0` and a final error state
`Serr`. The RTL is laid out the same way:

| Module | Role |
|---|---|
| `llc_pkg` | shared types: control bundle `ll_ctrl_t`, operators `cmp_op_e`, symbols `sym_e`, states `state_e` |
| `llc_condition` | one condition `signal OP constant`, OP ∈ {==, <>, >, >=, <, <=} |
| `llc_symbol_decoder` | symbols p0..p5 built from conditions; combination check |
| `llc_seq_fsm` | sequence automaton S0..S3, Serr |
| `ll_checker` | top: decoder + automaton + registered combination flag |

## The watched signals

All six signals are active low. A beat moves across the link in a cycle where
both `src_rdy_n` and `dst_rdy_n` are low. A frame is a header, then a payload,
then a footer. Four markers frame these parts:

```
beat:     H0    H1/P0  P1   P2   P3   P4/F0  F1   F2
sof_n     0     1      1    1    1    1      1    1
sop_n     1     0      1    1    1    1      1    1
eop_n     1     1      1    1    1    0      1    1
eof_n     1     1      1    1    1    1      1    0
symbol    p0    p1     p4   p4   p4   p2     p4   p3
state→    S1    S2     S2   S2   S2   S3     S3   S0
```

This is the reference frame in the testbench: 64-bit data, a 12-byte header,
a 34-byte payload and a 15-byte footer. The checker does not look at `DATA`
or `REM_N`, so the data width and the frame length do not matter to it.

## Input symbols (combination level)

Every clock cycle decodes to exactly one of six symbols, or to none:

| Symbol | Condition |
|---|---|
| p0 (SOF) | both ready low, `sof_n`=0, other three markers 1 |
| p1 (SOP) | both ready low, `sop_n`=0, other three markers 1 |
| p2 (EOP) | both ready low, `eop_n`=0, other three markers 1 |
| p3 (EOF) | both ready low, `eof_n`=0, other three markers 1 |
| p4 (data) | both ready low, all four markers 1 |
| p5 (no transfer) | `src_rdy_n` <> 0 **or** `dst_rdy_n` <> 0 |

Each of p0..p4 is an AND of six `llc_condition` instances. p5 is an OR of two.
When no symbol holds, a beat was transferred with two or more markers active.
That is a forbidden combination, and `llc_symbol_decoder` raises `comb_error`
for it. Markers are ignored in cycles where no beat is transferred, so a
source may hold them, or leave them at any value, while the link is stalled.

Under these rules a marker must be the only marker on its beat. SOF and SOP
may not share a beat, and neither may EOP and EOF. That is stricter than the
LocalLink standard itself, which allows a one-beat header or footer. A link
that uses such beats needs the symbols changed in `llc_symbol_decoder`.

**Reading of p5.** The rule behind p5 can also be read as "one of the ready
signals is low". That reading overlaps p0..p4 and makes the automaton
non-deterministic. The RTL uses the reading that keeps the symbols disjoint:
p5 holds when no beat is transferred. An immediate assertion checks that at
most one symbol is active.

## Sequence automaton

`llc_seq_fsm` is written as two processes: a state register and a
combinational transition function.

| State | p5 | p4 | marker that advances | anything else |
|---|---|---|---|---|
| S0 between frames | S0 | Serr | p0 → S1 | Serr |
| S1 header | S1 | S1 | p1 → S2 | Serr |
| S2 payload | S2 | S2 | p2 → S3 | Serr |
| S3 footer | S3 | S3 | p3 → S0 | Serr |
| Serr | Serr | Serr | Serr | Serr |

"Anything else" includes the empty symbol (a forbidden combination), so a bad
combination is also a sequence error. Only `reset` leaves Serr, and an
assertion checks that.

## Top-level interface and timing (`ll_checker`)

| Port | Dir | Meaning |
|---|---|---|
| `clock`, `reset` | in | link clock; synchronous active-high reset to S0 |
| `sof_n`, `sop_n`, `eop_n`, `eof_n`, `src_rdy_n`, `dst_rdy_n` | in | watched LocalLink control signals |
| `error` | out | violation seen; stays high until reset |
| `comb_error` | out | the previous cycle had a forbidden combination (one-cycle pulse) |
| `state` | out | automaton state (`llc_pkg::state_e`) |
| `sym` | out | symbol decoded in the current cycle (combinational) |

Both `error` and `comb_error` come from registers. They rise one clock after
the offending cycle. The decoder is about a dozen gates. The automaton is
three flip-flops, and the top adds one more for `comb_error`. No logic depends
on data width or frame length.

## Choices of this implementation

- The reset is synchronous and active high. The rules do not fix its
  polarity.
- `Serr` is absorbing, so `error` is sticky until reset.
- `comb_error`, `state` and `sym` are extra diagnostic outputs. The core
  output of the checker is `error`.
- `llc_condition` compares unsigned values and has a width parameter, default
  1. Only the comparator that `OP` selects is elaborated.
- The state encoding is binary, with Serr = 4.

## What is not here

- **Data-level checking is not implemented.** The checker never looks inside
  frames; it does not check data content, `REM_N` or parity.
- **There is no rule compiler.** The translator from a rule description to
  RTL is software. The modules here are what it would produce for the
  LocalLink rules, written by hand.
- **Timing is untested.** Timing closure was not verified. The logic is
  shallow: one level of comparisons and a small next-state function.

## Simulation

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_llc_condition` | every operator against a 4-bit sweep, and the 1-bit forms used by the decoder |
| `tb_llc_symbol_decoder` | all 64 control combinations against the rules above |
| `tb_llc_seq_fsm` | 20,000 random symbols against a reference model, with periodic reset; every state must be visited |
| `tb_ll_checker` | the reference frame above; then 3000 random frames throttled on both sides; ~10 % carry a fault (two markers on a beat, missing SOP, data between frames, second SOF); reset after each detected fault |

`tb_ll_checker` predicts `error`, `comb_error` and `state` every cycle from
its own reference model. It also checks that `comb_error` does not change
before the clock edge. It counts each mechanism: idle and data cycles in each
state, each marker transition, throttling by source and by destination,
markers ignored while stalled, both fault types, and recovery by reset. A
mechanism that never occurs counts as a failure. The design has no
parameters, so this testbench runs it at full size.

With plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_ll_checker \
  -y rtl -y tb rtl/llc_pkg.sv tb/tb_ll_checker.sv
./obj_dir/Vtb_ll_checker
```

Change the top module and the testbench file to run another testbench.
Verilator finds the other modules in `rtl/` by their file names.

To check a different protocol, give the symbols new conditions in
`llc_symbol_decoder`, add enum entries to `llc_pkg`, and rewrite the
transition table in `llc_seq_fsm`.
