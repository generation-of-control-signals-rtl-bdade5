# Hardware from SDL processes: shared datapaths with step-by-step local controllers

SDL (ITU-T Z.100) describes a system as communicating processes. Each process is an
extended finite state machine: it waits in a state, takes an input signal that may carry data,
does some computation, and moves to the next state. This RTL shows the hardware that a
high-level synthesis flow for SDL produces. The flow is the one described in "Generation of
Control Signals in High-Level Synthesis from SDL Specification" (Kwak, Kim, Lee, Baek, Park).
The flow makes two things from each process:

* a **datapath**: registers and pre-designed functional blocks (ALU, multiplier), with a
  multiplexer on every input so that one block can serve several operations;
* a **local controller**: the process's own state machine (the *abstract FSM*), with one
  extra state inserted for each clock step of the scheduled computation. Each inserted
  state drives the mux selects, operation codes and register load enables of its step.

The flow itself (partitioning, scheduling, allocation) is software and is not here. This
repository holds the hardware such a flow produces, written as synthesizable
SystemVerilog:

| piece | module | what it is |
|---|---|---|
| example process | `ex_process` = `ex_local_fsm` + `ex_datapath` | the flow's worked example: state `st1`, signal `s(x,y)`, `z := x*y + z`, state `st2` |
| architecture model | `arch_datapath` | the generic datapath template: N registers and N functional blocks, a mux on every input |
| barcode reader | `barcode_reader` | a stripe-width measuring controller built in the same style (mostly this design's own, see below) |
| functional blocks | `alu`, `multiplier` | the pre-designed blocks the datapaths use |
| top | `sdl_hls_top` | the three pieces side by side, sharing only clock and reset |

Shared types (ALU codes, state names, the example's control word) are in
`rtl/sdl_hls_pkg.sv`. Default sizes: W = 8-bit data, N = 4 for the architecture model.

## How an SDL signal becomes wires

An SDL signal is a discrete event, so the hardware needs a convention for it. The one used
throughout:

* each input signal of a process gets its own 1-bit port. The port is 1 while the signal is
  present;
* each data value the signal carries gets an extra data port. The data must be stable by
  the clock edge at which the signal port is first seen as 1;
* a signal has to be present for at least one rising clock edge, so the receiver can see it.
  Output signals follow the same rule.

Everything is synchronous to one clock. State changes and register writes happen on the
rising edge. In `ex_process` the signal `s(x, y)` becomes the port `s` plus the data ports
`s_x` and `s_y`.

## The local controller: inserting one state per time step

This part is the core of the method, and the least obvious. Take the example process:

```
   st1 --- input s(x,y) ---> [ z := x*y + z ] ---> st2
```

The abstract FSM has only two states, `st1` and `st2`. The computation is scheduled into two
clock steps. The first step multiplies into `tmp`. The second adds `tmp` to `z` and writes
`z`. Composing the two adds one state per step:

```
  st1 --(s=1)--> st1_1 --(any)--> st1_2 --(any)--> st2
```

| state | input | control outputs (all others 0) | effect at the next edge |
|---|---|---|---|
| `st1` | `s = 0` | none | stay in `st1` |
| `st1` | `s = 1` | `ld_x`, `ld_y` | x, y take the data of `s`; go to `st1_1` |
| `st1_1` | don't care | `c_m1=0`, `c_m2=1`, `ld_tmp=1` | `tmp := x * y`; go to `st1_2` |
| `st1_2` | don't care | `c_m1=0`, `c_m3=1`, `c_alu0=0`, `c_alu1=1`, `ld_z=1` | `z := tmp + z`; go to `st2` |
| `st2` | don't care | none | stay (the process ends here) |

The inserted states ignore the input and always advance. Their outputs therefore depend
only on the state, and `ex_local_fsm` decodes the control word from the current state
(Moore form). The Mealy labels of the method (`input / outputs` on each transition) give the
same signals in the same cycles. The control values of the two steps are the method's. The
loads of x and y when `s` is taken are this design's own: the method leaves them implicit.

Timing, for `s = 1` sampled at rising edge k:

```
edge      k          k+1           k+2
          x,y load   tmp load      z load
state  st1 -> st1_1 -> st1_2   ->   st2      (in_st2 = 1 after edge k+2)
```

`st2` is final: after one transition the process stays there until reset. With `z` reset to
0, the result is `z = x*y mod 2^W`.

## The datapath of the example (`ex_datapath`)

```
   x ──┬──► m1 ─┐                 tmp ────────────────► ALU ──► z
   y ──┘        ├─► multiplier ──► tmp       x, z ──► m3 ─┘
   x ──┬──► m2 ─┘
   y ──┘
```

There are four registers (x, y, tmp, z), one multiplier and one ALU. Muxes m1 and m2 feed
the multiplier and m3 feeds the ALU's second input. `tmp` drives the ALU's first input
directly. The method fixes the structure and the names. The inputs of each mux that the
method does not name are this design's choice:

| mux | select 0 | select 1 |
|---|---|---|
| m1 (multiplier A) | x | y |
| m2 (multiplier B) | x | y |
| m3 (ALU B) | x | z |

With this choice the scheduled codes (`c_m1=0, c_m2=1`, then `c_m3=1`) compute `x*y` and
`tmp + z`. The multiplier keeps the low W bits of the product.

## ALU operation codes

The ALU takes two control bits, `c_alu0` and `c_alu1`. The method gives one code, addition,
as `c_alu0 = 0, c_alu1 = 1`. In the package the code is the vector `{c_alu1, c_alu0}`, so
addition is `2'b10`. The other codes are this design's own:

| `{c_alu1,c_alu0}` | name | result |
|---|---|---|
| 00 | `ALU_PASS_B` | b |
| 01 | `ALU_SUB` | a − b |
| 10 | `ALU_ADD` | a + b |
| 11 | `ALU_INC` | a + 1 |

All arithmetic wraps modulo 2^W. The `zero` output is 1 when the result is 0.

## The architecture model (`arch_datapath`)

This is the template every process datapath is allocated into. Register i has an input
mux (Mux1,i) over the outputs of all functional blocks. Functional block i has input muxes
(Mux2,i) over all registers. In the template every functional block is the ALU. It has two
input ports, so it gets two muxes, one per port. Every register also has an extra input,
`ext_in[i]`, for data arriving on signal ports.

| control | encoding |
|---|---|
| `reg_sel[i]` | k < N: output of functional block k; k = N: `ext_in[i]` |
| `reg_ld[i]` | load register i on the rising edge |
| `fb_sel_a[i]`, `fb_sel_b[i]` | k: register k |
| `fb_op[i]` | ALU code above |

The muxes and ALUs are combinational, so a register-to-register operation takes one clock.
The method generates the controller for this template separately for each process, so no
general one exists. In `sdl_hls_top` the template's control inputs are top-level ports
(`ad_*`). Allocation for a real process would keep only the mux inputs that are used. This
template keeps all of them, as a full crossbar.

## The barcode reader (`barcode_reader`)

The method was demonstrated on a barcode reader controller. That reader reads bits from an
optical scanner and records the widths of the black and white stripes. Its published
description gives only this purpose, an unlabelled block diagram and the signal names of a
simulation. The names are start, video, newbit, maxtrans and error, three load-enabled
registers, mux selects, an ALU with a select code and a zero flag, and a 4-bit state vector.
This module keeps those names and that structure. Its algorithm is this design's own:

1. `start` clears the transition count (r2), then the reader waits for the first bit.
2. Each `newbit` pulse samples `video`. If the colour is the same as the current stripe's,
   the width r1 is incremented by the ALU. If the ALU result is 0, the counter overflowed:
   a stripe of 2^W or more bits raises `error`.
3. If the colour changes, the width of the stripe just ended is copied to r3 (`out_data`)
   and `out_valid` pulses for one clock. The transition count is incremented and the new
   stripe starts at width 1.
4. The next clock compares the count with `maxtrans` (ALU subtract, zero flag). When they are
   equal, the reader stops with `done`. Later bits are ignored until the next `start`.

Timing rules: `newbit` lasts one clock and must be followed by at least two clocks without
it. `video` must be valid when `newbit` is 1, and `maxtrans` must be at least 1. `out_valid`
is 1 in the second cycle after the edge that sampled the changing bit, and `done` rises one
clock later. An assertion reports a `newbit` that arrives while the reader is busy.

Trust this block less than the others. It does what the method's example reader is said to
do, but it cannot reproduce that reader's published waveforms cycle for cycle, because the
original algorithm is not given.

## Where this departs from the method, and choices made

* **Data width** is 8 bits everywhere (parameter `W`). The method gives no width. The
  values in its examples are two hex digits.
* **Reset** is asynchronous and active low. It clears all registers and puts every FSM in
  its first state. The method does not discuss reset.
* **Result register of the example.** The example's SDL text names the result `r`, while its
  data-flow graph and both control lists write `z`. This design writes `z`.
* One of the method's two control listings for step 2 leaves out `ld_z`. The other one,
  and the purpose of the step, need it, so it is driven.
* **After `st2`** the process is not specified, so `st2` is a final state.
* The **generic controller** of the architecture model does not exist, as explained above.
* The **barcode reader** is a reconstruction, as described in its section.
* The method also claims a circuit-size comparison with hand-written VHDL. That comparison
  has no numbers and is not reproduced.

## Simulating

Every testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends it with a failure if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sdl_hls_pkg.sv tb/tb_sdl_hls_top.sv --top-module tb_sdl_hls_top
./obj_dir/Vtb_sdl_hls_top
```

Replace the testbench name to run another one:

| testbench | checks |
|---|---|
| `tb_alu` | every code on corner and random operands, zero flag |
| `tb_multiplier` | all 65,536 8-bit operand pairs |
| `tb_ex_local_fsm` | waiting in `st1`, the state sequence, the control word of each state, `st2` held |
| `tb_ex_datapath` | random control words against a register-level model, then the scheduled sequence |
| `tb_ex_process` | 200 transactions: `z = x*y` exactly two clocks after `s`, `st2` final |
| `tb_arch_datapath` | random selects, codes and loads against a model, every clock |
| `tb_barcode_reader` | random barcodes: widths, `out_valid` and `done` cycles, 255-bit stripe, overflow error, restart |
| `tb_barcode_fig7` | a 4-transition barcode (widths 1, 2, 3, 4) with its exact start-to-done cycle count |
| `tb_sdl_hls_top` | all three pieces at once, at default sizes; counts each mechanism and fails if one never happens |

All testbenches run at the default parameters and finish in seconds. Signals that are never
reset start at random values in a two-state simulator. The testbenches do not depend on
them.
