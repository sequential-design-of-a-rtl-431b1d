# Bi-function shift register

A register that is loaded in parallel and then either read in parallel or
unloaded one bit at a time. One select input picks the function on every
clock:

| `sel` | function | what happens on a rising clock edge |
|---|---|---|
| 1 (`MODE_PARALLEL`) | parallel in, parallel out | every stage loads its bit of `par_in` |
| 0 (`MODE_SHIFT`) | parallel in, serial out | every stage takes its left neighbour's bit; the word moves one place right |

The idea is that a parallel register and a parallel-to-serial register differ
only in what each flip-flop's D input sees, so one small combinational circuit
in front of every flip-flop is enough to have both.

## The per-stage equation

Each stage has three inputs that matter: the select `S`, its parallel input
`In`, and `Q`, the output of the stage to its left. The required behaviour is
a truth table:

| S | In | Q | D |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 0 | 0 | 1 | 1 |
| 0 | 1 | 0 | 0 |
| 0 | 1 | 1 | 1 |
| 1 | 0 | 0 | 0 |
| 1 | 0 | 1 | 0 |
| 1 | 1 | 0 | 1 |
| 1 | 1 | 1 | 1 |

With `S = 0` the stage copies `Q`, with `S = 1` it copies `In`. The minimal
sum of products is

    D = S'·Q + S·In

which is a 2-to-1 multiplexer built from two AND gates, an inverter on `S`
and an OR gate. `rtl/bf_next_state.sv` writes exactly those two product
terms.

## Structure and timing

`WIDTH` stages sit in a row; stage 0 is the leftmost, stage `WIDTH-1` the
rightmost. Stage *i* is `bf_next_state` feeding a D flip-flop `bf_dff`; its
`Q` input is the output of stage *i-1*. `par_out[i]` is stage *i*'s output and
`ser_out` is the rightmost stage's output.

- A parallel load takes one clock: the word is on `par_out` right after the
  load edge.
- After a load, `ser_out` already shows the rightmost bit, `par_in[WIDTH-1]`.
  Each shift edge brings the next bit to the left of it, so the whole word
  has left after `WIDTH` shift clocks, rightmost bit first.
- `sel` may change on any clock. No clock is spent on switching mode.

**What the leftmost stage shifts in.** Stage 0 has no left neighbour. With
`RECIRCULATE = 1`, the default, it takes the rightmost stage's output, so a
shifted word rotates and is back in place after `WIDTH` shifts. This follows
the reference schematic, which draws a wire from the last flip-flop back to
the first stage. It also matches its simulation: a load of 1,0,1 followed by
one shift shows 1,1,0. The schematic is not entirely clear at that point,
however. For that reason `RECIRCULATE = 0` is offered: stage 0 then takes the
`ser_in` port, which allows registers to be chained or filled serially.
`ser_in` is ignored while recirculating.

**Clear.** `rst_n` is an active-low asynchronous clear on every flip-flop.
The bi-function schematic itself has no clear. The basic registers it is
derived from do have a CLEAR line, and a known start state is needed in
hardware. The clear is this implementation's addition.

## Files

| file | content |
|---|---|
| `rtl/bf_pkg.sv` | `mode_e`, the select encoding (1 = parallel, 0 = shift) |
| `rtl/bf_next_state.sv` | per-stage next-state logic, `D = S'·Q + S·In` |
| `rtl/bf_dff.sv` | one D flip-flop with asynchronous clear |
| `rtl/bifunction_shift_register.sv` | the top: `WIDTH` stages, serial and parallel outputs |
| `tb/tb_bf_next_state.sv` | all eight truth-table rows, forward and backward |
| `tb/tb_bf_dff.sv` | capture, hold between edges, asynchronous clear |
| `tb/tb_bifunction_shift_register.sv` | end to end at the default size (3 stages, recirculating) |
| `tb/tb_bsr_wide_serial.sv` | 32 stages, `RECIRCULATE = 0`, serial fill through `ser_in` |

Parameters of `bifunction_shift_register`:

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 3 | number of stages; 3 is the size of the reference schematic, any n ≥ 1 works |
| `RECIRCULATE` | 1 | 1: stage 0 shifts in the last stage's bit; 0: it shifts in `ser_in` |

The size is 2 AND terms, 1 OR and 1 flip-flop per stage. For example,
3 stages synthesize to 13 word-level cells and 3 flip-flops.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. A watchdog stops any run that hangs.

- `tb_bifunction_shift_register` uses the top with all parameters at their
  defaults. It runs these phases:
  - It checks the clear.
  - It replays the schematic's demonstration: load 1,0,1, then check 1,1,0
    after one shift.
  - For every 3-bit word, it checks load latency, the serial bit order, and
    that the word is back after exactly 3 shifts.
  - It runs 3000 clocks of random select and data against a reference model.

  It counts each mechanism and fails if any never happened: clear, parallel
  load, shift, recirculation of a 1 and mode switch.
- `tb_bsr_wide_serial` covers the 32-bit case with `RECIRCULATE = 0`. It
  unloads whole random words serially while a second word is shifted in
  through `ser_in`. Random traffic follows.

To run one with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/bf_pkg.sv tb/tb_bifunction_shift_register.sv \
        --top-module tb_bifunction_shift_register -o sim
    ./obj_dir/sim

## Departures and what is not included

- The asynchronous clear and the `RECIRCULATE = 0` / `ser_in` option are
  additions. The first-stage recirculation is a reading of the schematic's
  wiring; see above.
- The flip-flops capture on the rising edge. Their inverted outputs are not
  brought out because nothing uses them.
- A variant that drives the outputs through tri-state buffers exists as an
  alternative to this design. It is not implemented.
- The 1 Hz clock source, the PARALLEL / RIGHT SHIFT switch and the lamps of
  the schematic's simulation are test instruments. The testbenches take
  their place.
