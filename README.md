# Simplicial piecewise-linear function evaluator

This RTL evaluates a three-input piecewise-linear (PWL) function
F(x1, x2, x3) that is stored as a table of vertex values in an external
4 kB RAM. The evaluator never multiplies. It finds the weights of the
simplex vertices around the input point by running a digital ramp. Each
vertex coefficient is read from the RAM for as many clock cycles as its
weight. A plain 12-bit adder then sums the values it reads.

The hardware is the digital core of a mixed-signal chip with three
single-slope A/D input channels. The analog comparators are included as
behavioural models, so the whole chip can be simulated, including its
analog front end.

## The idea: weights as time

The input domain is a grid of 16 x 16 x 16 vertices, split into simplices
(tetrahedra). On any simplex, a PWL function is fixed by its values at
the 4 corners:

    F(x) = mu1*c1 + mu2*c2 + mu3*c3 + mu4*c4,   mu1 + ... + mu4 = 1

Each input is an 8-bit fixed-point code `MMMM.LLLL`. The integer part
`MMMM` selects the grid cell. The fraction `LLLL` gives the position in
the cell along that axis.

A 4-bit ramp `k = 0 .. 15` is run through all three channels at once. At
step `k`, channel `i` uses the vertex coordinate `MMMM_i + 1` if
`k < LLLL_i`, and `MMMM_i` otherwise. This gives one vertex per step:

- at the start of the ramp, every channel is on its upper coordinate;
- each channel drops to its lower coordinate when the ramp passes its
  fraction, the channel with the smallest fraction first;
- at most 4 different vertices occur, and they are exactly the corners of
  the simplex that holds x (the cell is cut by the ordering of the
  fractions);
- each vertex is used for a number of steps equal to 16 times its
  barycentric weight.

So summing the 16 coefficients read gives `16 * F(x)`. With 8-bit
coefficients this sum fits in 12 bits. Its 8 MSBs are F(x), with 4
fraction bits truncated.

Worked example, in two dimensions (x3 = 0). The point is x = (1.5, 1.75),
coded as `0001.1000` and `0001.1100`. The vertex coefficients are:

| vertex | (0,0) | (0,1) | (0,2) | (1,0) | (2,0) | (1,1) | (1,2) | (2,1) | (2,2) |
|--------|-------|-------|-------|-------|-------|-------|-------|-------|-------|
| c      | 0     | 2     | 1     | 0     | 0     | 1     | 2     | 2     | 1     |

The evaluation runs like this:

- steps 0–7 read vertex (2,2), because both ramps are still below their
  fractions;
- steps 8–11 read vertex (1,2);
- steps 12–15 read vertex (1,1).

The sum is 8·1 + 4·2 + 4·1 = 20 = `0000_0001.0100`. That is 1.25, and the
bus shows the integer part, 1.

## Operation

A control FSM with three states sequences the chip. Its two state bits
are also the chip's status outputs EP (end of processing) and PROC:

| state      | EP | PROC | what happens                                                          | length     |
|------------|----|------|-----------------------------------------------------------------------|------------|
| Nothing    | 1  | 0    | idle; `bus_out` shows the last F(x) (`bus_oe` = 1); serial load allowed | until SP   |
| Converting | 0  | 0    | counter sweeps 0..255; input registers capture it (A/D)              | 256 clocks |
| Processing | 0  | 1    | counter LSBs are the ramp; 16 RAM reads added                          | 16 clocks  |

`sp` = 1 in Nothing starts an evaluation. It is ignored in the other
states. The new result is on `bus_out` 273 clocks after the clock edge
that samples `sp`: 1 + 256 + 16.

### Loading the inputs

There are two ways to load the inputs.

**Analog input.** Each channel compares its analog input `vin[i]` with an
external ramp `vramp`. The comparator output goes out on `comp_out[i]`.
The latch signal of the register comes back in on `latch_in[i]`. The
board connects the two.

During Converting:

- the register copies the 8-bit counter on every clock while
  `latch_in[i]` = 0;
- it holds from the first clock where `latch_in[i]` = 1.

The ramp must be a staircase generated in step with the counter. The
counter is 0 on the first Converting clock and adds 1 each clock after
that. The register then ends up holding the largest counter value at
which the ramp had not yet passed the input.

Outside Converting, a multiplexer forces the latch signal to 1. This
keeps the conversion result from being overwritten.

**Serial input.** In Nothing, `ser_en` = 1 turns the three registers into
one 24-bit shift chain:

    ser_in -> x3 -> x2 -> x1 -> ser_out

Send x1 MSB first, then x2, then x3. Then start with `sp` while holding
`latch_in` at 1, so that the conversion leaves the values alone. Shifting
also pushes the old contents out on `ser_out`, which can be used to read
back an A/D result.

### RAM interface

- `ram_addr[11:0] = {s1, s2, s3}`, with x1's vertex coordinate in bits
  [11:8]. The coefficient of vertex (v1, v2, v3) therefore goes at
  address `v1*256 + v2*16 + v3`.
- The RAM must return the data on `bus_in` within the same clock as the
  address. The address changes on each rising edge during Processing, and
  the adder samples `bus_in` on the next edge.
- On the chip the I/O bus is bidirectional: it is an output in Nothing and
  an input in Processing. Here it is split into `bus_in`, `bus_out` and
  `bus_oe` so that a pad tri-state buffer can be put outside.

### Input range

The address generator has no fifth bit, so MSBs `1111` + 1 wraps to
`0000`. Keep every input at or below `1111.0000` (240): the top vertex row
has no cell above it.

## Blocks

| module          | role |
|-----------------|------|
| `pwl_chip`      | Top: the three analog comparators and the digital core. As on the chip they are not connected inside; the board joins them through the pads. |
| `pwl_core`      | The digital block. It wires the parts below together: counter cleared in Nothing and running otherwise, adder cleared in Converting and adding in Processing, bus driven in Nothing. |
| `control_fsm`   | The Nothing / Converting / Processing FSM. The state encoding is `{EP, PROC}`; state lengths are taken from the counter value. |
| `counter8`      | 8-bit up counter with synchronous clear and enable. In Converting it gives the A/D code; in Processing its 4 LSBs are the ramp. |
| `input_reg8`    | One input register with its latch multiplexer and serial shift. |
| `comparator4`   | `comp = (ramp < fraction)`, written as a 4-stage ripple from the LSB. |
| `addr_gen4`     | `s = msb + comp`: a 4-stage half-adder incrementer whose carry-in is `comp`. |
| `adder12`       | 12-bit accumulator. A separate carry part (ripple generate/propagate) and sum part (XOR), with the sum register fed back. |
| `ad_comparator` | Behavioural model (not synthesizable) of the OTA comparator and pad buffer: `comp = vramp > vin`. |
| `pwl_pkg`       | Widths (3 inputs, 8-bit registers, 4-bit halves, 8-bit coefficients, 12-bit sum and address) and the state type. |

Two assertions are built in:

- `control_fsm` checks that the unused state code 11 is never reached;
- `adder12` checks that the sum never carries out of 12 bits.

Outside the design: the external RAM itself, which `tb/ext_ram_model.sv`
models for the testbenches.

Left out of the RTL:

- the two-phase clock generator;
- the sized clock and clear drivers;
- the pads;
- the die's test structures.

## Where this RTL departs from the silicon, or chooses for itself

- **Clocking.** The original registers and counter are master–slave
  stages on a two-phase non-overlapping clock. Here every storage element
  is a flip-flop on the rising edge of one clock `clk`, which behaves the
  same way in a synchronous design. All flip-flops have an asynchronous
  active-low reset (`rst_n`); the reset behaviour is this design's choice.
- **Comparator sense.** The comparator uses the strict `ramp < fraction`.
  This is what makes a fraction of `1000` give 8 of the 16 steps, and
  makes the weights add up to exactly 16/16. Using `<=` would give one
  extra step.
- **Latch polarity.** A latch signal of 1 means hold, and the analog
  comparator gives 1 once the ramp is above the input. The polarity is
  not given for the original; this choice is the one under which forcing
  the latch to 1 outside Converting protects the value.
- **Serial protocol.** Bit order, chaining and `ser_en` are this design's
  own. The original only says that the inputs can be loaded serially.
- **Accumulator handling.** The accumulator register, its clear during
  Converting, and keeping the result on the bus through Nothing are this
  design's choices. In Converting the bus is not driven.
- **RAM read timing.** The asynchronous RAM read within one clock is
  assumed; the original gives no RAM timing.
- **End of Processing.** The return to Nothing right after the 16th
  addition is assumed; the state table only names EP "end of processing".
- **Analog model.** The comparator model is ideal: no offset, delay or
  noise. A/D accuracy therefore depends only on how well the external
  ramp tracks the counter.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/pwl_pkg.sv tb/tb_pwl_chip.sv --top-module tb_pwl_chip
    ./obj_dir/Vtb_pwl_chip

The testbenches:

- **`tb_pwl_chip`**: the whole chip at its real size, in about 9 500
  clocks. It runs the worked example above, including the exact address
  sequence 0x220 ×8, 0x120 ×4, 0x110 ×4. It runs 24 evaluations of the
  linear table `c = v1 + 2 v2 + 3 v3`; PWL interpolation reproduces a
  linear function exactly, so the sum must equal `X1 + 2 X2 + 3 X3`. It
  runs 8 evaluations of a random table against a step model. Analog and
  serial loading alternate, and every conversion is read back through the
  serial chain. It also checks the 272 busy clocks, the bus direction,
  and SP pulses while busy.
- **`tb_pwl_core`**: the core without the analog models. The testbench
  drives the latch signals itself.
- **One testbench per block**:
  - exhaustive for `comparator4` and `addr_gen4`;
  - random against a reference for `counter8`, `input_reg8` and
    `adder12`;
  - state lengths and encoding for `control_fsm`;
  - a ramp sweep for `ad_comparator`.

## Changing it

- The widths live in `pwl_pkg`. The core derives the state lengths from
  them: 2^8 Converting clocks and 2^4 Processing clocks.
- More inputs (`N_IN`) widen the address by 4 bits each.
- More fraction bits make the ramp longer. The adder must then grow by
  the same number of bits, since it sums 2^fraction coefficients.
- The module parameters (`W`, `CNT_W`, `CONV_CYCLES`, `PROC_CYCLES`) can
  be set for standalone use of a block.
