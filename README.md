# Streaming reduction circuit, and small state-machine examples

The main design here sums rows of floating-point numbers that arrive as one
stream, one value per clock cycle, using a single deeply pipelined adder.
Row lengths vary and are not known in advance. Sparse matrix-vector
products need exactly this: each row of the matrix gives a dot product, and
its partial products have to be accumulated. The difficulty is the adder's
latency. The sum of two values of a row leaves the 14-stage adder 14 cycles
after they went in, and meanwhile the next rows keep arriving. The circuit
therefore reduces several rows at once. It interleaves their additions in
the one pipeline, parks partial sums until a partner for them turns up, and
emits each finished row in the order the rows arrived.

Alongside it are the smaller circuits that show the same way of building
hardware: each component is a transition function (state, input) → (new
state, output) plus a register holding its state. They are:

- a multiply-accumulator (`mac`);
- two of them combined into `macsum`;
- a one-cycle `delay_reg`;
- a complex adder, `cpx_add`, built around whatever adder it is given.

All of it is synthesizable SystemVerilog-2017. `clash_top` holds the three
designs side by side, each with its own ports.

## How the reduction circuit schedules its one adder

Five parts, named by letters:

| | module | role |
|---|---|---|
| D | `discriminator_alloc` | tags each arriving value with a short row tag, the *discriminator* |
| I | `input_buffer` | FIFO of tagged values waiting to be added |
| P | `op_pipeline` | the ALPHA-stage adder; its last stage is called P_α |
| R | `partial_result_buffer` | holds partial sums (one slot per discriminator) and emits finished rows in order |
| C | `rc_controller` | decides each cycle what enters the adder |

Every cycle, C looks at three things:

- the two values at the head of I (I1, I2);
- the result leaving the adder (P_α);
- whatever R holds for P_α's row.

It then applies the first of these rules that matches:

1. R holds a value of P_α's row: that value and P_α enter the adder.
2. I1 belongs to P_α's row: I1 and P_α enter; one value leaves I.
3. I holds two values of the same row: I1 and I2 enter; two leave I.
4. I holds two values of different rows: I1 enters with the unit element
   (+0.0), so it passes through the adder unchanged and can meet its
   partner later; one value leaves I.
5. I holds fewer than two values: nothing enters.

Under rules 3 to 5, P_α is written into R. R never needs two values of the
same row, because rule 1 combines a stored value as soon as another value
of its row comes out of the adder. I fills by at most one value per cycle,
and rules 2 to 4 drain it, so I stays small. The test stream peaks at 15 of
the 32 entries.

**Knowing when a row is finished.** Rows carry no length and have no end
marker. A row ends when the next row index appears. For each discriminator,
R keeps:

- `busy`: the row is inside the circuit;
- `closed`: a later row has started;
- `items`: how many values of the row are still in I, P or R.

`items` goes up by one for each arriving value and down by one for each
addition of two of the row's values (rules 1 to 3). Rule 4 does not change
it. A row is finished when it is closed, `items` is 1, and that last value
sits in R. An output pointer steps through the discriminators in the order
they were handed out. When the pointer's row is finished, its sum goes out
for one cycle, the slot is freed, and the pointer moves on. A row that
finishes early waits for the rows before it. This is how the output keeps
arrival order.

**Discriminators.** D hands them out round-robin, 0 to 127, one per new row.
It spots a new row when the row index differs from the previous value's. The
tag lets R index partial sums directly, and it is much narrower than the
row index. A discriminator comes free when its row is emitted. The number
needed is the largest number of rows in flight at once. The worst case is a
long row followed by a run of one-value rows: those short rows finish at
once but must wait behind the long one. With a 14-stage adder the testbench
measures at most 70 rows in flight. 32 tags are not enough, so 128 are
built. If a busy tag would be handed out again, or I overruns, the sticky
`overflow` output goes high.

**The C-P loop.** C needs P_α, and P needs C's choice. The loop is broken
because P_α comes straight from a pipeline register. R's lookup is
combinational, so the whole decision takes one cycle.

### Timing and interface (`reduction_circuit`)

| signal | dir | meaning |
|---|---|---|
| `in_valid`, `in_value[31:0]`, `in_row[ROW_W-1:0]` | in | one IEEE-754 single with its row index; idle cycles allowed; no backpressure |
| `out_valid`, `out_value`, `out_disc` | out | a row sum, in row order, with its discriminator |
| `rule_fired` | out | which rule C applied this cycle (`rc_pkg::rule_t`) |
| `overflow` | out | sticky: I overran or a busy discriminator was reused |

The values of a row must arrive together, with idle cycles allowed between
them. Two consecutive rows must have different indices. A row's sum comes
out only after the next row has begun. In a stream that has stopped, the
last row therefore stays inside until a value of another row arrives. With
a one-value row left in I, rule 5 keeps it waiting. A two-value row followed
at once by another row gives its sum ALPHA + 4 cycles after its first value.
Reset (`rst_n`, active low, synchronous) empties every buffer.

### The adder

The adder is `op_pipeline`. It computes the sum as the operands enter
(`fp_add`, combinational) and then carries the result with its tag through
ALPHA = 14 registers. From outside, latency and throughput are those of a
real 14-stage floating-point adder. The only difference is where the logic
sits between the registers, so timing closure for a fast clock would need
the adder split across the stages. `fp_add` is IEEE-754 single precision
with round to nearest, ties to even. Its simplifications:

- subnormal inputs are read as zero, and subnormal results become zero;
- every NaN comes out as `0x7fc00000`.

The operator is a parameter, `OP` (`RC_OP` on the top). `OP_FADD`, the
default, is the floating-point adder. `OP_IADD` makes the same circuit sum
32-bit integers. Any other commutative, associative operator can be added
as one more `op_t` value. It needs a branch in `op_pipeline` and its unit
element in `rc_pkg::unit_of` (for example 1 for multiplication).

Floating-point addition is not associative. A row's sum therefore depends on
the order in which the scheduler happened to pair its values. Results can
differ in the last bits from a left-to-right sum.

## The small examples

- **`mac`**: acc' = acc + x·y. The output is acc' itself, combinational in
  the inputs and the register. The state resets to 0. Signed 16-bit operands
  and a wrapping 40-bit accumulator.
- **`macsum`**: two `mac`s on (a, b) and (c, d), output r1 + r2, one bit
  wider.
- **`delay_reg`**: q(t+1) = d(t), reset to `INIT`. It is the pipeline
  register used in `op_pipeline` and `cpx_add`.
- **`cpx_add`**: adds the real parts and the imaginary parts with two copies
  of the same `pipe_adder`. Parameters: `FLOAT` picks a floating-point or an
  integer adder, `LATENCY` sets its stages, and `S0` is its reset state. The
  complex adder has exactly the latency of the adder inside it.
  `clash_top` uses the floating-point adder with one stage.

## Sizes, and what is this design's choice

The 14-stage adder depth follows the description, which uses it as its
example. The description gives no other sizes, so these were chosen here:

- 32-bit single-precision values;
- 16-bit row index;
- 7-bit discriminators (128 rows in flight);
- 32-entry input buffer;
- the widths of the MAC and complex-adder examples.

The description proves that bounded buffers suffice but gives no sizes, so
the first two limits above come from simulation rather than from a proof.
Also this design's choices: how R detects finished rows (the item count
above), the valid bits, the overflow flags, and the `rule_fired` monitor
output. At default sizes, `clash_top` synthesises (generic yosys) to about
1140 flip-flops plus 6240 memory bits. The 128 × 32-bit partial-sum store
is most of those memory bits.

## Where this departs from the circuit as originally described

- The adder works out the sum in the first stage and then only carries it
  through the remaining stages. A real floating-point core spreads that
  work over the stages. Cycle behaviour is the same; clock speed is not.
- Buffer sizes come from simulation, not from a proof. These are the
  128 discriminators and the 32-entry input buffer. Overflow is flagged,
  not prevented.
- How R decides that a row is finished (the item count) is this design's
  own mechanism. So are the valid bits and the contents of the controller's
  command to R.
- The output gives each row sum with its discriminator, not its row index.
  Rows come out in arrival order, so the receiver can tell them apart.
- There is no flush. A stream's last row comes out only once another row
  begins.
- The adder flushes subnormals to zero, and every NaN comes out as one
  quiet NaN.
- The operator choice is limited to floating-point and integer addition.

## Files

- `rtl/rc_pkg.sv`: shared types: `dval_t` (valid, discriminator, value), `rule_t`, `r_ctrl_t`.
- `rtl/cpx_pkg.sv`: `cpx_t`.
- `rtl/reduction_circuit.sv` and its parts: `discriminator_alloc`, `input_buffer`,
  `op_pipeline`, `fp_add`, `partial_result_buffer`, `rc_controller`.
- `rtl/mac.sv`, `rtl/macsum.sv`, `rtl/delay_reg.sv`, `rtl/pipe_adder.sv`, `rtl/cpx_add.sv`.
- `rtl/clash_top.sv`: top.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/fp_ref_pkg.sv`: the floating-point reference for the testbenches.
  Singles are widened exactly to double, added, and rounded back with round
  to nearest even.

## Simulating

Each testbench needs the two packages and the reference package first. The
rest of the files are found through `-y`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/rc_pkg.sv rtl/cpx_pkg.sv tb/fp_ref_pkg.sv tb/tb_clash_top.sv \
    --top-module tb_clash_top -o sim
./obj_dir/sim
```

`tb_clash_top` runs the whole top at its default parameters, in seconds:

- 400 rows plus the MAC and complex-adder traffic;
- every row sum must come out once and in order;
- it counts how often each of the five rules fired, how often a finished row
  waited in R for an earlier row, discriminator wrap-arounds and idle input
  cycles, and fails if any count is zero.

`tb_reduction_circuit` adds the worst-case stream of long rows followed by
single-value rows, prints the most rows in flight and the fullest the input
buffer got, and checks the two-value-row latency. It also runs a row of
three values followed by idle input. There the first two values enter
together by rule 3, and the third waits in I. It joins their sum by rule 2
exactly ALPHA cycles later. A second instance built with integer addition
runs on the same stream and must agree cycle for cycle. The simulator has two
states, so the testbenches start from reset and read only initialised state.
