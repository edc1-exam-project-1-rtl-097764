# Sequential sum-of-squares-difference calculator

This design computes

    y = ( sum over i = 1..k of ( 4*x[2i]^2 - x[2i-1]^2 / 4 ) ) / k,   k in {1, 2, 4, ..., 128}

for a stream of 8-bit unsigned numbers. The numbers arrive one at a time on a parallel bus under
a request/acknowledge handshake: first k, then x1, x2, ..., x(2k). The result is exact. It is
a 32-bit two's-complement number plus a count of fractional bits.

The main idea is to factor each term:

    4*x2^2 - x1^2/4 = (2*x2 + x1/2) * (2*x2 - x1/2)

so every pair of inputs costs one addition, one subtraction and **one** multiplication instead of
two. A single shift-and-add multiplier accumulates the products straight into the result
register. The division by k is never carried out. Because k is a power of two, dividing by it
only moves the binary point, so the calculator reports where the point is (`y_frac_bits`)
and leaves the 32-bit sum unchanged.

The hardware is split in two parts:

* an **operational subsystem** (`datapath`) of registers, adders and shift registers;
* a **control subsystem** (`control_unit`): a one-hot sequencer of eleven flip-flops.

They run on opposite clock edges.

## Interface and handshake

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clock`       | in  | 1     | system clock |
| `rst`         | in  | 1     | asynchronous, active-high reset of the sequencer |
| `x`           | in  | 8     | input bus, unsigned |
| `nrdy`        | in  | 1     | "number ready": the source has put the requested number on `x` |
| `rdy`         | out | 1     | "ready": the calculator requests a number |
| `rr`          | out | 1     | "result ready": `y` and `y_frac_bits` are valid |
| `y`           | out | 32    | signed sum of products, see *Number formats* |
| `y_frac_bits` | out | 8     | number of fractional bits of `y`, equal to 2 + log2 k |

Every input transfer is a four-phase exchange:

1. the calculator raises `rdy`;
2. the source drives `x` and raises `nrdy`;
3. the calculator, having taken the number, lowers `rdy`;
4. the source lowers `nrdy` (and may release `x`).

`x` must stay stable from step 2 until `rdy` has fallen. The number is captured half a clock
cycle after the calculator first sees `nrdy` high. The next request comes only after `nrdy`
has been seen low.

Results have no handshake of their own. While the calculator waits for the next k, it holds `rr`
high together with `rdy`. The outputs stay valid until that k is accepted, and accepting k clears
the sum. A source that wants the result reads it while `rr` is high.

After `rst` the calculator is waiting for k with `rr` high. The data registers have no reset, so
`y` and `y_frac_bits` mean nothing until the first run has ended.

## Number formats

This is the part that needs the most care, because the binary point moves three times.

**Operands (16 bits, 1 fractional bit).** Each input is placed on a 16-bit bus:

* `x2` goes on bits 9:2 with zeros around it, `{6'b0, x, 2'b0}`. In a format with one
  fractional bit that is 2*x2, i.e. x2 multiplied by 2 with nothing lost.
* the buffered `x1` goes on bits 7:0, `{8'b0, x1}`. In the same format that is x1/2: halving
  costs nothing, because the lost bit lands in the fraction.

Two 16-bit adders then form

* operand A = 2*x2 + x1/2, never negative, at most 637.5;
* operand B = 2*x2 - x1/2, two's complement (inverted x1 bus with carry in set), between
  -127.5 and 510.

In raw integers these are 4*x2 + x1 and 4*x2 - x1.

**Products and sum (32 bits, 2 fractional bits).** Multiplying two numbers that each have one
fractional bit gives two fractional bits. The raw 32-bit sum therefore holds
sum(16*x2^2 - x1^2), i.e. four times the true sum of terms. The range is wide: 128 pairs of
extreme inputs reach +133,171,200 or -8,323,200 raw, far inside 32 bits.

**Division by k.** The value of the result is

    y / 2^(2 + log2 k) = y / 2^y_frac_bits

`frac_bits_unit` keeps k in a register and takes log2 k with three OR gates. This works
because exactly one bit of k is set: bit j of the logarithm is the OR of the k bits whose
index has bit j set. The unit then adds 2 with an 8-bit adder.

Example: k = 4 with x = 123, 85, 71, 2, 0, 0, 64, 64 gives `y` = 156934 and
`y_frac_bits` = 4, i.e. 9808.375. k = 2 with x = 69, 13, 7, 5 gives `y` = -1706 and
`y_frac_bits` = 3, i.e. -213.25.

## Multiplication by shift and add

`shift_add_multiplier` holds the operands in two 32-bit shift registers (`sr32cled`, each two
chained 16-bit halves). Loading them sign-extends the 16-bit operands. Then the sequencer loops:

* if bit 0 of B (`mult_lsb`) is 1, add A to the result register (one cycle);
* shift A one place left and B one place right, with zero entering at the top (one cycle);
* stop when B is zero (`mult_done`, four 8-bit NORs ANDed).

Adding and shifting take separate cycles, so the adder never sees a register that is changing.
If B is already zero after loading (4*x2 = x1), the loop is skipped entirely.

A negative B needs more thought. It is sign-extended, and the right shift brings in zeros, so
the loop does not stop until all 32 bits have been shifted out. Modulo 2^32, the sum of A's
shifted copies is still the signed product. That is why the operand registers are as wide as
the result register: a narrower A would lose the high bits that make the wrap-around come out
right.

The cost of one product, in clock cycles, is (number of significant bits of B) shifts plus
(number of 1 bits of B) adds:

* B >= 0 (at most 1020 raw, so at most 10 bits and 9 ones): at most 19 cycles;
* B < 0 (raw -1 to -255, so 32 significant bits and at least 25 ones): 57 to 64 cycles.

## The sequencer

Each state is one flip-flop (`seq_state`). It is entered when its `entry` input is high at a
clock edge, and it stays active while its `stable` input is high. When it leaves, it pulses
`jump`, which drives the entry of the next state. A one-cycle state ties `stable` low. A state
that waits for the handshake ties `stable` to `nrdy` or to its inverse. The flip-flop outputs are
the control strobes themselves. Two states (`seq_state_alt`) have a second exit. They leave by
`alt_jump` instead of `jump` when the multiplier's done flag is set.

| state | strobes                        | rdy | leaves when / to |
|-------|--------------------------------|-----|------------------|
| s0    | `rr`                           | 1   | `nrdy` = 1, to s1 (reset state) |
| s1    | `load_k` (k buffer, pair counter; clears the result) | 1 | after one cycle, to s2 |
| s2    | none                           | 0   | `nrdy` = 0, to s3 |
| s3    | none (request x1)              | 1   | `nrdy` = 1, to s4 |
| s4    | `load_x1`, `decrement_counter` | 1   | after one cycle, to s5 |
| s5    | none                           | 0   | `nrdy` = 0, to s6 |
| s6    | none (request x2)              | 1   | `nrdy` = 1, to s7 |
| s7    | `mult_load`                    | 1   | after one cycle, to s8 |
| s8    | none                           | 0   | `nrdy` = 0: end of pair if B = 0, else s9 (bit 0 of B = 1) or s10 |
| s9    | `mult_add`                     | 0   | after one cycle, to s10 |
| s10   | `mult_shift`                   | 0   | end of pair if B = 0, else s9 or s10 by bit 0 of B |

At the end of a pair, the pair counter decides what comes next:

* `counter_zero` = 1: back to s0, with the result ready;
* otherwise: to s3 for the next pair.

The counter is loaded with k and counts down once per x1 load, so it reaches zero while the
last pair is being read. No extra state is spent on counting.

`control_unit` checks by assertion that the state vector is always one-hot and that `rr` is
never high without `rdy`.

## Two clock phases

The controller's flip-flops change on the rising edge of `clock`. All registers of the
operational subsystem are clocked by the inverted clock (`clock_n = ~clock` in `edc1_system`),
so they act on the falling edge. A strobe raised at a rising edge is carried out half a cycle
later, when it has settled. The flags it changes (`mult_done`, `mult_lsb`, `counter_zero`) then
settle before the next rising edge, where the controller looks at them. One state therefore
performs one step and can base its exit on that step's result in the same cycle.

`nrdy` and `x` come from outside and have no synchronizer. `nrdy` must meet setup to the
rising edge, and `x` to the falling edge.

## Modules

| module | role |
|--------|------|
| `edc1_system` | top: controller, inverted clock, datapath |
| `control_unit` | the eleven-state one-hot sequencer |
| `seq_state`, `seq_state_alt` | sequencer cells (one and two exits) |
| `datapath` | operational subsystem |
| `operand_unit` | x1 buffer, sum and difference adders |
| `shift_add_multiplier` | A and B shift registers, 32-bit adder, result register |
| `sr32cled` | 32-bit bidirectional shift register with zero flag |
| `bidir_shift_reg` | 16-bit bidirectional shift register (one half) |
| `frac_bits_unit` | k buffer, log2, +2 |
| `log2_calc` | three-OR logarithm of a one-hot byte |
| `pair_counter` | 8-bit loadable up/down counter with terminal count |
| `adder` | adder with carry in, carry out and overflow (used at 8, 16 and 32 bits) |
| `ce_register` | register with clock enable and asynchronous clear |
| `edc1_pkg` | shared widths (8, 16, 32, 8) and the constant 2 |

The small library-style parts (`adder`, `ce_register`, `bidir_shift_reg`, `pair_counter`)
keep the pins of the parts they stand for, including outputs that no instance uses (carry
out, overflow, cascade enable). This accounts for the unused-signal lint warnings.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/edc1_pkg.sv \
        tb/tb_edc1_system.sv --top-module tb_edc1_system
    ./obj_dir/Vtb_edc1_system

`tb_edc1_system` runs the top at its only size. Its source model answers the handshake with
random delays of 0 to 3 cycles. It feeds:

* the two worked examples above;
* every k from 1 to 128 with random operands;
* k = 128 with all-extreme operands, for the largest positive and most negative sums.

It compares `y` and `y_frac_bits` with the formula evaluated in the testbench. It also checks
that each multiplication takes exactly the shift and add cycles given above. It counts handshake
waits, skipped multiplications, add steps, shift-only steps, negative differences, pair-loop and
main-loop repeats, and fails if any of them never happened. `tb_control_unit` checks the
sequencer cycle by cycle against a reference model of the state table, with random inputs.

## Where this RTL departs from or adds to the original design

* **Reset.** The original has no reset input. Here `rst` resets the sequencer into s0, the
  state that waits for k. The data registers still have none, so the outputs are undefined
  before the first run.
* **Two-exit sequencer cell.** Its insides are not given. `seq_state_alt` is the one-exit cell
  with its leave pulse split by `alt`, which is what the flowchart's decisions require.
* **Library parts.** The counter, shift registers and registers follow the usual behaviour of
  the parts they are named after: asynchronous clear, and load having priority over clock
  enable. The controller never asserts load and enable together, so the priority does not
  matter here.
* **Operand A register.** It is the same bidirectional register as B, with its direction tied
  to "left", rather than a separate left-only part.
* **Input timing.** There is no synchronizer on `nrdy`, and `k` must be a power of two. Other
  values give a meaningless `y_frac_bits`, and k = 0 is not handled, as in the original.
