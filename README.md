# Sequential BCD decimal multiplier

Financial and commercial software computes in decimal, and converting decimal
operands to binary and back costs time and rounding care. This design multiplies
two unsigned decimal integers held directly in BCD 8421, four bits per digit.
By default both have 8 digits, so each fits a 32-bit word, and the product has
16 digits (64 bits).

A parallel decimal multiplier needs a large tree of decimal adders. This one
works sequentially, like pencil-and-paper long multiplication, and reuses one
adder:

* Each clock, one multiplier digit Y_i (0..9) is taken, least significant first.
* The partial product Y_i·X is formed without any multiplication. It is the sum
  of two "easy" multiples of X, chosen from X, 2X, 4X and 5X.
* That pair is added to the running sum, shifted one decimal place to the right:
  `P[i+1] = P[i]/10 + U[i] + V[i]`.
* The digit shifted out of the running sum is final, so it goes into the low
  half of the product.

After N clocks the product is complete. The easy multiples depend only on X.
They are computed once per operation, by carry-free logic, and held for all N
iterations.

## Number format

Every number is a packed array `logic [N-1:0][3:0]`: digit 0 (the least
significant) is in bits 3:0, and each digit is a BCD 8421 code 0..9. Codes
10..15 are not detected. The result for such inputs is undefined. Operands are
unsigned; there is no sign handling.

## Easy multiples without carries (`bcd_x2`, `bcd_x5`, `easy_multiples`)

This is the least obvious part of the design. In BCD, doubling or multiplying by
five never needs a carry chain. Each result digit depends only on its own input
digit and the next lower one.

**Doubling.** For digit x_j, `2·x_j = 10·c + r` with r even. The carry into
digit j is 1 exactly when the lower digit is 5 or more, and it always lands in
bit 0, which r leaves free. So each output digit is a fixed 4-bit function of
two input digits:

| output bit | set when | equation (x = own digit, l = lower digit) |
|---|---|---|
| 3 | x = 4, 9 | `x3·x0 + x2·!x1·!x0` |
| 2 | x = 2, 3, 7, 8 | `x3·!x0 + x1·x0 + !x2·x1` |
| 1 | x = 1, 3, 6, 8 | `x3·!x0 + !x3·!x2·x0 + x2·x1·!x0` |
| 0 | l ≥ 5 | `l3 + l2·(l1 + l0)` |

**Times five.** `5·x = 10·floor(x/2) + 5·(x mod 2)`, so output digit j is
`5·(x_j odd) + floor(x_{j-1}/2)`. That is at most 5 + 4 = 9, so it never
carries. With `a = x_j[0]` and `l` the lower digit:

    bit3 = a·(l3 + l2·l1)      bit2 = l3 ⊕ (a·!(l2·l1))
    bit1 = l2 ⊕ (l1·a)         bit0 = a ⊕ l1

**4X** is 2X doubled again: two `bcd_x2` stages in series. X itself is passed
through. All four multiples are N+1 digits wide, because 5X and 4X of an
N-digit number need one more digit.

The testbenches check every equation exhaustively, over all 100 pairs of
(digit, lower digit) in every position.

## Partial product selection (`ppg`)

For multiplier digit y = y3 y2 y1 y0, the generator outputs two BCD numbers U
and V whose sum is y·X. The pair is the partial product W in "double-BCD" form.
It is not added inside the generator.

| y | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| V | 0 | 0 | 2X | 2X | 0 | 0 | 2X | 2X | 4X | 4X |
| U | 0 | X | 0 | X | 4X | 5X | 4X | 5X | 4X | 5X |

    V = 2X·y1 + 4X·y3
    U = X·(!y3·!y2·y0) + 4X·((y2 + y3)·!y0) + 5X·((y2 + y3)·y0)

This departs from the original formulation in one place. There, the 4X/5X
choice in U is conditioned on `y1 ⊕ y0` instead of `y0`. That form gives 7X for
y = 6 and 6X for y = 7. For y = 4, 5, 8 and 9 the two forms agree.

## Accumulation and the shift (`ppa`, `product_reg`)

The accumulator P has N+1 digits. In each iteration:

    P[i+1] = 0.1·P[i] + U[i] + V[i]        (0.1·P = P without its lowest digit)

The lowest digit of P[i] moves into a register of N−1 low product digits. That
register shifts right one digit per iteration, and new digits enter at its top.
P stays below 10·X, so it always fits in N+1 digits.

Example with N = 2 and 99 × 99:

* P1 = 0 + 9·99 = 891.
* Digit 1 is shifted out: P2 = 89 + 891 = 980.
* The product is P2 followed by the low digit: 980‖1 = 9801.

The adder (`ppa`) adds three BCD numbers and a carry of 0..2 at each digit
position, ripple fashion. At one position the binary sum s is at most
9+9+9+2 = 29. The digit is s mod 10, and the carry (s div 10) goes to the next
position. The running sum is kept as valid BCD after every iteration, so no
final carry-propagate step is needed.

A decimal carry-save accumulator would shorten the clock period. Such
accumulators usually work in 4-2-2-1 code, with easy multiples recoded to
4-2-2-1. This design does not use that option: it stays in BCD 8421
throughout.

## Control and bus timing (`mult_ctrl`, `operand_loader`, `seq_dec_mult_top`)

The operands arrive over one data bus in two consecutive clocks:

* The cycle with the start pulse carries operand A, the multiplicand X.
* The next cycle carries operand B, the multiplier Y.

`operand_loader` registers A, then starts the core with A and the bus value B.
`mult_ctrl` is a two-state controller (idle, run) with a digit counter:

* `load` captures X and Y and clears P.
* `step` is asserted for exactly N cycles.
* `done` pulses for one cycle once the product is final.

Clock edges are counted from the edge that samples `start`:

| edge | action |
|---|---|
| 0 | A registered |
| 1 | B and A loaded into the core, P cleared |
| 2 … N+1 | one multiplier digit each |
| after N+1 | `done` high for one cycle, `product` valid |

With the default N = 8, a result is ready N+1 = 9 clocks after start. A new
start is accepted in the cycle right after `done`, so one multiplication takes
N+2 = 10 cycles. `product` holds its value until the next operation starts
iterating. `busy` covers the B cycle and the iterations, and a start during
`busy` is ignored.

Design choices not fixed by the original description:

* The product leaves on its own 64-bit port rather than on the operand bus.
* `done` is registered.
* Reset is asynchronous and active low.

## Modules

| module | role |
|---|---|
| `sdm_pkg` | `N_DIGITS` default (8), BCD digit type, controller state enum |
| `seq_dec_mult_top` | top: `operand_loader` + `seq_dec_mult` |
| `operand_loader` | two-cycle operand transfer from the bus |
| `seq_dec_mult` | core: operand registers, multiplier digit shifter, datapath, controller |
| `mult_ctrl` | idle/run controller, digit counter, `done` |
| `easy_multiples` | X, 2X, 4X, 5X |
| `bcd_x2`, `bcd_x5` | carry-free ×2 and ×5 |
| `ppg` | U/V selection from the multiplier digit |
| `ppa` | three-operand BCD adder |
| `product_reg` | accumulator register and low-digit shifter |

The only parameter is `N_DIGITS` (8 by default, at least 2). Every module takes
it. The top's data bus is `4·N_DIGITS` bits and its product `8·N_DIGITS` bits.
The testbenches' integer reference model limits them to 8 digits.

The controller and the loader carry assertions: `done` and `go` are
single-cycle pulses, and `done` never overlaps `busy`.

## Simulation

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_bcd_pkg` supplies the
integer reference arithmetic. To run the end-to-end test with Verilator:

    verilator --binary --timing --assert --top-module tb_seq_dec_mult_top \
        -y rtl -y tb +libext+.sv rtl/sdm_pkg.sv tb/tb_bcd_pkg.sv \
        tb/tb_seq_dec_mult_top.sv -o sim
    ./obj_dir/sim

To test another block, replace `tb_seq_dec_mult_top` with that block's
testbench: `tb_bcd_x2`, `tb_bcd_x5`, `tb_easy_multiples`, `tb_ppg`, `tb_ppa`,
`tb_product_reg`, `tb_mult_ctrl`, `tb_operand_loader` or `tb_seq_dec_mult`.

All ten testbenches pass. `tb_seq_dec_mult_top` runs the top at its default
size with no parameter overrides:

* It performs over 2,000 multiplications, starting with
  99999999 × 99999999 = 9999999800000001.
* It checks the latency of every operation.
* It makes sure that each of the ten multiplier digit values was used.
* It tests starts while busy and back-to-back operations.

The combinational blocks are tested against integer arithmetic, with all digit
pairs and thousands of random operands. The tests of each block fail when one
equation, carry rule or control condition in it is deliberately broken.

## Limits

* Inputs are not checked for valid BCD.
* Only unsigned operands are handled.
* The accumulator is a ripple-carry BCD adder across N+1 digits, so it is the
  critical path. At 8 digits that is 9 digit stages per clock.
* No timing, area or power figures are given for this RTL.
