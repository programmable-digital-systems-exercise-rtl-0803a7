# Binary to BCD conversion: a serial shift-and-correct converter

A display driver or decimal printer needs a binary number as decimal digits.
In binary-coded decimal (BCD), each decimal digit takes its own 4-bit field, so
127 becomes `0001 0010 0111`. This RTL turns a 32-bit unsigned binary number
into ten packed BCD digits. The largest 32-bit value, 4 294 967 295, has ten
digits. Digit 0 is in bits `[3:0]` of the 40-bit result.

The conversion comes in three forms that share one function:

| form | module | how | result after | cost (32 bit, 10 digits) |
|---|---|---|---|---|
| combinational | `bin_to_bcd_simple` | divide by 10^k, remainder mod 10, per digit | same cycle | ten constant dividers, no flip-flops |
| serial, output register (variant a) | `bin_to_bcd`, `MODE=OUT_REG` | 32-clock shift chain; the result is copied to a register | 33 clocks | 147 flip-flops |
| serial, stalled chain (variant b) | `bin_to_bcd`, `MODE=OUT_STALL` | 32-clock shift chain; the chain is frozen until the result is read | 32 clocks | 106 flip-flops |

`bcd_top` puts all three side by side so they can be compared on the same
inputs. The serial converter is the main design. The combinational one is
short to write and exact, but it needs a wide divider per digit. It is the
reference against which the serial one is judged, not a good hardware choice.

## The digit chain

The serial converter uses the *double dabble* idea. It shifts the binary number
in MSB first. Each clock, the decimal number held so far is doubled and the new
bit is added:

    value := 2 * value + bit

After 32 clocks the value equals the input. The trick is to keep `value` in
decimal digits all the time. Then doubling is a local operation per digit plus
a carry into the digit above.

A digit `d` (0..9) doubled, with an incoming bit `c`, gives `2d + c`, which lies
between 0 and 19. So the new digit is `(2d + c) mod 10`, and the carry to the
next digit is 1 exactly when `2d + c >= 10`. Because `c <= 1`, that happens
exactly when `d >= 5`. This leads to the next-state table of
`bcd_shl_1`:

| DAT now | DAT next | OVERFLOW (carry out) |
|---|---|---|
| 0..4 | `{DAT[2:0], ADD1}` = 2·DAT + ADD1 | 0 |
| 5..9 | `{DAT-5, ADD1}` = 2·DAT + ADD1 − 10 | 1 |
| 10..15 | `4'b111·ADD1` (error code) | 1 |

The error row is never reached from a cleared digit.

The carry depends only on the digit's *current* value, not on its input bit.
Digit `k` takes `ADD1` from the `OVERFLOW` of digit `k−1`, and digit 0 takes the
binary MSB. So all ten digits update in parallel in one clock, with no ripple
path through the chain. Each stage's logic is one 4-bit compare and a small
table.

Two details decide whether the chain works:

* **The carry must be combinational.** The digit above must see the carry in
  the same clock in which this digit wraps. A registered carry arrives one
  clock late, after the doubling it belonged to, and the result is wrong for
  nearly every input above 9. `OVERFLOW = (DAT >= 5)` is therefore a plain
  assign.
* **The digits must start from zero.** A new conversion doubles whatever the
  digits hold. The accepting clock clears every digit (`CLEAR`), not only the
  reset. Without the clear, the first conversion after reset is right and every
  later one is wrong.

Example, input 127 (only the last 7 of the 32 shifts are non-zero):

| bit shifted | digits (hundreds, tens, units) |
|---|---|
| 1 | 0 0 1 |
| 1 | 0 0 3 |
| 1 | 0 0 7 |
| 1 | 0 1 5 (7 ≥ 5: carry, 2·7+1−10 = 5) |
| 1 | 0 3 1 (5 ≥ 5: carry, 2·5+1−10 = 1) |
| 1 | 0 6 3 |
| 1 | 1 2 7 (6 ≥ 5: carry into hundreds) |

## Control: the shift register, the token and the handshakes

`bin_to_bcd` holds the number in a 32-bit shift register, `bin`, whose MSB
feeds digit 0. A one-hot *token*, `bst` (33 bits), is loaded with 1 when a
number is accepted and shifts along with `bin`. When the token reaches
`bst[32]`, 32 bits have gone in and the digits hold the result.

Both sides use an STB/ACK handshake. A word moves on a clock edge where both
STB and ACK are high. The sender keeps STB and the data steady until it sees
ACK.

* **Input:** `I_ACK = I_STB && ready`. The `ready` flag is set by reset and by
  a completed output transfer (`O_STB && O_ACK`). An accepted input clears it.
  So there is exactly one number in flight, and a new one is taken only once
  the previous result has been read.
* **Output:** `O_STB` stays high and `O_DAT` stays stable until `O_ACK`.
  Assertions in `bin_to_bcd` check this, and also that no input is accepted
  while a result is still pending.

Timing, counted from the clock edge that accepts the number (`I_STB && I_ACK`
high):

| | variant a (`OUT_REG`) | variant b (`OUT_STALL`) |
|---|---|---|
| `O_STB` high after | 33 edges | 32 edges |
| earliest next `I_ACK` | the edge after `O_ACK` | the edge after `O_ACK` |
| throughput with `I_STB` and `O_ACK` always high | 1 number / 35 clocks | 1 number / 34 clocks |

## Two ways to hold the result

The digits hold the result for only one clock. After that, the chain would go
on doubling. The design offers two remedies, chosen by the `MODE` parameter
(type `bcd_pkg::out_mode_e`):

* **`OUT_REG` (default).** When the token reaches `bst[32]`, the 40 digit bits
  are copied into an `O_DAT` register and `O_STB` is set. `O_STB` drops on
  `O_ACK`. The chain runs freely and its later contents are ignored. This
  costs a 41-bit output register and one extra clock of latency.
* **`OUT_STALL`.** `O_STB` is the token bit `bst[32]` and `O_DAT` is the digit
  chain itself. A shared enable, `en = !O_STB || O_ACK`, stops the shift
  register, the token and all ten digits (`ENABLE` on `bcd_shl_1`) while a
  result waits. On the acknowledging edge the token shifts out and `O_STB`
  falls. This version has 32 + 33 + 40 + 1 = 106 flip-flops and one
  `DAT >= 5` comparator per digit.

A tempting alternative enable is `!O_STB || ready`. It does not work: `ready`
only becomes 1 on the acknowledging edge, so the chain moves one clock later.
`O_STB` then stays high for a clock after `O_ACK`. A consumer that keeps
`O_ACK` high would take the same word twice. This design advances on `O_ACK`
itself.

## The combinational converter

`bin_to_bcd_simple` computes digit `k` as `(I_DAT / 10^k) % 10` and passes
`I_STB` straight to `O_STB`. After synthesis this becomes ten constant-divisor
dividers and modulo units on a 32-bit value. They are large and deep, and
there is no register to break the path. `CLK` and `RST` are ports only so that
the port list matches the serial converter; they drive nothing. The top digit
of a 32-bit input is at most 4, so its bit 3 is constant 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BIN_W` | 32 | input width |
| `DIGITS` | 10 | BCD digits out; elaboration fails if too few for `BIN_W` |
| `MODE` (`bin_to_bcd` only) | `OUT_REG` | result holding scheme, see above |

`bin_to_bcd_simple` allows `BIN_W` up to 64, because its divisors are 64-bit.
The serial converter has no such limit. Its latency is always `BIN_W` or
`BIN_W+1` clocks.

All flip-flops use an asynchronous, active-high reset (`RST`).

## Where this RTL departs from, or adds to, the original exercise

* The carry out of each digit is combinational and the digits are cleared when
  a number is accepted. These are the corrections the exercise asks the student
  to find. The form they take here (`CLEAR` port, synchronous, priority over
  `ENABLE`) is this design's own.
* The stalled-chain enable is `!O_STB || O_ACK` instead of `!O_STB || ready`,
  for the reason given above.
* Both result-holding schemes are kept in one module behind a parameter, and
  the output register scheme is the default. The exercise presents them as
  equal alternatives.
* Widths are parameters. Handshake assertions, the `DIGITS` size check and the
  side-by-side top are additions.
* The exercise also names a "simple BCD adder" as a goal but does not describe
  it. No adder is included.

## Files

| file | contents |
|---|---|
| `rtl/bcd_pkg.sv` | default sizes, `bcd_digit_t`, `out_mode_e`, `min_digits()` |
| `rtl/bcd_shl_1.sv` | one digit cell of the chain |
| `rtl/bin_to_bcd.sv` | serial converter with handshakes, both modes |
| `rtl/bin_to_bcd_simple.sv` | combinational converter |
| `rtl/bcd_top.sv` | the three converters side by side |
| `tb/tb_bcd_shl_1.sv` | digit cell against an integer model, 5000 random clocks |
| `tb/tb_bin_to_bcd_simple.sv` | edge cases and 5000 random numbers |
| `tb/bin_to_bcd_harness.sv` | driver/checker for one serial converter (random gaps and back-pressure) |
| `tb/tb_bin_to_bcd.sv` | both serial modes, 200 numbers each, latency and hold checks |
| `tb/tb_bcd_top.sv` | whole top at default size, 300 numbers per serial converter plus the combinational one |

Every testbench compares against a reference that divides by ten repeatedly.
Each ends by printing `TB_RESULT checks=N failures=M` and has a watchdog. The
serial tests check the exact latency and require that back-pressure, waiting
inputs and results taken in their first cycle each happen at least once. The
test numbers 8, 16 and 127, powers of ten and their neighbours, 0 and
2^32 − 1 are always included.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/bcd_pkg.sv \
        tb/tb_bcd_top.sv --top-module tb_bcd_top -o sim
    ./obj_dir/sim

Replace `tb_bcd_top` with any other testbench name. Each runs in well under a
second. Lint a module with

    verilator --lint-only -Wall -y rtl rtl/bcd_pkg.sv rtl/bin_to_bcd.sv --top-module bin_to_bcd

Lint reports `SYNCASYNCNET` on `RST`. This is expected: the assertions sample
the asynchronous reset synchronously in their `disable iff`.
