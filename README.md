# PASTA — a parallel self-timed adder built from half adders

A ripple-carry adder always waits for the worst-case carry chain. PASTA
(PArallel Self-Timed Adder) instead adds by repeated half-additions and
signals when it is done. Each bit position has only a half adder. It first
half-adds the two operand bits. After that it keeps half-adding its own sum
bit with the carry arriving from the position below. Every carry moves one
position per iteration and stops as soon as it meets a sum bit of 0. Carries
in different parts of the word move at the same time. When no carry is left
anywhere, the sum bits hold `a + b + cin`, and a completion signal, `TERM`,
goes high.

The time an addition takes therefore depends on the data. With no carries
it takes zero iterations. The worst case is `WIDTH+1` iterations, when a
carry has to cross the whole word. For random operands the average grows
with the logarithm of the width: about 4.4 iterations at 32 bits.

This RTL models the adder synchronously: one clock edge stands for one
iteration of the self-timed loop (see "Clocked realisation" below).

## The recursion

Write `S[i]` for the sum bit of position `i` and `C[i]` for the carry that
goes into position `i`.

* **Initial phase**: `S[i] = a[i] ^ b[i]`, `C[i+1] = a[i] & b[i]`, and
  `C[0] = cin`.
* **Each iteration**: `S[i] <- S[i] ^ C[i]`, `C[i+1] <- S[i] & C[i]`, and
  `C[0] <- 0`.
* **Done**: when every `C[i]` is 0.

The weighted total `sum(S[i]*2^i) + sum(C[i]*2^i)` is the same after every
step. So when all carries are zero, `S` equals the full sum. A carry is
only created where a 1 meets a 1, and it leaves behind a 0. This means the
carries are used up in a bounded number of steps.

## The bit slice and its three states

A slice (`pasta_bit_slice`) is a half adder fed by two 2:1 multiplexers:

| multiplexer | `SEL = 0` (initial) | `SEL = 1` (iterative) |
|-------------|---------------------|-----------------------|
| A side      | `a[i]`              | own sum `S[i]`        |
| B side      | `b[i]`              | carry `C[i]` from the slice below |

Take the state of a slice to be the pair `(C[i+1], S[i])`. A half adder
never outputs 1 on both, so `11` cannot occur. Only three states remain:

* **Initial phase**: operand bits `00` give state `00`, `01` or `10` give
  `01`, and `11` gives `10`.
* **Iterative phase**, with incoming carry `c`:

| from | `c = 0` | `c = 1` |
|------|---------|---------|
| 00   | 00      | 01      |
| 01   | 01      | 10      |
| 10   | 00      | 01      |

State `10` always hands its carry up and clears it. A carry therefore
moves one slice per iteration. A concurrent assertion in the slice checks
that `11` never occurs.

## The whole adder

`pasta` has `WIDTH+1` slices. The extra top slice, index `WIDTH`, has both
operand bits tied to 0, and its sum bit is the carry-out `cout`. Its own
carry `C[WIDTH+1]` can never become 1, because the result always fits in
`WIDTH+1` bits. That carry is still wired to the completion detector, and an
assertion checks that it stays 0.

The carry-in has a one-bit slot of its own, `C[0]`, below slice 0:

* while `SEL = 0`, the slot loads `cin`;
* the first iteration consumes it, and the slot then holds 0.

If `cin` were instead fed straight into slice 0, it would keep adding
itself and the loop would never settle.

## Completion detection

`pasta_completion_detect` computes `TERM = SEL & ~|C`. This is a wide NOR
over all carries, `C[0]` to `C[WIDTH+1]`, enabled by `SEL`. `TERM` is held
low while `SEL` is 0. Once `TERM` has risen, it stays high for as long as
`SEL` stays high: an addition with no carries left cannot create a new one.

## Handshake and timing

`SEL` plays the role of the request line.

1. Drive `a`, `b` and `cin` with `sel = 0` for at least one rising edge of
   `clk`. This edge loads the initial half-sums into the slices.
2. Raise `sel` and hold it. From then on, `a`, `b` and `cin` are ignored.
3. `term` is combinational from the slice registers. It is high right away
   if the operands produce no carry. Otherwise it goes high after `k` more
   rising edges, where `k` is the number of iterations the operands need
   (`1 <= k <= WIDTH+1`).
4. While `sel` and `term` are both high, `sum` and `cout` are valid and
   stable. Lower `sel` to start the next addition.

`rst_n` is an active-low synchronous reset. It clears all slice states and
the carry-in slot.

## Clocked realisation — where this RTL departs from the circuit

In the original circuit the half-adder outputs run straight back into the
multiplexers. The loop settles asynchronously, and `TERM` is the only
timing reference. Written as RTL, that would be a combinational loop: it
cannot be synthesised reliably or simulated cycle by cycle. So this design
adds the following:

* **A two-bit state register per slice**, clocked by `clk`. One edge is one
  iteration. The value sequence and the final result are the same as in the
  self-timed loop. The time to complete becomes "number of iterations ×
  clock period" instead of an analogue settling time.
* **A synchronous reset**, `rst_n`.
* **The carry-in slot** described above.

All three are choices of this implementation. The transistor-level parts of
the intended circuit are represented only by their logic function:

* a 12-transistor half adder (transmission-gate XOR, NAND plus inverter);
* a 6-transistor transmission-gate multiplexer;
* a 5-transistor completion detector.

Their layouts, and the delay, power and area figures in 45 nm CMOS, have no
counterpart here.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `pasta` | `WIDTH` | 4 | operand width; the 4-bit adder is the reference configuration |
| `pasta_completion_detect` | `N_CARRY` | 6 | number of carries watched (`WIDTH+2` in the adder) |

`pasta_pkg` holds the default width and the slice state type.

## Files

| file | contents |
|------|----------|
| `rtl/pasta_pkg.sv` | default width; slice state struct `(carry, sum)` and its named values |
| `rtl/pasta_half_adder.sv` | half adder |
| `rtl/pasta_mux2.sv` | 2:1 multiplexer |
| `rtl/pasta_completion_detect.sv` | `TERM = SEL & ~|carries` |
| `rtl/pasta_bit_slice.sv` | two multiplexers, half adder, state register |
| `rtl/pasta.sv` | top: `WIDTH+1` slices, carry-in slot, completion detection |
| `tb/tb_pasta_half_adder.sv` | exhaustive truth-table test |
| `tb/tb_pasta_mux2.sv` | exhaustive test |
| `tb/tb_pasta_completion_detect.sv` | exhaustive test, 6 carries |
| `tb/tb_pasta_bit_slice.sv` | every initial-phase input and every state transition of a slice |
| `tb/tb_pasta.sv` | 4-bit adder, all 512 `a, b, cin` combinations |
| `tb/tb_pasta_wide.sv` | 32-bit adder, 4000 random additions plus worst cases; measures the mean iteration count |

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=N failures=M` line.

`tb_pasta` checks the following for each addition:

* the result, against `a + b + cin`;
* the number of clock edges before `TERM`, against a word-level model of
  the recursion, `(s, c) <- (s ^ c, (s & c) << 1)`;
* that `TERM` stays low while `SEL` is low;
* that the result holds while `SEL` stays high;
* that operand changes during the iterative phase have no effect.

It also counts each behaviour of the adder and fails if any of them never
happened: zero, one and several iterations, the worst case of `WIDTH+1`,
a consumed carry-in, a carry-out, several carries in flight at once, and
`TERM` held low by `SEL`.

`tb_pasta_wide` found a mean of 4.37 iterations at 32 bits (longest seen:
13, worst case: 33). It fails if the mean exceeds `2*log2(WIDTH)`.

Run a test with Verilator 5, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -Itb \
    rtl/pasta_pkg.sv tb/tb_pasta.sv --top-module tb_pasta -y rtl
./obj_dir/Vtb_pasta
```

To try another width, change `W` in a testbench and pass it to the adder
as `#(.WIDTH(W))`, as `tb_pasta_wide` does.

## Limits

* Timing is in clock edges, not in gate delays. The design does not
  reproduce the self-timed circuit's analogue behaviour or its speed.
* The operands must be stable during the single load edge with `SEL = 0`.
  Nothing latches them on the rising edge of `SEL` itself.
* The `UNUSEDPARAM` lint warnings on `ST_01` and `ST_10` in `pasta_pkg` are
  expected. These names exist for the testbenches that check slice states.
