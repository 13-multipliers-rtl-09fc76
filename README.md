# Word-serial Booth multiplier (wsm)

A small sequential multiplier for two's-complement numbers. The design does
not use an array of adders. It has a single adder/subtractor and builds the
product one multiplier bit per clock, with the one-bit Booth algorithm. It
multiplies an 8-bit multiplier `qq` by an 8-bit multiplicand `dd` and returns
the 16-bit product on `aq`. A product takes 9 clock edges. The widths are
parameters (`N` for the multiplier, `M` for the multiplicand).

The design is split the classic way: a **datapath** holds the variables of the
algorithm in registers, and a **control unit** (a three-state machine) drives
it with a 7-bit op-code.

## The algorithm

Booth's method recodes the multiplier `Q = q(n-1)..q0` into signed digits.
An extra bit `q(-1) = 0` is appended below `q0`. Each digit is

    qhat(i) = q(i-1) - q(i)      q(i) q(i-1) :  00 -> 0,  01 -> +1,  10 -> -1,  11 -> 0

The value does not change: `sum qhat(i) 2^i` equals the two's-complement value
of `Q`. For example, `1001011` (-53) recodes to `-1 0 +1 -1 +1 0 -1`. The
product is then accumulated from the least significant digit upward:

    P[0] = 0
    P[i+1] = (P[i] + qhat(i) * D * 2^n) / 2        for i = 0 .. n-1
    P[n] = Q * D

Each step therefore adds `D`, subtracts `D` or does nothing to the upper half
of the product, and then shifts the whole product right by one place with
sign extension. Subtracting `D` lets the algorithm handle a negative
multiplier with no correction step at the end.

## How the datapath maps the algorithm onto registers

The trick of the datapath is that the partial product and the multiplier
share one shift register:

| register | width | holds |
|---|---|---|
| `D` (`d_reg`) | M | multiplicand |
| `A` (`a_reg`) | M | upper half of the partial product |
| `Q` (`q_reg`) | N+1 | the multiplier bits not yet used, the product bits already final, and the Booth bit `q(-1)` at the bottom |
| `Sc` (`step_counter`) | ceil(log2 N) | step count; `zi` is high when `Sc = N-1` |
| `F` (`alu`) | M+1 | `A`, `A + D` or `A - D` (combinational) |

The product register is the concatenation `(A, Q)`. In one step, `(F, Q)` is
shifted right arithmetically by one place and loaded back into `(A, Q)`. `A`
takes `F/2`. The bit `f0` drops into the top of `Q`. The old `q0` moves down
into the `q(-1)` position. After `N` steps the multiplier has been shifted
out completely, and `(A, Q without q(-1))` is the product.

The ALU has no op-code from the controller. Its operation is read straight
from the two lowest bits of `Q`, `Fop = {q0, q(-1)}`. So the Booth recoding
needs no logic of its own: the codes of the table above are the ALU codes
(`00`/`11` pass, `01` add, `10` subtract). Subtraction is done as
`A + not(D) + 1`.

In `q_reg`, `q[0]` holds `q(-1)` and `q[i+1]` holds `q(i)`, because a
SystemVerilog range cannot go below zero.

### Worked example (6 bits)

`D = 101101` (-19) and `Q = 101001` (-23). The digits are, from `q0` up,
`-1 +1 0 -1 +1 -1`:

| step | digit | F | A after step |
|---|---|---|---|
| 0 | -1 | 000000 - D = 010011 | 001001 |
| 1 | +1 | 001001 + D = 110110 | 111011 |
| 2 | 0 | 111011 | 111101 |
| 3 | -1 | 111101 - D = 010000 | 001000 |
| 4 | +1 | 001000 + D = 110101 | 111010 |
| 5 | -1 | 111010 - D = 001101 | 000110 |

The final `(A, Q)` is `000110 110101` = +437. `tb/tb_wsm_example.sv` checks
the digit, `F` and `A` of every step against this table.

## Op-codes

The controller drives the datapath with `op[6:0] = {Dop, Aop, Qop, Sop}`.
The op-codes are defined as enums in `rtl/wsm_pkg.sv`, and the packed struct
`op_t` keeps this bit layout.

| field | bits | 0 | 1 | 2, 3 |
|---|---|---|---|---|
| `Dop` | 6 | hold | `D <= dd` | - |
| `Aop` | 5:4 | hold | `A <= asr(F)` | `A <= 0` |
| `Qop` | 3:2 | hold | `Q <= (f0, Q(n-1..0))` | `Q <= (qq, 0)` |
| `Sop` | 1:0 | hold | `Sc <= Sc + 1` | `Sc <= 0` |

## Control unit and handshake

`cntu` is a Moore machine with two state bits. The encoding is SI = 00,
SM = 01, SF = 10. The unused code 11 behaves like SF.

| state | op-code | rdy | next state |
|---|---|---|---|
| SI (idle) | load D, load Q, clear A, clear Sc (`1101010`) | 0 | SM when `st = 1` |
| SM (multiply) | `asr` into A, shift Q, count (`0010101`) | 0 | SF when `zi = 1` |
| SF (final) | hold (`0000000`) | 1 | SI when `st = 0` |

The resulting protocol at the `wsm` ports:

1. While idle, the processor reloads `qq` and `dd` on every clock.
2. Apply the operands and raise `st`. The edge that samples `st = 1` takes the
   operands. Their values after that edge do not matter.
3. The next `N` edges perform the `N` Booth steps. The state moves to SF on
   the edge at which `zi` is high, which is the last step. `rdy` therefore
   rises `N + 1` edges after the start edge (9 at the default size).
4. `aq` and `rdy` hold for as long as `st` stays high. Lower `st`, and the
   next edge returns the processor to SI with `rdy` low. A new product can be
   started on the edge after that.

`rst` is asynchronous and active low. It forces the controller to SI and
clears all registers.

An assertion in `wsm` checks that the controller always issues the step
op-codes while in SM.

## Where this RTL departs from the textbook design

- **ALU guard bit.** The textbook datapath uses an M-bit adder, with
  `A <= (F(m-1), F(m-1..1))`. That adder overflows on `A - D` when the
  multiplicand is -2^(M-1) (for 8 bits, `dd = 80h`). An exhaustive check of
  the 8-bit algorithm shows this is the only multiplicand that fails. Here
  the ALU sign-extends `A` and `D` by one bit, so `F` is M+1 bits, and `A`
  takes `F[M:1]`. That is exactly `asr(F)` and always fits in M bits. For
  every other multiplicand, every register value is the same as with the
  M-bit adder.
- **Datapath resets.** The textbook resets only the controller. Here `rst`
  also clears D, A, Q and Sc, so that no register ever holds an unknown
  value. Products are unaffected, because SI loads these registers before
  they are used.
- **State output.** `cntu` brings its state out as `stt`. This output is for
  the assertion and for the testbenches.
- The operands are loaded on every idle clock, including the start edge.
  This follows the controller's state table. The prose of the textbook only
  says the operands are loaded while `st` is low.

The parameters allow N ≠ M. The testbenches exercise only N = M (8 and 6);
unequal widths are untested.

## Files

`rtl/` (one unit per file):

- `wsm_pkg.sv`: op-code enums, `op_t`, state enum
- `wsm.sv`: top level, `dpath` + `cntu`
- `dpath.sv`: datapath, instantiates the five parts below
- `d_reg.sv`, `a_reg.sv`, `q_reg.sv`, `step_counter.sv`, `alu.sv`
- `cntu.sv`: control unit

`tb/`: each testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_wsm` | Full design at its default 8 x 8 size, all 65536 operand pairs. Checks the product, the latency of N+1 edges, that the result holds in SF, and that `rdy` drops after `st` goes low. Also checks 53h x 65h = 20BFh and an asynchronous reset during a multiplication. It counts add, subtract and pass steps, idle waits, result holds, resets and the -128 multiplicand, and fails if any of them never happened. |
| `tb_wsm_example` | the 6-bit worked example above, step by step |
| `tb_dpath` | the datapath driven by a scripted controller; compares each partial product with a reference model, plus `zi` timing |
| `tb_cntu` | the state machine against a reference model under random `st`/`zi`, with asynchronous resets |
| `tb_alu` | exhaustive over 8-bit operands and all op-codes |
| `tb_a_reg`, `tb_q_reg`, `tb_d_reg`, `tb_step_counter` | random op-codes against reference models (the counter at N = 8 and N = 5) |

## Simulating

Every testbench compiles the same way with Verilator 5. For example:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        --top-module tb_wsm rtl/wsm_pkg.sv tb/tb_wsm.sv
    ./obj_dir/Vtb_wsm

The package must be listed first. Verilator finds the other modules through
`-y rtl -y tb`. The exhaustive `tb_wsm` runs in under a second. To try
another width, instantiate `wsm #(.N(..), .M(..))`; `tb_wsm_example` shows
how.
