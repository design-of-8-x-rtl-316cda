# Pipelined quaternary Vedic multiplier

This is an unsigned integer multiplier that works on **quaternary (radix‑4) digits**. It uses the
*Urdhva Tiryakbhyam* ("vertically and crosswise") multiplication method from Vedic mathematics.
The main configuration multiplies two 8‑digit operands (0 … 65535, the range of a 16‑bit word)
into a 16‑digit product. It is a **two‑stage pipeline** that accepts one operand pair per clock and
returns each product two clocks later.

The design is recursive. A 2‑digit × 2‑digit multiplier applies the vertical‑and‑crosswise method
directly. Four of those, plus two 4‑digit adders and a half‑adder stage, form a 4×4 multiplier.
Four 4×4 multipliers with the same kind of adder network form the 8×8 multiplier. The pipeline
register sits between the four sub‑products and their sum.

## Digits and numbers

- A quaternary digit (`qvm_pkg::qdigit_t`) has the values 0 … 3 and is carried as a 2‑bit binary
  code.
- A number is a packed array `qdigit_t [N-1:0]`, with digit 0 the least significant.
- The same vector read as a `2N`‑bit binary word has the same value. Binary logic can therefore
  drive the ports directly: an 8‑digit operand is a 16‑bit word, bits `[2i+1:2i]` being digit `i`.

The multiplier this design follows was built in multi-valued analog circuits, where each signal
takes four levels. Encoding every level as two bits is this design's own digital counterpart.

## The vertical‑and‑crosswise step (`q_vedic2x2`)

For operands `a = a1·4 + a0` and `b = b1·4 + b0`, the product is formed column by column:

| step | column sum                     | result digit | passed on as carry   |
|------|--------------------------------|--------------|----------------------|
| 1    | `a0·b0`                        | `p0`         | upper digit          |
| 2    | `a1·b0 + a0·b1 + carry`        | `p1`         | all digits above `p1` |
| 3    | `a1·b1 + carry`                | `p2`         | `p3`                 |

In each step the lowest digit of the column sum is a result digit, and everything above it is the
carry into the next column. The four one‑digit products (`q_digit_mul`) are independent and form in
parallel. That parallel formation is the method's advantage over a shift‑and‑add multiplier.

Worst cases:

- Step 2 reaches 9 + 9 + 2 = 20. Its carry (5) is more than one digit.
- Step 3 reaches 14, which still fits two digits.

With digits limited to 0 and 1 this is the ordinary binary 2×2 multiplier. For example,
`10 × 10 = 100`.

The same method on decimal digits gives `252 × 846 = 213192`. The top‑level testbench runs that
product as one of its cases.

## Combining four sub‑products (`q_vedic_combine`)

This is the part that needs the most care. Split each operand into halves of `H` digits:
`A = Ah·4^H + Al` and `B = Bh·4^H + Bl`. Four sub‑multipliers deliver `p_ll = Al·Bl`,
`p_hl = Ah·Bl`, `p_lh = Al·Bh` and `p_hh = Ah·Bh`, each `2H` digits wide. Then

```
A·B = p_ll + (p_hl + p_lh)·4^H + p_hh·4^(2H)
```

and the result digits come from:

```
digits 0 .. H-1    : p_ll[H-1:0]                      (passed straight through)
adder 1 (2H digits): t, c1 = p_hl + p_lh              (the crosswise products)
adder 2 (2H digits): digits H .. 3H-1, c2 = t + {p_hh[H-1:0], p_ll[2H-1:H]}
half-adder chain   : digits 3H .. 4H-1 = p_hh[2H-1:H] + (c1 + c2)
```

Both adder carries have weight `4^(3H)`. Their sum (0, 1 or 2) is a single quaternary digit. The
first half adder adds that digit to the lowest top digit, and the rest of the chain ripples a one‑bit
carry. The chain's final carry is always zero, because the product of two `2H`‑digit numbers fits in
`4H` digits. It is therefore left unconnected, and lint reports that bit as unused.

- With `H = 2` this is the 4×4 multiplier: two 4‑digit adders and a half‑adder stage.
- With `H = 4` it sums the 8×8 product.

The adders (`q_adder`) are ripple chains of quaternary full adders (`q_full_adder`). Each full adder
adds two digits and a carry bit, and its sum is at most 7.

## The pipeline (`q_vedic8x8_pipe`, top)

```
 a,b ─► four half-size multipliers ─► [stage-1 register] ─► q_vedic_combine ─► [output register] ─► p
 in_valid ──────────────────────────► [      valid     ] ─────────────────────► [     valid      ] ─► out_valid
```

| port        | dir | width            | meaning                                        |
|-------------|-----|------------------|------------------------------------------------|
| `clk`       | in  | 1                | clock, rising edge                             |
| `rst_n`     | in  | 1                | asynchronous, active low; clears data and valid bits |
| `in_valid`  | in  | 1                | `a`, `b` hold a pair to multiply               |
| `a`, `b`    | in  | `N` digits (2N bits)  | operands                                  |
| `out_valid` | out | 1                | `p` holds a product                            |
| `p`         | out | `2N` digits (4N bits) | product                                   |

Timing and flow:

- A pair sampled at rising edge *k* appears on `p`, with `out_valid` high, after edge *k+2*.
- There is no back‑pressure. A new pair may enter every cycle, and results leave in order.
- Cycles with `in_valid` low travel through as bubbles.
- The data registers load every cycle. Only `out_valid` says whether `p` is meaningful.

The parameter `N` selects the size:

| `N` | sub‑multipliers | use                              |
|-----|-----------------|----------------------------------|
| 8   | `q_vedic4x4`    | default, the main 8×8 design     |
| 4   | `q_vedic2x2`    | 4×4‑digit pipelined multiplier   |
| 2   | `q_digit_mul`   | 2×2‑digit pipelined multiplier   |

Any other value of `N` stops elaboration with an error.

## Module list

| module             | what it is                                                    |
|--------------------|---------------------------------------------------------------|
| `qvm_pkg`          | digit type `qdigit_t`, `DIGIT_W = 2`                          |
| `q_digit_mul`      | one digit × one digit → two digits                            |
| `q_half_adder`     | digit + digit → digit, carry                                  |
| `q_full_adder`     | digit + digit + carry → digit, carry                          |
| `q_adder`          | `DIGITS`‑digit ripple adder (default 4)                       |
| `q_vedic2x2`       | 2×2‑digit vertical‑and‑crosswise multiplier                   |
| `q_vedic_combine`  | adder network joining four half‑size products (parameter `H`) |
| `q_vedic4x4`       | 4×4‑digit multiplier: four `q_vedic2x2` + combiner (`H = 2`)  |
| `q_pipe_reg`       | pipeline register with valid bit and asynchronous reset       |
| `q_vedic8x8_pipe`  | top: two‑stage pipelined `N`×`N`‑digit multiplier              |

Everything except `q_pipe_reg` is combinational.

## Where this design makes its own choices

These points are not fixed by the architecture it follows:

- **Digit encoding.** Each digit is a 2‑bit binary code, not an analog current or voltage level. No
  separate binary↔quaternary converters exist, because with this encoding the conversion is only
  wiring.
- **Leaf multiplier.** The one‑digit product is a small logic function. The original used an analog
  four‑quadrant multiplier cell for this.
- **Carries into the half‑adder stage.** How the two adder carries reach the half adder is this
  design's reading. The original diagram does not show it clearly.
- **8×8 adder network.** The 8×8 sum uses the same adder arrangement as the 4×4, scaled to 8‑digit
  adders. That network is not drawn in the original.
- **Register placement.** The two registers sit after the sub‑products and after the sum. There is
  no input register. The original diagrams show buffers on both sides of every leaf multiplier, and
  pipelined blocks nested inside pipelined blocks. That reading gives more than two stages, so the
  two‑stage description was followed instead.
- **Control signals.** The valid bits, the absence of a stall, and the reset style are all this
  design's own choices.
- **Not modelled.** Power, transistor counts and analog delays of the circuit‑level original are not
  modelled and have no counterpart here.

## Simulating

Every testbench in `tb/` checks its own results, and prints `TB_RESULT checks=N failures=M` and then
`$finish`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qvm_pkg.sv tb/tb_q_vedic8x8_pipe.sv \
          --top-module tb_q_vedic8x8_pipe -Mdir obj && ./obj/Vtb_q_vedic8x8_pipe
```

| testbench                 | what it covers |
|---------------------------|----------------|
| `tb_q_digit_mul`, `tb_q_half_adder`, `tb_q_full_adder` | all input combinations |
| `tb_q_adder`              | all 4‑digit operand pairs, both carry‑ins (131072 sums) |
| `tb_q_vedic2x2`           | the binary `10 × 10` example and all 256 operand pairs |
| `tb_q_vedic_combine`      | all 4‑digit operand pairs via their integer half‑products; fails if any carry path (adder 1, adder 2, both at once, half‑adder ripple) is never used |
| `tb_q_vedic4x4`           | all 65536 operand pairs |
| `tb_q_pipe_reg`           | one‑cycle delay of data and valid, and reset |
| `tb_q_vedic8x8_pipe`      | top at its defaults; see below |
| `tb_q_vedic_pipe_sizes`   | top with `N = 4` (all 65536 pairs) and `N = 2` (all 256 pairs) side by side; checks latency 2 |

`tb_q_vedic8x8_pipe` runs the top at its defaults on about 20000 pairs:

- `252 × 846` (the decimal example above);
- the largest operands;
- zeros;
- random pairs, with random bubbles.

It checks every product and that the latency is exactly two cycles. It counts and requires each of
the following:

- back‑to‑back results;
- both stages busy at once;
- bubbles;
- each adder carry on its own, and both at once;
- a ripple along the half‑adder chain;
- a reset that flushes pairs in flight, none of which may come out.

A run takes well under a second.

Verilator's lint (`-Wall`) reports one warning: the unused top carry of the half‑adder chain,
which is always zero (see above).
