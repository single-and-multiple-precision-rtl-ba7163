# Sequential Karatsuba-Ofman large multipliers

Two pipelined hardware multipliers for very wide unsigned operands (256 to 2048
bits and more). Both use a small array of digit multipliers many times, not one
huge combinational multiplier. Both can return the full double-width product.

* **`slkom`**: single precision. It multiplies two W-bit operands into a 2W-bit
  product. The default is W = 2048 with 16-bit digits.
* **`mpslkom`**: multiple precision. K identical W/K-bit slices can run as K
  independent multipliers, or be joined in groups of 2, 4, ... K for wider
  operands. The default is W = 2048, K = 8. One run gives eight 256-bit,
  four 512-bit, two 1024-bit or one 2048-bit product, chosen by a precision
  code `sp`.

The design reconstructs the sequential Karatsuba-Ofman multipliers (SLKOM and
MPSLKOM) from *Single and multiple precision sequential large multipliers for
field-programmable gate arrays*. Where that description is incomplete or
inconsistent, this RTL makes its own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## The idea

Cut each operand into p = W/n digits of n bits (n = 16, so p = 128 at 2048
bits). Group the digits into pairs `(X_2j+1, X_2j)`. A 2n x 2n pair product
needs only three digit multiplications (Karatsuba-Ofman):

```
PL = A_2i   * B_2j
PH = A_2i+1 * B_2j+1
PM = (A_2i + A_2i+1) * (B_2j + B_2j+1) - PH - PL        (2n+1 bits)
pair product = PL + PM * 2^n + PH * 2^2n
```

In each clock cycle (one *iteration*), one pair of A meets all p/2 pairs of B.
That takes 1.5p multipliers: 192 at 2048 bits. A finishes after p/2
iterations. The partial products never go through a wide carry-propagate
adder inside the loop. A row of small multioperand adders keeps them in
carry-save form instead. Each iteration, the lowest 2n bits of the product
are finished and leave the row.

## Pipeline

```
        load   stage 1          stage 2        stage 3       stage 4            stage 5
 a,b -> R0,R1 -> R1S, R0S_j -> PL,PH,PT -> PL,PH,PM -> MOA row S,C ---> S1+C0 -> R2 (low half)
        (R1 shifts 2n/iter)     (1.5p mults)  (p/2 subs)    (p+1 adders)  |   CT ---^ back to MOA_0
                                                                          +-> align & add -> high half
```

| stage | registers at its end | work |
|---|---|---|
| 1 | R0 = B (fixed), R1 = A (right shift by 2n per iteration); the current A pair, R1S and R0S_j | p/2 + 1 pre-adders |
| 2 | PL_j, PH_j (2n bits), PT_j (2n+2 bits) | p/2 n x n, p/2 n x n and p/2 (n+1) x (n+1) multipliers |
| 3 | PL_j, PH_j, PM_j | p/2 three-operand subtractors |
| 4 | S_0..S_p+1 (n bits), C_0..C_p (3 bits) | p+1 multioperand adders (MOAs) |
| 5 | R2, W bits, shifted by 2n per iteration | n-bit adder S_1 + C_0, carry CT |
| align & add | copies of the final S, C, CT | one W-bit carry-propagate adder |

R0 is read directly by the stage-2 multipliers, so R0 must stay unchanged
until the last iteration has passed stage 2.

### The multioperand adder row (the part that needs care)

Column m of the row has weight 2^(n*m) relative to the current A pair. Each
product half goes to the column of its weight. After every iteration the
stored sums move down two columns, because the next A pair is worth 2^2n
more:

| adder | inputs |
|---|---|
| MOA_0 | PLL_0, S_2(i-1), C_1(i-1), CT |
| MOA_1 | PLH_0, PML_0, S_3(i-1), C_2(i-1) |
| MOA_2j (even) | PLL_j, PMH_j-1, PHL_j-1, S_2j+2(i-1), C_2j+1(i-1) |
| MOA_2j+1 (odd) | PLH_j, PML_j, PHH_j-1, S_2j+3(i-1), C_2j+2(i-1) |
| MOA_p | PHL_p/2-1, PMH_p/2-1 |
| S_p+1 | PHH_p/2-1 (no adder) |

Here PLL/PLH are the low and high n bits of PL, and so on. PMH has n+1 bits.
No column sum reaches 8 * 2^n, so every adder keeps an n-bit sum S_m and a
3-bit carry C_m. The carry C_m belongs to column m+1, so after the two-column
move it enters MOA_m-1.

Stage 5 retires columns 0 and 1. `{S_1 + C_0, S_0}` is the next 2n product
bits, and the carry of that n-bit addition (CT) returns to MOA_0 in the same
cycle. After the last iteration the row still holds the upper half in
redundant form. The align-and-add stage adds two vectors and CT:

```
SN = S_p+1 ... S_3 S_2                                (p digits)
CN = C_p ... C_2 C_1, each zero-extended to n bits    (C_k+1 in digit k)
M[2W-1:W] = SN + CN + CT
```

The align-and-add stage works on a stored copy of these values. The next
multiplication can therefore fill the pipeline while the adder works.

### Timing

```
cycle       s      s+1 .. s+p/2        s+4 .. s+p/2+3       s+p/2+4          s+p/2+5
            load   stage-1 iterations  stage-4 iterations   last R2 shift,   done: p_lo = R2,
                                                            capture S,C,CT   p_hi = M[2W-1:W]
```

* `start` is taken in a cycle where `ready` is high (the load cycle).
* `done` follows p/2 + 5 cycles later. For 2048 bits that is 69 cycles.
* A new multiplication can start every p/2 + 1 cycles: 65 at 2048 bits, 33
  at 1024, 17 at 512 and 9 at 256. These are the cycle counts of the
  published implementation.
* The extra cycle is the load cycle. It reaches stage 4 as a bubble, and
  there it clears the adder row before the next multiplication arrives.
* `p_lo` (R2) stays valid for two cycles. `p_hi` stays valid until the next
  result.
* The single-size product is `p_lo`.

## Multiple precision

The multiple-precision multiplier is K copies of the single-precision
datapath: `mpslkom_block`, each of W/K bits with P = W/(K*n) digits. They
sit side by side and share one sequencer. The code `sp` joins c = 2^sp
adjacent blocks into one multiplier of c*W/K bits. At the block borders a
2:1 multiplexer selects either the block's own signal or its neighbour's:

| where | block is not the right-most of its group | block is not the left-most of its group |
|---|---|---|
| R1 | - | top input = R1 digits 1:0 of block t+1 (otherwise 0) |
| A pair multiplied | the group's right-most block's R1 digits 1:0 | - |
| MOA_0 | adds {C_p,S_p} of block t-1, current iteration, instead of CT | - |
| MOA_1 | adds S_p+1 (= PHH) of block t-1, current iteration | - |
| MOA_p-2, MOA_p-1 | - | use S_0, S_1, C_0 of block t+1 instead of S_p, S_p+1, C_p |
| R2 | - | top input = R2 digit 0 of block t+1 |
| R2 of the left-most block | top input = the product digit of the group's right-most block | - |
| align & add | carry in = carry out of block t-1 | top sums and top carry from S_1, S_0, C_0 of block t+1 |

Column p and column p+1 of block t are column 0 and column 1 of block t+1.
The joined adder rows therefore behave as one long row. A group needs
c*P/2 iterations: a 256-bit group takes 9 cycles per operation and a
2048-bit group 65.

The operation's `sp` travels down the pipeline with it. Back-to-back
operations may therefore use different precisions. `sp_out` reports the
precision of the result that `done` flags.

Operand layout: group g of width Wg = 2^sp * W/K uses bits
`[(g+1)*Wg-1 : g*Wg]` of `a`, `b`, `p_lo` and `p_hi`. Its product is
`{p_hi[group g], p_lo[group g]}`.

## Departures and own choices

* **Handshake and sequencer.** The published design gives only the cycle
  counts. `start`/`ready`/`done`, the `sp` encoding (log2 of the blocks per
  group) and the pipelined `sp` are choices of this design.
* **A-pair broadcast.** The published multiple-precision design joins the R1
  shift registers of a group and states that stages 2 and 3 are unchanged.
  If each block multiplied its own R1 digits, the product would be wrong.
  Here every block of a group multiplies the pair at the bottom of the
  group's right-most block.
* **R2 in a group.** The published text for this multiplexer is unclear.
  Here the group's R2 registers form one right shift register. It is fed by
  the product digit of the group's right-most block, which is the only
  block whose S_0, S_1, C_0 are product digits.
* **Top carry column of align & add.** The published design feeds 0 into the
  top carry column of a block that is not the left-most of its group. That
  drops the neighbour's C_0 and gives wrong products. Here that carry is
  used instead.
* **Align & add adder.** This design uses one full-width adder. The
  published design allows a narrower adder used over several cycles.
* **Widths.** The published material does not state the digit width n.
  n = 16 follows from its cycle and DSP counts: 1.5p multipliers and
  p/2 + 1 cycles per multiplication.
* **Resources.** Multipliers are plain `*` operators and are left to
  synthesis to map to DSP blocks. At the defaults, generic synthesis gives:

  | multiplier | flip-flop bits | published registers (Virtex-5) |
  |---|---|---|
  | single precision | 24,611 | 24,680 |
  | multiple precision | 25,220 | 25,903 |

* All registers have an asynchronous active-low reset `rst_n`.
* W must be a multiple of 2n, with at least 4 digits per block. Shorter
  operands must be zero-padded by the user.

## Files

| file | content |
|---|---|
| `rtl/kom_pkg.sv` | carry width, group-position helper functions |
| `rtl/kom_stage1.sv` ... `kom_stage5.sv` | the five pipeline stages |
| `rtl/kom_align_add.sv` | align-and-add stage |
| `rtl/kom_ctrl.sv` | sequencer |
| `rtl/slkom.sv` | single-precision multiplier |
| `rtl/mpslkom_block.sv`, `rtl/mpslkom.sv` | one multiple-precision block, and the K-block multiplier |
| `rtl/large_mult_top.sv` | both multipliers side by side (ports `sl_*`, `mp_*`) |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_table_sizes.sv` | 256/512/1024-bit single precision; 512/1024-bit multiple precision, all modes |

## Verification

Every testbench checks its results against values it computes itself:

* the unit testbenches check the pre-adder sums, the products, the KO
  subtraction, the carry-save value of the adder row, the R2 shifting and
  the align-and-add sum;
* the multiplier testbenches compare against the simulator's own wide
  multiplication, and check the latency (p/2 + 5) and the issue interval
  (p/2 + 1).

`tb_large_mult_top` runs both multipliers at the full default size, 2048
bits. It covers:

* all-ones and random operands;
* back-to-back issue;
* a start while busy, which must be ignored;
* every precision mode, and changes of precision between operations.

It counts each of these mechanisms and fails if one never happened. Each
testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/kom_pkg.sv rtl/*.sv \
    tb/tb_large_mult_top.sv --top-module tb_large_mult_top
./obj_dir/Vtb_large_mult_top
```

The full-size top-level test builds in about 10 s and runs in well under a
second.
