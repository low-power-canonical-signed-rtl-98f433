# Low-power 16 x 16 multiplier: CSD recoding with SPST adders

This is a 16 x 16 two's complement multiplier built to use little dynamic
power. It uses two ideas.

* **Fewer partial products.** The multiplier operand `b` is recoded into
  canonical signed digits (CSD). Each digit is -1, 0 or +1, and no two
  neighbouring digits are both non-zero. So at most 9 of the 17 digits are
  non-zero, and only those produce partial products (+A or -A, shifted). In
  the signed case at most 8 do.
* **Less switching in the adders.** The partial products are summed with
  *spurious power suppression* (SPST) adders. Each 32-bit SPST adder is split
  into a 16-bit low half (LSP) and a 16-bit high half (MSP). A partial product
  is usually a narrow number sign-extended to 32 bits. When both operands'
  upper halves are pure sign extension, the MSP adder gets zeros and its
  operand registers stay frozen. Small detection logic then rebuilds the upper
  half of the sum.

The product is exact. Simulation checks 4.2 million signed operand pairs,
including every value of `b`, plus random unsigned ones. The product appears one
clock after the operands are sampled, and a new operation can start every
clock.

```
 a ──► pp_candidate_gen ──{+A, 0, -A}──► pp_select ─► pp_shifter ─► pp_compactor ──9 slots──┐
 b ──► csd_recoder ──17 x {sign, mag}──────┘                             ▲ mag               │
                                                                                              │
    slots 0,1 ► spst_adder ─┐                                                                 │
    slots 2,3 ► spst_adder ─┴► rca ─┐                                                         │
    slots 4,5 ► spst_adder ─┐       ├► rca ─► rca ─► product                                  │
    slots 6,7 ► spst_adder ─┴► rca ─┘        ▲                                                │
    slot 8 ──► register ─────────────────────┘ ◄──────────────────────────────────────────────┘
              (clock edge is inside the SPST adders and this register)
```

## CSD recoding with a bypass chain

`csd_recoder` chains 17 copies of `csd_cell`, one per digit, from the least
significant digit upward. Cell *i* looks at three input bits, `b[i+1]`,
`b[i]` and `b[i-1]`, and at a bypass bit `p[i]` from the cell below it:

| p[i] | b[i+1] b[i] b[i-1] | digit | {sign, mag} | p[i+1] |
|------|--------------------|-------|-------------|--------|
| 0    | 001, 010           | +1    | 01          | 1      |
| 0    | 101, 110           | -1    | 11          | 1      |
| 0    | 000, 011, 100, 111 | 0     | 00          | 0      |
| 1    | any                | 0     | 00          | 0      |

Written as logic, this is `mag = ~p & (b[i] ^ b[i-1])`,
`sign = b[i+1] & mag` and `p[i+1] = mag`. A non-zero digit forces the next
digit to zero, which is why no two non-zero digits touch. The cell works like
a radix-4 Booth encoder that drops the ±2 cases and moves one position
instead of two after a zero. Below bit 0, `b[-1] = 0`. Above bit 15 the
input is sign-extended, or zero-extended when `SIGNED = 0`. An exhaustive
check shows that the digits always add up to the input value. For signed
inputs the top digit (digit 16) is always zero. For unsigned inputs it is
used, for example 0xFFFF = 2^16 - 1.

The bypass chain is a ripple path through all 17 cells. It is the longest
combinational path in the recoder.

## Partial products: candidates, selection, shifting and compaction

* `pp_candidate_gen` forms +A, extended to 32 bits, and -A, which is the
  inverted +A plus one. The third candidate is the constant 0.
* `pp_select` picks one candidate per digit: 0 when `mag = 0`, +A when the
  digit is +1, and -A when it is -1.
* `pp_shifter` shifts partial product *i* left by *i* places. The shift is
  fixed wiring.
* `pp_compactor` keeps only the partial products of non-zero digits. It packs
  them in digit order into 9 slots, and unused slots are zero. Each digit's
  slot number is a running count of the non-zero digits below it. It also
  reports `nz_count`. The 9 slots are always enough, because of the
  no-adjacency property.

## The SPST adder

`spst_adder` is the heart of the design. Take the two 32-bit operands A and
B, with MSPs `A[31:16]` and `B[31:16]`. `spst_detect` computes, for each
operand:

```
A_AND = &A[31:16]   (MSP all ones)      A_NOR = ~|A[31:16]   (MSP all zeros)
```

If both MSPs are all zeros or all ones, the MSP sum can only be one of four
patterns. The pattern depends only on the two MSP classes and on the LSP
carry `C_LSP`:

| A_MSP | B_MSP | C_LSP | MSP sum | sign | carrctrl |
|-------|-------|-------|---------|------|----------|
| 0000  | 0000  | 0     | 0000    | 0    | 0        |
| 0000  | 0000  | 1     | 0001    | 0    | 1        |
| 0000  | FFFF  | 0     | FFFF    | 1    | 1        |
| 0000  | FFFF  | 1     | 0000    | 0    | 0        |
| FFFF  | FFFF  | 0     | FFFE    | 1    | 0        |
| FFFF  | FFFF  | 1     | FFFF    | 1    | 1        |

(The rows with the MSPs swapped are the same.) So the MSP sum is
`{sign x 15, carrctrl}`, where

```
carrctrl = ~C·Az·Bo | ~C·Ao·Bz | C·Az·Bz | C·Ao·Bo
sign     = ~C·(Az·Bo | Ao·Bz | Ao·Bo) | C·Ao·Bo
close    = ~((A_AND | A_NOR) & (B_AND | B_NOR))
```

Here `Az = ~A_AND & A_NOR` means A's MSP is all zeros, and `Ao` means it is
all ones. `close = 1` means the MSP adder has to compute. `close = 0` switches
it off.

Timing: the adder has one register stage.

1. **Before the rising edge**, the 16-bit LSP ripple-carry adder and the
   detection logic work on the live operands.
2. **At the rising edge**, the LSP sum, `C_LSP`, `close`, `carrctrl` and
   `sign` are registered. The MSP operand registers load only when
   `close = 1`. Otherwise they keep their old contents and do not toggle.
3. **After the edge**, the registered MSP operands pass through AND gates
   driven by the registered `close`. When the MSP is off, the 16-bit MSP adder
   sees zeros and a zero carry, so it switches only when `close` itself
   changes. A multiplexer then selects either the MSP adder's output or the
   rebuilt `{sign x 15, carrctrl}`.

`msp_active` shows the registered `close`, so a testbench or a power model
can see how often the MSP was switched off.

In the multiplier, partial products are often narrow. In the signed sweep
(every `b`, 64 values of `a`), the MSP of the four adders was off in 27 %,
6 %, 23 % and 84 % of operations. The last adder gets the highest-order
non-zero digits, which are often missing, so its operands are often zero.

## Adder tree and timing of the multiplier

Slots 0-7 go to the four SPST adders in pairs (0+1, 2+3, 4+5, 6+7). Slot 8
is registered beside them. After the edge, three 32-bit ripple-carry adders
sum the four SPST results as (s0 + s1) + (s2 + s3). A fourth ripple-carry
adder adds slot 8. Carries out of bit 31 are dropped, which is exact because
the product fits in 32 bits.

So the only clock edge is in the middle of the datapath. The CSD recoding,
partial product generation and the LSP halves settle before it. The MSP
halves and the adder tree settle after it. `product` is combinational from
the registers. Register it outside if a registered output is needed.

## Interface of `csd_spst_multiplier`

| port         | dir | width | meaning                                                     |
|--------------|-----|-------|-------------------------------------------------------------|
| `clk`        | in  | 1     | clock; operands are sampled on the rising edge              |
| `rst_n`      | in  | 1     | asynchronous active-low reset                               |
| `in_valid`   | in  | 1     | `a`/`b` hold an operation                                   |
| `a`, `b`     | in  | N     | multiplicand, multiplier (`b` is CSD-recoded)               |
| `out_valid`  | out | 1     | `in_valid` delayed by one clock                             |
| `product`    | out | 2N    | `a * b` of the operands sampled at the last edge            |
| `msp_active` | out | 4     | per SPST adder: MSP adder computing this cycle              |
| `nz_digits`  | out | 5     | number of non-zero CSD digits of `b` for this product       |

The parameters are `N = 16` and `W = 2N`. `NSEL_P` is the number of
partial-product slots (9 for N = 16). `SIGNED` is 1 for two's complement and
0 for unsigned. The tree always has four SPST adders and one extra slot, so
only N = 16 gives the intended structure. Other values of N elaborate, but
they are not verified.

## Where this RTL makes its own choices

These points are not fixed by the description the design follows, and were
chosen here:

* **Register placement.** The MSP operand "latches" are edge-triggered
  registers whose load enable is `close`. The LSP result and the detection
  outputs are registered at the same edge, so the whole sum is complete just
  after the rising edge. A design with true level-sensitive latches would
  have the same function but different timing.
* **Adder tree.** It is not given where the ninth partial product enters. Here
  it is added last.
* **Order of the slots.** Partial products of non-zero digits go to the slots
  in digit order, starting from the least significant digit.
* **The close equation.** Only the meaning of `close` is given ("0 switches
  the MSP off"). The equation above follows from that meaning.
* **Extras.** These are not part of the original block diagram: the unsigned
  mode (`SIGNED = 0`), `in_valid`/`out_valid`, `msp_active`, `nz_digits` and
  the asynchronous reset.
* **Plain adders.** All plain adders are ripple-carry adders.

## Not included

The multiplier was meant to sit inside the complex twiddle-factor multiplier
of a 256-point FFT. That FFT comes from elsewhere and is not described beyond
its name, so no FFT or complex multiplier is provided here. The power, area
and delay figures quoted for the original 90 nm implementation cannot be
reproduced from RTL, and nothing here claims them.

## Files

`rtl/` has one module or package per file:

* `csd_mult_pkg` holds the shared constants.
* `csd_cell` and `csd_recoder` do the CSD recoding.
* `pp_candidate_gen`, `pp_select`, `pp_shifter` and `pp_compactor` build the
  partial products.
* `rca_adder`, `spst_detect` and `spst_adder` are the adders.
* `csd_spst_multiplier` is the top.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` at the end. The testbenches are:

* `tb_csd_recoder` checks all 65536 inputs, both signed and unsigned.
* `tb_spst_detect` covers every pairing of MSP classes, with both carries.
* `tb_spst_adder` uses a stream in which half of the operand pairs have a
  16-bit dynamic range. It checks the sum, `msp_active` and that the MSP
  registers stay frozen.
* `tb_csd_spst_multiplier` is the end-to-end test. It runs a signed and an
  unsigned instance with idle cycles, and checks the product, the latency and
  the digit count. It also counts SPST off/on cycles, bypassed runs of ones
  and uses of the ninth slot.
* `tb_spst_power_workload` compares switching activity on a stream in which
  half of the pairs have a 16-bit dynamic range. It counts bit
  toggles on the MSP adder's inputs and sum in the SPST adder, and on bits
  31:16 of a plain 32-bit ripple-carry adder. The SPST MSP section toggles
  about 25 % less, with the MSP off in half the cycles. Toggle counts are
  only a stand-in for dynamic power, and the LSP halves are identical.
* `tb_csd_spst_multiplier_full` runs the default-size multiplier on every
  `b` with 64 values of `a` (4.2 M products, about 10 s).

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl rtl/csd_mult_pkg.sv \
    tb/tb_csd_spst_multiplier.sv --top-module tb_csd_spst_multiplier -Mdir obj -o sim
./obj/sim
```

Use the same command for any other testbench, changing the testbench file and
the top module. The package is named on the command line because modules
import it. `-y rtl` lets Verilator find each module in `rtl/<name>.sv`.

Verilator reports a few unused carry-out signals (`co*` in the top,
`msp_cout` in the SPST adder and the last bypass bit `p[17]` in the recoder).
They are unused on purpose: sums are taken modulo 2^32.
