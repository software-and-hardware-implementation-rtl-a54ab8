# A cascadable Blakley modular multiplier for RSA

RSA encryption and decryption are modular exponentiations, `C = M^e mod N`,
and nearly all of their time goes into modular multiplications
`A*B mod N` of numbers hundreds of bits long. An 8-bit microprocessor can
do them in software, but only slowly. This design is the hardware half of that
arrangement. A small memory-mapped device performs one modular
multiplication. The microprocessor keeps the exponentiation loop
(square-and-multiply) and hands every multiplication to the device.

The device is a **16-bit slice**. Any number of identical slices can be
cascaded into a longer multiplier. The most significant slice is the
*master* and makes the decisions; the others are *slaves* that follow them.
The top level `mmd_cascade` defaults to 15 slices, a 240-bit multiplier.
That is the largest multiple of 16 that the 8-bit bit counter can still
count.

The RTL follows a published 5 µm CMOS design of this device. The
[departures section](#where-this-rtl-departs-from-the-original-design) lists
every place where it differs, or where the original left a detail open.

## The algorithm: interleaved (Blakley) modular multiplication

The product is never formed at double length. The device scans `B` from its
most significant bit and keeps a running residue `R` that always stays below
`M`:

```
R := 0
repeat C times                      (C = number of bits of B to use)
    R := 2R                         shift R left
    if R - M >= 0 then R := R - M   reduce
    if next bit of B = 1:
        R := R + A                  add
        if R - M >= 0 then R := R - M   reduce
    shift B left; C := C - 1
```

After the loop, `R = A*B mod M`. Every arithmetic step is one addition.
The host writes **`-M` in two's complement** into the modulus register, so
the single adder computes either `R + A` or `R + (-M)`. The select line
`SAM` chooses which. A reduction is "add `-M`, then look at the sign": if the
sum is negative, `R` was already below `M` and is kept; otherwise `R` is
replaced by the sum.

### Operand range (important)

The sign is the **most significant bit of the whole adder**, i.e. bit
`16*NDEV-1` of the master's sum. The largest intermediate value is `2R < 2M`.
For both that value and `R - M` to be represented correctly, the modulus
of an `n = 16*NDEV`-bit cascade must satisfy

* `M <= 2^(n-1)` (the top bit of the cascade is effectively a sign bit), and
* `A < M`.

`B` may be any `n`-bit value. If `C < n`, only the top `C` bits of `B` are
used. So a 16-bit modulus needs two slices, and a 240-bit cascade handles
moduli of up to 239 bits plus the single value `2^239`.

## Data path of one slice

| Register | Kind | Role |
|---|---|---|
| A | 16-bit load register (`mmd_reg`) | operand A, write-only |
| M | 16-bit load register (`mmd_reg`) | holds `-M`, write-only |
| B | 16-bit shift register (`mmd_shift_reg`) | control operand; its MSB chooses add or skip; shifted left once per bit |
| R | 16-bit shift register (`mmd_shift_reg`) | result; loaded from the adder, shifted left, cleared at start; read-only |
| C | 8-bit down counter (`mmd_down_counter`) | bits still to process; `CZ` flags zero |

The adder (`mmd_adder`) is four 4-bit Manchester carry-chain slices
(`mcc_adder4`): propagate `P = a XOR b`, generate `G = a AND b`,
carry `c(i+1) = G + P·c(i)`, sum `P XOR c(i)`. The enable `ADEN` models the
precharge phase of the original dynamic carry chain. While it is low no carry
is generated or passed on, so the sum is only meaningful while `ADEN` is high.
The controller therefore loads `R` during the last enabled cycle.

## Cascading: the chains and the master's decisions

```
          device 0 (LS)        device 1             ...   device NDEV-1 (master, MS=1)
CIN=0  -> [adder] COUT ------> CIN [adder] COUT --> ...  -> CIN [adder]  -> carry_out
RIN=0  -> [R] ROUT ----------> RIN [R] ROUT ------> ...  -> RIN [R]
BIN=0  -> [B] BOUT ----------> BIN [B] BOUT ------> ...  -> BIN [B] BOUT -> DOUT --+--> DIN of all
AIN=1  -> [addc] AOUT -------> AIN [addc] AOUT ---> ...  -> AIN [addc] AOUT ------+--> ADFIN of all
                                                            adder MSB  -> SGNO ---+--> SGNI of all
```

* **Carry, R and B chains** run from each slice to the next more significant
  one. Together they make one long adder and two long shift registers.
* **B bit (DIN/DOUT)** and **sign (SGNI/SGNO)**: the master uses its own
  B MSB and its own adder MSB. It broadcasts both, and each slave takes them
  instead of its local values (`mmd_cascade_unit`). Every slave's
  controller therefore branches exactly as the master's does. All controllers
  start on the same `RUN`, share a clock and hold the same bit count, so they
  run in lock step. No control wires are needed besides these.
* **Addition Complete (AIN/AOUT/ADFIN)** handles the fact that a cascaded
  ripple adder gets slower with every slice. A wider cascade needs no slower
  clock; instead each slice registers `ADEN AND AIN` into `AOUT`
  (`mmd_add_complete`). The signal climbs the cascade one clock per slice. The
  master's `AOUT` goes back to every slice as `ADFIN`, "addition finished". So
  an addition is given one clock per 16 bits of carry path, however many
  slices there are. When `ADEN` drops, every `AOUT` clears on the next edge.

In RTL the carry actually settles within one clock; the completion ripple
stands for the time the real chain needs. It is what sets the cycle counts
below.

## Control sequence and timing

`mmd_control` is a state machine with the original's inputs
(`ADFIN SIGN CZ BI RUN`) and outputs (`ADEN SAM LDR SR SB CLRR DEC BUSY`):

| State | Outputs | Next |
|---|---|---|
| IDLE | BUSY low | CLEAR when RUN |
| CLEAR | CLRR | SHIFT |
| SHIFT | SR | ADDM1 |
| ADDM1 | ADEN, SAM=M; on ADFIN: LDR if SIGN=0 | TESTB |
| TESTB | (ADEN low, lets ADFIN fall) | ADDA if BI else NEXT |
| ADDA | ADEN, SAM=A; on ADFIN: LDR | GAP |
| GAP | (ADEN low) | ADDM2 |
| ADDM2 | ADEN, SAM=M; on ADFIN: LDR if SIGN=0 | NEXT |
| NEXT | SB, DEC | TESTC |
| TESTC | | DONE if CZ else SHIFT |
| DONE | BUSY low | IDLE when RUN low |

An addition state lasts `NDEV + 1` clocks. With `NDEV` slices, each bit of `B`
costs:

* `8 + 3*NDEV` clocks when the bit is 1,
* `5 + NDEV` clocks when it is 0,
* plus one clock (CLEAR) per multiplication.

`BUSY` rises at the clock edge that samples `RUN` high in IDLE. It stays
high for exactly `1 + sum of the per-bit counts` clocks, then the result is
in `R`.

The original gives `14 + 3*NDEV` clocks per bit (all bits 1, its 14-state
loop). For a whole multiplication, including one clock per loaded byte, it
gives `12*N_B^2 + 116*N_B` clocks for an `N_B`-byte key. This design is
slightly faster:

| key bytes | slices | this design, worst case (7 load clocks per slice + busy) | original formula |
|---|---|---|---|
| 2 | 1 | 184 | 280 |
| 8 | 4 | 1309 | 1696 |
| 16 | 8 | 4153 | 4928 |
| 30 | 15 | 12826 | 14280 |

At the 1 MHz clock the original assumed, these are microseconds.

## Programming model

Each slice occupies eight bytes. In `mmd_cascade` the address is
`{slice index, register byte}`: slice `k` sits at `8k … 8k+7`.

| byte | write | read |
|---|---|---|
| 0 / 1 | A low / high | R low / high |
| 2 / 3 | B low / high | – (0) |
| 4 / 5 | `-M` low / high | – (0) |
| 6 | C (bit count) | – (0) |

Bus cycle: `cs` high, `rw` low for a write (data taken on the rising clock
edge), `rw` high for a read (`data_out` valid combinationally, `data_oe`
high). One multiplication:

1. Write each slice's 16-bit parts of A, B and `-M` (all taken over the full
   `16*NDEV` bits).
2. Write the same bit count into every slice's C (normally `16*NDEV`).
3. Raise `run` and wait for `busy` to fall; then lower `run`.
4. Read R from every slice.

The registers keep their contents, so `-M` needs writing only once per key.
C counts down to zero and must be rewritten before every run. For an
exponentiation the host loops: `C := M`, `T := M`, `e := e-1`, then while
`e > 0` either `C := C*T` (e odd, `e := e-1`) or `T := T*T` (e even,
`e := e/2`).

## Files

| file | contents |
|---|---|
| `rtl/mmd_pkg.sv` | widths, register map, controller states |
| `rtl/mmd_cascade.sv` | top: `NDEV` slices, chains, slice select |
| `rtl/mmd_device.sv` | one slice |
| `rtl/mmd_interface.sv` | bus decode and R read-back |
| `rtl/mmd_reg.sv`, `rtl/mmd_shift_reg.sv`, `rtl/mmd_down_counter.sv` | storage |
| `rtl/mmd_adder.sv`, `rtl/mcc_adder4.sv` | computation unit |
| `rtl/mmd_cascade_unit.sv`, `rtl/mmd_add_complete.sv` | master/slave muxes, Addition Complete |
| `rtl/mmd_control.sv` | control state machine |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the workloads below |

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=F`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mmd_pkg.sv tb/tb_mmd_rsa.sv \
          --top-module tb_mmd_rsa -o sim && ./obj_dir/sim
```

Substitute any testbench name.

* `tb_mmd_rsa` runs the default 240-bit cascade as an RSA engine: the
  textbook key `N = 53*61 = 3233`, `e = 71`, on the blocks
  `1704 1300 0818 1800 1302 0426`. It must produce
  `3106 0100 0931 2691 1984 2927`. It checks every one of the 55 products and
  their busy times, and ends with one random full-width multiplication
  (about 2 s).
* `tb_mmd_keylengths` checks the worst-case time and products for 1 to 15
  slices (2 to 30-byte keys) and prints the table above.
* `tb_mmd_cascade` runs a 3-slice cascade on random operands. It counts that
  each mechanism occurred: reduction taken and skipped, add skipped, carries,
  R and B bits crossing slices, the ADFIN ripple, a slave overriding its own
  sign, and a shortened bit count.
* The per-module testbenches check each unit against an independent model. A
  deliberately broken copy of each module makes its testbench fail.

To change the size, set `NDEV` on `mmd_cascade`. Beyond 15 slices, widen
`CNT_W` in `mmd_pkg` as well, because the bit count must fit the counter.

## Where this RTL departs from the original design

* **State machine.** The original state diagram is not reproduced here. The
  states are this design's own: 11 instead of 16, and 8 instead of 14 states
  in the loop. The inputs and outputs, the three additions per bit and the
  "keep R if the sum is negative" rule are the original's. The original built
  the controller as a dynamic PLA with a two-phase clock; here it is ordinary
  next-state logic in one clock domain.
* **Order of steps.** The original lists each bit as add, reduce, shift,
  reduce. Taken literally, that order ends with `2*A*B mod M` unless the last
  shift is left out. Here each bit shifts first, then reduces, adds and
  reduces. The result is exact, and there are still three additions per bit.
* **Addition Complete.** The original cell uses two flip-flops and the carry
  input. Here one flip-flop per slice gives a fixed one-clock-per-slice
  ripple, which is the behaviour its timing formula implies.
* **Tri-state buses.** The bidirectional data bus is split into `data_in`,
  `data_out` and `data_oe`. The A/M operand bus is a multiplexer.
* **Registers** are edge-triggered with an asynchronous active-high reset.
  The original A/M cells were level-triggered latches.
* **Details the original leaves open**, chosen here: the address map, R/W
  polarity (high = read), active-high chip select, level-sensitive RUN with
  a DONE state, clear priority over load/shift in R, and load priority over
  decrement in C.
* **Pads and I/O buffers** are not modelled.
* **Key length.** The 8-bit bit counter limits a cascade to 255 bits, so the
  original's longer key lengths (up to 80 bytes in its timing tables, and 300-
  or 600-bit keys) need a wider counter. Changing `CNT_W` provides one.
* **Not built.** The original suggests keeping the two exponentiation
  variables on chip to save reloading. That was only proposed, and is not
  built here.
