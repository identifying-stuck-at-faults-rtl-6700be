# Stuck-at fault tester for a full adder

This design tests a full adder for stuck-at faults from inside the same chip. The test
bench is not on a host computer, where a program writes vectors to the device and reads
back the results. A pseudo-random generator, a fault-free reference adder and comparators
sit in the FPGA next to the circuit under test. Each clock, one test vector goes to the
reference adder and to one or more copies of the adder, each with one line forced to a
constant 0 or 1 (a stuck-at-0 or stuck-at-1 fault). A copy whose sum or carry differs
from the reference has its fault flagged.

All faulty copies see the same vector in the same cycle. This is *parallel fault
simulation* in hardware: with one copy per fault, a single pass over the vectors shows
which faults the vectors expose, and how many vectors each fault needed.

```
              +-------+   lcg_out[2:0] = {a,b,cin}
 clk, rst --> |  lcg  |----+------------------------------+---------------------+
              +-------+    |                              |                     |
                 |         v                              v                     v
              lcg_out  +------------+            +----------------+    +----------------+
                       | full_adder |            | fa_faulty #0   |    | fa_faulty #n-1 |
                       |  (golden)  |            | FAULTS[0]      |... | FAULTS[n-1]    |
                       +------------+            +----------------+    +----------------+
                         esum, ecarry                 tsum[0],tcarry[0]     tsum[n-1],...
                            |                             |                     |
                            +------------> +--------------+-+     +-------------+-+
                            |              | comparator #0  |     | comparator    |
                            +------------> |                | ... | #n-1          |
                                           +----------------+     +---------------+
                                     mismatch[0], fault[0], found_at[0]   ...
```

## The fault model

The adder under test is built from two half adders and an OR gate. Every net of that
netlist is a possible fault site:

| site (`fa_pkg::fa_site_e`) | net                     |
|----------------------------|-------------------------|
| `SITE_A`, `SITE_B`, `SITE_CIN` | input stems         |
| `SITE_P`                   | `p = a ^ b`             |
| `SITE_G`                   | `g = a & b`             |
| `SITE_T`                   | `t = p & cin`           |
| `SITE_SUM`                 | `sum = p ^ cin`         |
| `SITE_COUT`                | `cout = g \| t`         |

A fault (`fa_pkg::fa_fault_t`) is a site plus the stuck value: 4 bits, with the site in
bits 3:1 and the value in bit 0. `fa_faulty` replaces the chosen net by the constant
wherever that net is read, so the fault travels through the gates after it just as a
physically stuck wire would. An input-stem fault affects both gates the input feeds.
Separate faults on the fan-out branches of an input are not modelled.

The fault is fixed when the design is elaborated, through the `FAULT` parameter. There
is one hardware copy per fault, as in a parallel fault simulator. The design has no way
to choose a fault at run time.

### Why the default fault is `a & b` stuck-at-0

The tester's reference result is an eight-row truth table for one faulty adder. In it the
faulty sum is always right. The faulty carry is wrong for inputs 110 and 111 but right
for 011. In the half-adder netlist, only one single stuck-at fault gives exactly this:
`g = a & b` stuck at 0. For 111, `t` is 0 because `a ^ b = 0`, so the carry is lost.
For 011, `t` still supplies the carry. A sum-of-products carry (`ab | bc | ca`) would
keep the carry for 111, which is why the half-adder structure is used. This fault,
`fa_pkg::FA_G_SA0`, is the default of both `fa_faulty` and the top.

## The test-pattern generator (`lcg`)

A linear congruential generator gives the vectors:

    x(i+1) = (a1 * x(i) + b1) mod 2^N,   with a1 = 2^R1 + 1
           = ((x(i) << R1) + x(i) + b1) mod 2^N

Because a1 is a power of two plus one, the multiplier is only a fixed shift. The
datapath is then a 2:1 mux, the shift, a three-operand adder that wraps modulo 2^N
naturally, and an N-bit register. While `start` is high, the mux feeds the seed `X0`
into the adder instead of the register's value. The register has no reset of its own.
One clock with `start` high therefore loads `f(X0)`, and that is the first vector after
`start` falls.

The sequence has the full period 2^N when b1 is odd and a1 - 1 is a multiple of 4. For
a1 = 2^R1 + 1 that means `R1 >= 2`. The module asserts `2 <= R1 < N` and an odd `B1`.
With N = 4 one period is 16 vectors, and it covers each of the eight adder input
combinations twice. The generator then repeats its sequence for as long as `rst` stays
low.

The defaults are `N = 4`, `R1 = 2` (a1 = 5), `B1 = 1` and `X0 = 7`. The 4-bit width is
the reference design's. The three constants are this design's choice: they put the
vectors in an order that reproduces the reference table, including the order in which
the fault flag rises. `R1 = 2, B1 = 15, X0 = 10` or `15` would do so too.

## Detection (`comparator`)

- `mismatch` is combinational. It is 1 when the copy's sum or carry differs from the
  golden adder's for the present vector.
- `fault` is `mismatch` OR a sticky bit. The sticky bit is set at the first mismatch and
  is cleared only by `rst`. So `fault` rises in the same cycle as the first exposing
  vector, and it stays high through later vectors that happen to agree. The reference
  table shows this behaviour: its `fault` column stays 1 on rows where all outputs agree.
- `found_at` records how many vectors were needed to expose the fault: the 1-based index
  of the first mismatching vector, or 0 while the fault is still undetected. This
  counter is an addition of this design.

While `rst` is high, nothing is compared.

## Timing at the top (`fault_tester`)

`rst` is synchronous and active high. It drives the generator's `start` input and
clears the vector counter and every comparator. The first vector, `f(X0)`, is on
`lcg_out` in the cycle after `rst` falls. Every output in that cycle belongs to that
vector. `vec_count` is the number of vectors already applied before the present one; it
saturates at `2^CNT_W - 1`.

The adder inputs are `a = lcg_out[2]`, `b = lcg_out[1]` and `cin = lcg_out[0]`.
`lcg_out[3]` goes only to the output port.

The defaults give this trace, one row per clock after reset:

| vector | lcg_out | a b cin | esum | ecarry | tsum | tcarry | mismatch | fault |
|---|------|-----|---|---|---|---|---|---|
| 1 | 0100 | 100 | 1 | 0 | 1 | 0 | 0 | 0 |
| 2 | 0101 | 101 | 0 | 1 | 0 | 1 | 0 | 0 |
| 3 | 1010 | 010 | 1 | 0 | 1 | 0 | 0 | 0 |
| 4 | 0011 | 011 | 0 | 1 | 0 | 1 | 0 | 0 |
| 5 | 0000 | 000 | 0 | 0 | 0 | 0 | 0 | 0 |
| 6 | 0001 | 001 | 1 | 0 | 1 | 0 | 0 | 0 |
| 7 | 0110 | 110 | 0 | 1 | 0 | 0 | 1 | 1 |
| 8 | 1111 | 111 | 1 | 1 | 1 | 0 | 1 | 1 |
| 9 | 1100 | 100 | 1 | 0 | 1 | 0 | 0 | 1 |
| 10 | 1101 | 101 | 0 | 1 | 0 | 1 | 0 | 1 |
| 11 | 0010 | 010 | 1 | 0 | 1 | 0 | 0 | 1 |
| 12 | 1011 | 011 | 0 | 1 | 0 | 1 | 0 | 1 |
| 13 | 1000 | 000 | 0 | 0 | 0 | 0 | 0 | 1 |
| 14 | 1001 | 001 | 1 | 0 | 1 | 0 | 0 | 1 |
| 15 | 1110 | 110 | 0 | 1 | 0 | 0 | 1 | 1 |
| 16 | 0111 | 111 | 1 | 1 | 1 | 0 | 1 | 1 |

The fault is found at vector 7 (`found_at = 7`). The rows for `lcg_out` = 0001, 0011,
0100, 0110, 0111, 1100, 1110 and 1111 are the eight rows of the reference truth table,
and they match it cell for cell.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 4 | generator width (at least 3) |
| `R1`, `B1`, `X0` | 2, 1, 7 | generator shift, increment and seed |
| `NUM_FAULTS` | 1 | number of faulty copies, each with its own comparator |
| `FAULTS` | `{FA_G_SA0}` | packed array of `fa_fault_t`, one per copy |
| `CNT_W` | 8 | width of `vec_count` and `found_at` |

### Ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous reset and generator reseed |
| `lcg_out` | out | N | present test vector |
| `esum`, `ecarry` | out | 1 | expected outputs from the golden adder |
| `tsum`, `tcarry` | out | NUM_FAULTS | outputs of each faulty copy |
| `mismatch` | out | NUM_FAULTS | present vector exposes fault k |
| `fault` | out | NUM_FAULTS | fault k exposed since reset |
| `found_at` | out | NUM_FAULTS x CNT_W | vectors needed to expose fault k; 0 = not yet |
| `vec_count` | out | CNT_W | vectors applied since reset |

## All sixteen faults in parallel

With `NUM_FAULTS = 16` and one copy for each site and stuck value, one period of the
default generator exposes every single stuck-at fault. The last one, `a & b`
stuck-at-0, needs 7 vectors. Eight faults are found by the first vector, which is 100.
No fault of this netlist is undetectable, because the generator applies every input
combination. `tb_fault_tester_all` runs this configuration. It predicts each fault's
detection cycle independently and prints the count for each fault.

## What follows the reference design and what does not

These follow the reference design:
- a generator, a normal circuit, faulty circuits and one comparator per faulty circuit;
- the shift-and-add LCG datapath;
- the 4-bit generator output;
- one faulty copy in the main configuration;
- the signal names `Lcg_out`, `Esum`, `Ecarry`, `tsum`, `tcarry`, `fault`, lower-cased
  here;
- the eight-row truth table.

These are choices of this design:
- the half-adder netlist and its list of fault sites;
- which fault the default copy carries;
- the generator constants;
- the mapping of generator bits to adder inputs;
- a synchronous, active-high reset that reseeds the generator;
- a sticky fault flag;
- the `mismatch`, `found_at` and `vec_count` outputs;
- the elaboration-time choice of faults.

The reference design was built on a Zynq-7000 FPGA. The device, its I/O buffers and its
clocking are not part of this RTL: `clk`, `rst` and all results are plain ports.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
itself, with a cycle-count watchdog. With Verilator 5, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/fa_pkg.sv tb/tb_fa_ref_pkg.sv tb/tb_fault_tester.sv --top-module tb_fault_tester
./obj_dir/Vtb_fault_tester
```

Change the top module to run another testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_full_adder` | golden adder against integer addition, all inputs |
| `tb_fa_faulty` | all 16 faults, all inputs, against a hand-written per-site reference, plus the reference table's faulty outputs |
| `tb_lcg` | the recurrence, full period (4-bit and an 8-bit configuration), reseed in mid-run |
| `tb_comparator` | random traffic: mismatch, sticky flag, `found_at`, quiet while in reset |
| `tb_fault_tester` | the whole tester at its defaults: 300 vectors and a second reset; every reference table row; counts reseeds, clean vectors, detections, flag holds, generator wrap-around and counter saturation, and fails if any of them never happens |
| `tb_fault_tester_all` | 16 faulty copies in parallel, as described above |

`tb/tb_fa_ref_pkg.sv` holds the testbenches' reference model: the effect of each fault
site, derived by hand from the adder equations, and the reference truth table.

## Files

- `rtl/fa_pkg.sv`: fault sites, the fault type and the default fault
- `rtl/lcg.sv`: test-pattern generator
- `rtl/full_adder.sv`: golden adder
- `rtl/fa_faulty.sv`: adder with one injected stuck-at fault
- `rtl/comparator.sv`: mismatch detection, sticky flag, `found_at`
- `rtl/fault_tester.sv`: the top
