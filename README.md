# 4-bit static Manchester-carry adder

A 4-bit adder, `{c_out, sum} = a + b + c_in`, built from four identical bit
slices. Its carry path is a static Manchester chain: in each bit the carry is
either generated, killed, or passed straight through a CMOS transmission
gate. The RTL follows a transistor-level CMOS design (0.6 um process, 3.3 V),
modelled gate by gate. It keeps the original cells (inverter, NAND2, mirror
XNOR, carry-chain cell) and their pin names, so every net of the original
schematic has a counterpart here.

The RTL is combinational and has no delay. It has no clock, no reset and no
pipeline registers.

## Organisation: PG, C-chain, SUM

The adder has three stages. Every bit slice carries a piece of each.

| stage    | per bit                                 | module     |
|----------|-----------------------------------------|------------|
| PG       | `P = A xor B`, `G = A and B`            | `pg_cell`  |
| C-chain  | `C_OUT = P ? C_IN : G`                  | `c_chain`  |
| SUM      | `S = P xor C_IN`                        | `sum_cell` |

`adder_1bit` holds one of each. `manchester_adder4` chains four slices:
slice *i* takes carry `C(i-1)` from slice *i-1*, and slice 0 takes `c_in`.
The last carry passes through two inverters in series before it reaches
`c_out`. This non-inverting buffer restores the drive after the carry has
crossed the chain of pass gates.

```
a[i],b[i] ─► pg_cell ─► G_BAR, P, P_BAR ─┬─► c_chain ─► carry[i+1] ─► ... ─► inv ─► inv ─► c_out
                                          │      ▲
                                          └─► sum_cell ◄── carry[i]  (carry[0] = c_in)
                                                  └─► sum[i]
```

## The carry-chain cell (`c_chain`)

This cell is the heart of the design. Three switch networks drive the
`C_OUT` node:

* A **transmission gate** from `C_IN`, with its nMOS gate on `P` and its
  pMOS gate on `P_BAR`. It conducts when `P = 1`, and then `C_OUT = C_IN`
  (propagate).
* A **PMOS pull-up** (M2) with its gate on `G_BAR`. It conducts when
  `G = 1` (generate).
* **Two series NMOS** (M3 on `G_BAR`, M4 on `P_BAR`) to ground. They conduct
  when `G = 0` and `P = 0` (kill).

A textbook Manchester chain is dynamic: the carry node is precharged and
then conditionally discharged. This chain is static instead. Its pull
networks go from VDD to VSS, so every node is driven at all times and no
clock is needed.

The PG cell can never produce `P = 1` together with `G = 1`. So for any real
operands exactly one network conducts. The model turns each network into a
boolean "conducts" term and drives `C_OUT` from the network that is on. An
immediate assertion reports the two electrical faults a wrong connection
would cause:

* contention: more than one network conducts;
* a floating node: no network conducts.

The worst-case path runs from `c_in` to `c_out` with every bit propagating,
for example `a = 1111, b = 0000` or `a = 0000, b = 1111`. On that path the
carry crosses all four transmission gates, and every `sum[i]` becomes
`not c_in`. The original layout measured about 1.1 ns for this path
(1.09 ns for a rising carry, 1.24 ns for a falling one). The zero-delay RTL
does not model that figure.

## The mirror XNOR (`xnor2_mirror`)

The XOR functions are built from mirror XNOR gates. These take both rails of
each input (`A`, `A_BAR`, `B`, `B_BAR`). The pull-up and pull-down networks
have the same shape: each is two parallel branches of two series devices.

| network   | branch 1        | branch 2            | conducts when |
|-----------|-----------------|---------------------|---------------|
| pull-up   | PMOS A, B       | PMOS A_BAR, B_BAR   | A == B        |
| pull-down | NMOS A, B_BAR   | NMOS B, A_BAR       | A != B        |

The gate is used twice in each slice:

* **PG cell:** `P_BAR = XNOR(A, B)`. An inverter then gives `P`.
* **SUM cell:** `S = XNOR(P, not C_IN) = P xor C_IN`. The two rails of the
  incoming carry come from two inverters in series, and are swapped at the
  gate's `B`/`B_BAR` pins.

Both uses need true/complement pairs. `A`, `B` and the incoming carry
therefore each pass through two inverters. The first inverter gives the
complement and the second gives a buffered true value. The gate asserts that
its two networks never agree while its rails are complementary.

The remaining PG signal is `G_BAR = NAND(A, B)`.

## Files

| file                       | contents                                                    |
|----------------------------|-------------------------------------------------------------|
| `rtl/manchester_pkg.sv`    | `ADDER_WIDTH = 4`                                           |
| `rtl/inverter.sv`          | inverter cell                                               |
| `rtl/nand2.sv`             | NAND2 cell                                                  |
| `rtl/xnor2_mirror.sv`      | mirror XNOR with dual-rail inputs                           |
| `rtl/c_chain.sv`           | static Manchester carry stage                               |
| `rtl/pg_cell.sv`           | PG stage of one bit                                         |
| `rtl/sum_cell.sv`          | SUM stage of one bit                                        |
| `rtl/adder_1bit.sv`        | bit slice                                                   |
| `rtl/manchester_adder4.sv` | top: `WIDTH` slices plus the carry-out buffer               |
| `tb/*_tb.sv`               | one self-checking testbench per module                      |

Top-level ports of `manchester_adder4`:

| port    | dir | width   | meaning                                      |
|---------|-----|---------|----------------------------------------------|
| `a`     | in  | `WIDTH` | addend A                                     |
| `b`     | in  | `WIDTH` | addend B                                     |
| `c_in`  | in  | 1       | carry in                                     |
| `sum`   | out | `WIDTH` | sum bits                                     |
| `c_out` | out | 1       | carry out of the top bit, buffered           |

`WIDTH` defaults to 4, the size of the original design. The parameter is an
addition of this RTL: any width elaborates to a longer ripple of the same
slices, but only 4 belongs to the original.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends the
simulation. Each also has a time-out watchdog that records a failure if the
simulation hangs.

* The cell testbenches apply every input combination and compare the outputs
  with truth tables written into the testbench.
  * `c_chain_tb` applies only the consistent (P, G) pairs: kill, generate and
    propagate.
  * `adder_1bit_tb` also repeats, at logic level, the DC set-up used to
    measure the slice's noise margins: A = 1, C_IN = 0, B swept.
* `manchester_adder4_tb` checks the complete adder at its default width:
  * all 512 combinations of `(a, b, c_in)`, compared with integer addition;
  * each internal carry `dut.carry[i]`, compared with the carry out of the
    low *i* bits;
  * the worst-case ripple in both operand orientations, with `c_in` toggled
    so that both a rising and a falling carry cross the whole chain.

  The testbench counts generate, kill and propagate events, full-chain
  ripples in each direction and both values of `c_out`. It fails if any of
  them never happens.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/manchester_pkg.sv tb/manchester_adder4_tb.sv --top-module manchester_adder4_tb
./obj_dir/Vmanchester_adder4_tb
```

## Where this RTL departs from, or fills in, the original

* **Sum equation.** The original prints the sum as `S_i = P_i + C_(i-1)`.
  The `+` has to be an exclusive-or for the adder to add, and the original's
  simulation waveforms agree with an exclusive-or. `P xor C` is used.
* **Pin wiring of the two XNOR gates.** The original bit-slice schematic
  shows which gates exist and several net names: `G_BAR`, `P`, and the
  `C_IN`/`P`/`P_Bar`/`G_BAR` pins of the carry cell. It does not show which
  inverter output reaches each XNOR pin. The wiring used here is the one
  that gives `P_BAR` from the first XNOR and `P xor C_IN` from the second.
* **NAND and inverter.** The original names these cells but does not give
  their circuits. Standard NAND2 and inverter functions are used.
* **Switch-level behaviour.** Transistor networks are reduced to conduction
  conditions, so the RTL does not model charge sharing, threshold drops or
  drive strength. The contention and floating-node assertions are this
  model's own checks.
* **Worst-case operands.** The original text describes the worst-case test
  as all A = 1 and all B = 0. Its test schematic ties A to ground and B to
  VDD. Both make every `P = 1`, and the testbench runs both.
* **Not modelled:**
  * the I/O pads and drivers placed around the layout. These are library
    cells with no logic function of their own, and the adder's signals are
    simply the top-level ports;
  * all analog results of the original:
    * area: 107.2 um x 102.4 um;
    * delay: 1.165 ns average, c_in to c_out;
    * rise and fall times: 0.588 ns and 0.688 ns;
    * average power: 0.125 mW;
    * noise margins: 1.37 V and 1.94 V.
