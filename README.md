# 8-bit carry select adder with binary adders and 8T full adders

A ripple-carry adder is small but slow, because the carry must pass through
every bit. A carry select adder (CSLA) splits the word into slices. It adds
each slice before its carry in is known, then picks the right result when
that carry arrives. A regular CSLA pays for this with a second ripple adder
per slice, the one that assumes carry in 1.

This design replaces that second ripple adder with a **binary adder**: a
short chain of half adders that adds the incoming carry to the carry-in-0
sum. An **OR gate** forms each slice's carry out, so no carry multiplexer is
needed. Every XOR in the adder is a three-transistor (3T) XOR cell. The full
adders are therefore eight-transistor (8T) cells. The RTL models each cell
by its logic function, keeping the cell boundaries of the transistor design.

`{co, sum} = a + b + cin` for 8-bit `a` and `b`. The adder is purely
combinational, with no clock, reset or registers.

## Slice structure

The slices grow wider towards the top of the word (square-root grouping):

| stage | bits | hardware | carry in | carry out |
|-------|------|----------|----------|-----------|
| 1 | 0   | one 8T full adder | `cin` | C0 |
| 2 | 2:1 | 2-bit carry-select stage | C0 | C2 |
| 3 | 4:3 | 2-bit carry-select stage | C2 | C4 |
| 4 | 7:5 | 3-bit carry-select stage | C4 | C7 = `co` |

Inside `eightbitCSLABA` the internal carries are the vector `c = {C4, C2, C0}`.

## How one carry-select stage works (`csla_ba_stage`)

For an N-bit slice with operands `a`, `b` and incoming carry `cin`:

1. **Ripple adder, carry in 0** (`rca_cin0`). It computes `p = a + b` and a
   carry `c_rca`. Its carry in is 0, so bit 0 is a half adder and the other
   bits are 8T full adders. This work does not wait for `cin`.
2. **Binary adder** (`binary_adder`). It computes `p + cin` with N half
   adders in a chain and gives a carry `c_ba`. `c_ba` is 1 only when `p` is
   all ones and `cin` is 1.
3. **Sum mux** (`csla_mux`). N 2:1 muxes steered by `cin`. Select 0 passes
   `p`, the ripple-adder sum. Select 1 passes the binary-adder sum.
4. **Carry OR**. `cout = c_rca | c_ba`. When `c_rca` is 1, `p` is at most
   2^N − 2, so `p` cannot be all ones. The two carries are therefore never
   both 1, and their OR is exactly the carry of `a + b + cin`. An immediate
   assertion in `csla_ba_stage` checks this in simulation.

The binary adder's output already equals the final sum for both values of
`cin`, so the mux does not change the result. It is kept because it is part
of the design's architecture and its gate count.

In unit-gate terms (inverter, AND and OR each count one), the structure
costs 83 units of adder cells, 28 of muxes and 45 of binary adder plus OR
gates, 156 in total. These figures count a full adder as 13, a half adder
as 6 and a 2:1 mux as 4. The cell instances in the RTL are the ones that
count assumes: for example, stage 4 has a half adder and two full adders,
three muxes, and three half adders plus an OR.

## The cells

- `xor3t` — 3T XOR. With `b` high the cell is an inverter on `a`. With `b`
  low a pass transistor copies `a`. Modelled as `y = b ? ~a : a`.
- `fa8t` — two `xor3t` cells give `out1 = a ^ b` and `sum = out1 ^ c`.
  A two-transistor pass network gives `carry = out1 ? c : a`, which is the
  majority function.
- `half_adder` — one `xor3t` for the sum and an AND for the carry.

The analog side of the cells (threshold drop through pass transistors,
transistor sizing, power) has no RTL form and is not modelled.

## Where this RTL departs from, or adds to, the reference architecture

- **Binary adder increment input.** The binary adder adds the previous
  stage's carry, not a constant 1. This is needed for the OR-gate carry to
  be correct. With a constant 1 the OR would always give the carry-in-1
  result.
- **Mux polarity.** The architecture does not say which mux input select 0
  chooses. Here select 0 picks the carry-in-0 sum, the usual CSLA convention.
- **Half-adder insides.** These are not specified. The simplest form (XOR
  plus AND) is used.
- **Stage 4 is a 3-bit binary adder.** One description of stage 4 speaks of
  a 4-bit excess-one converter. The architecture diagram, the XOR count and
  the gate count all give a 3-bit binary adder, so that is what is built.
- **Timing.** The unit-gate delays the architecture is rated by (carry
  ready after 6, 8, 11 and 15 gate delays at stages 1–4) are not modelled.
  The RTL has zero delay, and a synthesis tool is free to restructure the
  logic.
- **Only the 8-bit adder is built.** A 32-bit version of the adder exists,
  but its slice grouping is not specified, so there is no 32-bit RTL. The
  testbench `tb_csla32_workload` chains four 8-bit adders through their
  carries to run 32-bit vectors. That chaining is a test arrangement only,
  not a claimed 32-bit architecture.

## Files

`rtl/` (one module per file; listed bottom-up):

| module | parameters | role |
|--------|------------|------|
| `xor3t` | – | 3T XOR cell |
| `fa8t` | – | 8T full adder |
| `half_adder` | – | half adder on a 3T XOR |
| `rca_cin0` | `N` = 3 | ripple adder with carry in 0 |
| `binary_adder` | `N` = 4 | half-adder chain adding one carry |
| `csla_mux` | `N` = 3 | 2N:N sum mux |
| `csla_ba_stage` | `N` = 3 | one carry-select stage |
| `eightbitCSLABA` | – | the 8-bit adder (top) |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and
`tb_csla32_workload.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. An internal watchdog ends the run
with a failure if the test hangs.

- The cell and stage testbenches are exhaustive. The stage-level ones run at
  both slice widths used by the adder (N = 2 and N = 3).
- `tb_eightbitCSLABA` first applies 50 + 40 with carry in 0 and 1 (90 and
  91). It then applies all 2^17 combinations of `a`, `b` and `cin`. For each
  of stages 2–4 it counts four events from the operands: the mux taking the
  carry-in-0 sum, the mux taking the binary-adder sum, a carry made by the
  ripple adder, and a carry made by the binary adder. It fails if any event
  never occurred.
- `tb_csla32_workload` runs 15+15, 255+255, 4095+4095 and 65535+65535, then
  20,000 random 32-bit additions, on four chained 8-bit adders.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    --top-module tb_eightbitCSLABA tb/tb_eightbitCSLABA.sv
./obj_dir/Vtb_eightbitCSLABA
```

Replace the testbench name to run any other test. Each run finishes in well
under a second. Lint a single module with
`verilator --lint-only -Wall -y rtl rtl/eightbitCSLABA.sv`.

## Changing it

- **Slice widths.** They live only in the top's three `csla_ba_stage`
  instances and their bit ranges. A wider adder means more stages and a new
  top. Each stage's `N` must match its slice.
- **Standard-cell mapping.** To let synthesis map cells freely, replace the
  bodies of `xor3t` and `fa8t` with `^` and a majority expression. The
  function does not change.
