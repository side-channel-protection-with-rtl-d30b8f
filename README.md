# Side-channel protected AES and PRESENT with run-time reloaded look-up tables

An FPGA can swap the contents of some of its look-up tables while it runs.
Partial reconfiguration of the fabric takes milliseconds. A LUT that works as
a shift register or as a small RAM (the SLICEM LUTs of Virtex-5/Spartan-6 and
later) can be refilled in a few dozen clock cycles, and its routing stays the
same. This design uses that to hold S-boxes whose contents are re-randomized
before every encryption. An attacker who measures power then sees a circuit
whose function at a given moment they cannot predict. Two block-cipher cores
build on this idea. They are independent designs and sit side by side in
`sca_top`:

* **`aes_core`**: round-based AES-128 with first-order Boolean masking. Its
  sixteen S-boxes are *randomized look-up tables* held in writable memory
  (`aes_rlut`). A configuration generator (`aes_cfg_gen`) rewrites all of
  them with freshly masked contents before each encryption.
* **`present_core`**: round-based PRESENT-80. Each of its sixteen S-boxes is
  split into two *reconfigurable function tables* (`rft`) built from CFGLUT5
  shift-register LUTs (`cfglut5`). S-box decomposition, Boolean masking and
  register precharge can each be switched on or off.

Both cores also use *register precharge*. A register that holds masked data
first takes a random value, and only then its real value.

The RTL is plain synthesizable SystemVerilog. The FPGA primitives are written
as generic logic: CFGLUT5 as a 32-bit shift register with a read multiplexer,
and the LUT RAMs and block RAM as arrays. So the design simulates anywhere.
On a Xilinx device you would map these onto the vendor cells.

## Why register precharge is needed on top of masking

Masking alone does not stop leakage in a register. If a register holds
`x ^ m` and is then overwritten with `y ^ m`, where both values carry the same
mask, the bits that toggle are `x ^ y`. So the Hamming distance, which is what
the power draw follows, is unmasked:
HD(x ^ m, y ^ m) = HW(x ^ y). Both cores therefore can write a fresh random
value into each round register in the cycle before the real value. Each
transition is then between a random value and a masked value.
This doubles the cycles per round (2 → 4).

## Masked AES with randomized look-up tables

### Mask flow

The host does the masking. It picks a 128-bit state mask `m` and a key
mask `m'` for each block and supplies three values:

| input | value |
|---|---|
| `plaintext_m` | `p ^ m ^ m'` |
| `om` | `SR⁻¹(MC⁻¹(m ^ m'))`, the S-box output mask |
| `m_prime` | `m'` (the core xors it onto every round key) |

Inside the core the state never appears unmasked:

```
p^m^m'  --first-mux--> ^ (k^m')  -->  p^k^m        [pre register]
        table i: T_i(x) = S(x ^ m_i) ^ om_i
        -->  SB(p^k) ^ SR⁻¹(MC⁻¹(m^m'))            [table output registers]
ShiftRows  -->  SR(SB) ^ MC⁻¹(m^m')
MixColumns -->  MC(SR(SB)) ^ m ^ m'
^ (k_r ^ m')  -->  state ^ m         (same mask as before: the round is mask-invariant)
last round: MixColumns bypassed  -->  ciphertext_m = c ^ MC⁻¹(m^m') ^ m'
```

The host unmasks the output with `c = ciphertext_m ^ MC⁻¹(m ^ m') ^ m'`. The
key register itself is not masked. Only the round key leaving it is xored
with `m'`.

### Table reload (configuration generator)

Every table is rewritten before every encryption. There is one table per
S-box, not an active/passive pair. A configuration counter `c` runs over the
table, and for each value the generator writes `S(c) ^ om_i` at address
`c ^ m_i` of table `i`. After a full sweep, table `i` holds
`S(x ^ m_i) ^ om_i` for every `x`.

The tables are split into banks that match the depth of the memory primitive
they would map to. One entry per bank is written per cycle, so the primitive
sets the reload time:

| `PRIM` | primitive modelled | bank depth | banks | reload cycles | start→done |
|---|---|---|---|---|---|
| `PRIM_RAM32M` (default) | 32-deep multi-port LUT RAM | 32 | 8 | 32 | 56 (76 with precharge) |
| `PRIM_RAM64M` | 64-deep multi-port LUT RAM | 64 | 4 | 64 | 88 (108) |
| `PRIM_RAM256X1S` | 256 x 1 LUT RAM, eight side by side | 256 | 1 | 256 | 280 (300) |
| `PRIM_RAMB8BWER` | 8 Kb block RAM, 256 x 8 used | 256 | 1 | 256 | 280 (300) |

With several banks, the counter drives the low address bits and bank `b`
evaluates `S({b, c})`. Xoring the full address with `m_i` then only permutes
the banks, so each bank of each table still gets exactly one write per cycle.
This is the part of `aes_cfg_gen` that is easiest to misread. One S-box
evaluation per bank is shared by all sixteen tables, and each table has only
its own xors.

In this RTL, `RAM256X1S` and `RAMB8BWER` behave the same: one 256-entry array
read into an output register. The leakage differences between these
primitives on real silicon come from the slice hardware and are outside the
RTL.

### Timing

`start` is accepted while `busy` is low and takes in all inputs. Then:
reload (DEPTH cycles) → first key addition (1 cycle) → 10 rounds of 2 cycles
(4 with `en_precharge`) → the ciphertext register is written and `done`
pulses. Counting the start cycle as cycle 1, `done` is high in cycle
DEPTH + 24, or DEPTH + 44 with precharge. The table output registers are the
register stage after the S-boxes. The `pre` register is the stage before
them. With precharge, each of the two takes a random value from the internal
PRNG in the cycle before its real value.

## PRESENT with reconfigurable function tables

### CFGLUT5 and RFTs

`cfglut5` models the 5-input reconfigurable LUT. Its 32-bit truth table is a
shift register: `CDI` enters at bit 0 while `CE` is high, and bit 31 leaves
on `CDO`. `O6` reads the entry addressed by `I4..I0`. `O5` reads the lower
half, addressed by `I3..I0`.

`rft` builds a function table from these cells:

* **4 inputs** (used for PRESENT): one cell per output bit, read through
  `O5`. Only the lower 16 bits are loaded, so a new function takes
  **16 cycles**. Entries go in from 15 down to 0, one per cycle, on
  `cfg_din[j]` for output bit `j`.
* **5 or more inputs**: 2^(IN_W-5) cells per output bit, each a 5-input
  table, selected by the upper inputs through a multiplexer. All cells load
  in parallel in **32 cycles**, each on its own serial input. Example: an
  8-input, 2-output table uses sixteen cells.

During loading the table output is a mix of old and new contents.
`present_core` does not use the tables while they load.

### S-box decomposition and masking

For each S-box position `i`, the PRESENT S-box `S` is split into a random
bijection `R1_i` and `R2_i = S ∘ R1_i⁻¹`. A register sits between the two
tables, so it only ever stores `R1_i` of the data, never an actual S-box
input or output. Masking is folded into the table contents:

```
R1'_i(x) = R1_i(x ^ m1_i) ^ m2_i
R2'_i(y) = R2_i(y ^ m2_i) ^ P⁻¹(m1)_i
```

Here `m1` is the 64-bit state mask, `m2` is the 64-bit mask of the middle
register, and `P⁻¹(m1)_i` is nibble `i` of the inversely permuted state mask.
After the bit permutation the state therefore carries `m1` again, and the
key addition keeps it. `present_rft_cfg` computes these entries on the fly,
one address per cycle for all 32 tables at once.

`R1_i` is a uniformly drawn permutation of 0..15. `present_r1_gen` builds
it with a Fisher-Yates shuffle: sixteen tables in parallel, one swap per
cycle, 15 cycles. The swap index for step `k` is `floor(r·(k+1)/256)`, where
`r` is a random byte. This avoids a divider, at the cost of a bias of at most
one part in 16 between indices. `R1_i⁻¹`, which `R2'` needs, is found by
searching the table.

### Countermeasure switches

| input | off | on |
|---|---|---|
| `en_decomp` | `R1` = identity, `R2` = S | fresh random `R1` per S-box and encryption |
| `en_mask` | `m1 = m2 = 0` | fresh random `m1`, `m2` per encryption |
| `en_precharge` | 2 cycles per round | 4 cycles per round: the middle register and the state register each take a random value first |

All eight combinations are valid. They are the eight settings this kind of
design is evaluated under. The S-box is always in the function tables, even
with everything off. Masks, `R1` and precharge values come from an internal
xorshift PRNG (`prng`), which is seeded through `seed`/`seed_load`.

### Timing

`start` (while `busy` is low) → 1 cycle to draw the masks → 16 cycles of
`R1` shuffle → 17 cycles of table loading → 31 rounds of 2 cycles (or 4) →
the ciphertext register is written with the final round key and `m1`
removed. `done` is high in cycle 98, or 160 with precharge, counting the
start cycle as 1. The key schedule is
standard PRESENT-80 and is not masked.

## Leakage in simulation

`tb/tb_present_ttest.sv` and `tb/tb_aes_ttest.sv` run a non-specific
fixed-versus-random Welch t-test in simulation. The power model is the
Hamming distance of every update of the round registers. With a few hundred
traces per group, the default seeds give:

| core / setting | max \|t\| |
|---|---|
| PRESENT, any setting without precharge | 54 to 58 (leaks) |
| PRESENT, masking + precharge (with or without decomposition) | 2.5 to 3 |
| PRESENT, precharge without masking | 7.5 to 7.7 (the plaintext load into the state register is not precharged) |
| AES, any primitive, no precharge | 45 to 49 (leaks) |
| AES, any primitive, precharge | 2 to 3.5 |

Both testbenches count a failure if the outcome crosses the ±4.5 threshold in
the wrong direction.

`tb/tb_present_spec_ttest.sv` runs the *specific* test on PRESENT. It uses
random plaintexts and computes the round-16 values with a reference model.
It then sorts each trace by 144 selection models: the 64 S-layer output bits,
the 64 bits of round input XOR round output, and "S-box 0 output equals v"
for the 16 values v. Only the cycles of rounds 15 to 17 are kept. With 5000
traces per setting:

| setting | S-box bits | in ^ out bits | S-box 0 value |
|---|---|---|---|
| no precharge (any decomposition/masking) | 3.6 to 4.6 | 11 to 11.5 (leaks) | 3.6 to 4.1 |
| precharge, with or without masking/decomposition | about 3 | 3.3 to 3.8 | 2.7 to 3.7 |

The in^out leak without precharge is expected. The state register moves from
`x ^ m` to `y ^ m`, and that distance is the unmasked `HW(x ^ y)`, so masking
alone does not hide it. The bench checks this leak in group 2 for every
setting without precharge. It also checks that no model in any group crosses
the threshold when masking and precharge are both on. In this register
model, precharge alone also passes the specific test, because a register
going from a uniform random value to `v` has a distance independent of `v`.

These models cover only register transitions. They do not
cover glitches, coupling or the behaviour inside a slice, which is where real
LUT-RAM implementations have been seen to leak. Treat the tables as a check
of the masking and precharge logic, not as evidence about a device.

## Design choices and limits

These points are choices made in this design:

* **Masks and randomness.** The AES masks come from the host. PRESENT draws
  its masks internally from a deterministic xorshift PRNG. In a real device
  that PRNG would be seeded or replaced by a true random source.
* **Key sizes.** AES-128 and PRESENT-80.
* **Default primitive.** The AES tables default to RAM32M-sized banks. The
  other primitives are a parameter.
* **Handshake and timing.** The start/busy/done handshake, the cycle-level
  schedule and the registered outputs are this design's own.
* **Precharge reading.** Precharge is implemented by loading random values
  into the existing round registers in extra cycles. It does not add new
  registers.
* **Generic primitives.** The FPGA primitives are generic models. No vendor
  cells are instantiated.
* **Not included.** The two-context block-RAM scrambling scheme that inspired
  the AES tables is not part of this design: here the tables are refilled
  before each encryption instead. Trace acquisition and analysis on hardware
  are not part of it either.

## Files

`rtl/`:

| file | content |
|---|---|
| `sca_top.sv` | both cores side by side; AES ports prefixed `aes_`, PRESENT ports `pr_` |
| `aes_core.sv`, `aes_rlut.sv`, `aes_cfg_gen.sv`, `aes_keysched.sv`, `aes_pkg.sv` | masked AES |
| `present_core.sv`, `present_slayer.sv`, `present_rft_cfg.sv`, `present_r1_gen.sv`, `rft.sv`, `cfglut5.sv`, `present_keysched.sv`, `present_pkg.sv` | protected PRESENT |
| `prng.sv` | xorshift64 random source |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_sca_top.sv`: end to end at default parameters. Both cores run at once,
  and it counts that every mechanism (table reloads, precharge, masking,
  decomposition, last-round bypass) acted.
* The three t-test benches (`tb_present_ttest`, `tb_present_spec_ttest`,
  `tb_aes_ttest`), with their helpers `ttest_acc.sv` and
  `aes_ttest_unit.sv`.
* `present_ref_pkg.sv`: an independent PRESENT reference model.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/present_pkg.sv tb/present_ref_pkg.sv \
  tb/tb_sca_top.sv --top-module tb_sca_top -o sim
./obj_dir/sim
```

Replace `tb_sca_top` with any other testbench name. All testbenches finish
in seconds.

To change the AES memory primitive, set `AES_PRIM` on `sca_top` (or `PRIM` on
`aes_core`). The packages hold the shared functions: the AES S-box is computed
as inversion in GF(2^8) followed by the affine map, and the PRESENT S-box and
bit permutation (bit `i` → `16·i mod 63`) are standard.
