# A fully pipelined triple-DES processor

This design encrypts or decrypts one 64-bit block per clock with DES. The usual
approach builds one round and loops each block through it 16 times. Here the
16 rounds are unrolled into a 16-stage pipeline instead. Every block carries its
own 56-bit key and its own direction bit (`opmode`) down the pipe. So the 16
blocks in flight can use 16 different keys, and any mix of encryptions and
decryptions.

One pipeline, plus self-test logic, makes up a DES chip (`des_chip`). Three
chips chained output-to-input make the triple-DES module (`mcm_3des`). It still
takes one block per clock, with a latency of 48 clocks. Running the chips as
encrypt–decrypt–encrypt gives standard 3DES. At the clock rate the original
hardware reached (110 MHz), 64 bits per clock is 7.04 Gb/s.

```
data_in ──► chip A ──► chip B ──► chip C ──► data_out[2]
           (16 clk)   (16 clk)   (16 clk)
```

## Inside a pipeline stage

Each stage (`des_stage`) does one DES round. It is split into eight identical
**cells** (`des_cell`), one per S-box. Each cell carries 4 bits of the 32-bit
halves. A stage also holds three registers that travel with its block: the two
28-bit key halves C and D, and the `opmode` bit.

The data registers are not laid out the way a textbook draws a round. A cell
stores:

| register | width per cell | stage total | holds |
|---|---|---|---|
| `r_e_q` | 6 | 48 | **E(R)**, the right half already expanded |
| `l_q`   | 4 | 32 | L |

The XOR that finishes a round happens **before** the next stage's register,
on expanded values: `r_e_q <= E(L_prev) ^ E(P(f_prev))`. This equals
`E(L_prev ^ P(f_prev)) = E(R_new)`, because E only copies bits. So after the
register, a cell only XORs its six stored bits with six key bits and looks
them up in its S-box. The permutation P and the expansion E are pure wiring
between stages (`f_e_out = E(P(f))`, `l_e_out = E(L)`). A stage therefore
hands the next stage three buses: `l_e` (48), `f_e` (48) and `r` (32).

What a stage's register holds and what it computes:

```
stage k registers:  E(R_{k-1}), L_{k-1}, C_k, D_k, opmode
stage k computes:   f = S(E(R_{k-1}) ^ PC2(C_k, D_k))          (combinational)
stage k+1 loads:    E(R_k) = E(L_{k-1}) ^ E(P(f)),   L_k = R_{k-1}
```

At the ends of the pipeline (`des_pipeline`):

* **Input.** IP is applied to `din`. Stage 1 is fed R0 on its "L" inputs, L0
  on its "R" inputs and a zero f, so that it registers E(R0) and L0.
* **Output.** After stage 16, the final half round (R16 = L15 ^ P(f)) and
  IP⁻¹ are combinational. `dout = IP⁻¹(R16 ‖ L16)`.

**Timing.** A block presented on `din` during clock cycle n is on `dout`
throughout cycle n+16. A register fed from `dout` captures it exactly 16
clocks after stage 1 did. That register is the SAR, or stage 1 of the next
chip. There are no stalls and no handshake: the pipeline always advances.

Each **S-box** (`sbox`) is a decoded ROM plus a multiplexer:

* The middle four address bits (the DES column) select one of 16 ROM words.
* Each word holds the four 4-bit outputs that the rows could give.
* The two outer bits (the DES row) pick one of those four nibbles.

Cells 1–4 take their key bits from the C register and cells 5–8 from the D
register. PC2 draws subkey bits 1–24 only from C and bits 25–48 only from D.
So each 28-bit key bus only needs to reach half the cells. Which six bits each
cell taps is fixed by PC2 (`des_pkg::key_tap`).

## Keys that travel with the data

The pipeline takes C0 and D0, the key halves after PC1. Between stages the key
halves are rotated. The **previous stage's** `opmode` chooses the direction:

| into stage | encrypt: rotate left by | decrypt: rotate right by |
|---|---|---|
| 1 | 1 | 0 |
| k = 2..16 | shift of round k | shift of round 18−k |

The round shifts are 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1. In decryption, stage 1
uses C16 = C0 (the shifts add up to 28), and each later stage undoes one
encryption rotation. The direction is chosen per block at every stage boundary.
So a block's direction is fixed when it enters, and blocks of either direction
can follow each other on every clock. `opmode` = 0 means encrypt and 1 means
decrypt.

## The chip: self test around the pipeline

`des_chip` contains the following:

* **Input multiplexer** (`input_mux`). `pads` = 1 takes data from the 64
  input pins. `pads` = 0 takes it from the data PRNG.
* **Three PRNGs** (`lfsr_prng`). One 64-bit PRNG makes data. Two 28-bit PRNGs
  make the key halves C0 and D0. The chip has no key input pins: keys always
  come from these PRNGs.
  * Each PRNG is a Galois LFSR, `state <= (state >> 1) ^ (state[0] ? poly : 0)`.
  * It advances once per clock, so the pipeline gets a new block and a new
    key every clock.
  * The seed and the polynomial are both loaded by scan.
* **The 16-stage pipeline.**
* **Signature analyzer register, SAR** (`sar`). This is a 16-bit
  multiple-input signature register:
  `sig <= (sig >> 1) ^ (sig[0] ? poly : 0) ^ group`.
  * Every clock it folds in one 16-bit group of `data_out`. `select` chooses
    the group: 0 is `data_out[63:48]` (DES bits 1–16), 3 is `data_out[15:0]`.
  * To cover all 64 output bits, run the test four times with the same seeds,
    once per `select` value.

**Scan.** There is no reset. Instead, `scanmode` = 1 turns every register on
the chip into part of one of seven serial chains. Each chain has its own bit
in the `chip_scan_t` structs `scan_in` and `scan_out`:

| chain | length | order (first bit in ends at …) |
|---|---|---|
| `datapipe` | 16 × 81 = 1296 | stage 1 → 16; in a stage, cells 1 → 8 (each cell: in through its 6 bits of E(R), out through its 4 bits of L), then `opmode` |
| `key1`, `key2` | 16 × 28 = 448 each | C (resp. D) registers, stage 1 → 16 |
| `data_prng` | 128 | `{poly, state}`; first bit in ends at `poly[63]` |
| `key_prng1`, `key_prng2` | 56 each | `{poly, state}` |
| `sar` | 32 | `{sig, poly}`; the signature comes out first, MSB first |

A self-test run goes like this:

1. Scan in the seeds and polynomials, and clear or load the pipeline.
2. Run N clocks with `pads` = 0.
3. Scan out the SAR.
4. Compare the result with a software prediction.

The software prediction must include what the cleared pipeline emits during
the first 16 clocks. A cleared stage does not stay cleared, because
S(0) ≠ 0. `tb/tb_des_chip.sv` shows how to predict these values.

The chip has 7,392 flip-flops across the module: 2,464 per chip. Of these,
2,192 are in the pipeline (16 × (48 + 32 + 56 + 1)), 240 are in the PRNGs and
32 are in the SAR. There are no memories; the S-box ROMs are constant logic.

## The triple-DES module

`mcm_3des` (parameter `N_CHIPS` = 3) instantiates three chips on one clock:

* `data_in` drives chip A's pad inputs.
* Chip A's output drives chip B's pad inputs, and chip B's output drives
  chip C's.
* Every chip keeps its own control pins in `ctl[i]` (a `chip_ctl_t`): opmode,
  pads, select, scanmode and the scan inputs.

Every chip's output, scan outputs and signature are brought out. For 3DES,
set `pads` = 1 on chips B and C, and set the opmodes as follows:

* Encryption: A = encrypt, B = decrypt, C = encrypt.
* Decryption: A = decrypt, B = encrypt, C = decrypt.

A decryption needs the key sequences in reverse chip order, so choose the
PRNG seeds to match.

Each chip's key for a block is whatever its key PRNGs produce in the cycle
that block enters that chip. A block entering A in cycle t meets chip B's keys
of cycle t+16 and chip C's keys of cycle t+32. The result is on
`data_out[2]` in cycle t+48.

## Files

| file | contents |
|---|---|
| `rtl/des_pkg.sv` | DES tables (IP, IP⁻¹, E, P, PC2, S1–S8, shift schedule), permutation functions, `chip_scan_t`, `chip_ctl_t` |
| `rtl/sbox.sv` | decoded-ROM S-box |
| `rtl/des_cell.sv` | one cell: two registers, key tap, S-box |
| `rtl/des_stage.sv` | one round: 8 cells, key registers with rotation, opmode register, P/E wiring |
| `rtl/des_pipeline.sv` | IP, 16 stages, final half round and IP⁻¹ |
| `rtl/lfsr_prng.sv`, `rtl/input_mux.sv`, `rtl/sar.sv` | self-test parts |
| `rtl/des_chip.sv` | one chip |
| `rtl/mcm_3des.sv` | three chips chained (top) |
| `tb/des_ref_pkg.sv` | iterative DES reference, PC1, LFSR and signature models |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build any of them with plain Verilator, for
example:

```
verilator --binary --timing -y rtl -y tb rtl/des_pkg.sv tb/des_ref_pkg.sv \
          tb/tb_mcm_3des.sv --top-module tb_mcm_3des -o sim
obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_sbox` | all 8 × 64 S-box entries, plus values written out from the standard |
| `tb_des_cell` | the cell registers, key taps and scan chain at all 8 positions |
| `tb_des_stage` | one round at stages 1, 2, 9 and 16, both directions, key rotation, scan |
| `tb_des_pipeline` | standard known-answer vectors; random streams in encrypt-only, decrypt-only, alternating and random modes (with eight encryptions and eight decryptions in flight at once when alternating); round trips; latency of exactly 16; the full scan chains |
| `tb_des_million` | 10⁶ random blocks, each with its own random key and direction |
| `tb_lfsr_prng`, `tb_sar`, `tb_input_mux` | the self-test parts against software models |
| `tb_des_chip` | the bench self test: 25 000 vectors per run, for each of 3 opmode patterns × 4 SAR groups, plus one run from the pads. Checks every output word and every scanned-out signature |
| `tb_mcm_3des` | the full three-chip module at default size: 3DES encrypt (EDE) and decrypt (DED) from the module input, alternating opmode on PRNG data, all SAR groups. Checks every chip's output and signature, and counts each mode |

The DES model in `tb/des_ref_pkg.sv` computes all 16 subkeys first and then
runs the rounds in a loop. It shares only the standard tables with the RTL,
and the known-answer vectors check those tables. Every testbench has a
watchdog. All of them run in seconds, except that building `tb_mcm_3des`
takes a few minutes.

## How far to trust it, and where it is this design's own

The following follow the original hardware:

* 16 unrolled stages with a per-stage key and opmode.
* Each key half routed to four cells.
* Key rotation steered by opmode between stages.
* The cell structure: an expanded-R register, the XOR with f before the
  register, and an S-box split into decode, ROM and multiplexer.
* A multiplexer between the PRNG and the pads.
* A key PRNG split in two.
* Seeds and polynomials programmable by scan.
* A 16-bit SAR with four selectable 16-bit groups.
* Three chips chained A → B → C.

The DES tables, round shifts, PC1/PC2 and the known-answer vectors come from
the DES standard.

These choices are this design's own:

* Encodings: `opmode` 1 = decrypt, `pads` 1 = pins, and the order of the
  `select` groups.
* The LFSR form (Galois, one step per clock) for both the PRNGs and the SAR.
* All scan-chain orders, and one `scanmode` for every chain.
* Scan outputs on the PRNG chains.
* Where the 16th round is completed: combinationally, at the output.
* Bringing every chip's control pins out of the module.

The original chip's pin budget (131 signal bumps) is not reproduced. The
logical ports here add up to somewhat more.

These parts are not modelled, because they are circuits rather than logic:

* The local clock driver and clock bump of every stage.
* The clock H-tree in the package.
* The power and ground planes and bumps.
* ESD protection.
* The output pad drivers.
* The per-ROM "sleep" power switch.
* The decoupling capacitors.

All chips share one ideal clock.

The cycle behaviour is verified, but timing is not: whether a given target
reaches 110 MHz depends on its process and layout.

Two sizes are kept as parameters: `N_STAGES` in `des_pipeline` and `N_CHIPS`
in `mcm_3des`. Only `N_STAGES = 16` computes DES. `N_CHIPS` may be changed to
chain a different number of DES passes.
