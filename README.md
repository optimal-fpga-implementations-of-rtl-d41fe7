# Rotating S-box Masking (RSM) AES-128 for FPGAs

Power-analysis attacks recover an AES key by correlating a device's power
consumption with intermediate values of the cipher. Masking defeats this by
never letting the hardware hold a key-dependent value in the clear: every
intermediate value is XORed with a random mask. The expensive part of masking
is the S-box, the only non-linear step of AES, through which a mask cannot
simply be carried.

Rotating S-box Masking avoids computing masked S-boxes at run time. Sixteen
fixed mask bytes `m_0..m_15` are chosen once, and sixteen *masked S-boxes* are
precomputed and stored in memory:

    S'_k(x) = S(x ^ m_k) ^ m_(k+1)        (indices mod 16)

Each table strips the input mask `m_k` and puts on the next mask `m_(k+1)`.
For each encryption a random 4-bit offset `j` decides which table serves which
state byte, so the same data takes a different mask each time, at the cost of
a few memories, some XORs and a 4-bit random number. The datapath has a single
path: the masked state. No second path tracks the mask.

This repository holds SystemVerilog for a round-based (one round per clock)
RSM AES-128 encryption core and for three ways of mapping its masked S-boxes
onto FPGA block RAM:

* **no barrel shifters** (the default core): every memory holds all sixteen
  masked S-boxes, so the offset becomes part of the address;
* **refreshable masks**: each S-box memory has two halves, and new masks are
  written into the idle half while the core keeps encrypting;
* **overclocked memory**: one dual-port memory at twice the system clock serves
  four S-box look-ups per system clock.

## How the mask moves through a round

Bytes are numbered 0..15 in AES state order: byte 0 is bits `[127:120]`, and
byte `i` is row `i mod 4`, column `i / 4`. `M_j` is the 128-bit mask whose byte
`i` is `m_((i+j) mod 16)`, that is, the base mask set rotated by `j` bytes.

If the state is masked with `M_j`, byte `i` carries `m_(i+j)`. Sending it
through table `S'_(i+j)` gives `S(byte) ^ m_(i+j+1)`. The whole SubBytes
output is then masked with `M_(j+1)`. The offset advances by one per round.
This is the "rotation" of the name.

The rest of the round is linear, so the mask follows the data through it:

| step (round r, state mask `M_j` at entry) | mask afterwards |
|---|---|
| masked SubBytes | `M_(j+1)` |
| ShiftRows | `SR(M_(j+1))` |
| MixColumns | `MC(SR(M_(j+1)))` |
| AddRoundKey | unchanged |
| XOR `MMS_(j+1) = MC(SR(M_(j+1))) ^ M_(j+1)` | `M_(j+1)` |
| last round: SubBytes, ShiftRows, key, then XOR `MS_(j+1) = SR(M_(j+1))` | none (clear ciphertext) |

Before the first round the plaintext is XORed with `M_j` and with the key.
The three families `M_j`, `MMS_j` and `MS_j`, for `j = 0..15`, are the **mask
pool**: 48 words of 128 bits (768 bytes), precomputed from the base set
(`rsm_mask_pool`).

The key schedule is not masked. It is the standard AES-128 expansion, with its
own four unmasked S-box ROMs (`rsm_key_schedule`).

## The three S-box memory organisations

### No barrel shifters (`rsm_sbox_layer_sol2`, default)

In the plain RSM layout, byte `i` must reach table `(i+j) mod 16`. That takes
a 128-bit byte rotator before the S-boxes and another one after them. The
rotators are large and sit on the critical path.

Here, memory `i` (4096x8) holds *all sixteen* tables, rotated so that block
`k` of memory `i` is `S'_((i+k) mod 16)`. Byte `i` is looked up at address
`{j, byte_i}`. The offset thus costs four address bits and no logic, because
the rotation is in the stored contents (`rsm_sbox_rot_rom`). Sixteen such
memories, plus four 256x8 ROMs for the key schedule and the mask pool, make
up the core's memory (538,368 bits).

### Refreshable masks (`rsm_sbox_layer_sol1`, `rsm_mask_refresh`)

Fixed masks leak a little more with every trace. This version lets the masks
be replaced without stopping the cipher:

* It keeps the two barrel shifters (`rsm_barrel_shifter`).
* Each masked S-box `k` is a 512x8 dual-port memory (`rsm_sbox_dpram`).
  Address bit 8 (`bank`) picks the half the cipher reads on port A.
* Port B writes the other half.
* The mask pool also has two banks.

`rsm_mask_refresh` takes a new base set `m'_0..m'_15` and spends 256 clocks
writing `S''_k(x) = S(x ^ m'_k) ^ m'_(k+1)` for every `x`, all sixteen tables
at once. In its first 48 clocks it also writes the new `M'`, `MMS'` and `MS'`
into the idle pool bank. It then waits until the core is idle (no encryption
running or starting) and flips `bank`.

Every encryption therefore uses one consistent mask set. The core loses no
cycles: encryptions keep running during the 256 write cycles.

### Overclocked memory (`rsm_sbox_quad`)

A block RAM is usually much faster than the round logic around it. One true
dual-port 1024x8 memory, holding four masked S-boxes, runs on `clk2x`
(twice `clk`, rising edges aligned, normally from a PLL):

* During the second half of a system cycle, each port reads for its first
  look-up.
* During the first half of the next cycle, it reads for its second look-up.
* A phase bit selects between the two addresses. It is found by comparing a
  flag toggled by `clk` with its `clk2x`-sampled copy, so no reset has to line
  up the two domains.
* Inputs launched at `clk` edge *k* give results that `clk` can sample at
  edge *k+2*.
* Throughput is four look-ups per system clock per memory.

This block stands alone in the top level, with its own ports. The
overclocking idea does not fix how it combines with the two cores.

## Top level and interfaces

`rsm_aes_top` places the three side by side. They share `clk` and `rst_n`.
Port prefixes:

* `s2_*`: the core without barrel shifters, with its offset generator.
* `s1_*`: the refreshable core, with its generator and refresh unit.
* `q_*`: the overclocked memory.

Core protocol (`rsm_aes_core`), identical for both cores:

* Raise `start` for one clock while `busy` is low. Plaintext, key and offset
  are sampled at that edge.
* `busy` is high for the 10 round clocks.
* `done` pulses 11 clocks after the start edge.
* The last round writes the ciphertext back into the state register, and
  `ciphertext` is that register. It is valid from `done` until the next
  `start`. A new `start` may come in the same cycle as `done`, giving one
  block per 11 clocks.
* `start` while `busy` is ignored.
* The S-box memories read synchronously. They are addressed with the *next*
  state (the D input of the state register), so their output belongs to the
  registered state and a round still takes one clock.
* Reset is asynchronous and active low. Assert it before the first clock
  edge: the memories are not reset, and the refresh unit's table write enable
  is only defined once reset has acted.

Refresh protocol (`s1_refresh_*`):

* Pulse `s1_refresh_start` with the new base masks on `s1_refresh_masks`.
* `s1_refresh_busy` falls when `s1_bank` flips.
* `s1_mask_swaps` counts completed swaps.

The offset generators (`rsm_rng4`) are 16-bit LFSRs with reseed ports
(`s*_seed_we`, `s*_seed`). They are placeholders. A product needs a true
random source here, and fresh, secret base masks for the refresh.

## Module map

| module | role |
|---|---|
| `rsm_pkg` | types, S-box computed from GF(2^8) inversion, ShiftRows/MixColumns, mask formulas, default base masks |
| `rsm_aes_top` | the three parts side by side |
| `rsm_aes_core` | round controller and masked datapath; `ARCH` selects the S-box layer |
| `rsm_sbox_layer_sol2` / `rsm_sbox_rot_rom` | sixteen rotated 4096x8 S-box memories |
| `rsm_sbox_layer_sol1` / `rsm_sbox_dpram` / `rsm_barrel_shifter` | shifters and two-half dual-port S-box memories |
| `rsm_mask_refresh` | computes and writes new tables and pool, swaps banks |
| `rsm_mask_pool` | `M_j`, `MMS_j`, `MS_j` (one or two banks) |
| `rsm_key_schedule` / `rsm_sbox_rom` | on-the-fly AES-128 key expansion |
| `rsm_rng4` | offset generator |
| `rsm_sbox_quad` | four look-ups per clock from one overclocked memory |

All memory contents are computed at elaboration from the formulas above. No
data files are used.

## What follows the published scheme, and what is added

Taken from the published RSM design and its FPGA optimisations:

* the masked tables `S'_k`;
* the random 4-bit offset;
* the three 16-entry mask sets and their formulas;
* the round structure (mask and key at the input, `MMS` remasking in the
  middle rounds, `MS` unmasking in the last round, the result written back
  into the state register);
* the three memory organisations: rotated contents in sixteen 4096x8
  memories, 512x8 two-half dual-port memories with one extra address bit, and
  a dual-port memory shared by four S-boxes through an address multiplexer at
  a multiplied clock.

Everything else is this design's own:

* the key schedule, the start/done protocol, the memory read timing and the
  reset;
* the offset generator and the default mask values;
* how refresh data are produced and when the bank swaps;
* the clocking details of the shared memory.

The published drawing of the datapath labels the last-round constant with a
different index than the one used here. `MS_(j+1)` is the index that
agrees with the `MMS_(j+1)` middle-round constant and yields the clear
ciphertext, and the testbenches confirm it against a reference AES.

### Choices in detail

* **Base masks.** The default `BASE_MASKS` is the 16 codewords of a linear
  binary code of length 8 and minimum distance 4:
  `00 0f 36 39 53 5c 65 6a 95 9a a3 ac c6 c9 f0 ff`. The set is closed under
  XOR, and every bit is 1 in exactly eight of the sixteen masks. With a
  uniformly random offset, every state bit is therefore XORed with a balanced
  bit, and first-order leakage of the register value, or of its change to the
  ciphertext, averages out. Any 16 distinct bytes give a correct cipher, but
  not necessarily this property. Set your own through `BASE_MASKS`.
* **Mask rotation direction and byte order.** These are chosen so that the
  table index and the remasking constants agree: `MMS_(j+1)` in the middle
  rounds and `MS_(j+1)` in the last round.
* **Mask pool reads** are combinational (a small LUT memory). A block-RAM
  pool would need its addresses one clock earlier.
* **Refresh.** The refresh unit computes the new tables in logic from a
  supplied base set. The swap happens only between encryptions.
* **Overclocked memory.** It uses only a 2x clock. The capture-register
  arrangement shown in the original uses a 4x clock.
* **Combining the variants.** The three memory organisations are kept as
  separate instances. The no-shifter layout (16 x 32 Kb) leaves no room in a
  block RAM for a refresh half.
* **Omitted parts.** There is no decryption and no PLL.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. Reference values
come from `tb/tb_aes_ref_pkg.sv`, a separate AES model that finds S-box
entries by searching for the field inverse.

* `tb_rsm_aes_core` runs both core variants on the FIPS-197 example
  (`69c4e0d8...c55a`) and on 40 random blocks, covering all 16 offsets. It
  checks the 11-clock latency, the `done` pulse and that a `start` while busy
  is ignored. In every round it checks that the state register equals the
  true AES state XOR `M_(j+r-1)`.
* `tb_rsm_aes_top` runs everything end to end at the default parameters:
  * 200 random encryptions on each core;
  * three mask refreshes overlapping running encryptions, followed by
    encryptions under the new masks;
  * the masked first-round state checked against the mask set of the active
    bank;
  * RNG reseeding;
  * the overclocked memory checked every clock.

  It counts each of these events and fails if any never happens.
* The block testbenches cover the remaining modules: barrel shifter, mask
  pool banks and writes, key schedule (including the FIPS-197 round-10 key),
  LFSR sequence, refresh write sequence and swap rule, both S-box layers, and
  the overclocked memory's two-clock latency.

## Simulated leakage check

`tb_rsm_cpa` runs a first-order correlation power analysis on noise-free
simulated leakage of the default core:

* **Leakage:** the Hamming distance of the state register's last update, from
  the masked last-round input `X ^ M` to the ciphertext `Y`.
* **Attack:** byte 0 of the last round key, 256 hypotheses.
* **Traces:** 200,000 random plaintexts under a fixed key.
* **Control:** the same attack on the leakage an unmasked register would give,
  `HW(X ^ Y)`.

Results:

* **Unmasked register:** the true key byte ranks first from the first
  checkpoint (2,000 traces), with correlation about 0.25.
* **RSM register:** no hypothesis exceeds the 5/sqrt(N) detection threshold
  (0.011). The true key ends near the middle of the ranking.

This is an idealised model: one register, no noise, no glitches. It does not
replace measurements on a device, and it does not cover variance-based or
higher-order attacks.

## Simulating

With Verilator 5 (two-state, `--timing`), from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/rsm_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_rsm_aes_top.sv \
        --top-module tb_rsm_aes_top
    ./obj_dir/Vtb_rsm_aes_top

To run another testbench, replace `tb_rsm_aes_top`. Each one runs in well under
a minute. The sixteen 4096-entry tables make the first build of a full core
take a few tens of seconds.
