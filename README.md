# ARIA block cipher in hardware: an iterative core and a sub-pipelined core

ARIA is the Korean standard 128-bit block cipher: a substitution-permutation
network with 128-, 192- or 256-bit keys and 12, 14 or 16 rounds. This
repository has two synthesizable SystemVerilog processors for it. Each one
suits a different kind of mode of operation:

* **`aria_loop`, the iterative core.** It is for feedback modes (CBC, CFB,
  OFB), where a block cannot start before the previous one ends. One round
  unit runs one round per clock. A block takes 15, 17 or 19 cycles. That
  count includes three cycles of key initialization, which the core repeats
  for every block on the same round unit.
* **`aria_pipeline`, the unrolled core.** It is for non-feedback modes (ECB,
  CTR). It has sixteen round units in a row. Each unit is cut into 4
  pipeline sub-stages by default, so the core accepts one block per clock.
  To make the cuts possible, the S-boxes are computed by composite-field
  arithmetic over GF(2^4)^2 instead of being read from tables.

`aria_top` places the two cores side by side. They share only the clock and
the reset.

The architecture follows a published design study of ARIA hardware. That
study covers loop and sub-pipelined cores, LUT and composite-field S-boxes,
and on-the-fly and fully parallel key generators. Handshakes, reset, port
formats and a few structural details are this design's own choices. They
are listed under "Departures and choices" below.

## Conventions

* Byte 0 of a block is bits `[127:120]`, as in the cipher's specification.
* The master key is passed left aligned in a 256-bit port. A 128-bit key
  sits in `key[255:128]` and a 192-bit key in `key[255:64]`. Bits beyond
  the key length are ignored.
* `keylen` is `aria_pkg::keylen_e`: `KL128 = 0`, `KL192 = 1`, `KL256 = 2`.
  The number of rounds is `nr = 12 + 2*keylen`.
* Reset is asynchronous and active low (`rst_n`).

## The composite-field S-box (`sbox_comp`)

ARIA uses four S-boxes:

* S1 is the AES S-box: `S1(x) = A·x^-1 + 0x63`.
* S2 applies a different affine map to `x^247`: `S2(x) = B·x^247 + 0xE2`.
* S1^-1 and S2^-1 are their inverses.

A table needs one whole cycle for a single access, which cannot be split.
Computing the box as logic instead leaves places to insert registers.

**Folding S2 onto an inversion.** In GF(2^8), `x^255 = 1`, so
`x^247 = x^-8 = (x^-1)^8`. Raising to the 8th power (the Frobenius map
applied three times) is linear over GF(2), so it is an 8x8 bit matrix C.
This gives `S2(x) = (B·C)·x^-1 + 0xE2 = D·x^-1 + 0xE2`. All four boxes are
therefore "inversion in GF(2^8), plus an affine map" (forward boxes) or
"affine map, then inversion" (inverse boxes).

**Inversion in GF(2^4)^2.** A linear map M takes a byte to `a = ah·x + al`,
with `ah` and `al` in GF(2^4). In that field `x^2 = x + {e}`, and GF(2^4)
uses `z^4 + z + 1`. The inverse is

```
d      = (ah^2·{e} + ah·al + al^2)^-1          (inversion in GF(2^4))
a^-1   = (ah·d)·x + (ah + al)·d
```

The GF(2^4) pieces are functions in `aria_pkg`:

* `gf4_sq` is a squaring, which is linear and needs only a few XORs.
* `gf4_mul` is a 4x4 multiplier.
* `gf4_mul_e` multiplies by the constant `{e}`.
* `gf4_inv` inverts, computed as `a^2·a^4·a^8`.

**Merged matrices.** The map back to GF(2^8) (M^-1) is merged with each
box's affine map into a single matrix, so no extra logic layer is needed:

| box    | input map                 | output map                 |
|--------|---------------------------|----------------------------|
| S1     | M                         | delta1 = A·M^-1, + 0x63    |
| S2     | M                         | delta2 = D·M^-1, + 0xE2    |
| S1^-1  | delta1^-1 = M·A^-1, + 0x4B | M^-1                      |
| S2^-1  | delta2^-1 = M·D^-1, + 0xDB | M^-1                      |

In `aria_pkg`, each matrix is stored as eight row masks: row `i` is output
bit `i`, and its bit `j` selects input bit `j`. `lin8()` applies a matrix.
The matrices were derived from the S-box definitions. The testbench checks
all four boxes exhaustively against S-boxes built by plain exponentiation.

**Pipeline cuts.** `sbox_comp` can place registers at three points, each
turned on by its own parameter:

* `CUT_PRE_INV`: before the GF(2^4) inversion.
* `CUT_POST_INV`: after the GF(2^4) inversion.
* `CUT_PRE_OUT`: before the output matrix.

`aria_round` turns a sub-stage count into a set of cuts:

| SUB_STAGES | cuts inside the round                      |
|-----------:|--------------------------------------------|
| 1          | none                                       |
| 2          | after the GF(2^4) inversion                |
| 3          | before the inversion, before the output map |
| 4          | all three                                  |

The aim is to balance the delay of the sub-stages, since the slowest one
sets the clock. The AddRoundKey XOR comes before the first cut. The
diffusion layer and the final-round XOR come after the last cut.

`sbox_lut` is the table alternative: a 256 x 8 ROM that is read
combinationally. Its contents are computed at elaboration from the same
definitions.

## Sharing S-boxes between odd and even rounds (`subst_layer`)

Each 4-byte group is substituted differently in odd and even rounds:

* odd rounds apply (S1, S2, S1^-1, S2^-1);
* even rounds apply (S1^-1, S2^-1, S1, S2).

The even pattern is the odd one with bytes 0 and 2, and bytes 1 and 3,
swapped. One layer of sixteen boxes therefore serves both kinds of round.
Each group has one S1, one S1^-1, one S2 and one S2^-1. Multiplexers swap
the bytes in front of the boxes and swap them back behind. When the boxes
are pipelined, the `odd` select for the back multiplexers is delayed by the
same number of cycles as the data.

## Diffusion (`diffusion`)

The diffusion layer is a 16x16 binary matrix over bytes that is its own
inverse. Each output byte is the XOR of seven input bytes. Four shared
temporaries (T0..T3, each the XOR of four bytes) give every output byte
four of its seven terms. This cuts the cost from 768 to 480 two-input XOR
gates.

## Round keys

**Key initialization.** A three-round, 256-bit Feistel network turns the
master key into W0..W3. KL is the left 128 bits of the key. KR is the rest,
zero padded. Fo and Fe are the odd and even round functions. The constants
CK1..CK3 are C1, C2 and C3 rotated by the key length.

```
W0 = KL
W1 = Fo(W0, CK1) ^ KR
W2 = Fe(W1, CK2) ^ W0
W3 = Fo(W2, CK3) ^ W1
```

The loop core runs these three steps on its own round unit. It feeds the
unit CK1..CK3 as round keys and adds the extra XOR through an additional
128-bit XOR array. The pipelined core has a small separate unit for this,
`key_init`, with one round function and the same three-cycle schedule.

**Round keys.** Encryption key k, for k = 1..17, is

```
ek_k = W[j] ^ (W[(j+1) mod 4] rotated right by R[g])
g = (k-1) div 4,  j = (k-1) mod 4,  R = 19, 31, -61, -31, -19  (negative = left)
```

The final round uses two keys, so `nr + 1` keys are needed. Decryption
keys come straight from the same W values. This is why decryption costs no
extra cycles:

```
dk_1 = ek_{nr+1}
dk_i = DL(ek_{nr+2-i})   for i = 2..nr
dk_{nr+1} = ek_1
```

There are two generators:

* **`keysched_otf`** (loop core) produces one key at a time. A barrel
  shifter picks the rotation and one diffusion circuit forms the
  decryption keys. The key is captured in a single 128-bit round-key
  register, one round ahead of use. Its combinational output also supplies
  the final round's second key.
* **`keygen_parallel`** (pipelined core) forms all seventeen keys at once.
  The rotations are fixed wiring, and fifteen diffusion circuits form the
  decryption keys. A multiplexer selects direction and length, and `load`
  writes all seventeen 128-bit registers in one clock.

## The iterative core (`aria_loop`)

```
 start ─► W0←KL, W1←KR, D←din
 3 cycles  INIT:  W[s] ← DL(SL(W[s-1] ^ CKs)) ^ XOR(2)   (s = 1,2,3; odd,even,odd)
 nr cycles ROUND: D ← DL(SL(D ^ rk))  or, in the last round,  D ← SL(D ^ rk) ^ rk'
```

Keys are handled like this:

* In the third INIT cycle, the key generator sees W3 directly from the
  XOR(2) output, so key 1 is ready for round 1.
* In each round, the key register is loaded with the next key.
* In the last round, the combinational generator output is key `nr+1`.
  The final XOR (XOR(3)) uses it in place of the diffusion.

Timing:

* A block is accepted on a clock edge where `start` is high and `busy` is
  low.
* `done` pulses 15, 17 or 19 clock edges later (`3 + nr`). At the same time
  the result appears on `dout`, which then holds until the next result.
* `start` may be high in the cycle `done` is high, so blocks can follow
  back to back.
* A `start` while `busy` is high is ignored.

`IMPL` selects ROM S-boxes (`SBOX_LUT`, the default, with the shorter
critical path) or composite-field S-boxes (`SBOX_COMP`, smaller). The
round unit holds only one substitution layer in either case.

## The sub-pipelined core (`aria_pipeline`)

Sixteen `aria_round` units are chained. Each one ends with an outer
register and holds `SUB_STAGES-1` inner cuts. A valid bit travels with
every sub-stage.

Units 12, 14 and 16 can also act as the final round. The unit that is
final for the loaded key length stores `SL(x ^ rk_n) ^ rk_{n+1}` instead
of the diffusion output, and the result is taken from that unit's
register. The units after it compute values that are not used.

Timing:

* **Key setup.** Pulse `key_start` with the pipeline empty. `key_ready`
  rises 4 edges later: 3 cycles of key initialization, then one cycle to
  load the round-key registers.
* **Data.** A block offered in cycle `c` (`in_valid` high, `key_ready`
  high) comes out in cycle `c + nr·SUB_STAGES` with `out_valid` high. That
  is 48, 56 or 64 cycles at the default of 4 sub-stages.
* **Order and rate.** Results leave in order, one per clock.
* **Bubbles.** Cycles with `in_valid` low simply leave gaps in the output.
* **Busy.** `busy` is high while any block is in flight.

The round keys sit in registers that every block in flight uses. So key,
length and direction may change only while `busy` is low. An assertion
checks this, and another flags a block offered before `key_ready`.

`SUB_STAGES` takes the values 1 to 4. Setting `IMPL = SBOX_LUT` with
`SUB_STAGES = 1` gives the table-based pipeline, which uses outer-round
registers only.

## Ports of `aria_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `loop_start` | in | 1 | start a block in the iterative core |
| `loop_decrypt` | in | 1 | 1 = decrypt |
| `loop_keylen` | in | 2 | key length code |
| `loop_key` | in | 256 | master key, left aligned |
| `loop_din` | in | 128 | input block |
| `loop_busy`, `loop_done` | out | 1 | block in progress; result pulse |
| `loop_dout` | out | 128 | result |
| `pipe_key_start` | in | 1 | load a new key into the pipelined core |
| `pipe_decrypt`, `pipe_keylen`, `pipe_key` | in | 1, 2, 256 | direction, length and key for that load |
| `pipe_key_ready` | out | 1 | round keys loaded |
| `pipe_in_valid`, `pipe_din` | in | 1, 128 | input block stream |
| `pipe_out_valid`, `pipe_dout` | out | 1, 128 | result stream |
| `pipe_busy` | out | 1 | blocks in flight |

Parameters of `aria_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `LOOP_IMPL` | `SBOX_LUT` | S-box type of the iterative core |
| `PIPE_SUB_STAGES` | 4 | sub-stages per round of the pipelined core |
| `PIPE_IMPL` | `SBOX_COMP` | S-box type of the pipelined core (`SBOX_LUT` only with 1 sub-stage) |

## Size and speed

One round unit holds sixteen S-boxes, so the iterative core has 16 boxes
plus the key generator's diffusion. Its LUT variant has 16 ROMs of
256 x 8 bits.

The pipelined core has 256 composite S-boxes in its round units and 16 in
`key_init`. With 4 sub-stages, each S-box holds 12 + 12 + 8 bits of cut
registers. The core also has the seventeen 128-bit key registers and
sixteen 128-bit outer registers.

Throughput follows from the clock rate:

* iterative core: `128·f / (3 + nr)`;
* pipelined core: `128·f`.

Reference figures for a 0.25 µm standard-cell library:

| core | clock | throughput | area |
|------|------:|-----------:|------|
| iterative, LUT | 147 MHz | 1.25 Gb/s | about 25k gates |
| pipelined, 4 sub-stages | 338 MHz | 43 Gb/s | about 260k gates |

No timing or area figures have been measured for this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb/aria_ref_pkg.sv` is an independent behavioural model, written from the
cipher definition:

* S-boxes by exponentiation;
* the diffusion as the plain seven-term equations;
* the key schedule and the round sequence.

The model is checked against the published test vectors for all three key
lengths, and so are the cores. The published plaintext is
`00112233445566778899aabbccddeeff`, and the keys are `000102...`:

| key length | ciphertext |
|-----------:|------------|
| 128 | `d718fbd6ab644c739da95f3be6451778` |
| 192 | `26449c1805dbe7aa25a468ce263a9e79` |
| 256 | `f92bd7c79fb72e2f2b8f80c1972d24fc` |

| testbench | what it covers |
|-----------|----------------|
| `tb_sbox_comp`, `tb_sbox_lut` | all four boxes, all 256 inputs; the fully cut box streaming with 3-cycle latency |
| `tb_subst_layer` | odd/even sharing, LUT, composite and pipelined |
| `tb_diffusion` | unit vectors, random data, involution |
| `tb_aria_round` | both outputs; 1 to 4 sub-stages with their latencies |
| `tb_keysched_otf`, `tb_keygen_parallel`, `tb_key_init` | every key index, length and direction; register timing |
| `tb_aria_loop` | LUT and composite cores: vectors, random blocks, 15/17/19-cycle latency, back-to-back issue, ignored start |
| `tb_aria_pipeline` | 4, 3 and 2 sub-stages and the LUT pipeline: streams for every length and direction, exact latency, order, key-setup latency |
| `tb_aria_top` | both cores at default parameters, concurrently; counts every mechanism (directions, all three final taps, back-to-back, ignored start, full-rate streaming, bubbles, re-keying) and fails on one never exercised |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aria_pkg.sv tb/aria_ref_pkg.sv tb/tb_aria_top.sv --top-module tb_aria_top
./obj_dir/Vtb_aria_top
```

Verilator finds the other modules through `-Irtl`. Building `tb_aria_top`
(both full-size cores) takes a few minutes; the simulation itself takes
under a second.

## Departures and choices

* **Sixteen units for every key length.** The pipelined core always has
  sixteen round units and taps the result at unit 12, 14 or 16. It keeps
  one key length at a time. Changing key, length or direction requires an
  empty pipeline; the round keys are not carried along with the blocks.
* **Separate key initialization.** The pipelined core initializes keys on
  its own round function (`key_init`) rather than borrowing a unit of the
  pipeline.
* **Key initialization per block.** The iterative core repeats key
  initialization for every block, as its 15/17/19-cycle figures assume. A
  variant that keeps W0..W3 across blocks with the same key would save 3
  cycles per block. It is not built.
* **Where the four cuts go.** Four sub-stages are taken as all three cut
  points together. The 2- and 3-stage placements are the ones described
  above.
* **Asynchronous ROMs.** The ROM S-boxes are read asynchronously. A
  synchronous on-chip ROM would add a cycle to every round.
* **Our own interfaces.** All handshakes (`start`/`busy`/`done`,
  `key_start`/`key_ready`, `in_valid`/`out_valid`/`busy`) and the reset
  style are this design's.
* **Lint notes.** `sbox_comp` and `subst_layer` leave `clk` unused when no
  cut is enabled. The assertions use `rst_n` synchronously as their
  disable condition, so the lint tool notes that `rst_n` is used both
  synchronously and asynchronously.
* **Not included.** Mode-of-operation logic (CBC chaining, CTR counters,
  and so on) and side-channel countermeasures are outside this design.
