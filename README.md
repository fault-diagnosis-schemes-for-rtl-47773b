# Midori with concurrent fault diagnosis

Midori is a lightweight block cipher designed for low energy per bit: a 64- or
128-bit state of 16 cells, 4-bit involutive S-boxes, a binary MixColumn matrix
and a key schedule that is little more than XORing constants into the key. A
cipher in a wearable or implantable device must also survive faults, both
natural ones (defects, upsets) and deliberate ones injected to leak the key.
This RTL adds *concurrent error detection* to a round-based Midori: every
transformation of every round carries a small checker that predicts a cheap
signature of its output (a parity, an interleaved parity, an XOR of cells)
from its input, and compares that prediction with the signature of what the
transformation actually produced. The cipher result itself is never altered;
the checkers only raise flags.

The RTL follows the schemes of the article "Fault Diagnosis Schemes for
Low-Energy Block Cipher Midori Benchmarked on FPGA"; it is an independent
implementation, and the points where it goes beyond or departs from that
description are listed at the end.

## The cipher in one page

State cells are numbered 0..15 column by column (cell 0 top left, cell 3
bottom left); in a 128-bit word cell 0 sits in the most significant byte,
which is the order in which Midori test vectors are written. Cells are 8 bits
for Midori128 (the default, `CW = 8`) and 4 bits for Midori64 (`CW = 4`).

Encryption with R rounds (R = 20 for Midori128, 16 for Midori64):

    S = P xor WK
    for i = 0 .. R-2:  S = KeyAdd(MixColumn(ShuffleCell(SubCell(S))), RK_i)
    C = SubCell(S) xor WK

* **SubCell**: Midori64 applies `Sb0` to every nibble; Midori128 applies
  `SSb_(i mod 4)` to byte i. Each `SSb_k` permutes the 8 input bits, feeds the
  two nibbles to two copies of `Sb1`, and applies the inverse bit permutation
  to the result, so it is an involution like `Sb1`.
* **ShuffleCell**: output cell i takes input cell
  `(0,10,5,15,14,4,11,1,9,3,12,6,7,13,2,8)[i]`.
* **MixColumn**: each column is multiplied by `M = [0111;1011;1101;1110]`,
  i.e. every output cell is the XOR of the other three cells of its column.
* **Keys**: Midori128 uses `WK = K` and `RK_i = K xor beta_i`; Midori64 splits
  K into `K0 || K1`, uses `WK = K0 xor K1` and `RK_i = K_(i mod 2) xor beta_i`.
  Each `beta_i` is a 16-bit matrix whose bits go into the least significant
  bit of each cell.

Because the S-boxes and `M` are involutions, decryption uses the same round
with `InvShuffleCell` after MixColumn instead of `ShuffleCell` before it:

    S = C xor WK
    for i = 0 .. R-2:  S = KeyAdd(InvShuffleCell(MixColumn(SubCell(S))), L^-1(RK_(R-2-i)))
    P = SubCell(S) xor WK

with `L^-1 = InvShuffleCell o MixColumn`. Since `L^-1` is linear, the
decryption round key is `L^-1(K) xor L^-1(beta_(R-2-i))`, and `L^-1` of a
constant is again one bit in the LSB of each cell.

## Data path of the core (`midori_core`)

One round per clock through a single state register:

    start:      state <= din ^ WK
    encrypt:    state <= KeyAdd(MixColumn(ShuffleCell(SLayer(state))), RK_i)
    decrypt:    state <= KeyAdd(InvShuffleCell(MixColumn(SLayer(state))), L^-1(RK_(R-2-i)))
    last step:  dout  <= SLayer(state) ^ WK

All five transformations exist once. A multiplexer in front of MixColumn
takes the ShuffleCell output when encrypting and the S-layer output when
decrypting; a second multiplexer in front of KeyAdd takes MixColumn or
InvShuffleCell. The unit that is bypassed in the current direction still
computes, but its flag is ignored. In the last step only the S-layer is
checked, since the other units' results are not used. The key generator
derives each round key combinationally from the key captured at start and
the round counter.

### Interface and timing

| port | width | meaning |
|---|---|---|
| `start` | 1 | accepted while `busy` is low; `decrypt`, `din`, `key` are captured then |
| `decrypt` | 1 | 0 encrypt, 1 decrypt |
| `din`, `dout` | 16*CW | block in / out |
| `key` | 128 | secret key |
| `busy` | 1 | operation in progress |
| `done` | 1 | one-cycle pulse; `dout` valid from then until the next start |
| `err_vec` | 6 | sticky flags, in order: S-layer, ShuffleCell, MixColumn, InvShuffleCell, KeyAdd, key generation |
| `err` | 1 | OR of `err_vec` |
| `fault` | `fault_t` | fault injection (below); tie `fault.loc` to `FLT_NONE` |

`done` rises exactly R clock edges after the edge that takes `start`
(20 for Midori128, 16 for Midori64), or 2R with RESI S-boxes. Flags are
cleared by `start` and hold until the next one. Reset is synchronous and
active low.

## Why each check works

This is the heart of the design. A checker is useful only if its prediction
is cheap and provably equal to the actual signature when there is no fault.

| transformation | module | prediction | actual | why they agree |
|---|---|---|---|---|
| 4-bit S-box | `sb4_prot` | parity and/or interleaved parity `{y3^y1, y2^y0}` of `S(x)`, from a table or AND/OR equations of `x` | same bits of the output | by construction (the table stores them) |
| 8-bit S-box | `ssb_prot` | one prediction per internal `Sb1`, from its permuted input nibble | taken from the output bits that `Sb1` produced, found through the inverse permutation | each `Sb1` is checked on its own; flags `e[2k]`, `e[2k+1]` per `SSb_k` |
| ShuffleCell / InvShuffleCell | `shuffle_prot` | XOR of all 16 input cells | XOR of all 16 output cells | the transformation only rewires cells |
| MixColumn | `mix_prot` | see below | | every column of `M` sums to 1 |
| KeyAdd | `keyadd_prot` | `Sig(S) xor Sig(RK)` | `Sig(O)` | the signature is linear |
| round key | `keygen_prot` | `Sig(K) xor Sig(beta_i)` | `Sig(RK_i)` | adding a constant bit to a cell's LSB inverts its parity |

**MixColumn.** Three schemes (`MC_SCHEME`):

* `MC_COLUMN`: for each column, `s'0^s'1^s'2^s'3 = s0^s1^s2^s3`, because each
  column of `M` has an odd number of ones. Four CW-bit signatures.
* `MC_UNION`: the same over the whole state: one CW-bit signature, cheapest.
* `MC_INTERLEAVED`: rows 0 and 2 of `M` sum to `1010`, rows 1 and 3 to
  `0101`, so `s'0^s'2 = s0^s2` and `s'1^s'3 = s1^s3` in every column. This
  holds for Midori's matrix but not for general MDS matrices. It catches
  faults that cancel in the column sum (the same bit wrong in rows 0 and 1);
  the MixColumn testbench demonstrates exactly that case.

**Key schedule.** `KEY_ELEMENT` predicts 16 cell parities (each key cell's
parity, inverted where the constant bit is 1); `KEY_UNION` predicts one
CW-bit XOR of all cells, whose LSB is inverted when `beta_i` has an odd
number of ones (`beta_0`: even, `beta_14`: odd, `beta_18`: even).

**S-box signatures** (`S_SCHEME`): `SS_PAR` detects every odd number of
flipped output bits of a 4-bit S-box; `SS_IPAR` (default) detects those and
every double flip except bits 3 and 1 together or bits 2 and 0 together;
`SS_BOTH` ORs the two. `S_IMPL` selects table-based S-boxes
(for Midori128 the 8-bit table of `ssb_lut8`, built like an FPGA mapping of
four 6-input tables plus a 4:1 multiplexer per output bit) or AND/OR
equations.

**Recomputing with swapped inputs** (`S_SCHEME = SS_RESI`, Midori128 only,
`ssb_resi`): each `SSb_k` is evaluated twice on the same two `Sb1` units. In
the second pass the two nibbles are exchanged between the units and the
results exchanged back; a mismatch with the stored first result is flagged.
Because each nibble is computed by the other unit the second time, a
permanent fault in one unit is caught, not only a transient one. A round then
takes two clocks; the data path always uses the first-pass result.

## The threshold S-box (`ti_sbox_prot`)

A side-channel-hardened variant of the Midori S-box `Sb0`, kept as a separate
unit in `midori_top` with its own ports. `Sb0` is affine equivalent to a
cubic class and splits into two quadratic halves around
`Q12 = {0,1,2,3,4,5,6,7,8,9,C,D,E,F,A,B}`:

    stage 1: A1 -> Q12 -> A2    | register |    stage 2: Q12 -> A3
    A1 = {0A1B82934E5FC6D7}, A2 = {84B70C3F95A61D2E}, A3 = {8A02DF57CE469B13}

The input comes as three shares (`x0^x1^x2` is the value). The affine layers
act on each share; `Q12` (`y3=x3, y0=x0, y2=x2^x3x1, y1=x1^x3x1^x3x2`) is
shared so that output share i uses only input shares i+1 and i+2. Outputs
appear one clock after the inputs. Error detection, on the recombined value:
`e1` compares with an unshared `Sb0` running in parallel; `e2` and `e3`
compare the output's parity and interleaved parity with predictions read from
16-entry tables.

## Fault injection

`fault_t` (in `midori_pkg`) names one transformation (`loc`) and two 128-bit
masks: bits set in `sa0` are forced to 0 and bits set in `sa1` to 1 at that
transformation's output (the low 16*CW bits are used; `sa1` wins where both
are set). The core applies the
masks in every cycle in which `fault.loc` names that unit while it is busy.
Holding the masks for a whole operation models a permanent stuck-at fault;
pulsing them for one clock models a transient one. For RESI S-boxes the masks
act on the outputs of the physical `Sb1` units. Every checked module has the
same `sa0`/`sa1` pair on its output; in the threshold S-box it acts on output
share 0.

`tb_fault_coverage` runs the campaign on the default core: a maximum-length
32-bit LFSR picks plaintext, key, one of the five units used in encryption, stuck-at type, 1 to 4 faulty bits and permanent or
transient duration for each of 10,000 and then 100,000 encryptions. With the
default configuration about 84% of all injections are flagged; of the
injections that actually corrupt the ciphertext, 98.9% (10,000 run) and
99.1% (100,000 run) are flagged, split as 98.90% / 98.96% for stuck-at-0 /
stuck-at-1 in the first run and 99.05% / 99.16% in the second. The article
reports 99.10% / 99.09% and 99.89% / 99.78% for its two runs; its fault mix
is not given in enough detail to repeat exactly. Every single-bit fault that corrupts the
ciphertext is flagged (the testbench fails otherwise). The escapes are
multi-bit faults whose flips cancel inside one signature: bits 3 and 1 of one
S-box output, the same bit of two cells for the XOR-of-cells signatures, or
two bits of one key cell.

## Parameters

| parameter | default | values |
|---|---|---|
| `CW` | 8 | 8: Midori128 (20 rounds), 4: Midori64 (16 rounds) |
| `S_SCHEME` | `SS_IPAR` | `SS_PAR`, `SS_IPAR`, `SS_BOTH`, `SS_RESI` (CW = 8 only) |
| `S_IMPL` | `IMPL_LUT` | `IMPL_LUT`, `IMPL_LOGIC` |
| `MC_SCHEME` | `MC_COLUMN` | `MC_COLUMN`, `MC_UNION`, `MC_INTERLEAVED` |
| `KEY_SCHEME` | `KEY_ELEMENT` | `KEY_ELEMENT`, `KEY_UNION` |

`midori_top` has the same parameters and passes them to the core. Its ports
are the core's with a `core_` prefix, plus `ti_x0..2`, `ti_sa0`, `ti_sa1`,
`ti_y0..2` and `ti_e1..3` for the threshold S-box.

## How far to trust it, and where it departs from the article

* The core reproduces the published Midori64 and Midori128 test vectors, and
  random encryptions and decryptions match an independent behavioural model
  (`tb/midori_model.sv`) for four parameter sets.
* S-box tables, the SSb bit permutations and the full set of 19 round
  constants are Midori's own; the article prints only the parity tables and
  three constants, which agree with them.
* The logic-based S-box and parity equations were minimised for this design
  from the tables. Several of the gate equations printed in the article do not
  reproduce its own parity table, so they were not used.
* The three affine tables of the threshold S-box are applied in the order
  A1, A2, A3 shown above. This is the only order that yields `Sb0`: the
  article labels the first table `A_out` and the last `A_in`. The sharing of
  `Q12` is direct sharing derived here; it is non-complete but its uniformity
  is not claimed, so a masked product would add fresh randomness. The checks
  work on recombined values.
* ShuffleCell and KeyAdd use the XOR of all cells as their signature; the
  article allows any signature there.
* The article reports a throughput of one 128-bit block per clock while
  describing a round-based loop. This RTL is round-based and delivers one
  block every 20 clocks (Midori128).
* `L^-1(K)` for decryption is computed combinationally from the stored key and
  is not itself checked. The controller (round counter, state machine) is not
  protected.
* Only Midori's matrix `M` is built. The MDS alternatives that the article
  compares would need field reduction polynomials it does not give.
* The start/busy/done handshake, reset, sticky flags, the one-round-per-clock
  schedule, RESI as a second pass, and the fault-injection port are choices
  of this design.

## Files

`rtl/`:

| file | content |
|---|---|
| `midori_pkg.sv` | types, scheme enums, `fault_t`, S-box tables and equations, signatures, permutations, constants |
| `sb4_prot.sv` | protected 4-bit S-box |
| `ssb_lut8.sv` | 8-bit S-box as 6-input tables + multiplexers |
| `ssb_prot.sv` | signature-protected 8-bit S-box |
| `ssb_resi.sv` | 8-bit S-box with recomputation on swapped inputs |
| `sub_layer.sv` | SubCell over 16 cells |
| `shuffle_prot.sv` | ShuffleCell / InvShuffleCell |
| `mix_prot.sv` | MixColumn with three check schemes |
| `keyadd_prot.sv` | KeyAdd |
| `keygen_prot.sv` | round keys, encryption and decryption |
| `midori_core.sv` | round-based core and controller |
| `ti_sbox_prot.sv` | threshold S-box with error detection |
| `midori_top.sv` | core and threshold S-box side by side |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), the
behavioural model `midori_model.sv`, and `tb_fault_coverage.sv`. Every
testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/midori_pkg.sv tb/midori_model.sv tb/tb_midori_top.sv \
        --top-module tb_midori_top
    ./obj_dir/Vtb_midori_top

Replace `tb_midori_top` with any other testbench name. `tb_midori_top` runs
the top at its default parameters end to end: encryption, decryption, faults
in each of the six checked transformations, and the threshold S-box with all
three flags. It finishes in well under a second. `tb_fault_coverage` (110,000
encryptions) takes a few seconds.
