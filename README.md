# AES with Vedic GF(2^8) multipliers

The expensive part of an AES round in hardware is MixColumns: every byte of
the state is multiplied by small constants in the field GF(2^8) and the
products are XORed together. A common way to do those multiplications is the
table method: look up the logarithm of each operand, add the logarithms
modulo 255, and look the sum up in an exponential table. That needs two
256-entry tables per multiplier.

This design does the multiplication with logic instead, using the Urdhva
Tiryakbhyam ("vertically and crosswise") method from Vedic mathematics. Over
GF(2) "add" is XOR, so the method gives a carry-free array multiplier. The
same general multiplier serves both MixColumns (coefficients 1, 2, 3) and
InvMixColumns (9, B, D, E), so encryption and decryption share one set of
multipliers. Around it sits a complete iterative AES core: one round per
clock, encryption and decryption, and a key schedule for 128-, 192- and
256-bit keys (128 by default).

## The Vedic multiplier

### 4 x 4 block (`gf_vedic_mul4`)

Write the operands as a3 a2 a1 a0 and b3 b2 b1 b0. The product is built
column by column in seven steps. Step k+1 takes every pair whose indices add
up to k, ANDs the two bits and XORs the results:

| step | crossing lines                    | product bit |
|------|-----------------------------------|-------------|
| 1    | a0·b0                             | p0          |
| 2    | a1·b0, a0·b1                      | p1          |
| 3    | a2·b0, a1·b1, a0·b2               | p2          |
| 4    | a3·b0, a2·b1, a1·b2, a0·b3        | p3          |
| 5    | a3·b1, a2·b2, a1·b3               | p4          |
| 6    | a3·b2, a2·b3                      | p5          |
| 7    | a3·b3                             | p6          |

Because XOR replaces addition, no carry passes from one column to the next.
Every step is independent, and the delay is one AND plus a tree of at most
four XOR inputs. The result is the 7-bit polynomial product.

### 8 x 8 field multiplier (`gf_vedic_mul8`)

The 8-bit operands are split into nibbles. Four `gf_vedic_mul4` blocks form
aL·bL, aH·bL, aL·bH and aH·bH. These are placed at weights 1, x^4 and x^8 and
XORed into a 15-bit polynomial:

    full = LL  ^  (HL ^ LH) << 4  ^  HH << 8

The result is then reduced modulo the AES polynomial x^8 + x^4 + x^3 + x + 1
(0x11B). The reduction scans from bit 14 down to bit 8: wherever a bit is set,
0x11B shifted to that position is XORed in. This leaves an 8-bit field
element. The multiplier is purely combinational and has no registers.

## Column mixing (`mix_columns`) and the matrix unit (`comb_vedic`)

The two coefficient matrices are

    A (encrypt) = | 2 3 1 1 |      B (decrypt) = | E B D 9 |
                  | 1 2 3 1 |                    | 9 E B D |
                  | 1 1 2 3 |                    | D 9 E B |
                  | 3 1 1 2 |                    | B D 9 E |

`mix_columns` treats each 4-byte state column s as a vector and outputs M·s,
with M = A or B chosen by `inv`. That is 64 `gf_vedic_mul8` instances, one
per coefficient. Only the constant operand changes with `inv`, so the datapath
is the same in both directions.

`comb_vedic` is a stand-alone demonstration unit with sixteen byte inputs
a1..a16 and sixteen byte outputs p1..p16. It reads a1..a16 row by row as a
4x4 matrix X and computes P = X·A (or X·B), **multiplying from the right**.
With a1..a16 = 1, 2, ..., 16 and the encryption matrix, the outputs are
(decimal):

    15  0  5 14 | 19 12  9 26 |  7  8 13  6 | 43 20 17 50

Right-multiplication is not the AES column transform. So the cipher does not
use this unit, and `aes_vedic_top` shows it beside the cipher with its own
ports. Both units are built from the same Vedic multiplier.

## The cipher (`aes_core`, `aes_round`, `key_expansion`)

### Round structure

The state array is a 128-bit register. Byte 0 is the most significant byte of
the block, and byte r + 4c holds row r, column c, as in the AES standard.
`aes_round` is one combinational round, chained as

    state array -> sub_bytes -> shift_rows -> mix_columns -> add_round_key -> state array

- **Decryption** (`inv = 1`) uses the standard inverse cipher:
  InvShiftRows, then InvSubBytes, then AddRoundKey, then InvMixColumns.
  Byte substitution and row rotation commute, so both directions run
  `sub_bytes` before `shift_rows`. Decryption adds the round key before the
  mix-column step; encryption adds it after.
- **Last round** (`last = 1`) skips the mix-column step, as AES requires.

### Components

- `aes_sbox` holds the forward S-box and the inverse S-box as 256-entry
  constant arrays. Both are computed while the design is elaborated, not
  typed in: the forward S-box is the field inverse (0 maps to 0) followed by
  the AES affine map, and the inverse S-box is its inverse permutation.
- `sub_bytes` uses sixteen `aes_sbox` instances.
- `shift_rows` rotates row r by r positions: to the left when encrypting, to
  the right when decrypting.

### Key schedule

`key_expansion` produces one 32-bit key word per clock, using the standard
AES recurrence (RotWord, SubWord, round constant, and the extra SubWord for
8-word keys). It keeps all 4·(NR+1) words in a register array, so decryption
can read the round keys in reverse order with no second schedule. It has four
S-boxes of its own.

### Control and timing

Inputs are sampled on the rising clock edge. `rst_n` is an asynchronous,
active-low reset.

| event | AES-128 | general |
|-------|---------|---------|
| `key_load` pulse → `key_ready` high | 40 clocks | 4·(NR+1) − NK |
| `start` accepted → `done` pulse | 11 clocks | NR + 1 |

- `start` is accepted only while `ready` is high: a key is expanded and no
  block is in flight. At other times `start` is ignored. `din` and `decrypt`
  are sampled with `start`.
- On the accepting edge, the state register loads `din` XOR the first round
  key. That key is round key 0 for encryption and round key NR for
  decryption.
- The next NR edges each apply one round. The last of these edges raises
  `done` for one clock.
- `dout` holds the result until the next accepted `start`.
- One block is in flight at a time.

`KEY_BITS` (128, 192 or 256) is the only parameter. It sets NK = KEY_BITS/32
key words and NR = NK + 6 rounds.

## Where this departs from the original description, and why

- **ShiftRows.** The original description says every row but the first is
  shifted left "by one position". The RTL uses the AES rotation, row r by r
  positions, because a one-position shift would not be AES.
- **MixColumns and the last round.** The description says every round applies
  all four steps. The RTL leaves MixColumns out of the final round, as AES
  does.
- **MixColumns orientation.** The cipher's MixColumns multiplies columns from
  the left, the AES convention. The worked matrix example of the original
  multiplies from the right; `comb_vedic` reproduces that example separately.
- **Output p9 of the example.** The original example lists 21 for p9. The
  matrix product gives 7: 9·2 ⊕ 10 ⊕ 11 ⊕ 12·3 = 18 ⊕ 10 ⊕ 11 ⊕ 20. The listed
  21 equals the result with the 9·2 term left out. The RTL gives 7. The other
  fifteen outputs agree.
- **Details not specified originally.** The following come from the AES
  standard:
  - the forward S-box (only the inverse table was given);
  - the key schedule;
  - the round-constant sequence;
  - the field polynomial;
  - the initial key addition.
- **Design choices of this RTL.** The clocking and handshake
  (`key_load`/`key_ready`, `start`/`ready`/`done`), one round per clock, the
  stored round keys and the reset are this design's own.
- **Cycle and register counts.** The original reports a count of 4 cycles and
  8 registers for its Vedic multiplier without defining them. Here the
  multiplier is combinational and a full block takes NR+1 clocks, so those
  figures are not reproduced.
- **The table multiplier.** The logarithm/exponential table multiplier, the
  baseline the Vedic multiplier replaces, is not built. The testbenches use
  it as an independent reference.

## Verification

Every module has a self-checking testbench in `tb/`. `tb/tb_ref_pkg.sv` holds
reference models written separately from the RTL:

- a shift-and-add field multiplier;
- the log/exp table multiplier;
- a brute-force S-box;
- a byte-array AES model for any key length.

What each testbench checks:

- `tb_gf_vedic_mul4`: all 256 operand pairs.
- `tb_gf_vedic_mul8`: all 65,536 operand pairs, against the table method.
- `tb_aes_sbox`: all 256 entries of both tables, plus literal rows 0 and f of the
  published inverse table.
- `tb_mix_columns`, `tb_sub_bytes`, `tb_shift_rows`, `tb_aes_round`:
  worked examples from the AES standard (FIPS-197 Appendix B), random states
  against the reference model, and round trips.
- `tb_key_expansion`: all round keys for 128-, 192- and 256-bit keys, and
  the clock count to `ready`.
- `tb_aes_core`: the FIPS-197 known-answer vectors for all three key lengths,
  in both directions; random blocks against the model; latency; the
  single-cycle `done` pulse; and that `start` is ignored during key
  expansion.
- `tb_aes_vedic_top`: the whole top at its default parameters. It loads keys,
  encrypts and decrypts, and runs the matrix unit in both modes. It counts each
  mechanism (key expansion, encryption, decryption, final round, ignored
  start, both matrix modes) and fails if any never occurs.

The RTL passes Verilator lint (`-Wall`, warnings only) and the slang front
end. It has not been run on an FPGA or through timing analysis.

## Simulating

Each testbench is a top module without ports. It prints
`TB_RESULT checks=N failures=M` and finishes. Run from the directory that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_vedic_top \
        -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/tb_ref_pkg.sv tb/tb_aes_vedic_top.sv
    ./obj_dir/Vtb_aes_vedic_top

`-Wno-fatal` is needed because Verilator warns about the ascending byte
ranges (`[0:15]`), which are used on purpose so that element 0 is byte 0 of
the block. Replace the top module and testbench file to run any other
testbench. Every
run finishes in well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | state and matrix types, coefficient matrices, S-box generators |
| `rtl/gf_vedic_mul4.sv` | 4x4 Urdhva Tiryakbhyam carry-free multiplier |
| `rtl/gf_vedic_mul8.sv` | GF(2^8) multiplier from four 4x4 blocks plus reduction |
| `rtl/comb_vedic.sv` | 16-byte matrix × A/B unit (right multiplication) |
| `rtl/mix_columns.sv` | MixColumns / InvMixColumns with Vedic multipliers |
| `rtl/aes_sbox.sv`, `rtl/sub_bytes.sv` | S-box and the 16-byte substitution layer |
| `rtl/shift_rows.sv`, `rtl/add_round_key.sv` | row rotation, key addition |
| `rtl/aes_round.sv` | one combinational round, either direction |
| `rtl/key_expansion.sv` | iterative key schedule with round-key store |
| `rtl/aes_core.sv` | state register, round counter, handshake |
| `rtl/aes_vedic_top.sv` | top: cipher beside the matrix unit |
