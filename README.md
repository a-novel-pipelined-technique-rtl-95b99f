# Byte-serial AES-128 accelerator for image encryption and decryption

This is a small-area AES-128 engine for encrypting and decrypting images on
lightweight (IoT-class) hardware. It gets its small size from an 8-bit
datapath. A block and its key enter one byte per clock. Two 16-byte register
banks hold them: one for the state and one for the key. The round logic works
on single bytes and single columns, not on the whole 128-bit state. An image
is handled as a stream of 16-byte blocks (ECB), one block at a time.

The design has two units with the same structure:

* an **encryption unit** (`aes_enc_unit`), which takes 226 clock cycles per block;
* a **decryption unit** (`aes_dec_unit`), which is its mirror image, built from
  the inverse transformations. It takes 390 cycles per block, because it also
  derives the last round key itself.

The top level (`aes_image_top`) puts both units behind one byte-wide port, with
a mode select.

Both units are sequenced by a controller built around a single global counter.
Its enable is `EN_SIG`. It produces the control signals that steer the
datapath:

* `DATA_IN_SEL`: state input is the external byte or the round feedback;
* `KEY_IN_SEL`: key input is the external byte or the key expansion;
* `RND_SIG`: a round is in progress;
* `LAST_RND_SIG`: round 10, in which MixColumns is skipped.

## Datapath of one unit

```
             din ──┐                          key_in
                   │ (enc: din ^ key_in)         │
     DATA_IN_SEL ─►MUX◄── SubBytes(head)          ▼  KEY_IN_SEL
                   │                        ┌──────────────┐
                   ▼ byte_in                │ key register │  16 bytes, byte-serial
  ┌────────────────────────────────────┐    │ bank         │  forward/backward key
  │ state register bank s[0..15]       │    │ + 1 S-box    │  expansion, rotate by
  │  shift: s[0] out, byte_in → s[15]  │    └──────┬───────┘  one column
  │  ShiftRows: permuting parallel load│           │ key column k[0..3]
  │  column: s[0..3] out, col → s[12..]│           │
  └───┬──────────────────┬─────────────┘           │
 head │ s[0]         col │ s[0..3]                 │
      ▼                  ▼                         ▼
  ┌────────┐   ┌───────────────────────────────────────┐
  │ S-box  │   │ MixColumns ─► ⊕ round key  (encrypt)  │   round module
  │        │   │ ⊕ round key ─► InvMixColumns (decrypt)│   (aes_round)
  └────────┘   │ mix_bypass: key addition only          │
               └───────────────────────────────────────┘
  dout = s[0]
```

The state is stored in FIPS-197 order: byte `4*c + r` is row `r` of column `c`.
Byte 0 is the first byte on the serial interface (the most significant byte of
the usual hex notation). Column words carry row 0 in bits `[31:24]`.

### Schedule of a block

Every count below is in cycles with `en` high. With `en` low, every register
holds and nothing advances.

| phase | cycles | state register | key register | notes |
|---|---|---|---|---|
| I/O | 16 | shift in `din` (encrypt: `din ^ key_in`) | shift in `key_in` | previous result leaves on `dout` |
| key expansion (decrypt only) | 160 | hold | 10 forward expansion passes | ends at round key 10 |
| initial key addition (decrypt only) | 4 | column write | rotate by a column | adds round key 10 |
| per round, ×10: SubBytes | 16 | shift, feedback through S-box | one expansion step, byte by byte | encrypt: next key; decrypt: previous key |
| ShiftRows | 1 | permuting load | hold | |
| columns | 4 | column write | rotate by a column | (Inv)MixColumns + AddRoundKey; last round: key addition only |

That gives 16 + 10 × 21 = **226 cycles** for encryption and
16 + 160 + 4 + 210 = **390 cycles** for decryption, counted from the first I/O
cycle. The cycle after the last column write, `done` pulses and `result_valid`
goes high.

For encryption, the initial AddRoundKey costs no cycles. It is applied to each
byte as it enters: that is the `DATA_IN_SEL` path, `din ^ key_in`.

SubBytes runs on the byte leaving the state register at `s[0]`, and the
substituted byte re-enters at `s[15]`. After 16 cycles every byte has been
substituted and is back in place. ShiftRows commutes with SubBytes, so it runs
afterwards as a single-cycle permutation of the register:
`s'[4c+r] = s[4((c+r) mod 4) + r]`. In the column phase, column 0 goes through
the round module and re-enters as column 3. After four cycles, every column has
been mixed and keyed, and the columns are in their original order.

### Serial I/O and result hand-over

The unit has no output buffer. A finished result stays in the state register
(`result_valid` high). It leaves through `dout = s[0]` during the next I/O
pass, in the same cycles in which the next block's bytes enter at `s[15]`.
`dout_valid` marks those cycles.

A `flush` request runs an I/O pass that only empties the unit and then returns
to idle. A stream of N blocks therefore costs N × (16 + 210) + 16 cycles to
encrypt.

### Key register bank and on-the-fly expansion

The key bank `k[0..15]` is a byte shift register, like the state bank. There is
no round-key memory. Each round key is computed from the previous one while
SubBytes runs, one byte per cycle, using a single S-box.

**Forward step** (encryption). The bank shifts left, and the new byte enters at
`k[15]`. With `j` the byte index (0..15), the register positions that hold the
needed bytes at that moment give:

```
j = 0      : k[0] ^ S(k[13]) ^ rcon
j = 1, 2   : k[0] ^ S(k[13])
j = 3      : k[0] ^ S(k[9])
j = 4..15  : k[0] ^ k[12]
```

This is `w'0 = w0 ^ SubWord(RotWord(w3)) ^ Rcon` and `w'i = w'(i-1) ^ wi`.
`rcon` is a register that starts at `01` and is multiplied by x (`xtime`)
after each step.

**Backward step** (decryption). The bank shifts right, so bytes are produced
from 15 down to 0, and the new byte enters at `k[0]`. With `t` the cycle index:

```
t = 0..11  : k[15] ^ k[11]                 (bytes 15..4: w(i) = w'(i) ^ w'(i-1))
t = 12     : k[15] ^ S(k[8])
t = 13, 14 : k[15] ^ S(k[12])
t = 15     : k[15] ^ S(k[12]) ^ rcon/x
```

In the backward step, `rcon` is divided by x: first it gives `36`, then `1b`,
`80`, and so on.

The column phase reads round-key columns from `k[0..3]`, rotating the bank by
one column per cycle. Four rotations put it back in its original order.

The decryption unit takes the ordinary cipher key. It first runs ten forward
steps to reach round key 10 (the 160-cycle phase), then steps backwards once per
round. When it finishes, the bank holds the cipher key again.

### Round module

`aes_round` holds two independent combinational paths, used in the same
design:

* byte path: `aes_sbox` or `aes_inv_sbox`;
* column path:
  * encryption: `aes_mixcol`, then XOR with the key column;
  * decryption: XOR with the key column, then `aes_inv_mixcol`.

`mix_bypass` removes the mixing. The controller sets it in the last round
(`LAST_RND_SIG`) and during the decryption unit's initial key addition.

The S-boxes are not tables. They are computed as logic from their definitions:

* the field inverse is `a^254` in GF(2^8), with modulus x^8+x^4+x^3+x+1;
* SubBytes is the inverse followed by the affine map
  `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`;
* InvSubBytes applies the inverse map `rotl(a,1) ^ rotl(a,3) ^ rotl(a,6) ^ 0x05`
  first, then the inverse.

These functions are in `aes_pkg`.

### Controller (`aes_ctrl`)

The controller is a phase register with a 4-bit position counter and a 4-bit
round counter. The phases are idle, I/O, key expansion, initial key addition,
SubBytes, ShiftRows and columns. All of it advances only while `en_sig` is
high.

Every cycle it outputs the `ctrl_t` word: the state-bank and key-bank
operations, the byte index, `data_in_sel`, `key_in_sel`, `rnd_sig`,
`last_rnd_sig` and `mix_bypass`. When `en_sig` is low, it forces both banks to
hold.

Two assertions check the sequencing:

* a column pass never lasts more than four cycles;
* the external ports are only read during I/O.

## Top level (`aes_image_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `en` | in | 1 | `EN_SIG` of both units: low stalls |
| `mode` | in | 1 | 0 encrypt, 1 decrypt; sampled with `start`/`flush` |
| `start`, `flush` | in | 1 | begin an I/O pass that loads a block (start) or only unloads (flush) |
| `din`, `key_in` | in | 8 | block byte and key byte, byte 0 first |
| `ready` | out | 1 | neither unit busy; `start`/`flush` are accepted only then |
| `io_active` | out | 1 | selected unit is in its I/O pass: drive `din`/`key_in` now |
| `dout`, `dout_valid` | out | 8, 1 | result byte of the selected unit |
| `done` | out | 1 | one-cycle pulse when a unit finishes a block |
| `sel` | out | 1 | unit that owns the port (mode of the last accepted request) |
| `enc_result_valid`, `dec_result_valid` | out | 1 | the unit holds an unread result |
| `data_in_sel`, `key_in_sel`, `rnd_sig`, `last_rnd_sig` | out | 1 | control signals of the selected unit |

**Protocol.** Assert `start` (or `flush`) together with `mode` while `ready`
is high and `en` is high. From the next cycle on, `io_active` is high for 16
enabled cycles. Drive byte `i` of the block on `din` and byte `i` of the key on
`key_in` in the `i`-th of those cycles. Where `dout_valid` is high in those
cycles, `dout` carries byte `i` of the previous result of the same unit.

Each unit keeps its own result, so switching `mode` between blocks never loses
one. Only one unit runs at a time.

## Size

Coarse synthesis of the top (yosys, word-level cells) gives:

* 557 flip-flop bits: per unit, 128 state bits, 128 key bits, 8 rcon bits and
  14 controller bits, plus one select bit;
* about 1660 word-level cells;
* no memories and no latches.

## Where this departs from, or goes beyond, the published architecture

The published architecture gives the block structure and the control signal
names. It does not give the insides of any block. These are this design's own
choices:

* **Cycle schedule.** The 16/1/4 cycles per round and the 226/390-cycle block
  times are this design's. The published architecture claims about 20 % fewer
  cycles than a conventional design, but gives no absolute count to compare
  with.
* **Column-wide mixing.** MixColumns and InvMixColumns process one 32-bit
  column per cycle. All the other datapath parts are 8 bits wide.
* **Decryption key.** The decryption unit derives the last round key itself,
  in 160 cycles per block. It does not keep it between blocks: a design that
  accepted the last round key directly would save those cycles.
* **Separate units.** One sentence describes decryption as reusing "the same
  round module"; another describes separate units that share a structure. Here
  there are two separate units, built from the same parameterised modules
  (`DECRYPT` / `INVERSE`).
* **Not built:**
  * no fault detection or correction logic: none is described, despite the
    "fault-efficient" label;
  * no pipelining across blocks, other than the overlap of result output with
    the next block's input;
  * only AES-128: 192- and 256-bit keys are described as future work.
* **Reported numbers not reproduced.** The reported FPGA figures (931 LUTs,
  4.677 ns, and more than 500 IOBs on a Virtex-4 class part) were not
  reproduced. The IOB count suggests a wider external interface than the
  byte-wide port described in the text, which is what was built here.
* **Interface choices.** The handshake (`start`, `flush`, `io_active`,
  `dout_valid`, `done`), the reset behaviour, the byte order and the ECB
  treatment of images are interface choices of this design.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. The reference model
`tb/aes_ref_pkg.sv` is written independently of the RTL: it builds its S-box
from log/antilog tables of the generator 3, and it runs whole-block FIPS-197
encryption and decryption.

| testbench | what it checks |
|---|---|
| `tb_aes_pkg` | `xtime`, division by x, field multiply, both S-box functions, for all 256 bytes |
| `tb_aes_sbox`, `tb_aes_inv_sbox` | all 256 inputs |
| `tb_aes_mixcol`, `tb_aes_inv_mixcol` | the `db 13 53 45 ↔ 8e 4d a1 bc` column, plus 2000 random columns |
| `tb_aes_round` | both variants, with and without bypass |
| `tb_aes_state_reg` | 3000 cycles of random operations against a behavioural model, both ShiftRows directions |
| `tb_aes_key_reg` | all round keys, forward and backward, for the FIPS-197 key and random keys |
| `tb_aes_ctrl` | the control word every cycle against the schedule above, stalls, flush, 10 rounds per block |
| `tb_aes_enc_unit`, `tb_aes_dec_unit` | the FIPS-197 vector (`69c4e0d86a7b0430d8cdb78070b4c55a`), random blocks back to back with stalls, 226/390-cycle latency, flush |
| `tb_aes_image_top` | full design at its defaults, 256×256 image (details below) |

`tb_aes_image_top` encrypts and decrypts a generated 256×256 grey-scale image
(4096 blocks) back to back, with stalls in every fifth block. It checks:

* every ciphertext block, and the recovered image;
* latencies;
* refusal of `start` while busy;
* a mode switch with both units holding results.

It counts stalls, overlapped I/O, flushes and mode switches, and the cycles
with each control signal high. It also reports the cycles for the whole image:
about 0.99 M to encrypt and 1.71 M to decrypt, including the stalls. The run
takes a few seconds.

Run a testbench with plain verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_image_top.sv \
    --top-module tb_aes_image_top -Mdir obj && obj/Vtb_aes_image_top
```

Verilator finds the other modules in `rtl/` through `-Irtl`, because each file
is named after its module.

## Files

* `rtl/aes_pkg.sv`: types, constants, GF(2^8) and S-box functions, control word.
* `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv`: byte substitution.
* `rtl/aes_mixcol.sv`, `rtl/aes_inv_mixcol.sv`: column mixing.
* `rtl/aes_round.sv`: round module.
* `rtl/aes_state_reg.sv`: state register bank with serial I/O and ShiftRows.
* `rtl/aes_key_reg.sv`: key register bank with byte-serial key expansion.
* `rtl/aes_ctrl.sv`: global-counter controller.
* `rtl/aes_enc_unit.sv`, `rtl/aes_dec_unit.sv`: the two units.
* `rtl/aes_image_top.sv`: top level.
* `tb/`: the reference model and the testbenches listed above.
