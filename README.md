# Masked-key AES-128 encryption pipeline

A hardware Trojan planted in an FPGA accelerator can try to leak the secret
key by copying whatever sits in the key storage. This design is an AES-128
encryption pipeline in which that storage never holds a plain key. Every key
and every round key is written to storage **masked**: each of its bytes is
replaced by its AES S-box image. The key schedule is rewritten to work
directly on the masked words, so the encryption result is still standard
AES-128 (FIPS-197). The pipeline is fully unrolled and accepts a new
128-bit block, with its own key, on every clock. At the 813 MHz reported for a
Virtex-7 XC7VX690T this gives 128 × 813 MHz = 104 Gbit/s.

## The masked key schedule

Write a round key as four 32-bit words Kb0..Kb3. The mask is

    Kbi' = SubWord(Kbi)          (S-box on each of the four bytes)

and only Kb0'..Kb3' are ever stored. The standard AES-128 key step is

    Kbnew0 = Kb0 ^ SubWord(RotWord(Kb3)) ^ Rcon
    Kbnew1 = Kb1 ^ Kbnew0,  Kbnew2 = Kb2 ^ Kbnew1,  Kbnew3 = Kb3 ^ Kbnew2

The key step works because SubWord acts on each byte separately, so it
commutes with the byte rotation RotWord. Hence
`RotWord(Kb3') = SubWord(RotWord(Kb3))`, and the key schedule's own S-box
step is already done by the mask. The plain words come back through the
inverse S-box:

    Kbnew0 = InvSub(Kb0') ^ RotWord(Kb3') ^ {Rcon, 24'h0}
    Kbnew1 = InvSub(Kb1') ^ Kbnew0
    Kbnew2 = InvSub(Kb2') ^ Kbnew1
    Kbnew3 = InvSub(Kb3') ^ Kbnew2

The new round key goes to AddRoundKey in plain form. It is masked again
(SubWord) before it is stored for the next round. Compared with a plain key
schedule, each round spends 16 extra S-box lookups: 16 inverse lookups to
unmask, plus 16 forward lookups to mask. The forward S-box inside the key
schedule itself is no longer needed.

Rcon starts at 01 and is multiplied by 02 in GF(2^8) each round. Round r
(1..10) uses 02^(r-1).

## Pipeline

```
 in_block, in_key
      |      \
      |     key_mask (S-box per byte) --> masked_key_bank #0
      v                                        |
  block ^ key  (initial AddRoundKey)           |
      |  input register                        |
      v                                        v
  +------------------------ aes_round r = 1..10 -------------------------+
  | aes_round_data:  SubBytes | ShiftRows | MixColumns | reg | reg       |
  | masked_key_expansion: unmask,RotWord^Rcon | Kbnew0 | Kbnew1 | Kbnew2 |
  |                       | Kbnew3 -> mask -> masked_key_bank #r         |
  | state_out = data ^ round_key   (AddRoundKey)                          |
  +-----------------------------------------------------------------------+
      |
  output register --> out_block
```

The plain key is used exactly once, in the input stage, for the initial
AddRoundKey. In the same cycle its masked form is written to bank #0.

Each round is five clock stages deep. The key expansion has one operation
per stage:

| stage | key expansion (`masked_key_expansion`)                 | state (`aes_round_data`) |
|-------|--------------------------------------------------------|--------------------------|
| S1    | InvSub of Kb0'..Kb3'; RotWord(Kb3') ^ Rcon             | SubBytes                 |
| S2    | Kbnew0                                                 | ShiftRows                |
| S3    | Kbnew1; mask Kbnew0                                    | MixColumns (not in round 10) |
| S4    | Kbnew2; mask Kbnew1                                    | delay                    |
| S5    | Kbnew3; mask Kbnew2, Kbnew3; write masked key to bank  | delay                    |

After S5 the state register and the round-key register are XORed
(AddRoundKey). That XOR feeds the next round's SubBytes. The two delay
stages on the state side exist only so that the state meets its round key.
A non-pipelined version of this key step would take about five cycles per
key. Five stages bring the initiation interval down to one.

Timing of `aes_masked_top`:

* latency: 52 cycles (1 input stage, 10 × 5 round stages, 1 output stage),
  constant, results in order;
* initiation interval: 1. A block and a key can enter every cycle, and every
  block may carry a different key;
* no back-pressure: `in_valid` is accepted unconditionally, and `out_valid`
  marks each result.

## Where key material lives

* `masked_key_bank` instances: one at the input and one at the end of each
  round. These are the key storage. Each holds four 32-bit banks (Kb0'..Kb3'),
  so all four words are read in one cycle. A bank keeps its masked contents
  after the traffic stops.
* Inside a key-expansion unit, plain words exist in the pipeline registers of
  stages S1..S5 while a key passes through. AddRoundKey cannot work without
  them. Those registers are cleared in any cycle their stage carries no valid
  key, so an idle unit holds only masked material. An assertion checks that
  `round_key` is zero whenever `out_valid` is low.
* The masked store after round 10 feeds nothing. It is kept so that all
  rounds are alike, and synthesis removes it.

The mask is the S-box, a fixed, public, invertible function. The design does
not claim that a masked key cannot be recovered. It claims that a Trojan
copying the stored words sees values with no simple relation to the key.
`tb_key_leak_analysis` measures this over 1500 random keys at all eleven
stores. The byte correlation between stored and plain key is about −0.04,
which is the S-box's own input/output correlation. The mean Hamming distance
is about 64 of 128 bits.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | types (`state_t`, `key_words_t`), constants (`NR`, `KE_STAGES`, `LATENCY`), S-box tables computed at elaboration, ShiftRows, MixColumns, RotWord, Rcon |
| `rtl/aes_sbox.sv` | one-byte S-box or inverse S-box (parameter `INVERSE`) |
| `rtl/sub_word.sv` | four `aes_sbox` on a 32-bit word |
| `rtl/key_mask.sv` | masks a 128-bit key (SubWord on all four words) |
| `rtl/masked_key_bank.sv` | four-bank storage for one masked key |
| `rtl/masked_key_expansion.sv` | five-stage masked key step, parameter `RCON` |
| `rtl/aes_round_data.sv` | SubBytes/ShiftRows/MixColumns, five stages, parameter `FINAL` |
| `rtl/aes_round.sv` | one round: the two above plus AddRoundKey, parameter `ROUND` |
| `rtl/aes_masked_top.sv` | the accelerator |

The S-box tables are not typed in. `aes_pkg` computes them from the
definition, the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the
affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.
Synthesis then sees 256 × 8 ROMs: 16 for the input mask and 48 per round.

Byte order is the FIPS-197 one. Bit 127..120 of a 128-bit port is state
byte 0. Word Kb0 is bits 127..96 of the key. Reset is synchronous and active
high.

## Port list of `aes_masked_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset; drops every block in flight |
| `in_valid` | in | 1 | `in_block`/`in_key` are valid this cycle |
| `in_block` | in | 128 | plaintext |
| `in_key` | in | 128 | AES-128 key for this block |
| `out_valid` | out | 1 | `out_block` is valid (52 cycles after `in_valid`) |
| `out_block` | out | 128 | ciphertext |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
compares the hardware against `tb/aes_ref_pkg.sv`, a separate software AES.
That model builds its S-box a different way (the generator walk over powers
of 3) and uses the textbook key schedule.

| testbench | what it checks |
|-----------|----------------|
| `tb_aes_sbox` | all 256 forward and inverse values, FIPS-197 spot values |
| `tb_key_mask` | masked key = S-box of every byte, for a fixed key and 500 random keys; the mask inverts |
| `tb_masked_key_bank` | per-bank writes, parallel read, hold, reset |
| `tb_masked_key_expansion` | plain and masked next round key against the textbook schedule (including the FIPS-197 round-2 → round-3 example), latency 5, one key per cycle, cleared registers after draining |
| `tb_aes_round_data` | middle and final round against the reference, the FIPS-197 round-1 example, latency 5 |
| `tb_aes_round` | rounds 1 and 10 with random states, keys and bubbles |
| `tb_aes_masked_top` | FIPS-197 Appendix B and C.1 vectors; 256 blocks with 256 keys back to back (throughput one block per clock, latency 52); 1500 cycles of random traffic with bubbles and shared keys; reset with blocks in flight. It checks that the input-stage store holds the masked key and not the plain key, and counts each of these events |
| `tb_key_leak_analysis` | every word in all eleven key stores is the masked round key; correlation and Hamming distance between stored and plain keys |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_masked_top.sv \
    --top-module tb_aes_masked_top -o sim && ./obj_dir/sim
```

`tb_aes_masked_top` runs the accelerator at its only configuration. It takes
well under a second.

## Design choices not fixed by the method

* **Stage split.** The method fixes five key-expansion stages but not what
  each one does. The split in the table above is this design's.
* **Rotation.** The key step rotates the word Kb3' by one byte (RotWord).
  Only the byte rotation reproduces the AES key schedule.
* **Memory partitioning.** Key storage is split into four 32-bit banks, one
  per word, built from registers with asynchronous read.
* **Key with every block.** The key travels with each block through the
  pipeline. There is no separate key-load phase, and consecutive blocks may
  use different keys.
* **Handshake and reset.** A valid-only stream with no back-pressure, and a
  synchronous active-high reset.
* **Clearing.** Key-expansion registers that hold plain words are zeroed on
  bubbles.

## Limits

* Only encryption is built. Decryption with the masked key is mentioned as a
  use of the same key schedule but is not defined. The inverse cipher needs
  the round keys in reverse order, and a forward-only masked schedule does not
  provide them without further design.
* The 813 MHz clock and the resulting 104 Gbit/s are FPGA implementation
  results (Virtex-7, with floorplanning). The RTL reproduces the cycle-level
  behaviour: one block per clock. Reaching that clock frequency has not been
  checked.
* The round keys are plain in the key-expansion pipeline registers while a
  block is being encrypted. Masking protects storage, not the datapath. It
  does not address power analysis.
