# AES-128 encryptor with 32-bit word ports and a four-packet round datapath

This is an area-oriented AES-128 encryption core. Its main idea is to keep
the 128-bit work inside the core and narrow everything at the edges:

* Plaintext and key enter as four consecutive 32-bit words each, and the
  cipher text leaves as four 32-bit words. Each port is 32 bits wide instead
  of 128.
* The 128-bit state lives in one register. Each round splits it into four
  32-bit *packets* (one per state column). Each packet goes through its own
  small round unit. The results are written back into the register for the
  next round.
* The round keys are not stored. They are produced one per round, in the
  same cycle the round uses them, by a key-expansion register that steps
  along with the rounds.

The core encrypts only (no decryption) and supports only 128-bit keys. It
produces standard FIPS-197 AES-128 cipher text. The testbenches check this
against the published FIPS-197 vectors and against a reference model.

## A block's journey

```
 pt_word/key_word ──► aes_word_in ×2 ──► load: state = pt ^ key      (initial round)
   (4 words each)     (128-bit buffers)        rk    = key
                                              │
                          ┌───────────────────┘
                          ▼
             ┌──► 128-bit state ──► 4 packets ──► 4 × aes_col_round ──┐
             │      register       (ShiftRows     SubBytes, MixColumn, │
             │                      by wiring)    AddRoundKey          │
             └──────────── rounds 1..9 ◄───────────────────────────────┤
                                                                       │ round 10
                     aes_key_expand: round key i, one per cycle ───────┤ (no MixColumn)
                                                                       ▼
                                                 aes_word_out ──► ct_word (4 words)
```

Cycle by cycle, with `en` held high:

| cycle      | what happens                                                              |
|------------|---------------------------------------------------------------------------|
| t-3 .. t   | the four plaintext/key word pairs are accepted (`in_valid && in_ready`)   |
| t+1        | `load`: state ← plaintext ⊕ key, key register ← key                       |
| t+2 .. t+10| rounds 1–9, one per cycle; each uses the round key computed in that cycle |
| t+11       | round 10 (last round). Its result goes straight to the output buffer, and the next block may load in this same cycle |
| t+12 .. t+15 | `ct_valid`. `ct_word` carries cipher text columns 0, 1, 2, 3; `ct_last` is set with column 3 |

So the first cipher text word appears **12 cycles after the last input
word**. The next block's words can be accepted while a block is being
encrypted, so a continuous stream completes **one block every 10 cycles**.
The input buffer holds one waiting block; while it is full and the core is
busy, `in_ready` is low.

## The round datapath: why ShiftRows is free

AES state byte s(r,c) (row r, column c) is byte 4c+r of the 128-bit block.
Byte 0 is in bits [127:120]. Column c is therefore the 32-bit word at bits
[127-32c -: 32]. That is also the word order on all three 32-bit ports.

ShiftRows moves row r left by r positions. After it, column c holds
s(0,c), s(1,c+1), s(2,c+2), s(3,c+3), with column indices taken mod 4. The
other three round steps each work within one column:

* SubBytes works on single bytes.
* MixColumn works on one column.
* AddRoundKey XORs column c with round-key word c.

`aes_state_path` therefore builds each packet straight from this rotated
diagonal of the state register. It passes the packet to its own
`aes_col_round`, and the four packets never interact inside the round.
ShiftRows costs only wiring.

Each `aes_col_round` has four S-box tables, a MixColumn (skipped when
`last` is set) and the round-key XOR. The same four units serve rounds 1–9
and the last round. A whole round takes one clock cycle.

The S-box is a 256-entry look-up table (`aes_sbox`). Its entry i is
S(i) = A(i⁻¹) ⊕ 0x63, where:

* i⁻¹ is the multiplicative inverse in GF(2⁸) modulo x⁸+x⁴+x³+x+1, with 0
  mapping to 0;
* A(b) = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4).

The core uses 20 S-box tables: 16 in the round units and 4 in the key
expansion.

## Round keys generated alongside the rounds

`aes_key_expand` holds round key i−1 in a 128-bit register and an 8-bit
Rcon. From these it computes round key i combinationally:

```
t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
n0 = w0 ^ t;  n1 = w1 ^ n0;  n2 = w2 ^ n1;  n3 = w3 ^ n2
```

Round key i is used by the round in the same cycle. The register then steps
to it, and Rcon steps to xtime(Rcon) (01, 02, 04, …, 80, 1b, 36). `load`
puts the cipher key (round key 0) in the register; the initial round XORs
the same key into the state directly. No key memory and no key set-up time
are needed, and every block may use a different key.

## Control and the enable

`aes_ctrl` holds `busy` and a round counter from 1 to 10.

* `load` happens when both input buffers are full and the core is idle or
  in its last round.
* `step` (compute one round) happens in every cycle with `busy && en`.
* In round 10, `last` removes MixColumn and `done` hands the result to
  `aes_word_out`.
* `en` is a global enable. While it is low, no block starts and no round
  advances; the state and key registers hold. The input buffers keep
  accepting words until they are full, and the output keeps draining.

The output buffer has no back-pressure. It needs four cycles per block and
blocks arrive at least ten cycles apart, so it never overflows. An assertion
in `aes_word_out` checks this.

## Ports of `aes128_enc_top`

| port       | dir | width | meaning                                                      |
|------------|-----|-------|--------------------------------------------------------------|
| `clk`      | in  | 1     | clock, all logic on the rising edge                          |
| `rst_n`    | in  | 1     | asynchronous active-low reset                                |
| `en`       | in  | 1     | global enable; low freezes the rounds                        |
| `in_valid` | in  | 1     | `pt_word` and `key_word` carry a word                        |
| `pt_word`  | in  | 32    | plaintext word, column 0 (bytes 0–3) first                   |
| `key_word` | in  | 32    | key word, same order                                         |
| `in_ready` | out | 1     | the word pair is taken in a cycle with `in_valid && in_ready`|
| `ct_valid` | out | 1     | `ct_word` carries a cipher text word                         |
| `ct_word`  | out | 32    | cipher text word, column 0 first                             |
| `ct_last`  | out | 1     | fourth word of a block                                       |
| `busy`     | out | 1     | a block is being encrypted                                   |
| `round`    | out | 4     | round in progress (1–10) while busy                          |

The core has no parameters. `aes_pkg` holds NR = 10 and the shared types and
helpers (`xtime`, `mix_column`, column and byte selection).

## Files

| file                    | contents                                             |
|-------------------------|------------------------------------------------------|
| `rtl/aes_pkg.sv`        | types, NR, GF(2⁸) helpers                           |
| `rtl/aes_sbox.sv`       | S-box look-up table                                  |
| `rtl/aes_col_round.sv`  | round transformation of one 32-bit packet            |
| `rtl/aes_state_path.sv` | 128-bit state register, four packet units, feedback  |
| `rtl/aes_key_expand.sv` | per-round key expansion                              |
| `rtl/aes_ctrl.sv`       | enable and round sequencing                          |
| `rtl/aes_word_in.sv`    | four 32-bit words into a 128-bit block               |
| `rtl/aes_word_out.sv`   | 128-bit block out as four 32-bit words               |
| `rtl/aes128_enc_top.sv` | top level                                            |
| `tb/aes_ref_pkg.sv`     | reference AES-128 model and FIPS-197 vectors         |
| `tb/tb_*.sv`            | one self-checking testbench per module               |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends the run. For
example, to run the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_enc_top.sv \
    --top-module tb_aes128_enc_top
./obj_dir/Vtb_aes128_enc_top
```

To run the other testbenches, replace the module name with one of:
`tb_aes_sbox`, `tb_aes_col_round`, `tb_aes_key_expand`, `tb_aes_word_in`,
`tb_aes_word_out`, `tb_aes_ctrl` or `tb_aes_state_path`. Each runs in well
under a second.

The reference model in `tb/aes_ref_pkg.sv` shares no code with the RTL. It
computes the S-box from its definition rather than from a table, and it
checks itself against the FIPS-197 Appendix B and C.1 vectors.

What the testbenches cover:

* **`tb_aes_sbox`**: all 256 S-box entries.
* **`tb_aes_col_round`**: random packets in normal and last rounds, and the
  FIPS-197 MixColumns example column.
* **`tb_aes_key_expand`**: round keys 1–10 for the FIPS-197 keys and random
  keys, including stalls and `load` winning over `step`.
* **`tb_aes_state_path`**: every intermediate round of whole encryptions.
* **`tb_aes_ctrl`**: a cycle-level model of the sequencing under random `en`
  and input availability.
* **`tb_aes_word_in`** and **`tb_aes_word_out`**: the word handshakes and
  word order.
* **`tb_aes128_enc_top`**: runs 122 blocks end to end at the core's only
  configuration. It checks the 12-cycle latency and the 10-cycle block rate,
  and counts these events, failing if any of them never happens:
  * input back-pressure;
  * `en` stalls;
  * back-to-back blocks (a load during the last round);
  * last rounds;
  * key changes between blocks.

## Size

After generic synthesis (yosys, coarse):

* 662 flip-flop bits:
  * two 128-bit input buffers;
  * the 128-bit state register;
  * the 128-bit key register with its 8-bit Rcon;
  * the 128-bit output buffer;
  * control.
* 20 S-box tables of 256 × 8 bits.

The S-box tables are the largest part. Computing the S-box with GF(2⁸)
arithmetic instead of tables is the obvious way to make the core smaller.

## Relation to the architecture it implements, and own choices

These parts follow the architecture this core implements:

* AES-128 only;
* 32-bit serial plaintext, key and cipher text ports;
* one 128-bit state register looping through rounds 1–9, then a last round
  without MixColumn;
* four 32-bit packet transformations working in parallel;
* an S-box realised as a look-up table;
* key expansion running alongside the rounds, with no round-key store;
* a global enable `en` on the state register and the key expansion.

Choices made here where that architecture leaves details open:

* **The schedule.** A whole round (all four packets) takes one clock cycle.
  The architecture speaks of pipelining the four packets through the nine
  middle rounds but does not place any stage boundaries. Here the
  "pipelining" is the overlap of word-serial input and output with the
  rounds of the neighbouring blocks. There are no registers inside a round.
* **Packets.** A packet is formed from the rotated diagonal, so ShiftRows is
  wiring.
* **Last round.** The last round reuses the four packet units with MixColumn
  bypassed instead of a separate last-round block.
* **Clock control.** The original describes restarting the 128-bit register
  by controlling its clock. Here it is done with synchronous load and enable
  terms, so the core has no gated clocks.
* **Interface details.** These are all chosen here:
  * the valid/ready input handshake;
  * the valid/last output signalling;
  * the word order (column 0 first);
  * plaintext and key words sharing one handshake;
  * the asynchronous active-low reset.

Not included:

* the other build the original's simulation waveform seems to come from. It
  has 128-bit `datain`/`key`/`dataout` ports, per-round state outputs
  (`r1_out`…`r9_out`) and per-round key outputs, all changing every cycle,
  which suggests a fully unrolled pipeline. This core follows the
  word-serial, single-register architecture instead;
* decryption;
* AES-192 and AES-256;
* the multilayer LFSR cipher stage that the original names as a further
  security layer. No structure, width or polynomial is specified for it,
  so there is nothing to implement.
