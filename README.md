# Pipelined AES-GCM core with a subquadratic GF(2^128) multiplier

This is an authenticated-encryption core for AES-GCM. It takes one 128-bit block per
clock and encrypts or decrypts it. In the same pass it folds the block into the GHASH
authentication chain. It supports 128-, 192- and 256-bit keys and can switch keys
between messages at low cost.

The design is built around two ideas:

- **The GHASH multiplier uses a subquadratic algorithm.** The usual choice is a
  brute-force (Mastrovito) GF(2^128) multiplier. By default this core uses a Fan-Hasan
  multiplier instead. It is based on Toeplitz matrix-vector products and uses far fewer
  AND gates. A Karatsuba multiplier and the brute-force one are also included and can
  be selected with a parameter.
- **Keys change with little lost time.** The key schedule runs online: round keys are
  made while the pipeline keeps working. A key change costs a fixed four clocks.
  Designs that recompute every round key first lose a whole pipeline's length.

Throughput at full rate is one 128-bit block per clock. Latency from an input handshake
to the matching output is 13, 15 or 17 clocks for 128-, 192- or 256-bit keys.

## Datapath

```
 IV ──► counter Y ─┐                      ┌───────────────────────────────► text out
                   ├─► AES pipeline ──────┤ E(Y) ⊕ FIFO block              │
   0 (for H) ──────┘    10/12/14 rounds   │                                ▼
 key_in ──► iterative key schedule ──►    ├─► mux reg ─► ⊕X ─► GF mult reg ─► out reg ─► out_data
            (round-key register per round)│   (AAD, C, len)      × H           (tag = X ⊕ E(Y0))
 in_data ──► FIFO (AAD and text) ─────────┘
```

Every block that enters the AES pipeline carries a small tag with it. The tag is a
`slot_tag_t` from `gcm_pkg`. It says:

- what the slot is: the H block, Y0, AAD, text, or the length block;
- the key type;
- whether the message is being decrypted;
- how many bytes of the block are valid.

Each stage reads the tag to decide what to do. There is no central sequencer beyond the
input controller.

| Stage | Clocks | What happens |
|---|---|---|
| Input (`gcm_control`, `gcm_counter`, `gcm_fifo`) | 0 | A command is accepted. A counter value (or zero, for H) enters AES. An AAD or text block is pushed into the FIFO. |
| AES (`aes_pipeline`) | 10 / 12 / 14 | One register per round. The final round reads from after round 9, 11 or 13, depending on the block's key type. |
| Multiplexer register (`gcm_ghash`) | 1 | Picks the block to hash: AAD from the FIFO, ciphertext, or the length block. When encrypting, the ciphertext is the FIFO block XORed with E(Y). When decrypting, it is the FIFO block itself. |
| Multiplier register | 1 | X ← (X ⊕ block) · H. |
| Output register | 1 | Either the tag X ⊕ E(Y0), or the text block. The text block is delayed through the same three stages so that text and tags leave in input order. |

**Blocks that do not hash.** The H slot and the Y0 slot pass through AES like any other
block. Their results are caught by `gcm_ghash`:

- H is stored in multiplier form.
- E(Y0) is kept for the tag.

An AAD or text block waits in the FIFO until its counter block leaves AES. The FIFO is
16 entries deep, and at full rate it never holds more than Nr + 1 blocks.

## Interface and message protocol

`gcm_top` has these ports. Each command is one `in_valid`/`in_ready` handshake.

| Port | Width | Meaning |
|---|---|---|
| `in_valid`, `in_ready` | 1 | Handshake. A command is taken on a clock edge where both are high. |
| `in_type` | `data_type_e` | `DT_KEY`, `DT_IV`, `DT_AAD`, `DT_TEXT` or `DT_END` |
| `in_data` | 128 | The AAD or text block. Byte 0 is bits [127:120]. |
| `in_nbytes` | 5 | Valid bytes in this block, 1 to 16. Unused bytes are ignored. |
| `key_in`, `key_type` | 256, enum | The key, left-aligned; sampled with `DT_KEY`. |
| `iv`, `mode_decrypt` | 96, 1 | Sampled with `DT_IV`. |
| `out_valid`, `out_is_tag` | 1 | An output word, and whether it is the tag. |
| `out_data`, `out_nbytes` | 128, 5 | Output text (bytes past `out_nbytes` are zero) or the tag. |

A message is sent as:

```
[KEY]  IV  AAD*  TEXT*  END
```

- KEY is optional and takes effect from the next IV on.
- The last AAD block and the last text block may be partial.
- END sends the length block through the hash; the tag follows it.
- When decrypting, the tag is computed over the ciphertext. Compare it with the
  received tag outside the core.

`in_ready` drops in three cases:

- during the four clocks after a key is accepted;
- for a `DT_KEY` while the previous key schedule is still running;
- for AAD or text while the FIFO is full.

A streamed message is accepted one block per clock with no gaps.

An output appears exactly Nr + 3 clocks after its handshake: the text block after its
TEXT command, the tag after END. For 128-bit keys a 4-block message therefore gives its
first ciphertext 13 clocks after the first TEXT handshake and its tag 13 clocks after
END.

## Key changes

This is the least obvious part of the design.

**The key schedule** (`aes_key_schedule`) is iterative. It has one four-S-box SubWord
unit and works out one 128-bit round key per clock. Each AES round has its own
round-key register.

After a key is loaded, round key c is written c + 1 clocks later. Registers not yet
reached still hold the old key. Blocks of the previous message that are already in the
pipeline are always ahead of this wave of writes, so they finish with the old keys.

**Two hazards** need handling:

1. **A second key while the schedule is still working.** The pipeline could then hold
   blocks of a key whose later round keys were never written. The controller stalls the
   new key until the schedule is done. That is at most Nr + 2 clocks after the
   previous key, and only matters for messages shorter than that.
2. **A change from a long key to a shorter one.** Old 256-bit blocks leave through the
   final round from stage 13. New 128-bit blocks leave from stage 9. Without a gap, both
   would reach the final round on the same clock.

**The four-clock stagger** resolves the second hazard and makes H. After a key is
accepted:

- nothing enters AES for three clocks;
- on the fourth clock the all-zero block enters, so that the pipeline produces
  H = E_K(0);
- the next message's IV can enter on the clock after that.

The four clocks match the largest gap in final-round exits: 13 − 9 = 4. The zero block
needs round key c at stage c, and the schedule always has it written in time.

The pipeline checks with an assertion that two blocks never exit on the same clock.

**Alternative not built.** One could instead buffer the 128/192-bit exits so that all
keys exit after the same number of stages. That would allow a one-clock key change, at
the cost of six extra 128-bit registers. This core does not do that.

## The Fan-Hasan multiplier

Multiplication by H in GF(2^128) is written as a matrix-vector product c = P(b) · a.
The field polynomial is F(x) = x^128 + x^7 + x^2 + x + 1.

**The matrix.** Column j of P is x^j · b mod F. `gf128_poly_matrix` builds these
columns by repeated multiplication by x.

**Its structure.** The rows split into two groups:

- **Rows 7..127, with row 0 placed after them.** These 122 rows form a Toeplitz block:
  each diagonal is constant. So the block is described by 2·128 − 1 numbers, its
  generating vector.
- **Rows 1..6.** These rows break the structure. They are each computed as a plain
  AND/XOR-tree dot product.

**The Toeplitz product.** `gf_tmvp` computes it by a two-way split. Split the matrix and
the vector into halves, with T0, T1 and T2 the sub-blocks along the diagonals:

```
P0 = (T1 + T0) · V1     P1 = (T2 + T1) · V0     P2 = T1 · (V0 + V1)
c_low = P0 + P2         c_high = P1 + P2
```

- The sum of two Toeplitz matrices is again Toeplitz, so it costs only 2n − 1 XORs.
  Here the two sums share their XORs.
- The recursion continues down to 4 × 4 blocks, which are computed directly. Stopping at
  4 gives the smallest design.
- The 122-row block is padded with zero rows to 128.

**Delay.** In the GCM context H is constant for a whole key, so the matrix step sits on
H's path, not on the data path.

**Other multipliers.** Choose them with `MULT`:

| Multiplier | Modules | How it works |
|---|---|---|
| Karatsuba, `MUL_KA` | `gf_ka_mul`, `gf128_reduce` | Builds the 255-bit product with three half-size products per level, down to 4 bits. It then reduces with a fold of the high bits onto taps 0, 1, 2 and 7. |
| Brute force, `MUL_MASTROVITO` | `gf128_mul_mastrovito` | The full 128 × 128 matrix product. |

`gf128_mul` selects between the three multipliers.

**Bit order.** GCM numbers bits the opposite way from polynomial coefficients. In a
block, the leftmost bit is the coefficient of x^0. The GHASH stage reverses the bits of
each block at the multiplier boundary, and keeps H in coefficient order.

## AES pipeline and S-boxes

`aes_round` is one full round: SubBytes, ShiftRows, MixColumns and AddRoundKey. It has
no MixColumns when `FINAL` is set. Byte k of a block is state element (row k mod 4,
column k div 4). MixColumns is written with `xtime`.

Two S-boxes are available, chosen with `SBOX` for the whole core:

| S-box | Module | How it works |
|---|---|---|
| `SBOX_LUT` | `aes_sbox` | A 256-entry table computed at elaboration from exponent and log tables of GF(2^8) and the affine map. |
| `SBOX_COMPOSITE` | `aes_sbox_composite` | Inversion in the tower field GF(((2^2)^2)^2). It uses λ = (1100)₂, GF(4) with z² + z + 1 and φ = (10)₂. The isomorphism matrices to and from the AES field are found at elaboration by searching for a root of the AES polynomial, so no matrix constants are typed in. |

The S-box is smaller; the LUT is faster.

## Parameters

All parameters are on `gcm_top`.

| Parameter | Default | Meaning |
|---|---|---|
| `MULT` | `MUL_FH` | GHASH multiplier: Fan-Hasan, Karatsuba or brute force |
| `HALT` | 4 | Size at which the Karatsuba and Toeplitz recursions stop (a power of two) |
| `SBOX` | `SBOX_LUT` | S-box used in the AES rounds and the key schedule |
| `FIFO_DEPTH` | 16 | AAD/text FIFO entries; 16 sustains full rate with 256-bit keys |

## Expected throughput with key changes

Each message costs two clocks beyond its data blocks: one for IV (Y0) and one for the
length block. A key change adds five: the key clock, three stagger clocks and the H
block. A new key is also not taken before the previous schedule ends.

The clock counts below are measured by the end-to-end testbench.

| Packet | Blocks | Clocks with its own key | Share of peak |
|---|---|---|---|
| 1500 B | 94 | 101 | 93.1% |
| 576 B | 36 | 43 | 83.7% |
| 552 B | 35 | 42 | 83.3% |
| 44 B | 3 | 12 to 16 (set by the key schedule) | 25% to 19% |

On a common Internet packet mix (60/20/15/5% of these sizes), that gives about 86% of
peak. Without per-packet key changes the cost is only the two IV and length clocks.

## Where this design departs from the original architecture description

- **Key port.** The key has its own 256-bit port. The original description takes it from
  the 128-bit data bus, which cannot carry a 256-bit key in one word.
- **Partial blocks.** Partial blocks are handled with byte masks. The original assumes
  padded input.
- **Output register.** The third clock of latency is an explicit output register. The
  text is delayed to match it.
- **Fan-Hasan row split.** The multiplier takes rows 1..6 as the brute-force part and 122
  rows as the Toeplitz part. A figure in the source labels the split as 7 and 122 rows;
  the text's 6 + 122 is the one that adds up to 128.
- **Round constant.** The AES standard doubling of rcon in GF(2^8) is used.
- **Counter increment.** The counter increments the low 32 bits only, as GCM specifies.
- **Not built:**
  - variable-length IVs;
  - truncated tags (take the leading bits of the tag outside);
  - the single-clock key-change variant.

## Verification

Every module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. The reference models are in `tb/gcm_ref_pkg.sv`:

- a bit-serial GHASH multiply;
- carry-less multiplication;
- key expansion;
- AES;
- a complete GCM function.

These models are written independently of the RTL.

The main testbenches:

- **`tb_gcm_top`**
  - Runs at default parameters.
  - Checks the published GCM test vectors for all three key lengths, including the
    60-byte message with 20 bytes of AAD.
  - Then runs 40 random messages plus extra key changes. Each encryption is decrypted
    again.
  - Checks every output word and its exact clock (Nr + 3).
  - Counts each mechanism and fails if one never happened:
    - a key held off while the schedule is busy;
    - stagger clocks and H blocks;
    - a change from a longer key to a shorter one;
    - partial blocks;
    - messages without AAD or without text;
    - back-to-back messages;
    - a nearly full FIFO.
  - Also fails if a streamed message ever stalls.
  - Sends 1500-, 576-, 552- and 44-byte packets, each under its own key, and checks
    the clocks each occupies against the table in the throughput section.
- **`tb_aes_key_schedule`** checks the clock at which each round-key register is written.
  It also checks that registers not yet reached keep the old key.
- **`tb_aes_pipeline`** checks the 10/12/14-clock latency.
- **`tb_gcm_ghash`** checks the 3-clock latency after AES.
- **The multiplier testbenches** compare against a bit-serial reference at random and at
  corner operands.

To run one, with plain Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gcm_pkg.sv tb/gcm_ref_pkg.sv \
          tb/tb_gcm_top.sv --top-module tb_gcm_top
obj_dir/Vtb_gcm_top
```

The same pattern works for every `tb_*`. Building the full core takes a few minutes,
because the multiplier and S-box tables are elaborated as constants.

## Files

| Area | Files |
|---|---|
| Shared types and functions | `rtl/gcm_pkg.sv` |
| Top level | `rtl/gcm_top.sv` |
| Input control | `gcm_control`, `gcm_counter`, `gcm_fifo`, `gcm_len_block` |
| AES | `aes_pipeline`, `aes_round`, `aes_key_schedule`, `aes_sbox`, `aes_sbox_composite` |
| GHASH | `gcm_ghash`, `gf128_mul`, `gf128_mul_fh`, `gf128_poly_matrix`, `gf_tmvp`, `gf128_mul_ka`, `gf_ka_mul`, `gf128_reduce`, `gf128_mul_mastrovito` |
