# Compact hash cores for Grøstl-256, JH-256 and Skein-512-256

This is small-area RTL for three SHA-3 round-3 finalists: Grøstl-256, JH-256
and Skein-512-256. Each core keeps the full hash state, so its size is set by
that state. Around the state, each core runs a narrow slice of its round
function many times per block: 64 bits at a time for Grøstl and Skein, 8 bits
at a time for JH.

The cores never hold a whole round in logic. Wide state transformations are
done by the addresses used to read and write small distributed RAMs. This
covers Grøstl's ShiftBytes, JH's bit permutation and Skein's word permutation.

All three cores have the same stream interface, and each does its own message
padding. No block RAM and no DSP multipliers are needed, since every memory is
a small array that maps to LUT RAM on an FPGA.

The architecture follows the compact FPGA designs presented in
"Compact FPGA Implementations of Selected Round 3 SHA-3 Candidates" (B. Jungk,
CryptArchi 2011). That work gives block diagrams and cycle counts, not code.
Everything below the block-diagram level was designed for this RTL, and the
section "Where this RTL departs from the published design" lists the choices
made. The hash algorithms follow their final round-3 specifications. The three
empty-message digests match the published known answers.

| core | datapath | permutation cycles per block | sustained cycles per block | published |
|------|----------|------------------------------|----------------------------|-----------|
| Grøstl-256 | 64 bit | 160 (10 rounds × P,Q × 8 columns) | 160 | 160; 1132 MBit/s at 354 MHz |
| JH-256 | 8 bit | 6720 (42 rounds × 160) | 6722 | 6720; 27 MBit/s at 341 MHz |
| Skein-512-256 | 64 bit | 576 (72 rounds × 8 words) | 599 | 336 on the cycle slide; 237 MBit/s at 271 MHz (≈585 cycles) |

"Sustained" is the spacing of compressions on a long message when the input
link never pauses. At the published clock rates, this RTL would give
1132.8, 26.0 and 231.6 MBit/s. The published JH figure of 27 MBit/s does not
match its own 6720 cycles (that would be 26.0 MBit/s). Clock rates and areas
are FPGA results and cannot be checked in simulation.

## Stream interface and message framing

Each core has one Fast Simplex Link (FSL) input and one FSL output. An FSL is a
32-bit one-way link with a FIFO.

- Input (slave): `s_data[31:0]`, `s_exists` (a word is available), `s_read`
  (the core takes it this cycle).
- Output (master): `m_data[31:0]`, `m_write`, `m_full`.

A message is sent as a sequence of blocks. Every block is one 32-bit length
word followed by exactly 16 data words, which is 512 bits:

- Length 512 means a full block with more blocks to come.
- Any length below 512 means the last block. The length is the number of valid
  bits in that block, so lengths need not be whole bytes. Bits past the length
  may hold anything; the padding logic clears them.
- A message whose length is a multiple of 512 bits ends with a block of
  length 0. Its 16 data words are still sent.
- Data are big-endian: message bit 0 is bit 31 of the first data word.

The digest comes back as 8 words on the output link. The first digest byte is
in bits 31:24 of the first word.

Three shared blocks handle this framing:

- `fsl_block_rx` collects a block into a 512-bit buffer. It hands the block to
  the core with a valid/ready pair and reads no further word until the core
  takes the block. The core can therefore hash one block while the next one
  streams in.
- `fsl_digest_tx` writes the digest and never raises `m_write` while `m_full`
  is high.
- `sha3_pkg` holds the block kinds and the masking helper used by all three
  padding units.

Reset is synchronous and active low (`rst_n`).

## Grøstl-256 (`grostl256`)

**Compression.** The compression function is
f(h,m) = P(h⊕m) ⊕ Q(m) ⊕ h. P and Q are two 10-round permutations of an 8×8
byte matrix, and they share one round slice, `grostl_round`.

**State storage.** The P state and the Q state are each stored as eight
byte-wide RAMs, one per matrix row, each addressed by column. This makes
ShiftBytes free. To build column j of the shifted matrix, row i is read at
column (j + shift_i) mod 8, where:

- P uses shifts 0 to 7;
- Q uses shifts 1, 3, 5, 7, 0, 2, 4, 6.

**The round slice.** The slice receives this column with its bytes already
gathered from the eight rows. It has two pipeline stages:

1. AddRoundConstant and SubBytes, using eight S-boxes.
2. MixBytes, which multiplies by the circulant matrix with first row
   (02 02 03 04 05 03 05 07).

AddRoundConstant uses the column each byte came from. In P, row 0 gets
(c<<4)⊕r. In Q, every byte is inverted and row 7 gets (c<<4)⊕r.

**Issue order and double buffering.** In each round the eight Q columns are
issued first, then the eight P columns, one per cycle. Each RAM has two banks:
round r reads bank r mod 2 and writes the other bank. The slice latency (2) is
shorter than the 8 cycles of the other permutation, so every result is written
before the next round reads it. A compression therefore issues exactly
160 columns with no bubbles.

**Hiding the load, the update and the latency.** A straightforward schedule
would spend 8 cycles loading a block, some more updating h, and 2 cycles
waiting for the round slice to empty, on top of the 160 permutation cycles.
This core hides all three:

- **Message RAM.** A small loader pads the next block, one 64-bit column per
  cycle, into a separate 64-byte message RAM while the current block is being
  permuted. The RAM is free again as soon as round 0 has read it, after
  16 cycles.
- **Update folded into round 0.** After a compression, the final P and Q
  results stay in bank 0 and h is not touched. Round 0 of the next compression
  gathers its P input as m ⊕ h ⊕ P ⊕ Q byte by byte, which is m ⊕ h_new, and
  its Q input as m. In the cycle after the last P column of round 0, h is
  rewritten as h ⊕ P ⊕ Q. Bank 0 is not overwritten until round 1 writes back.

- **Q first.** P's round 0 needs every result of the previous compression,
  and the last of them leaves the slice 2 cycles after the compression ends.
  Q's round 0 needs only the message, so it is issued first. When P's round 0
  starts 8 cycles later, all results are in place.

Compressions therefore follow each other every 160 cycles when the input keeps
up, which is the published rate.

**Output transformation.** Grøstl-256 outputs trunc₂₅₆(P(h)⊕h). After the
last block, the same 160-cycle schedule runs once more with no message. Round 0
applies the pending update, so P starts from the final h, and Q's result is
ignored. After a 2-cycle drain, the digest is columns 4 to 7 of P ⊕ h.

**S-box.** The S-box (`aes_sbox`) computes the GF(2⁸) inverse in the composite
field GF((2⁴)²):

- GF(2⁴) uses the polynomial z⁴+z+1.
- GF((2⁴)²) uses y²+y+8 over GF(2⁴).
- Two fixed 8×8 bit matrices map between the two fields. The forward map sends
  x to 0x20.
- The inverse of h·y+l is (h·d⁻¹)·y + (h+l)·d⁻¹, where d = 8h² + hl + l².
  This needs only 4-bit multipliers and one 4-bit inverse.

**Padding** (`grostl_pad`, one 64-bit word at a time): a 1 bit, zeros, then the
64-bit block count in the last 64 bits. If the last block has more than 447
message bits, the count does not fit, and an extra all-zero block carries it.

## JH-256 (`jh256`)

This is the core that is hardest to follow, because the JH bit permutation is
never built as wiring. It is done entirely by the addresses written to RAM.

**Grouped state.** The 1024-bit state H is kept as 256 four-bit elements:

- element 2i = (H[i], H[i+256], H[i+512], H[i+768]);
- element 2i+1 = (H[i+128], H[i+384], H[i+640], H[i+896]), for i < 128.

**One round in 128 steps.** In this ordering a JH round works pairwise. Step k
reads elements 2k and 2k+1 as one byte. The two nibbles pass through `jh_core`:
two 4-bit S-boxes, each chosen as S0 or S1 by its round-constant bit, and then
the linear map L. The permutation layer (the swap π, then P′, then the final
swap φ) reduces to where the two results are written:

- for even k: first result → element k, second result → element (k+128) xor 1;
- for odd k: the two results trade places.

So one round is 128 byte steps. The state RAM is nibble-wide with two write
ports, and it is double-buffered because step k overwrites elements still to be
read later in the same round.

**Round constants.** The 256-bit round constant is kept the same way, as 64
elements. It is updated by the same core in 32 further steps per round, with
S0 always selected, written to elements k and (k+32) xor 1. A round therefore
takes 128 + 32 = 160 cycles, and the 42 rounds take 6720 cycles.

**Message injection.** JH XORs the 512-bit message block into the first half
of H before the 42 rounds, and into the second half after them. In the grouped
form, the first half is the top two bits of every element, and the second half
is the bottom two bits. So:

- the first-half XOR is done while round 0 reads the state;
- the second-half XOR is done while round 41 writes its results.

**Loading while hashing.** Message bytes go through `jh_pad` into a 64-byte
input RAM, one byte per cycle (64 cycles per block). A small loader state
machine fills the input RAM independently of the compression. When a
compression starts, the whole input RAM is copied into a 64-byte temporary RAM
in one cycle. Both message XORs read the temporary RAM, so the next block can
be loaded during the 6720 cycles of the current one. A block therefore costs
6720 + 2 cycles in steady state.

**Initial value and digest.** JH-256's initial value is the compression of a
zero block into H(-1) = 0x0100 0…0. The core computes it at the start of every
message, which costs one extra compression per message. The digest is H[768…1023]:
bit 0 of every element, read straight out of the grouped state.

**Padding** (`jh_pad`): a 1 bit, zeros, then the 128-bit message length. At
least 512 padding bits are always added:

- If the last block holds no message bits, it carries the length itself.
- Otherwise an extra block of zeros carries the length.

The length counter in this RTL is 64 bits wide.

## Skein-512-256 (`skein512_256`)

**UBI chaining.** Skein chains Threefish-512 encryptions in UBI mode. For each
block:

- the key is the current chaining value;
- the tweak holds the byte position and the first/final/type flags;
- the ciphertext XOR the message becomes the new key.

After the last message block, one more block produces the digest: type
Output, with an 8-byte zero counter.

**Storage.**

- The state RAM holds 8 × 64-bit words in two banks. Round 0 reads the
  message directly.
- The temporary RAM holds the message block.
- The key schedule holds k0…k7 and three tweak words. The parity word k8 is
  formed by logic.

The initial chaining value is the result of Skein's configuration block for
256-bit output. It is stored as a constant.

**Round schedule.** One 64-bit word is read per cycle, so one round takes
8 cycles. A MIX turns the word pair (x0, x1) into y0 = x0+x1 and
y1 = rotl(x1, R) ⊕ y0, after the subkey words have been added in rounds 0, 4,
8, and so on. `skein_core` does all of this with only three 32-bit adders, in
three pipeline steps per word:

1. Adder 1 adds the low halves of the word and the subkey word, and keeps the
   carry.
2. Adder 2 adds the high halves plus that carry. A first word is now complete
   and waits in a register. For a second word, adder 3 adds the low halves of
   x0 and x1.
3. Adder 3 adds the high halves of x0 and x1 with the carry from step 2. The
   rotation and XOR follow, and y0 and y1 are registered.

Adder 3 can serve both halves because a MIX needs one addition only every
other cycle. The results appear three cycles after the second word. An
assertion checks that first and second words alternate, which the sharing
relies on.

**Word permutation.** The permutation (2,1,4,7,6,5,0,3) is applied through the
write addresses: MIX output f_m goes to word 6,1,0,7,2,5,4,3 for
m = 0…7. The permutation is also what limits the pipeline depth. The next
round reads its word 3 only 4 cycles after the current round's last word was
read, and that word is f₇, the last result of the round. With three cycles of
latency, f₇ is written just in time, and the rounds follow each other with no
gap. A fourth pipeline step would make every round wait.

**Finishing a block.** The 72 rounds take 576 cycles. After 3 cycles for the
pipeline to drain, 8 more cycles add subkey 18 and XOR the message, writing the
new key in place.

**Deciding which block is final.** Skein must flag the final block in the
tweak, but the framing only says "last block" with a length below 512. So a
full block is held in the temporary RAM until the next length word has been
read:

- If the next block is empty, the held block is processed as the final one,
  and the empty block is discarded when it arrives.
- Otherwise the held block is processed as an ordinary block.

The unit does not wait for the next block's data. It watches its own link:
the first word read after a block has been handed over is always a length
word. The data words then arrive while the held block is being hashed.

**Block timing.** Loading cannot overlap hashing here, because the temporary
RAM holds the message for the final XOR until the last cycle of the block. A
block therefore costs 576 + 3 (drain) + 8 (final key addition) + 8 (load)
+ 4 (control) = 599 cycles.

**Padding** (`skein_pad`): zeros to the end of the block. If the last block is
not a whole number of bytes, a 1 bit is appended and the tweak's BitPad flag
is set, as Skein defines.

## Where this RTL departs from the published design

- **Grøstl scheduling.** The published design reaches 160 cycles per block
  but does not say how loading, the h update and the pipeline latency are
  hidden. The message RAM, folding the update into round 0, and issuing Q
  before P are this design's way of doing it.
- **JH temporary RAM copy.** The published JH design has a temporary RAM next
  to the input RAM but does not say how it is filled. Here it is a register
  array loaded from the input RAM in a single cycle when a compression starts.
- **JH output RAM.** There is no separate output RAM. The digest is read out of
  the grouped state. The shared digest sender latches the 256 digest bits, so
  it plays the output buffer's role and the next message can start while the
  digest is being sent.
- **Skein pipeline.** The published Skein core is drawn as two pipelines of
  32-bit adders, with the rotated word entering one step ahead of the other,
  and is said to need only three 32-bit adders. Which adder does what in which
  step is this design's reading of it. Here the words enter in state order,
  and the first word of a pair waits in a register.
- **Skein cycle count.** The published cycle slide gives 336 cycles per Skein
  block, which does not match its own factors (72 rounds × 8 = 576) or its
  throughput figure (≈585 cycles). This core follows the 576 and takes
  599 cycles per block including loading, about 2% slower than the
  published throughput. Loading is not hidden here: the published storage
  is only the state, key schedule and temporary buffer, and the temporary
  buffer holds the message block until its final XOR, so there is no free
  place for the next block's words while a block runs.
- **Unpublished details.** The bank scheme, the pipeline depths, the framing of
  the last block, the digest word order, and reset were not published. They
  were chosen for this RTL.
- **Not modelled.** The published comparison of FPGA area and clock rate
  (Virtex-5) has no counterpart in RTL simulation.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`.

- **`tb_grostl256`, `tb_jh256`, `tb_skein512_256`** each hash eight messages:
  0, 24, 447, 448, 512, 700, 1024 and 1100 bits. Between them these lengths
  cover:
  - extra padding blocks;
  - exact multiples of 512 bits;
  - lengths that are not whole bytes.

  The messages go through the FSL links with random input gaps and random
  output back-pressure. The expected digests come from independent software
  models. The tests also check the permutation cycle counts: 160, 6720 and
  576 per block. The Grøstl test also checks that a compression whose block
  is already loaded starts right after the previous one, 160 cycles later.
- **`tb_throughput`** streams one 8192-bit message into all three cores with
  no input gaps. It checks the digests and the exact block spacing (160, 6722
  and 599 cycles), and prints the resulting MBit/s at the published clock
  rates.
- **`tb_sha3_compact_top`** runs all three cores at once at their default
  parameters. It checks the digests and cycle counts. It also counts each
  mechanism and fails if one never occurs:
  - input stalls and output back-pressure;
  - Grøstl and JH extra padding blocks;
  - Grøstl and JH loading the next block while a compression runs;
  - a Skein block held back and then made final;
  - Skein bit padding.
- **Unit tests:**
  - `aes_sbox` is checked exhaustively against a brute-force inverse.
  - `jh_core` is checked exhaustively over all nibble pairs and selects.
  - `grostl_round` and `skein_core` are checked against reference models in
    the testbench. The `skein_core` test streams word pairs back to back and
    with gaps. It forces carries between the 32-bit halves and checks the
    3-cycle latency.
  - The three padding units are checked against bit-level reference blocks.
  - `fsl_block_rx` and `fsl_digest_tx` are checked for data and handshake
    rules. Their handshake rules are also written as assertions in the RTL.

Run any testbench with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sha3_pkg.sv tb/tb_sha3_compact_top.sv \
          --top-module tb_sha3_compact_top -o sim && ./obj_dir/sim
```

Verilator finds the other modules from their file names through `-Irtl`. The
JH tests take the longest, because each JH compression is about 6700 cycles
and every message also needs one compression for the initial value.

## Files

- `rtl/sha3_compact_top.sv`: the three cores side by side, each with its own
  FSL ports.
- `rtl/grostl256.sv`, `rtl/grostl_round.sv`, `rtl/grostl_pad.sv`,
  `rtl/aes_sbox.sv`: Grøstl-256.
- `rtl/jh256.sv`, `rtl/jh_core.sv`, `rtl/jh_pad.sv`: JH-256.
- `rtl/skein512_256.sv`, `rtl/skein_core.sv`, `rtl/skein_pad.sv`:
  Skein-512-256.
- `rtl/fsl_block_rx.sv`, `rtl/fsl_digest_tx.sv`, `rtl/sha3_pkg.sv`: the shared
  interface blocks and package.
- `tb/tb_<block>.sv`: one self-checking testbench per block, plus
  `tb_sha3_compact_top` (all cores, mixed messages) and `tb_throughput`
  (long message, sustained rate).

Each core has a `ROUNDS` parameter, with defaults 10, 42 and 72. A
reduced-round variant must keep an even round count, because the final state
is read from bank 0. Skein's count must also be a multiple of 4.
