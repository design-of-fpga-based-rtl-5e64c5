# Blowfish encryption chip

This is synthesizable SystemVerilog for a Blowfish block cipher engine. It
takes a secret key of 32 to 448 bits and turns it into 4168 bytes of
key-dependent tables. It then encrypts or decrypts 64-bit blocks with
those tables. It follows the structure of a student FPGA design, "Design of
FPGA-Based Encryption Chip Using Blowfish Algorithm" (Universiti Sains
Malaysia, 2006), which targeted an Altera Flex10K device. The algorithm
comes from that design, and through it from Schneier's Blowfish. The
micro-architecture, the handshakes and the timing described below are
this implementation's own.

The design is bit-exact with standard Blowfish. The end-to-end testbench
reproduces the published test vectors, for example key `0000000000000000`,
plaintext `0000000000000000` → `4ef997456198dd78`.

## The cipher in one page

A 64-bit block is split into a left half XL (bits 63..32) and a right half
XR. Sixteen rounds follow. Each one does:

```
XL = XL xor P[i]
XR = XR xor F(XL)
swap XL, XR
```

After round 16 the last swap is undone. Then `XR ^= P17` and `XL ^= P18`.
The result is `{XL, XR}`.

**F** splits its 32-bit input into four bytes. The most significant byte
indexes S-box 1, the next one S-box 2, and so on. F then combines the four
32-bit lookups as `((S1 + S2) xor S3) + S4`, with both additions modulo 2^32.

**Decryption** uses the same datapath with the P-array read backwards. The
rounds use P18 down to P3, and the final whitening uses P2 and P1. This is
the Feistel property: it is why one core serves both directions.

## Key expansion: where the time goes

The P-array (18 words) and the four S-boxes (4 × 256 words) are not fixed.
They are derived from the key, in three steps:

1. **Load the constants.** All 1042 words start as the fractional
   hexadecimal digits of π, eight digits per word. P1 = `243f6a88`,
   P2 = `85a308d3`, and so on. S-box 1 entry 0 = `d1310ba6`, and S-box 4
   entry 255 = `3ac372e6`. The key is XORed into P1..P18 word by word, and
   the key words are reused cyclically. With a 4-word key, P5 gets K1 again
   and P18 gets K2. K1 is the first (most significant) 32 bits of the key.
2. **Encrypt, then overwrite.** The block `0` is encrypted with the
   sub-keys as they stand. The two 32-bit halves of the result replace P1
   and P2. The result is then encrypted again, now with the new P1 and P2,
   and it replaces P3 and P4.
3. This goes on through P18 and then through all four S-boxes in order:
   521 encryptions, each depending on everything written before it.

The hardware gives all 1042 sub-key words one linear address space, in the
order they are replaced:

| address    | contents                  |
|------------|---------------------------|
| 0 .. 17    | P1 .. P18                 |
| 18 .. 273  | S-box 1, entries 0..255   |
| 274 .. 529 | S-box 2                   |
| 530 .. 785 | S-box 3                   |
| 786 .. 1041| S-box 4                   |

The π table (`rtl/bf_pi_rom.sv`, data in `rtl/bf_pi_init.hex`) uses the
same order. So step 1 is a copy loop over one counter, with the key XOR
applied while the counter is below 18. Step 2 writes to addresses 2j
and 2j+1.

The key schedule (`bf_key_expansion`) is a six-state machine:

| state      | enabled cycles | action |
|------------|----------------|--------|
| `KX_INIT`  | 1042 in total  | sub-key[a] = π[a] xor (a < 18 ? K[a mod n] : 0) |
| `KX_ENC_START` | 1          | start the shared cipher core on the running block |
| `KX_ENC_WAIT`  | 18         | wait for the core's `done` |
| `KX_WR_HI`, `KX_WR_LO` | 2  | write the two halves to the next two addresses |

The last three rows repeat 521 times. A full key expansion therefore takes
1042 + 521 × 21 = 11,983 enabled cycles, plus the cycle that accepts the key.
At the default divide ratio of 4 that is about 48,000 clocks. Key length
does not change the time.

Only the words K1..Kn are used; the rest of the 448-bit key port is ignored.
`key_words` = 0 is treated as 1, and 15 as 14.

## Datapath and memories

* `bf_cipher_core` is an iterative datapath that does one round per enabled
  cycle. It holds XL, XR, a 4-bit round counter and the direction. Its
  states are IDLE → 16 × ROUND → FINAL. The FINAL cycle reads two P entries
  at once and registers the whitened result. `done` is high for the next
  enabled cycle. From `start` to `done` is **18 enabled cycles**, and a new
  block can start in the cycle `done` is high.
* `bf_round` is one round, combinational. It instantiates `bf_f_function`
  and always swaps the halves.
* `bf_subkey_store` holds `bf_parray` (18 × 32 registers, two asynchronous
  read ports) and four `bf_sbox` instances (256 × 32, one synchronous write
  port and one asynchronous read port each). The write address decodes as
  in the table above. Asynchronous reads let a round do its four S-box
  lookups and the P lookup in a single clock. For block RAM with registered
  reads, a round would need two cycles and the core's counter would change.
* `bf_pi_rom` holds the 1042 initial words. Word n is hex digits 8n+1..8n+8
  of π after the point.

## Top level and handshakes

`blowfish_chip` connects the pieces. The cipher core is shared. It belongs
to key expansion while that runs, and to the user otherwise.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key` | in | 14 × 32 | key words, `key[13]` = K1 (first 32 bits) |
| `key_words` | in | 4 | key length in 32-bit words, 1..14 |
| `key_load` / `key_load_ready` | in / out | 1 | the key is taken on a clock edge where both are high |
| `keys_valid` | out | 1 | sub-keys ready; low from the accepted `key_load` until expansion ends |
| `start` / `ready` | in / out | 1 | a block is taken on a clock edge where both are high |
| `decrypt`, `data_in` | in | 1, 64 | sampled together with `start` |
| `done` | out | 1 | one-clock pulse; `data_out` has just been updated |
| `data_out` | out | 64 | last user result, held |

`ready` is high only in enabled cycles, and only when the keys are valid
and the core is idle. `key_load_ready` is high in enabled cycles when
neither key expansion nor a block is running. A `start` held high during
key expansion simply waits. A key offered while a block is being processed
waits until that block finishes. A key offered in the same cycle as the
block's completion is accepted, and the block's result still appears on
`data_out`. Encryptions run during key expansion never reach `data_out` or
`done`.

Timing at the top, with divide ratio D (`CLK_DIV`): `start` accepted to
`done` high = 18·D clocks. One block per 18·D clocks, about 3.6 bits per
clock ÷ D.

## The frequency divider

`bf_freq_div` produces a one-clock `tick` every `CLK_DIV` clocks. All state
in the chip advances only on a tick. This mirrors the original design's
remedy for a critical path that was too slow for the board clock: it
slowed the sequencing down. Here the slowdown is a clock enable instead of a
derived clock, so everything stays in one clock domain. The original divide
ratio is not known; the default of 4 is a placeholder. Set `CLK_DIV = 1` to
run at full clock rate. The combinational round (P read, XOR, four S-box
reads, add, XOR, add, XOR) is the critical path. If the clock closes
without a divider, set `CLK_DIV = 1`; if not, pipeline the round.

## Files

| file | content |
|------|---------|
| `rtl/bf_pkg.sv` | sizes, word types, key type |
| `rtl/blowfish_chip.sv` | top level |
| `rtl/bf_key_expansion.sv` | key schedule controller |
| `rtl/bf_cipher_core.sv` | 16-round iterative datapath |
| `rtl/bf_round.sv`, `rtl/bf_f_function.sv` | one round, the F function |
| `rtl/bf_subkey_store.sv`, `rtl/bf_parray.sv`, `rtl/bf_sbox.sv` | sub-key memories |
| `rtl/bf_pi_rom.sv`, `rtl/bf_pi_init.hex` | initial values (digits of π) |
| `rtl/bf_freq_div.sv` | clock-enable divider |
| `tb/tb_*.sv` | one self-checking testbench per module |

`bf_pi_rom` reads `rtl/bf_pi_init.hex` by a path relative to the directory
the simulator runs in, so run from the repository root or override
`INIT_FILE`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. From the
repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bf_pkg.sv tb/tb_blowfish_chip.sv --top-module tb_blowfish_chip
./obj_dir/Vtb_blowfish_chip
```

Replace the name to run another testbench. What each one establishes:

* `tb_blowfish_chip` runs the whole chip at its default parameters. It loads
  seven keys: two published 64-bit test vectors, 448-bit, 32-bit and 128-bit
  keys, with junk in the unused key words. It encrypts a block under each
  key and compares with the expected ciphertext, then decrypts it back. It
  also checks that `start` stalls during key expansion and before any key,
  that `key_load` is refused while a block is in flight, and that latency
  is 18·D clocks. The expected values for the keys other than the published
  ones came from an independent software model. That model reproduces the
  published vectors. The run takes under a second.
* `tb_blowfish_key_lengths` loads a key of every length from 32 to 448
  bits in 32-bit steps. Under each key it encrypts and decrypts one block
  against expected values. It also checks that the expansion time, 47,932
  clocks at D = 4, is the same for every length.
* `tb_bf_pi_rom` computes π to 33,000+ bits in the testbench itself
  (Machin's formula on 32-bit limbs) and compares all 1042 table words.
* `tb_bf_key_expansion` replaces the ROM with a random table and the core
  with a model whose result depends on the current sub-key contents. It
  checks the final 1042 words for key lengths 1, 4, 5, 14 and the clamped
  values 0 and 15, along with write counts and the 11,983-cycle duration.
* `tb_bf_cipher_core` compares against a reference model with random
  sub-keys. It checks encryption, the decryption round trip and the
  18-cycle latency, with `en` both always high and pulsed.
* The memory, round, F-function and divider testbenches check their
  blocks against shadow copies or direct formulas.

## How far to trust it, and what differs from the original

* The cipher and the key schedule are standard Blowfish and match the
  published vectors. The original design verified its own results against
  hand calculation and software. Those test data are not reproduced here.
* The original was written for a Flex10K board. Its pin assignment, its
  board-level display of the ciphertext (first and last 32 bits shown
  separately), the download cable and the board jumpers are not part of
  this RTL. The top level brings the full 64-bit result out instead.
* Without an FPGA-specific wrapper, 33,344 bits of sub-key storage with
  five asynchronous read ports will map to distributed RAM or registers.
  That is larger than the embedded memory of the original device family. On
  a modern FPGA it fits easily.
* The divide ratio, the handshakes, the shared core, the reset style and
  the one-round-per-cycle schedule are choices made here, not taken from
  the original.
