# Reconfigurable authenticated-encryption node with LZ4-compressed partial bitstreams

An IoT end device that encrypts its data with one fixed cipher is a fixed target, and a
device that always runs its strongest cipher wastes power. This design keeps **one
reconfigurable partition** on a Zynq-class FPGA and loads a different authenticated cipher
(AEGIS, ASCON or Deoxys-II) into it for each session. The cipher is chosen either
**pseudorandomly** ("algorithm hopping", driven by a 3-bit LFSR) or **by the supply power level**
("power adaptive": high power → AEGIS, intermediate → Deoxys-II, low → ASCON).

The cost of swapping ciphers is the reconfiguration time: every partial bitstream is
724,760 bytes, because all three ciphers target the same partition. To shorten the fetch,
the bitstreams are **LZ4-compressed once at start-up** and stored compressed. At each switch
the stored file is **decompressed on the fly** and written to the configuration port.
The cipher cores sit behind a **common AEAD interface**: a preprocessor and a postprocessor
that speak the same word formats whatever the cipher. **Asynchronous FIFOs** carry that
interface between the processor clock domain and the logic clock domain.

This repository holds the static logic around the partition. It also holds the generic
pre- and postprocessor that every cipher variant carries. It does not contain the three
cipher cores, the vendor ICAP controller, the processor or its memory. Their signals
are ports of the top module, `dsec_top`.

## Block map

```
                    ps_clk domain                   |            pl_clk domain
                                                    |
 original bitstream ─► lz4_compressor ─► compressed |
   (cmp_in_*)          (once, at start)   (cmp_out_*)|
                                                    |
 compressed file ──────────────────── bs_* ────────►|  pr_controller
   (processor memory, on fetch_req/fetch_id)        |   ├ algo_selector ─ lfsr3, power_selector
                                                    |   ├ lz4_decompressor (64 KiB window)
                                                    |   └ byte→word packer ──► icap_* (config port)
                                                    |        rp_decouple / rp_loaded / rp_cipher
                                                    |
 PDI words ─► async_fifo ───────────────────────────┼─► aead_top ─ preprocessor ─► core_* (cipher core)
 SDI words ─► async_fifo ───────────────────────────┼─►             postprocessor ◄─ core_*
 DO words  ◄─ async_fifo ◄──────────────────────────┼──
```

| Module | Role |
|---|---|
| `dsec_top` | Top level. Wires everything and holds the AEAD side while the partition is being reconfigured. |
| `pr_controller` | Runs the reconfiguration sequence for each session. |
| `algo_selector` | Picks the next cipher: hopping or power adaptive. |
| `lfsr3` | 3-bit LFSR: Q0→Q1→Q2, feedback Q0 XOR Q2, period 7. |
| `power_selector` | Maps the power level to a class and then to a cipher. |
| `lz4_decompressor` | Streaming LZ4 block decoder, one byte per cycle. |
| `lz4_compressor` | Greedy hashed LZ4 block encoder. |
| `async_fifo` | Gray-pointer dual-clock FIFO with first-word fall-through. |
| `aead_top` | Preprocessor plus postprocessor. Its core side is brought out. |
| `preprocessor` | Handles keys, collects words into 128-bit blocks, pads and counts bytes. |
| `postprocessor` | Clears unused output bytes, splits blocks into words, adds segment headers and the status word, and holds plaintext until the tag checks. |
| `dsec_pkg` | Shared types, opcodes, segment types and the header struct. |

## One session, step by step

1. **Seeding.** At start-up the host pulses `seed_load` with a 3-bit `seed`. A zero seed is
   replaced by `001`, because an all-zero LFSR would stay stuck.
2. **Choosing the cipher.** Pulse `session_req` while `pr_busy` is low. `mode` picks the
   technique:
   - `SEL_HOPPING`: the LFSR steps once. Its two low bits `{Q1,Q0}` are the cipher ID.
     The ID `11` names no cipher, so the LFSR simply steps again. Over one period of 7
     the sequence gives each cipher twice. `lfsr_skips` counts these extra steps.
   - `SEL_POWER`: `level` (8 bits) is compared with two thresholds, 85 and 170.
3. **Fetching.** `fetch_req` pulses with `fetch_id`. `rp_decouple` goes high and stays
   high until the partition is complete. The processor side must then stream that
   cipher's compressed file on `bs_*`, with `bs_last` on the final byte of every LZ4 block.
4. **Decompressing and configuring.** Output bytes are packed four to a word, the first
   byte in bits [31:24]. The words go out on `icap_*` under valid/ready.
5. **Release.** After `BITSTREAM_BYTES` bytes (724,760), the partition is released:
   `rp_loaded` rises, `rp_cipher` names the new cipher and `reconfig_done` pulses.
   `reconfig_cycles` holds the cycle count from the fetch request to the last word.

**Decoupling.** Partial reconfiguration leaves the partition's outputs undefined, so while
`rp_decouple` is high (or before any cipher has been loaded):
- `aead_top` is held in reset;
- every handshake to and from the core is masked;
- the PDI and SDI FIFOs are not read, and the DO FIFO is not written.

The host may therefore queue the next command during reconfiguration. It waits in the
FIFO, and the FIFO's `w_ready` stalls the host once it is full. The command runs once the
new cipher is live.

## LZ4 in hardware

An LZ4 block is a sequence of *(literals, match)* pairs:

```
token | [literal-length bytes] | literals | offset (2 bytes, little-endian) | [match-length bytes]
```

- **Token.** The high nibble is the literal count. The low nibble is the match length
  minus 4.
- **Length extension.** A nibble of 15 is extended by the following bytes. Each one is
  added to the length until a byte below 255 appears.
- **Last sequence.** The final sequence of a block has literals only.
- **End rules.** The last 5 bytes of a block are always literals, and no match starts
  in the last 12 bytes.

**Decoder (`lz4_decompressor`).**
- **Timing.** One output byte per cycle. Each token, extension and offset byte costs one
  extra input cycle.
- **Literals** flow straight from input to output in the same cycle. Every output byte
  is also written into a 2^16-byte history RAM.
- **Matches.** A match reads the RAM at `wptr - offset` one byte at a time. An
  overlapping match (offset smaller than its length) therefore repeats correctly with no
  special case.
- **Window size.** 64 KiB is the largest distance an LZ4 offset can encode. Any valid LZ4
  stream decodes whatever its total length, so the full 724,760-byte bitstream streams
  through without being stored.
- **Errors.** `error` is sticky. It is set by a zero offset, or by a block that ends
  (`in_last`) in the middle of a sequence.

**Encoder (`lz4_compressor`).**
- **Loading.** It fills a 64 KiB block buffer. A block ends at `cmp_in_last` or when the
  buffer is full.
- **Match search.** At each position it hashes the next four bytes (multiply by
  2654435761 and keep the top 12 bits). It looks up the last position with that hash,
  and checks that the candidate is really equal and lies within 65,535 bytes.
- **Match growth.** It grows the match backwards into pending literals, then forwards,
  one byte per cycle.
- **Output.** It emits the sequence byte by byte. A block that ends with nothing to
  match gets a literal-only sequence.
- **Hash table.** It is never cleared. A stale entry fails the equality check, so
  correctness does not depend on it.
- **Block splitting.** A 724,760-byte file is sent as 12 independent blocks. Their
  concatenation is again a valid input for the decoder, because `bs_last` marks each
  block boundary.
- **Ratio.** The greedy single-candidate search trades compression for simplicity.

## The AEAD interface

All words are 32 bits wide, and the first byte of a word is in bits [31:24].

| Word | Layout |
|---|---|
| Instruction | opcode in [31:28]: `ACTKEY`=7, `ENC`=2, `DEC`=3; any other opcode word is skipped |
| Segment header | type in [31:28] (`AD`=1, `PT`=4, `CT`=5, `TAG`=8, `KEY`=C, `NPUB`=D), last-segment flag in [25], length in bytes in [15:0] |
| Status | `E0000000` = success, `F0000000` = authentication failure |

**Keys.** `ACTKEY` on PDI makes the preprocessor read one `KEY` segment (a header plus four
words) from SDI. It hands the 128-bit key to the core on `core_key_*`.

**Encryption.** The host sends `ENC`, then the `NPUB`, `AD` and `PT` segments. The
preprocessor packs each segment into 128-bit blocks on `core_bdi`. A partial block is padded
with `80 00 ..`; `core_bdi_size` gives the real byte count and `core_bdi_pad` flags the
padding. `core_bdi_eot` marks the last block of a segment, and `core_bdi_eoi` the last block
of the input. The DO output is:
- a `CT` header;
- the ciphertext words;
- a `TAG` header with 4 tag words;
- the status word.

**Decryption.** The host sends `DEC`, then `NPUB`, `AD`, `CT` and `TAG`. The postprocessor
stores the plaintext words in a buffer of 2^`MSG_AW` words (256 words, 1 KiB). It sends them
only if the core reports `msg_auth`=1, and otherwise discards them. In both cases the status
word follows. A plaintext larger than the buffer sets `msg_overflow` and is reported as a
failure.

**Clearing.** The postprocessor zeroes every byte of `core_bdo` past `core_bdo_size`, so no
internal core state can leak into DO.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `BITSTREAM_BYTES` | 724760 | Decompressed partial bitstream size, the same for every cipher. |
| `WIN_AW` | 16 | Decoder history window, 2^16 bytes. |
| `CMP_BLOCK_AW` | 16 | Compressor block buffer, 2^16 bytes. |
| `HASH_AW` | 12 | Compressor hash table with 4,096 entries. |
| `FIFO_AW` | 4 | Depth of each clock-crossing FIFO, 16 words. |
| `MSG_AW` | 8 | Plaintext hold buffer, 256 words. |
| `LEVEL_W`, `MID_TH`, `HIGH_TH` | 8, 85, 170 | Power reading width and class thresholds. |

Only `BITSTREAM_BYTES` is a number from the design being reproduced. The others are
choices made here.

## Departures from the original system and their limits

- **Where decompression runs.** The original system decompresses in software on the ARM
  core and reports decompression times of 0.07–0.29 ms. Here decompression runs in logic
  next to the configuration port, so the processor only streams the stored compressed
  bytes. The compressor is also logic here, but on the processor-side clock, and it is
  used once at start-up, as in the original.
- **Reconfiguration time.** The decoder makes one byte per cycle. The configuration port
  therefore receives at most one 32-bit word every 4 cycles, which is 100 MB/s at 100 MHz
  and a quarter of the 400 MB/s the port can take. A full partial bitstream takes about
  0.75–0.86 M cycles, or 7.5–8.6 ms at 100 MHz. The original's reported totals of
  0.26–1.03 ms divide the *compressed* size by the port rate. A wider multi-byte decoder
  would be needed to approach them.
- **Cipher cores.** AEGIS, ASCON and Deoxys-II are not included. `core_*` is their port.
  The testbenches use a toy XOR "cipher" with an XOR tag (`tb/toy_cipher_core.sv`), which exercises the interface
  but is not cryptography.
- **Configuration port.** There is no AXI-HWICAP or AXI bus. `icap_*` is a plain
  valid/ready word stream that an ICAP primitive or an HWICAP write FIFO can consume.
  The bitstream is treated as opaque bytes: no sync-word handling, no readback.
- **Decoupling and the AEAD reset during reconfiguration** are additions. The original
  names the partitions but not how the static side is protected.
- **Port formats.** The instruction, segment and status word formats follow the
  common CAESAR hardware API style but are simplified: one key length, 128-bit blocks,
  4-word tags, and only the three opcodes listed above (key loading and activation are one instruction).
- **Power levels.** The original names high, intermediate and low power but gives no
  numbers. The thresholds are placeholders.
- **The hopping sequence** skips the unused LFSR code `11` rather than mapping it to a
  cipher.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_lfsr3` | Next state for every seed against a reference model; period 7; zero-seed replacement; enable. |
| `tb_power_selector` | Every 8-bit level: class and cipher against the thresholds. |
| `tb_algo_selector` | Choices and latency in both modes; the skip of code `11`. |
| `tb_async_fifo` | Random traffic on unrelated clocks; full and empty behaviour; order. |
| `tb_lz4_decompressor` | Randomly generated LZ4 blocks with extended lengths and overlapping copies, with and without back-pressure; byte-exact output, end-of-block flag, rate, zero-offset error. |
| `tb_lz4_compressor` | Random and repetitive blocks (reduced buffer size); the output is decoded by a reference decoder in the testbench and compared, and the format rules are checked. |
| `tb_preprocessor`, `tb_postprocessor`, `tb_aead_top` | Encrypt and decrypt commands of random lengths; padding, flags, headers, tag hold and release, auth failure, buffer overflow. |
| `tb_pr_controller` | Whole sessions with reduced bitstream size; ICAP words compared with the original bytes; cycle counts. |
| `tb_dsec_top` | The full system at its default parameters; see below. |

`tb_dsec_top` builds three synthetic 724,760-byte "bitstreams" with different amounts of
repetition, and compresses each through `lz4_compressor` in 12 blocks (ratios about 2.9,
14 and 7.2). It then runs seven sessions:
- hopping, then power adaptive, then hopping again;
- each session streams the right compressed file and checks every ICAP word;
- encrypt and decrypt commands go through the FIFOs, the AEAD interface and the toy core.

It counts each mechanism and fails if one never happens: hopping and power choices, a
technique switch, an LFSR skip, traffic held during decoupling, a full FIFO, an
authentication failure, a split compressor block and an LZ4 match copy. It runs in about
15 s.

## Simulating

Verilator 5 is used with timing support. Compile the package first, and give `rtl/` and
`tb/` as search paths:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dsec_pkg.sv tb/tb_dsec_top.sv --top-module tb_dsec_top
./obj_dir/Vtb_dsec_top
```

Replace `tb_dsec_top` with any other testbench name to run that block alone.
