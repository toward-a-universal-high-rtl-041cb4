# AEAD unit for a universal authenticated-cipher hardware interface

Hardware for authenticated ciphers is hard to compare fairly when every
implementation invents its own ports, framing and handshakes. The interface
implemented here fixes all of that once: a cipher sees full blocks, a key, a
nonce and an expected tag, and everything else is common logic. That common
logic reads variable-length, byte-granular messages as a word stream, loads
keys, and formats the results. The cipher-specific part is called the
**CipherCore**. The common part is the **AEAD unit** in this repository.

This RTL follows the interface proposed by Homsirikamol, Diehl, Ferozpuri,
Farahmand, Sharif and Gaj in "Toward a Universal High-Speed Interface for
Authenticated Ciphers" (George Mason University). It is an independent
implementation. The proposal names the blocks, their ports and the word
formats. The internal behaviour described below is this implementation's own
reading, and the departures are listed in a section of their own.

```
            +-------------------------- aead ---------------------------+
 pdi  ----->| pre_processor ==== blocks, key, Npub, tag ====> CipherCore |
 sdi  ----->|      |                                        (outside,    |
            |      | instruction, headers, Npub, AD          via ports)  |
            |      v                                             |       |
            |  Bypass FIFO -------> post_processor <== blocks, tag =     |
            |                        |        ^                          |
            |                        v        |                          |
            |                        AUX FIFO (decryption output)        |
 do_data <--|<-----------------------+                                   |
            +-----------------------------------------------------------+
```

## Streams and word formats

The unit has three valid/ready streams of `G_W` bits. A word moves in a cycle
where both valid and ready are high.

| stream | direction | carries |
|---|---|---|
| `pdi` | in | public data: instructions, Npub, associated data (AD), message or ciphertext, tag |
| `sdi` | in | secret data: keys |
| `do_data` | out | results (the proposal calls this port `do`, which is a SystemVerilog keyword) |

Bytes are packed big-endian: the first byte of a segment is in the word's
most significant byte. A segment that ends inside a word leaves the rest of
that word as padding. The unit ignores input padding and outputs zeros there.

**Instruction** (24 bits, sent in ceil(24/w) words starting from the MSB of the first; the rest is zero):

| Msg ID (8) | 0000 (4) | Opcode (4) | Key ID (8) |
|---|---|---|---|

Opcodes: `0010` authenticated encryption, `0011` authenticated decryption,
`0100` load key, `0101` activate key (`0000` and `0001` are reserved).

**Segment header** (16 + s bits, sent in ceil((16+s)/w) words the same way:
one word at `G_W = 32`, four at 8; in a wider word the zeros widen and Seg Len
stays in the low bits):

| Msg ID (8) | Info (8) | zeros | Seg Len (s = 16) |
|---|---|---|---|

Info is `type[3:0], 2 reserved bits, EOI, EOT`. The segment types are:

| code | type |
|---|---|
| `0001` | Npub |
| `0010` | AD |
| `0011` | Message |
| `0100` | Ciphertext |
| `0101` | Tag |
| `0110` | Key |
| `1000` | Nsec |

EOT marks the last segment of its type. EOI marks the last segment of the input.

### An operation, word by word

Key change: PDI carries `activate key`. The unit then reads `load key`, a Key
header and `KEY_SIZE/G_SW` key words from SDI. It hands the key to the
CipherCore with `key_needs_update` and waits for `key_updated`. If the Key
header has EOI = 0, an Nsec segment (type `1000`) follows on SDI. Its bytes
go to the CipherCore as blocks with `bdi_nsec` set, before the next
instruction is read. The CipherCore decides how the Nsec enters the
following operations.

Encryption:

```
PDI: [enc instr] [Npub hdr] Npub.. [AD hdr] AD.. (more AD segs) [Msg hdr] M.. (more Msg segs, EOI on the last)
DO : [Npub hdr] Npub.. [AD hdr] AD.. [Ct hdr] C.. [Tag hdr] T..
```

Decryption:

```
PDI: [dec instr] [Npub hdr] Npub.. [AD hdr] AD.. [Ct hdr] C.. (EOI on the last) [Tag hdr] T..
DO : [AD hdr] AD.. [Msg hdr] M..          if the tag is valid
     {F0, Msg ID, 0000}                   if it is not (error unit, header-sized)
```

Output headers are copies of the input headers, with Message and Ciphertext
swapped. In an encryption the EOI bit of the copied headers is cleared,
because the generated Tag segment comes last. An empty AD or message can be
sent as a header with Seg Len 0, or left out.

## The hard part: holding a decryption until the tag is checked

A decryption must not release plaintext before its tag has been checked, yet
the tag arrives after the ciphertext. The PostProcessor therefore redirects
**every** output word of a decryption (AD headers, AD, Message headers,
plaintext) into the AUX FIFO instead of `do_data`. The CipherCore reports the
check with a one-cycle `msg_auth_done` pulse and `msg_auth_valid`; the
PostProcessor remembers the pulse until it reaches that point. Then:

- valid tag: the AUX FIFO is drained to `do_data`;
- invalid tag: the AUX FIFO is flushed in one cycle and a single error unit
  `{8'hF0, Msg ID, zeros}` of header size is sent (one word at `G_W = 32`).

Writes into the AUX FIFO never stall. If a decryption's output is larger than
`AUX_DEPTH` words, the FIFO sets a sticky overflow flag and the result is the
error word. At the defaults the limit is 512 words: the AD, the message and
one word per header must together fit in 2048 bytes. Encryptions have no size
limit, because they stream straight through.

The Bypass FIFO carries everything on PDI that does not go through the
CipherCore, in input order:

- every instruction (the PostProcessor needs the mode and the Msg ID, and
  drops Activate Key);
- every segment header, including the Tag header of a decryption, which the
  PostProcessor drops;
- Npub, which only an encryption copies to the output;
- the AD.

The PreProcessor decides only when a PDI word is written, never what. The
PostProcessor replays this stream and fills each message segment with words
from the CipherCore's output blocks. The FIFO's data input is the `pdi` bus
itself, as in the proposal's block diagram.

## The CipherCore interface

The CipherCore is not part of this RTL: it belongs to a particular cipher. The
top module `aead` brings its whole interface out as ports. Signal names follow
the proposal's block diagram.

To the CipherCore:

| signal | meaning |
|---|---|
| `key`, `key_ready`, `key_needs_update` | key register; a key has been loaded; a new key is waiting (held until `key_updated`) |
| `iv`, `iv_ready` | Npub of the current operation (first word in the MSBs) |
| `bdi`, `bdi_ready` | input block waiting; taken by a one-cycle `bdi_read` |
| `bdi_size` | `G_BS_BYTES = log2(BLOCK_SIZE/8)` bits; byte count modulo the block size: 0 means a full block |
| `bdi_ad`, `bdi_decrypt`, `bdi_eot`, `bdi_eoi` | block is AD; operation is a decryption; last block of its type; last block of the input |
| `bdi_nodata` | an empty block (size 0, EOI set), sent when the segment carrying EOI has no data, e.g. empty AD and empty message |
| `bdi_proc` | an operation is in progress |
| `bdi_nsec` | the block holds Nsec (a secret message number loaded with the key), not data |
| `len_a`, `len_d` | AD and data bytes received so far in this operation |
| `exp_tag`, `exp_tag_ready` | received tag of a decryption |
| `bdo_ready`, `tag_ready` | the PostProcessor can take an output block or the tag |

From the CipherCore:

| signal | meaning |
|---|---|
| `key_updated` | the new key has been taken |
| `bdi_read` | the waiting block is taken |
| `bdo`, `bdo_size`, `bdo_write` | output block; its byte count 1..16 (`G_BS_BYTES+1` bits); write strobe |
| `tag`, `tag_write` | computed tag of an encryption |
| `msg_auth_valid`, `msg_auth_done` | tag check result of a decryption (one-cycle pulse) |

A block holds data of one type only. Partial blocks are zero padded, and the
cipher's own padding rule is left to the CipherCore, which gets the byte count.
Blocks continue across segments of the same type. A segment with EOT = 0 must
therefore be a whole number of words long.

## Inside the PreProcessor

A state machine reads:

1. an instruction;
2. for a key change: the SDI instruction, header and key words, then an
   optional Nsec header and Nsec words, which fill the block register like data;
3. for an operation: segment headers, each followed by its data.

An instruction or header that spans several words (w < 32) is gathered word
by word, and its fields are decoded when the last word arrives. Every PDI
word of an instruction or header is written to the Bypass FIFO as it passes.

Data words are written serial-in/parallel-out into the block register at word
index `widx`. The bytes beyond Seg Len are cleared. `bytes_left` counts the
segment down. A block is offered (`bdi_ready`) when it is full, or when its
segment ends with EOT or EOI.

The PreProcessor reads no new data word or header while a block is waiting.
The next block does fill while the CipherCore processes the previous one.
Npub words shift into `iv`, and tag words into `exp_tag`.

An encryption ends when its last block has been read. A decryption ends at
`msg_auth_done`. The next instruction is accepted only after that.

## Inside the PostProcessor

The PostProcessor gathers instructions and headers from the Bypass FIFO,
word by word when they span several words, and decodes them. It copies Npub
and AD words through, except the Npub of a decryption, which it reads and
discards. For Message and Ciphertext segments it loads a CipherCore output
block into a parallel-in/serial-out register, clearing the bytes beyond
`bdo_size`, and shifts out as many words as the segment needs. The register
keeps its contents across a segment boundary. Within an operation,
`bdo_ready` stays high until the CipherCore writes, so a core may answer it
one cycle late. After the segment
marked EOI it does one of two things:

- encryption: it waits for `tag_write`, then sends a Tag header
  `{Msg ID, 0101, 00, 1, 1, G_TAG_SIZE/8}` and the tag words;
- decryption: it discards the received Tag header from the Bypass FIFO, then
  waits for the tag check (see above).

## How far this follows the proposal, and where it departs

These come from the proposal:

- the stream ports and their valid/ready naming;
- the instruction and header layouts, opcodes and segment types;
- the split into PreProcessor, PostProcessor, Bypass FIFO, AUX FIFO and
  CipherCore, and all CipherCore port names;
- the AUX FIFO widths (ctrl 4 bits, status 3 bits);
- the lists of PreProcessor and PostProcessor functions;
- the output order.

These are this implementation's own choices:

- **Widths**: the proposal allows 8 ≤ w ≤ 256. In this RTL `G_W` and `G_SW`
  are powers of two from 8 up to the block size, and must divide
  `BLOCK_SIZE`, `KEY_SIZE`, `IV_SIZE` and `G_TAG_SIZE`. Widths 8, 16, 32, 64
  and 128 are tested. w = 256 would need a block of at least 256 bits. At
  64 and 128 bits one word holds a whole header, and the zeros between Info
  and Seg Len widen.
- **Segment boundaries**: a segment that is not the last of its type must be
  a whole number of words long, so that the next one keeps filling the same
  block.
- **Sizes**: `BLOCK_SIZE/8` must be a power of two, because `bdi_size` is
  the byte count modulo the block size. `KEY_SIZE`, `BLOCK_SIZE`, `IV_SIZE`
  and `G_TAG_SIZE` default to 128, s = 16, and `CTR_AD_SIZE` = `CTR_D_SIZE` = 32. The Bypass FIFO is
  16 words deep and the AUX FIFO 512.
- **Keys**: `activate key` on PDI triggers the reading of a key from SDI. Key
  ID is ignored, and there is one key register.
- **AUX FIFO bits**: `ctrl = {reserved, flush, read, write}` and
  `status = {overflow, full, empty}`.
- **Errors and status**: the error word's value; no status word after a
  successful operation; overflow answered with the error word.
- **EOI and Tag**: the EOI bit of a Tag header is ignored. The last data
  segment carries EOI.
- **Npub**: Npub is not copied to the output of a decryption (the
  proposal's input/output figure shows it only in an encryption's output).
- **Nsec**: it travels with the key on SDI, announced by EOI = 0 in the Key
  header, and is delivered as `bdi_nsec` blocks. The proposal shows Nsec
  after the key in the secret input but says no more about how it is used.
- **Not supported**:
  - the possible extensions the proposal lists (format error detection,
    two-pass algorithms, software padding, multiple streams).
- **Reset**: synchronous and active high. All FIFOs are single-clock. The
  dual-clock FIFOs and AXI4 IP that the proposal shows around the unit are
  external.

## Files

| file | contents |
|---|---|
| `rtl/aead_pkg.sv` | opcodes, segment types, Info layout, error code |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO (Bypass FIFO, AUX storage) |
| `rtl/aux_fifo.sv` | AUX FIFO: FIFO with flush and sticky overflow, ctrl/status bits |
| `rtl/pre_processor.sv` | PreProcessor |
| `rtl/post_processor.sv` | PostProcessor |
| `rtl/aead.sv` | top: the AEAD unit with CipherCore ports |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_aead_widths` |
| `tb/aead_width_env.sv` | the unit, a toy CipherCore and a checked sequence at one bus width |
| `tb/toy_cipher_pkg.sv`, `tb/toy_cipher_core.sv` | a toy, insecure cipher and a CipherCore model for simulation only |

The RTL synthesizes to about 800 word-level cells, 1018 flip-flop bits and
16.9 kbit of FIFO memory at the defaults.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing -Irtl -Itb --top-module tb_aead \
    rtl/aead_pkg.sv tb/toy_cipher_pkg.sv tb/tb_aead.sv
./obj_dir/Vtb_aead
```

Packages must come first on the command line; the other modules are found
through `-I`. The testbenches:

- `tb_aead` runs the whole unit at its default parameters with the toy
  CipherCore. It covers:
  - two key changes, encryptions, and decryptions with valid and corrupted
    tags;
  - empty AD and/or message, multi-segment input, a Bypass FIFO that fills
    up, and a decryption too large for the AUX FIFO;
  - random gaps on the inputs and back-pressure on the output.

  It counts each of these mechanisms and fails if one never happened. The
  expected output is computed byte by byte from the toy cipher.
- `tb_aead_widths` runs the same kind of sequence at w = 8, 16, 64 and 128,
  one `aead_width_env` per width, with a smaller AUX FIFO so that its
  overflow is reached.
- `tb_pre_processor` checks every delivered block: contents, padding,
  `bdi_size` and the flags. It also checks every Bypass FIFO word, the key,
  Npub, expected tag and byte counts.
- `tb_post_processor` checks the output stream: header rewriting, cleared
  tails, PISO across segment boundaries, tag segments and error words. It also
  checks that no decryption word leaves before its tag check.
- `tb_sync_fifo` and `tb_aux_fifo` test the FIFOs against a model, including
  flush and overflow.

To plug in a real cipher, write a CipherCore with the ports listed above and
connect it to `aead`. `tb/toy_cipher_core.sv` shows the handshakes.
