# Compressed, error-protected backup of processor registers

A nonvolatile processor keeps its register state through a power loss by
copying it into nonvolatile flip-flops. Those cells are large: depending on the
technology, a nonvolatile flip-flop takes 1.4x to 5x the area of a plain D
flip-flop. This design cuts the number of nonvolatile bits. Before a register
word is saved, it is compressed with a **threshold run-length code**. The
compressed stream is then protected with an **extended Hamming code (SEC-DED)**,
because an upset in stored compressed data would corrupt far more than one
bit of the restored word.

The design works on a 64-bit word and is written in synthesizable
SystemVerilog. It is made of four parts:

* a **parallel run-length (PRLE) encoder**. It looks at `k` bits per cycle and
  swallows them in one step when they are all equal.
* a **PRLE decoder** that mirrors the encoder.
* a **Hamming SEC-DED unit** for 16-bit words. One check-bit generator is
  shared by the write path and the read path.
* a **backup/restore controller** and a small **nonvolatile register array**,
  which can flip stored bits on request to model upsets.

Next to this path sits an independent **window flag codec**. It marks each
4-bit window of a word that is all zeros or all ones.

## The compressed stream

This part matters most for anyone who wants to read stored data or change
the coder. The 64-bit word is read from its MSB down and cut into *chains*,
which are maximal runs of equal bits. Each chain has a length `L`. A
host-supplied threshold `m` decides how each chain is stored:

| case      | segment written                                      | size            |
|-----------|------------------------------------------------------|-----------------|
| `L > m`   | **encoded**: `0`, chain value `v`, `w[3:0]`, `L` in `w` bits | `6 + w` bits |
| `L <= m`  | the bits go into a **copy buffer** of up to 15 bits   |                 |
| buffer closed | **copied**: `1`, count `c[3:0]`, then the `c` literal bits | `5 + c` bits |

* `w` is the bit length of `L` (1..7 for a 64-bit word).
* The copy buffer is closed, and written as one copied segment, in three
  cases: when it holds 15 bits, just before an encoded segment, and at the
  end of the word. Neighbouring short chains therefore share one copied
  segment.
* A copied segment can hold part of a chain. A buffer that fills up in the
  middle of a chain is written out, and the rest of the chain goes into the
  next buffer.
* Segments are concatenated MSB first. They are cut into 16-bit words, first
  stream bit at bit 15. The last word is padded with zeros.
* The stream has no end marker. The decoder stops after 64 bits, so the
  padding is never read.

Example: `123FFF605000FFFF` with `m = 3` (71 bits, 5 stored words):

```
0001001000 111111111111110 11 000000 101 000000000000 1111111111111111
1 1010 0001001000                copied, 10 literal bits
0 1 0100 1110                    14 ones
1 0011 011                       copied, 3 literal bits
0 0 0011 110                     6 zeros
1 0011 101                       copied, 3 literal bits
0 0 0100 1100                    12 zeros
0 1 0101 10000                   16 ones
```

With `m >= 6` the same word takes 63 bits. The stream can also grow. The
worst case is `m = 0` with alternating bits: every chain is 1 bit long and
costs 7, so the stream is 448 bits, or 28 words. The store is 32 words deep,
so any word and any setting fits. A good `m` depends on the data. It is a
run-time input, `cfg_m`, 0..127; a value of 64 or more copies everything.

A decoder can never receive an encoded segment with `w = 0` or `L = 0`, or a
copied segment with `c = 0`, from the encoder. Such a segment can only come
from corrupted storage. The decoder then raises `format_error` and stops
instead of hanging.

## Parallel run-length encoding

A serial run-length coder spends one cycle per bit. The parallel encoder
observes a window of `k` bits, the observation width, set at run time
through `cfg_k` (1..8). If those `k` bits are uniform and continue the
current chain, all of them are taken in one cycle. Otherwise one bit is
taken.

The stream `0 1 1 0 1 | k zeros | 1 1 | 2k zeros | 0 1` is `3k + 9` bits long.
With `k = 4` the encoder takes it in 12 cycles instead of 21. The testbench
checks these numbers. The output stream does not depend on `k`: only the
speed does.

The encoder (`prle_encoder`) is built from these blocks:

| block | job |
|-------|-----|
| `input_shift_network` | shows the next 8 bits of the word |
| `all01_detector` | tells whether the first `k` of them are all 0 or all 1 (`bypass`) |
| `length_control` | turns `bypass` into the shift length: `k` if the group fits inside the word, else 1 |
| `rle_encoder` | FSM that measures chains, fills the copy buffer and emits one segment per cycle on a valid/ready handshake; segments are at most 20 bits |
| `output_shift_network` | packs the segments into 16-bit words |

Encoder timing:

* one cycle per group or single bit;
* one cycle per segment;
* one cycle for each 15-bit chunk a short chain adds to the copy buffer;
* a final flush.

### Two-stage shifting networks

A full barrel shifter over all 64 bits would be large. The shifting networks
therefore work in two stages:

* The **coarse stage** moves the whole register by a fixed `N` places. This is
  only wiring plus the register's load multiplexer.
* The **fine stage** is a `2N`-bit barrel shifter (`barrel_shifter`). It has
  `log2(2N)` rows of 2:1 multiplexers and works on the first `2N` bits only.

In `input_shift_network`, `N = 8`. The fine offset stays below `N`, and the
register jumps by `N` whenever the offset would reach `N`. The output-end
network uses the same idea with `N = 16`. A segment is placed behind the
held bits by a barrel shifter, and each full word leaves through a fixed
16-bit shift. The network accepts a segment only when the 40-bit buffer is
sure to hold it.

### Decoder

The decoder (`prle_decoder`) uses the same structure with the data flowing
the other way:

* `bit_unpacker` takes the stored words into a 48-bit buffer and shows the
  next 24 stream bits.
* `rle_decoder` reads a whole header in one cycle.
* `rle_decoder` then writes out a chain or copied bits, at most `k` bits per
  cycle.
* `bit_assembler` shifts those bits into the 64-bit result.

## Hamming SEC-DED

`hamming_secded` protects 16 data bits with 6 check bits, giving a 22-bit
stored word.

**Bit positions.** Hamming positions 1..21 sit at stored bits 0..20:

* Positions 1, 2, 4, 8 and 16 hold the check bits P0..P4. Check bit Pj
  covers every position whose number has bit j set.
* The data bits fill the other positions in order, with data bit 0 at
  position 3.
* Bit 21 holds P5, an even parity bit over all 22 bits.

**Sharing.** One generator serves both paths. A 2:1 multiplexer controlled
by `read_write_b` (1 = read) feeds it either the data being written or the
data part of the word read back.

**Reading.** The syndrome is the XOR of the regenerated and stored P0..P4.
Together with the overall parity it sets `error_type`:

| syndrome | overall parity | `error_type` | action |
|----------|----------------|--------------|--------|
| 0        | even           | `00` none    | —      |
| 0..21    | odd            | `01` single  | flip the named bit (syndrome 0: P5 itself) |
| ≠ 0      | even           | `10` double  | reported, data not trusted |
| > 21     | odd            | `11` invalid | multi-bit error, reported |

## Backup and restore

`prle_nv_top` connects the blocks and `nvff_controller` runs the sequences.

**Backup.** A one-cycle pulse on `backup_req` starts the encoder on
`vol_data_in`. Each packed word goes through the Hamming unit in write mode
into `nv_register_array`, at addresses 0, 1, 2, and so on. When the encoder
is done, `backup_done` pulses. `comp_bits` and `comp_words` then give the
stream length in bits and in stored words.

**Restore.** A one-cycle pulse on `restore_req` starts the decoder. The
stored words are read in order through the Hamming unit in read mode, and
the corrected data goes to the decoder. Once the stored words are used up,
zero words follow. `restore_done` pulses when all 64 bits are rebuilt, and
`vol_data_out` holds them from then until the next restore. During a restore:

* `corrected_cnt` counts the words that had a single error, which was
  corrected;
* `uncorrectable_cnt` counts double and multi-bit errors;
* `ecc_syndrome`, `ecc_overall_parity` and `ecc_error_type` show the check of
  the word being read.

While `busy` is high, new requests are ignored. If both requests come in the
same cycle, backup wins. `cfg_k` and `cfg_m` must stay steady during a
sequence.

**Upsets.** `inj_en`, `inj_addr` and `inj_mask` flip the set bits of one
stored word. This models single-bit, multi-bit and burst upsets.

## Window flag codec

`run_len_enc` cuts the word into sixteen 4-bit windows. Window `i` is
`data[4i+3:4i]`.

* `eq_0[i]` is set when window `i` is all zeros.
* `eq_1[i]` is set when window `i` is all ones.
* `data_e` is the word with all-ones windows cleared, so every uniform
  window is described by its flag alone.

`rle_dec` rebuilds the word from `data_e` and the two flag vectors. Both have
one register stage.

Example: `123FFF605000FFFF` encodes to `data_e = 1230006050000000`,
`eq_0 = 0170` and `eq_1 = 1C0F`, and decodes back to the original. In the
top the codec is fed by `fc_data` and `fc_rst`, and its outputs are brought
out as `fc_data_e`, `fc_eq_0`, `fc_eq_1` and `fc_data_d`. It does not touch
the backup path.

## Parameters and sizes

| name | value | origin |
|------|-------|--------|
| word width `DATA_W` | 64 | original scheme |
| segment length field | 4 bits | original scheme |
| observation width `k` | run time, 1..8 (`KMAX = 8`) | range is this design's |
| threshold `m` | run time, 0..127 | range is this design's |
| stored data word / code word | 16 / 22 bits, syndrome 5 bits | original scheme (Hamming block) |
| copy buffer | 15 bits | largest 4-bit count |
| max segment `q` | 20 bits | follows from the above |
| input network `N` | 8 | this design's |
| output / decoder buffers | 40 / 48 bits, 24-bit window | this design's |
| store depth `DEPTH` | 32 words | this design's, fits the worst case |

Shared constants and types are in `rtl/prle_pkg.sv`. The Hamming error codes
are the enum `err_type_e`, and `segment_t` holds a segment's bits and length.

## What follows the original scheme and what does not

The following come from the original scheme:

* the block structure of the encoder (two-stage networks, all 0/1 detector,
  length controller, RLE encoder);
* the parallel `k`-bit step and its cycle count;
* the segment layout (category bit, 4-bit length field, body) and the rule
  that chains of length `<= m` are copied and longer ones encoded;
* the mirrored decoder;
* the 16/22-bit SEC-DED unit with its shared generator, syndrome and
  overall-parity check;
* the window flag codec's ports and example values.

The following were not specified and are choices made here:

* the meaning of the 4-bit field of an encoded segment (the bit length of
  `L`);
* merging short chains in a 15-bit copy buffer;
* MSB-first order and packing into 16-bit words;
* all handshakes, buffer sizes and the `k` range;
* the decoder's internals and its format-error exit;
* the Hamming bit placement and `error_type` codes;
* the controller's sequence and counters;
* the store depth;
* the register stages of the window flag codec.

Two more points:

* **Nonvolatile cells.** The nonvolatile registers are ordinary flip-flops
  here. The cell technology (FeRAM, MRAM, floating gate) is not modelled.
* **Outside parts.** The processor logic, its volatile registers, the state
  table and the host microcontroller lie outside this RTL. They appear only
  as the top's ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The encoder and decoder
tests compare against `tb_prle_ref_pkg`, a bit-serial reference coder
written separately from the RTL.

| testbench | what it covers |
|-----------|----------------|
| `tb_prle_encoder` | about 300 words (chains, random, all 0/1, alternating), k 0..9, m 0..70, random output stall; stream words and bit count exact; 12 vs 21 cycles on the parallel example |
| `tb_prle_decoder` | reference streams with and without input gaps; zero-word stream ends in a format error |
| `tb_hamming_secded` | write word against a reference code; every single flip corrected with the right syndrome; random double flips detected |
| `tb_nvff_controller` | sequencer alone against a scripted encoder, decoder and error source: addresses, modes, counters, busy handling |
| `tb_input_shift_network`, `tb_output_shift_network`, `tb_barrel_shifter`, `tb_all01_detector`, `tb_length_control`, `tb_nv_register_array`, `tb_run_len_enc`, `tb_rle_dec` | each block against its own reference, exhaustive where small |
| `tb_prle_nv_top` | default-size end-to-end test (below) |

`tb_prle_nv_top` runs the whole design at its default size. It does 124
backup/restore rounds with random `k` and `m` and with single-bit, double-bit
and zeroed-word upsets, and also exercises the flag codec. It counts every
mechanism and fails if one never occurs: uniform groups, single steps,
encoded and copied segments, full copy buffers, copies closed by a long
chain, corrected and uncorrectable words, and format errors.

To run one test, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/prle_pkg.sv tb/tb_prle_ref_pkg.sv tb/tb_prle_nv_top.sv \
  --top-module tb_prle_nv_top -o sim
./obj_dir/sim
```

`-Irtl` lets Verilator find each module in the file of the same name.
Once built, every test runs in well under a second.

## Known limits

* **Output backpressure.** The output-end network can hold back the encoder.
  In the full design it never does, because the store accepts a word every
  cycle. That path is tested only in `tb_output_shift_network`.
* **Double errors.** A double error in the store is reported, but the
  decoder still rebuilds a word from the damaged stream. Check
  `uncorrectable_cnt` and `format_error` before trusting `vol_data_out`.
* **One word at a time.** The design handles one 64-bit word per backup.
  Saving several words would need an address offset per word in the store.
