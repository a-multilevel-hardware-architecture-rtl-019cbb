# Two-level PDLZW + AHAT lossless compressor

A dictionary compressor with a small dictionary compresses poorly. This design
makes up for that with a second coding stage. It is built from two processors
in a row, and each handles one codeword per clock cycle:

1. **PDLZW** (parallel-dictionary LZW) replaces strings of 1 to 4 input bytes
   with 9-bit codewords. It uses a set of four dictionaries holding
   {256, 64, 32, 16} words. All of them are searched at once.
2. **AHAT** (adaptive Huffman coding with transposition) recodes each 9-bit
   codeword into a 6-, 7-, 9- or 12-bit canonical Huffman codeword. The length
   depends on how often that codeword has been used recently.

Some PDLZW codewords are far more frequent than others, so the second stage
wins back the bits that the small dictionary loses. The whole design stores
702 bytes of CAM: 288 bytes of dictionaries plus a 414-byte ordered list.
It takes one to four input bytes per clock cycle.

The architecture follows the two-level PDLZW + AHAT compressor of M.-B. Lin
and J.-W. Chen ("A Multilevel Hardware Architecture for Lossless Data
Compression Applications"). The RTL, its interfaces and its testbenches are
an independent implementation. The section *Design decisions* lists every
point the published description leaves open and how it is settled here.

```
 bytes ─► 4-byte window ─► dictionaries 0..3 ─► priority ─► pdlzw_addr ─► swap unit ◄─► ordered list
          (shift reg.)     (parallel search,    encoder     (9 bit)         │          (368 x 9 CAM)
                            FIFO update)                                    ▼ ahat_addr (rank)
                                                              canonical Huffman encoder ─► code, len
```

## The PDLZW level

### Dictionary set and codeword map

| dictionary | word width | words | storage | codewords |
|---|---|---|---|---|
| 0 | 1 byte  | 256 | none (virtual) | 0 – 255 |
| 1 | 2 bytes | 64  | 64 x 16-bit CAM | 256 – 319 |
| 2 | 3 bytes | 32  | 32 x 24-bit CAM | 320 – 351 |
| 3 | 4 bytes | 16  | 16 x 32-bit CAM | 352 – 367 |

Dictionary 0 always contains every byte, so it needs no storage. A single
byte is its own codeword. The codeword of a word in dictionary k is the base
of dictionary k plus the word's address. This gives an alphabet of 368
symbols, which is exactly what the ordered list of the AHAT level holds.

### One coding step (one clock cycle)

The window (`pdlzw_shift_register`) holds the next four input bytes. `win[0]`
is the oldest of them. In each cycle:

* **Search.** Dictionary k compares its words with the first k+1 window bytes,
  all dictionaries in parallel. A dictionary only reports a hit if the window
  actually holds k+1 bytes.
* **Select.** The priority encoder takes the highest-numbered dictionary that
  hit, which is the longest matching string. Its codeword becomes
  `pdlzw_addr`. The number of that dictionary (`level`) gives the string
  length, level+1 bytes.
* **Update.** The matched string plus the byte that follows it is written into
  dictionary level+1, at the address held by that dictionary's update pointer
  (`update_pointer`). That pointer counts up and wraps to 0, so the oldest word
  is replaced first (FIFO). This word is the same as the first level+2 window
  bytes, i.e. the search key of dictionary level+1, so no extra datapath is
  needed. After a 4-byte match there is no dictionary 4, and the update is
  skipped (`dict_inhibit`).
* **Shift.** The level+1 coded bytes leave the window. Up to four new bytes
  enter it in the same edge.

A word is never inserted if it is already present. If it were present, it
would have been the longer match. So each key matches at most one word.

The write lands at the clock edge, so the next cycle's search already sees
the new word. There is no read-after-write hazard, and the compressor never
waits on itself.

### End of input

When `src_end` is high and the source has no bytes left, the window may hold
fewer than four bytes. They are still coded, with whichever dictionaries are
narrow enough. The last string of the input is not inserted into a dictionary,
because no byte follows it. A decoder mirrors this naturally: it completes an
insertion only when the next codeword arrives.

## The AHAT level

### Ordered list with transposition

The ordered list (`ahat_ordered_list`) is a 368 x 9-bit CAM. Word n holds the
symbol ranked n, and after reset rank n holds symbol n. For each incoming
symbol, the swap unit (`ahat_swap_unit`) does the following:

1. It searches the list by content and finds the symbol's rank n.
2. It outputs n as `ahat_addr`.
3. In the same cycle, it exchanges the words at ranks n and n-1. At rank 0
   nothing moves.

A symbol that keeps recurring therefore bubbles towards rank 0. This is a
cheap stand-in for the frequency counts of adaptive Huffman coding: there are
no counters and no tree, only one neighbour swap per symbol.

### Canonical Huffman code

The rank, not the symbol, is Huffman coded, with one fixed canonical code:

| group | ranks | codeword length | codewords | first codeword | boundary |
|---|---|---|---|---|---|
| 0 | 0 – 34    | 6  | 35  | 29 | 35  |
| 1 | 35 – 47   | 7  | 13  | 45 | 48  |
| 2 | 48 – 207  | 9  | 160 | 20 | 208 |
| 3 | 208 – 367 | 12 | 160 | 0  | 368 |

`canonical_huffman_encoder` works in three steps:

1. Four comparators test the rank against the boundaries 35, 48, 208 and 368.
   These are the running sums of the group sizes.
2. The number of boundaries the rank has reached selects the group, and with
   it the length.
3. The codeword is `rank − (first rank of the group) + first codeword`.

For example, rank 0 → `011101` (29, 6 bits), rank 34 → `111111`, rank 38 →
`0110000` (48, 7 bits), and rank 367 → `000010011111` (159, 12 bits).

The first codewords are not stored. They are computed at elaboration from the
group sizes, with the canonical-code recurrence
`first[maxlen] = 0; first[l] = (first[l+1] + count[l+1]) / 2`
(`mlc_pkg::ch_first_codeword`). Lengths with no codewords count as 0. Because
of this you can change the table by changing only the `LENx`/`CNTx`
parameters.

The resulting code is complete and prefix-free, and its Kraft sum is exactly
1. The testbench checks both properties. Codes of one length are consecutive
numbers. A decoder can therefore read 6, 7, 9 and then 12 bits and stop at the
first length whose value lies in `[first, first + count)`.

**Worked-example caveat.** One worked example in the published description
gives rank 38 the 6-bit code 100000 (38 − 35 + 29). That contradicts the
published table: its first codewords only form a valid prefix code if ranks
0–34 are the 6-bit group. This design follows the table, so rank 38 is coded
as the 7-bit word 0110000. The published block diagram labels the comparators
"a>b". Here they are implemented as "rank ≥ boundary", which is what the table
requires for rank 35. The fourth comparator (368) can only fire for an
impossible rank, and it drives `range_err`.

## Interfaces and timing

Top module: `multilevel_compressor`. It has no parameters; the sizes live in
`mlc_pkg`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `src_byte[0:3]` | in | 4 x 8 | next input bytes, `[0]` the oldest |
| `src_avail` | in | 3 | how many of `src_byte` are valid (0–4) |
| `src_end` | in | 1 | no bytes exist beyond those offered now |
| `src_take` | out | 3 | bytes taken at this clock edge (combinational) |
| `out_valid`, `out_ready` | out/in | 1 | output handshake |
| `out_code` | out | 12 | canonical codeword, right-aligned |
| `out_len` | out | 4 | its length in bits: 6, 7, 9 or 12 |
| `pdlzw_valid`, `pdlzw_addr`, `pdlzw_nbytes` | out | 1/9/3 | PDLZW codeword and string length (monitor) |
| `dict_write[3:1]`, `dict_inhibit`, `up_wrap[3:1]` | out | | dictionary writes, inhibited updates, pointer wraps (monitor) |
| `swapped`, `at_top`, `out_group`, `range_err` | out | | list activity, code group, table overflow (monitor) |

**Source.** The source is a look-ahead byte stream: it shows its next bytes,
and the compressor says how many it took. A byte FIFO with a 4-byte read port
or a memory reader fits this directly. After `src_take` bytes, the source
advances.

**Output.** Each handshake delivers one codeword of `out_len` bits. Packing
them into a bit stream (MSB of the code first, as the decoder in the testbench
expects) is left to the consumer.

**Timing.**

* Latency: `out_valid` rises on the third clock edge after the edge that first
  fills the window.
* Throughput: one codeword per cycle. This covers 1–4 input bytes, depending
  on the match length.
* Backpressure: every stage has a valid/ready output register, and
  `out_ready` low freezes the whole pipeline. The dictionaries and the ordered
  list change only when their stage actually hands a result on, so a stall
  never updates them twice.

| stage | register | module |
|---|---|---|
| window, search, select, update | `pdlzw_addr` | `pdlzw_processor` |
| list search and swap | `ahat_addr` | `ahat_swap_unit` |
| compare, subtract, add | `out_code`/`out_len` | `canonical_huffman_encoder` |

## Design decisions

These points are not fixed by the published description and were chosen
here:

* **Codeword map.** Dictionaries follow each other in codeword space:
  0 / 256 / 320 / 352.
* **Update inhibition.** The update is inhibited only after a 4-byte match.
  The description says updates stop when the next dictionary number reaches
  "the maximum dictionary number". That is read as 4, the number of
  dictionaries, since otherwise dictionary 3 could never be filled.
* **Valid bits.** Each dictionary word has a valid bit, cleared at reset, so
  an empty word cannot match.
* **Reset order of the list.** After reset, the ordered list is the identity
  order.
* **Byte I/O.** The look-ahead source interface, the multi-byte window refill,
  the end-of-input rule and the valid/ready handshakes are this design's.
* **Rank 38.** See the worked-example caveat above.
* **Monitor outputs.** These exist for test and monitoring. They can be left
  unconnected.

Not included:

* **No decompressor.** The published work states a decompression rate but
  describes no decompressor hardware. A software decoder is in the testbench
  package (`tb_ref_pkg::mlc_decoder`).
* **No bit packer.** See *Interfaces and timing*.
* **Fixed code table.** The canonical code table is fixed at elaboration and
  does not adapt. Only the ordered list adapts, which is how the scheme is
  meant to work.

## Memory budget

| block | size | bytes |
|---|---|---|
| dictionary 1 | 64 x 16 bit | 128 |
| dictionary 2 | 32 x 24 bit | 96 |
| dictionary 3 | 16 x 32 bit | 64 |
| ordered list | 368 x 9 bit | 414 |
| **total CAM** | | **702** |

On top of that come 112 valid bits, three update pointers, the 4-byte window
and the pipeline registers. For comparison, a plain adaptive Huffman coder for
bytes needs about 1020 bytes of CAM plus 514 bytes of ROM.

Both CAMs are written as register arrays with parallel comparators, which
synthesises to flip-flops and compare logic. For an ASIC you would swap in CAM
macros with the same search and write behaviour.

## Files

| file | content |
|---|---|
| `rtl/mlc_pkg.sv` | sizes, codeword alphabet, canonical first-codeword function |
| `rtl/multilevel_compressor.sv` | top: PDLZW processor → AHAT processor |
| `rtl/pdlzw_processor.sv` | window, dictionary set, priority encoder, update control |
| `rtl/pdlzw_shift_register.sv` | 4-byte input window with 0–4 byte shift and refill |
| `rtl/pdlzw_dictionary.sv` | one CAM dictionary (BYTES x DEPTH) with its update pointer |
| `rtl/update_pointer.sv` | FIFO write pointer, counts and wraps |
| `rtl/pdlzw_priority_encoder.sv` | longest-match select |
| `rtl/ahat_processor.sv` | swap unit + ordered list + canonical encoder |
| `rtl/ahat_swap_unit.sv` | search, rank output, transposition request |
| `rtl/ahat_ordered_list.sv` | 368 x 9 CAM with neighbour swap |
| `rtl/canonical_huffman_encoder.sv` | comparators and code arithmetic |
| `tb/tb_ref_pkg.sv` | reference models (PDLZW, ordered list, code table) and the full decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_compression_workloads.sv` | text-, executable- and graphics-like streams, compression ratios |

## Simulation

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mlc_pkg.sv tb/tb_ref_pkg.sv tb/tb_multilevel_compressor.sv \
    --top-module tb_multilevel_compressor
./obj_dir/Vtb_multilevel_compressor
```

Replace the testbench name to run another one. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Every testbench runs in a
few seconds.

### What the testbenches show

* **`tb_multilevel_compressor`** runs at full size with no parameter
  overrides. It compresses about 8000 bytes of generated text and binary data,
  twice:
  * once with the source always full: it checks the 3-edge latency and one
    codeword per cycle;
  * once with random source gaps and random output stalls.

  It then compresses a 5-byte input that ends in a partial window. Every
  codeword is compared with the reference models. The output stream is also
  decoded back into bytes by the independent software decoder and must equal
  the input. The test counts, and requires, each of these at least once:
  * matches of each length;
  * writes to and pointer wraps of each dictionary;
  * inhibited updates;
  * list swaps and hits at the top;
  * all four code lengths;
  * output stalls, source starvation and end-of-input coding.
* **`tb_compression_workloads`** compresses 20000-byte generated stand-ins for
  text, executables and graphics. On these synthetic streams the ratios are
  about 0.53, 0.67 and 0.38 (output bits / input bits), at 2.8, 1.9 and 3.7
  input bytes per cycle. These are not the ratios of any standard corpus.
* **Unit testbenches.** Each one checks its module against an independent
  model, including random stalls where the module has a handshake. The encoder
  test walks all 368 ranks and checks prefix-freedom and the Kraft sum.

## Changing the design

* **Dictionary depths.** `pdlzw_processor` takes `D1_DEPTH`, `D2_DEPTH` and
  `D3_DEPTH`. The codeword width follows from 256 + the three depths.
  `ahat_processor` takes `N`, the number of symbols. If you change them, keep
  `mlc_pkg` and the canonical table consistent: the table's counts must add up
  to the alphabet size.
* **Code table.** Set the `LEN0..3` and `CNT0..3` parameters of
  `canonical_huffman_encoder`. The first codewords are recomputed. The counts
  must describe a complete prefix code, i.e. a Kraft sum of 1.
* **Reference models.** The models in `tb/tb_ref_pkg.sv` hold the table
  explicitly. Update them along with the RTL.
