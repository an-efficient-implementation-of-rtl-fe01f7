# LZW decompression on dual-port block RAMs

This is a streaming LZW decompressor for 8-bit data, such as grayscale images, with 12-bit codes. After a short start-up it delivers close to one decompressed byte per clock on well-compressible data. The architecture follows "An Efficient Implementation of LZW Decompression Using Block RAMs in the FPGA" by X. Zhou, Y. Ito and K. Nakano.

An LZW dictionary entry is normally stored as *prefix code + last character*. To produce a string, a decoder follows the prefix pointers back to a root character, which yields the string backwards. Software reverses it on a stack. This design splits the work into three concurrent parts:

1. **Dictionary update.** The tables are built straight from the code stream, at one entry per code every 2 cycles. The dictionary is never walked to build entries.
2. **Traversal.** The dictionary is walked once per code. The string is written backwards into an output buffer, one character per cycle.
3. **Read-out.** Each string is read back from the output buffer in the right order, one character per cycle. This runs on the second port of the buffer, in parallel with part 2.

The top level, `lzw_parallel`, places 34 such modules side by side, each decompressing its own stream.

## Code stream

| code | meaning |
|---|---|
| 0..255 | a literal byte |
| 256 | ClearCode: the dictionary restarts at entry 258 |
| 257 | EndOfInformation: end of file |
| 258..4095 | dictionary entries |

Codes are fixed 12-bit words. They are presented one per `code_valid_i`/`code_ready_o` handshake, with no bit packing. The encoder must send ClearCode right after it has created entry 4095. A full *code segment* between two ClearCodes therefore holds exactly 4096 − 258 = 3838 codes. The module accepts an optional ClearCode at the start of a file. `tb/tb_lzw_pkg.sv` contains a matching reference compressor.

## The dictionary as two tables

Let y₀, y₁, … be the data codes of one segment. Dictionary entry 258+j is created by code y_j. It is stored in two tables, and only entries 258..4095 take memory: code c lives at address c − 258.

* **p[j] = y_j**: the pointer (prefix) of entry 258+j. This is simply the code itself.
* **C_f[j] = first character of the string of y_j**. For a literal this is y_j. Otherwise it is C_f[y_j − 258], read back from the table.

Neither table stores the *last* character of an entry. That character is the first character of the next code's string, and so it is **C_f of the next entry**. The string of code c ≥ 258 is therefore:

```
last char  = C_f(c+1)
then       = C_f(p(c)+1), C_f(p(p(c))+1), ...   while the pointer is >= 258
first char = the pointer value itself, once it drops below 258
```

With this identity, one lookup per character serves both the walk and the character. In the same cycle, address `c−258` goes to port A of p and address `c−257` goes to port B of C_f. One cycle later the pointer and the character come out together. The pointer is fed straight back as the next address.

The identity needs C_f(c+1) to exist when code c is walked. The largest code that a valid stream may send as y_i is 258+i−1, the case where a code refers to the entry it defines itself. Entry 258+i is written by y_i itself. Part 1 writes both tables *before* it pushes y_i into the code buffer, so the entry Part 2 needs is always there. No special case is needed for a self-referencing code.

## Part 1: `lzw_dict_update`

The update takes two cycles per code, because port A of C_f is used once to read and once to write:

| cycle | action |
|---|---|
| 1 | accept y; write `p[j] = y` (port B of p); if y ≥ 258, read `C_f[y−258]` (port A) |
| 2 | write `C_f[j] = (y < 258) ? y : read value` (port A); push y into the code buffer; j ← j+1 |

`code_ready_o` is therefore high at most every other cycle.

On **ClearCode**, Part 1 stops taking codes until the code buffer is empty and Part 2 is idle (`seg_drained`). Only then does it restart at j = 0. Without this wait it would overwrite entries that queued codes of the previous segment still need.

On **EndOfInformation**, Part 1 waits until the whole module is empty, pulses `done_o` for one cycle and is ready for the next file. No reset is needed between files.

If a segment holds more than 3838 codes, the tables stop growing. A correct encoder never does this.

## Part 2: `lzw_traverse`

Part 2 takes codes from the code buffer, a FIFO that absorbs the difference in speed between Parts 1 and 2.

* A **literal** is written to the output buffer and recorded in table t as {L = 1, address} in the same cycle.
* A **code ≥ 258** issues its first lookup. Then it writes one character per cycle, following the pointers, until a pointer below 258 appears. That pointer is the root character. It is written in the next cycle, together with the table-t entry {L, address of that root}. In the same cycle the lookup for the next code is issued.

A string of L characters therefore occupies Part 2 for exactly L cycles when another long code follows it. It takes L+1 cycles when a literal follows, and a literal alone takes 1 cycle.

Part 2 stops, holding the memory read registers by keeping their enables low, in two cases:
* the output buffer has no free word;
* table t is full when a string is to be closed.

## Part 3: `lzw_output_reader`

Part 3 pops {L, addr} from table t. It reads the output buffer at addr, addr−1, …, addr−L+1, wrapping around, one read per cycle. The next entry is popped in the cycle after the last read, so strings follow each other without a gap.

The memory's read register is also the output register. `char_o` is valid the cycle after its read was issued, and while `char_ready_i` is low it is held by not enabling the next read.

## Output-buffer flow control

The output buffer is a circular buffer of 2 × 3838 = 7676 bytes. That is room for two strings of the greatest possible length (3839 characters). `lzw_decomp` counts the words that have been written and not yet given back:

* every write by Part 2 adds one;
* when Part 3 issues the last read of a string, the whole string (L words) is given back.

Words are given back per string and not per character, because Part 3 reads each string top-down. The lowest address of a string, the next one the writer would reuse after wrapping, is read last.

Part 2 only writes while the count is below 7676. This cannot deadlock: Part 3 can always drain every finished string, and one unfinished string never exceeds the buffer.

## Memories

| memory | module | words × bits | ports |
|---|---|---|---|
| pointer table p | `lzw_pointer_table` | 3838 × 12 | A: traversal read, B: update write |
| character table C_f | `lzw_char_table` | 3838 × 8 | A: update read/write (read-first), B: traversal read |
| code buffer | `lzw_fifo` | 3838 × 12 (+1 output register) | FIFO |
| output buffer b | `lzw_output_buffer` | 7676 × 8, 13-bit address | A: read-out, B: reversed-string write |
| table t | `lzw_fifo` | 1280 × 25 ({L:12, addr:13}) (+1) | FIFO |

That makes 216,224 bits per module. On a Virtex-7 they map to 14 18K-bit block RAMs: 3 for p, 2 for C_f, 3 for the code buffer, 4 for the output buffer and 2 for table t. All reads are synchronous, with one cycle of latency, and every read register holds its value while its enable is low. The code buffer is as deep as a segment, so Part 1 never waits for it on a valid stream.

`lzw_fifo` is a simple dual-port memory with a prefetch register:
* `rd_valid`/`rd_data` show the oldest word without a request;
* a pop is allowed every cycle;
* a word written in cycle n is at the head in cycle n+2.

Assertions flag a push into a full FIFO and a pop from an empty one.

## Timing and throughput

These are measured in simulation (`tb_lzw_decomp`) with the output always ready:

| data | bytes | codes | bytes per cycle |
|---|---|---|---|
| one constant value (very long strings) | 30,000 | 247 | 0.99 |
| runs of similar values (image-like) | 40,000 | 3,610 | 0.99 |
| random bytes (incompressible) | 12,000 | 11,673 | 0.51 |

Well-compressible data runs at the output rate of one byte per cycle. The published design reports 279.84 MB/s at 300.661 MHz on a highly compressible 4096 × 3072 image, which is 0.93 bytes per cycle.

Incompressible data is limited to one code per 2 cycles by Part 1. At about one byte per code, that is 0.5 bytes per cycle. The published design reports 183.38 MB/s at 300.661 MHz on its least compressible image (ratio 1.43:1), which is 0.61 bytes per cycle.

The end-of-segment drain adds a pause at each ClearCode. It is roughly as long as the backlog in the code buffer.

### Full-size images

`tb_lzw_image` decodes three synthetic 4096 × 3072 grayscale images, one after another and without reset. Their detail levels give compression ratios close to those of the three photographs used to evaluate the published design:

| image | ratio | codes | cycles | bytes/cycle | published cycles (ratio) |
|---|---|---|---|---|---|
| detailed | 1.43:1 | 5,869,585 | 13,931,505 | 0.90 | 19,674,631 (1.43:1) |
| medium | 1.76:1 | 4,764,359 | 13,027,229 | 0.97 | 18,339,574 (1.72:1) |
| flat | 30.66:1 | 273,564 | 12,586,322 | 1.00 | 12,892,927 (36.72:1) |

In the ratio column, each 12-bit code counts as 1.5 bytes. The images differ from the published ones, so only the trend can be compared:
* highly compressible data comes out at the output rate;
* this implementation loses less time on short strings than the published measurements show.

## Interfaces

`lzw_decomp` (one module):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `code_i`, `code_valid_i`, `code_ready_o` | in/in/out | 12/1/1 | code stream |
| `char_o`, `char_valid_o`, `char_ready_i` | out/out/in | 8/1/1 | decompressed bytes |
| `done_o` | out | 1 | one-cycle pulse when a file has been fully output |

`lzw_parallel` (top) has the same ports as unpacked arrays `[NUM_MODULES]`, with `clk` and `rst_n` shared. Module i uses index i of every array. `NUM_MODULES` defaults to 34.

The parameters of `lzw_decomp` are `TBL_DEPTH` (3838), `OB_DEPTH` (7676) and `TT_DEPTH` (1280). The table depths must stay at 3838 for 12-bit codes. `OB_DEPTH` must be at least 3839. The shared constants are in `rtl/lzw_pkg.sv`.

## Where this design goes beyond the published description

The published description gives the three parts, the tables, their ports and sizes, and the 2-cycle update. It gives no details of flow control or interfaces. The following are this design's own choices:

* valid/ready handshakes on the code input and the character output, with a held output under back-pressure;
* the output-buffer word counter and the stalls of Part 2 on a full output buffer or a full table t;
* the drain rule at ClearCode and EndOfInformation, and the `done_o` pulse;
* the show-ahead FIFO organisation;
* the overlap of the root write with the next code's first lookup;
* the asynchronous reset of the control state (the memories are not reset);
* fixed 12-bit codes without bit packing.

The published text also says at one point that codes arrive every cycle. This design keeps the 2-cycle update that the description of Part 1 gives.

The following are not reproduced:
* resource figures (slices, LUTs) and the 300 MHz clock, which depend on the FPGA tools;
* the CPU comparison;
* the three test images, which are not available. Their sizes (4096 × 3072 bytes) need nothing more than the streaming buffers above.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_lzw_parallel` | all 34 modules at default sizes; two files each, back to back; different data and back-pressure per module; byte-exact output; one `done_o` pulse per file; every mechanism exercised |
| `tb_lzw_decomp` | one module; constant, image-like, random and pattern data; the example string `cbcbcbcda`; random and long output stalls; byte-exact output; the 2-cycle cadence; ≥ 0.95 / 0.90 bytes per cycle on long-string data; counts of ClearCode restarts, self-referencing codes, output-buffer-full and table-t-full stalls, back-pressure and code-buffer backlog |
| `tb_lzw_dict_update` | p and C_f writes against a textbook decoder; code-buffer pushes; the 2-cycle cadence; no code taken while the buffer is full or before the segment is drained; `done_o` only after the drain |
| `tb_lzw_traverse` | every string read back from the written buffer against the reference; each length; exact cycle counts per string; random stalls |
| `tb_lzw_output_reader` | byte order across buffer wrap-around; no gaps between strings; held data under back-pressure; one release per string |
| `tb_lzw_image` | three full-size synthetic 4096 × 3072 images; byte-exact output; cycle counts; ≥ 0.9 bytes per cycle on the flat image |
| `tb_lzw_fifo` | both FIFO configurations against a queue model; head, level, full flag and latency |
| `tb_lzw_pointer_table`, `tb_lzw_char_table`, `tb_lzw_output_buffer` | random reads and writes against a reference array; read latency and hold; read-first port A |

The reference compressor and the textbook decoder in `tb/tb_lzw_pkg.sv` are written independently of the hardware's first-character trick. Each testbench was also run against a copy of its block with a deliberate bug, and each reported failures.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/lzw_pkg.sv tb/tb_lzw_pkg.sv tb/tb_lzw_decomp.sv --top-module tb_lzw_decomp
./obj_dir/Vtb_lzw_decomp
```

Replace `tb_lzw_decomp` with any other testbench name. The memory-only testbenches do not need `tb/tb_lzw_pkg.sv`, but including it does no harm. `tb_lzw_image` takes about half a minute. The others finish in seconds, including the full 34-module run at default sizes.

## Files

* `rtl/lzw_pkg.sv`: constants, the t-entry struct, circular-address helpers
* `rtl/lzw_parallel.sv`: top, 34 modules
* `rtl/lzw_decomp.sv`: one module; wires the parts and memories; space counter; drain status
* `rtl/lzw_dict_update.sv`, `rtl/lzw_traverse.sv`, `rtl/lzw_output_reader.sv`: Parts 1–3
* `rtl/lzw_pointer_table.sv`, `rtl/lzw_char_table.sv`, `rtl/lzw_output_buffer.sv`, `rtl/lzw_fifo.sv`: memories
* `tb/`: the testbenches above and `tb_lzw_pkg.sv` (reference compressor, decoder, data generators)
