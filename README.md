# Content addressable memory with invalid-bit marking

This is a 256-entry, 24-bit content addressable memory (CAM) of the kind a
processor uses to watch its L1 cache. The processor keeps absolute cache
addresses in the CAM. When another agent's address has to be checked, the
processor presents it to the CAM. Every entry that holds that address marks
itself by setting its own *invalid bit*. The processor then reads the marked
bits and blocks access to the matching cache lines.

So the macro is two memories side by side:

* **The CAM part** holds 256 words of 24 bits. It has one write port and an
  associative search that compares one word with all 256 entries at once.
* **The SRAM part** holds one invalid bit per entry. It has a normal
  write/read port. It also has a second, set-only access: the search result
  writes it straight from the match lines.

One processing unit in the original system had four of these macros. This
RTL describes one of them.

## Organisation

```
            d_data[23:0]  comp_data[23:0]
                 |             |
 write_d[1:0] -->+-------------+        hml[2][128]   +-----------+  set[2][128]  +--------------+
 iom --------->  |  cam_array  |  ------------------> |  enable   | ------------> | sram_invalid |--> e_data_out[1:0]
                 | 2 x 128 x   |        hmr[2][128]   | circuits  |               |  2 x 128 x 1 |
                 |  (12 + 12)  |  ------------------> |  2 x 128  |               +--------------+
                 +-------------+                      +-----------+                 ^   ^    ^
                        ^ wl[127:0]                                                 |   |    |
 addr[6:0] --> word_decoder (disabled while iom) -----------------------------------+ write_e e_data_in
```

* The 256 entries form **two halves of 128 rows**. A 7-bit address picks the
  row. Each port has two write signals, one per half, and they pick the half.
  The two halves are identical. In silicon one is the mirror image of the
  other.
* Each 24-bit word has a **left segment** (bits 23:12) and a **right
  segment** (bits 11:0). Each segment has its own Hit/Miss line: `hml` for the
  left and `hmr` for the right.
* Each entry has one **enable circuit**. It turns the two Hit/Miss lines into
  that entry's set-invalid signal.
* The **invalid-bit SRAM** has the same two-half, 128-row layout. A read
  returns one row from both halves at once, so 2 bits come out: bit *h*
  comes from half *h*.

Entry *e* = half × 128 + row. This numbering is used only in comments and
testbenches. The hardware sees (half, row).

## How a search marks entries

The whole design is built around the search path. It mirrors the circuit:

1. **CAM cell** (`cam_cell`). Each bit stores a value and XORs it with the
   compare data. While a search drives the compare lines, a cell whose bit
   differs turns on its match transistor. The `mismatch` output stands for
   that transistor. When no search is running, no cell conducts.
2. **Hit/Miss line** (`cam_array`). The line is precharged. Any one of its 12
   cells can pull it low. In RTL the line is therefore the NOR of the 12
   mismatch outputs: high means all 12 bits match. When no search is running,
   every line reads high.
3. **Enable circuit** (`enable_circuit`). It combines the entry's two lines
   and gates the result with ENABLE, which is driven by `iom`. The entry is
   marked only if the search is active and both segments match:
   `set_inv = enable & hml & hmr`. A match on one segment only sets nothing.
   The testbenches produce such half matches on purpose, thousands of times.
4. **Invalid bit** (`sram_cell`). The `set` input stands for the extra
   pull-down transistor next to the 6-transistor cell. At the clock edge it
   forces the bit to 1. After that, only a normal write can change the bit.

The search has no priority encoder and no hit output. Every matching entry
sets its own bit, so one search can mark many entries. The result leaves the
macro only through later reads of the invalid bits.

## Cycle behaviour

Each operation is presented for one clock cycle and takes effect at the
rising edge that ends that cycle.

| cycle inputs | effect at the rising edge |
|---|---|
| `iom = 1` | search: every fully matching entry sets its invalid bit. The decoder is off, so no wordline rises. Any writes or read asked for in this cycle are ignored, and `e_data_out` holds. |
| `iom = 0`, `write_d != 0` | `d_data` is written into row `addr` of each half selected by `write_d`. |
| `iom = 0`, `write_e != 0` | `e_data_in` is written into row `addr` of each half selected by `write_e`. |
| `iom = 0`, `write_e == 0` | read: the two invalid bits of row `addr` are loaded into `e_data_out`. |

A CAM write may share a cycle with an SRAM write or a read. All three use the
same address. A common case is loading a new address while clearing its
invalid bit.

`e_data_out` is registered. It changes only after a read cycle and holds
between reads. The intended sequence is therefore:

```
cycle N    : iom=1, comp_data=A         -> matching entries marked at the end of N
cycle N+1  : iom=0, addr=row, write_e=0 -> read of row
cycle N+2  : e_data_out = {half1[row], half0[row]}, including the marks made in N
```

## Interface of `cam_macro`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `iom` | in | 1 | this cycle is an associative search |
| `write_d` | in | 2 | CAM write signals, one per half |
| `d_data` | in | 24 | CAM write data |
| `comp_data` | in | 24 | compare data for a search |
| `addr` | in | 7 | row address, shared by both parts |
| `write_e` | in | 2 | invalid-bit write signals, one per half |
| `e_data_in` | in | 1 | invalid-bit write data |
| `e_data_out` | out | 2 | invalid bits of the row last read, bit *h* from half *h* |

Parameters: `ROWS` = 128, `ADDR_W` = 7 and `SEG_BITS` = 12. These are the
macro's real sizes. The number of halves is fixed at 2 (`cam_pkg::HALVES`),
because each port has one write signal per half.

There is no reset. Like the real arrays, the CAM words and the invalid bits
come up undefined. Write every entry and every invalid bit before the first
search, and do one read before you rely on `e_data_out`.

## Files

| file | contents |
|---|---|
| `rtl/cam_pkg.sv` | shared sizes |
| `rtl/cam_macro.sv` | top level: decoder, CAM array, 256 enable circuits, invalid-bit SRAM |
| `rtl/word_decoder.sv` | 7-to-128 one-hot wordline decoder with enable |
| `rtl/cam_array.sv` | two halves of 128 × 24 CAM cells and their Hit/Miss lines |
| `rtl/cam_cell.sv` | one CAM bit: storage and XOR compare |
| `rtl/enable_circuit.sv` | per-entry combination of the two match lines |
| `rtl/sram_invalid.sv` | 2 × 128 invalid bits, read path and output register |
| `rtl/sram_cell.sv` | one invalid bit with its set input |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Design choices beyond the source description

The source gives the organisation, the port widths, the cells and what each
part does. The following points are this implementation's own reading:

* **Write signals select halves.** Each port has two write signals and 7
  address bits for 256 entries, so each write signal enables one half.
  Asserting both writes the same data into both halves.
* **Segment bit order.** Bits 23:12 feed the left line and bits 11:0 the right
  line.
* **Read control.** No read strobe is shown. A read happens in every cycle
  that is neither a search nor an invalid-bit write.
* **Search mode idles everything else.** During a search the address system,
  wordlines and output circuits are described as idle. Here the decoder is
  disabled, which blocks writes and the read, and the output holds.
* **Polarity.** A marked (invalid) bit reads as 1.
* **Set versus write.** No wordline may be active while the set transistor
  conducts. `sram_invalid` checks this with an assertion. The top makes it
  impossible, because the decoder is off during a search. Inside a lone
  `sram_cell`, set wins over write.
* **Output register.** The read data are captured at the clock edge and held.
  The source mentions latches at the outputs but gives no timing.
* **Clocking.** The original derives its internal pulses (ENABLE, the
  match-line restore RESET, wordline timing) from a self-timed delay chain.
  Here everything happens at the rising clock edge. Precharge and restore
  have no RTL counterpart, because the match lines are recomputed every
  cycle.

## Not included

* **Timing chain.** It is the self-timed generator of the internal clock
  pulses. It is analog delay circuitry, and its pulse timing is not given.
* **Array built-in self-test.** This covers the pattern-generating logic
  macro, the access-time sensing, the input multiplexers, the observation
  latches and the scannable output latches. They are named but not
  specified.
* **Physical measures.** Bitline crossing, short 64-cell bitlines, soft-error
  hardened cells, wiring rules and the 1.1 ns access time belong to the
  layout and circuit level, not to RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle-count watchdog.

* `tb_cam_cell`, `tb_sram_cell`: random stimulus against a one-bit model.
* `tb_word_decoder`, `tb_enable_circuit`: exhaustive.
* `tb_cam_array`: fills both halves at full size, then checks all 512
  Hit/Miss lines on every search against a reference array. It counts full,
  left-only and right-only matches.
* `tb_sram_invalid`: writes, reads and random set patterns against a
  reference. It checks read latency and that the output holds between reads.
* `tb_cam_macro`: end-to-end at the default (full) size. It loads all 256
  entries, then runs about 3000 random operations with a reference model.
  Every operation's output is checked: every read result, and that the
  output holds between reads. A directed search-then-read checks the
  two-cycle sequence above. The test also counts these events and fails if
  any never happens:
  - single-hit, multi-hit and no-hit searches
  - half matches
  - writes requested during a search, which must be blocked
  - marks that persist until rewritten

To run a testbench with Verilator (about 20 s for the full-size one):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/cam_pkg.sv tb/tb_cam_macro.sv --top-module tb_cam_macro -o sim
./obj_dir/sim
```

To change the size, override `ROWS`, `ADDR_W` and `SEG_BITS` on `cam_macro`.
Keep `ROWS <= 2**ADDR_W`; an elaboration-time assertion checks this. The
testbenches read their sizes from `cam_pkg`.
