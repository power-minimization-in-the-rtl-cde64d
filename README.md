# BIBITS: a low-toggle instruction bus for embedded processors

A processor that fetches from an off-chip (or long on-chip) program memory spends much of
its I/O power charging the data-bus lines. BIBITS cuts the number of lines that toggle
when the hot loops of a program are fetched. It works in two halves:

* **Offline**, a tool re-encodes the instructions of the most-executed basic blocks of the
  program image. A basic block is a straight run of code with one entry (a branch target)
  and one exit (a branch). Each 32-bit word is split into six 5-bit partitions. Each
  partition is replaced by one of four functions of itself and of the same partition of
  the word before it on the bus: whichever leaves the fewest toggles.
* **In hardware**, a small decoding unit between the CPU and the memory undoes this. It
  recognises the start of an encoded block by its address, reads one row of 2-bit
  codes per instruction from a table, and restores the original word before the CPU
  sees it.

No encoder runs in hardware. The memory holds the encoded program. What the chip needs is
the lookup table, the code table and a decoder of a few XOR gates. This repository holds
that decoding hardware in synthesizable SystemVerilog.

## The four functions and why they decode

For one partition, let `x` be the original bits, `y` the bits sent, and `p` the bits that
were on the same lines for the previous word. The encoder computes `y = f(x, p)` and the
decoder computes `x = f(y, p)` with the same `f`. Among the sixteen two-input Boolean
functions, only four satisfy `f(f(x, p), p) = x`. Those four are the whole code space, so
a code is 2 bits:

| code | function        | sent word `y`  | decoder gives |
|------|-----------------|----------------|---------------|
| 00   | XOR             | `x ^ p`        | `y ^ p`       |
| 01   | XNOR            | `~(x ^ p)`     | `~(y ^ p)`    |
| 10   | identity        | `x`            | `y`           |
| 11   | invert          | `~x`           | `~y`          |

Example: `p = 01101` and `x = 11110` would toggle 3 lines if sent as they are. XNOR sends
`01100`, which toggles 1.

`p` is the previous word **as it was on the bus**, that is, already encoded. The decoder
therefore keeps a register of the last bus word. It loads every word, encoded or not.

## Partitions

The split follows the MIPS instruction fields, so each register field is one partition:

| partition | bits           | MIPS field              |
|-----------|----------------|-------------------------|
| 0         | 31, 29:26      | opcode without bit 30   |
| 1         | 25:21          | rs                      |
| 2         | 20:16          | rt                      |
| 3         | 15:11          | rd                      |
| 4         | 10:6           | shamt                   |
| 5         | 4:0            | funct without bit 5     |

Bits 30 and 5 are sent as they are. Bit 30 is left out because it rarely toggles. Bit 5
is the second unencoded bit, which keeps the whole shamt field as one partition. The
positions are `SKIP_HI`/`SKIP_LO` in `bibits_pkg`; the decoder and the packing functions
follow them, so a layout that skips bit 6 instead is a one-line change.

The codes of one instruction fill a 13-bit transformation-table row: `tau[p]` (2 bits) for
partitions 0 to 5, then an end bit. A block of N instructions uses N-1 rows, because its
first instruction is never encoded. The word ahead of that first instruction depends on
the path taken into the block, so no fixed code could be chosen for it.

## How the decoding control walks a block

This is the part to understand before changing anything (`rtl/bibits_decode_ctrl.sv`).

* The **BBIT** (basic block identification table) is a small associative table. Each valid
  entry holds a word address and a row index. The address is that of the block's first
  *encoded* instruction, which is the block's second instruction.
* When the unit is not inside a block, every fetch address is looked up in the BBIT. On
  a hit, that fetch is encoded and uses the row the entry points to. On a miss, the word
  passes through unchanged.
* Inside a block, the BBIT is ignored. Each fetch takes the next consecutive row, until
  the row with the end bit set has been used. The fetch after that goes back to the BBIT.
* Two registers hold the state:
  * `enc_q`: the last fetch was encoded.
  * `ptr_q`: the row after the last one used.
  The current row's end bit is read straight from the table's output register. So "still
  inside a block" is `enc_q && !row.last`, and no extra state machine is needed.
* Both decisions are made in the cycle the CPU asks for the word. The codes, and a flag
  saying whether the word is encoded, then travel alongside the fetch until the word
  arrives. The output multiplexer then picks the decoded word or the raw bus word.

It follows that:

* The fetch order must be the block's order. Once inside a block, every fetch consumes a
  row, whatever its address. This holds because a block always runs to its end. An
  exception that leaves a block midway is not handled.
* A block's rows must be consecutive and must not run past the last table row. A
  simulation assertion, `a_tt_no_wrap`, flags a walk that wraps.
* Idle cycles between fetches are fine. All state advances only on `cpu_req`.

## Timing

One fetch can start every cycle. Nothing pushes back.

```
cycle t          cpu_req, cpu_pc        BBIT lookup, TT row read issued
cycle t+1        imem_req, imem_addr    TT row available, sampled with the fetch
cycle t+1+L      imem_rdata             cpu_rvalid, cpu_instr (combinational), cpu_decoded
```

`L` is `MEM_LAT`, the program memory's fixed read latency (default 1; 0 means the memory
answers in the same cycle). The address bus keeps its last value while idle.

## Modules

| file                      | what it is |
|---------------------------|------------|
| `rtl/bibits_pkg.sv`       | widths, the code enum `tau_e`, the row struct `tt_entry_t`, partition packing and the four functions |
| `rtl/bibits_decode_ctrl.sv` | top level: fetcher, BBIT, TT, decoder, output multiplexer and the block walk |
| `rtl/bibits_fetcher.sv`   | registers the PC onto the address bus and carries per-fetch side information through the memory latency |
| `rtl/bibits_bbit.sv`      | fully associative start-address table with valid bits; the lowest matching entry wins |
| `rtl/bibits_tt.sv`        | transformation table: a memory array with a registered read |
| `rtl/bibits_decoder.sv`   | previous-word register and the per-partition function select |

Top-level parameters:

| parameter    | default | meaning |
|--------------|---------|---------|
| `ADDR_W`     | 32      | address width; the BBIT compares `PC[ADDR_W-1:2]` |
| `BBIT_DEPTH` | 128     | encoded blocks that can be tracked |
| `TT_DEPTH`   | 1024    | encoded instructions (rows) |
| `MEM_LAT`    | 1       | program memory read latency in cycles |

The published scheme fixes no table sizes. It studies a range of them. The defaults hold,
with every block encoded, each of six DSP and numeric kernels used to judge the scheme.
Those kernels are matrix multiply, SOR, Jacobi, FFT, a tri-diagonal solver and LU
decomposition, 304 to 3376 bytes of code with 9 to 65 blocks. The largest needs at most
810 rows and the one with most blocks has 65. At the defaults the TT is 13 Kbit and the
BBIT is 128 x 41 bits of flip-flops with 128 comparators. The BBIT is the largest logic
in the design. If fewer blocks need to be tracked, shrink `BBIT_DEPTH` first.

## Loading the tables

The tables are written through plain write ports, normally before the program runs:

* `bbit_wr_en`, `bbit_wr_addr`, `bbit_wr_valid`, `bbit_wr_pc`, `bbit_wr_index` write one
  entry. `bbit_wr_pc` is a word address, and `bbit_wr_valid = 0` clears the entry. Reset
  invalidates all entries.
* `tt_wr_en`, `tt_wr_addr`, `tt_wr_data` write one row.

Do not write a table while the CPU is fetching inside an encoded block.

To build the contents for a program, take each selected block with instructions
`i0 … i(N-1)`:

1. Leave `i0` in memory as it is. Set `prev = i0`.
2. For k = 1 … N-1, and for each partition, pick the code whose result differs from the
   same partition of `prev` in the fewest bits. Write the encoded word `y_k` into program
   memory. Write the six codes, with the end bit set when k = N-1, into the next TT row.
   Set `prev = y_k`.
3. Write a BBIT entry: address of `i1`, index of the block's first row.

The original scheme picks which blocks to encode greedily. It ranks blocks by execution
count × bus toggles ÷ length and takes them in that order while the table has room. It
can also rename registers first so that frequent register pairs become bitwise inverses
(`R_x` and `R_(31-x)`), which the invert code then turns into zero toggles. Both steps are
software and are not part of this RTL. `tb/tb_bibits_ref_pkg.sv` contains the per-partition
encoder in SystemVerilog.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M` line.

| testbench | what it shows |
|-----------|---------------|
| `tb_bibits_decoder`  | random round trips through the reference encoder, random codes against a reference decoder, the `01101`/`11110` example, idle cycles |
| `tb_bibits_bbit`     | random writes, clears and lookups against a model, including duplicate addresses |
| `tb_bibits_tt`       | reset row, fill, random reads with the one-cycle latency, hold while idle |
| `tb_bibits_fetcher`  | request timing, address hold while idle, latency 1 and 3, tag alignment |
| `tb_bibits_decode_ctrl` | whole unit at default sizes: 160-block program, 120 encoded blocks, 3000 block runs with idle cycles; every word, its latency and its decoded flag checked. It also counts BBIT hits, misses at unencoded blocks, block ends, back-to-back reruns of a block, idle cycles inside a block and the use of all four codes |
| `tb_bibits_latency`  | the unit with `MEM_LAT` 0 and 3 and tables filled to the last row |
| `tb_bibits_workloads` | six synthetic programs with the size and block count of the six kernels, every block encoded, run at the default sizes |

The programs in the unit-level testbenches are random MIPS-like code that uses a few
registers. The toggle reductions they print, about 35 to 50 %, describe that code only.
They are not a measurement of the scheme on real programs.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bibits_pkg.sv tb/tb_bibits_ref_pkg.sv tb/tb_bibits_decode_ctrl.sv \
    --top-module tb_bibits_decode_ctrl -o sim
./obj_dir/sim
```

Replace the testbench name to run another. Each finishes in about a second.

## Where this design goes beyond the published scheme

The scheme describes the units, the lookup-then-walk procedure, the table contents and the
decoder circuit. These choices are this design's own:

* the memory interface and its fixed latency
* the registered address bus
* the registered TT read
* the one-fetch-per-cycle timing
* the table write ports
* the table sizes
* BBIT priority among matching entries
* the reset values

Two points are left out:

* The table row drawn in the scheme has one more field after the end bit, labelled `CT`.
  Its use is not specified, so it is not built.
* Nothing handles an exception or interrupt that leaves a block before its end. After
  such an event the walk state would need a flush, and none is provided.
