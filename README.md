# A programmable bitstream parser for MPEG-4 video

An MPEG-4 video bitstream is a tight chain of codewords. Some have a fixed
length. Some are variable-length (VLC) codes. Many are present only when
earlier fields, or the next bits of the stream, have certain values. The
front end of a decoder must walk this chain and hand the fields to the
motion, texture and shape decoders. A hard-wired header decoder (a state
machine) is fast but can parse only the syntax it was built for. A RISC
core is flexible but slow at bit-level work: it needs many instructions
per VLC and per condition.

This design sits between the two. It is a small processor whose
instructions are the operations that a bitstream syntax is written in:

| Instruction | What it does |
|---|---|
| `FLD` | Fixed-length decode: take the next *n* bits (*n* immediate or from a decoded field), or only look at them ("next"). It can first skip to a byte boundary. |
| `VLD` | Variable-length decode: one table lookup per codeword, one cycle. |
| `FOR` | Repeat the next *len* instructions *N* times (*N* immediate or decoded). |
| `BRP` | Branch on previously decoded data: *if* / *if-else* / *while*, with one or two conditions. |
| `BRN` | Branch on the next bits of the stream, optionally from the next byte boundary (start-code search). |
| `FNC` | Call the *len* instructions at an address: one syntax layer calls the next. |
| `CMP` | Add, subtract or shift a decoded field (counters, derived lengths). |

The syntax is written as a program of these instructions in a RAM. The VLC
code tables live in a rewritable table too. Parsing a different syntax
(another profile, MPEG-1/2 headers, a private format) only needs a new
program and new tables.

## Structure

```
              +------------------- mmu -------------------+
              |  inst_mem (program)     data_mem (fields) |--> out_valid/out_name/out_data
              |        |  pc                 ^  |         |--> dmem_rdata (host read)
              |        v                     |  v         |
              |      addr_gen (AG): pc, control stack,    |
              |      data-memory addresses                |
              +-----|-----------------------^------|------+
                    | instruction word      |wdata | rdata
                    v                       |      v
                 inst_dec  ---- uop ---->  functional_unit (contains vlc_table)
                                                   ^  | flush
   bs_data/bs_valid ---------> bit_sequencer ------+  |
                                      ^---------------+
```

| File | Unit |
|---|---|
| `rtl/parser_pkg.sv` | Instruction word layout, opcodes, comparison and arithmetic codes, per-cycle control struct, VLC entry. |
| `rtl/bit_sequencer.sv` | Bitstream buffer: the next 32 bits, the next 32 byte-aligned bits, flush. |
| `rtl/vlc_table.sv` | 512-entry VLC table; all entries are compared in parallel. |
| `rtl/functional_unit.sv` | Field extraction, VLC decode, comparisons, two-condition combining, CMP arithmetic, stall. |
| `rtl/inst_dec.sv` | Decodes the instruction word and steps through its cycles. |
| `rtl/inst_mem.sv`, `rtl/data_mem.sv` | Program RAM (256 x 128 bits) and field RAM (256 x 32 bits). Both are read combinationally. |
| `rtl/addr_gen.sv` | Program counter and the control stack that closes loops, branches and calls. |
| `rtl/mmu.sv` | The two memories and the address generator, plus host access and the output stream. |
| `rtl/mpeg4_parser.sv` | Top level. |

There is no pipeline. The instruction at the program counter is read,
decoded and executed in the same cycle. The data memory is also read
without latency, so a field can be read and compared in one cycle.

## Control flow without end markers

This part is the least obvious. The structured instructions (`FOR`, the
branches and `FNC`) give only the **length** of the code they govern. No
instruction marks where a loop body, a branch body or a function ends.
The address generator works this out itself and keeps a stack of open
*regions*. Each region has a kind, an end address (the first address after
the region), a target and, for loops, a pass count.

| Event | Frame pushed | When the next address reaches its end |
|---|---|---|
| `FOR` with N > 0 and len > 0 | `FOR` (end = pc+1+len, target = pc+1, count = N) | If passes remain: decrement and jump to the body. Otherwise: pop and fall through. |
| `BRP`/`BRN` *while*, condition true | `WHILE` (end = pc+1+len, target = the branch itself) | Pop and jump back to the branch, which tests its condition again. |
| `BRP`/`BRN` *if*, true, with an else part of `nxt` instructions | `IF` (end = pc+1+len, target = end+nxt) | Pop and skip the else part. |
| `FNC` | `FUNC` (end = address+len, target = pc+1) | Pop and return. |

An *if* that is false jumps to pc+1+len. That is where the else part
starts, so the else part needs no frame of its own. An *if* with no else
part needs no frame either. A loop with a zero count or zero length, and a
branch with an empty body, simply skip.

Several regions often end at the same address. One example is a function
whose last instruction ends a loop, called as the last instruction of
another function. In that case `addr_gen` unwinds the whole chain in one
combinational pass over the stack:

* A `FUNC` or `IF` frame that is popped gives a new address, which is
  compared with the next frame.
* A `FOR` frame whose last pass has ended gives its own end, which is also
  compared with the next frame.
* The pass stops at a loop that jumps back, or at a frame that does not
  end here.

Closing regions therefore never costs a cycle.

The program itself is the region `[0, prog_len)`. The processor is done
when the next address leaves it and no region is open. Function bodies
usually sit after `prog_len`. Regions must nest properly: a body must not
run past the end of the region around it.

The stack is 8 frames deep (`STACK_DEPTH`). Overflowing it, an undefined
opcode (7), a VLC miss and a jump outside the program memory all stop the
processor with `error`.

## Instruction word and timing

All instructions share one 128-bit word (`inst_t` in `parser_pkg.sv`).

| Field | Bits | Use |
|---|---|---|
| `op` | 127:125 | `FLD`=0, `VLD`=1, `FOR`=2, `BRP`=3, `BRN`=4, `FNC`=5, `CMP`=6 |
| `imm` | 124 | 1: value fields are immediates. 0: they name data words. |
| `loop` | 123 | Branches: 1 = *while*. `FLD`: 1 = look only, do not consume. |
| `balign` | 122 | `BRN`: compare the bits that start at the next byte boundary. `FLD`: skip to that boundary first. |
| `two` | 121 | Two conditions. |
| `rel0`, `rel1` | 120:115 | `EQ NE LT GT LE GE` (unsigned). |
| `comb_or` | 114 | Combine two conditions with OR (0 = AND). |
| `alu` | 113:112 | `CMP`: `ADD SUB SHL SHR`. |
| `tbl` | 111:108 | `VLD`: code table number. |
| `nbits` | 107:102 | `FLD` length, or the number of bits `BRN` compares (0..32). |
| `len` | 101:94 | Body, loop or function length. |
| `nxt` | 93:86 | Length of the else part after a branch body. |
| `name0`, `name1` | 85:70 | Data names, i.e. data-memory addresses: the destination, the compared fields, or the `FLD` length word. |
| `val0`, `val1` | 69:6 | Compared values, loop count, call address or `CMP` operand. These are immediates, or data names when `imm`=0. |

Cycles per instruction, when enough bitstream bits are buffered:

| Instruction | Cycles | Sequence |
|---|---|---|
| `FLD` | 1 / 2 | With a data length, the length word is read first. |
| `VLD` | 1 | |
| `FOR` | 1 | |
| `FNC` | 1 | |
| `BRP` | 2 / 3 | One / two conditions with immediates. Read field 0. Then compare it while reading field 1. Then compare field 1, combine, and branch. |
| `BRP` with data operands | 2 / 4 | One read per cycle. |
| `BRN` | 1 / 2 | One / two conditions. |
| `CMP` | 2 / 3 | Immediate / data operand. |

A cycle stalls when it needs more bits than the sequencer holds:

* `FLD` needs its length.
* `VLD` needs 16 bits.
* `BRN` needs its bit count, plus the bits up to the byte boundary when it
  is aligned. An aligned `FLD` likewise.

With a gap-free input the sequencer never holds fewer than 32 bits after
the first fill. Only byte-aligned `BRN` or `FLD` reads wider than 25 bits can stall then.

## Using it

1. Reset with `rst_n` low (synchronous) for at least one cycle.
2. With the processor stopped, load the following. Host writes are ignored
   while `busy` is high.
   * the program: `imem_we`, `imem_waddr`, `imem_wdata`;
   * the VLC entries: `vlc_we`, `vlc_waddr`, `vlc_wentry`, with
     `vlc_clear` to empty the table. An entry is `{tbl, len, code, sym}`,
     with the code left-aligned in 16 bits. An entry with length 0 is
     dropped. The lowest-numbered match wins.
   * any initial data words: `dmem_we`, `dmem_addr`, `dmem_wdata`.
3. Pulse `start` with `prog_len` set.
4. Feed the stream on `bs_data`/`bs_valid`/`bs_ready`, 32 bits per word,
   first bit in bit 31.

Each word the program writes (a decoded field or a `CMP` result) appears on
`out_valid`/`out_name`/`out_data` in the cycle it is written. `done` or
`error` rises at the end. The data memory can then be read with
`dmem_addr`/`dmem_rdata`.

At the very end of a stream the input must be padded with at least 16 bits,
because `VLD` waits for 16 buffered bits.

Simulating a testbench with plain Verilator, from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/parser_pkg.sv tb/parser_tb_pkg.sv tb/tb_mpeg4_parser.sv \
    --top-module tb_mpeg4_parser -o sim && ./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`. For the other
testbenches, replace the last file and the top module with `tb_<unit>`.
`tb_bit_sequencer`, `tb_inst_mem` and `tb_data_mem` need no
`tb/parser_tb_pkg.sv`.

## Verification

`tb/parser_tb_pkg.sv` holds a constructor function for each instruction
form and a reference interpreter. The interpreter runs loops, *while*
branches and calls as recursive calls over the instruction ranges. It
shares nothing with the hardware's stack. It also counts the cycles each
instruction should take.

* `tb_mpeg4_parser` runs a 31-instruction header-and-macroblock style
  program over twelve random bitstreams, some with a bursty input. The
  program has two functions and uses every instruction form. The test
  checks every output word, the final data memory and the exact cycle
  count (instruction cycles plus observed stalls). Three more programs
  must stop with `error`: unbounded recursion, an undefined opcode and a
  VLC miss. The test counts each mechanism and fails if one never
  happened. It runs the design at its default sizes.
* `tb_workload_mix` runs a synthetic macroblock loop of 1129 executed
  instructions. Its mix matches the published MPEG-4 parsing profile:
  34 % FLD, 11 % VLD, 22 % BRP, 28 % BRN, 3 % FNC and 0.8 % FOR. It
  checks outputs, data memory and exact cycles, and checks that the mix
  is within one point of the profile. It also checks that the cycles
  per instruction lie between the best and worst case of the
  per-instruction counts. Measured: 1.34 cycles per instruction, against
  bounds of 1.23 to 2.08. The program reads 1.48 bits per cycle, so it
  would need about 26 MHz for a 38.4 Mbit/s stream. That figure depends
  on how many bits this program's fields hold. Real MPEG-4 content
  would give a different figure.
* Unit benches:
  * `tb_bit_sequencer` compares against a bit-queue model every cycle.
  * `tb_vlc_table` compares against a software search.
  * `tb_functional_unit` drives random operands for every operation.
  * `tb_inst_dec` checks the per-cycle controls and the cycle count of
    every form.
  * `tb_addr_gen` compares the address trace against a recursive walk,
    under random stalls and random branch outcomes.
  * `tb_mmu` and the memory benches check loading, the output stream and
    read-back.

## Where this design makes its own choices

The instruction set, its parameters, the unit partition, the combinational
memories and the cycle counts above follow the architecture this
implementation is based on. The following are this design's own:

* **Encoding.** The binary layout of the instruction word, all widths
  (32-bit fields, 8-bit data names, 16-bit VLC codes and symbols), the
  memory depths and the host interface.
* **`Next` field of the branches.** It is read as the length of an else
  part that follows the branch body.
* **`VLD` table field.** `VLD` carries a table number in addition to its
  destination.
* **Comparisons and arithmetic.** Comparisons are unsigned, from a fixed
  set of six. Shifts use the low 5 bits of the operand.
* **Combining two conditions.** This happens in the cycle that evaluates
  the second condition, so a two-condition `BRP` takes 3 cycles. A
  walk-through of the same example could be read as needing a fourth
  cycle to combine and form the next address.
* **Data-operand `BRP`.** The form that compares with data words rather
  than immediates (2 / 4 cycles) is an extension.
* **Organisation.** The control stack, its depth, the error stop and the
  parallel-match VLC table are how this design realises behaviour that is
  described only by its effect.
* **Byte alignment in `FLD`.** `FLD` can skip to the next byte boundary
  before it extracts. This is the `balign` bit, which the original
  parameter list gives to `BRN` only. With a length of 0 it is a plain
  `ByteAlign`, as needed after start-code stuffing. Encoder-side `PutBits`
  is not part of a parser.
* **VLC table size.** The table has 512 entries, so that the code tables
  of MPEG-4 video (about 343 codes) can be resident at once.

## Limits

* Cycle counts are verified exactly. Clock speed is not: no timing
  analysis has been done, so the clock needed for a given bitrate is
  only an estimate (see `tb_workload_mix`).
* The testbench programs are synthetic. No parsing program for the full
  MPEG-4 video syntax and no real MPEG-4 VLC tables are included. The
  VLC table is sized to hold those tables: about 343 codes in 512
  entries. Nobody has checked whether a complete parsing program fits in
  the 256-word instruction memory. `IMEM_DEPTH` can be raised if it
  does not.
