# ZIP-IO trace decompressor (Zcompr / Zcompr+) in SystemVerilog

Processor instruction traces record every architectural state change of a
program run. They run to terabytes, and they are read over and over by
trace-driven simulators. They compress extremely well when the compressor
knows how a CPU works. Most executed instructions come from a small part of
the instruction set. A simple *predictor CPU* that implements only that part
can re-execute the program and reproduce those instructions' state updates
by itself. The compressed trace then needs to hold only two things:

* **markers**, meaning "the predictor gets the next N instructions right";
* **full state updates** for the instructions the predictor does not implement.

Decompression replays the program on the same predictor CPU. It inflates
each marker into real state-update records. Each stored update is injected
into the output, and the predictor's own state is patched with it so that
execution can carry on. This scheme is Zcompr. **Zcompr+** adds a small table
of recently seen unpredictable updates. An update that repeats one in the
table, for example a "PC + 4, reads 0" instruction, shrinks to a table index.

This repository is RTL for the FPGA side of the ZIP-IO architecture. Its core
is the hardware decompressor `zipio_top`: it takes a compressed token stream
and returns one record per executed instruction. The system top
`zipio_system` wraps it in a standard-I/O client. That client opens the
compressed trace as a host file by name and reads it with several reads in
flight. It writes the inflated trace to a second host file.

```
 tokens ─► input FIFO ─► decompressor controller ──────────────┐ unpredictable
                         ┌──────────────────────────┐          │ records (bypass)
                         │ Zcompr+ ◄─► instr buffer │          │
                         │    │                     │          │
                         │  parser ─────────────────┼─► predictor CPU
                         └──────────────────────────┘   ┌───────────────────┐
                                                        │ core controller   │
                                                        │ PC · regs · cache │
                                                        │ prediction core   │
                                                        └─────────┬─────────┘
                                                  predicted records │
                                     merge (+) ◄─────────────────────┘◄── bypass
                                         │
                                    output FIFO ─► records
```

## The token stream and the records

The types are defined in `rtl/zipio_pkg.sv`.

A **state update** (`upd_t`) describes what one instruction did:

| field | meaning |
|---|---|
| `rd_we`, `rd`, `rd_val` | register write (`rd` = 0 means none) |
| `mem_op` | `MEM_NONE`, `MEM_READ` or `MEM_WRITE` |
| `mem_addr`, `mem_data`, `mem_be` | address, value loaded or stored, and written bytes |
| `npc_delta` | next-PC effect: `new_pc = old_npc`, `new_npc = old_npc + npc_delta` |

The next-PC effect is stored as a delta, not as an absolute PC. That makes
ordinary non-branching instructions, which all have `npc_delta = 4`, produce
identical records. Identical records are what Zcompr+ exploits.
Only the next PC is relative. A buffer reference repeats a stored update
exactly, so the register value, memory address and data must all match.
The published scheme also describes an update *relative* to an earlier
one, such as storing the same value to the next address of a region.
Here such stores produce no reference, because their addresses differ.

A **compressed token** (`ztok_t`) is one of three kinds:

| kind | fields used | meaning |
|---|---|---|
| `TOK_PRED` | `count` (16 bit) | the next `count` instructions are predicted |
| `TOK_UNIMPL` | `upd`, `retain` | a full unpredictable update; with `retain` set it is also stored in the instruction buffer |
| `TOK_REF` | `idx` | repeat the update held in buffer slot `idx` |

Each **output record** (`trec_t`) holds `predicted`, `pc` and `upd`. Predicted
records carry their PC. Unpredictable records leave through the bypass with
`pc = 0`, and the consumer derives their PC from the previous record's next PC.
Records leave in program order.

## Zcompr+: keeping two LRU tables in step

The compressor and the decompressor each keep a table of `IBUF_ENTRIES`
updates (16 by default), and both use least-recently-used replacement.
The stream never says which slot a retained update goes into. The
decompressor replays the same LRU decisions from the stream itself:

* `TOK_UNIMPL` with `retain` writes the update into the LRU slot, which becomes
  the most recently used one;
* `TOK_REF idx` reads slot `idx`, which becomes the most recently used one;
* after reset, slot 0 is filled first, then 1, 2, and so on.

A compressor that follows these three rules (`zcompressor` in
`tb/zipio_tb_pkg.sv` is one) produces indices the hardware resolves
correctly. Recency is an age per slot: 0 is newest, `ENTRIES-1` is the victim.
That costs a comparator per slot, which is cheap at this table size
(`rtl/instr_buffer.sv`).

## The predictor CPU

### Prediction core

`rtl/pred_core.sv` executes this MIPS32 integer subset:

* ALU: ADDU SUBU AND OR XOR NOR SLT SLTU SLL SRL SRA, ADDIU SLTI SLTIU ANDI ORI XORI LUI
* memory: LW SW
* control: BEQ BNE J JAL JR

Everything else counts as unpredictable: byte and halfword memory operations,
multiply and divide, JALR, REGIMM branches, traps, system calls and floating
point.

The core has three stages:

1. **fetch**: a synchronous read of the instruction memory;
2. **execute**: decode, register read, ALU, branch resolution, memory access
   and register write;
3. **output register**: the predicted record.

Architectural PC state is the MIPS pair `(pc, npc)`. Committing the
instruction at `pc` moves to `(npc, target or npc+4)` and, in the same cycle,
starts fetching `npc`. So the instruction after a branch, its delay slot, is
always the one already in flight, and no flush is ever needed. Loads spend a
second cycle in execute waiting for the data memory.

Throughput is one instruction per cycle, or one per two cycles for a load,
while the core has credit and the output is not blocked.

### Core controller: credits, drain and patch

The core controller in `rtl/core_ctrl.sv` turns the two token kinds into two
control interfaces of the core:

* **Halt interface.** A marker adds `count` issue credits. The core commits
  one instruction per credit and stops before issuing when none is left.
  Markers are accepted at any time, so several can queue up as credit.
* **State interface.** An unpredictable update is accepted only when the
  credits are used up *and* the core is idle: no load in flight and the
  output register empty. In that same cycle the controller writes the
  register (if any), writes memory with byte enables (if a store), and sets
  `pc <= npc`, `npc <= npc + npc_delta`. The fetched word is discarded, and
  the core restarts on the next credits.

This drain-then-patch rule keeps the output in order without any reorder
logic. The parser hands an unpredictable update to the core controller and
to the bypass **in the same cycle** (`rtl/trace_parser.sv`). The controller
only takes it once every earlier predicted record has left the core. So the
bypass record reaches the merge after all records of older instructions. The
merge (`rtl/trace_merge.sv`) gives the bypass priority, for the rare case
that the core's next record is already ready when the output FIFO stalls.

Each unpredictable update costs the drain of the core plus one cycle of
refetch. `n_drain_wait` counts the cycles updates spent waiting.

An instruction that is credited as predicted but that the core does not
implement means the stream and the program disagree. The core then stops
and raises the sticky `err_unimpl`.

### Registers and memory

* `rtl/regfile.sv`: 32 × 32 bits. Register 0 is zero. There are two
  combinational read ports and one write port, which the controller shares.
* `rtl/pred_mem.sv`: instruction and data copies of a `2**MEM_AW`-word memory
  window (4K words, 16 KB, by default). Every write goes to both copies with
  byte enables, so stores and patches stay coherent with instruction fetch.
  Reads are synchronous with an enable, as in block RAM. Address bits above
  the window are ignored.

Before streaming, the host writes the program image through `prog_we`,
`prog_addr` and `prog_data`, and sets the entry point with `start_we` and
`start_pc`. Both are taken only while `prog_ready` is high, which means the
core is drained and no token is waiting.

## Top-level interface (`zipio_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_tok` | in/out/in | compressed tokens, one per transfer |
| `out_valid`, `out_ready`, `out_rec` | out/in/out | inflated records, one per transfer |
| `prog_we`, `prog_addr`, `prog_data`, `prog_ready` | in/in/in/out | program image loading (byte address, word data) |
| `start_we`, `start_pc` | in | entry point: `pc = start_pc`, `npc = start_pc + 4` |
| `err_unimpl` | out | a predicted step hit an instruction the core does not implement |
| `idle` | out | no token or record is held anywhere and the core is drained |
| `n_refs`, `n_retained`, `n_markers`, `n_patches`, `n_drain_wait` | out | statistics |

| parameter | default | meaning |
|---|---|---|
| `IN_DEPTH`, `OUT_DEPTH` | 64 | FIFO depths in tokens and records |
| `IBUF_ENTRIES` | 16 | Zcompr+ table size; must match the compressor |
| `MEM_AW` | 12 | memory window: `2**MEM_AW` words each for instructions and data |

None of these sizes is published for the original design; they are this
implementation's choices.

## Standard-I/O wrapper (`zipio_system`)

On the FPGA the decompressor does not own its input and output. It reaches
them through a file-style I/O service that the host carries out: the FPGA
sends a request and the host performs the matching C library call. A host
call can take microseconds, so a read is *split-phase*. The request goes out
at once, and its answer comes back later as a separate response. A client
may have several reads outstanding, and their latencies overlap. File names
are never sent as text: both sides share a table of strings built ahead of
time, and a request names a file by its index in that table (a *string
handle*).

```
            ┌────────── zipio_system ────────────────────────────────┐
 host ◄────►│ stdio_mux ◄─► stdio_reader ─► tok_unpack ─► zipio_top ─┼─┐
 requests / │   ▲   ▲                                                │ │
 responses  │   │   └────── stdio_writer ◄─ rec_pack ◄───────────────┼─┘
            │   └────────── stdio_logger ◄─ statistics, error        │
            └────────────────────────────────────────────────────────┘
```

One request/response channel (`stdio_pkg`) carries five operations. Every
request has a two-bit client tag, which the host echoes in its responses.
`stdio_mux` uses the tag to share the channel between the three clients:
client 0 is the reader, client 1 the writer and client 2 the logger. It
arbitrates round-robin: after client g, the first waiting client among
g+1, g+2 and so on wins.

| op | request fields | response |
|---|---|---|
| `SIO_FOPEN` | `arg` = string handle, `data[0]` = 1 for writing | one response, `data` = file handle |
| `SIO_FREAD` | `handle`, `arg` = words wanted | one response per word, the final one with `last`; `eof` marks the end of the file; a final response with `nodata` carries no word |
| `SIO_FWRITE` | `handle`, `arg` = 1 or 2 words, `data[31:0]` first and `data[63:32]` second word | none |
| `SIO_FCLOSE` | `handle` | none |
| `SIO_PRINTF` | `handle` = output stream, `arg` = string handle of the format, `data[31:0]` and `data[63:32]` = two arguments | none; the host formats the line with its own `printf` |

Responses to one client arrive in the order of its requests, and the
channel has no response back-pressure (`sio_rsp_ready` is always 1).

**Reader.** `stdio_reader` opens string `TRACE_IN_STR` and then keeps up to
`MAX_READS` reads of `READ_CHUNK` words each in flight. Its receive buffer
holds `READ_BUF` words. A new read is issued only if the buffer can hold
every word still owed by reads in flight plus the whole new chunk. The
buffer therefore never overflows, even though responses cannot be refused.
After a response marked `eof`, no more reads are issued. Reads already in
flight may come back empty (`nodata`). `eof` is raised once they have all
been answered and the buffer is empty.

**Writer.** `stdio_writer` opens string `TRACE_OUT_STR` for writing and sends
one `FWRITE` per input transfer of one or two words. It sends `FCLOSE` once `close` is high and no word
is pending, and then raises `done`. The system raises `close` when the
reader reports `eof` and the unpacker, the decompressor and the packer are
all idle.

**File formats.** Both formats are sequences of 32-bit words, and both are this
implementation's own.

* Compressed trace, read by `tok_unpack`:
  * Every token starts with a header word. Bits [31:30] give the kind:
    0 is a marker, 1 a full record, 2 a buffer reference and 3 a padding
    word, which is skipped. Bit [29] is `retain`, bits [23:16] are the
    buffer index and bits [15:0] are the marker's run length.
  * A full record adds five words:
    1. `{rd_we[31], rd[30:26], mem_op[25:24], mem_be[23:20]}`;
    2. `rd_val`;
    3. `mem_addr`;
    4. `mem_data`;
    5. `npc_delta`.
* Inflated trace, written by `rec_pack`: seven words per record, sent as
  three two-word writes and one one-word write:
  1. `{predicted, 31'b0}`;
  2. `pc`;
  3. the `{rd_we, rd, mem_op, mem_be}` word above;
  4. `rd_val`;
  5. `mem_addr`;
  6. `mem_data`;
  7. `npc_delta`.

  Two words per write matter for speed. The channel carries one request
  per cycle, so one word per write would cap the output at 1/7 of a record
  per cycle. That is below the 0.15 records per cycle that the published
  15 MIPS at 100 MHz needs. With two-word writes the cap is 1/4.

**Logger.** `stdio_logger` prints to host stream `LOG_HANDLE`, for
example standard error, which is already open. It prints:

* one line when the core meets an instruction it does not implement, with
  the number of markers and patches so far;
* two summary lines once the output file is closed: markers and patches,
  then buffer references and retained records.

`done` rises when the summary has been accepted.

**Start-up.** The reader opens its file and prefetches from reset. Tokens
are held back from the decompressor until the program has been loaded and
`start_we` has been accepted.

| extra parameter | default | meaning |
|---|---|---|
| `TRACE_IN_STR`, `TRACE_OUT_STR` | 0, 1 | string handles of the two file names |
| `READ_CHUNK` | 16 | words per read request |
| `MAX_READS` | 4 | reads in flight at most |
| `READ_BUF` | 128 | reader buffer, words |
| `LOG_HANDLE` | 2 | host stream for the log |
| `LOG_ERR_STR`, `LOG_SUM1_STR`, `LOG_SUM2_STR` | 2, 3, 4 | string handles of the three log formats |

The remaining ports of `zipio_system` are:

* `prog_*` and `start_*`, as on `zipio_top`;
* `done`;
* `err_unimpl`;
* the statistics;
* `max_reads_inflight`, the largest number of reads that were in flight at
  once.

## How far this follows the published architecture

These parts follow ZIP-IO as published:

* the block structure: input FIFO, decompressor controller with Zcompr+,
  instruction buffer and parser, predictor CPU with core controller, PC,
  registers, cache and prediction core, the merge, and the output FIFO;
* the predictor as a pipelined MIPS-subset core with a halt-before-issue
  interface and a state-patching interface;
* the wait, halt, patch and restart sequence for unpredictable instructions;
* the bypass of unpredictable updates straight to the output;
* the Zcompr+ table with LRU retention and flag-driven table updates.

These are this implementation's own choices:

* the token and record formats, and run-length markers (the published scheme
  draws one marker per instruction; a `count` of 1 is that case);
* the relative next-PC field;
* the exact instruction subset and the pipeline depth;
* the delay-slot handling;
* the program-load and start ports;
* every size.

Known departures and gaps:

* **References are exact, not relative.** A Zcompr+ reference repeats an
  earlier update exactly, apart from the relative next PC. The stored
  memory address is absolute, so updates that differ from an earlier one
  only by a regular offset are sent in full. Examples are writes of the
  same value to consecutive addresses.

* **No real caches.** The published design calls its memories caches but
  does not describe a miss path. Here the memories are the whole address
  space, a 16 KB window, so real benchmark binaries (hundreds of KB and up)
  do not fit without a backing store.
* **Standard I/O covers open, read, write, close and printf.** The
  published I/O library also has a `sprintf` that allocates new string
  handles, and it allows run-time changes to the string table. Neither is
  built here. The log goes to a stream the host already has open; the
  logger does not open a log file by name. The request and
  response field layouts are this implementation's own. The host side of
  the service, including its RPC transport, is software. It exists here
  only as a behavioural testbench model. The host-side gzip, format
  translator and simulator are not part of this RTL either.
* The 15 MIPS decompression rate published for the FPGA prototype (about
  0.15 instructions per cycle at 100 MHz) is well below what this pipeline
  does: about 0.85 records per cycle on the test trace.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/zipio_tb_pkg.sv` are written independently of the RTL:

* an instruction-set model of the subset plus six unpredictable instructions
  (MUL, SLLV, LBU, SB, JALR, BGEZ);
* a Zcompr+ compressor that mirrors the LRU table;
* a demo program that loops forever through loads, stores, calls via JAL and
  JALR, and taken and untaken branches.

`tb_zipio_top` runs the whole decompressor at its default parameters:

* 6000 traced instructions, about 1300 tokens, with Zcompr+ references and LRU evictions;
* random gaps on input and output, then a long output stall that backs up
  both FIFOs, then free flow where the rate is measured;
* it compares every record and requires that each mechanism occurred at
  least once.

`tb_zipio_system` runs the same trace through the system top, also at its
default parameters:

* The input file is the serialized token stream, with padding words mixed in.
* A behavioural host (`tb/stdio_host_model.sv`) answers every read after
  a random latency of 10 to 60 cycles, and throttles requests at random.
* The output file must decode to the reference trace.
* The test requires:
  * more than one read in flight;
  * reads issued before the core started;
  * the file end found by a short read;
  * the output file closed;
  * the two summary lines printed to the log with the final statistics;
  * at least 0.15 records per cycle from start to `done`. It measures
    about 0.22, because of the host's random throttling.

`tb_pred_core` also checks that a credited unimplemented instruction raises
`err_unimpl`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_zipio_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/zipio_pkg.sv rtl/mips_pkg.sv rtl/stdio_pkg.sv tb/zipio_tb_pkg.sv \
  tb/tb_zipio_top.sv
./obj_dir/Vtb_zipio_top
```

The other testbenches build the same way. Swap the top module and the last
file for `tb_<block>`: `tb_sync_fifo`, `tb_instr_buffer`, `tb_zcompr_plus`,
`tb_trace_parser`, `tb_decomp_ctrl`, `tb_core_ctrl`, `tb_pred_core`,
`tb_regfile`, `tb_pred_mem`, `tb_predictor_cpu`, `tb_trace_merge`,
`tb_zipio_system`, `tb_stdio_mux`, `tb_stdio_reader`, `tb_stdio_writer`,
`tb_stdio_logger`,
`tb_tok_unpack`, `tb_rec_pack`.

## Files

| file | contents |
|---|---|
| `rtl/zipio_pkg.sv` | token, record and state-update types |
| `rtl/mips_pkg.sv` | MIPS opcode and function encodings used by the core |
| `rtl/zipio_system.sv` | system top: decompressor behind the standard-I/O channel |
| `rtl/stdio_pkg.sv` | standard-I/O request and response formats |
| `rtl/stdio_mux.sv`, `rtl/stdio_reader.sv`, `rtl/stdio_writer.sv` | channel sharing, split-phase file reader, file writer |
| `rtl/stdio_logger.sv` | debug log through printf requests |
| `rtl/tok_unpack.sv`, `rtl/rec_pack.sv` | file words to tokens; records to file words |
| `rtl/zipio_top.sv` | decompressor top level |
| `rtl/sync_fifo.sv` | input and output FIFO |
| `rtl/decomp_ctrl.sv` | decompressor controller (Zcompr+ stage and parser) |
| `rtl/zcompr_plus.sv`, `rtl/instr_buffer.sv` | Zcompr+ expansion and LRU instruction buffer |
| `rtl/trace_parser.sv` | marker / record routing with the bypass fork |
| `rtl/predictor_cpu.sv` | predictor CPU composition |
| `rtl/core_ctrl.sv` | credits, drain, patch, program load |
| `rtl/pred_core.sv` | MIPS-subset prediction core |
| `rtl/regfile.sv`, `rtl/pred_mem.sv` | register file; instruction and data memories |
| `rtl/trace_merge.sv` | output merge |
| `tb/zipio_tb_pkg.sv` | reference models, encoders, demo program |
| `tb/stdio_host_model.sv` | behavioural host standard-I/O service (testbench only) |
| `tb/tb_*.sv` | testbenches |
