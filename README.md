# Cache Compute System (CCS): a line-wide vector engine beside the last-level cache

Many signal-processing and neural-network kernels spend most of their time moving data rather than computing. Examples are convolutions, pooling, ReLU and the distance step of k-nearest-neighbours. The CCS cuts that traffic by placing a SIMD co-processor next to the last-level cache (LLC). It is not placed inside the processor.

The CCS works like this:
- It reads whole cache lines straight from the LLC.
- It pushes each line through a pipelined binary tree of functional units.
- It writes whole result lines back into the LLC.

The LLC's coherence machinery invalidates stale copies in the upper cache levels. The processor only programs a command through a few memory-mapped registers and later polls for completion. It is free in between.

With the default 64-byte lines and 32-bit elements, one line holds N = 16 elements. The engine takes one operand line per clock and, once the pipeline is full, produces up to one result line per clock.

This repository holds synthesizable SystemVerilog for the CCS, the logic that connects it to a host and an LLC, and a self-checking testbench for every block.

## System view

```
 host data port ──► ccs_addr_router ──► (other addresses) ──► host memory system
                          │ PI window (256 B at PI_BASE)
                          ▼
                     ccs_prog_if ── one-command queue ──► ccs_control
                                                            │  ▲
                     ccs_tlb (host-filled) ◄── VA lookups ──┘  │
                                                            │  │
                                   ccs_datapath ◄── operand buffer
                                                            │
 upper cache levels ──► ccs_llc_port_mux ◄── reads / writes ┘
                             │
                            LLC
```

`ccs_top` wires these parts together. The following parts are outside this RTL, so `ccs_top` brings their signals out as ports:

| ports | outside part |
|---|---|
| `cpu_*` | host processor's data port |
| `mem_*` | host traffic that is not addressed to the CCS |
| `l1_*` | line traffic of the upper cache levels |
| `llc_*` | the LLC |
| `tlb_*` | TLB fill, flush and miss report |

## The processing tree

The heart of the design is `ccs_datapath`. Each lane is `DW` bits wide, and there are `N = LINE_BYTES*8/DW` lanes. Every stage ends in a register row:

| stage | contents | result tap | used for |
|---|---|---|---|
| s0 | operand lines a and b, constant k, control record | – | – |
| L0 | N type A units: add/sub, shifter, logic unit | OUT1 | maps without multiplication |
| L1 | N type B units: add/sub, multiplier (MUL, SQ, ABS) | OUT2 | maps with multiplication |
| tree | log2(N) levels of type C units (ADD, MAX, MIN, AND, OR, XOR) | OUT_M | reduces that fit in one line |
| ACC | one type C unit and a register | OUT_M+1 | reduces split over several lines |

The multiplier sits in the second level so that a subtraction can come before it. For example, SSDVV is a subtract, then a square, then a sum. Commands such as IPVV pass through level 0 unchanged.

A decoded control record travels down the pipeline beside each line, so every level executes the command whose data it currently holds. A single-line reduce and a map can therefore be in the tree at the same time.

Latency is counted in clock edges from the cycle an operand line enters the tree:

| tap | latency (N = 16) |
|---|---|
| OUT1 | 2 |
| OUT2 | 3 |
| OUT_M | 3 + log2 N = 7 |
| OUT_M+1 | 4 + log2 N = 8 |

A reduce over L > N elements runs as ceil(L/N) back-to-back runs. The accumulator is loaded by the first run's tree result and combines the rest. It presents one value after the last run.

On reduces, lanes beyond the end of the vector are filled with the identity of the operation:

| operation | identity |
|---|---|
| ADD, OR, XOR | 0 |
| AND | all ones |
| MAX | most negative value |
| MIN | most positive value |

Tails and short vectors therefore need no special case. A reduce result is one element. It leaves the tree in lane 0, and the control unit moves it to the lane of `res_addr` and writes it with a one-element byte enable. Map results write only the lanes that hold vector elements.

Arithmetic is signed two's complement and wraps. A signed overflow in any valid lane of any level sets a sticky flag in the STATUS register.

## Command set

There are 47 commands. `cmd_id` is the number in the table.

| id | commands | operands | class | result tap |
|---|---|---|---|---|
| 0, 1 | ADDVV, SUBVV | a, b | map | OUT1 |
| 2 | MULVV | a, b | map | OUT2 |
| 3, 4, 5 | SSDVV (Σ(a−b)²), SADVV (Σ\|a−b\|), IPVV (Σa·b) | a, b | reduce | tree / ACC |
| 6, 7 | ADDVC, SUBVC | a, k | map | OUT1 |
| 8 | MULVC | a, k | map | OUT2 |
| 9 | COMP2V (−a) | a | map | OUT1 |
| 10, 11, 12 | ADDV, MAXV, MINV | a | reduce | tree / ACC |
| 13, 14, 15 | LESSVC, GRTRVC, EQUVC (1 / 0) | a, k | map | OUT1 |
| 16, 17 | SQV, ABSV | a | map | OUT2 |
| 18 | RELUV | a | map | OUT1 |
| 19–24 | SLLVV, SRLVV, SLAVV, SRAVV, ROLVV, RORVV | a, b | map | OUT1 |
| 25–30 | SLLVC, SRLVC, SLAVC, SRAVC, ROLVC, RORVC | a, k | map | OUT1 |
| 31–36 | ANDVV, NANDVV, ORVV, NORVV, XORVV, XNORVV | a, b | map | OUT1 |
| 37–42 | ANDVC, NANDVC, ORVC, NORVC, XORVC, XNORVC | a, k | map | OUT1 |
| 43 | NOTV | a | map | OUT1 |
| 44, 45, 46 | ANDV, ORV, XORV | a | reduce | tree / ACC |

Notes on the operations:
- Shift amounts use the low log2(DW) bits of b or k.
- SLA shifts left and keeps the sign bit.
- Comparisons and ReLU use the level-0 subtractor.
- Ids 47–63 are accepted and then ignored.
- A command with `op_len = 0` is accepted and then ignored.

## Programming model

The registers are 64 bits wide. Offsets are from `PI_BASE`, which defaults to `0x2000_0000`.

| offset | register | meaning |
|---|---|---|
| 0x00 | CMD_ID | command id |
| 0x08 | OP_LEN | vector length in elements (32 bits used) |
| 0x10 | K | constant (DW bits used) |
| 0x18 | OPA_ADDR | virtual address of operand a (any element address) |
| 0x20 | OPB_ADDR | virtual address of operand b (any element address) |
| 0x28 | RES_ADDR | virtual address of the result. Map results: line aligned (low bits ignored). Reduce results: any element address. |
| 0x30 | STRIDE | lines between consecutive lines of an operand (and of a map result). Reset value is 1 (contiguous). |
| 0x38 | START | write 1 to queue the programmed command |
| 0x40 | READINESS | reads 1 when nothing is queued or executing |
| 0x48 | STATUS | bit 0: sticky overflow (write 1 to clear). Bit 1: a TLB miss is pending. |

A typical sequence is setup writes, then START, then poll READINESS.

START copies the descriptor into a one-entry queue, so the host can program the next command while the current one executes. A second START is held off on the bus until the queue has been taken.

Commands run in order of arrival. The control unit takes a new command as soon as every read request of the previous one has been issued. So a stream of small commands, such as one IPVV per convolution output, flows through the tree back to back.

## Control: runs, reads and ordering

`ccs_control` splits a command into runs of one line. For every run it does the following:
1. Translates the operand and result line addresses in the TLB.
2. Issues the reads to the LLC, one per cycle. For two-vector commands, operand a comes first, then b. It does not wait for earlier reads, so at most `MAX_OUT` reads are outstanding.
3. Matches returned lines in order against a queue of run descriptors:
   - A first operand goes into the one-line operand buffer.
   - A second or only operand enters the tree together with the buffered line.

Runs of one command, and runs of consecutive commands, therefore overlap in the pipeline.

### Operand realignment

Operands need not start on a line boundary, and the two operands of a command may have different offsets within their lines. Run r of an operand is the N elements starting at `opa + r*stride` lines. How it is fetched depends on where those elements lie:

- **One line.** The line is read once.
- **Two lines.** Both lines are needed.
  - The first is held in a line register. Each operand has its own register.
  - When the second arrives, a lane multiplexer takes the N elements that start at the operand's element offset within the pair.
  - Element 0 of the run therefore always enters the tree in lane 0.

The realigned line then goes to the operand buffer or the tree, like an aligned line. Windows that slide one element at a time can therefore be read in place, as in a 1-D convolution. A reduce result is written into the lane given by the element offset of `res_addr`, so scalar outputs can be packed densely.

With a stride of one line, the second line of one run is the first line of the next run. That line is still in the operand's register, so only the new line is read. A misaligned operand then costs one extra read for the first run only. With any other stride, each straddling run reads both of its lines.

Three rules keep results from colliding at the single write port:

1. **Depth order.** A command whose result leaves the tree at a shallower tap than the previous command's waits until the tree is empty. The ranks are OUT1 < OUT2 < OUT_M < OUT_M+1. Otherwise a map result could overtake a reduce result or land on the same cycle. Commands of equal or deeper rank start at once.
2. **Write priority.** A result write has priority over operand reads on the cache port.
3. **Global stall.** If the cache does not accept a write, every pipeline register holds until it does.

A TLB miss stops address generation and raises `tlb_miss` and `tlb_miss_va`. Fetching resumes once the host side writes the entry.

## Around the engine

- **`ccs_tlb`**: 16 fully associative entries with 4 KiB pages and two combinational lookup ports. The host side writes entries by index and can flush them all, which keeps the TLB in step with the processor's TLB.
- **`ccs_addr_router`**: sends host requests inside the 256-byte register window to the programming interface and all others to the memory system. A read to one target waits while reads to the other target are outstanding, so responses reach the host in order.
- **`ccs_llc_port_mux`**: shares the LLC port between the upper cache levels (fixed priority) and the CCS. A small FIFO remembers the source of each read, and responses are steered back in order.
- **`ccs_operand_buffer`**: one line of storage for the first operand of a two-vector command.
- **`ccs_fifo`**: small helper FIFO used by the control unit and the mux.

## Departures and limits

- **Alignment.**
  - Operands can start at any element address.
  - A misaligned operand with stride 1 costs one extra line read per command. With any other stride it costs two line reads per run.
  - Map results must start on a line.
  - Addresses below element granularity (the low 2 bits for 32-bit elements) are ignored.
- **Only contiguous windows.** A command processes one contiguous strided vector. Windows that are not contiguous in memory, such as 3x3 image patches, must be gathered by the host first.
- **Element width.** The element width is a build-time parameter (`DW`), not a run-time mode. 8-bit and 16-bit elements need a rebuild with `DW = 8` (64 lanes, 6 tree levels) or `DW = 16` (32 lanes, 5 tree levels). Both builds are exercised by `tb_ccs_widths`.
- **This design's own choices.** The following are not part of the original scheme:
  - the register offsets and the STATUS register
  - the numeric command ids
  - the one-entry command queue
  - the depth-order rule
  - the stall policy
  - the bus handshakes
  - the TLB organisation and its host-driven refill
- **Completion is polled.** There is no interrupt.
- **Command table readings.**
  - SRLVV is implemented as a logical right shift. Its formula in the source table reads like a left shift, but its name and its constant form say right.
  - NOTV is treated as a one-operand command.

## Parameters

| parameter | default | where |
|---|---|---|
| `LINE_BYTES` | 64 | top, control, datapath, mux |
| `DW` | 32 | element width; `N = LINE_BYTES*8/DW` lanes |
| `VA_W` / `PA_W` | 48 / 40 | virtual / physical address width |
| `TLB_ENTRIES` | 16 | TLB size |
| `MAX_OUT` | 8 | outstanding operand reads of the control unit |
| `PI_BASE` | `0x2000_0000` | register window base |

## Verification

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|---|---|
| `tb_ccs_fu_a`, `tb_ccs_fu_b`, `tb_ccs_fu_c` | every operation on random and corner values against a reference model (`tb_ccs_ref_pkg`) |
| `tb_ccs_reduce_tree` | back-to-back reductions of mixed operations, the latency, and stalls |
| `tb_ccs_datapath` | all 47 commands through the tree, the latency of each tap, the accumulator, masking and stalls |
| `tb_ccs_cmd_decoder` | the operand class and result tap of all ids |
| `tb_ccs_control` | random command streams, aligned and misaligned, against a behavioural LLC with misses and back-pressure, including read pipelining and the bound on a single-line command's latency |
| `tb_ccs_tlb` | fill, lookup on both ports, and flush |
| `tb_ccs_prog_if` | registers, queueing, START hold-off, readiness and status |
| `tb_ccs_llc_port_mux` | priority, routing and in-order responses |
| `tb_ccs_addr_router` | routing and response order |
| `tb_ccs_top` | the full system at the default size |
| `tb_ccs_kernels` | the six evaluation kernels at full size (see below) |
| `tb_ccs_widths` | the control unit and tree built for 16-bit and 8-bit elements, against a reference for each width |

`tb_ccs_top` drives the full system at the default size. It programs commands through the register window the way host software would, refills the TLB on misses, and runs competing upper-cache and host traffic. It checks every result line in the behavioural LLC model `tb_ccs_llc_model`. It also counts the following mechanisms, and counts a failure for any that never happened:

- level-0 and level-1 maps
- single-line and accumulated reduces
- two-operand buffering
- operand realignment (runs straddling two lines)
- reuse of the shared line by the next run (stride 1)
- TLB-miss stalls
- LLC-miss waits
- write-back stalls
- port contention
- depth-order holds
- START hold-off
- router holds
- overflow
- TLB flush

`tb_ccs_kernels` runs six kernels on the full-size system, each issued as a stream of commands the way host software would:

| kernel | size | commands |
|---|---|---|
| ReLU | 10000 elements | one RELUV |
| 1-D convolution | 1000 samples, 15 taps | 986 IPVV, windows read in place |
| 2-D convolution | 100x100, 3x3 | 9604 IPVV |
| 3-D convolution | 10x10x10, 3x3x3 | 512 two-run IPVV |
| 3x3/stride-3 max pooling | 99x99 | 1089 MAXV |
| kNN distance phase | 1000 samples, 16 features | 1000 SSDVV, then a 4-nearest vote among 8 classes |

It checks every output and prints the cycles per kernel. The cost of programming the registers dominates for the small per-point commands, at about 8 cycles per command.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ccs_pkg.sv tb/tb_ccs_ref_pkg.sv \
          -y rtl -y tb tb/tb_ccs_top.sv --top-module tb_ccs_top -o sim
./obj_dir/sim
```

Replace `tb_ccs_top` with any other testbench name. All files are plain SystemVerilog-2017 with no simulator-specific code.
