# Four-wide speculative MIPS I core with pointer renaming

This is a superscalar MIPS I processor. Each cycle it fetches, renames and dispatches a
block of four instructions. It executes them out of order in five functional units and
commits them in order.

Its main idea is how it renames registers. All 32 architectural registers and 32 extra
"pseudo registers" share one 64-entry register file, the **value buffer**. Two small
tables of 6-bit pointers decide which value-buffer location currently holds each
logical register:

- The **issue pointer buffer (IPB)** holds the newest, speculative mapping.
- The **commit pointer buffer (CPB)** holds the mapping of committed instructions.

Committing an instruction copies a 6-bit pointer, not a 32-bit value. Recovering from a
mispredicted branch copies the CPB into the IPB in one cycle.

Branch prediction works per block. A four-bank branch target buffer (BTB) and a
four-bank branch prediction buffer (BPB) of two-bit counters look at all four fetch
addresses at once. The hit nearest to the PC decides the next block.

## Pipeline

Each stage takes one cycle. Stages and their modules:

| Stage | What happens | Modules |
|---|---|---|
| Fetch | Reads four words from PC. Looks up BTB and BPB and picks the next PC. | `fetch_unit`, `btb`, `bpb` |
| Decode | Decodes four words. Finds four free value-buffer locations. Reads eight source pointers from the IPB and fixes sources written earlier in the block. | `isa_decoder`, `prioritizer`, `first_zero`, `pointer_buffer`, `source_overwrite` |
| Rename (end of decode) | Writes destination pointers into the IPB, latest writer per register only. Marks the locations allocated and invalid. Reserves one reorder-buffer slot per instruction. | `dest_overwrite`, `value_buffer`, `reorder_buffer` |
| Dispatch | Reads operands from the value buffer, or from the common data buses in the same cycle. Writes each instruction into its unit's reservation station. | `value_buffer`, `reservation_station` ×5 |
| Execute | ALU I and ALU II take 1 cycle. The branch/jump unit (BJU) takes 1 cycle. The load/store unit (LSU) takes 2 cycles. The multiply/divide unit (MDU) takes 4 cycles. | `alu`, `bju`, `lsu`, `store_buffer`, `mdu` |
| Write back | Two common data buses (CDBs) carry up to two results per cycle, oldest first. They write the value buffer, wake waiting stations and complete reorder-buffer slots. The BJU also has its own branch bus to the reorder buffer. | `writeback_ctrl` |
| Commit I | Picks up to four completed instructions, in order, from the head of the reorder buffer. | `reorder_buffer` |
| Commit II | Writes their pointers into the CPB and frees the locations they replace. Releases their stores to memory and updates the BTB and BPB. On a misprediction, starts a restore. | `reorder_buffer`, `pointer_buffer`, `value_buffer` |

`mips_ss_top` wires all of this together. `mips_pkg` holds the shared types:

- Functional-unit codes: NOP 000, CP0 001, MDU 010, ALU 011, BJU 100, LSU 101.
- Internal operation codes.
- The 45-bit decoded instruction.
- The 109-bit result word: reorder slot 6 bits, pre-decoded destination 64, data 32, destination pointer 6, write-back bit 1.
- The 71-bit branch-bus word.

## Fetch blocks and prediction

The BTB and BPB each have four banks. Address bits [3:2] choose the bank. The next
`IDX_W` bits (default 4, so 16 entries per bank and 64 in total) are the index. The bits
up to bit 15 are the tag.

Only the first branch or jump in a block is predicted. A prediction is "taken" only when:

- the BTB hits at that word,
- the BPB hits at that word, and
- the counter's top bit is set.

The block is cut according to what it contains:

| Block contents | Instructions kept | Next PC |
|---|---|---|
| First branch in word 3 | words 0–2 | PC+12, so the branch is refetched together with its delay slot |
| Branch predicted taken at word k | words up to k+1 (the delay slot) | predicted target |
| Not-taken branch, and another branch after its delay slot | words up to k+1 | the word after the delay slot |
| Otherwise | all four words | PC+16 |

The BTB has a single port. Writing it at commit stalls fetch for that cycle. The BPB has
separate read and write ports. A write to the bank and index being read also stalls
fetch for one cycle.

Predictor updates at commit:

- The BPB is updated for every committed branch. It uses a saturating two-bit counter. A new entry starts at 01.
- The BTB is written only for a mispredicted taken branch or jump.

## Renaming: prioritizer, overwrite logic, pointer buffers

The value buffer keeps three status bits per location:

- **A** (allocated)
- **V** (value present)
- **C** (committed)

The **prioritizer** finds the four lowest locations whose A bit is clear. It chains four
first-zero circuits: each stage ORs the previous stage's pick into the mask. If fewer than
four locations are free, the block waits in decode, even if it needs fewer than four.
Location 0 is register `$zero`; it is never allocated and always reads 0.

Two comparator chains handle dependences inside one block:

- **Source overwrite.** If an earlier instruction in the block writes a source register, the source gets that instruction's new pointer. The nearest earlier writer wins.
- **Destination overwrite.** If several instructions write the same register, each of them gets the pointer of the last one. The IPB then holds the youngest mapping.

The **pointer buffer** is a 32×6 IPB next to a 32×6 CPB:

- The IPB has eight read ports and four write ports.
- The CPB has four commit write ports. Each returns the pointer it replaces, so that location can be freed.

A **restore** does all of the following in one cycle:

- copies the CPB into the IPB, including commits made in that same cycle;
- frees every allocated, uncommitted location;
- empties the reservation stations, the units and the pipeline registers;
- loads the PC.

## Reservation stations and write back

Each of the five units has a four-entry reservation station. The coprocessor-0 class
has no station.

A station accepts at most one instruction per cycle. A block is held in dispatch until
all its instructions are placed. Instructions already placed are marked so they are not
written twice. Each held cycle is counted as a dispatch stall.

While an instruction waits for an operand, its station watches both CDBs. A station
issues its oldest ready entry. Age is the distance from the reorder-buffer head, not the
raw slot number, so the order stays correct when slot numbers wrap. The LSU and MDU
stations issue strictly in program order, which keeps memory and Hi-Lo accesses ordered.

Each unit holds a finished result until `writeback_ctrl` gives it a bus. The controller
grants the two buses to the two oldest waiting results. The others wait.

## Loads, stores and the store buffer

The LSU works in two steps:

1. It computes the address.
2. A load reads memory, but first checks the 8-entry store buffer. Bytes from older buffered stores to the same word replace the memory bytes. A store goes into the buffer.

LWL and LWR merge memory bytes into the old value of the target register. The decoder therefore makes rt a source for them. SWL and SWR write partial words using byte enables.

Buffered stores reach memory only after they commit, and only in cycles when no load
uses the memory port. Loads come first. A restore drops stores that have not committed.
Byte order is big-endian.

## Reorder buffer and commit

The reorder buffer has 64 slots (a 6-bit tag). Decode reserves slots in order. The CDBs
and the branch bus mark slots complete.

Commit I picks up to four completed instructions, in order, from the head. It stops at:

- the first incomplete instruction;
- a second branch in the group;
- BREAK.

A branch is checked for misprediction only at commit. A mispredicted branch commits
together with its delay slot. Commit II then issues the restore, and fetch restarts
at the correct address.

## Interface of `mips_ss_top`

- **Instruction memory:** `imem_addr_o` is the block address. `imem_rdata_i` returns four words, combinationally.
- **Data memory:** one combinational read port (`dmem_raddr_o`/`dmem_rdata_i`) and one byte-enabled write port (`dmem_we_o`, `dmem_waddr_o`, `dmem_be_o`, `dmem_wdata_o`). Both memories are treated as ideal: there are no caches and no misses.
- **Debug:** `arch_reg_i`/`arch_val_o` read a committed register. `hi_o`/`lo_o` give Hi-Lo.
- **Status and counters:**
  - `halt_o` rises when BREAK commits.
  - `perf_o` counts events: cycles, retired instructions, branches, restores, dispatch/fetch/rename/reorder-buffer stalls, bus waits, overwrites, store-buffer forwards, taken predictions and overflows.
  - `btb_nvalid_o`/`bpb_nvalid_o` give predictor occupancy.

Parameters and their defaults:

| Parameter | Default |
|---|---|
| `RS_DEPTH` | 4 |
| `ROB_DEPTH` | 64 |
| `MDU_LAT` | 4 |
| `SB_DEPTH` | 8 |
| `BP_IDX_W` | 4 |
| `RESET_PC` | 0 |

Reset is synchronous and active high.

## Where this RTL differs from the original design, or fills gaps

- **Coprocessor 0 is a constant zero.** As in the original design, reading coprocessor 0 gives 0. There is no coprocessor-0 unit, though: the decoder turns MFC0 into an ALU operation (OR of `$zero` with `$zero` into the target). MTC0, RFE, SYSCALL and BREAK complete at dispatch without a result.
- **No exceptions or interrupts.** Arithmetic overflow is only counted.
- **Caches are replaced by ideal memories** outside the core.
- **Hi-Lo is not restored.** Hi-Lo is written when the MDU finishes, so a wrong-path MULT/DIV/MTHI/MTLO that executed before a restore leaves its value.
- **The MDU is not pipelined.** It runs one operation at a time. Division by zero gives LO = all ones and HI = the dividend.
- **These choices are this design's own; the original leaves them unspecified:**
  - predictor index width, derived from the quoted predictor utilisation;
  - store-buffer depth;
  - bus priority (oldest first);
  - in-order LSU and MDU stations;
  - one branch per commit group;
  - deferring a branch in the last word to the next block;
  - the field widths of the branch bus;
  - the stall on a BPB port clash;
  - sign extension of arithmetic immediates inside the ALU (dispatch pads immediates with zeros).
- **Timing is simplified.** Half-cycle timing in the original (read in the first half of a cycle, write in the second) becomes a combinational read followed by a write at the clock edge, with bypasses where needed.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`:

- Most drive random stimulus and compare against a reference model written in the testbench.
- Latencies are checked cycle by cycle: ALU 1, LSU 2, MDU 4.
- `tb/rs_check.sv` is a helper that `reservation_station_tb` instantiates for out-of-order and in-order stations.

Each testbench prints `TB_RESULT checks=N failures=M`. It also has a watchdog.

`mips_ss_top_tb` runs the whole core at its default parameters. It runs a hand-assembled
program that:

- computes 4! in a JAL/JR subroutine with a MULT/MFLO loop;
- sums a BNE loop whose delay slot stores a byte;
- exercises store-to-load forwarding, same-block dependences, MULT/DIV, halfword, byte and unaligned (LWL/SWR) accesses, and MFC0;
- runs long floods of independent instructions that exhaust the free-location pool and the reorder buffer;
- ends with BREAK.

It checks final registers and memory. It also requires each of these to happen at least
once: restore, taken prediction, dispatch stall, prioritizer stall, reorder-buffer stall,
bus wait, source overwrite, destination overwrite and store-buffer forwarding.

A typical run: 314 cycles, 273 instructions committed (IPC 0.87), 21 branches, 6 restores.

To simulate with Verilator 5, run from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/mips_pkg.sv tb/mips_ss_top_tb.sv --top-module mips_ss_top_tb
./obj_dir/Vmips_ss_top_tb
```

The package comes first. Verilator then finds the other modules through `-Irtl` and `-Itb`.
Add `-Wno-fatal` if your Verilator version turns style warnings into errors. Other
testbenches work the same way: replace the testbench file and the top module name.
