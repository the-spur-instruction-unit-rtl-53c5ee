# An on-chip instruction cache with sub-blocks and prefetch-on-miss

This is the instruction unit (IUnit) of a 32-bit pipelined RISC processor.
It is a small instruction cache that sits on the CPU chip, between the
execution unit (EUnit) and a larger external cache (ECache). The chip has
only one bus to the ECache, and the EUnit's loads and stores use it too.
The IUnit therefore has two jobs:

- answer most instruction requests from on-chip storage, so the shared bus
  stays free for data;
- fetch the misses over that bus without ever getting in the way of a data
  reference.

It keeps 128 instructions (512 bytes), direct mapped. There are 16 blocks.
Each block has one address tag and 8 **sub-blocks** of one instruction each.
Every sub-block has its own valid bit. A miss brings in just the one missing
instruction, so the memory traffic per miss is one word. To win back the hit
ratio that small transfers cost, a **prefetcher** uses the idle bus cycles
after a miss. It fetches the next sequential instructions of the same block
before the EUnit asks for them.

Two small state machines control the unit: one for demand fetches and one
for prefetches. The rest is datapath: the instruction array, the tag array
with its comparator, address registers, an incrementer and an output
multiplexer.

## Address split and storage

The PC is a 30-bit word address (4-byte instructions):

| bits   | field     | use                                         |
|--------|-----------|---------------------------------------------|
| [2:0]  | sub-block | which instruction in the block              |
| [6:3]  | block     | which of the 16 blocks                      |
| [29:7] | tag       | compared with the block's stored tag (23 bits) |

- **Instruction array (IArray)**: 128 words of 33 bits, the instruction plus
  its sub-block valid bit. It is indexed by the low 7 PC bits. It is read
  through the IBRead address register and written through the IBWrite
  register. `instruction_miss` is the valid bit of the word read.
- **Tag array (TArray)**: 16 entries of 23-bit tag plus block valid bit.
  `block_miss` is true when the tags differ or the block is invalid.
- **FetchPC** holds the PC being looked up. It goes out on `add_bus` when a
  miss is fetched.
- A flush (invalidate) clears all 16 block valid bits in one access.
- A fetch into a block whose tag did not match also clears that block's 8
  sub-block valid bits as it writes the new tag. Old instructions of another
  address can then never hit. A fetch after an *instruction* miss, where
  the tag matched, keeps the block's other sub-blocks.

`NUM_BLOCKS` and `SUBBLOCKS` are parameters. Tag and index widths follow
from them and `ADDR_W`.

## Fetch controller (`fetch_fsm`)

| state          | meaning |
|----------------|---------|
| FET_reset      | Reset_IUnit was seen; `READ_PC` goes out every cycle so the EUnit re-sends its PC |
| FET_normal     | one PC per cycle is looked up; a hit puts the instruction on `ins_bus` |
| FET_memBusy    | a miss must be fetched, but the ECache or a data reference holds the bus |
| FET_memPending | the fetch is out; waiting for `cache_data_valid` |
| FET_disabled   | the IUnit is turned off; the word just fetched is handed straight to the EUnit |

A miss or flush in FET_normal goes to FET_memPending if the bus is free in
that cycle. If it is not free, it goes to FET_memBusy first.

While the fetch is outstanding, `ins_bus` carries the internal `MISS`
instruction. `MISS` means "repeat this PC next cycle", a partial suspension
of the pipeline. When the data arrives, it is written into the IArray. The
next cycle the repeated PC hits.

With a free ECache a miss costs two cycles:

| cycle | controllers                | `ins_bus`   | `add_bus`           |
|-------|----------------------------|-------------|---------------------|
| 1     | FET_normal / PF_idle       | MISS        | P (fetch)           |
| 2     | FET_memPending / PF_waiting| MISS        | P+1 (prefetch); word P arrives and is written |
| 3     | FET_normal / PF_prefetch   | word P      | P+2 (prefetch); word P+1 arrives |

Memory is busy in a cycle when any of these holds:

- `load_opcode`, `store_opcode` or `lowtoup_opcode` is set;
- the ECache reports `cache_busy` without `cache_data_valid`.

In such a cycle the IUnit starts nothing on the bus. An EUnit data
reference always wins over a fetch or prefetch.

## Prefetch controller (`prefetch_fsm`) and the prefetcher

| state       | meaning |
|-------------|---------|
| PF_reset    | one cycle after Reset_IUnit; decides between idle and disabled |
| PF_disabled | prefetching is off (IUnit or prefetch enable bit clear when reset ended); only a new reset leaves it |
| PF_idle     | nothing to prefetch until the next miss |
| PF_waiting  | prefetching, but no prefetch went out last cycle (fetch in progress or bus taken) |
| PF_prefetch | prefetching, a prefetch went out last cycle |

The fetch controller tells the prefetch controller when to hold off, with
`starting_prefetch`. This signal is true from the cycle a miss is seen until
the fetched word arrives. The first prefetch can therefore leave in the same
cycle as the fetched word comes back.

Once started, the prefetch controller sends a prefetch in every cycle that
meets all of these:

- no fetch is starting or outstanding;
- the bus is free;
- no flush is happening.

The prefetch address comes from two registers:

- **ReferencePC** holds the last address the IUnit put on `add_bus`, whether
  fetch or prefetch.
- **IncrementedPC** is ReferencePC with its 3 sub-block bits plus one. The
  count wraps inside the block, so prefetching walks round the block of the
  last miss and never crosses into another block.

Prefetched words are written into the IArray when they arrive in the
following cycle in PF_prefetch. IBWrite remembers their address. A flush
drops a prefetched word that is arriving, and returns the controller to
PF_idle.

Prefetching goes on until something else happens:

- a flush sends the controller to PF_idle, and the fetch that the flush
  starts then begins prefetching again;
- a new miss starts the cycle over at its own block;
- Reset_IUnit sends the controller to PF_reset.

Prefetches do not look at the sub-block valid bits, so they may re-fetch
words that are already present. This costs only bus cycles that nobody else
wanted.

## Suspension, reset, invalidation and disabling

- **Global suspension.** While `pipeline_not_suspended` is low, the whole
  pipeline stands still. The IUnit repeats the last instruction on
  `ins_bus`, looks up nothing new and does not prefetch. The input is
  registered, so it takes effect one cycle after it changes.
- **Reset_IUnit.** In the first reset cycle `ins_bus` carries `TRAP_CALL`,
  then `READ_PC` for as long as the controller is in FET_reset. Outstanding
  fetches and prefetches are forgotten. Their data is ignored if it arrives
  later. The cached instructions stay valid.
- **Invalidate.** `invalidate_opcode` or `invalidate_trap` empties the cache
  (all block valid bits cleared) and fetches the current PC in the same cycle.
- **Disabled IUnit.** The IUnit and the prefetcher each have an enable bit
  from the processor status word (`iunit_kpsw_set`, `prefetch_kpsw_set`),
  latched at the cycle boundary. When the IUnit is disabled, every PC is
  fetched from the ECache: MISS, then FET_memPending, then FET_disabled,
  which hands the word over. That is three cycles per instruction.

## Interface (`iunit`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one rising edge per CPU cycle |
| `rst_n` | in | 1 | power-on reset: clears all valid bits, both controllers to their reset states |
| `reset_iunit` | in | 1 | Reset_IUnit from the EUnit |
| `iunit_kpsw_set`, `prefetch_kpsw_set` | in | 1 | enable bits (latched) |
| `pipeline_not_suspended` | in | 1 | low = global suspension (latched) |
| `load_opcode`, `store_opcode`, `lowtoup_opcode` | in | 1 | EUnit uses the ECache bus this cycle |
| `invalidate_opcode`, `invalidate_trap` | in | 1 | flush the cache |
| `pc_bus` | in | 30 | instruction word address |
| `cache_busy`, `cache_data_valid` | in | 1 | ECache handshake |
| `data_bus` | in | 40 | ECache data; the instruction is bits [31:0] |
| `ins_bus` | out | 32 | instruction, or MISS / TRAP_CALL / READ_PC |
| `fetch_request`, `prefetch_request` | out | 1 | request type this cycle |
| `add_bus` | out | 30 | request address, valid while `add_bus_drive` |
| `add_bus_drive` | out | 1 | the IUnit owns the shared address bus this cycle |
| `fet_state`, `pf_state` | out | 3 | controller states (encodings in `iu_pkg`) |

Timing model:

- Inputs are sampled in the cycle they are given. Lookups, `ins_bus`,
  requests and `add_bus` are combinational within the cycle.
- Arrays and registers are written at the rising edge.
- The ECache answers a request at the earliest in the next cycle, with
  `cache_data_valid` and the data together. Only one request is outstanding.

## Where this RTL differs from the original design

- **Clocking.** The original uses four non-overlapping clock phases per CPU
  cycle, dynamic (domino) logic and PLAs. Here one clock edge stands for a
  CPU cycle. Reads are combinational and writes happen at the edge. The
  clock generator, the domino cell mosaics, the PLA layouts and the
  precharged array circuits are not modelled, nor are the original's delay
  and area figures.
- **Instruction codes.** The machine codes of `MISS`, `TRAP_CALL` and
  `READ_PC` are placeholders (`32'hFFFF_FF01/02/03`). They are top-level
  parameters.
- **Power-on reset.** `rst_n` is an addition. It clears all valid bits at
  power-up. Reset_IUnit, as in the original, leaves the arrays as they are.
- **Disabled IUnit.** This RTL forces a miss on every PC while the IUnit is
  disabled, so it runs entirely from the ECache.
- **Prefetching during a global suspension** pauses here. The original's
  operation example allows it to continue.
- **Restart after an invalidate.** The prefetch controller's own transitions
  would leave it idle after a flush. This RTL holds `starting_prefetch` one
  extra cycle when the prefetch controller is idle, so prefetching restarts
  after an invalidate. It then starts one cycle later than after an
  ordinary miss.
- **Memory data latch.** The latch that holds the incoming data word is
  folded into the array write path. The InsReg takes the word directly when
  the IUnit is disabled.
- **Add_bus** is a plain output with a drive-enable signal, not a bidirectional bus.
- **Not built:** the alternative organisations the original only compares
  against:
  - 64- or 256-instruction arrays of another shape. The direct-mapped
    ones can be had with `NUM_BLOCKS` = 8 or 32, and are simulated;
  - two-instruction sub-blocks on a 64-bit data path;
  - two-way set-associative versions.

## Files

- `rtl/iu_pkg.sv` holds the widths, state encodings, control bundles and
  internal instruction codes.
- `rtl/iunit.sv` is the top level.
  - `iu_input_logic` derives the controllers' inputs: Memory_Busy, Flush,
    Miss and the latched enables.
  - `fetch_fsm` and `prefetch_fsm` are the two controllers.
  - `instruction_buffer` holds the IArray, IBRead, IBWrite, InsReg and the
    output multiplexer.
  - `tag_compare` holds the TArray, FetchPC and the block-miss logic, and
    uses `tag_comparator`.
  - `prefetcher` holds ReferencePC and the wrapping incrementer.
- `tb/tb_<module>.sv` is a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/ecache_model.sv` is a behavioural external cache. It injects busy
  cycles, and its memory holds a fixed function of the address.
- `tb/tb_iunit.sv` runs the full-size unit against that model:
  - first the reference sequences cycle by cycle (ideal miss, invalidate,
    reset then hit, trap, suspension, busy memory, disabled unit);
  - then 60,000 random cycles of code with jumps, data references,
    suspensions, invalidates and resets.

  It checks every instruction delivered and counts each mechanism.
- `tb/tb_iunit_sizes.sv` builds the unit with 64, 128 and 256 instructions
  (`NUM_BLOCKS` = 8, 16, 32). On each size it runs loops of 60, 120 and 250
  instructions through `tb/iunit_loop_run.sv`, and checks the capacity rule:
  - a loop that fits needs no fetch after its first pass, at one instruction
    per cycle;
  - a loop that does not fit keeps missing.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/iu_pkg.sv rtl/*.sv \
    tb/ecache_model.sv tb/tb_iunit.sv --top-module tb_iunit -Mdir obj_iunit
./obj_iunit/Vtb_iunit
```

For a single block, replace the testbench and top module, for example
`tb/tb_prefetch_fsm.sv --top-module tb_prefetch_fsm`. A run passes when it
prints `failures=0`. The full-size end-to-end run takes well under a second.
