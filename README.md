# Five-stage pipelined PowerPC-subset processor

This is synthesizable SystemVerilog for a classic five-stage pipeline (IF, ID, EX, MEM, WB) that runs a small subset of the 32-bit PowerPC instruction set. It has a branch predictor, precise traps and interrupts, and separate instruction and data caches. The two caches share one external memory bus. The top module is `ppc_top`.

## Instruction subset

| class | instructions |
|---|---|
| arithmetic | `addic`, `addic.`, `addc`, `adde`, `subfc` (with OE and Rc forms) |
| logical | `and`, `or`, `nand`, `orc` (with Rc) |
| shifts | `slw`, `srw`, `sraw` |
| compares | `cmp`, `cmpl` (to any CR field) |
| loads | `lwz`, `lwzu`, `lbzu`, `lwzx`, `lwzux`, `lbzux` |
| stores | `stw`, `stwu`, `stbu`, `stwx`, `stwux`, `stbux` |
| SPR moves | `mtspr`, `mfspr` for XER, LR and CTR |
| branches | `bc` (relative or absolute, with link), `bcr` (branch to LR) |
| other | `rti` (return from interrupt) and `halt` (primary opcode 63) |

Any other encoding raises the illegal-instruction trap. Bits are numbered `[31:0]` in the RTL. PowerPC bit 0 is RTL bit 31. The field helpers in `ppc_pkg` hide this mapping.

## Pipeline

- **IF**
  - Reads the instruction cache at PC.
  - Looks up the branch predictor (`branch_predictor`) with the same PC. The predictor holds 2-bit counters and targets, indexed by PC[4:0].
  - `choose_pc` picks the next PC. Priority, highest first:
    1. trap handler
    2. resolved (mispredicted) branch
    3. `bcr`/LR
    4. `rti`/SRR0
    5. predicted target
    6. PC+4
  - A fetched `halt` freezes the PC.
- **ID**
  - `opcode_decoder` builds the control word.
  - `gpr_regfile` reads RA, RB and RS. The register file has two write ports and bypasses a same-cycle write.
  - `hazard_detect` raises the load-use stall and the forwarding flags.
- **EX**
  - `forward_select` picks each operand from EX/MEM port 1 or 2, MEM/WB port 1 or 2, or the register file.
  - `super_alu` does the add, logic and mask-based shift.
  - `cr_register`, `xer_register`, `lr_register`, `ctr_register` and `spr_logic` update the special registers.
  - `branch_logic` evaluates BO/BI.
  - A branch whose direction or target differs from the prediction is a *branch hazard*. It redirects the PC, turns IF/ID and ID/EX into bubbles, and updates the predictor.
- **MEM**
  - Data-cache access.
  - A store whose data register is loaded by the instruction just ahead gets its data from WB here.
- **WB**
  - Writes RT (port 1) and, for update forms and logical/shift results, RA (port 2).
  - A `halt` reaching WB starts a data-cache flush. `halted` goes high once every dirty line is written back.

**Stalls:**
- An instruction-cache miss feeds bubbles into ID.
- A data-cache miss holds the whole pipeline. EX-stage side effects are gated so they happen once.
- A load-use hazard holds PC and IF/ID for one cycle.

## Traps and interrupts

`trap_interrupt` takes these events:
- an IF alignment exception
- an ID illegal instruction
- a MEM alignment exception
- two external interrupt lines

It invalidates the faulting stage and all younger stages and lets the older instructions finish. It then saves the PC and MSR in SRR0/SRR1 and jumps to `HANDLER_ADDR` (0x0FFF_F000). `rti` returns to SRR0 and restores the MSR from SRR1. Both happen in IF, as in the original design.

## Caches and bus

- **Caches (`cache`):**
  - 256 bytes each: 8 sets, 2 ways, 16-byte lines.
  - Write-back and write-allocate, with one LRU bit per set.
  - Big-endian byte lanes.
- **`cache_tlb_seg`** wraps each cache:
  - Addresses 0xC000_0000 and up bypass the cache as single-word I/O on `io_wdata`/`io_rdata`.
  - It raises the alignment exception.
  - Translation is the identity: the segment registers and the TLB are not modelled.
- **`bus_arbiter`** grants the bus to one cache at a time, with the data cache first. Grants are registered.

**Memory handshake:**
1. The processor drives `mem_req`, `mem_addr` (line address, or word address for I/O), `mem_we` and `mem_wdata`.
2. The memory answers after any latency with a one-cycle `mem_valid`. For a read, `mem_rdata` comes with it.
3. The memory then leaves one idle cycle before the next request.

`tb/mem_model.sv` is a behavioural model of this bus.

## Departures from the original design

- Everything runs on one rising clock edge with synchronous active-high reset. The original mixes edges and delay chains.
- The cache controllers are ordinary state logic. The original reads them from ROMs whose contents are not given.
- The shift masks are computed, not read from a ROM.
- The memory handshake signal names and timing are this design's own. The original memory module is not described.
- SRR0 takes the PC of a MEM exception in the cycle the exception is thrown. The original design saves it one cycle early.
- SRR0 is also saved for external interrupts.
- An instruction behind a mispredicted branch may not trap. An interrupt waits one cycle in that case.
- The word fetched while the PC is loaded with the handler address is dropped.
- Not implemented:
  - Address translation (segment registers and the 5-entry TLB), so no page-fault or protection exceptions.
  - The external memory module.

## Simulation

Every testbench is self-checking. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/ppc_pkg.sv tb/ppc_top_tb.sv --top-module ppc_top_tb
./obj_dir/Vppc_top_tb            # add +trace for a per-cycle pipeline printout
```

The other blocks work the same way, for example `tb/cache_tb.sv` with `--top-module cache_tb`.

`ppc_top_tb` runs the processor at full size with no parameter overrides. It runs a hand-assembled program that covers every instruction class, each forwarding path, the stalls, the predictor, cache misses and writebacks, I/O, every trap source, `rti` and the final flush. It checks the registers and memory and also counts each mechanism, so one that never fires is a failure.
