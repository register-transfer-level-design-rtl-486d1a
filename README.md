# RV32 out-of-order core with Tomasulo scheduling

This is a small 32-bit RISC-V core. It keeps the classic five pipeline stages: fetch, decode, execute, memory and write-back. It does not execute instructions in program order. Decode writes each instruction into a buffer next to the unit that will run it. The instruction waits there until its source operands exist, then leaves for its unit regardless of the instructions ahead of it. This is Tomasulo's algorithm, cut down to one load path, one ALU ("adder") and one slow multiplier.

The motivating case is a long multiply. An in-order pipeline stalls everything behind it. Here, independent instructions that follow the multiply finish while it is still in flight. With the five-instruction test program below, and with programs grown to ten instructions, total run time stays at the multiply's completion time.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is checked with Verilator and the slang front end of Yosys.

## Locations: who will produce a register

Every place that can produce a register value has a small number, its *location*:

| location | buffer | unit it feeds |
|---|---|---|
| 0 | none: "the value is ready" | |
| 1, 2, 3 | load buffer entries | data memory |
| 4, 5 | multiply reservation station | multiplier + 10-cycle delay |
| 6, 7, 8 | adder reservation station | ALU |

Locations are 4 bits wide. Locations 4 to 8 and the entry counts of the two reservation stations come from the reference design. The load buffer's size (three entries) and its location range are this design's choice.

## Register result status

The register file (`reg_result_status`) has three fields per register:

- **pointer/result**: the register's value. While the register waits for a result, this field holds the producer's location instead, so a waveform shows a small number and then the final value.
- **result_status**: the busy flag.
- **store_rd_id**: the location whose result the register is waiting for.

At decode, each source register is read as either a value (location 0) or a location to wait for. If the awaited result is on the write-back bus in that same cycle, it is forwarded and the operand counts as ready. At the end of decode, the destination register is renamed to the location the instruction was given. A write-back updates a register only if the register still waits for that location. A later instruction writing the same register therefore wins, whatever order the two complete in. Register x0 reads as zero and is never renamed.

## Life of one instruction

| cycle (for add/sub/lw; mul in brackets) | what happens |
|---|---|
| IF | `fetch_unit` reads `instr_mem` at the PC and loads the IF/ID register; PC += 4 |
| ID | `control` picks the buffer; operands are read; the instruction is written into a free entry; rd is renamed. If that buffer is full, IF and ID stall. |
| wait | the entry watches the write-back bus and copies in each operand it is waiting for |
| dispatch (cycle *t*) | the lowest-numbered entry that has both operands, and has not yet been sent, goes into ID/EX |
| *t*+1 (EX) | ALU computes; a load's address passes through (the load buffer adds base and offset); the multiplier computes the product |
| (*t*+2 … *t*+11) | the product travels through the 10-stage `mul_delay_line` |
| *t*+2 (*t*+12) (MEM) | loads read `data_mem`; other results pass EX/MEM |
| *t*+3 (*t*+13) (WB) | `wb_mux` drives the write-back bus: value, location, rd |

The write-back bus writes the register result status, wakes every waiting entry whose Qj or Qk matches, and frees the producing entry. Entries stay occupied from issue until their own write-back. A location is therefore never reused while its result is still travelling down the pipeline.

## One write-back bus: slot reservation

Three units share one write-back bus, and their latencies differ: 3 cycles from dispatch for loads and ALU operations, 13 for multiplies. Without care, a multiply dispatched ten cycles before an add would reach write-back in the same cycle as the add.

The top level prevents this with a bit vector of future write-back cycles. Bit *i* means "the bus is taken *i* cycles from now", and the vector shifts down by one each cycle. The rules:

- A multiply books the slot 13 cycles ahead when it dispatches. No other unit books that far ahead, so a multiply never waits for the bus.
- A load or an ALU operation may dispatch only if the slot 3 cycles ahead is free. It then books that slot.
- If a load and an ALU operation are both ready, the load goes first.

The execution paths themselves never stall: once dispatched, an instruction reaches write-back at a fixed time. An assertion in the top level (`a_one_writeback`) checks that at most one result is in the WB stage. The slot reservation and the load-first rule are this design's own mechanism. The reference design shows a single result mux but does not say how collisions are avoided.

## Timing of the test program

The test program, with registers preloaded as x*i* = *i*, data word 7 at byte 36 and 8 at byte 48:

```
lw  x6, 34(x2)     x6  = 7
lw  x2, 45(x3)     x2  = 8
mul x11, x2, x4    x11 = 0x20   waits for x2
sub x8, x6, x3     x8  = 4      waits for x6
sub x10, x6, x2    x10 = -1     x6 forwarded at issue, waits for x2
```

Cycle 1 is the first cycle with `run` high. Values are written at the end of these cycles:

| register | this RTL | reference design |
|---|---|---|
| x6 | 6 | 4 |
| x2 | 7 | 5 |
| x8 | 10 | before x11 |
| x10 | 11 | before x11 |
| x11 | 21 | 18 |
| program ends | 21 cycles, 420 ns at a 20 ns clock | 20.5 cycles, 410 ns |

Both subtracts finish long before the older multiply, which is the point of the design. The absolute numbers differ by a few cycles. The reference design's cycle counts per instruction (lw 3, sub 5, mul 13) cannot all hold in one pipeline. This RTL follows the stage structure instead: every path crosses ID/EX, EX/MEM and MEM/WB, and multiplies also cross the 10-cycle register. A load issued in decode can dispatch in the next cycle at the earliest, which adds one more cycle.

## Instruction subset

- `lw`.
- `mul`, giving the low 32 bits.
- The RV32I register-register ALU operations: add, sub, and, or, xor, sll, srl, sra, slt, sltu.

Every other encoding, including the all-zero word, is decoded as a no-operation. There are no branches, jumps, immediates other than the load offset, or stores. The data memory's write port exists only to preload data. The in-order five-stage pipeline that the out-of-order core is normally compared against is not part of this RTL.

## Files

| file | block |
|---|---|
| `rtl/riscv_ooo_pkg.sv` | shared types: locations, write-back bus `cdb_t`, ALU codes, opcodes |
| `rtl/riscv_ooo_top.sv` | the core: issue, dispatch, slot reservation, pipeline wiring |
| `rtl/instr_mem.sv` | instruction memory, 64 words, asynchronous read, preload port |
| `rtl/fetch_unit.sv` | PC, +4, IF/ID register |
| `rtl/control.sv` | decode into target buffer, ALUOp, write enable |
| `rtl/reg_result_status.sv` | register file with renaming |
| `rtl/load_buffer.sv` | load buffer, 3 entries |
| `rtl/reservation_station.sv` | reservation station; used with 2 entries for multiply and 3 for the ALU |
| `rtl/alu_control.sv` | ALUOp + funct fields → 4-bit ALU operation |
| `rtl/alu.sv` | the ALU ("adder") |
| `rtl/multiplier.sv` | 32×32 → low 32 bits |
| `rtl/mul_delay_line.sv` | the 10-cycle multiply register |
| `rtl/data_mem.sv` | data memory, 256 words |
| `rtl/wb_mux.sv` | write-back mux onto the bus |
| `rtl/pipe_reg.sv` | ID/EX, EX/MEM, MEM/WB stage registers (type-parameterized) |

### Top-level ports

| port | meaning |
|---|---|
| `clk`, `rst` | clock; synchronous active-high reset, which clears all state including the memories |
| `run` | fetch enable; hold it low while preloading |
| `imem_we/imem_waddr/imem_wdata` | write a program word (byte address) |
| `dmem_we/dmem_waddr/dmem_wdata` | write a data word (byte address) |
| `rf_init_we/rf_init_addr/rf_init_data` | set a register |
| `dbg_addr` → `dbg_data`, `dbg_busy` | observe one register's pointer/result field and busy flag |
| `wb` | the write-back bus: `valid`, `tag` (location), `rd`, `data` |
| `issue_stall` | decode is waiting for a full buffer this cycle |
| `wb_slot_stall` | a ready load or ALU operation is waiting for its write-back slot |
| `idle` | no buffer entry is busy and no write-back slot is booked |

Parameters of the top level: `IMEM_WORDS` = 64, `DMEM_WORDS` = 256 and `MUL_DELAY` = 10. Buffer sizes and location bases are in the package.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/riscv_ooo_pkg.sv tb/tb_riscv_ooo_top.sv --top-module tb_riscv_ooo_top
./obj_dir/Vtb_riscv_ooo_top
```

Replace the testbench name to run another one.

- `tb_riscv_ooo_top` runs the core at its default parameters on two programs:
  - the test program above, with the write-back cycle of every result checked, and with a check that in cycle 6 the pending registers hold their producers' locations (x2 = 2, x11 = 4, x8 = 6, x10 = 7);
  - a 27-instruction mix that fills the multiply station, collides on the write-back slot, and writes one register first from a multiply and then from an add.

  Final registers are compared with a sequential instruction model in the testbench. The test also counts each mechanism and fails if one never occurs: issue stall, slot stall, waiting on a location, forwarding at issue, out-of-order completion, load-first dispatch.
- `tb_workload_scaling` grows the test program from 5 to 10 instructions with independent ALU instructions. It checks that the end time stays at cycle 21.
- Block tests: `tb_instr_mem`, `tb_data_mem`, `tb_fetch_unit`, `tb_control`, `tb_alu_control`, `tb_alu`, `tb_multiplier`, `tb_mul_delay_line`, `tb_wb_mux`, `tb_pipe_reg`, `tb_reg_result_status`, `tb_load_buffer`, `tb_mul_rs` and `tb_add_rs`. The register status, load buffer and reservation stations are each run against a behavioural model in their testbench under random traffic.

## Changing the design

- **Multiply latency.** `MUL_DELAY` on the top level sets the depth of the delay line. The slot-reservation vector follows it automatically.
- **Buffer sizes.** Change `LB_ENTRIES`, `MRS_ENTRIES` or `ARS_ENTRIES`, and the matching `*_BASE`, in `riscv_ooo_pkg`. Keep the location ranges disjoint and non-zero. Widen `TAG_W` if the highest location exceeds 15.
- **New ALU operations.** Extend `alu_op_e`, `alu_control` and `alu`, and let `control` send the new encoding to `UNIT_ADD`.
- **A unit with another latency.** Give it its own path through the stage registers, a select on `wb_mux`, and a booking distance in the slot-reservation vector.
