# Fast stores for multi-level-cell NVM, and a parallel nvRAM controller

Multi-level-cell (MLC) non-volatile memories can be written in two ways. A
careful, slow write places each cell level precisely and the data lasts a long
time. A quick write is cheaper but holds the data for a shorter time. This
design lets software choose per store. It adds four fast-store instructions to
a 64-bit RISC-V memory path, and it lets the data cache route whole lines to a
fast or a slow write path. Alongside this there is a small AXI4 memory
controller for off-the-shelf x16 parallel nvRAM parts (STT-MRAM, FRAM).

The two halves share only clock and reset. The commercial nvRAM parts offer no
choice of write mode. So the fast/slow write modes are emulated: an SRAM sits
behind two peripherals, and one of them delays every write.

## Block map

```
 instr + rs1/rs2 ──► rv_store_decode ──► rv_exec_mem ──► fs_dcache ──► mlc_router
                                                                        │ MSB=0      │ MSB=1
                                                              mlc_delay_periph   mlc_delay_periph
                                                               (slow, 5 cycles)   (fast, 0 cycles)
                                                                        └──► mlc_ram_arb ──► mlc_sram

 AXI4 slave (32 bit) ──► nvram_ip = nvram_axi_fsm ──► nvram_driver ──► CE_n[3], OE_n, WE_n,
                                                                      UB_n, LB_n, A[17:0], DQ[15:0]
```

`nvm_mlc_top` instantiates both chains. Packages: `rv_fs_pkg` holds the
memory path's types: instruction index, request packages and bus structs.
`nvram_pkg` holds the AXI structs and the state enums.

## The fast-store instructions

The fast stores use the STORE major opcode (`0100011`). They take the funct3
codes that RV64I leaves free there:

| funct3 | mnemonic | width |
|---|---|---|
| 4 | `sbf` | byte |
| 5 | `shf` | half |
| 6 | `swf` | word |
| 7 | `sdf` | double |

The encoding is otherwise the ordinary S-type: `rs2` is the data, `rs1` the
base, and a 12-bit split immediate.

- **Decode.** `rv_store_decode` produces a one-hot vector over the 15
  load/store instructions, with one new bit per fast store. It also produces
  the usual fields: load/store, size, unsigned, registers, immediate. Its
  `fast` flag is simply "store with funct3[2] set".
- **Execute.** `rv_exec_mem` computes `rs1 + sext(imm)` and shifts the store
  data onto its byte lanes. It builds the byte strobes and registers one
  request package (`mem_req_t`) for the cache. The package carries the fast
  flag next to the store flag and the size. Load answers are shifted, cut and
  sign- or zero-extended. Misaligned accesses are flagged on `misaligned` and
  dropped; there is no trap logic.

## Cache: deciding fast or slow per line

`fs_dcache` is the part that needs the most care.

- It is a direct-mapped, write-allocate, write-back cache. Each line holds four
  64-bit double words and has a valid bit and a dirty bit.
- Each line also has **four fast flags, one per double word**.
  - Every store to a double word sets that word's flag to the store's fast bit.
    A fast store sets it; an ordinary store clears it.
  - A line fill clears all four flags.
- When a dirty line leaves the cache, it is written back as four incrementing
  64-bit beats. Eviction and flush behave the same.
- **If all four flags are set**, the write-back address gets **bit 47 (the
  MSB) = 1**. Otherwise the address goes out unchanged.
- Consequence: a line counts as fast only if all of it was written by fast
  stores since it was brought in. A line partly written fast goes the slow way.
- Fills always use MSB 0. Reads are never delayed.

Timing:

- A hit answers 2 cycles after the request is accepted.
- A miss costs a write-back of 4 beats, if the line is dirty, plus a fill of
  4 beats.
- `flush_req` writes back every dirty line and then pulses `flush_done`.
- `ev_hit`, `ev_miss`, `ev_wb_fast` and `ev_wb_slow` pulse once per event.

Not modelled: the "shared" coherence bit of a multi-core cache. There is one
requester.

## Emulated write modes

The memory side uses a simple request/response bus (`mbus_req_t`). A request
is write, 48-bit address, 64-bit data and byte strobes, with a
`valid`/`ready` handshake. Responses come back in order, at least one cycle
later, for reads and writes alike.

- `mlc_router` selects the target by the address MSB. Before it switches
  target, it waits until all outstanding responses have returned, so answers
  never cross.
- `mlc_delay_periph` holds each write back by `WRITE_DELAY` cycles.
  - Its counter `clk_ticks` runs while a write is waiting. The write's ready,
    and so its response, comes when the counter reaches the delay.
  - With the default delay of 5, back-to-back slow writes are accepted once
    every 6 cycles; fast writes are accepted every cycle.
  - It clears the MSB, so both modes reach the same SRAM words.
  - The delay is a parameter and can be changed freely.
- `mlc_ram_arb` gives the slow peripheral fixed priority. It locks the grant
  to one owner while that owner's responses are outstanding.
- `mlc_sram` is a 64-bit SRAM with byte strobes. It is always ready and
  answers one cycle later.

## The nvRAM controller

`nvram_ip` is an AXI4 slave with 32-bit data. Its AXI4 side:

- Bursts: INCR and FIXED; WRAP is treated as INCR.
- Responses: always OKAY.
- No IDs.
- Write has priority when both directions arrive together.

Its memory side serves x16 asynchronous parts, so every AXI word is split into
two 16-bit accesses, lower half first.

**State machine (`nvram_axi_fsm`).** It has nine states:

- `IDLE`;
- the write states `WRITE_LOW`, `WRITE_UP`, `WRITE_BURST`, `WRITE_WAIT`;
- the read states `READ_LOW`, `READ_UP`, `READ_BURST`, `READ_WAIT`.

How a transfer moves through them:

- `IDLE` accepts AW, together with the first W beat when it is already
  valid, or AR.
- Each beat passes through `*_LOW` and/or `*_UP`.
- A half that is not needed is skipped:
  - for writes, a half whose two byte strobes are both zero;
  - for reads, a 1- or 2-byte beat that does not touch that half.
- Between beats of a burst, `WRITE_BURST` waits for the next W beat, and
  `READ_BURST` hands out an R beat and advances the address.
- `WRITE_WAIT` returns B; `READ_WAIT` returns the last R beat.

**Address map.** Byte address bits `[MEM_ADDR_W:1]` are the half-word address
in a part. The bits above them select the part. With the defaults, each part
has a 512 KB window.

**Driver (`nvram_driver`).** It runs one 16-bit access as timed phases of
10 ns cycles. The default phase lengths suit 55–70 ns parts.

| Access | Phases | Cycles per phase | Total | What happens |
|---|---|---|---|---|
| Read | enable, wait, read, end | 1, 6, 1, 1 | 9 | CE and OE go low; the data is sampled in the read phase |
| Write | enable, write, recovery | 1, 5, 1 | 7 | WE is low and the data is driven during the write phase; the data stays on the bus during recovery |

- Each part has its own chip enable. OE, WE, address and data are shared.
- UB/LB byte strobes make byte writes possible.
- The data bus is split into `dq_o`, `dq_oe` and `dq_i`, for a tristate pad
  outside the design.
- Assertions check two things:
  - at most one chip enable is active;
  - OE and WE are never low together.

**Latency at the defaults.** From the AXI handshakes:

| Transfer | Cycles |
|---|---|
| One full-word write | 2 × (7 + 2) = 18 |
| One full-word read | 2 × (9 + 2) = 22 |

A skipped half saves its share. The FRAM sleep pin is not driven.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| top | `CACHE_LINES` | 128 | cache lines (4 KB) |
| top | `SRAM_WORDS` | 16384 | 64-bit SRAM words (128 KB) |
| top | `SLOW_DELAY` / `FAST_DELAY` | 5 / 0 | extra cycles per write in each mode |
| top, nvram_* | `NUM_CHIPS` | 3 | nvRAM parts |
| top, nvram_* | `MEM_ADDR_W` | 18 | half-word address bits (4 Mbit x16 part) |
| nvram_driver/ip | `T_RD_EN, T_RD_WAIT, T_RD_END` | 1, 6, 1 | read phase lengths |
| nvram_driver/ip | `T_WR_EN, T_WR_PULSE, T_WR_REC` | 1, 5, 1 | write phase lengths |

## Where this departs from the original platform, and what is missing

Taken from the original description:

- the funct3 4–7 encoding and the instruction-vector bits;
- the fast flag carried in the execute-to-cache package;
- four double words per line with a fast flag each, and the all-four rule
  with the MSB;
- incrementing write-back bursts;
- the 5-cycle slow write;
- the 48-bit address and 64-bit data of the memory bus;
- the 16/32-bit split with skipped halves and bursts in the AXI converter;
- the state names;
- the read and write phase sequences;
- three parts with shared OE/WE, the 100 MHz clock, and the part sizes.

This design's own choices:

- **State machine.** The transitions between the named states.
- **Phase timing.** The phase lengths.
- **Pins.** One chip enable per part. The original board description speaks
  of shared chip select, while its board figure shows separate control lines.
  The UB/LB byte strobes are also added here.
- **Cache organisation.** Direct mapping, write-allocate, the line count, and
  the rule that an ordinary store clears a fast flag.
- **Memory side.** The simple valid/ready bus in place of full AXI, the router
  and arbiter rules, and the SRAM size.
- **Reset.** A synchronous, active-low reset.

Not included:

- the RISC-V core itself (fetch, register file, ALU, pipeline control). The
  top takes memory instructions with their operand values instead.
- the SPI path to a serial ReRAM. It is vendor AXI-SPI IP plus pin mapping.
- the board: regulators, current sensing, EEPROM, LEDs.
- the nvRAM parts themselves.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | Checks |
|---|---|
| `tb_nvram_driver` | phase timing, latency 9/7, bus contention, data through three part models |
| `tb_nvram_axi_fsm` | half-word placement, accesses per beat, skipped halves, bursts, use of all nine states |
| `tb_nvram_ip` | the controller against part models, including AXI latency 18/22 |
| `tb_rv_store_decode` | every load/store/fast-store encoding and other opcodes |
| `tb_rv_exec_mem` | address, lanes, strobes, flags, load extension, misalignment |
| `tb_fs_dcache` | random traffic against a reference, fast/slow choice from independently tracked flags, burst shape, hit latency, flush contents |
| `tb_mlc_router`, `tb_mlc_delay_periph`, `tb_mlc_ram_arb`, `tb_mlc_sram` | the memory-side pieces |
| `tb_nvm_mlc_top` | end to end at the default sizes; each mechanism (hit, miss, fast and slow write-back, write delay, each fast store, misalignment, flush, each controller state) must occur |
| `tb_nvram_transfer` | 64-byte transfers to each part, as one burst and as single words: data, cycle count, burst gain; prints ns per byte |
| `tb_stream_workload` | a 16 KB array stored with `sd` and then with `sdf`, flushed and read back; prints both cycle counts |

`tb/nvram_chip_model.sv` is a behavioural x16 asynchronous part. It returns
garbage until its access time has passed. It also counts write pulses that are
too short.

With Verilator 5 (packages first):

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  --top-module tb_nvm_mlc_top rtl/nvram_pkg.sv rtl/rv_fs_pkg.sv tb/tb_nvm_mlc_top.sv
./obj_dir/Vtb_nvm_mlc_top
```

Substitute any other testbench name. The testbenches do not rely on
x-propagation. They reset or initialise everything they read.

**Results at the defaults.**

- Streaming workload: the fast-store run takes 16003 cycles against 26243 for
  ordinary stores, about 39 % fewer.
- The program is nothing but stores. Real programs do other work between
  stores, so their gain is much smaller; a streaming benchmark with ordinary
  program work around it gained about 7–8 % on the original FPGA platform.
- 64-byte transfers to the nvRAM parts: 47.7 ns per byte written and
  57.7 ns per byte read as one burst, against 50 and 60 ns per byte as single
  transfers. Bursts save one cycle per word here, because the 16-bit accesses
  dominate. The driver uses one set of phase lengths for all parts, so
  faster MRAM parts gain only if the phase lengths are lowered to match.
- Generic synthesis (Yosys) of the whole top gives about 3000 cells and 647
  flip-flop bits, besides the cache and SRAM arrays. The nvRAM controller
  alone is about 240 cells and 157 flip-flop bits.
