# RV32XSoC: a small Linux-capable RISC-V system on chip

RV32XSoC is a deliberately compact system on chip. It holds the least
hardware a Unix-like kernel (Linux or xv6) needs. The processor implements
RV32IMA with Zicsr and Zifencei, the machine, supervisor and user privilege
modes, and Sv32 paging. It is an in-order five-stage pipeline with small
caches, TLBs and a branch target buffer.

Around the processor sit a boot ROM, a CLINT (timer and software interrupt)
and a PLIC (external interrupts). A UART serves as the console and an SPI
master talks to an MMC/SD card used as the disk. A port to external memory
is brought out for the SDRAM.

This SystemVerilog is a re-implementation of the RV32XSoC architecture, whose
original was written in the NSL hardware language. The structure sizes, the
pipeline split, the hazard list, the memory map and the interrupt wiring
follow the original. The bus, the register maps of the devices, the cache
policies and the stall/flush mechanics are this design's own. They are marked
as such below and in the opening comment of each file.

## The SoC and its memory map

```
                    +-----------------------------+
 msip, mtip  <------| CLINT   0x0200_0000-0x0200_BFFF
 meip, seip  <------| PLIC    0x0C00_0000-0x1BFF_FFFF <-- irq 1 UART, 2 SPI, 3..31 ext_irq
                    |
 rv32x_core --bus-->| soc_bus | BOOTROM 0x0000_0000-0x0000_3FFF
                    |         | UART    0x4000_0000-0x4000_0FFF  --> uart_txd / uart_rxd
                    |         | SPI     0x4000_1000-0x4000_1FFF  --> spi_* (MMC card)
                    |         | memory  0x8000_0000-0x83FF_FFFF  --> mem_req / mem_rsp ports
                    +-----------------------------+
```

`rv32x_integration` is the top. The core is the only bus master. `soc_bus`
decodes the address and forwards the request to one of six slaves. An access
outside every region is answered with zero, so software probing the map
does not hang. Main memory (64 MiB) is not part of the RTL: the top brings
the bus out as `mem_req`/`mem_rsp`. The testbenches connect a behavioural
memory (`tb/mem_model.sv`) there. On an FPGA this is where an SDRAM
controller goes.

### The bus

Every link uses `bus_req_t {valid, we, addr, wdata, wstrb}` and
`bus_rsp_t {ack, rdata}` from `rv32x_pkg`:

- The master raises `valid` with a word address and byte strobes.
- It holds the request unchanged until the slave returns a one-cycle `ack`.
  The read data is valid in that same cycle.
- A master may start a new request the cycle after the ack, not during it.
- The SoC devices always ack one cycle after the request.
- External memory may take as long as it likes.

`soc_bus` carries an assertion for the hold rule. There is one outstanding
access and no bursts. A cache line refill is four single-word reads.

## The pipeline

| stage | work | what can hold it |
|---|---|---|
| Ifetch | instruction TLB (4 entries), instruction cache (4 KiB direct-mapped), BTB lookup (32 entries, 2-bit counters) | cache or TLB miss |
| Decode | decoder, immediate generator, register file read | RAW on a load, AMO or CSR result still in Execute; taken branch/jump resolved in Execute |
| Execute | ALU, branch resolution and BTB update, forwarding, multiply/divide unit | MUL (2 cycles), DIV/REM (34 cycles) |
| Memory | loads, stores, AMO, LR/SC through the data TLB (32 entries) and data cache (4 KiB 2-way), CSR access, all traps | data cache miss, TLB miss (page walk), AMO, uncached access, FENCE.I, SFENCE.VMA |
| Writeback | register file write | nothing |

### Stalls and flushes

There is one rule per stage. A held stage keeps its pipeline register and
sends a bubble to the stage after it. Every older stage is then held as
well.

- A Memory stall freezes the whole pipe.
- A multiply/divide stall freezes Ifetch to Execute and feeds bubbles into
  Memory.
- A load-use stall freezes Ifetch and Decode for one cycle and puts a bubble
  into Execute. The value exists only after the Memory stage. CSR reads and
  AMOs count as loads here.

While Execute waits, for example on a divide, its operands are re-read
through the forwarding paths every cycle. A producer that moves on to
Writeback during the wait is therefore not lost.

Flushes come from two places:

- **Execute.** A branch or jump whose outcome or target differs from the
  Ifetch prediction flushes Ifetch and Decode and restarts fetch. The
  penalty is two cycles. A correct prediction costs nothing.
- **Memory.** A trap, MRET/SRET, FENCE.I, SFENCE.VMA or any CSR instruction
  flushes every younger stage and restarts fetch at the next instruction or
  the trap vector. As a result, a change of privilege, `satp`, `mstatus` or
  the instruction stream is always seen by the following instruction. Other
  interlocks are not needed.

FENCE needs no action. The data cache is write-through and the core has a
single memory port, so all earlier stores have reached memory in order.

### Forwarding

`fwd_unit` compares the Execute stage's source registers with the
destinations in Memory and Writeback. The newer producer wins. A write in
Writeback and a read in Decode in the same cycle meet inside the register
file, which passes the write data through. The only data hazard left over
is the one-cycle load-use bubble.

### Branch prediction

The BTB is direct-mapped on `pc[6:2]` with a full tag.

- A hit with counter >= 2 redirects fetch to the stored target in the same
  cycle.
- Execute updates the entry for every branch and jump.
- A taken branch that misses allocates an entry with counter 2.
- An existing entry counts up on taken and down on not taken.

## Traps and interrupts

All traps are taken in the Memory stage, in program order:

- An exception found earlier (fetch page fault, illegal instruction, ECALL,
  EBREAK, misaligned target) travels with its instruction and is taken when
  that instruction reaches Memory.
- Load/store faults are found by the load-store unit in Memory itself.

`csr_file` computes the trap target with `medeleg`/`mideleg` delegation. It
saves `xepc`, `xcause`, `xtval` and the previous privilege and
interrupt-enable bits, and handles MRET and SRET. `mtvec`/`stvec` may be
direct or vectored.

Interrupts follow the privileged specification:

| Interrupt | Source | Pending bit |
|---|---|---|
| Software | CLINT | `mip.MSIP` |
| Timer | CLINT | `mip.MTIP` |
| External, machine | PLIC context 0 | `mip.MEIP` |
| External, supervisor | PLIC context 1 | `mip.SEIP` |

Software may also set SSIP and STIP. Enables come from `mie`, `mstatus.MIE`
and `mstatus.SIE`, the current privilege and `mideleg`. The priority is
MEI > MSI > MTI > SEI > SSI > STI.

An interrupt is attached to the instruction in Memory. That instruction has
not yet done anything, and its PC becomes `xepc`. Three precautions matter
here. They correspond to failures of exactly this kind that kept Linux and
xv6 from running on the original design:

1. **No instruction executes twice around an interrupt.** An interrupt is
   accepted only in the first cycle an instruction spends in Memory, before
   any bus access has started. An instruction that has begun a memory
   access, such as a store, an AMO or a device read, always completes first.
   The interrupt is then taken on the next instruction. An interrupted
   `addi a0, a0, 1` is therefore executed exactly once after the return.
2. **AMOs are indivisible.** An AMO reads the word, computes the new value in
   `amoalu` and writes it back as one Memory-stage operation. It cannot be
   split by a trap or a flush, so a FENCE in front of an AMOSWAP cannot make
   it run twice.
3. **Machine and supervisor trap state are separate.** A machine interrupt
   arriving right after a trap into S-mode saves only `mepc`/`mcause`/
   `mstatus.MPP`/`MPIE`. After MRET the supervisor handler continues with
   its `sepc`/`scause` intact.

`tb_rv32x_core` reproduces all three situations under thousands of random
interrupts.

## Virtual memory and caches

Translation is Sv32:

- `satp.MODE` = 1 enables it for S- and U-mode fetches.
- Data accesses also use `mstatus.MPRV`/`MPP`.
- Both TLBs are fully associative and hold 4 KiB pages as well as 4 MiB
  megapages. They are flushed whole by SFENCE.VMA or a write to `satp`.

A TLB miss starts the one page walker (`ptw`), which is shared by both TLBs
and reads PTEs over the core's bus. The walker checks V, R/W/X consistency
and megapage alignment.

The R/W/X/U permission checks, with SUM and MXR, are done at the TLB. So are
the A and D checks. Neither the TLB nor the walker sets A or D. An access
that would need a bit set raises a page fault, as the specification allows,
and the kernel sets the bit itself.

Both caches are built from `cache`:

- Lines are 16 bytes and refilled one word at a time.
- Read hits complete in the same cycle.
- Writes go through to memory and update the line only if it is present.
  There is no write-allocate.
- The 2-way data cache replaces the least recently used way.
- Only physical addresses with bit 31 set (main memory) are cached. Device
  registers always go to the bus.

Because memory is always current, FENCE.I only has to invalidate the
instruction cache. An invalidation that arrives during a refill also
discards the line being filled.

The page walker, data cache and instruction cache share the core's bus port
through `mem_arbiter`, in that order of priority. A grant is held until its
ack.

## Devices

### Boot ROM

The boot ROM is 16 KiB. The core starts at address 0. The ROM loads `a0`
with `mhartid` and jumps to 0x8000_0000. Whatever is placed in main memory
there then runs in M-mode: a firmware such as OpenSBI, or a test program.
The ROM words are computed in SystemVerilog.

### CLINT

| Offset | Register |
|---|---|
| 0x0 | `msip` (bit 0) |
| 0x4000 / 0x4004 | `mtimecmp` low/high |
| 0xBFF8 / 0xBFFC | `mtime` low/high |

- `mtime` counts every clock (50 MHz); `TICK_DIV` can slow it.
- `mtip` is high while `mtime >= mtimecmp`.
- `mtimecmp` resets to all ones, so no timer interrupt is pending after
  reset.

### PLIC

The PLIC has 31 sources, 3-bit priorities (0 disables a source) and two
contexts. The standard register layout applies:

| Offset | Register |
|---|---|
| 4·id | priority |
| 0x1000 | pending |
| 0x2000 + 0x80·ctx | enables |
| 0x200000 + 0x1000·ctx | threshold |
| 0x200004 + 0x1000·ctx | claim/complete |

- Sources are level-sensitive.
- A claimed source stays masked until it is completed.
- Context 0 drives MEIP and context 1 drives SEIP.
- The UART is source 1 and the SPI master is source 2.

### UART (8N1, no parity)

| Offset | Register |
|---|---|
| 0x0 | TXDATA (write queues a byte) |
| 0x4 | RXDATA (bit 8 valid, bits 7:0 data; the read pops) |
| 0x8 | STATUS (bit 0 rx ready, bit 1 tx full, bit 2 tx idle) |
| 0xC | IE (bit 0 rx data, bit 1 tx empty) |

- Each direction has a 16-byte FIFO.
- `DIV` = 1302 clocks per bit gives 38400 bit/s at 50 MHz.
- The receiver synchronises the input and samples mid-bit. It drops frames
  with a bad stop bit, then waits for the line to return high before it
  looks for the next start bit.

### SPI master for MMC/SD

| Offset | Register |
|---|---|
| 0x0 | DATA (write starts a byte exchange, read gives the received byte and clears done) |
| 0x4 | STATUS (bit 0 busy, bit 1 done) |
| 0x8 | CTRL (bit 0 chip select, bit 1 interrupt enable) |
| 0xC | DIV |

- The bus runs in SPI mode 0, MSB first.
- One bit takes 2·(DIV+1) clocks. DIV = 0 gives 25 MHz; software raises
  DIV to 62 or more for the ≤400 kHz card start-up.
- Card commands, CRCs and data tokens are handled by the driver.

## Verifying and simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. All of them are plain Verilator programs:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rv32x_pkg.sv \
          tb/tb_rv32x_full.sv --top-module tb_rv32x_full -Mdir obj -o sim
./obj/sim
```

Run from the repository root; the test programs are read as
`tb/prog_*.hex`. Swap the testbench name to run any other test.

The system-level tests are:

- **`tb_rv32x_full`** runs the SoC with every parameter at its default. The
  boot ROM hands over to a test program in memory (`tb/prog_top.hex`).
  That program covers:
  - forwarding, load-use, branches, MUL/DIV, sub-word accesses, AMOs and
    LR/SC;
  - ECALL and illegal-instruction traps, and a U-mode call;
  - FENCE.I after patching code;
  - "OK" on the UART at 38400 bit/s and a byte exchanged on the SPI;
  - a CLINT timer interrupt and a UART receive interrupt through the PLIC;
  - S-mode code under Sv32, with a TLB refill, a delegated page fault and
    an ECALL from S-mode.

  It checks 28 result words, the UART text and the SPI byte. It also counts
  16 pipeline mechanisms and fails if any of them never happened: forwarding,
  load-use stall, mispredict, BTB hit, cache refills, MUL/DIV stall,
  exception, interrupt, page walk, translated access, AMO, SC failure,
  FENCE.I, Memory stall, and bus contention. It takes well under a second
  of simulation.
- **`tb_rv32x_integration`** is the same test with a 16-clock UART bit time.
- **`tb_rv32x_core`** runs the core alone (reset PC 0x8000_0000) on
  `tb/prog_core.hex`. The program:
  - sorts 32 pseudo-random words and computes a checksum, which the
    testbench recomputes;
  - runs FENCE/AMOSWAP/AMOADD sequences;
  - counts to 3000 with an AMO in the loop while a random software, timer
    or external interrupt arrives every ~24 cycles;
  - executes 500 illegal instructions in S-mode, delegated to an S-mode
    handler, while machine interrupts keep arriving.

- **`tb_rv32x_dhrystone`** runs Dhrystone 2.1 on the SoC at its default
  parameters (`tb/prog_dhry.hex`: GCC -O2, RV32IMA, no C library, 100
  runs). The memory latency is 4 cycles. It checks every final variable
  against the values the benchmark defines as correct, and measures the
  loop with `mcycle` and `minstret`. The result is 822 cycles per run and
  CPI 2.0, which is **0.69 DMIPS/MHz**. Stores dominate the lost cycles:
  with a write-through data cache, each store waits for memory.

The test programs are assembled for address 0x8000_0000. Each testbench
header describes what its program does.

## Where this design departs from the original

- **Implementation language and partitioning.** The original fetch unit and
  the pipeline description are merged into `rv32x_core`. The adder,
  subtractor and shifter are part of `alu32`. The multiplier and divider are
  part of `munit32`.
- **Memory bus, device register maps and PLIC source numbers** are this
  design's own. Software drivers written for the original devices will not
  run unchanged.
- **SPI interface.** The original block is large and presumably handles part
  of the MMC protocol in hardware. Here it is a byte-wide SPI master, and
  the protocol lives in software.
- **Multiply/divide latency, cache line size, write-through policy, BTB
  organisation and TLB replacement** are not known from the original and
  were chosen for simplicity.
- **Performance.** The original reports 0.448 DMIPS/MHz (Dhrystone, GCC -O2)
  and about 48 MHz on a Cyclone V. This design reaches 0.69 DMIPS/MHz with
  a 4-cycle memory. The two figures are not directly comparable, because
  the original's SDRAM latency is unknown. The clock rate was not measured;
  it depends on the FPGA flow.
- **Not built.** The original's debug signals and its host-side simulator
  are not built. Neither are the SDRAM controller or the memory itself: main
  memory is outside the RTL.
- **Not simulated.** Booting Linux or xv6 was not simulated. The 64 MiB
  memory window and the implemented ISA, privilege modes, paging and devices
  are what those kernels need.

## Files

| File | Contents |
|---|---|
| `rtl/rv32x_pkg.sv` | Shared types: bus, control bundle, opcodes, CSR numbers, trap causes. |
| `rtl/rv32x_integration.sv` | SoC top. |
| `rtl/soc_bus.sv` | Address decoder. |
| `rtl/rv32x_core.sv` | Pipeline. |
| `rtl/alu32.sv`, `munit32.sv`, `imm_gen.sv`, `inst_dec.sv`, `reg32.sv`, `fwd_unit.sv`, `btb.sv` | Pipeline pieces. |
| `rtl/tlb.sv`, `ptw.sv`, `cache.sv`, `load_store_unit.sv`, `amoalu.sv`, `mem_arbiter.sv` | Memory system. |
| `rtl/csr_file.sv` | CSRs, privilege and traps. |
| `rtl/bootrom.sv`, `clint.sv`, `plic.sv`, `uart.sv`, `uart_sender.sv`, `uart_reciever.sv`, `fifo.sv`, `mmcspi.sv` | Devices. |
| `tb/mem_model.sv` | Behavioural main memory with configurable latency. |
| `tb/tb_*.sv` | Testbenches. |
| `tb/prog_top.hex`, `tb/prog_core.hex`, `tb/prog_dhry.hex` | Test programs. |
