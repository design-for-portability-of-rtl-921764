# ComBlock: a portable processor–FPGA communication block

In a SoC FPGA (a hard processor and programmable logic on one chip) the
hardest part to move from one device family or vendor to another is
usually the glue between the processor bus and the FPGA logic. The
ComBlock idea is to put all of that glue into a single reusable block.
The processor ("uP") sees a small memory-mapped peripheral. The FPGA logic sees
plain registers, FIFO ports and a RAM port. Neither side ever touches the SoC
interconnect directly, so porting a design means porting the ComBlock only.

This repository holds synthesizable SystemVerilog for:

- the ComBlock itself (`comblock`): register banks, two dual-clock FIFOs and a
  true dual port RAM behind one AXI4-Lite slave;
- the FPGA half of the *logical level*: a flag protocol that hands whole blocks of
  data through the shared RAM without collisions (`cb_logic_fpga`);
- an example acquisition subsystem built on top of the ComBlock (`daq_top`):
  ADC samples are decimated, streamed to the processor through a FIFO and
  histogrammed into the shared RAM.

## The shared map

Both sides address the same resources at the same word offsets:

| word offset       | resource   | uP side                        | FPGA side                      |
|-------------------|------------|--------------------------------|--------------------------------|
| 0x00 – 0x0F       | M2F regs   | write (and read back)          | `reg_o[0..15]`                 |
| 0x10 – 0x1F       | F2M regs   | read                           | `reg_i[0..15]`                 |
| 0x20              | M2F FIFO   | write pushes; **read returns FIFO status** | `fifo_re_i`, `fifo_data_o`, empty/aempty/underflow |
| 0x21              | F2M FIFO   | read pops                      | `fifo_we_i`, `fifo_data_i`, full/afull/overflow |
| 0x22 – 0x10021    | TDPRAM     | read/write, 64K x 32 bits      | `ram_addr_i`, `ram_we_i`, `ram_data_i/o` |

"M2F" means processor to FPGA and "F2M" means FPGA to processor. Offsets count 32-bit
words. The AXI byte address is the offset times 4, so the slave needs 19 address
bits (`AXI_AW`).

The status word at a read of 0x20 is:
bit 0 M2F full, bit 1 M2F almost full, bit 2 M2F overflow,
bit 3 F2M empty, bit 4 F2M almost empty, bit 5 F2M underflow.

Clocks: the AXI clock runs the uP side, the register banks and RAM port A.
`fifo_clk_i` runs the FPGA side of both FIFOs. `ram_clk_i` runs RAM port B.
`pl_reset_o` is the bus reset synchronized into `fifo_clk_i`, for resetting the
FPGA logic.

## Three levels of communication

The communication is layered. Each level uses only the services of the level below.

1. **Physical**: the resources above used as plain storage. This is `comblock`.
2. **Logical**: a flag protocol that makes handing a block of data through the
   shared RAM safe. It uses two reserved registers per direction. This is
   `cb_logic_fpga` on the FPGA side plus a short software routine on the uP.
3. **Systemic**: DMA instructions executed by a DMA machine in the FPGA, which
   gives each side access to everything mapped on the other side. This level is
   **not built here**: its instruction set and global map are not specified.

## The logical level in detail

The TDPRAM has two ports, so both sides *can* access it at any time. Without a
rule, a reader could see a half-written block, or both sides could write it at
once. The logical level adds that rule with three flags per direction.

Flag words (last register of each bank; the register before it holds the block
length in words):

| register          | bit 0                | bit 1                  |
|-------------------|----------------------|------------------------|
| F2M 15 (FPGA)     | FPGA-TDPRAM-busy     | data-ready-for-uP      |
| M2F 15 (uP)       | uP-TDPRAM-busy       | data-ready-for-FPGA    |
| F2M 14 / M2F 14   | block length written by the FPGA / by the uP |     |

**FPGA to uP**, in order:

1. The FPGA raises FPGA-busy and writes the block (from word 0).
2. It writes the length and raises data-ready-for-uP.
3. It drops FPGA-busy.
4. The uP sees ready=1 and FPGA-busy=0. It raises uP-busy, reads the block, then
   drops uP-busy.
5. The FPGA sees uP-busy rise and then fall, and clears data-ready-for-uP.

**uP to FPGA** is the mirror image:

1. The uP raises uP-busy, writes the block and writes the length (M2F 14).
2. It raises data-ready-for-FPGA and drops uP-busy.
3. The FPGA raises FPGA-busy and reads the block. `cb_logic_fpga` streams it out
   on a valid/ready port and marks the final word with `last`.
4. The FPGA drops FPGA-busy.
5. The uP sees FPGA-busy fall and clears data-ready-for-FPGA.

**Claiming the RAM.** The original scheme does not say what happens when both
sides raise their busy flag at the same moment. This implementation uses the
following rule, in which the processor wins:

- The FPGA raises its busy flag only while the uP flag is low.
- It then waits `GUARD` cycles (default 4). If the uP flag rose in that window,
  the FPGA drops its flag, waits, and tries again.
- After raising its own flag, the uP must wait until FPGA-busy reads low before
  it touches the RAM.

The uP flags reach the FPGA through two-flop synchronizers. The length
register is read only while the flags guarantee that it is stable.

Software routine, FPGA to uP (offsets as in the map):

```
wait until  F2M[15] & 3 == 0b10         # data ready, FPGA not busy
M2F[15] |= 1                             # uP busy
wait until  F2M[15] & 1 == 0            # FPGA really off the RAM
n = F2M[14];  read RAM[0 .. n-1]  (offset 0x22 + i)
M2F[15] &= ~1                            # release
wait until  F2M[15] & 2 == 0            # FPGA acknowledged
```

The shared RAM holds one block at a time. The uP must not start a uP-to-FPGA block
while data-ready-for-uP is still set.

## The ComBlock resources

- **Registers** (`cb_regs`): M2F registers have byte strobes and drive
  `reg_o` continuously. F2M inputs are sampled on every bus clock. A multi-bit
  register read from the other clock domain can be caught mid-change. That is
  acceptable for configuration words, and it is why the logical level synchronizes
  only single-bit flags.
- **FIFOs** (`cb_async_fifo`): gray-coded pointers crossed by two-flop
  synchronizers. The write side has full, almost full and a sticky overflow
  flag (a word written while full is dropped). The read side has empty, almost
  empty and a sticky underflow flag (a read while empty returns the old word).
  Almost full means at least `DEPTH-AF_OFFSET` words are stored. Almost empty
  means at most `AE_OFFSET` words are stored. Read data is registered: it is
  valid one cycle after the read. `fifo_clear_i` empties both FIFOs and clears
  the sticky flags. Neither side may use the FIFOs while it is high.
- **TDPRAM** (`cb_tdpram`): two independent ports with synchronous reads. A write
  returns the old contents (read-first). Two writes to the same word at the same
  time are undefined; the logical level prevents them.
- **AXI4-Lite front end** (`cb_axil_slave`): one transaction at a time.
  Writes take priority when a write and a read arrive together. A write
  completes in 2 cycles, a read in 3, plus any back-pressure. Every response is
  OKAY. Unmapped words read as zero and ignore writes.

Default configuration (parameters of `comblock`): 32-bit registers, 16 slots
per bank, 32 x 64K RAM, 16 x 1024 FIFOs with almost-full and almost-empty
offsets of 1, F2M FIFO enabled and M2F FIFO disabled (`ENABLE_M2F_FIFO=0`).

This configuration needs 2,097,152 RAM bits plus 16,384 FIFO bits. On Xilinx 7-series and
UltraScale parts that is 64 36-Kb block RAM tiles plus one 18-Kb half tile, i.e.
290.25 KB counted with parity bits. That is the block RAM figure published for
the ComBlock on those families.

## The example acquisition subsystem (`daq_top`)

```
 ADC controller --> decimator --+--> F2M FIFO ---------------> uP (0x21)
 (outside)          (2**k mean) |
                                +--> histogrammer --> TDPRAM --> uP (0x22..)
                                       ^   via cb_logic_fpga (F2M protocol)
 uP --> TDPRAM --> cb_logic_fpga (M2F protocol) --> m2f_* stream (outside)
```

- **Decimator** (`cb_decimator`): a boxcar filter. It sums 2**k consecutive samples
  and outputs their mean (`out_data`, 16 bits) and their sum. `k` comes from
  M2F register 1 and is clamped at 15. With `k=0` every sample passes through.
- **Histogrammer** (`cb_histogrammer`): a rising edge of the start bit
  requests the RAM through the logical level. Once granted, it clears all
  65,536 bins, one per cycle. It then counts `nsamples` samples. The bin is the
  sample value (its top `RAM_AW` bits). Each update takes two cycles on the
  single RAM port: read the bin, then write it back plus one. A sample that
  arrives during the write cycle is dropped and counted, so without decimation
  every second sample is lost. When done it hands the 65,536-word histogram to
  the uP with the FPGA-to-uP protocol. `histo_done` stays high until the next
  start.

Register assignment:

| register | meaning |
|----------|---------|
| M2F 0 | bit 0 acquisition enable (decimator on, decimated samples pushed into the F2M FIFO), bit 1 histogram start (rising edge), bit 2 FIFO clear |
| M2F 1 | log2 of the decimation ratio |
| M2F 2 | samples per histogram |
| F2M 0 | bit 0 histogram done, bit 1 histogrammer busy, bit 2 F2M FIFO full, bit 3 F2M FIFO overflow |
| F2M 1 | samples histogrammed in the current run |
| F2M 2 | samples dropped by the histogrammer |
| F2M 3 | decimated samples pushed into the F2M FIFO |
| 14, 15 | logical-level length and flags (both banks) |

Configuration words cross into `adc_clk` as quasi-static values. Set the ratio
and the sample count before raising the enable or start bit; those single bits
are synchronized.

## Where this RTL follows the original design and where it chooses

Taken from the published ComBlock:

- the five kinds of resources and their map;
- the FPGA-side port names (`reg*_o/i`, `ram_*`, `fifo_*`, `PL_reset`);
- the default widths and depths listed above;
- the three-level structure and the order of the flags in both directions;
- the example chain ADC controller, decimator, histogrammer, FIFO and RAM.

Choices made here, where the published material is silent:

- One AXI4-Lite slave decodes the whole map. The vendor instance has three
  slave ports, and their split is not published.
- The FIFO status word is read at 0x20.
- FIFO and RAM writes from the uP are whole words; byte strobes apply to the registers only.
- The sticky overflow and underflow flags, and the FIFO clear working as an
  asynchronous reset.
- The flag bit positions and the use of registers 14 and 15. The length is kept in
  a register, not in a reserved RAM area.
- The claiming rule in which the processor wins.
- Blocks always start at RAM word 0.
- The decimator is a boxcar average over a power-of-two ratio.
- The histogrammer's clear pass, its bin mapping and its drop counter.
- The register assignment of `daq_top`.

The published instance exposes ten registers per direction (`reg0`–`reg9`),
while the map reserves sixteen slots. Sixteen are built.

Not built:

- the systemic level (DMA machine);
- the ADC controller (board-specific LVDS/FMC logic), whose samples enter on
  `adc_valid`/`adc_data`;
- the processor system;
- the FPGA-to-FPGA router of the distributed variant;
- the `max_cycles` and `curr_cycle` ports of the published acquisition
  subsystem, whose function is not described.

## Files

`rtl/`:

- `comblock_pkg.sv`: map offsets, flag bits, status bits.
- `comblock.sv`: the block.
- `cb_axil_slave.sv`, `cb_regs.sv`, `cb_async_fifo.sv`, `cb_tdpram.sv`: the parts of the block.
- `cb_sync.sv`: two-flop synchronizer.
- `cb_logic_fpga.sv`: logical level.
- `cb_decimator.sv`, `cb_histogrammer.sv`, `daq_top.sv`: example subsystem.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and
`axil_master.sv`, an AXI4-Lite master used by three of them. Each testbench prints
`TB_RESULT checks=N failures=M`.

`tb_daq_top` runs the whole subsystem at its default sizes. It:

- streams data until the FIFO overflows, then clears the FIFO;
- builds two full 64K-bin histograms (one checked bin by bin, one at full rate
  with dropped samples) and reads them through the flag protocol;
- hands a block from the uP to the FPGA;
- checks that a histogram start waits while the uP holds the RAM.

It counts each of these mechanisms and fails if one never happened. It takes
about 10 s of simulation.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/comblock_pkg.sv tb/tb_daq_top.sv \
  --top-module tb_daq_top -o sim
./obj_dir/sim
```

Replace `tb_daq_top` with any other testbench name. Verilator has no X
state: every register that is read is reset. The RAM contents start undefined,
so the histogrammer clears its bins before use.

Lint notes:

- `cb_tdpram` writes its array from two clocked processes, one per port. That
  is the standard description of a true dual port block RAM, and Verilator
  reports it as a multi-driven signal.
- Flops with asynchronous reset that also feed assertions are reported as
  SYNCASYNCNET.
