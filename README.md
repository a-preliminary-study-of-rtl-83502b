# A pipelined Verlet-update accelerator for an FPGA system-on-chip

Molecular dynamics moves every atom forward by a small time step `dt` once the
forces on it are known. This is the velocity-Verlet update, and for each atom
it is a handful of floating-point multiplies and adds. No atom depends on
another, so the loop can be split into N equal slices and each slice run on
its own hardware pipeline. This RTL implements that idea in IEEE-754 single
precision. There are N identical *cells*. Each cell holds the data for up to
128 atoms in its own memories and updates one atom per clock. One controller
drives all the cells in lock step. A DMA engine moves the data between the
cells and the dual-port RAM of an ARM-based FPGA system-on-chip (an Altera
Excalibur-class device), and the ARM controls everything through a few
registers on AHB.

This design follows the pipelined "fabric" of the study *A Preliminary Study
of Molecular Dynamics on Reconfigurable Computers*, in its 5-cell SoPC
configuration. That study generated its RTL with its own toolset and gives
the structure, not the code. Everything below the block level here is this
design's own: the floating-point units, the controller, the DMA register
interface and all timing not stated in the study. The section
[Departures and open points](#departures-and-open-points) lists where the RTL
goes beyond the study.

## The computation

The host prepares, for every atom `k`, the force `f[k]`, the velocity `vel[k]`,
the position `pos[k]` and the per-atom constant `M[k] = 0.5 * dt / mass[k]`.
Each cell then computes

```
vel'[k] = vel[k] + f[k] * M[k]
pos'[k] = pos[k] + dt * vel'[k]        ( = pos + dt*vel + 0.5*dt^2*f/mass )
```

That is four floating-point operations per atom. The second line reuses the
new velocity, so the datapath is a chain of four units. These are two
multipliers and two adders, each rounding in this order.

## Inside a cell

```
             f[]   M[]                                      per cell:
              |     |                                       6 memories of 128 x 32
            [ fp_mul ]  5                                   f, M, vel, pos   (inputs)
    vel[] --dly 5--|                                        vel_out, pos_out (results)
            [ fp_add ]  5 ----------------dly 10---> vel_out[]
      dt ------|
            [ fp_mul ]  5
    pos[] --dly 15-|
            [ fp_add ]  5 -----------------------> pos_out[]
```

- **Memories.** Each of the six memories (`cell_mem`) has two ports. Port A
  belongs to the DMA, so the host can load and inspect any word at any time.
  Port B belongs to the pipeline: the four input memories are read at the
  sequencer's address, and the two result memories are written. Keeping
  inputs and results in separate memories means a run never overwrites data
  it still has to read. The price is six memories per cell instead of four.
- **Pipeline alignment.** The floating-point units have fixed latencies of
  five stages each. `vel` is delayed by 5 cycles to meet `f*M`, and `pos` by
  15 to meet `dt*vel'`. The new velocity is delayed by 10 so that both
  results leave together. The atom's address goes through the pipe as a tag
  beside its valid bit, and the results are written at that address.
- **Latency.** An atom's address goes in at cycle 0. The memories deliver its
  operands at cycle 1, the datapath needs 20 cycles, and the result is
  written at the end of cycle 21. It can be read from cycle 22 on. That
  matches the study's figure of 22 cycles latency with one new atom every
  cycle. How the 22 cycles split into memory and arithmetic stages is this
  design's choice (`md_pkg::MUL_LAT`, `ADD_LAT`, `CELL_LAT`).
- **dt** is one register shared by the whole fabric. It must not change while
  a run is in flight.

## One controller for all cells

Every unit is fully pipelined and never stalls, so all cells are always in
the same state. A single `sequencer` serves them all (SIMD). A `Start` pulse
latches `ProgramAddress` (first atom) and `AddressStop` (last atom). The
sequencer then issues the addresses one per cycle, counts the pipeline empty,
and raises `Stop` in the first cycle in which the last result is readable.
`Stop` stays high until the next `Start` or `Reset`. A `Start` during a run is
ignored, and `Reset` aborts a run. The range includes both ends and wraps
past the top of the memory if `AddressStop < ProgramAddress`.

A full run of `M` atoms takes `M + 22` cycles from the `Start` pulse to `Stop`.
In that time every cell has updated `M` atoms, so the fabric sustains
`4 * N_CELLS` floating-point operations per clock.

## Moving data: the DMA and its registers

The stripe's dual-port RAM is 16 bits wide and the fabric's words are 32. The
DMA (`dma_ctrl`) copies blocks between them. Each fabric word is two RAM
words, with the low half at the lower address. The ARM reaches the DMA's
registers through `slave_ctrl`, an AHB-Lite slave with zero wait states that
handles 32-bit transfers only. The register index is `haddr[5:2]`.

| offset | register    | meaning |
|-------:|-------------|---------|
| 0x00 | `CTRL`      | write 1 to act: bit 0 LOAD (RAM to fabric), bit 1 STORE (fabric to RAM), bit 2 START fabric, bit 3 Reset fabric |
| 0x04 | `STATUS`    | bit 0 DMA busy, bit 1 fabric Stop, bit 2 fabric running |
| 0x08 | `DP_ADDR`   | first RAM address (16-bit words) |
| 0x0C | `CELL`      | cell number (SelectCell) |
| 0x10 | `MEMSEL`    | 0 f, 1 M, 2 vel, 3 pos, 4 vel_out, 5 pos_out, 6 dt |
| 0x14 | `FADDR`     | first word in the cell memory |
| 0x18 | `COUNT`     | number of 32-bit words (0 does nothing) |
| 0x1C | `ADDR_STOP` | last atom of a run (reset value 127) |
| 0x20 | `PROG_ADDR` | first atom of a run |

Each word takes three cycles in either direction. For a load these are read
low, read high, write fabric; for a store, read fabric, write low, write high.
A LOAD or STORE written while the DMA is busy is ignored, so poll
`STATUS[0]`. START and Reset act immediately. `MEMSEL = 6` reaches the dt
register whatever `CELL` holds.

A time step, as the host sees it:

1. Write the f, M, vel and pos arrays of every cell, and dt, into the RAM.
2. For each cell and each of the four arrays, program `DP_ADDR`, `CELL`,
   `MEMSEL`, `FADDR=0`, `COUNT=128`, write `CTRL=LOAD`, and wait until
   `STATUS[0]` is 0. Load dt once the same way with `MEMSEL=6, COUNT=1`.
3. Write `PROG_ADDR`, `ADDR_STOP`, then `CTRL=START`, and wait for `STATUS[1]`.
4. STORE `vel_out` and `pos_out` of every cell back into the RAM.

## Floating point

`fp_mul` and `fp_add` are single-precision units with five stages each. They
take one operation per cycle and have no enable or stall input. They round to
nearest, ties to even. Subnormal inputs and results are flushed to signed
zero, overflow gives infinity, and every NaN result is `0x7FC00000`. An exact
cancellation in the adder gives +0 (−0 only for −0 + −0). The testbenches
check the units bit for bit against double-precision arithmetic rounded back
to single. For typical data the results are therefore IEEE-exact; they differ
only where a result would be subnormal.

## Departures and open points

- **Only the pipelined fabric.** The study also built a variant with
  multi-cycle, non-pipelined units: four memories per cell, staging registers,
  a `synch` module combining the adders' `stop` signals, and one controller
  per cell. It then kept the pipelined one. That variant is not included.
- **Fixed-function sequencer.** In the study the controllers come from
  microcode through its generator toolset, and the microcode is not given. Here
  the controller is a fixed state machine. `ProgramAddress` is read as the
  first atom address; in the original it may be a microprogram address.
- **Own interfaces.** The study draws the DMA and slave controller as blocks
  with named signals only. The register map, the commands, the half-word order,
  the three-cycle-per-word transfer rate and the AHB-Lite slave behaviour are
  all this design's. The fabric's bidirectional data bus is split into a write
  path and a read path.
- **Not included (vendor parts).** The ARM processor, its AHB buses, the
  stripe-to-PLD bridge and the 32K x 16 dual-port RAM are hard blocks of the
  device. The top's ports are the bridge's AHB master side and the RAM's
  user port. `tb/dpram_model.sv` and `tb/ahb_master_bfm.sv` model them for
  simulation. `hreadyout` and `hresp` are constant outputs because the slave
  never waits and never errors.
- **Sizes.** The defaults are `N_CELLS = 5` and `M_DEPTH = 128`. The study
  also fitted 20 cells on an Altera Stratix EP1S80 and 15 on a Xilinx
  Virtex-II Pro 2VP50. Set `N_CELLS` to those values; cell numbers are 5 bits,
  so up to 32 cells. No clock target is built in. The study reports 80–82 MHz
  on those devices; at 80 MHz, 20 cells would peak at 6.4 GFlops.
- The fabric's memories stay open to the DMA during a run, and nothing stops
  the host from overwriting inputs that a run is still reading.

## Files

| file | contents |
|------|----------|
| `rtl/md_pkg.sv` | widths, latencies, memory-select and register enums, the fabric request struct |
| `rtl/md_top.sv` | top: `slave_ctrl` → `dma_ctrl` → `fabric` |
| `rtl/slave_ctrl.sv` | AHB-Lite slave to register port, with protocol assertions |
| `rtl/dma_ctrl.sv` | registers, RAM/fabric block transfers, Start/Reset pulses |
| `rtl/fabric.sv` | N cells, shared sequencer, dt register, read-data steering |
| `rtl/sequencer.sv` | shared run controller |
| `rtl/verlet_cell.sv` | six memories and the datapath |
| `rtl/verlet_datapath.sv` | two multipliers, two adders, alignment delays |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | pipelined single-precision units |
| `rtl/cell_mem.sv`, `rtl/delay_line.sv` | dual-port memory, shift register |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/fp_ref_pkg.sv` | reference floating-point and Verlet arithmetic |
| `tb/dpram_model.sv`, `tb/ahb_master_bfm.sv` | models of the RAM and the bus master |
| `tb/md_system_harness.sv` | a parameterised system plus host program used by `md_top_fpga_sizes_tb` |

## Simulating

Every testbench checks its module against independently computed values,
prints `TB_RESULT checks=N failures=F` and has a watchdog. `md_top_tb` runs
the whole accelerator at its default size. It loads 5 cells x 128 atoms over
AHB and DMA, runs a full step and a partial step, stores and checks every
result, and confirms the run takes 150 cycles (128 atoms + 22). It also covers
a command ignored while the DMA is busy, a fabric Reset during a run, and
foreign AHB wait states. It runs in well under a second. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/md_pkg.sv tb/fp_ref_pkg.sv tb/md_top_tb.sv --top-module md_top_tb -Mdir obj
./obj/Vmd_top_tb
```

`md_top_fpga_sizes_tb` builds two systems side by side, one with 20 cells
and one with 15. Each runs a full 128-atom-per-cell step through the same
path, and both must still take 150 cycles. The 20-cell data set uses 30784
of the 32768 RAM words. Replace `md_top_tb` with any other testbench name to
run that one. Each
testbench was also run against a deliberately broken copy of its module, and
it failed each time. The broken changes were: truncated rounding, a dropped
sticky bit, a wrong collision winner, a misaligned delay line, mis-steered
read data, an early Stop, dt written through one cell only, swapped half
words, wrong address bits, and swapped run limits. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/md_pkg.sv rtl/md_top.sv`. The
remaining warnings are unused bits (the top address bits of AHB, a rounding
carry bit) and a reset also used in an assertion's `disable iff`.
