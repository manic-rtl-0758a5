# MANIC: a vector-dataflow coprocessor and its microcontroller system

Small sensor nodes spend most of their energy not on arithmetic but on moving
data: fetching instructions, and reading and writing register files. A vector
unit already saves instruction fetches, because one instruction covers many
elements. It still writes every intermediate vector to the vector register file
(VRF) and reads it back in the next instruction. This design removes most of
that traffic. The coprocessor collects a short *window* of vector
instructions and finds which results are consumed by later instructions in
the same window. It then runs the window *element by element*: all
instructions on element 0, then all on element 1, and so on. Within one
element, a value travels from its producer to its consumer through a tiny
8-word *forwarding buffer*. It never reaches the VRF, unless it is still
needed after the window.

The RTL here is a SystemVerilog (IEEE 1800-2017) model of this coprocessor and
of the microcontroller system built around it. That system has:

- a 4 KB VRF with one read port and one write port;
- a 2 KB instruction cache;
- a 4 KB data cache shared by the scalar core and the coprocessor;
- two bus arbiters;
- main memory: a 1 KB boot ROM, a 64 KB SRAM and a 256 KB MRAM;
- an IO bus with GPIO and an I2C target.

The scalar RISC-V core (RV32IMEC) is not included. Its four ports come out at
the top as plain signals:

- vector-instruction issue;
- instruction fetch;
- data;
- IO.

## Vector dataflow by example

Take `C = A * B + k`:

```
vload  v1, A          ; v1 <- mem[A + 4*i]
vload  v2, B
vmul   v3, v1, v2     kill v1, kill v2
vadd   v4, v3, k      kill v3
vstore v4, C          kill v4
vfence
```

A conventional vector unit writes v1, v2, v3 and v4 to the VRF, 64 words each,
and reads them back. Here, each consumer is renamed to read its producer's
forwarding-buffer slot. The kill hints say that v1 to v4 are dead after their
last read, so none of the four is written to the VRF at all. Execution then
runs in this order:

```
vload[0] vload[0] vmul[0] vadd[0] vstore[0] vload[1] vload[1] vmul[1] ...
```

At any moment only the values of one element are in flight, which is why
eight 32-bit slots are enough.

## The vector instruction word

Each vector instruction reaches the coprocessor as a 32-bit word plus one
32-bit scalar operand from the core. The encoding is this design's own
(`manic_pkg`):

| bits   | field    | meaning |
|--------|----------|---------|
| 4:0    | op       | `vadd vsub vand vor vxor vsll vsrl vsra vslt vsltu vmin vmax` (0–11), `vmul` (12), `vload` (16), `vstore` (17), `vsetvl` (20), `vfence` (21) |
| 8:5    | vd       | destination register |
| 12:9   | vs1      | first source; the data register of `vstore` |
| 16:13  | vs2      | second source |
| 17     | kill1    | this is the last read of vs1 |
| 18     | kill2    | this is the last read of vs2 |
| 19     | scalar_b | use the scalar operand instead of vs2 |

The scalar operand has three uses:

- the base byte address of `vload`/`vstore`, with unit stride, so element `i` is at `base + 4*i`;
- the second operand when `scalar_b` is set;
- the new vector length for `vsetvl`, which is clamped to 64.

Other op codes are accepted and ignored. There are 16 vector registers of 64
32-bit elements each: 16 × 64 × 4 B = 4 KB.

## Decode & Rename (`vdf_decoder`, `vdf_rename_table`, `vdf_insn_buffer`)

The coprocessor alternates between two phases. While it decodes, it accepts
one instruction per cycle (`cp_valid`/`cp_ready`) into a 16-entry
instruction buffer.

**The rename table** has 16 entries, one per vector register. Each entry is
9 bits:

- a valid bit;
- the 4-bit buffer index of the last instruction in the window that writes this register;
- a slot-valid bit;
- that instruction's 3-bit forwarding slot.

16 × 9 = 144 bits of flops.

**Decoding one instruction** takes these steps:

1. For each source register, look up the rename table.
2. If the producer is in the window, point the operand at the producer's forwarding slot.
3. If the producer has no slot yet, allocate the next free one. Then patch the producer's buffer entry so that it also writes that slot.
4. If the operand carries a kill hint, patch the producer's entry to clear its VRF write-back.
5. If the producer is not in the window, read the operand from the VRF.
6. Finally, the destination register is renamed to the new instruction.

Slots are handed out in order. They are all freed together when the window
finishes.

**A window starts executing** when one of these happens:

- the buffer holds 16 instructions;
- a `vfence` arrives (the core uses it before reading vector results from memory);
- the eighth forwarding slot has been allocated;
- the next instruction needs more slots than remain. This instruction waits for the next window.

`vsetvl` lets the current window finish, then changes the vector length.
`cp_busy` is high while anything is buffered or running.

## Execute: the element-major pipeline (`vdf_execute`)

The execute phase steps an instruction index through the window, and a
vector index through the elements. It issues one instruction-element per
cycle into five stages.

| stage      | work |
|------------|------|
| VIssue     | reads the buffer entry; starts the VRF read for an operand that lives in the VRF |
| VGate      | chooses each operand from VRF data, a forwarding slot, the scalar or a bypass. It loads the operands only into the input registers of the unit that will use them, ALU or multiplier, so the idle unit does not switch |
| VExecute   | ALU or 32×32 multiplier (low 32 bits). Loads and stores compute `base + 4*i` in the ALU |
| VMemory    | one load or store to the data cache |
| VWriteback | result to its forwarding slot and/or the VRF |

The main timing rules follow.

- **Operand bypass.** A forwarded operand whose producer is still in VExecute,
  VMemory or VWriteback is taken from that stage. This happens when the
  consumer is 1, 2 or 3 instructions behind its producer. Otherwise the
  operand is read from the slot.
- **Load-use stall.** Load data exist only after VMemory. A consumer one or
  two instructions behind a load waits in VGate, and a bubble goes down the
  pipe.
- **Memory stall.** While VMemory waits for the data cache, every stage up to
  VMemory holds.
- **Two VRF operands.** The VRF has a single read port. An instruction with
  two VRF operands spends two cycles in VIssue. Renaming makes this rare,
  which is why one read port suffices.
- **Rate.** Without stalls and with at most one VRF operand per instruction,
  a window of `n` instructions at vector length `vl` takes `n·vl` cycles plus
  a few cycles of fill and drain. The system test measures 16 × 64 operations
  in 1029 cycles.

**One consequence for software.** Inside one window, memory accesses happen
in element-major order, not instruction order. Suppose a load and a store in
the same window touch the same address, but for *different* elements. The
window then gives a different result than sequential vector semantics would.
Put a `vfence` between such accesses. Windows themselves execute in order.

## System and buses (`manic_soc`)

```
 core ports          if_*               dm_*            cp_*
                      |                  |               |
                      |                  |          vdf_coproc --- VRF (4 KB)
                      |                  |               |
                      |            mem_arbiter (D side) -+
                      |                  |
                 I-cache (2 KB)     D-cache (4 KB)
                      |                  |
                      +-- mem_arbiter ---+
                               |
                          main_memory: boot ROM 0x0000_0000 (1 KB)
                                       SRAM     0x1000_0000 (64 KB)
                                       MRAM     0x2000_0000 (256 KB)

 io_* --> io_bus --> GPIO  (addr[11:8] = 0)
                 --> I2C   (addr[11:8] = 1)
```

Every memory-side connection uses one protocol, the `mem_req_t` bus:

- `req_valid`/`req_ready` hand over a request (address, write flag, byte enables, data);
- exactly one `rsp_valid` pulse, with read data, follows on a later cycle;
- a requester has one request outstanding at a time.

Main memory addresses are decoded by bits [31:28]. Unmapped regions read as
zero.

The **arbiters** grant round-robin and stay locked to the granted requester
until its response returns. The D-side arbiter sits between the core data
port and the coprocessor. The memory-side arbiter sits between the two caches.

The **caches** are direct mapped, with 16-byte lines, write-through and no
write-allocate:

- a read hit answers one cycle after it is accepted;
- a read miss fetches the whole line, one word at a time;
- a write is acknowledged when memory acknowledges it, and also updates the line if it is present.

`icache_en` / `dcache_en` low turns a cache into a pass-through and
invalidates it. The instruction cache is not kept coherent with data writes.

## MRAM and the power switches (`mram`, `main_memory`)

The MRAM is a behavioural model of an embedded MRAM macro. Its access times do
not depend on the clock: 170 ns per read and 8.4 µs per write. The model
converts them to cycles with `CLK_NS`. At the default 20 ns this gives 9
cycles per read and 420 per write, counted from acceptance to response.

`mram_en` models the MRAM power domain. While it is low:

- accesses finish at once;
- reads return zero;
- writes are lost;
- stored data remain, as the memory is non-volatile.

Together with `dcache_en` this reproduces four operating modes: running from
MRAM or from SRAM, each with the data cache on or off. Energy and leakage are
not modelled.

## IO (`io_bus`, `gpio`, `i2c_target`)

**GPIO** has 16 pins and three registers:

- OUT at 0x0;
- OE at 0x4;
- IN at 0x8, read through a two-flop synchroniser.

**The I2C target** lets an external controller load data into the chip and
read data back. It answers at 7-bit address 0x42. SCL and SDA are sampled
with the system clock, which must be several times faster than SCL. SDA is
open drain: `sda_oe` pulls it low. The target behaves as follows:

- bytes written by the controller enter a 4-byte FIFO;
- a byte that arrives while the FIFO is full is not acknowledged;
- a read by the controller returns the TXDATA byte, repeated until the controller stops acknowledging.

Its registers:

| address | register | access |
|---------|----------|--------|
| 0x0 | RXDATA | read pops one byte; bit 8 is set when a byte was returned |
| 0x4 | TXDATA | read/write |
| 0x8 | STATUS | bit 0 not empty, bit 1 full, bits 4:2 count |

## What is modelled and what is not

These parts follow the source design closely:

- the two-phase organisation;
- the 16-entry, 144-bit rename table;
- the 32-byte forwarding buffer;
- kill hints that suppress VRF write-back;
- the three window-start conditions;
- the element-major five-stage pipeline, including operand steering into separate ALU and multiplier input registers;
- the single-read-port VRF;
- the system structure, with its memory sizes and MRAM timing.

The following are this design's own choices, because the source gives no
detail for them:

- the instruction encoding and op list, `vsetvl`, and unit-stride addressing;
- the window depth of 16 and the in-order slot allocation;
- the bypass and stall rules, and the two-cycle double VRF read;
- the cache organisation;
- the bus protocol, the arbitration policy and the address map;
- the GPIO and I2C register maps;
- the I2C target address.

Not included:

- the scalar RV32IMEC core, whose ports are top-level ports;
- the on-die clock generator;
- the physical power domains, apart from the MRAM enable;
- the debug scan interface;
- strided, indexed or permuting vector memory operations, which kernels such as FFT or sparse algebra would need.

## Behaviour on benchmark kernels

`tb_workloads` runs the vector part of several kernels on the whole system at
its default sizes, and checks each result against values computed directly
from the inputs. The testbench plays the core, so it supplies the scalar
operands: matrix entries and filter weights. Each kernel is shown with the
cycles it took, and with its VRF accesses next to the roughly three accesses
per element operation that a plain vector unit would make.

| kernel (size chosen here) | element ops | cycles | VRF reads + writes | plain vector unit |
|---|---|---|---|---|
| vector increment, 256 words | 768 | 2837 | 0 | ~2304 |
| dense matrix × vector, 64 × 64 | 12288 | 34650 | 5376 | ~36864 |
| dense matrix × matrix, 16 × 16, data in SRAM, D-cache on | 12288 | 27797 | 3904 | ~36864 |
| same, D-cache off | 12288 | 31125 | 3904 | ~36864 |
| same, data in MRAM, D-cache on | 12288 | 137109 | 3904 | ~36864 |
| same, data in MRAM, D-cache off | 12288 | 171157 | 3904 | ~36864 |
| 1-D convolution, 64 outputs × 5 taps | 960 | 2342 | 256 | ~2880 |
| 64 columns of 8 sorted by a min/max network | 4608 | 9322 | 6016 | ~13824 |

In the MRAM rows, most of the time goes to the 256 result stores. Each one is
written through to the MRAM, at 420 cycles per write with a 20 ns clock. Vector increment never touches the VRF:
every intermediate is forwarded and killed.

FFT, wavelet transforms, Viterbi decoding and the sparse kernels need
strided, indexed or permuting vector accesses. This design does not provide
them, so those kernels are not exercised.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Run a testbench with
Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/manic_pkg.sv tb/tb_manic_soc.sv -y rtl --top-module tb_manic_soc -o sim
./obj_dir/sim
```

`tb_boot_rom` reads `tb/boot_rom_test.hex`, so run it from the same
directory.

The testbenches and what they check:

- **`tb_manic_soc`** runs the whole system at its default sizes. It acts as the core: it writes vectors to SRAM and MRAM, and issues kernels that trigger each window-start condition, every bypass distance, kill hints, load-use and memory stalls, a shortened vector length, cache bypass and MRAM power-off. It checks every stored result against a sequential model. It also counts each of these mechanisms and fails if any never occurred. It checks the 16 × 64-cycle window rate too.
- **`tb_workloads`** runs the kernels of the previous section.
- **`tb_vdf_coproc`** runs random programs through the coprocessor alone, on a memory with random latency, against the same kind of reference model.
- **`tb_vdf_execute`** checks the bypass distances, the load-use stall, the double VRF read and exact cycle counts.
- The other testbenches check their module against an independent model. That includes the MRAM read and write latencies in cycles, and an I2C controller model for the I2C target.

Sizes are parameters with the defaults of the source design:

- `ICACHE_BYTES`, `DCACHE_BYTES`;
- `ROM_BYTES`, `SRAM_BYTES`, `MRAM_BYTES`;
- `CLK_NS`, which sets the MRAM cycle counts;
- `ROM_FILE`, a hex image for the boot ROM.

The coprocessor's shape is set in `manic_pkg`: 16 registers, 64 elements, a
16-instruction window and 8 forwarding slots.
