# A 3D MPSoC of RV32I processors sharing RV32M coprocessors, with coprocessor failover

Multiplication and division are used rarely enough in many programs that
giving every small RISC-V core its own multiplier and divider wastes area and
power, yet emulating them in software is slow. This design takes the middle
road: sixteen RV32I cores keep a plain integer datapath, and the eight
instructions of the M extension (MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM,
REMU) are executed by eight multiplier and eight divider tiles that the cores
reach over a network-on-chip. Code compiled for RV32IM runs unchanged: when a
core meets an M instruction it ships the opcode and both operands to a
coprocessor as a packet and stalls until the result packet comes back.

The network is a 4x4x2 three-dimensional mesh, so the 32 tiles sit on two
layers of 16. Each coprocessor normally serves two processors. When
coprocessors fail, the system keeps working by re-pointing the processors
that used a failed unit at a healthy spare of the same type. Nothing in the
network changes; only the address a processor sends its requests to.

All RTL is SystemVerilog-2017 in `rtl/`, with self-checking testbenches in
`tb/`.

## Tiles and placements

Every node of the mesh is a router plus one tile:

* **processor tile** (`proc_tile`): a single-cycle RV32I core (`rv32i_core`),
  its 16 KiB local memory (`local_mem`) holding code and data, and a network
  interface (`proc_ni`);
* **multiplier tile** or **divider tile** (`copro_tile`): a network interface
  (`copro_ni`) and the arithmetic unit (`mul_copro` or `div_copro`).

Nodes are numbered `n = 16*z + 4*y + x`, so the 5-bit node address is the bit
field `{z, y[1:0], x[1:0]}`. The parameter `CFG` of the top module `mpsoc`
selects one of two placements. P is a processor, M a multiplier, D a divider;
rows are printed with y = 3 at the top.

```
CFG_FGC                          CFG_FGC_MIX
 layer z=0        layer z=1       layer z=0        layer z=1
 P12 P13 P14 P15  M28 D29 M30 D31  P12 D13 P14 D15  M28 P29 M30 P31
 P8  P9  P10 P11  M24 D25 M26 D27  D8  P9  D10 P11  P24 M25 P26 M27
 P4  P5  P6  P7   M20 D21 M22 D23  P4  D5  P6  D7   M20 P21 M22 P23
 P0  P1  P2  P3   M16 D17 M18 D19  D0  P1  D2  P3   P16 M17 P18 M19
```

* **FGC** (the default) puts all processors on one layer and all
  coprocessors on the other. Processors 2k and 2k+1 share multiplier 16+2k
  and divider 17+2k: one is directly above each processor, the other is two
  hops away.
* **FGC_MIX** is a checkerboard. A processor on layer 0 uses the multiplier
  directly above it and the divider beside it (x xor 1). A processor on
  layer 1 uses the divider directly below it and the multiplier beside it.
  Every processor is therefore one hop from both of its coprocessors.

In both placements each coprocessor serves exactly two processors when
nothing has failed. Processors are numbered 0 to 15 in node order: in FGC,
processor p is node p; in FGC_MIX, processor 0 is node 1, processor 1 is
node 3, and so on. `mpsoc_pkg::proc_node(CFG, p)` gives the mapping.

## Life of an M instruction

This is the part that needs the most care when changing the design, because
four blocks take part in every multiply or divide.

1. **Core.** `rv32i_core` decodes opcode OP with funct7 = `0000001` as an M
   instruction. It raises `cop_req` with funct3 and the two register values,
   and holds its PC and register file (a stall). It writes the result to rd
   in the clock where `cop_done` pulses, and moves on. All other
   instructions take exactly one clock.
2. **Processor NI.** `proc_ni` picks the destination from funct3[2]:
   `mul_dest` for funct3 0-3, `div_dest` for funct3 4-7. It sends a
   three-flit request: a head flit, then rs1, then rs2 marked as tail. A flit
   is 34 bits: `head`, `tail` and 32 data bits. The head's data holds the
   destination in `[4:0]`, the source in `[9:5]` and funct3 in `[12:10]`.
3. **Network.** The packet goes by XYZ routing to the coprocessor's node.
4. **Coprocessor NI.** `copro_ni` collects the three flits, pulses
   `unit_start`, and waits for `unit_done`. It then sends a two-flit response
   (head, then result as tail) back to the source node. While it works on one
   request it keeps its input `on` low, so other requests wait in the
   network. That waiting is how two or more processors share one unit.
5. **Return.** `proc_ni` takes the tail flit's data as the result and pulses
   `cop_done`.

Counting the pipeline stages, an uncontended MUL takes 11 + 2·h clocks,
where h is the hop distance to the multiplier: 13 clocks when it is one hop
away. The multiplier itself takes one clock. The divider is a radix-2
restoring divider, which adds 33 clocks. Division by zero and the signed
overflow case give the RISC-V results in one clock. Each processor has one
request outstanding at a time.

## The network-on-chip

`noc_mesh3d` builds the mesh from 32 `noc_router` instances. Each router has
seven ports: local, east/west (x±1), north/south (y±1) and up/down (z±1).

* **Input buffering.** Each input has a 4-flit FIFO (`noc_fifo`,
  `BUF_DEPTH`). There are no output buffers.
* **On-off flow control.** A buffer drives `on` high while it has a free
  slot. `on` comes from registers only, so an upstream sender may use it in
  the same clock. A sender raises `valid` only while `on` is high. An
  assertion in `noc_fifo` checks that no flit is ever pushed into a full
  buffer.
* **XYZ routing.** The head flit's destination is compared with the
  router's position: first x, then y, then z. This dimension order is
  deadlock-free on a mesh.
* **Wormhole switching.** A head flit that wins an output reserves it
  (`busy`, `owner`). Only that input's body flits may use the output until
  the tail passes. Packets are never interleaved on a link.
* **Arbitration.** Each output has an `rr_arbiter` among the head flits that
  want it. It is round-robin by default; with `RR_ARB = 0` it is fixed
  priority, with the local port first and then E, W, N, S, U, D.

An idle router forwards a flit in one clock. A packet's head reaches the
destination's local port h + 1 clocks after it was offered, for h hops.

## Failures and replacement coprocessors

`copro_fault[n]` marks coprocessor node n as failed. The mask is meant to be
set before the program runs and must be stable from reset. A failed
coprocessor's NI drains whatever reaches it and never answers, so a
processor still pointed at it would hang.

`copro_remap` holds every processor's multiplier and divider address. After
reset it runs a small sequential search, at most about 300 clocks for eight
faults. The top output `remap_ready` rises when the search is done, and the
processors do not start before that. For each failed coprocessor the search
picks a replacement that:

1. is of the same type;
2. has the smallest total hop count to the two processors that lost it;
3. is not failed, and is not already the replacement of another failed
   unit.

Failed units are handled in increasing node order, and ties go to the lower
node number. Because a spare is used at most once, a coprocessor serves at
most four processors. Two examples show the effect:

* In FGC_MIX, losing multiplier 22 moves processors 6 and 23 to multiplier
  19. That is one hop from node 23 and three hops from node 6.
* In FGC, losing multiplier 16 sends processors 0 and 1 to a multiplier two
  hops from one of them and three hops from the other.

With up to four failures per type there is always a free spare.

## Using the top module

```
mpsoc #(.CFG(CFG_FGC), .MEM_WORDS(4096), .BUF_DEPTH(4), .RR_ARB(1'b1)) u_soc (...);
```

1. Hold `rst_n` low, set `copro_fault`, then release reset.
2. Keep `run` low. While `run` is low, each processor's memory belongs to
   the host port: `host_we`, `host_proc`, `host_addr` (byte address) and
   `host_wdata` write whole words, and `host_rdata` reads the addressed word
   combinationally. Load each processor's program at address 0 and its data.
3. Raise `run`. The cores start at address 0 once `remap_ready` is high.
4. A program ends with ECALL (or EBREAK). The cores stop and set their bit
   of `halted`. `cycles[p]` is the number of clocks processor p ran.
5. Lower `run` to read results through the host port.

The core implements all of RV32I except CSRs. FENCE is a no-op, and there
are no interrupts and no misaligned accesses.

## Simulation

Everything runs under plain Verilator 5. Example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mpsoc_pkg.sv tb/rv_asm_pkg.sv tb/tb_mpsoc.sv --top-module tb_mpsoc
./obj_dir/Vtb_mpsoc
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/rv_asm_pkg.sv` holds the instruction encoders the programs are built
with, and a reference model of the eight M operations.

| testbench | what it shows |
|---|---|
| `tb_mpsoc` | Whole SoC at default size (FGC). All 16 cores run every M instruction on their own operands, once without faults and once with 8 failed coprocessors. Checks every result, that failed units get no requests, that a spare serves more than two cores, and that faults never make the run faster. It also counts stalls, back-pressure, output contention, wormhole waits, division by zero and replacements, and requires each to occur. |
| `tb_workloads` | Contrast stretch and 3x3 Sobel kernels on both placements with 0, 2, 6 and 8 faults; prints the slowest core's cycle count per scenario |
| `tb_rv32i_core` | Directed RV32IM program, random coprocessor delays, one-clock-per-instruction check |
| `tb_mul_copro`, `tb_div_copro` | All ops, corner operands, latency |
| `tb_proc_ni`, `tb_copro_ni` | Packet format, on-off behaviour, failed-unit behaviour |
| `tb_noc_router` | Random packets on all 7 inputs: XYZ port, wormhole integrity, exactly-once delivery, one-clock hop |
| `tb_noc_mesh3d` | Random all-to-all traffic; idle latency = hops + 1 |
| `tb_copro_remap` | Default sharing in both placements, the examples above, and random fault sets against a reference search |
| `tb_local_mem` | Byte-enable writes and both read ports |

Building `tb_mpsoc` or `tb_workloads` takes about a minute. Each simulates
in seconds.

### What the workloads show

`tb_workloads` gives each core 24 pixels for Contrast (one MUL and one DIVU
per pixel). For Conv it gives each core a 8x5 slice, which produces 3x6
outputs with 18 MULs each. Each non-zero fault count is drawn three times
at random (fault sets A, B and C); half of the failed units are multipliers
and half are dividers. On this run the slowest core needed:

| faults | set | Contrast FGC | Contrast FGC_MIX | Conv FGC | Conv FGC_MIX |
|---|---|---|---|---|---|
| 0 | - | 1957 | 1956 | 5923 | 5280 |
| 2 | A | 3878 | 3878 | 9130 | 10090 |
| 2 | B | 3879 | 3878 | 9140 | 10113 |
| 2 | C | 3878 | 3878 | 9157 | 10113 |
| 6 | A | 3893 | 3887 | 9281 | 10093 |
| 6 | B | 3880 | 3878 | 9151 | 10094 |
| 6 | C | 3892 | 3878 | 9222 | 10113 |
| 8 | A | 3895 | 3885 | 9157 | 10927 |
| 8 | B | 3894 | 3887 | 9281 | 10105 |
| 8 | C | 3894 | 3885 | 9674 | 10105 |

Without faults, FGC_MIX is faster on the multiply-heavy kernel because every
coprocessor is one hop away. With faults it loses more than FGC does. The
slowest core is the one whose coprocessor now serves four processors. So
execution time jumps with the first failures, and later failures add only a
little, depending on where the replacements land and how the packets of
different pairs meet in the network. These kernels are much denser in M
instructions than real applications, so the percentages are far larger than
for a realistic instruction mix.

## Where this RTL makes its own choices

The overall organisation is that of the published architecture: the tile
types, both placements, the 4x4x2 mesh, XYZ routing, wormhole switching,
on-off flow control, input buffering, round-robin/fixed arbitration, the
replacement criteria and the address-only failover. The following were not
specified there and are choices of this implementation:

* the node numbering, and which coprocessor of each FGC pair is the
  multiplier (multipliers are on even nodes);
* the flit format and packet layout, the 4-flit buffers, the one-clock hop
  and the register-only `on` signal;
* the local memory size (4096 words) and the host loading port;
* the arithmetic units: a one-clock multiplier and a 32-step restoring
  divider;
* the NI behaviour: one outstanding request per core, and one request at a
  time per coprocessor;
* a failed coprocessor drains packets silently;
* replacements are computed by hardware after reset rather than offline. The
  search order is increasing node order, "fewest hops" means the smallest
  sum over the two affected processors, and ties go to the lower node;
* ECALL/EBREAK halts a core, and `cycles` counts its run time.

The published study measured area, power and maximum frequency after
synthesis to a 65 nm library. Those numbers depend on that flow and library
and are not reproduced here.

## Files

`rtl/mpsoc_pkg.sv` holds the shared types (`flit_t`, the port, placement and
tile enums) and the placement functions (`tile_kind`, `proc_node`,
`home_copro`, `sharer`, `hops`). The other files each contain one module:
`mpsoc` (top), `proc_tile`, `copro_tile`, `rv32i_core`, `local_mem`,
`proc_ni`, `copro_ni`, `mul_copro`, `div_copro`, `noc_mesh3d`, `noc_router`,
`noc_fifo`, `rr_arbiter` and `copro_remap`.
