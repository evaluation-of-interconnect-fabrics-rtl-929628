# Hierarchical MPSoC: bus-coupled CPU clusters on a 2D-mesh NoC

This RTL describes a many-core system organised in two levels. Small groups
of CPUs form a *cluster*, in which every CPU can load from and store to the
data memory of every other CPU over a cluster bus (non-uniform memory
access: there is no shared memory, only local memories that are reachable
remotely). Clusters are joined by a packet-switched *network on chip* (NoC),
a 2D mesh of switch boxes. A DMA engine in each cluster, the network cluster
interface (NCI), moves data between a cluster's memories and the network.
The idea is to keep the cheap, low-latency bus for nearby communication and
pay for a network only between groups of CPUs, instead of giving every CPU
its own network node.

The default configuration is "2x2x4": a 2x2 mesh, 4 CPUs per cluster,
16 CPUs in total, each with a 16 kB data memory, an AXI-style crossbar in
every cluster and one register stage on each side of the crossbar. Each
cluster can instead be built on a pipelined Wishbone bus, and either bus
as a shared bus instead of a crossbar.

The CPU cores themselves are not included. For every CPU the top level
exposes the port a core would drive towards the bus (`cpu_req`/`cpu_rsp`)
and the port to its own data memory (`lmem_req`/`lmem_rsp`). The
testbenches drive these ports directly.

```
 mpsoc_top
 ├── noc_switch  (one per mesh node, 5 ports)
 └── cluster     (one per mesh node)
     ├── cpu_bus_master  (per CPU; write FIFO inside: sync_fifo)
     ├── dmem            (per CPU; 16 kB, CPU port + bus slave)
     ├── nci             (DMA: bus master + bus slave + flit ports)
     ├── axi_reg_slice   (master and slave register stages, reg_stage)
     ├── axi_interconnect (shared bus or crossbar, rr_arbiter)
     └── Wishbone variant, BUS_STD = BUS_WB, replacing the three above:
         cpu_wb_master, wb_reg_slice, wb_interconnect,
         wb2axi_slave (in front of each dmem and the NCI registers),
         axi2wb_master (behind the NCI's DMA port)
 mpsoc_pkg: bus structs, flit format, port numbering
```

## The cluster bus

The bus is a single-beat subset of AXI4 with 32-bit addresses and data and
the five usual channels (write address AW, write data W, write response B,
read address AR, read data R). A port is one request struct (`axi_req_t`,
master to slave) and one response struct (`axi_rsp_t`). There are no IDs,
no bursts and no outstanding transactions: a master has at most one read
and one write in flight and waits for R or B before issuing the next.
Different masters are not held back by each other's responses, though:
see write interleaving below.

**Address map.** Each slave owns a 16 kB window. CPU *k*'s data memory is at
`k * 0x4000`; the NCI registers follow the last CPU at `N_CPU * 0x4000`.
Addresses are cluster-local; other clusters are reached only through the
NCI.

**Topologies** (`TOPOLOGY` parameter of `axi_interconnect`, `cluster` and
`mpsoc_top`):

* `TOPO_SHARED`: one write-address arbiter and one read-address arbiter for
  the whole bus, plus one that picks among slaves returning a write
  response in the same cycle. Read and write paths are separate, so a read
  and a write transfer at the same time; only one address of each kind
  per cycle.
* `TOPO_CROSSBAR`: a write-address and a read-address arbiter per slave.
  Different slaves serve different masters in parallel.

Arbiters are round robin (`rr_arbiter`). Because a master has nothing
outstanding, W and R need no arbiters of their own: once an address has
won, the interconnect steers that master's W to the slave and the slave's
R back to it. The grant is combinational; the interconnect itself holds
only owner state.

**Write interleaving.** A write holds the bus only until its AW and W are
through. Each slave has a small queue (`N_M` entries) of the masters whose
writes it has accepted; its B responses go back in that order. So while
one master waits for its B, the next master's write already uses the bus:
a single master writes every second cycle, two or more masters together
can fill every cycle. A read holds its path from AR until R.

**Register stages.** `axi_reg_slice` puts one register on each of the five
channels. `MST_REGS` stages sit between every master and the interconnect,
`SLV_REGS` between the interconnect and every slave. Each stage adds one
cycle on the way out and one on the way back.

**Timing** (no contention):

| operation | cycles |
|---|---|
| remote load, no register stages | 4 (request register, SRAM, memory response register, master response register) |
| remote load, 1 master + 1 slave stage (default) | 8 |
| store stream from one CPU | one bus write every 2 cycles (AXI), every cycle (Wishbone) |
| CPU access to its own memory | load data 1 cycle after the request |

## The Wishbone variant

With `BUS_STD = BUS_WB` (parameter of `cluster` and `mpsoc_top`) the
cluster uses the pipelined mode of Wishbone: a master raises `cyc` for a
bus cycle and, inside it, may present a new request (`stb`, `we`, `adr`,
`dat`, `sel`) in every cycle in which the bus does not assert `stall`.
Every request is answered by one `ack` (or `err`), with read data on `dat`.
Acknowledges may arrive in the same cycle as the request (the interconnect
has no registers of its own).

`wb_interconnect` arbitrates when a master starts a bus cycle and keeps the
grant until the master drops `cyc`; inside one bus cycle a master talks to
a single slave. The shared bus has one round-robin arbiter, the crossbar
one per slave. `wb_reg_slice` is the register stage (request and
acknowledge each gain one cycle).

The difference that matters is the write rate. `cpu_wb_master` drains its
write FIFO as pipelined writes inside one bus cycle, one per clock, as long
as they go to the same slave; a change of slave ends the bus cycle once all
writes are acknowledged and starts a new one. An AXI master issues a write
only every second cycle. Loads behave as with AXI: they wait for the FIFO
to drain, use a bus cycle of their own and take 4 cycles without register
stages, 8 with the default stages.

The data memories and the NCI keep their single slave port in both
variants: `wb2axi_slave` is a combinational front that turns a Wishbone
request into AW+W or AR and the B or R response into `ack`. The NCI's DMA
port drives the Wishbone bus through `axi2wb_master`, which performs one
transfer at a time and alternates between a waiting read and write.

## CPU bus master and write FIFO

`cpu_bus_master` turns CPU loads and stores into bus transactions. Stores
are posted into a FIFO (`FIFO_DEPTH`, default 4) and are granted at once
while it has room, so the CPU does not wait for a congested bus; it only
stalls when the FIFO is full (`wfifo_full`). The FIFO drains one write at a
time, loading the next write in the cycle the previous B arrives, hence one
write per two cycles. A load is granted only when the FIFO is empty and no
write is in flight, so it always sees the CPU's earlier stores; the CPU then
waits for `rvalid`.

CPU-side port (`cpu_req_t` / `cpu_rsp_t`): hold `req` with `we`, byte
address, `wdata` and byte enables `be` until `gnt` is high; load data comes
later with a one-cycle `rvalid` pulse. Issue no new load before `rvalid`.

## Data memory

`dmem` is a single-ported synchronous SRAM model of `WORDS` 32-bit words
(4096 = 16 kB) with byte enables. The CPU's own port has priority: in a
cycle with a CPU access the bus side is not ready. A bus write needs AW and
W together and is answered with B one cycle later; up to two responses may
wait, so writes can be accepted in consecutive cycles. A bus read delivers
R two cycles after the AR handshake.

## Network on chip

**Flits.** Every flit is 87 bits: a 23-bit header and 64 bits of payload.
The header (`flit_hdr_t`) is, from the top bit down:

| field | bits | meaning |
|---|---|---|
| `last` | 1 | last flit of the packet |
| `dst_x`, `dst_y` | 2 + 2 | destination mesh node |
| `src_x`, `src_y` | 2 + 2 | source mesh node |
| `dst_cpu` | 3 | CPU in the destination cluster |
| `dst_addr` | 11 | 64-bit word address in that CPU's data memory |

Two-bit coordinates allow meshes up to 4x4, three-bit CPU numbers up to 8
CPUs per cluster. Because every flit carries its own destination address,
a receiver needs no per-packet state.

**Switch box** (`noc_switch`). Five ports: local (0), north (1, y+1), east
(2, x+1), south (3, y-1), west (4, x-1). Each input has a FIFO of
`BUF_DEPTH` flits (default 4); each output has one register, giving a
latency of two cycles per switch box. Routing is XY (first x, then y).
Switching is wormhole: when the first flit of a packet wins an output, the
output stays locked to that input until the flit with `last` has passed, so
packets never interleave on a link. A free output is given to waiting
inputs in round-robin order. Links use valid/ready flow control; a full
input buffer back-pressures the upstream switch.

## NCI: the DMA engine

The NCI is both a slave (its registers) and a master (its DMA port) on the
cluster bus, and is attached to the local port of the cluster's switch box.

| offset | register | access |
|---|---|---|
| 0x00 | `TX_SRC`: byte address of the data to send (cluster address) | R/W |
| 0x04 | `TX_DST`: `{dst_x[17:16], dst_y[15:14], dst_cpu[13:11], dst_addr[10:0]}` | R/W |
| 0x08 | `TX_LEN`: packet length in flits, 1 to 512 (4 kB) | R/W |
| 0x0C | `CTRL`: write starts sending; read bit 0 = busy | W / R |
| 0x10 | `RX_CNT`: flits received and stored; a write clears it | R/W |

Sending: flit *k* carries the words at `TX_SRC + 8k` (low half) and
`TX_SRC + 8k + 4` (high half) and goes to `dst_addr + k`. The engine reads
both words over the bus and then offers the flit to the switch box; a start
while busy is ignored. Receiving: each incoming flit is written with two
bus writes to `dst_cpu * 0x4000 + dst_addr * 8` and `+4`, then `RX_CNT`
increments. Sending uses the read half and receiving the write half of the
DMA port, so both run at the same time. Software on the receiving side
learns of new data by polling `RX_CNT`.

Example, CPU 0 of node (0,0) sends 64 bytes from its memory to CPU 1 of
node (1,1), starting at that memory's byte 0x100:
`TX_SRC=0x0000_0000`, `TX_DST=(1<<16)|(1<<14)|(1<<11)|0x20`, `TX_LEN=8`,
`CTRL=1`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mpsoc_top` | `MESH_X`, `MESH_Y` | 2, 2 | mesh size (at most 4x4) |
| `mpsoc_top`, `cluster` | `N_CPU` | 4 | CPUs per cluster (at most 8) |
| | `BUS_STD` | `BUS_AXI` | or `BUS_WB` |
| | `TOPOLOGY` | `TOPO_CROSSBAR` | or `TOPO_SHARED` |
| | `MST_REGS`, `SLV_REGS` | 1, 1 | register stages per port |
| `cluster` | `DMEM_WORDS` | 4096 | data memory size in 32-bit words |
| `cluster` | `FIFO_DEPTH` | 4 | write FIFO entries |
| `noc_switch` | `BUF_DEPTH` | 4 | input buffer flits |
| `nci` | `MAX_FLITS` | 512 | longest packet |

## Where this RTL makes its own choices

The structure (clusters on a bus, mesh of wormhole switch boxes, NCI as a
DMA engine that writes flits straight into target memories), the sizes
(32-bit bus, 16 kB memories, 23 + 64-bit flits, 4 kB packets), the round-robin
arbitration, the arbiter arrangement of the two topologies, the absence of
outstanding transactions, the 4-cycle minimum read latency, the write every
second cycle, the two-cycle switch latency and the register-stage counts
come from the system's description. The following are choices of this RTL:

* the bus is a single-beat AXI subset without IDs or bursts;
* on Wishbone, a grant lasts for a whole bus cycle, a bus cycle addresses
  one slave, and slaves and the NCI are attached through the adapters
  described above;
* the address map, the NCI register map and the split of the flit header
  into fields;
* XY routing, valid/ready links, input buffer and write FIFO depths;
* a load waits for the write FIFO to drain; the CPU port of a data memory
  has priority over the bus;
* an out-of-range bus address is caught by an assertion, not answered with
  an error response;
* all control state has an asynchronous active-low reset (`rst_n`); memory
  arrays are not reset.

Not included: the CPU cores and their instruction memories, and with them
any control registers a core would expose on the bus (start, reset); a
switch box with other than five ports (the mesh needs exactly five, other
topologies would need a different `noc_switch`); virtual channels and
mesochronous
(GALS) links, which the system can have but which are switched off in this
configuration. Everything is one clock domain.

## Verification

Every main module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog; the
small helpers (`reg_stage`, `sync_fifo`, the Wishbone register stage and
adapters) are tested through the modules that contain them.

| testbench | what it checks |
|---|---|
| `tb_rr_arbiter` | grants against a reference model; fairness |
| `tb_axi_reg_slice` | random traffic on all five channels, order and value, one-cycle delay |
| `tb_dmem` | both ports, byte enables, CPU priority, bus read latency 2 |
| `tb_cpu_bus_master` | load latency 4, FIFO-full stall, one write per 2 cycles, read-after-write |
| `tb_cpu_wb_master` | Wishbone: load latency 4, one write per cycle in a single bus cycle, FIFO-full stall, read-after-write |
| `tb_axi_interconnect` | shared bus and crossbar side by side with 4 masters and 4 slaves; data, parallelism, waits, interleaved writes |
| `tb_wb_interconnect` | the same for Wishbone, with pipelined bursts; a lone master reaches one write per cycle |
| `tb_noc_switch` | latency 2, XY output choice, per-path order, no packet interleaving, contention |
| `tb_nci` | flit headers and payloads, receive writes, `RX_CNT`, busy flag |
| `tb_cluster` | concurrent remote stores/loads, 8-cycle load with register stages, DMA copy through the NCI |
| `tb_cluster_wb` | the same test on a Wishbone cluster (also covers `wb_reg_slice`, `wb2axi_slave`, `axi2wb_master`) |
| `tb_mpsoc_top` | the full 16-CPU default design: cluster traffic (including three CPUs writing one memory, so writes interleave), then four simultaneous packets over the mesh (two-hop routes, link back-pressure), with counters for each mechanism |

`tb_mpsoc_top` runs the top with all parameters at their defaults and takes
well under a second. To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mpsoc_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top
./obj_dir/Vtb_mpsoc_top
```

Variables that are never reset start at random values in a two-state
simulator (`+verilator+rand+reset+2`); the design resets everything it
reads.
