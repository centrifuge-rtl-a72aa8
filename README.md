# Attaching HLS kernels to a RISC-V SoC: RoCC, TileLink and network shims, plus a DiracDeltaNet dataflow block

A high-level-synthesis tool turns a C function into a hardware kernel with a simple
block protocol (`ap_start`/`ap_done`/`ap_return`) and one memory port per pointer
argument (`ap_bus`). This kernel does not fit straight into a Rocket-style RISC-V
SoC, for three reasons:

* the core's tightly coupled accelerator port (RoCC) gives the kernel the L1 data
  cache, but that cache answers requests **out of order**. `ap_bus` assumes
  **program order** within each port and between ports;
* a kernel on the system bus (TileLink) needs memory-mapped argument and control
  registers. Its Linux driver also needs physical addresses for user pointers;
* a kernel that talks to other chips over Ethernet needs its own packet queues
  next to the NIC's.

This RTL holds the logic that fills each of these gaps. It follows the Centrifuge
SoC generation flow. It also holds one of the accelerators evaluated with that flow:
a spatial dataflow implementation of the DiracDeltaNet building block,
attached to memory like a system-bus kernel.

The core, caches, system bus, NIC, DRAM and the HLS kernels are not here. They
connect through the ports of `centrifuge_top`.

## Blocks

| module | role |
|---|---|
| `rocc_acc_ctrl` | Turns one custom RISC-V instruction into one kernel call. It passes the arguments, runs the ap_ctrl handshake and returns `ap_return` to the destination register. |
| `rocc_mem_bridge` | Serves the kernel's `ap_bus` ports through the out-of-order L1 port while keeping program order. It also fetches arguments from memory. |
| `ap_bus_req_parser` | Helper. Adds the bus offset and splits an `ap_bus` burst into word requests. |
| `vtop_translator` | RoCC accelerator that translates a user virtual address through the page-table walker (Sv39). |
| `tl_acc_ctrl` | Memory-mapped argument, start, done and return registers of a TileLink-attached kernel. |
| `nic_accel_router` | Steers received packets with Ethertype ACCEL_ONLY into the accelerator's header and payload queues. Merges the accelerator's transmit queues with the NIC's. |
| `ddn_block` | DiracDeltaNet building block. Split, max pool, three 1x1 convolutions, shift, concat & shuffle. |
| `ddn_conv1x1`, `ddn_maxpool`, `ddn_shift` | The layer units of `ddn_block`. |
| `ddn_tl_accel` | `ddn_block` as a memory-attached accelerator. It has control registers, loads its weights from memory, and streams maps from memory and back to memory. |
| `sync_fifo` | Helper. Generic valid/ready FIFO of any type. |
| `centrifuge_pkg` | Shared widths, command and memory structs, and the flit type. |
| `centrifuge_top` | All of the above side by side. Each attachment keeps its own ports. |

## The RoCC memory bridge: keeping `ap_bus` order over an out-of-order cache

This is the least obvious part of the design.

An HLS kernel may have two `ap_bus` ports that point at overlapping memory. A read
on port 1 can then depend on a write on port 0 issued a cycle earlier. The HLS tool
schedules such accesses as if memory were sequential. The L1 port, however,
accepts tagged requests and returns them in any order. The bridge therefore works
like the issue stage of a single-issue out-of-order core.

**Request path.** Each port has a request parser. The parser adds the port's base
address (its *bus offset*, taken from the pointer argument) to the word address. It
also splits a burst `(addr, size)` into `size` single-word requests. Each word
request is stamped with a free-running timestamp counter and waits in a small
per-port FIFO. A request to load the argument block waits in a FIFO of its own.

**Arbiter.** It looks only at the heads of the FIFOs. It computes, for each head,
`stamp - previous_issued_stamp` (modulo the counter width) and issues the smallest.
The effect is that requests leave in the order they entered. Requests that entered
in the same cycle leave lowest port first.

**Stall.** The chosen head is held, and because it is the oldest, everything behind
it waits too, when any of these holds:

* no tag is free;
* it touches a 64-bit word that an outstanding request also touches, and either
  of the two is a write. This covers read-after-write, write-after-read and
  write-after-write;
* it is a read and its port's response queue has no free slot.

`stall_conflict` and `stall_no_tag` pulse in each cycle that the first two causes
hold.

**Tag table.** An issued request pops a tag from the free-tag FIFO. The table row of
that tag stores valid, write, width, port and word address. For a read it also
stores the response slot reserved for it. The conflict check compares the next
request with every valid row.

**Return path.** A response is looked up by its tag. The row tells which port's
response queue it belongs to. Read data is written into the slot reserved at issue.
The queue releases slots only from its head, in order. So each port sees its data
in request order even though the cache answers out of order. Store acknowledgements
only free their tag. Argument loads fill the argument registers, and `arg_rdy` is
the AND of their valid bits.

**`mem_busy`** is high while anything is being parsed, queued or outstanding. The
controller waits for it to fall before it answers the core. This way all of the
kernel's stores are complete when the instruction retires.

Throughput: at most one memory request per cycle. A word can issue one cycle after
its `ap_bus` beat is accepted.

The block structure comes from the Centrifuge design: parsers with offsets,
timestamp counter, priority arbiter on delta-t, stall unit, free tags, tag table,
response switch, argument registers with `arg rdy`, and `mem busy`. The following are
this implementation's own choices:

* word-granular conflict checks;
* reorder slots in the response queues;
* the queue depths (4);
* the tag count (8);
* the timestamp width (16).

### Port conventions

Each `ap_bus` port is a request stream and a response stream, both valid/ready:

* request: `write`, word `addr`, burst `size` in words, `data`. A write burst sends
  `size` beats, and the first beat carries the address;
* response: read data only.

The L1 side uses `mem_req_t {addr, tag, cmd, size, data}` and
`mem_resp_t {tag, has_data, data}`. Here `cmd` is `M_XRD` or `M_XWR` and `size` is
3 (8 bytes). The L1 side has a ready on requests and no back-pressure on responses.

## Calling a RoCC kernel

`rocc_acc_ctrl` decodes `funct7` of the custom instruction:

| funct7 | meaning |
|---|---|
| 0 | `rs1`, `rs2` are arguments 0 and 1 |
| 1 | `rs1` is the address of `NARG` 64-bit arguments. The bridge loads them, and the call starts at `arg_rdy`. |

Argument `BUS_ARG[b]` also becomes the bus offset of `ap_bus` port `b`. By default,
argument 0 is port 0 and argument 1 is port 1. The controller then does the
following:

1. holds `ap_start` until `ap_ready`;
2. waits for the `ap_done` pulse and captures `ap_return`;
3. waits for `mem_busy` to fall;
4. if `xd` is set, returns the value to `rd`.

`busy` covers the whole call, so fences around the instruction work as expected.

## TileLink kernels and address translation

`tl_acc_ctrl` is the slave side of the stores and loads that a driver uses to run a
physically addressed kernel. Its register map, in byte offsets with 64-bit
registers:

| offset | register |
|---|---|
| 0x00 | CTRL. bit0 `ap_start` (write 1, reads 1 until taken), bit1 done (set by `ap_done`, cleared on read), bit2 idle, bit3 ready |
| 0x08 | RETURN, captured at `ap_done` |
| 0x10 + 8i | ARG i, i < `NARG` (4). Pointer arguments are physical addresses. |

The MMIO port is a plain request/response pair that stands for the TileLink slave
port. It answers one cycle after acceptance.

Under Linux the driver must hand the kernel physical addresses. `vtop_translator` is
a RoCC accelerator for that purpose. `rs1` holds the virtual address. It sends the
VPN (27 bits, Sv39, 4 KiB pages) to the core's page-table walker. It returns
`{ppn, offset}`, or all ones on a page fault. One translation is in flight at a time.
The design requires buffers to be physically contiguous, so one translation per
pointer is enough.

## Network-attached kernels

`nic_accel_router` sits between the network and the NIC. It uses 64-bit flits with
`keep` and `last`. The first two flits of a packet form the header: 2 bytes of
padding, destination MAC, source MAC and Ethertype. The Ethertype is in bytes 6–7
of flit 1, in network byte order.

**Receive.** The router buffers the two header flits and decides:

* if the Ethertype is ACCEL_ONLY (`16'h88B5`, a local experimental value set in
  `centrifuge_pkg`), the header goes to the accelerator's header queue and the rest
  to its payload queue. The header's second flit is marked `last`;
* otherwise the packet passes to the NIC unchanged.

A full queue stalls the receive stream. Receive buffering is sized, not flow
controlled. The payload queue acts as a blocking-read stream for a dataflow kernel.

**Transmit.** The accelerator writes a header (2 flits, the last one marked) and a
payload (ending with `last`). A round-robin arbiter merges whole packets with the
NIC's transmit stream and never switches in the middle of a packet.

## DiracDeltaNet building block

```
input --Split--+--> maxpool 2x2 --> conv1x1 (L) --------------------> FIFO --+
               |                                                            +--> concat & shuffle --> output
               +--> conv1x1 (R1) --> maxpool 2x2 --> shift --> conv1x1 (R2) -+
```

Every layer has its own unit, and FIFOs link the units. Each unit starts as soon as
its input arrives.

**Data format.**

* Pixels arrive in raster order. A pixel is a vector of `C_MAX` = 128 signed 8-bit
  channels, and only the first `cfg_c` are used.
* The map is square, `cfg_w` x `cfg_w`, with `cfg_w` ≤ `W_MAX` = 32.
* `cfg_c` must be a multiple of 8 and `cfg_w` a multiple of 4.

**Layers.**

* **Split** copies each pixel to both branches.
* **Convolutions.** Each 1x1 convolution is an 8x8 array of 64 multiply-accumulate
  units. Per cycle it multiplies one 8x8 weight tile by 8 input channels and adds
  the result into 8 of the 32-bit accumulators. It therefore takes
  `1 + (cfg_c/8)^2` cycles per pixel. The output is `acc >>> 7`, saturated to int8.
* **Max pool** is 2x2 with stride 2.
* **Shift** moves channel `c` by one pixel in direction `g = c mod 9`:
  `out(y,x,c) = in(y + g/3 - 1, x + g%3 - 1, c)`, zero outside the map.
* **Concat & shuffle** interleaves the two branches. Output channel `2k` is left
  channel `k`, and `2k+1` is right channel `k`.

**Weights.** Weights are preloaded through `w_we`/`w_unit`/`w_addr`/`w_data`:

* `w_unit`: 0 selects L, 1 selects R1, 2 selects R2;
* `w_addr = out_tile * (C_MAX/8) + in_tile`;
* byte `o*8+i` of the 512-bit `w_data` is the weight from input channel
  `in_tile*8+i` to output channel `out_tile*8+o`.

**Timing.** The R1 convolution runs at full resolution and is the bottleneck. The
left branch can run ahead by the shift stage's one-row delay, which is why the left
FIFO is 32 pixels deep.

### As a memory-attached accelerator

`ddn_tl_accel` wraps the block the way a system-bus kernel is attached. It has the
same control registers as `tl_acc_ctrl`, plus a 512-bit memory master. The master
sends one request per beat, allows up to 16 outstanding requests, and expects
in-order responses, one per request. A write gets an empty acknowledge.

Arguments:

| register | content |
|---|---|
| ARG0 | weight address: 3 units × (c/8)² tiles of 64 bytes. Order: unit, then output tile, then input tile. |
| ARG1 | input map address: raster order, `ceil(c/64)` 64-byte beats per pixel |
| ARG2 | output map address: raster order, `ceil(2c/64)` beats per pixel |
| ARG3 | bits 7:0 width `w`, bits 15:8 channels `c` |

A run has two phases:

1. The accelerator reads every weight tile into the on-chip buffers.
2. It reads input beats and writes output beats at the same time. Writes go first.
   Input reads are issued only while the 8-beat input buffer has room.

When the last write is acknowledged, RETURN holds the number of cycles from start to
done.

### Measured rates

Full size, measured by `tb_ddn_workloads`. The memory model takes one request per
cycle and answers after 30 cycles. Operations are counted as 0.75·w²·c² per map,
which is the count the published table uses. That count is half the
multiply-accumulates this block performs (1.5·w²·c²).

| map (width x channels) | ops | cycles, start to done | ops/cycle | published ops/cycle |
|---|---|---|---|---|
| 32x16 | 196,608 | 5,324 | 36.9 | 4.55 |
| 32x32 | 786,432 | 17,896 | 43.9 | 15.12 |
| 32x64 | 3,145,728 | 68,201 | 46.1 | 20.59 |
| 16x128 | 3,145,728 | 69,988 | 44.9 | 21.35 |
| 8x64 | 196,608 | 5,021 | 39.2 | 17.09 |

These numbers are not a reproduction of the published ones. The published design
ran against a full DRAM and cache system, while this test uses an idealised memory
that is always ready. The published design may also schedule its MAC units
differently. Only the trend is shared: the 32x16 map is among the least efficient
in both sets, and deeper maps do better. Here the bound is the first right
convolution, which needs `1 + (c/8)^2` cycles for each of the `w^2` input pixels.

## Where this RTL departs from, or goes beyond, the published design

* Only these parts are described by the published design: the block structure of
  the memory bridge, the three-way split of the coupling, the Ethertype steering
  with separate header and payload queues, and the DiracDeltaNet unit list with
  three 8x8 MAC units and preloaded weights.
* The following are this implementation's choices:
  * every width and encoding;
  * every queue depth;
  * the register map;
  * the ACCEL_ONLY value;
  * the flit layout;
  * the number formats;
  * the pool size;
  * the shift pattern;
  * the shuffle pattern.
* The "8x8 MAC unit" is read as an 8x8 array. A single MAC per unit could not
  reach the published rates.
* In `ddn_tl_accel` the following are this implementation's choices: the argument
  layout, the memory layouts and the cycle-count return value.
* Not built: the core and caches, the HLS kernels, the TileLink-to-AXI4 bridge, the
  NIC itself, and the VGG16 convolution clusters that exchange data over Ethernet.
  The published design names the clusters but does not describe their insides.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/centrifuge_pkg.sv tb/tb_centrifuge_top.sv --top-module tb_centrifuge_top
./obj_dir/Vtb_centrifuge_top
```

Substitute any other testbench:

| testbench | what it covers |
|---|---|
| `tb_rocc_mem_bridge` | Random out-of-order cache latencies. Overlapping reads and writes on two ports. Bursts. Argument fetch. Both stall causes. |
| `tb_rocc_acc_ctrl` | Both call modes. The handshake. Response timing after `mem_busy`. |
| `tb_vtop_translator` | Random mapped and unmapped pages. |
| `tb_tl_acc_ctrl` | Register map, start and done polling, clear-on-read. |
| `tb_nic_accel_router` | Random packets of both kinds under back-pressure. Packet-atomic transmit merge. |
| `tb_ddn_conv1x1`, `tb_ddn_maxpool`, `tb_ddn_shift`, `tb_ddn_block` | Each layer unit and the block against a reference model, at reduced sizes. |
| `tb_ddn_tl_accel` | The memory-attached accelerator at reduced size. Random memory latency and back-pressure. Four map sizes, control registers and RETURN. |
| `tb_ddn_workloads` | The memory-attached accelerator at full size over the five map sizes above. |
| `tb_centrifuge_top` | The whole top at its default parameters (see below). |

`tb_centrifuge_top` runs the following at the top's default parameters:

1. translate two pointers, plus one unmapped page;
2. call an in-place `vadd` kernel model twice (register arguments, then in-memory
   arguments), with a read-back that depends on the last write;
3. run a TileLink kernel by polling;
4. exchange packets both ways;
5. run one 8x8x64 DiracDeltaNet map from memory to memory through the
   accelerator's registers.

It counts the following and fails if any of them never happened:

* conflict stalls and no-tag stalls;
* out-of-order responses;
* argument fetches;
* page faults;
* packets steered each way;
* transmit packets from both sources;
* cycles where all three MAC arrays work at once.

Each full-size testbench finishes in seconds of simulation once compiled.
