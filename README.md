# PRO3 protocol processor: packet path in SystemVerilog

A stateful firewall with address translation has to look at every packet of
a 2.5 Gb/s link, up to 7.5 million minimum-size packets per second, and keep
state for hundreds of thousands of connections. The PRO3 architecture handles
this by never moving whole packets through a processor:

- The packet body is written once into a segmented packet memory, in a queue
  per flow.
- Only the first one or two 64-byte segments go to a processing module.
- There a microprogrammed **field extractor** pulls out the few header fields
  that matter.
- A RISC core sees only those fields plus the flow's state word, and decides
  accept or reject and the new field values.
- A microprogrammed **field modifier** writes the new values back into the
  header.
- The memory manager puts the modified segments back in front of the stored
  body and sends the packet out.

The work per packet therefore depends on the header, not on the packet
length.

This repository is synthesizable RTL for that packet path. It covers the
classifier, the data memory manager, the task scheduler, the two RISC-based
pipelined modules (without the RISC cores), the control-RAM interface, the
timer pool and the CRC units. The parts that sit outside the chip, or that
are licensed cores, connect through ports:

- the ternary CAM;
- the RISC cores;
- the host CPU.

Behavioural models of these parts are in `tb/`.

## How a packet moves

```
            +--> CRC-32 / CRC-10 (receive)
 in_* ------+--> pkt_classifier --(drop | flow ID)--+
            |      verifier, fex, CAM search         |
            +--> dmm: segments, per-flow queues <----+
                   |  enter flow              ^ take flow
                   v                          |
                 wrr_sched (32 WRR queues) ---+
                   |
        dest 0: whole packet     dest 1: first 1-2 segments
                   |                   v
                   |         rpm[0] / rpm[1]: fex -> rpg <-> RISC (ports)
                   |                   |  delay FIFO -> fmo
                   |                   v
                   |         dmm writes modified segments back,
                   |         or discards the packet if rejected
                   v
               out_* --> CRC-32 (transmit)
```

1. **Receive.** A frame arrives on `in_*` as 64-bit beats. The DMM and the
   classifier take each beat together: `in_ready` is the AND of both. The
   DMM writes the beats into free 64-byte segments. The classifier keeps the
   first 128 bytes and checks the IPv4 header:
   - version 4;
   - header length of at least 20 bytes;
   - a correct header checksum;
   - a total length no larger than the bytes received.

   It runs its extraction program and sends a 144-bit key to the CAM.
2. **Link.** The classifier's verdicts come out in packet order. The DMM
   pairs each verdict with the oldest stored packet.
   - A dropped packet (bad header or CAM miss) goes straight back to the
     free list.
   - An accepted packet is appended to its flow's queue. The flow is then
     entered in the scheduler if it was empty and idle.
3. **Schedule.** The scheduler hashes the flow to one of 32 queues using the
   low five bits of the flow ID. Each queue has a weight and a destination.
4. **Serve.** When the scheduler offers a flow, the DMM removes that flow's
   head packet.
   - Destination 0: the packet is queued for transmission.
   - Destination 1: its first segment goes to the next RPM, or its first two
     segments if the packet is longer than 64 bytes. The two RPMs are used
     in turn, skipping one that is busy.
5. **Process.** The RPM runs its extraction program on the segments while
   the same beats wait in its delay FIFO.
   - The glue logic (`rpg`) reads the flow's 64-bit state from the control
     RAM, loads fields and state into one half of the register file, and
     starts the RISC core on that half.
   - When the core reports done, the new fields and the verdict go to the
     modifier, and the new state is written back.
   - The modifier rewrites the delayed header and recomputes the IP header
     checksum.
6. **Return.** The modified beats come back to the DMM. The DMM writes them
   over the stored segments and queues the packet for transmission, or for
   discarding if the verdict was reject.
7. **Transmit.** The packet is streamed out and its segment chain is freed.
   If the flow has more packets, it is entered in the scheduler again.

Only one packet of a flow is in service at any time. That is how the packets
of a flow stay in order even though two RPMs with different latencies run in
parallel.

## Data memory manager (`rtl/dmm.sv`)

The packet memory is `NSEG` segments of eight 64-bit words each.

**Linked lists.**
- Free segments form a singly linked list.
- A packet is a chain of segments linked through `seg_next`.
- Per packet, kept at its first segment: length, last segment, and the link
  to the next packet of the same flow.
- Per flow (indexed by the 19-bit flow ID): head packet, tail packet, packet
  count, and a busy bit.

Freeing a packet splices its whole chain onto the free list in one cycle. No
walk is needed, because the chain's last segment is known.

**Engines.** Five engines run at the same time:

| engine   | does |
|----------|------|
| input    | allocates segments and writes beats; records (first, last, length) of each finished packet in a small pending FIFO |
| linker   | pairs a pending packet with the classifier verdict; frees it, or appends it to the flow queue and enters the flow in the scheduler |
| service  | takes a flow from the scheduler; queues the head packet for transmission or streams its header segments to an RPM |
| return   | writes an RPM's modified beats over the stored words; queues the packet as transmit or discard |
| transmit | streams a packet out (or skips that for discards), frees the chain, re-enters the flow if it has more packets |

The engines share the free list and the flow table. Fixed priorities settle
conflicts:
- Transmit completion beats the service engine, which beats the linker.
- A free is held off in a cycle where the input engine allocates.

After reset, a sweep of `max(NSEG, NFLOWS)` cycles builds the free list and
clears the flow table, and then raises `init_done`. At the default 512K flows
this is 524,288 cycles, about 2.6 ms at 200 MHz.

## Task scheduler (`rtl/wrr_sched.sv`)

There are 32 queues. Each holds a FIFO of flow IDs, kept as a linked list
through a next-flow memory with one entry per flow.

The current queue may hand out up to `weight` flows in a row. The turn then
passes to the next non-empty queue. Within a queue, flows are served in
turn. A flow that still has packets is put at the back of its queue again,
so all flows of a queue share that queue's service equally.

Each queue's weight (8 bits; 0 counts as 1) and destination are written
through `cfg_*`. Enqueue is always accepted, including into a queue whose
only flow is leaving in the same cycle.

## RISC-based pipelined module (`rtl/rpm.sv`)

### Extractor and modifier microcode (`fex.sv`, `fmo.sv`)

Each engine has its own 2048-word program store, loaded through `prog_*`.
Both engines use one 32-bit instruction format:

| bits  | field  | meaning |
|-------|--------|---------|
| 31:28 | op     | 0 END, 1 EXTR, 2 ADDB, 3 SETB, 4 REPL, 5 CSUM |
| 27:24 | fld    | field register 0..15 |
| 23:17 | off    | byte offset from the base pointer |
| 16:12 | shift  | right shift inside a 32-bit big-endian window |
| 11:6  | width  | bits to copy, 0..32 |
| 5:0   | imm    | new base (SETB) |

The instructions:
- **EXTR** (extractor): `field[fld] = (window(base+off) >> shift)` masked to
  `width` bits.
- **REPL** (modifier): the reverse. It writes the low `width` bits of the
  field into the header at that window position.
- **ADDB**: adds `4*field[fld]` to the base. This skips a variable-length IP
  header: extract the IHL, ADDB, and offsets are then relative to the TCP
  header.
- **SETB**: sets the base.
- **CSUM**: recomputes the IPv4 header checksum of the header at the base.

Every instruction takes two cycles (fetch, execute).
- The extractor reports its fields `2 x (instructions)` cycles after the
  last beat.
- The modifier starts sending the header `2 x (instructions) + 2` cycles
  after it has both the fields and the delayed beats.

The testbench programs in `tb/tb_util_pkg.sv` are worked examples:
- `rpm_fex_prog` extracts the stateful-inspection fields: IP header length
  and total length, TCP sequence and acknowledgement numbers, data offset,
  flags, window, checksum, plus addresses and ports. It takes 14
  instructions.
- `rpm_fmo_prog` writes back the translated source address and port and the
  TCP checksum, then fixes the IP checksum. It takes 7 instructions.
- `cls_fex_prog` builds the 5-tuple key.

### Two-half register file and the RISC port (`rpg.sv`)

The glue logic has two banks. Each bank holds:
- 16 fields;
- the 64-bit state;
- the verdict;
- the packet's tag.

One bank is loaded (fields from the extractor, state from the control RAM)
while the RISC core works on the other. This is what lets a packet's
extraction and state fetch overlap with the previous packet's processing.

The RISC core connects with these signals:

| signal | meaning |
|--------|---------|
| `risc_start` (pulse), `risc_bank` | a bank is ready; which one |
| `risc_addr[4:0]`, `risc_rdata` | combinational read of the active bank |
| `risc_we`, `risc_wdata` | write to the active bank |
| `risc_done` (pulse) | processing finished |
| `risc_stall` | holds the whole RPM: extractor, delay FIFO input, glue logic and modifier |

Register map (from `pro3_pkg`):

| address | content |
|---------|---------|
| 0-15    | fields |
| 16      | state, bits 31:0 |
| 17      | state, bits 63:32 |
| 18      | verdict, bit 0 = accept |
| 19      | flow ID |
| 20      | packet length |

The meaning of the state word belongs to the RISC software.
`tb/risc_model.sv` uses this layout:
- bit 63: flow blocked;
- bit 62: translate the source;
- bits 61:48: packet counter;
- bits 47:32: new source port;
- bits 31:0: new source address.

### Packet delay FIFO

The delay FIFO is a 64-beat `sync_fifo`. It holds the header beats from the
extractor's input until the modifier has the results for that packet.

## Packet classifier (`rtl/pkt_classifier.sv`)

The classifier has three parts:
- a verifier;
- a field extractor (the same `fex` with its own program);
- a small state machine that forms the key and talks to the CAM.

The key is `{field0, field1, field2, field3, field4[15:0]}` = 144 bits.

The CAM port works as follows:
- `cam_req_valid/ready` and `cam_key` carry the request.
- Some cycles later, the CAM answers with a one-cycle `cam_rsp_valid` and
  `cam_rsp_hit`, plus `cam_rsp_flow` (19 bits).

A bad header is dropped without a search, and so is a CAM miss.

The classifier works in two stages:
- The first stage receives a packet and runs the extractor over it.
- The second stage searches the CAM and reports the result.

While the second stage handles one packet, the first stage already takes in
the next. The extractor sets the pace, at 9 instructions × 2 cycles plus a
few cycles of hand-over. A stream of 40-byte packets runs at about 24 cycles
per packet, or ≈8.3 Mpackets/s at 200 MHz. That is above the 7.5
Mpackets/s of a 2.5 Gb/s link full of minimum-size packets.

Through the whole chip, on the forwarding path, 120 back-to-back 40-byte
packets take 2896 cycles, the same ≈24 cycles per packet.

## Control RAM, timers, CRC

- **`ctrl_ram_if`** holds one 64-bit state word per flow and arbitrates
  round robin among RPM 0, RPM 1 and the host.
  - A read returns two cycles after its grant.
  - A write takes effect at its grant.

  This is the timing of a pipelined zero-bus-turnaround SRAM.
- **`timer_pool`** has `NTIMERS` timers, each holding a flow ID and an
  expiry tick. One tick is `TICK_DIV` cycles, 1 µs at 200 MHz.
  - `tm_set_*` arms a timer, re-arms it, or cancels it.
  - A scanner checks one timer per cycle. An expired timer is reported on
    `tm_ev_*` at most `NTIMERS` cycles after its tick.
- **`crc_unit`** processes 8 bytes per cycle, MSB first.
  - The top uses CRC-32 (polynomial 0x04C11DB7, preset and final inversion
    all ones) and CRC-10 (0x233) on the receive stream, and CRC-32 on the
    transmit stream.
  - The result appears one cycle after a frame's last beat.

## Top-level interface (`rtl/pro3_top.sv`)

Parameters:
- `NFLOWS`: 2^19;
- `NSEG`: 65536, i.e. 4 MB of packet memory;
- `NTIMERS`: 1024;
- `DEPTH`: 2048 instructions.

Beats (`beat_t`) carry:
- `data[63:0]`, big-endian, byte 0 in bits 63:56;
- `sop` and `eop`;
- `nbytes`, the number of valid bytes on the last beat.

All streams are valid/ready.

| group | ports |
|-------|-------|
| network | `in_*`, `out_*`, `rx_crc_valid/rx_crc32/rx_crc10`, `tx_crc_valid/tx_crc32` |
| CAM | `cam_req_*`, `cam_key`, `cam_rsp_*` |
| RISC cores (one per RPM, arrays of 2) | `risc_start/bank/addr/we/wdata/rdata/done/stall` |
| host: microcode | `prog_we`, `prog_target` (0 classifier extractor, 1 both RPM extractors, 2 both RPM modifiers), `prog_addr`, `prog_wdata` |
| host: scheduler | `cfg_we`, `cfg_q`, `cfg_weight`, `cfg_dest` (0 forward, 1 process in an RPM) |
| host: flow state | `host_cr_req/we/addr/wdata/gnt/rvalid/rdata` |
| host: timers | `tm_set_*`, `tm_ev_*`, `tm_now` |
| status | `init_done`, `st_*` packet counters, `rpm_bank_full`, `free_cnt` |

Bring-up:
1. Reset, then load the three programs.
2. Write the CAM entries.
3. Configure the queues and write the flow states.
4. Wait for `init_done`, then send traffic.

## Not included, and where this departs from the architecture

- **External and licensed parts.** The following are not part of the RTL:
  - the ternary CAM;
  - the modified Hyperstone RISC cores and the control RISC CPU;
  - the host CPU interface;
  - the insert/extract path;
  - the ATM/CPCS receive and transmit layers;
  - the traffic scheduler that shapes output traffic.

  Cell (ATM) processing is therefore not possible. Only the CRC units those
  layers would use exist.
- **Memories are arrays.** Packet storage (an external DDR DRAM in the
  architecture), pointer memory, scheduling memory and control RAM (external
  SRAMs) are arrays inside `dmm`, `wrr_sched` and `ctrl_ram_if`. They are
  not controllers for external chips, and the DRAM's bandwidth sharing is
  not modelled.
- **Internal bus.** The shared 64-bit bus is replaced by point-to-point
  64-bit streams.
- **Instruction rate.** The engines take 2 cycles per instruction; the
  original engines average about 1.6 (extractor) and 1.7 (modifier). The
  instruction set is this design's own.
- **Own choices.** These are choices of this design, not given by the
  architecture:
  - the verifier's checks;
  - the key layout;
  - the queue hash;
  - the meaning of the weights;
  - the state-word size;
  - the sizes of the delay FIFO, segment memory and timer pool;
  - all handshakes.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/pro3_pkg.sv tb/tb_util_pkg.sv \
  rtl/sync_fifo.sv rtl/crc_unit.sv rtl/fex.sv rtl/fmo.sv rtl/rpg.sv rtl/ctrl_ram_if.sv \
  rtl/rpm.sv rtl/wrr_sched.sv rtl/dmm.sv rtl/timer_pool.sv rtl/pkt_classifier.sv rtl/pro3_top.sv \
  tb/risc_model.sv tb/tcam_model.sv tb/tb_pro3_top.sv --top-module tb_pro3_top
./obj_dir/Vtb_pro3_top
```

For a block testbench, list the package files, the block's modules and the
testbench, and name the testbench as the top module.

| testbench | what it shows |
|-----------|---------------|
| `tb_pro3_top` | Whole design at default size (512K flows, 65536 segments). Sends 400 TCP/IP packets in bursts: forwarded, processed, translated, rejected, CAM misses, bad headers. Compares every output byte with packets rebuilt independently, checks per-flow order, all CRCs, counters, flow-state updates, a timer event and a cancelled timer, and that every segment is free at the end. Then 120 back-to-back 40-byte packets must pass in at most 26 cycles each (2.5 Gb/s). Counts 16 mechanisms (both RPMs, stalls, both register halves full, re-entered flows, weighted service, back-pressure, ...) and fails any that never happened. Simulates in about 2 s after the build. |
| `tb_dmm` | 64 flows and 256 segments, so memory fills. Forward and RPM paths, drops, rejects, one/two-segment headers, order, free list restored. |
| `tb_rpm`, `tb_rpg` | Address translation against packets rebuilt from scratch, verdicts, state write-back, stalls, both halves full. |
| `tb_pkt_classifier` | Exact and wildcard CAM hits, misses, each kind of bad header, search keys, and the rate for back-to-back minimum-size packets. |
| `tb_fex`, `tb_fmo` | The microcode on random headers of every IP header length, latency in cycles. |
| `tb_wrr_sched`, `tb_sync_fifo`, `tb_ctrl_ram_if`, `tb_timer_pool`, `tb_crc_unit` | Each against a reference model. |

`tb/tcam_model.sv` models the ternary CAM: masked entries, lowest index
wins, fixed latency. `tb/risc_model.sv` models the RISC core running a
firewall/NAT routine: blocked flows, source translation with incremental
checksum update, packet counting, and periodic stalls.
