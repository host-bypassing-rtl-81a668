# Host bypassing: a NIC driver in FPGA logic

A commodity network card (NIC) driven by a poll-mode driver such as DPDK
exchanges packets with software through two descriptor rings and a pool of
packet buffers in host DRAM. If the packets are really meant for an FPGA
accelerator on the same PCIe bus, every packet then crosses PCIe four times
and needs a CPU core to shuttle it between NIC and FPGA.

This RTL removes the host from that path. The rings and buffers are placed
*inside the FPGA*, in block RAM mapped into the FPGA's PCIe BAR, and the
driver's receive and transmit loops are done in hardware. The NIC, which only
sees physical addresses, DMAs received packets straight into FPGA memory and
fetches outgoing packets from there (PCIe peer-to-peer). The FPGA hands
received packets to the accelerator ("network function") as an AXI4-stream,
takes the accelerator's output as another AXI4-stream, and tells the NIC about
progress by writing the NIC's tail pointer registers directly. The NIC itself
is unmodified; the host only has to point the NIC's queues at the FPGA's
addresses and write one configuration register.

```
                 +------------------------------- hb_top --------------------------------+
 PCIe core       |            +-> ctrl -> rx buffer (A) --+                              |
 (NIC DMA) ==AXI4=> hb_axi_xbar-> ctrl -> tx buffer (B)   |    hb_rx_handler ==stream==> m_rx_*
                 |            +-> ctrl -> rx ring   (C) --+--> (desc ctrl + pkt handler)  |   f_x
                 |            +-> ctrl -> tx ring   (D) --+--> hb_tx_handler <==stream==  s_tx_*
                 |            +-> ctrl -> config    (E) -> start, base addresses         |
 PCIe core  <==AXI4 write== hb_dw_convert <- hb_dw_arbiter <- hb_tail_delay x2 <- tails  |
 (to NIC regs)   +-----------------------------------------------------------------------+
```

Everything runs on one clock, the 250 MHz user clock of the PCIe core, with a
256-bit data path (64 Gbit/s per direction, well above a 10 Gbit/s NIC).

## The FPGA as the NIC sees it

The slave AXI4 port `s_*` carries every access that arrives at the FPGA's BAR:
the NIC's DMA and the host's configuration writes. `hb_axi_xbar` splits it by
offset:

| region | BAR offset range        | contents                         |
|--------|-------------------------|----------------------------------|
| A      | 0x00_0000 - 0x07_FFFF   | rx packet buffer, 512 KiB        |
| B      | 0x08_0000 - 0x0F_FFFF   | tx packet buffer, 512 KiB        |
| C      | 0x10_0000 - 0x10_0FFF   | rx descriptor ring (4 KiB)       |
| D      | 0x10_1000 - 0x10_1FFF   | tx descriptor ring (4 KiB)       |
| E      | 0x10_2000 - 0x10_2FFF   | configuration register           |

Any other offset is answered with DECERR. Each region has its own
`hb_axi_bram_ctrl` (AXI4 burst slave to a BRAM port; writes one beat per
cycle, reads streamed one beat per cycle after a two-cycle start). The four
memories are `hb_bram` instances, true dual-port: port A belongs to the PCIe
side, port B to the handlers, so the NIC and the driver logic never compete
for a port.

Both rings have 64 entries (`RING_N`). Descriptor *i* owns the fixed slot
*i* of its buffer, 512 KiB / 64 = 8 KiB (`SLOT_BYTES`), so any Ethernet frame
fits in one slot and one descriptor. The physical address written into a
descriptor is `fpga_base + region offset + i * SLOT_BYTES`.

## Receive: `hb_rx_handler`

Two cooperating parts, handing over one packet at a time:

* `hb_rx_desc_ctrl` (descriptor control). After `start` it writes every rx
  descriptor with the address of its slot and sets the NIC's rx tail (RDT) to
  63, handing 63 descriptors to the NIC (one is kept back so that a full ring
  and an empty ring look different). It then polls descriptor `idx` every two
  cycles. When the NIC has written it back with the DD ("descriptor done")
  bit, it passes slot and length to the packet handler, waits for it, re-arms
  the descriptor with its empty buffer address (DD cleared), sets RDT to
  `idx` and moves on to `idx+1`.
* `hb_rx_pkt_handler` reads the packet out of its slot and streams it on
  `m_rx_*`: 32 bytes per beat, byte 0 in `tdata[7:0]`, `tkeep` marking the
  valid bytes of the last beat, `tlast` on the last beat. Reads are issued
  ahead into a two-entry buffer, so a packet leaves at one beat per cycle
  while `tready` is high.

The handler does all the busy polling a CPU core would otherwise burn.

## Transmit: `hb_tx_handler` and writeback congestion control

The mirror image: `hb_tx_pkt_handler` takes a packet from `s_tx_*` and writes
it into the free slot offered by `hb_tx_desc_ctrl` (byte enables from
`tkeep`, length = sum of `tkeep` bits). The descriptor control then writes tx
descriptor `idx` (address, length, command EOP + insert-FCS) and sets the
NIC's tx tail (TDT) to `idx+1`, which tells the NIC to send it.

The NIC does not poll the ring, so nothing stops the FPGA from producing
packets faster than the NIC sends them. Two behaviours are selectable with
the `wb_en` configuration bit:

* **Writeback off (default).** Slots are reused blindly. Over a slow PCIe
  path the FPGA can lap the NIC: packets are overwritten and the tail passes
  the NIC's head, which shows up as lost or reordered packets. Bus traffic
  is lowest.
* **Writeback on.** Every descriptor also carries RS ("report status"), so
  the NIC writes it back with DD once the packet is sent. Before filling slot
  `idx`, and once the descriptor *after* it has been used before, the
  control reads descriptor `idx+1` and waits until its DD is set. The NIC
  sends in ring order, so `idx` is free too. Checking one entry ahead keeps
  one descriptor unused at all times: if all 64 were handed out, TDT would
  equal the NIC's head and the NIC would read the ring as empty. While it
  waits, `s_tx_tready` stays low, so the back pressure reaches the network
  function instead of destroying packets. `wb_stalls` counts the waiting
  cycles.

The cost of writeback is one extra 16-byte PCIe write per packet from the NIC
and a few cycles of polling per packet once the ring has wrapped.

## Tail pointer writes

Each tail update is a separate 4-byte PCIe write to the NIC's register space
(`m_dw_*`, an AXI4 write-only master toward the PCIe core). The path is:

1. `hb_tail_delay`, one per direction, optionally batches updates. With
   `batch_en` set it holds updates back and forwards only the newest value,
   either when `BATCH` (8) updates have accumulated or `TIMEOUT` (625 cycles,
   2.5 us at 250 MHz) after the first held update, whichever comes first.
   Tail pointers are cumulative, so nothing is lost by skipping values. For
   rx this only delays returning free descriptors. For tx it delays sending,
   by up to 7 packet times at a full batch or up to the timeout at low rates,
   in exchange for fewer PCIe writes. `batch_flush_count` and
   `batch_flush_timeout` count the two triggers.
2. `hb_dw_arbiter` merges the rx and tx streams of updates, round robin.
3. `hb_dw_convert` issues the AXI4 write: address `nic_base + offset`, one
   beat, size 4 bytes, the value in the byte lanes selected by the address,
   one write outstanding. `tail_writes` and `tail_write_errors` count
   completions and non-OKAY responses.

## Configuration and start-up

Region E, word 0, written by the host driver after it has set up the NIC's
queues with the FPGA's ring addresses:

| bytes | field                                                      |
|-------|------------------------------------------------------------|
| 0-7   | `nic_base`: physical address of the NIC's register BAR     |
| 8-15  | `fpga_base`: physical address of the FPGA's BAR            |
| 16    | bit 0 `start`, bit 1 `wb_en`, bit 2 `batch_en`             |

Writes honour byte enables, so 32- or 64-bit host writes work. Reset clears
everything, and the handlers stay idle until `start` is set. To change
`wb_en` safely, reset the design and reinitialise the NIC queue. A change while
running would leave already-posted descriptors without RS.

## NIC-specific choices

The method works with any poll-mode NIC, but the RTL has to commit to one
descriptor layout and register map. It uses the 16-byte "legacy" descriptors
and queue-0 registers of the Intel 82599 family, all in `hb_pkg`:

* rx descriptor as written by the FPGA: bytes 0-7 buffer address, rest zero;
  as written back: length in bits 79:64, DD bit 96, EOP bit 97;
* tx descriptor: address bits 63:0, length 79:64, CMD.EOP 88, CMD.IFCS 89,
  CMD.RS 91, STA.DD 96;
* RDT at offset 0x1018, TDT at 0x6018 of `nic_base`.

A different NIC needs these constants changed, and for NICs with other
descriptor sizes also the descriptor-in-word selection in the two descriptor
controls. Each 256-bit ring word holds two descriptors.

## Top-level interface (`hb_top`)

| port group                 | role                                                       |
|----------------------------|------------------------------------------------------------|
| `clk`, `rst_n`             | 250 MHz clock, active-low asynchronous reset               |
| `s_aw/w/b/ar/r_*`          | AXI4 slave from the PCIe core (BAR accesses), 256-bit, 4-bit ID |
| `m_dw_aw/w/b_*`            | AXI4 write master to the PCIe core (NIC register writes)   |
| `m_rx_t*`                  | AXI4-stream of received packets, to the network function   |
| `s_tx_t*`                  | AXI4-stream of packets to send, from the network function  |
| counters                   | `rx_pkts`, `tx_pkts`, `wb_stalls`, `tx_trunc_beats`, `tail_writes`, `tail_write_errors`, `batch_flush_count[2]`, `batch_flush_timeout[2]` (index 0 rx, 1 tx) |

AXI channel payloads are packed structs from `hb_pkg` (`axi_ax_t` for AW/AR,
`axi_w_t`, `axi_b_t`, `axi_r_t`). Parameters: `RING_N` (64), `SLOT_BYTES`
(8192), `BATCH` (8), `TIMEOUT` (625 cycles).

## Where this RTL departs from, or goes beyond, the published design

* The PCIe core, the AXI interconnect and the BRAM controllers are vendor IP
  in the original. Here the interconnect and controllers are small
  hand-written equivalents: one burst at a time per direction, no
  interleaving, no outstanding-transaction reordering. The PCIe core stays
  outside, and its two AXI4 connections are top-level ports.
* The network function is outside too (`m_rx_*` / `s_tx_*`).
* Run-time enable bits for writeback and batching, the fixed 8 KiB slot per
  descriptor, the ring start-up sequence (fill all, RDT = 63), the
  look-one-ahead rule for writeback, the arbitration policy, DECERR for
  unmapped addresses and the NIC descriptor and register layout are this
  implementation's choices.
* Only one frame per descriptor is supported. Received frames are assumed to
  fit a slot. Transmitted frames longer than a slot are cut and counted in
  `tx_trunc_beats`.
* `BATCH` is a build-time parameter. A 16-packet batch needs `BATCH=16`.
* Interrupt-free polling only. There are no statistics registers beyond the
  counters, and nothing reads the counters over PCIe.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench              | what it establishes                                             |
|------------------------|-----------------------------------------------------------------|
| `tb_hb_bram`           | byte enables, read-first, port priority against a reference array |
| `tb_hb_axi_bram_ctrl`  | random bursts, strobes, narrow writes, back pressure, 1 beat/cycle reads |
| `tb_hb_axi_xbar`       | all five regions at real sizes, no aliasing, DECERR and recovery |
| `tb_hb_cfg_regs`       | field layout, partial writes, read-back, reset                   |
| `tb_hb_tail_delay`     | pass-through, flush at 8, flush exactly 625 cycles after first update, merging |
| `tb_hb_dw_arbiter`     | no loss, per-source order, round robin under saturation          |
| `tb_hb_dw_convert`     | address, lane placement, strobe, single outstanding, error count |
| `tb_hb_rx_handler`     | ring init, 200 packets (1 to 1514 B) across 3 ring wraps, re-arm, RDT sequence, 1 beat/cycle |
| `tb_hb_tx_handler`     | 150 packets without and 160 with writeback and a slow NIC; no overwrite, back pressure |
| `tb_hb_top`            | end to end at default parameters, with a behavioural NIC (`tb/hb_nic_model.sv`) |
| `tb_hb_workload`       | the evaluation traffic at 10 Gbit/s: tail-write overhead and latency of batching, see below |

`tb_hb_top` runs 300 packets through NIC, rx ring, stream loopback, tx ring
and back out of the NIC, checking that each arrives intact and in order. It
runs in two phases: first with no optional mechanism, then with writeback
and batching on and a NIC that sends slowly. It requires that writeback
stalls, stream back pressure, batch flushes by count and by timeout, ring
wrap-around and an unmapped-address error each happened. It takes under a
second.

`tb_hb_workload` (through `tb/hb_wl_env.sv`) offers the whole design
traffic at 10 Gbit/s line rate, packets arriving at fixed times, with an
identity network function that never stalls. The NIC model serves rx and tx
one transfer at a time, and latency is counted from a packet's arrival at the
NIC to the NIC having fetched it for sending. Measured over 400 packets per
300-byte run and 200 in the 1514-byte run:

| traffic                        | batching   | tail bytes / packet | mean latency |
|--------------------------------|------------|---------------------|--------------|
| 300 B every 240 ns             | off        | 8.00                | 0.34 us      |
| 300 B every 240 ns             | 8 / 2.5 us | 1.00 (all by count) | 1.41 us      |
| 300 B every 240 ns, `BATCH=16` | 16 / 2.5 us| 0.74 (all by timeout)| 2.07 us     |
| 1514 B every 1211 ns, writeback on | 8 / 2.5 us | 2.68 (by timeout) | 2.64 us   |

This is the expected arithmetic. Without batching there are two 4-byte
writes per packet. With a batch of 8, eight packets (1.92 us) arrive inside
the timeout. With 16, the 2.5 us timeout fires about every 10.4 packets
first. Batching by 8 adds about 1.1 us of mean latency and by 16 about
1.7 us. For comparison, the published hardware measured tail overheads of
8, 1 and 0.7 bytes per packet and latency increases of 1.3 and 1.8 us. All
packets come through in order in every run, and the NIC never has more than
a few arrived packets waiting, so the design keeps up with line rate.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_hb_top rtl/hb_pkg.sv tb/tb_hb_top.sv
./obj_dir/Vtb_hb_top
```

The same line works for every testbench with its name substituted; `-y`
lets Verilator find each module in the file of the same name. The testbenches use `$urandom` only, and initialise everything they
read.

Not verified here: behaviour against a real PCIe core or NIC, timing closure
at 250 MHz, and the latency and loss figures of a hardware testbed. Those
depend on the PCIe topology (switch vs. root complex), which this RTL does
not model.
