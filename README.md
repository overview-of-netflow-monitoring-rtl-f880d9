# NetFlow monitoring adapter in SystemVerilog

A NetFlow probe has to tell, for every packet on a link, which flow it
belongs to (same IP addresses, ports, protocol and type of service) and keep
per-flow counters: first and last time seen, packets, bytes, TCP flags. At
gigabit rates a host cannot do this from raw packets: the PCI bus between card
and host is the bottleneck. This design does the aggregation on the card. Packets
are reduced to flow records in hardware, and only finished records cross the
bus to software.

The core idea is to split each packet into two paths that meet again later:

* the **control path** hashes the flow key to 64 bits and looks the hash up in
  an external TCAM. The TCAM row that matches (or that is allocated for a new
  flow) is also the address of the flow's record in an external SSRAM;
* the **data path** parks the packet's byte count, timestamp, flags and key in
  a FIFO until the control path has produced that address.

A management unit sits between TCAM and SSRAM. It ages the flows, frees rows,
and makes the two memories behave as one flow table.

```
 GMII ─► IBUF ─► HFE ─┬─► HASH ─► CAM ◄──► TCAM chip
          ▲           │            ▲
         TSU          │            ▼
                      │           MAN
                      │            ▲
                      │            ▼
                      └─► FIFO ─► SRAM ◄──► SSRAM chip
                                   │
                                   ▼
                                SW_FIFO ─► software (PCI)
```
Every CAM result becomes one MAN command to SRAM, and SRAM pops the matching
packet from the FIFO to carry it out.

## Blocks

| Block | Module | What it does |
|---|---|---|
| TSU | `nf_tsu` | 37-bit free-running counter. Its top 32 bits are the timestamp: 320 ns steps at 100 MHz, wrapping after about 1374 s. Software reads it to convert timestamps to wall-clock time. |
| IBUF | `nf_ibuf` | GMII receiver and packet memory. It keeps a frame only if its Ethernet CRC is correct, and stamps it at the start-of-frame delimiter. It then hands the frame to HFE one byte per cycle, without the FCS. |
| HFE | `nf_hfe` | Header field extractor. From IPv4/IPv6 over Ethernet II it produces one `pkt_info_t`: the key, the IP length as byte count, the TCP flags and the timestamp. Other packets are counted and dropped. |
| HASH | `nf_hash` | CRC-64 (ECMA-182 polynomial) of the 304-bit key, computed in one cycle. |
| FIFO | `nf_fifo` | Packet FIFO, 64 entries. |
| CAM | `nf_cam` | TCAM controller. It searches the hash. On a miss it writes the hash into a free row supplied by MAN. It also frees rows on MAN's order. All results reach MAN in order on one channel. |
| MAN | `nf_man` | Per-row 3-bit aging field, sweep pointer, record count, free list, disposal protocol. |
| SRAM | `nf_sram` | SSRAM controller. It creates, updates and exports 59-byte records, and checks the active timeout on every update. |
| SW_FIFO | `nf_fifo` | 16 exported records waiting for software. |
| top | `netflow_top` | Wires the above together. The TCAM, SSRAM, GMII and the PCI side are ports. |

`nf_pkg` holds the shared types: `flow_key_t` (304 bits), `pkt_info_t`,
`flow_rec_t` (472 bits, 59 bytes), the CAM result and SRAM command enums, and
the aging-field codes.

### Flow record (`flow_rec_t`, 59 bytes)

| Field | Bits | Set on NEW | On UPDATE |
|---|---|---|---|
| start_ts | 32 | packet timestamp | unchanged |
| end_ts | 32 | packet timestamp | packet timestamp |
| bytes | 64 | packet bytes | += packet bytes |
| packets | 32 | 1 | += 1 |
| flags | 8 | TCP flags | \|= TCP flags |
| src_ip, dst_ip | 128 each | key | unchanged |
| src_port, dst_port | 16 each | key | unchanged |
| proto, tos | 8 each | key | unchanged |

IPv4 addresses occupy the low 32 bits of the address fields. The counters are
deliberately not checked for overflow. At 1 Gbps with 48-byte packets the
32-bit packet counter wraps after about 1536 s, so software must collect
flows faster than that. Timestamps wrap sooner anyway.

## Flow aging and disposal (MAN)

This is the subtle part of the design.

**Aging field.** Every row has 3 bits: `000` free, `001` waiting for delete,
`010`–`111` active. A created or matched flow is set to `111`. A pointer visits
the rows one after another, one step every `sweep_period` cycles. It
decrements active values, and a row it finds at `010` is inactive. A flow
untouched since it was last set to `111` is therefore disposed on the sixth
visit, between 5 and 6 pointer rounds later. The timeout is ROWS ×
`sweep_period` × (5…6) cycles, known to 1/6 of its value. At the default
32768 rows and `sweep_period = 1`, that is about 1.6–2.0 ms at 100 MHz.

**Two-step disposal.** The pipeline has packets in flight between CAM and
SRAM, so a flow cannot just be erased:

1. MAN sets the row to `001` and sends CAM a delete order.
2. CAM handles operations strictly one at a time, so every search it ran
   before the delete has already produced its result. Those HITs reach MAN
   first, are passed on as UPDATEs, and do not refresh the row. Any search
   after the delete misses, and the packet starts a new flow in another row.
3. CAM's delete acknowledge reaches MAN after all those HITs. MAN then frees
   the row (`000`, back on the free list, record count − 1) and sends SRAM a
   DELETE, which reads the record and pushes it into SW_FIFO.

So every packet counted for a flow is in the exported record, and a row is
never reused while a packet for its old flow is still in flight.

**Active timeout.** On every update SRAM compares the packet timestamp with
the record's start timestamp. If the difference exceeds `active_timeout`
(timestamp units), SRAM asks MAN to dispose of the flow. MAN runs the same two
steps, so a long-lived flow is exported in several records. If a request finds
the previous one still pending it is skipped. SRAM never waits for MAN here,
which keeps the pipeline free of a circular wait. The flow's next packet asks
again.

**Full table and aggressive mode.** MAN counts stored records. While the count
is at or above `high_water`, the sweep pointer steps every cycle whatever
`sweep_period` says, so idle flows go out fast. A miss that finds no free row
is reported as FULL, and SRAM discards that packet (`cnt_discard`).

**Access order.** The aging field is read and written once per cycle. The
priority is: CAM result first, then SRAM dispose request, then sweep step.
After reset MAN spends ROWS cycles clearing the field and filling the free
list. `init_done` goes high when it is finished, and frames that arrive earlier
wait in IBUF.

## Interfaces and timing

All internal links are valid/ready. Data is held stable until taken, which the
assertions in `nf_cam` and `nf_sram` check.

* **GMII:** `gmii_rx_dv`, `gmii_rx_er`, `gmii_rxd[7:0]`, sampled on `clk`.
  Preamble bytes are skipped until `0xD5`. A frame with RX_ER, a bad CRC, no
  room in the 4 KiB buffer or a full 16-entry descriptor queue is dropped and
  counted.
* **TCAM chip (assumed):** `tc_srch_valid`/`tc_srch_key` give a search request.
  `tc_res_valid`/`tc_res_hit`/`tc_res_idx` return the result some cycles later.
  A write is `tc_wr_en`, `tc_wr_idx`, `tc_wr_key`, with `tc_wr_vld` = 0 freeing
  the entry. A write must be visible to the next search.
* **SSRAM (assumed):** one whole record per address (`ss_addr` = row). A write
  takes effect at the edge. Read data arrives `RD_LAT` cycles after the
  request (default 2).
* **Software:** `sweep_period`, `high_water` and `active_timeout` are inputs.
  `ts` is the TSU register. `sw_valid`/`sw_ready`/`sw_rec` is the SW_FIFO read
  port. Statistics: `cnt_frames_ok/bad/full`, `cnt_non_ip`, `cnt_inactive`,
  `cnt_active`, `cnt_full`, `cnt_discard`, `rec_count`, `aggressive`.
* **Per-packet cost:**
  * IBUF→HFE reads one byte per cycle.
  * HASH takes 1 cycle.
  * CAM takes 2 + TCAM latency cycles: one to issue the search, the
    latency, and one to hand the result to MAN.
  * SRAM takes 1 cycle for NEW and DISCARD and 2 + `RD_LAT` for UPDATE.
  * The control path costs about 5 cycles per packet. A minimum Ethernet
    frame occupies 84 byte times on the wire.

When SW_FIFO is full, SRAM stalls on its next export, and the stall backs up
through MAN, CAM, HASH/FIFO and HFE into IBUF. Once IBUF runs out of room it
drops whole frames, so nothing is half-processed.

## Where this design departs from or adds to the architecture

* **HFE is a fixed parser.** The architecture makes it a small RISC
  processor with its own instruction set. That instruction set is not
  available, so the same extraction is done in hardwired logic. It supports
  Ethernet II without VLAN tags, IPv4 (with options), IPv6 (no extension
  headers), and ports for TCP/UDP only.
* **One clock.** The architecture clocks the TSU at 100 MHz and GMII runs at
  125 MHz. Here everything shares `clk`. Taking GMII directly needs
  `clk` = 125 MHz, which makes the timestamp step 256 ns instead of 320 ns.
  The byte-serial IBUF/HFE path keeps up with line rate only at that clock.
  At 100 MHz a clock-domain crossing in front of IBUF would be needed.
* **Own choices where the architecture is silent:**
  * the hash polynomial;
  * the TCAM and SSRAM interfaces, and one SSRAM word per record;
  * every buffer depth;
  * the aging-field codes for free (`000`) and waiting (`001`);
  * the free list;
  * the meaning of "aggressive" (sweep every cycle);
  * disposing, rather than restarting in place, a flow whose active time ran
    out;
  * discarding packets when the table is full;
  * the drop reasons in IBUF other than a bad CRC.
* **Not built:** the optional timestamp, filtering and sampling units; the
  aggregation unit planned to replace SW_FIFO; the TCAM, SSRAM, PHY and PCI
  bridge chips.

## Parameters (defaults)

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `netflow_top`, `nf_cam`, `nf_man`, `nf_sram` | `ROWS` | 32768 | flow table size (TCAM entries = SSRAM records) |
| `netflow_top`, `nf_ibuf` | `BUF_AW` | 12 | IBUF memory of 2^12 bytes |
| `netflow_top` | `PKT_FIFO_DEPTH` / `SW_FIFO_DEPTH` | 64 / 16 | FIFO depths |
| `netflow_top`, `nf_sram` | `RD_LAT` | 2 | SSRAM read latency |
| `nf_tsu` | `CNT_W` / `TS_W` | 37 / 32 | counter and timestamp width |
| `nf_hash` | `POLY` | 0x42F0E1EBA9EA3693 | CRC-64 polynomial |

MAN's aging field (ROWS × 3 bits) and free list (ROWS × 15 bits) are plain
arrays with one combinational read port each, so synthesis maps them to
distributed or block RAM depending on the target.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. Build one with Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_netflow_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/nf_pkg.sv tb/nf_tb_pkg.sv tb/tb_netflow_top.sv
./obj_dir/Vtb_netflow_top
```

| Testbench | What it shows |
|---|---|
| `tb_nf_tsu` | output step every 32 cycles; wrap of a small instance |
| `tb_nf_fifo` | random push/pop against a queue model, depth 5 |
| `tb_nf_ibuf` | good, bad-CRC and RX_ER frames; buffer overflow with the reader held; timestamps and lengths |
| `tb_nf_hfe` | IPv4/IPv6, TCP/UDP, IPv4 options, ARP ignored, with back-pressure |
| `tb_nf_hash` | CRC-64 against a long-division reference |
| `tb_nf_cam` | hit / new / full / delete against a map, with a behavioural TCAM |
| `tb_nf_man` | start-up, 5–6 round inactive timeout, busy flow kept, dispose request, hit while waiting for delete, aggressive mode, free-list exhaustion |
| `tb_nf_sram` | random NEW/UPDATE/DELETE/DISCARD against a record model, active-timeout requests, cycle counts |
| `tb_netflow_top` | end to end with 16 rows: exact per-flow totals over split exports, bad CRC, ARP, active and inactive timeouts, full table, aggressive mode, SW_FIFO back-pressure, IBUF overflow, global packet accounting |
| `tb_netflow_linerate` | gigabit line rate with the clock at the GMII byte rate: 400 back-to-back minimum frames and 30 maximum frames, none lost, exact per-flow totals |
| `tb_netflow_full` | the top at its defaults (32768 rows): start-up, 8 flows, disposal after 5–6 rounds of 32768 steps, exact records |

`tb/nf_tcam_model.sv` and `tb/nf_ssram_model.sv` are behavioural models of the
external chips, not RTL. `tb/nf_tb_pkg.sv` builds Ethernet frames and computes
the reference CRCs.
