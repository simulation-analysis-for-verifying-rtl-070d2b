# Per-flow load balancer for a dual-network-processor linecard

One network processor (NP) of the 1 Gbit/s class cannot keep up with a
2–2.5 Gbit/s uplink, so this linecard puts two NPs side by side and splits
the incoming traffic between them. Splitting packet by packet (round robin or
time slots) balances the load but lets a short packet on one NP overtake a
long one on the other, and voice or video receivers treat such reordered
packets as lost. The load balancer here splits **by flow** instead. Every
packet is classified by its IPv4 source address. All packets of one flow go
to the same NP, so they stay in order. A flow seen for the first time goes to
the NP whose input FIFO is less full.

The RTL follows the structure published in *Simulation Analysis for Verifying
an Implementation Method of Higher-performed Packet Routing*: a pipeline
buffer, flow control logic, a circular-buffer flow table, a FIFO selection
compensator, FIFO control and entry control in front of two NP FIFOs, and an
egress MUX. That paper gives the structure and the algorithm. Sizes, widths,
handshakes, control-word layouts and the exact role of entry control are this
implementation's own choices. They are listed under
[Choices not fixed by the paper](#choices-not-fixed-by-the-paper).

## Data path

```
                 ingress                                         egress
 PHY rx ──> packet_convert ──> load_balancer ──┬─> NP #1 ──┐
 (POS-PHY L3)  adds header      ┌──────────────┐├─> NP #2 ──┤
               + tail word      │load_balancing│            └─> mux_module ──> PHY tx
                                │_logic        │                strips header/tail,
                                ├─ FIFO #1 ─ output_control ─>    first header first,
                                └─ FIFO #2 ─ output_control ─>    NP #1 on a tie
```

`linecard_dataplane` (top) wires `packet_convert`, `load_balancer` and
`mux_module` together. The NPs, the route-lookup search machine and its
arbiter, the CPU module and the PHY/framer are not part of the RTL. Their
streams are ports of the top.

Inside `load_balancing_logic`:

```
 in ──┬──────────> pipeline buffer (sync_fifo) ──> fifo_control ──> FIFO #1 / #2
      │                                             ^   marks header      │
      └─> flow_control_logic ──> flow_table          │ decision {np,entry}  │ level
            (key queue, FSM)  <── fifo_select <──────┼──────────────────────┘
                  ^                                  │
                  └── busy ── entry_control <── release (from output_control)
```

## Packet format

Packets move between blocks as 34-bit words (`lb_pkg::pkt_word_t`): 32 data
bits plus `sof` and `eof`. `packet_convert` wraps each datagram in two
control words:

| word   | bits 31:28 | 27:24     | 23:16            | 15:0                         |
|--------|------------|-----------|------------------|------------------------------|
| header | `4'hC`     | NP number | flow-table entry | ingress sequence number      |
| tail   | `4'hE`     | 0         | 0                | datagram length in bytes     |

`packet_convert` leaves the NP and entry fields at zero. `fifo_control`
fills them in as the packet enters its NP FIFO. The flow key is word 4 of
the packet: the header word plus the first three IPv4 header words come
before the source address. This assumes the PHY delivers bare IP datagrams
with no PPP header. Change `lb_pkg::SRC_IP_WORD` (or the `KEY_WORD`
parameter of `flow_control_logic`) if yours does not. A packet too short to
reach word 4 gets key 0, so all such packets form one flow.

## How a packet is classified

This is the core of the design and the part with the most moving pieces.

1. **Key capture.** Every word accepted from `packet_convert` goes into the
   pipeline buffer. `flow_control_logic` watches the same words, counts
   them from `sof`, and pushes the source address into a 4-deep key queue.
   Keys therefore wait in packet order, and the lookup of one packet overlaps
   the transfer of the packet before it.
2. **Lookup.** A four-state machine handles one key at a time. The states
   are named after the paper's behavioural model:
   `WAIT` (take a key) → `CONTROL` (send it to the flow table) →
   `REQUEST` (wait for the result) → `RESULT` (offer a decision) → `WAIT`.
   `flow_table` compares the key with all entries in parallel. A priority
   encoder (lowest index wins) returns hit/miss, the entry number and the
   stored FIFO number one cycle later.
3. **Decision.**
   - On a hit, the decision is `{stored NP, entry}`.
   - On a miss, `fifo_select` picks the FIFO with the lower fill level. On a
     tie it picks NP #1. The table is a circular buffer: the new flow goes
     to the oldest entry, and the pointer moves past it. A hit does not move
     an entry. Entries that still have packets in flight are skipped (see
     step 5). With `REFRESH = 1`, a hit also sets the row's reference bit.
     A new flow then skips idle rows whose bit is set, and clears the bits
     of the rows it skipped. A flow that was seen again therefore survives
     one more pass of the pointer. If every idle row is referenced, the
     first idle row is taken as usual.
4. **Transfer.** `fifo_control` accepts one decision per packet. It copies
   the packet from the pipeline buffer into the chosen FIFO, writing the NP
   and entry numbers into the header word. When that FIFO is full, copying
   pauses and the pipeline buffer fills. `in_ready` (back pressure to
   `packet_convert`) drops when the pipeline buffer or the key queue is full.
5. **Entry tracking.** `entry_control` counts, per table entry, the packets
   that have been assigned but not yet read by their NP. It increments on
   each decision. Each `output_control` reports the entry number from the
   header as the packet's last word leaves its FIFO, and that decrements the
   count. **An entry whose count is not zero is never overwritten.** A new
   flow takes the first idle entry at or after the pointer. Only when every
   entry is busy does the flow control logic wait. Without this rule, an
   evicted flow could be reassigned to the other NP while its older packets
   are still queued, and the new packet could overtake them.

### What the ordering guarantee covers

- Packets of one flow reach the NP ports in arrival order. A flow that
  changes NP (which happens only after its table entry was evicted) does so
  only once every earlier packet of the flow has been read by its NP.
- Order at the egress MUX output is guaranteed for packets that went
  through the same NP.
- A flow that changed NP stays in order at the output only if the old NP
  has returned the earlier packets before the new NP returns the later
  one. That depends on the NPs' latency and on congestion at the MUX, which
  the load balancer cannot see. The fix would be to release entries when
  packets come back through the MUX. This design does not do that, because
  an NP that drops a packet (ACL filtering, for example) would then leave
  its entry locked forever.
- The wait in step 5 blocks classification for all flows. It happens only
  when every entry has packets queued, so the table should have more
  entries than the NP FIFOs can hold packets. In the full-size end-to-end
  test, the NP FIFOs hold about 27 packets each and the table has 16
  entries. With 18 flows and NP stalls of 2000 cycles, about 30 % of the
  cycles are spent in this wait. In the reduced test (8 entries, 48-word
  FIFOs), it is under 1 %. Skipping busy entries is this design's addition
  to the paper's "overwrite the oldest entry" rule. Waiting for the oldest
  entry to drain instead blocked all traffic for most of an NP stall.

## Egress MUX

`mux_module` serves whole packets, one at a time. The packet whose header
appeared first is served first. Each input has an age counter that counts
the cycles its header has been waiting. The oldest header wins, and on equal
age the lower-numbered NP wins, so NP #1 is served first when headers arrive
in the same cycle. The header word is dropped at grant. Each data word is
held for one cycle until the next word shows whether it was the last data
word (the following word is the tail). It is then sent with `eop`, and the
tail is dropped. Output is 32-bit words with `sop`/`eop`.

## Timing

- All blocks run on one clock (`clk`) with an active-low asynchronous reset
  (`rst_n`). All handshakes are valid/ready.
- `packet_convert` takes n + 2 cycles for an n-word datagram (header and
  tail each take one cycle).
- On an idle design, a packet's header appears at its NP port 5 cycles after
  its source-address word is accepted: key queue, lookup, result, decision
  taken, FIFO write.
- `fifo_control` moves one word per cycle, with one idle cycle between
  packets. Classification needs 4 cycles per packet.
- At one word per clock, 2.5 Gbit/s of 1500-byte datagrams needs about
  79 MHz. 40-byte datagrams need about 102 MHz, because each packet carries
  3 cycles of overhead.

## Parameters

| parameter (top)   | default | meaning                                        | from the paper? |
|-------------------|---------|------------------------------------------------|-----------------|
| `N_NP`            | 2       | network processors / NP FIFOs                  | yes             |
| `FT_DEPTH`        | 16      | flow-table entries                             | chosen          |
| `PB_DEPTH`        | 64      | pipeline buffer, words                         | chosen          |
| `KEYQ_DEPTH`      | 4       | source addresses waiting for lookup            | chosen          |
| `FIFO_DEPTH`      | 512     | words per NP FIFO (34 bits each)               | chosen          |
| `USE_DST`         | 0       | 0: flow = source address; 1: source + destination address (64-bit key) | both appear in the paper |
| `REFRESH`         | 0       | 1: a hit refreshes the row (second chance before eviction) | refresh is in the paper, the mechanism is chosen |

`PB_DEPTH` must exceed `SRC_IP_WORD` + 1, so that a packet's key is captured
before its first words fill the buffer. The header field limits `FT_DEPTH`
to 256 and `N_NP` to 16. `mux_module` and `fifo_select` work for any `N_NP`.
At the defaults the design is about 810 word-level cells, 411 flip-flops and
37.6 kbit of FIFO memory.

## Choices not fixed by the paper

- **Flow key.** By default the key is the source address only, as in the
  paper's hardware description. The paper's behavioural model also matches
  on the destination address. `USE_DST = 1` does the same here, taking the
  destination from word 5 and doubling the key width to 64 bits.
- **Row refresh.** The paper's model refreshes a row when its flow is found
  again, but its hardware table is a circular buffer that overwrites the
  oldest row. `REFRESH = 1` reconciles the two with a second-chance
  reference bit. The default, 0, is the plain circular buffer.
- **Entry control.** The paper names this block and shows it fed from the
  FIFO/NP side into the flow table, without describing it. The in-flight
  counter, and the rule that a busy entry is skipped rather than
  overwritten, are this design's interpretation.
- **Output control logic.** The paper names it, one per FIFO, without a
  description. Here it is a valid/ready interface with a release report.
- **FIFO selection compensator.** The paper says the NP is chosen "from the
  comparison of output queue states". Here that means the word fill levels.
  The tie rule mirrors the MUX's NP #1 priority.
- **Control words.** Their presence and the 32-bit width come from the
  paper. Their layout, the sequence number and the byte count are this
  design's.
- **Egress packet convert.** Not built. After the MUX it only forwards the
  stream to the PHY.
- **Not included.** The NPs, the search machine with its SSRAM and arbiter,
  the CPU module, the PHY/framer and the switch fabric.

## Files

`rtl/`: `lb_pkg` (types, header layout), `sync_fifo`, `flow_table`,
`fifo_select`, `entry_control`, `flow_control_logic`, `fifo_control`,
`output_control`, `load_balancing_logic`, `load_balancer`,
`packet_convert`, `mux_module`, `linecard_dataplane` (top).

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

- `tb_linecard_dataplane`: end to end at reduced sizes. It forces
  evictions, busy-entry waits, full FIFOs, back pressure and MUX ties, and
  fails if any of them never happens.
- `tb_linecard_full`: the same environment (`lc_env.svh`) at the default
  sizes.
- `tb_fig8_workload`: the paper's classification experiment. Twelve source
  addresses and about 490 packets; every source must stay on one NP, the
  flows must spread over both, and the mean latency per source and per NP
  must be nearly equal. A second copy runs with four NPs (`fig8_bench`
  holds both). At this light load new flows favour the lower-numbered NPs,
  because the FIFOs are mostly empty when a flow starts and ties go to the
  lowest NP.
- `tb_flow_key_modes`: runs both flow definitions (`USE_DST` 0 and 1) on
  the same traffic.
- `tb_linecard_refresh`: the reduced end-to-end test with `REFRESH = 1`
  and 600-cycle NP stalls.
- `tb_flow_table` runs `flow_table_bench` twice, once per `REFRESH` value.

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.
The NP models in the testbenches return packets after a fixed latency.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lb_pkg.sv tb/tb_linecard_full.sv --top-module tb_linecard_full
./obj_dir/Vtb_linecard_full
```

Replace the testbench name to run any other. Every testbench finishes in a
few seconds. To lint the RTL alone:

```
verilator --lint-only -Wall -y rtl rtl/lb_pkg.sv rtl/linecard_dataplane.sv
```

The remaining lint warnings are harmless, as follows:

- `rst_n` is used both as an asynchronous reset and in an assertion's
  `disable iff`.
- The `level` outputs of the pipeline buffer and key queue are left
  unconnected.
- The MUX ignores the `sof` bit of words after the header.
