# NetFlow v5 probe data path

This is an FPGA data path that watches up to four Gigabit Ethernet links at line
rate and turns their traffic into NetFlow v5 flow records. Every TCP, UDP or ICMP
packet over IPv4 is reduced to a small *packet record*. A 64-bit CRC of the flow key
finds the packet's flow in a set-associative table. The packet is then folded into
that flow's counters: packets, octets, first and last time, and OR of the TCP flags.
Flows that have gone quiet, or have lived too long, are expired. They are packed 15
at a time into NetFlow v5 UDP datagrams addressed to a collector. Configuration,
statistics and the collector itself run as software on the host. Here they appear
only as register ports.

The RTL is written for a NetFPGA-style user data path. It uses a 64-bit data bus,
an 8-bit control bus, a write strobe and a ready signal. It is synthesizable
SystemVerilog (IEEE 1800-2017).

## The pipeline

```
in(0..7) -> input_arbiter -> l3l4_extract -> timestamp_unit -> hash_gen
                                                                  |
          out <- record_wrapper <- flow_proc  <==>  flow_lookup <-+
```

| unit | job | words in -> out |
|---|---|---|
| `input_arbiter` | merges the eight input queues, one whole packet at a time, round robin | packet -> packet |
| `l3l4_extract` | parses Ethernet/IPv4/TCP/UDP/ICMP, drops everything else and all payload | packet -> 3 |
| `timestamp_unit` | keeps SysUpTime in ms; puts it in front of the record | 3 -> 4 |
| `hash_gen` | CRC-64 of the flow key, seeded by a register; puts it in front | 4 -> 5 |
| `flow_lookup` | fingerprint table: hash -> flow memory address, INIT or UPDATE | 5 -> 5 (+ 1-word deletes) |
| `flow_proc` | flow memory, Flow ALU, expiry scan, export | 5 / 1 -> 4 |
| `record_wrapper` | NetFlow v5 formatting, 15-record / 20 ms batching, datagram | 4 -> datagram |
| `flow_alu` | combinational Init/Update arithmetic inside `flow_proc` | - |
| `rec_ser`, `rec_deser` | helpers: send / collect a multi-word record | - |

`nf_pkg` holds the shared types (bus word, packet record, flow record), the word
layouts of every record with pack/unpack functions, the command codes and the
CRC-64 function.

### Bus and framing

- A word moves in a cycle where `wr && rdy` is high. The writer holds the word and `wr` until the word is taken.
- Packets follow the NetFPGA framing:
  - a module header word with `ctrl = 0xff`;
  - Ethernet bytes, big-endian, 8 per word, with `ctrl = 0`;
  - a last word whose single `ctrl` bit marks its last valid byte (`0x01` means all 8 bytes).
- The input module header carries the input port in `[31:16]` and the frame length in bytes in `[15:0]`.
- Records between units are whole words. Every word has `ctrl = 0` except the last, which has `ctrl = 0x01`.

### Record layouts

Only the order of the fields comes from the original block diagrams. The bit
positions are this design's choice and are defined once, in `nf_pkg`:

- The packet record from the parser has 3 words:
  - `ToS | dOctets(16) | TTL | .. | TCPflags | ..`
  - `SrcIP | DstIP`
  - `SrcPort | DstPort | input | Proto | ..`
- The timestamp unit puts `{32'h0, SysUpTime}` in front.
- The hash unit puts the 64-bit CRC in front.
- The lookup-to-flow_proc record has 5 words:
  - `{CMD, address}`
  - `{0, Timestamp}`
  - `TTL | TCPflags | PktLength | ..`
  - `SrcIP | DstIP`
  - `SrcPort | DstPort | input | Proto | ToS | ..`

  A delete is the first word alone.
- The flow record is 256 bits, in 4 words:
  - `Start | End`
  - `dOctets(32) | dPkts(16) | TTL | TCPflags`
  - `SrcIP | DstIP`
  - `SrcPort | DstPort | input | Proto | ToS | ..`

## Finding a flow: the fingerprint table

`flow_lookup` is the heart of the design. The table has 4096 lines (`INDEX_BITS = 12`)
of 8 ways (`WAYS = 8`), with one memory per way so that all eight are read at once.
The hash is used as follows:

- `hash[11:0]` selects the line.
- `hash[47:12]` (36 bits, `FP_BITS`) is the fingerprint stored in a way.
- A flow's address in the flow memory is `{line, way}`, 15 bits. So the flow memory holds 32768 records.

One lookup takes two cycles: read the line, then compare and write. The three outcomes
are:

| result | command | what happens |
|---|---|---|
| fingerprint found in way *w* | `UPDATE {line,w}` | counters are added to the stored record |
| not found, a way is free | `INIT {line,free}` | fingerprint stored in the first free way, new record built |
| not found, line full | `INIT {line,victim}` | a way picked by a free-running counter is overwritten; `flow_proc` sees a valid record at that address and exports it before building the new one |

Only 48 of the CRC's 64 bits take part. Two flows that share them are counted as one
flow. With 4000 active flows the chance of that is about 10^-13.

## Keeping and expiring flows: `flow_proc`

The flow memory is one dual-port RAM of `{valid, flow_rec_t}` entries. Two processes
use it at the same time:

- **The command process** (port A) takes one command at a time. It reads the
  record, and in the next cycle writes back the result of the Flow ALU:
  - INIT: start = end = packet time, octets = packet length, packets = 1, flags = packet flags.
  - UPDATE: end = packet time, octets and packets added, flags ORed. The other fields are copied from the packet.

  A DELETE reads the record, clears its valid bit and exports it.
- **The expiry process** (port B) walks the whole memory, one entry per cycle. A
  valid record is expired when either limit is passed:
  - `now - end > inactive_timeout`
  - `now - start > active_timeout`

  Both use modular 32-bit arithmetic on milliseconds.

The two processes never need a lock, because the expiry process does not delete
anything itself. It works in three steps:

1. It sends `{DELETE, address}` to `flow_lookup` and pauses the scan.
2. `flow_lookup` clears the fingerprint. It then sends the same delete back down its
   own command stream, behind every packet it has already looked up.
3. `flow_proc` receives the delete as an ordinary command. It exports the record and
   frees the entry.

Any packet of that flow that arrives after step 2 misses in the table and starts a
fresh record. So no packet is lost or counted twice. Only one delete is outstanding at
a time.

After reset, both tables clear their valid bits by sweeping every entry:

- `flow_lookup` takes 4096 cycles and raises `lookup_busy_init` meanwhile.
- `flow_proc` takes 32768 cycles and raises `proc_busy_init` meanwhile.

Records simply wait upstream until the sweeps finish.

Counters: `cnt_items` counts valid records. `cnt_new`, `cnt_update` and `cnt_delete`
count the INIT, UPDATE and DELETE commands received.

## Export: `record_wrapper`

Each exported flow record becomes a 48-byte NetFlow v5 record. A buffer holds up to
`MAX_RECORDS = 15` records. A datagram is sent when either condition holds:

- 15 records are waiting;
- the oldest record has waited more than `AGE_MS = 20` ms.

The datagram is a NetFPGA packet. Its module header carries the one-hot
`reg_output_port` in `[63:48]`, so it can go to several ports at once. It is followed
by:

- **Ethernet** (14 bytes): addresses from `reg_src_mac` and `reg_dst_mac`, EtherType 0x0800.
- **IPv4** (20 bytes): TTL 64, protocol 17, checksum computed.
- **UDP** (8 bytes): ports from `reg_srcdst_port`, source port in `[31:16]`; checksum 0.
- **v5 header** (24 bytes):
  - version 5 and count;
  - SysUptime;
  - unix_secs from `reg_epoch_seconds`;
  - flow_sequence, which counts records sent before this datagram.
- **The records**, 48 bytes each. Next hop, output interface, AS numbers and masks are 0.

A full datagram has 786 bytes and takes 100 bus words. The buffer accepts no record
while a datagram is being sent.

## Registers

| port | dir | meaning |
|---|---|---|
| `reg_total_packets`, `reg_accepted_packets` | out | packets seen / packets turned into records |
| `reg_ts_increment` | in | clock cycles per millisecond (speed of SysUpTime; 0 acts as 1) |
| `reg_timestamp`, `reg_frac_timestamp` | out | SysUpTime in ms, cycles into the current ms |
| `reg_hash_seed` | in | 64-bit CRC preset |
| `reg_lookup_debug` / `reg_lookup_debug_rd` | in/out | free debug register |
| `reg_active_timeout`, `reg_inactive_timeout` | in | expiry limits in ms |
| `reg_cnt_items/new/update/delete` | out | flow memory counters |
| `reg_src_ip`, `reg_dst_ip`, `reg_srcdst_port`, `reg_epoch_seconds`, `reg_output_port` | in | datagram addressing |
| `reg_src_mac`, `reg_dst_mac` | in | datagram Ethernet addresses |

The registers are plain ports. A host register bus (for example NetFPGA's) is expected
to drive and read them. The timeouts and the increment have no reset value inside
the design, so software must set them.

## Rates

- Every unit moves one word per cycle.
- A minimum-size packet is 9 bus words with its module header. It needs 9 cycles in the parser and one idle cycle in the arbiter between packets.
- The pipeline therefore takes one small packet per 10 cycles.
- Four Gigabit ports at line rate bring one 64-byte frame per 168 ns. That is 21 cycles at 125 MHz, so the design has about twice the margin needed.
- Behind the parser, a record needs 5 cycles in each unit and 7 cycles in `flow_lookup`. This is far below the rate of incoming packets.

## Where this design differs from, or adds to, the original

- **Flow capacity.** The original names "up to 60000" flows. Its 12-bit line index and
  8 ways give 32768, and that is what is built. To get 65536, set `INDEX_BITS = 13`
  and `FP_BITS = 35`.
- **Own choices.** None of the following is specified by the original:
  - the CRC-64 polynomial (ECMA-182, `0x42F0E1EBA9EA3693`, MSB first, no reflection or final XOR);
  - the key bit order (SrcIP, DstIP, SrcPort, DstPort, input, proto);
  - the bit positions of all record fields and the command codes (INIT 1, UPDATE 2, DELETE 3);
  - the victim choice in a full line;
  - the export of a replaced record;
  - the expiry comparisons;
  - the datagram fields listed above;
  - the MAC address ports.
- **Parser coverage.** The parser handles IPv4 options up to the 60-byte maximum. It
  does not parse VLAN tags. A TCP header whose flags lie beyond the first 96 bytes of
  the frame gets flags 0. ICMP records carry `type*256+code` in DstPort, as NetFlow
  does. Non-first fragments get zero ports.
- **Counter widths.** The octet and packet counters are 32 and 16 bits and wrap.

## Simulating

Each unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_pkg.sv` holds the shared
packet builders and a bit-serial reference CRC. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module netflow_probe_tb -Irtl \
    rtl/nf_pkg.sv tb/tb_pkg.sv $(ls rtl/*.sv | grep -v nf_pkg) tb/netflow_probe_tb.sv
./obj_dir/Vnetflow_probe_tb
```

Replace the top module and its file to run another testbench. For example, use
`flow_lookup_tb` with `tb/flow_lookup_tb.sv`.

- **Unit testbenches.** They compare against models written independently in the
  testbench. The lookup and flow-memory tests shrink the table, to 8 lines of 4 ways
  and to 16 records respectively, so that full lines, replacements and expiry happen
  often.
- **End-to-end test.** `netflow_probe_tb` runs the whole probe at its default sizes. It
  finishes in about a second of run time. It sends mixed TCP/UDP/ICMP flows on four ports
  and ARP/IPv6 frames that must be dropped. It also sends ten flows whose hashes are
  chosen to land in one table line, and a long-lived flow on input 7. It then runs a
  back-to-back burst of minimum-size packets to check the line rate. It decodes every
  datagram and checks, per flow, that the exported packet and octet counts add up.
  It also requires each mechanism to occur at least once:
  - drop, update, init and replacement;
  - inactive and active expiry, and the delete round trip;
  - full and age-flushed datagrams;
  - arbitration and output back-pressure.

  To make datagrams fill quickly, it sets the millisecond to 1000 cycles.
- **4000 concurrent flows.** `netflow_probe_flows_tb` also runs at the default sizes.
  It creates 4000 random flows, sends each flow twice, and requires all 4000 to be
  created and then updated, with no replacement. It does so only when no table line
  received more than 8 of them, which it works out with the reference CRC. The second
  round goes back to back on four inputs and must keep the line rate. Every record
  must then come out in a datagram with the right counts.
