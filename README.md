# HNPlus: emulating Network-on-Chip traffic in hardware

HNPlus measures how a Network-on-Chip (NoC) behaves under a given traffic pattern. It does not simulate
the traffic; it runs it on real hardware. Every node of a mesh NoC except one holds a **Tester IP**,
also called a traffic generator or TG. A TG has a small local memory. A host computer fills that memory
with a list of packets: for each packet, its target node, its size and the clock cycle when it should
enter the network. After a global **start**, every TG replays its list cycle by cycle. Every TG also
receives the packets sent to it and keeps four latency statistics. The host then reads the statistics
back. The remaining node holds the **Serial IP**, the only connection to the host. It turns bytes from
a serial line into NoC packets, and packets from the NoC back into bytes.

Because the traffic is stored as data rather than built into the generator, any traffic pattern that
fits in the memories can be replayed without changing the hardware. Examples are uniform, hot-spot and
recorded application traces.

```
           host (RS-232, 8N1, autobaud)
               |
         +-----------+      +--------+      +--------+
  y=0    | Serial IP |------|  TG 10 |------|  TG 20 |
         |  node 00  |      |        |      |        |
         +-----------+      +--------+      +--------+
               |                |                |
         +-----------+      +--------+      +--------+
  y=1    |   TG 01   |------|  TG 11 |------|  TG 21 |
         +-----------+      +--------+      +--------+
               |                |                |
         +-----------+      +--------+      +--------+
  y=2    |   TG 02   |------|  TG 12 |------|  TG 22 |
         +-----------+      +--------+      +--------+
             x=0              x=1              x=2
```

Each box is a router plus its local IP. Node "xy" has the 16-bit address `{8'h00, x[3:0], y[3:0]}`.
The default platform is the 3x3 mesh above.

## Packets and flits

Data moves in 16-bit flits. A packet on a link is `target, size, size flits of body`. Three kinds of
packet travel through the NoC:

| packet | flits |
|---|---|
| Write (Serial IP to TG) | target, 4, source, 1, address, data |
| Read (Serial IP to TG) | target, 3, source, 0, address |
| Read Return (TG to Serial IP) | target, 3, source, 9, data |
| Traffic (TG to TG) | target, P+4, source, programmed time x4, sequence x2, real time x4, data x (P-7) |

A receiving TG treats a packet as a command when its source is the Serial IP's address. Any other
source marks a traffic packet. P is the payload size stored in memory. The TG adds four flits to it,
because it inserts the 64-bit cycle count at which the packet really left. The latency of a packet is
the receiver's cycle count when the last flit arrives, minus that real insertion time. It is not
measured from the programmed time, so it is the latency of the network alone: time the packet waited
inside the sending TG does not count.

Every TG counts cycles from the same start pulse, so all counters agree to within the few cycles the
start signal takes to cross clock domains.

## The Tester IP memory map

Each TG owns a 1024 x 16 memory, `tg_memory`. It has two ports: the injector reads on one, the
receptor reads and writes on the other.

| address | content |
|---|---|
| 0 | options: bit 0 traffic present, bit 1 records carry real data, bit 2 priority |
| 1 .. | packet records, one after another |
| after the last record | `16'hFFFF` (end of traffic) |
| 0x3F0 - 0x3F3 | number of packets received (64 bits, most significant word first) |
| 0x3F4 - 0x3F7 | minimum latency |
| 0x3F8 - 0x3FB | maximum latency |
| 0x3FC - 0x3FF | accumulated latency |

A record consists of:

- target
- payload size P
- programmed insertion time (4 words, most significant first)
- sequence number (2 words)
- with real data only: P-7 data words

Without real data, the data flits are generated: data flit k carries 8+k.

A synthetic record takes 8 words, so one memory holds (1008 - 2) / 8 = 125 packets below the result
area. A longer list would run into the statistics words.

## Traffic injector (`traffic_injector`)

The injector is a single state machine with three groups of states.

- **S1-S5, return.** This group sends one Read Return packet: target, 3, own address, 9, data. It
  runs whenever the receptor has a Read command waiting. Returns take priority over everything else in
  the idle state S0.
- **S6-S15, pre-read.** This group reads the options word and the first record (addresses 0 to 8) into
  the "current packet" registers, so the first packet is ready before the start pulse. Two events
  trigger a pre-read:
  - the host writes address 8, which is the last header word of the first record;
  - the injector finishes its list, so a second start replays the same traffic.
- **S16-S29, sending.** S16 holds the target flit until the cycle counter reaches the packet's
  programmed time. It then sends the target, the size, the source, the programmed time, the sequence
  number, the real time (latched when the target flit leaves) and the data flits. During S17-S24 the
  otherwise idle memory port reads the *next* record's eight header words into a second register set.
  When a packet's last flit leaves, the next packet is therefore ready at once: packets whose times
  have already passed go out back to back, the next target flit in the cycle after the previous last flit. When the end marker
  is read, the run is over.

The memory has one cycle of read latency, so every read is tagged with the field it fetches, and the
word is stored on the following clock. When the start pulse arrives in S0 with a packet ready, the
first target flit leaves while the counter still reads 0.

A flit moves on a link in every cycle where the sender's `tx` and the receiver's `credit` are both
high. An assertion checks that the injector holds a flit steady while it waits for credit.

## Traffic receptor (`traffic_receptor`)

The receptor takes flits from the TG's input FIFO in states R0-R11:

- R1 and R2 take the size and the source.
- R3 takes the command code of a command packet, or the sequence of a traffic packet.
- Write commands store each data flit at consecutive addresses. A write to address 8 raises
  `preread_req` for the injector.
- Read commands fetch one word and hand it, with the requester's address, to the injector.
- Traffic packets are counted as their flits arrive. The receptor captures the real insertion time
  from body flits 10-13 and takes the latency when the last flit is popped. R11 then updates the
  count, minimum, maximum and sum in registers (one cycle) and writes all sixteen result words to
  memory (sixteen cycles).

During those 17 cycles no flit is popped, and the FIFO and the network absorb the stall. The start
pulse clears the statistics registers; the minimum restarts at all ones. The result words in memory
are written only after a packet arrives, so a TG that received nothing reads zeros.

## Clock crossing and the rest of a TG (`tester_ip`)

`tester_ip` holds the following parts:

- the memory;
- the injector and the receptor;
- a 64-bit `cycle_counter`, cleared and started by start;
- `bisync_fifo`, a Gray-pointer dual-clock FIFO with first-word fall-through, between the router link
  and the receptor;
- a two-flop synchroniser and edge detector for start.

The FIFO's credit to the router is "not full". The receive path can therefore run from a different
clock than the TG logic. In this release every node runs from one clock; the `clock_tx` output
tells the next hop which clock the data comes from.

## Routers and mesh (`hermes_router`, `noc_mesh`)

Each router has five ports: East 0, West 1, North 2 (y+1), South 3 and Local 4. Every input has an
8-flit FIFO. A packet's first flit is routed XY: first along x to the target column, then along y.
The router claims an output for the whole packet (wormhole switching). It counts the size flit to know
when the packet ends, then frees the output. When two inputs want the same output, a per-output
round-robin pointer decides. Flow control is the same valid/credit pair as at the IPs, so one flit
per cycle passes through each free link.

`noc_mesh` builds a `MESH_X` x `MESH_Y` grid. Node n = x*MESH_Y + y. The edge ports are tied off,
and the local ports are brought out as arrays.

The routers have one lane each. They have no virtual channels, no dual-clock links between routers,
and none of the per-router clock selection by traffic priority of low-power NoC variants. The TGs'
priority option bit is brought out of the top as `tg_priority` for such logic.

## Serial IP and the host protocol (`serial_ip`, `uart_rx`, `uart_tx`)

The host first sends one byte `0x55`. `uart_rx` measures its start bit to learn the bit time, which
`uart_tx` reuses. Framing is 8N1, least significant bit first. After that, the host sends these
messages:

| message | bytes |
|---|---|
| read | `0`, node, N, address high, address low |
| write | `1`, node, N, address high, address low, N x (data high, data low) |
| start | `2` |

A read or write of N words becomes N single-word NoC packets to consecutive addresses. Each Read
Return packet that arrives goes back to the host as two bytes, high byte first. The Serial IP holds
its NoC credit low while its transmitter is busy, so returns can never overrun the serial line.
Start is a pulse `START_CYCLES` (4) clocks long, wired to every TG.

A typical session:

1. Sync.
2. Write every TG's list, ending with address 8 so each TG pre-reads.
3. Start.
4. Wait.
5. Read 16 words at 0x3F0 from each TG.

## Top level (`hnplus_top`)

Ports: `clock`, `reset` (active high), `rxd`, `txd`, and `tg_priority[MESH_X*MESH_Y-1:0]`.

Parameters:

| parameter | default |
|---|---|
| `MESH_X` | 3 |
| `MESH_Y` | 3 |
| `MEM_WORDS` | 1024 |
| `BUF_DEPTH` | 8 |

The Serial IP sits at node 00, and Tester IPs sit at all other nodes.

## How closely this follows the original platform

These parts follow the platform's description directly:

- the memory layout;
- the options bits 0 and 1;
- the state groups of the injector and the receptor, and the parallel read of the next record;
- the +4 payload rule;
- the synthetic data pattern;
- the host and NoC packet formats;
- the 3x3 mesh with the Serial IP at 00.

These are choices made here:

- the priority bit position;
- the record stride with real data (8 + P-7 words);
- the exact order of the result words;
- the valid/credit timing of links;
- router buffer depth and arbitration;
- FIFO depths;
- the autobaud scheme;
- the start pulse length;
- the one-cycle memory latency.

These parts of the original are left out:

- virtual channels;
- clock management;
- per-router clock selection.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hnplus_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/hnplus_pkg.sv tb/tb_hnplus_top.sv
./obj_dir/Vtb_hnplus_top
```

The testbench `tb_hnplus_top` drives the full default platform only through `rxd`/`txd`, at 8 clocks
per bit, and runs this sequence:

1. It programs TG 12 with 20 packets for TG 02, close enough in time that they leave back to back.
2. It programs TGs 01 and 21 with 12 packets each for TG 12, with identical timestamps; TG 21 sends
   real data. Both flows meet in router 11.
3. It starts the run.
4. It reads back the statistics of TGs 02, 12 and 22.

It checks the packet counts, the latency bounds and every real data word. It also counts each
mechanism at least once:

- pre-read;
- back-to-back sending;
- waiting for a programmed time;
- back-pressure;
- router arbitration;
- Write, Read and Return;
- end-of-list re-pre-read;
- statistics updates.

It runs in a few seconds.

`tb_hnplus_workloads` runs three evaluation scenarios at full packet counts, with 16-flit packets:

| scenario | result (cycles) |
|---|---|
| TG 12 sends 120 packets to TG 02, 20 cycles apart | min 22, max 67, mean 66 |
| TG 02 sends 100 packets to TG 20, 40 cycles apart (four hops) | 28 for every packet |
| TG 02 sends 100 packets to TG 01 (one hop) | 22 for every packet |
| TGs 01 and 21 each send 120 packets to TG 12 with equal times | 240 received, min 24, max 108, mean 107 |

Each extra hop adds two cycles. On the hot spot, packets from the two senders wait for each other in
router 11.

A receiving TG spends 17 cycles after each packet writing its statistics. During that time it takes
no flits, so a steady flow of 16-flit packets cannot be absorbed faster than about one every 33
cycles. When packets are programmed closer together than that, the senders see back-pressure. That
waiting is not part of the measured latency, because latency counts from the real insertion time.

Every other block has its own testbench, `tb_<module>`.
