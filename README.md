# PIE64 load-balancing interconnection network

PIE64 is a parallel inference machine of 64 inference units (IUs). Its IUs talk over two
circuit-switched 64x64 networks: PAN, which hands out processes, and DAAN, which allocates and
reaches data. What sets these networks apart is *automatic load balancing*. Every idle path
through a network carries load values backwards, from the destinations towards the sources.
Each switch passes on only the lowest value it sees on its idle outputs. So an idle source
port always shows the lowest load among the IUs it can still reach. A source can also ask for
a *load-distribution* circuit without naming a destination. Every switch then steers the
circuit to the output that led to that lowest load, and it arrives at the least-loaded
reachable IU.

This repository holds synthesizable SystemVerilog for the switching unit (SU) chip, the
32-bit switch unit built from four of them, the two kinds of network board, the complete
three-stage 64x64 network and the pair of networks. It also covers the other shared
resource inside each IU: the local memory, which four processor ports reach over three
pipeline-arbitrated buses. Self-checking testbenches cover each block.

## Structure

```
pie64_system                  top: networks + 64 local memories
├─ lmem_unit (x64)            4 banks, 3 buses, 2-stage pipeline
│  └─ lmem_arbiter            bus + bank arbitration
└─ pie64_network              PAN + DAAN, 64 IUs each
   └─ network_64x64  (x2)     one 3-stage network, 192 SU chips
      ├─ shuffle_board_64     stage 0: 16 switch units + shuffle wiring
      └─ net_board_16x16 (x4) stages 1 and 2: 8 switch units
         └─ su_xbar_unit      32-bit 4x4 switch: 1 master + 3 slave SU chips
            └─ su_chip        8-bit 4x4 SU chip
               ├─ su_router        address decode / lowest-load choice
               ├─ su_arbiter       ring-counter arbitration, connection registers
               ├─ su_load_monitor  lowest load over the free outputs
               ├─ su_crossbar      data lines, both directions, load passing
               └─ su_comm_ctrl     REQ'/LREQ'/REL'/DIR'/STB' forward, ACK back
```

The processors of an IU are not part of this design: the unifier/reducer (UNIRED), the two
network interface processors (NIPs, one per network) and a SPARC. `pie64_system` therefore
brings out as ports both sets of connections they would use: every IU's network ports and
every IU's four memory ports.

`pie_net_pkg` holds the widths and the port bundles. Each network port is a pair of packed
structs. `net_fwd_t` runs from source to destination: REQ, LREQ, REL, DIR, 13 STB lines and
32 data lines. `net_rev_t` runs from destination to source: 4 ACK lines and 32 reverse data
lines. The real chip has bidirectional data pins. Here each port has a forward bus and a
reverse bus, and DIR says which of the two carries user data.

### Addressing and wiring

An IU number is 6 bits, `n = 16j + 4k + m`. Each stage decodes two of those bits: stage 0
(the shuffle board) uses `j` = bits [5:4] and picks one of the four 16x16 boards. Stage 1
uses `k` = bits [3:2], and stage 2 uses `m` = bits [1:0]. An SU chip learns its stage from
its STAGE pins. It then decodes field `f = 2 - STAGE` (mod 4), i.e. bits `[2f+1:2f]` of the
byte on its master data lines.

The wiring follows from that:

- IU `n` enters shuffle-board unit `n/4` at port `n%4`.
- Output `j` of shuffle unit `s` goes to board `j`, board input `s` (line `16j+s`).
- On a board, input line `l` enters first-stage unit `l/4` at port `l%4`.
- Output `k` of first-stage unit `t` goes to input `t` of second-stage unit `k`.
- Output `m` of second-stage unit `k` on board `j` is IU `16j+4k+m`.

A 16x16 board can also be used alone as a 16x16 two-stage network. Drive its inputs directly
and use 4-bit IU numbers.

## The SU chip

The chip is a 4x4 crossbar with 8-bit data. It runs in one of two modes, set by `chmode`.

- **Master** (`chmode = 1`) routes and arbitrates itself. It sends its connection map to
  the slaves over a 12-line bus (CA0-CDE). The bus carries `{en, src[1:0]}` for each output
  port A..D: `en` says whether the output is connected, `src` which input drives it.
- **Slave** (`chmode = 0`) ignores its own router and arbiter and follows the CA bus. Only
  data, DIR, four STB lines per port and ACK pass through it. Unused slave inputs return
  zero.

In `su_xbar_unit`, the three slaves sit beside one master and give a 32-bit path:

| lines          | master  | slave k (k = 0..2)  |
|----------------|---------|---------------------|
| data           | [7:0]   | [8k+15 : 8k+8]      |
| STB (13 lines) | [0]     | [4k+4 : 4k+1]       |
| ACK (4 lines)  | [0]     | [k+1]               |
| REQ, LREQ, REL | yes     | –                   |
| DIR            | yes     | yes (same signal)   |

The master's data lines carry the destination address during a request and the load value
on idle ports. Load values are therefore 8 bits.

### Router

For each input port, the router works out which output that port wants:

- **REQ** (destination-addressed): the output named by the stage's address field.
- **LREQ** (load distribution): the free output with the lowest reported load, taken from
  the load monitor.

A REQ raises an arbitration request only if the input does not already hold that output. If
it does, the REQ is just passed on to the next stage. This is what makes multicast work. The
source repeats REQ with another address, and only the stage where the new path leaves the
existing tree adds a connection. An LREQ is served only for an input that holds no
connection yet. While REL is high, the input raises no request.

### Arbiter

Each output port has a one-hot ring counter. When several inputs want the same free output
in one cycle, the first requester at or after the ring position wins. The ring then moves on
by one place, so over four grants each input has had top priority once.

`armode` selects the grant timing:

- `armode = 0` (neighbouring stages clocked in step): a request is granted at the first
  clock edge that sees it.
- `armode = 1` (stages not in step): the request is first registered, and granted at the
  next edge only if it is still there.

The arbiter also holds the connection registers `map[o] = {en, src}`. A connection stays
until its source raises REL, which frees every output that source holds. An assertion
checks that a connected output keeps its source until it is released.

### Load monitor and crossbar

The load monitor looks at the reverse data `[7:0]` of every *free* output port and picks
the lowest value, ties going to the lower port. The value 8'hFF (`NO_PATH`) is reserved. It
means "no free path behind this port" and is never chosen, so IUs must report loads of 0 to
254. If no free output has a path, the chip itself sends `NO_PATH` backwards.

The crossbar drives the data lines:

- Connected output, DIR = 0: it copies the forward data of its source input.
- Connected input, DIR = 1: it receives the reverse data of all its outputs, ORed together
  if the circuit is a multicast.
- Input that holds no connection: it sends the lowest free-output load backwards.

Unused outputs drive zero.

### Communication controller

The communication controller forwards the control lines along each connection:

- REQ' and LREQ' go only to the output the input is routing to at that moment, so a repeated
  request travels down one branch of a multicast tree.
- REL', DIR' and STB' go to every output the input holds.
- ACK comes back ORed over all of them.

## How a circuit is used

1. **Request.** The source raises REQ with the destination IU number on data [7:0], or raises
   LREQ. It holds the request. With one-clock arbitration and no contention, each stage
   connects one clock after the previous one, and REQ' appears at the next stage straight
   away.
2. **Acknowledge.** The destination answers a REQ or LREQ that reaches it by raising ACK.
   ACK travels back without registers. In a three-stage network the source sees it at the
   4th clock edge after raising the request (7 edges with two-clock arbitration). If an
   output is busy, the request simply waits at that stage until the output is released.
3. **Drop the request.** The source drops REQ/LREQ, and the destination drops ACK.
4. **Transfer.** Data goes through every stage without registers. In the testbench model,
   the source sends one 32-bit word per clock and marks it with STB line 0. The other 12
   STB lines and the ACK lines are passed through for the network interfaces to use as they
   choose, e.g. for an asynchronous handshake.
5. **Reverse transfer.** With DIR = 1, the destination side drives the reverse data lines.
   For example, after an LREQ the source can read back which IU it reached.
6. **Multicast.** After the first ACK, the source drops REQ and raises it again with a second
   address. It waits for the ACK of the new branch. Forward data then reaches every branch,
   and reverse data and ACKs are ORed.
7. **Release.** The source raises REL for one clock. The whole circuit is freed at that edge,
   and every port it used returns to carrying load values.

Because data is not registered inside the network, the network adds only combinational
delay. The source and destination interfaces must register the data.

### Wrong load distribution

Load values describe *idle* paths only, and they are as old as the combinational path. Two
load-distribution requests that start in the same clock can both aim at the same IU. The
arbiter at the first shared output lets one through. The other then takes the best
*remaining* free output at that stage, which may lead to an IU that is not the least loaded.
The source should compare its own load with the value it saw before sending work (the
testbench model records this as `lseen`). A time-out or a re-check is left to the network
interface.

## Local memory of an IU

Four processor ports share the local memory (LMEM): UNIRED, PAN NIP, DAAN NIP and SPARC,
numbered 0 to 3 on `lm_*[n][m]`. The memory has four banks, and the ports reach them over
three synchronous buses. Each port may present a request every clock, and a read returns
two clocks after it is granted. At 10 MHz that is one access per 100 ns per port, with the
result after 200 ns.

`lmem_unit` is a two-stage pipeline:

1. **Arbitration.** In the clock a request is presented, `lmem_arbiter` does bus and bank
   arbitration together. It visits the ports in round-robin order and grants a request if
   its bank is still free this clock and a bus is left. So there are at most three grants
   per clock and at most one per bank. `gnt[m]` comes back combinationally. A port that is
   not granted holds its request and tries again.
2. **Access.** In the next clock each bus accesses its bank. Read data and `rvalid[m]`
   appear after the following edge.

Banks are word-interleaved: the bank is `addr[1:0]` and the row is the remaining bits. Bank
size (`BANK_WORDS`, 256 words) and word width (32 bits) are assumed values, as is the
round-robin rule. Memory contents are not reset.

## Performance as modelled

- **Per port:** 32 data lines at one word per clock. At a 10 MHz clock that is 40 MB/s per
  port.
- **Total:** 2 networks × 64 ports × 40 MB/s = 5.12 GB/s. The 10 MHz clock is an
  assumption, chosen to match the 100 ns memory cycle of the IU.
- **Connection time:** 4 clocks with one-clock arbitration, 7 with two-clock arbitration.
- **Size:** one 64x64 network is 48 switch units, i.e. 192 SU chips. After coarse synthesis,
  the pair of networks has about 95,000 word-level cells and 4,224 flip-flops: 11 bits per
  SU chip for the connection map, the rings and the registered requests.
- **Local memory:** at most three accesses per clock per IU.

## Departures from the described hardware, and choices made here

- Bidirectional data pins become a forward and a reverse bus per port. Pads, power and test
  pins of the 179-pin package are not modelled.
- The chip is not asynchronous inside. All stages run on one clock, and the phase-trimmed
  clocks meant to shorten connection time are not modelled. `armode` gives only the
  two-clock request sampling.
- The following are all choices of this design:
  - the encoding of the CA bus;
  - the address field per stage and the board wiring order;
  - the ring rotation rule;
  - the `NO_PATH` code and the tie rule of the load monitor;
  - the REQ/ACK handshake;
  - the rule that a repeated REQ goes down one branch only;
  - the assignment of STB and ACK lines to chips;
  - the polarity of `chmode`, `armode` and the (synchronous, active-high) reset.

  The description names the signals and the blocks but gives none of these.
- LREQ makes one unicast connection. Multicast trees are built with REQ only.
- The expected delays (about 30 ns per stage, about 100 ns through a network) are properties
  of the chip technology. Here the data path is simply combinational through all three
  stages, with no register.
- The rule that a source does not hand work to an IU more loaded than itself belongs to the
  network interface, not to the network, and is not built.
- The processors are not part of the RTL: UNIRED, SPARC and the network interface
  processors. The SPARC memory, host and I/O interfaces are not included either. In the
  testbenches, two models stand in for them:
  - `tb/iu_ports_model.sv` for the network interfaces of N IUs;
  - `tb/lmem_traffic_model.sv` for the four memory ports of one IU, with a reference
    memory.
- The hierarchical PIE256/PIE1024 expansion (a level-2 network between PIE64s) is not
  included.

## Simulating

Every testbench prints one `TB_RESULT checks=N failures=M` line. Each has a watchdog. The
network-level ones count every mechanism they exercise:

- addressed circuits;
- load distribution;
- load information reaching every idle source;
- waiting on a busy output;
- multicast;
- reverse transfer;
- full word rate;
- two-clock arbitration;
- in the memory testbenches, bank conflicts and bus-limit stalls.

A mechanism that never occurs counts as a failure.

| testbench              | what it covers                                                        |
|------------------------|-----------------------------------------------------------------------|
| `tb_su_load_monitor`   | 2000 random cases against a reference scan                            |
| `tb_su_router`         | 3000 random cases: address fields, LREQ, REL, repeated requests       |
| `tb_su_crossbar`       | 3000 random maps with multicast, both directions                      |
| `tb_su_comm_ctrl`      | 3000 random cases, master and slave                                   |
| `tb_su_arbiter`        | ring order, release, parallel grants, both arbitration modes          |
| `tb_su_chip`           | master and slave chips together: all connection kinds                 |
| `tb_su_xbar_unit`      | 32-bit data, 13 STB, 4 ACK lines, load on [7:0]                       |
| `tb_shuffle_board_64`  | all 64 IUs through the shuffle, contention                            |
| `tb_net_board_16x16`   | board used alone: end-to-end phases, 3-clock connection               |
| `tb_network_64x64`     | one network end to end, 4-clock connection                            |
| `tb_pie64_network`     | both networks at full size, same phases in parallel (about 1.5 min)   |
| `tb_lmem_arbiter`      | 2000 random request sets against a round-robin reference              |
| `tb_lmem_unit`         | 3 buses / bank conflicts directed, then random traffic vs. reference  |
| `tb_pie64_system`      | whole design at default size: network phases + memory traffic on all 64 IUs (about 3 min) |

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pie_net_pkg.sv \
    rtl/pie64_system.sv tb/iu_ports_model.sv tb/lmem_traffic_model.sv \
    tb/tb_pie64_system.sv --top-module tb_pie64_system -Mdir obj_tb -j 8
./obj_tb/Vtb_pie64_system
```

For another block, replace the RTL and testbench file names. The two models in `tb/` are
needed only by the testbenches that use them.

Lint reports two things that are expected:

- unused CA outputs of the slave chips in `su_xbar_unit`;
- an unused package constant in some leaf modules.
