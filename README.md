# Multistage interconnection network for a multiprocessor SoC

A multiprocessor system on chip needs every processor to reach every shared
data memory. A full crossbar does this with N² crosspoints. A multistage
interconnection network (MIN) does it with log2(N) stages of N/2 small 2×2
switches, so it grows as N·log2(N). The cost is that two messages can now
block each other inside the network. This RTL implements such a network and
an MPSoC built around it. There are N processor ports, N private instruction
memories and N shared data memories. Two N×N MINs connect them:

- **network 1** carries requests (read or write) from the processors to the
  data memories;
- **network 2** carries the answers back: the read data, or the
  acknowledgement of a write.

The design follows the paper *Multistage Interconnection Network for MPSoC:
Performances study and prototyping on FPGA*: its topology, self-routing,
round-robin arbitration, input FIFOs, three-cycle stage time, the two-network
MPSoC and the Omega/Butterfly/Baseline variants. Widths, sizes, handshakes,
the address map and the counters are choices made here. They are listed under
"Choices made here" below.

The processor core (the paper uses miniMIPS) is not included. Its ports are
brought out of the top level, and the testbenches drive them with a
behavioural model.

## Structure

```
mpsoc_top
├── instr_memory  × N        private program memory per processor (local bus)
├── data_memory   × N        shared data memories
├── min_network   (network 1: processor → memory, requests)
│   └── per stage s = 0 .. log2N-1:
│       ├── connection_block  (fixed wiring; sets the network type)
│       └── min_switch × N/2
│           ├── sync_fifo  × 2   (one per input)
│           └── rr_arbiter × 2   (one per output)
└── min_network   (network 2: memory → processor, answers)
```

`min_pkg` holds the shared types: the network-type enum, the request and
answer message structs and the connection-block wiring function.

## How a message finds its way: self-routing

A message is a destination number (log2 N bits) plus a payload. No routing
table is needed. Stage `s`, counted from the sources, looks at one bit of the
destination:

- stage 0 looks at the most significant bit, and each later stage at the
  next lower bit (stage s uses bit `log2N-1-s`);
- a 0 takes the switch's **upper** output and a 1 its **lower** output.

After the last stage the message sits on the output line whose number equals
its destination. Switch `k` of a stage owns lines `2k` (upper) and `2k+1`
(lower).

What makes this work is the wiring in front of each stage, the
**connection block**. Changing only these blocks changes the network type.
The rest of the network stays the same, and so does the routing rule. With
line number bits `b2 b1 b0` (N = 8), input line → output line:

| type      | before stage 0 | before stage 1 | before stage 2 |
|-----------|----------------|----------------|----------------|
| Omega     | b1 b0 b2 (shuffle) | b1 b0 b2   | b1 b0 b2       |
| Butterfly | straight       | b0 b1 b2 (swap b0, b2) | b2 b0 b1 (swap b0, b1) |
| Baseline  | straight       | b0 b2 b1 (rotate right) | b2 b0 b1 (rotate low two bits right) |

In general:

- **Omega:** a perfect shuffle (rotate left by one) before every stage.
- **Butterfly:** exchanges bit 0 with bit `log2N-s` before stage s > 0.
- **Baseline:** rotates the low `log2N-s+1` bits right by one before stage
  s > 0.

`min_pkg::conn_perm` computes these wirings for any power-of-two N.
`MIN_TYPE` selects the type; Omega is the default.

All three are blocking networks. Two messages bound for different
destinations can still need the same switch output. That is what the blockage
counters measure.

## The 2×2 switch and its timing

This is the part that sets all latencies. A message that meets no other
message crosses one switch in exactly **three cycles**:

| cycle | where the message is |
|-------|----------------------|
| t     | presented at the switch input (`in_valid`); written into the input FIFO at the end of the cycle |
| t+1   | at the FIFO head; its destination bit selects an output; the arbiter of that output grants it; moved into the output's arbitration register |
| t+2   | moved from the arbitration register into the output register |
| t+3   | `out_valid` high at the switch output, which is the next stage's input |

Each output can take a new message every cycle. A message that loses
arbitration waits in its FIFO and goes one cycle later. So for N lines:

- **minimum latency:** `3·log2(N)` cycles through a network;
- **maximum latency:** `3·log2(N) + N − 1` cycles when all N sources send to
  the same destination at once.

The testbenches measure both exactly:

| N  | minimum | maximum |
|----|---------|---------|
| 4  | 6       | 9       |
| 8  | 9       | 16      |
| 16 | 12      | 27      |
| 32 | 15      | 46      |
| 64 | 18      | 81      |

With a 10 ns clock an 8×8 network has a 90–160 ns one-way latency. These are
the paper's formulas. Its latency plot puts the 8×8 maximum at about 17
periods, but the formula, followed here, gives 16.

**Arbitration:** each output has a two-input round-robin arbiter with one
priority bit. When both inputs ask for the output, the input named by the bit
wins. After any grant, the granted input gets the lower priority. Two inputs
that keep competing are therefore served alternately. The arbiter only grants
while the output's arbitration register can take a message.

**Flow control:** every line uses valid/ready, and a message is never
dropped. A switch input is ready while its FIFO has room. Back-pressure from
a full memory-side output propagates back stage by stage. Once a message is
in the network, it cannot be overtaken by a later message from the same
source to the same destination: there is one path per source/destination
pair, and every queue on it is first in, first out.

## The MPSoC around the networks

**Address map.** Processors issue 32-bit byte addresses.

- Bits `[2 +: log2(DMEM_WORDS)]` select the word inside a data memory.
- The next `log2(N)` bits select the data memory, which is the request's
  destination in network 1.
- So memory m holds bytes `m·4·DMEM_WORDS` to `(m+1)·4·DMEM_WORDS − 1`.

**Messages** (`min_pkg`):

- request `req_t` = {source processor, write flag, address, write data}
  (73 bits);
- answer `resp_t` = {destination processor, serving memory, write flag, read
  data} (49 bits).

A data memory routes its answer back through network 2 to the processor
named in the request.

**Data memory.** A request taken in cycle t is answered from cycle t+1. The
answer is held until it is taken, and a new request is accepted in the same
cycle the old answer leaves. A lone access therefore takes
`3·log2N + 1 + 3·log2N` cycles from request to answer, which is 19 cycles for
N = 8.

**Processor ports.** Per processor, `mpsoc_top` has:

- an instruction-fetch port `imem_fetch_addr` / `imem_fetch_data` (one-cycle
  read) and a program-load port `imem_load_*`;
- a data port: `dreq_*` for requests and `dresp_*` for answers, both
  valid/ready.

Every request gets exactly one answer. Answers to requests in flight to
different memories may come back out of order, but a blocking processor has
only one request in flight.

**Counters.** `bi_n1` and `bi_n2` count blockages in network 1 and network 2.
Every cycle adds the number of messages that sat at a switch-FIFO head
without moving. `conf_n1` and `conf_n2` count switch outputs requested by
both inputs in the same cycle. Reset clears all four.

## Choices made here

The paper gives the items below only in part, or not at all. They are the
choices of this RTL:

- **Widths.** Data and addresses are 32 bits, to match a 32-bit MIPS core.
  Node numbers travel in 8-bit fields, enough for up to 256 nodes.
- **Sizes.** FIFOs hold 64 entries (`FIFO_DEPTH`). Data and instruction
  memories hold 1024 words each (`DMEM_WORDS`, `IMEM_WORDS`).
- **Stage timing.** The three cycles per stage are given by the paper. Their
  split into FIFO, arbitration register and output register is chosen here.
- **Arbiter priority.** The priority bit changes after every grant, not only
  after a contested one. After reset, input 0 has priority.
- **Routing order.** Routing is most significant bit first, which fits the
  connection block placed in front of every stage.
- **Reset.** Reset is synchronous and active low. It clears the FIFOs,
  registers and counters but not the memory contents.
- **Blockage unit.** The unit of the blockage count, a message-cycle, is a
  definition chosen here. Absolute counts are therefore not comparable with
  figures measured elsewhere.
- **Program loading.** The instruction-memory load port stands in for loading
  a memory-initialisation file.

The paper also compares the MIN with a full crossbar network. The crossbar is
only a baseline for that comparison and is not part of this design.

## Testbenches and what they show

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_sync_fifo` | random pushes and pops against a queue model; full and empty flags; push while full and popping |
| `tb_rr_arbiter` | alternation under constant contention; every grant against a reference model |
| `tb_connection_block` | the wiring of all three network types, all three stages at N = 8, against hand-written tables |
| `tb_min_switch` | three-cycle crossing; one extra cycle for the loser; round-robin order; random traffic with back-pressure (routing, order, no loss) |
| `tb_min_network` | Omega at N = 4, 8 and 16, plus Butterfly and Baseline at N = 8: exact minimum latency for every source/destination pair; exact maximum latency with all-to-one traffic; random traffic with back-pressure |
| `tb_min_network_large` | the same tests for Omega networks of 32 and 64 lines; takes several minutes to build |
| `tb_data_memory` | random reads and writes against a shadow memory; one-cycle answer; answer held under back-pressure |
| `tb_instr_memory` | load and fetch with one-cycle latency |
| `tb_mpsoc_top` | the whole MPSoC at its default size (see below) |
| `tb_mpsoc_workloads` | the same matrix product on Omega networks with 4 and 8 processors and on Butterfly and Baseline networks with 8 processors |

**The matrix product.** `tb_mpsoc_top` runs an 8×8 matrix product on 8
processors with Omega networks:

- The processors are replaced by `tb/matmul_cpus.sv`, a blocking
  behavioural model that spends 0–4 cycles between accesses.
- Row r of each matrix lives in data memory r mod N.
- Processor p first stores its rows of A and B. It then computes its rows of
  C, reading every term through the network.
- Every answer is checked against a shadow copy of memory, and C is read back
  and compared with the product.
- The testbench also loads and fetches programs in all instruction memories.
- It requires blockages and arbitration conflicts to occur in both networks.

Typical output: about 3,000 cycles (30 µs at 10 ns) for the compute phase,
with on the order of 100 blockages. The paper reports 17 µs for its miniMIPS
program, but its processors interleave computation and memory traffic
differently. Run times here measure the network with this traffic model, not
the processor.

The MPSoC with 16 processors is not simulated by these testbenches. It is
reachable through the `N` parameter, but it takes long to build.

## Simulating

Each testbench is one top module. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/min_pkg.sv \
    tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top -Mdir obj_top
./obj_top/Vtb_mpsoc_top
```

Swap in any other `tb/tb_*.sv` the same way. `-Irtl -Itb` lets Verilator
find each module in the file of the same name.

The main parameters of `mpsoc_top` are:

- `N`: a power of two, at least 2;
- `MIN_TYPE`: `MIN_OMEGA`, `MIN_BUTTERFLY` or `MIN_BASELINE`;
- `FIFO_DEPTH`: a power of two;
- `DMEM_WORDS` and `IMEM_WORDS`.

`min_network` can also be used on its own, with any payload width `PW`.
