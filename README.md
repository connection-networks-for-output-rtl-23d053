# Banyan packet network for a list-processing multiprocessor

Many list processors share one store of list cells. They reach it with
three kinds of request, each modelled on a LISP primitive:

* **RSVP** (CAR/CDR): fetch a cell. The processor waits for the answer.
* **STING** (RPLACA/RPLACD): store into a cell. Nothing comes back.
* **NEW** (CONS): obtain the address of a free cell.

This RTL is the connection network between N processors and N memory
modules. It is a banyan network of identical 2x2 packet switches, with
log2 N stages. Routing is fully distributed. Each switch looks at one
address bit and rewrites it, so an answer finds its way back to the
sender without the processor's name ever being sent. The network also
works as a reservoir of free cells, called the **NEW-sink**. Memories push
newly allocated cells down towards the processors ahead of any request,
so a NEW is normally served at once from the processor's own port. A NEW
never travels up the network.

The default build has 16 processors and 16 memories (4 stages). That is
the size of the system the design was evaluated at.

## Agents, ports and planes

Everything that talks is an *agent*: a processor interface, a switch or
a memory. Between each pair of neighbouring agents sits a **port**
(`banyan_port`). A port has three one-packet latches, one per *plane*:

| latch    | direction           | loaded by        | emptied by       |
|----------|---------------------|------------------|------------------|
| Outgoing | processor -> memory | agent below      | agent above      |
| Incoming | memory -> processor | agent above      | agent below      |
| New      | memory -> processor | agent above      | agent below      |

"Below" means the processor side and "above" the memory side. The
network has `STAGES+1` rows of N ports. Row 0 holds the processors'
ports and row `STAGES` the memories' ports. Between two rows sit N/2
switches.

The switch of stage `s` at column `c` (where bit `s-1` of `c` is 0) joins
two lower ports, LL at column `c` and LR at column `c+2^(s-1)`, to the two
upper ports UL and UR in the same columns. The first stage therefore pairs
neighbouring columns, the second pairs columns two apart, and so on.

**The timing rule.** Every agent decides from the latch contents
registered at the start of the cycle. A latch is loaded only while it is
empty and emptied only while it is full. So a latch emptied in one cycle
can be refilled in the next cycle at the earliest. One clock cycle is one
*switch cycle*: a whole packet moves one hop. The port carries assertions
for both rules.

## Routing and return addresses

This is the least obvious part of the design, and it is all in
`banyan_switch`.

**Outgoing plane (processor to memory).** A packet starts with the
destination memory index in its `addr` field. Each switch routes on
address bit 0: 0 goes to the left output (UL), 1 to the right one (UR).
It then shifts the address right by one bit. Into the top bit,
`STAGES-1`, it shifts a bit naming the input the packet came from: 0 for
LL, 1 for LR. After `STAGES` hops all destination bits are gone. The
address now holds the path the packet took, which is exactly the index
of the sending processor. The memory never needs to know who asked.

**Incoming plane (memory to processor).** An answer starts with that
return address. Each switch routes on the top bit, `STAGES-1`, because
the last bit pushed in on the way up is the first one needed on the way
down. It shifts the address left and puts into bit 0 the side it came
from: 1 for UR. The answer reaches the sender carrying the index of the
memory that answered.

**New plane.** A memory puts a cell in its New latch with address 0. On
the way down it is handled like an answer, so it arrives carrying the
index of the memory that allocated it. The full name of a cell is
therefore (memory index, cell index).

Packets from one processor to one memory always take the same path
through FIFO latches. They therefore arrive in the order they were sent.
A STING followed by an RSVP to the same cell reads back the stored value.

## Switch decisions and the straight-across preference

On the Outgoing and Incoming planes (`xfr_ctl`, used twice per switch),
each output latch that is empty takes one packet:

1. the packet of the input straight below (or above) it, if that packet
   wants this output ("bar");
2. otherwise the packet of the diagonal input, if it wants this output
   ("cross").

A full output takes nothing. When both inputs want the same output, the
straight one wins and the other waits.

On the New plane (`newsink_ctl`), each empty lower New latch is refilled
from the upper latch straight above it. Failing that, it takes the
diagonal upper cell, unless that cell is already going straight down
into the other lower latch.

Because of this fixed preference, each processor has an **associated
memory**: the one in its own column. While the network is not busy, new
cells flow straight across. After reset the processor interface uses this
to learn its identity: it consumes the first cell it receives and keeps
that cell's memory index as `id`. When a processor drains its part of
the sink, or a memory runs out of cells, cells come in diagonally from
neighbouring memories.

The fixed preference has a known cost. Under STING-only traffic, packets
going straight block packets going diagonally. Utilisation at 50 %
locality is then *lower* than at 25 % (see the workload table below). A
switch that changes its preference from time to time would relieve
this. No such scheme is specified, so none is built here.

## Memory agent

`memory_agent` does at most one thing per cycle, in this order:

1. **STING in the Outgoing latch:** absorb it and write the cell.
2. **RSVP in the Outgoing latch:**
   * If the Incoming latch is empty, absorb the RSVP and load the
     Incoming latch with the answer: the cell's contents, the same cell
     index and the return address.
   * Otherwise the RSVP waits, and the memory does nothing else that
     cycle.
3. **Nothing in the Outgoing latch:** if the New latch is empty, the
   memory allocates the next free cell into it. It does this only while
   `supply_en` is high and cells are left.

The store has `CELLS` words and is cleared by reset. The allocator is a
counter. Cells are never reclaimed, because garbage collection is outside
this design. Once all cells are handed out, `exhausted` rises and the
memory stops feeding the sink.

`supply_en` is the memory's readiness to produce cells. Tie it high for
normal use. The workload testbench drives it randomly to model "memory
responsiveness".

## Processor interface

`proc_port_if` turns one request at a time (`req_valid`/`req_ready`)
into port operations:

* **NEW:** takes the cell in the New latch. It is accepted only when a
  cell is there, and the response (`resp_mem`, `resp_cidx`) comes in the
  same cycle.
* **STING:** loads the Outgoing latch. It is blocked while the latch is
  still full.
* **RSVP:** loads the Outgoing latch, then accepts nothing until the
  answer arrives. The answer is presented on `resp_*` in the cycle it is
  taken. Only one fetch is outstanding at a time, with no lookahead.

`status` classifies every cycle as idle, active, waiting or blocked. This
is for utilisation counters.

## Timing

| operation (unloaded network)   | cycles                                                        |
|--------------------------------|---------------------------------------------------------------|
| NEW with a cell waiting        | 1 (accepted the same cycle)                                   |
| NEW every cycle, full supply   | 1 active + 1 waiting (50 % utilisation)                       |
| STING issue                    | 1; arrives at the memory port after `STAGES+1`                |
| STING every cycle, own memory  | one every 2 cycles (50 %)                                     |
| RSVP round trip                | `2*STAGES+2` from acceptance to answer                        |

The RSVP round trip is made up of `2*STAGES` switch hops, one cycle in
the memory, and one cycle to enter the processor's port. In a 16-processor
system that is 10 cycles.

## Parameters

| parameter  | where                      | default | meaning                                    |
|------------|----------------------------|---------|--------------------------------------------|
| `STAGES`   | top, network, switch, pif  | 4       | log2 of the number of processors/memories  |
| `CELLS`    | top, memory_agent          | 256     | cells per memory (at most 2^`CELL_W`)      |
| `ADDR_MAX` | `banyan_pkg`               | 8       | address field width; `STAGES` <= `ADDR_MAX`|
| `CELL_W`   | `banyan_pkg`               | 8       | cell index width                           |
| `DATA_W`   | `banyan_pkg`               | 16      | cell contents width                        |

A packet is 1 + 8 + 8 + 16 = 33 bits.

## Where this RTL departs from, or adds to, the model it implements

* **Added detail.** The payload widths, the cell store, the allocator,
  the request/response handshake and reset are choices made here. The
  source model routes only an address and an RSVP flag.
* **Whole packets per cycle.** Packets move whole in one cycle. The
  intended implementation serialises them over narrow links, and that
  serialisation is not modelled.
* **Longer RSVP round trip.** In the source model the processors' and
  memories' own latch updates are seen by the switches in the same
  cycle. Here every agent is registered, which adds one cycle at each
  end. The RSVP round trip is therefore `2*STAGES+2` cycles instead of
  `2*STAGES`, and RSVP-only utilisation is 1/(2·STAGES+2) rather than
  1/(2·STAGES).
* **Finite store.** Memories run out of cells (`CELLS` each). In the
  source model they never do.
* **No preference history.** The suggested history-based preference
  change in the switches is not built.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench               | what it checks                                                                                                                              |
|-------------------------|---------------------------------------------------------------------------------------------------------------------------------------------|
| `tb_banyan_port`        | random legal traffic on all three latches against a reference model                                                                         |
| `tb_xfr_ctl`            | all 36 cases of the switch decision table                                                                                                   |
| `tb_newsink_ctl`        | all 16 cases of the NEW-sink table                                                                                                          |
| `tb_banyan_switch`      | routing bits, address rewriting, preference, locked outputs, NEW refill                                                                     |
| `tb_banyan_network`     | see the list below                                                                                                                          |
| `tb_memory_agent`       | STING/RSVP/NEW priority, blocked RSVP, allocation order, exhaustion                                                                         |
| `tb_proc_port_if`       | start-up id, NEW wait, STING blocking, RSVP wait                                                                                            |
| `tb_list_multiprocessor`| the whole 16x16 system at default parameters, see the list below                                                                            |
| `tb_workloads`          | traffic mixes on 2 to 32 processors, printing utilisation tables                                                                            |

`tb_banyan_network` runs on 8 processors and checks:

* every processor-memory pair on both planes: arrival memory, return
  address and latency;
* the crossing case, where processors 2 and 6 both write to memory 3;
* random all-to-all traffic;
* the straight flood of new cells and the diagonal refill.

`tb_list_multiprocessor` runs the 16x16 system at default parameters and
checks:

* the start-up ids;
* the exact RSVP round trip;
* 3000 cycles of mixed traffic with every STING'd cell read back and
  compared;
* a hot spot that makes memories hold RSVPs;
* NEW traffic until every memory is exhausted, checking that no cell is
  ever handed out twice.

It also fails if any of these mechanisms never happened: blocking, a
held RSVP, a NEW wait, a non-local cell, or exhaustion.

`tb_workloads` uses a stochastic processor model (`tb/lpu_model.sv`): a
Markov chain over IDLE/NEW/STING/RSVP with a configurable transition
matrix and locality. It measures utilisation as (transactions + idle
cycles) / (those + waiting + blocked cycles). One run gave:

```
RSVPs only          2: 25.2%   4: 16.8%   8: 12.4%   16: 9.9%   32: 8.4%
STINGs only, 16 processors, locality 100/90/75/50/25 %:
                    50.4  17.6  17.4  19.5  21.3
Mixed, 16 processors, r = .5/.7/.9:  18.4  14.5  11.4
NEWs only, 16 processors, activity 1.0, responsiveness .2/.5/1.0:
                    18.2  34.3  50.4
Mixed, 32 processors, r = .7: 12.5% each, gross 4.0 processors' worth
```

The shapes follow the evaluation the design came with, in several ways:

* RSVP-only utilisation falls with the number of stages.
* STING-only traffic reaches 50 % only with full locality, and does worse
  at 50 % locality than at 25 %.
* NEW-only utilisation saturates as memory responsiveness rises, and is
  higher when processors are less active.

The absolute numbers are lower. The main reason is the longer RSVP round
trip described above. For example, the 32-processor mixed system gives 4
processors' worth of work where the original evaluation reported about
8.

`tb/lpu_model.sv` and `tb/wl_system.sv` are testbench-only. The list
processors themselves are not part of this RTL: the system's request
ports are where they connect.

## Simulating

Files: `rtl/banyan_pkg.sv` (types), `banyan_port`, `xfr_ctl`,
`newsink_ctl`, `banyan_switch`, `banyan_network`, `memory_agent`,
`proc_port_if`, and the top `list_multiprocessor`.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/banyan_pkg.sv tb/tb_list_multiprocessor.sv --top-module tb_list_multiprocessor
./obj_dir/Vtb_list_multiprocessor
```

Replace the testbench name to run any other. The package must come first
on the command line. To change the size, override `STAGES` (and `CELLS`)
on `list_multiprocessor`. `tb_workloads` shows how to instantiate several
sizes side by side.
