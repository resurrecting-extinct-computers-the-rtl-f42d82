# CM-1 chip: sixteen one-bit processors and a hypercube message router

The Connection Machine CM-1 (1985) treats computing as "smart memory". It
has 65,536 very small processors, each with its own 4096-bit memory, and
every one of them runs the same instruction in the same clock. Any
processor can send a 32-bit message to any other through a packet-switched
network. The machine is built from 4096 identical chips. Each chip holds 16
processing cells and one router, and the routers are wired as a
12-dimensional hypercube.

This repository is synthesizable SystemVerilog for that chip, `cm_chip`.
4096 instances of it, plus the wiring between them and a host computer that
issues instructions, make the full machine. The testbenches build slices
of four and eight chips and run the machine's classic programs on them:
message passing, a logarithm, a dot product and breadth-first search.

```
                 instr[54:0] (broadcast, one per clock)
                        |
      +-----------------+-----------------------------------+
      | cm_chip         v                                   |
      |  16 x cm_cell (cm_bitmem 4096x1, 16 flags, 2 x cm_alu)
      |        | flag 2 (NEWS)      | flag 5 / flag 4       |
      |  cm_news_grid (4x4)         v                       |
      |                  cm_router                          |
      |   cm_injector -> 7 message buffers -> cm_identifier |
      |                   ^   |  priorities     |           |
      |                   |   v                 v           |
      |               cm_heart  cm_prio_calc  cm_distributor|
      +------|--------------|--------------------------------+
        cube links x12   referral link to chip_id+1
```

## The cell and its instruction

A cell is 4096 bits of memory, sixteen 1-bit flags and two 8-entry truth
tables. All 16 cells of a chip, and all chips of the machine, receive the
same 55-bit instruction every clock (`cm_pkg::cm_instr_t`):

| field     | bits | meaning                                          |
|-----------|------|--------------------------------------------------|
| `addr_a`  | 12   | memory operand A, also the memory destination    |
| `addr_b`  | 12   | memory operand B                                 |
| `flag_r`  | 4    | flag operand R                                   |
| `flag_w`  | 4    | flag destination W                               |
| `flag_c`  | 4    | condition flag C                                 |
| `sense`   | 1    | value C must hold for the cell to execute        |
| `mem_tt`  | 8    | truth table producing the new `mem[A]`           |
| `flag_tt` | 8    | truth table producing the new `flag[W]`          |
| `news_dir`| 2    | grid direction: 0 N, 1 E, 2 S, 3 W               |

In one clock the cell does this:

```
a = mem[A]; b = mem[B]; f = flag[R];
if (flag[C] == sense) { mem[A] = mem_tt[7 - {a,b,f}]; flag[W] = flag_tt[7 - {a,b,f}]; }
```

Each "ALU" (`cm_alu`) is just an 8-to-1 multiplexer. Any function of three
bits is therefore one instruction. Multi-bit arithmetic is done bit-serially:
for example, an add is one instruction per bit, with the sum in memory and
the carry in a flag (`TT_XOR` and `TT_MAJ` in `cm_pkg`). With the index order
`7 - {a,b,f}`, `8'b0000_1111` returns a, `8'b0011_0011` returns b and
`8'b0101_0101` returns f.

The flags:

| flag  | role |
|-------|------|
| 0     | always reads 0; writes are dropped. With C = 0, sense = 0 means "always execute" and sense = 1 means "do nothing". |
| 1     | global. The chip ORs flag 1 of its cells onto `global_out`, and the host ORs all chips into the machine's global pin. It is used for "is anyone still busy?" tests and for associative search. |
| 2     | NEWS. Writing W = 2 sends the flag result to the grid neighbour in direction `news_dir`, whose flag 2 then takes the value. |
| 4     | acknowledge (read-only). The router sets it when it has taken the cell's message. |
| 5     | router data. Reading it gives the router's delivery line for this cell. Writing it drives the router's injection line in that clock. |
| 3, 6, 7 | plain registers |
| 8–15  | general purpose |

Timing: operands are read combinationally and results are written at the
next rising edge. Flags reset to 0; memory is not reset. The host can read
and write one memory bit of one cell per clock through
`host_cell/host_addr/host_we/host_wd/host_rd`. A host write wins over an
instruction write to the same bit.

## The on-chip grid

`cm_news_grid` joins the 16 cells as a 4×4 torus: cell `c` sits at row
`c/4` and column `c%4`. In a clock where a cell writes flag 2, its
neighbour in direction `news_dir` receives the value at the same edge. All
cells use the same direction, because it is part of the instruction.

## Messages and relative addressing

A message is 50 bits, sent one bit per clock, first bit first:

| position | content |
|----------|---------|
| 0–11     | relative router address, bit 11 first |
| 12–15    | destination cell on the destination chip, bit 3 first |
| 16       | format bit (1) |
| 17–48    | 32 data bits |
| 49       | parity (carried, not checked) |

On every router-to-router link, a start bit of 1 precedes the message.

The address is relative. It is the XOR of the destination chip number and
the number of the chip the message is currently on. Crossing hypercube
dimension `d` flips bit `d` of the current chip number, so the router clears
bit `d` of the relative address (message position `11-d`) as the message
leaves. A message whose relative address is zero has arrived. A cell
therefore addresses "the chip that differs from mine in bits 3 and 0" rather
than "chip 9". The sender does not need to know its own chip number.

## The petit cycle

Every router runs the same fixed schedule, the petit cycle, and repeats it
every 696 clocks. All chips start it together when reset is released. The
schedule is the key to programming the machine. The host lines instructions
up with it, and `inj_start` marks clock 0.

| clocks   | phase | what happens |
|----------|-------|--------------|
| 0        | injection, request | every cell that wants to send writes 1 to flag 5 |
| 1–50     | injection, data | those cells write their 50 message bits to flag 5, one per clock |
| 51–662   | 12 dimension cycles of 51 clocks | cycle `d` moves at most one message each way across dimension `d`, plus one referral |
| 663      | delivery start | flag 5 of each cell that gets a message reads 1 |
| 664–695  | delivery data | the 32 data bits, one per clock |

A cell's send sequence is a request clock, 50 bit clocks, then a read of
flag 4. Flag 4 is valid from clock 51 until the next request clock. If it is
0, the router was full or four other cells won, and the program retries in
the next petit cycle.

On the receiving side, a program watches flag 5 at clock 663 (usually by
copying it to flag 1 and testing the global pin), then copies the next 32
bits. A message that travels `k` hops and is never blocked is delivered in
the petit cycle it was sent in. Its latency from request to first data bit
is 664 clocks.

## Inside the router

The router (`cm_router`) has seven 50-bit message buffers, each with a valid
bit and a 3-bit priority. Its units work in turn, driven by the sequencer
(`phase_q`, `dim_q`, `cnt_q`). Buffer state changes only at phase
boundaries. In the first clock of a phase, the active unit decides which
buffers it will free and fill, and starts the priority calculator. Bits then
stream in and out. In the last clock, valid bits and new priorities are
written back together. This way a message's priority never changes while it
is in flight.

### Priorities

Priorities express age. Larger means older and more urgent, and the valid
buffers always hold 7, 6, 5, … without gaps. Priority decides three things:

- which message goes when several want the same dimension;
- which message stays behind when a router must shed load;
- which message is delivered first when several are headed for the same cell.

`cm_prio_calc` restores the no-gaps rule after every phase, over 9 clocks,
in the background:

1. It captures which buffers survive, their priorities, and the new arrivals
   in arrival order.
2. For `x = 0..7`, one value per clock: if no survivor holds `x`, every
   survivor below `x` moves up by one. One ascending pass closes all gaps.
3. The `k`-th new arrival gets `7 - survivors - k`.

The shortest phase is 33 clocks, so the result is always ready before it is
needed.

### Injection (`cm_injector`)

In the request clock, the injector accepts at most four requesting cells,
lowest cell number first. It never accepts more than there are free buffers.
Each accepted cell is bound to a free buffer, lowest buffer first. For the
next 50 clocks, each accepted cell's line is written into its buffer. At the
last bit the buffers become valid and the accepted cells' acknowledge flags
are set. Refused cells simply see flag 4 = 0.

### Moving between chips (`cm_heart`)

Dimension cycle `d` lasts 51 clocks: a start clock and 50 bit clocks. In
the start clock, `cube_out[d]` carries a 1 if this router has a message that
needs to cross dimension `d`. This bit means "I want to send". Both ends of
the link then apply the same rule, so they agree without further
signalling: a message moves if its sender wants to send and the receiver is
either ready or also wants to send.

In the start clock the heart makes three decisions at once:

- **Send.** It picks the highest-priority message whose relative address has
  bit `d` set and sends it under the rule above, clearing bit `d` on the way.
  At most one message per dimension per petit cycle leaves a router. Others
  wait for a later petit cycle.
- **Receive.** If the neighbour wants to send and this router is ready, the
  message claims the lowest free buffer. If both sides want to send, the two
  routers **exchange** messages. The incoming message is written into the
  buffer of the outgoing one: bit `k` comes in at the clock edge after bit
  `k` has gone out. So even two completely full routers can swap.
- **Refer.** If this router is not ready itself, it hands its lowest-priority
  message that is not being sent to the next router of the referral ring, on
  `ref_out`, if `ref_ready_in` is high. The referral ring is chip `n` → chip
  `n+1`. As the message moves one chip along the ring, the router XORs its
  relative address with `chip_id ^ (chip_id + 1)`, so it still names the same
  destination. On the referral link the start bit is sent only when the
  message follows. The message takes the next free buffer, after the cube
  link.

**Ready handshake.** `ready_out` is high when at least two buffers are free.
A ready router can always hold one message from its cube link and one from
its referral link in the same cycle. Only a ready router is sent a message
without giving one back, so no message is ever lost. A simulation assertion
in `cm_heart` (`a_no_loss`) checks this.

**Why the exchange matters.** Without it, routers that are full of messages
for each other wait for ever. The breadth-first-search workload reaches
exactly that state within a few levels: four routers, each with seven
messages, all bound for the others. Referral alone cannot break it, because
the ring successor is full as well. Pairwise exchange keeps such a network
moving.

Referral is the pressure valve. A hot-spot router that keeps filling up
pushes its youngest messages sideways. They then reach the destination by
another path in a later petit cycle.

### Delivery (`cm_identifier` and `cm_distributor`)

Delivery has two modes, chosen by the `deliver_or` pin:

- **OR mode** (`deliver_or = 1`). Every buffered message with relative
  address zero is delivered. Messages for the same cell are ORed bit by bit,
  which is useful for "did anyone send me a 1" combining.
- **Priority mode** (`deliver_or = 0`). For each destination cell only the
  highest-priority arrived message is delivered. The rest stay buffered for a
  later petit cycle.

`cm_identifier` makes this selection in the delivery start clock.
`cm_distributor` then ANDs each buffer's selection with its current bit,
routes the result to its destination cell's line, and ORs all buffers onto
the 16 delivery lines. Delivered buffers are freed at the end of the phase.

## Chip pins

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `instr[54:0]` | in | broadcast instruction (`cm_instr_t`) |
| `chip_id[11:0]` | in | this chip's hypercube number, needed only for referral |
| `deliver_or` | in | delivery mode |
| `cube_out/cube_in/cube_ready_in[11:0]` | out/in/in | one serial link each way per dimension, and the neighbour's ready line |
| `ready_out` | out | at least two free buffers; wire to every neighbour's `cube_ready_in[d]` and to the ring predecessor's `ref_ready_in` |
| `ref_out`, `ref_in`, `ref_ready_in` | out/in/in | referral ring: to chip_id+1, from chip_id-1 |
| `global_out` | out | OR of the cells' flag 1 |
| `inj_start` | out | clock 0 of the petit cycle |
| `rtr_busy` | out | some buffer holds a message, so the network is not yet empty |
| `rtr_events[3:0]` | out | one-clock pulses: `{receive on referral, receive on cube, refer, send}` |
| `host_cell, host_addr, host_we, host_wd, host_rd` | in/out | host access to one memory bit |

## What follows the original machine and what is this design's own

These follow the CM-1 description: 16 cells per chip, 4096 memory bits and
16 flags per cell, the 55-bit instruction with two 8-bit truth tables, the
conditional execution rule, four-way grid communication, 12 hypercube
dimensions with relative addressing, bit-serial links opened by a 1, seven
router buffers, at most four injections per petit cycle, the router's units
(injector, heart, priority calculator, identifier, distributor),
multi-cycle priority recomputation by an ascending sweep over the eight
values, the two delivery modes, referral around a ring of routers in
chip-number order, and a global pin driven from a flag.

These are this design's choices, made where the description is silent:

- **Flag numbers.** 0, 1, 4 and 5 are taken from how programs for the machine
  use them. NEWS = 2 is a choice. Flags 3, 6 and 7 are plain registers.
- **Message layout and truth-table bit order.** Both were chosen so that
  existing instruction sequences (request bit, 16 address bits, format bit,
  32 data bits, parity) work unchanged.
- **Phase lengths.** 51 + 12 × 51 + 33 = 696 clocks. The original is known
  only to be "about 700 cycles".
- **Ready handshake, exchange and referral policy.** These are entirely this
  design's. The two-free-buffer rule is one simple way to make loss
  impossible, and exchange keeps full routers from locking up. The original
  router had an overflow mechanism whose details are not known.
- **Which messages win.** Lowest cell first for injection, and lowest buffer
  first for placement.
- **Delivered bits.** Delivery carries only the 32 data bits, after a start
  bit. The parity bit is not checked.
- **Grid shape.** A 4×4 grid that wraps at the edges.
- **Host port.** One bit per clock; it is the way data is loaded in a chip
  that keeps its memory on-chip.
- **Start-up.** All chips start their petit cycles at reset, in lockstep.

Not built as RTL: the 4096-chip hypercube itself, which is only wiring
between `cm_chip` ports, and the host computer.

## Verification

Every unit has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_cm_alu` | every table bit against every operand combination |
| `tb_cm_bitmem` | random reads and writes against a model, and the host port |
| `tb_cm_cell` | bit-serial add and compare programs, and random instructions against a reference model including the special flags |
| `tb_cm_news_grid` | all four directions with random patterns |
| `tb_cm_prio_calc` | random keep and arrival sets against a reference ranking, and the 9-clock latency |
| `tb_cm_injector` | the 4-message and free-buffer limits, bit capture, and acknowledge timing |
| `tb_cm_heart` | send choice, address-bit clearing, receive, exchange, referral with address rewrite, and the ready rules |
| `tb_cm_identifier` | both modes against a model |
| `tb_cm_distributor` | random selections against a model |
| `tb_cm_router` | five petit cycles: acknowledges, a one-hop transfer, delivery at clock 663, priority deferral, OR mode, filling all seven buffers, and two referrals |
| `tb_cm_chip` | four full-size chips as a machine running NEWS, an all-to-one hot spot in priority mode (every word must arrive exactly once), a transpose in which every cell sends to the same cell of the opposite chip, pairs combined in OR mode, and an assertion search over the global pin |

`tb_cm_chip` counts each router mechanism and fails if any never happens:
refused injection, cube send, referral, deferred delivery, OR-combined
delivery, router not ready, NEWS transfer, global-pin assertion and message
exchange. It uses
the chip at its real size. In the four-chip slice, ten of the twelve
dimension links are left unconnected. Chip 3 sees no referral successor,
because the ring of a four-chip slice cannot close.

### Programs for the machine

Three more testbenches run the classic CM-1 programs, written as
instruction streams from the host, on full-size chips:

| testbench | program |
|-----------|---------|
| `tb_cm_log` | Feynman's logarithm. All 16 cells of a chip compute log2 of their own 32-bit fixed-point number at once. The number is built up as a product of factors (1 + 2^-k), using a 32-entry table that is broadcast into every cell's memory. Results are checked bit-exactly against the integer algorithm and to within 1.2e-7 against the true logarithm. The program takes exactly 7196 clocks: 1024 to load the table, 96 to clear the work area, and 31 steps of 196 instructions. |
| `tb_cm_dot` | Dot product of two 4-entry vectors, held in cell 0 of 8 chips joined as a 3-cube. Vector y is sent across one dimension, each x cell multiplies by shift-and-add, and a tree reduction over the two remaining dimensions leaves the sum in every x cell. Each message step is checked to be delivered in its own petit cycle. |
| `tb_cm_bfs` | Breadth-first search on a random 64-vertex graph of out-degree 8, one vertex per cell of 4 chips. Frontier cells send along each edge, using a per-edge bitmap and the acknowledge flag to retry refused sends. Newly reached cells keep the first message as a back pointer, and the global pin decides when a level is finished. Every vertex's level and back pointer is checked against a software BFS. This is the heaviest router load in the test suite: refusals, referrals, exchanges and deferred deliveries all occur. |

On the full 4096-chip machine all three fit the 4096-bit cell memory
unchanged. The logarithm uses addresses up to 4095, and BFS stores 8 or more
16-bit edges, a bitmap and a 32-bit inbox per cell. The logarithm runs at
the same speed at any machine size. The other two programs only use more
dimensions.

Limits to keep in mind:

- No simulation has run more than eight chips.
- The behaviour under sustained heavy traffic across many dimensions has
  only been exercised at that scale.
- Exchange frees full routers that hold messages for each other across the
  same dimension. A ring of full routers each waiting on a different
  dimension is not ruled out by construction, though no test has produced
  one.
- Parity is carried but never checked.

## Simulating

Every testbench runs with plain Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cm_chip \
    -y rtl -y tb +libext+.sv rtl/cm_pkg.sv tb/tb_cm_chip.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_cm_chip` with any other testbench name. `-Wno-fatal` is there
because the testbenches pass narrow values to 64-bit check tasks, which
Verilator reports as width warnings; the RTL itself lints clean of them. The whole-chip test
builds in a few seconds and runs in under a second. The design uses two
state values only. Everything that is read is reset, except cell memory,
which programs and testbenches initialise themselves.

To change the machine, start from `cm_pkg.sv`. It holds the sizes, the flag
numbers, the message layout and the petit-cycle length, and the units derive
their timing from it. The grid shape is a parameter of `cm_news_grid`.
