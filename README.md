# Round-robin shared-memory arbiter for small multiprocessor systems

Several 8-bit processors (Z-80 class) each run from their own local memory and
exchange data through one shared RAM, which works as a mailbox. Only one processor
may be on the shared bus at a time, so a small hardware arbiter decides who goes
next. It needs nothing from a processor but two pins that almost every
microprocessor has:

* a **WAIT** input, which lets the arbiter freeze the processor in the middle of a
  memory cycle until the bus is free;
* a **FETCH indicator (M1)** output, which tells the arbiter that the processor has
  finished its shared access and is fetching its next instruction.

Because conflicts are settled in hardware, each processor sees the shared memory as
an ordinary extension of its own memory. No locking software and no
interprocessor-communication protocol are needed to get onto the bus.

This repository holds synthesizable SystemVerilog for the arbiter, the bus
interfaces, the shared memory and the complete four-processor system. It also has two
systems built from them: a three-processor front end for a host computer, and a
triple-redundant trolley controller. The processors themselves and all the analog and
electromechanical equipment around them are outside the RTL. Their signals are ports.

## The handshake, clock by clock

Everything runs on the CPU clock. One processor's shared access goes like this (times
are rising clock edges; `cpu_model` in `tb/` drives exactly this sequence):

| edge | processor (T-state)            | arbiter                                                        |
|------|--------------------------------|----------------------------------------------------------------|
| e0   | T1: address out, REQUEST pulse | -                                                              |
| e1   | T2                             | REQUEST edge seen: Request flip-flop set, **WAIT low**         |
| ...  | Tw (wait states)               | scanner walks one processor per clock                          |
| ek   | Tw                             | scanner is on this processor: Grant flip-flop set, **GRANT low**, scanner frozen, bus interface opens |
| ek+1 | Tw                             | one clock after GRANT: Request flip-flop cleared, **WAIT high** |
| ek+2 | T3: access completes           | address has been on the shared bus since ek                    |
| ek+3 | next opcode fetch, **M1 low**  | -                                                              |
| ek+4 | -                              | M1 seen: Grant flip-flop cleared, **GRANT high**               |
| ek+5 | -                              | scanner moves on                                               |

The one clock between GRANT and the release of WAIT is there to let the address
settle on the shared bus before the processor uses it. GRANT stays active from the
moment it is given until the processor's next M1. A read or write therefore never
loses the bus halfway through, whatever the processor's cycle length.

Consequences that the testbenches check exactly:

* **No contention.** A processor sees `2 + d` wait states. Here `d` is the number of
  clocks the scanner still needs to reach it, counted from the clock after its
  REQUEST, so `0 <= d < N`.
* **Saturation.** With every processor requesting back to back, a new grant starts
  every **6 clocks**: a 4-clock grant, one clock to release it, one to take the next.
  The grants go strictly round the ring and every processor gets the same share. At
  a 2 MHz clock that is a ceiling of about 333 kbyte/s for the whole system. The
  average of about 87 kbyte/s quoted for four processors under normal load is well
  inside it. The 6-clock figure uses the shortest possible cycle (M1 one clock long).
  A real Z-80 holds the grant a little longer.
* **Bounded waiting.** No processor waits longer than the other `N-1` accesses plus
  one trip round the ring.
* **Mutual exclusion.** At most one GRANT is ever active. An assertion in `arbiter`
  enforces this.

## Arbiter: scanner and controllers

The arbiter (`arbiter.sv`) has one **scanner** for the whole system and one
**controller** per processor.

**Scanner** (`scanner.sv`). This is an `N`-bit one-hot ring counter, reset to S1,
whose outputs are the scanning signals `scan[i]`. An enable gate lets it step once
per clock only while no GRANT is active, so it stays on a processor for as long as
that processor holds the bus. The order of service is set only by the counter. A
different pattern generator that keeps `scan` one-hot would give a different
priority rule without touching the controllers.

**Controller** (`arb_controller.sv`). It holds two flip-flops:

* the *Request* flip-flop: set by a rising edge of REQUEST, cleared one clock after
  GRANT. Its inverted output is WAIT.
* the *Grant* flip-flop: set when the scanning signal is on this processor and the
  Request flip-flop is set, cleared by M1. Its inverted output is GRANT.

It takes a *rising edge* of REQUEST, so a REQUEST held high for a long time is
counted once. A grant can't start while M1 is low.

### How this differs from the original circuit

The original circuit is a handful of TTL parts. Its Request flip-flop is clocked by
REQUEST itself, its Grant flip-flop by the scanning signal, its clears are
asynchronous, and the ring counter's clock is gated. This RTL keeps the same
flip-flops and the same cause and effect. It makes them synchronous to the CPU clock:

* REQUEST is edge-detected on the clock, and the Grant flip-flop samples the scanning
  signal on the clock.
* The clears are synchronous. A clear wins over a set in the same clock.
* The gated clock becomes a clock enable. The original grant flip-flop reacts within
  the clock period in which the scanning signal arrives, and so stops the counter in
  time. A registered grant is one clock later, so each controller also reports the
  grant it is *about to take* (`grant_next`), and the scanner's enable looks at that
  too. Without it the counter would step off the processor it has just granted.

Reset is asynchronous and active low (`rst_n`). Verilator reports `SYNCASYNCNET`
because the assertions use `rst_n` synchronously in `disable iff`. This is expected
and harmless.

## Shared bus and shared memory

Each processor reaches the shared memory through a **bus interface**
(`bus_interface.sv`) that only GRANT opens. Instead of tri-state buffers, the
interface ANDs its address, data and strobes with GRANT. The shared bus
(`smmp_system.sv`) is the OR of all interfaces, which is correct because only one
GRANT is active. The processor's active-low read and write strobes become active-high
shared strobes, so an idle bus (all zeros) means "no access". Read data goes back
only to the granted processor.

The **shared memory** (`shared_memory.sv`) is a byte-wide RAM of `2**AW` bytes,
4 KiB by default. It is cleared at start-up, writes on the clock edge while the
shared write strobe is high, and registers its read data every clock. The grant comes
two clocks before T3 and the processor holds its address through the whole cycle, so
the read data is always valid when it is taken. A write is repeated on each clock of
the grant with the same byte, which is harmless.

The processor-side types are in `smmp_pkg.sv`: `lbus_t` (16-bit address, data byte,
`rd_n`, `wr_n`) and `sbus_t` (the shared bus).

## Front-end communication subsystem

`frontend_system.sv` is the same scheme with three processors: a host interface unit
(HIU, port 0) and two remote link units (RLU-1 for terminals 1-16 on port 1, RLU-2
for terminals 17-32 on port 2). Each of the 32 remote terminals collects 64 sensor
readings of 8 bits. The RLUs poll their terminals over serial lines and store the
samples in the shared memory. The HIU groups the samples of all terminals into a
block and sends it to the host over a parallel bus.

The whole subsystem apart from the shared part is software and external equipment.
The module gives each unit its arbiter and bus signals under its own name. The
default 4 KiB holds one full poll twice: 2048 bytes of raw samples and a 2048-byte
grouped block. `tb_frontend_system` runs exactly that round. Both RLUs write at once
while the HIU polls, then the HIU regroups the samples sensor by sensor and reads the
block back.

## Triple-redundant trolley controller

`tmr_controller.sv` uses three identical boards, A, B and C. They run identical
software and swap results through a single **global memory** on the same arbiter (a
three-port `smmp_system`). Each board produces step-motor commands. A **3:1
multiplexer** (`tmr_mux.sv`) passes one healthy board's commands to the motor
drivers, and **channel select logic** (`tmr_channel_select.sv`) decides which. The
memory, arbiter and multiplexer are single, not triplicated.

The channel select logic has six fault-flag inputs, two per board: AF1, AF2, BF1,
BF2, CF1, CF2. The flags are paired as (AF2, BF1), (AF1, CF2) and (BF2, CF1). Each
pair involves exactly two boards, so this design reads a pair as a **link**: A-B, A-C
and B-C. It reads each flag as "this board disagrees with that neighbour":

| flag | raised by | about |
|------|-----------|-------|
| AF1  | A         | C     |
| AF2  | A         | B     |
| BF1  | B         | A     |
| BF2  | B         | C     |
| CF1  | C         | B     |
| CF2  | C         | A     |

A link is bad if either of its two flags is set. A board is **faulty** when both of
its links are bad, which means the other two outvote it. The output is A's commands
unless A is faulty, otherwise B's. Consequences:

* with three boards, any single faulty board is masked;
* a removed board (flagged by both others) leaves a two-board system that keeps
  running;
* a disagreement between the two remaining boards marks every board faulty. Then
  `none_healthy` rises and the multiplexer drives zero, so the fault is *detected*
  but not masked;
* clearing the flags (a repaired board reinstalled) goes back to A at once. No state
  is kept.

C is chosen only if A and B are both faulty, and under this rule that cannot happen
without C being faulty too. The select rule, the meaning of the flags and the 8-bit
command width (four phase lines for each of two step motors) are this design's own
choices. The flag names and their pairing come from the original drawing.

The voting itself, the retry of transient faults and the removal of a board are
software on the boards. The testbenches model that software: each board writes its
command into the global memory, reads the other two and raises its flags.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `N`       | `scanner`, `arbiter`, `smmp_system` | 4 | processors. The original comparison also quotes the method with 6. Any `N >= 2` works, and `tb_scanner` runs 6. |
| `AW`      | `shared_memory`, systems, top | 12 | shared memory of `2**AW` bytes (4 KiB). This design's choice. |
| `CMD_W`   | `tmr_mux`, `tmr_controller`, top | 8 | width of the motor command bus. This design's choice. |

The data bus is 8 bits and the local address 16 bits, as on a Z-80. Only the low `AW`
address bits reach the shared memory. Decoding which local addresses are "shared",
which generates REQUEST, is left to the processor board.

## Top level

`smmp_top.sv` puts the three systems side by side. They share only clock and reset:

* `main_*`: the four-processor system;
* `fe_*`: the front end (index 0 HIU, 1 RLU-1, 2 RLU-2);
* `tmr_*`: the redundant controller (index 0 A, 1 B, 2 C).

Every processor, peripheral and motor connects through these ports.

## Not in the RTL

* the processors (Z-80, and the HIU/RLU/TMR boards), their local RAM/ROM and
  peripheral chips;
* the host computer and its parallel I/O, modems, serial (SDLC) links, remote
  terminals and their converters;
* the trolley's converters, actuator drivers, motors and optical sensors;
* all software: polling, validity checks, grouping, voting, retries.

## Simulating

Each testbench is self-checking, prints `TB_RESULT checks=<n> failures=<m>` and ends
with `$finish`. Each has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/smmp_pkg.sv tb/tb_smmp_top.sv \
          --top-module tb_smmp_top
./obj_dir/Vtb_smmp_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_arb_controller` | the flip-flop sequence clock by clock: WAIT, GRANT, the one-clock delay, M1, a held REQUEST, no grant during M1 |
| `tb_scanner` | ring stepping, freezing on a grant, wrap-round, for N = 4 and 6, against a reference counter |
| `tb_arbiter` | exact wait states without contention, the 6-clock round-robin rhythm under saturation, fairness, the wait bound under random traffic |
| `tb_bus_interface`, `tb_shared_memory`, `tb_tmr_mux` | random stimulus against reference values |
| `tb_tmr_channel_select` | all 64 flag combinations against a vote-counting reference |
| `tb_smmp_system` | mailbox transfer and 20 000 clocks of colliding reads and writes from four processors against a reference memory; bus isolation |
| `tb_frontend_system` | one full polling round (2048 samples in, grouped, read out) |
| `tb_tmr_controller` | six control rounds: A fails, is removed, B fails in the two-board state, A returns, C fails |
| `tb_smmp_top` | all three systems at once at default parameters. It counts that each mechanism happens: waiting behind another grant, scanner stop and wrap, release by M1, shared reads and writes, mailbox transfer, TMR switch-over, two-board state, detection and reinstatement |

`tb/cpu_model.sv` is the processor bus-cycle model that the system testbenches
share. The whole set runs in well under a second.
