# PicoBlaze processor arrays: mailbox tiles and a shared bus

This is the interconnect for a multiprocessor built from many small 8-bit
PicoBlaze soft cores on one FPGA. A PicoBlaze has no memory bus. It reaches
the outside world only through an I/O port bus: an 8-bit port number, a byte
out with a write strobe, and a byte in with a read strobe. So processors
must talk to each other through hardware hung on that bus. Two ways are
built here:

* **Mailboxes.** Every link between two processors is a small FIFO. The
  sender writes into the FIFO and the receiver pops it. Each side tests the
  FIFO's full or empty flag first, so neither has to run in step with the
  other. A *tile* wraps one processor with four input FIFOs and four output
  latches. Tiles are wired into a nearest-neighbour grid. A 4-tap FIR
  filter runs on 14 such tiles.
* **Shared memory.** Four processors reach one RAM over a common
  address/data bus. A round-robin arbiter gives out the bus one processor at
  a time, and no processor waits for more than three others.

Both schemes, plus two small bench set-ups that exercise the FIFOs, sit side
by side in the top module `mp_top`.

The processor cores and their program ROMs are **not** part of this RTL.
Each attachment point exposes a processor's I/O bus as ports, so that a
PicoBlaze core (or any other 8-bit core with the same bus) can be connected
there. In simulation, a behavioural model of the processor runs the
programs: `tb/pb_model.sv`.

## The processor bus everything hangs on

`mc_pkg::pb_io_t` bundles the processor-driven half of the bus:
`port_id[7:0]`, `out_port[7:0]`, `write_strobe` and `read_strobe`. The
fabric returns `in_port[7:0]`.

Every instruction takes two clock cycles:

* **OUTPUT:** `port_id` and `out_port` are valid for both cycles.
  `write_strobe` is high in the second cycle. The fabric acts at the rising
  edge that ends that cycle.
* **INPUT:** `port_id` is valid for both cycles. `read_strobe` is high in
  the second cycle. The processor captures `in_port` at the edge that ends
  the second cycle. A FIFO popped by that strobe advances at the same edge.
  The processor therefore sees the old head and removes it in one
  instruction.

Because `port_id` is stable a full cycle before `in_port` is sampled, a
synchronous RAM with a registered output can also be read by a single
INPUT. `shared_mem` relies on this.

## The four-FIFO tile (`pb_wrapper`)

This is the core of the mailbox scheme, and the part most easily wired
wrongly. Each tile has four incoming links, each with its own 16-byte FIFO,
and four outgoing links, each with a byte latch and a strobe.

| processor sees | port | meaning |
|---|---|---|
| INPUT | 0, 1, 2, 3 | head of the west, south, diagonal, east FIFO; **pops it** |
| INPUT | 4, 5, 6, 7 | `{000000, full, empty}` of those FIFOs |
| INPUT | 8, 9, 10, 11 | status bytes wired in from neighbouring tiles (`status_in`) |
| INPUT | 12 to 15 | zero (decode uses `port_id[3:0]` only) |
| OUTPUT | `port_id[1:0]` = 0, 1, 2, 3 | load the **west, east, diagonal, south** output latch |

The input side and the output side are **ordered differently**. Inputs run
W, S, D, E, and outputs run W, E, D, S. The package names both orders
(`in_dir_e`, `out_dir_e`) so that wiring code says which one it means.

How a byte moves:

* An OUTPUT loads the chosen latch (`dout`) and, at the same edge, raises
  that link's `ws_out` for one cycle.
* The receiving tile uses `ws_out` as the write enable of its FIFO. Data
  and strobe therefore arrive together, and the byte is queued at the next
  edge.
* Each tile also drives out its own four FIFO flag bytes (`status`). A
  sender that is wired to them can test "full" on ports 8 to 11 before it
  writes.
* Only reads of ports 0 to 3 pop a FIFO. Polling flags or status does not.

The FIFO (`fifo`) is a ring of registers with read and write pointers. Its
full and empty flags are registers. Its head is combinational (show-ahead).
A write to a full FIFO is dropped unless a read happens in the same cycle.
The depth is 2\*\*`FIFO_ADDR_W` = 16.

## The FIR filter on 14 tiles (`fir_array`)

The filter is Y[i] = Σ A[j]·U[i−j] for i = 0..3, with coefficients A0..A3 =
2, 1, 3, 2. Four source tiles U0 to U3 each stream samples of one input.
Ten identical multiply-accumulate tiles P1 to P10 sit on a triangle:

```
row 0: U0
row 1: P1(A3)  U1
row 2: P2(A2)  P3   U2
row 3: P4(A1)  P5   P6   U3
row 4: P7(A0)  P8   P9   P10
        Y0     Y1   Y2   Y3
```

Each P tile waits until its south, east and diagonal FIFOs all hold a byte.
It then forms `diag_out = diag_in + south_in * east_in` (8 bits, modulo
256) and forwards south_in to the south and east_in to the east. So:

* input samples move down the columns;
* coefficients move east along the rows;
* partial sums move south-east.

The diagonal outputs of the bottom row are Y0 to Y3. The left column has no
western neighbour. Its coefficient and a zero partial sum are constants,
written into the tile's east and diagonal FIFOs by the same strobe that
delivers its south sample, so the three FIFOs fill together.

The array is entirely data-driven. No tile knows the schedule; the FIFO
flags alone order the computation. With U0 = 1, 2, 3, 4, 3, output Y0 is
2, 4, 6, 8, 6. `mp_top` shows Y2 on the `led` port.

## The counting tiles (`count_array`)

Five tiles check the FIFO, flag and strobe wiring. Four senders each feed
one input FIFO of a destination tile, PB4:

| sender | first number | output latch | PB4 FIFO | full flag on sender port |
|---|---|---|---|---|
| PB5 | 1 | west | west | 08 |
| PB2 | 2 | south | south | 09 |
| PB1 | 3 | diagonal | diagonal | 0A |
| PB3 | 4 | east | east | 0B |

All senders step by 4. PB4 reads west, south, diagonal, east in turn and
writes each byte to its west latch (`cnt_out`), so the output is 1, 2,
3, .... The flags of each PB4 FIFO are wired back to the sender that fills
it. A sender that outruns PB4 therefore waits instead of overwriting.

## The two-processor mailbox (`fifo_link`)

This is the smallest form of the idea: one FIFO between a producer and a
consumer.

* The producer's write strobe writes the FIFO.
* The consumer's reads of port 02 pop it.
* Both read the flags on port 01.
* The producer can also read 8 switches on port 02.
* The consumer reads a button on port 04 and writes an LED register on
  port 06.

In the bench experiment, the producer sends 0, 1, 2, ... and stalls when
the FIFO is full. While the button is held, the consumer moves bytes to the
LEDs.

The consumer's read strobe is gated with its FIFO port here. The
consumer's program polls the flags and the button with INPUTs too, so an
ungated read strobe would throw away one byte per poll.

## Shared memory and the round-robin arbiter

`shm_system` connects four processors to one memory:

```
processor i ──► bus_port i ──req──►  rr_arbiter ──grant──► bus_port i
                    │  (address, data, write enable: zero unless granted)
                    └──────── OR of all ports ───► shared_mem ──► data back to all ports
```

Port map (`bus_port`):

| port | direction | meaning |
|---|---|---|
| 0x00 | OUTPUT | bit 0 sets or clears the bus request |
| 0x00 | INPUT | reads `{0000000, grant}` |
| 0x80 to 0xFF | OUTPUT / INPUT | write or read shared byte `port_id[6:0]` |

A client program requests the bus, polls until it sees its grant, does its
memory accesses, and clears its request. Clearing the request produces a
one-cycle `ack` that ends the bus tenure.

The original used tri-state buffers onto a shared bus. Here each port
drives zeros unless granted, and the buses are the OR of all ports. The
behaviour is the same and the logic stays inside the FPGA fabric. The
memory is a 128-byte synchronous RAM (`shared_mem`), read-first.

**The arbiter (`rr_arbiter`)** is built from a token ring:

* A one-hot 4-bit ring counter holds the token. Token bit k enables
  priority block k.
* Each `priority_logic` block is a fixed-priority grant in which `in[0]`
  wins. Block k sees the requests rotated so that master k comes first,
  then k+1, and so on.
* One OR gate per master collects its grant from whichever block is
  enabled.
* `ack` goes through a D flip-flop. The delayed ack rotates the token one
  place left (0001 → 0010 → 0100 → 1000 → 0001).

As a result, the token holder wins if it asks, and an idle slot goes to the
next requester round the ring.

Two rules are added to that structure. Without them, fairness fails in
cycle-level simulation:

* **Grant hold.** A master keeps its grant for as long as its request stays
  high. Otherwise a request that arrives mid-tenure could take the bus from
  a processor in the middle of a read-modify-write.
* **Arbitration cycle.** No new grant is made in the cycle of `ack` or the
  cycle after, while the token moves. Every grant is then decided with the
  token already advanced.

With both rules, under full load the grants go strictly 0, 1, 2, 3, 0, ...,
and a waiting master is served within M−1 tenures of others.
`bus_port` computes `ack` from the previous cycle's grant. This avoids a
combinational loop through the arbiter; a processor only clears its request
after reading its grant, so the two always agree.

## Clocks and reset

`clkdiv` is a free-running counter on the board clock:

* bit 17 is `clk190` (190.7 Hz from 50 MHz);
* bit 19 is `clk48` (47.7 Hz).

In `mp_top`, `clk190` (brought out as `fir_clk`) clocks the FIR and counting
tiles, slow enough to watch results on LEDs. The processors attached to
those tiles must run on `fir_clk` too. `shm_system` and `fifo_link` run on
the board clock.

`rst` is asynchronous and active high, and is applied everywhere. It
empties all FIFOs, clears requests and puts the arbiter token on master 0.
Lower `CLK190_BIT` to make the array clock faster.

## How far to trust it, and where it departs from the original

These parts follow the original design:

* the tile port map;
* the FIFO-per-input structure and strobe forwarding;
* the FIR connections and coefficients;
* the counting-experiment wiring and start values;
* the two-processor link;
* the arbiter's token-ring structure.

These are this design's own choices, and each is explained in the opening
comment of its file:

* FIFO depth 16 (the bench experiment drains 16 bytes per button press);
* show-ahead FIFO reads;
* the registered outgoing strobe;
* the consumer's gated read strobe;
* the grant hold and arbitration cycle;
* the AND-OR bus in place of tri-states;
* the 128-byte memory, its read timing and the request/grant/memory port
  numbers;
* the 50 MHz clock assumption behind the divider taps;
* which clock each subsystem uses.

Two more points:

* **Counting start values.** The original text describes the senders as
  counting from 1, 2, 3 and 4 in sender order. Its programs instead start
  PB1 at 3 and PB5 at 1, which is what makes the destination print 1, 2,
  3, ... in its W, S, D, E reading order. The programs are followed here.
* **Verification scope.** Everything is verified against a bus-level model
  of the processor, not a real PicoBlaze core. The model reproduces the
  2-cycle instruction timing, the strobe timing and the original programs'
  polling loops and instruction counts. It is not cycle-identical to the
  real core's internal behaviour, and the multiply in the FIR stage is done
  directly with the shift-add loop's timing.

## Files

| file | what it is |
|---|---|
| `rtl/mc_pkg.sv` | bus struct, direction enums, port numbers |
| `rtl/fifo.sv` | circular-queue FIFO |
| `rtl/pb_wrapper.sv` | four-FIFO tile |
| `rtl/fir_array.sv` | 14-tile FIR filter |
| `rtl/count_array.sv` | 5-tile counting set-up |
| `rtl/fifo_link.sv` | two processors, one FIFO |
| `rtl/priority_logic.sv`, `rtl/rr_arbiter.sv` | round-robin bus arbiter |
| `rtl/bus_port.sv`, `rtl/shared_mem.sv`, `rtl/shm_system.sv` | shared-memory system |
| `rtl/clkdiv.sv` | clock divider |
| `rtl/mp_top.sv` | top level |
| `tb/pb_model.sv` | behavioural processor model and its programs (simulation only) |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_mp_top_full.sv` | whole design at default parameters |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each has a watchdog that counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/mc_pkg.sv tb/tb_fir_array.sv \
  --top-module tb_fir_array -Mdir obj && ./obj/Vtb_fir_array
```

Replace `tb_fir_array` with any testbench name.

| testbench | what it shows |
|---|---|
| `tb_fifo` | random traffic against a queue model; capacity; no write when full; no read when empty |
| `tb_pb_wrapper` | every port of the tile map; pop only on data ports; latch order and strobe timing |
| `tb_fir_array` | 20 filter outputs against the equation, including 8-bit wrap; tiles stall on empty FIFOs |
| `tb_count_array` | the published 1..20 run; a 160-number run that fills the FIFOs and makes senders wait on their flags |
| `tb_fifo_link` | 127 bytes in order through bursts of button presses; FIFO reports full after exactly 16 bytes |
| `tb_priority_logic` | all input combinations |
| `tb_rr_arbiter` | cycle-by-cycle reference model; wait bound; ring order under full load |
| `tb_bus_port`, `tb_shared_mem` | port map and gating; RAM against an array model |
| `tb_shm_system` | 4 clients increment a shared counter (exact only if accesses never overlap); mailboxes; ring order |
| `tb_clkdiv` | divided periods and duty cycle at the default taps |
| `tb_mp_top` | everything at once with the array clock at board clock/4; counts every mechanism (clock division, empty-FIFO waits, full-FIFO stall, filter and counting outputs, bus contention, grant hand-over, token laps) and fails if any never happened |
| `tb_mp_top_full` | the same at the default divider (2\*\*18 board clocks per array clock): about 4.2e8 board cycles, about 9 minutes in Verilator |

To attach real cores, connect each core's `port_id`, `out_port`,
`write_strobe` and `read_strobe` to the matching `pb_io_t` port, and its
`in_port` to the matching `*_in_port`. Clock the cores of the FIR and
counting tiles from `fir_clk`.
