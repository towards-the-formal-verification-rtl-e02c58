# Time-triggered serial bus interface for automotive ECUs

Several electronic control units (ECUs), each with its own crystal, share one
serial bus.  Their clocks are nominally equal but drift by up to 0.15 %, and a
receiver samples a signal that was launched by a different clock, so setup and
hold times are violated now and then.  This RTL implements a FlexRay-like bus
interface that still moves messages reliably:

* every frame bit is held on the bus for **8 clock cycles**;
* the receiver synchronises the line with two flip-flops, filters it with a
  **majority vote over 5 samples**, and samples the filtered value once per bit
  at a **strobe** placed 4 cycles after the last expected falling edge;
* the frame format guarantees such a falling edge at least every 11 bits, so
  the strobe is re-centred (**low-level clock synchronisation**) long before
  drift can move it out of the bit;
* on top of this, a **time-triggered schedule** (bus rounds divided into slots)
  decides who sends when, and the end of each round re-aligns the ECU timers
  (**high-level clock synchronisation**).

Fault tolerance (redundant channels, membership, fault-tolerant clock
synchronisation) is deliberately absent; the design assumes all ECUs work.

## Frame format

A message of `L` bytes `m[0..L-1]` is sent as the frame

```
f(m) = TSS  FSS  BSS m[0]  BSS m[1] ... BSS m[L-1]  FES
TSS = 0   FSS = 1   BSS = 1,0   FES = 0,1
```

`4 + 10*L` frame bits, each driven for 8 cycles, so a frame occupies
`8*(4 + 10*L)` sender cycles.  Bytes go most significant bit first.  The idle
bus is 1 (open collector, nobody driving), so the frame starts with a 1→0 edge
(TSS), and every byte starts with BSS, whose 1→0 edge is again at a known
place.

## Receiver: how a bit is found

```
bus ─► R ─► R^ ─► sh[0..3] ─► majority(R^,sh[0..3]) = v ─► automaton
                                              ▲                 │
                              strobe (cnt==4) │   sync          │
                     3-bit counter cnt ◄──────┴─────────────────┘
```

* `rx_sync`: `R` may go metastable when the bus changes near a clock edge;
  `R^` re-registers it one cycle later and is treated as always clean.
* `maj_voter`: `v` is 1 when at least three of `R^`, `sh[0..3]` are 1.  A
  frame bit lasts 8 cycles and at most one sample at each boundary can be
  wrong, so `v` shows every bit correctly for at least 7 consecutive cycles.
* `strobe_gen`: a counter runs modulo 8; `strobe = (cnt == 4)`.  `sync`
  forces the count to 0 *in the same cycle*, so the strobe comes exactly 4
  cycles after a sync and every 8 cycles after that, in the middle of the
  7-cycle window.
* `rx_fsm`: the automaton advances only on strobes:

  | state | bit sampled here | on 1 | on 0 |
  |---|---|---|---|
  | idle | TSS | stay | FSS |
  | FSS  | FSS | BSS1 | error → idle |
  | BSS1 | BSS[1] or FES[1] | BSS0 | FES0 |
  | BSS0 | BSS[0] | error → idle | b[7] |
  | b[7]..b[0] | data bits | next bit; after b[0]: BSS1 | same |
  | FES0 | FES[0] | idle, `frame_done` | error → idle |

  `sync = v(previous cycle) & !v & (state == idle || state == BSS0)`: a
  falling edge re-centres the strobe only where the format puts one, at the
  start of TSS (idle) and at the start of BSS[0] (state BSS0, entered when
  BSS[1] has been sampled).  Between two syncs there are at most 11 bits,
  88 cycles, i.e. at 0.15 % drift about 0.13 cycles of slip against a margin
  of about one cycle on each side of the strobe.

A bus edge reaches `v` 3 to 4 cycles after it appears; the complete frame is
in the receiver at most `(1+δ)·L + 8` receiver cycles after the sender
started (`L` frame length in cycles), plus the two register stages at the
start and at `frame_done`.

* `frame_recon`: the frame register f^.  Every strobe from the TSS sample
  until the automaton is idle again shifts `v` in at bit 0, so after a frame
  the low `fhat_len = 4 + 10ℓ` bits hold f(m), first bus bit highest.  The
  TSS sample clears the old frame.  The width, 2564 bits, fits the longest
  frame the 64-word buffers allow.

The processor does not read f^; the tests do, and a synthesis of the whole
cluster removes the register because nothing in the circuit uses it.  As
the automaton walks the data bits it also collects each byte and writes it
straight into the receive buffer at its index in the frame (`byte_valid`,
`byte_idx`).  After a framing error the automaton returns to idle and hunts
for a new TSS; the bytes it may collect from the rest of the broken frame
are not marked invalid, but the error sets a status flag.

## Sender

`serial_tx` walks the same frame positions and repeats every bit for 8
cycles.  The output flip-flop `bus_o` is only loaded when the bit value
changes (the clock-enable form of "only clock the flip-flop on a new value",
which avoids spikes when the same bit is repeated), and `bus_en`, the
open-collector driver enable, is high exactly for the `8*(4+10*L)` cycles of
the frame.  `done` marks the last cycle of the last copy of FES[0].

## Bus rounds, slots and timers

Each ECU has a timer `ti` that advances once every 8 cycles (one bit time).
A bus round has `ns` slots; slot `s` is described by configuration registers

| register | meaning |
|---|---|
| `ecu(s)` | number of the ECU that sends in slot `s` |
| `st(s)` | timer value at which it starts the frame |
| `mlen(s)` | message length in bytes (the first `mlen(s)` bytes of its send buffer) |
| `wakeup(s)` | timer value at which every ECU raises its wakeup interrupt |

`slot_ctrl` does, for the current slot `s`:

1. at `ti == st(s)`: if `ecu(s) == u` (this ECU's number) start the sender;
2. at `ti == wakeup(s)`: raise the interrupt (the processor may now use the
   data port until `st(s+1)`), force the receiver automaton to idle and go to
   slot `s+1`;
3. in the last slot: the sender clears its timer right after driving the last
   copy of FES[0]; every other ECU clears its timer so that `ti = 0` three
   cycles after the strobe that sampled FES[0].  The clear closes the round,
   forces the receiver idle, raises the last slot's interrupt if its wakeup
   time has not been reached, and restarts at slot 0.

The receiver is reset to idle when a slot *begins* (after the previous
slot's wakeup), not at `st(s)`: within a round the ECU timers drift apart by
up to `T·δ + 2` ticks, and a receiver whose timer lags the sender's would
otherwise throw away a frame whose TSS it had already seen.

All ECUs thus restart their timers within a few cycles of each other once per
round.  A schedule should follow these rules (with `l' = 4 + 10*mlen` frame
bits and drift `δ`): `st(s+1) ≥ ⌈(st(s) + l')(1+δ)⌉ + tp` with `tp ≥ 1`, and
`wakeup(s) ≥ ⌈(st(s) + l')(1+δ)⌉ + 3`, so that the receivers are idle when
the processor is woken and frames of adjacent slots are at least 8 cycles
apart.  Because the clock synchronisation restarts the timer right at the end
of the last frame, `st(0)` is the processor's window after the last slot and
should be at least `tp` rather than 0.  The sequencer also needs
`wakeup(s) < st(s+1)`, so `tp ≥ 4`.  While `ns = 0` the sequencer does
nothing and the timer stands at 0, so writing `ns` last starts the first
round; ECUs configured at about the same time start roughly aligned, and the
end of the first round aligns them properly.

## Processor view (`bus_if`)

All ports are 32 bits wide, word addressed:

| address | write | read |
|---|---|---|
| `0x00` data port | `sb[sbp] <= data; sbp++` | `rb[rbp]; rbp++` |
| `0x01` command/status | bit0 `sbp<=0`, bit1 `rbp<=0`, bit2 clear interrupt, bit3 clear error flag | bit0 sending, bit1 receiving, bit2 interrupt pending, bit3 slot bus phase, bit4 framing error seen, 15:8 current slot |
| `0x02` | `u` | `u` |
| `0x03` | `ns` | `ns` |
| `0x40+s`, `0x60+s`, `0x80+s`, `0xA0+s` | `ecu(s)`, `st(s)`, `mlen(s)`, `wakeup(s)` | 0 |

Read data appears with `io_rvalid` one cycle after `io_req.re`.  Buffers are
64 words; byte `i` of a message is in word `i/4`, bits `8*(i%4)+:8`.  In every
slot every ECU, the sender included, stores the frame in its receive buffer
from word 0 upward.  An assertion flags data-port use while a frame is being
sent or received; the schedule (wakeup times) is what keeps the processor
away from the port during frames.

## Hierarchy

```
flexray_cluster            N_ECU bus interfaces, one clock each, one bus line
├── bus_if  (×N_ECU)        one ECU's interface, I/O ports
│   ├── ecu_timer           ti, one tick per 8 cycles
│   ├── sched_regs          u, ns, ecu/st/mlen/wakeup per slot
│   ├── slot_ctrl           slot sequencing, interrupt, timer clear
│   ├── serial_tx           frame builder, 8x repetition, driver enable
│   ├── serial_rx           rx_sync → maj_voter → rx_fsm, strobe_gen,
│   │                       frame_recon (frame register f^)
│   └── msg_buffer (×2)     send buffer sb, receive buffer rb
└── flexray_bus             wired-AND of the open-collector drivers
```

`fr_pkg` holds the frame-position enum, the register map, the I/O request
struct `io_req_t` and the slot entry `slot_cfg_t`.

Defaults: `N_ECU = 4`, `SB_WORDS = 64`, `NS_MAX = 16` slots, 16-bit timer.
The processors, their kernel and the applications are not part of the RTL:
`flexray_cluster` brings each ECU's I/O request, read data and interrupt out
as ports.

## Where the design makes its own choices

Fixed by the protocol: the frame format, 8-fold bit repetition, two-stage
synchroniser, 4-entry history with majority vote, 3-bit strobe counter with
strobe at 4, sync at the TSS and BSS[0] edges, the frame register that
collects `v` at every strobe, timer tick every 8 cycles,
slot start/wakeup by timer compare, timer reset by the last frame (sender
after FES[0], receivers 3 cycles after sampling it), data port with
auto-incrementing pointers, 32-bit ports.

Chosen here: bit order within a byte (MSB first), buffer size, number of
slots, ECUs and timer width, the register map and command/status bits, the
one-cycle read latency, framing-error handling, clearing the frame register at each TSS,
moving the bytes into the receive buffer straight from the automaton, the sequencer's behaviour while unconfigured and at
the end of a round, the moment the receiver is forced idle (see above), and the reading that the "sync" state of the
automaton is the one in which BSS[0] is expected.  Propagation delay and the
electrical bus are not modelled: the bus is a logic wired-AND.

## Simulation

Every block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`.  Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fr_pkg.sv tb/tb_flexray_cluster.sv --top-module tb_flexray_cluster
./obj_dir/Vtb_flexray_cluster
```

| testbench | what it shows |
|---|---|
| `tb_flexray_cluster` | 4 ECUs at default size, clocks 0.15 % apart, 3 rounds of a 4-slot schedule (5, 12, 1, 16-byte messages): every ECU reads every message correctly through its data port; frame duration, receive latency bound, sender and receiver idle once the wakeup interrupt shows, single driver on the bus, timers within a tick after each round and, after the first round, within T·δ + 2 ticks of each other at every tick (T the timer value, δ = 0.15 %); counts TSS/BSS syncs, drift corrections, timer clears, interrupts, forced idles, data-port traffic, and frames rebuilt in the receivers' frame registers with the right length and framing bits |
| `tb_cluster_tight_schedule` | the closed-form schedule for equal lengths (8 slots of 8 bytes, `tp = 4`, the tightest the sequencer allows), 3 rounds: every stored byte on every ECU, frame gaps, single driver |
| `tb_bus_if` | one interface plus a second sender on a shared line: configuration, status, interrupt, loop-back of its own frame, reception of the other frame, pointer commands, timer clear 3 cycles after the FES[0] strobe |
| `tb_serial_rx` | sender and receiver in two clock domains (±0.15 %), random propagation delay below half a cycle, a 2 ns window of random line values after every transition (to stand in for setup and hold violations), 40 random frames of up to 60 bytes; after each frame the frame register must equal f(m) bit for bit |
| `tb_frame_recon` | the frame register against a model under random strobes, samples and idle phases, including restarts and overflow of a narrow instance |
| `tb_serial_tx`, `tb_rx_fsm`, `tb_strobe_gen`, `tb_maj_voter`, `tb_rx_sync` | the sender's exact bus pattern; the automaton with clean samples, error and abort cases; the strobe placement; the vote; the synchroniser |
| `tb_slot_ctrl`, `tb_ecu_timer`, `tb_sched_regs`, `tb_msg_buffer`, `tb_flexray_bus` | slot events and round end for receiver and sender roles; timer and prescaler; register map; byte-enable writes; wired-AND |

The full cluster test runs in well under a second.  The tests use
`$urandom` with the simulator's default seed.

## Limits

* Metastability itself is not modelled.  The receiver test instead makes
  the line random for 2 ns after each transition, so that some samples at
  bit boundaries are wrong, and the clock offsets and drift in the tests
  move the sample points across those boundaries.
* No fault tolerance: a lost last frame leaves the ECUs that missed it waiting
  for the clock synchronisation in the last slot.
* The timer compare uses equality; a schedule with times that the timer
  never passes through stalls the sequencer.
