# Traffic-driven clock gating for a multi-threaded network processor

A network processor is sized for its peak packet rate. Real links usually run
far below that peak, and most of the time the processing elements (PEs) just
spin, waiting for packets. This design measures how much processing capacity
is idle and turns off whole PEs to match. When the load rises again, it wakes
them before packets are lost.

The key measurement is the **thread queue**. Every receive thread that has
nothing to do waits in this queue for a packet. If at least one PE's worth of
threads (four) keeps waiting for most of a time window, the processor has a
spare PE, so one PE is switched off. If the receive buffer fills up, one PE is
switched back on at once.

The RTL models a six-PE processor in the style of an IXP1200:

- four receive PEs and two transmit PEs, each running four hardware threads;
- 16 input ports;
- packets cut into 64-byte mpackets.

Around the PEs sit the power-management logic, a per-PE clock gate, and the
packet path the policy has to observe.

```
 in_pkt ──► rfifo (16 + 1 extra) ──► port_scheduler ──grant──► receive PEs 0..3 ──► tx_queue ──► transmit PEs 4,5 ──► out_pkt
               │ buf_pressure          ▲ head thread                 │ rcv request
               │                       └──── thread_queue ◄──────────┘
               │                                 │ l >= 4
               ▼                                 ▼
        shutdown_control ◄── th ── threshold_unit     idle_thread_counter ◄─ period_timer
               │ on/off command
               ▼
        pe_onoff_ctrl ──off flag──► PE threads ──pe_idle──► pe_onoff_ctrl ──clk_en──► clock_gate ──► PE clock
```

## The decision: counter, window and threshold

- **`period_timer`** pulses `elapse` once every `PERIOD` cycles. The default
  is 1,000,000 cycles, about 4.3 ms at 232 MHz.
- **`idle_thread_counter`** is a 20-bit counter. It adds one in every cycle in
  which the thread-queue length `l` is at least `T` = 4 (threads per PE).
  - Its output `c_period` already includes the current cycle, so on the window's
    last cycle the decision sees the full count.
  - The timer pulse clears it.
  - It saturates at its maximum instead of wrapping.
- **`threshold_unit`** holds the threshold `th`, which starts at 500,000 cycles
  (half the window).
  - In static mode (`dynamic_th_en` = 0) `th` never changes.
  - In dynamic mode, at each window end:
    - if the window saw buffer pressure, `th` goes up by `DELTA` (10,000, 2% of
      the starting value), which makes turning PEs off harder;
    - otherwise `th` goes down by `DELTA`, which makes turning PEs off easier.
  - `th` is clamped to `[TH_MIN, TH_MAX]`.
- **`shutdown_control`** issues one command per event:
  - **Off.** At a window end it issues `CMD_OFF` if all three hold:
    - `C > th`;
    - no buffer pressure was seen during the window;
    - the processor is not already at its minimum of 1+1 PEs.
  - **On.** It issues `CMD_ON` as soon as `buf_pressure` is high and some PE is
    off. It then waits `WAKE_HOLDOFF` = 50 cycles before it may wake another
    PE, so successive wakes are exactly 50 cycles apart. This gap is the time a
    woken PE needs before its first thread is back in the queue.

  Wake has priority over an off decision in the same cycle.

The comparison is strict (`C > th`). The counting condition is `l >= T`:
exactly four waiting threads already means a whole PE is surplus.

## Interface controller: dynamic port mapping

Threads are not tied to ports. Any idle receive thread can take a packet from
any port, so when a PE disappears the remaining threads cover all 16 ports
without any reconfiguration. The `interface_controller` contains four blocks.

**`rfifo`** is the receive buffer.
- It has 16 regular mpacket entries plus 1 extra entry.
- Entries stay in arrival order. A read takes the oldest packet of the
  requested port, and the entries behind it close the gap.
- Bit p of `port_rdy_status` is set while a packet from port p is buffered.
- `buf_pressure` is high when the 16 regular entries are full.
- `extra_in_use` is high when the extra entry holds a packet. A packet arriving
  with all 17 entries full is dropped (`in_drop`).
- The extra entry exists for the wake-up time. At the 1 Gbps design rate, fewer
  than 64 bytes arrive in 50 cycles, so one entry covers the gap between
  "buffer full" and the new PE taking packets.

**`rr_arbiter`** picks one of the receive PEs' `rcv_req` requests per cycle,
round-robin, and enqueues that thread.

**`thread_queue`** is a 24-entry FIFO of 5-bit thread IDs (`pe*4 + thread`).
- Its length is the `l` the policy watches.
- `purge_mask` removes every queued thread of a PE whose off flag is set, and
  refuses new pushes from that PE.
- The head is reported as not valid while it belongs to a masked PE.

**`port_scheduler`** scans `port_rdy_status` round-robin, one bit per cycle,
and only while a thread is waiting.
- On a ready port it spends one cycle dequeuing the head thread and reading the
  buffer.
- It then presents `grant_valid`/`grant_tid`/`grant_pkt` for one cycle. This
  output is registered.
- Reaching a port m positions after the pointer costs m scan cycles, plus the
  dequeue cycle, plus the register.
- The scan resumes after the granted port.

## Turning a PE off and on again

`pe_onoff_ctrl` turns commands into per-PE state.

**Which role.**
- Turn-off takes a receive PE while receive PEs outnumber transmit PEs and
  more than one is left. Otherwise it takes a transmit PE while more than one
  is left.
- Turn-on does the reverse: it adds a transmit PE while transmit PEs are fewer
  than receive PEs, otherwise a receive PE.
- The counts therefore walk 4+2 → 3+2 → 2+2 → 2+1 → 1+1 and back up the same
  steps.

**Which PE.** Within a role, the active PE with the lowest ID is turned off,
and the off PE with the lowest ID is turned on.

**Shutdown is gradual.** The off command only sets the PE's off flag. Then:

1. Threads waiting for a packet drop out of the thread queue (purge) and kill
   themselves.
2. A thread that is processing a packet finishes it, pushes it to the outgoing
   queue, sees the flag and kills itself.
3. Transmit threads stop polling and kill themselves.
4. Once all four threads of the PE are killed, the PE raises `pe_idle`. On the
   next cycle `pe_onoff_ctrl` drops that PE's clock enable.

No packet is lost or left half-done by a shutdown.

**Wake-up.** The on command clears the flag and raises the clock enable in the
same cycle. Killed threads restart through their initialisation phase.

`rx_active`/`tx_active` count PEs whose off flag is clear. This is the PE
count the policy works with.

## Clock gate

`clock_gate` produces `gclk = clk & en_lat`. `en_lat` is a latch that is
transparent while `clk` is low. This is the usual integrated clock-gating cell:

- the enable is captured while the clock is low, so a change cannot cut a high
  clock phase short or create a glitch;
- the gated clock starts or stops at the next rising edge after the enable
  changes.

The latch is deliberate. Lint tools will list it as an inferred latch, and it
stands. In a real flow this module is replaced by the library's ICG cell.

The top gives every PE its own gated clock (`gclk[i]`). The PE's threads,
counters and ALU stop completely while it is off. The control logic runs on
the free-running clock.

## The processing element model

`microengine` models the thread behaviour of one PE, not its instruction set.
Each of its four threads is a small state machine:

```
INIT ─► REQ ─► WAIT ─grant─► READY ─► RUN (16 ALU cycles) ─► MEM (MEM_CYCLES) ─► PUSH ─► REQ ...
  ▲                 └─ off flag ─► KILLED ◄─ off flag checked after PUSH
  └──────────────── off flag cleared ───┘
```

- **Coarse-grain multithreading.** Only one thread at a time uses the pipeline
  (the ALU): the lowest-numbered `READY` thread enters `RUN`. A thread leaves
  the pipeline when it starts its long-latency memory wait, and the next ready
  thread takes over.
- **Packet work.** In `RUN` the thread folds the sixteen 32-bit words of its
  mpacket through the ALU into a digest: add for even words, xor for odd words.
  It then waits `MEM_CYCLES` and pushes `{port, digest, data}` into the
  outgoing queue.
  - From grant to push takes `18 + MEM_CYCLES` cycles.
  - `MEM_CYCLES` = 1500 stands for the memory accesses of a forwarding
    application. It is set so that the four receive PEs together handle about
    1.25 Gbps of 64-byte packets at 232 MHz. That is a little above the
    processor's roughly 1 Gbps peak.
- **Transmit threads** poll the outgoing queue, spend `TX_CYCLES` = 300 cycles
  per packet, and then drive `out_valid`/`out_pkt` for one cycle.
- **Start-up.** `THREAD_INIT_CYCLES` = 40. With the enqueue and the port scan,
  a woken PE has a thread in the queue within 50 cycles.

`alu` is a one-cycle combinational 32-bit unit: AND, OR, NOT, XOR, ADD, SUB.

`tx_queue` is a 16-entry outgoing packet FIFO. It has round-robin arbitration
for one push per cycle from the four receive PEs and one pop per cycle for the
two transmit PEs.

## Parameters

All sizes come from `np_pkg` and from parameters of `np_power_top`.

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `NUM_RX_PE` / `NUM_TX_PE` | 4 / 2 | receive / transmit PEs | evaluated configuration |
| `THREADS_PER_PE` (= T) | 4 | hardware threads per PE | evaluated configuration |
| `NUM_PORTS` | 16 | input ports | evaluated configuration |
| `MPKT_BYTES` | 64 | buffer entry size | evaluated configuration |
| `PERIOD` | 1,000,000 | decision window, cycles | evaluated configuration |
| `TH_INIT` | 500,000 | initial threshold | evaluated configuration |
| `TH_DELTA` | 10,000 | dynamic step (2% of `TH_INIT`) | 2% from the method; base is a choice |
| `TH_MIN` / `TH_MAX` | 10,000 / 990,000 | clamps on `th` | choice |
| `TQ_DEPTH` | 24 | thread queue entries | evaluated configuration |
| `RFIFO_DEPTH` / `EXTRA_DEPTH` | 16 / 1 | regular / extra buffer entries | 16 is a choice; 1 extra from the method |
| `TXQ_DEPTH` | 16 | outgoing queue | choice |
| `WAKE_HOLDOFF` | 50 | cycles between wakes | choice, equal to the wake-up time |
| `THREAD_INIT_CYCLES` | 40 | thread start-up | choice (start-up within 50 cycles) |
| `MEM_CYCLES` / `TX_CYCLES` | 1500 / 300 | per-packet work latency | choice, calibrated to about 1 Gbps |

The counter and threshold are 20 bits wide, enough for the 1M-cycle window.
Shorter windows (as in the end-to-end test) need no width change.

## Simulating

Every testbench in `tb/` checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
          --top-module tb_np_power_top rtl/np_pkg.sv tb/tb_np_power_top.sv
./obj_dir/Vtb_np_power_top
```

Substitute any other testbench name. The two-state simulator starts
unreset state at random values. Add `+verilator+rand+reset+2` to the run
command to check that nothing depends on it.

- **`tb_np_power_top`** runs the whole design with a 4,000-cycle window and a
  proportionally scaled threshold. Input traffic is capped at the 1 Gbps design
  rate. The test runs these phases:
  1. line rate;
  2. a long light phase, in which PEs are shed down to 1+1;
  3. a burst, in which the buffer fills and PEs are woken back up through the
     extra entry;
  4. a medium phase;
  5. a drain.

  It checks the following:
  - every packet comes out once, with a correct digest;
  - no packet is dropped while PEs are gated;
  - PE counts only follow the allowed sequence;
  - the threshold moves in both directions;
  - a receive PE stops within the rest of one packet (at most
    `18 + MEM_CYCLES` cycles after the off flag, about 1,370 in practice),
    and a transmit PE stops within one send and sooner than a receive PE.

  It also counts and requires each mechanism at least once:
  - off commands and on commands;
  - clock gating;
  - purge of waiting threads;
  - use of the extra entry;
  - threads killed;
  - pressure-blocked windows.
- **`tb_np_power_full`** runs the top with every parameter at its default
  (1M-cycle window, `th` = 500,000). Its phases are:
  1. one window at high load;
  2. six windows at light load, in which PEs are shed one per window;
  3. a burst that brings them back.

  It takes roughly 20 seconds.
- **`tb_np_power_rates`** runs the whole design at 90, 180, 360 and 480 Mbps
  of random 64-byte traffic.
  - Each rate is run from reset, once with the static and once with the
    dynamic threshold.
  - The window is 20,000 cycles and each run lasts 10 windows.
  - It checks that nothing is lost and that every packet is delivered, and it
    prints a table. A typical run:

  | rate | mean clocked PEs (static / dynamic) | end state |
  |---|---|---|
  | 90 Mbps | 3.0 / 3.0 | 1+1 |
  | 180 Mbps | 3.0 / 3.0 | 1+1 |
  | 360 Mbps | 3.5–4.1 / 3.4–3.5 | between 1+1 and 2+1 |
  | 480 Mbps | 4.3 / 4.3 | 2+2 |

  The mean includes the first windows, when all six PEs are still on; at low
  rates the processor reaches 1+1 after four windows. At 360 Mbps a single
  receive PE is slightly too slow (about 380 cycles per packet against 330
  between packets). The policy then alternates: a quiet window turns the
  second receive PE off, and the rising buffer wakes it again, without loss.
  The dynamic threshold settles lower and keeps fewer PEs on in this
  fluctuating case.
- The other testbenches check one module each against an independent model.
  They include cycle counts wherever timing is defined:
  - the timer period;
  - the scheduler's one-cycle-per-bit scan plus dequeue;
  - the 50-cycle wake spacing;
  - the grant-to-push latency of a thread.

## Where this design departs from the method it implements

- **PE internals.** The five-stage pipeline, control store and register file
  are not built. Packet processing is a fixed-latency stand-in (ALU digest plus
  `MEM_CYCLES`), not a real application. The power policy only sees thread
  behaviour, so it is exercised faithfully, but per-application processing
  times are not.
  With real applications, a receive PE can take tens of thousands of cycles
  to finish its packet and stop. In this model it takes at most about 1,520
  cycles. The 1M-cycle window is sized for the long case.
- **Threshold direction.** The method describes the dynamic threshold both as
  "lowered until buffer-full trouble appears" and as "rising under high
  traffic". This design lowers `th` after a quiet window and raises it after a
  window with pressure, so heavy traffic makes shutdown harder. The 2% step is
  taken of the initial threshold.
- **`l >= T` versus `l > T`.** The method states both. The counter uses
  `l >= T`.
- **Choices of this design.** These are not given by the method:
  - the receive buffer depth (16 + 1);
  - the outgoing queue;
  - the wake hold-off;
  - the exact FSM states;
  - the thread start-up time;
  - the purge of queued threads at shutdown;
  - the saturation of the counter.
- **Clock gate latch.** The gate adds the latch of a standard clock-gating cell
  in front of the AND.
- **Out of scope.** These are outside this RTL: memories (SDRAM, SRAM),
  coprocessors, the internal buses and the I/O bus unit, the clock tree and
  PLL, and leakage power switches. Packets enter and leave through the top's
  ports.
- **Reset.** All state uses an active-low asynchronous reset. After reset all
  six PEs are on.

## Lint messages that remain

Verilator's `-Wall` lint reports three kinds of message. All are expected:

- `SYNCASYNCNET` on `rst_n`. Concurrent assertions use `disable iff (!rst_n)`,
  which reads the asynchronous reset synchronously. The assertions are for
  simulation only and do not change the logic.
- `UNUSEDSIGNAL` on the upper bits of `int` loop indices.
- `UNUSEDPARAM` for `MPKT_WORDS` when the package is linted alone.
