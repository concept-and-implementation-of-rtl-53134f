# FlexRay Message Handler (channel A)

A FlexRay communication controller stores the messages it sends and receives
in a message RAM. Two clients reach that RAM: the host CPU, which writes
messages to send and reads messages received, and the FlexRay protocol
controller, which takes each slot's payload off the RAM or puts it back. Both
work at the same time, so the RAM needs a guard that keeps a buffer from
being read while it is half written. It must also keep the host from
writing past the space a buffer was given.

This RTL is that guard. It is built from three parts:

* The **Frame Processing Unit (FPU)** is the only thing the host talks to.
  It checks each request, keeps its own copy of every buffer's length and
  meters the words the host sends or receives.
* The **Message Handler (MH)** is the only thing that touches the RAM. It
  serves the host side and the protocol side in parallel, one buffer each,
  and locks each buffer while it is in use.
* The **Message RAM** holds up to 64 message buffers in 4096 payload bits,
  with a busy flag per buffer.

Small FIFOs decouple the parts. The IB and OB (input and output buffers) sit
between the FPU and the MH. TBF IN and TBF OUT (the transient buffers) sit
between the MH and the protocol controller.

```
          host CPU                                   protocol controller
   cmd/index/data |  ^ data/flags                 header/cmd |  ^ busy/done/null
                  v  |                                       v  |
              +---------+   cmd/index   +------------------------------+
              |   FPU   |-------------->|       Message Handler        |
              |         |---> IB ------>|  host engine   proto engine  |<--- TBF IN <--- data
              |         |<--- OB <------|      |              |        |---> TBF OUT ---> data
              +---------+               |   port 0        port 1       |
                                        |      +-- Message RAM --+     |
                                        +------------------------------+
```

Everything runs on one clock with one active-low asynchronous reset.
Only channel A is built. Channel B would be a second MH side.

## Host interface and the Frame Processing Unit (`fpu`)

The host drives a 3-bit command, a 6-bit buffer index and a 32-bit data word.
It gets back a 32-bit data word and four flags. All FPU outputs are
registered.

| command | code | accepted in | effect |
|---|---|---|---|
| RESET | 000 | any state | back to IDLE; the MH side is reset too |
| PAUSE | 001 | PASSIVE, ACTIVE | stop the current transfer; the MH holds |
| CONTINUE | 010 | PAUSE | back to PASSIVE (the interrupted message is lost) |
| WR | 011 | PASSIVE | write the payload of buffer `index_in` |
| RD | 100 | PASSIVE | read the payload of buffer `index_in` |
| CONF | 101 | IDLE | configure: count, then one length per buffer |
| DEFAULT_CONF | 110 | IDLE | configure 56 buffers of 72 bits |
| IDLE | 111 | – | nothing |

The states are IDLE, CONF_LENGTH_CHECK, CONF_PAYLOAD_DATA, DEFAULT_CONF,
PASSIVE, ACTIVE_WR, ACTIVE_RD and PAUSE. A configuration is possible only
from IDLE, that is after a reset. A RESET command is the way to configure
again.

**Configuration.** The host sends CONF. On the next clock it drives the
number of buffers it wants on `data_host_in`. The FPU clamps this count to
[32, 64], so 5 becomes 32 and 175 becomes 64. On each of the following clocks
the host drives the payload length, in bits, of buffer 0, 1, 2, … The FPU
stores every length and forwards the count and the lengths through the IB. It
raises `msg_complete_host_out` for one clock after the last length. There is
no handshake during configuration: the FPU takes one word per clock. The MH
drains the IB at the same rate, so the IB never fills. If the host still
drives a non-zero length on the clock `msg_complete_host_out` rises, it is
trying to configure more buffers than are active: `error_host_out` pulses
with it and the word is dropped.

DEFAULT_CONF produces the same word stream without the host: the count 56,
then 56 lengths of 72 bits. 56 × 72 = 4032 bits fits the 4096-bit RAM.

**Write.** WR with an index sends a one-clock MH_WR and the index to the MH.
From the next clock on, every clock in which the IB has room the FPU does
three things:

* it takes `data_host_in`;
* it pushes the word into the IB;
* it raises `write_en_host_out`.

`write_en_host_out` high after a clock edge means "your word was taken;
show the next one". When the IB is full, `write_en_host_out` stays low and
the host holds its word. The message is not complete yet, so
`msg_complete_host_out` stays low too.

After ceil(length/32) words the FPU pulses `msg_complete_host_out`. If the
host still drives a non-zero word at that moment, `error_host_out` pulses
with it. This is the overflow error, and the extra word goes nowhere.

With an IB that never fills, a write of n words takes n + 1 clocks after
the command clock.

**Read.** RD with an index sends MH_RD. Every clock in which the OB holds a
word, the FPU pops it, drives it on `data_host_out` and raises
`read_en_host_out`. After ceil(length/32) words it pulses
`msg_complete_host_out` and clears `data_host_out`.

**Pause.** PAUSE holds MH_PAUSE on the MH command lines until CONTINUE. The
FPU drains anything left in the OB, and the message in progress is abandoned.

**Reset.** The RESET command makes the FPU emit a one-clock `reset_mh_out`
from a flip-flop. The top level ANDs it into the reset of the MH, the RAM and
the four FIFOs.

## The FIFOs (`buffer_fifo`)

All four FIFOs are the same 2-deep, 32-bit design:

* the data and the `read_en` write strobe go in;
* the oldest word is always visible on `data_out`, and `pop` removes it;
* `empty` and `full` report the fill state.

A word written at an edge can be popped in the next cycle.

The subtle part is the full flag, selected by `FULL_AHEAD`:

* The MH writes the OB and TBF OUT combinationally in the same cycle it looks
  at `full`. The plain flag ("no free entry") is right for it
  (`FULL_AHEAD = 0`).
* The FPU and the protocol controller write the IB and TBF IN from a
  register. They decide at edge *k*, and the word lands at edge *k+1*. Such a
  producer would overrun a 2-deep FIFO if it saw `full` only when the FIFO
  was already full. With `FULL_AHEAD = 1` the flag also counts the word being
  written in the current cycle (unless a pop frees a place in the same
  cycle).

A write while full is dropped and reported by a simulation warning. A pop
while empty is ignored.

## The Message Handler (`message_handler`, `mh_access_engine`)

**Configuration.** MH_CONF, in any state, aborts whatever runs and restarts
configuration. The MH pops one IB word per clock and writes it to the RAM's
configuration input:

* the first word is the buffer count, which clears the RAM layout;
* the next words are the lengths of buffers 0, 1, 2, …

After the last length, `configured_out` rises. Before that, every request
is refused.

**Two access engines.** Each engine moves one message between a pair of
FIFOs and one RAM port. The host engine uses port 0 with the IB and OB. The
protocol engine uses port 1 with TBF IN and TBF OUT. An access runs in three
steps:

1. **Lock.** The engine raises `lock_req` until the RAM grants the buffer. It
   waits while the other side holds that buffer.
2. **Transfer.** It moves ceil(length/32) words: popped from the source FIFO
   into consecutive RAM words, or read from the RAM and pushed into the sink
   FIFO. The transfer runs at one word per clock while data and room allow.
   The RAM read has one clock of latency. A word read but not yet pushed
   (sink full) is held on the RAM output, and the next read waits.
3. **Unlock.** It releases the buffer and pulses `done`.

With data and room always present, an access of n words takes n + 2 clocks.
A buffer of length 0 (a null frame) locks and unlocks with no data moved.

**Host requests.** The FPU's commands last one clock, and the host may issue
the next one while the MH is still writing the tail of the previous message
from the IB. So the MH keeps one pending request and starts it when the host
engine is free.

**Protocol requests.** The protocol controller holds `control_prt_in` (WR or
RD) and a 17-bit header (11-bit frame ID, 6-bit cycle count) until
`prt_busy_out` rises or `null_frame_prt_out` pulses. `prt_done_out` marks the
end. Only the static segment is handled: frame ID *n* lives in buffer *n−1*.
A frame ID of 0, a frame ID above the configured count, or any request
before configuration gets a one-clock `null_frame_prt_out`, and nothing is
transferred. The cycle count is carried but not used.

**Conflicts.** When both sides want the same buffer, the one that asks while
the other holds it waits. If both ask for the same free buffer in the same
clock, the protocol side wins, because a FlexRay slot cannot wait. Different
buffers are served in parallel.

**Pause.** MH_PAUSE does three things:

* it aborts a running host access, and the buffer is unlocked;
* it drains words left in the IB;
* it keeps new protocol requests waiting until MH_CONTINUE.

A protocol access that is already running finishes.

## The Message RAM (`message_ram`)

The RAM is one flat 4096-bit register with two ports. Each buffer has a
payload length (13 bits) and a start bit. Buffers are packed back to back in
the order they are configured. Bits of a buffer past bit 4095 are not stored
and read as zero.

A port addresses a 32-bit word inside a buffer. A write changes only the bits
within the buffer's length: the last word of a 72-bit buffer holds 8 bits, so
writing it cannot spill into the next buffer. A read returns the word on
`message_buffer_out` from the next edge on, with bits past the length read as
zero.

Locking goes through `lock_req`/`lock_gnt` and `unlock` per port. The grant
is combinational and the busy flag is set at the next edge.
`message_status_out` shows all 64 busy flags. An assertion checks that a port
only reads or writes a buffer it holds.

The configuration word has bit 31 set for the buffer count (bits 30..0) and
clear for a payload length (of the buffer on `index_mh_in[0]`).

Layouts that fit:

* the default configuration, 56 × 72 = 4032 bits;
* 64 × 64 = 4096 bits;
* 32 × 128 = 4096 bits.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_BUFFERS` | 64 | system, FPU, MH, RAM |
| `RAM_BITS` | 4096 | system, FPU, MH, RAM |
| `DATA_W` | 32 | everywhere |
| `BUFFER_DEPTH` | 2 | system (all four FIFOs) |
| `CONF_RAM_MIN_LENGTH` | 32 | FPU clamp, lower bound |
| `CONF_RAM_MAX_LENGTH` | 64 | FPU clamp, upper bound |
| `CONF_RAM_DEFAULT_LENGTH` | 56 | DEFAULT_CONF buffer count |
| `DEFAULT_PAYLOAD_LENGTH` | 72 | DEFAULT_CONF payload bits |

Shared types and encodings are in `rtl/mh_pkg.sv`.

## Where this design departs from its source, and what it leaves out

The thesis this design follows describes the FPU state by state. For the
MH, the RAM and the FIFOs it gives the interfaces and the behaviour, not the
structure. The points below are this design's own reading.

* **Maximum buffer count.** The source sets the upper clamp at 128, but the
  RAM holds 64 buffers and the index is 6 bits. The clamp is 64.
* **Index width.** The host index is 6 bits, not the 5 listed for the
  host interface, so that 56 and 64 buffers can be addressed.
* **Host command width.** `control_host_in` is 3 bits, as in the FPU's
  port table. The source's FPU test drives 4-bit values such as 0101 for
  CONF; the low three bits are the same codes.
* **FPU-to-MH command code.** This design uses the 3-bit code (with CONF).
  A 2-bit version listed for the MH side is not used.
* **Busy buffer.** The source says both "wait until the buffer is free"
  and "answer a locked buffer with a null frame". This design waits, and
  sends null frames only for buffers that do not exist.
* **RAM ports.** The source draws 64 write and 64 read data ports on the
  RAM. This design has one port per client, which gives the same
  parallelism for two clients. The lock handshake, the packed layout and
  the configuration-word format are this design's own.
* **Full IB during a write.** The FPU keeps `msg_complete_host_out` low
  while the IB is full, as the text says; one state chart sets it instead.
  When the length is reached, the FPU completes even if the IB is full.
* **Default configuration** also sends the count word first, so the MH sees
  the same stream as for a host configuration.
* **Not built:**
  * detection of an incomplete configuration: the host cannot stop early
    here, so only the extra-length error and the clamp exist;
  * storage of the header in the RAM;
  * header consistency checks (cycle mask, channel);
  * the dynamic segment;
  * channel B;
  * the global time unit.
* **Outside this RTL.** The host CPU and the protocol controller appear in
  the testbenches as behavioural models.
* **Added ports.** The FIFO `pop` input, `reset_mh_out`, `prt_busy_out`,
  `prt_done_out`, `null_frame_prt_out` and `configured_out` are additions
  needed to make the handshakes complete.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that stops a hung
run.

| testbench | covers |
|---|---|
| `tb_buffer_fifo` | both full-flag forms against a queue model under random traffic; no overrun with a registered producer |
| `tb_fpu` | reset values, clamp to 32 / 64 / in range, write timing (n + 1 clocks), IB-full stall, overflow error, extra configuration word error, reads with an empty OB, pause/continue, default configuration (59 clocks), RESET |
| `tb_message_ram` | bit-level model, default / random / over-full layouts, random two-port traffic with lock collisions, full read-back |
| `tb_message_handler` | configuration, host and protocol transfers both ways, queued host request, lock wait, null frames, pause, full OB, reset mid-access |
| `tb_mh_system` | the whole system at default parameters; payloads cross from host to protocol side and back; counts clamp, default configuration, IB-full stall, overflow, pause, lock wait, null frame and RESET, and fails if any never happened |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mh_pkg.sv tb/tb_mh_system.sv \
          --top-module tb_mh_system -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_mh_system` with the testbench you want. Every testbench finishes
in well under a second.

The RTL uses `always_ff`/`always_comb`, packed structs and enums from
`mh_pkg`, and concurrent assertions for the handshake rules:

* commands to the MH last one clock;
* the IB is never overrun;
* no host access starts before configuration;
* no host request is lost;
* no RAM access is made to a buffer that is not locked.

## Files

* `rtl/mh_system.sv` — the top level.
* `rtl/fpu.sv` — the Frame Processing Unit.
* `rtl/buffer_fifo.sv` — the FIFO used four times.
* `rtl/message_handler.sv` and `rtl/mh_access_engine.sv` — the MH and its
  two engines.
* `rtl/message_ram.sv` — the Message RAM.
* `rtl/mh_pkg.sv` — types and constants.
* `tb/` — one testbench per part and one for the system.
