# General Timing System for an accelerator complex

An accelerator complex needs every installation to act at the right moment
of each machine cycle: magnets ramp, injections and extractions fire, and
the control computers have to know when. This design sends that timing
information as short serial messages instead of running a dedicated cable
per signal. Each message pairs an **event code** with **operational data**.
A continuous 10 kHz stream of these messages also carries the clock.

Three **timing message generators** (TMG), one per large installation,
produce the messages. They are joined in a one-way **global ring**, so an
event raised at any installation reaches all of them. Each generator also
drives its own **local bus**. On that bus, **timing message receivers**
(TMR) turn messages back into pulses and interrupts. A **registering
device** at the end of each local bus records what happened in the cycle.

Each generator also has a registering device of its own, which records
the global traffic arriving on its ring input.

A portable **archiving device** can be plugged onto any local bus. It keeps
days of traffic with real-time stamps, so faults can be analysed later.

All logic is synchronous to one 12 MHz clock with an active-low
asynchronous reset. The code is SystemVerilog-2017. The shared types are in
`rtl/gts_pkg.sv`.

## Messages and line coding

A timing message (`tm_t`) is two 16-bit words:

- a **Command Word**, whose bits 7:0 hold the event code (256 events);
- a **Data Word** with operational data, for example a cycle number.

Event code 0 is a bare clock pulse: a message that only marks a 10 kHz slot.

Each word is sent as a MIL-STD-1553 word at 1 Mbit/s:

- a 3-bit-time sync: high then low for a Command Word, low then high for a
  Data Word;
- 16 data bits, most significant first, Manchester II coded (1 = high then
  low, 0 = low then high);
- one odd-parity bit.

That makes 40 half-bits of 6 clocks each (`HALF_BIT`), or 20 µs per word.
The two words of a message go back to back. A 4-bit-time idle gap
(`GAP_BITS`) follows each message, so one message takes 44 µs. One 10 kHz
slot of 100 µs therefore has room for two messages.

The line is modelled logically as `mil_line_t {act, lvl}`:

- `act` = 0 means nobody drives the bus;
- `lvl` is the level of the current half-bit.

Transformers, transceivers, fibre and the coaxial reserve line are not
modelled.

- `mil_encoder` sends messages with a valid/ready handshake.
- `mil_decoder` synchronises the line and samples each half-bit in its
  middle. It checks the sync, the Manchester coding and the parity of each
  word. It gives:
  - a clock pulse and the event code at the end of a clean Command Word;
  - the whole message at the end of the Data Word, with error flags
    (`cw_perr`, `dw_perr`, `code_err`, `frame_err`).

## Generator (`tmg`)

A generator takes messages from three sources.

- **Local channels** (`tmg_local_src`): a RAM holds one Command Word per
  local pulse input. A rising edge on an input sends that channel's word
  with the current operational data. Pulses that arrive together are queued
  and sent one per clock, lowest channel first. A pulse that arrives while
  its channel is still pending is reported on `local_lost`.
- **Programmed cycle** (`tmg_prog_src`): a RAM holds one Command Word per
  100 µs slot of the accelerator cycle (`PROG_AW` = 17, so up to 13.1 s).
  It is read at every 10 kHz tick, and every slot sends one message. The
  cycle ends after `cycle_len` slots. `cycle_start` restarts the 10 kHz
  clock at slot 0, and `cycle_stop` halts it.
- **Global ring input**: a decoder on the incoming ring link. Only messages
  received without error are used.

Each source feeds two **masked gates** (`tm_mask`), one towards the ring and
one towards the local bus. That makes six gates and six **FIFOs**
(`tm_fifo`, 16 messages each). A mask has one bit per event code, and all
gates are closed at reset. Two round-robin arbiters (`tm_arbiter`) merge
the three FIFOs of each direction into that direction's encoder. A FIFO
that overflows loses the message and sets a sticky bit in `fifo_ovf`.

**Stopping messages on the ring.** A message raised at generator A goes
round the ring and comes back to A. A keeps its ring-to-ring gate closed
for the codes it originates, so each global message makes exactly one
revolution. The other generators pass the message on and put it on their
local buses if their masks allow it.

The host (an equipment-controller computer) writes everything through one
port, `cfg_t`. The `sel` field picks a mask, a RAM, the operational data
or the cycle length. `data[0]` opens or closes a mask bit. Masks and RAMs
can be rewritten between cycles, and the new cycle then starts with
`cycle_start`.

## Receiver (`tmr`)

The receiver decodes the local bus and gives the following outputs.

- **DMUX1**: a one-hot output per event code (`pulse_out`). It pulses for
  `PULSE_CYC` clocks (1 µs) at the end of the Command Word. Each message
  also gives a clock pulse.
- **DMUX2, mask and IRQ**: an event whose mask bit is open raises `irq` at
  the end of the Data Word. The Command Word and Data Word are then held
  for the host until `irq_ack`. An open event that arrives while an IRQ is
  pending sets the `missed` status bit.
- **Diagnostics**: the following always raise `irq`, whatever the mask:
  - a parity error in either word, a coding error or a broken frame;
  - a **break of the 10 kHz flow**: no message for 1.5 slots
    (`FLOW_TIMEOUT`). This is reported once per break.

  `status` = {missed, event_irq, flow_break, frame_err, code_err, dw_perr,
  cw_perr}.

Because the pulse comes at the end of the Command Word and the IRQ at the
end of the Data Word, the IRQ path is always one word (20 µs) slower than
the pulse path.

## Registering device (`tm_registrar`)

The registering device records each message of a cycle with its position
in time.

- A 16-bit **time marks counter** counts a 5 kHz time-mark input. It
  restarts on the start-of-cycle event. In `gts_top` that is event code 1
  (`START_EVENT`).
- Each accepted message starts a five-step strobe chain, w1 to w5:
  - w1 writes the Command Word into RAM1 and the time into RAM2;
  - w2 steps the common 8-bit address counter;
  - w3 writes the Data Word and the time;
  - w4 steps the address again;
  - w5 ends the chain.

  A message therefore takes two of the 256 addresses. Bare clock messages
  are skipped (`SKIP_NULL`).
- **Status and IRQ**:
  - the end-of-cycle event (code 255, `END_EVENT`) raises `irq`;
  - overflow of the address counter (the 128th message of a cycle fills
    the RAMs) raises `irq` and stops recording until `rst`;
  - overflow of the time counter (no restart) raises `irq`;
  - a cycle that ended with no message sets the zero bit.

  `status` = {zero, time overflow, address overflow}.
- **Read-out**: the host loads the address (`ld_addr`/`ld_val`). Each `rd`
  then returns the code and time on the next clock and steps the address.
  `rst` clears both counters for the next cycle.

## Archiving device (`tm_archiver`)

The archiving device is a self-contained unit with its own time base. Its
parts are:

- a Manchester decoder on the local bus;
- `tma_serial_dispatcher`: an RS-232 UART, 8N1, `BAUD_DIV` = 104 clocks per
  bit;
- `tma_rtc_dispatcher`: reads the 32-bit seconds counter of an external RTC
  chip right after reset and then every millisecond. It counts 100 µs units
  within the second itself, and writes a new time into the RTC on request.
- `tma_task_admin`: the task state machine. It also asks for a buffer flush
  every 10 RTC seconds (`FLUSH_SEC`);
- `tma_mem_dispatcher`:
  - buffers time-stamped records (256 deep);
  - writes them into an external FLASH used as an endless ring;
  - keeps the ring pointer in an external FRAM.

### Tasks

The external computer selects the task by sending one byte.

| byte | task | effect |
|------|------|--------|
| 0x01 | archive | Default at switch-on. Every error-free message with a non-zero event code is archived. |
| 0x02 | transfer | Flushes the buffer, then sends the 32-bit record count and every record from the oldest. Words go high byte first. Then returns to archive. |
| 0x03 | set time | The next four bytes (high first) are written into the RTC. Then returns to archive. |

Messages keep entering the buffer whichever task is running. The buffer
is written to the FLASH only between transfers, though. A transfer of a
full archive over the serial line takes minutes, and the 256-message
buffer can overflow during it. An overflow sets `buf_ovf`.

### Storage

A record is five 16-bit words, in this order:

- RTC seconds, high word;
- RTC seconds, low word;
- 100 µs units within the second;
- Command Word;
- Data Word.

The 32 Mbit FLASH (2^21 words, `FLASH_AW`) holds 419,430 records. Over
four days that is an average of 1.2 archived events per second.

The FLASH is filled in a ring, so every sector wears evenly. A sector is
erased just before the write pointer enters it, so the oldest records are
overwritten first.

After every flush, the pointer goes into the FRAM, and so does the task
code when it changes. The FRAM layout is:

| FRAM word | contents |
|-----------|----------|
| 0–1 | write pointer |
| 2 | wrap flag |
| 3 | task code |

At power-up the pointer is restored from the FRAM, so archiving continues
where it stopped.

The FLASH, FRAM and RTC chips are outside the design. Each has a simple
port where the request is held until acknowledged:

- FLASH: read, write or erase sector;
- FRAM: read or write;
- RTC: read or write.

## Top level (`gts_top`)

The top level connects:

- three generators in a ring: the ring output of generator *i* feeds
  generator *i*+1, and the last one feeds the first;
- per local bus, two receivers and a registering device at the end of the
  bus;
- per generator, a second registering device that records the global
  messages arriving on its ring input (ports `greg_*`);
- an archiving device on local bus 0;
- front-panel alarm LEDs (`alarm_led`).

Each generator has three LEDs: lost local pulse, ring reception error and
FIFO overflow. Each receiver has two: flow break and message error. An LED
lights with its alarm and stays lit 0.1 s (`LED_HOLD`) after the alarm
ends, so that even a one-clock alarm can be seen.

Every host port is brought out, and so are the archiving device's UART and
chip ports. The ring links and local buses are outputs, so they can be
watched. All sizes are parameters, with defaults as described above.

## Where this design departs from the source description

The description this design follows gives the architecture. Widths, codes
and protocols it leaves open were chosen here:

- the 12 MHz clock, the 1553 framing and 1 Mbit/s rate, and the 8-bit event
  code in Command Word bits 7:0;
- the RAM sizes, FIFO depths, number of local channels, pulse width and
  flow timeout;
- the registering device's strobe order, start/end event codes and skipping
  of bare clock messages;
- the archiving device's record format, UART protocol, command codes,
  FRAM layout and chip ports.

The source also disagrees with itself about receiver interrupts. One
passage has every incoming message raise an interrupt, another gates
events by the mask. This design gates events by the mask and always
interrupts on errors.

The source quotes the delays of its own hardware. This design's delays
come from the line protocol instead, as measured by `tb/tb_gts_delays.sv`
at the default sizes:

| path | this design | quoted for the original |
|------|-------------|-------------------------|
| 10 kHz tick to programmed event on the local bus | 0.25 µs | 13.8 µs |
| local pulse to event on the local bus | 0.5 µs | 6.5 µs |
| local pulse to event on the next generator's bus (one ring hop) | 40.75 µs | 52.8 µs |
| message start to receiver pulse | 20.1 µs | 27.2 µs |
| message start to receiver IRQ | 40.1 µs | 45.2 µs |

A ring hop costs one full message reception (40 µs), because a message is
forwarded only after its Data Word has been checked. The receiver's IRQ
follows its pulse by one word, 20 µs, against the quoted 18 µs. The quoted
figures include chip latencies of the original modules that are not known.

Not built:

- the memory chips and the RTC chip, which are only modelled for
  simulation in `tb/`;
- the physical media;
- the host computers;
- the module that mimics the registers of the previous receiver
  generation. The old message format and register map are not available.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
Some testbenches use helpers from `tb/`:

- `tb_util_pkg` is an independent reference Manchester coder;
- `tb_mil_monitor` decodes a line into a message queue;
- the FLASH, FRAM and RTC models stand in for the chips.

Example with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_gts_top rtl/gts_pkg.sv tb/tb_util_pkg.sv tb/tb_gts_top.sv
./obj_dir/Vtb_gts_top
```

`tb_gts_top` runs the whole system at the default sizes. Only its RTC
model's second is shortened. It takes the system through the following
steps:

1. It programs all masks and RAMs.
2. It runs one programmed cycle on all three generators, with local events
   injected on two of them.
3. It services receiver interrupts and checks every pulse and its ring
   order.
4. It reads out the six registering devices after their end-of-cycle
   interrupt: three at the bus ends and three on the ring inputs.
5. It provokes the flow-break alarm and a FIFO overflow, and checks the
   alarm LEDs.
6. It checks that the archiving device has stored every event from bus 0
   in its FLASH.

Each of these mechanisms is counted, and a mechanism that never occurs
counts as a failure.

`tb_gts_delays` also runs the top level at its defaults. It measures the
transport delays in the table above and checks them against the values
expected from the line protocol.

The block testbenches use reduced sizes where the defaults would be slow,
for example a 1 Kword FLASH for the archive ring test.
