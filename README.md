# Station logic for a 15-Hz distributed accelerator control loop

The control system for the Fermilab 200 MeV Linac is split by geography. There are sixteen
*Secondary* stations, and each one is a complete small control computer for one area of the
machine: an MC68000 processor card, a core-memory data base, binary and analog I/O, and a small
keyboard/CRT console. The stations sit on a 1 MHz serial SDLC loop, which a *Primary* station
polls. Everything runs in step with the 15-Hz Linac pulse. Each cycle a station acquires its
data, scans it for alarms, answers the Primary's polls, updates its console and passes on
settings, so the effect of a knob turn shows on the next pulse.

This repository holds synthesizable SystemVerilog for the digital logic of both kinds of
station. The top, `linac_system`, puts the Primary station (`primary_station`) and one Secondary
station (`secondary_station`) side by side. They share the clock and the 15-Hz trigger. Each
station's link-controller byte interface, processor bus, memory port and field I/O are ports of
the top, with the prefix `pri_` or `sec_`. A full loop has sixteen Secondaries, and each more is
one more instance of `secondary_station`. The Secondary station is built from:

| part | module | what it does |
|---|---|---|
| communications card | `comm_card` | joins the station to both the link and the console |
| ├ link FIFOs | `byte_fifo` ×2 | 16 bytes in each direction between the link controller and the bus |
| ├ receive DMA | `link_rx_dma` | receive FIFO → core memory |
| ├ transmit DMA | `link_tx_dma` | core memory → transmit FIFO |
| ├ display memory | `video_display` | 16 lines × 32 characters, scanned for the CRT |
| └ console serial interface | `console_link` (+ `uart_tx`, `uart_rx`) | 2 light bytes out, 4 bytes in, at 4800 baud |
| console electronics | `console_panel`, `knob_counter` | lamp latches, switch, keyboard and knob bytes |
| binary I/O card | `binary_io_card` (on `byte_port_bank`) | 9 bytes in 3 connector groups, each byte an input or an output |
| processor card timer | `interval_timer` | three channels: 150-Hz motor tick, console start, poll schedule |
| processor card parallel I/O | `cpu_parallel_io` | 4 bytes |
| priority interrupt logic | `irq_priority` | MC68000 levels 6/4/2/1 |
| shared constants | `linac_pkg` | sizes, address map, interrupt sources |

The Primary station reuses the communications card, the timer and the interrupt logic, and
adds one part:

| part | module | what it does |
|---|---|---|
| Primary station | `primary_station` | link-driver processor's cards, plus the Primary console processor's port |
| attention interrupts | `cpu_attention` | each of the Primary's two processors can raise a flag that interrupts the other |

Some parts are bought in or analog, and the RTL does not model them. Their signals are ports of
the top:

* the MC68000 processor and its PROM/RAM sockets (`cpu_*` bus, `ipl`);
* the MC6854 SDLC link controller (`adlc_*`, a byte interface plus its interrupt);
* the 32K byte core memory card (`mem_*`, a DMA master port);
* the fiber-optic link repeater;
* the D-A cards and chassis, and the sample-and-hold/A-D chassis;
* the Opto22 isolation modules and the CRT.

## How link data moves: FIFO plus DMA

This is the part of the design that needs the most care. The link delivers one byte every 8 µs
(1 MHz serial). Whole messages go straight between the link and core memory by DMA, without
the processor. But the DMA must win the Multibus for every byte, and another master may be
holding the bus. Each direction therefore has a 16-byte FIFO. At 8 µs per byte that is
16 × 8 = 128 µs of slack (about 125 µs).

```
 MC6854 ──adlc_rx_valid/data──► byte_fifo (16) ──► link_rx_dma ──┐
                                                                 ├─► mem_req/we/addr/wdata ◄─ mem_ack/rdata
 MC6854 ◄─adlc_tx_valid/data── byte_fifo (16) ◄── link_tx_dma ──┘        (one shared port; receive wins)
          ──adlc_tx_take──►
```

* **Memory handshake.** A channel raises `mem_req` with the address (and data, for a write) and
  holds them unchanged until a one-cycle `mem_ack`. Read data arrives with the ack. The ack
  stands for bus arbitration and the memory's transfer acknowledge together, so a slow or busy
  bus simply delays the ack. An assertion in each DMA checks that a request stays stable.
* **Receive.** Software writes a buffer address and a byte limit, then arms the channel
  (`CR_RX_CTRL` bit 0). Each byte that enters the FIFO is written to the next address. After
  `limit` bytes the channel stops and sets `done`, and later bytes stay in the FIFO. `count`
  tells software how far a frame got. Frame boundaries are the MC6854's business: its own
  interrupt (`adlc_irq`, level 6) tells software that a frame has ended.
* **Transmit.** Software writes a message address and length, then starts the channel. The
  channel fetches one byte at a time. If the FIFO is full it holds the fetched byte, and it
  sets `done` when the last byte has entered the FIFO. The link controller takes bytes with
  `adlc_tx_take` while `adlc_tx_valid` is high.
* **Sharing.** Both channels use one memory master port. When both ask in the same cycle, the
  receive channel gets the port, because a receive overrun loses data and a transmit delay
  does not. A channel keeps the port until its request is acknowledged.
* **Overflow.** A byte that arrives at a full receive FIFO is dropped. It also sets a sticky
  overflow flag (`CR_FIFO_STAT` bit 7; writing bit 7 clears it). The card testbench holds the
  bus for 112 µs with no loss, and for 160 µs to produce an overflow.
* **Interrupt.** `irq_link` is set when a receive buffer fills or a transmit message has been
  handed to the FIFO. It is cleared with `CR_IRQ_CLR` bit 0.

## Interrupts and the 15-Hz cycle

The station software is interrupt-driven, in priority order. The link has the highest
priority, then the console serial line, then the timer, then the 15-Hz acquisition trigger.
`irq_priority` latches a rising edge on each source. It shows the highest pending, enabled level
on `ipl` and the lowest-numbered source at that level on `vector`. Software clears a request
by writing its bit.

| source (`irq_src_e`) | level | raised by |
|---|---|---|
| `IRQ_ADLC` | 6 | link controller (frame received) |
| `IRQ_LINK_DMA` | 6 | `comm_card.irq_link` |
| `IRQ_CONSOLE` | 4 | console exchange finished |
| `IRQ_TIMER_0/1/2` | 2 | timer channels |
| `IRQ_15HZ` | 1 | Linac 15-Hz trigger |

`interval_timer` has three 16-bit down-counters on a 1 µs tick, so one channel can count up to
65.5 ms. Each channel is either one-shot or periodic. A channel in *sync* mode restarts on every
15-Hz trigger, so its times count from the beam pulse. The station uses the channels as
follows:

* a periodic 6667 µs channel gives the 150-Hz stepping-motor interrupt;
* a sync one-shot starts the console exchange;
* in the Primary, sync one-shots place the polls at fixed times after the trigger. The timer
  testbench chains them for polls at 10, 15, 36, 41 and 51 ms into the 66 ms cycle, and the
  system test runs the whole schedule with a poll and an answer at each time.

The Primary's link-driver processor has its own interrupt logic, with these sources
(`pri_irq_src_e`):

| source | level | raised by |
|---|---|---|
| `PIRQ_ADLC`, `PIRQ_LINK_DMA` | 6 | link controller, link DMA |
| `PIRQ_TIMER_0/1/2` | 2 | timer channels (poll schedule) |
| `PIRQ_15HZ` | 1 | Linac 15-Hz trigger |
| `PIRQ_ATTN` | 1 | attention from the Primary console processor |

## The Primary station and its two processors

The Primary crate holds two processors and one shared memory. The *link driver* runs the
loop. Its timer sends each poll at its fixed time after the trigger, its transmit DMA sends the
poll frame, and its receive DMA stores the answers. The *Primary console* processor serves the
host computer and the operator consoles. The two pass work through queues in the shared
memory. When one processor has put something in a queue, it alerts the other through
`cpu_attention`:

* each side has a one-byte register;
* writing bit 0 raises the other side's flag;
* writing bit 1 clears the writer's own flag;
* a read returns `{6'b0, other side's flag, own flag}`.

The link driver's flag is a level-1 source of its interrupt logic. The console processor's flag
is the port `ccpu_attn`, which goes to that processor's own interrupt input. If a set and a
clear of the same flag fall in one clock, the flag stays set, so no alert is lost. The console
processor's bus is reduced to this one register (`ccpu_wdata`, `ccpu_we`, `ccpu_rdata`). Its
memory and its host interface are outside the RTL. The Primary's console serial line and
display memory (on its communications card) are brought out as ports, but no test uses them.

## Console link

`console_link` on the communications card runs one exchange per start. It sends two light bytes,
low byte first, then waits for four bytes: switches low, switches high, keyboard, knob. The
format is 8 data bits, no parity and 1 stop bit, at 4800 baud. An exchange takes 60 bit times,
about 12.5 ms (the end-to-end test measures about 12.3 ms, because each receiver reports in the
middle of the stop bit). If the console does not answer within 8 character times, the exchange
ends with `timeout` set and the old values kept.

`console_panel` is the far end. It latches the two light bytes onto the lamp drivers, then
replies from snapshots of:

* the 16 switches;
* the last key, with bit 7 set as a "new key" flag. The flag is cleared once the key has been
  sent, so a key is reported once;
* the 8-bit knob count.

A pause of more than two character times between the two light bytes restarts the byte pairing.
`knob_counter` counts one step per rising edge of encoder phase A, up when phase B is low. The
count wraps, and software works with differences.

## Display memory

`video_display` holds 512 bytes, row × 32 + column. The processor writes and reads them like
memory, and a full page is rewritten far faster than through a serial terminal. Each
`char_tick` steps a raster scan:

* 32 columns make one raster line;
* `SCANS` (12) raster lines make one character row;
* 16 rows make a frame.

One clock after each tick the block outputs the position, the raster line and the character
code, with `hsync` and `vsync` marking the first character of each line and of each frame. The
font ROM, the dot shifter and the CRT sync timing are **not** included. They would take
`vid_char` and `vid_line` and produce pixels.

## Binary and parallel I/O

`binary_io_card` has nine bytes, grouped three per 24-bit connector. Group *g* carries bytes
3g, 3g+1 and 3g+2, low byte first. Each byte is an input or an output according to a direction
bit (1 = output; all inputs after reset). Output bytes read back as written, so to the
processor they look like memory. The card has no pulse logic. DC or pulsed outputs, active high
or low, short pulses (about 20 µs) for stepping motors or pulses of n × 66 ms for contactors are all
made by software writing the latches at the right moments.

`cpu_parallel_io` gives the processor card's four bytes, built on the same `byte_port_bank`.

## Address map (station top, byte accesses)

`cpu_addr[15:10]` selects the card. Reads are combinational, and writes take effect at the
clock edge.

| base | card | registers |
|---|---|---|
| `0x0000` | communications card | `0x000–0x1FF` video RAM; `0x200 + CR_*` registers (see `linac_pkg`) |
| `0x0400` | binary I/O | `0x00–0x08` data; `0x10`, `0x11` direction bits |
| `0x0800` | parallel I/O | `0–3` data; `4` direction |
| `0x0C00` | timer | channel c: `4c` reload low, `4c+1` reload high, `4c+2` control (run, periodic, sync), `4c+3` status (irq, write 1 to clear; running) |
| `0x1000` | interrupts | `0` pending (write 1s to clear), `1` enable mask, `2` `{vector, 00, ipl}` |
| `0x1400` | attention (Primary only) | bit 0 raise the console processor's flag, bit 1 clear own; read `{other, own}` |

The Primary's link driver has no binary or parallel I/O. Its other cards sit at the same
addresses as in the Secondary.

## Where this RTL departs from, or goes beyond, the original system

The original description gives the function of each card but not its circuits. So:

* All of these are choices of this design: the register maps, the DMA handshake, the receive
  limit, the FIFO overflow flag, the memory-port priority, the console byte order and
  character format, the keyboard flag, the knob's quadrature decoding, the direction
  registers and the timer's counter size and 1 µs tick.
* The 8 MHz clock (`CLK_HZ`) is assumed. Baud and timer dividers derive from it.
* The console electronics (`console_panel`) are in the same top, joined by an internal serial
  line, so the link can be exercised end to end. In a station they sit in the console chassis.
* Interrupt levels follow the original scheme: link 6, console 4, timer 2, 15 Hz 1. The link
  DMA interrupt shares level 6, and all three timer channels use level 2.
* The character generator of the display is missing, so `video_display` stops at character
  codes.
* One binary I/O card is instantiated. A station with 24 bytes of binary status (a size the
  original mentions) needs three.
* The Primary station is reduced to the link driver's cards and the attention register. The
  console processor's own cards and its host link are not modelled, and the shared memory is
  one external port.
* The attention register's layout is this design's own. The attention interrupt shares
  level 1 with the 15-Hz trigger. When both are pending, the trigger is served first, because
  it has the lower source number.
* The link repeaters and the fiber line are not logic, so the two stations in `linac_system`
  are joined only in the testbench.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. A model of the core memory card with random bus waits,
`tb/core_mem_model.sv`, stands in for the memory. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb --top-module tb_linac_system \
    rtl/linac_pkg.sv tb/tb_linac_system.sv -o sim && obj_dir/sim
```

Replace the top module name to run another testbench. `tb_linac_system` runs the whole top at its
default parameters for 56 ms of one 15-Hz cycle. A model of the loop passes bytes between the two
stations at the link's rate of one byte per 8 µs. The testbench plays the Primary's link driver,
its console processor, and the Secondary's processor:

* the Primary's timer fires at 10, 15, 36, 41 and 51 ms after the trigger, re-armed after each poll;
* at each, an 8-byte poll leaves the Primary's memory by transmit DMA;
* each poll reaches the Secondary's memory by receive DMA while the Secondary's bus is held for
  50 µs;
* the Secondary answers each poll with the 9 binary input bytes it read at its 15-Hz interrupt;
* the Primary checks each answer against the Secondary's connector pins;
* after each answer, the attention flags go to the console processor and back.

On the Secondary side, 150-Hz motor interrupts (each puts out a 20 µs step pulse, and its width is
measured at the connector pin), a console exchange and a request that arrives
while another is being served happen along the way. Each of these is counted, and the test fails
if one never happens.

`tb_secondary_station` runs the Secondary alone at its default parameters through 70 ms, which
covers two 15-Hz triggers. It plays the
processor as a set of interrupt handlers, and it plays the link controller and the console
hardware. It checks each interrupt:

* it is served at the highest pending level;
* a poll frame arrives by receive DMA while the bus is held busy, and the reply leaves by
  transmit DMA;
* the console exchange delivers switches, key and knob after about 12.3 ms;
* motor pulses appear on the binary I/O connector at 150 Hz;
* a contactor output switched on at one trigger and off at the next gives a 66 ms pulse at
  the pin;
* the display scan matches the page written.

It also counts each of these mechanisms and fails if one never occurs. It runs in a few seconds.
The block testbenches scale the console bit time down (10–20 clocks per bit) to stay short.
