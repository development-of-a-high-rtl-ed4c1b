# PET data acquisition: synchronous DAQ bus and SoC prototype logic

This is the FPGA logic of a data acquisition chain for a small-animal PET
scanner with 16 detectors. It also includes the FPGA side of a
processor-based (SoC) prototype meant to replace the scanner's host link.

In the scanner, every detector has its own DAQ board. When two detectors see
photons within a few nanoseconds of each other (a *coincidence*), the
motherboard triggers both boards. Each board digitizes four analog position
signals and sends a 20-byte event packet to the motherboard. The 16 boards
share two 16-bit parallel buses, and on the older asynchronous handshake
those buses limited the count rate. The main idea here is a **synchronous
bus**:

- The motherboard sends every board a continuous read clock.
- A whole packet moves as a burst of five words, one word per clock.
- The per-word handshake and its synchronization delays are gone.

The bus needs no new wires. The four control lines per board keep their
physical role, and only their meaning and the firmware change.

The second design is logic for an FPGA with an on-chip ARM processor (HPS):

- a pair of FIFOs on the processor-FPGA bridges, used to test the bridges
  by loop-back;
- an LVDS receiver on the mezzanine (HSMC) connector, run by a small state
  machine that takes commands from the processor.

The two designs stand side by side in `pet_daq_top` and do not connect to
each other.

## Event packet

A board sends one packet per event: five 16-bit words.

| word | bits 15..13 | bit 12 | bits 11..0 |
|------|-------------|--------|------------|
| 0 header | `100` | c0 | DAQ id (11..8), event number (7..0) |
| 1 XA | `000` | c1 | 12-bit sample |
| 2 XB | `001` | c2 | 12-bit sample |
| 3 YA | `010` | c3 | 12-bit sample |
| 4 YB | `011` | c4 | 12-bit sample |

- Bits 15..13 give the word's position in the packet. The receiver checks
  them.
- The `c` bits are programmable. Here they are a 5-bit configuration input
  (`cfg_c`).
- XA, XB, YA and YB are the four Anger signals. The host computes the
  interaction point from them as X = (XA−XB)/(XA+XB) and
  Y = (YA−YB)/(YA+YB).
- The event number in the header is the same one the coincidence unit gave
  the two triggered boards. The host uses it to pair the two packets of one
  coincidence.

Two points in this layout are this design's reading, not given fixed values.
The original layout gives YA and YB the same code `010`. YB gets `011`
here, so that every position has its own code and the integrity check can
tell a YA word from a YB word. How the header's 12 bits are split between
board id and event number is also this design's choice. All of this is in
`rtl/pet_daq_pkg.sv`.

## The synchronous DAQ bus

Each bus is shared by 8 boards. Every board has its own:

| signal | direction | meaning |
|--------|-----------|---------|
| read clock | motherboard → board | free-running, 10–50 MHz |
| OE  | motherboard → board | output enable: the board drives the data lines |
| REQ | motherboard → board | read request: one pulse moves one word |
| DAV | board → motherboard | data ready: a whole packet is buffered |

The 16 data lines are shared by the boards of a bus.

One packet is moved as follows. `daqfetch_sync` is the motherboard side and
`daq_sync_tx` the board side.

```
read clock   _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
state         ARB  OEN  B0   B1   B2   B3   B4   REL  ARB ...
OE[k]        ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________
REQ[k]       ___________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________
data               hdr  hdr  XA   XB   YA   YB
captured at             ^    ^    ^    ^    ^     (edges ending B0..B4)
```

1. **ARB**: the motherboard picks the next board with DAV high, round robin.
   It waits here (a *stall*) while its own buffer for this bus has room for
   less than a whole packet.
2. **OEN**: OE rises. The board puts the head word of its FIFO on the bus.
   The FIFO reads first-word fall-through.
3. **B0..B4**: REQ is high for five cycles. At each of these edges the
   motherboard captures the word on the bus and the board pops it. The next
   word is then on the bus for the next edge.
4. **REL**: OE falls and the bus is free.

A packet takes **8 read-clock cycles**: 267 ns at 30 MHz and 615 ns at
13 MHz. That is 10 bytes per 8 cycles per bus, or 37.5 MB/s per bus at
30 MHz. The original firmware was simulated at 310 ns per packet at 30 MHz
and 252 ns at 50 MHz. Its board-level timing adds a few cycles that this
logic does not model. The ARB, OEN and REL cycles are this design's
choices. The asynchronous handshake bus that this one replaces is not
included.

DAV is registered and requires at least five words in the FIFO. A burst
therefore never runs the FIFO dry, and DAV is correct again by the next ARB
cycle after a burst. The boards' tri-state drivers are modelled as "drive
zero unless OE" plus an OR per bus. Assertions in `daqfetch_sync` and
`iris_daq_system` check that at most one board drives a bus.

## Triggering, dead time and loss

- **Coincidence** (`coincidence_unit`): the first detector trigger opens a
  window of `WINDOW` clock cycles (2 by default, 20 ns at 100 MHz).
  - Exactly two detectors in the window make a coincidence. Both boards get
    a one-cycle trigger and a fresh 8-bit event number.
  - A single trigger, or three or more, is rejected and counted.
  - Any two distinct detectors form a pair. The scanner's geometry can
    change (it can rotate), so "opposite detectors" is not hard-wired.
- **Board dead time** (`daq_acq_ctrl`):
  1. A trigger starts the ADCs on the next cycle (`adc_start`).
  2. The samples are taken `CONV_CYCLES` cycles later. The default of 5
     cycles is the converters' 30 ns + 20 ns at 100 MHz.
  3. The five words are written on consecutive cycles.

  The board is ready for a new trigger `CONV_CYCLES + 7` cycles after the
  previous one. Triggers before that are ignored and counted. This is the
  non-paralysable dead time of the board.
- **Back-pressure chain**: if the host link stops, the motherboard's
  per-bus buffers fill up. The bus fetch then stalls, and the board FIFOs
  fill up. A board whose FIFO has no room for a whole packet drops the new
  packet and counts it. A partial packet never enters a FIFO.

## Motherboard data path

`iris_motherboard` has one set of the following per bus:

- `daqfetch_sync`: fetches packets from the boards (read-clock domain).
- `packet_checker`: compares each word's control code with its position and
  counts good and bad packets.
- `async_fifo`: moves the words into the system clock.

`host_merge` then sends whole packets, round robin between the buses, to a
valid/ready stream for the USB controller. Packets are never interleaved.

## SoC prototype logic

**Bridge FIFOs.** `hps_to_fpga_fifo` and `fpga_to_hps_fifo` hold 64-bit
words (set `DATA_W` to 32 for the narrower bridge).

- The processor writes and reads them with memory-mapped accesses on the
  high-bandwidth bridge.
- The FPGA side is a valid/ready stream.
- Status registers sit on the 32-bit lightweight bridge and are read one
  cycle after the request:

| address | hps_to_fpga_fifo | fpga_to_hps_fifo |
|---------|------------------|------------------|
| 0 | fill level | fill level |
| 1 | bit0 empty, bit1 full, bit2 overflow seen | bit0 empty, bit1 full, bit2 underflow seen |
| 2 | writes dropped when full | reads of an empty FIFO (return 0) |
| 3 | depth | depth |

- `soc_bridge_loopback` connects the two FIFOs back to back. It moves one
  word per clock from the first FIFO to the second.

**HSMC receiver.** `hsmc_receiver` contains:

- **`lvds_deserializer`**: the remote board sends each 16-bit word on two
  lanes, 8 bits per lane, MSB first. Lane 1 carries bits 15..8. One bit is
  sent per serial clock; the original runs at 600 MHz. After reset the
  sender sends the training word `C5C5` for a while.
  - The receiver compares each received word with the training word.
  - On a mismatch it *bit-slips*: it holds its bit counter for one clock,
    which moves the word boundary by one bit. It then skips a word so its
    shift register refills.
  - Four matches in a row lock it.
  - After that, words go straight through with no per-word alignment work.

  This logic stands in for the FPGA vendor's LVDS receiver. The training
  word and lock rule are this design's choices.
- **`async_fifo`**: the receive buffer. Its Gray-code pointers pass through
  two-flop synchronization registers into the system clock. Words that
  arrive while it is full are dropped and counted.
- **`hsmc_ctrl_fsm`**: takes 64-bit commands from the processor through a
  command FIFO. The opcode is in bits 63..60 and the count in bits 15..0:

  | opcode | command |
  |--------|---------|
  | 1 | read N words |
  | 2 | write status |
  | 3 | reset |

  It has six states:

  | state | what it does |
  |-------|--------------|
  | Init | clears the registers and waits for link lock |
  | Ready | waits for a command |
  | Read command | pops the command and decodes it |
  | Write status | sends one status word |
  | Read from HSMC | moves up to 5 words, one per clock |
  | Done | goes back to Read from HSMC if words remain, else to Ready |

  Results go to the processor through an output FIFO. Bits 63..60 of each
  result carry a tag:
  - `D`: a data word, with the 16-bit word in bits 15..0.
  - `5`: a status word, with these fields:

    | bits | field |
    |------|-------|
    | 59..44 | commands served |
    | 43..28 | words moved |
    | 27..12 | receive-buffer drops |
    | 1 | buffer empty |
    | 0 | link locked |

  The register bank holds the last command and the counters.

## Clocks

| clock | used by |
|-------|---------|
| `clk_sys` | DAQ boards' acquisition logic, coincidence unit, host merge, SoC logic |
| `rd_clk` | both sides of the DAQ buses, fetch and integrity check |
| `ser_clk` | LVDS deserializer |

In the scanner each DAQ board has its own clock. Here the boards share
`clk_sys`. The dual-clock FIFOs would work the same with separate clocks.
Resets are active-low and asynchronous. Release them synchronously to each
clock.

## Module map

```
pet_daq_top
├── iris_daq_system            16 boards + motherboard, bus wiring
│   ├── daq_board ×16
│   │   ├── daq_acq_ctrl       trigger → ADC → packet
│   │   ├── async_fifo         board FIFO (board clock → read clock)
│   │   └── daq_sync_tx        board side of the bus
│   └── iris_motherboard
│       ├── coincidence_unit
│       ├── daqfetch_sync ×2, packet_checker ×2, async_fifo ×2
│       └── host_merge
└── soc_fpga
    ├── soc_bridge_loopback    hps_to_fpga_fifo → fpga_to_hps_fifo
    └── hsmc_receiver          lvds_deserializer, async_fifo, hsmc_ctrl_fsm,
                               hps_to_fpga_fifo (commands), fpga_to_hps_fifo (results)
```

`pet_daq_pkg` holds the packet codes, the helper functions and the HSMC
encodings. `sync_fifo` is the single-clock FIFO inside the bridge FIFOs.

Parts outside the FPGAs are top-level ports:

- the detector discriminators (`det_trig`);
- the ADCs (`adc_start`, `adc_data`);
- the USB controller (`usb_*`);
- the processor bridges (`lb_*`, `cmd_*`, `out_*`, `*_csr_*`);
- the HSMC lanes.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pet_daq_top \
  rtl/pet_daq_pkg.sv rtl/*.sv tb/*.sv
./obj_dir/Vtb_pet_daq_top
```

Change the top module name to run another testbench. Listing
`rtl/pet_daq_pkg.sv` twice does no harm: it only has to come first.

`tb_pet_daq_top` runs the whole design at its default size, in about 10
seconds. It covers:

- coincidences, singles, multiples and dead-time hits;
- a long host-link hold that causes stalls and board-FIFO drops;
- the bridge loop-back and an HSMC read.

It checks every packet word against an ADC model, checks that both boards
of a coincidence report the same event number, and counts every mechanism.

`tb_sync_bus_rates` drives one bus at 10, 12.9, 29.9 and 50 MHz read
clock. Two real DAQ boards are triggered faster than the bus can drain
them. It checks the 8-cycle packet spacing and prints the result:

| read clock | per packet | per bus |
|------------|------------|---------|
| 10 MHz | 800 ns | 12.5 MB/s |
| 12.9 MHz | 616 ns | 16.2 MB/s |
| 29.9 MHz | 267 ns | 37.4 MB/s |
| 50 MHz | 160 ns | 62.5 MB/s |

`tb_acq_throughput` runs the full scanner at a 12.99 MHz read clock.
Random detector pairs fire far faster than the system can take. With the
host link always ready, 32.5 MB/s of event data leaves the motherboard.
That is the two-bus ceiling, against 20.71 MB/s for the original system at
13 MHz.

Test-only models:

- `tb/hsmc_adc_emulator.sv`: the remote converter board (counter → FIFO →
  serializer, with adjustable line skew).
- The ADCs and the processor, modelled inline in the testbenches.

## How far to trust it

- All blocks pass their testbenches. For each one, a deliberately broken
  copy was shown to fail its testbench.
- It has not been run on hardware, and no timing constraints are provided.
- Bus skew and setup/hold margins on the board-to-board lines are a
  board-level matter. They are outside this RTL.

### Where this design departs from, or goes beyond, the original

- YB control code `011`, header field split, `c` bits as an input.
- Coincidence window in clock cycles, any detector pair accepted, multiples
  rejected.
- The 8-cycle packet schedule, round-robin fetch and merge, and drop of
  whole packets on a full board FIFO.
- FIFO depths (64 words, 32 for the LVDS receive buffer), the 100 MHz
  system clock and the register maps.
- LVDS lane order, single data rate, training-word alignment, and the
  command and status encodings.
- The asynchronous handshake bus, the analog front end, the ADCs, the USB
  controller, the processor and the Ethernet link are not part of this RTL.
