# FPGA link for a 64-channel neural recording ASIC

An implantable 64-channel neural recording chip (an 8 × 8 array of
amplifier/ADC channels with an on-chip digital processor) talks to the
outside world over three wires and a clock: a serial command line (`Din`),
a command-window strobe (`en_trf`), a serial data line (`Dout`) and a 4 MHz
master clock. This RTL is the FPGA design that sits between that chip and a
PC. It does two things:

* **Configures the chip.** The PC writes 24-bit configuration commands; the
  FPGA shifts each one out on `Din`, MSB first, inside an `en_trf` window
  that is exactly 24 master-clock cycles long.
* **Records what the chip streams.** The chip sends 85-bit frames on
  `Dout`. The FPGA finds each frame, buffers it in one of two memory slots
  (a ping-pong buffer), copies the finished slot into a byte FIFO and lets
  the PC drain the FIFO over its parallel-port-style USB interface.

The design targets a Spartan-3E class FPGA with a 50 MHz oscillator and a
Digilent-style USB/EPP bridge (8-bit data bus `db` with `astb`, `dstb`,
`wr`, `wt`), but nothing in it is vendor-specific.

## Block diagram

```
              50 MHz domain                         |   4 MHz domain (clk4m)
                                                    |
 host  ┌────────────┐ tx_data[23:0] ────────────────┼──► ┌──────┐ dout ─────────► Din
 EPP ◄►│ usb_epp_if │ wr_req ─► ┌──────────────┐    |    │ piso │ valid,last ─┐
 port  │            │           │cmd_controller│load_tgl─►│      │◄── en_trf ──┤
       │            │◄─ busy ── │              │◄───valid─┤      │             │
       │            │           └──────────────┘ en_pls ─┼──► ┌──────────┐    │
       │            │                                    |    │ dff_sync │────┴──► en_trf
       │            │ rx_rd / rx_data  ┌──────────┐      |    └──────────┘
       │            │◄────────────────►│ fifo_ram │      |
       └────────────┘                  └────▲─────┘      |    ┌────────────┐
                                            │ bytes      |    │ write_ctrl │◄────── Dout
                                     ┌──────┴─────┐◄─────┼────│            │
                                     │ read_ctrl  │toggle|    └─────┬──────┘
                                     └──────┬─────┘      |          │ bytes
                                            │  ┌─────────┴──────────▼───┐
                                            └─►│ pingpong_buf           │
                                               │ (mem_slot #1, #2)      │
                                               └────────────────────────┘
  freq_divider: clk50m ─► clk4m (also sent to the ASIC)
```

The top level is `neural_fpga_if`. Its ports are the host port
(`epp_astb_n`, `epp_dstb_n`, `epp_wr_n`, `epp_wait`, and the data bus split
into `epp_db_i`, `epp_db_o`, `epp_db_oe`; the tristate pad goes in the
board wrapper) and the chip port (`asic_clk4m`, `asic_din`, `asic_en_trf`,
`asic_dout`).

## Two clocks, and how data crosses between them

The master clock of the chip is made in the FPGA by `freq_divider`. Since
50/4 = 12.5 is not an integer, the divider is a phase accumulator that adds
2·4 MHz per 50 MHz cycle and toggles its output each time the sum passes
50 MHz. Periods alternate between 12 and 13 input cycles: the average is
exactly 4 MHz, with one input cycle of jitter. The chip only needs its
clock to be steady on average, and its data lines are launched and sampled
by the FPGA on this same clock, so the jitter does not matter for the link.

Everything that talks to the chip (`piso`, `dff_sync`, `write_ctrl`, the
write port of the slots) runs on `clk4m`. Everything that talks to the
host (`usb_epp_if`, `cmd_controller`, `read_ctrl`, `fifo_ram`) runs on
`clk50m`. Treat the two as unrelated clocks: every crossing is built to be
safe without relying on their phase.

| Signal | From → to | How it crosses |
|---|---|---|
| `load_tgl` | controller → PISO | toggle, two-flop synchroniser, edge detect |
| `tx_data` | USB → PISO | held stable from the request until the PISO is valid (`busy` tells the host to wait) |
| `valid` | PISO → controller | level, two-flop synchroniser |
| `en_pls` | controller → DFF sync | level, two-flop synchroniser |
| `toggle` | write control → read control | toggle, two-flop synchroniser |
| frame bytes | slot write port → slot read port | a slot is read only after `toggle` says it is complete; the writer is then filling the other slot |

**Reset.** `rst` is synchronous and active high, on `clk50m`. The divider
holds `clk4m` low during reset, so a plain reset would never reach the
4 MHz flops. The top therefore stretches reset by 48 FPGA cycles (about four
master-clock periods) for everything except the divider, and feeds the
stretched reset to the 4 MHz logic through a two-flop synchroniser. The
50 MHz logic leaves reset while the 4 MHz logic is still held, with
`toggle` and `valid` already cleared. Until the 4 MHz flops have been
reset, `asic_en_trf` is held low by the stretched reset, so the chip never
sees a spurious command window. Allow about 100 FPGA cycles after `rst`
falls before the first host access.

## Command path

A command is 24 bits: a 5-bit preamble, a 14-bit payload and a 5-bit CRC.
The host computes all three fields. The FPGA does not look inside the word;
it only moves it.

1. The host writes the three bytes to `REG_CMD2`, `REG_CMD1`, `REG_CMD0`
   (MSB first). The write to `REG_CMD0` makes `usb_epp_if` pulse `wr_req`
   for one cycle.
2. `cmd_controller` (50 MHz) flips `load_tgl` and goes busy.
3. `piso` (4 MHz) sees the toggle two or three master clocks later, loads
   `tx_data`, sets its bit counter to 24 and raises `valid`. `dout` now shows
   bit 23.
4. The controller sees `valid` through its synchroniser and raises `en_pls`.
   It never raises `en_pls` before the PISO holds valid data.
5. `dff_sync` synchronises `en_pls` and raises `en_trf` on a master-clock
   edge. From the next edge on, every edge with `en_trf` high shifts the
   PISO by one bit. The flop that drives `en_trf` also sees the PISO's `last`
   flag and drops `en_trf` on the edge that shifts the final bit. The window
   is therefore exactly 24 cycles, whatever the delay of the 50 MHz side.
   `Din` and `en_trf` both change right after rising edges of `clk4m`, so
   the chip can sample them on the next rising edge.
6. `valid` falls, the controller sees it, drops `en_pls` and clears `busy`.

A command takes about 30 master clocks (roughly 7.5 µs). A write request
that arrives while the controller is busy is ignored and counted in
`cmd_controller.dropped`. Hosts should poll `REG_STATUS.cmd_busy` before
writing the next command.

The chip's start-up takes three such commands: one to set or self-calibrate
the filter band of the channels, one to calibrate the amplifier gain, and
one to select the channels to record and start acquisition. Their payload
encodings belong to the chip and are not part of this RTL.

## Recording path

### Frame format on `Dout`

```
 85 bits, MSB first:
 | preamble 8 | mode 2 | row/col id 6 | ch0 8 | ch1 8 | ... | ch7 8 | CRC 5 |
              \________________ 72-bit information packet ______/
```

Each frame carries one 8-bit sample of each of the 8 channels of one row
(or column) of the array. In *static* tracking the id stays fixed: one row
is recorded at 30 kS/s per channel. In *sweep* tracking the id runs over
the 8 rows: the whole array is recorded at 4 kS/s per channel.

### Write control (4 MHz)

`write_ctrl` samples `Dout` on every rising edge of `clk4m`. While hunting,
it compares the last 8 bits received with `PREAMBLE` (default `8'hB8`, set
it to the chip's actual value). On a match it counts in the next 77 bits
and writes them into the current slot as ten bytes:

| Byte | Contents |
|---|---|
| 0 | `{mode[1:0], id[5:0]}` |
| 1–8 | samples of channels 0–7 |
| 9 | `{3'b000, crc[4:0]}` |

Each byte is written as soon as it is complete. The write port is
registered, so a byte lands one master clock after its last bit. With the
write of byte 9 the unit flips `toggle`, which selects the other slot for
the next frame and tells the read side that a frame is ready. Then it hunts
again; frames may follow each other with no gap. The CRC is not checked in
the FPGA. It travels to the host, which can check it.

### Ping-pong slots

`pingpong_buf` holds two `mem_slot`s of ten bytes, each a small
dual-clock RAM (write on `clk4m`, registered read on `clk50m`). A
demultiplexer steers the write port by `toggle`. A multiplexer picks the
read data by `rd_slot`, which is delayed one cycle to line up with the
registered read. While one slot fills, the other is read.

### Read control and FIFO (50 MHz)

`read_ctrl` synchronises `toggle`. On a change it reads the ten bytes of
the slot that has just been completed (the one `toggle` no longer points
at) and pushes them into `fifo_ram`, two cycles per byte. This takes about
25 FPGA cycles, against 1062 FPGA cycles for one 85-bit frame, so the slot
is always free long before the writer comes back to it.

The FIFO holds `FIFO_DEPTH` bytes (2048 by default, one Spartan-3E block
RAM). It is first-word-fall-through: the head byte is always on `rd_trf`.
A frame is only copied if the FIFO has room for all ten bytes. Otherwise it
is skipped whole and counted. The host therefore always sees whole frames,
aligned on 10-byte boundaries, and can tell from `REG_DROP` how many frames
it missed.

## Host interface

The host runs EPP-style cycles. It sets `wr` (low = write), drives `db` for a
write, and pulls `astb` (address cycle) or `dstb` (data cycle) low. It then
waits for `wt` to rise, releases the strobe, and waits for `wt` to fall. The
strobes pass two-flop synchronisers, so `wt` answers 3–4 FPGA cycles after
each strobe edge. During a read cycle `db_oe` is high while `wt` is high.

| Address | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | `REG_CMD2` | R/W | command bits 23:16 |
| 0x01 | `REG_CMD1` | R/W | command bits 15:8 |
| 0x02 | `REG_CMD0` | R/W | command bits 7:0; a write sends the command |
| 0x03 | `REG_FIFO` | R | next recorded byte (popped); 0x00 when empty |
| 0x04 | `REG_STATUS` | R | `{5'b0, cmd_busy, fifo_full, fifo_empty}` |
| 0x05 | `REG_LVL_LO` | R | FIFO level, bits 7:0 |
| 0x06 | `REG_LVL_HI` | R | FIFO level, bits 15:8 |
| 0x07 | `REG_DROP` | R | frames dropped on a full FIFO, mod 256 |

An address cycle that reads returns the address register. The addresses are
defined in `nrec_pkg::reg_addr_e`.

A typical recording loop: read the level; if it is at least 10, read
10 × ⌊level/10⌋ bytes from `REG_FIFO`; split them into frames.

## Rates

| Configuration | Frames/s | Bits/s on `Dout` | FIFO bytes/s |
|---|---|---|---|
| whole array, 64 ch × 4 kS/s (sweep) | 32 000 | 2.72 M | 320 k |
| one row, 8 ch × 30 kS/s (static) | 30 000 | 2.55 M | 300 k |
| capacity of the capture logic | 47 058 | 4 M | — |

The host must drain at least the FIFO rate on average. The 2048-byte FIFO
holds 204 frames, about 6.4 ms at the highest rate.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `neural_fpga_if` | `F_IN_HZ` | 50 000 000 | FPGA clock |
| | `F_OUT_HZ` | 4 000 000 | ASIC master clock |
| | `FIFO_DEPTH` | 2048 | bytes |
| | `PREAMBLE` | `8'hB8` | data-frame preamble; must match the chip |
| `piso` | `W` | 24 | command length |
| `fifo_ram` | `DEPTH`, `W` | 2048, 8 | |
| `mem_slot`, `pingpong_buf` | `DEPTH`, `W` | 10, 8 | one frame per slot |

The frame and command field widths are constants in `nrec_pkg`.

## What follows the original system and what is this design's own

From the original system: the split into a logic control module and a data
recording module; the blocks and their signal names (USB interface, command
controller, PISO, DFF sync, frequency divider, write control, two memory
slots, read control, FIFO); the 24-bit command of 5 + 14 + 5 bits; the 85-bit
data frame of 8 + 72 + 5 bits, with its 2-bit mode, 6-bit id and eight 8-bit
samples sent MSB first; the 4 MHz master clock divided from 50 MHz; `en_trf`
raised only once the PISO holds valid data and kept high while it is
emptied; frames written alternately into two slots and signalled by a
toggle; bytes moved to a FIFO in 8-bit slots by a 50 MHz read unit; and the
two tracking configurations and their rates.

This design's own choices:
* the fractional divider (12/13-cycle periods);
* the clock-domain crossings: the toggle load request, the synchronisers, and
  `en_trf` gated by the PISO's bit count;
* the stretched reset;
* the EPP cycle details and the whole register map;
* the value of the data preamble (a parameter);
* storing the frame as ten bytes, with the CRC passed on unchecked;
* the FIFO depth, its fall-through read, and dropping whole frames when it
  lacks room.

Where the original system gives conflicting clock figures, this design
follows 50 MHz for all FPGA logic. One account mentions a 40 MHz clock for
the USB state machine and the command controller; the block diagrams and
the divider use 50 MHz. The USB bridge is described as having five control
signals. Only four (`astb`, `dstb`, `wr`, `wt`) are used here; a fifth, such
as a bridge reset or interrupt, can be added in the board wrapper if the
bridge needs one.

The chip itself is not part of this RTL: its analog front ends, SAR ADCs,
spike detection and compression, digital processor and wireless link. Nor
are the chip's command payload encodings, its CRC polynomial or its
data-frame preamble value. The testbenches use a behavioural model of the
chip's serial port (`tb/asic_model.sv`) with encodings of their own.

## Simulation

All files are SystemVerilog-2017. Packages must be compiled first. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nrec_pkg.sv tb/nrec_tb_pkg.sv tb/tb_neural_fpga_if.sv \
    --top-module tb_neural_fpga_if
./obj_dir/Vtb_neural_fpga_if
```

Replace the testbench name to run another one. Every testbench checks the
block against values it computes itself, has a watchdog, and ends by
printing `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_neural_fpga_if` | the whole design at default sizes, with the chip model and an EPP host. It sends the three start-up commands (24-cycle windows; words arrive intact) and records in static mode at the 30 kS/s frame rate. It switches to sweep mode at 4 kS/s (all 8 ids). It overfills the FIFO (frames dropped whole, counted, and the stream resumes in order) and checks every frame byte and CRC. It counts each mechanism and fails if one never happened. It runs in well under a second. |
| `tb_tracking_workloads` | sustained recording, 300 frames in each of three phases: 8 channels at 30 kS/s, 64 channels at 4 kS/s, and back-to-back frames at the link limit. A host drains the FIFO continuously; no frame may be lost, and the measured frame rate must match the configured one. |
| `tb_usb_epp_if` | handshake timing, command assembly and `wr_req`, FIFO pops, status/level registers |
| `tb_cmd_controller` | load toggle, `en_pls` ordering relative to `valid`, busy, ignored requests |
| `tb_piso` | load latency, MSB-first order with stalls, `valid`/`last` |
| `tb_dff_sync` | `en_trf` latency and window length for 24 and other bit counts |
| `tb_freq_divider` | 200 rising edges per 2500 input cycles, 6/7-cycle phases, 12+13 pairs |
| `tb_write_ctrl` | preamble hunting through idle and noise, back-to-back frames, byte placement, toggle |
| `tb_mem_slot`, `tb_pingpong_buf` | dual-clock storage and slot steering |
| `tb_read_ctrl` | completed-slot selection, byte order, latency, whole-frame skip |
| `tb_fifo_ram` | random traffic against a queue model, full and empty |

`tb/nrec_tb_pkg.sv` holds the reference functions shared by the tests and
the chip model. The CRC is CRC-5 with x⁵ + x² + 1, initial value all ones,
MSB first. The sample values are a fixed arithmetic function of frame
number, channel and id, so any frame can be predicted.

## Trust and limits

* Every block has been simulated as above, and each testbench has been shown
  to fail on a deliberately broken copy of its block. Lint (Verilator
  `-Wall`) and elaboration (Yosys with the slang front end) are clean apart
  from unused-signal notices. Debug counters (`frame_cnt`, `frames_read`,
  `dropped`, `tick_out`) are not used by the top level.
* The clock-crossing logic has been checked only by simulation. Run your own
  CDC and timing analysis on the target. In particular, constrain the
  `mem_slot` read path and the `tx_data` bus as multicycle or false paths,
  since they are held stable by protocol.
* The chip-side timing (sample on the rising edge of `clk4m`) is assumed.
  Check it against the chip's datasheet, and move the `Din` launch to the
  falling edge if the chip samples on the falling edge.
