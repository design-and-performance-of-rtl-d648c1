# Laser-calibration DAQ crate: monitoring boards and readout controller

The laser calibration of the Muon g-2 calorimeters needs the light of every laser shot
measured by reference photodetectors: PIN diodes and PMTs in the source monitor, and PMTs in
the local monitor. This RTL is the digital part of the data acquisition for those detectors. It
covers one crate: up to 12 **monitoring boards** (MB), each with three analog input channels,
and one **readout controller** on a shared backplane.

Each channel self-triggers on its own pulses. It measures each pulse's baseline and peak with
a 14-bit ADC and stores a 16-word frame in a local FIFO. Data is read out once per
accelerator **subcycle**, which lasts about 10 ms and is opened by a **begin-of-fill (BOF)**
signal:

1. On each BOF, every board builds one **board event**. It gathers all frames of the subcycle
   just ended from its three channel FIFOs. A frame belongs to that subcycle if it carries the
   same BOF number.
2. Each board sends its event to the controller on its own 10 Mbit/s serial line.
3. The controller waits until every enabled board has delivered the event for the same BOF
   number.
4. It then concatenates them into one **crate event** and pushes that into the USB
   microcontroller's slave FIFO, which serves the embedded CPU.

All control and monitoring goes through the same controller. A CPU instruction port reaches
the controller's own registers and, over a second serial line per slot, the registers of
every board. Full FIFOs are handled by a busy/veto path. Dead time is measured, and errors
are latched.

Everything is synchronous to one 40 MHz clock and written in SystemVerilog-2017. The whole
crate is one module: `laser_daq_crate`.

## Structure

```
laser_daq_crate
├── readout_controller
│   ├── ctrl_rx_slice  x NUM_MB   serial receiver, packet parser, checksum, receiver FIFO, RX monitor
│   ├── ctrl_builder              BUILDER FSM: BOF match across slots, crate event into builder FIFO
│   ├── sync_fifo                 builder FIFO (17-bit words: data + last flag)
│   ├── usb_fx2_if                USB interface FSM (slave FIFO write side)
│   ├── op_decode                 OP-Decode: CPU instruction → register / board command
│   ├── ctrl_tx                   TX FSM + NUM_MB serial transmitters (commands to boards)
│   └── ctrl_run                  BOF distribution, sync, veto, dead time, error latch
└── monitoring_board  x NUM_MB
    ├── fe_channel  x 3           one input slice ("FE-FPGA" function)
    │   ├── trigger_logic         Th1/Th2 discrimination, gate, peak-and-hold reset, pulse type
    │   ├── adc_readout           circular buffer, baseline and peak averages
    │   ├── frame_assembler       16-word frame per pulse
    │   ├── sync_fifo             front-end FIFO, 16384 words = 1024 frames
    │   └── hv_control            serial load of the 12-bit HV DAC
    ├── mb_builder                board-level event building with BOF matching
    ├── sync_fifo  x 2            builder FIFO (data) and descriptor FIFO (one entry per event)
    ├── mb_uplink                 event / register-reply sender (uart_tx)
    ├── mb_cmd                    command receiver (uart_rx) and register file
    └── calib_ramp                calibration DAC ramp sequencer
```

`daq_pkg` holds every shared constant and type: word widths, markers, register maps, the
pulse-type enum, and the CPU instruction struct.

The analog parts are outside this RTL. That means the preamplifier, the shaper, the baseline
restorer and the peak-and-hold, plus the discriminators, the ADC and the HV/temperature
readback ADCs. The calibration and HV DACs, the USB microcontroller and the CPU are also
outside. The top brings their digital signals out as ports:
- the two comparator outputs per channel;
- the 14-bit ADC samples;
- the peak-and-hold reset;
- the HV DAC serial pins;
- five slow-control readback words per channel;
- the calibration DAC code;
- the instruction/response port;
- the slave-FIFO pins.

## Input slice: from a pulse to a frame

**Trigger.** `trigger_logic` synchronises the Th1 and Th2 comparator outputs through two
flops. A rising edge of Th1 gives `trig` on the 4th clock edge after the comparator rises.
This only happens when the slice is armed and the veto is low.
- `trig` opens a 40-cycle acquisition gate (1 µs).
- `ph_reset` is high except during the gate, so the peak-and-hold follows the input until a
  trigger freezes its maximum.
- At the end of the gate, the pulse is classified:
  - calibration, in calibration mode;
  - otherwise laser if Th2 fired during the gate (simulation, in simulation mode);
  - americium if only Th1 fired.
- Th1 must fall before the slice re-arms.

**Measurement.** `adc_readout` writes every sample into a 64-entry circular buffer. At a
trigger it computes two averages:
- the **baseline**: the 16 samples that end 4 samples before the trigger;
- the **peak**: the 16 samples starting 24 samples (600 ns) after it.

Both are sums shifted right by 4. The results are ready 41 cycles after `trig`.

**Frame.** `frame_assembler` writes one 16-word frame per pulse:

| word | content |
|---|---|
| 0 | BOF number at the trigger |
| 1 | trigger number since sync |
| 2 | `{full, almost_full, 6'b0, dropped[7:0]}` |
| 3–5 | HV DAC code, HV voltage, HV current |
| 6–8 | temperatures: module, preamplifier, ambient |
| 9 | `16'hFE00 \| channel` |
| 10 | FIFO fill level when the frame was written |
| 11 | `{type[1:0], channel[1:0], pulse number in subcycle[11:0]}` |
| 12, 13 | timestamp, in clock cycles since the last BOF (high, low) |
| 14 | baseline |
| 15 | peak |

Words 11–15 are the five **pulse words** that travel on to the board event.
- A frame is written only if the FIFO has room for all 16 words. Otherwise it is dropped and
  counted in word 2 of later frames.
- The slice raises **busy** when its FIFO is within 15 words of full. Busy goes through the
  controller's veto and stops new triggers on every board of the crate.

## Board event building and BOF matching

This is the part that takes the most care.

The board counts BOFs in `bof_num`, which `sync` clears. Every frame carries the count that
was current at its trigger. When BOF number *k+1* arrives, the count moves to *k+1*, and
`mb_builder` is started with **target = k**, the subcycle that just closed. For each channel
in turn:

- **head == target**: the frame belongs to this event. Its 11 header words are skipped and
  its 5 pulse words are copied to the builder FIFO, one word per clock.
- **head older than target**: a frame left behind, for example from a subcycle whose readout
  was cut short. It is dropped and counted as a **mismatch**. The board's error line latches.
  The ordering is a signed 16-bit difference, so the BOF counter may wrap.
- **head newer than target**, or an **empty FIFO** while the slice is idle: this channel is
  finished. The next channel follows.
- **empty FIFO while the slice is still measuring or writing a frame**: the builder waits.
  This way a pulse that straddles the BOF is not split.

After the third channel, a descriptor `{target, data-word count, status}` goes into a
16-entry descriptor FIFO. A BOF that arrives while a build is running is remembered (one
deep) and starts the next build. The builder reads one FIFO word per clock. Emptying three
full front-end FIFOs (3 × 1024 frames) therefore takes 1.23 ms.

`mb_uplink` turns each descriptor into a **board event** on the serial line:

| word | content |
|---|---|
| 0 | `{8'hEB, 4'b0, slot}` |
| 1 | BOF number (the target) |
| 2 | N, number of data words (5 per pulse) |
| 3 | builder status `{mismatch in this event, 7'b0, mismatch count}` |
| 4–6 | HV DAC code of channels 0–2 |
| 7–9 | HV voltage readback |
| 10–12 | HV current readback |
| 13–21 | temperatures, 3 per channel |
| 22 | configuration word (a free register, e.g. source- or local-monitor firmware) |
| 23 | control register |
| 24 … 23+N | pulse words, channel 0 first, each channel in time order |
| 24+N | checksum: XOR of all preceding words |

An event is sent on every BOF, even with no pulses (N = 0). The controller relies on this to
pair up the boards.

A register reply, `{8'h5C, 4'b0, slot}, address, data`, is sent between events. It never
interrupts one.

## Serial backplane links

Each slot has two dedicated lines, one in each direction, in an RS-232-like format:
- start bit, 8 data bits sent LSB first, stop bit;
- 4 clocks per bit, i.e. 10 Mbit/s;
- a 16-bit word is two characters, high byte first, so one word takes exactly 80 clock cycles
  (2 µs);
- the line idles high.

If a receiver sees no character for 16 bit times, it drops a half-received word. A bad stop
bit gives `frame_err`.

Commands from the controller are two words: `{op[3:0], addr[11:0]}` and then data.
- `op` is 1 for write and 2 for read.
- A read makes the board send a register reply.

Board registers (`REG_*` in `daq_pkg`):

| address | register |
|---|---|
| 0–2 | HV DAC code per channel |
| 4 | control: bit 0 calibration run, bit 1 simulation mode, bit 2 start the calibration ramp (self-clearing) |
| 5–8 | ramp: number of waveforms, maximum code, step, gap |
| 9 | configuration word |
| 0x10 | status, read only |
| 0x20 + 8·ch + i | slow-control words, read only |

A changed HV code is shifted out to the 12-bit DAC by `hv_control`. This is a 16-bit SPI-style
write, MSB first, with data valid on the rising `sclk`.

## Controller: receive, match, build

**Receive.** Each `ctrl_rx_slice` parses its board's line.
- Event words go into the slice's receiver FIFO as they arrive. The default is 8192 words, so
  one 210-pulse event fits.
- The checksum is verified at the end. A record `{BOF, length, ok}` is then pushed into a
  16-entry info FIFO.
- The length is the number of words actually stored. Normally that is 24 + N. After a
  receiver-FIFO overflow it is fewer, so the builder never waits for a lost word.
- A bad checksum, a framing error or an overflow clears `ok` and increments the slot's RX
  error counter.
- A packet that arrives while the info FIFO is full is not stored at all, so no words are
  ever left without a record.
- Header words 3–23 of the latest event are kept as the slot's **RX monitor** registers.
- Register replies go to a separate one-deep holding register.

**Match and build.** `ctrl_builder` waits until every enabled slot has an info record, then
compares their BOF numbers.
- **All equal**: it writes the crate event into the 16384-word builder FIFO, one word per
  clock.
- **Different**: the packet with the oldest BOF is popped and discarded, `bof_err` pulses,
  and the comparison is repeated. `bof_err` feeds the controller's error latch. This is how a
  board falls back into step after it was late, or after its slot was enabled while the board
  was still sending the packet of an earlier subcycle.

Crate event format (17-bit FIFO words; bit 16 marks the last word):

| words | content |
|---|---|
| 0 | `{8'hCA, 4'b0, number of boards}` |
| 1 | BOF number |
| 2, 3 | total words in the event, high and low; total = 5 + Σ(3 + len) |
| per enabled slot, in slot order | `{8'hB0, 4'b0, slot}`, len, `{15'b0, ok}`, then the board's 24 header and N data words (no checksum) |
| last | `16'hCAE0` |

Packets from slots that are not enabled are discarded as they arrive. A slot enabled later
therefore starts with current data.

**USB.** `usb_fx2_if` writes one word per clock into the microcontroller's slave FIFO while
`full_n` is high. Its outputs are combinational, so no word is written into a full FIFO. After
the flagged last word it pulses `pktend_n` to commit the packet.

## Controller: run control and CPU access

`ctrl_run` distributes BOF, sync and veto.
- **BOF**: the BOF input is synchronised, and each rising edge becomes a one-cycle broadcast,
  but only while the run is enabled.
- **sync**: clears the BOF counters everywhere.
- **veto**: the OR of the enabled boards' busy lines and the controller's own busy (USB
  `full_n` low). Boards ignore triggers while it is high.
- **Dead time**: three 32-bit counters count cycles of board busy, of controller busy, and of
  either (total dead time).
- **Errors**: a rising edge on the wired-OR error line, or a BOF mismatch, latches the error
  flag with the BOF count and the busy lines of that moment, until the CPU clears it.

`op_decode` takes 32-bit instructions `{op[3:0], target[3:0], addr[7:0], data[15:0]}` and
answers each with one response word:

| op | action |
|---|---|
| `OP_WR_INT` / `OP_RD_INT` | controller registers, listed below |
| `OP_WR_MB` / `OP_RD_MB` | board register `addr` of slot `target`; target 15 is a broadcast write to all enabled slots. A read waits up to 4096 cycles for the reply, else `resp_err` |
| `OP_SYNC` | sync broadcast |
| `OP_ERR_CLR` | clear the error latch |

Controller registers:
- slot enable mask;
- run;
- BOF count;
- error;
- dead-time counters (high word at the even address);
- RX error count and RX monitor word of a slot (slot in `data[11:8]`, word in `data[4:0]`);
- crate events built.

`ctrl_tx` sends the command words on the selected lines.

## Calibration and simulation modes

`calib_ramp` drives the 14-bit calibration DAC with a sequence of ramps.
- Waveform *i* rises by 1 LSB per clock to min(*i*·step, max), then returns to 0 for `gap`
  cycles.
- Max is limited to 8191, positive codes of the offset-binary DAC.
- The sequence runs for `n_wave` waveforms.

While the sequence runs, or while the calibration-run bit is set, the board tags its pulses
as calibration. The simulation-mode bit tags laser-like pulses as simulation. This is for test
runs without beam, in which the laser fires following the expected muon-decay time profile.

## Where this design departs from, or adds to, the original system

- **Timestamp resolution.** The original timestamps have 10 ns accuracy. Here the timestamp
  counts 25 ns cycles of the single 40 MHz clock.
- **One clock.** The USB interface runs on the same 40 MHz clock as everything else.
- **Formats are this design's own.** These are:
  - the frame word order;
  - the 24-word board header layout;
  - the checksum;
  - the register maps;
  - the command and instruction encodings;
  - the crate event layout.

  The original describes what the headers contain, not the bit layout.
- **Serial framing.** The line format is 8N1 at 10 Mbit/s, two characters per word.
- **Veto.** It blocks triggers at every board. The trigger is not re-armed until Th1 falls.
- **BOF mismatch at the controller.** It discards the oldest packet and latches the error.
  The original only says that the packets of one BOF are matched, and that errors start a
  debug cycle.
- **Sustained peak rate.** 1000 pulses per channel per subcycle does not fit through a
  10 Mbit/s line in 10 ms: that is 30 ms per board event. Such a 15,024-word packet would
  also not fit in an 8192-word controller receiver FIFO, which must hold a whole packet
  before the crate build starts. The front end and the board builder absorb the burst, and
  the busy/veto path throttles the rest. Rates in the range actually used fit
  comfortably:
  - 10–100 pulses per subcycle;
  - up to 210 in the largest measured load, 6.35 ms of line time per board.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops at a watchdog. The behavioural models they share
are:
- `fe_analog_model`: shaped pulse, comparators, peak-and-hold and ADC;
- `fx2_fifo_model`: slave FIFO with programmable stalls.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_laser_daq_crate rtl/daq_pkg.sv tb/tb_laser_daq_crate.sv
./obj_dir/Vtb_laser_daq_crate
```

Replace the top module and file for any other testbench, e.g. `tb_mb_builder`. There are two
crate-level tests:

- `tb_laser_daq_crate` uses 2 boards with small FIFOs and runs five subcycles. It parses the
  whole USB stream against every pulse fired. It also counts that each mechanism happened at
  least once:
  - laser, americium, calibration and simulation pulses;
  - the calibration ramp;
  - HV programming and a register read;
  - a disabled board;
  - a BOF mismatch;
  - board-busy veto and blocked triggers;
  - USB stall;
  - dead-time counters;
  - sync.
- `tb_laser_daq_crate_full` uses the crate at its default size: 12 boards, 16384-word front
  ends and full buffers. It runs one subcycle with pulses on every board. The 12-board crate
  event reaches the USB port about 4,100 cycles after the BOF.

- `tb_daq_workloads` also uses the default-size crate, with 8 of its 12 slots enabled as in
  the local-monitor crate. It runs three loads: 20, 100 and 210 pulses per channel per
  subcycle. For each load it checks every pulse and that the crate event reaches the USB port
  within one 10 ms subcycle. The measured delays after the BOF are 0.74 ms, 3.48 ms and
  7.25 ms.

The simulator is assumed to be two-state. Every register that is read is reset.

## Parameters (defaults)

| parameter | default | where |
|---|---|---|
| `NUM_MB` | 12 | slots per crate |
| `FE_FIFO_DEPTH` | 16384 words (1024 frames, 32 kbyte) | per channel |
| `MB_BF_DEPTH` | 8192 words | board builder FIFO |
| `RX_DEPTH` | 8192 words | per controller receiver |
| `CR_BF_DEPTH` | 16384 words | controller builder FIFO |
| `CLKS_PER_BIT` | 4 (10 Mbit/s at 40 MHz) | serial links |
| `GATE_CYCLES` | 40 | acquisition gate |
| `PEAK_DELAY`, `N_AVG`, `BASE_GAP` | 24, 16, 4 | ADC readout |
