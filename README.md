# SEPT instrument FPGA

SEPT is a particle telescope for electrons and ions. One electronics unit has
four silicon detectors. Each detector has a centre segment and a guard ring,
and each is read by a front-end ASIC (the PDFE), which reports every particle
hit with its energy. The detectors form two telescopes: A is PDFE 0 and 1, B
is PDFE 2 and 3.

This FPGA sits between the four PDFEs and the spacecraft's instrument
processor (the SEP processor). It:

- switches and configures the PDFEs;
- filters their events for coincidence and anticoincidence;
- sorts each accepted event by energy into 24-bit counters;
- times fixed accumulation periods;
- reports anomalies (counter saturation, configuration errors, latch-ups) as
  interrupts.

All of this is controlled by one-byte commands over a plain asynchronous
serial line. The SEP processor runs an endless cycle:

1. start an accumulation;
2. wait for the timer interrupt;
3. read the interrupt register;
4. read and clear the four 32-bin histograms, the housekeeping values and a
   single-channel counter;
5. start again, exactly 60 s after the previous start.

The repository also holds two small processing units that belong to the
processor's side of the link:

- a 24-to-12-bit counter compressor;
- the "beacon" energy-window summation.

They are placed next to the FPGA in the top level, with their own ports.

## The serial command protocol

Most of the control logic lives here.

**Line format.** Each character is one low start bit, eight data bits
(least significant first), and two high stop bits. The FPGA runs on 4.5 MHz,
which it divides from an 18 MHz input. 4.5 MHz divided by 78 gives
57 692 baud. There is no flow control.

**Commands.** A command is one byte. Its low bits can carry parameters:

- `UU` is the PDFE number;
- `PP` is the telescope field: `10` = A, `01` = B, `11` = both, `00` = none;
- the remaining low bits are configuration enable bits.

Four commands also carry argument bytes:

| command | pattern | arguments | response data after the echo |
|---|---|---|---|
| cGetId | `00010100` | – | 1 byte, part id (`8'h11`) |
| cRstComm | `00010010` | – | – (drops a held input byte) |
| cRstFPGA | `00010001` | – | – (resets everything but the link) |
| cConfFiltr | `0011UU mm` | – | – (filter mode of PDFE UU) |
| cGetHK | `010000UU` | – | 4 housekeeping bytes `hk[4*UU .. 4*UU+3]` |
| cGetSingle | `01001cUU` | – | 3 bytes: count of the *previous* selection |
| cStartRun | `01100---` | – | – |
| cStopRun | `01101000` | – | – |
| cClearIrq | `01110000` | – | 2 bytes: interrupt register, then latched bits cleared |
| cPwrPDFE / cDrvPDFE / cEnPDFE / cCtrlPDFE | `1000 00/01/10/11 PP` | – | – |
| cConfPDFE | `100100UU` | 3 | – (bytes go to PDFE UU) |
| cStatPDFE | `10010100` | – | 1 byte: live error and latch-up lines |
| cConfCntr | `101000--` | 2 | – (accepted, no effect) |
| cInitCntr | `10101-UU` | – | – (clears both histograms of PDFE UU) |
| cRead32 | `101100UU` | – | 96 bytes: 32 counters, read and cleared |
| cRead256 | `101101UU` | – | 768 bytes: 256 linear counters, read and cleared |
| cSetTimer | `11010000` | 2 | – (ACC_TIME, ms) |
| cReadTimer | `11010001` | – | 2 bytes |
| cReadDate | `11010010` | – | 4 bytes: date A, date B |
| cConfCal | `111-----` | 3 | – (bytes go to the test generator port) |

**Responses.** Every command the FPGA accepts is echoed first. Its data
bytes follow the echo, and values longer than a byte are sent most
significant byte first. Two error replies are sent alone, without an echo:

- an unknown byte gets `00000011` (rUnknown);
- a command whose next argument byte comes more than 1.8 ms (8100 clocks)
  after the previous byte is dropped and gets `00001111` (rTimeOut).

**Timing of data and actions.** `cmd_ctrl` decides the order of events. In
the clock cycle a command is complete, it does two things at once:

- it captures the response data;
- it issues a one-cycle *action* (`sept_pkg::action_t`: opcode, command byte,
  argument bytes) to the rest of the FPGA.

The effects of the action follow one cycle later. So `cClearIrq` returns the
register as it was before it was cleared. `cGetSingle` returns the count of
the channel chosen by the previous `cGetSingle`, then switches the counter to
the new channel and restarts it. The processor relies on both behaviours in
its measurement cycle.

**Histogram reads.** `cRead32` and `cRead256` do not capture their data.
They stream it from a combinational read port of the histogram banks, three
bytes per counter. Each counter is cleared the moment its last byte is handed
to the transmitter. An event that lands in that counter in the same cycle is
kept: the counter restarts at 1.

**Bytes that arrive early.** The processor is expected to wait for the echo
before it sends the next command. A byte that arrives while a response is
still going out is held, one byte deep, and handled afterwards.

**BREAK.** An interrupt is also signalled on the serial line itself, by a
BREAK: twelve low bit periods, which no character can produce. The
transmitter sends it after the character in progress and ahead of any further
response byte. The separate interrupt line (`irq`) is asserted at the same
time.

## Events: filter, binning, counters

Each PDFE delivers, on `pdfe_clk` (the 4.5 MHz internal clock):

- a one-cycle event strobe `ev_valid`;
- an 8-bit energy code `ev_energy`, on a scale of 2200/255 keV per code;
- `ev_gr`, set when the detector's guard ring fired in the same cycle.

**Filter.** `event_filter` applies the two bits set by `cConfFiltr`:

- `10`, nominal mode, full anticoincidence: the event is rejected if its
  guard ring fired or the other detector of the telescope fired.
- `11`, calibration mode: the event counts only if the other centre segment
  fired in the same cycle and the guard ring did not. This keeps only
  particles that go through both detectors.
- `00` lets everything pass. `01` only requires the coincidence.

Only events of a telescope with event propagation enabled are counted, and
only during an accumulation. Event propagation counts as enabled when the
telescope's power, drive, enable and control lines are all on.

**Binning.** An accepted event increments two counters:

- a bin of the 32-bin logarithmic histogram. `log_binner` compares the code
  with 31 bin edges (`sept_pkg::LOG_EDGE`). The edges are the energy
  boundaries 17.25, 25.88 … 1915.3 keV divided by 8.627 keV: codes 2, 3, 4 …
  222. Bin 0 holds 0–17 keV; bin 31 holds everything above 1.9 MeV.
- a bin of the 256-bin linear histogram: the code itself.

**Counters.** Counters are 24 bits and saturate. The cycle a counter reaches
2^24−1, the saturation interrupt of its telescope is raised.

**Single counter.** Independently of the filter, `single_counter` counts
every hit on one selected channel: the main or guard-ring channel of one
PDFE.

## Timer, interrupts and dating

**Timer.** `acc_timer` counts milliseconds (4500 clocks) from `cStartRun`.
When it reaches ACC_TIME, the accumulation ends and the time-alarm interrupt
is raised. With 16 bits, ACC_TIME reaches 65.5 s, which is enough for a 60 s
cycle. `cStopRun` ends an accumulation without an alarm.

**Dating.** During an accumulation, the first anomaly of each telescope is
*dated*: the timer value at that moment is stored. Anomalies are counter
saturation, a PDFE configuration error, or a latch-up. `cReadDate` returns
the stored values for A and B, and `cStartRun` clears them.

**Interrupt register.** `irq_reg` holds the 16-bit register:

| bit | meaning |
|---|---|
| 0, 1 | event propagation enabled, A / B (live) |
| 2 | time alarm |
| 3, 4 | counter saturation, A / B |
| 5 | test generator sequence done (input `tg_done`) |
| 6, 7 | error or latch-up during an accumulation, A / B |
| 8–11 | configuration error of PDFE 0–3 |
| 12, 13 | analogue / digital latch-up, A |
| 14, 15 | analogue / digital latch-up, B |

Bits 2–15 latch. They clear on `cClearIrq`, unless their source is still
active. `irq` is high while any latched bit is set. Each newly set bit also
requests a BREAK.

**Latch-up.** A latch-up on either supply of a telescope removes that
telescope's power and drive at once. Only a new `cPwrPDFE` / `cDrvPDFE`
turns them back on.

## Module map

| file | role |
|---|---|
| `sept_pkg.sv` | opcodes, decoding, argument and response lengths, action struct, bin edges |
| `clk_div.sv` | 18 MHz → 4.5 MHz |
| `uart_rx.sv`, `uart_tx.sv` | serial receiver; transmitter with BREAK |
| `cmd_ctrl.sv` | command interpreter, time-out, echo and response streaming |
| `irq_reg.sv` | interrupt register, line, BREAK request |
| `acc_timer.sv` | accumulation timer and dating |
| `pdfe_ctrl.sv` | PDFE lines, configuration words, filter modes, latch-up switch-off |
| `event_filter.sv`, `log_binner.sv`, `histogram.sv`, `single_counter.sv` | event path |
| `sept_fpga.sv` | top level |
| `count_compressor.sv` | processor side: 24-bit count → 4-bit exponent + 8-bit mantissa, hidden leading one |
| `beacon_summer.sv` | processor side: sums of one PDFE's 32 bins over four energy windows |

**Compressor code.** Exponent 0 holds the values 0–255 exactly. Exponent
e > 0 stands for (256 + mantissa) << (e−1). The truncation error is under
1/256. Values above 8 372 224 saturate to `FFF`.

**Beacon windows.** The windows are set by five bin numbers b1–b5. The
defaults are 1, 5, 8, 13, 17 for electrons and 1, 8, 20, 30, 31 for ions.
They cover bins b1..b2−1, b2..b3−1, b3..b4−1 and b4..b5. A window is flagged
invalid if one of its counters is at full scale or the status input says so.

## Choices made where the specification is open

These points are this design's own choices and are the first places to look
when adapting it:

- **PDFE interface.** The ASIC's digital interface is not specified. Events
  use the strobe/energy/guard-ring signals described above, and coincidence
  means the same clock cycle. A configuration is offered to the PDFE as three
  bytes plus a write strobe, with no serial protocol. Housekeeping arrives as
  16 ready bytes.
- **Filter bits.** What each filter bit means is this design's reading. Only
  the two settings used in operation, `10` and `11`, are fixed.
- **cSetTimer.** It takes two argument bytes, and the timer unit is 1 ms.
- **cRstFPGA.** It resets everything except the serial link and the command
  interpreter, so its echo still goes out.
- **Command encodings.** `cEnPDFE` uses `100010PP` and `cCtrlPDFE` uses
  `100011PP`. Some operating sequences print both as `10001100`.
- **Not implemented:**
  - `cConfCntr` (mode and page) has no effect.
  - The commissioning use of `cInitCntr` bit 2 is ignored.
  - The test generator is not implemented. Its configuration bytes and
    completion flag are ports.
  - The 5-byte status word and the HK_T averaging for the heater are left
    to the processor's software. They only rearrange values the FPGA
    already returns.
- **Interrupt bits 6 and 7** latch like the others.
- **Beacon output.** The 16-bit beacon word format, and the sum over the four
  look directions, are not defined. `beacon_summer` stops at the full-width
  window sums.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/sept_pkg.sv tb/tb_cmd_ctrl.sv --top-module tb_cmd_ctrl -o sim && obj_dir/sim
```

`tb/tb_sept_fpga.sv` runs the whole FPGA at its default parameters. It plays
both the processor on the serial line and the four PDFEs, and goes through:

1. power-on and the nominal configuration;
2. a nominal and a calibration accumulation with random events, every
   histogram and counter read back and compared with its own model;
3. a genuine 24-bit counter saturation (2^24 events), with its dating;
4. a configuration error and a latch-up, and a read of the live PDFE status;
5. the two error replies, `cConfCal` and `cStopRun`.

It counts each mechanism, and it takes about 3 minutes of simulation (about
4 s of instrument time).

The top-level parameters are `CLKS_PER_BIT` (78), `ARG_TIMEOUT` (8100 clocks)
and `TICK_DIV` (4500 clocks per timer unit). Lower them to shorten
simulations.
