# Super-FGD synchronisation: Master Clock Board firmware and crate SYNC receivers

A large detector read out by hundreds of front-end boards (FEBs) needs every board to
agree on time. Here, 16 crates hold 14 FEBs each. A single Master Clock Board (MCB)
provides two things to every crate, over one RJ45 cable each, with all cables the same
length (a star network):

* **CLOCK**: a common 100 MHz clock, copied by an LVDS fanout. Everything in this design runs on it.
* **SYNC**: one serial line that carries all the slow timing information.
  * **GTRIG**: a time-stamp tick every 10 µs.
  * **FSYNC**: every 10th GTRIG.
  * **GRESET**: the global reset.
  * **READOUT_EN**.
  * **Spill gate**: which DAQ window is open.
  * **Spill number** of the beam.

Most of the time the SYNC line idles as a 1 MHz square wave. When there is something to
say, the MCB sends a 47-bit frame and then goes back to idling. Each crate decodes the
frame. It then delays the decoded signals by exactly the amount the frame itself was
late. As a result, every GTRIG reaches every board at the same fixed latency after the
MCB produced it, even when it had to wait behind another frame.

This repository holds synthesizable SystemVerilog for:

* the MCB firmware: slow control over a UART, the beam trigger state machines, the
  spill gate selection, the GTRIG/FSYNC time base and the SYNC encoder;
* the crate-side SYNC-IN receiver: the decoder, the gating controlled by slow-control
  parameters, the local spill counter and the sync-check LEDs;
* a front-end board's SYNC encoder in MCB emulation, for set-ups without an MCB;
* a top level, `sfgd_sync_system`, that connects one MCB to 16 receivers.

Chips on the board are not modelled as logic, because they have no logic function here
or their configuration is not known:
* the clock cleaner;
* the TDC;
* the Ethernet PHY;
* the level translators;
* the LVDS fanout buffers;
* the PLLs.

The top takes the cleaned 100 MHz clock and the receivers' PLL lock as inputs, and
brings out the clock fanout enable and the 16 SYNC outputs. The TDC and the Ethernet
link have no counterpart; slow control runs over the UART.

## The SYNC line

### Bit level

The line is pseudo-NRZ, at `BIT_CLKS` = 10 clock cycles per bit (10 Mbit/s at 100 MHz).

* **Idle.** The line holds 5 bits high, then 5 bits low (`IDLE_HALF_BITS`), which gives
  the 1 MHz idle square wave.
* **Why idle cannot look like a frame.** Idle never contains three alternating bits. So
  it can never contain either start-of-frame pattern, and a receiver needs no other
  framing.
* **Bit recovery.** A receiver sees the line on the same clock as the transmitter. It
  recovers bits by restarting a bit-phase counter at every edge of the line and sampling
  in the middle of the bit.

### Frame

A frame is five 9-bit words followed by an end-of-frame of two zeros: 47 bits, or 4.7 µs.

* **Word layout.** Each word carries 8 payload bits, most significant first, then an odd
  parity bit. The parity makes the number of ones in the 9-bit word odd.

| word | payload bits (first sent → last)                             |
|------|--------------------------------------------------------------|
| 0    | SOF[3:0], GTRIG, FSYNC, READOUT_EN, DAQ_TYPE[2]              |
| 1    | DAQ_TYPE[1:0], COMP_DELAY[5:0]                               |
| 2    | 1 0 1 1 0 (fixed), LED_SYNC, GRESET, SPILL_NB_AV             |
| 3    | SPILL_NB[15:8]                                               |
| 4    | SPILL_NB[7:0]                                                |
| EOF  | 0 0                                                          |

* **SOF.** The start-of-frame is `1011` if the line was low just before the frame, and
  `0100` if it was high. Including the level before it, a receiver therefore always sees
  `01011` or `10100`, and hunts for exactly those two 5-bit patterns.
* **Checks on receipt.** A frame is accepted only if all five parities are correct, the
  fixed bits of word 2 read `10110`, and the EOF is `00`. Otherwise it is dropped, and
  `frame_err` pulses.
* **DAQ_TYPE** tells which DAQ window is open:

  | value | window        |
  |-------|---------------|
  | 0     | none          |
  | 1     | beam          |
  | 2     | cosmic        |
  | 3     | beam + cosmic |
  | 4     | full          |
  | 5     | WAGASCI       |
  | 6     | external      |

  The crate's spill gate is `DAQ_TYPE != 0`.
* **Spill number.** When `SPILL_NB_AV` is 0, the spill number field carries the balanced
  filler `0xCCCC`.

### When frames are sent (`mcb_sync_encoder`)

The encoder sends a frame for two kinds of event:

* every GTRIG tick;
* every *spill event*, which is any change of the DAQ type or of the spill number.

A spill-event frame has GTRIG = 0. A GRESET request is held until the next GTRIG frame
carries it, so GRESET always coincides with a GTRIG.

An event can arrive while a frame is already on the line. The encoder then remembers how
many bit periods the event waited (0…63) and sends that count as COMP_DELAY.

### Fixed latency (`feb_sync_decoder`)

This is the least obvious part of the design. The receiver holds each good frame for
(63 − COMP_DELAY) bit periods before releasing its fields. Every event therefore leaves
the receiver a constant 47 + 63 bit periods after the MCB produced it, plus a few cycles
of pipeline, whether or not it had to queue. Decoded GTRIGs stay exactly 1000 cycles
apart, even when a GTRIG waited behind a spill frame.

A frame takes 47 bit periods and may be held up to 63. The next frame can therefore
finish while the previous one is still held. For that reason the decoder has two hold
slots. Each slot counts down on its own and releases its frame in order.

The outputs behave as follows:

* **Pulses:** GTRIG, FSYNC and GRESET last one cycle.
* **Levels:** READOUT_EN, DAQ_TYPE, the spill gate, LED_SYNC, SPILL_NB_AV and SPILL_NB
  are registered levels, updated when a frame is released.

## The MCB firmware (`mcb_fpga`)

```
 uart_rx ─► uart_wrapper ─► serial_decoder ─► slow_ctrl_regs ──┐ cfg ('e'), 'r'
 uart_tx ◄─┘ (FIFOs)            ▲ spill number                  │
 nim_in0 ─► sync ─► trigger_sm (1 pulse) ─► beam/cosmic/full ───┤
 spill_nb_in ──────►   └ latched spill nb ─┐                    ▼
                        spill_counter ─────┴► spill nb ─► daq_mode_selector ─► sma_out0
 wg_beam_daq, wg_int_daq, nim_in1 ─► sync ───────────────────────┘      │ daq_type
                       gtrig_gen (10 µs, FSYNC /10) ───────► sync_encoder ─► sync_out
```

### Time base (`mcb_gtrig_gen`)

The time base produces a GTRIG tick every `GTRIG_PERIOD` = 1000 cycles (10 µs) and marks
every `FSYNC_DIV` = 10th tick as FSYNC.

The 10 µs period is chosen to be shorter than the 10.24 µs wrap-around of the FEBs'
timing counters, which are 12 bits at 400 MHz.

### One-pulse trigger state machine (`mcb_trigger_sm`)

A rising edge of the beam trigger (NIM IN0, synchronised) starts one spill. All times are
counted from the trigger:

| window / action     | starts      | lasts                 | parameter                    |
|---------------------|-------------|-----------------------|------------------------------|
| beam DAQ            | immediately | 60 µs                 | `BEAM_CYC`                   |
| full DAQ            | immediately | 1.986 s               | `FULL_CYC`                   |
| spill number latch  | after 4 µs  | one sample            | `LATCH_CYC`                  |
| cosmic DAQ          | after 20 ms | 1.966 s               | `COSMIC_START`, `COSMIC_CYC` |

* **Spill number.** The beam-line spill number is not synchronised. It is assumed stable
  4 µs after the trigger, and is sampled then.
* **Retriggering.** A trigger that arrives during a spill is ignored.
* **Why seconds.** The full and cosmic windows are taken in seconds. With them, 20 ms +
  1.966 s = 1.986 s, which closes both windows together inside the roughly 2.48 s beam
  cycle. One passage of the specification gives these two durations in microseconds.

### Spill number

The spill number sent in the frame comes from one of two sources:

* the latched beam-line number;
* `mcb_spill_counter`, a 16-bit counter of accepted triggers. A slow-control command
  clears it.

### Spill gate selection (`mcb_daq_mode_selector`)

A 3-bit mode picks the spill gate. SMA OUT0 always shows the selected gate.

| mode | gate                                     |
|------|------------------------------------------|
| 0    | none                                     |
| 1    | beam                                     |
| 2    | cosmic                                   |
| 3    | beam OR cosmic                           |
| 4    | full                                     |
| 5    | WAGASCI (beam DAQ OR internal DAQ input) |
| 6    | NIM IN1                                  |
| 7    | none                                     |

The frame's DAQ_TYPE equals the mode while the gate is open and "spill on RJ45" is
enabled. Otherwise it is 0.

### Beam/internal spill state machine (`mcb_ccc_trigger_sm`)

This is the counter-based controller used on the beam line, which the specification
names as the model for the MCB trigger state machine. It is built as a block of its own, with its own ports in the top. It
does not drive the SYNC line.

One trigger line carries both the pre-beam trigger and the beam trigger, 100 ms apart. A
prescaler gives a 4 µs tick. The machine has four states:

* **IDLE.** A trigger moves it to READY_TO_BEAM.
* **READY_TO_BEAM.** It counts ticks.
  * A trigger after at least 15 ticks (60 µs) moves it to BEAM_ACQ.
  * Without one, it returns to IDLE after more than 30000 ticks (120 ms).
* **BEAM_ACQ.** The beam gate is open for 15 ticks (60 µs). Then it moves to INTERNAL.
* **INTERNAL.** It opens six internal spills of 60 µs each, 260 ms apart. The first
  opens 100 µs after the beam gate opened (40 µs after it closed).
  * It counts the trailing edge of each spill, then returns to IDLE.
  * A new trigger ends the series early and moves it to READY_TO_BEAM.

The timeout and the early end of the internal series are the two *unexpected* transitions.
Each raises a one-cycle `unexpected` pulse, which a host can report as an error.

### Slow control (UART, `mcb_serial_decoder`, `mcb_slow_ctrl_regs`)

The UART runs at 115200 baud (8N1, `CLKS_PER_BIT` = 868) and has 16-entry FIFOs in each
direction. Commands are ASCII, with arguments in hexadecimal:

| command  | answer               | effect |
|----------|----------------------|--------|
| `x`      | `x`                  | link reset. It is accepted at any point and abandons a half-received command. |
| `e`*xx*  | `e`*xx*              | encoder byte, described below |
| `r`*xx*  | `r`*xx*              | readout byte, described below |
| `s00`    | `s`*xxxx*            | returns the current spill number |
| anything else | `y01`           | unknown command |
| bad hex digit | `y02`           | invalid argument |

CR and LF between commands are ignored.

The encoder byte `e` configures the MCB:

| bits | meaning                                                          |
|------|------------------------------------------------------------------|
| 7..5 | gate mode                                                        |
| 4    | 1 = internal spill counter, 0 = beam-line spill number           |
| 3    | spill gate and spill number on RJ45 (this also sets SPILL_NB_AV) |
| 2    | FSYNC on RJ45                                                    |
| 1    | clock out                                                        |
| 0    | SYNC out. GTRIG frames follow automatically.                     |

The readout byte `r` controls readout and resets:

| bit | meaning                                                        |
|-----|----------------------------------------------------------------|
| 0   | READOUT_EN (a level)                                           |
| 1   | one GRESET pulse per write with the bit set                    |
| 4   | one clear of the internal spill counter per write with the bit set |

## The crate side (`feb_sync_in`)

Each crate runs `feb_sync_decoder` on its copy of SYNC, then applies four slow-control
parameters:

* **`readout_en_en` and `greset_en`** pass READOUT_EN and GRESET through (logical AND).
* **`gtrig_only_on_spill`** suppresses GTRIG while the spill gate is closed.
* **`ext_spill_nb_sel`** chooses the spill number source:
  * the number received in the frame;
  * a local counter of spill-gate openings. `spill_cnt_reset` clears it.

`feb_sync_check` watches the decoded stream:

* GTRIG is *in step* when it arrives exactly every `GTRIG_PERIOD`.
* FSYNC is *in step* when it arrives on every 10th GTRIG.

The sync LED shows the result:

| state                      | LED period | half period        |
|----------------------------|------------|--------------------|
| GTRIG and FSYNC in step    | 100 ms     | `LED_FAST_HALF`    |
| only GTRIG in step         | 400 ms     | `LED_SLOW_HALF`    |
| GTRIG not in step          | off        | —                  |

A second LED follows the spill gate. The receiver is held in reset until its PLL reports
`locked`.

## A front-end board as SYNC source (`feb_mcb_emulator`)

In a set-up without a Master Clock Board, one front-end board can drive the SYNC line
itself. It reuses the MCB's time base and encoder, so the frames and the timing are
identical. The frame fields come from three external inputs and from parameters:

| field      | source                                                  |
|------------|---------------------------------------------------------|
| GRESET     | (external GRESET AND `MCBExtGresetEn`) OR `MCBGreset`   |
| READOUT_EN | (external GSTART AND `MCBExtReadoutEn`) OR `MCBReadoutEn` |
| spill gate | external GSPILL AND `MCBExtSpillGateEn`                 |
| FSYNC      | divider AND `MCBFSyncEn`                                |

* `MCBSyncEn` and `MCBClkEn` enable the SYNC and CLK outputs.
* A rising edge of GRESET requests one GRESET, which goes out with the next GTRIG.
* An open gate is sent as DAQ type 1.
* There is no spill number, so the frame carries the 0xCCCC filler.

## Top level (`sfgd_sync_system`)

The top contains:

* one `mcb_fpga`;
* its SYNC output copied to `NUM_CRATES` = 16 crate outputs;
* one `feb_sync_in` per crate;
* the beam/internal spill state machine, with a two-flip-flop input synchroniser;
* the MCB-emulating front-end encoder, with its own SYNC output (`emu_sync_out`).

All crates share one clock and one set of FEB parameters. In the real system, each
receiver stands for the 14 boards behind a crate's backplane. The clock fanout and the
cable delays are not modelled, because the star network gives every crate the same
delay.

## Where this design goes beyond the specification

These choices are this design's own. The specification leaves them open:

* **Link settings:**
  * the SYNC bit rate, 10 cycles per bit;
  * the UART baud rate and FIFO depth;
  * the error codes `01` and `02`.
* **Encoding details:**
  * the bit order within a word;
  * the parity convention, which includes the SOF bits;
  * the meaning of COMP_DELAY, which counts bit periods waited.
* **Event rules:**
  * what counts as a spill event;
  * that the internal spill counter counts accepted beam triggers;
  * that retriggers during a spill are ignored.
* **The combining logic on the crate side and in the MCB emulator.** It is read from
  the parameter names.
* **The tick prescaler of the beam/internal spill state machine**, which keeps its 4 µs
  count period on the 100 MHz clock.
* **Mapping the WAGASCI gate to the OR** of its two inputs.

Where the specification contradicts itself, the reading that fits the rest of it was
chosen:

* the 47-bit frame, rather than "5 × 8 bits";
* seconds rather than microseconds for the long windows;
* 120 ms rather than 150 ms for the ready-to-beam timeout;
* bit 4 of `e` meaning internal counter when set.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv` (the UART receiver,
transmitter and FIFO are tested inside `tb_mcb_uart_wrapper`). Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --top-module tb_sfgd_sync_system -y rtl +libext+.sv \
          rtl/mcb_pkg.sv tb/tb_sfgd_sync_system.sv -o sim && ./obj_dir/sim
```

**`tb_sfgd_sync_system`** is the end-to-end test. It shortens the trigger windows and
the UART bit time, but keeps the GTRIG period, FSYNC divider and SYNC bit rate at their
real values. Through UART commands and the inputs of the side-by-side blocks it drives:

* every gate mode;
* GRESET and READOUT_EN;
* both spill number sources and the counter reset;
* the 0xCCCC filler;
* GTRIG suppression outside the spill;
* SYNC disable and recovery;
* the link reset and an error answer;
* the beam/internal spill state machine through a timeout, a full cycle and an
  interrupted cycle;
* the MCB-emulating front-end encoder through its GRESET, GSTART and GSPILL inputs.

Every cycle it checks three things:

* all 16 crates decode identical signals;
* decoded GTRIGs stay exactly 1000 cycles apart;
* no frame is rejected.

It also fails if any of these mechanisms never occurred.

**`tb_sfgd_full`** runs the top with every parameter at its default. Over the UART it
selects mode 3 (beam OR cosmic) with READOUT_EN on, then takes one beam spill end to
end:

* the trigger;
* the 60 µs beam gate and the 1.966 s cosmic window arriving at all crates;
* the latched beam-line spill number;
* the gate closing after 1.986 s.

It also checks that GTRIG arrives exactly every 10 µs at every crate, that FSYNC comes
on every 10th GTRIG, and that the LED blinks with a 100 ms period. At the same time the
beam/internal spill state machine runs its full cycle at its defaults:

* a pre-beam trigger, then the beam trigger 100 ms later;
* the 60 µs beam acquisition;
* six 60 µs internal spills 260 ms apart, the first 100 µs after the beam gate opened;
* the return to idle, with no unexpected procedure reported.

The whole run is about
2×10⁸ cycles, a few minutes of simulation.

To adapt the design, change the parameters of `sfgd_sync_system`. The SYNC bit rate
(`BIT_CLKS`) must be the same on both sides, and a frame (47 × `BIT_CLKS` cycles) must
fit inside `GTRIG_PERIOD`.
