# TOFPET: 64-channel SiPM time and energy readout

This design is the digital part of a readout chip for time-of-flight PET
detectors. Each of its 64 channels watches one silicon photomultiplier
(SiPM) behind a scintillating crystal. For every gamma-ray event it records
two things:

- when the pulse began, with 50 ps bins;
- how long the pulse stayed over a second, higher threshold
  (time-over-threshold, ToT), which measures the energy.

The chip is built to use little power. A 160 MHz coarse counter gives the
coarse time. The fine time comes from slow analogue time interpolators, with
four of them per branch so that their dead time is hidden. A global
controller collects the events from all channels and packs them into frames
of 1024 clock cycles. It sends the frames over one or two serial links at 160
to 640 Mbit/s.

The amplifiers, discriminators, DACs and LVDS pads are analog. Here they are
ports of the top:
- **Inputs:** the two discriminator outputs of each channel, `dot[i]` and `doe[i]`.
- **Outputs:** the front-end configuration `fe_cfg[i]` and the calibration
  strobe `cal_pulse` with its amplitude `cal_amp`.

The time-to-analogue converters (TACs) and their ADC are a behavioural model
(`tac_adc_model`). Everything else is synthesizable RTL.

```
 dot[i], doe[i] ──► tofpet_channel ×64 ─────────────► global_controller ──► txd[1:0][1:0], txclk
                    ├ test-pulse mux                 ├ coarse_counter (gray, frame count)
                    ├ tac_adc_model (timing, 4 TACs)  ├ spi_config (registers)  ◄── SPI
                    ├ tac_adc_model (energy, 4 TACs)  ├ test_pulse_gen          ◄── ext_test_pulse
                    └ tdc_ctrl (buffers, validation,  ├ dark_counters
                               data register)         ├ readout_arbiter → event_processor
                                                      └ frame_builder → tx_serializer
```

## Time stamps: coarse counter plus time multiplication

The global coarse counter is 10 bits wide and runs at the 160 MHz system
clock (period T = 6.25 ns). It is distributed gray-encoded, so a channel that
samples it sees at most one changing bit.

The fine time is measured by time multiplication. The process for one
trigger is:
1. DOT rises at time φ after clock edge n, where 0 < φ < T.
2. The armed TAC starts charging.
3. The TAC stops at the second clock edge after the trigger, edge n+2. Its
   charge therefore represents 2T − φ, which lies between 6.25 and 12.5 ns.
4. The channel latches the coarse count of edge n+2 as `t_coarse`.
5. Later the TAC is discharged into the ADC, which takes GAIN = 125 times
   longer than the charge took. The controller latches the coarse counter at
   the start of conversion (`soc`) and when the comparator fires (`t_eoc`).

Because 125 × 50 ps = 6.25 ns, each coarse count of conversion is one 50 ps
bin:

```
t_fine = t_eoc - soc = ceil(250 - 20·φ/ns) + 2        (counts of 50 ps)
trigger time         = t_coarse·T - (t_fine - 2)·50 ps
```

The +2 is fixed latency: the end-of-conversion synchroniser plus the cycle in
which `soc` is taken. A trigger exactly on a clock edge reads 253. Fine
values therefore stay within 8 bits.

Each channel's 6-bit TAC calibration DAC (`tac_dac`) trims the ratio of
charge to discharge current. The model reads the code as signed (−32 to 31)
and scales the conversion by (1 + tac_dac/256). This evens out the
conversion range across channels:
- with the trim, the 250 in the formula becomes 250·(1 + tac_dac/256);
- positive codes can push late-phase values into saturation at 255.

The energy branch works the same way on the falling edge of DOE, giving
`e_coarse` and `e_eoc`. Both ADC ramps start together, so a channel's 50-bit
event word is five gray coarse values:

| bits  | field      | meaning |
|-------|------------|---------|
| 49:40 | `t_coarse` | coarse time of the timing trigger (DOT rising) |
| 39:30 | `e_coarse` | coarse time of the energy edge (DOE falling) |
| 29:20 | `soc`      | start of conversion |
| 19:10 | `t_eoc`    | end of timing conversion |
| 9:0   | `e_eoc`    | end of energy conversion |

Each of the two branches has four TACs and one shared ADC, a "quad-buffer
derandomiser". A new trigger can be captured while up to three earlier
events wait for conversion. A conversion takes up to about 250 cycles
(1.6 µs), so without the buffer a channel would be blind for that long after
every hit. When all four TACs are full, further triggers are ignored.

## Dual threshold and dark-pulse rejection (`tdc_ctrl`)

A SiPM fires on thermal "dark" electrons about as strongly as on a single
photon. The timing threshold (DOT) is set low, down to half a photoelectron,
so it triggers on nearly all of them. The controller therefore validates each
DOT trigger with the higher energy threshold (DOE). Three rules are
available, chosen per channel by `val_mode`:

| `val_mode` | rule |
|---|---|
| 0 window   | DOE must be seen high (or have fallen) within `val_win` cycles of DOT |
| 1 async    | a flop clocked by DOE's rising edge samples DOT; DOT must still be high |
| 2 sample   | DOE's level is sampled exactly `val_win` cycles after DOT |

When a trigger fails validation:
- `darkcount` pulses;
- the per-channel dark counter counts it (16 bits, saturating), which gives
  the dark count rate;
- the TAC pair is discharged and armed again.

When a trigger passes, the controller waits for DOE to fall. It latches
`e_coarse` and moves on to the next TAC pair. If a second DOT edge arrives
during validation, the event is flagged with `trig_err`. In that case a dark
pulse and a real event came so close together that the latched time may
belong to the dark pulse.

Each converted event goes into the channel data register with its TAC id,
its frame parity (`frame_id`) and `trig_err`. `ev_valid` rises, and the
global controller answers with a one-cycle `ev_ack`.

Some timing details:
- DOT rising and DOE falling edges flip toggle flops before
  synchronisation. A DOT pulse shorter than a clock period starts a TAC, and
  the toggle makes sure the controller also sees it.
- After one event is committed or rejected, the next trigger is accepted
  about 4 cycles later.
- After reset the controller discharges the four TAC pairs, one per cycle,
  before it arms the first. This stops a TAC from keeping a charge picked up
  at power-up.
- The energy level used for validation goes through two synchroniser flops.

## Global controller

**Collection.** `readout_arbiter` serves the 64 channel registers round-robin,
taking at most one event per clock.

**Processing.** `event_processor` turns each event into one or two 40-bit
slots:

```
processed slot: channel[39:34] frame_id[33] t_coarse[32:23] (binary)
                t_fine[22:15] tot[14:8] e_fine[7:0]
  t_fine = t_eoc - soc,  e_fine = e_eoc - soc  (saturated at 255)
  tot    = e_coarse - t_coarse                  (saturated at 127 cycles)
raw event (two slots, raw_mode):
  {channel 6, TAC id 2, frame_id, trig_err, 20 zero bits, 50-bit word}
```

**Framing.** `frame_builder` collects the slots of one coarse-counter turn
(1024 cycles) in one bank of a ping-pong buffer. At the wrap the banks swap,
and the closed frame is sent as a header followed by its slots:

```
header: tag 4'hA [39:36], frame number [35:16], raw [15], slot count [14:8], lost [7:0]
```

A frame holds only what the link can carry in one frame period:
`min(96, 1024·bits_per_cycle/40 − 1)`. That is 24, 50 or 96 slots for 1, 2
or 4 bits per cycle. Events beyond that are dropped and counted in `lost`,
which saturates at 255. A raw event needs two slots and is kept only if both
fit.

**Transmission.** `tx_serializer` shifts slots out MSB first on one or two
links, in SDR or DDR: 1, 2 or 4 bits per cycle.
- Bit k of a cycle goes to link k mod L, in half-cycle k div L.
- `txd[link][0]` is the first half and `txd[link][1]` the second.
- When nothing is waiting, all-zero idle slots are sent.
- In training mode the word `40'h00000FFFFF` repeats, so a receiver without
  the forwarded clock (`txclk`) can find slot boundaries.
- Link settings change only at slot boundaries.
- A receiver finds the frame start as the first non-zero slot after idle.

## Configuration (SPI)

The SPI slave is mode 0 with 48-bit transactions, MSB first:
`{write, 7 unused, address[7:0], data[31:0]}`. Read data comes out on MISO
during the data phase. SCLK is oversampled by the system clock, and it is
meant to run at 10 MHz.

| address   | register |
|-----------|----------|
| 0x00-0x3F | channel configuration |
| 0x40-0x7F | dark counter of channel addr−0x40 (a write clears it) |
| 0x80      | global configuration (reset 0x0008_0001) |
| 0x81      | test pulse |
| 0x82      | status: `{frames_dropped[31:24], 0[23:20], frame number[19:0]}` |

The channel configuration fields (reset value 0x8000_0000) are:

| bits  | field |
|-------|-------|
| 31    | enable |
| 29    | shaper on the energy branch |
| 28    | n-type input |
| 27    | calibration injection |
| 26    | test pulse replaces DOT/DOE |
| 25:20 | TAC matching DAC |
| 19:14 | bias DAC |
| 13:8  | energy threshold DAC |
| 7:2   | timing threshold DAC |
| 1:0   | `val_mode` |

The global configuration fields are:

| bits  | field |
|-------|-------|
| 23:16 | `val_win` |
| 6     | external test pulse |
| 5     | output clock |
| 4     | raw mode |
| 3     | training |
| 2     | DDR |
| 1     | two links |
| 0     | transmitter enable |

The test pulse register holds:

| bits  | field |
|-------|-------|
| 31:26 | calibration amplitude |
| 23:16 | width in cycles |
| 15:0  | period in cycles (0 = off) |

The test pulse calibrates the TDCs. It replaces DOT and DOE in channels that
have bit 26 set. The external test pulse input allows the trigger phase to be
swept against the clock, which is how the TDC's INL and DNL are measured.

## Simulating

All files are SystemVerilog in `rtl/` (design) and `tb/` (testbenches). Each
testbench prints `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/tofpet_pkg.sv tb/tb_tofpet_top.sv --top-module tb_tofpet_top -Mdir obj -o sim
./obj/sim
```

Replace `tofpet_top` with any block name to run that block's testbench:
- `coarse_counter`, `tac_adc_model`, `tdc_ctrl`, `tofpet_channel`
- `test_pulse_gen`, `dark_counters`, `spi_config`
- `readout_arbiter`, `event_processor`, `frame_builder`, `tx_serializer`
- `global_controller`

`tb_tofpet_top` runs the full chip at its default size in about a second. It
has a behavioural 160 MHz stimulus, SPI transactions and a link receiver
(`tb/tx_receiver.sv`). It goes through these phases:
1. Every channel twice, on 2 links in DDR.
2. Dark pulses.
3. The async and sampled validation modes.
4. A full quad buffer.
5. Raw mode with a `trig_err` event.
6. Frame overflow on a single SDR link.
7. Test pulses, with one channel's TAC DAC trimmed.
8. A phase sweep with the external test pulse.
9. One frame filled with exactly 96 events on 2 links in DDR.

It counts each of these mechanisms, plus training and both link modes, and
fails if any never happened. Expected fine times come from the formula
above, so stimulus phases are placed off the 50 ps grid.

## Choices not fixed by the underlying design, and limits

- The TAC/ADC pair is behavioural and uses real-valued delays:
  - the stop at the second clock edge and the gain of 125 are chosen so that
    an 8-bit fine code covers the charge window at 50 ps;
  - the 2-count fine offset comes from the controller's latency;
  - the TAC DAC step of 1/256 per code is chosen here;
  - it does not model random TAC mismatch, so every channel is ideal at
    code 0.
- These are this design's own:
  - the validation rules, the window length and the dead time;
  - the 40-bit slot and header formats;
  - frames as one counter turn, and the capacity rule;
  - the SPI framing and register map;
  - the bit order, idle and training words.
- ToT is reported in whole clock cycles (`e_coarse − t_coarse`). The energy
  fine time is carried separately in `e_fine`.
- `frames_dropped` counts frames discarded because the previous frame was
  still being sent. This happens only when the link mode changes while data
  is waiting.
- The front end (current-conveyor input stage, post-amplifiers,
  discriminators, threshold and bias DACs, calibration injection network),
  the bias and reference generators, the LVDS pads and the two-chip
  128-channel package are not modelled.
