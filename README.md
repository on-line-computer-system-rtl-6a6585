# Spectrometer facility computer interface

This is synthesizable SystemVerilog for the interface between an SDS 9300
computer (24-bit words) and the equipment in a spectrometer counting house:
scalers, coincidence buffers, pulse height analyzers, flag flip-flops,
switches, shaft encoders, digital voltmeters, a time of day clock, and on
the output side the magnet supply controls, interval timers and nixie
displays. It follows the SLAC description of the facility's on-line
computer system, which fixes the architecture but leaves out most of the
detail. Every such gap is filled by a choice made here, and each choice is
marked below and in the opening comment of its file.

The main idea is that the computer never talks to a device directly. It
*addresses* a device with one instruction and *moves a word* with the next:

* `EOM A` ("energize output from memory") puts a 15-bit address into the
  EOM buffer. A tree of decoders turns that address into exactly one raised
  select line somewhere in the building.
* `PIN B` then reads whatever the selected device put on the shared 24-line
  input bus. For output, `POT B` writes a word that is steered to the
  selected output device.

Everything else is there to support that pair of instructions: the shared
bus, optional BCD conversion, device reset and ready tests, priority
interrupts that tell the program when a device has data, and a manual mode
on the panel.

## The 15-bit device address

| EOM bits | width | meaning |
|---|---|---|
| 14:12 | 3 | system op code: the kind of transfer (next section) |
| 11:9  | 3 | division: which of 8 sub-decoders gets the 9 address bits |
| 8:0   | 9 | address within that sub-decoder |

The original description gives the widths, but the order of the fields
inside the word is this design's choice.

Division 0 is the standard **group decoder**. It splits the 9 bits into
4 + 5. Bits 8:5 raise one of 16 group lines (G1..G16, groups 0..15 in the
code). Bits 4:0 are the device number, sent to every local multiplexer.
Each multiplexer has its own 5-to-32 **device decoder**, which only works
while its group line is up. So the standard decoder reaches 16 × 32 devices.

Divisions 1..4 are the **relay decoders** of the four digital voltmeters.
Each one picks one of 512 analogue inputs. Reading a voltmeter takes two
EOMs:

1. One EOM to division 1..4 closes a relay.
2. A second EOM through the group decoder selects the voltmeter itself.

The second EOM overwrites the EOM buffer, so a relay decoder latches its
address when its division is loaded. The relay then stays closed until that
decoder is addressed again (`relay_decode.sv`). Divisions 5..7 and groups
8..15 are not used, and their lines are brought out for expansion.

Group map at the default sizes:

| group (line) | devices | count |
|---|---|---|
| 0 (G1) | DCB buffers, 24 channels each | 11 (264 channels) |
| 1 (G2) | pulse height analyzer channel codes | 8 |
| 2 (G3) | scalers | 20 |
| 3 (G4) | 2 flag banks, then status switches, then thumbwheels | 2 + 1 + 10 |
| 4 (G5) | shaft encoders | 12 |
| 5 (G6) | output: magnet supply, 3 interval timers, 12 nixie displays | 16 |
| 6 (G7) | time of day clock | 1 |
| 7 (G8) | digital voltmeter readings | 4 |

The figure of the original system labels the line drivers G1..G7 as in this
table. It gives no label to the voltmeters' drivers, so putting them on
group 7 is this design's choice.

## Transfer modes (system op code)

The original system lists the kinds of transfer:

* with or without BCD conversion;
* with or without a reset of the device after its data is taken;
* special tests such as a ready test.

It does not give their codes. This design uses:

| op | meaning |
|---|---|
| 0 | plain transfer |
| 1 | transfer with conversion (BCD→binary on PIN, binary→BCD on POT) |
| 2 | input transfer, then reset the device |
| 3 | conversion and reset |
| 4 | ready test (no data moved) |
| 5, 6, 7 | spare special-test lines, brought out as `special_test[2:0]` |

## One transfer, clock by clock

All logic is synchronous to one clock `clk`. Reset is asynchronous and
active low (`rst_n`). The computer's instructions are one-clock strobes.

Read (`transfer_control.sv`):

| clock | event |
|---|---|
| t | `eom_strobe` with the address; the EOM buffer loads at the end of t |
| t+1 | decoders settle on the new address; the selected device drives the bus; `pin_capture` loads the PIN buffer |
| p ≥ t+2 | `pin_rd`: `pin_data` is the buffer, or its BCD-to-binary conversion if the op code asks |
| p+1 | with a reset mode, `dev_reset` pulses to the selected device only |

A ready test is an EOM with op 4. In clock t+1 it copies the selected
device's READY line into the READY flip-flop, and the program tests that
flip-flop on sense line 0 with `sks_sel`/`sks_sense`. The original text and
the figure's note disagree on the polarity: the text says a flag is set if
the device is *not* ready, the note says the flip-flop is set for a ready
device. This design follows the note: 1 = ready.

Write: `pot_wr` loads the POT buffer at the end of its clock, either with
the computer's word or with its binary-to-BCD conversion. In the next clock
the output multiplexer raises the load line of the selected output device.
Six BCD digits fit in 24 bits. A binary value above 999 999 keeps its low
six digits and sets sense line 2.

The timings above are this design's choices. The original gives only the
order of events.

## The shared input bus

Each local multiplexer (`input_mpx.sv`) drives three things for the device
it selects, and only while its group line is up:

* the device's 24 data lines and its READY line onto the bus;
* the interface's RESET pulse, back to that device alone.

In the real system, physical line drivers share one cable. Here each
multiplexer drives zeros when it is not selected, and the top ORs all of
them together with the `exp_bus` expansion input. Because the decoders
select only one group at a time, this gives the same result as sharing the
cable.

## Interrupts

Device pulses go through a patch panel (`patch_panel.sv`) to the 32
priority levels. The plugging is a parameter. By default, source i is
plugged into level i, and the sources are numbered in this order:

1. voltmeter end of conversion (4 sources);
2. scaler overflows (20);
3. interval timer completions (3);
4. external pulses (the rest).

Push buttons energize levels by hand.

Each level has three states in `priority_interrupt.sv`:

* **armed**: set by the computer's mask write (`int_arm_we`/`int_arm_mask`). A pulse on a level that is not armed is ignored.
* **waiting**: a rising edge arrived while the level was armed.
* **in process**: the computer took the level with `int_ack`.

Level 0 has the highest priority. `int_req` and `int_level` name the
highest waiting level, but only if it outranks every level in process.
`int_done` ends the highest level in process, and a lower waiting level can
then be taken. The armed and waiting vectors are the panel's two rows of
indicator lamps.

The original gives the 32 levels, the two sources of a pulse and the two
indicators. The handshake and the numbering are this design's choices.

## Devices

* `dcb_buffer`: 24 coincidence outputs are latched while MASTER GATE is
  open and cleared by reset. The discriminators and coincidence circuits in
  front of it are analogue and are not modelled.
* `scaler`: a 24-bit counter that counts one pulse per clock while gated.
  A 100 MHz clock meets the 100 Mc/s rate. On wrap-around it gives a
  one-clock OVERFLOW pulse.
* `flag_register`: 24 flags that stay set until reset. `any_set` is the
  bank's ready line.
* `pha_memory`: the core memory of an analyzer. Each event adds one to its
  channel over three clocks, and `busy` marks that dead time. Counts
  saturate at their maximum. `clear` zeroes every channel, and a separate
  readout port can be read at any time. It is used twice: for the
  128-channel analyzer 0, and for the 4096-channel (64 × 64) two-dimensional
  analyzer.
* `time_of_day_clock`: hours, minutes and seconds in BCD, advanced by a
  once-a-second tick.
* `interval_timer`: loaded with a count, it counts rising edges of CLOCK IN
  and then gives a COMPLETION pulse, which can raise an interrupt.
* `nixie_display`: holds six BCD digits and drives one cathode in ten for
  each tube. A code above 9 blanks its tube.

## Manual mode

With `manual_mode` high, the computer's EOM, PIN capture and POT loads are
ignored. The operator then sets and clears single bits of the EOM, PIN and
POT buffers (`*_manual_set`, `*_manual_reset`; reset wins if both are
pressed). This lets a program be checked without devices connected, or the
wiring be checked without a program. The buffers' contents are brought out
as indicator outputs.

## What is outside the RTL

The following are not modelled. They appear only as top-level ports:

* the computer and its peripherals;
* the link to the beam switchyard computer;
* the ADCs, voltmeters and relays;
* the switches and shaft encoders;
* the magnet supply;
* the cable drivers.

For the magnet supply, the top keeps the last word written to it
(`magnet_setpoint`) and pulses `magnet_load`.

## Departures and limits

* Field order in the EOM word, op-code values, the group of the voltmeters,
  and the interrupt and sense-line assignments are all this design's
  choices.
* Reset after transfer applies to input devices only.
* The BCD converters are combinational and assume six digits per word.
* Three interval timers are built because the figure draws three; the text
  gives no number.
* Only analyzer 0 has a core histogram. The original says "one or two"
  analyzers have core memory.
* The scaler, flag, clock, timer and display formats (widths, BCD layouts,
  ready rules) are not specified in the original and are chosen here.

## Files and simulation

`rtl/` holds one module per file:

* `sds_if_pkg.sv`: shared widths and types;
* `spectrometer_interface.sv`: the top;
* the blocks named above.

`tb/` holds a self-checking testbench `tb_<module>.sv` for each module.
Each one ends by printing `TB_RESULT checks=N failures=M`.
`tb_spectrometer_interface.sv` runs the whole interface at its default
sizes. In that test the testbench plays the computer, and every mechanism
is exercised at least once:

* reads from every group;
* conversion both ways;
* reset after transfer;
* ready tests that pass and that fail;
* the relay latch;
* output devices;
* nested interrupts;
* both analyzer memories;
* manual mode;
* expansion lines.

`tb_full_complement.sv` runs the whole device list of the three
spectrometers through the top at its default sizes. It reads every input
device, closes each of the 512 relays of each of the 4 voltmeters and reads
the voltmeter, writes every output device, and fills and reads back every
channel of both analyzer memories.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/sds_if_pkg.sv tb/tb_spectrometer_interface.sv \
  --top-module tb_spectrometer_interface -Mdir obj
./obj/Vtb_spectrometer_interface
```

The device counts are parameters of `spectrometer_interface`, and their
defaults are the original facility's numbers. Groups are limited to 32
devices each. The patch panel has 32 sources, so `N_DVM + N_SCALER +
N_TIMER` must stay at or below 32.
