# Microstimulator prototype: Manchester command link and pulse controller

This is RTL for the digital part of a prototype implantable
neuromuscular stimulator. A stimulator like this drives constant-current
pulses through electrodes on a nerve so that a muscle contracts. The
reference setting is 300 us pulses at 20 Hz, up to about 3.5 mA into a
1 kOhm nerve load. In the prototype an external controller programs the
implant over a single wire, which stands in for a radio link. The wire
carries no separate clock. The data is therefore Manchester-coded, and
the implant recovers the bit timing from the data itself, even though
the two sides run on independent oscillators.

The design has two halves:

```
 external controller (ext_clk)                implant (clk)
 +--------------------+  UART   +-----------+ one  +------------+ bits +------------+ words +-----------------+
 | pattern generator  |-------->| Manchester|----->| Manchester |----->| serial-to- |------>| stimulation FSM |
 | (microcontroller,  | tx_data | encoder   | wire | decoder    |      | parallel   |       |  command parser |
 |  not in this RTL)  |<--------|           | med  | (clock     |      | (UART      |       |  pulse-width    |
 +--------------------+ strobe  +-----------+      |  recovery) |      |  framing)  |       |  ctrl -> filter |
                                                   +------------+      +------------+       |  -> pulse-freq  |
                                                                                            |  control logic  |
                                                                                            +--------+--------+
                                                            pulse, Sign, Unsign, channel, D4..D0    |
                                                                                            +--------v--------+
                                                                                            | 8-channel current|
                                                                                            | stimulator       |
                                                                                            | (analog; model)  |
                                                                                            +------------------+
```

`microstim_top` holds both halves. Each half has its own clock and reset.

## The Manchester link

This is the subtle part of the design. Read this section before changing
`manchester_encoder` or `manchester_decoder`.

### Encoding

Every bit is split into two halves. The line carries the data bit in the
first half and its complement in the second, so every bit has a
transition at its centre. The encoder is built the classic way:

* A divide-by-two of the "original clock" gives the bit clock.
* Its rising edge gives a one-cycle pulse `clock_A` at the start of a
  bit. Its falling edge gives `clock_B` half a bit later.
* An RS register drives the line with
  `Set = clock_A·data + clock_B·/data` and
  `Reset = clock_A·/data + clock_B·data`.

Everything runs on `ext_clk`. The "original clock" is an enable that
fires every `HALF_BIT_CYCLES` clocks, so one bit lasts
`2*HALF_BIT_CYCLES` clocks. The default is 16 clocks, or 62.5 kbit/s at
1 MHz. Setting `HALF_BIT_CYCLES = 1` gives a literal divide-by-two of
`ext_clk`.

The data source sees `bit_strobe_o`, which is `clock_A`. The encoder
takes `data_i` in that cycle and latches it for the `clock_B` half, so
the source can present the next bit right away. An assertion checks that
Set and Reset are never asserted together. The line follows a strobe by
one clock.

### Decoding and clock recovery

The decoder runs on the implant clock at `OVERSAMPLE` clocks per bit
(default 16). It must not assume any fixed phase relation to the
transmitter.

1. `med_i` passes through a two-flip-flop synchroniser. A transition
   detector compares successive samples.
2. **Acquiring lock.** A bit-boundary transition always lies half a bit
   from a centre transition. Only two centre transitions can be a whole
   bit apart. Before lock, the decoder times the gap between transitions.
   A gap of at least 3/4 bit marks the later transition as a bit centre.
   A line of idle ones, which toggles every half bit, never gives lock.
   The first 0 after a 1 does give lock, and that is exactly the UART
   start bit.
3. **Tracking.** A counter restarts at every centre. In lock, a
   transition that comes 3/4 bit or more after the last centre is the
   next centre. Earlier transitions are bit boundaries and are ignored.
   Because the counter restarts at each centre, the internal clock is
   realigned every bit, so the two oscillators may differ by several
   percent. The testbenches use offsets of 1.5 %, 2 % and 10 %. The
   hard limit is about ±20 %, where the 3/4 and 5/4 windows start to
   fail.
4. **Sampling.** At each centre the decoder issues one recovered-clock
   pulse, `bit_valid_o`. The data `bit_o` is the line level just before
   the transition, which is the bit's first half and therefore the data.
   This is the RS rule "Q follows MED at the recovered clock".
5. **Losing lock.** If no centre arrives within 5/4 bit, `locked_o`
   drops and the decoder starts acquiring again. A silent line or a
   transmitter in reset causes this.

Latency: `bit_valid_o` comes 3 implant clocks after the centre transition
reaches `med_i`.

## Words and commands

**Framing.** The link carries 8-bit words in UART frames: a start bit
(0), eight data bits with the least significant first, and a stop bit
(1). The line idles at 1. `serial_to_parallel` waits for a start bit,
shifts in the data bits and checks the stop bit. A good frame gives a
one-cycle `byte_valid_o`. A frame whose stop bit is 0 is dropped, with a
one-cycle `frame_err_o`. The converter resets its framing whenever the
decoder loses lock.

**Commands.** A command is four words (see `microstim_pkg`):

| word | bits | meaning |
|---|---|---|
| header | `1 000 p ccc` | bit 7 set marks a header. `p` is the polarity (0: Sign, forward current; 1: Unsign, reverse). `ccc` is the channel, 0..7 |
| amplitude | `000 aaaaa` | DAC code 0..31, 108 uA per step |
| width | `0 wwwwwww` | pulse width in 10 us units |
| period | `0 ttttttt` | pulse period in 1 ms units; 0 stops stimulation |

The parser in `stim_fsm` loads all four fields into the active setting
together, when the period word arrives, and then pulses `cmd_ok_o`. A
header always starts a new command. A data word that arrives when no
command is open, a header that cuts a command short, and an amplitude
word with stray high bits are each rejected with `cmd_err_o`. The active
setting is left unchanged in all three cases. After reset, stimulation
is off.

## Pulse generation

The pulse path is three blocks in a chain:

* **Pulse-width controller** (`pulse_width_ctrl`). This is a PWM. A
  prescaler makes 10-clock units. A unit counter runs over a 100-unit
  base period, which is 1 ms at 1 MHz. The output is high for the first
  `pw` units of each base period. If `pw` is at least 100, the output is
  high for the whole period. The controller takes the width setting at
  the start of a period, so changing it never cuts a pulse short. It
  also marks the first clock of every base period.
* **Digital filter.** This block sits between the two controllers, but
  this RTL does not include it (see below). Its input leaves the top as
  `pw_pulse_o` and its output comes back on `filt_pulse_i`. Connect the
  two directly to run without a filter.
* **Pulse-frequency controller** (`pulse_freq_ctrl`). It counts base
  periods and opens its gate for one period in every `per`. It lets
  through the PWM pulse of that period, so stimulation runs at
  1000/`per` Hz. `per = 0` closes the gate. When stimulation is switched
  on, the first pulse comes in the next base period. The output is
  registered: one clock of latency, with the width unchanged. The gate
  stays open for the whole base period, so a filter may delay the pulse
  by up to (base period − width).

With `pw = 30` and `per = 50`, `pulse_o` is 300 us high every 50 ms at
1 MHz, which is the reference 20 Hz stimulation.

**Control logic** (`control_logic`) decodes the channel to a one-hot
`chan_en_o` and passes the amplitude to `dac_code_o` (D4..D0). It raises
`sign_o` or `unsign_o`, chosen by the polarity, only while `pulse_o` is
high. The output bridge is therefore open between pulses, and the two
signals are never high together.

## Current stimulator (behavioural models)

The stimulator is an analog chip. Its models (`current_dac`,
`current_mirror`, `output_bridge`, `current_stim_module`) are not
synthesizable hardware. They are there so that simulations end in
electrode currents: signed nanoamperes of type `na_t`.

Each of the 8 channels has three parts:

* a 5-bit current-mode DAC: Iref = code × `STEP_NA`, where the design
  value is 108 uA;
* a current mirror: Iout = `GAIN` × Iref, limited to 5 mA;
* a bridge: Sign gives +Iout and Unsign gives −Iout.

Only the selected channel receives the code and the bridge controls. The
code reaches the DAC only during the pulse. The fabricated chip measured
about 87 uA per level; set `STEP_NA = 87000` to model it. The mirror
ratio of the real circuit is unknown. `GAIN = 1` keeps full scale at the
DAC's 3.5 mA range.

## Parameters and sizes

| parameter (module) | default | meaning |
|---|---|---|
| `HALF_BIT_CYCLES` (encoder, top) | 8 | `ext_clk` cycles per half bit |
| `OVERSAMPLE` (decoder, top) | 16 (= 2·`HALF_BIT_CYCLES` in the top) | `clk` cycles per bit; must match the transmitter's bit period within about ±20 % |
| `DATA_BITS` (serial-to-parallel) | 8 | UART word size |
| `PW_UNIT_CYCLES` (FSM, width ctrl, top) | 10 | clocks per width unit (10 us at 1 MHz) |
| `BASE_UNITS` (FSM, width ctrl, top) | 100 | units per base period (1 ms) |
| `CHANNELS` (package, stimulator) | 8 | electrode channels |
| `STEP_NA` (DAC, stimulator, top) | 108000 | DAC current per code step, nA |
| `GAIN`, `COMPLIANCE_NA` (mirror) | 1, 5000000 | mirror ratio and output limit |

The following are this design's own choices, not measured values: the
clock frequency (taken as 1 MHz for the times quoted here), the link bit
rate, the command word layout, the width and period units, the decoder's
lock rule, and the error handling. The block structure, the encoder and
decoder equations, the UART framing, the 8 channels, the 5-bit current
code with its 108 uA step, and the Sign/Unsign direction control all
follow the original prototype.

## What is not here

* **Pattern generator.** This is a program on an off-the-shelf
  microcontroller. `tb/pattern_gen_model.sv` is a testbench stand-in
  that sends command words as UART frames.
* **Digital filter.** The original design names a digital filter
  between the width and frequency controllers, but gives neither its
  function nor its coefficients. It is left out, and its ports are
  brought out of the top instead.
* **Analog circuits.** Only behavioural models of the analog parts are
  included (see above). They have no timing, settling, mismatch or
  supply behaviour.
* **Power, supply and radio.** Supply, power and the planned radio link
  are not modelled.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_manchester_encoder` | line level in both halves of 200 random bits, strobe spacing |
| `tb_manchester_decoder` | no lock on idle ones, lock on the first 0, 1200 random bits decoded with the transmitter 2 % and 10 % slow and fast, lock loss on a silent line |
| `tb_serial_to_parallel` | 200 random frames, bad stop bits, restart after a lock loss |
| `tb_control_logic` | channel decode, code, Sign/Unsign over all channels and polarities |
| `tb_pulse_width_ctrl` | base period, exact width for random widths including 0, 30, 100 and 127 |
| `tb_pulse_freq_ctrl` | pulse spacing, width, first pulse, stop, for random periods |
| `tb_stim_fsm` | command loading, the three command errors, pulse trains, Sign/Unsign gating, stop |
| `tb_current_dac`, `tb_current_mirror`, `tb_output_bridge`, `tb_current_stim_module` | transfer functions of the analog models |
| `tb_microstim_top` | end to end, at the default sizes (see below) |
| `tb_workload_measured_chip` | end to end with the measured 87 uA step: full scale −2.697 mA and about 1 mA at 300 us / 20 Hz |

`tb_microstim_top` runs the whole system at its default sizes. The
implant clock is 1 MHz. The external clock runs 1.5 % slower. The test
first programs the reference stimulation (channel 2, code 9 = 0.972 mA,
300 us, 20 Hz) and checks the pulse width, the period and every electrode
current in real time. It then causes, and counts, each of these:

* a framing error
* a malformed command
* a change of channel and polarity at full-scale current
* a loss of lock and re-acquisition
* a stop

It simulates 149 ms of operation in well under a second.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -yrtl -ytb +libext+.sv \
    rtl/microstim_pkg.sv tb/tb_microstim_top.sv --top-module tb_microstim_top
./obj_dir/Vtb_microstim_top
```

Substitute any other testbench name to run it the same way. The
simulator is two-state, so every register that is read has a reset.
