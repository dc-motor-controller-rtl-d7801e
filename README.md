# FPGA fabric for a DC motor speed controller

A small permanent-magnet DC gear motor is driven from a Cyclone V SoC board
(DE1-SoC class) through an L298N H-bridge. The control law — a cascade of a
PI speed loop around a PI current loop, with anti-windup, back-EMF
feed-forward and output limiting — runs as software on the SoC's processor.
The FPGA fabric described here does everything the software cannot do at
clock speed:

* **senses** — it reads the board's LTC2308 ADC at 100 kHz, and it counts the
  motor encoder's pulses over fixed 10 ms windows to give a speed figure;
* **actuates** — it turns an 11-bit duty command into a 25 kHz PWM wave on
  one of the two bridge inputs, chosen by the rotation direction;
* **talks to the software** — one Avalon-MM peripheral, called `pwm`, holds
  the duty and direction registers and returns the speed count and the ADC
  sample;
* **talks to the user** — board switches turn the motor on or off, choose
  manual or automatic direction control and give the manual direction.
  Six seven-segment digits show the ADC reading and "On"/"OFF".

```
              +---------------------- motor_ctrl_top (50 MHz) ----------------------+
  LTC2308 <-->| adc_ltc2308 --data/valid--+---------------> hex_display --> HEX5..0  |
  (CONVST,    |   (channel 0, 100 kHz)    |                      ^ motor_on          |
  SCK,SDI,SDO)|                           v                      |                   |
              |  Avalon-MM  <--------> pwm_avalon  <-- dir, motor_on, auto_mode --+   |
  processor <>|  (16-bit, 4 registers)   |  encoder_counter <------------ enc_in  |   |
              |                          |  pwm_gen ----> ENA, IN1, IN2 (L298N)   |   |
              |                          +-- dir_cmd --> switch_ui <-- sw_on,     |   |
              |                                          sw_auto, sw_dir ---------+   |
              +----------------------------------------------------------------------+
```

On the board, ENA, IN1 and IN2 go to GPIO_0 bits 0, 8 and 9 and the encoder
comes in on GPIO_0 bit 1; the bridge runs from a 12 V supply.

## Reading the LTC2308 (`adc_ltc2308`)

This is the part with the most timing detail. The converter is used in its
"short CONVST pulse" mode: a rising CONVST edge starts a conversion, and once
the conversion has finished the result can be clocked out on SDO while the
configuration word for the *next* conversion is clocked in on SDI, both with
the same 12 SCK cycles. The reader runs one such frame every 500 clocks
(100 kHz at 50 MHz). Clock numbers from the CONVST rising edge, defaults:

| clocks     | CONVST | SCK                            | SDI                     | SDO                          |
|------------|--------|--------------------------------|-------------------------|------------------------------|
| 0–1        | high   | low                            | low                     | (converting)                 |
| 2–79       | low    | low                            | low                     | MSB appears when done        |
| 80–127     | low    | 12 cycles of 4 clocks (12.5 MHz) | S/D O/S S1 S0 UNI SLP, then 0 | B11…B0, MSB first        |
| 128        |        | low                            |                         | `data`/`valid` update        |
| 129–499    | low    | low                            | low                     | idle                         |

Design points:

* **SCK is a divided, registered signal**, low and high for `SCK_HALF` = 2
  clocks each. Gating the 50 MHz clock straight onto SCK would exceed the
  part's 40 MHz SCK limit.
* **SDI changes one clock after each falling SCK edge**, so it is stable at
  both SCK edges. That makes the word valid whichever edge the converter
  latches on.
* **SDO is sampled on the clock edge that raises SCK.** The converter moves
  SDO after each falling edge, so the bit has been stable for two clocks by
  then. The MSB is already on SDO when the conversion finishes.
* **The configuration word is single-ended, unipolar and awake**:
  S/D = 1, UNI = 1, SLP = 0. The channel number `ch` is coded as
  O/S = ch[0], S1 = ch[2], S0 = ch[1]. With the converter's 4.096 V unipolar
  range, one count is 1 mV, so 0–3.85 V reads as 0–3850.
* **Pipeline of one frame**: the word sent during frame *n* selects the
  channel for the conversion started at frame *n+1*. The top reads
  channel 0 at all times, so this only matters when `channel` changes.
* The wait before the first SCK (`CONV_CYCLES` = 80, 1.6 µs) is the part's
  maximum conversion time. The CONVST pulse (`CONVST_CYCLES` = 2) is 40 ns.

## Speed from the encoder (`encoder_counter`)

The encoder gives 7 pulses per turn. A rising edge between two 100 kHz
samples counts as one pulse. Every 10 ms the count is copied to `count`,
`count_valid` pulses for one clock, and counting restarts from zero. The
count is published on this fixed schedule, not after a set number of
pulses, so the speed loop gets fresh data at 100 Hz even when the motor is
stopped. At 5700 rpm a window holds about 6.65 pulses; at 1000 rpm it holds
about 1.17, so at least one pulse lands in every window. The resolution is
therefore coarse: one count is about 860 rpm. The count saturates at
2^16−1 instead of wrapping, and a pulse must stay high for one sampling
period (10 µs) to be seen.

## PWM and the H-bridge (`pwm_gen`)

A counter runs through 2000 clocks (25 kHz, a usual switching frequency for
the L298N). The wave is high for the first `duty` clocks of each period. So
duty 0 is off, 1000 is 50 % and 2000 is full on. The 11-bit field can hold
up to 2047; any value above 2000 is treated as 2000. The bridge is driven
this way:

| motor_on | dir | ENA | IN1 | IN2 |
|----------|-----|-----|-----|-----|
| 0        | x   | 0   | 0   | 0   |
| 1        | 0   | 1   | PWM | 0   |
| 1        | 1   | 1   | 0   | PWM |

Duty and direction are picked up only at the start of a period, so a command
never cuts a pulse short or doubles it. A write therefore shows at the bridge
within one period (40 µs). ENA follows the switch one clock later.

## The `pwm` bus peripheral (`pwm_avalon`)

This is an Avalon-MM slave with 16-bit data, a 2-bit word address and
`chipselect`. Reads have a fixed latency of one clock.

| addr | name  | access | contents |
|------|-------|--------|----------|
| 0    | DUTY  | R/W    | [10:0] PWM on-time in clocks per 2000-clock period |
| 1    | CTRL  | R/W    | write [0]: direction requested by software. Read [0]: that request, [1]: direction applied, [2]: motor on, [3]: automatic mode |
| 2    | SPEED | R      | encoder pulses counted in the last complete 10 ms window |
| 3    | ADC   | R      | latest 12-bit ADC sample (mV) |

Writes to SPEED and ADC are ignored. The controller software turns its
±12 V voltage command into a DUTY value (magnitude) and a CTRL direction
(sign).

## Switches and display (`switch_ui`, `hex_display`, `hex7seg`)

`sw_on` drives ENA. `sw_auto` = 1 selects automatic mode, where the direction
is the software's CTRL[0]. Otherwise the `sw_dir` switch sets the direction.
Each switch passes through a two-flop synchroniser; there is no debouncer,
because the switches are slide switches. HEX2..HEX0 show the ADC sample in
hexadecimal, which is millivolts in hex. HEX5..HEX3 show "On " or "OFF".
Segments are active-low, in the order {g,f,e,d,c,b,a}.

## Parameters

| module           | parameter       | default | meaning |
|------------------|-----------------|---------|---------|
| `motor_ctrl_top` | `ADC_FRAME`     | 500     | clocks per ADC sample (100 kHz) |
|                  | `PERIOD`        | 2000    | clocks per PWM period (25 kHz) |
|                  | `ENC_DIV`       | 500     | clocks per encoder sample (100 kHz) |
|                  | `ENC_WINDOW`    | 1000    | encoder samples per speed window (10 ms) |
| `adc_ltc2308`    | `CONVST_CYCLES`, `CONV_CYCLES`, `SCK_HALF` | 2, 80, 2 | CONVST width, conversion wait, SCK half period |
| `encoder_counter`| `COUNT_W`       | 16      | width of the count |

Shared constants and the register addresses are in `rtl/motor_pkg.sv`. All
sizes assume a 50 MHz clock. For another clock, scale the four clock counts,
and keep `CONV_CYCLES` at no less than 1.6 µs.

## What is and is not here

These come from the original project: the ADC part, its short-CONVST mode,
the 100 kHz rate, channel 0 and the 12-bit read-out; 7 pulses per turn, 100 kHz
pulse sampling and the count-and-reset every 10 ms; the 2000-clock PWM period,
the 11-bit duty and the 16-bit register width; ENA from a switch, with
PWM on IN1/IN2; the manual/automatic and direction switches; and a display of
the ADC value and the on/off state.

These are this design's own choices: the SCK rate and the SDI/SDO edge
timing; the conversion wait; the configuration word coding; the register map,
the `chipselect` and the read latency; the status bits; the ADC read-back
register; the display layout; the synchronisers; the period-boundary
command update; and clamping the duty above 2000.

Departures and omissions:

* **The PI controllers are not in the fabric.** The current and speed
  controllers run as C code on the processor at a 10 µs step. The
  peripheral only carries their inputs and outputs. A block diagram of the
  original system also shows PI gains (Kp, Ki) passing over the bus. They
  are not registers here, because the control computation they would feed
  runs in software.
* **Back-EMF estimate and speed reference** are software quantities. The
  bus carries only the raw ADC sample and the raw pulse count.
* **Current sensing through the ADC** (a voltage divider on a second input)
  is not wired: the top reads channel 0 only, as the original project did.
  Making `channel` alternate would give the software a current sample too.
* External parts — the ADC chip, the H-bridge, the motor, the analog front
  end, the processor and the bus fabric — are outside this RTL.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/motor_pkg.sv tb/tb_motor_ctrl_top.sv --top-module tb_motor_ctrl_top -o sim
./obj_dir/sim
```

Swap the testbench name to run another one.

| testbench            | what it covers |
|----------------------|----------------|
| `tb_motor_ctrl_top`  | the whole fabric at default sizes, about 2 M clocks (a few seconds). It checks ADC → display and bus, the motor off, manual and automatic direction, the duty clamp, speed windows of 7, 1 and 0 pulses, and the 100 kHz / 25 kHz / 100 Hz rates. It counts each mechanism. |
| `tb_workloads` | continuous encoder trains at 5700 and 1000 rpm, and an ADC sweep over 0–3.85 V, through the top at default sizes |
| `tb_adc_ltc2308`     | 40 frames against an ADC model: data, channel pipelining, configuration word, latency, frame rate, SCK timing |
| `tb_encoder_counter` | random pulse bursts per window, window length, saturation |
| `tb_pwm_gen`         | clock-by-clock reference model over random commands, plus a 2000-clock instance |
| `tb_pwm_avalon`      | register access, chipselect, read-only registers, PWM on-time, speed read-back |
| `tb_switch_ui`, `tb_hex_display`, `tb_hex7seg` | synchronisers and mode mux; display contents; all 16 digits |

`tb/ltc2308_model.sv` is a behavioural model of the converter's serial port.
It is used by the ADC and top-level tests, and it flags SCK edges that come
too early or too close together.

How far to trust it: every module passes Verilator lint and a second
SystemVerilog front end, and it synthesises without latches. Concurrent
assertions guard the rules that would damage hardware or corrupt data:
IN1 and IN2 are never high together, the bridge is idle while ENA is low,
no SCK runs while CONVST is high, SDI never changes while SCK is high or as
it falls, and the bus never reads and writes in one cycle. The tests run
against models written from the converter's and bus's published behaviour,
not against hardware. The ADC timing margins (tDO, setup and hold at SDI)
come from the part's limits, not from hardware measurements. Check them
against the board before relying on the ADC read-out.
