# Programmable timing controller for a part-inspection line

Small electronic parts travel on a conveyor belt past sensors and actuators:
reject valves, a camera trigger, sorting valves. The belt motor carries an
encoder, so belt travel can be measured in encoder counts rather than in time.
For each sensor–actuator pair the host PC tells the controller one number: the
distance from the sensor to the actuator, in encoder counts. From then on, every
part the sensor sees fires the actuator exactly that many counts later, whatever
the belt speed and however the parts are spaced. Up to eight parts may be between
sensor and actuator at once.

This SystemVerilog implements the whole controller as a single synchronous
design: input filters, encoder counter, three independent control channels and
an RS-232C link to the PC. It follows the architecture of a published
FPGA-based timing controller, whose controller fitted in one Xilinx Spartan-II
device. Where that description leaves details open, the choices made here are
listed below under *Choices made in this implementation*.

```
            sensor[2:0]      encoder                    rxd  txd
                |               |                        |    ^
         +------v------+  +-----v---------+      +------v----+-----+
         | sensor_input|  |encoder_counter|      |  host_interface  |
         |   (x3)      |  | filter, tick, |      | baud_gen, uart_rx|
         +------+------+  | position      |      | uart_tx,         |
                |         +-----+---------+      | host_protocol    |
         sen_pulse[c]           | en_tick        +--+------------^--+
                |               |       first_value, first_load,  |
         +------v---------------v------+  run_cmd |   reports      |
         |        main_control (x3)    |<---------+   rpt_*        |
         | counter 1   memory_register |--------------------------+
         | counter 2   comparator_drive|----> drive[c]
         +-----------------------------+
```

## How a channel tracks parts

This is the heart of the design (`main_control`, `memory_register`,
`comparator_drive`). A channel does not keep one timer per part. It stores, for
each part, how far that part is behind the part before it, and a single
down-the-line counter works through those distances in order.

Let D be the sensor-to-actuator distance (*first value*) the PC loaded.

**Storing (memory register part, counter 1).** Counter 1 counts encoder ticks
since the last part was sensed. When the sensor reports a part, the channel
writes one of eight 20-bit buffers. The buffers are used in turn by a one-hot
pointer that wraps from the eighth back to the first.

* The first part after the start command gets D.
* A later part gets counter 1, its distance behind the previous part.
* Counter 1 stops when it reaches D. A part more than D behind the previous one
  therefore also gets D. By then the previous part has already reached the
  actuator, so nothing is left to chain to and the new part counts a full D.

Counter 1 is then cleared. The written buffer is flagged as waiting for
comparison.

**Firing (comparator / drive part, counter 2).** A second pointer follows the
first around the ring. While the buffer it points at is flagged, counter 2
counts encoder ticks. When counter 2 equals the buffer value:

* the part is at the actuator, and `action` pulses;
* counter 2 is cleared and the flag is cleared;
* the pointer moves on.

If the next buffer is already flagged, its count starts at once. Its value is
the spacing between the two parts, so it fires exactly that spacing after the
previous part. That is the same as D after its own sensing.

Example with D = 100. Parts are sensed at counts 0, 30 and 250.

| part | stored | counter 2 runs    | fires at |
|------|--------|-------------------|----------|
| 1    | 100    | 0 → 100           | 100      |
| 2    | 30     | 100 → 130         | 130      |
| 3    | 100 (gap 220 > D, counter 1 stopped at 100) | 250 → 350 | 350 |

**Same-clock tick and sensor event.** An encoder tick may fall on the same
clock as a sensor store. That tick counts as before the part: it is added to the
stored distance, and the next distance starts after it. The comparator starts
counting a part it was idle for on the clock after the store. So every part
fires exactly D ticks after the end of its store clock. The testbenches check
this to the exact encoder count.

**Overload.** A ninth part in transit overwrites the oldest buffer, which is
still waiting. That part's timing is then lost. The write raises `overwrite`
for one clock, so it is visible.

## Actuator drive and reports

On a match, `drive` goes High. Counter 3 then counts `HOLD_CYCLES` clocks
(default 245,760, which is 10 ms) and `drive` falls; counter 3 clears itself.
A match while `drive` is already High restarts the hold (`retrigger`).

When `drive` falls, the channel offers a report to the host interface: the
distance value it matched for the last part that fired. A report not yet sent
is replaced by a newer one, so a burst of parts may produce fewer reports than
actions. The actuator timing itself never depends on the serial link.

## Input conditioning

* **Sensors** (`sensor_input`). The input passes a two-flop synchroniser. It
  is accepted only after 5 consecutive High samples at the system clock; shorter
  pulses are noise. One Low sample ends the accepted level. `sen_pulse` marks
  each accepted rising edge. Latency is 7 clocks from the input rising.
* **Encoder** (`encoder_counter`). The filtered level changes only after 3
  consecutive samples of the opposite level, so short glitches in either phase
  are ignored. Each rising edge of the filtered level is one encoder tick
  (`en_tick`), and a 20-bit `position` counter counts the ticks. Only forward
  motion is used; a single encoder phase is brought in and no direction is
  decoded. An encoder period must last at least 6 clocks (3 High, 3 Low).

## Serial link

The link runs at 9600 b/s, 8 data bits, no parity, 1 stop bit, least
significant bit first. 24.576 MHz / 2560 = 9600 exactly, so `baud_gen` divides
by 2560 for the transmitter.

The receiver (`uart_rx`) times itself from each start edge:

* A falling edge is re-checked a quarter bit later; if the line is High again,
  it was noise.
* The first data bit is sampled 1.5 bit times after the edge, which is its
  middle, and the others one bit time apart.
* A Low stop bit throws the byte away and raises `frame_err`.

Command set (codes defined in `tc_pkg`):

| direction | bytes | meaning |
|-----------|-------|---------|
| PC → ctrl | `0x10+ch`, b2, b1, b0 | first value of channel ch (0..2), 24-bit big-endian, low 20 bits used |
| PC → ctrl | `0x20` | start operating (all channels) |
| ctrl → PC | `0x06` | command accepted (ACK) |
| ctrl → PC | `0x15` | framing error or unknown/invalid command byte (NAK): send again |
| ctrl → PC | `0x30+ch`, b2, b1, b0 | channel ch finished an action; value = distance it matched |

A framing error in the middle of a set command abandons that command. Several
channels reporting at once are served round-robin. An ACK or NAK waiting to go
out is sent before the next report.

Typical session: send `10 00 3E 80`, `11 00 4B 64` and `12 00 44 5C` (16000,
19300, 17500), each answered `06`. Then send `20`; it is answered `06` and the
channels start. Sensor events before the start command are ignored.

## Files

`rtl/`, one unit per file:

| file | role |
|------|------|
| `tc_pkg.sv` | clock, baud, widths, default sizes, serial command codes |
| `timing_controller.sv` | top: filters, encoder counter, N_CH channels, host interface |
| `sensor_input.sv` | 5-sample sensor filter |
| `encoder_counter.sv` | 3-sample encoder filter, tick, position |
| `main_control.sv` | one channel: counters 1 and 2, memory register, comparator/drive |
| `up_counter.sv` | 20-bit counter (counters 1, 2, 3) |
| `memory_register.sv` | distance buffers, store pointer, counter-1 control |
| `comparator_drive.sv` | compare pointer, drive, counter 3, report |
| `host_interface.sv` | serial link: `baud_gen`, `uart_rx`, `uart_tx`, `host_protocol` |
| `baud_gen.sv`, `uart_tx.sv`, `uart_rx.sv` | 9600 b/s bit timing, transmitter, receiver |
| `host_protocol.sv` | command parser, ACK/NAK, report framing and arbitration |

Top-level parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CH` | 3 | sensor/actuator channels |
| `W` | 20 | counter, buffer and first-value width (distances up to 1,048,575 counts) |
| `N_BUF` | 8 | parts in transit per channel |
| `CLKS_PER_BIT` | 2560 | serial bit time in clocks (9600 b/s at 24.576 MHz) |
| `SENSOR_SAMPLES` | 5 | High samples to accept a sensor |
| `ENCODER_SAMPLES` | 3 | equal samples to change the encoder level |
| `HOLD_CYCLES` | 245,760 | actuator on-time in clocks (must fit counter 3, 20 bits) |

All logic is on one clock. The reset `rst` is synchronous and active High.
Assertions check that both ring pointers stay one-hot, that `drive` follows
every `action`, and that the serial line idles High.

## Choices made in this implementation

The published controller fixes the architecture and these numbers:

* the clock, 9600 b/s and the divisor 2560;
* three channels;
* 20-bit counters and eight buffers;
* the 5-sample and 3-sample filters;
* the 1.5-bit receive delay and the stop-bit check;
* the storing and comparing rules above.

The following are this design's own:

* the serial byte format: command codes, ACK/NAK, report framing;
* round-robin reporting, and reports being replaced when the link is busy;
* the hold time and its unit (clocks), and retriggering;
* the quarter-bit start re-check;
* the synchronisers and the one-sample release of the sensor level;
* the same-clock tick rule;
* the `overwrite` flag;
* the observation outputs `action`, `store`, `overwrite` and `position`.

Other points where this design departs from the original:

* The original line sorts parts after the camera into three valves by
  inspection result. How the result selects a valve is not specified, so each
  channel here drives one output.
* The original build reported 783 flip-flops. Generic synthesis of this RTL
  gives about 1,100 flip-flop bits, 480 of them the 3 × 8 × 20-bit buffers.
* Parts outside the FPGA are not modelled as RTL: the 24 V photo-coupler input
  circuits, the relay drivers and the PC program.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/pc_model.sv` is a behavioural model of the PC's serial port, used by the
link and top-level tests. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/tc_pkg.sv tb/tb_timing_controller.sv --top-module tb_timing_controller
./obj_dir/Vtb_timing_controller
```

| testbench | what it checks |
|-----------|----------------|
| `tb_sensor_input`, `tb_encoder_counter` | filter output on every clock against the input history; position count with glitches |
| `tb_up_counter`, `tb_baud_gen` | counting, clear priority, wrap; tick every 2560 clocks |
| `tb_memory_register` | buffers, flags, pointer and overwrite against a reference model, with same-clock ticks |
| `tb_comparator_drive` | action timing, completion, drive length, retrigger, reports against a reference model |
| `tb_main_control` | 400 parts at random spacing: each fires exactly D ticks after sensing; report values |
| `tb_uart_tx`, `tb_uart_rx`, `tb_host_protocol`, `tb_host_interface` | frame format, glitch and framing-error handling, receive latency, command set, round-robin reports |
| `tb_timing_controller` | whole controller at reduced bit time and hold. It configures and starts three channels and runs about 130 parts with noise. It checks exact fire positions and counts each mechanism: first part, short and long gaps, counter-1 stop, ring wrap, retrigger, overwrite, glitches, NAK |
| `tb_timing_controller_full` | whole controller at default sizes (2560 clocks per bit, 10 ms hold). It sends first values 16000/19300/17500 and runs four parts per channel. It checks exact fire positions, the 245,760-clock drive and the reports. About 1.7 M clocks, a few seconds |
