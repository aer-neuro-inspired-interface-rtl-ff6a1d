# AER interface to an anthropomorphic robotic hand

Address-Event Representation (AER) moves information between neuromorphic
chips as a stream of addresses on a parallel bus. Each address is one event,
and a REQ/ACK handshake carries it across. This design uses that same bus to control a robot
hand: a PC, or any AER system, sends one 16-bit event per command, and the hand
answers with one or two 16-bit events carrying motor state or sensor values.

Two pieces of logic make up the chain:

```
   PC memory                                                     hand
      |                                                            |
  PCI core  --->  pci_aer  ==AER out==>  aer_robot  ---> 16 DC motors (up/down PWM)
 (back end)      (PCI-AER      16 bit    (AER-Robot  <--- 16 two-channel encoders
                  board)   <==AER in===   board)     <--- 4 sensor microcontrollers
                                                          (4 x 16 analog sensors)
```

* `aer_robot` is the FPGA logic of the hand-side board. It has independent
  processes that all run in parallel, so a command is accepted while motors are
  still moving:
  * a command receiver;
  * one process per motor;
  * one process per sensor microcontroller;
  * a reply sender.
* `pci_aer` is the back end of a PC plug-in board:
  * It plays time-stamped event streams from PC memory onto an AER bus.
  * It records incoming events, each with the time since the previous one.
* `aer_hand_system` joins the two through their AER buses. It is the top of
  the design.

The PCI protocol engine itself (configuration space, bus mastering, the
tri-state AD bus) is a separate, bought-in core. It is not part of this RTL.
Its back-end signals are ports of `pci_aer`.

## Commands and replies

Every command fits in one event. Bits [15:13] of the command are the opcode:

| opcode | name        | fields                                          | effect |
|--------|-------------|-------------------------------------------------|--------|
| 0      | PERIOD_LO   | [7:0] byte                                      | low byte of the PWM period register |
| 1      | PERIOD_HI   | [7:0] byte                                      | high byte of the PWM period register |
| 2      | STEPS       | [12:9] motor, [8:0] pulses                      | pulse count for that motor's next move |
| 3      | MOVE        | [12:9] motor, [8] up, [7:0] intensity           | start the move |
| 4      | MSTATE      | [12:9] motor                                    | two replies: status, position |
| 5      | SENSOR      | [12:11] set, [10:7] channel                     | one reply: the sensor value |

Replies have a 2-bit type in [15:14]:

| type | meaning  | fields |
|------|----------|--------|
| 0    | sensor   | [13:12] set, [11:8] channel, [7:0] value |
| 1    | status   | [13:10] motor, [9] busy, [8:0] pulses still to go |
| 2    | position | [13:10] motor, [9:0] encoder position, two's complement, low 10 bits of a 16-bit counter |

Motor numbers run 4*finger + joint, with the fingers in the order thumb,
forefinger, middle finger, ring finger. The sensor sets are:

* 0: joint potentiometers;
* 1: fingertip and palm contacts;
* 2: tendon tension;
* 3: motor current.

The command and reply layouts are defined in `rtl/aer_pkg.sv`. Only their
general shape comes from the original board: 16 bits per event, one event per
command, one or two events back. The bit assignments are this design's own.

## The AER handshake

All AER buses use a four-phase handshake with active-high REQ and ACK:

1. The sender puts the address on the bus and raises REQ.
2. The receiver takes the address and raises ACK.
3. The sender drops REQ.
4. The receiver drops ACK.

Every REQ and ACK input passes a two-flop synchroniser, so the two boards can
run on unrelated clocks. `aer_tx` and `aer_rx` implement the two sides.

Each ACK edge costs the sender three clocks: two synchroniser flops and one
state clock. The clock that sees ACK fall can already raise REQ for the next
word, so a back-to-back stream costs 6 sender clocks per event plus the
receiver's response time. The sender testbench uses a receiver that answers
each edge one clock after it sees it. It measures exactly 8 clocks per event
and a REQ pulse of 4 clocks, 120 ns at 33 MHz.
When two of these blocks talk to each other, both sides synchronise, and the
PCI-AER internal loop measures 12 clocks per event.

## AER-Robot board (`aer_robot`)

**Command receiver (`cmdin`).** It takes one event per handshake and decodes
it. It broadcasts the decoded command (`cmd_t`) for one clock to all motor and
sensor processes. The PWM period register lives here. CMDin refuses a new event
only when the reply FIFO is almost full. In that case it holds ACK back, so
replies are never dropped.

**PWM (`pwm_timebase`, `motor`).** One counter serves all 16 motors. It runs
from 0 to `period`, so a PWM period lasts `period+1` clocks. At 50 MHz the
16-bit register covers the following range:

* 65536 clocks, or 763 Hz;
* 2 clocks, or 25 MHz.

The original board was measured over exactly this range, which is why 50 MHz
is taken as the clock. The two extremes are 50e6/65536 and 50e6/2. A motor's
drive output is high while the counter is below
`(period+1) * intensity / 256`, which gives 8-bit resolution. The reset value
of the period register is 0xFFFF.

**Motor process (`motor`, 16 instances).**

* A STEPS command loads the pulse count. A MOVE command then starts the motor
  up (`mu`) or down (`md`) at the given intensity.
* Each encoder pulse counts down the pulses still to go. When none remain, the
  drive stops.
* The encoder is decoded x1: a rising edge of A counts +1 while B is low, and
  -1 while B is high.
* The 16-bit position counter always follows the encoder, even when the motor
  is not driven.
* A MOVE with a pulse count of zero stops a running motor at once.
* An MSTATE command takes a snapshot of status and position. The two replies
  are offered to DATout one after the other.

**Sensor process (`sensor_proc`, 4 instances).**

* Each process owns a 16 x 8-bit RAM that its microcontroller keeps up to date.
  On the original board the whole table is refreshed about every 184 µs.
  The link itself takes a value in as little as 8 clocks, so it is never the
  limit; the sensor testbench runs one process at that pace (9120 clocks per
  scan at 50 MHz) and reads the new table 184 µs after it started to arrive.
* A SENSOR command reads the RAM and offers the reply in the next clock. No
  request ever goes to the microcontroller.
* The link is this design's own reading of the board's signal names: a 4-bit
  data bus, a 2-bit "half" signal and a START line per microcontroller.
* Each 8-bit value crosses the link as a high nibble, then a low nibble. Each
  nibble is taken on a rising edge of `mcu_half[0]`, and `mcu_half[1]` says
  which nibble it is.
* START comes with the high nibble of channel 0 and restarts the channel count.
* All link inputs are synchronised, so data and half must be set up at least
  one clock before the strobe.

**DATout (`dat_out`).** The 20 reply sources (16 motors, 4 sensor sets) have a
fixed priority, lowest index first. At most one source is granted per clock.
The granted word goes into a 16-entry FIFO that feeds `aer_tx`. `almost_full`
is raised when fewer than 4 entries are free. It throttles CMDin, because one
command can produce two replies and the output bus can be slower than the
input bus.

## PCI-AER board (`pci_aer`)

### Register map

Register names and field widths follow the original board. Bit positions were
not available and are assigned LSB-first here (see `cfg_t` in `aer_pkg`).

| BAR0 offset | name | access | contents |
|---|---|---|---|
| 0x00 | CONFIG | R/W | EAI[0] RAI[1] EAO[2] RAO[3] ETI[4] ETO[5] TIM[6] TOM[7] tprei[11:8] tpreo[15:12] GIE[16] Mst[23:17] IL[24] |
| 0x04 | STATUS | R | IFF[0] IFH[1] IFE[2] OFF[3] OFH[4] OFE[5] TI[18:6] TO[31:19] |
| 0x04 | MST BURST LENGTH | W | passed to the bus master (`mst_len`) |
| 0x08 | INTERRUPTION | R/W | enables for the six flags [5:0], LI[18:6], LO[31:19] |
| 0x0C | FIFO ACCESS | R/W | a read pops the IFIFO, a write pushes the OFIFO |
| 0x10 | MEM ADDRESS | R/W | bus-master memory address (`mst_addr`); a write clears 0x14 |
| 0x14 | WORD COUNTER | R | counts `mst_word` strobes from the bus master |
| BAR1 | — | R/W | same as FIFO ACCESS |

The CONFIG bits mean the following:

* EAI and EAO enable the IN-AER and OUT-AER machines.
* RAI and RAO hold the IN and OUT paths in reset (FIFO and state machine)
  while set.
* ETI and ETO switch time stamps on.
* `tprei` and `tpreo` set the timer tick to 1..16 clocks.
* IL selects the internal loop.
* GIE is the global interrupt enable.
* `Mst` goes to the bus master. `Mst[6]` masks the end-of-transfer interrupt.
* TIM and TOM are stored and read back but have no function here.

The register decoder (`pci_decoder`) turns the core's signals into one chip
select per register:

* `base_hit[0]` selects BAR0 and `base_hit[1]` selects BAR1;
* `addr[4:2]` gives the register offset;
* `s_wrdn` = 1 marks a write;
* `s_data` marks the data phase.

Reads return data in the same data phase.

### PC to AER: OUT-AER timing (`out_aer_sm`)

Each OFIFO word is `{time difference [31:16], address [15:0]}`. The time is
counted in ticks, and one tick is `tpreo+1` clocks of the 30 ns PCI clock. The
machine sends each address at its scheduled time:

* The schedule is measured against where the previous event should have gone
  out, not against when it actually went out.
* A signed *slack* counter holds the time left until the next event. Loading a
  word adds its time difference. Every tick subtracts one, including ticks
  spent waiting for a slow ACK.
* The event is sent as soon as slack is at or below zero. If the receiver was
  late, slack is already negative when the next word is loaded, and that event
  goes out earlier than its own time difference.
* If the lateness is larger than that time difference, the event goes out
  immediately. The rest of the lateness carries over to the following one.

Because of this, a slow ACK delays a few events but does not shift the whole
stream. Once the receiver is fast again, events are back on the original
schedule, and the testbench checks this to the clock.

Some details:

* Lateness is remembered down to -65535 ticks.
* The timer stops when the OFIFO is empty and the last handshake is over. The
  first word after an idle time starts a new schedule.
* The word 0xFFFF_FFFF is special. It waits 65535 ticks and sends nothing,
  which gives gaps longer than one 16-bit time difference.
* With ETO off, all times are ignored and events go out back to back.

### AER to PC: IN-AER time stamps (`in_aer_sm`)

Each incoming event becomes one IFIFO word
`{ticks since previous event [31:16], address [15:0]}`, with one tick every
`tprei+1` clocks. Three rules apply:

* The time saturates at 0xFFFF.
* With ETI off, the time field is zero.
* While the IFIFO is full, the event is not acknowledged. The sender waits
  instead of losing it.

### FIFOs, flags and interrupts (`sync_fifo`, `irq_ctrl`)

Both FIFOs are 4096 x 32-bit and first-word-fall-through. Each reports:

* a 13-bit word count (TI/TO in STATUS);
* empty and full flags;
* a "half" flag, high while the count is at least the programmable level LI or
  LO. It resets to 2048.

`irq_ctrl` raises INTA (active high, one clock after its cause) while GIE is
set and either of these holds:

* a STATUS flag is high and its INTERRUPTION enable bit is set;
* the bus master has reported the end of a transfer (`mst_end`) and `Mst[6]`
  does not mask it.

The end-of-transfer event is latched until the INTERRUPTION register is
written.

### Internal loop

With IL set, the OUT-AER machine talks directly to the IN-AER machine, and
both external AER buses stay idle. Words written to the FIFO register then come
back from the same register with their time differences measured. This serves
as a self-test of the whole board.

## Clocks and reset

* `pclk` is the PCI clock, 33 MHz (30 ns). `clk` is the AER-Robot clock,
  50 MHz.
* The two domains share no signal except the AER handshakes, which are
  synchronised.
* Reset (`rst`) is active high and synchronous in each domain.
* The OFIFO and IFIFO contents are not reset, since only their pointers
  matter.
* The sensor RAMs are not reset either. They hold stale values until their
  microcontroller has sent a first scan.

## How far to trust it, and where it departs from the original board

The architecture follows the original boards closely. The following parts come
from their description:

* the process structure, with 16 motor processes, 4 sensor processes with
  16-entry RAMs, a command receiver and a reply sender;
* the register names and field widths;
* the OUT-AER lateness rule;
* the time-stamp formats;
* the internal loop.

The rest is this design's own, because those details were not available:

* the command and reply bit layouts;
* handshake polarity;
* the microcontroller link protocol;
* the duty formula and the x1 encoder decoding;
* register bit positions;
* the special-word code;
* FIFO depth;
* interrupt latching;
* the 50 MHz clock.

Anyone connecting this to the original hardware or software must check these
first.

Known differences and omissions:

* **PCI-AER throughput.** The original PCI-AER board was measured at 6 Mevent/s
  with 120 ns pulses. With two-flop synchronisers on both ends, this design
  needs at least 6 PCI clocks per event, 5.5 Mevent/s, even against a receiver
  that answers combinationally. It needs 8 clocks (4.1 Mevent/s) against the
  testbench receiver, and 12 clocks (2.75 Mevent/s) through the internal loop.
  A faster sender would need a single-flop or unsynchronised ACK path. The
  AER-Robot side reaches 10 clocks per command/reply pair at 50 MHz, about
  5 Mevent/s, which is above the original board's 3 Mevent/s.
* **Bus mastering.** The bus-master engine belongs to the PCI core. This RTL
  provides its registers (address, burst length, word counter, control bits)
  and the end-of-transfer interrupt, but moves no data over PCI by itself.
* **Sensor resolution.** The microcontrollers digitise at 10 bits, but only
  8 bits per sensor are sent and stored, as on the original board.
* **Potentiometer count.** The hand has 12 joint potentiometers. Like the
  other sets, that set has 16 slots.
* **Not included.** The motor power stages, the analog sensor front ends, the
  board LEDs and the microcontroller firmware have no logic here. The same goes
  for the VITE-FLETE control model, which runs as software on the PC. Nor is
  the proposed future spike-rate interface included.

## Files

`rtl/`:

* `aer_pkg.sv`: shared types, command/reply layouts, CONFIG/flag structs.
* `aer_sync.sv`, `aer_rx.sv`, `aer_tx.sv`: synchroniser and the two
  handshake sides.
* `cmdin.sv`, `pwm_timebase.sv`, `motor.sv`, `sensor_proc.sv`, `dat_out.sv`,
  `aer_robot.sv`: the hand-side board.
* `sync_fifo.sv`, `pci_decoder.sv`, `pciaer_regs.sv`, `irq_ctrl.sv`,
  `out_aer_sm.sv`, `in_aer_sm.sv`, `pci_aer.sv`: the PC-side board.
* `aer_hand_system.sv`: the two boards joined (top).

`tb/`:

* `tb_<module>.sv`: one self-checking testbench per module.
* `aer_src_model.sv`, `aer_sink_model.sv`: behavioural AER sender and receiver
  with adjustable ACK delay.
* `enc_model.sv`: quadrature encoder that turns while its motor is driven.
* `mcu_model.sv`: sensor microcontroller that sends scans over the nibble link.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/aer_pkg.sv tb/tb_aer_hand_system.sv --top-module tb_aer_hand_system
./obj_dir/Vtb_aer_hand_system
```

Replace the name to run any other testbench. `tb_aer_hand_system` runs the
top at its default size, with 4096-word FIFOs and all 16 motors and 4 sensor
sets, in about ten seconds. It performs these steps in order:

1. a self-test through the internal loop;
2. a switch to the external buses;
3. a PWM period change;
4. eight motor moves, four up and four down;
5. sensor reads of every set;
6. motor state queries;
7. a stall of the reply path that fills the hand board's reply FIFO;
8. the IFIFO level interrupt;
9. the bus-master end-of-transfer interrupt.

It counts each mechanism and fails if one never happens. The unit testbenches
check, among other things:

* exact OUT-AER timing, with and without a slow receiver;
* PWM duty against the formula;
* motors stopping after exactly the programmed pulse count;
* one-clock sensor reads;
* a sensor table refreshed within 184 µs at the board's scan pace;
* the event rate of the AER sender and of the internal loop, and the
  command/reply rate of the hand board;
* FIFO behaviour at full depth against a queue model;
* the register map and the interrupt equation.

## Changing it

* Motor, sensor-set and channel counts, the PWM and pulse-count widths, and
  the command and reply layouts are constants in `aer_pkg`.
* The layouts are used only in `cmdin` (decode) and in the `rsp_*` functions.
* The FIFO depth is the `FIFO_DEPTH` parameter of `pci_aer`. Keep the 13-bit
  STATUS count fields in mind if it grows beyond 4096.
