# Distributed fault-tolerant drive for a six-phase machine

A multiphase machine survives the loss of a phase only if the drive can lose a
phase too. This design therefore does not use one monolithic inverter. Each
machine phase gets its own **power cell**, a half bridge with a small FPGA of
its own. A central **controller** is linked to every cell by a dedicated
serial point-to-point line (a star topology).

The controller does three jobs:

- It measures the phase currents and the rotor position.
- It runs the current control for all phases on a small SIMD floating-point
  processor, the *femtoCore*.
- It sends each cell its duty cycle as a short protected message.

Each cell turns its duty cycle into dead-time-protected gate signals. It
switches itself off when its link goes quiet. A failed cell or a broken fibre
therefore only removes one phase, and the controller can re-plan the
references of the remaining phases.

This repository holds the synthesizable SystemVerilog for all of it:

- the controller's programmable logic;
- the power cell logic;
- the serial protocol used at both ends.

It also holds self-checking testbenches for every block and an end-to-end
testbench of the whole drive.

## System at a glance

```
                 APB (host CPU)        aux master
                      |                    |
                 apb_bridge                |
                      +---- ctrl_bus_switch ----+---- ctrl_regs (config/status, mailbox)
                                                +---- femtoCore instruction store
 6 x ADC --> adc_spi_hub --> adc_postproc --fast--> fault_monitor --> trip
                                  |  (avg /4)
                                  +--dec--> resolver_spi --> pid_ctrl --+
                                  +--tick-> dds_gen (6 sines) ----------+
                                                                       v
                                      fcore_dma_in --> fcore (SIMD, 1 channel/phase)
                                                               | done
                                      fcore_dma_out <----------+
                                           | duty[k]
                     6 x rtcu_link  ==== serial lines ====  6 x power_cell_logic --> gates
                                                            (rtcu_link, edge_aligner,
                                                             pwm_modulator)
 data_capture taps currents, duties, position, speed, PID, reference --> stream out
```

`drive_top` contains the controller and the six power cells. The fibres are
outside it: each link has a controller-side pair (`ctrl_line_tx/rx`) and a
cell-side pair (`cell_line_rx/tx`). A testbench or a board wrapper connects
the two pairs and can cut them or corrupt bits.

### One control period

The default timing is a 100 MHz clock, 240 kSps current sampling and a
60 kHz PWM carrier. One control period runs as follows:

1. A sample timer (register 1, 416 clocks) starts `adc_spi_hub`. The hub
   clocks six ADCs in parallel with one state machine and six shift
   registers. A conversion takes 66 clocks.
2. `adc_postproc` subtracts the mid-scale offset. Every sample goes to the
   *fast* stream. The average of four samples goes to the *decimated*
   stream at 60 kHz.
3. `fault_monitor` compares both streams with their limits. A fast-stream
   fault trips within one sample, about 4 µs. The limits are separate
   because the decimated limit can be tighter.
4. Each decimated sample starts a resolver read (`resolver_spi`) and one
   step of the six-channel `dds_gen`. The six sine references are 60° apart.
5. The speed word feeds `pid_ctrl`. When its output is ready,
   `fcore_dma_in` copies 18 words into the core's register file, one clock
   per word. For each phase *k* it writes:
   - the current into `r1`;
   - the sine reference into `r2`;
   - the PID output into `r4`.

   It then starts the core.
6. The core runs the same program on six channels. When it stops,
   `fcore_dma_out` reads `r3` of each channel, which holds the duty in carrier
   counts.
7. Each duty becomes a message with address `0x01` for that phase's link.

With the test program, steps 4 to 7 take well under 900 clocks. That is
inside the 1666-clock control period.

## The femtoCore

The femtoCore is a small processor for the control law, made to be
predictable rather than fast at branching. It has no branches at all. A
program runs from address 0 until `STOP` or the end of the instruction store,
so its run time is a fixed number of clocks whatever the data.

**Instruction word.** The low 5 bits are the opcode. Register fields are 6
bits, giving 64 registers, and `r0` always reads zero.

| form | fields | opcodes |
|---|---|---|
| binary | A = [10:5], B = [16:11], D = [22:17] | ADD 1, SUB 2, MUL 3, CGT 8, CLE 9, CEQ 10, CNE 11, AND 13, OR 14, SATP 16, SATN 17 |
| unary | A = [10:5], D = [16:11] | ITF 4 (int→float), FTI 5 (float→int), NOT 15 |
| constant | D = [10:5]; the next word is the 32-bit constant | LDC 6 |
| none | | NOP 0, STOP 12 |

**Arithmetic rules:**

- Arithmetic is IEEE-754 single precision, rounding to nearest even.
- Subnormal numbers are flushed to zero.
- FTI truncates toward zero and saturates.
- Compares return `1.0f` or `0.0f`, so their result can scale other values
  directly.
- SATP and SATN clamp A from above or below by B.

`fcore_pkg` holds all of this as functions, together with instruction
encoders for writing programs.

**Pipeline.** The core has a fetch/decode stage, an execution unit of
`LATENCY = 5` stages and a write-back. An operand is read in its issue clock.
A result is written `LATENCY + 1` clocks after its producer issued. A
dependent instruction must therefore issue at least 7 issue slots after its
producer:

- In scalar mode (`n_ch = 1`), the program needs 6 delay slots, for example
  NOPs.
- **SIMD mode** interleaves channels. Every instruction is issued once per
  active channel, for channels 0 to `n_ch-1`, before the program counter
  moves on. Each channel has its own bank of 64 registers.
- With 7 or more channels, the next instruction of a channel comes at least
  7 slots later. The pipeline latency is then completely hidden and no delay
  slots are needed.
- With the six phases of this drive (`n_ch = 6`), one independent
  instruction or NOP between dependent instructions is enough.

**Timing.** A run takes *S* + 2 + `LATENCY` + 2 clocks from `start` to
`done`. *S* counts `n_ch` slots per instruction before `STOP` and `n_ch + 1`
slots per `LDC`. `done` comes only after the last result is in the register
file.

**Interlocks:**

- The instruction store is dual-ported. The host writes it over the control
  bus; the core reads it.
- While the core runs, host writes are held off. On the control bus this
  shows as wait states.
- The register file's DMA port is granted only while the core is idle.

A program therefore never changes under a running core, and a DMA transfer
never collides with execution.

## The serial link (RTCU protocol)

Every message carries 40 bits: an 8-bit address and 32-bit data. Both ends
use the same endpoint, `rtcu_link`.

**Transmit chain:**

1. Multiplicative scrambler, 1 + x⁶ + x⁷, self-synchronising and bypassable.
2. Forward-error-correction encoder.
3. Serializer: start bit `1`, MSB first, one bit per clock, one guard bit.
   The idle line is `0`.

**Receive chain:** deserializer, decoder and descrambler. Each stage is
registered.

| FEC mode | frame | corrects | end-to-end latency |
|---|---|---|---|
| 0 none | 1 + 40 = 41 bits | nothing | 46 clocks (460 ns) |
| 1 Hamming SECDED | 1 + 6 check + 1 parity + 40 = 48 bits | 1 bit, detects 2 | 53 clocks |
| 2 Reed-Solomon | 1 + 16 parity + 40 = 57 bits | 2 wrong 4-bit symbols | 62 clocks |

Use no FEC on a clean optical line. Hamming costs little latency where part
of the run is electrical. Reed-Solomon is for heavy interference.

The Reed-Solomon code works over GF(16) with the polynomial x⁴ + x + 1. It is
RS(15,11) shortened to 14 symbols: 10 data and 4 parity symbols. The
generator has roots α¹ to α⁴ and coefficients g₀ to g₃ = 7, 8, C, D. The
decoder computes syndromes, then uses Peterson-Gorenstein-Zierler for the
error locator, a Chien search and Forney's formula. It is a single-clock
combinational decoder. That keeps latency low but is the longest logic path
in the design.

**Link health:**

- When `ack_en` is set, every data message is acknowledged with address
  `0xFE`.
- If nothing has been sent for `HB_PERIOD` clocks (default 10 000, i.e.
  100 µs), a heartbeat with address `0xFF` goes out.
- An endpoint that has received nothing valid for `TIMEOUT` clocks (default
  25 000) raises `link_fault`. It clears the fault on the next valid frame.
- Transmit priority is ACK, then the user message, then the heartbeat.
- Corrected and uncorrectable frames are counted.

These rules bound the detection time of a broken fibre to 250 µs, on both
sides at once.

## The power cell

`power_cell_logic` decodes messages into its settings:

| address | setting |
|---|---|
| `0x01` | duty |
| `0x02` | period |
| `0x03` | rising dead time |
| `0x04` | falling dead time |
| `0x05` | duty min |
| `0x06` | duty max |
| `0x07` | enable |
| `0x08` | carrier sync: restart the carrier at the value in the data |

**Edge aligner.** `edge_aligner` clamps each new duty to [min, max] and
reports saturation. It turns the duty into four compare values on a
sawtooth carrier:

- high side on from `dt_rise` to `duty`;
- low side on from `duty + dt_fall` to `period`.

**Modulator.** `pwm_modulator` holds the compare values in shadow registers
and loads them only at the carrier wrap. A half-written setting is therefore
never used.

**Carrier synchronisation.** All cells run from the same clock, but each
starts its carrier when its first duty arrives, so nothing else keeps the
carriers in step. The controller can therefore send a sync message to all
six cells in the same clock, every N control periods (register 13, 0 = off).
Sync goes ahead of mailbox and duty messages. Every link has the same
latency, so all cells restart their carriers in the same clock. A sync with
a non-zero value shifts one cell's carrier, which allows phase-interleaved
carriers. This is the simple periodic synchronisation packet that a star
network makes possible, where a ring would need per-hop delay compensation.

**Gate outputs.** The six gate outputs drive the three-input gate driver of
each switch: two pull-ups and one pull-down. Here both pull-ups follow the
PWM and the pull-down follows its complement.

**Safe state.** The cell holds both switches off while it is disabled or its
link is in fault. An assertion checks that the two switches are never on
together.

## Control bus and registers

The control bus is a simple shared memory-mapped bus. It has:

- address, write data and read data;
- read and write strobes;
- an active-low `ready_n` from the slave.

A transfer completes in the clock where a strobe is high and `ready_n` is
low. Busy slaves hold `ready_n` high to insert wait states.

`ctrl_bus_switch` connects several masters to several slaves by the top 4
address bits, with fixed priority (master 0 highest). `apb_bridge` makes the
host's APB port master 0, so bus wait states become APB wait states.

The address map of `drive_top`:

- `0x0000` – configuration and status (`ctrl_regs`). The full register list
  is in the opening comment of `rtl/drive_top.sv`.
  - Register 0 holds the run bits, the FEC mode and the scrambler bypass.
  - Registers 1 to 10 hold the sample period, channel count, current
    limits, PID gains, set point, DDS frequency and capture setup.
  - Registers 11 and 12 are the cell mailbox: write the data to 12, then
    write `{cell mask, address}` to 11.
  - Register 13 sets the carrier sync period in control periods (0 = off).
  - Registers 16 to 23 are status: faults, core run count, FEC statistics,
    heartbeat/ACK counts and capture events.
- `0x1000` – femtoCore instruction store, word addressed. Every access takes
  one wait state. While the core runs, an access waits until it stops.

## Data capture

`data_capture` records signals for tuning and monitoring:

1. Each of 16 capture points keeps its latest value.
2. Six multiplexers choose which points to record.
3. Every `divider` clocks, the six values are written into an inline FIFO as
   tagged words `{slot, source, value}`.
4. When the fill level reaches `trig_level`, a trigger pulse goes out. This
   lets external logic start an event at a known point of the capture
   window.
5. When the FIFO is full, sampling stops and the buffer streams out on a
   valid/ready port.
6. `buf_done` pulses at the end, and capture waits for `resume`.

## Files and simulation

| file | content |
|---|---|
| `rtl/fcore_pkg.sv`, `rtl/rtcu_pkg.sv` | shared types, opcodes, FP32 and FEC functions |
| `rtl/fcore*.sv` | femtoCore and its DMA engines |
| `rtl/rtcu_*.sv` | protocol: scrambler, FEC encoder/decoder, serializer, deserializer, endpoint |
| `rtl/edge_aligner.sv`, `rtl/pwm_modulator.sv`, `rtl/power_cell_logic.sv` | power cell |
| `rtl/adc_spi_hub.sv`, `rtl/resolver_spi.sv`, `rtl/adc_postproc.sv`, `rtl/fault_monitor.sv` | sensors and protection |
| `rtl/pid_ctrl.sv`, `rtl/dds_gen.sv`, `rtl/data_capture.sv` | controller peripherals |
| `rtl/ctrl_bus_switch.sv`, `rtl/apb_bridge.sv`, `rtl/ctrl_regs.sv` | control bus |
| `rtl/drive_top.sv` | complete drive |
| `tb/tb_*.sv` | self-checking testbenches; each prints `TB_RESULT checks=N failures=M` |
| `tb/ltc2313_model.sv`, `tb/ad2s1210_model.sv`, `tb/fp_ref_pkg.sv` | ADC and resolver-converter models, FP32 reference |

To simulate, for example the whole drive at its default parameters (about a
minute to build and a second to run):

```
verilator --binary --timing --assert --top-module tb_drive_top \
  rtl/fcore_pkg.sv rtl/rtcu_pkg.sv tb/fp_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/ltc2313_model.sv tb/ad2s1210_model.sv tb/tb_drive_top.sv
./obj_dir/Vtb_drive_top +verilator+rand+reset+2
```

The packages go first, because the other files import them.

`tb_drive_top` loads a femtoCore program over APB, sets up the cells through
the mailbox, and runs the loop. It recomputes every duty in FP32 and checks
that it arrives in the right cell. It then forces and counts each mechanism
at least once:

- a bus stall on a program write while the core runs, and duty saturation
  in the cells;
- heartbeats with sampling paused;
- Hamming and Reed-Solomon corrections of injected bit errors;
- a fibre cut, with both ends detecting it, gates held off, then recovery;
- an over-current trip;
- carrier sync: one cell is knocked out of step by a one-off sync, seen
  misaligned, then brought back by the periodic sync. After that, all six
  cells must start every period in the same clock;
- a capture trigger, halt and stream-out.

## Where this design departs from, or goes beyond, its source description

The architecture follows the original description:

- the star of point-to-point links with a scrambler, optional FEC, ACK and
  heartbeat;
- the five-stage SIMD FP32 core with interlocked instruction and register
  memories, input/output DMA and no branches;
- the sensor hub with fast and decimated over-range checks;
- the shift-and-multiply PID, the multichannel DDS and the multi-carrier PWM
  with shadow loading;
- capture with a fill-level trigger, and the fixed-priority control bus with
  active-low ready.

The following are this design's own choices, because the description does
not fix them:

- The message layout (8-bit address and 32-bit data), the reserved
  ACK/heartbeat addresses, the line coding with start and guard bits, the
  scrambler polynomial, and the Hamming and Reed-Solomon code parameters.
- The heartbeat period and link timeout.
- The opcode numbers of CLE (9) and FTI (5), compare results as 1.0/0.0,
  FTI truncation, and flush-to-zero.
- The depth of the instruction store (1024) and the number of SIMD banks (8).
- The cell register map, the sync message format, and the gate-driver pattern: plain two-level
  driving of the three-input gate driver.
- The trigger chain of the control period, the DMA data layout, the
  register map and the cell mailbox.
- Averaging decimation by 4, the ADC framing (16 SCLKs at 25 MHz), and
  resolver reads of 16-bit position and velocity.
- The capture FIFO depth and tag format.

These parts are not built because they are not logic. Behavioural models are
used in testbenches where needed.

- The host processor and its software.
- The AXI DMA from the capture FIFO into main memory. The FIFO instead
  streams out on a valid/ready port, and `buf_done` stands for its
  interrupt.
- The ADC and resolver-converter chips.
- The optical transceivers and their clock recovery. The link here runs at
  one bit per clock on the system clock, and `CLK_PER_BIT` oversamples for
  slower lines.
- The gate drivers and power stage.

The current control program itself is not part of this repository. The
reconfiguration after a phase fault is also not included: recomputing the
references of the remaining phases is software that writes new program
constants. The testbench program is a simple proportional law that exercises
the data path.

The Reed-Solomon decoder is combinational in one clock. At 100 MHz it will
probably need pipelining for timing closure. That would add a few clocks to
the RS latency, which is still well below the latency of the transceivers.
