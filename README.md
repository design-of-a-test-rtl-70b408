# Stimuli Measurement Unit: interrupt-latency meter for an RTOS test bench

How long does a processor running a real-time operating system take to react
to an interrupt? This RTL measures that from the outside, with nothing but
pins. The FPGA sends a periodic interrupt request into the board under test.
Software on that board shows its state on two GPIO pins:

- a task toggles GPIO4 all the time;
- the interrupt service routine (ISR) toggles GPIO5.

The FPGA time-stamps every change of those pins with its 50 MHz clock
(20 ns resolution) and keeps the samples in on-chip memory. A PC then reads
them out over RS232. The interrupt latency is the tick difference between the
task's last edge and the ISR's first edge.

```
 push-buttons ──► irq_gen ──────────────► irq_out ──► test device EXTINT4
                     │ running
 gpio_in ◄── test device GPIO4/5
    │
    ▼
 sampler ──► data_storage (32768 x 40) ──► data_send ──┐
    ▲ rearm                                   ▲ rewind  ├─► tx_block ──► uart_txd ──► PC
    │                                         │         │   (uart_tx)
 uart_rxd ──► rx_block (uart_rx) ─ req_end ───┘         │
                     ├─ req_data ──► data_send          │
                     └─ req_param ─► param_send ────────┘
```

## Operating sequence

1. After reset, nothing is generated and `irq_out` is low.
2. Pressing **start** starts the interrupt pulses and lights `led_start`. The
   pulses are 100 ms high every 2 s, and the first one begins at once. The
   sampler captures while generation runs.
3. Every change of the 8-bit `gpio_in` byte is written to memory as one
   sample. When 32768 samples are stored, `led_full` lights and capture stops.
4. The PC sends command `11h` 128 times. Each one returns the next 256 samples.
5. The PC sends `12h` (end of data). This rewinds the read address and re-arms
   the sampler, so the next capture starts at word 0.
6. Pressing **stop** ends the pulses at any time and lights `led_stop`.

Command `13h` returns the parameter frame at any time. It carries the clock
frequency in MHz (32h = 50).

## Samples and time stamps

A sample is 40 bits, `sample_t` in `smu_pkg`:

| bits  | field   | meaning |
|-------|---------|---------|
| 39:32 | `io`    | GPIO byte; bit 0 = GPIO4 (task), bit 1 = GPIO5 (ISR), bits 7:2 as wired |
| 31:0  | `ticks` | clock cycles since reset, wrapping after 2^32 (86 s at 50 MHz) |

Example: the task pin high at tick 5 gives `01_00000005h`. Task pin low at
tick 6 gives `00_00000006h`. ISR pin high at tick 7 gives `02_00000007h`. The
latency is (7 − 6) × 20 ns = 20 ns.

The sampler stores **changes only**. Stored at every clock, 32768 words would
cover only 655 µs, a small fraction of one 2 s interrupt period. Stored on
change, one capture covers as many interrupts as the device's toggle rate
allows.

The pins pass through a two-flop synchroniser. A change that arrives just
after the clock edge that brings the tick counter to *k* is stored with tick
*k* + 2. Every sample has the same offset, so tick differences are exact.

## Serial protocol

The link runs at 115200 bit/s with 8 data bits, even parity and one stop bit,
LSB first. At 50 MHz one bit is 434 clocks (the rounded value of 50e6/115200,
an error of 0.006 %).

Every frame starts with STX = 02h and has ETX = 03h before its last byte.
The last byte, CKS, is the low byte of the sum of all bytes before it.

| frame      | direction   | bytes |
|------------|-------------|-------|
| command    | PC → FPGA   | `02 ID 03 CKS`, with ID = 11h (data), 12h (end of data) or 13h (parameter) |
| parameter  | FPGA → PC   | `02 32 03 37` |
| data       | FPGA → PC   | `02`, then 256 × 5 sample bytes, then `03 CKS` (1283 bytes) |

How the receiver treats commands:

- It skips bytes until it sees an STX.
- It accepts a frame only when ETX and CKS are correct and ID is known.
- It drops a frame that contains a byte with a parity or stop-bit error.
- A rejected frame gets no answer.

A data-frame sample is sent most significant byte first: the GPIO byte, then
the tick count from bit 31 down. Each `11h` request reads the next 256
words; after the last word the address wraps to 0.

Sending the whole memory takes 128 frames × 1283 bytes × 11 bits ≈ 15.7 s at
115200 bit/s.

## Modules

| file | role |
|------|------|
| `rtl/smu_pkg.sv` | protocol codes, `sample_t`, bit-period function |
| `rtl/byte_stream_if.sv` | valid/ready/last byte stream with a hold assertion |
| `rtl/irq_gen.sv` | interrupt pulse generator, start/stop, LEDs |
| `rtl/sampler.sv` | synchroniser, tick counter, change detect, sample counter |
| `rtl/data_storage.sv` | 32768 × 40 two-port RAM, one clock read latency |
| `rtl/uart_rx.sv` | serial receiver, mid-bit sampling, error flags |
| `rtl/rx_block.sv` | command frame registers, checksum, request pulses |
| `rtl/param_send.sv` | parameter frame builder |
| `rtl/data_send.sv` | data frame builder with the memory address counter |
| `rtl/uart_tx.sv` | serial transmitter |
| `rtl/tx_block.sv` | selects parameter or data frame, feeds `uart_tx` |
| `rtl/smu_top.sv` | the unit |

The frame builders hand bytes to the transmitter through `byte_stream_if`. A
byte moves when `valid` and `ready` are both high at a clock edge. `last`
marks the checksum byte, and `tx_block` keeps one source selected until
`last`, so frames never interleave. If both builders ask at the same moment,
the parameter frame goes first. A request that arrives while its builder is
busy is ignored.

Parameters of `smu_top`, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 50 000 000 | clock; sets the bit period, the pulse timing and the parameter byte |
| `BAUD` | 115 200 | serial rate |
| `IRQ_PERIOD_US` | 2 000 000 | interrupt period |
| `IRQ_TON_US` | 100 000 | interrupt high time |
| `DEPTH` | 32 768 | sample memory words |
| `FRAME_SAMPLES` | 256 | samples per data frame |

Ports: `clk` and `rst_n` (asynchronous, active low); `btn_start` and
`btn_stop` (active high, synchronised inside); `irq_out` to the device's
EXTINT4; `gpio_in[7:0]` from the device; `uart_rxd` and `uart_txd`;
`led_start`, `led_stop` and `led_full`.

## Where this RTL makes its own choices

These points are not fixed by the measurement method. They are choices made
here, and each can be changed:

- **Capture.** Only changes are stored. Capture runs only while interrupt
  generation runs and stops when the memory is full.
- **End of data (12h).** It rewinds the read address and re-arms capture.
- **Data sending.** Data frames are sent whenever asked for, even before the
  memory is full. `led_full` tells the operator when a capture is complete.
- **Sample layout.** The 40-bit word is split 8 + 32 bits. Its bytes go out
  most significant first.
- **Synchronisers** on the pins, the buttons and the serial input.
- **Buttons.** They are active high. If start and stop are pressed together,
  stop wins. No debouncer is needed, because pressing a button only sets or
  clears a state.
- **Extras.** The `led_full` LED and the `bad_frame` flag of `rx_block` are
  additions. `bad_frame` is left unconnected in the top.
- **Memory reset.** The memory contents are not reset.

## Relation to the published description

The unit follows a published design of an RTOS interrupt-latency test
environment: its blocks, the 50 MHz time base, 2 s / 100 ms pulses,
40-bit samples in a 32768-word memory, the three commands and their frame
formats. Where that description is open or not consistent, this RTL settles
it as follows:

- **Parity.** The serial link is specified with even parity, but the PC
  program's settings are also shown with no parity. This RTL uses even
  parity, so the PC must be set to even parity. To change it, edit the
  parity bit in `uart_rx` and `uart_tx`.
- **Data frame size.** The data frame is called a 4-byte frame, but its
  table gives a 256 × 5-byte data field. This RTL sends the full
  1283-byte frame.
- **Storing samples.** The sampler is said both to register the pins at
  every clock and to store their changes. This RTL stores changes only, as
  explained above.
- **Hidden details.** The insides of the UARTs, the arbitration in the
  transmission block and the meaning of end of data (12h) are not described.
  They are this design's, as listed in the previous section.

## Not included

- **The test device** is a processor board running RTOS software, outside
  the FPGA.
- **The PC program** is software.
- **Board parts** (oscillator, buttons, LEDs, RS232 level shifter) are outside
  the RTL.

Behavioural stand-ins for the first two are in `tb/`.

## Simulation

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
ends with `$finish`. Build one with Verilator 5, from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/smu_pkg.sv tb/tb_smu_top.sv \
  --top-module tb_smu_top -o sim && obj_dir/sim
```

Most testbenches use a 10 ns clock and count all times in clock cycles.
`tb_irq_gen_full` and `tb_sampler_table1` use the real 20 ns clock.

| testbench | what it covers |
|-----------|----------------|
| `tb_irq_gen` | period and on-time to the clock, start/stop, LEDs |
| `tb_sampler` | exact samples, timestamps and addresses for random pin changes; full; rearm |
| `tb_data_storage` | random write/read, latency, read-before-write |
| `tb_uart_rx` | random bytes, latency bound, parity and stop errors, recovery |
| `tb_uart_tx` | values, parity, character spacing of 11 bits + 1 clock |
| `tb_rx_block` | all three commands; bad checksum, bad ETX, unknown ID; resync; parity error |
| `tb_param_send` | frame bytes and `last` under random back-pressure |
| `tb_data_send` | every byte of every frame, address walk, wrap, rewind |
| `tb_tx_block` | frames whole and not interleaved, tie order |
| `tb_sampler_table1` | the worked example: samples `01_00000005h`, `00_00000006h`, `02_00000007h`, latency 20 ns |
| `tb_irq_gen_full` | default `irq_gen` at 50 MHz: period exactly 2 s, high time exactly 100 ms (about one minute to run) |
| `tb_smu_top` | whole unit at reduced size (see below) |
| `tb_smu_top_full` | whole unit at default parameters (see below) |

`tb_smu_top` runs the whole unit at 1 MHz and 100 kbit/s (10 clocks per
bit), with 1500-clock pulses and a 64-word memory. Behavioural models play
the device (`tb_test_device`) and the PC (`tb_uart_host`). The test goes
through these steps:

1. It requests and checks the parameter frame.
2. It checks that a corrupt command gets no answer.
3. It starts generation and captures until the memory is full.
4. It reads the whole memory and compares every sample with the device's own
   log of pin changes.
5. It checks the interrupt latency shown by the stored ticks against the
   latency the model chose.
6. It reads one frame past the end to check the address wrap.
7. It stops generation, sends end of data, then captures and reads again.

It counts how often each of these mechanisms happened and fails if any count
is zero.

`tb_smu_top_full` runs one measurement with every parameter at its default.
The steps are:

1. It checks the parameter frame, `02 32 03 37`.
2. It starts generation. The modelled device answers the first interrupt.
3. It captures until all 32768 words are written.
4. It reads 32 data frames (8192 samples) over the 115200 bit/s link and
   checks every sample and the measured latency.
5. It sends end of data and checks that the first frame comes back.

That run is about 200 million clocks, roughly three minutes of simulation.
Set `READ_FRAMES` to 128 to read the whole memory. That takes about
785 million clocks, close to ten minutes, and it passes too.

The memory is written as a plain array and maps onto FPGA block RAM
(1 310 720 bits).
