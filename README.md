# RSI: an accelerated sensor-fetch interface

A robot's state estimator needs fresh sensor data many times a second, and a
CPU that reads its sensors over I2C in software spends most of that time waiting
on the bus. This design attacks the problem in two ways:

1. **The RSI protocol (Robot Sensor Interface).** RSI keeps the two-wire I2C
   bus, its START/STOP conditions and its per-byte acknowledge. It changes the
   frame so that a read no longer needs a repeated START and a second slave
   address. A one-byte read takes 29 SCL periods instead of I2C's 39. That is
   100 µs saved per fetch at 100 kHz.
2. **A hardware accelerator.** The CPU does not run the protocol itself. It
   stores the "slave details" (which sensor, which register, how many bytes,
   where to put them) once. After that it only pulses `en`. The accelerator
   runs the fetches, the RSI block stores the bytes in a buffer, and the CPU
   gets one interrupt when everything is in memory. The CPU's part per run is
   one enable and one interrupt service.

The RTL here is the whole system: the master side (accelerator, control
register, status register, RSI master, buffer) and RSI sensor slaves on a
shared open-drain bus. The host CPU is not included. Its signals are the top
level's ports, and the testbenches play its part.

## The RSI frame

In an I2C register read, the master first writes the register address to the
slave. It then sends a repeated START and the slave address again with the read
bit:

    I2C read:  S  SA(7)+W  ACK  RA(8)  ACK  S  SA(7)+R  ACK  DATA  NACK  P
    RSI read:  S  SA(8)    ACK  RA(7)+R  ACK  DATA  ACK ... DATA  NACK  P
    RSI write: S  SA(8)    ACK  RA(7)+W  ACK  DATA  ACK ... DATA  ACK   P

RSI moves the R/W bit from the slave-address byte to the register-address byte.
This has two effects:

- The slave address grows to 8 bits, so one master can address 256 sensors.
- The register address shrinks to 7 bits, so a sensor can expose 128 registers.
  Robots tend to have many sensors with few registers each.

A slave acknowledges the register byte only if it actually has that register.
A read then goes straight into the data phase.

Counted in SCL periods, with START and STOP as one period each, an n-byte RSI
frame takes `1 + 8 + 1 + 7 + 1 + 1 + 9n + 1 = 20 + 9n` periods. A frame that
fails takes fewer:

| frame | SCL periods |
|---|---|
| n-byte read or write | 20 + 9n (29 for one byte) |
| slave address not acknowledged | 11 |
| register address not acknowledged | 20 |

The master's states are numbered 0 to 9 in frame order:

| # | state | what happens |
|---|---|---|
| 0 | `ST_IDLE` | the bus is idle |
| 1 | `ST_START` | the master makes a START |
| 2 | `ST_SADDR` | 8 slave-address bits |
| 3 | `ST_SACK` | the slave's acknowledge |
| 4 | `ST_RADDR` | 7 register-address bits |
| 5 | `ST_RW` | the R/W bit |
| 6 | `ST_RACK` | the slave's acknowledge |
| 7 | `ST_DATA` | 8 data bits |
| 8 | `ST_DACK` | ACK or NACK after the byte |
| 9 | `ST_STOP` | the master makes a STOP |

States 7 and 8 repeat once for each byte. If either address is not
acknowledged, the master goes directly to `ST_STOP` and reports an error. On a
write, it does the same when the slave refuses a byte. On a read, the master
ACKs each byte and NACKs the last one. A byte counter, loaded with the data
size, decides which byte is last.

### Bit timing (`rsi_master`)

This is the part to read carefully before changing anything.

- **Periods and quarters.** Each SCL period is four quarters, and each quarter
  is `QUARTER` system clocks. By default `QUARTER` is
  `CLK_HZ / (4 * SCL_HZ)`, which is 125 for a 50 MHz clock and a 100 kHz bus.
- **Data bits and ACK slots.** SCL is low in quarters 0–1 and high in
  quarters 2–3. The master changes SDA when quarter 1 begins. It samples SDA in
  the last clock of quarter 3, just before SCL falls. Sampling that late gives
  a slave almost a whole period to answer after it sees SCL fall.
- **START.** SCL stays high for the whole period, and SDA falls when quarter 2
  begins.
- **STOP.** SCL is low in quarters 0–1, and SDA is pulled low in quarter 1.
  SCL rises in quarter 2, and SDA is released in quarter 3.
- **Outputs.** `scl_o` and `sda_o` are registered open-drain enables: 0 pulls
  the line low and 1 releases it. The master never drives a 1. Clock
  stretching is not supported: the master does not read SCL back.
- **Buffer access.** The RSI master uses the buffer through one port.
  - On a read, each received byte is written at `base + k` in the clock where
    its last bit is sampled.
  - On a write, byte `k` is read from `base + k`. The address is set up at
    least one SCL period before the byte is needed, which hides the buffer's
    one-cycle read latency.

An assertion checks that SDA never changes while SCL is high, except in the
START and STOP states.

## The accelerated fetch (`rsi_soc`)

```
 CPU ──cfg/en──► rsi_accel ──ctrl_we/ctrl_d──► rsi_control_reg ──ctrl──► rsi_master ◄──► SCL/SDA
      ◄──irq───       ▲                                                  │  │
                      └────status──── rsi_status_reg ◄──state update────┘  │
 CPU ◄──cpu_rdata── rsi_buffer (port B)            (port A) ◄──bytes───────┘
```

One run goes like this:

1. The CPU writes descriptors with `cfg_we`/`cfg_idx`/`cfg_desc` and the run
   length with `cfg_len_we`/`cfg_len`. Each descriptor holds: R/W, slave
   address, register address, size, and buffer base.
2. The CPU pulses `en`.
3. For each descriptor in turn, `rsi_accel` writes a control word with
   `start = 1` into `rsi_control_reg`.
4. `rsi_master` takes the control word and pulses `accept`, which clears the
   start bit. Then it runs the frame.
5. `rsi_status_reg` records the master's state and byte count on every cycle.
   It sets the sticky `done` and `error` flags when the STOP finishes, and
   clears them on the next `accept`.
6. The accelerator waits until the status shows the command was taken
   (`busy`), then until the frame is finished (`done`). Then it moves to the
   next descriptor.
7. After the last descriptor, it raises `irq`, which stays high until
   `irq_ack`, and goes idle.

Other behaviour:

- `err` is set if any frame in the run failed. A failed frame does not stop
  the run.
- An `en` pulse during a run is ignored.
- A run of length 0 raises the interrupt at once.
- `run_cycles` reports how many clocks the run took from `en` to `irq`.
- The CPU reads results, or writes bytes for a write frame, through the
  buffer's second port (`cpu_*`). That port has one clock of read latency.

The descriptors are kept, so the same fetch can be repeated with nothing more
than another `en`. The default table holds 9 descriptors: three sensors with
three single-byte registers each, read one register per frame.

## Sensor slaves (`rsi_sensor`, `rsi_system`)

`rsi_sensor` is the bus side of an emulated sensor. It has `NUM_REGS` byte
registers at `REG_BASE ...`, which the sensing element loads through
`sample_we`/`sample_data`. On the bus:

- It acknowledges only its own 8-bit address, and then only a register it
  holds.
- It sends registers MSB first. After each byte it moves to the next register,
  wrapping to the first, for as long as the master ACKs.
- On a write, it stores and acknowledges each byte.
- A STOP or a START resets it to address matching.

SCL and SDA pass through two synchronising flops. As a result, the slave
answers 3–4 clocks after SCL falls, so the master needs `QUARTER >= 2`.

`rsi_system` is the top level. It connects `rsi_soc` to `NUM_SENSORS` sensors
with addresses `SENSOR_ADDR0 + i`. SDA is the AND of all the open-drain
outputs, as the pull-up would make it.

The defaults are:

- three sensors, at addresses 0xBB, 0xBC and 0xBD;
- three registers each, from 0x50.

## Performance

At 100 kHz, a single-byte fetch takes 29 × 10 µs = 290 µs of bus time. The
accelerator adds about five system clocks of hand-over per frame. The sweep
testbench measures, at 50 MHz:

| sensors (3 registers each, one byte per frame) | accelerator time |
|---|---|
| 1 | 870.3 µs |
| 2 | 1740.5 µs |
| 3 | 2610.7 µs |

The CPU is involved only for the enable and the interrupt. These are pure
hardware times. A processor-based implementation of the same accelerator will
add its own overhead per frame.

`rsi_master` can also be used on its own, with a CPU writing the control word
directly. That is the unaccelerated way to use the protocol.

## Where this design makes its own choices

The protocol (frame layout, field widths, acknowledge rules, NACK on the last
byte, STOP on a missing ACK) and the block structure follow the original
description. The following were not specified there and were chosen here:

- **Timing.** The four-quarter bit timing and the exact SDA change and sample
  points are choices of this design. So is the assumed 50 MHz system clock.
- **Control and status words.** Their layouts (`rsi_pkg`) are chosen here:
  - the control register's start bit clears itself;
  - the status register has sticky done/error flags.
- **Sizes.** The data-size field is 8 bits, and a size of 0 is treated as 1.
  The buffer is 256 bytes and has two ports, with the RSI port winning a
  same-address write.
- **Write data.** Data for write frames comes from the same buffer.
- **Multi-sensor runs.** Running several sensors in one enable uses a
  descriptor table, and its size (9) is a choice of this design.
- **Errors.** After a failed frame, the run continues and an interrupt is
  still raised (with `err`), so the CPU is never left waiting.
- **Interrupt.** It is a level signal, cleared by `irq_ack`. It is raised
  after the STOP of the last frame, so the bus is idle and the buffer complete.
  The original flow raises it just before the final STOP.
- **Enable.** `en` is an active-high one-clock pulse. The original protocol
  simulation starts a frame when an active-low EN falls.
- **Sensor slave.** It auto-increments and wraps its register pointer, and it
  uses two-flop bus synchronisers.

Not included: the host CPU and the real sensor chips. The I2C master, which
the RSI protocol is measured against, is not part of this design either.

Two outputs are constant or wired through by construction:

- `ctrl_d.start` of `rsi_accel` is always 1;
- bit 0 of `mem_wdata` of `rsi_master` is SDA itself.

## Files

| file | contents |
|---|---|
| `rtl/rsi_pkg.sv` | widths, state enum, control/descriptor/update/status structs |
| `rtl/rsi_master.sv` | RSI protocol master |
| `rtl/rsi_control_reg.sv`, `rtl/rsi_status_reg.sv` | control and status registers |
| `rtl/rsi_buffer.sv` | dual-port sensor data buffer |
| `rtl/rsi_accel.sv` | hardware accelerator |
| `rtl/rsi_soc.sv` | master side without the CPU |
| `rtl/rsi_sensor.sv` | RSI sensor slave |
| `rtl/rsi_system.sv` | top: master side plus sensors on one bus |
| `tb/tb_<module>.sv` | self-checking unit test of each module |
| `tb/tb_rsi_system.sv` | end-to-end test at the default parameters |
| `tb/tb_rsi_sensor_sweep.sv` | 1/2/3-sensor fetch workload with timing check |
| `tb/tb_rsi_256_sensors.sv` | 256 sensors on one bus, addresses 0x00..0xFF |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rsi_pkg.sv tb/tb_rsi_system.sv --top-module tb_rsi_system -Mdir obj -o sim
./obj/sim
```

Replace `tb_rsi_system` with any other testbench name. All testbenches finish
in well under a second. `tb_rsi_256_sensors` takes about a minute to build.

`tb_rsi_system` runs at the default parameters and covers a set of cases:

- the single-byte read of register 0x50 of sensor 0xBB (data 0xAA), which must
  take exactly 29 SCL periods;
- a nine-frame run over all sensors;
- a burst read, a burst read that wraps, and a burst write;
- an absent sensor and an absent register;
- a read after those errors.

A bus monitor in the testbench decodes every frame and checks its length
against `20 + 9n`. The unit tests use a scripted slave or master, and
`QUARTER = 3` or 4, to keep runs short.

To change the bus rate, set `SCL_HZ` and `CLK_HZ`, or `QUARTER` directly. Keep
`QUARTER >= 2` when the `rsi_sensor` slaves are on the bus.
