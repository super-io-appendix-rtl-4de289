# Super IO: a register-mapped robot I/O controller

Super IO lets a host PC drive a small robot's hardware with simple register
reads and writes. The hardware includes two DC motors with speed feedback,
two wheel encoders, two servos, push buttons, an 8-bit output port, an
external ADC and a character LCD. The PC talks over an RS-232 line. Each
command reads or writes one 8-bit register.

On the FPGA, every peripheral owns a bank of eight registers. The host sets
values there, and the peripheral picks them up at once and acts on them. In
the other direction, the peripheral posts its measurements into the same bank
for the host to read. No peripheral needs its own host protocol: each one only
has to use its register bank.

Everything runs on a single clock, 27 MHz by default. Reset `rst` is
synchronous and active high.

## Address map

A register address is 8 bits: `addr[7:3]` picks the slot and `addr[2:0]`
picks the register inside it.

| slot | base | peripheral | registers |
|------|------|------------|-----------|
| 0 | 0x00 | motor 0 | 0 velocity (PWM duty /256), 1 direction (bit 0), 3 speed loop enable (bit 0) |
| 1 | 0x08 | motor 1 | same as motor 0 |
| 2 | 0x10 | digital in 0 | 0 debounced push buttons (written by the module) |
| 3 | 0x18 | character LCD | 0 character to print (0 clears the display) |
| 4 | 0x20 | servo 0 | 0 and 1: pulse widths of servo outputs 0 and 1 |
| 5 | 0x28 | encoder 0 | 0 count high byte, 1 count low byte, 2 velocity (written by the module) |
| 6 | 0x30 | encoder 1 | same as encoder 0; its velocity is also shown inverted on `led` |
| 7 | 0x38 | analog in 0 | 0 last conversion result (written by the module), 1 input mux channel |
| 8 | 0x40 | digital out 0 | 0 output port value (16 after reset) |
| – | 0xF8–0xFC | serial controller | version major 0, minor 1, build day 10, month 5, year 5 (read only) |

Reads of an address that no slot answers return 0.

## Serial command protocol (`serial_bus_controller`, `uart_rx`, `uart_tx`)

The line runs at 115200 baud. The host sends 8 data bits with no parity; the
FPGA answers with 2 stop bits.

- **Write:** the host sends `0x43`, then the address, then the value. There is no reply.
- **Read:** the host sends `0x42`, then the address. The FPGA replies with one byte.
- The controller ignores any other first byte.

The controller turns each command into one access on the internal register
bus, a `bus_req_t` request answered by a `bus_rsp_t` response. For a write,
it waits until the bus is not busy, then raises `go` for one clock. For a
read, it raises `go` for one clock and waits for `rvalid`. If no `rvalid`
arrives within `READ_TIMEOUT` clocks (4), it replies 0. It also puts each value
read onto `host_leds`.

The controller answers addresses 0xF8–0xFC itself, with the build constants.

**Receiver.** It oversamples the line eight times per bit. The tick comes from
a 16-bit phase accumulator, so no divisor has to fit the clock exactly. The
step is `INC = ((8*BAUD << 9) + (CLK_FREQ >> 8)) / (CLK_FREQ >> 7)`, which is
2237 at the defaults (a tick every 29.3 clocks).

The line is first inverted, so an idle line reads 0. It then passes through
a two-flop synchroniser and a 2-bit up/down counter that acts as a glitch
filter with hysteresis. The first sample is taken 11 ticks after the start
bit is seen, and each later sample 8 ticks after the one before. The filter
adds its own delay, so these samples land near the middle of each bit.

`data_ready` pulses once, after the stop-bit sample, about 10.2 bit times
after the start edge. If the stop bit reads 0, `data_error` pulses instead
and the byte is dropped. After 16 ticks (two bit times) with no start bit,
`idle` rises and `end_of_packet` pulses once.

**Transmitter.** It sends 1 start bit, 8 data bits (LSB first) and 2 stop
bits. Its bit tick comes from the same kind of accumulator:
`INC = ((BAUD << 12) + (CLK_FREQ >> 5)) / (CLK_FREQ >> 4)`, which is 280 at
the defaults.

## Register slots and the module handshake (`reg_controller8`, `reg_sequencer`)

This is the heart of the design. Each slot is a `reg_controller8`: eight
registers with two ports.

- **Host side:** `bus_req` / `bus_rsp`. The slot answers when `addr[7:3]`
  equals its `index`.
- **Module side:** `mod_req` / `mod_rsp`. The module holds `mod_req.enable`
  until `mod_rsp.ack` arrives.

A small state machine serves one access per clock:

| state | what happens | signal |
|-------|--------------|--------|
| READB | host read | `rvalid` with the data |
| WRITEB | host write | – |
| READM | module read | `ack` with the data |
| WRITEM | module write | `ack` |

- **Priority.** When the host and the module both ask, the host goes first.
- **Pending requests.** A host `go` that arrives while a module access is in
  progress is latched, and served on the next clock.
- **Outputs.** Each slot drives zeros unless it is answering. This lets the
  top combine the responses of all nine slots with a plain OR.
- **Busy, host side.** `bus_rsp.busy` is high while the slot serves its
  module.
- **Busy, module side.** `mod_rsp.busy` is high during a host access.

**How modules learn of host writes.** The falling edge of `mod_rsp.busy`
tells the module that the host has just touched its slot. Every module
reacts in the same way: it reads its settings again.

`reg_sequencer` holds that common behaviour, so the modules do not repeat it:

- Parameters list up to 8 register accesses, each a read or a write.
- On `start` it walks through the list, one access per handshake.
- It keeps the values it read in `rvals`.
- A `start` that arrives during a walk makes it walk once more, so a host
  write that lands mid-walk is never missed.
- It provides `busy_fell` for the module to use as its start.

## Peripheral modules

**Motor (`motor_module`).** This is an 8-bit PWM. A prescaler advances the
counter every `PWM_DIV+1` clocks: 129 clocks by default, giving a 1.22 ms
period at 27 MHz. The enable output is high while the counter is below the
output velocity.

With the speed loop off, the output velocity equals register 0. With the loop
on, the output moves one step every `FEEDBACK_PERIOD+2` clocks (0.37 s). It
steps up when the encoder velocity is below register 0, and down when it is
above. Direction comes from register 1, bit 0, and the top also provides its
inverse.

**Encoder (`encoder_module`).**

- The input is synchronised and each rising edge is counted, with a 16-bit
  count.
- Velocity: every `VEL_WINDOW+1` clocks (0.52 s), the count gained in that
  window, shifted right by 4, becomes `enc_vel`.
- Reporting: the module writes the count (high byte, then low byte) and the
  velocity into registers 0–2. It does this after each host access, and every
  `REPORT_INTERVAL` clocks otherwise.
- The count is captured when a report starts, so the two bytes always belong
  together.

**Servo (`servo_module`).** The 8-bit frame counter advances every
`PWM_DIV+1` clocks (2049). Output *i* is high while the counter is below
register *i*. Both widths reset to 16.

**Digital in (`digital_in_module`) and debouncer (`debouncer`).**

- Each push button passes through a synchroniser and a debouncer. A change
  reaches the output only after the input has held steady for `2^CW` clocks.
- The digital-in module writes the 8 debounced bits into register 0 whenever
  they change.
- It also writes them every `REFRESH+1` clocks, so a value the host overwrote
  is restored.

**Digital out (`digital_out_module`).** It copies register 0 to the port
after each host access. The reset value is 16.

**Analog in (`analog_in_module`).** After each host access to the slot, the
module runs this sequence on the external ADC:

1. Read register 1 and drive its low 4 bits on `mux`.
2. Pull `adc_ce` and `adc_rw` low for `START_WAIT+1` clocks to start a
   conversion. `adc_ce` then stays low until the next reset.
3. Wait for `adc_stat` to rise and fall again.
4. Hold `adc_rw` high for `READ_WAIT+1` clocks.
5. Sample `adc_data` and write it to register 0.

A host access that arrives during a conversion is remembered, and a second
conversion follows it. A read of register 0 therefore returns the result of
the conversion that the previous access started. `adc_cs` is the same signal as `adc_ce`.

**Character LCD (`char_lcd_module`).** It drives an HD44780-style display in
8-bit, write-only mode, so `lcd_rw` is 0.

- **After reset** it sends clear (0x01), function set (0x3F), display on
  (0x0C) and entry mode (0x06).
- **Characters.** After that, each host access makes it read register 0.
  - 0 clears the display.
  - Any other value is printed as a character.
  - After 16 characters, the next command moves the cursor to line 2 (0xC0).
- **Each transfer:**
  1. Set `db` and `rs`.
  2. Wait `RS_SETUP` clocks.
  3. Pulse `lcd_en` for 8 clocks.
  4. Wait for the display to execute the command. The wait is 1.64 ms after a
     clear or a character, 40 µs after an init command, and 46 µs after the
     line change.
- **Busy.** A host access that arrives while the display is busy is ignored.
  The host should pace its characters, about 1.7 ms apart.

## I2C target (`i2c_slave`)

This is a second way into the register bus.

1. An I2C controller sends START and the 7-bit address (`i2c_addr`).
2. It then sends a register byte.
3. It ends with either:
   - data bytes, each of which becomes a bus write to that register; or
   - a repeated START with the read bit, after which each byte returned is a
     fresh bus read of the same register.

SCL and SDA are sampled through synchronisers on the system clock, so SCL
must be much slower than `clk`. `sda_o` = 0 means "pull SDA low". The target
is placed beside the serial path: its `bus_req`/`bus_rsp` are top-level
ports, and it is not joined to the nine slots. To use it, arbitrate it with
the serial controller in front of the slots.

## Where this design departs from the original

- **Buses.**
  - The original used shared tristate data buses. Here, every bus is split
    into request and response structs (`superio_pkg`), and the responses are
    OR-combined.
  - The original held fixed-length access windows. Here, `go` is a one-clock
    strobe, reads return `rvalid`, and modules use an enable/ack handshake.
  - Host requests that collide with module accesses are latched, so none is
    lost.
- **Busy.** All nine slots take part in the busy OR. The original combined
  only the first six.
- **Motor 1.** It takes its feedback from encoder 1.
- **Encoder.** The encoder input is sampled on the system clock instead of
  clocking the counter directly. Pulses must therefore last more than two
  clocks.
- **I2C.** The I2C target checks its address (the original had the check
  disabled). It is not wired to the slots.
- **Debouncer.** Its reset is synchronous.
- **Digital in.** The refresh counter is assumed to count every clock.
- **Analog in.** The mux channel is taken from register 1.
- **Not built:** the ADC chip, the LCD panel, the H-bridges and motors, and
  the rest of the FPGA board. The design drives their pins.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -I. -y rtl -y tb \
    rtl/superio_pkg.sv tb/tb_super_io.sv --top-module tb_super_io -o sim
./obj_dir/sim
```

Run it from the directory that holds `rtl/` and `tb/`; the testbenches
include their shared tasks as `tb/*.svh`. Verilator reports some unused
signals and parameters; these are harmless.

- **`tb_super_io`** runs the whole design with small timing parameters: the
  serial line at 16 clocks per bit, short prescalers, windows and LCD waits.
  A serial host model, an ADC model (`tb_adc_model`), bouncing buttons, an
  encoder pulse source and an I2C controller sit on the pins. It exercises
  and counts every function: host write and read, information registers, the
  unmapped-read timeout, PWM duty, the speed loop, encoder count and velocity,
  debouncing, periodic input refresh, LCD init and a character, servo width,
  an ADC conversion, the output port and an I2C write.
- **`tb_super_io_full`** runs the top at its default parameters. It checks the
  LCD power-up sequence, an information register, one full motor PWM period
  at velocity 64 (64 × 129 high clocks out of 256 × 129), a read-back, and the
  output port.

Include files `tb/bus_tasks.svh` and `tb/uart_tasks.svh` hold the host models
the testbenches share. Every testbench passes in verilator 5 with two-state,
randomised initial values. Each testbench also catches a deliberately broken
copy of its block.
