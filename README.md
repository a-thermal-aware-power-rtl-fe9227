# Thermal-aware power management IP (TAPM)

A system-on-chip can overheat locally long before its average power looks
alarming. TAPM is a small digital IP that watches on-chip temperature sensors
and takes part in keeping the die inside its thermal limits. It does this
without using the fast system bus.

It has three parts that form a feedback loop:

- **Thermal management unit (TMU).** Sensor readings arrive serially. The TMU
  compares each one with a programmable window, and compares neighbouring
  sensors with each other. When a limit is crossed it raises an interrupt.
- **Host processor (outside the IP).** It takes the interrupt and reads the
  report registers over a slow two-wire power management bus. This is an SMBus
  (System Management Bus), an I2C-style bus. The host then decides on new
  cooling levels or thresholds and writes them back over the same bus.
- **Multi-level controllers (MLC).** There are four. Each turns an 8-bit drive
  value into a 256-level PWM (pulse-width modulation) signal for a fan or a
  voltage regulator.

The SMBus is slow: 83 kHz here, with a 10–100 kHz range allowed. It needs only
two wires and very little logic. So thermal traffic stays off the system bus,
and it still gets through when that bus is saturated or has failed.

The RTL matches a prototype chip built around this idea:

- one TMU with four serial sensor inputs;
- four MLCs;
- an SMBus slave, through which the TMU is programmed;
- an SMBus master, so that a bus transfer can be exercised on the chip itself;
- a test multiplexer that can connect the TMU command port straight to the pins.

```
           sen[3:0], sen_en[3:0]                     fan[3:0] (PWM)
                  |                                       ^
                  v                                       |
   +--------------------------------------+     +------------------+
   | tmu                                  |---->| mlc x4           |
   |  sensor_s2p x4 -> TEMP0..3           |FAN  | 256-level PWM    |
   |  thermal_monitor -> REPORT0/1, intr  |0..3 | 10 kHz tick      |
   |  registers + command port            |     +------------------+
   +--------------------------------------+
        ^ in_data/in_en     | out_data           intr, intr_off -> processor
        | frame, chk_ok     v out_en
   +------------------+   mux = 0: command port driven directly from pins
   | smb_slave (04H)  |<==== SMBCLK / SMBDAT (split in/out) ====> board
   +------------------+
   +------------------+
   | smb_master       |<==== smbSMBCLK / smbSMBDAT, host pins (mux = 1)
   +------------------+
   tapm_clk_en: 100 MHz -> 500 kHz SMBus tick, 10 kHz MLC tick
```

## Clocking

Everything runs on the single input clock, 100 MHz by default. The prototype
derived three internal clocks. This design keeps one clock domain and uses
one-cycle clock-enable pulses instead (`tapm_clk_en`):

| Rate | Divider | Used by |
|---|---|---|
| 100 MHz | – | TMU and sensor interfaces |
| 500 kHz | `SMB_DIV` = 200 | SMBus slave and master |
| 10 kHz | `MLC_DIV` = 10000 | MLC counters |

The master spends `BIT_TICKS` = 6 SMBus ticks on each bit, which gives an
83.3 kHz bus clock. Three ticks (6 µs) for each half covers the SMBus minimums
for clock-high time, START hold and STOP setup.

An MLC period is 256 MLC ticks, which is 25.6 ms at the defaults.

## The TMU registers and command byte

The command encoding and bit layouts below are this design's own. The register
set and the reset values are the prototype's.

**Command byte:**

```
bit  7    : 1 = read, 0 = write
bits 6:4  : register kind
bits 3:2  : 00
bits 1:0  : index (sensor / controller number)
```

| Kind | Register | Size | Access | Reset | Write cmd | Read cmd |
|---|---|---|---|---|---|---|
| 0 | CONFIG | 8 | R/W | FFH | 00H | 80H |
| 1 | REPORT0 / REPORT1 | 8 | R | 00H | – | 90H / 91H |
| 2 | FAN0..3 (MLC drive value) | 8 | R/W | 7FH | 20H+i | A0H+i |
| 3 | TEMP0..3 | 8 | R | 00H | – | B0H+i |
| 4 | THRES0..3 = {high, low} | 16 | R/W | 3C00H | 40H+i | C0H+i |
| 5 | OFFS_THRES = {high, low} | 16 | R/W | 0A0AH | 50H | D0H |

16-bit registers travel low byte first, as an SMBus word does. So the low
threshold is sent before the high one.

Any other command byte is undefined:

- a kind of 6 or 7;
- bits 3:2 not 00;
- a write to TEMP or REPORT;
- an index beyond a register's range.

The TMU drops an undefined command, and the SMBus slave refuses it with NACK.

**CONFIG:**
- Bits 3:0 enable the local check of sensors 3..0.
- Bits 7:4 enable the offset check of sensors 3..0.
- The reset value FFH enables everything.

**REPORT0:**
- Bits 3:0 are local underflow: TEMPi < low threshold.
- Bits 7:4 are local overflow: TEMPi > high threshold.

**REPORT1:**
- Same layout as REPORT0, for the offset check.

Reports are current levels, not sticky flags. Every bit is recomputed from the
present readings. They are kept whether or not the check is enabled in CONFIG;
CONFIG only gates the interrupts.

## Local and offset checks

`thermal_monitor` does the checking. Readings and thresholds are unsigned 8-bit
values.

**Local check.** Each sensor is compared with its own window.
- `intr` is high while any enabled local flag is set.

**Offset check.** This catches a hot spot: a sensor that is still below its own
limit but much hotter or colder than the area next to it.
- Sensor i is compared with sensor (i+1) mod 4.
- The signed difference `TEMPi − TEMP(i+1)` is taken.
- Above +high it is an offset overflow; below −low it is an offset underflow.
  Both OFFS_THRES bytes are magnitudes.
- `intr_off` is high while any enabled offset flag is set.

The ring pairing and the magnitude reading are choices made here. With the
reset value 0A0AH, an offset check means "more than 10 steps apart in either
direction".

**Timing.** Both interrupts are registered level signals. They drop again when
the readings return inside their windows.

## Sensor interface

Each sensor sends its reading MSB first, one bit per TMU clock, while its
`sen_en` line is high. On the clock where `sen_en` is seen low again, the last
8 bits are captured. If the frame was longer than 8 bits, only the last 8 count.

From that clock edge the timing is fixed:

| Clock | Event |
|---|---|
| 1st | reading captured (`valid`) |
| 2nd | TEMPi updated |
| 3rd | reports and interrupts updated |

## The SMBus side

### Slave (`smb_slave`)

**Address.** The 7-bit address is `{BASE, addr[2:0]}`. With `BASE` = 0000b and
`addr` = 100b it is 04H.

**Transactions** (address+W = 08H, address+R = 09H):

```
write byte : S 08 cmd data P
write word : S 08 cmd low high P
read byte  : S 08 cmd Sr 09 [data] NACK P
read word  : S 08 cmd Sr 09 [low] ACK [high] NACK P
```

**Bus lines.**
- The data wire is split: `sda_in` is the bus level, and `sda_out` is 0 to pull
  the wire low.
- The board forms the wired AND and returns it on `sda_in`. No tri-state buffer
  is needed.
- Bus lines pass a two-flop synchronizer and are sampled on SMBus ticks.
- The bus clock must therefore stay high and low for at least two ticks each.

**Host handshake.**
- Each received byte goes to the TMU with `out_en`.
- Before the byte is ACKed, the slave shows it on `chk_data`. The TMU answers
  `chk_ok` in the same clock.
- If the byte is refused, the slave NACKs it, drops it, and ignores the bus
  until the next START. So an undefined command ends the transfer with a NACK
  at the master.
- When the slave is addressed for reading, and after each ACK from the master,
  it pulses `in_ready`. The TMU then presents the next register byte.
- A `frame` pulse at every address+W restarts command parsing in the TMU. A
  half-written word from a broken transfer is thrown away.

### Master (`smb_master`)

**Host handshake.** The master is driven one byte at a time:

1. Raise `en` with `rw`, and put address+W on `in_data`. The master sends START
   and the byte.
2. After every byte the slave ACKs, `clean` pulses. The host has two SMBus ticks
   to put the next byte on `in_data`, or to drop `en`, which makes the master
   send STOP.
3. A byte that gets NACK pulses `fail`, and the master sends STOP. If `en` is
   still high, the whole transaction starts again from START.

**Reads** (`rw` = 1):

1. The host supplies three bytes: address+W, command, address+R.
2. The master puts a repeated START before the third byte.
3. It then receives bytes, each delivered with `out_en`.

A received byte is ACKed if `en` was high when the byte started. Otherwise it
is NACKed and followed by STOP. So the host drops `en` right after the
`out_en` of the next-to-last byte. For a one-byte read, it drops `en` right
after the `clean` of address+R.

**Clock stretching.** The master reads SCL back and waits while another device
holds it low.

## Test modes (`mux`)

The shared pins change meaning with `mux`:

| Pin | mux = 1 (SMBus test) | mux = 0 (TMU test) |
|---|---|---|
| `smb_in_tmu_in[7:0]` | master `in_data` | TMU `in_data` |
| `smb_en_tmu_in_en` | master `en` | rising edge writes one byte to the TMU |
| `smb_rw_tmu_out_en` | master `rw` | rising edge reads one byte from the TMU |
| `smb_out_tmu_out[7:0]` | master `out_data` | TMU `out_data` |

Edge detection in TMU mode means a pin held high acts only once.

In TMU mode:
- The master's `en` is held low, so the bus stays idle.
- The slave keeps running, but what it receives does not reach the TMU.

The master can also be reset on its own with `smb_reset`.

## Files

| File | Contents |
|---|---|
| `rtl/tapm_pkg.sv` | command byte type, register kinds, reset values, `tmu_cmd_len` |
| `rtl/tapm_clk_en.sv` | SMBus and MLC clock-enable dividers |
| `rtl/sensor_s2p.sv` | serial-to-parallel sensor interface |
| `rtl/thermal_monitor.sv` | local/offset comparators, reports, interrupts |
| `rtl/tmu.sv` | registers, command port, sensor interfaces, monitor |
| `rtl/mlc.sv` | 256-level PWM controller |
| `rtl/smb_slave.sv` | SMBus slave |
| `rtl/smb_master.sv` | SMBus master |
| `rtl/tapm_top.sv` | the whole IP with the prototype's pins |
| `tb/tb_*.sv` | one self-checking testbench per module |

Every file opens with a comment covering its behaviour, interface and timing.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a cycle-count watchdog if something hangs. With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/tapm_pkg.sv tb/tb_tapm_top.sv --top-module tb_tapm_top
./obj_dir/Vtb_tapm_top
```

Replace `tb_tapm_top` with any other `tb/tb_*.sv`. The package must be listed
first. To check that nothing depends on reset-less state, add
`+verilator+rand+reset+2` to the run.

**Block testbenches.** These shorten the clock-enable dividers with parameters,
so they run in a fraction of a second:

| Testbench | What it checks |
|---|---|
| `tb_tapm_clk_en` | pulse spacing |
| `tb_sensor_s2p` | readings and capture timing |
| `tb_mlc` | duty cycle for levels 01H…7FH, 00H, 80H, FFH, and a level change mid-period |
| `tb_thermal_monitor` | random readings and thresholds against a reference model, one clock after each change |
| `tb_tmu` | every register, defined and undefined commands, aborted words, fill bytes |
| `tb_smb_slave` | against a bit-level bus driver |
| `tb_smb_master` | against the slave: word writes and reads, an absent address, a refused byte, a retry after a refusal, clock stretching, the bus clock period |

**`tb_tapm_top`** runs the whole IP at its default parameters: 100 MHz, 83 kHz
bus, 10 kHz MLC tick. It simulates about 61 ms in a few seconds.

Over SMBus, it programs CONFIG, THRES2, OFFS_THRES and FAN2. It then changes
the sensor readings and checks three things:
- each interrupt appears exactly three clocks after the sensor frame;
- REPORT1 and REPORT0 read back the expected flags;
- the interrupt clears again.

It also:
- measures a full PWM period on every fan output;
- checks a transfer to an absent address and an undefined command, both
  refused;
- drives the TMU directly with `mux` = 0.

At the end it prints how often each mechanism occurred, and it fails if any
never did.

## Departures and choices beyond the prototype

- **Clocks.** One clock with enables replaces the three derived internal
  clocks. The rates are the same.
- **Command encoding.** The command byte, the CONFIG and REPORT bit layouts,
  and the byte order of 16-bit registers are defined here.
- **REPORT width.** REPORT0/1 are 8-bit registers. A word read of a report
  returns the report, then 00H.
- **Framing.** The TMU port got a `frame` input, which restarts command
  parsing at every write transfer. It also got the `chk_data`/`chk_ok` pair,
  so that undefined commands can be NACKed.
- **Invalid data.** Data values are not checked. Every value is legal for the
  writable registers.
- **Offset check.** The ring pairing of neighbouring sensors and the
  magnitude reading of OFFS_THRES are choices made here.
- **Sensor frames.** A frame is taken as one bit per TMU clock, MSB first.
- **Interrupt latency.** The prototype raises its interrupts within about one
  clock of the end of a sensor frame. Here it takes three clocks, because the
  capture, the TEMP register and the flags are each registered.
- **TMU test mode.** It acts on rising edges of the strobe pins.
- **Slave address.** The upper four bits are a parameter (`BASE`), 0000b by
  default.
- **Not included.** These lie outside the IP and are not modelled:
  - the temperature sensors themselves;
  - the fans and voltage regulators;
  - the processor that services the interrupts;
  - the system bus;
  - pads and package.

  The testbenches drive the sensor lines and the bus wires directly.
- **Size.** Generic synthesis gives roughly 650 cells and 450 flip-flop bits
  for the whole IP. About 170 of the flip-flop bits are the 21 bytes
  of registers.
