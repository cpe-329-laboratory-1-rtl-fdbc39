# 12-hour digital clock on a character LCD

This is a small FPGA design for a wall-clock style timekeeper. One 50 MHz
clock drives it. It counts seconds, minutes and hours in 12-hour form with an
am/pm flag, and writes the time as text such as `12:00:01 am` to an
HD44780-type character LCD. Three push-buttons set the time. After reset it
shows **12:00:01 am** and starts counting.

The target is a Digilent Nexys board (Spartan-3 XC3S200-4FT256) with its LCD
accessory on the 16-pin header. Nothing in the RTL is specific to that board
beyond the default clock frequency.

## Structure

```
digital_clock_top
├── digital_clock            time keeping: everything that feeds the display
│   ├── button_sync          2-flop synchroniser for SET, MN_SET, HR_SET
│   ├── tick_gen             0.5 s and 1 s clock-enable pulses
│   ├── time_counter         seconds / minutes / hours registers, am/pm, time-set mode
│   └── hex2bcd (x3)         6-bit binary -> two BCD digits
└── arbiter                  BCD time -> ASCII text -> LCD write sequence
    └── lcd_ctrl             one LCD bus write cycle per request, with the LCD's waits
```

`clock_pkg` holds the shared pieces: the `bcd2_t` digit-pair type, the
default clock frequency, the LCD timing constants and the LCD instruction
bytes.

There are two halves, and the only link between them is four signals:
`hours`, `minutes` and `seconds` (each two BCD digits, tens in `[7:4]`) and
`pm_not_am` (0 = am, 1 = pm). The display half reads the time side's
registers and never drives them.

## Time keeping

### Time base

There is one clock domain. `tick_gen` does not make slower clocks. Instead,
one counter wraps every `CLK_HZ/2` cycles. Each wrap gives a one-cycle
`tick_half` pulse, and every second wrap is also a `tick_sec` pulse. At
50 MHz the counter is 25 bits wide. The first `tick_sec` comes exactly
`CLK_HZ` cycles after reset is released.

### Counting rules (`time_counter`)

The fields are held in binary: seconds 0..59, minutes 0..59, hours 1..12,
plus `pm_not_am`. Three `hex2bcd` converters make the BCD copies. Binary
counters are smaller than BCD ones, and 6-bit to BCD takes only a few
comparators.

**Running** (SET released): each `tick_sec` adds one second.

- Seconds go 59 → 0 and carry into the minutes.
- Minutes go 59 → 0 and carry into the hours.
- Hours go from 11 to 12 and flip am/pm. They go from 12 to 1 without a flip.

So 11:59:59 pm is followed by 12:00:00 am, and 12:59:59 pm by 1:00:00 pm.

**Time-set mode** (SET held): the seconds stop and keep their value.

- With MN_SET held, each `tick_half` adds one minute. 59 wraps to 00 and
  does **not** carry into the hours.
- With HR_SET held, each `tick_half` adds one hour. The 11 → 12 and 12 → 1
  rules are the same as when running, so am/pm follows the hours.
- With both held, both fields step on the same tick.

MN_SET and HR_SET do nothing unless SET is held.

Buttons step the time only on the shared half-second ticks. The first step
after a press therefore comes 0 to 0.5 s later, depending on where the
divider is in its count.

### Buttons

`button_sync` passes each button through two flip-flops. There is no
debouncer. SET is a level, and the other two buttons are sampled only twice
a second, so contact bounce does not matter. Buttons are taken as active
high.

| Board button | Signal | Top port     |
|--------------|--------|--------------|
| BTN0         | SET    | `btn_set`    |
| BTN2         | MN_SET | `btn_mn_set` |
| BTN3         | HR_SET | `btn_hr_set` |

## Display path

This part is the least obvious, because the LCD is slow and has its own
protocol.

### What is shown

The text is 11 characters in cells 0..10 of line 1: `hh:mm:ss am` or
`hh:mm:ss pm`. Each BCD digit becomes the ASCII code `0x30 + digit`. Hours
below 10 keep their leading zero (`09:05:07 am`). The other line-1 cells
stay blank.

### Write sequence (`arbiter`)

After reset the Arbiter waits `POWERUP_CYC` cycles (20 ms by default) so
that the LCD can finish its own power-up. It then works through a fixed list
of writes, using an index from 0 to 15:

| index | RS | byte            | purpose                           |
|-------|----|-----------------|-----------------------------------|
| 0     | 0  | `0x38`          | 8-bit bus, 2 lines, 5x8 font      |
| 1     | 0  | `0x0C`          | display on, cursor off            |
| 2     | 0  | `0x06`          | address auto-increment            |
| 3     | 0  | `0x01`          | clear (long execution time)       |
| 4     | 0  | `0x80`          | DDRAM address 0                   |
| 5..15 | 1  | text characters | `h h : m m : s s ␠ a/p m`         |

After index 15 the index goes back to 4, so the line is rewritten over and
over. The Arbiter copies the time into a snapshot register when it issues
the address write (index 4). A pass therefore always shows a single time,
even when a second ends partway through the pass.

### Bus cycle (`lcd_ctrl`)

`lcd_ctrl` takes one `{rs, byte}` request at a time, using a valid/ready
handshake. For each request it:

1. drives `lcd_rs` and `lcd_data`, and waits `SETUP_CYC` cycles;
2. drives `lcd_r` (the enable strobe) high for `PULSE_CYC` cycles, then low
   again. The LCD latches the byte on this falling edge;
3. holds the bus steady for the execution time: `LONG_CYC` after clear or
   home (RS = 0 with a byte of 0x01 to 0x03), `EXEC_CYC` after anything else.

`lcd_rw` is always 0. The busy flag is never read, and the fixed waits take
its place. An assertion checks that RS and data do not change while the
strobe is high.

Default timing at 50 MHz:

| Parameter     | Cycles    | Time   | HD44780 minimum |
|---------------|-----------|--------|-----------------|
| `SETUP_CYC`   | 2         | 40 ns  | 40 ns           |
| `PULSE_CYC`   | 12        | 240 ns | 230 ns          |
| `EXEC_CYC`    | 2,500     | 50 us  | 37 us           |
| `LONG_CYC`    | 100,000   | 2 ms   | 1.52 ms         |
| `POWERUP_CYC` | 1,000,000 | 20 ms  | 15 ms           |

One refresh pass is 12 writes, about 0.6 ms. A new second therefore reaches
the glass within about 1.2 ms (two passes) of the registers changing.

## Top-level ports and board pins

| Port                                      | Dir | Width | Nexys pin | Notes                            |
|-------------------------------------------|-----|-------|-----------|----------------------------------|
| `clk`                                     | in  | 1     | A8        | 50 MHz                           |
| `rst`                                     | in  | 1     |           | synchronous, active high; see below |
| `btn_set`, `btn_mn_set`, `btn_hr_set`     | in  | 1     |           | BTN0, BTN2, BTN3                 |
| `lcd_data[0..7]`                          | out | 8     | N15, J16, K16, K15, L15, M16, M15, N16 | |
| `lcd_rs`                                  | out | 1     | P15       |                                  |
| `lcd_rw`                                  | out | 1     | T7        | always 0                         |
| `lcd_r`                                   | out | 1     | R5        | LCD enable strobe                |
| `hours`, `minutes`, `seconds`             | out | 8     |           | BCD, for observation             |
| `pm_not_am`                               | out | 1     |           | for observation                  |

All resets are synchronous and active high. The `rst` port stands for
"power-up". On the board, tie it to a power-on-reset pulse, or to a spare
button.

The LCD accessory shares its header lines with switches SW7..SW0. Keep those
switches in the down position while the LCD is connected.

## Design decisions

Only some of the behaviour was fixed from the start. These were the given
requirements:

- 12-hour display with am/pm;
- the power-up time 12:00:01 am;
- SET stops the seconds;
- MN_SET and HR_SET step the time at half-second intervals;
- minutes wrap 59 → 00 with no carry into the hours while being set;
- hours wrap 12 → 1;
- BCD interfaces to the display side;
- the 50 MHz clock, the button mapping and the LCD signal names.

These are decisions taken in this design:

- **SET holds the seconds.** The displayed seconds are not blanked or
  cleared while SET is held. They keep their value and start counting again
  when SET is released.
- **When am/pm flips.** It changes on the 11 → 12 hour step, both when
  running and when setting.
- **Display text.** The text layout and the leading zero are this design's.
- **LCD protocol.** The whole LCD side is this design's: the meaning of
  `lcd_r` as the enable strobe, the HD44780 instruction list, the continuous
  refresh and all the timing numbers.
- **Not included:** a 12/24-hour mode switch and buttons that count minutes
  and hours down. These are natural extensions.

## Resource use

After generic synthesis the whole design uses 130 flip-flops and about 255
word-level cells. Of the flip-flops:

- 26 are the divider;
- 19 are the time registers;
- 6 are the synchronisers;
- the rest are the LCD sequencer and its delay counters.

This is a small fraction of an XC3S200, which has 3,840 flip-flops and
3,840 LUTs. The largest part is the 20-bit power-up counter and the 17-bit
LCD wait counter. Reading the LCD busy flag instead of waiting fixed times
would shrink them, but then `lcd_data` would need a bidirectional pad.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench                   | What it checks |
|-----------------------------|----------------|
| `tb_hex2bcd`                | all 64 inputs against `v/10`, `v%10` |
| `tb_tick_gen`               | pulse positions, cycle by cycle, for `CLK_HZ` = 10 and 4 |
| `tb_button_sync`            | output equals input two cycles earlier; reset value |
| `tb_time_counter`           | one full day plus 100 s of running, then 20,000 random set-mode steps, against a seconds-since-midnight model |
| `tb_lcd_ctrl`               | 300 random writes: byte and RS latched, set-up, pulse width, exact execution waits |
| `tb_arbiter`                | 400 times (random, plus 12:00:59 pm and 09:05:07 am) read back from a model LCD; power-up wait; one clear; 12 writes per pass |
| `tb_digital_clock`          | 200,000 cycles with random button patterns against a cycle-exact model (`CLK_HZ` = 10) |
| `tb_digital_clock_top`      | end to end at `CLK_HZ` = 400 with short LCD waits; details below |
| `tb_digital_clock_top_full` | default parameters; details below |

`tb_digital_clock_top` runs from the buttons to the LCD model's screen. It
checks the BCD ports every cycle, and checks the LCD text after every
refresh pass. It counts these mechanisms and fails if any of them never
happens:

- second, minute and hour carries;
- the am/pm flip and the 12 → 1 wrap while running;
- the seconds holding under SET;
- MN_SET steps, including a 59 → 00 wrap;
- HR_SET steps, with the 12 → 1 wrap and the am/pm flip;
- LCD refresh passes.

`tb_digital_clock_top_full` runs the top exactly as it would be built, with
no parameters changed. It simulates about 2 s, which is 100 million cycles
and takes under a minute of simulation time. It checks that:

- the LCD shows `12:00:01 am` after its power-up;
- the seconds change on exactly cycle 50,000,000;
- the LCD then shows `12:00:02 am`;
- one second of SET+MN_SET gives `12:02:02 am`.

The LCD model checks the HD44780 minimum timings all the way through.

`tb/lcd_model.sv` is a behavioural model of the display, used only in
simulation. It models the character memory, the address counter and the
handful of instructions used here, and it counts timing violations.
`tb/clock_ref_pkg.sv` holds the reference arithmetic: the 12-hour fields,
the expected text and the set-mode step.

## Simulating

Build and run one testbench with Verilator 5. The example uses the
end-to-end test; replace the testbench file and top name for any other:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/clock_pkg.sv rtl/*.sv tb/clock_ref_pkg.sv tb/lcd_model.sv \
    tb/tb_digital_clock_top.sv --top-module tb_digital_clock_top -o sim
./obj_dir/sim
```

To make simulation fast, pass a small `CLK_HZ` to the top: a second is then
`CLK_HZ` cycles. Shrink the LCD waits too (`POWERUP_CYC`, `SETUP_CYC`,
`PULSE_CYC`, `EXEC_CYC`, `LONG_CYC`). Keep `CLK_HZ/2` larger than one
refresh pass, which is `12 × (SETUP + PULSE + EXEC + 1)` cycles. Otherwise
the display falls behind the set-mode steps. `CLK_HZ` must be even.

Lint:

```
verilator --lint-only -Wall rtl/clock_pkg.sv rtl/*.sv --top-module digital_clock_top
```
