// digital_clock_top: a 12-hour digital clock shown on a character LCD.
//
// The digital_clock block keeps the time (starting at 12:00:01 am after
// reset) and presents it in BCD with an am/pm flag; the arbiter block turns
// that into text and writes it to the LCD over the board's 16-pin header
// (lcd_data, lcd_rs, lcd_rw, lcd_r). Three buttons set the time: BTN0 is
// SET (time-set mode, seconds stop), BTN2 is MN_SET and BTN3 is HR_SET, which
// while SET is held step the minutes or hours every half second.
// This structure, the button mapping and the LCD signal names follow the
// source. The reset input is this design's stand-in for the FPGA's power-up
// initialisation; the BCD time is also brought out for observation.
//
// Interface: clk is the 50 MHz board clock; rst is synchronous, active high.
// Timing: see digital_clock and arbiter; the LCD text lags the time registers
// by at most two refresh passes (about 1.2 ms at the default timing).
module digital_clock_top
  import clock_pkg::*;
#(
  parameter int unsigned CLK_HZ      = SYS_CLK_HZ,
  parameter int unsigned POWERUP_CYC = LCD_POWERUP_CYC,
  parameter int unsigned SETUP_CYC   = LCD_SETUP_CYC,
  parameter int unsigned PULSE_CYC   = LCD_PULSE_CYC,
  parameter int unsigned EXEC_CYC    = LCD_EXEC_CYC,
  parameter int unsigned LONG_CYC    = LCD_LONG_CYC
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn_set,      // BTN0
  input  logic       btn_mn_set,   // BTN2
  input  logic       btn_hr_set,   // BTN3
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_r,
  output bcd2_t      hours,
  output bcd2_t      minutes,
  output bcd2_t      seconds,
  output logic       pm_not_am
);

  digital_clock #(.CLK_HZ(CLK_HZ)) u_clock (
    .clk        (clk),
    .rst        (rst),
    .set_btn    (btn_set),
    .mn_set_btn (btn_mn_set),
    .hr_set_btn (btn_hr_set),
    .hours      (hours),
    .minutes    (minutes),
    .seconds    (seconds),
    .pm_not_am  (pm_not_am)
  );

  arbiter #(
    .POWERUP_CYC (POWERUP_CYC),
    .SETUP_CYC   (SETUP_CYC),
    .PULSE_CYC   (PULSE_CYC),
    .EXEC_CYC    (EXEC_CYC),
    .LONG_CYC    (LONG_CYC)
  ) u_arbiter (
    .clk       (clk),
    .rst       (rst),
    .hours     (hours),
    .minutes   (minutes),
    .seconds   (seconds),
    .pm_not_am (pm_not_am),
    .lcd_data  (lcd_data),
    .lcd_rs    (lcd_rs),
    .lcd_rw    (lcd_rw),
    .lcd_r     (lcd_r)
  );

endmodule
