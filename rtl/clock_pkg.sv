// clock_pkg: types and constants shared by the digital clock.
//
// The clock keeps time in binary and hands it to the display side as pairs of
// BCD digits. bcd2_t is one such pair (tens digit in the upper nibble, ones
// digit in the lower nibble), the form in which seconds, minutes and hours
// travel to the Arbiter. The 50 MHz system clock frequency is the board's;
// the LCD timing constants are this design's own, chosen for an HD44780-type
// character controller (enable pulse >= 230 ns, >= 37 us per ordinary
// instruction, >= 1.52 ms for clear, >= 15 ms after power-up).
package clock_pkg;

  // Board oscillator frequency.
  localparam int unsigned SYS_CLK_HZ = 50_000_000;

  // Two BCD digits of one time field.
  typedef struct packed {
    logic [3:0] tens;
    logic [3:0] ones;
  } bcd2_t;

  // LCD bus timing in system clock cycles at 50 MHz.
  localparam int unsigned LCD_SETUP_CYC   = 2;          // RS/data set-up before enable, 40 ns
  localparam int unsigned LCD_PULSE_CYC   = 12;         // enable high time, 240 ns
  localparam int unsigned LCD_EXEC_CYC    = 2_500;      // wait after a write, 50 us
  localparam int unsigned LCD_LONG_CYC    = 100_000;    // wait after clear/home, 2 ms
  localparam int unsigned LCD_POWERUP_CYC = 1_000_000;  // wait after reset, 20 ms

  // HD44780-type instruction bytes used by the Arbiter.
  localparam logic [7:0] LCD_CMD_FUNC_SET  = 8'h38;  // 8-bit bus, two lines, 5x8 font
  localparam logic [7:0] LCD_CMD_DISP_ON   = 8'h0C;  // display on, cursor off
  localparam logic [7:0] LCD_CMD_ENTRY     = 8'h06;  // address increments after a write
  localparam logic [7:0] LCD_CMD_CLEAR     = 8'h01;  // clear display
  localparam logic [7:0] LCD_CMD_LINE0     = 8'h80;  // set DDRAM address 0

  // ASCII character for one BCD digit.
  function automatic logic [7:0] bcd_ascii(input logic [3:0] d);
    return {4'h3, d};
  endfunction

endpackage
