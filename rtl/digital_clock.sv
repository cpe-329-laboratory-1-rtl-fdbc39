// digital_clock: the time-keeping side of the clock, everything that feeds
// the Arbiter.
//
// The three push-buttons pass through a synchroniser; tick_gen turns the
// system clock into half-second and one-second enables; time_counter keeps
// binary seconds, minutes, 12-hour hours and the am/pm flag and implements
// the time-set mode; three hex2bcd converters turn the binary fields into
// the two-digit BCD values the Arbiter takes. This split into a 1-second
// time base, time data, am/pm and button handling follows the source, as
// do the BCD outputs and the use of a 6-bit binary-to-BCD converter; the
// sub-block insides are this design's own.
//
// Interface: clk (50 MHz by default), rst (synchronous, active high; brings
// the clock to 12:00:01 am), set_btn / mn_set_btn / hr_set_btn asynchronous
// levels. hours, minutes, seconds are bcd2_t; pm_not_am is 0 for am.
// Timing: a button change is seen 2 cycles later; the seconds advance every
// CLK_HZ cycles, set-mode increments happen every CLK_HZ/2 cycles while the
// buttons are held. The BCD outputs follow the registers combinationally.
module digital_clock
  import clock_pkg::*;
#(
  parameter int unsigned CLK_HZ = SYS_CLK_HZ
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  set_btn,
  input  logic  mn_set_btn,
  input  logic  hr_set_btn,
  output bcd2_t hours,
  output bcd2_t minutes,
  output bcd2_t seconds,
  output logic  pm_not_am
);

  logic       set_s, mn_set_s, hr_set_s;
  logic       tick_half, tick_sec;
  logic [5:0] sec_bin, min_bin, hr_bin;

  button_sync #(.WIDTH(3)) u_sync (
    .clk  (clk),
    .rst  (rst),
    .din  ({hr_set_btn, mn_set_btn, set_btn}),
    .dout ({hr_set_s, mn_set_s, set_s})
  );

  tick_gen #(.CLK_HZ(CLK_HZ)) u_tick (
    .clk       (clk),
    .rst       (rst),
    .tick_half (tick_half),
    .tick_sec  (tick_sec)
  );

  time_counter u_time (
    .clk       (clk),
    .rst       (rst),
    .tick_sec  (tick_sec),
    .tick_half (tick_half),
    .set       (set_s),
    .mn_set    (mn_set_s),
    .hr_set    (hr_set_s),
    .sec       (sec_bin),
    .min       (min_bin),
    .hr        (hr_bin),
    .pm_not_am (pm_not_am)
  );

  hex2bcd u_bcd_sec (.bin(sec_bin), .bcd(seconds));
  hex2bcd u_bcd_min (.bin(min_bin), .bcd(minutes));
  hex2bcd u_bcd_hr  (.bin(hr_bin),  .bcd(hours));

endmodule
