// time_counter: the clock's time-of-day registers and the time-set mode.
//
// Seconds (0..59), minutes (0..59) and hours (1..12) are kept as plain
// binary counters together with the pm_not_am flag (0 = am, 1 = pm).
//
// Running (set = 0): each tick_sec advances the seconds; 59 wraps to 0 and
// carries into the minutes, 59 minutes wrap to 0 and carry into the hours.
// Hours step 11 -> 12 (flipping am/pm) and 12 -> 1, so 11:59:59 pm is
// followed by 12:00:00 am.
//
// Time-set (set = 1): the seconds stand still. On each tick_half the minutes
// advance if mn_set is held (59 -> 0 with no carry into the hours) and the
// hours advance if hr_set is held, with the same 11 -> 12 am/pm flip and
// 12 -> 1 wrap as when running. Both may be held together.
//
// Reset puts the clock at 12:00:01 am, the source's power-up time. The
// counting, wrap and time-set rules above follow the source; binary storage
// (converted to BCD afterwards) is this design's choice, as is holding the
// seconds at their value (not clearing them) while set is high.
//
// Interface: tick_sec / tick_half are one-cycle enables; set, mn_set, hr_set
// are synchronised levels. Outputs are registers.
// Timing: every update takes effect on the clock edge at which its tick is
// high; rst is synchronous and active high.
module time_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick_sec,
  input  logic       tick_half,
  input  logic       set,
  input  logic       mn_set,
  input  logic       hr_set,
  output logic [5:0] sec,
  output logic [5:0] min,
  output logic [5:0] hr,
  output logic       pm_not_am
);

  logic       sec_wrap, min_wrap;
  logic       hr_step;
  logic [5:0] hr_next;
  logic       pm_next;

  assign sec_wrap = (sec == 6'd59);
  assign min_wrap = (min == 6'd59);

  // Hours advance from the running carry chain or from the HR_SET button.
  assign hr_step = set ? (tick_half & hr_set)
                       : (tick_sec & sec_wrap & min_wrap);

  always_comb begin
    hr_next = (hr == 6'd12) ? 6'd1 : hr + 6'd1;
    pm_next = (hr == 6'd11) ? ~pm_not_am : pm_not_am;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sec       <= 6'd1;
      min       <= 6'd0;
      hr        <= 6'd12;
      pm_not_am <= 1'b0;
    end else begin
      if (!set && tick_sec)
        sec <= sec_wrap ? 6'd0 : sec + 6'd1;

      if (set ? (tick_half & mn_set) : (tick_sec & sec_wrap))
        min <= min_wrap ? 6'd0 : min + 6'd1;

      if (hr_step) begin
        hr        <= hr_next;
        pm_not_am <= pm_next;
      end
    end
  end

  // The registers never leave their ranges.
  a_sec_range : assert property (@(posedge clk) disable iff (rst) sec <= 6'd59);
  a_min_range : assert property (@(posedge clk) disable iff (rst) min <= 6'd59);
  a_hr_range  : assert property (@(posedge clk) disable iff (rst) hr >= 6'd1 && hr <= 6'd12);

endmodule
