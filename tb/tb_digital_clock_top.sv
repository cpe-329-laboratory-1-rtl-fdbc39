// tb_digital_clock_top: end-to-end test of the clock, from the buttons to
// the characters on the LCD model, at reduced timing (CLK_HZ = 400, short
// LCD waits) so that a simulated second is 400 cycles.
//
// A cycle-based reference model keeps the time (seconds since midnight): at
// clock edge k after reset it applies a half-second set step when k % 200
// == 0 and a one-second step when k % 400 == 0, seeing the buttons as they
// were two edges earlier. Every cycle the BCD ports are compared with it.
// At the end of each LCD refresh pass the 11 characters on the model LCD
// must spell the model's current time, or the previous one if the time
// changed less than two passes ago.
//
// Phases: free running past a minute; SET alone (seconds stop); SET+MN_SET
// through a 59 -> 00 wrap; SET+HR_SET through a whole 12-hour cycle twice;
// time set to 11:59 pm and to 12:59 pm and run over the hour. Each mechanism
// is counted and one that never happened counts as a failure.
module tb_digital_clock_top;
  import clock_pkg::*;
  import clock_ref_pkg::*;

  localparam int unsigned HZ = 400, PWR = 40, SETUP = 1, PULSE = 2, EXEC = 4, LONG = 10;
  localparam int unsigned PASS = 12 * (SETUP + PULSE + EXEC + 1);

  logic clk = 1'b0, rst;
  logic b_set, b_mn, b_hr;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_r;
  bcd2_t hours, minutes, seconds;
  logic pm;
  logic [0:15][7:0] line;
  int writes, char_writes, lcd_errors;
  logic display_on;
  int checks = 0, failures = 0;

  // reference model state
  int unsigned t;
  int k;
  logic [2:0] hist [0:1];
  string txt_now, txt_prev;
  int last_change;
  int last_char_writes;

  // mechanism counters
  int n_sec = 0, n_min_carry = 0, n_hr_carry = 0, n_pm_flip_run = 0, n_wrap12_run = 0;
  int n_set_hold = 0, n_mn_inc = 0, n_mn_wrap = 0, n_hr_inc = 0, n_hr_wrap = 0, n_pm_flip_set = 0;
  int n_passes = 0;

  digital_clock_top #(.CLK_HZ(HZ), .POWERUP_CYC(PWR), .SETUP_CYC(SETUP), .PULSE_CYC(PULSE),
                      .EXEC_CYC(EXEC), .LONG_CYC(LONG)) dut (
    .clk(clk), .rst(rst), .btn_set(b_set), .btn_mn_set(b_mn), .btn_hr_set(b_hr),
    .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r),
    .hours(hours), .minutes(minutes), .seconds(seconds), .pm_not_am(pm));

  lcd_model #(.MIN_PULSE(PULSE), .MIN_EXEC(EXEC), .MIN_LONG(LONG), .MIN_POWERUP(PWR)) lcd (
    .clk(clk), .rst(rst), .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r),
    .line(line), .writes(writes), .char_writes(char_writes), .errors(lcd_errors), .display_on(display_on));

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (edge %0d)", what, k); end
  endtask

  function automatic string shown();
    string s = "";
    for (int i = 0; i < 11; i++) s = {s, string'(line[i])};
    return s;
  endfunction

  // one clock edge with the given button levels, model update and checks
  task automatic cycle(logic s, logic m, logic h);
    logic [2:0] seen;
    int unsigned t0;
    b_set = s; b_mn = m; b_hr = h;
    @(posedge clk);
    k++;
    seen = hist[1];
    hist[1] = hist[0];
    hist[0] = {h, m, s};
    t0 = t;
    if (seen[0]) begin
      if (k % (HZ / 2) == 0) begin
        t = set_step(t, seen[1], seen[2]);
        if (seen[1]) begin
          n_mn_inc++;
          if (min_of(t0) == 59 && h24_of(t) == h24_of(t0) && !seen[2]) n_mn_wrap++;
        end
        if (seen[2]) begin
          n_hr_inc++;
          if (h12_of(t0) == 12) n_hr_wrap++;
          if (pm_of(t0) != pm_of(t)) n_pm_flip_set++;
        end
      end
      if (k % HZ == 0) n_set_hold++;
    end else if (k % HZ == 0) begin
      t = (t + 1) % 86400;
      n_sec++;
      if (sec_of(t0) == 59) n_min_carry++;
      if (sec_of(t0) == 59 && min_of(t0) == 59) begin
        n_hr_carry++;
        if (pm_of(t0) != pm_of(t)) n_pm_flip_run++;
        if (h12_of(t0) == 12) n_wrap12_run++;
      end
    end
    if (t != t0) begin
      txt_prev = txt_now;
      txt_now = text_of(t);
      last_change = k;
    end
    #1;
    checks++;
    if (hours != bcd8(h12_of(t)) || minutes != bcd8(min_of(t)) ||
        seconds != bcd8(sec_of(t)) || pm != pm_of(t)) begin
      failures++;
      $display("FAIL edge %0d: ports %h:%h:%h pm=%0b, expected %s", k, hours, minutes, seconds, pm, txt_now);
    end
    if (char_writes != last_char_writes && char_writes % 11 == 0) begin
      string got;
      got = shown();
      n_passes++;
      chk($sformatf("LCD shows \"%s\", expected \"%s\"", got, txt_now),
          got == txt_now || (got == txt_prev && k - last_change <= 2 * PASS));
    end
    last_char_writes = char_writes;
  endtask

  task automatic run(int n, logic s, logic m, logic h);
    repeat (n) cycle(s, m, h);
  endtask

  initial begin
    rst = 1'b1;
    b_set = 0; b_mn = 0; b_hr = 0;
    hist[0] = 0; hist[1] = 0;
    k = 0;
    t = 1;
    txt_now = text_of(t); txt_prev = txt_now; last_change = 0; last_char_writes = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // power-up: 12:00:01 am, then free running past a minute
    run(HZ / 2, 0, 0, 0);
    chk("power-up text on the LCD", shown() == "12:00:01 am");
    run(70 * HZ, 0, 0, 0);
    // SET alone: seconds must stand still
    run(3 * HZ, 1, 0, 0);
    // SET + MN_SET through a 59 -> 00 wrap
    run(35 * HZ, 1, 1, 0);
    // SET + HR_SET through 24 steps (two 12-hour cycles)
    run(12 * HZ, 1, 0, 1);
    // set 11:59 pm, then run past midnight
    while (min_of(t) != 59) cycle(1, 1, 0);
    while (h24_of(t) != 23) cycle(1, 0, 1);
    run(HZ, 1, 0, 0);
    run(62 * HZ, 0, 0, 0);
    chk("midnight reached", h24_of(t) == 0);
    // set 12:59 pm, then run over into 1 pm
    while (min_of(t) != 59) cycle(1, 1, 0);
    while (h24_of(t) != 12) cycle(1, 0, 1);
    run(HZ, 1, 0, 0);
    run(62 * HZ, 0, 0, 0);
    chk("1 pm reached", h24_of(t) == 13);

    chk("LCD timing rules", lcd_errors == 0);
    chk("display on", display_on);
    $display("mechanisms: sec=%0d min_carry=%0d hr_carry=%0d pm_flip_run=%0d 12->1_run=%0d",
             n_sec, n_min_carry, n_hr_carry, n_pm_flip_run, n_wrap12_run);
    $display("            set_hold=%0d mn_inc=%0d mn_wrap=%0d hr_inc=%0d hr_wrap=%0d pm_flip_set=%0d lcd_passes=%0d",
             n_set_hold, n_mn_inc, n_mn_wrap, n_hr_inc, n_hr_wrap, n_pm_flip_set, n_passes);
    chk("seconds counted",          n_sec > 0);
    chk("minute carry",             n_min_carry > 0);
    chk("hour carry",               n_hr_carry > 0);
    chk("am/pm flip while running", n_pm_flip_run > 0);
    chk("12 -> 1 while running",    n_wrap12_run > 0);
    chk("seconds held in set mode", n_set_hold > 0);
    chk("MN_SET increments",        n_mn_inc > 0);
    chk("MN_SET 59 -> 00 wrap",     n_mn_wrap > 0);
    chk("HR_SET increments",        n_hr_inc > 0);
    chk("HR_SET 12 -> 1 wrap",      n_hr_wrap > 0);
    chk("am/pm flip in set mode",   n_pm_flip_set > 0);
    chk("LCD refresh passes",       n_passes > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
