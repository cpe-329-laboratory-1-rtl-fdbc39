// tb_time_counter: checks the time registers against a reference model that
// keeps the time of day as seconds since midnight (0..86399).
// 1. After reset the clock must read 12:00:01 am.
// 2. A little over one full day of tick_sec pulses with set low (random
//    tick_half, mn_set, hr_set, which must be ignored), checked every tick.
// 3. Random mixtures of set, mn_set, hr_set, tick_sec and tick_half; in set
//    mode the model adds one minute (mod 60, no carry) or one hour (mod 24)
//    per tick_half and leaves the seconds alone.
// The 12-hour reading and am/pm are derived from the model's 24-hour time.
module tb_time_counter;
  logic clk = 1'b0, rst;
  logic tick_sec, tick_half, set, mn_set, hr_set;
  logic [5:0] sec, min, hr;
  logic pm;
  int checks = 0, failures = 0;
  int unsigned t;  // model: seconds since midnight
  int n_set_min_wrap = 0, n_set_hr_flip = 0;

  time_counter dut (.clk(clk), .rst(rst), .tick_sec(tick_sec), .tick_half(tick_half),
                    .set(set), .mn_set(mn_set), .hr_set(hr_set),
                    .sec(sec), .min(min), .hr(hr), .pm_not_am(pm));

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    int unsigned h24, h12, m, s;
    h24 = t / 3600; m = (t / 60) % 60; s = t % 60;
    h12 = (h24 % 12 == 0) ? 12 : h24 % 12;
    checks++;
    if (hr != 6'(h12) || min != 6'(m) || sec != 6'(s) || pm != (h24 >= 12)) begin
      failures++;
      $display("FAIL t=%0d: got %0d:%0d:%0d pm=%0b expected %0d:%0d:%0d pm=%0b",
               t, hr, min, sec, pm, h12, m, s, h24 >= 12);
    end
  endtask

  // one clock with the given inputs, then update the model
  task automatic step(logic ts, logic th, logic st, logic ms, logic hs);
    int unsigned h24, m, s;
    tick_sec = ts; tick_half = th; set = st; mn_set = ms; hr_set = hs;
    @(posedge clk);
    #1;
    h24 = t / 3600; m = (t / 60) % 60; s = t % 60;
    if (st) begin
      if (th && ms) begin
        if (m == 59) n_set_min_wrap++;
        m = (m + 1) % 60;
      end
      if (th && hs) begin
        if (h24 == 11 || h24 == 23) n_set_hr_flip++;
        h24 = (h24 + 1) % 24;
      end
      t = h24 * 3600 + m * 60 + s;
    end else if (ts) begin
      t = (t + 1) % 86400;
    end
    tick_sec = 0; tick_half = 0;
    compare();
  endtask

  initial begin
    rst = 1'b1;
    tick_sec = 0; tick_half = 0; set = 0; mn_set = 0; hr_set = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    t = 1;
    compare();

    // 2. free running, a little over a day
    for (int i = 0; i < 86400 + 100; i++)
      step(1'b1, 1'($urandom), 1'b0, 1'($urandom), 1'($urandom));

    // 3. random time setting
    for (int i = 0; i < 20000; i++)
      step(($urandom % 3) == 0, ($urandom % 2) == 0, ($urandom % 4) != 0,
           1'($urandom), 1'($urandom));

    checks++;
    if (n_set_min_wrap == 0 || n_set_hr_flip == 0) begin
      failures++;
      $display("FAIL coverage: set-mode minute wraps %0d, am/pm flips %0d", n_set_min_wrap, n_set_hr_flip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
