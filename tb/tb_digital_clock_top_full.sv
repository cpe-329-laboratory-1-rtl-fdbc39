// tb_digital_clock_top_full: the clock at its real timing (50 MHz system
// clock, 20 ms LCD power-up wait, 50 us per LCD write), with the top's
// parameters untouched, through its first seconds and a time-set step.
//   - after reset the BCD outputs read 12:00:01 am and, once the LCD's
//     power-up wait and initialisation are over, the LCD shows "12:00:01 am";
//   - the seconds change exactly 50,000,000 cycles after reset: still 01 one
//     cycle before, 02 at that edge; the LCD then shows "12:00:02 am";
//   - SET with MN_SET held for one second steps the minutes twice (half-
//     second rate) while the seconds stand still: "12:02:02 am".
// The LCD model checks the bus timing against HD44780 minimums throughout.
module tb_digital_clock_top_full;
  import clock_pkg::*;
  import clock_ref_pkg::*;

  localparam int unsigned HZ = SYS_CLK_HZ;

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
  int k = 0;

  digital_clock_top dut (
    .clk(clk), .rst(rst), .btn_set(b_set), .btn_mn_set(b_mn), .btn_hr_set(b_hr),
    .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r),
    .hours(hours), .minutes(minutes), .seconds(seconds), .pm_not_am(pm));

  // HD44780 minimums at 50 MHz: 230 ns pulse, 37 us execution,
  // 1.52 ms clear, 15 ms after power-up
  lcd_model #(.MIN_PULSE(12), .MIN_EXEC(1850), .MIN_LONG(76_000), .MIN_POWERUP(750_000)) lcd (
    .clk(clk), .rst(rst), .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r),
    .line(line), .writes(writes), .char_writes(char_writes), .errors(lcd_errors), .display_on(display_on));

  always #10 clk = ~clk;   // 20 ns period

  initial begin
    repeat (3 * HZ) @(posedge clk);
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

  task automatic ports_read(int unsigned t);
    chk($sformatf("ports read %s", text_of(t)),
        hours == bcd8(h12_of(t)) && minutes == bcd8(min_of(t)) &&
        seconds == bcd8(sec_of(t)) && pm == pm_of(t));
  endtask

  // advance to clock edge number n after reset
  task automatic go_to(int n);
    while (k < n) begin @(posedge clk); k++; end
    #1;
  endtask

  initial begin
    rst = 1'b1;
    b_set = 0; b_mn = 0; b_hr = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ports_read(1);
    go_to(HZ / 20);                   // 50 ms
    chk("LCD on", display_on);
    chk("LCD shows 12:00:01 am", shown() == "12:00:01 am");
    go_to(HZ - 1);
    ports_read(1);
    go_to(HZ);
    ports_read(2);
    go_to(HZ + HZ / 1000);            // +1 ms
    chk($sformatf("LCD shows 12:00:02 am (\"%s\")", shown()), shown() == "12:00:02 am");
    // SET + MN_SET for one second: two minute steps, seconds held
    b_set = 1; b_mn = 1;
    go_to(2 * HZ + HZ / 1000);
    b_set = 0; b_mn = 0;
    go_to(2 * HZ + HZ / 500);
    ports_read(2 * 60 + 2);
    chk($sformatf("LCD shows 12:02:02 am (\"%s\")", shown()), shown() == "12:02:02 am");
    chk("LCD timing rules", lcd_errors == 0);
    $display("LCD writes: %0d", writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
