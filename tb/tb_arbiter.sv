// tb_arbiter: drives random times (as BCD) into the Arbiter and reads the
// text back from the LCD model. After each new time has been held for three
// refresh passes the first 11 cells must spell "hh:mm:ss am|pm" for it and
// the rest of the line must be blank. Also checked: no write before the
// power-up wait, the model's timing rules, the display switched on, exactly
// one clear, and a refresh pass of 12 writes (address + 11 characters).
module tb_arbiter;
  import clock_pkg::*;
  import clock_ref_pkg::*;

  localparam int unsigned PWR = 40, SETUP = 1, PULSE = 2, EXEC = 4, LONG = 10;
  localparam int unsigned PASS = 12 * (SETUP + PULSE + EXEC + 1);

  logic clk = 1'b0, rst;
  bcd2_t hours, minutes, seconds;
  logic pm;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_r;
  logic [0:15][7:0] line;
  int writes, char_writes, lcd_errors;
  logic display_on;
  int checks = 0, failures = 0;
  int clears = 0;

  arbiter #(.POWERUP_CYC(PWR), .SETUP_CYC(SETUP), .PULSE_CYC(PULSE), .EXEC_CYC(EXEC), .LONG_CYC(LONG)) dut (
    .clk(clk), .rst(rst), .hours(hours), .minutes(minutes), .seconds(seconds), .pm_not_am(pm),
    .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r));

  lcd_model #(.MIN_PULSE(PULSE), .MIN_EXEC(EXEC), .MIN_LONG(LONG), .MIN_POWERUP(PWR)) lcd (
    .clk(clk), .rst(rst), .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r),
    .line(line), .writes(writes), .char_writes(char_writes), .errors(lcd_errors), .display_on(display_on));

  always #5 clk = ~clk;
  always @(negedge lcd_r) if (!lcd_rs && lcd_data == 8'h01) clears++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_line(int unsigned t);
    string exp;
    bit ok;
    exp = text_of(t);
    ok = 1;
    for (int i = 0; i < 16; i++)
      if (line[i] != ((i < 11) ? 8'(exp[i]) : 8'h20)) ok = 0;
    chk($sformatf("display for %s", exp), ok);
    if (!ok) begin
      string got;
      got = "";
      for (int i = 0; i < 16; i++) got = {got, string'(line[i])};
      $display("  got \"%s\"", got);
    end
  endtask

  initial begin
    int unsigned t;
    int w0;
    rst = 1'b1;
    t = 0;
    hours = bcd8(12); minutes = bcd8(0); seconds = bcd8(0); pm = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (PWR - 2) @(posedge clk);
    chk("no write during power-up wait", writes == 0);
    repeat (4 * LONG + 3 * PASS) @(posedge clk);
    chk("display on", display_on);
    for (int n = 0; n < 400; n++) begin
      t = (n < 2) ? ((n == 0) ? 43200 + 59 : 9 * 3600 + 5 * 60 + 7) : $urandom % 86400;
      hours = bcd8(h12_of(t)); minutes = bcd8(min_of(t)); seconds = bcd8(sec_of(t)); pm = pm_of(t);
      repeat (3 * PASS) @(posedge clk);
      #1 check_line(t);
    end
    w0 = writes;
    repeat (10 * PASS) @(posedge clk);
    chk("refresh pass of 12 writes", (writes - w0) >= 9 * 12 && (writes - w0) <= 10 * 12);
    chk("one clear", clears == 1);
    chk("LCD timing", lcd_errors == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
