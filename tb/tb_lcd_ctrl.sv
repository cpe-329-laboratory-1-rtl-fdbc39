// tb_lcd_ctrl: sends random command and character writes through the
// controller into the LCD model and checks, for every write, that the byte
// and RS the model latched on the enable's falling edge are the ones sent,
// that lcd_rs/lcd_data were set up SETUP_CYC cycles before the enable rose,
// that the enable was high exactly PULSE_CYC cycles and that the next write
// was accepted exactly EXEC_CYC (LONG_CYC after clear/home) cycles after the
// enable fell. The model's own timing checks must report no error.
module tb_lcd_ctrl;
  localparam int unsigned SETUP = 2, PULSE = 3, EXEC = 7, LONG = 20;

  logic clk = 1'b0, rst;
  logic req_valid, req_ready, req_rs;
  logic [7:0] req_data;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_r;
  logic [0:15][7:0] line;
  int writes, char_writes, lcd_errors;
  logic display_on;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_accept, t_rise, t_fall, n_long = 0;
  logic exp_rs;
  logic [7:0] exp_data;
  logic exp_long;

  lcd_ctrl #(.SETUP_CYC(SETUP), .PULSE_CYC(PULSE), .EXEC_CYC(EXEC), .LONG_CYC(LONG)) dut (
    .clk(clk), .rst(rst), .req_valid(req_valid), .req_ready(req_ready), .req_rs(req_rs),
    .req_data(req_data), .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r));

  lcd_model #(.MIN_PULSE(PULSE), .MIN_EXEC(EXEC), .MIN_LONG(LONG), .MIN_POWERUP(0)) lcd (
    .clk(clk), .rst(rst), .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_r(lcd_r),
    .line(line), .writes(writes), .char_writes(char_writes), .errors(lcd_errors), .display_on(display_on));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    rst = 1'b1; req_valid = 0; req_rs = 0; req_data = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      // choose a request: mostly characters, some commands, some clears
      case ($urandom % 4)
        0: begin exp_rs = 0; exp_data = 8'(1 + $urandom % 3); end
        1: begin exp_rs = 0; exp_data = 8'h80 | 8'($urandom % 16); end
        default: begin exp_rs = 1; exp_data = 8'h20 + 8'($urandom % 90); end
      endcase
      exp_long = !exp_rs && exp_data <= 8'h03;
      req_valid = 1; req_rs = exp_rs; req_data = exp_data;
      while (!req_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;   // the request is taken on this edge
      t_accept = cyc;
      req_valid = 0; req_rs = 0; req_data = 8'h00;
      while (!lcd_r) begin @(posedge clk); #1; end
      t_rise = cyc;
      chk("setup time", t_rise - t_accept == SETUP);
      chk("bus value", lcd_rs == exp_rs && lcd_data == exp_data && lcd_rw == 0);
      while (lcd_r) begin
        @(posedge clk); #1;
        if (lcd_r) chk("bus stable while strobe high", lcd_rs == exp_rs && lcd_data == exp_data);
      end
      t_fall = cyc;
      chk("pulse width", t_fall - t_rise == PULSE);
      // next acceptance
      while (!req_ready) begin @(posedge clk); #1; end
      chk("execution wait", cyc - t_fall == (exp_long ? LONG : EXEC));
      chk("held during wait", lcd_rs == exp_rs && lcd_data == exp_data);
      if (exp_long) n_long++;
    end
    chk("model saw every write", writes == 300);
    chk("model timing", lcd_errors == 0);
    chk("long waits exercised", n_long > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
