// tb_digital_clock: the time-keeping side (synchroniser, time base, time
// registers, BCD conversion) against a cycle-based reference model, with
// CLK_HZ = 10 so a second is 10 clock cycles.
// The model counts clock edges k after reset: edge k applies a half-second
// step when k % 5 == 0 and a one-second step when k % 10 == 0, and sees the
// buttons as they were two edges earlier. Buttons are held for random
// stretches of 1 to 60 cycles. Every cycle the BCD outputs and pm_not_am
// are compared with the model.
module tb_digital_clock;
  import clock_pkg::*;
  import clock_ref_pkg::*;

  localparam int unsigned HZ = 10;

  logic clk = 1'b0, rst;
  logic b_set, b_mn, b_hr;
  bcd2_t hours, minutes, seconds;
  logic pm;
  int checks = 0, failures = 0;
  logic [2:0] hist [0:1];   // button levels at the previous two edges
  int n_hold = 0, n_mn = 0, n_hr = 0, n_run = 0;

  digital_clock #(.CLK_HZ(HZ)) dut (
    .clk(clk), .rst(rst), .set_btn(b_set), .mn_set_btn(b_mn), .hr_set_btn(b_hr),
    .hours(hours), .minutes(minutes), .seconds(seconds), .pm_not_am(pm));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int unsigned t);
    checks++;
    if (hours != bcd8(h12_of(t)) || minutes != bcd8(min_of(t)) ||
        seconds != bcd8(sec_of(t)) || pm != pm_of(t)) begin
      failures++;
      $display("FAIL expected %s got %h:%h:%h pm=%0b", text_of(t), hours, minutes, seconds, pm);
    end
  endtask

  initial begin
    int unsigned t;
    int hold;
    logic [2:0] seen;
    rst = 1'b1;
    b_set = 0; b_mn = 0; b_hr = 0;
    hist[0] = 0; hist[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    t = 1;
    compare(t);
    hold = 0;
    for (int k = 1; k <= 200000; k++) begin
      if (hold == 0) begin
        hold = 1 + $urandom % 60;
        if (k < 20000) {b_hr, b_mn, b_set} = 3'b000;       // let it run for a while first
        else {b_hr, b_mn, b_set} = 3'($urandom) | (($urandom % 3 == 0) ? 3'b001 : 3'b000);
      end
      hold--;
      @(posedge clk);
      seen = hist[1];
      hist[1] = hist[0];
      hist[0] = {b_hr, b_mn, b_set};
      if (seen[0]) begin
        if (k % (HZ / 2) == 0) begin
          t = set_step(t, seen[1], seen[2]);
          if (seen[1]) n_mn++;
          if (seen[2]) n_hr++;
        end
        if (k % HZ == 0) n_hold++;
      end else if (k % HZ == 0) begin
        t = (t + 1) % 86400;
        n_run++;
      end
      #1 compare(t);
    end
    checks++;
    if (n_hold == 0 || n_mn == 0 || n_hr == 0 || n_run == 0) begin
      failures++;
      $display("FAIL coverage hold=%0d mn=%0d hr=%0d run=%0d", n_hold, n_mn, n_hr, n_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
