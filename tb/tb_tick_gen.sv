// tb_tick_gen: checks the half-second and one-second enables.
// With CLK_HZ = 10 (and again 4) the testbench counts cycles since reset and
// requires tick_half exactly when (cycle % (CLK_HZ/2)) == 0 and tick_sec
// exactly when (cycle % CLK_HZ) == 0, for 100 seconds of ticks.
module tb_tick_gen;
  localparam int unsigned HZ_A = 10;
  localparam int unsigned HZ_B = 4;

  logic clk = 1'b0, rst;
  logic half_a, sec_a, half_b, sec_b;
  int checks = 0, failures = 0;
  int cyc;
  int n_half, n_sec;

  tick_gen #(.CLK_HZ(HZ_A)) dut_a (.clk(clk), .rst(rst), .tick_half(half_a), .tick_sec(sec_a));
  tick_gen #(.CLK_HZ(HZ_B)) dut_b (.clk(clk), .rst(rst), .tick_half(half_b), .tick_sec(sec_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0b expected %0b", what, cyc, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    n_half = 0; n_sec = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // cyc counts clock edges after the reset release
    for (cyc = 1; cyc <= 100 * HZ_A; cyc++) begin
      @(negedge clk);
      expect1("half_a", half_a, (cyc % (HZ_A / 2)) == 0);
      expect1("sec_a",  sec_a,  (cyc % HZ_A) == 0);
      expect1("half_b", half_b, (cyc % (HZ_B / 2)) == 0);
      expect1("sec_b",  sec_b,  (cyc % HZ_B) == 0);
      n_half += int'(half_a);
      n_sec  += int'(sec_a);
      @(posedge clk);
    end
    checks++;
    if (n_half != 200 || n_sec != 100) begin
      failures++;
      $display("FAIL counts half=%0d sec=%0d", n_half, n_sec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
