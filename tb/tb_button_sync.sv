// tb_button_sync: random levels go in; each output bit must equal the input
// bit as it was two clock edges earlier, and reset must clear the outputs.
module tb_button_sync;
  logic clk = 1'b0, rst;
  logic [2:0] din, dout;
  logic [2:0] hist [0:2];
  int checks = 0, failures = 0;

  button_sync #(.WIDTH(3)) dut (.clk(clk), .rst(rst), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    din = 3'b111;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout != 3'b000) begin failures++; $display("FAIL reset value %b", dout); end
    rst = 1'b0;
    hist[0] = 3'b0; hist[1] = 3'b0; hist[2] = 3'b0;
    for (int i = 0; i < 500; i++) begin
      din = 3'($urandom);
      @(posedge clk);
      #1;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = din;
      if (i >= 2) begin
        checks++;
        if (dout != hist[1]) begin
          failures++;
          $display("FAIL cycle %0d dout=%b expected %b", i, dout, hist[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
