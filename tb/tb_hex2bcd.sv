// tb_hex2bcd: exhaustive check of the 6-bit binary to BCD converter.
// Every input 0..63 is applied and both digits are compared with value/10
// and value%10 computed by the testbench.
module tb_hex2bcd;
  import clock_pkg::*;

  logic [5:0] bin;
  bcd2_t      bcd;
  int checks = 0, failures = 0;

  hex2bcd dut (.bin(bin), .bcd(bcd));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      bin = 6'(v);
      #1;
      checks++;
      if (bcd.tens != 4'(v / 10) || bcd.ones != 4'(v % 10)) begin
        failures++;
        $display("FAIL bin=%0d got %0d%0d", v, bcd.tens, bcd.ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
