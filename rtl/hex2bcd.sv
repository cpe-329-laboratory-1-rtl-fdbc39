// hex2bcd: converts one 6-bit binary number (0..63) into two BCD digits.
//
// Purely combinational. The tens digit is found by comparing the input with
// 10, 20, ... 60 and the ones digit is what remains after subtracting
// ten times the tens digit, so no divider is built. The block's function
// (6-bit binary in, two BCD digits out) is the one the clock's display path
// needs; the compare-and-subtract structure is this design's choice.
//
// Interface: bin[5:0] in; bcd.tens / bcd.ones out (bcd[7:4] / bcd[3:0]).
// Timing: no clock, output valid one combinational delay after bin.
module hex2bcd
  import clock_pkg::*;
(
  input  logic [5:0] bin,
  output bcd2_t      bcd
);

  logic [3:0] tens;
  logic [3:0] rem;

  always_comb begin
    if      (bin >= 6'd60) tens = 4'd6;
    else if (bin >= 6'd50) tens = 4'd5;
    else if (bin >= 6'd40) tens = 4'd4;
    else if (bin >= 6'd30) tens = 4'd3;
    else if (bin >= 6'd20) tens = 4'd2;
    else if (bin >= 6'd10) tens = 4'd1;
    else                   tens = 4'd0;
    rem = 4'(bin - 6'(tens * 4'd10));
  end

  assign bcd.tens = tens;
  assign bcd.ones = rem;

endmodule
