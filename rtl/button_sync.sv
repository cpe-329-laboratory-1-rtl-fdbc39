// button_sync: brings the push-button levels into the system clock domain.
//
// Each bit passes through two flip-flops, the usual guard against
// metastability for an asynchronous input. No debouncing is done: the time
// setting logic samples the levels only on half-second ticks and SET is a
// level, so contact bounce of a few milliseconds does not change the result.
// The source names a button input function and maps BTN0/BTN2/BTN3 to
// SET/MN_SET/HR_SET; the two-stage synchroniser is this design's choice.
//
// Interface: din[WIDTH-1:0] asynchronous levels in, dout[WIDTH-1:0] out.
// Timing: dout follows din two clock edges later; rst clears both stages.
module button_sync #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      dout <= '0;
    end else begin
      meta <= din;
      dout <= meta;
    end
  end

endmodule
