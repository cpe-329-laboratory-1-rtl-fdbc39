// tick_gen: derives the clock's half-second and one-second time base from
// the system clock.
//
// A single counter runs from 0 to CLK_HZ/2-1 and wraps; on the wrap it emits
// a one-cycle tick_half pulse and flips a phase bit. Every second tick_half
// (the one on which phase is 1) is also a tick_sec pulse. The design stays
// on one clock: the pulses are clock enables, not divided clocks.
// Dividing the 50 MHz board clock down to a one-second rate follows the
// source; the half-second tick serves the time-set buttons, which step at
// half-second intervals. Using enables instead of a derived clock is this
// design's choice.
//
// Interface: clk, rst (synchronous, active high) in; tick_half, tick_sec out.
// Timing: after rst is released the first tick_half comes CLK_HZ/2 cycles
// later, the first tick_sec CLK_HZ cycles later; then every CLK_HZ/2 and
// CLK_HZ cycles respectively. CLK_HZ must be even and at least 2.
module tick_gen #(
  parameter int unsigned CLK_HZ = clock_pkg::SYS_CLK_HZ
) (
  input  logic clk,
  input  logic rst,
  output logic tick_half,
  output logic tick_sec
);

  localparam int unsigned HALF = CLK_HZ / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;
  logic          phase;
  logic          wrap;

  assign wrap = (cnt == CW'(HALF - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      phase <= 1'b0;
    end else if (wrap) begin
      cnt   <= '0;
      phase <= ~phase;
    end else begin
      cnt   <= cnt + 1'b1;
    end
  end

  assign tick_half = wrap;
  assign tick_sec  = wrap & phase;

endmodule
