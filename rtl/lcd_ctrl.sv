// lcd_ctrl: performs single write cycles on a parallel character-LCD bus.
//
// A request (req_rs, req_data) is taken when req_valid and req_ready are both
// high. The controller then drives RS and the data byte, waits SETUP_CYC
// cycles, raises the enable strobe lcd_r for PULSE_CYC cycles, drops it (the
// LCD latches on that falling edge) and keeps RS/data unchanged while it
// waits for the LCD to execute: LONG_CYC cycles after the clear and home
// instructions (RS = 0, data 8'h01..8'h03), EXEC_CYC cycles otherwise.
// Only then is req_ready high again. lcd_rw is held at 0: the busy flag is
// never read, the fixed waits stand in for it.
// The source names this controller and the four bus signals (lcd_data,
// lcd_rs, lcd_rw, lcd_r); the write protocol and its timing are this
// design's own, chosen for an HD44780-type controller with lcd_r as its
// enable input.
//
// Interface: valid/ready request port; lcd_* outputs are registers.
// Timing: one write occupies SETUP_CYC + PULSE_CYC + wait cycles plus one
// idle cycle in which the next request is accepted.
module lcd_ctrl
  import clock_pkg::*;
#(
  parameter int unsigned SETUP_CYC = LCD_SETUP_CYC,
  parameter int unsigned PULSE_CYC = LCD_PULSE_CYC,
  parameter int unsigned EXEC_CYC  = LCD_EXEC_CYC,
  parameter int unsigned LONG_CYC  = LCD_LONG_CYC
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       req_valid,
  output logic       req_ready,
  input  logic       req_rs,
  input  logic [7:0] req_data,
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_r
);

  localparam int unsigned MAXC = (LONG_CYC > EXEC_CYC) ? LONG_CYC : EXEC_CYC;
  localparam int unsigned CW   = $clog2(MAXC + 1);

  typedef enum logic [1:0] {IDLE, SETUP, PULSE, WAIT} state_t;

  state_t        state;
  logic [CW-1:0] cnt;     // cycles left in the current phase
  logic          long_op;

  assign req_ready = (state == IDLE);
  assign lcd_rw    = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      cnt      <= '0;
      long_op  <= 1'b0;
      lcd_data <= '0;
      lcd_rs   <= 1'b0;
      lcd_r    <= 1'b0;
    end else begin
      case (state)
        IDLE: if (req_valid) begin
          lcd_data <= req_data;
          lcd_rs   <= req_rs;
          long_op  <= !req_rs && (req_data != 8'h00) && (req_data <= 8'h03);
          cnt      <= CW'(SETUP_CYC - 1);
          state    <= SETUP;
        end
        SETUP: if (cnt == '0) begin
          lcd_r <= 1'b1;
          cnt   <= CW'(PULSE_CYC - 1);
          state <= PULSE;
        end else begin
          cnt <= cnt - 1'b1;
        end
        PULSE: if (cnt == '0) begin
          lcd_r <= 1'b0;
          cnt   <= long_op ? CW'(LONG_CYC - 1) : CW'(EXEC_CYC - 1);
          state <= WAIT;
        end else begin
          cnt <= cnt - 1'b1;
        end
        WAIT: if (cnt == '0) begin
          state <= IDLE;
        end else begin
          cnt <= cnt - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // RS and data must not move while the enable strobe is high.
  a_bus_stable : assert property (@(posedge clk) disable iff (rst)
                                  lcd_r && $past(lcd_r) |-> $stable(lcd_data) && $stable(lcd_rs));

endmodule
