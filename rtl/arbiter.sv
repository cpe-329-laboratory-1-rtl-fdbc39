// arbiter: shows the time on the character LCD.
//
// It takes the time as BCD (hours, minutes, seconds) plus pm_not_am,
// turns it into the 11-character text "hh:mm:ss am" / "hh:mm:ss pm" and
// writes that text to the first line of the LCD through lcd_ctrl, over and
// over. The write sequence is a fixed list walked by an index:
//   0..3   initialisation: function set, display on, entry mode, clear
//   4      set DDRAM address 0 (start of line 1)
//   5..15  the eleven characters
// after which the index returns to 4, so the display is refreshed
// continuously. The initialisation starts POWERUP_CYC cycles after reset, to
// let the LCD finish its own power-up. The time is copied into a snapshot
// register when the address instruction is accepted, so one pass always
// shows one consistent time.
// The source gives this block's job (BCD to ASCII, written with address,
// data and control signals to the LCD) and its inputs and lcd_* outputs. The
// text layout, with digits printed as they are (hour 9 shows as "09"), the
// instruction list, the continuous refresh and all timing are this design's
// own choices.
//
// Interface: clk, rst (synchronous, active high); BCD time inputs; lcd_data,
// lcd_rs, lcd_rw, lcd_r to the LCD header.
// Timing: with the defaults at 50 MHz a refresh pass of 12 writes takes
// about 0.6 ms, so a new second is on the display well within a millisecond.
module arbiter
  import clock_pkg::*;
#(
  parameter int unsigned POWERUP_CYC = LCD_POWERUP_CYC,
  parameter int unsigned SETUP_CYC   = LCD_SETUP_CYC,
  parameter int unsigned PULSE_CYC   = LCD_PULSE_CYC,
  parameter int unsigned EXEC_CYC    = LCD_EXEC_CYC,
  parameter int unsigned LONG_CYC    = LCD_LONG_CYC
) (
  input  logic       clk,
  input  logic       rst,
  input  bcd2_t      hours,
  input  bcd2_t      minutes,
  input  bcd2_t      seconds,
  input  logic       pm_not_am,
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_r
);

  localparam logic [3:0] SEQ_LINE0 = 4'd4;
  localparam logic [3:0] SEQ_LAST  = 4'd15;
  localparam int unsigned PW       = $clog2(POWERUP_CYC + 1);

  logic [PW-1:0] pwr_cnt;
  logic          running;
  logic [3:0]    seq;
  logic          req_ready, req_rs, accept;
  logic [7:0]    req_data;

  bcd2_t snap_hr, snap_min, snap_sec;
  logic  snap_pm;

  // Power-up wait.
  always_ff @(posedge clk) begin
    if (rst) begin
      pwr_cnt <= PW'(POWERUP_CYC);
      running <= 1'b0;
    end else if (!running) begin
      if (pwr_cnt == '0) running <= 1'b1;
      else               pwr_cnt <= pwr_cnt - 1'b1;
    end
  end

  assign accept = running && req_ready;

  // Walk the write list; capture the time at the start of each pass.
  always_ff @(posedge clk) begin
    if (rst) begin
      seq      <= '0;
      snap_hr  <= '0;
      snap_min <= '0;
      snap_sec <= '0;
      snap_pm  <= 1'b0;
    end else if (accept) begin
      seq <= (seq == SEQ_LAST) ? SEQ_LINE0 : seq + 4'd1;
      if (seq == SEQ_LINE0) begin
        snap_hr  <= hours;
        snap_min <= minutes;
        snap_sec <= seconds;
        snap_pm  <= pm_not_am;
      end
    end
  end

  // The byte written at each index.
  always_comb begin
    req_rs   = 1'b1;
    req_data = 8'h20;
    case (seq)
      4'd0:  begin req_rs = 1'b0; req_data = LCD_CMD_FUNC_SET; end
      4'd1:  begin req_rs = 1'b0; req_data = LCD_CMD_DISP_ON;  end
      4'd2:  begin req_rs = 1'b0; req_data = LCD_CMD_ENTRY;    end
      4'd3:  begin req_rs = 1'b0; req_data = LCD_CMD_CLEAR;    end
      4'd4:  begin req_rs = 1'b0; req_data = LCD_CMD_LINE0;    end
      4'd5:  req_data = bcd_ascii(snap_hr.tens);
      4'd6:  req_data = bcd_ascii(snap_hr.ones);
      4'd7:  req_data = 8'h3A;                      // ':'
      4'd8:  req_data = bcd_ascii(snap_min.tens);
      4'd9:  req_data = bcd_ascii(snap_min.ones);
      4'd10: req_data = 8'h3A;                      // ':'
      4'd11: req_data = bcd_ascii(snap_sec.tens);
      4'd12: req_data = bcd_ascii(snap_sec.ones);
      4'd13: req_data = 8'h20;                      // ' '
      4'd14: req_data = snap_pm ? 8'h70 : 8'h61;    // 'p' / 'a'
      4'd15: req_data = 8'h6D;                      // 'm'
      default: ;
    endcase
  end

  lcd_ctrl #(
    .SETUP_CYC (SETUP_CYC),
    .PULSE_CYC (PULSE_CYC),
    .EXEC_CYC  (EXEC_CYC),
    .LONG_CYC  (LONG_CYC)
  ) u_lcd (
    .clk       (clk),
    .rst       (rst),
    .req_valid (running),
    .req_ready (req_ready),
    .req_rs    (req_rs),
    .req_data  (req_data),
    .lcd_data  (lcd_data),
    .lcd_rs    (lcd_rs),
    .lcd_rw    (lcd_rw),
    .lcd_r     (lcd_r)
  );

endmodule
