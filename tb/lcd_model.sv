// lcd_model: behavioural model of an HD44780-type character LCD, for
// simulation only (not synthesizable, not part of the design).
//
// It watches the write bus and, on each falling edge of the enable strobe
// lcd_r, executes the byte: with lcd_rs = 1 it stores a character at the
// address counter and increments it; with lcd_rs = 0 it executes the
// instructions the clock uses (clear, entry mode, display on/off, function
// set, set DDRAM address). The first 16 character cells are visible on the
// line output. It also checks the bus timing in system clock cycles: the
// enable must stay high for MIN_PULSE cycles, and after a write the next one
// may start only after MIN_EXEC cycles (MIN_LONG after clear), and the first
// write must come MIN_POWERUP cycles after reset. lcd_rw must be 0 at every
// strobe. Every violation increments errors.
module lcd_model #(
  parameter int unsigned MIN_PULSE   = 12,
  parameter int unsigned MIN_EXEC    = 1850,
  parameter int unsigned MIN_LONG    = 76_000,
  parameter int unsigned MIN_POWERUP = 750_000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [7:0]      lcd_data,
  input  logic            lcd_rs,
  input  logic            lcd_rw,
  input  logic            lcd_r,
  output logic [0:15][7:0] line,
  output int              writes,
  output int              char_writes,
  output int              errors,
  output logic            display_on
);

  logic [7:0] ddram [0:127];
  logic [6:0] addr;
  logic       e_q;
  int         high_cyc, since_fall, since_rst, need_gap;
  logic       seen_write;

  always_comb
    for (int i = 0; i < 16; i++) line[i] = ddram[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 128; i++) ddram[i] <= 8'h20;
      addr        <= '0;
      e_q         <= 1'b0;
      high_cyc    <= 0;
      since_fall  <= 0;
      since_rst   <= 0;
      need_gap    <= 0;
      seen_write  <= 1'b0;
      writes      <= 0;
      char_writes <= 0;
      errors      <= 0;
      display_on  <= 1'b0;
    end else begin
      e_q       <= lcd_r;
      since_rst <= since_rst + 1;
      if (lcd_r) high_cyc <= high_cyc + 1;
      else       since_fall <= since_fall + 1;

      // rising edge: check the gap since the previous write / reset
      if (lcd_r && !e_q) begin
        high_cyc <= 1;
        if (!seen_write && since_rst < MIN_POWERUP) begin
          errors <= errors + 1;
          $display("lcd_model: first write %0d cycles after reset", since_rst);
        end
        if (seen_write && since_fall < need_gap) begin
          errors <= errors + 1;
          $display("lcd_model: write %0d cycles after the previous one, %0d needed", since_fall, need_gap);
        end
      end

      // falling edge: execute
      if (!lcd_r && e_q) begin
        since_fall <= 1;
        seen_write <= 1'b1;
        writes     <= writes + 1;
        need_gap   <= MIN_EXEC;
        if (high_cyc < MIN_PULSE) begin
          errors <= errors + 1;
          $display("lcd_model: enable high for %0d cycles", high_cyc);
        end
        if (lcd_rw) begin
          errors <= errors + 1;
          $display("lcd_model: strobe with lcd_rw = 1");
        end
        if (lcd_rs) begin
          ddram[addr] <= lcd_data;
          addr        <= addr + 1'b1;
          char_writes <= char_writes + 1;
        end else if (lcd_data[7]) begin
          addr <= lcd_data[6:0];
        end else if (lcd_data == 8'h01) begin
          for (int i = 0; i < 128; i++) ddram[i] <= 8'h20;
          addr     <= '0;
          need_gap <= MIN_LONG;
        end else if (lcd_data[7:3] == 5'b00001) begin
          display_on <= lcd_data[2];
        end
      end
    end
  end

endmodule
