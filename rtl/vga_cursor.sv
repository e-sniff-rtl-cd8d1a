// vga_cursor: blinking cursor at the end of the keyboard input line.
//
// A free-running counter toggles blink_on every HALF_PERIOD clocks, so at 100 MHz the
// cursor is shown for half a second and hidden for half a second: one blink per second.
// While blink_on is high the character cell just after the last typed character (input
// row, screen column cursor_col + 1) is drawn inverted; every other pixel passes through.
// The output is registered, one clock after the input.
// The one-per-second blink and the position are the document's; drawing it as an inverted
// cell is this design's choice.
module vga_cursor
  import esniff_pkg::*;
#(
  parameter int HALF_PERIOD = 50_000_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] cursor_col,   // input-line column of the next character
  input  logic [2:0] rgb_in,
  input  pix_pos_t   pos_in,
  output logic [2:0] rgb_out,
  output pix_pos_t   pos_out,
  output logic       blink_on
);
  localparam int CW = $clog2(HALF_PERIOD);
  logic [CW-1:0] cnt;
  logic          at_cursor;

  assign at_cursor = pos_in.active && (int'(pos_in.row) == ROW_INPUT) &&
                     (pos_in.col == cursor_col + 7'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      blink_on <= 1'b0;
      rgb_out  <= '0;
      pos_out  <= '0;
    end else begin
      if (cnt == CW'(HALF_PERIOD - 1)) begin
        cnt      <= '0;
        blink_on <= !blink_on;
      end else begin
        cnt <= cnt + 1'b1;
      end
      rgb_out <= (at_cursor && blink_on) ? ~rgb_in : rgb_in;
      pos_out <= pos_in;
    end
  end
endmodule
