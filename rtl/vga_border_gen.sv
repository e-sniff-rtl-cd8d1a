// vga_border_gen: screen layout and border.
//
// Chooses, for every character cell, which code the font ROM draws: the solid block
// CH_BORDER on the outer frame and on the separator rows, the output memory inside output
// rows 1..54, the status memory in the status row and the input memory in the input row
// (layout in esniff_pkg). pos_in arrives together with the memory read addresses; it is
// delayed here by the one clock the memories take, and the choice is registered, so
// char_out and pos_out appear two clocks after pos_in.
// The document gives the function (arrange the three memories on screen, draw the border
// with block characters); the exact rows and the single block glyph are this design's
// choice.
module vga_border_gen
  import esniff_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  pix_pos_t   pos_in,
  input  logic [7:0] out_data,
  input  logic [7:0] st_data,
  input  logic [7:0] in_data,
  output logic [7:0] char_out,
  output pix_pos_t   pos_out
);
  pix_pos_t pos_d;
  logic [7:0] ch;

  always_comb begin
    int r;
    r = int'(pos_d.row);
    if (pos_d.col == 0 || int'(pos_d.col) == COLS - 1 || r == 0 || r >= ROWS - 1)
      ch = CH_BORDER;
    else if (r >= ROW_OUT_FIRST && r <= ROW_OUT_LAST)
      ch = out_data;
    else if (r == ROW_STATUS)
      ch = st_data;
    else if (r == ROW_INPUT)
      ch = in_data;
    else
      ch = CH_BORDER;     // separator rows
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_d    <= '0;
      pos_out  <= '0;
      char_out <= CH_SPACE;
    end else begin
      pos_d    <= pos_in;
      pos_out  <= pos_d;
      char_out <= ch;
    end
  end
endmodule
