// vga_counter: screen-position counter and text-memory address generator.
//
// Runs on the 100 MHz system clock and follows the 25 MHz raster by watching the display
// enables of the sync generators (hdisp, vdisp; the two clocks come from one PLL, so the
// enables can be sampled directly). Within a visible line it counts system clocks;
// CLK_PER_PIX clocks make one pixel. Lines are counted on the falling edge of hdisp and the
// count restarts when vdisp falls. From the pixel position it forms the character cell
// (column, row) and the pixel inside the glyph, and the read addresses into the three text
// memories for the screen layout of esniff_pkg:
//   output rows 1..54 show ring line (top_line + row - 1) mod OUT_LINES, memory column col-1;
//   the status row and the input row show memory column col-1 of their memories.
// pos and the three addresses are registered together; the memories answer one clock later.
// The document gives the function (current screen position, read addresses into the
// memories); the way it follows the 25 MHz raster is this design's choice.
module vga_counter
  import esniff_pkg::*;
#(
  parameter int CLK_PER_PIX = 4,
  parameter int LINES       = OUT_LINES,
  parameter int LW          = $clog2(LINES),
  parameter int AW          = $clog2(COLS * LINES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          hdisp,       // from the sync generators (pixel clock domain)
  input  logic          vdisp,
  input  logic [LW-1:0] top_line,
  output pix_pos_t      pos,
  output logic [AW-1:0] out_raddr,
  output logic [6:0]    st_raddr,
  output logic [6:0]    in_raddr
);
  localparam int XW = $clog2(H_VISIBLE * CLK_PER_PIX + 1);

  logic          hd_s, vd_s, hd_q;
  logic          act;
  logic [XW-1:0] x_cyc;
  logic [9:0]    y;
  logic [9:0]    x;

  assign x = 10'(int'(x_cyc) / CLK_PER_PIX);

  always_ff @(posedge clk) begin
    if (rst) begin
      hd_s  <= 1'b0;
      vd_s  <= 1'b0;
      hd_q  <= 1'b0;
      act   <= 1'b0;
      x_cyc <= '0;
      y     <= '0;
    end else begin
      hd_s  <= hdisp;
      vd_s  <= vdisp;
      hd_q  <= hd_s;
      act   <= hd_s && vd_s;
      x_cyc <= act ? x_cyc + 1'b1 : '0;
      if (!vd_s)               y <= '0;
      else if (hd_q && !hd_s)  y <= y + 1'b1;
    end
  end

  // Stage 1: character cell, glyph pixel and memory addresses.
  always_ff @(posedge clk) begin
    if (rst) begin
      pos       <= '0;
      out_raddr <= '0;
      st_raddr  <= '0;
      in_raddr  <= '0;
    end else begin
      logic [6:0] col;
      logic [5:0] row;
      int unsigned line;
      col = x[9:3];
      row = y[8:3];
      pos.active <= act && (x < 10'(H_VISIBLE)) && (y < 10'(V_VISIBLE));
      pos.col    <= col;
      pos.row    <= row;
      pos.px     <= x[2:0];
      pos.py     <= y[2:0];
      line = int'(top_line) + int'(row) - ROW_OUT_FIRST;
      if (int'(row) < ROW_OUT_FIRST) line = 0;
      if (line >= LINES) line = line - LINES;
      out_raddr <= AW'(line * COLS + ((col == 0) ? 0 : int'(col) - 1));
      st_raddr  <= (col == 0) ? 7'd0 : col - 1'b1;
      in_raddr  <= (col == 0) ? 7'd0 : col - 1'b1;
    end
  end
endmodule
