// vga_vsync_gen: vertical timing generator for the VGA raster.
//
// Counts lines, advancing once per line_end pulse from the horizontal generator: V_VISIBLE
// visible lines, then front porch, sync pulse and back porch. vsync_n is active low and vdisp
// is high during the visible lines. Outputs are registered and change on the clock after
// line_end, i.e. on the first pixel clock of the new line, together with the horizontal
// outputs. The document gives the function (VSYNC and blanking generation on the 25 MHz
// clock); the counter structure and the 640x480 numbers are this design's choice.
module vga_vsync_gen
  import esniff_pkg::*;
#(
  parameter int VISIBLE = V_VISIBLE,
  parameter int FRONT   = V_FRONT,
  parameter int SYNC    = V_SYNC,
  parameter int BACK    = V_BACK
) (
  input  logic clk,        // pixel clock
  input  logic rst,        // synchronous, active high
  input  logic line_end,   // one-clock pulse on the last pixel of each line
  output logic vsync_n,
  output logic vdisp
);
  localparam int TOTAL = VISIBLE + FRONT + SYNC + BACK;
  localparam int CW    = $clog2(TOTAL);

  logic [CW-1:0] vcount;
  logic [CW-1:0] vnext;

  assign vnext = (vcount == CW'(TOTAL - 1)) ? '0 : vcount + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      vcount  <= '0;
      vdisp   <= 1'b1;
      vsync_n <= 1'b1;
    end else if (line_end) begin
      vcount  <= vnext;
      vdisp   <= (vnext < CW'(VISIBLE));
      vsync_n <= !((vnext >= CW'(VISIBLE + FRONT)) && (vnext < CW'(VISIBLE + FRONT + SYNC)));
    end
  end
endmodule
