// vga_hsync_gen: horizontal timing generator for the VGA raster.
//
// Counts pixel clocks (25 MHz) through one line: H_VISIBLE visible pixels, then front
// porch, sync pulse and back porch. hsync_n is active low, hdisp is high during the visible
// pixels and line_end pulses for one clock on the last pixel clock of each line, which
// advances the vertical generator. All outputs are registered and change on the same clock
// as the counter they are decoded from, so they line up with each other.
// The document gives the block's function (HSYNC and blanking generation on the 25 MHz
// clock); the counter structure and the 640x480 numbers are this design's choice.
module vga_hsync_gen
  import esniff_pkg::*;
#(
  parameter int VISIBLE = H_VISIBLE,
  parameter int FRONT   = H_FRONT,
  parameter int SYNC    = H_SYNC,
  parameter int BACK    = H_BACK
) (
  input  logic clk,        // pixel clock
  input  logic rst,        // synchronous, active high
  output logic hsync_n,
  output logic hdisp,
  output logic line_end
);
  localparam int TOTAL = VISIBLE + FRONT + SYNC + BACK;
  localparam int CW    = $clog2(TOTAL);

  logic [CW-1:0] hcount;
  logic [CW-1:0] hnext;

  assign hnext = (hcount == CW'(TOTAL - 1)) ? '0 : hcount + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount   <= '0;
      hdisp    <= 1'b1;
      hsync_n  <= 1'b1;
      line_end <= 1'b0;
    end else begin
      hcount   <= hnext;
      hdisp    <= (hnext < CW'(VISIBLE));
      hsync_n  <= !((hnext >= CW'(VISIBLE + FRONT)) && (hnext < CW'(VISIBLE + FRONT + SYNC)));
      line_end <= (hnext == CW'(TOTAL - 1));
    end
  end
endmodule
