// vga_line_return: scroll pointer of the rotating output queue.
//
// The output memory is a ring of LINES text lines of which VIS_LINES are on screen. This
// block holds top_line, the ring index of the line shown in the first output row. A rising
// edge on enter (a level driven by the processor) advances top_line by one, modulo LINES,
// which moves the visible window down one line: the old top line leaves the screen and a
// new, empty base line appears at the bottom. base_line is the ring index of the bottom
// visible line, where new text is written, and advance pulses for one clock when the
// pointer moves so the write state machine can start a new line.
// The pointer and its one-line step are the document's; edge detection and the base_line
// output are this design's choice.
module vga_line_return
  import esniff_pkg::*;
#(
  parameter int LINES     = OUT_LINES,
  parameter int VIS_LINES = OUT_VIS_LINES,
  parameter int LW        = $clog2(LINES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enter,
  output logic [LW-1:0] top_line,
  output logic [LW-1:0] base_line,
  output logic          advance
);
  logic enter_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      enter_q  <= 1'b0;
      top_line <= '0;
      advance  <= 1'b0;
    end else begin
      enter_q <= enter;
      advance <= enter && !enter_q;
      if (enter && !enter_q)
        top_line <= (top_line == LW'(LINES - 1)) ? '0 : top_line + 1'b1;
    end
  end

  // Bottom visible line = top_line + VIS_LINES - 1, wrapped into the ring.
  always_comb begin
    int unsigned b;
    b = int'(top_line) + VIS_LINES - 1;
    if (b >= LINES) b = b - LINES;
    base_line = LW'(b);
  end
endmodule
