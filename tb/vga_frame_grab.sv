// vga_frame_grab: testbench monitor that captures VGA frames as a DAC would see them.
//
// Samples the colour outputs on the DAC clock. A frame starts at the vertical sync pulse;
// within it, visible pixels are those sampled while blank_n is high, counted left to right
// and line by line (a line ends when blank_n falls). Each captured pixel is stored as a
// 3-bit colour {r, g, b} taken from the top bit of each channel; bad_level counts samples
// whose ten channel bits were not all equal. frames_done counts complete 640 x 480 frames;
// pix holds the last one, and wrong_size counts frames that did not have 640 x 480 pixels.
module vga_frame_grab (
  input  logic       clk_dac,
  input  logic       vs_n,
  input  logic       blank_n,
  input  logic [9:0] r,
  input  logic [9:0] g,
  input  logic [9:0] b
);
  logic [2:0] pix [480][640];
  int frames_done = 0;
  int bad_level = 0;
  int wrong_size = 0;

  int  x = 0, y = 0;
  bit  in_frame = 0;
  logic bl_q = 0;

  always @(posedge clk_dac) begin
    if (!vs_n) begin
      if (in_frame && y != 0) wrong_size++;
      in_frame = 1;
      x = 0;
      y = 0;
    end else if (in_frame) begin
      if (blank_n) begin
        if (x < 640 && y < 480) pix[y][x] = {r[9], g[9], b[9]};
        if ((r != '0 && r != '1) || (g != '0 && g != '1) || (b != '0 && b != '1)) bad_level++;
        x++;
      end else if (bl_q) begin
        if (x != 640) wrong_size++;
        x = 0;
        y++;
        if (y == 480) begin
          frames_done++;
          in_frame = 0;
          y = 0;
        end
      end
    end
    bl_q = blank_n;
  end
endmodule
