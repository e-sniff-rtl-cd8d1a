// vga_font_rom: 128-character 8x8 font, character code to pixel colour.
//
// Holds 128 glyphs of 8 rows x 8 pixels (1024 bytes, loaded from font8x8.hex: byte
// 8*code + row, bit 7 = leftmost pixel). Only the low seven bits of the character code are
// used, so codes 0x80-0xFF show as 0x00-0x7F. For the cell and glyph pixel in pos_in the
// registered output rgb is 3'b111 (white) for a set pixel and 3'b000 for a clear pixel or
// outside the visible area; pos_out is pos_in delayed to match (one clock).
// The glyph count, the 8x8 size and the 3-bit colour output are the document's. The glyph
// shapes are a standard public-domain 8x8 ASCII font; code 0x01 is a solid block for the
// border.
module vga_font_rom
  import esniff_pkg::*;
#(
  parameter string FONT_FILE = "rtl/font8x8.hex"
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] char_in,
  input  pix_pos_t   pos_in,
  output logic [2:0] rgb,
  output pix_pos_t   pos_out
);
  logic [7:0] rom [1024];

  initial $readmemh(FONT_FILE, rom);

  logic [7:0] row_bits;
  assign row_bits = rom[{char_in[6:0], pos_in.py}];

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb     <= '0;
      pos_out <= '0;
    end else begin
      rgb     <= (pos_in.active && row_bits[3'd7 - pos_in.px]) ? 3'b111 : 3'b000;
      pos_out <= pos_in;
    end
  end
endmodule
