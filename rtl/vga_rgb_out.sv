// vga_rgb_out: 3-bit colour to the 30-bit video DAC input.
//
// Each of the three colour bits is repeated over the ten bits of its DAC channel
// (full scale or zero), and the channels are forced to zero outside the visible area.
// Registered: outputs follow the inputs by one clock. The 3-to-30-bit split is the
// document's; the forced black outside the visible area is this design's choice.
module vga_rgb_out
  import esniff_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] rgb_in,
  input  pix_pos_t   pos_in,
  output logic [9:0] r,
  output logic [9:0] g,
  output logic [9:0] b
);
  always_ff @(posedge clk) begin
    if (rst) begin
      r <= '0;
      g <= '0;
      b <= '0;
    end else begin
      r <= {10{rgb_in[2] & pos_in.active}};
      g <= {10{rgb_in[1] & pos_in.active}};
      b <= {10{rgb_in[0] & pos_in.active}};
    end
  end
endmodule
