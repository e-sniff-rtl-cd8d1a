// kbd_translate: PS/2 scan code (set 2) plus shift level to ASCII.
//
// A lookup table for the main key block of a US keyboard: letters, digits, punctuation and
// the space bar, each with its shifted form. Any other code (function keys, number pad,
// arrows, and the 00 the receiver gives for extended keys) yields a space. The output is
// registered: ascii is valid one clock after scancode and shift.
// The function and the set of supported keys are the document's; the US layout is this
// design's choice.
module kbd_translate (
  input  logic       clk,
  input  logic       rst,
  input  logic       shift,
  input  logic [7:0] scancode,
  output logic [7:0] ascii
);
  logic [7:0] lo, hi;   // unshifted and shifted character

  always_comb begin
    unique case (scancode)
      8'h1C: begin lo = "a"; hi = "A"; end
      8'h32: begin lo = "b"; hi = "B"; end
      8'h21: begin lo = "c"; hi = "C"; end
      8'h23: begin lo = "d"; hi = "D"; end
      8'h24: begin lo = "e"; hi = "E"; end
      8'h2B: begin lo = "f"; hi = "F"; end
      8'h34: begin lo = "g"; hi = "G"; end
      8'h33: begin lo = "h"; hi = "H"; end
      8'h43: begin lo = "i"; hi = "I"; end
      8'h3B: begin lo = "j"; hi = "J"; end
      8'h42: begin lo = "k"; hi = "K"; end
      8'h4B: begin lo = "l"; hi = "L"; end
      8'h3A: begin lo = "m"; hi = "M"; end
      8'h31: begin lo = "n"; hi = "N"; end
      8'h44: begin lo = "o"; hi = "O"; end
      8'h4D: begin lo = "p"; hi = "P"; end
      8'h15: begin lo = "q"; hi = "Q"; end
      8'h2D: begin lo = "r"; hi = "R"; end
      8'h1B: begin lo = "s"; hi = "S"; end
      8'h2C: begin lo = "t"; hi = "T"; end
      8'h3C: begin lo = "u"; hi = "U"; end
      8'h2A: begin lo = "v"; hi = "V"; end
      8'h1D: begin lo = "w"; hi = "W"; end
      8'h22: begin lo = "x"; hi = "X"; end
      8'h35: begin lo = "y"; hi = "Y"; end
      8'h1A: begin lo = "z"; hi = "Z"; end
      8'h16: begin lo = "1"; hi = "!"; end
      8'h1E: begin lo = "2"; hi = "@"; end
      8'h26: begin lo = "3"; hi = "#"; end
      8'h25: begin lo = "4"; hi = "$"; end
      8'h2E: begin lo = "5"; hi = "%"; end
      8'h36: begin lo = "6"; hi = "^"; end
      8'h3D: begin lo = "7"; hi = "&"; end
      8'h3E: begin lo = "8"; hi = "*"; end
      8'h46: begin lo = "9"; hi = "("; end
      8'h45: begin lo = "0"; hi = ")"; end
      8'h0E: begin lo = "`"; hi = "~"; end
      8'h4E: begin lo = "-"; hi = "_"; end
      8'h55: begin lo = "="; hi = "+"; end
      8'h5D: begin lo = "\\"; hi = "|"; end
      8'h54: begin lo = "["; hi = "{"; end
      8'h5B: begin lo = "]"; hi = "}"; end
      8'h4C: begin lo = ";"; hi = ":"; end
      8'h52: begin lo = "'"; hi = "\""; end
      8'h41: begin lo = ","; hi = "<"; end
      8'h49: begin lo = "."; hi = ">"; end
      8'h4A: begin lo = "/"; hi = "?"; end
      default: begin lo = " "; hi = " "; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) ascii <= " ";
    else     ascii <= shift ? hi : lo;
  end
endmodule
