// kbd_controller: PS/2 keyboard controller for the text display.
//
// ps2_receive takes frames from the keyboard and interprets scan codes; kbd_translate turns
// the scan code and the shift level into ASCII. write pulses for one clock when a character
// is ready on data (data is stable from the clock before the pulse until the next key), so
// the display's input-line memory can take it directly. backspace pulses for a backspace
// key and enter for the enter key; enter is meant as the processor's keyboard interrupt.
// bits shows the number of bits received of the current PS/2 frame.
// Structure and signals follow the document's keyboard schematic (receiver, translator,
// outputs WRITE, ENTER, BACKSPACE, DATA, BITS); transmission to the keyboard is not
// supported, as in the document.
module kbd_controller #(
  parameter int TIMEOUT = 200_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  output logic       write,
  output logic       enter,
  output logic       backspace,
  output logic [7:0] data,
  output logic [3:0] bits,
  output logic       frame_err
);
  logic       caps;
  logic [7:0] scancode;

  ps2_receive #(.TIMEOUT(TIMEOUT)) u_rx (
    .clk, .rst, .ps2_clk, .ps2_dat,
    .rcv(write), .enter, .bksp(backspace), .caps, .data(scancode), .bits_rx(bits), .frame_err
  );
  kbd_translate u_tr (.clk, .rst, .shift(caps), .scancode, .ascii(data));
endmodule
