// tb_kbd_translate: checks the scan-code to ASCII table.
// Every one of the 256 codes is presented with shift low and high; the registered output is
// compared one clock later with a US-layout table written out here as two strings (the
// key codes in keyboard order and the characters they carry); every other code must give a
// space.
module tb_kbd_translate;
  logic clk = 0, rst = 1, shift = 0;
  logic [7:0] scancode = 0, ascii;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kbd_translate dut (.clk, .rst, .shift, .scancode, .ascii);

  // key rows of a US keyboard: scan code, unshifted, shifted
  localparam int NK = 48;
  logic [7:0] codes [NK] = '{
    8'h0E, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46, 8'h45, 8'h4E, 8'h55,
    8'h15, 8'h1D, 8'h24, 8'h2D, 8'h2C, 8'h35, 8'h3C, 8'h43, 8'h44, 8'h4D, 8'h54, 8'h5B, 8'h5D,
    8'h1C, 8'h1B, 8'h23, 8'h2B, 8'h34, 8'h33, 8'h3B, 8'h42, 8'h4B, 8'h4C, 8'h52,
    8'h1A, 8'h22, 8'h21, 8'h2A, 8'h32, 8'h31, 8'h3A, 8'h41, 8'h49, 8'h4A, 8'h29};
  string lower = "`1234567890-=qwertyuiop[]\\asdfghjkl;'zxcvbnm,./ ";
  string upper = "~!@#$%^&*()_+QWERTYUIOP{}|ASDFGHJKL:\"ZXCVBNM<>? ";

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 256; c++) begin
        logic [7:0] e;
        e = 8'h20;
        for (int k = 0; k < NK; k++) if (codes[k] == 8'(c)) e = (s == 1) ? upper[k] : lower[k];
        scancode <= 8'(c); shift <= 1'(s);
        @(posedge clk); #1;
        checks++;
        if (ascii !== e) begin
          failures++;
          if (failures < 10) $display("code %h shift %0d: %h expected %h", c, s, ascii, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
