// tb_vga_rgb_out: checks the 3-to-30-bit colour expansion.
// All eight colours, inside and outside the visible area: one clock later each DAC channel
// must be all ones when its colour bit is set and the pixel is visible, else all zeros.
module tb_vga_rgb_out;
  import esniff_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] rgb_in = 0;
  pix_pos_t pos_in;
  logic [9:0] r, g, b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_rgb_out dut (.clk, .rst, .rgb_in, .pos_in, .r, .g, .b);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int rep = 0; rep < 4; rep++)
      for (int act = 0; act < 2; act++)
        for (int c = 0; c < 8; c++) begin
          pix_pos_t np;
          np = pix_pos_t'($urandom);
          np.active = 1'(act);
          pos_in <= np; rgb_in <= 3'(c);
          @(posedge clk); #1;
          checks += 3;
          if (r !== ((act && c[2]) ? 10'h3FF : 10'h000)) failures++;
          if (g !== ((act && c[1]) ? 10'h3FF : 10'h000)) failures++;
          if (b !== ((act && c[0]) ? 10'h3FF : 10'h000)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
