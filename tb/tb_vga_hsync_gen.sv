// tb_vga_hsync_gen: checks the horizontal timing generator at the 640x480 numbers.
// For every pixel clock of three lines the expected hsync_n, hdisp and line_end are worked
// out from the clock count since reset (visible 640, front 16, sync 96, back 48), and the
// line period (800 clocks between line_end pulses) is measured.
module tb_vga_hsync_gen;
  logic clk = 0, rst = 1;
  logic hsync_n, hdisp, line_end;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  vga_hsync_gen dut (.clk, .rst, .hsync_n, .hdisp, .line_end);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, h, last_end, periods;
    last_end = -1; periods = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (k = 0; k < 3 * 800; k++) begin
      #1;
      h = k % 800;
      checks++;
      if (hdisp !== (h < 640) || hsync_n !== !(h >= 656 && h < 752) || line_end !== (h == 799)) begin
        failures++;
        if (failures < 10) $display("mismatch at h=%0d: hdisp=%b hsync_n=%b line_end=%b", h, hdisp, hsync_n, line_end);
      end
      if (line_end) begin
        if (last_end >= 0) begin
          checks++;
          if (k - last_end != 800) begin failures++; $display("line period %0d", k - last_end); end
          periods++;
        end
        last_end = k;
      end
      @(posedge clk);
    end
    checks++;
    if (periods != 2) begin failures++; $display("saw %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
