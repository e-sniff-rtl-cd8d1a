// tb_vga_vsync_gen: checks the vertical timing generator at the 640x480 numbers.
// line_end is pulsed every fourth clock; after each pulse the expected vsync_n and vdisp for
// the line number are compared (visible 480, front 10, sync 2, back 29: 521 lines), over
// two frames, and the frame period is measured from vsync_n falling edges.
module tb_vga_vsync_gen;
  logic clk = 0, rst = 1, line_end = 0;
  logic vsync_n, vdisp;
  int checks = 0, failures = 0;
  always #20 clk = ~clk;

  vga_vsync_gen dut (.clk, .rst, .line_end, .vsync_n, .vdisp);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int line, v, last_fall, frames;
    logic vs_q;
    last_fall = -1; frames = 0; vs_q = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (line = 0; line < 2 * 521 + 5; line++) begin
      #1;
      v = line % 521;
      checks++;
      if (vdisp !== (v < 480) || vsync_n !== !(v >= 490 && v < 492)) begin
        failures++;
        if (failures < 10) $display("mismatch at line %0d: vdisp=%b vsync_n=%b", v, vdisp, vsync_n);
      end
      if (vs_q && !vsync_n) begin
        if (last_fall >= 0) begin
          checks++;
          if (line - last_fall != 521) begin failures++; $display("frame period %0d", line - last_fall); end
          frames++;
        end
        last_fall = line;
      end
      vs_q = vsync_n;
      repeat (3) @(posedge clk);
      line_end <= 1;
      @(posedge clk);
      line_end <= 0;
    end
    checks++;
    if (frames != 1) begin failures++; $display("saw %0d frame periods", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
