// tb_vga_counter: checks the screen-position counter over one full 640x480 frame.
// The testbench makes its own 25 MHz raster (800 x 521, display enables only) from a clock
// that is a quarter of the system clock and shifted from it, as from one PLL. Every pixel
// must be held for exactly 4 system clocks with the right character cell and glyph pixel,
// pixels must come in raster order, and the output-memory address must follow the ring
// with top_line = 17; status/input addresses must be column - 1.
module tb_vga_counter;
  import esniff_pkg::*;
  logic clk = 0, clk_pix = 0, rst = 1;
  logic hdisp, vdisp;
  logic [5:0] top_line = 6'd17;
  pix_pos_t pos;
  logic [12:0] out_raddr;
  logic [6:0] st_raddr, in_raddr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin #2; forever #20 clk_pix = ~clk_pix; end

  vga_counter dut (.clk, .rst, .hdisp, .vdisp, .top_line, .pos, .out_raddr, .st_raddr, .in_raddr);

  // testbench raster
  int h = 0, v = 0;
  always @(posedge clk_pix) begin
    if (rst) begin h <= 0; v <= 0; end
    else begin
      if (h == 799) begin h <= 0; v <= (v == 520) ? 0 : v + 1; end
      else h <= h + 1;
    end
  end
  assign hdisp = !rst && (h < 640);
  assign vdisp = !rst && (v < 480);

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p = 0, hold = 0, active_cycles = 0, frames = 0;
  logic act_q = 0, vd_q = 0;
  always @(posedge clk) begin
    if (!rst && frames == 1) begin
      if (pos.active) begin
        int x, y, line;
        x = p % 640; y = p / 640;
        active_cycles++;
        checks++;
        if (pos.col != 7'(x / 8) || pos.row != 6'(y / 8) || pos.px != 3'(x % 8) || pos.py != 3'(y % 8)) begin
          failures++;
          if (failures < 10) $display("pixel %0d: col %0d row %0d px %0d py %0d", p, pos.col, pos.row, pos.px, pos.py);
        end
        if (y / 8 >= 1 && y / 8 <= 54 && x / 8 >= 1) begin
          line = (17 + y / 8 - 1) % 60;
          checks++;
          if (out_raddr != 13'(line * 80 + x / 8 - 1)) begin
            failures++;
            if (failures < 10) $display("addr at pixel %0d: %0d", p, out_raddr);
          end
        end
        if (x / 8 >= 1) begin
          checks++;
          if (st_raddr != 7'(x / 8 - 1) || in_raddr != 7'(x / 8 - 1)) failures++;
        end
        hold++;
        if (hold == 4) begin hold = 0; p++; end
      end else if (act_q) begin
        checks++;
        if (hold != 0) begin failures++; $display("line ended mid-pixel at %0d", p); end
      end
    end
    act_q <= pos.active;
    vd_q  <= vdisp;
    if (!rst && vd_q && !vdisp && frames == 0) frames <= 1;
  end

  initial begin
    repeat (10) @(posedge clk);
    rst <= 0;
    // skip the partial first frame, then check one whole frame
    wait (frames == 1);
    wait (p == 640 * 480);
    repeat (10) @(posedge clk);
    checks++;
    if (active_cycles != 640 * 480 * 4) begin failures++; $display("active cycles %0d", active_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
