// tb_vga_cursor: checks the blinking cursor with a blink half-period of 16 clocks.
// blink_on must toggle exactly every 16 clocks. Random pixels are fed through; one clock
// later the output must equal the input, except inside the cursor cell (input row 58,
// column cursor_col + 1) while blink_on is high, where it must be inverted.
module tb_vga_cursor;
  import esniff_pkg::*;
  localparam int HP = 16;
  logic clk = 0, rst = 1;
  logic [6:0] cursor_col = 7'd5;
  logic [2:0] rgb_in = 0, rgb_out;
  pix_pos_t pos_in, pos_out;
  logic blink_on;
  int checks = 0, failures = 0, inverted = 0, toggles = 0;
  always #5 clk = ~clk;

  vga_cursor #(.HALF_PERIOD(HP)) dut (.clk, .rst, .cursor_col, .rgb_in, .pos_in, .rgb_out, .pos_out, .blink_on);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_toggle;
    logic bq;
    pos_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    last_toggle = 0; bq = 0;
    for (int n = 1; n < 5000; n++) begin
      pix_pos_t np;
      logic [2:0] c;
      logic b_before;
      np = '0;
      np.active = ($urandom_range(0, 7) != 0);
      np.row = ($urandom_range(0, 1) == 0) ? 6'd58 : 6'($urandom_range(0, 59));
      np.col = ($urandom_range(0, 1) == 0) ? 7'(cursor_col + 1) : 7'($urandom_range(0, 79));
      c = 3'($urandom);
      if (n % 1000 == 0) cursor_col <= 7'($urandom_range(0, 77));
      pos_in <= np; rgb_in <= c;
      b_before = blink_on;
      @(posedge clk); #1;
      checks++;
      if (np.active && np.row == 6'd58 && np.col == 7'(cursor_col + 1) && b_before) begin
        inverted++;
        if (rgb_out !== ~c) begin failures++; if (failures < 10) $display("cursor not drawn"); end
      end else if (rgb_out !== c) begin
        failures++;
        if (failures < 10) $display("pixel changed: %b -> %b", c, rgb_out);
      end
      if (blink_on != bq) begin
        toggles++;
        checks++;
        if (toggles > 1 && n - last_toggle != HP) begin failures++; $display("blink interval %0d", n - last_toggle); end
        last_toggle = n;
        bq = blink_on;
      end
    end
    checks++;
    if (inverted == 0 || toggles < 10) begin failures++; $display("inverted %0d toggles %0d", inverted, toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
