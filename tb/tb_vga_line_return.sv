// tb_vga_line_return: checks the scroll pointer of the 60-line output ring.
// Raises and lowers enter 130 times (more than two trips round the ring), sometimes holding
// it high for many clocks, and checks after each rising edge: exactly one advance pulse,
// top_line stepped by one modulo 60, base_line = top_line + 53 modulo 60.
module tb_vga_line_return;
  logic clk = 0, rst = 1, enter = 0;
  logic [5:0] top_line, base_line;
  logic advance;
  int checks = 0, failures = 0, adv_count = 0;
  always #5 clk = ~clk;

  vga_line_return dut (.clk, .rst, .enter, .top_line, .base_line, .advance);

  always @(posedge clk) if (!rst && advance) adv_count++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_top, hold;
    exp_top = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks += 2;
    if (top_line != 0) failures++;
    if (base_line != 53) failures++;
    for (int n = 0; n < 130; n++) begin
      adv_count = 0;
      enter <= 1;
      hold = (n % 5 == 0) ? 20 : 1;
      repeat (hold) @(posedge clk);
      enter <= 0;
      repeat (3) @(posedge clk);
      #1;
      exp_top = (exp_top + 1) % 60;
      checks += 3;
      if (adv_count != 1) begin failures++; $display("advance pulses %0d", adv_count); end
      if (top_line != 6'(exp_top)) begin failures++; $display("top %0d exp %0d", top_line, exp_top); end
      if (base_line != 6'((exp_top + 53) % 60)) begin failures++; $display("base %0d", base_line); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
