// tb_vga_kbd_input_fsm: checks the keyboard input-line writer against a reference line.
// Random key pulses (characters, backspaces) are applied, a reference line and cursor are
// updated by the testbench's own rules (write and step right, stop at 78; backspace steps
// left and blanks), and after each event the written memory and the cursor are compared.
// Erase is then raised and the whole line must read spaces with the cursor at 0, within
// 80 write clocks.
module tb_vga_kbd_input_fsm;
  logic clk = 0, rst = 1;
  logic key_wr = 0, key_bksp = 0, erase = 0;
  logic [7:0] key_data = 0;
  logic we, busy;
  logic [6:0] waddr, cursor_col;
  logic [7:0] wdata;
  logic [7:0] mem [80];
  logic [7:0] model [80];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_kbd_input_fsm dut (
    .clk, .rst, .key_wr, .key_data, .key_bksp, .erase, .we, .waddr, .wdata, .cursor_col, .busy
  );

  always @(posedge clk) if (we) mem[waddr] <= wdata;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    for (int i = 0; i < 80; i++)
      if (mem[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("%s: col %0d = %h, expected %h", what, i, mem[i], model[i]);
        break;
      end
  endtask

  initial begin
    int cur, cyc;
    cur = 0;
    for (int i = 0; i < 80; i++) begin mem[i] = 8'h20; model[i] = 8'h20; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      logic bk;
      logic [7:0] c;
      bk = ($urandom_range(0, 3) == 0);
      c  = 8'($urandom_range(8'h21, 8'h7E));
      key_data <= c;
      if (bk) key_bksp <= 1; else key_wr <= 1;
      @(posedge clk);
      key_wr <= 0; key_bksp <= 0;
      key_data <= 8'hFF;        // data only has to be valid with the pulse
      repeat (4) @(posedge clk);
      if (bk) begin
        if (cur > 0) begin cur--; model[cur] = 8'h20; end
      end else if (cur < 78) begin
        model[cur] = c; cur++;
      end
      compare("key");
      checks++;
      if (cursor_col != 7'(cur)) begin failures++; $display("cursor %0d expected %0d", cursor_col, cur); end
      if (n == 200) for (int k = 0; k < 85; k++) begin   // run past the column limit
        key_data <= 8'h78; key_wr <= 1; @(posedge clk); key_wr <= 0; repeat (3) @(posedge clk);
        if (cur < 78) begin model[cur] = 8'h78; cur++; end
      end
    end
    // erase
    erase <= 1;
    cyc = 0;
    @(posedge clk);
    @(posedge clk);
    while (busy && cyc < 200) begin @(posedge clk); cyc++; end
    erase <= 0;
    @(posedge clk);
    for (int i = 0; i < 80; i++) model[i] = 8'h20;
    compare("erase");
    checks += 2;
    if (cursor_col != 0) begin failures++; $display("cursor after erase %0d", cursor_col); end
    if (cyc < 75 || cyc > 85) begin failures++; $display("erase took %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
