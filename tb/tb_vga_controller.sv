// tb_vga_controller: whole-display test of the text controller, without the keyboard.
//
// Clocks as from one PLL: 100 MHz system clock, 25 MHz pixel clock and the -90 degree DAC
// clock. A processor model drives the parallel-port signals and keystrokes are given as
// key_wr / key_bksp pulses. The testbench keeps its own copy of the screen (60-line output
// ring and scroll pointer, status line, input line, cursor column) and, after each step,
// compares every pixel of a captured 640 x 480 frame with the pixel drawn from that copy
// and the font table. The cursor cell may show either phase (blink half-period shortened to
// 10 ms); both must be seen. Counted, and required at least once: output and status writes,
// status home, line return, ring wrap-around, line clearing, column limit, typed
// characters, backspace, erase, input read-back, cursor on and off.
module tb_vga_controller;
  logic clk_100 = 0, clk_25 = 0, clk_25_dac = 0, rst = 1;
  logic key_wr = 0, key_bksp = 0;
  logic [7:0] key_data = 0;
  logic [7:0] cpu_vga_char = 0;
  logic cpu_vga_wr = 0, cpu_vga_sel = 0, cpu_vga_enter = 0, cpu_kbd_erase = 0;
  logic cpu_vga_busy;
  logic [6:0] cpu_kbd_rd_addr = 0;
  logic [7:0] cpu_kbd_rd_data;
  logic vga_hs, vga_vs, vga_blank_n;
  logic [9:0] vga_r, vga_g, vga_b;

  always #5 clk_100 = ~clk_100;
  initial begin #7;  forever #20 clk_25 = ~clk_25; end
  initial begin #37; forever #20 clk_25_dac = ~clk_25_dac; end

  vga_controller #(.BLINK_HALF_PERIOD(1_000_000)) dut (
    .clk(clk_100), .clk_pix(clk_25), .rst,
    .cpu_char(cpu_vga_char), .cpu_wr(cpu_vga_wr), .cpu_sel(cpu_vga_sel), .cpu_enter(cpu_vga_enter),
    .cpu_busy(cpu_vga_busy), .kbd_erase(cpu_kbd_erase), .cpu_rd_addr(cpu_kbd_rd_addr),
    .cpu_rd_data(cpu_kbd_rd_data), .key_wr, .key_data, .key_bksp,
    .vga_hsync_n(vga_hs), .vga_vsync_n(vga_vs), .vga_blank_n, .vga_r, .vga_g, .vga_b
  );

  vga_frame_grab grab (
    .clk_dac(clk_25_dac), .vs_n(vga_vs), .blank_n(vga_blank_n), .r(vga_r), .g(vga_g), .b(vga_b)
  );

  int checks = 0, failures = 0;

  // ---------------- screen model ----------------
  logic [7:0] font [1024];
  logic [7:0] m_out [60][80];
  logic [7:0] m_st [80];
  logic [7:0] m_in [80];
  int m_top = 0, m_col = 0, m_stcol = 0, m_incol = 0;

  // mechanism counters
  int n_cpu_out = 0, n_cpu_st = 0, n_st_home = 0, n_lret = 0, n_wrap = 0, n_clear = 0;
  int n_collimit = 0, n_typed = 0, n_bksp = 0;
  int n_erase = 0, n_cur_on = 0, n_cur_off = 0, n_frames = 0;


  function automatic logic [7:0] exp_char(input int row, input int col);
    if (col == 0 || col == 79 || row == 0 || row == 59 || row == 55 || row == 57) return 8'h01;
    if (row <= 54) return m_out[(m_top + row - 1) % 60][col - 1];
    if (row == 56) return m_st[col - 1];
    return m_in[col - 1];
  endfunction

  task automatic check_frame(input string what);
    int f0, bad;
    bit on, off;
    f0 = grab.frames_done;
    wait (grab.frames_done >= f0 + 2);    // the first may have started before the last change
    bad = 0; on = 0; off = 0;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        logic [7:0] c;
        logic [2:0] e;
        c = exp_char(y / 8, x / 8);
        e = font[{c[6:0], 3'(y % 8)}][7 - x % 8] ? 3'b111 : 3'b000;
        if (y / 8 == 58 && x / 8 == m_incol + 1) begin
          if (grab.pix[y][x] == e) off = 1;
          else if (grab.pix[y][x] == ~e) on = 1;
          else bad++;
        end else if (grab.pix[y][x] != e) begin
          bad++;
          if (bad < 5) $display("%s: pixel (%0d,%0d) = %b expected %b (char %h)", what, x, y, grab.pix[y][x], e, c);
        end
      end
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d wrong pixels", what, bad); end
    if (on) n_cur_on++;
    if (off) n_cur_off++;
    n_frames++;
  endtask

  // ---------------- processor model ----------------
  task automatic cpu_put(input logic [7:0] c, input logic sel);
    cpu_vga_char <= c; cpu_vga_sel <= sel;
    @(posedge clk_100);
    cpu_vga_wr <= 1;
    repeat (3) @(posedge clk_100);
    cpu_vga_wr <= 0;
    repeat (3) @(posedge clk_100);
    while (cpu_vga_busy) @(posedge clk_100);
    if (!sel) begin
      if (m_col < 78) begin m_out[(m_top + 53) % 60][m_col] = c; m_col++; n_cpu_out++; end
      else n_collimit++;
    end else if (m_stcol < 78) begin
      m_st[m_stcol] = c; m_stcol++; n_cpu_st++;
    end
  endtask

  task automatic cpu_print(input string s, input logic sel);
    for (int i = 0; i < s.len(); i++) cpu_put(s[i], sel);
  endtask

  task automatic cpu_newline(input logic sel);
    cpu_vga_sel <= sel;
    @(posedge clk_100);
    cpu_vga_enter <= 1;
    repeat (3) @(posedge clk_100);
    cpu_vga_enter <= 0;
    repeat (3) @(posedge clk_100);
    while (cpu_vga_busy) @(posedge clk_100);
    if (sel) begin m_stcol = 0; n_st_home++; end
    else begin
      m_top = (m_top + 1) % 60;
      if (m_top == 0) n_wrap++;
      for (int i = 0; i < 80; i++) m_out[(m_top + 53) % 60][i] = 8'h20;
      m_col = 0;
      n_lret++; n_clear++;
    end
  endtask

  task automatic cpu_read_input(input string what);
    int bad;
    bad = 0;
    for (int i = 0; i < 80; i++) begin
      cpu_kbd_rd_addr <= 7'(i);
      repeat (2) @(posedge clk_100);
      #1;
      if (cpu_kbd_rd_data != m_in[i]) bad++;
    end
    checks++;
    if (bad) begin failures++; $display("%s: %0d wrong bytes read back", what, bad); end
  endtask

  task automatic cpu_erase();
    cpu_kbd_erase <= 1;
    repeat (100) @(posedge clk_100);
    cpu_kbd_erase <= 0;
    @(posedge clk_100);
    for (int i = 0; i < 80; i++) m_in[i] = 8'h20;
    m_incol = 0;
    n_erase++;
  endtask

  // ---------------- keyboard side ----------------
  task automatic type_key(input logic [7:0] ch);
    key_data <= ch; key_wr <= 1;
    @(posedge clk_100);
    key_wr <= 0; key_data <= 8'hFF;
    repeat (10) @(posedge clk_100);
    if (m_incol < 78) begin m_in[m_incol] = ch; m_incol++; n_typed++; end
    else n_collimit++;
  endtask

  task automatic backspace();
    key_bksp <= 1;
    @(posedge clk_100);
    key_bksp <= 0;
    repeat (10) @(posedge clk_100);
    if (m_incol > 0) begin m_incol--; m_in[m_incol] = 8'h20; end
    n_bksp++;
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk_100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("rtl/font8x8.hex", font);
    for (int l = 0; l < 60; l++) for (int i = 0; i < 80; i++) m_out[l][i] = 8'h20;
    for (int i = 0; i < 80; i++) begin m_st[i] = 8'h20; m_in[i] = 8'h20; end
    repeat (20) @(posedge clk_100);
    rst <= 0;
    check_frame("blank screen");

    // processor output and status line
    cpu_print("E-sniff ready", 0);
    cpu_newline(0);
    cpu_print("capture on", 0);
    cpu_print("CPU 12%", 1);
    cpu_newline(1);
    cpu_print("RUN", 1);
    check_frame("processor text");

    // typing, with a backspace, then past the end of the line
    begin
      string cmd;
      cmd = "filter on 1";
      for (int i = 0; i < 12; i++) type_key(cmd[i % 11]);
    end
    backspace();
    backspace();
    check_frame("typed line");
    cpu_read_input("read input line");
    for (int i = 0; i < 70; i++) type_key(8'h30 + 8'(i % 10));
    check_frame("typed line");

    cpu_read_input("read input line");
    cpu_erase();
    cpu_read_input("read erased line");
    check_frame("erased line");

    // scroll through the ring more than once, with a line past the column limit
    for (int n = 0; n < 64; n++) begin
      cpu_print($sformatf("packet %0d len %0d", n, 60 + n * 7), 0);
      if (n == 40) for (int k = 0; k < 70; k++) cpu_put(8'h2E, 0);
      cpu_newline(0);
    end
    cpu_print("done", 0);
    check_frame("after scrolling");
    check_frame("cursor phase 2");
    check_frame("cursor phase 3");

    checks++;
    if (grab.bad_level != 0 || grab.wrong_size != 0) begin
      failures++; $display("DAC levels %0d, frame size errors %0d", grab.bad_level, grab.wrong_size);
    end
    $display("mechanisms: cpu_out=%0d cpu_status=%0d status_home=%0d line_return=%0d wrap=%0d clear=%0d col_limit=%0d",
             n_cpu_out, n_cpu_st, n_st_home, n_lret, n_wrap, n_clear, n_collimit);
    $display("            typed=%0d bksp=%0d erase=%0d cursor_on=%0d cursor_off=%0d frames=%0d",
             n_typed, n_bksp, n_erase, n_cur_on, n_cur_off, n_frames);
    checks++;
    if (n_cpu_out == 0 || n_cpu_st == 0 || n_st_home == 0 || n_lret == 0 || n_wrap == 0 ||
        n_clear == 0 || n_collimit == 0 || n_typed == 0 ||
        n_bksp == 0 || n_erase == 0 ||
        n_cur_on == 0 || n_cur_off == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
