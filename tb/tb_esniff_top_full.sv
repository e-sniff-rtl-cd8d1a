// tb_esniff_top_full: one complete command cycle through the top at its default sizes.
//
// Same environment and screen model as tb_esniff_top, but the design keeps every default
// (2 ms PS/2 timeout, 0.5 s cursor half-period) and the keyboard model runs at a real PS/2
// bit rate (12.5 kHz). The processor prints a line and a status line, the user types
// "help" and presses enter; the enter interrupt must fire, the processor reads the command
// back, erases the input line and prints a reply on a new line. Whole frames are compared
// pixel by pixel after typing and at the end.
module tb_esniff_top_full;
  localparam int H_PS2 = 4000;           // PS/2 half bit period in system clocks

  logic clk_100 = 0, clk_25 = 0, clk_25_dac = 0, rst = 1;
  logic ps2_clk = 1, ps2_dat = 1;
  logic [7:0] cpu_vga_char = 0;
  logic cpu_vga_wr = 0, cpu_vga_sel = 0, cpu_vga_enter = 0, cpu_kbd_erase = 0;
  logic cpu_vga_busy, kbd_irq;
  logic [6:0] cpu_kbd_rd_addr = 0;
  logic [7:0] cpu_kbd_rd_data;
  logic [3:0] kbd_bits;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n, dram_clk;
  logic [9:0] vga_r, vga_g, vga_b;
  logic [6:0] hex_seg [8];

  always #5 clk_100 = ~clk_100;
  initial begin #7;  forever #20 clk_25 = ~clk_25; end
  initial begin #37; forever #20 clk_25_dac = ~clk_25_dac; end

  esniff_top dut (.*);

  vga_frame_grab grab (
    .clk_dac(vga_clk), .vs_n(vga_vs), .blank_n(vga_blank_n), .r(vga_r), .g(vga_g), .b(vga_b)
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
  int n_collimit = 0, n_typed = 0, n_shift = 0, n_caps = 0, n_bksp = 0, n_irq = 0;
  int n_erase = 0, n_parity = 0, n_timeout = 0, n_cur_on = 0, n_cur_off = 0, n_frames = 0;

  always @(posedge clk_100) if (kbd_irq) n_irq++;

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

  // ---------------- keyboard model ----------------
  task automatic ps2_send(input logic [7:0] b, input int nbits = 11, input bit bad_par = 0);
    logic [10:0] f;
    f = {1'b1, (~^b) ^ bad_par, b, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      ps2_dat = f[i];
      repeat (H_PS2) @(posedge clk_100);
      ps2_clk = 0;
      repeat (H_PS2) @(posedge clk_100);
      ps2_clk = 1;
    end
    ps2_dat = 1;
    repeat (4 * H_PS2) @(posedge clk_100);
  endtask

  task automatic type_key(input logic [7:0] sc, input logic [7:0] ch);
    ps2_send(sc); ps2_send(8'hF0); ps2_send(sc);
    repeat (20) @(posedge clk_100);
    if (ch != 0 && m_incol < 78) begin m_in[m_incol] = ch; m_incol++; n_typed++; end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk_100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int irq0;
    $readmemh("rtl/font8x8.hex", font);
    for (int l = 0; l < 60; l++) for (int i = 0; i < 80; i++) m_out[l][i] = 8'h20;
    for (int i = 0; i < 80; i++) begin m_st[i] = 8'h20; m_in[i] = 8'h20; end
    repeat (20) @(posedge clk_100);
    rst <= 0;
    check_frame("blank screen");

    cpu_print("E-sniff ready", 0);
    cpu_print("RUN 00:00:01", 1);
    type_key(8'h33, "h"); type_key(8'h24, "e"); type_key(8'h4B, "l"); type_key(8'h4D, "p");
    check_frame("typed command");
    irq0 = n_irq;
    type_key(8'h5A, 0);
    checks++;
    if (n_irq != irq0 + 1) begin failures++; $display("enter interrupts: %0d", n_irq - irq0); end
    cpu_read_input("read command");
    cpu_erase();
    cpu_newline(0);
    cpu_print("commands: capture log filter", 0);
    check_frame("reply");
    checks++;
    if (grab.bad_level != 0 || grab.wrong_size != 0) begin
      failures++; $display("DAC levels %0d, frame size errors %0d", grab.bad_level, grab.wrong_size);
    end
    $display("mechanisms: cpu_out=%0d cpu_status=%0d status_home=%0d line_return=%0d wrap=%0d clear=%0d col_limit=%0d",
             n_cpu_out, n_cpu_st, n_st_home, n_lret, n_wrap, n_clear, n_collimit);
    $display("            typed=%0d shift=%0d caps=%0d bksp=%0d irq=%0d erase=%0d parity=%0d timeout=%0d cursor_on=%0d cursor_off=%0d frames=%0d",
             n_typed, n_shift, n_caps, n_bksp, n_irq, n_erase, n_parity, n_timeout, n_cur_on, n_cur_off, n_frames);
    checks++;
    if (n_cpu_out == 0 || n_cpu_st == 0 || n_lret == 0 || n_typed != 4 || n_irq == 0 || n_erase == 0) begin
      failures++;
      $display("a step of the command cycle did not happen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
