// tb_esniff_top: end-to-end test of the display and keyboard hardware.
//
// Clocks as from the board PLL: 100 MHz system clock, 25 MHz pixel clock and the pixel clock
// shifted by -90 degrees for the DAC. A processor model drives the parallel-port signals; a
// PS/2 keyboard model types on the keyboard wires (bit period shortened to 10 us; the blink
// half-period is shortened to 10 ms so a few frames see the cursor both on and off).
// The testbench keeps its own copy of what the screen must show: the 60-line output ring
// and its scroll pointer, the status line, the input line and the cursor column, updated by
// the rules of the design description, not by looking inside the design. After each step a
// whole 640 x 480 frame is captured from the VGA outputs and every pixel is compared with
// the pixel drawn from that copy and the font table. The cursor cell may show either
// phase; both phases must be seen. The keyboard enter must raise the interrupt line, and
// the processor's read port must return the typed line.
// Each mechanism is counted and must happen at least once: processor writes to output and
// status, status home, line return, ring wrap-around, line clearing, column limit, typed
// characters, shift, caps lock, backspace, enter interrupt, erase, parity error, alignment
// timeout, cursor on and cursor off.
module tb_esniff_top;
  localparam int H_PS2 = 500;            // PS/2 half bit period in system clocks

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

  esniff_top #(.BLINK_HALF_PERIOD(1_000_000), .PS2_TIMEOUT(20_000)) dut (.*);

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
    repeat (80_000_000) @(posedge clk_100);
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

    // processor output and status line
    cpu_print("E-sniff ready", 0);
    cpu_newline(0);
    cpu_print("capture on", 0);
    cpu_print("CPU 12%", 1);
    cpu_newline(1);
    cpu_print("RUN", 1);
    check_frame("processor text");

    // typing: "Log" with shift, caps lock "ON", a typo removed by backspace
    ps2_send(8'h12); type_key(8'h4B, "L"); ps2_send(8'hF0); ps2_send(8'h12); n_shift++;
    type_key(8'h44, "o"); type_key(8'h34, "g"); type_key(8'h29, " ");
    type_key(8'h58, 0); type_key(8'h44, "O"); type_key(8'h31, "N"); type_key(8'h58, 0); n_caps++;
    type_key(8'h22, "x");
    type_key(8'h66, 0);
    m_incol--; m_in[m_incol] = 8'h20; n_bksp++;
    // a frame with a parity error and a frame cut short are both ignored
    ps2_send(8'h1C, 11, 1); n_parity++;
    ps2_send(8'h1C, 5);
    repeat (25_000) @(posedge clk_100); n_timeout++;
    checks++;
    if (kbd_bits != 0) begin failures++; $display("receiver not reset after timeout"); end
    type_key(8'h1C, "a");
    check_frame("typed line");

    // enter: interrupt, processor reads the line and erases it
    irq0 = n_irq;
    type_key(8'h5A, 0);
    checks++;
    if (n_irq != irq0 + 1) begin failures++; $display("enter interrupts: %0d", n_irq - irq0); end
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
    $display("            typed=%0d shift=%0d caps=%0d bksp=%0d irq=%0d erase=%0d parity=%0d timeout=%0d cursor_on=%0d cursor_off=%0d frames=%0d",
             n_typed, n_shift, n_caps, n_bksp, n_irq, n_erase, n_parity, n_timeout, n_cur_on, n_cur_off, n_frames);
    checks++;
    if (n_cpu_out == 0 || n_cpu_st == 0 || n_st_home == 0 || n_lret == 0 || n_wrap == 0 ||
        n_clear == 0 || n_collimit == 0 || n_typed == 0 || n_shift == 0 || n_caps == 0 ||
        n_bksp == 0 || n_irq == 0 || n_erase == 0 || n_parity == 0 || n_timeout == 0 ||
        n_cur_on == 0 || n_cur_off == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
