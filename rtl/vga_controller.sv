// vga_controller: 80 x 60 character text display on a 640 x 480 VGA monitor.
//
// Thirteen sub-blocks in four groups:
//   timing   - vga_hsync_gen, vga_vsync_gen (25 MHz pixel clock): HSYNC, VSYNC, blanking.
//   memories - vga_text_ram x2 (4800-byte output ring, 80-byte status line) and
//              vga_input_ram (80-byte keyboard input line, two read ports).
//   control  - vga_line_return (scroll pointer), vga_cpu_write_fsm (processor writes),
//              vga_kbd_input_fsm (keystrokes, backspace, erase).
//   raster   - vga_counter -> memories -> vga_border_gen -> vga_font_rom -> vga_cursor ->
//              vga_rgb_out, all on the 100 MHz system clock.
// Processor interface (levels from a parallel port, system clock): cpu_char/cpu_wr write a
// character (cpu_sel = 0 output area, 1 status line); a rising cpu_enter starts a new output
// line (cpu_sel = 0, scrolls the screen by one line) or returns the status column to 0
// (cpu_sel = 1); kbd_erase clears the input line; cpu_rd_addr/cpu_rd_data read the input
// line (one clock latency). Keyboard interface: key_wr/key_bksp pulses with key_data.
// Timing: the raster pipeline puts a pixel on the DAC outputs 8 system clocks after the
// pixel clock edge that opens it, so hsync, vsync and blank are delayed by SYNC_DELAY
// pixel clocks to line up with the colour data; the DAC samples on the phase-shifted pixel
// clock. The two clocks must come from one PLL (100 MHz = 4 x 25 MHz).
// The keyboard FSM's busy flag and the cursor's blink phase are left unconnected here: PS/2
// keystrokes arrive at most once per millisecond, far slower than an 80-clock erase, and the
// blink phase is only brought out of vga_cursor for its own testbench.
// The grouping, the memories' sizes and the clocks are the document's; the interfaces, the
// layout and the pipeline alignment are this design's choice.
module vga_controller
  import esniff_pkg::*;
#(
  parameter int BLINK_HALF_PERIOD = 50_000_000,
  parameter int SYNC_DELAY        = 2
) (
  input  logic       clk,          // 100 MHz system clock
  input  logic       clk_pix,      // 25 MHz pixel clock
  input  logic       rst,          // synchronous, active high, held for several pixel clocks
  // processor side
  input  logic [7:0] cpu_char,
  input  logic       cpu_wr,
  input  logic       cpu_sel,
  input  logic       cpu_enter,
  output logic       cpu_busy,
  input  logic       kbd_erase,
  input  logic [6:0] cpu_rd_addr,
  output logic [7:0] cpu_rd_data,
  // keyboard side
  input  logic       key_wr,
  input  logic [7:0] key_data,
  input  logic       key_bksp,
  // monitor / DAC
  output logic       vga_hsync_n,
  output logic       vga_vsync_n,
  output logic       vga_blank_n,
  output logic [9:0] vga_r,
  output logic [9:0] vga_g,
  output logic [9:0] vga_b
);
  localparam int LW = $clog2(OUT_LINES);
  localparam int AW = $clog2(OUT_BYTES);

  // ---------------- timing (pixel clock) ----------------
  logic hsync_n, vsync_n, hdisp, vdisp, line_end;

  vga_hsync_gen u_hsync (.clk(clk_pix), .rst, .hsync_n, .hdisp, .line_end);
  vga_vsync_gen u_vsync (.clk(clk_pix), .rst, .line_end, .vsync_n, .vdisp);

  logic [SYNC_DELAY:0] hs_d, vs_d, bl_d;
  assign hs_d[0] = hsync_n;
  assign vs_d[0] = vsync_n;
  assign bl_d[0] = hdisp && vdisp;
  always_ff @(posedge clk_pix) begin
    if (rst) begin
      hs_d[SYNC_DELAY:1] <= '1;
      vs_d[SYNC_DELAY:1] <= '1;
      bl_d[SYNC_DELAY:1] <= '0;
    end else begin
      hs_d[SYNC_DELAY:1] <= hs_d[SYNC_DELAY-1:0];
      vs_d[SYNC_DELAY:1] <= vs_d[SYNC_DELAY-1:0];
      bl_d[SYNC_DELAY:1] <= bl_d[SYNC_DELAY-1:0];
    end
  end
  assign vga_hsync_n = hs_d[SYNC_DELAY];
  assign vga_vsync_n = vs_d[SYNC_DELAY];
  assign vga_blank_n = bl_d[SYNC_DELAY];

  // ---------------- control ----------------
  logic [LW-1:0] top_line, base_line;
  logic          advance;

  vga_line_return u_lret (
    .clk, .rst, .enter(cpu_enter && !cpu_sel), .top_line, .base_line, .advance
  );

  logic          out_we, st_we;
  logic [AW-1:0] out_waddr;
  logic [6:0]    st_waddr;
  logic [7:0]    out_wdata, st_wdata;

  vga_cpu_write_fsm u_cpuwr (
    .clk, .rst, .char_in(cpu_char), .wr(cpu_wr), .sel(cpu_sel),
    .status_home(cpu_enter && cpu_sel), .busy(cpu_busy),
    .base_line, .advance,
    .out_we, .out_waddr, .out_wdata, .st_we, .st_waddr, .st_wdata
  );

  logic       in_we;
  logic [6:0] in_waddr, cursor_col;
  logic [7:0] in_wdata;
  logic       kbd_busy;

  vga_kbd_input_fsm u_kbdin (
    .clk, .rst, .key_wr, .key_data, .key_bksp, .erase(kbd_erase),
    .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .cursor_col, .busy(kbd_busy)
  );

  // ---------------- memories ----------------
  logic [AW-1:0] out_raddr;
  logic [6:0]    st_raddr, in_raddr;
  logic [7:0]    out_rdata, st_rdata, in_rdata;

  vga_text_ram #(.DEPTH(OUT_BYTES)) u_outmem (
    .clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata)
  );
  vga_text_ram #(.DEPTH(COLS)) u_stmem (
    .clk, .we(st_we), .waddr(st_waddr), .wdata(st_wdata), .raddr(st_raddr), .rdata(st_rdata)
  );
  vga_input_ram #(.DEPTH(COLS)) u_inmem (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata),
    .raddr_a(in_raddr), .rdata_a(in_rdata), .raddr_b(cpu_rd_addr), .rdata_b(cpu_rd_data)
  );

  // ---------------- raster pipeline (system clock) ----------------
  pix_pos_t   pos1, pos3, pos4, pos5;
  logic [7:0] char3;
  logic [2:0] rgb4, rgb5;
  logic       blink_on;

  vga_counter u_cnt (
    .clk, .rst, .hdisp, .vdisp, .top_line, .pos(pos1), .out_raddr, .st_raddr, .in_raddr
  );
  vga_border_gen u_border (
    .clk, .rst, .pos_in(pos1), .out_data(out_rdata), .st_data(st_rdata), .in_data(in_rdata),
    .char_out(char3), .pos_out(pos3)
  );
  vga_font_rom u_font (.clk, .rst, .char_in(char3), .pos_in(pos3), .rgb(rgb4), .pos_out(pos4));
  vga_cursor #(.HALF_PERIOD(BLINK_HALF_PERIOD)) u_cursor (
    .clk, .rst, .cursor_col, .rgb_in(rgb4), .pos_in(pos4), .rgb_out(rgb5), .pos_out(pos5),
    .blink_on
  );
  vga_rgb_out u_rgb (.clk, .rst, .rgb_in(rgb5), .pos_in(pos5), .r(vga_r), .g(vga_g), .b(vga_b));
endmodule
