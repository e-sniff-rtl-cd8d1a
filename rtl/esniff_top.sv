// esniff_top: display and keyboard hardware of the embedded packet sniffer.
//
// The sniffer is a soft processor system that captures Ethernet frames and shows them on a
// VGA text screen, with a PS/2 keyboard for commands. This top holds the custom hardware
// around the processor: the text display controller (vga_controller) and the keyboard
// controller (kbd_controller), wired as on the board. Keystrokes go straight from the
// keyboard controller into the display's input line without the processor; only the enter
// key reaches the processor, as kbd_irq. The processor, its peripherals, the PLL and the
// Ethernet chip are not part of this RTL: their signals are ports.
//   Clocks (from the PLL): clk_100 system clock, clk_25 pixel clock, clk_25_dac the pixel
//   clock shifted by -90 degrees, used only to clock the video DAC (vga_clk). clk_100 is
//   also sent to the SDRAM chip (dram_clk).
//   Processor ports (parallel I/O, levels in the clk_100 domain): see vga_controller.
//   The eight seven-segment displays are driven dark (segments are active low).
//   The keyboard's frame_err pulse is not used: a bad frame is simply dropped.
// Which blocks exist and how they connect is the document's; the processor port signals
// are this design's choice.
module esniff_top #(
  parameter int BLINK_HALF_PERIOD = 50_000_000,   // 0.5 s at 100 MHz
  parameter int PS2_TIMEOUT       = 200_000       // 2 ms at 100 MHz
) (
  input  logic       clk_100,
  input  logic       clk_25,
  input  logic       clk_25_dac,
  input  logic       rst,
  // PS/2 keyboard
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  // processor parallel ports
  input  logic [7:0] cpu_vga_char,
  input  logic       cpu_vga_wr,
  input  logic       cpu_vga_sel,
  input  logic       cpu_vga_enter,
  output logic       cpu_vga_busy,
  input  logic       cpu_kbd_erase,
  input  logic [6:0] cpu_kbd_rd_addr,
  output logic [7:0] cpu_kbd_rd_data,
  output logic       kbd_irq,
  output logic [3:0] kbd_bits,
  // VGA connector and video DAC
  output logic       vga_clk,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank_n,
  output logic       vga_sync_n,
  output logic [9:0] vga_r,
  output logic [9:0] vga_g,
  output logic [9:0] vga_b,
  // board
  output logic       dram_clk,
  output logic [6:0] hex_seg [8]
);
  logic       key_wr, key_bksp, frame_err;
  logic [7:0] key_data;

  kbd_controller #(.TIMEOUT(PS2_TIMEOUT)) u_kbd (
    .clk(clk_100), .rst, .ps2_clk, .ps2_dat,
    .write(key_wr), .enter(kbd_irq), .backspace(key_bksp), .data(key_data), .bits(kbd_bits),
    .frame_err
  );

  vga_controller #(.BLINK_HALF_PERIOD(BLINK_HALF_PERIOD)) u_vga (
    .clk(clk_100), .clk_pix(clk_25), .rst,
    .cpu_char(cpu_vga_char), .cpu_wr(cpu_vga_wr), .cpu_sel(cpu_vga_sel),
    .cpu_enter(cpu_vga_enter), .cpu_busy(cpu_vga_busy), .kbd_erase(cpu_kbd_erase),
    .cpu_rd_addr(cpu_kbd_rd_addr), .cpu_rd_data(cpu_kbd_rd_data),
    .key_wr, .key_data, .key_bksp,
    .vga_hsync_n(vga_hs), .vga_vsync_n(vga_vs), .vga_blank_n,
    .vga_r, .vga_g, .vga_b
  );

  assign vga_clk    = clk_25_dac;
  assign vga_sync_n = 1'b0;          // no sync-on-green
  assign dram_clk   = clk_100;
  always_comb for (int i = 0; i < 8; i++) hex_seg[i] = 7'h7F;
endmodule
