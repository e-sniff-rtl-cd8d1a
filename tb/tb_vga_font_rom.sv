// tb_vga_font_rom: checks glyph lookup and colour output.
// Compares every pixel of the glyphs 'A', '0', '_' , the border block (01) and the space
// with bitmaps written out in this testbench (row byte, leftmost pixel first), checks that
// code C1 draws like 41, that pixels outside the visible area are black, and that the
// output follows the input by one clock.
module tb_vga_font_rom;
  import esniff_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] char_in = 0;
  pix_pos_t pos_in, pos_out;
  logic [2:0] rgb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_font_rom dut (.clk, .rst, .char_in, .pos_in, .rgb, .pos_out);

  // Row bitmaps, most significant bit = leftmost pixel.
  function automatic logic [7:0] glyph_row(input logic [7:0] c, input int r);
    logic [7:0] a [8] = '{8'h30, 8'h78, 8'hCC, 8'hCC, 8'hFC, 8'hCC, 8'hCC, 8'h00};
    logic [7:0] z [8] = '{8'h7C, 8'hC6, 8'hCE, 8'hDE, 8'hF6, 8'hE6, 8'h7C, 8'h00};
    case (c[6:0])
      7'h41: return a[r];
      7'h30: return z[r];
      7'h5F: return (r == 7) ? 8'hFF : 8'h00;
      7'h01: return 8'hFF;
      default: return 8'h00;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] codes [6] = '{8'h41, 8'h30, 8'h5F, 8'h01, 8'h20, 8'hC1};
    pos_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (codes[k]) begin
      for (int act = 0; act < 2; act++)
        for (int r = 0; r < 8; r++)
          for (int x = 0; x < 8; x++) begin
            logic [2:0] e;
            pix_pos_t np;
            np = '0; np.active = 1'(act); np.px = 3'(x); np.py = 3'(r); np.col = 7'(k); np.row = 6'(r);
            char_in <= codes[k];
            pos_in  <= np;
            @(posedge clk); #1;
            e = (act == 1 && glyph_row(codes[k], r)[7 - x]) ? 3'b111 : 3'b000;
            checks++;
            if (rgb !== e || pos_out !== np) begin
              failures++;
              if (failures < 10) $display("code %h row %0d x %0d act %0d: rgb %b expected %b", codes[k], r, x, act, rgb, e);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
