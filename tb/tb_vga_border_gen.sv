// tb_vga_border_gen: checks the screen layout choice for random character cells.
// pos_in is random each clock; the three memory data inputs are random and arrive one clock
// after pos_in, as from the memories. Two clocks after pos_in, char_out must be the block
// character on the frame (row 0, row 59, column 0, column 79) and on the separator rows 55
// and 57, the output data on rows 1..54, the status data on row 56 and the input data on
// row 58.
module tb_vga_border_gen;
  import esniff_pkg::*;
  logic clk = 0, rst = 1;
  pix_pos_t pos_in, pos_out;
  logic [7:0] out_data, st_data, in_data, char_out;
  int checks = 0, failures = 0;
  int seen_out = 0, seen_st = 0, seen_in = 0, seen_border = 0;
  always #5 clk = ~clk;

  vga_border_gen dut (.clk, .rst, .pos_in, .out_data, .st_data, .in_data, .char_out, .pos_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_pos_t p [3];
    logic [7:0] o [3], s [3], i [3];
    logic [7:0] e;
    pos_in = '0; out_data = 0; st_data = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 20000; n++) begin
      pix_pos_t np;
      np.active = 1'b1;
      np.col = 7'($urandom_range(0, 79));
      np.row = 6'($urandom_range(0, 59));
      np.px = 3'($urandom); np.py = 3'($urandom);
      pos_in   <= np;
      out_data <= 8'($urandom); st_data <= 8'($urandom); in_data <= 8'($urandom);
      @(posedge clk); #1;
      p[2] = p[1]; p[1] = p[0]; p[0] = np;
      o[1] = o[0]; s[1] = s[0]; i[1] = i[0];
      o[0] = out_data; s[0] = st_data; i[0] = in_data;
      if (n >= 2) begin
        int r, c;
        r = int'(p[1].row); c = int'(p[1].col);
        // p[1] went in two clock edges ago; its data came one clock later, i.e. is o[0]
        if (c == 0 || c == 79 || r == 0 || r == 59 || r == 55 || r == 57) begin e = 8'h01; seen_border++; end
        else if (r <= 54) begin e = o[0]; seen_out++; end
        else if (r == 56) begin e = s[0]; seen_st++; end
        else begin e = i[0]; seen_in++; end
        checks += 2;
        if (char_out !== e) begin
          failures++;
          if (failures < 10) $display("row %0d col %0d: got %h expected %h", r, c, char_out, e);
        end
        if (pos_out !== p[1]) failures++;
      end
    end
    checks++;
    if (seen_out == 0 || seen_st == 0 || seen_in == 0 || seen_border == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
