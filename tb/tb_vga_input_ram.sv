// tb_vga_input_ram: checks the three-port input-line memory (80 bytes).
// Random writes with both read ports reading random addresses each clock; every read is
// compared, one clock later, with a reference array.
module tb_vga_input_ram;
  localparam int DEPTH = 80;
  logic clk = 0;
  logic we = 0;
  logic [6:0] waddr = 0, ra = 0, rb = 0;
  logic [7:0] wdata = 0, da, db;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_input_ram #(.DEPTH(DEPTH)) dut (
    .clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, eb;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = 8'h20;
    for (int n = 0; n < 5000; n++) begin
      we    <= (n > 40) ? 1'($urandom_range(0, 1)) : 1'b0;
      waddr <= 7'($urandom_range(0, DEPTH - 1));
      wdata <= 8'($urandom);
      ra    <= 7'($urandom_range(0, DEPTH - 1));
      rb    <= 7'($urandom_range(0, DEPTH - 1));
      #1;
      ea = ref_mem[ra];
      eb = ref_mem[rb];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks += 2;
      if (da !== ea) begin failures++; if (failures < 10) $display("port a %0d: %h vs %h", ra, da, ea); end
      if (db !== eb) begin failures++; if (failures < 10) $display("port b %0d: %h vs %h", rb, db, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
