// tb_vga_text_ram: checks the dual-port character memory at its 4800-byte size.
// Checks the power-up contents (spaces), then writes random bytes to random addresses while
// reading random addresses, comparing every read (one clock latency, old data on a
// same-address write) with a reference array kept by the testbench.
module tb_vga_text_ram;
  localparam int DEPTH = 4800;
  logic clk = 0;
  logic we = 0;
  logic [12:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_text_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_q;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = 8'h20;
    // power-up contents
    for (int i = 0; i < DEPTH; i += 97) begin
      raddr <= 13'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== 8'h20) begin failures++; $display("init %0d = %h", i, rdata); end
    end
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      we    <= 1'($urandom_range(0, 1));
      waddr <= 13'($urandom_range(0, DEPTH - 1));
      wdata <= 8'($urandom);
      raddr <= (n % 7 == 0) ? waddr : 13'($urandom_range(0, DEPTH - 1));
      #1;
      expect_q = ref_mem[raddr];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("read %0d: got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
