// tb_vga_cpu_write_fsm: checks the processor-side write controller.
// The write ports are applied to reference copies of the output and status memories kept by
// the testbench. The testbench plays the processor: level changes on wr/sel/status_home a
// few clocks apart, advance pulses as the line-return block would give them. It checks that
// characters land at base_line*80 + column, that columns stop at 78, that an advance clears
// the new base line to spaces within 80 write clocks and restarts the column, that a write
// issued during the clearing is kept and lands after it, and that status_home restarts the
// status column.
module tb_vga_cpu_write_fsm;
  logic clk = 0, rst = 1;
  logic [7:0] char_in = 0;
  logic wr = 0, sel = 0, status_home = 0, busy;
  logic [5:0] base_line = 53;
  logic advance = 0;
  logic out_we, st_we;
  logic [12:0] out_waddr;
  logic [6:0] st_waddr;
  logic [7:0] out_wdata, st_wdata;
  logic [7:0] omem [4800];
  logic [7:0] smem [80];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_cpu_write_fsm dut (
    .clk, .rst, .char_in, .wr, .sel, .status_home, .busy, .base_line, .advance,
    .out_we, .out_waddr, .out_wdata, .st_we, .st_waddr, .st_wdata
  );

  always @(posedge clk) begin
    if (out_we) omem[out_waddr] <= out_wdata;
    if (st_we)  smem[st_waddr]  <= st_wdata;
  end

  task automatic put(input logic [7:0] c, input logic s);
    char_in <= c; sel <= s;
    @(posedge clk);
    wr <= 1;
    repeat (2) @(posedge clk);
    wr <= 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic do_advance(input int new_base);
    base_line <= 6'(new_base);
    advance <= 1;
    @(posedge clk);
    advance <= 0;
  endtask

  task automatic expect_byte(input int a, input logic [7:0] v, input string what);
    checks++;
    if (omem[a] !== v) begin
      failures++;
      if (failures < 20) $display("%s: omem[%0d]=%h expected %h", what, a, omem[a], v);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int i = 0; i < 4800; i++) omem[i] = 8'hAA;
    for (int i = 0; i < 80; i++) smem[i] = 8'hAA;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // characters on the base line
    for (int i = 0; i < 10; i++) put(8'h41 + 8'(i), 0);
    for (int i = 0; i < 10; i++) expect_byte(53 * 80 + i, 8'h41 + 8'(i), "base line");
    expect_byte(53 * 80 + 10, 8'hAA, "no extra write");
    // fill to the column limit and beyond
    for (int i = 10; i < 82; i++) put(8'h61, 0);
    expect_byte(53 * 80 + 77, 8'h61, "last visible column");
    expect_byte(53 * 80 + 78, 8'hAA, "column limit");
    expect_byte(53 * 80 + 79, 8'hAA, "column limit");
    // status line writes and home
    for (int i = 0; i < 5; i++) put(8'h30 + 8'(i), 1);
    checks += 2;
    if (smem[0] !== 8'h30 || smem[4] !== 8'h34) begin failures++; $display("status write"); end
    if (smem[5] !== 8'hAA) begin failures++; $display("status extra"); end
    status_home <= 1; repeat (2) @(posedge clk); status_home <= 0; repeat (2) @(posedge clk);
    put(8'h5A, 1);
    checks++;
    if (smem[0] !== 8'h5A || smem[1] !== 8'h31) begin failures++; $display("status home"); end
    // advance: new base line 0 (ring wrapped) is cleared, a write during the clear waits
    do_advance(0);
    char_in <= 8'h51; sel <= 0; wr <= 1;
    cyc = 0;
    @(posedge clk);
    wr <= 0;
    while (busy && cyc < 200) begin @(posedge clk); cyc++; end
    repeat (2) @(posedge clk);
    checks++;
    if (cyc < 80 || cyc > 90) begin failures++; $display("clear took %0d clocks", cyc); end
    expect_byte(0, 8'h51, "write after clear");
    for (int i = 1; i < 80; i++) expect_byte(i, 8'h20, "cleared");
    expect_byte(53 * 80 + 0, 8'h41, "old line untouched");
    put(8'h52, 0);
    expect_byte(1, 8'h52, "column continues");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
