// tb_ps2_receive: checks the PS/2 receiver and scan-code state machine.
// A keyboard model sends 11-bit frames (start, 8 data bits LSB first, odd parity, stop) with
// a 100-clock bit period. Checked: a key press gives exactly one rcv pulse with its scan code
// on data, two clock edges after data changes (data is set, the
// translator registers it, then rcv rises); a release gives nothing; shift and caps lock drive
// the caps level; enter and backspace give their own pulses and no rcv; extended keys give
// code 00; frames with a bad parity or stop bit are dropped and flagged; a frame cut short
// is dropped after TIMEOUT clocks and the next frame is received correctly.
module tb_ps2_receive;
  localparam int TIMEOUT = 3000;
  localparam int H = 50;
  logic clk = 0, rst = 1;
  logic ps2_clk = 1, ps2_dat = 1;
  logic rcv, enter, bksp, caps, frame_err;
  logic [7:0] data;
  logic [3:0] bits_rx;
  int checks = 0, failures = 0;
  int n_rcv = 0, n_enter = 0, n_bksp = 0, n_err = 0;
  logic [7:0] last_data;
  logic [7:0] data_q;
  int rcv_age = -1;
  always #5 clk = ~clk;

  ps2_receive #(.TIMEOUT(TIMEOUT)) dut (
    .clk, .rst, .ps2_clk, .ps2_dat, .rcv, .enter, .bksp, .caps, .data, .bits_rx, .frame_err
  );

  int cyc = 0, t_data = 0;
  always @(posedge clk) begin
    #1;
    cyc++;
    if (data != data_q) t_data = cyc;
    data_q = data;
    if (rcv)       begin n_rcv++; last_data = data; rcv_age = cyc - t_data; end
    if (enter)     n_enter++;
    if (bksp)      n_bksp++;
    if (frame_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input int nbits = 11, input bit bad_par = 0, input bit bad_stop = 0);
    logic [10:0] f;
    f = {~bad_stop, (~^b) ^ bad_par, b, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      ps2_dat = f[i];
      repeat (H) @(posedge clk);
      ps2_clk = 0;
      repeat (H) @(posedge clk);
      ps2_clk = 1;
    end
    ps2_dat = 1;
    repeat (4 * H) @(posedge clk);
  endtask

  task automatic expect_counts(input int r, input int e, input int bk, input int er, input string what);
    checks++;
    if (n_rcv != r || n_enter != e || n_bksp != bk || n_err != er) begin
      failures++;
      $display("%s: rcv %0d enter %0d bksp %0d err %0d", what, n_rcv, n_enter, n_bksp, n_err);
    end
    n_rcv = 0; n_enter = 0; n_bksp = 0; n_err = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    send(8'h1C);
    expect_counts(1, 0, 0, 0, "press a");
    checks += 3;
    if (last_data != 8'h1C) begin failures++; $display("data %h", last_data); end
    if (rcv_age != 2) begin failures++; $display("rcv came %0d clocks after data", rcv_age); end
    if (caps) failures++;
    send(8'hF0); send(8'h1C);
    expect_counts(0, 0, 0, 0, "release a");
    // shift held
    send(8'h12);
    checks++; if (!caps) begin failures++; $display("shift not seen"); end
    send(8'h2D);
    expect_counts(1, 0, 0, 0, "shifted r");
    send(8'hF0); send(8'h12);
    checks++; if (caps) begin failures++; $display("shift release not seen"); end
    // right shift
    send(8'h59);
    checks++; if (!caps) failures++;
    send(8'hF0); send(8'h59);
    checks++; if (caps) failures++;
    // caps lock toggles on press only
    send(8'h58); send(8'hF0); send(8'h58);
    checks++; if (!caps) begin failures++; $display("caps lock on not seen"); end
    send(8'h12);
    checks++; if (caps) begin failures++; $display("shift with caps lock"); end
    send(8'hF0); send(8'h12);
    send(8'h58); send(8'hF0); send(8'h58);
    checks++; if (caps) begin failures++; $display("caps lock off not seen"); end
    expect_counts(0, 0, 0, 0, "modifiers");
    // enter and backspace
    send(8'h5A); send(8'hF0); send(8'h5A);
    expect_counts(0, 1, 0, 0, "enter");
    send(8'h66); send(8'hF0); send(8'h66);
    expect_counts(0, 0, 1, 0, "backspace");
    // extended key (arrow)
    send(8'hE0); send(8'h75);
    expect_counts(1, 0, 0, 0, "arrow");
    checks++; if (last_data != 8'h00) begin failures++; $display("arrow data %h", last_data); end
    send(8'hE0); send(8'hF0); send(8'h75);
    expect_counts(0, 0, 0, 0, "arrow release");
    // bad parity, bad stop
    send(8'h1C, 11, 1, 0);
    expect_counts(0, 0, 0, 1, "bad parity");
    send(8'h1C, 11, 0, 1);
    expect_counts(0, 0, 0, 1, "bad stop");
    // truncated frame, then a good one
    send(8'h1C, 6);
    checks++; if (bits_rx != 4'd6) begin failures++; $display("bits_rx %0d", bits_rx); end
    repeat (TIMEOUT + 100) @(posedge clk);
    checks++; if (bits_rx != 0) begin failures++; $display("not reset by timeout"); end
    expect_counts(0, 0, 0, 1, "timeout");
    send(8'h32);
    expect_counts(1, 0, 0, 0, "after timeout");
    checks++; if (last_data != 8'h32) begin failures++; $display("after timeout data %h", last_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
