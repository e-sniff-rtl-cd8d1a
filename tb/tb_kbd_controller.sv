// tb_kbd_controller: checks the keyboard controller from PS/2 wire to ASCII.
// A keyboard model types "Hi, E-sniff!" (shift held for capitals and punctuation, caps lock
// used for the "E"), then backspace and enter. Each write pulse must carry the next expected
// character, with data already stable on the clock before the pulse; backspace and enter
// must each pulse once; no write may come from a release or a modifier.
module tb_kbd_controller;
  localparam int H = 50;
  logic clk = 0, rst = 1;
  logic ps2_clk = 1, ps2_dat = 1;
  logic write, enter, backspace, frame_err;
  logic [7:0] data;
  logic [3:0] bits;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kbd_controller #(.TIMEOUT(3000)) dut (
    .clk, .rst, .ps2_clk, .ps2_dat, .write, .enter, .backspace, .data, .bits, .frame_err
  );

  string expected = "Hi, E-sniff!";
  int idx = 0, n_enter = 0, n_bksp = 0;
  logic [7:0] data_q;
  always @(posedge clk) begin
    #1;
    if (write) begin
      checks += 2;
      if (idx >= expected.len() || data != expected[idx]) begin
        failures++;
        $display("write %0d: got '%c' (%h)", idx, data, data);
      end
      if (data != data_q) begin failures++; $display("data not stable before write"); end
      idx++;
    end
    if (enter) n_enter++;
    if (backspace) n_bksp++;
    data_q = data;
  end

  task automatic send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_dat = f[i];
      repeat (H) @(posedge clk);
      ps2_clk = 0;
      repeat (H) @(posedge clk);
      ps2_clk = 1;
    end
    ps2_dat = 1;
    repeat (4 * H) @(posedge clk);
  endtask

  task automatic key(input logic [7:0] sc);
    send(sc); send(8'hF0); send(sc);
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    send(8'h12); key(8'h33); send(8'hF0); send(8'h12);       // H
    key(8'h43);                                              // i
    key(8'h41);                                              // ,
    key(8'h29);                                              // space
    key(8'h58); key(8'h24); key(8'h58);                      // caps lock, E, caps lock
    key(8'h4E);                                              // -
    key(8'h1B); key(8'h31); key(8'h43); key(8'h2B); key(8'h2B);   // sniff
    send(8'h59); key(8'h16); send(8'hF0); send(8'h59);       // right shift + 1 = !
    key(8'h66);                                              // backspace
    key(8'h5A);                                              // enter
    checks += 3;
    if (idx != expected.len()) begin failures++; $display("%0d characters written", idx); end
    if (n_bksp != 1) begin failures++; $display("backspace pulses %0d", n_bksp); end
    if (n_enter != 1) begin failures++; $display("enter pulses %0d", n_enter); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
