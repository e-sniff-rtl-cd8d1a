// ps2_receive: PS/2 keyboard receiver and scan-code interpreter (receive only).
//
// Frame receiver: ps2_clk and ps2_dat are synchronised to the system clock and a bit is
// taken on every falling edge of ps2_clk. A frame is 11 bits: start (0), eight data bits
// LSB first, odd parity, stop (1). A frame with a bad start bit, stop bit or parity is
// dropped. An alignment guard restarts the receiver when a started frame is not complete
// within TIMEOUT clocks, so a keyboard that lost a bit cannot shift every later frame.
// bits_rx shows how many bits of the current frame have arrived.
// Scan-code state machine (scan code set 2): E0 marks an extended key, F0 a key release.
// Shift (left/right) and caps lock are tracked and leave as the combined shift level `caps`
// (shift held XOR caps lock on). Enter gives a one-clock `enter` pulse, backspace a
// one-clock `bksp` pulse. Every other key press puts its scan code on `data` (extended keys
// give code 00, which the translator shows as a space) and, two clocks later, when the
// translator's registered ASCII output is settled, a one-clock `rcv` pulse. Releases other
// than shift produce nothing.
// Frame format, the checks, the timeout and the trapped keys are the document's; the
// timeout length, the XOR of shift and caps lock and the extended-key handling are this
// design's choices.
module ps2_receive
  import esniff_pkg::*;
#(
  parameter int TIMEOUT = 200_000      // 2 ms at 100 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  output logic       rcv,
  output logic       enter,
  output logic       bksp,
  output logic       caps,
  output logic [7:0] data,
  output logic [3:0] bits_rx,
  output logic       frame_err      // one-clock pulse: frame dropped (check or timeout)
);
  localparam int TW = $clog2(TIMEOUT + 1);

  // ---------------- synchroniser and falling-edge detect ----------------
  logic [2:0] clk_sync;
  logic [1:0] dat_sync;
  logic       fall;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= '1;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_dat};
    end
  end
  assign fall = clk_sync[2] && !clk_sync[1];

  // ---------------- frame receiver with alignment timeout ----------------
  logic [9:0]    shreg;
  logic [TW-1:0] tcnt;
  logic          code_v;
  logic [7:0]    code;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_rx   <= '0;
      tcnt      <= '0;
      code_v    <= 1'b0;
      code      <= '0;
      frame_err <= 1'b0;
    end else begin
      code_v    <= 1'b0;
      frame_err <= 1'b0;
      if (fall) begin
        tcnt  <= '0;
        shreg <= {dat_sync[1], shreg[9:1]};
        if (bits_rx == 4'd10) begin
          bits_rx <= '0;
          // shreg holds bits 0..9 of the frame (start in bit 0, parity in bit 9);
          // the stop bit is arriving now.
          if (!shreg[0] && dat_sync[1] && (^shreg[9:1]) == 1'b1) begin
            code_v <= 1'b1;
            code   <= shreg[8:1];
          end else begin
            frame_err <= 1'b1;
          end
        end else begin
          bits_rx <= bits_rx + 1'b1;
        end
      end else if (bits_rx != 0) begin
        if (tcnt == TW'(TIMEOUT)) begin
          bits_rx   <= '0;
          tcnt      <= '0;
          frame_err <= 1'b1;
        end else begin
          tcnt <= tcnt + 1'b1;
        end
      end
    end
  end

  // ---------------- scan-code state machine ----------------
  logic brk, ext, lshift, rshift, caps_on;
  logic [1:0] rcv_d;

  assign caps = (lshift || rshift) ^ caps_on;

  always_ff @(posedge clk) begin
    if (rst) begin
      brk     <= 1'b0;
      ext     <= 1'b0;
      lshift  <= 1'b0;
      rshift  <= 1'b0;
      caps_on <= 1'b0;
      data    <= '0;
      rcv_d   <= '0;
      rcv     <= 1'b0;
      enter   <= 1'b0;
      bksp    <= 1'b0;
    end else begin
      rcv   <= rcv_d[1];
      rcv_d <= {rcv_d[0], 1'b0};
      enter <= 1'b0;
      bksp  <= 1'b0;
      if (code_v) begin
        if (code == SC_EXT) begin
          ext <= 1'b1;
        end else if (code == SC_BREAK) begin
          brk <= 1'b1;
        end else begin
          brk <= 1'b0;
          ext <= 1'b0;
          if (brk) begin
            if (!ext && code == SC_LSHIFT) lshift <= 1'b0;
            if (!ext && code == SC_RSHIFT) rshift <= 1'b0;
          end else if (code == SC_ENTER) begin
            enter <= 1'b1;
          end else if (ext) begin
            data  <= 8'h00;
            rcv_d[0] <= 1'b1;
          end else if (code == SC_LSHIFT) begin
            lshift <= 1'b1;
          end else if (code == SC_RSHIFT) begin
            rshift <= 1'b1;
          end else if (code == SC_CAPS) begin
            caps_on <= !caps_on;
          end else if (code == SC_BKSP) begin
            bksp <= 1'b1;
          end else begin
            data  <= code;
            rcv_d[0] <= 1'b1;
          end
        end
      end
    end
  end
endmodule
