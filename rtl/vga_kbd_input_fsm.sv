// vga_kbd_input_fsm: writes keyboard characters into the input-line memory.
//
// key_wr pulses with an ASCII code on key_data: the code is captured and written, on the
// next clock, at the cursor column, and the cursor moves right (characters beyond TEXT_COLS
// are dropped). key_bksp pulses to move the cursor one place left and write a space there.
// A rising edge on erase (driven by the processor once it has read a command) fills the
// whole line with spaces, one byte per clock, and puts the cursor back at column 0;
// keystrokes that arrive while the line is being cleared are ignored. cursor_col tells the
// cursor block where to draw. The document gives the function (keyboard characters into
// the input memory, erase line, write timing safe for the memory); the details are this
// design's choice.
module vga_kbd_input_fsm
  import esniff_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       key_wr,
  input  logic [7:0] key_data,
  input  logic       key_bksp,
  input  logic       erase,
  output logic       we,
  output logic [6:0] waddr,
  output logic [7:0] wdata,
  output logic [6:0] cursor_col,
  output logic       busy
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_CLEAR} state_t;
  state_t state;

  logic       erase_q;
  logic [7:0] data_q;
  logic       is_bksp;
  logic [6:0] clr_col;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      erase_q    <= 1'b0;
      data_q     <= '0;
      is_bksp    <= 1'b0;
      clr_col    <= '0;
      cursor_col <= '0;
      we         <= 1'b0;
      waddr      <= '0;
      wdata      <= '0;
    end else begin
      erase_q <= erase;
      we      <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (erase && !erase_q) begin
            state   <= S_CLEAR;
            clr_col <= '0;
          end else if (key_wr || key_bksp) begin
            state   <= S_WRITE;
            data_q  <= key_data;
            is_bksp <= key_bksp;
          end
        end
        S_WRITE: begin
          state <= S_IDLE;
          if (is_bksp) begin
            if (cursor_col != 0) begin
              we         <= 1'b1;
              waddr      <= cursor_col - 1'b1;
              wdata      <= CH_SPACE;
              cursor_col <= cursor_col - 1'b1;
            end
          end else if (int'(cursor_col) < TEXT_COLS) begin
            we         <= 1'b1;
            waddr      <= cursor_col;
            wdata      <= data_q;
            cursor_col <= cursor_col + 1'b1;
          end
        end
        S_CLEAR: begin
          we    <= 1'b1;
          waddr <= clr_col;
          wdata <= CH_SPACE;
          if (int'(clr_col) == COLS - 1) begin
            state      <= S_IDLE;
            cursor_col <= '0;
          end else clr_col <= clr_col + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
