// vga_cpu_write_fsm: processor-side write controller for the output and status memories.
//
// The processor drives this block from a parallel output port, so its signals are levels
// that change at software speed. A rising edge of wr captures char and sel into registers;
// the memory write is issued from those registers on a later clock, so address and data are
// stable around the write strobe (the reason the document gives for this state machine).
//   sel = 0: the character goes to the output memory at the base line, at the current
//            column, and the column advances.
//   sel = 1: the character goes to the status line at the status column, which advances.
// Columns stop at TEXT_COLS (the visible width); later characters on that line are dropped.
// advance (from the line-return block) starts a new output line: the column goes to 0 and
// the new base line, which still holds text from an earlier pass round the ring, is filled
// with spaces, one byte per clock. status_home (level, rising edge) sends the status column
// back to 0. A write request that arrives during the clearing waits until it is done; busy is
// high while anything is outstanding.
// The document gives the function (handle processor writes, keep the write address); the
// request latch, the line clearing and the column limit are this design's choices.
module vga_cpu_write_fsm
  import esniff_pkg::*;
#(
  parameter int LINES = OUT_LINES,
  parameter int LW    = $clog2(LINES),
  parameter int AW    = $clog2(COLS * LINES)
) (
  input  logic          clk,
  input  logic          rst,
  // processor side (levels)
  input  logic [7:0]    char_in,
  input  logic          wr,
  input  logic          sel,
  input  logic          status_home,
  output logic          busy,
  // from the line-return block
  input  logic [LW-1:0] base_line,
  input  logic          advance,
  // output memory write port
  output logic          out_we,
  output logic [AW-1:0] out_waddr,
  output logic [7:0]    out_wdata,
  // status memory write port
  output logic          st_we,
  output logic [6:0]    st_waddr,
  output logic [7:0]    st_wdata
);
  typedef enum logic [0:0] {S_IDLE, S_CLEAR} state_t;
  state_t state;

  logic          wr_q, home_q;
  logic          req_v, req_sel, adv_pend;
  logic [7:0]    req_char;
  logic [6:0]    out_col, st_col, clr_col;
  logic [LW-1:0] clr_line;

  logic wr_rise, home_rise;
  assign wr_rise   = wr && !wr_q;
  assign home_rise = status_home && !home_q;
  assign busy      = req_v || adv_pend || (state != S_IDLE);

  function automatic logic [AW-1:0] line_addr(input logic [LW-1:0] line, input logic [6:0] col);
    return AW'(int'(line) * COLS + int'(col));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      wr_q     <= 1'b0;
      home_q   <= 1'b0;
      req_v    <= 1'b0;
      req_sel  <= 1'b0;
      req_char <= '0;
      adv_pend <= 1'b0;
      out_col  <= '0;
      st_col   <= '0;
      clr_col  <= '0;
      clr_line <= '0;
      out_we   <= 1'b0;
      st_we    <= 1'b0;
      out_waddr <= '0;
      out_wdata <= '0;
      st_waddr <= '0;
      st_wdata <= '0;
    end else begin
      wr_q   <= wr;
      home_q <= status_home;
      out_we <= 1'b0;
      st_we  <= 1'b0;

      if (home_rise) st_col <= '0;

      unique case (state)
        S_IDLE: begin
          if (adv_pend) begin
            state    <= S_CLEAR;
            clr_line <= base_line;
            clr_col  <= '0;
            out_col  <= '0;
            adv_pend <= 1'b0;
          end else if (req_v) begin
            req_v <= 1'b0;
            if (!req_sel) begin
              if (int'(out_col) < TEXT_COLS) begin
                out_we    <= 1'b1;
                out_waddr <= line_addr(base_line, out_col);
                out_wdata <= req_char;
                out_col   <= out_col + 1'b1;
              end
            end else if (int'(st_col) < TEXT_COLS) begin
              st_we    <= 1'b1;
              st_waddr <= st_col;
              st_wdata <= req_char;
              st_col   <= st_col + 1'b1;
            end
          end
        end
        S_CLEAR: begin
          out_we    <= 1'b1;
          out_waddr <= line_addr(clr_line, clr_col);
          out_wdata <= CH_SPACE;
          if (int'(clr_col) == COLS - 1) state <= S_IDLE;
          else clr_col <= clr_col + 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      // New requests are latched last so that one arriving this clock is not lost.
      if (wr_rise) begin
        req_v    <= 1'b1;
        req_char <= char_in;
        req_sel  <= sel;
      end
      if (advance) adv_pend <= 1'b1;
    end
  end
endmodule
