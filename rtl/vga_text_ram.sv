// vga_text_ram: dual-port character memory (one write port, one read port).
//
// Used twice in the display: as the 4800-byte output memory (60 lines x 80 characters,
// a rotating queue of lines) and as the 80-byte status line. The write port is driven by
// the processor-side write state machine, the read port by the raster pipeline. Both ports
// are synchronous to the same clock; a read returns the byte one clock after the address
// (read-before-write when both hit the same address). The memory powers up holding
// spaces, as an FPGA block RAM with an initialisation file would. The sizes are the
// document's; the read latency and the power-up contents are this design's choice.
module vga_text_ram
  import esniff_pkg::*;
#(
  parameter int DEPTH = OUT_BYTES,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  // read port
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = CH_SPACE;
  end

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : CH_SPACE;
  end
endmodule
