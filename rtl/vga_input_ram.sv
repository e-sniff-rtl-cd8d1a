// vga_input_ram: three-port memory holding the 80-character keyboard input line.
//
// One write port, driven by the keyboard input state machine, and two independent read
// ports: one for the raster pipeline and one for the processor, which reads the typed
// command after the enter key. All ports share one clock; each read returns its byte one
// clock after the address. The memory powers up holding spaces. The size and the port
// arrangement are the document's; latency and power-up contents are this design's choice.
module vga_input_ram
  import esniff_pkg::*;
#(
  parameter int DEPTH = COLS,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr_a,   // raster side
  output logic [7:0]    rdata_a,
  input  logic [AW-1:0] raddr_b,   // processor side
  output logic [7:0]    rdata_b
);
  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = CH_SPACE;
  end

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata_a <= (int'(raddr_a) < DEPTH) ? mem[raddr_a] : CH_SPACE;
    rdata_b <= (int'(raddr_b) < DEPTH) ? mem[raddr_b] : CH_SPACE;
  end
endmodule
