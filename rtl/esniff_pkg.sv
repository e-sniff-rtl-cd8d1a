// esniff_pkg: constants and types shared by the display and keyboard hardware.
//
// The display is a text terminal of 80 x 60 character cells, each 8 x 8 pixels, on a
// 640 x 480 VGA raster. The 640 x 480 mode timings are the common industry values for a
// 25 MHz pixel clock (800 clocks per line, 521 lines per frame). The 4800-byte output
// memory holds 60 lines of 80 characters used as a rotating queue; the screen shows
// OUT_VIS_LINES of them inside a border, followed by a status line and a keyboard input
// line. The row layout below is this design's own choice.
package esniff_pkg;

  // ---------------- VGA raster (pixel clock domain, 25 MHz) ----------------
  localparam int H_VISIBLE = 640;
  localparam int H_FRONT   = 16;
  localparam int H_SYNC    = 96;
  localparam int H_BACK    = 48;
  localparam int V_VISIBLE = 480;
  localparam int V_FRONT   = 10;
  localparam int V_SYNC    = 2;
  localparam int V_BACK    = 29;

  // ---------------- Text layout ----------------
  localparam int COLS          = 80;   // characters per memory line and per screen row
  localparam int ROWS          = 60;   // character rows on screen
  localparam int OUT_LINES     = 60;   // lines in the 4800-byte output queue
  localparam int OUT_BYTES     = COLS * OUT_LINES;
  localparam int TEXT_COLS     = COLS - 2;        // visible text columns (border left/right)
  localparam int OUT_VIS_LINES = ROWS - 6;        // 54 output lines on screen
  localparam int ROW_OUT_FIRST = 1;
  localparam int ROW_OUT_LAST  = ROW_OUT_FIRST + OUT_VIS_LINES - 1;   // 54
  localparam int ROW_STATUS    = ROW_OUT_LAST + 2;                    // 56
  localparam int ROW_INPUT     = ROW_STATUS + 2;                      // 58

  localparam logic [7:0] CH_SPACE  = 8'h20;
  localparam logic [7:0] CH_BORDER = 8'h01;   // solid block glyph in the font ROM

  // Position of the character cell being rasterised, carried down the pixel pipeline.
  typedef struct packed {
    logic       active;   // inside the 640 x 480 visible area
    logic [6:0] col;      // character column 0..79
    logic [5:0] row;      // character row 0..59
    logic [2:0] px;       // pixel column inside the glyph
    logic [2:0] py;       // pixel row inside the glyph
  } pix_pos_t;

  // ---------------- PS/2 scan codes (set 2) ----------------
  localparam logic [7:0] SC_BREAK  = 8'hF0;
  localparam logic [7:0] SC_EXT    = 8'hE0;
  localparam logic [7:0] SC_ENTER  = 8'h5A;
  localparam logic [7:0] SC_BKSP   = 8'h66;
  localparam logic [7:0] SC_LSHIFT = 8'h12;
  localparam logic [7:0] SC_RSHIFT = 8'h59;
  localparam logic [7:0] SC_CAPS   = 8'h58;

endpackage
