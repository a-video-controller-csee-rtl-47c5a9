// video_timing: the video controller's counters, syncs, blanking and
// character-fetch strobes for a 640x480 text screen of 8x16 characters.
//
// Hcount runs 0..HTOTAL-1 on every pixel clock and Vcount advances at the end
// of each line, 0..VTOTAL-1. A line starts with the horizontal sync pulse
// (HSYNC_N low for Hcount 0..95), then the back porch, the 640 active pixels
// (Hcount 144..783, HBLANK_N high) and the front porch. A frame likewise
// starts with VSYNC_N low for lines 0-1, and VBLANK_N is high for lines
// 35..514. Sync and blank are registered.
//
// Each 8-pixel character cell needs three fetch steps, decoded from
// Hcount[2:0]: LoadChar (Hcount = 141, 149, ...) reads the character RAM,
// FontLoad (142, 150, ...) reads the font RAM, LoadNShift (143, 151, ...)
// loads the shift register, whose first pixel then appears at Hcount 144.
// The character address is Column + Row x 80, with Column =
// (Hcount - 141) / 8 and Row = (Vcount - 35) / 16, and the glyph row is
// (Vcount - 35) mod 16. All of these outputs are combinational decodes of the
// counters. The strobes run through the blanking intervals too; what they
// fetch there is never displayed.
//
// Timing numbers, strobe positions and the Column/Row arithmetic follow the
// original design. Placing the HBLANK_N edges exactly at Hcount 144 and 784
// is taken from its timing diagrams. The strobes decode Hcount[2:0] and so
// assume the active area starts on a multiple of 8 pixels, as it does at the
// default parameters. Reset is asynchronous and clears everything.
module video_timing
  import vga_pkg::*;
#(
  parameter int unsigned HSYNC        = H_SYNC,
  parameter int unsigned HBACK_PORCH  = H_BACK_PORCH,
  parameter int unsigned HACTIVE      = H_ACTIVE,
  parameter int unsigned HFRONT_PORCH = H_FRONT_PORCH,
  parameter int unsigned HTOTAL       = H_TOTAL,
  parameter int unsigned VSYNC        = V_SYNC,
  parameter int unsigned VBACK_PORCH  = V_BACK_PORCH,
  parameter int unsigned VACTIVE      = V_ACTIVE,
  parameter int unsigned VFRONT_PORCH = V_FRONT_PORCH,
  parameter int unsigned VTOTAL       = V_TOTAL,
  parameter int unsigned CHAR_COLUMNS = HACTIVE / CHAR_W
) (
  input  logic        clk,
  input  logic        rst,
  output logic [9:0]  hcount,
  output logic [9:0]  vcount,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        hblank_n,
  output logic        vblank_n,
  output logic        load_char,
  output logic        font_load,
  output logic        load_n_shift,
  output logic [11:0] char_addr,
  output logic [3:0]  glyph_row
);

  localparam int unsigned HSTART = HSYNC + HBACK_PORCH;  // first active pixel
  localparam int unsigned VSTART = VSYNC + VBACK_PORCH;  // first active line
  // The fetch for a cell starts three pixel clocks before its first pixel.
  localparam logic [9:0]  FETCH_START = 10'(HSTART - 3);
  localparam logic [2:0]  PH_CHAR  = FETCH_START[2:0];
  localparam logic [2:0]  PH_FONT  = PH_CHAR + 3'd1;
  localparam logic [2:0]  PH_SHIFT = PH_CHAR + 3'd2;

  initial begin
    assert (HSYNC + HBACK_PORCH + HACTIVE + HFRONT_PORCH == HTOTAL)
      else $error("horizontal timing does not add up to HTOTAL");
    assert (VSYNC + VBACK_PORCH + VACTIVE + VFRONT_PORCH == VTOTAL)
      else $error("vertical timing does not add up to VTOTAL");
  end

  logic end_of_line, end_of_field;
  assign end_of_line  = (hcount == 10'(HTOTAL - 1));
  assign end_of_field = (vcount == 10'(VTOTAL - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              hcount <= '0;
    else if (end_of_line) hcount <= '0;
    else                  hcount <= hcount + 10'd1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) vcount <= '0;
    else if (end_of_line) begin
      if (end_of_field) vcount <= '0;
      else              vcount <= vcount + 10'd1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                              hsync_n <= 1'b0;
    else if (end_of_line)                 hsync_n <= 1'b0;
    else if (hcount == 10'(HSYNC - 1))    hsync_n <= 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                                      hblank_n <= 1'b0;
    else if (hcount == 10'(HSTART - 1))           hblank_n <= 1'b1;
    else if (hcount == 10'(HSTART + HACTIVE - 1)) hblank_n <= 1'b0;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) vsync_n <= 1'b0;
    else if (end_of_line) begin
      if (end_of_field)                    vsync_n <= 1'b0;
      else if (vcount == 10'(VSYNC - 1))   vsync_n <= 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) vblank_n <= 1'b0;
    else if (end_of_line) begin
      if (vcount == 10'(VSTART - 1))                vblank_n <= 1'b1;
      else if (vcount == 10'(VSTART + VACTIVE - 1)) vblank_n <= 1'b0;
    end
  end

  // Character fetch strobes.
  assign load_char    = (hcount[2:0] == PH_CHAR);
  assign font_load    = (hcount[2:0] == PH_FONT);
  assign load_n_shift = (hcount[2:0] == PH_SHIFT);

  // Character and glyph addressing.
  logic [9:0] char_column, char_row;
  logic [6:0] column;
  logic [4:0] row;

  assign char_column = hcount - FETCH_START;
  assign column      = char_column[9:3];
  assign char_row    = vcount - 10'(VSTART);
  assign row         = char_row[8:4];
  assign glyph_row   = char_row[3:0];
  assign char_addr   = 12'(column) + 12'(row) * 12'(CHAR_COLUMNS);

endmodule
