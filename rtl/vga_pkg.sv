// vga_pkg: constants and types shared by the text-mode VGA controller.
//
// Holds the 640x480 video timing (800 pixel clocks per line, 525 lines per
// frame), the character-cell geometry (8x16 glyphs, 80x30 characters), the
// memory map of the eight 512-byte block RAMs seen from the bus, and the
// state type of the bus-side RAM controller. The timing numbers and the
// memory sizes are those of the original design; the page assignment and the
// controller's state encoding are this design's own.
package vga_pkg;

  // Horizontal timing, in pixel clocks.
  localparam int unsigned H_SYNC        = 96;
  localparam int unsigned H_BACK_PORCH  = 48;
  localparam int unsigned H_ACTIVE      = 640;
  localparam int unsigned H_FRONT_PORCH = 16;
  localparam int unsigned H_TOTAL       = 800;

  // Vertical timing, in lines.
  localparam int unsigned V_SYNC        = 2;
  localparam int unsigned V_BACK_PORCH  = 33;
  localparam int unsigned V_ACTIVE      = 480;
  localparam int unsigned V_FRONT_PORCH = 10;
  localparam int unsigned V_TOTAL       = 525;

  // Character cells.
  localparam int unsigned CHAR_W   = 8;
  localparam int unsigned CHAR_H   = 16;
  localparam int unsigned COLUMNS  = 80;
  localparam int unsigned ROWS     = 30;

  // Block RAM geometry: 512 x 8 per RAM.
  localparam int unsigned RAM_DEPTH  = 512;
  localparam int unsigned RAM_AW     = 9;
  localparam int unsigned CHAR_PAGES = 5;   // 2.5K character array
  localparam int unsigned FONT_PAGES = 3;   // 1.5K font
  localparam int unsigned ALL_PAGES  = CHAR_PAGES + FONT_PAGES;

  // Bus-side RAM controller. The RAM is accessed in the last IDLE cycle of a
  // transfer, MemCycle1 presents the RAM output, MemCycle2 acknowledges.
  typedef enum logic [1:0] {
    OPB_IDLE = 2'd0,
    OPB_MEM1 = 2'd1,
    OPB_MEM2 = 2'd2
  } opb_state_e;

endpackage
