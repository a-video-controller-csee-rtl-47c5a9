// opb_xsb300e_vga: an 80x30 text-mode VGA controller on the OPB bus.
//
// A processor writes character codes into a 2.5K character array and 8x16
// glyphs into a 1.5K font, both held in on-chip dual-ported block RAM mapped
// at C_BASEADDR: offsets 0x000-0x9FF are the character array (character at
// column c, row r is at c + 80 r), 0xA00-0xFFF the font (row y of the glyph
// for code k, 32 <= k <= 127, is at 0xA00 + 16 (k - 32) + y). The bus port
// of each RAM belongs to opb_controller, the other port to the video side,
// so the two sides never wait for each other and run on unrelated clocks
// (OPB_Clk and Pixel_Clock).
//
// The video side produces 640x480 at 60 Hz from a 25 MHz pixel clock.
// video_timing counts pixels and lines and, three pixel clocks before each
// 8-pixel character cell, fetches the character code (LoadChar), then the
// glyph row byte (FontLoad), then loads it into shift_register
// (LoadNShift), which shifts it out MSB first. video_out gates the pixels
// with blanking and drives white or black to the DAC. Sync pulses are
// negative. RGB and BLANK reach the pins one pixel clock after the internal
// pixel and so one clock behind the syncs' nominal positions.
//
// OPB_Rst resets both clock domains asynchronously. OPB_BE and OPB_seqAddr
// are accepted but not used: every access moves one byte. retry, toutSup and
// errAck are tied low. Port names, generics and the overall structure follow
// the original design.
module opb_xsb300e_vga
  import vga_pkg::*;
#(
  parameter int unsigned C_OPB_AWIDTH = 32,
  parameter int unsigned C_OPB_DWIDTH = 32,
  parameter logic [31:0] C_BASEADDR   = 32'hFEFF1000,
  parameter logic [31:0] C_HIGHADDR   = 32'hFEFF1FFF
) (
  input  logic                    OPB_Clk,
  input  logic                    OPB_Rst,
  input  logic [C_OPB_AWIDTH-1:0] OPB_ABus,
  input  logic [3:0]              OPB_BE,
  input  logic [C_OPB_DWIDTH-1:0] OPB_DBus,
  input  logic                    OPB_RNW,
  input  logic                    OPB_select,
  input  logic                    OPB_seqAddr,

  output logic [C_OPB_DWIDTH-1:0] VGA_DBus,
  output logic                    VGA_errAck,
  output logic                    VGA_retry,
  output logic                    VGA_toutSup,
  output logic                    VGA_xferAck,

  input  logic                    Pixel_Clock,
  output logic                    VIDOUT_CLK,
  output logic [9:0]              VIDOUT_RED,
  output logic [9:0]              VIDOUT_GREEN,
  output logic [9:0]              VIDOUT_BLUE,
  output logic                    VIDOUT_BLANK_N,
  output logic                    VIDOUT_HSYNC_N,
  output logic                    VIDOUT_VSYNC_N
);

  initial assert (C_OPB_AWIDTH == 32 && C_OPB_DWIDTH == 32)
    else $error("the OPB is 32 bits wide");

  // ---------------------------------------------------------------- bus side
  logic [ALL_PAGES-1:0] ram_rst, ram_we;
  logic [RAM_AW-1:0]    ram_addr;
  logic [7:0]           ram_di, char_doa, font_doa, read_data;
  logic [31:0]          sl_dbus;

  opb_controller #(.C_BASEADDR(C_BASEADDR), .C_HIGHADDR(C_HIGHADDR)) u_opb (
    .clk        (OPB_Clk),
    .rst        (OPB_Rst),
    .abus       (32'(OPB_ABus)),
    .dbus       (32'(OPB_DBus)),
    .rnw        (OPB_RNW),
    .select_i   (OPB_select),
    .sl_dbus    (sl_dbus),
    .sl_xfer_ack(VGA_xferAck),
    .ram_rst    (ram_rst),
    .ram_we     (ram_we),
    .ram_addr   (ram_addr),
    .ram_di     (ram_di),
    .read_data  (read_data)
  );

  assign read_data   = char_doa | font_doa;
  assign VGA_DBus    = C_OPB_DWIDTH'(sl_dbus);
  assign VGA_errAck  = 1'b0;
  assign VGA_retry   = 1'b0;
  assign VGA_toutSup = 1'b0;

  // -------------------------------------------------------------- video side
  logic [9:0]  hcount, vcount;
  logic        hblank_n, vblank_n;
  logic        load_char, font_load, load_n_shift;
  logic [11:0] char_addr;
  logic [3:0]  glyph_row;
  logic [7:0]  char_data, font_data;
  logic        video_data;

  video_timing u_timing (
    .clk         (Pixel_Clock),
    .rst         (OPB_Rst),
    .hcount      (hcount),
    .vcount      (vcount),
    .hsync_n     (VIDOUT_HSYNC_N),
    .vsync_n     (VIDOUT_VSYNC_N),
    .hblank_n    (hblank_n),
    .vblank_n    (vblank_n),
    .load_char   (load_char),
    .font_load   (font_load),
    .load_n_shift(load_n_shift),
    .char_addr   (char_addr),
    .glyph_row   (glyph_row)
  );

  char_ram u_char_ram (
    .clka     (OPB_Clk),
    .ena      ('1),
    .rsta     (ram_rst[CHAR_PAGES-1:0]),
    .wea      (ram_we[CHAR_PAGES-1:0]),
    .addra    (ram_addr),
    .dia      (ram_di),
    .doa      (char_doa),
    .clkb     (Pixel_Clock),
    .load     (load_char),
    .char_addr(char_addr),
    .char_data(char_data)
  );

  font_ram u_font_ram (
    .clka     (OPB_Clk),
    .ena      ('1),
    .rsta     (ram_rst[ALL_PAGES-1:CHAR_PAGES]),
    .wea      (ram_we[ALL_PAGES-1:CHAR_PAGES]),
    .addra    (ram_addr),
    .dia      (ram_di),
    .doa      (font_doa),
    .clkb     (Pixel_Clock),
    .load     (font_load),
    .font_addr({char_data[6:0], glyph_row}),
    .font_data(font_data)
  );

  shift_register u_shift (
    .clk         (Pixel_Clock),
    .rst         (OPB_Rst),
    .load_n_shift(load_n_shift),
    .d           (font_data),
    .video_data  (video_data)
  );

  video_out u_out (
    .clk       (Pixel_Clock),
    .rst       (OPB_Rst),
    .video_data(video_data),
    .hblank_n  (hblank_n),
    .vblank_n  (vblank_n),
    .red       (VIDOUT_RED),
    .green     (VIDOUT_GREEN),
    .blue      (VIDOUT_BLUE),
    .blank_n   (VIDOUT_BLANK_N)
  );

  assign VIDOUT_CLK = Pixel_Clock;

endmodule
