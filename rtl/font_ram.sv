// font_ram: the 1.5K font, 96 glyphs of 8x16 pixels, one byte per glyph row.
//
// Three 512 x 8 dual-port block RAMs. The video side addresses the font with
// FontAddr = {character code[6:0], glyph row[3:0]}, eleven bits. Bits [10:9]
// pick the RAM: 01 the first, 10 the second, 11 the third, so the three RAMs
// hold codes 32-63, 64-95 and 96-127, the printable ASCII set. Codes 0-31
// select no RAM and show as blank. The unselected RAMs are held at zero
// through RST and the three outputs are ORed. Port B is enabled only by the
// FontLoad strobe, so the glyph byte appears one pixel clock after FontLoad.
// Port A of each RAM belongs to the bus side exactly as in char_ram. The
// split into three RAMs and the OR follow the original design; blanking
// codes 0-31 is this design's reading of its select table.
module font_ram
  import vga_pkg::*;
#(
  parameter int unsigned PAGES = FONT_PAGES
) (
  // bus side (port A)
  input  logic              clka,
  input  logic [PAGES-1:0]  ena,
  input  logic [PAGES-1:0]  rsta,
  input  logic [PAGES-1:0]  wea,
  input  logic [RAM_AW-1:0] addra,
  input  logic [7:0]        dia,
  output logic [7:0]        doa,
  // video side (port B)
  input  logic              clkb,
  input  logic              load,
  input  logic [10:0]       font_addr,
  output logic [7:0]        font_data
);

  logic [1:0]       page;
  logic [PAGES-1:0] select_n;
  logic [7:0]       douta [PAGES];
  logic [7:0]       doutb [PAGES];

  assign page = font_addr[10:9];

  // Page 0 (control codes) maps to no RAM; page k maps to RAM k-1.
  always_comb begin
    for (int i = 0; i < int'(PAGES); i++) select_n[i] = (32'(page) != i + 1);
  end

  for (genvar i = 0; i < int'(PAGES); i++) begin : g_page
    ramb4_s8_s8 u_ram (
      .CLKA (clka), .ENA (ena[i]), .RSTA (rsta[i]), .WEA (wea[i]),
      .ADDRA(addra), .DIA(dia), .DOA(douta[i]),
      .CLKB (clkb), .ENB (load), .RSTB (select_n[i]), .WEB (1'b0),
      .ADDRB(font_addr[RAM_AW-1:0]), .DIB(8'h00), .DOB(doutb[i])
    );
  end

  always_comb begin
    doa       = '0;
    font_data = '0;
    for (int i = 0; i < int'(PAGES); i++) begin
      doa       |= douta[i];
      font_data |= doutb[i];
    end
  end

endmodule
