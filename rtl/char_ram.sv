// char_ram: the 2.5K character array, 80 columns x 30 rows of 8-bit codes.
//
// Five 512 x 8 dual-port block RAMs. Port A of every RAM belongs to the bus
// side, which drives each page's EN/RST/WE separately and gets back the OR of
// the five outputs (an idle page holds its output at zero through RST). Port
// B belongs to the video side: CharAddr[11:9] picks one page, whose RST is
// released, while the other pages are reset to zero, so the OR of the five
// outputs is the addressed character. Port B is enabled only by the LoadChar
// strobe, so the character code appears one pixel clock after LoadChar and
// then holds for the rest of the character cell. Addresses 2560-4095 select
// no page and read zero. The page split and OR-ing follow the original
// design; using RST as the page select on the video port is this design's
// reading of it.
module char_ram
  import vga_pkg::*;
#(
  parameter int unsigned PAGES = CHAR_PAGES
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
  input  logic [11:0]       char_addr,
  output logic [7:0]        char_data
);

  logic [2:0]       page;
  logic [PAGES-1:0] select_n;
  logic [7:0]       douta [PAGES];
  logic [7:0]       doutb [PAGES];

  assign page = char_addr[11:9];

  always_comb begin
    select_n = '1;
    if (32'(page) < PAGES) select_n[page] = 1'b0;
  end

  for (genvar i = 0; i < int'(PAGES); i++) begin : g_page
    ramb4_s8_s8 u_ram (
      .CLKA (clka), .ENA (ena[i]), .RSTA (rsta[i]), .WEA (wea[i]),
      .ADDRA(addra), .DIA(dia), .DOA(douta[i]),
      .CLKB (clkb), .ENB (load), .RSTB (select_n[i]), .WEB (1'b0),
      .ADDRB(char_addr[RAM_AW-1:0]), .DIB(8'h00), .DOB(doutb[i])
    );
  end

  always_comb begin
    doa       = '0;
    char_data = '0;
    for (int i = 0; i < int'(PAGES); i++) begin
      doa       |= douta[i];
      char_data |= doutb[i];
    end
  end

endmodule
