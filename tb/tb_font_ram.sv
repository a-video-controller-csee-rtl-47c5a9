// tb_font_ram: self-checking test of the 1.5K font.
//
// Fills the three RAMs through the bus port with a pattern. Bus page p holds
// font addresses 512 (p + 1) and up, i.e. the glyphs of codes 32 (p + 1) to
// 32 (p + 1) + 31. Then reads every font address (code x 16 + glyph row)
// through the video port with a one-clock FontLoad strobe and checks the
// byte, zero for codes 0-31; checks that the output holds while the strobe
// is low; reads every page back through the bus port; and mixes writes with
// video reads. The two ports use unrelated clocks.
module tb_font_ram;

  logic       clka = 0, clkb = 0;
  logic [2:0] ena = '1, rsta = '1, wea = '0;
  logic [8:0] addra = 0;
  logic [7:0] dia = 0, doa;
  logic       load = 0;
  logic [10:0] font_addr = 0;
  logic [7:0] font_data;
  logic [7:0] model [2048];   // indexed by font address
  int checks = 0, failures = 0, blank_codes = 0;
  int page_reads [3];

  font_ram dut (.clka, .ena, .rsta, .wea, .addra, .dia, .doa, .clkb, .load, .font_addr, .font_data);

  always #5 clka = ~clka;
  always #7 clkb = ~clkb;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %02h expected %02h at %0t", what, got, exp, $time);
    end
  endtask

  // Bus offset b (0..1535) lies in RAM b / 512 and holds font address 512 + b.
  task automatic bus_write(int b, logic [7:0] d);
    @(negedge clka);
    addra = 9'(b % 512); dia = d; wea = 3'(1 << (b / 512)); rsta = '1;
    @(negedge clka);
    wea = '0;
    model[512 + b] = d;
  endtask

  task automatic video_read(int fa);
    @(negedge clkb);
    font_addr = 11'(fa); load = 1;
    @(negedge clkb);
    load = 0;
    check($sformatf("glyph code %0d row %0d", fa / 16, fa % 16), font_data, model[fa]);
    if (fa < 512) blank_codes++; else page_reads[fa / 512 - 1]++;
    font_addr = 11'($urandom);
    @(negedge clkb);
    check("video hold", font_data, model[fa]);
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) model[a] = 0;
    for (int b = 0; b < 1536; b++) bus_write(b, 8'((b * 73) ^ (b >> 3) ^ 8'hc3));
    for (int fa = 0; fa < 2048; fa++) video_read(fa);
    for (int b = 0; b < 1536; b += 5) begin
      @(negedge clka);
      addra = 9'(b % 512); rsta = ~3'(1 << (b / 512));
      @(negedge clka);
      rsta = '1;
      check($sformatf("bus read %0d", b), doa, model[512 + b]);
      @(negedge clka);
      check("bus idle", doa, 8'h00);
    end
    for (int i = 0; i < 500; i++) begin
      int b;
      b = $urandom_range(1535);
      bus_write(b, 8'($urandom));
      video_read(512 + b);
    end
    for (int p = 0; p < 3; p++) begin
      checks++; if (page_reads[p] == 0) begin failures++; $display("RAM %0d never read", p); end
    end
    checks++; if (blank_codes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
