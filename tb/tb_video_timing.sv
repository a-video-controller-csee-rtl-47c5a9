// tb_video_timing: self-checking test of the counters, syncs, blanking,
// fetch strobes and character addressing, at the full 800 x 525 timing.
//
// The testbench counts pixel clocks since reset itself and derives from that
// count alone the pixel (k mod 800) and line ((k / 800) mod 525) that every
// output should describe. For two complete frames it compares, after every
// clock: both counters, HSYNC_N (low for pixels 0-95), HBLANK_N (high for
// 144-783), VSYNC_N (low for lines 0-1), VBLANK_N (high for lines 35-514),
// the three strobes (pixel mod 8 = 5, 6, 7) and, inside the fetch window,
// the character address (pixel - 141) / 8 + 80 (line - 35) / 16 and the glyph
// row. It also measures the sync pulse widths and periods.
module tb_video_timing;

  localparam int HT = 800, VT = 525;

  logic        clk = 0, rst = 0;
  logic [9:0]  hcount, vcount;
  logic        hsync_n, vsync_n, hblank_n, vblank_n;
  logic        load_char, font_load, load_n_shift;
  logic [11:0] char_addr;
  logic [3:0]  glyph_row;

  int checks = 0, failures = 0;

  video_timing dut (.clk, .rst, .hcount, .vcount, .hsync_n, .vsync_n, .hblank_n, .vblank_n,
                    .load_char, .font_load, .load_n_shift, .char_addr, .glyph_row);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp, int k);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("clock %0d: %s = %0d, expected %0d", k, what, got, exp);
    end
  endtask

  int last_hs_fall = -1, last_vs_fall = -1, hs_low = 0, vs_low = 0;
  int hs_periods = 0, vs_periods = 0;
  logic prev_hs = 0, prev_vs = 0;

  initial begin
    #1 rst = 1;
    #2 rst = 0;
    for (int k = 0; k < 2 * HT * VT + 10; k++) begin
      int h, v;
      h = k % HT;
      v = (k / HT) % VT;
      expect_eq("hcount", int'(hcount), h, k);
      expect_eq("vcount", int'(vcount), v, k);
      expect_eq("hsync_n", int'(hsync_n), int'(h >= 96), k);
      expect_eq("hblank_n", int'(hblank_n), int'(h >= 144 && h <= 783), k);
      expect_eq("vsync_n", int'(vsync_n), int'(v >= 2), k);
      expect_eq("vblank_n", int'(vblank_n), int'(v >= 35 && v <= 514), k);
      expect_eq("load_char", int'(load_char), int'(h % 8 == 5), k);
      expect_eq("font_load", int'(font_load), int'(h % 8 == 6), k);
      expect_eq("load_n_shift", int'(load_n_shift), int'(h % 8 == 7), k);
      if (h >= 141 && h <= 780 && v >= 35 && v <= 514) begin
        expect_eq("char_addr", int'(char_addr), (h - 141) / 8 + 80 * ((v - 35) / 16), k);
        expect_eq("glyph_row", int'(glyph_row), (v - 35) % 16, k);
      end
      // Sync pulse widths and periods, measured from the pins.
      if (k > 0 && prev_hs && !hsync_n) begin
        if (last_hs_fall >= 0) begin expect_eq("line period", k - last_hs_fall, HT, k); hs_periods++; end
        last_hs_fall = k;
      end
      if (k > 0 && !prev_hs && hsync_n && last_hs_fall >= 0) expect_eq("hsync width", k - last_hs_fall, 96, k);
      if (k > 0 && prev_vs && !vsync_n) begin
        if (last_vs_fall >= 0) begin expect_eq("frame period", k - last_vs_fall, HT * VT, k); vs_periods++; end
        last_vs_fall = k;
      end
      if (k > 0 && !prev_vs && vsync_n && last_vs_fall >= 0)
        expect_eq("vsync width", k - last_vs_fall, 2 * HT, k);
      prev_hs = hsync_n;
      prev_vs = vsync_n;
      @(posedge clk); #1;
    end
    expect_eq("frames measured", vs_periods, 1, 0);
    expect_eq("lines measured", hs_periods > 1000 ? 1 : 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
