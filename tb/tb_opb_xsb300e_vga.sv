// tb_opb_xsb300e_vga: end-to-end test of the text-mode controller at its
// full size (80 x 30 characters, 640 x 480 pixels, 800 x 525 timing).
//
// An OPB bus-functional master on OPB_Clk loads a 96-glyph font and a full
// screen of characters, including control codes (shown blank) and codes with
// bit 7 set (bit 7 is ignored). A checker on Pixel_Clock rebuilds the beam
// position from the HSYNC_N and VSYNC_N pins alone and, for every active
// pixel of a frame, compares VIDOUT_RED/GREEN/BLUE and VIDOUT_BLANK_N with
// the pixel the font and screen models predict. Frame A is checked while the
// master reads the RAMs back during active video; in frame B the master
// rewrites characters during active video; frame C is checked against the
// new screen. The test also checks the line and frame periods, the sync
// widths, the bus latency and that foreign addresses are not acknowledged,
// and counts each mechanism, failing if one never happened. The two clocks
// are unrelated (14 ns and 40 ns).
module tb_opb_xsb300e_vga;

  localparam logic [31:0] BASE = 32'hFEFF1000;
  localparam int HT = 800, VT = 525;

  logic        OPB_Clk = 0, OPB_Rst = 0, Pixel_Clock = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic [3:0]  OPB_BE = 0;
  logic        OPB_RNW = 0, OPB_select = 0, OPB_seqAddr = 0;
  logic [31:0] VGA_DBus;
  logic        VGA_errAck, VGA_retry, VGA_toutSup, VGA_xferAck;
  logic        VIDOUT_CLK, VIDOUT_BLANK_N, VIDOUT_HSYNC_N, VIDOUT_VSYNC_N;
  logic [9:0]  VIDOUT_RED, VIDOUT_GREEN, VIDOUT_BLUE;

  opb_xsb300e_vga dut (.*);

  always #7  OPB_Clk = ~OPB_Clk;
  always #20 Pixel_Clock = ~Pixel_Clock;

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------------ models
  logic [7:0] screen [2400];
  logic [7:0] glyph  [128][16];

  function automatic logic [7:0] glyph_pattern(int k, int y);
    return 8'((k * 29 + y * 113) ^ (k >> 2) ^ (y << 3) ^ 8'h96);
  endfunction

  function automatic bit expected_pixel(int x, int y);
    logic [6:0] code;
    code = screen[(y / 16) * 80 + x / 8][6:0];
    if (code < 32) return 0;
    return glyph[code][y % 16][7 - x % 8];
  endfunction

  // ------------------------------------------------------------ bus master
  int bus_writes = 0, bus_reads = 0, bus_ignored = 0, bus_in_active = 0;
  int char_pages [5], font_pages [3];

  task automatic opb_xfer(logic [31:0] a, logic r, logic [31:0] d,
                          output logic [31:0] q, output bit acked);
    int lat;
    @(posedge OPB_Clk); #1;
    OPB_ABus = a; OPB_RNW = r; OPB_DBus = d; OPB_BE = 4'hf; OPB_select = 1;
    lat = 0; acked = 0; q = 0;
    while (!acked && lat < 16) begin
      @(negedge OPB_Clk);
      lat++;
      if (VGA_xferAck) begin acked = 1; q = VGA_DBus; end
      else check("VGA_DBus idle", int'(VGA_DBus), 0);
    end
    if (acked) check("bus latency", lat, 4);
    if (VIDOUT_BLANK_N) bus_in_active++;
    @(posedge OPB_Clk); #1;
    OPB_select = 0; OPB_ABus = 0; OPB_DBus = 0; OPB_RNW = 0; OPB_BE = 0;
  endtask

  task automatic bus_write(int off, logic [7:0] d);
    logic [31:0] q; bit acked;
    opb_xfer(BASE + 32'(off), 1'b0, {24'h0, d}, q, acked);
    check("write acked", int'(acked), 1);
    bus_writes++;
    if (off < 2560) char_pages[off / 512]++; else font_pages[(off - 2560) / 512]++;
  endtask

  task automatic bus_read(int off, logic [7:0] exp);
    logic [31:0] q; bit acked;
    opb_xfer(BASE + 32'(off), 1'b1, 32'h0, q, acked);
    check("read acked", int'(acked), 1);
    check($sformatf("read back %03h", off), int'(q), int'({4{exp}}));
    bus_reads++;
  endtask

  task automatic write_char(int i, logic [7:0] c);
    bus_write(i, c);
    screen[i] = c;
  endtask

  // ------------------------------------------------------------ pixel checker
  int h = 0, v = 0;
  bit synced = 0, checking = 0;
  logic prev_hs = 0, prev_vs = 0;
  int frame_pixels = 0, white = 0, black = 0, blank_cells = 0, high_bit_cells = 0;
  int hsyncs = 0, vsyncs = 0, last_hs = -1, last_vs = -1, clocks = 0, hs_low_start = -1;
  int frames_checked = 0;

  always @(posedge Pixel_Clock) begin
    #1;
    clocks++;
    if (OPB_Rst) begin
      prev_hs = VIDOUT_HSYNC_N;
      prev_vs = VIDOUT_VSYNC_N;
    end else begin
      if (prev_hs && !VIDOUT_HSYNC_N) begin
        if (last_hs >= 0) check("line period", clocks - last_hs, HT);
        last_hs = clocks; hs_low_start = clocks; hsyncs++;
        h = 0; v++;
      end else h++;
      if (!prev_hs && VIDOUT_HSYNC_N && hs_low_start >= 0) check("hsync width", clocks - hs_low_start, 96);
      if (prev_vs && !VIDOUT_VSYNC_N) begin
        if (last_vs >= 0) check("frame period", clocks - last_vs, HT * VT);
        last_vs = clocks; vsyncs++;
        v = 0; synced = 1;
      end
      if (!prev_vs && VIDOUT_VSYNC_N && last_vs >= 0) check("vsync width", clocks - last_vs, 2 * HT);
      prev_hs = VIDOUT_HSYNC_N;
      prev_vs = VIDOUT_VSYNC_N;
      if (synced && checking) begin
        bit act, on;
        act = (h >= 145 && h <= 784 && v >= 35 && v <= 514);
        on  = act && expected_pixel(h - 145, v - 35);
        check("blank_n", int'(VIDOUT_BLANK_N), int'(act));
        checks++;
        if (VIDOUT_RED !== {10{on}} || VIDOUT_GREEN !== {10{on}} || VIDOUT_BLUE !== {10{on}}) begin
          failures++;
          if (failures < 20) $display("pixel (%0d,%0d): rgb %h, expected %0b", h - 145, v - 35, VIDOUT_RED, on);
        end
        if (act) begin
          frame_pixels++;
          if (on) white++; else black++;
          if ((h - 145) % 8 == 0 && (v - 35) % 16 == 0) begin
            logic [7:0] c;
            c = screen[((v - 35) / 16) * 80 + (h - 145) / 8];
            if (c[6:0] < 32) blank_cells++;
            if (c[7]) high_bit_cells++;
          end
        end
      end
    end
  end

  task automatic wait_frame_start();
    @(posedge Pixel_Clock);
    while (!(synced && v == 0 && h == 0)) @(posedge Pixel_Clock);
  endtask

  task automatic check_one_frame(output int pixels);
    wait_frame_start();
    frame_pixels = 0;
    checking = 1;
    while (!(v == VT - 1 && h == HT - 1)) @(posedge Pixel_Clock);
    @(posedge Pixel_Clock); #2;
    checking = 0;
    pixels = frame_pixels;
    frames_checked++;
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    int px;
    for (int i = 0; i < 2400; i++) screen[i] = 0;
    for (int k = 0; k < 128; k++) for (int y = 0; y < 16; y++) glyph[k][y] = 0;
    #1 OPB_Rst = 1;
    #200 OPB_Rst = 0;

    // Font: code k, row y at offset 0xA00 + 16 (k - 32) + y.
    for (int k = 32; k < 128; k++)
      for (int y = 0; y < 16; y++) begin
        glyph[k][y] = glyph_pattern(k, y);
        bus_write(2560 + (k - 32) * 16 + y, glyph[k][y]);
      end
    // Screen: every code 0-127, some with bit 7 set.
    for (int i = 0; i < 2400; i++)
      write_char(i, 8'(((i * 7 + i / 80) % 128) | ((i % 13 == 0) ? 8'h80 : 8'h00)));

    // Frame A: checked while the bus reads the RAMs back.
    fork
      check_one_frame(px);
      begin
        wait_frame_start();
        repeat (40 * HT) @(posedge Pixel_Clock);
        for (int i = 0; i < 400; i++) begin
          int off;
          off = $urandom_range(4095);
          if (off < 2400) bus_read(off, screen[off]);
          else if (off >= 2560) bus_read(off, glyph[32 + (off - 2560) / 16][(off - 2560) % 16]);
          else bus_read(off, 8'h00);
        end
      end
    join
    check("pixels in frame A", px, 640 * 480);

    // Foreign addresses are ignored.
    begin
      logic [31:0] q; bit acked;
      opb_xfer(BASE + 32'h1000, 1'b0, 32'h41, q, acked);
      check("foreign write not acked", int'(acked), 0);
      opb_xfer(BASE - 32'h4, 1'b1, 32'h0, q, acked);
      check("foreign read not acked", int'(acked), 0);
      bus_ignored += 2;
      bus_read(0, screen[0]);   // the foreign write left offset 0 alone
    end

    // Frame B: rewrite characters during active video.
    wait_frame_start();
    repeat (100 * HT) @(posedge Pixel_Clock);
    for (int i = 0; i < 600; i++) write_char($urandom_range(2399), 8'($urandom));
    write_char(0, 8'h7f);
    write_char(2399, 8'h20);

    // Frame C: checked against the rewritten screen.
    check_one_frame(px);
    check("pixels in frame C", px, 640 * 480);

    // Every mechanism must have happened.
    check("bus writes",  int'(bus_writes > 0), 1);
    check("bus reads",   int'(bus_reads > 0), 1);
    check("foreign addresses ignored", int'(bus_ignored > 0), 1);
    check("bus transfers during active video", int'(bus_in_active > 0), 1);
    for (int p = 0; p < 5; p++) check($sformatf("character page %0d written", p), int'(char_pages[p] > 0), 1);
    for (int p = 0; p < 3; p++) check($sformatf("font RAM %0d written", p), int'(font_pages[p] > 0), 1);
    check("white pixels", int'(white > 0), 1);
    check("black pixels", int'(black > 0), 1);
    check("control codes shown blank", int'(blank_cells > 0), 1);
    check("codes with bit 7 shown", int'(high_bit_cells > 0), 1);
    check("hsync pulses", int'(hsyncs > 2 * VT), 1);
    check("vsync pulses", int'(vsyncs >= 3), 1);
    check("frames checked", frames_checked, 2);
    $display("bus writes %0d reads %0d ignored %0d in-active %0d; white %0d black %0d; blank cells %0d bit-7 cells %0d; lines %0d frames %0d",
             bus_writes, bus_reads, bus_ignored, bus_in_active, white, black, blank_cells, high_bit_cells, hsyncs, vsyncs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
