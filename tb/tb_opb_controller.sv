// tb_opb_controller: self-checking test of the OPB slave RAM controller.
//
// A bus-functional OPB master raises select with address, data and RNW,
// waits for xferAck and then drops select. Behind the controller sits a
// model of the eight always-enabled 512 x 8 RAMs (output cleared while RST is
// high, loaded from memory when RST is low, written when WE is high). The
// test writes random bytes to random addresses of the 4K window, reads them
// back, and checks: the read data in all four byte lanes, that every
// transfer is acknowledged exactly four OPB clocks after select rises, that
// each transfer pulses WE or releases RST on exactly one RAM for exactly one
// clock, that the data bus is zero whenever there is no acknowledge, and
// that addresses outside the window are never acknowledged and touch no RAM.
module tb_opb_controller;

  localparam logic [31:0] BASE = 32'hFEFF1000;   // the controller's default window

  logic        clk = 0, rst = 0;
  logic [31:0] abus = 0, dbus = 0;
  logic        rnw = 0, select_i = 0;
  logic [31:0] sl_dbus;
  logic        sl_xfer_ack;
  logic [7:0]  ram_rst, ram_we;
  logic [8:0]  ram_addr;
  logic [7:0]  ram_di, read_data;

  logic [7:0] mem [8][512];
  logic [7:0] dout [8];
  logic [7:0] model [4096];
  int checks = 0, failures = 0;
  int we_pulses = 0, rst_releases = 0, reads = 0, writes = 0, ignored = 0;
  int page_hits [8];

  opb_controller dut (
    .clk, .rst, .abus, .dbus, .rnw, .select_i, .sl_dbus, .sl_xfer_ack,
    .ram_rst, .ram_we, .ram_addr, .ram_di, .read_data
  );

  always #5 clk = ~clk;

  // RAM model.
  always @(posedge clk) begin
    for (int p = 0; p < 8; p++) begin
      if (ram_rst[p]) dout[p] <= 8'h00;
      else            dout[p] <= ram_we[p] ? ram_di : mem[p][ram_addr];
      if (ram_we[p])  mem[p][ram_addr] <= ram_di;
    end
  end
  always_comb begin
    read_data = 0;
    for (int p = 0; p < 8; p++) read_data |= dout[p];
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // Per-clock monitor of the RAM strobes and the idle data bus.
  always @(negedge clk) if (!rst) begin
    we_pulses    += $countones(ram_we);
    rst_releases += $countones(~ram_rst);
    if (!sl_xfer_ack) check("sl_dbus while idle", int'(sl_dbus), 0);
  end

  task automatic opb_xfer(logic [31:0] a, logic r, logic [31:0] d,
                          output logic [31:0] q, output int lat, output bit acked);
    @(posedge clk); #1;
    abus = a; rnw = r; dbus = d; select_i = 1;
    lat = 0; acked = 0; q = 0;
    while (!acked && lat < 16) begin
      @(negedge clk);
      lat++;
      if (sl_xfer_ack) begin acked = 1; q = sl_dbus; end
    end
    @(posedge clk); #1;
    select_i = 0; abus = 0; dbus = 0; rnw = 0;
  endtask

  task automatic do_write(int off, logic [7:0] d);
    logic [31:0] q; int lat; bit acked; int w0, r0;
    w0 = we_pulses; r0 = rst_releases;
    opb_xfer(BASE + 32'(off), 1'b0, {24'h0, d}, q, lat, acked);
    check("write acked", int'(acked), 1);
    check("write latency", lat, 4);
    check("one WE pulse", we_pulses - w0, 1);
    check("no RST release on write", rst_releases - r0, 0);
    model[off] = d; writes++; page_hits[off / 512]++;
  endtask

  task automatic do_read(int off);
    logic [31:0] q; int lat; bit acked; int w0, r0;
    w0 = we_pulses; r0 = rst_releases;
    opb_xfer(BASE + 32'(off), 1'b1, 32'hdeadbeef, q, lat, acked);
    check("read acked", int'(acked), 1);
    check("read latency", lat, 4);
    check($sformatf("read data %03h", off), int'(q), int'({4{model[off]}}));
    check("no WE on read", we_pulses - w0, 0);
    check("one RST release", rst_releases - r0, 1);
    reads++;
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin
      dout[p] = 0;
      for (int i = 0; i < 512; i++) mem[p][i] = 0;
    end
    for (int i = 0; i < 4096; i++) model[i] = 0;
    #1 rst = 1;
    #20 rst = 0;
    // Every page, first and last byte.
    for (int p = 0; p < 8; p++) begin
      do_write(p * 512, 8'(p + 1));
      do_write(p * 512 + 511, 8'(8'h80 | p));
    end
    for (int p = 0; p < 8; p++) begin
      do_read(p * 512);
      do_read(p * 512 + 511);
    end
    for (int i = 0; i < 600; i++) begin
      int off;
      off = $urandom_range(4095);
      if ($urandom_range(1)) do_write(off, 8'($urandom));
      else                   do_read(off);
    end
    // Outside the window: never acknowledged, no RAM touched.
    foreach (ignored_addrs[i]) begin
      logic [31:0] q; int lat; bit acked; int w0, r0;
      w0 = we_pulses; r0 = rst_releases;
      opb_xfer(ignored_addrs[i], 1'(i % 2), 32'h55, q, lat, acked);
      check("foreign address not acked", int'(acked), 0);
      check("foreign address: no RAM access", (we_pulses - w0) + (rst_releases - r0), 0);
      ignored++;
    end
    for (int p = 0; p < 8; p++) check($sformatf("page %0d used", p), int'(page_hits[p] > 0), 1);
    check("reads and writes and ignored", int'(reads > 0 && writes > 0 && ignored > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ignored_addrs [4] = '{32'hFEFF2000, 32'hFEFF0FFC, 32'h00001000, 32'hFEFE1000};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
