// tb_char_ram: self-checking test of the 2.5K character array.
//
// Fills all five pages through the bus port (port A) with a pattern derived
// from the address, then: reads random addresses over the whole 12-bit range
// through the video port with a one-clock load strobe and checks the code
// (zero above 2559); checks that the video output holds while load is low
// and the address changes; reads every page back through the bus port with
// the other pages held in reset, so the ORed output must equal the one page;
// and rewrites words while the video side reads. The two ports use
// unrelated clocks.
module tb_char_ram;

  logic       clka = 0, clkb = 0;
  logic [4:0] ena = '1, rsta = '1, wea = '0;
  logic [8:0] addra = 0;
  logic [7:0] dia = 0, doa;
  logic       load = 0;
  logic [11:0] char_addr = 0;
  logic [7:0] char_data;
  logic [7:0] model [4096];
  int checks = 0, failures = 0, out_of_range = 0;
  int page_reads [5];

  char_ram dut (.clka, .ena, .rsta, .wea, .addra, .dia, .doa, .clkb, .load, .char_addr, .char_data);

  always #5 clka = ~clka;
  always #7 clkb = ~clkb;

  function automatic logic [7:0] pattern(int a);
    return 8'((a * 37) ^ (a >> 5) ^ 8'h5a);
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %02h expected %02h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic bus_write(int a, logic [7:0] d);
    @(negedge clka);
    addra = 9'(a % 512); dia = d; wea = 5'(1 << (a / 512)); rsta = '1;
    @(negedge clka);
    wea = '0;
    model[a] = d;
  endtask

  task automatic video_read(int a);
    @(negedge clkb);
    char_addr = 12'(a); load = 1;
    @(negedge clkb);
    load = 0;
    check($sformatf("video read %0d", a), char_data, a < 2560 ? model[a] : 8'h00);
    if (a >= 2560) out_of_range++; else page_reads[a / 512]++;
    // Output holds while load is low, whatever the address does.
    char_addr = 12'($urandom);
    @(negedge clkb);
    check("video hold", char_data, a < 2560 ? model[a] : 8'h00);
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) model[a] = 0;
    for (int a = 0; a < 2560; a++) bus_write(a, pattern(a));
    for (int i = 0; i < 3000; i++) video_read(i < 2560 ? i : int'($urandom_range(4095)));
    // Bus-side read-back: the selected page leaves reset, the rest stay at 0.
    for (int a = 0; a < 2560; a += 7) begin
      @(negedge clka);
      addra = 9'(a % 512); rsta = ~5'(1 << (a / 512));
      @(negedge clka);
      rsta = '1;
      check($sformatf("bus read %0d", a), doa, model[a]);
      @(negedge clka);
      check("bus idle", doa, 8'h00);
    end
    // Writes from the bus interleaved with reads from the video side.
    for (int i = 0; i < 500; i++) begin
      int a;
      a = $urandom_range(2559);
      bus_write(a, 8'($urandom));
      video_read(a);
    end
    for (int p = 0; p < 5; p++) begin
      checks++; if (page_reads[p] == 0) begin failures++; $display("page %0d never read", p); end
    end
    checks++; if (out_of_range == 0) failures++;
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
