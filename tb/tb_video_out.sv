// tb_video_out: self-checking test of the DAC output register.
//
// Applies random pixel and blanking inputs and checks, one clock later, that
// red, green and blue are all ones exactly when the pixel was 1 inside the
// active area, and that BLANK_N is the AND of the two blanking inputs. Also
// checks the reset values.
module tb_video_out;

  logic       clk = 0, rst = 0;
  logic       video_data = 0, hblank_n = 0, vblank_n = 0;
  logic [9:0] red, green, blue;
  logic       blank_n;
  int checks = 0, failures = 0, whites = 0, gated = 0;

  video_out dut (.clk, .rst, .video_data, .hblank_n, .vblank_n, .red, .green, .blue, .blank_n);

  always #5 clk = ~clk;

  initial begin
    #1 rst = 1;
    #1;
    checks++;
    if (blank_n !== 1'b0 || red !== '0 || green !== '0 || blue !== '0) begin
      failures++; $display("reset values wrong");
    end
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      logic on, act;
      @(negedge clk);
      video_data = 1'($urandom); hblank_n = 1'($urandom); vblank_n = 1'($urandom);
      act = hblank_n && vblank_n;
      on  = video_data && act;
      if (on) whites++;
      if (video_data && !act) gated++;
      @(posedge clk); #1;
      checks++;
      if (red !== {10{on}} || green !== {10{on}} || blue !== {10{on}} || blank_n !== act) begin
        failures++;
        if (failures < 10) $display("cycle %0d: rgb %h %h %h blank_n %b, expected on=%b act=%b",
                                    i, red, green, blue, blank_n, on, act);
      end
    end
    checks++; if (whites == 0 || gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
