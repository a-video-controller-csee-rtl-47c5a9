// tb_shift_register: self-checking test of the pixel shift register.
//
// Drives random glyph bytes and a load pattern that mixes the regular
// once-every-8-clocks load of the video timing with random loads, and
// compares the pixel output after every clock with a model that keeps its
// own copy of the register.
module tb_shift_register;

  logic       clk = 0, rst = 1;
  logic       load_n_shift = 0;
  logic [7:0] d = 0;
  logic       video_data;
  logic [7:0] model = 0;
  int checks = 0, failures = 0, loads = 0, shifts = 0;

  shift_register dut (.clk, .rst, .load_n_shift, .d, .video_data);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      load_n_shift = (i < 2000) ? (i % 8 == 7) : ($urandom_range(3) == 0);
      d = 8'($urandom);
      @(posedge clk);
      if (load_n_shift) begin model = d; loads++; end
      else begin model = {model[6:0], 1'b0}; shifts++; end
      #1;
      checks++;
      if (video_data !== model[7]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: pixel %0b expected %0b", i, video_data, model[7]);
      end
    end
    // Asynchronous reset clears the register.
    @(negedge clk); load_n_shift = 1; d = 8'hff;
    @(posedge clk); #1;
    rst = 1; #1;
    checks++; if (video_data !== 1'b0) begin failures++; $display("reset did not clear"); end
    checks++; if (loads == 0 || shifts == 0) failures++;
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
