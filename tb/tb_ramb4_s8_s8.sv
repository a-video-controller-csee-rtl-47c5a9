// tb_ramb4_s8_s8: self-checking test of the 512 x 8 dual-port block RAM.
//
// Port A and port B run on clocks of the same period, half a period apart,
// and each gets random operations (hold, output reset, write with reset,
// read, write-through) on a small address range so that the two ports often
// touch the same words. A reference model of the memory, updated at each
// port's clock edge, predicts both registered outputs, which are compared
// one time unit after every edge.
module tb_ramb4_s8_s8;

  logic       clka = 0, clkb = 0;
  logic       ena, rsta, wea, enb, rstb, web;
  logic [8:0] addra, addrb;
  logic [7:0] dia, dib, doa, dob;

  int checks = 0, failures = 0;
  logic [7:0] model [512];
  logic [7:0] exp_a = 0, exp_b = 0;
  int n_ops [2][5];
  int op;

  ramb4_s8_s8 dut (
    .CLKA(clka), .ENA(ena), .RSTA(rsta), .WEA(wea), .ADDRA(addra), .DIA(dia), .DOA(doa),
    .CLKB(clkb), .ENB(enb), .RSTB(rstb), .WEB(web), .ADDRB(addrb), .DIB(dib), .DOB(dob)
  );

  always #5 clka = ~clka;
  initial begin #2.5; forever #5 clkb = ~clkb; end

  // Reference model: one process per port, as in the RAM.
  always @(posedge clka) if (ena) begin
    if (rsta)     exp_a = 0;
    else if (wea) exp_a = dia;
    else          exp_a = model[addra];
    if (wea) model[addra] = dia;
  end
  always @(posedge clkb) if (enb) begin
    if (rstb)     exp_b = 0;
    else if (web) exp_b = dib;
    else          exp_b = model[addrb];
    if (web) model[addrb] = dib;
  end

  always @(posedge clka) begin
    #1;
    checks++;
    if (doa !== exp_a) begin
      failures++;
      if (failures < 10) $display("port A: got %02h expected %02h at %0t", doa, exp_a, $time);
    end
  end
  always @(posedge clkb) begin
    #1;
    checks++;
    if (dob !== exp_b) begin
      failures++;
      if (failures < 10) $display("port B: got %02h expected %02h at %0t", dob, exp_b, $time);
    end
  end

  // op: 0 hold, 1 reset, 2 write+reset, 3 read, 4 write-through
  function automatic logic [2:0] ctl(int op);
    case (op)
      0: return 3'b000;  // {en, rst, we}
      1: return 3'b110;
      2: return 3'b111;
      3: return 3'b100;
      default: return 3'b101;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 512; i++) model[i] = 0;
    {ena, rsta, wea} = 0; {enb, rstb, web} = 0;
    addra = 0; addrb = 0; dia = 0; dib = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clka);
      begin
        op = $urandom_range(4);
        n_ops[0][op]++;
        {ena, rsta, wea} = ctl(op);
        addra = 9'($urandom_range(31)) | (i[0] ? 9'h1e0 : 9'h000);
        dia   = 8'($urandom);
      end
      @(negedge clkb);
      begin
        op = $urandom_range(4);
        n_ops[1][op]++;
        {enb, rstb, web} = ctl(op);
        addrb = 9'($urandom_range(31)) | (i[1] ? 9'h1e0 : 9'h000);
        dib   = 8'($urandom);
      end
    end
    // Full-range sweep: write every word from A, read it back from B.
    @(negedge clka); {enb, rstb, web} = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clka); {ena, rsta, wea} = 3'b101; addra = 9'(i); dia = 8'(i * 7 + 3);
    end
    @(negedge clka); {ena, rsta, wea} = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clkb); {enb, rstb, web} = 3'b100; addrb = 9'(i);
    end
    @(negedge clkb); {enb, rstb, web} = 0;
    @(negedge clka);
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (n_ops[p][k] == 0) begin failures++; $display("operation %0d never used on port %0d", k, p); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
