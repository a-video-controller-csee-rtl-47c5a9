// ramb4_s8_s8: 512 x 8 true dual-port block RAM.
//
// Two fully independent synchronous ports, A and B, each with its own clock,
// enable (EN), synchronous output reset (RST), write enable (WE), 9-bit
// address, 8-bit write data and registered 8-bit read data. On a rising clock
// edge with EN high:
//   RST=1 WE=0  output register cleared, memory untouched
//   RST=1 WE=1  word written, output register cleared
//   RST=0 WE=0  output register loaded with the addressed word
//   RST=0 WE=1  word written and shown on the output (write-through)
// With EN low the output register holds. The port names and this table
// follow the FPGA primitive the controller was built on; the memory is
// written here as a plain array so that any tool can infer it. Contents and
// output registers power up at zero, which is this design's choice. If both
// ports write one address in the same instant the result is undefined in
// hardware; a read of a word the other port writes at the same time returns
// the old word.
//
// Both ports write the one array, so the two port processes are plain always
// blocks (always_ff would forbid a second writer). Lint tools report the array
// as driven from two clocks; that is what a true dual-port RAM is, and
// synthesis maps it to a single two-port memory.
module ramb4_s8_s8 #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             CLKA,
  input  logic             ENA,
  input  logic             RSTA,
  input  logic             WEA,
  input  logic [AW-1:0]    ADDRA,
  input  logic [WIDTH-1:0] DIA,
  output logic [WIDTH-1:0] DOA,

  input  logic             CLKB,
  input  logic             ENB,
  input  logic             RSTB,
  input  logic             WEB,
  input  logic [AW-1:0]    ADDRB,
  input  logic [WIDTH-1:0] DIB,
  output logic [WIDTH-1:0] DOB
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    DOA = '0;
    DOB = '0;
  end

  always @(posedge CLKA) begin
    if (ENA) begin
      if (WEA) mem[ADDRA] <= DIA;
      if (RSTA)     DOA <= '0;
      else if (WEA) DOA <= DIA;
      else          DOA <= mem[ADDRA];
    end
  end

  always @(posedge CLKB) begin
    if (ENB) begin
      if (WEB) mem[ADDRB] <= DIB;
      if (RSTB)     DOB <= '0;
      else if (WEB) DOB <= DIB;
      else          DOB <= mem[ADDRB];
    end
  end

endmodule
