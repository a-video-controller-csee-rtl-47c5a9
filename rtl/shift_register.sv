// shift_register: serialises one glyph row into pixels.
//
// An 8-bit register that, on every pixel clock, either loads a new glyph byte
// (load_n_shift high) or shifts left by one, filling with zero. The pixel is
// the most significant bit, so a byte loaded at the edge ending Hcount 143
// shows its bit 7 during Hcount 144, bit 6 during 145, and so on. Reset is
// asynchronous and clears the register. This follows the original design.
module shift_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_n_shift,
  input  logic [WIDTH-1:0] d,
  output logic             video_data
);

  logic [WIDTH-1:0] shift_data;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)               shift_data <= '0;
    else if (load_n_shift) shift_data <= d;
    else                   shift_data <= {shift_data[WIDTH-2:0], 1'b0};
  end

  assign video_data = shift_data[WIDTH-1];

endmodule
