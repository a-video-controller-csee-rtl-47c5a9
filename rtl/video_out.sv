// video_out: the output register that drives the video DAC.
//
// Gates the pixel bit with horizontal and vertical blanking and registers the
// result as full-scale white (all ones on red, green and blue) or black. The
// composite blank, HBLANK_N and VBLANK_N, is registered beside it so the DAC
// sees colour and blank change together, one pixel clock after the pixel bit.
// Reset is asynchronous and gives black with blank asserted. The AND of pixel
// and blank and the 10-bit DAC words follow the original design; registering
// the blank every cycle is this design's choice.
module video_out #(
  parameter int unsigned DAC_BITS = 10
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                video_data,
  input  logic                hblank_n,
  input  logic                vblank_n,
  output logic [DAC_BITS-1:0] red,
  output logic [DAC_BITS-1:0] green,
  output logic [DAC_BITS-1:0] blue,
  output logic                blank_n
);

  logic active, pixel_on;
  assign active   = hblank_n & vblank_n;
  assign pixel_on = video_data & active;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      blank_n <= 1'b0;
      red     <= '0;
      green   <= '0;
      blue    <= '0;
    end else begin
      blank_n <= active;
      red     <= {DAC_BITS{pixel_on}};
      green   <= {DAC_BITS{pixel_on}};
      blue    <= {DAC_BITS{pixel_on}};
    end
  end

endmodule
