// Scale: produces the magnified camera pixel for the current monitor position.
//
// It takes the in-image flag from the address picker, delays it by the
// frame buffer's one-cycle read latency, and outputs the frame-buffer pixel
// where the position lies inside the magnified image and black elsewhere.
// Returning the 16-bit pixel of the 8/3-magnified image follows the source
// design; black outside the image is this design's choice.
// Timing: in_image_in one cycle before pixel_in; pixel_out registered, one
// cycle after pixel_in.
module scale (
  input  logic        clk,
  input  logic        in_image_in,
  input  logic [15:0] pixel_in,
  output logic [15:0] pixel_out
);
  logic in_image_q;
  always_ff @(posedge clk) begin
    in_image_q <= in_image_in;
    pixel_out  <= in_image_q ? pixel_in : 16'h0000;
  end
endmodule
