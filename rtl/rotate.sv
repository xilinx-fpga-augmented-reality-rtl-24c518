// Rotate: turns the camera image by 90 degrees on its way into the frame
// buffer, so that the sensor's long axis becomes the monitor's vertical axis.
//
// A pixel at camera column c, row r is written to column CAM_H-1-r, row c of a
// CAM_H-wide, CAM_W-tall image, i.e. to address c*CAM_H + (CAM_H-1-r). The
// rotation itself follows the source design; its direction, the image size and
// the 17-bit address (the source gives 12 and 16 bits in different places,
// neither of which can address a 240x320 image) are this design's choices.
// Latency: one cycle; valid and pixel travel with the address.
module rotate #(
  parameter int CAM_W = 320,
  parameter int CAM_H = 240,
  parameter int AW    = $clog2(CAM_W * CAM_H)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      valid_in,
  input  logic [15:0]               pixel_in,
  input  logic [$clog2(CAM_W)-1:0]  hcount_in,
  input  logic [$clog2(CAM_H)-1:0]  vcount_in,
  output logic                      valid_out,
  output logic [15:0]               pixel_out,
  output logic [AW-1:0]             addr_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      valid_out <= 1'b0; pixel_out <= '0; addr_out <= '0;
    end else begin
      valid_out <= valid_in;
      pixel_out <= pixel_in;
      addr_out  <= AW'(hcount_in * CAM_H + (CAM_H - 1 - int'(vcount_in)));
    end
  end
endmodule
