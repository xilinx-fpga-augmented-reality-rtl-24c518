// Recover: attaches camera raster coordinates to the captured pixel stream.
//
// Every valid pixel from the capture block is passed on together with its
// column (hcount_out) and row (vcount_out) in the camera frame. The column
// counts up to CAM_W-1 and wraps, advancing the row; a frame_done pulse
// restarts both at zero. The block's role, retrieving the 16-bit camera output
// in the 65 MHz domain, follows the source design; counting coordinates this
// way and the 320x240 frame size are this design's reading of it.
// Latency: one cycle, outputs registered.
module recover #(
  parameter int CAM_W = 320,
  parameter int CAM_H = 240
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       pixel_valid_in,
  input  logic [15:0]                pixel_in,
  input  logic                       frame_done_in,
  output logic                       valid_out,
  output logic [15:0]                pixel_out,
  output logic [$clog2(CAM_W)-1:0]   hcount_out,
  output logic [$clog2(CAM_H)-1:0]   vcount_out
);
  localparam int HW = $clog2(CAM_W);
  localparam int VW = $clog2(CAM_H);
  logic [HW-1:0] col;
  logic [VW-1:0] row;

  always_ff @(posedge clk) begin
    if (rst || frame_done_in) begin
      col <= '0; row <= '0;
      valid_out <= 1'b0;
      if (rst) begin pixel_out <= '0; hcount_out <= '0; vcount_out <= '0; end
    end else begin
      valid_out <= pixel_valid_in;
      if (pixel_valid_in) begin
        pixel_out  <= pixel_in;
        hcount_out <= col;
        vcount_out <= row;
        if (col == HW'(CAM_W - 1)) begin
          col <= '0;
          row <= (row == VW'(CAM_H - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
