// Render: lays the rendered model over the camera picture on the monitor.
//
// The 64x64 render image is placed on the monitor centred on (base_x, base_y),
// the centroid of the card. For a monitor position inside that square the
// block reads the render image (model_addr, one cycle of memory latency) and,
// where the stored colour is not 0, outputs it widened from R3 G4 B3 to RGB565;
// everywhere else, and whenever enable_in is low, the camera pixel passes. The
// choice between camera pixel and model pixel from hcount, vcount and the image
// base location follows the source design; the 1:1 placement, colour 0 as
// transparent and the colour widening are this design's choices.
// Timing: hcount_in/vcount_in in cycle t, cam_pixel_in in cycle t+1,
// pixel_out registered in cycle t+2.
module render
  import ar_pkg::*;
(
  input  logic               clk,
  input  logic               enable_in,
  input  logic [10:0]        hcount_in,
  input  logic [9:0]         vcount_in,
  input  logic [10:0]        base_x,
  input  logic [9:0]         base_y,
  output logic [IMG_AW-1:0]  model_addr,
  input  logic [COLOR_W-1:0] model_color,
  input  logic [15:0]        cam_pixel_in,
  output logic [15:0]        pixel_out,
  output logic               model_shown_out   // pixel_out came from the model
);
  logic signed [12:0] rx, ry;
  logic               in_win, in_win_q;
  logic [15:0]        mc;

  always_comb begin
    rx = $signed({2'b0, hcount_in}) - $signed({2'b0, base_x}) + 13'sd32;
    ry = $signed({3'b0, vcount_in}) - $signed({3'b0, base_y}) + 13'sd32;
    in_win = (rx >= 0) && (rx < 13'sd64) && (ry >= 0) && (ry < 13'sd64);
    model_addr = {ry[5:0], rx[5:0]};
    // R3 G4 B3 -> R5 G6 B5 by repeating the top bits
    mc = {model_color[9:7], model_color[9:8], model_color[6:3], model_color[6:5],
          model_color[2:0], model_color[2:1]};
  end

  always_ff @(posedge clk) begin
    in_win_q <= in_win && enable_in;
    if (in_win_q && (model_color != '0)) begin
      pixel_out       <= mc;
      model_shown_out <= 1'b1;
    end else begin
      pixel_out       <= cam_pixel_in;
      model_shown_out <= 1'b0;
    end
  end
endmodule
