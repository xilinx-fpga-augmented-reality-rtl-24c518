// VGA mux: picks what the monitor shows and drives the 12-bit VGA colour pins.
//
// sel_in = 0 shows the augmented image (camera with the rendered model on top),
// 1 the plain magnified camera image, 2 a mask of the detected card body
// (white) and card marks (red), 3 the camera image with detected pixels painted
// over it. Outside the active area the output is black. Choosing the monitor's
// pixel source follows the source design; the four selections and the
// RGB565-to-4:4:4 truncation are this design's. Latency: one cycle.
module vga_mux (
  input  logic        clk,
  input  logic [1:0]  sel_in,
  input  logic [15:0] ar_pixel_in,
  input  logic [15:0] cam_pixel_in,
  input  logic        body_det_in,
  input  logic        mark_det_in,
  input  logic        blank_in,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b
);
  logic [15:0] mask, p;
  always_comb begin
    mask = mark_det_in ? 16'hF800 : (body_det_in ? 16'hFFFF : 16'h0000);
    case (sel_in)
      2'd0: p = ar_pixel_in;
      2'd1: p = cam_pixel_in;
      2'd2: p = mask;
      default: p = (mark_det_in || body_det_in) ? mask : cam_pixel_in;
    endcase
  end

  always_ff @(posedge clk) begin
    if (blank_in) begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end else begin
      vga_r <= p[15:12];
      vga_g <= p[10:7];
      vga_b <= p[4:1];
    end
  end
endmodule
