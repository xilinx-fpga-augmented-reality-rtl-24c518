// AR cards: a camera looks at a coloured card on a plain mat; the monitor shows
// the camera picture with a small 3D model standing on the card, drawn from the
// viewpoint that matches how the card is turned.
//
// Camera side: cam_capture -> recover -> rotate write the 320x240 camera frame,
// turned upright, into a 240x320 frame buffer.
// Display side: vga_gen scans a 1024x768 picture at 65 MHz; addr_picker and
// scale fetch the camera image magnified by 8/3. Two threshold detectors flag
// card-body (green) and mark (red) pixels; two centre-of-mass blocks average
// their positions over each frame; angle_guesser turns the two centroids into
// the card angle; angle_to_coord turns the angle into a camera location around
// the model; render_pipeline redraws the model into a 64x64 image for that
// location; render overlays that image, centred on the card, on the camera
// picture; vga_mux picks what is shown; seven_seg shows the angle (upper four
// digits) and the card's x centroid (lower three digits).
// Until the first angle has been found the overlay is bypassed and the plain
// camera picture is shown.
//
// The 65 MHz clock comes from a clock synthesizer outside this module.
// Display pipeline, counted from the vga_gen outputs: frame-buffer address
// +1 cycle, pixel +2, scaled pixel and detection +3, overlay +4, VGA pins +5;
// hsync and vsync are delayed by 5 cycles to match.
// The block structure follows the source design; the wiring details (which
// pixel stream feeds detection, the mark colour, the per-frame update) are this
// design's choices.
module ar_cards_top
  import ar_pkg::*;
(
  input  logic       clk_65mhz,
  input  logic       rst,
  input  logic       cam_pclk,
  input  logic       cam_href,
  input  logic       cam_vsync,
  input  logic [7:0] cam_data,
  input  logic [1:0] sw,            // display selection, see vga_mux
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic [6:0] cat_out,
  output logic [7:0] an_out
);
  localparam int CAM_W = 320;
  localparam int CAM_H = 240;
  localparam int FB_AW = $clog2(CAM_W * CAM_H);

  logic clk;
  assign clk = clk_65mhz;

  // ---------------- camera side
  logic        cap_valid, cap_done, rec_valid, rot_valid;
  logic [15:0] cap_pixel, rec_pixel, rot_pixel;
  logic [8:0]  rec_h;
  logic [7:0]  rec_v;
  logic [FB_AW-1:0] rot_addr;

  cam_capture u_cam (
    .clk(clk), .rst(rst), .cam_pclk(cam_pclk), .cam_href(cam_href), .cam_vsync(cam_vsync),
    .cam_data(cam_data), .pixel_valid_out(cap_valid), .pixel_out(cap_pixel), .frame_done_out(cap_done));

  recover #(.CAM_W(CAM_W), .CAM_H(CAM_H)) u_recover (
    .clk(clk), .rst(rst), .pixel_valid_in(cap_valid), .pixel_in(cap_pixel), .frame_done_in(cap_done),
    .valid_out(rec_valid), .pixel_out(rec_pixel), .hcount_out(rec_h), .vcount_out(rec_v));

  rotate #(.CAM_W(CAM_W), .CAM_H(CAM_H)) u_rotate (
    .clk(clk), .rst(rst), .valid_in(rec_valid), .pixel_in(rec_pixel), .hcount_in(rec_h),
    .vcount_in(rec_v), .valid_out(rot_valid), .pixel_out(rot_pixel), .addr_out(rot_addr));

  // ---------------- display side
  logic [10:0] hc0;
  logic [9:0]  vc0;
  logic        hs0, vs0, blank0, fs0;

  vga_gen u_vga (
    .clk(clk), .rst(rst), .hcount_out(hc0), .vcount_out(vc0), .hsync_out(hs0),
    .vsync_out(vs0), .blank_out(blank0), .frame_start_out(fs0));

  // delay lines for the scan position and sync signals
  logic [10:0] hc_d [1:3];
  logic [9:0]  vc_d [1:3];
  logic [5:1]  hs_d, vs_d;
  logic [4:1]  blank_d;
  logic [3:1]  fs_d;
  always_ff @(posedge clk) begin
    hc_d[1] <= hc0;     vc_d[1] <= vc0;
    hc_d[2] <= hc_d[1]; vc_d[2] <= vc_d[1];
    hc_d[3] <= hc_d[2]; vc_d[3] <= vc_d[2];
    hs_d    <= {hs_d[4:1], hs0};
    vs_d    <= {vs_d[4:1], vs0};
    blank_d <= {blank_d[3:1], blank0};
    fs_d    <= {fs_d[2:1], fs0};
  end

  logic [FB_AW-1:0] fb_rd_addr;
  logic             in_image;
  logic [15:0]      fb_pixel, cam_pixel;

  addr_picker #(.FB_W(CAM_H), .FB_H(CAM_W)) u_pick (
    .clk(clk), .hcount_in(hc0), .vcount_in(vc0), .addr_out(fb_rd_addr), .in_image_out(in_image));

  frame_buffer #(.WIDTH(16), .DEPTH(CAM_W * CAM_H)) u_fb (
    .clk(clk), .wr_en(rot_valid), .wr_addr(rot_addr), .wr_data(rot_pixel),
    .rd_addr(fb_rd_addr), .rd_data(fb_pixel));

  scale u_scale (.clk(clk), .in_image_in(in_image), .pixel_in(fb_pixel), .pixel_out(cam_pixel));

  // ---------------- card detection (all at delay 3)
  logic body_det, mark_det;
  threshold #(.CHANNEL(1), .HI(6'd20), .LO(6'd12)) u_th_body (.pixel_in(cam_pixel), .detect_out(body_det));
  threshold #(.CHANNEL(0), .HI(6'd20), .LO(6'd12)) u_th_mark (.pixel_in(cam_pixel), .detect_out(mark_det));

  logic [10:0] body_x, mark_x;
  logic [9:0]  body_y, mark_y;
  logic        body_v, mark_v;

  center_of_mass u_com_body (
    .clk(clk), .rst(rst), .x_in(hc_d[3]), .y_in(vc_d[3]), .valid_in(body_det && !blank_d[3]),
    .frame_done_in(fs_d[3]), .x_out(body_x), .y_out(body_y), .valid_out(body_v));
  center_of_mass u_com_mark (
    .clk(clk), .rst(rst), .x_in(hc_d[3]), .y_in(vc_d[3]), .valid_in(mark_det && !blank_d[3]),
    .frame_done_in(fs_d[3]), .x_out(mark_x), .y_out(mark_y), .valid_out(mark_v));

  // both centroids of a frame are ready in the same cycle; a frame missing
  // either one does not update the angle
  logic [8:0] angle;
  logic       angle_v, have_angle;
  angle_guesser u_angle (
    .clk(clk), .rst(rst), .body_x(body_x), .body_y(body_y), .mark_x(mark_x), .mark_y(mark_y),
    .valid_in(body_v && mark_v), .angle_out(angle), .valid_out(angle_v));

  always_ff @(posedge clk) begin
    if (rst)          have_angle <= 1'b0;
    else if (angle_v) have_angle <= 1'b1;
  end

  campos_t cam_pos;
  logic    cam_pos_v;
  angle_to_coord u_a2c (
    .clk(clk), .rst(rst), .angle_in(angle), .valid_in(angle_v), .cam_out(cam_pos), .valid_out(cam_pos_v));

  // ---------------- rendering and overlay
  logic [IMG_AW-1:0]  model_addr;
  logic [COLOR_W-1:0] model_color;
  logic               rp_busy, rp_done;

  render_pipeline u_rp (
    .clk(clk), .rst(rst), .cam_valid(cam_pos_v), .cam_in(cam_pos),
    .rd_addr(model_addr), .rd_color(model_color), .busy_out(rp_busy), .done_out(rp_done));

  logic [15:0] ar_pixel;
  logic        model_shown;
  render u_render (
    .clk(clk), .enable_in(have_angle), .hcount_in(hc_d[2]), .vcount_in(vc_d[2]),
    .base_x(body_x), .base_y(body_y), .model_addr(model_addr), .model_color(model_color),
    .cam_pixel_in(cam_pixel), .pixel_out(ar_pixel), .model_shown_out(model_shown));

  logic [15:0] cam_pixel_d;
  logic        body_det_d, mark_det_d;
  always_ff @(posedge clk) begin
    cam_pixel_d <= cam_pixel;
    body_det_d  <= body_det;
    mark_det_d  <= mark_det;
  end

  vga_mux u_mux (
    .clk(clk), .sel_in(sw), .ar_pixel_in(ar_pixel), .cam_pixel_in(cam_pixel_d),
    .body_det_in(body_det_d), .mark_det_in(mark_det_d), .blank_in(blank_d[4]),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b));

  assign vga_hs = hs_d[5];
  assign vga_vs = vs_d[5];

  seven_seg u_seg (
    .clk(clk), .rst(rst), .val_in({7'd0, angle, 5'd0, body_x}), .cat_out(cat_out), .an_out(an_out));
endmodule
