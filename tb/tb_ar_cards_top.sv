// End-to-end testbench for ar_cards_top at its full size (320x240 camera,
// 1024x768 display, 12-triangle cube model).
//
// A behavioural camera streams a fixed picture: a dark mat, a green square
// card and a red mark near one corner of the card. The testbench works out,
// from its own copy of the picture and of the 8/3 display mapping, what every
// display pixel should be, which pixels count as card or mark, their centroids
// and the card angle. It then checks:
//   - the card and mark centroids and the first angle estimate;
//   - a whole frame shown before any angle is known (empty mat, overlay
//     bypassed although the render memory holds random contents): every
//     pixel must be the camera pixel;
//   - a whole frame in AR mode: every pixel must be the camera pixel, or the
//     rendered model colour (read from the design's colour memory) inside the
//     64x64 window centred on the card;
//   - a whole frame in mask mode (display selection 2);
//   - after the mark is moved to another corner, the angle must move halfway
//     towards the new direction.
// It counts how often each mechanism happened (bypass frames, projection
// stalls, z-buffer rejections, render passes, angle updates, model pixels
// shown, mode switch) and counts a failure for any that never did.
module tb_ar_cards_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, pclk, href, vsync;
  logic [7:0] data;
  logic [1:0] sw;
  logic [3:0] r, g, b;
  logic       hs, vs;
  logic [6:0] cat;
  logic [7:0] an;

  ar_cards_top dut (.clk_65mhz(clk), .rst(rst), .cam_pclk(pclk), .cam_href(href), .cam_vsync(vsync),
                    .cam_data(data), .sw(sw), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
                    .cat_out(cat), .an_out(an));

  localparam logic [15:0] MAT = 16'h2104, CARD = 16'h07E0, MARK = 16'hF800;
  localparam real PI = 3.14159265358979;

  // ---------------- the picture, in camera coordinates (column c, row r)
  int mark_dc, mark_dr;            // mark offset from the card centre
  bit show_card;                   // the card is not in view at first
  function automatic logic [15:0] picture(input int c, input int r);
    if (!show_card) return MAT;
    if (c >= 150 + mark_dc - 4 && c < 150 + mark_dc + 4 && r >= 89 + mark_dr - 4 && r < 89 + mark_dr + 4)
      return MARK;
    if (c >= 128 && c < 173 && r >= 67 && r < 112) return CARD;
    return MAT;
  endfunction

  // camera pixel behind a display position (the design's 8/3 mapping, turned)
  function automatic logic [15:0] cam_at(input int h, input int v);
    int fx, fy;
    fx = (3 * h) / 8; fy = (3 * v) / 8;
    if (fx < 240 && fy < 320) return picture(fy, 239 - fx);
    return 16'h0000;
  endfunction

  function automatic bit is_col(input logic [15:0] p, input int ch);
    int r6, g6, b6, s, o1, o2;
    r6 = int'(p[15:11]) * 2 + int'(p[15]); g6 = int'(p[10:5]); b6 = int'(p[4:0]) * 2 + int'(p[4]);
    s = (ch == 0) ? r6 : g6; o1 = (ch == 0) ? g6 : r6; o2 = b6;
    return (s >= 20) && (o1 <= 12) && (o2 <= 12);
  endfunction

  function automatic logic [11:0] to444(input logic [15:0] p);
    return {p[15:12], p[10:7], p[4:1]};
  endfunction

  function automatic logic [15:0] widen(input logic [9:0] c);
    return {c[9:7], c[9:8], c[6:3], c[6:5], c[2:0], c[2:1]};
  endfunction

  // expected centroids and angle of the current picture
  int exp_bx, exp_by, exp_mx, exp_my;
  real exp_ang;
  task automatic expect_centroids();
    longint sbx, sby, nb, smx, smy, nm;
    logic [15:0] p;
    sbx = 0; sby = 0; nb = 0; smx = 0; smy = 0; nm = 0;
    for (int v = 0; v < 768; v++) for (int h = 0; h < 1024; h++) begin
      p = cam_at(h, v);
      if (is_col(p, 1)) begin sbx += h; sby += v; nb++; end
      if (is_col(p, 0)) begin smx += h; smy += v; nm++; end
    end
    exp_bx = int'(sbx / nb); exp_by = int'(sby / nb);
    exp_mx = int'(smx / nm); exp_my = int'(smy / nm);
    exp_ang = $atan2(real'(exp_by - exp_my), real'(exp_mx - exp_bx)) * 180.0 / PI;
    if (exp_ang < 0) exp_ang += 360.0;
  endtask

  // ---------------- behavioural camera: pclk period of 4 system cycles
  task automatic cam_byte(input logic [7:0] d);
    @(negedge clk); data = d; pclk = 1'b0;
    @(negedge clk);
    @(negedge clk); pclk = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    logic [15:0] p;
    pclk = 1'b0; href = 1'b0; vsync = 1'b0; data = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    forever begin
      vsync = 1'b1; repeat (8) cam_byte(8'h00); vsync = 1'b0;
      repeat (8) cam_byte(8'h00);
      for (int row = 0; row < 240; row++) begin
        href = 1'b1;
        for (int col = 0; col < 320; col++) begin
          p = picture(col, row);
          cam_byte(p[15:8]);
          cam_byte(p[7:0]);
        end
        href = 1'b0;
        repeat (16) cam_byte(8'h00);
      end
    end
  end

  // ---------------- mechanism counters
  int n_stall, n_reject, n_pass, n_angle, n_model_px, n_bypass_frames, n_mask_frames, n_cam_frames;
  always @(posedge clk) if (!rst) begin
    if (dut.u_rp.feed_valid && !dut.u_rp.proj_ready) n_stall++;
    if (dut.u_rp.zb_reject) n_reject++;
    if (dut.u_rp.done_out) n_pass++;
    if (dut.angle_v) n_angle++;
    if (dut.cap_done) n_cam_frames++;
  end

  // ---------------- display check: pins lag vga_gen's counters by 5 cycles
  int  hh [6], vv [6];
  bit  chk_on;
  int  chk_mode;                  // 0 camera only, 1 AR, 2 mask
  int  bad_px, px_checked;
  always @(posedge clk) begin
    logic [15:0] e;
    int h, v, rx, ry;
    logic [9:0] mc;
    for (int i = 5; i > 0; i--) begin hh[i] = hh[i-1]; vv[i] = vv[i-1]; end
    hh[0] = int'(dut.hc0); vv[0] = int'(dut.vc0);
    if (chk_on && !dut.u_rp.busy_out) begin
      h = hh[5]; v = vv[5];
      if (h >= 1024 || v >= 768) e = 16'h0;
      else begin
        e = cam_at(h, v);
        if (chk_mode == 1) begin
          rx = h - int'(dut.body_x) + 32; ry = v - int'(dut.body_y) + 32;
          if (rx >= 0 && rx < 64 && ry >= 0 && ry < 64 && dut.have_angle) begin
            mc = dut.u_rp.u_color.mem[ry * 64 + rx];
            if (mc != 0) begin e = widen(mc); n_model_px++; end
          end
        end else if (chk_mode == 2) begin
          e = is_col(e, 0) ? 16'hF800 : (is_col(e, 1) ? 16'hFFFF : 16'h0000);
        end
      end
      px_checked++;
      if ({r, g, b} != to444(e)) begin
        bad_px++;
        if (bad_px < 6) $display("FAIL display (%0d,%0d) mode %0d: %h expected %h", h, v, chk_mode, {r, g, b}, to444(e));
      end
    end
  end

  task automatic wait_frame_start();
    @(negedge clk);
    while (!dut.fs0) @(negedge clk);
  endtask

  // check one whole display frame in the given mode
  task automatic check_frame(input int mode);
    wait_frame_start();
    repeat (5) @(negedge clk);
    chk_mode = mode; bad_px = 0; px_checked = 0; chk_on = 1'b1;
    repeat (1344 * 806) @(negedge clk);
    chk_on = 1'b0;
    checks++;
    if (bad_px != 0 || px_checked < 1000000) begin
      failures++;
      $display("FAIL frame in mode %0d: %0d of %0d pixels wrong", mode, bad_px, px_checked);
    end
  endtask

  task automatic chk_near(input string what, input real got, input real exp_v, input real tol);
    real d;
    d = got - exp_v;
    if (d > 180.0) d -= 360.0;
    if (d < -180.0) d += 360.0;
    checks++;
    if (d > tol || d < -tol) begin failures++; $display("FAIL %s: %0.2f expected %0.2f", what, got, exp_v); end
  endtask

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a1, m2;
    rst = 1'b1; sw = 2'd0; chk_on = 1'b0; chk_mode = 0;
    n_stall = 0; n_reject = 0; n_pass = 0; n_angle = 0; n_model_px = 0;
    n_bypass_frames = 0; n_mask_frames = 0; n_cam_frames = 0;
    mark_dc = -11; mark_dr = -11;                // up and to the right on the display
    show_card = 1'b0;
    repeat (10) @(negedge clk);
    rst = 1'b0;
    // an empty mat: no angle can be found, so the overlay stays bypassed even
    // though the render memory holds random contents
    while (n_cam_frames < 2) @(negedge clk);
    check_frame(1);
    checks++;
    if (dut.have_angle) begin failures++; $display("FAIL angle found on an empty mat"); end
    else n_bypass_frames++;
    // now the card comes into view
    show_card = 1'b1;
    expect_centroids();
    $display("expected card (%0d,%0d) mark (%0d,%0d) angle %0.1f", exp_bx, exp_by, exp_mx, exp_my, exp_ang);
    n_cam_frames = 0;
    while (n_cam_frames < 2) @(negedge clk);
    // the centroids of that frame give the first angle
    while (n_angle < 1) @(negedge clk);
    checks++;
    if (int'(dut.body_x) - exp_bx > 1 || exp_bx - int'(dut.body_x) > 1 ||
        int'(dut.body_y) - exp_by > 1 || exp_by - int'(dut.body_y) > 1) begin
      failures++; $display("FAIL card centroid (%0d,%0d)", dut.body_x, dut.body_y);
    end
    checks++;
    if (int'(dut.mark_x) - exp_mx > 1 || exp_mx - int'(dut.mark_x) > 1 ||
        int'(dut.mark_y) - exp_my > 1 || exp_my - int'(dut.mark_y) > 1) begin
      failures++; $display("FAIL mark centroid (%0d,%0d)", dut.mark_x, dut.mark_y);
    end
    chk_near("first angle", real'(dut.angle), exp_ang, 2.0);
    a1 = real'(dut.angle);
    // AR frame: camera with the model drawn over the card
    check_frame(1);
    // mask frame
    sw = 2'd2;
    check_frame(2);
    n_mask_frames++;
    sw = 2'd0;
    // move the mark to the lower-left corner and let two camera frames pass
    mark_dc = 11; mark_dr = 11;
    expect_centroids();
    m2 = exp_ang;
    n_cam_frames = 0;
    while (n_cam_frames < 2) @(negedge clk);
    // the first display frame computed wholly from the new picture
    wait_frame_start();
    wait_frame_start();
    begin
      int n0;
      n0 = n_angle;
      while (n_angle == n0) @(negedge clk);
    end
    // by now at least one blend step towards m2 happened; the estimate must
    // lie on the shorter arc from the first angle towards m2, past the midpoint
    begin
      real d_prev, d_now;
      d_prev = m2 - a1; if (d_prev > 180.0) d_prev -= 360.0; if (d_prev < -180.0) d_prev += 360.0;
      d_now  = m2 - real'(dut.angle); if (d_now > 180.0) d_now -= 360.0; if (d_now < -180.0) d_now += 360.0;
      checks++;
      if (!(d_now * d_prev >= 0.0 && (d_now < 0 ? -d_now : d_now) <= (d_prev < 0 ? -d_prev : d_prev) / 2.0 + 2.0)) begin
        failures++; $display("FAIL angle after the turn: %0d (from %0.1f towards %0.1f)", dut.angle, a1, m2);
      end
    end
    $display("stalls=%0d rejects=%0d passes=%0d angle_updates=%0d model_pixels=%0d bypass_frames=%0d mask_frames=%0d",
             n_stall, n_reject, n_pass, n_angle, n_model_px, n_bypass_frames, n_mask_frames);
    checks++; if (n_stall == 0)         begin failures++; $display("FAIL no projection stall"); end
    checks++; if (n_reject == 0)        begin failures++; $display("FAIL no z-buffer rejection"); end
    checks++; if (n_pass == 0)          begin failures++; $display("FAIL no render pass"); end
    checks++; if (n_angle < 2)          begin failures++; $display("FAIL too few angle updates"); end
    checks++; if (n_model_px == 0)      begin failures++; $display("FAIL model never shown"); end
    checks++; if (n_bypass_frames == 0) begin failures++; $display("FAIL no bypass frame"); end
    checks++; if (n_mask_frames == 0)   begin failures++; $display("FAIL no mask frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
