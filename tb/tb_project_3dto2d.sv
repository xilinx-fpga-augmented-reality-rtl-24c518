// Testbench for project_3dto2d: the twelve cube triangles are projected for
// several camera headings and compared with a floating-point reference of the
// same camera model (screen coordinates within 1 pixel, depth within 1). It
// checks the 10-cycle latency of a lone triangle, and then streams triangles
// while the downstream ready is randomly withheld, checking that results come
// out in order, none is lost or repeated, and ready_out drops during a stall.
module tb_project_3dto2d;
  import ar_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, vin, rdy_out, vout, rdy_in, busy;
  tri3_t tin;
  tri2_t tout;
  campos_t cam;
  project_3dto2d dut (.clk(clk), .rst(rst), .valid_in(vin), .ready_out(rdy_out), .tri_in(tin),
                      .cam_in(cam), .valid_out(vout), .ready_in(rdy_in), .tri_out(tout), .busy_out(busy));

  localparam real PI = 3.14159265358979;
  tri3_t model [12];
  initial $readmemh("rtl/model_cube.hex", model);

  function automatic int rnd(input real r);
    return int'($floor(r + 0.5));
  endfunction

  // reference: screen x, y and depth of one vertex
  task automatic ref_vert(input vert3_t v, input int th, output int sx, output int sy, output int d);
    real t, p, dx, dy, dz, a, x, y, dd;
    int xi, yi;
    t = real'(th) * PI / 180.0;
    p = 40.0 * PI / 180.0;
    dx = real'(v.x) - real'(cam.x);
    dy = real'(v.y) - real'(cam.y);
    dz = real'(v.z) - real'(cam.z);
    a  = $cos(t) * dx + $sin(t) * dy;
    x  = $cos(t) * dy - $sin(t) * dx;
    y  = $cos(p) * dz - $sin(p) * a;
    dd = -($cos(p) * a + $sin(p) * dz);
    xi = rnd(x); yi = rnd(y); d = rnd(dd);
    if (d < 1) d = 1;
    sx = 32 + (xi * 32) / d;
    sy = 32 - (yi * 32) / d;
  endtask

  task automatic set_cam(input int th);
    real t;
    t = real'(th) * PI / 180.0;
    cam.x     = 9'(rnd(49.0 * $cos(t)));
    cam.y     = 9'(rnd(49.0 * $sin(t)));
    cam.z     = 8'd41;
    cam.sin_t = 16'(rnd(16384.0 * $sin(t)));
    cam.cos_t = 16'(rnd(16384.0 * $cos(t)));
  endtask

  task automatic chk(input string what, input int got, input int exp_v, input int tol);
    checks++;
    if ((got - exp_v > tol) || (exp_v - got > tol)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic check_out(input int idx, input int th);
    int sx, sy, d, zmin;
    vert3_t v [3];
    vert2_t o [3];
    v[0] = model[idx].v0; v[1] = model[idx].v1; v[2] = model[idx].v2;
    o[0] = tout.v0; o[1] = tout.v1; o[2] = tout.v2;
    zmin = 1000;
    for (int k = 0; k < 3; k++) begin
      ref_vert(v[k], th, sx, sy, d);
      chk($sformatf("tri %0d v%0d x", idx, k), int'(o[k].x), sx, 1);
      chk($sformatf("tri %0d v%0d y", idx, k), int'(o[k].y), sy, 1);
      if (d < zmin) zmin = d;
    end
    chk($sformatf("tri %0d z", idx), int'(tout.z), zmin, 1);
    chk($sformatf("tri %0d colour", idx), int'(tout.color), int'(model[idx].color), 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int headings [4] = '{0, 90, 215, 300};
  int stalls_seen;
  initial begin
    int n, sent, got;
    rst = 1'b1; vin = 1'b0; rdy_in = 1'b1; tin = '0; cam = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // latency of a lone triangle
    set_cam(0);
    @(negedge clk);
    tin = model[0]; vin = 1'b1;
    @(negedge clk);
    vin = 1'b0;
    n = 1;
    while (!vout) begin @(negedge clk); n++; end
    chk("latency", n, 10, 0);
    check_out(0, 0);
    @(negedge clk);
    // streams with random backpressure
    stalls_seen = 0;
    foreach (headings[h]) begin
      set_cam(headings[h]);
      sent = 0; got = 0;
      while (got < 12) begin
        // drive inputs for this cycle
        vin = (sent < 12) && ($urandom_range(0, 3) != 0);
        tin = model[(sent < 12) ? sent : 0];
        rdy_in = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (vout && rdy_in) begin
          check_out(got, headings[h]);
          got++;
        end
        if (vin && rdy_out) sent++;
        if (!rdy_out) stalls_seen++;
        @(negedge clk);
      end
      vin = 1'b0;
      rdy_in = 1'b1;
      repeat (12) @(negedge clk);
      chk("pipeline empty", int'(busy), 0, 0);
    end
    checks++;
    if (stalls_seen == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
