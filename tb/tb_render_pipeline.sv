// Testbench for render_pipeline.
// A cube whose faces have different colours is rendered from four headings
// (0, 90, 180, 270 degrees). The face seen in the middle of the image must be
// the one facing the camera (red, blue, green, yellow), the top face (white)
// must show above it, the image corner must stay transparent, and the
// projection must stall and the z-buffer both replace and reject pixels at
// least once. A location sent during a pass must start a second pass. A second
// instance renders one triangle whose bounding-box corner is covered and
// checks the 14 cycles from the first model read to the first colour write.
module tb_render_pipeline;
  import ar_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, cv, busy, done;
  campos_t cam;
  logic [11:0] ra;
  logic [9:0]  rc;
  render_pipeline dut (.clk(clk), .rst(rst), .cam_valid(cv), .cam_in(cam), .rd_addr(ra), .rd_color(rc),
                       .busy_out(busy), .done_out(done));

  logic cv1, busy1, done1;
  logic [9:0] rc1;
  render_pipeline #(.N_TRI(1), .FILE("tb/one_tri.hex")) dut1 (
    .clk(clk), .rst(rst), .cam_valid(cv1), .cam_in(cam), .rd_addr(12'd0), .rd_color(rc1),
    .busy_out(busy1), .done_out(done1));

  localparam real PI = 3.14159265358979;
  int stalls, rejects, dones;
  always @(posedge clk) if (!rst) begin
    if (dut.feed_valid && !dut.proj_ready) stalls++;
    if (dut.zb_reject) rejects++;
    if (done) dones++;
  end

  function automatic int rnd(input real r);
    return int'($floor(r + 0.5));
  endfunction

  task automatic set_cam(input int th);
    real t;
    t = real'(th) * PI / 180.0;
    cam.x     = 9'(rnd(49.0 * $cos(t)));
    cam.y     = 9'(rnd(49.0 * $sin(t)));
    cam.z     = 8'd41;
    cam.sin_t = 16'(rnd(16384.0 * $sin(t)));
    cam.cos_t = 16'(rnd(16384.0 * $cos(t)));
  endtask

  task automatic read_px(input int x, input int y, output int c);
    @(negedge clk);
    ra = 12'(y * 64 + x);
    @(negedge clk);
    c = int'(rc);
  endtask

  task automatic chk(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int heads [4] = '{0, 90, 180, 270};
  int faces [4] = '{'h380, 'h007, 'h078, 'h3F8};
  initial begin
    int c, n, t0, t1;
    rst = 1'b1; cv = 1'b0; cv1 = 1'b0; ra = '0; cam = '0;
    stalls = 0; rejects = 0; dones = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (heads[i]) begin
      set_cam(heads[i]);
      @(negedge clk); cv = 1'b1; @(negedge clk); cv = 1'b0;
      while (!done) @(negedge clk);
      read_px(32, 32, c); chk($sformatf("heading %0d centre", heads[i]), c, faces[i]);
      read_px(32, 25, c); chk($sformatf("heading %0d top face", heads[i]), c, 'h3FF);
      read_px(0, 0, c);   chk($sformatf("heading %0d corner", heads[i]), c, 0);
    end
    checks++; if (stalls == 0)  begin failures++; $display("FAIL projection never stalled"); end
    checks++; if (rejects == 0) begin failures++; $display("FAIL z-buffer never rejected"); end
    // a location arriving during a pass starts another pass
    n = dones;
    set_cam(45);
    @(negedge clk); cv = 1'b1; @(negedge clk); cv = 1'b0;
    repeat (100) @(negedge clk);
    cv = 1'b1; @(negedge clk); cv = 1'b0;
    while (dones < n + 2) @(negedge clk);
    chk("second pass ran", dones - n, 2);
    // latency: first model read to first colour write
    set_cam(0);
    @(negedge clk); cv1 = 1'b1; @(negedge clk); cv1 = 1'b0;
    t0 = -1; t1 = -1; n = 0;
    while (t1 < 0 && n < 20000) begin
      if (dut1.rom_en && t0 < 0) t0 = n;
      if (dut1.color_we && !dut1.zb_busy && t1 < 0) t1 = n;
      @(negedge clk); n++;
    end
    chk("model read to first colour write", t1 - t0, 14);
    while (!done1) @(negedge clk);
    $display("stalls=%0d rejects=%0d passes=%0d", stalls, rejects, dones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
