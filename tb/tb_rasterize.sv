// Testbench for rasterize: for hand-picked and random triangles the emitted
// pixels are gathered into a 64x64 map and compared with a brute-force
// reference that tests every image pixel against the triangle (sign of three
// cross products, edges included, either winding). It checks that no pixel is
// emitted twice, that depth and colour travel with each pixel, that the first
// result comes two cycles after the triangle is taken, and that a box of
// 64x64 pixels keeps the block busy 4096 cycles and one of 16x16 256 cycles.
module tb_rasterize;
  import ar_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, vin, busy, pv;
  tri2_t tin;
  frag_t pix;
  rasterize dut (.clk(clk), .rst(rst), .valid_in(vin), .tri_in(tin), .busy_out(busy), .pix_valid(pv), .pix_out(pix));

  int hits [64][64];

  always @(posedge clk) begin
    if (pv && !rst) begin
      hits[pix.y][pix.x]++;
      checks++;
      if (pix.z != tin.z || pix.color != tin.color) begin
        failures++; $display("FAIL depth/colour not carried %0d %0d %0d %0d t=%0t", pix.z, tin.z, pix.color, tin.color, $time);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint xprod(input int ax, input int ay, input int bx, input int by, input int px, input int py);
    return longint'(bx - ax) * longint'(py - ay) - longint'(by - ay) * longint'(px - ax);
  endfunction

  // returns the number of busy cycles
  task automatic run_tri(input int x0, input int y0, input int x1, input int y1, input int x2, input int y2,
                         output int busy_cycles, output int first_lat);
    int n, exp_hit, mism;
    longint c0, c1, c2, area;
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) hits[y][x] = 0;
    @(negedge clk);
    tin.v0.x = 10'(x0); tin.v0.y = 10'(y0);
    tin.v1.x = 10'(x1); tin.v1.y = 10'(y1);
    tin.v2.x = 10'(x2); tin.v2.y = 10'(y2);
    tin.z = 9'($urandom_range(1, 500)); tin.color = 10'($urandom_range(1, 1023));
    vin = 1'b1;
    @(negedge clk);
    vin = 1'b0;
    busy_cycles = 0; first_lat = -1; n = 1;
    while (busy || pv) begin
      if (busy) busy_cycles++;
      if (pv && first_lat < 0) first_lat = n;
      @(negedge clk);
      n++;
    end
    if (pv && first_lat < 0) first_lat = n;
    @(negedge clk);
    area = xprod(x0, y0, x1, y1, x2, y2);
    mism = 0;
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) begin
      c0 = xprod(x0, y0, x1, y1, x, y);
      c1 = xprod(x1, y1, x2, y2, x, y);
      c2 = xprod(x2, y2, x0, y0, x, y);
      exp_hit = (area != 0) && (((c0 >= 0) && (c1 >= 0) && (c2 >= 0)) || ((c0 <= 0) && (c1 <= 0) && (c2 <= 0)));
      if (hits[y][x] != exp_hit) mism++;
    end
    checks++;
    if (mism != 0) begin
      failures++;
      $display("FAIL triangle (%0d,%0d) (%0d,%0d) (%0d,%0d): %0d pixels differ", x0, y0, x1, y1, x2, y2, mism);
    end
  endtask

  initial begin
    int bc, fl;
    rst = 1'b1; vin = 1'b0; tin = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // full-image box: 4096 cycles
    run_tri(0, 0, 63, 0, 0, 63, bc, fl);
    checks++; if (bc != 4096) begin failures++; $display("FAIL 64x64 box busy %0d cycles", bc); end
    checks++; if (fl != 2) begin failures++; $display("FAIL first pixel after %0d cycles", fl); end
    // 16x16 box: 256 cycles, other winding
    run_tri(10, 10, 10, 25, 25, 25, bc, fl);
    checks++; if (bc != 256) begin failures++; $display("FAIL 16x16 box busy %0d cycles", bc); end
    // partly outside the image
    run_tri(-20, 5, 80, 30, 20, 90, bc, fl);
    // degenerate
    run_tri(5, 5, 20, 20, 35, 35, bc, fl);
    checks++; if (bc != 0) begin failures++; $display("FAIL zero-area triangle kept busy"); end
    // random triangles
    for (int i = 0; i < 40; i++)
      run_tri($urandom_range(0, 90) - 15, $urandom_range(0, 90) - 15, $urandom_range(0, 90) - 15,
              $urandom_range(0, 90) - 15, $urandom_range(0, 90) - 15, $urandom_range(0, 90) - 15, bc, fl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
