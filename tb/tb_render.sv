// Testbench for render: a model image in which pixel (x,y) has colour
// (x + 64*y) mod 1024 (so colour 0 at (0,0) is transparent) is served with one
// cycle of latency. Scanning a region around the card centre, the output two
// cycles after each position must be the widened model colour inside the
// 64x64 window centred on the base position and the camera pixel elsewhere,
// at transparent pixels, and whenever enable is low.
module tb_render;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, shown;
  logic [10:0] hc, bx;
  logic [9:0]  vc, by;
  logic [11:0] maddr;
  logic [9:0]  mcol;
  logic [15:0] cam, pout;
  render dut (.clk(clk), .enable_in(en), .hcount_in(hc), .vcount_in(vc), .base_x(bx), .base_y(by),
              .model_addr(maddr), .model_color(mcol), .cam_pixel_in(cam), .pixel_out(pout), .model_shown_out(shown));

  always_ff @(posedge clk) mcol <= 10'(maddr);   // colour = address

  function automatic logic [15:0] widen(input logic [9:0] c);
    int r, g, b;
    r = (c >> 7) & 7; g = (c >> 3) & 15; b = c & 7;
    return 16'(((r * 4 + r / 2) << 11) | ((g * 4 + g / 4) << 5) | (b * 4 + b / 2));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [$], ys [$], ens [$], bad, nmodel;
    logic [15:0] cams [$];
    bx = 11'd300; by = 10'd200; bad = 0; nmodel = 0;
    for (int n = 0; n < 100 * 100 + 2; n++) begin
      @(negedge clk);
      // check the position presented two cycles ago
      if (xs.size() == 2) begin
        int x, y, e, rx, ry;
        logic [15:0] cp, expv;
        x = xs.pop_front(); y = ys.pop_front(); e = ens.pop_front(); cp = cams.pop_front();
        rx = x - 300 + 32; ry = y - 200 + 32;
        if (e != 0 && rx >= 0 && rx < 64 && ry >= 0 && ry < 64 && (ry * 64 + rx) % 1024 != 0) begin
          expv = widen(10'((ry * 64 + rx) % 1024));
          nmodel++;
        end else expv = cp;
        checks++;
        if (pout != expv) begin
          bad++;
          if (bad < 5) $display("FAIL (%0d,%0d): %h expected %h", x, y, pout, expv);
        end
      end
      // the camera pixel belongs to the position presented one cycle ago
      cam = 16'($urandom);
      if (n > 0 && n <= 100 * 100) cams.push_back(cam);
      if (n < 100 * 100) begin
        hc = 11'(250 + n % 100); vc = 10'(150 + n / 100);
        en = (n / 100) % 10 != 7;
        xs.push_back(hc); ys.push_back(vc); ens.push_back(en);
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d pixels wrong", bad); end
    checks++;
    if (nmodel == 0) begin failures++; $display("FAIL model never shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
