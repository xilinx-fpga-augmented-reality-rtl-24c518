// Testbench for angle_guesser. With the body centroid fixed and the mark placed
// 40 pixels away at a known direction (screen y pointing down, angle counted
// anticlockwise), the first estimate must be that direction within 1 degree.
// Each later estimate must lie halfway between the previous estimate and the
// new direction along the shorter arc (within 1 degree), including across the
// 0/360 wrap; valid_out must follow valid_in by 15 cycles.
module tb_angle_guesser;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, vin, vout;
  logic [10:0] bx, mx;
  logic [9:0]  by, my;
  logic [8:0]  ang;
  angle_guesser dut (.clk(clk), .rst(rst), .body_x(bx), .body_y(by), .mark_x(mx), .mark_y(my),
                     .valid_in(vin), .angle_out(ang), .valid_out(vout));

  localparam real PI = 3.14159265358979;

  function automatic int wrapd(input int a);
    int r;
    r = a % 360;
    return (r < 0) ? r + 360 : r;
  endfunction

  function automatic int angdiff(input int a, input int b);   // a - b in (-180,180]
    int d;
    d = wrapd(a - b);
    return (d > 180) ? d - 360 : d;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dirs [10] = '{30, 30, 30, 100, 200, 350, 10, 10, 180, 270};
  initial begin
    int n, prev, expv, meas;
    real t;
    rst = 1'b1; vin = 1'b0; bx = 11'd500; by = 10'd400; mx = '0; my = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (dirs[i]) begin
      t = real'(dirs[i]) * PI / 180.0;
      mx = 11'(500 + int'($floor(40.0 * $cos(t) + 0.5)));
      my = 10'(400 - int'($floor(40.0 * $sin(t) + 0.5)));
      meas = dirs[i];
      @(negedge clk); vin = 1'b1; @(negedge clk); vin = 1'b0;
      n = 1;
      while (!vout) begin @(negedge clk); n++; end
      checks++;
      if (n != 15) begin failures++; $display("FAIL latency %0d", n); end
      if (i == 0) expv = meas;
      else        expv = wrapd(prev + angdiff(meas, prev) / 2);
      checks++;
      if (angdiff(int'(ang), expv) > 1 || angdiff(int'(ang), expv) < -1) begin
        failures++; $display("FAIL step %0d: angle %0d expected %0d", i, ang, expv);
      end
      prev = int'(ang);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
