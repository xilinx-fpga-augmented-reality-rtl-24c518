// Testbench for angle_to_coord: for a set of angles the camera position and
// sin/cos outputs are compared with values from real arithmetic
// (x = round(64*cos40)*cos(theta), etc., within 1 unit) and valid_out must
// come exactly four cycles after valid_in.
module tb_angle_to_coord;
  import ar_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, vin, vout;
  logic [8:0] ang;
  campos_t cam;
  angle_to_coord dut (.clk(clk), .rst(rst), .angle_in(ang), .valid_in(vin), .cam_out(cam), .valid_out(vout));

  function automatic int rnd(input real r);
    return int'($floor(r + 0.5));
  endfunction

  task automatic chk(input string what, input int got, input int exp_v, input int tol);
    checks++;
    if ((got - exp_v > tol) || (exp_v - got > tol)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int angles [10] = '{0, 30, 45, 90, 135, 180, 200, 270, 315, 359};
  initial begin
    real rc, rs, t;
    int n;
    rc = 64.0 * $cos(40.0 * 3.14159265358979 / 180.0);
    rs = 64.0 * $sin(40.0 * 3.14159265358979 / 180.0);
    rst = 1'b1; vin = 1'b0; ang = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (angles[i]) begin
      @(negedge clk);
      ang = 9'(angles[i]); vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      n = 1;
      while (!vout) begin @(negedge clk); n++; end
      chk("latency", n, 4, 0);
      t = real'(angles[i]) * 3.14159265358979 / 180.0;
      chk("x", int'(cam.x), rnd(real'(rnd(rc)) * $cos(t)), 1);
      chk("y", int'(cam.y), rnd(real'(rnd(rc)) * $sin(t)), 1);
      chk("z", int'(cam.z), rnd(rs), 0);
      chk("sin", int'(cam.sin_t), rnd(16384.0 * $sin(t)), 1);
      chk("cos", int'(cam.cos_t), rnd(16384.0 * $cos(t)), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
