// Testbench for sine_table: every whole angle 0..449 is looked up back to back,
// one per cycle, and each result is compared, two cycles later, with
// round(16384*sin(theta)) worked out with real arithmetic (tolerance 1 LSB).
module tb_sine_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0]         theta;
  logic signed [15:0] s;
  sine_table dut (.clk(clk), .theta_in(theta), .sin_out(s));

  function automatic int expect_sin(input int deg);
    return int'($floor($sin(real'(deg) * 3.14159265358979 / 180.0) * 16384.0 + 0.5));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  initial begin
    theta = '0;
    for (int t = 0; t < 452; t++) begin
      @(negedge clk);
      if (hist.size() >= 2) begin
        int d, e;
        d = hist.pop_front();
        e = expect_sin(d);
        checks++;
        if ((int'(s) - e > 1) || (e - int'(s) > 1)) begin
          failures++;
          $display("FAIL sin(%0d) = %0d, expected %0d", d, s, e);
        end
      end
      if (t < 450) begin
        theta = 9'(t);
        hist.push_back(t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
