// Testbench for addr_picker: over the whole 1024x768 screen, the address one
// cycle later must be floor(3y/8)*240 + floor(3x/8), and in_image must be
// high exactly where floor(3x/8) < 240 and floor(3y/8) < 320.
module tb_addr_picker;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hc;
  logic [9:0]  vc;
  logic [16:0] addr;
  logic        inimg;
  addr_picker dut (.clk(clk), .hcount_in(hc), .vcount_in(vc), .addr_out(addr), .in_image_out(inimg));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fx, fy, bad, inside_n;
    bad = 0; inside_n = 0;
    for (int n = 0; n < 768 * 342; n++) begin
      int x, y;
      x = (n % 342) * 3;
      y = n / 342;
      hc = 11'(x); vc = 10'(y);
      @(negedge clk);
      fx = (3 * x) / 8; fy = (3 * y) / 8;
      checks++;
      if (inimg != (fx < 240 && fy < 320)) bad++;
      if (inimg) begin
        inside_n++;
        checks++;
        if (int'(addr) != fy * 240 + fx) bad++;
      end
    end
    failures += bad; if (bad != 0) $display("FAIL %0d mismatches", bad);
    checks++; if (inside_n == 0) begin failures++; $display("FAIL image never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
