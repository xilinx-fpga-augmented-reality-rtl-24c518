// Testbench for rotate (default 320x240): every camera position must map to a
// distinct address below 76800, and sample positions must land where a
// 90-degree turn puts them (column c, row r -> c*240 + 239 - r), one cycle
// later, with valid and pixel alongside.
module tb_rotate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, vin, vout;
  logic [15:0] pin, pout;
  logic [8:0] hc;
  logic [7:0] vc;
  logic [16:0] addr;
  rotate dut (.clk(clk), .rst(rst), .valid_in(vin), .pixel_in(pin), .hcount_in(hc), .vcount_in(vc),
              .valid_out(vout), .pixel_out(pout), .addr_out(addr));

  bit used [76800];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dup;
    rst = 1'b1; vin = 1'b0; pin = '0; hc = '0; vc = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    dup = 0;
    for (int c = 0; c < 320; c++) for (int r = 0; r < 240; r += 7) begin
      hc = 9'(c); vc = 8'(r); vin = 1'b1; pin = 16'(c ^ r);
      @(negedge clk);
      checks++;
      if (int'(addr) != c * 240 + 239 - r || !vout || pout != 16'(c ^ r)) begin
        failures++;
        if (failures < 5) $display("FAIL (%0d,%0d) -> %0d", c, r, addr);
      end
      if (int'(addr) < 76800) begin
        if (used[addr]) dup++;
        used[addr] = 1'b1;
      end else dup++;
    end
    checks++;
    if (dup != 0) begin failures++; $display("FAIL %0d repeated or out-of-range addresses", dup); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
