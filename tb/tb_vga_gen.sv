// Testbench for vga_gen: runs two full 1344 x 806 frames and checks, against
// the XGA timing worked out here, that hcount and vcount step correctly, that
// hsync is low for exactly 136 pixels starting at 1048, vsync low for 6 lines
// starting at line 771, blank high exactly outside 1024 x 768, and that
// frame_start pulses once per frame at (0,0).
module tb_vga_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, hs, vs, blank, fs;
  logic [10:0] hc;
  logic [9:0]  vc;
  vga_gen dut (.clk(clk), .rst(rst), .hcount_out(hc), .vcount_out(vc), .hsync_out(hs), .vsync_out(vs),
               .blank_out(blank), .frame_start_out(fs));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ev, bad, starts;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (!fs) @(negedge clk);
    eh = 0; ev = 0; bad = 0; starts = 0;
    for (int i = 0; i < 2 * 1344 * 806; i++) begin
      if (int'(hc) != eh || int'(vc) != ev) bad++;
      if (hs != !(eh >= 1048 && eh < 1184)) bad++;
      if (vs != !(ev >= 771 && ev < 777)) bad++;
      if (blank != (eh >= 1024 || ev >= 768)) bad++;
      if (fs != (eh == 0 && ev == 0)) bad++;
      checks += 5;
      if (fs) starts++;
      @(negedge clk);
      eh++;
      if (eh == 1344) begin eh = 0; ev = (ev == 805) ? 0 : ev + 1; end
    end
    failures += bad; if (bad != 0) $display("FAIL %0d mismatching cycles", bad);
    checks++; if (starts != 2) begin failures++; $display("FAIL %0d frame starts", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
