// Testbench for vga_mux: for each selection and random inputs, the 4:4:4
// output one cycle later must be the top bits of the selected source (AR
// pixel, camera pixel, detection mask, or camera with the mask painted over
// detected pixels), and black while blanking.
module tb_vga_mux;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  sel;
  logic [15:0] ar, cam;
  logic bd, md, blank;
  logic [3:0] r, g, b;
  vga_mux dut (.clk(clk), .sel_in(sel), .ar_pixel_in(ar), .cam_pixel_in(cam), .body_det_in(bd),
               .mark_det_in(md), .blank_in(blank), .vga_r(r), .vga_g(g), .vga_b(b));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e, mask;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel = 2'($urandom); ar = 16'($urandom); cam = 16'($urandom);
      bd = 1'($urandom); md = 1'($urandom); blank = ($urandom_range(0, 7) == 0);
      mask = md ? 16'hF800 : (bd ? 16'hFFFF : 16'h0000);
      case (sel)
        0: e = ar;
        1: e = cam;
        2: e = mask;
        default: e = (md || bd) ? mask : cam;
      endcase
      if (blank) e = 16'h0;
      @(negedge clk);
      checks++;
      if ({r, g, b} != (blank ? 12'h0 : {e[15:12], e[10:7], e[4:1]})) begin
        failures++; $display("FAIL sel %0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
