// Testbench for recover (small 6x4 frame): streams pixels with random gaps and
// checks that each comes out one cycle later with the right column and row,
// that rows wrap after CAM_W pixels, and that frame_done restarts counting.
module tb_recover;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 6, H = 4;
  logic rst, vin, fd, vout;
  logic [15:0] pin, pout;
  logic [2:0] hc;
  logic [1:0] vc;
  recover #(.CAM_W(W), .CAM_H(H)) dut (.clk(clk), .rst(rst), .pixel_valid_in(vin), .pixel_in(pin),
    .frame_done_in(fd), .valid_out(vout), .pixel_out(pout), .hcount_out(hc), .vcount_out(vc));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst = 1'b1; vin = 1'b0; fd = 1'b0; pin = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      fd = 1'b1; @(negedge clk); fd = 1'b0;
      // the last frame is cut short to show that frame_done restarts counting
      n = (f == 1) ? 7 : W * H;
      for (int i = 0; i < n; i++) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        vin = 1'b1; pin = 16'(f * 1000 + i);
        @(negedge clk);
        vin = 1'b0;
        checks++;
        if (!vout || pout != 16'(f * 1000 + i) || int'(hc) != i % W || int'(vc) != i / W) begin
          failures++;
          $display("FAIL frame %0d pixel %0d: v=%b p=%0d h=%0d v=%0d", f, i, vout, pout, hc, vc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
