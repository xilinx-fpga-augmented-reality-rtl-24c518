// Testbench for center_of_mass: over several short "frames" random pixels are
// flagged at random positions; after each frame_done the centroid reported
// must equal floor(sum x / count) and floor(sum y / count) worked out here, and
// arrive 35 cycles after frame_done. A frame with nothing flagged must give no
// result.
module tb_center_of_mass;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, vin, fd, vout;
  logic [10:0] x, xo;
  logic [9:0]  y, yo;
  center_of_mass dut (.clk(clk), .rst(rst), .x_in(x), .y_in(y), .valid_in(vin), .frame_done_in(fd),
                      .x_out(xo), .y_out(yo), .valid_out(vout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sx, sy, cnt;
    int n, npix;
    rst = 1'b1; vin = 1'b0; fd = 1'b0; x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    fd = 1'b1; @(negedge clk); fd = 1'b0;
    repeat (40) @(negedge clk);
    for (int f = 0; f < 8; f++) begin
      sx = 0; sy = 0; cnt = 0;
      npix = (f == 3) ? 0 : ((f == 5) ? 20000 : $urandom_range(1, 3000));
      for (int i = 0; i < npix; i++) begin
        x = (f == 5) ? 11'(1023) : 11'($urandom_range(0, 1023));
        y = 10'($urandom_range(0, 767));
        vin = ($urandom_range(0, 2) != 0);
        if (vin) begin sx += x; sy += y; cnt++; end
        @(negedge clk);
      end
      vin = 1'b0;
      fd = 1'b1; @(negedge clk); fd = 1'b0;
      n = 1;
      while (!vout && n < 60) begin @(negedge clk); n++; end
      if (cnt == 0) begin
        checks++;
        if (vout) begin failures++; $display("FAIL result for an empty frame"); end
      end else begin
        checks++;
        if (n != 35) begin failures++; $display("FAIL latency %0d", n); end
        checks++;
        if (longint'(xo) != sx / cnt || longint'(yo) != sy / cnt) begin
          failures++; $display("FAIL frame %0d: (%0d,%0d) expected (%0d,%0d)", f, xo, yo, sx / cnt, sy / cnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
