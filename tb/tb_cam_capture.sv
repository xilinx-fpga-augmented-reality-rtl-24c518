// Testbench for cam_capture: a behavioural camera drives pclk (period of 8
// system cycles), href, vsync and bytes for a small frame of known pixels,
// including bytes outside href that must be ignored. Every captured pixel must
// equal the sent one, in order, and each vsync rise must give exactly one
// frame_done pulse.
module tb_cam_capture;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, pclk, href, vsync, pv, fd;
  logic [7:0]  data;
  logic [15:0] pix;
  cam_capture dut (.clk(clk), .rst(rst), .cam_pclk(pclk), .cam_href(href), .cam_vsync(vsync), .cam_data(data),
                   .pixel_valid_out(pv), .pixel_out(pix), .frame_done_out(fd));

  logic [15:0] sent [$];
  int frames;
  always @(posedge clk) if (!rst) begin
    if (pv) begin
      checks++;
      if (sent.size() == 0) begin failures++; $display("FAIL extra pixel %h", pix); end
      else begin
        logic [15:0] e;
        e = sent.pop_front();
        if (e != pix) begin failures++; $display("FAIL pixel %h expected %h", pix, e); end
      end
    end
    if (fd) frames++;
  end

  task automatic pclk_cycle(input logic [7:0] b);
    data = b;
    repeat (4) @(negedge clk);
    pclk = 1'b1;
    repeat (4) @(negedge clk);
    pclk = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] p;
    rst = 1'b1; pclk = 1'b0; href = 1'b0; vsync = 1'b0; data = '0; frames = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      vsync = 1'b1; repeat (3) pclk_cycle(8'hAA); vsync = 1'b0;
      for (int r = 0; r < 6; r++) begin
        href = 1'b0; repeat (3) pclk_cycle(8'h55);   // blanking bytes
        href = 1'b1;
        for (int c = 0; c < 10; c++) begin
          p = 16'($urandom);
          sent.push_back(p);
          pclk_cycle(p[15:8]);
          pclk_cycle(p[7:0]);
        end
      end
      href = 1'b0; repeat (3) pclk_cycle(8'h00);
    end
    vsync = 1'b1; repeat (3) pclk_cycle(8'hAA); vsync = 1'b0;
    repeat (20) @(negedge clk);
    checks++; if (sent.size() != 0) begin failures++; $display("FAIL %0d pixels lost", sent.size()); end
    checks++; if (frames != 4) begin failures++; $display("FAIL %0d frame_done pulses", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
