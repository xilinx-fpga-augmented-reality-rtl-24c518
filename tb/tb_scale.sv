// Testbench for scale: random pixels and in-image flags; the output must be
// the pixel where the flag of one cycle before it was high, black otherwise,
// and it must appear one cycle after the pixel.
module tb_scale;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic inimg;
  logic [15:0] pin, pout;
  scale dut (.clk(clk), .in_image_in(inimg), .pixel_in(pin), .pixel_out(pout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic f_prev, f_prev2;
    logic [15:0] p_prev;
    inimg = 1'b0; pin = '0; f_prev = 1'b0; f_prev2 = 1'b0; p_prev = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        checks++;
        if (pout != (f_prev ? pin : 16'h0)) begin
          failures++; $display("FAIL cycle %0d: %h", i, pout);
        end
      end
      f_prev2 = f_prev; f_prev = inimg; p_prev = pin;
      inimg = 1'($urandom); pin = 16'($urandom) | 16'h1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
