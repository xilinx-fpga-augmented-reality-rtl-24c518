// Testbench for seven_seg (COUNT_W = 6, eight cycles per digit): over two full
// scans exactly one anode is active at a time, in order, and the segments show
// the hex digit of that position, checked against a segment table written out
// here.
module tb_seven_seg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst;
  logic [31:0] val;
  logic [6:0] cat;
  logic [7:0] an;
  seven_seg #(.COUNT_W(6)) dut (.clk(clk), .rst(rst), .val_in(val), .cat_out(cat), .an_out(an));

  // segments {g,f,e,d,c,b,a} lit for each hex digit
  logic [6:0] lit [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, seen;
    rst = 1'b1; val = 32'h0123_ABCD;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    seen = 0;
    for (int i = 0; i < 2 * 64 + 64; i++) begin
      if (i == 128) val = 32'hFEDC_9876;
      #1;
      d = -1;
      for (int k = 0; k < 8; k++) if (an == ~(8'b1 << k)) d = k;
      checks++;
      if (d < 0) begin failures++; $display("FAIL anodes %b", an); end
      else begin
        checks += 2;
        if (d != (i / 8) % 8) begin failures++; $display("FAIL digit %0d at cycle %0d", d, i); end
        if (cat != ~lit[val[4*d +: 4]]) begin failures++; $display("FAIL segments of digit %0d", d); end
        seen |= (1 << d);
      end
      @(negedge clk);
    end
    checks++; if (seen != 255) begin failures++; $display("FAIL not all digits shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
