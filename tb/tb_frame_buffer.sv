// Testbench for frame_buffer (default 76800 x 16): random writes are mirrored
// in a testbench array; reads must return the mirrored word one cycle later,
// including a read of the address being written in the same cycle, which must
// return the old word.
module tb_frame_buffer;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [16:0] wa, ra;
  logic [15:0] wd, rd;
  frame_buffer dut (.clk(clk), .wr_en(we), .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(rd));

  logic [15:0] mirror [int];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, expv;
    we = 1'b0; wa = '0; ra = '0; wd = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = (i < 16) ? i : ((i < 32) ? 76800 - 1 - i : $urandom_range(0, 76799));
      we = 1'b1; wa = 17'(a); wd = 16'($urandom); mirror[a] = wd;
    end
    // reads; every fourth also writes the same address
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = mirror.num() > 0 ? i : 0;
      if (!mirror.exists(a)) begin we = 1'b0; continue; end
      ra = 17'(a);
      we = (i % 4 == 0); wa = 17'(a); wd = 16'($urandom);
      expv = int'(mirror[a]);
      if (we) mirror[a] = wd;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (int'(rd) != expv) begin failures++; $display("FAIL addr %0d: %h expected %h", a, rd, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
