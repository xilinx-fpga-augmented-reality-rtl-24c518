// Testbench for model_rom: reads the default cube model and checks the
// structure every line must have: all coordinates are +-16, each triangle lies
// in one face plane of the cube, the two triangles of a face share its colour,
// and the read holds while en is low.
module tb_model_rom;
  import ar_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic [3:0] addr;
  logic [63:0] data;
  model_rom dut (.clk(clk), .en(en), .addr(addr), .data(data));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tri3_t t;
    logic [9:0] prev_col;
    en = 1'b1; addr = '0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      addr = 4'(i);
      @(negedge clk);
      t = tri3_t'(data);
      begin
        vert3_t v [3];
        int same_x, same_y, same_z;
        v[0] = t.v0; v[1] = t.v1; v[2] = t.v2;
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (!((v[k].x == 16 || v[k].x == -16) && (v[k].y == 16 || v[k].y == -16) && (v[k].z == 16 || v[k].z == -16))) begin
            failures++; $display("FAIL line %0d vertex %0d not a cube corner", i, k);
          end
        end
        same_x = (v[0].x == v[1].x) && (v[1].x == v[2].x);
        same_y = (v[0].y == v[1].y) && (v[1].y == v[2].y);
        same_z = (v[0].z == v[1].z) && (v[1].z == v[2].z);
        checks++;
        if (same_x + same_y + same_z != 1) begin failures++; $display("FAIL line %0d not on one face", i); end
      end
      checks++;
      if (t.color == 0) begin failures++; $display("FAIL line %0d colour 0", i); end
      if (i % 2 == 1) begin
        checks++;
        if (t.color != prev_col) begin failures++; $display("FAIL face %0d colours differ", i / 2); end
      end
      prev_col = t.color;
    end
    // hold while en is low
    en = 1'b0; addr = 4'd0;
    @(negedge clk);
    checks++;
    t = tri3_t'(data);
    if (t.color != prev_col) begin failures++; $display("FAIL data changed with en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
