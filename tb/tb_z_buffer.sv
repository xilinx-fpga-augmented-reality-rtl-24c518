// Testbench for z_buffer: after a clear (which must take 4096 cycles and write
// colour 0 everywhere) random pixels are streamed, many of them back to back
// at the same address. A reference depth and colour map kept by the testbench
// decides which pixels must win; now and then a pair is sent to a fresh
// address whose second pixel is farther than the first but nearer than the
// stored depth, which only the forwarding path gets right; the colour writes coming out of the block are
// applied to a second map, and both maps must agree at the end. Rejections
// must also happen, and the number of colour writes must equal the number of
// pixels the reference says are nearer than everything before them (a late
// overwrite could otherwise hide a wrong write).
module tb_z_buffer;
  import ar_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, clr, busy, pv, pbusy, we, rej;
  frag_t pin;
  logic [11:0] waddr;
  logic [9:0]  wdata;
  z_buffer dut (.clk(clk), .rst(rst), .clear_in(clr), .busy_out(busy), .pix_valid(pv), .pix_in(pin),
                .pipe_busy_out(pbusy), .color_we(we), .color_addr(waddr), .color_data(wdata), .reject_out(rej));

  int ref_d [4096], ref_c [4096], got_c [4096];
  int rejects, wins, exp_wins;

  always @(posedge clk) begin
    if (rst) ;
    else if (we) begin
      got_c[waddr] = int'(wdata);
      if (!busy) wins++;
    end
    if (rej && !rst) rejects++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int addr, int depth, logic valid);
    pin.x = 6'(addr % 64); pin.y = 6'(addr / 64);
    pin.z = 9'(depth);
    pin.color = 10'($urandom_range(1, 1023));
    pv = valid;
    if (pv && (depth < ref_d[addr])) begin ref_d[addr] = depth; ref_c[addr] = int'(pin.color); exp_wins++; end
    @(negedge clk);
  endtask

  initial begin
    int n, a, z, mism;
    rst = 1'b1; clr = 1'b0; pv = 1'b0; pin = '0; rejects = 0; wins = 0; exp_wins = 0;
    for (int i = 0; i < 4096; i++) begin ref_d[i] = 511; ref_c[i] = 0; got_c[i] = 777; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    checks++; if (n != 4096) begin failures++; $display("FAIL clear took %0d cycles", n); end
    a = 0;
    for (int i = 0; i < 6000; i++) begin
      if ($urandom_range(0, 7) == 0) begin
        // a pair at a fresh random address: the second pixel is farther
        // than the first but nearer than what was stored before
        a = $urandom_range(0, 4095);
        z = $urandom_range(0, 400);
        send(a, z, 1'b1);
        send(a, z + $urandom_range(1, 100), 1'b1);
      end else begin
        // mostly a small set of addresses so that hits repeat often
        if ($urandom_range(0, 3) != 0) a = $urandom_range(0, 15) * 67;
        else a = $urandom_range(0, 4095);
        send(a, $urandom_range(0, 510), ($urandom_range(0, 4) != 0));
      end
    end
    pv = 1'b0;
    repeat (3) @(negedge clk);
    mism = 0;
    for (int i = 0; i < 4096; i++) if (got_c[i] != ref_c[i]) mism++;
    checks++;
    if (mism != 0) begin failures++; $display("FAIL %0d colour entries differ", mism); end
    checks++;
    if (wins != exp_wins) begin failures++; $display("FAIL %0d depth wins, expected %0d", wins, exp_wins); end
    checks++;
    if (rejects == 0) begin failures++; $display("FAIL no pixel was rejected"); end
    // a second clear resets everything to colour 0
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    while (busy) @(negedge clk);
    mism = 0;
    for (int i = 0; i < 4096; i++) if (got_c[i] != 0) mism++;
    checks++;
    if (mism != 0) begin failures++; $display("FAIL clear left %0d entries", mism); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
