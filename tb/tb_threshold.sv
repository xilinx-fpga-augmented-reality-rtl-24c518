// Testbench for threshold: a green detector (CHANNEL 1) and a red detector
// (CHANNEL 0) see every possible RGB565 value; each decision is compared with
// the rule worked out here on 6-bit channels (chosen >= 20, others <= 12).
module tb_threshold;
  int checks = 0, failures = 0;
  logic [15:0] p;
  logic g_det, r_det;
  threshold #(.CHANNEL(1)) dut_g (.pixel_in(p), .detect_out(g_det));
  threshold #(.CHANNEL(0)) dut_r (.pixel_in(p), .detect_out(r_det));

  initial begin
    int bad, ng, nr, r6, g6, b6;
    bad = 0; ng = 0; nr = 0;
    for (int v = 0; v < 65536; v++) begin
      p = 16'(v);
      #1;
      r6 = ((v >> 11) & 31) * 2 + (((v >> 15) & 1));
      g6 = (v >> 5) & 63;
      b6 = (v & 31) * 2 + ((v >> 4) & 1);
      if (g_det != (g6 >= 20 && r6 <= 12 && b6 <= 12)) bad++;
      if (r_det != (r6 >= 20 && g6 <= 12 && b6 <= 12)) bad++;
      checks += 2;
      ng += g_det; nr += r_det;
    end
    failures += bad; if (bad != 0) $display("FAIL %0d wrong decisions", bad);
    checks++; if (ng == 0 || nr == 0) begin failures++; $display("FAIL detector never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
