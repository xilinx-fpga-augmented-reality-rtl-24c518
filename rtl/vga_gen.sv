// VGA generator: 1024x768 display timing for a 65 MHz pixel clock.
//
// hcount_out runs over a 1344-pixel line and vcount_out over an 806-line frame;
// hsync and vsync are active-low pulses after the front porches, and blank_out
// is high outside the 1024x768 active area. frame_start_out pulses when the
// counters are at (0,0). Supplying sync and the x/y position to the rest of the
// system follows the source design; the porch and sync widths are the standard
// XGA values (24/136/160 pixels, 3/6/29 lines), chosen here. All outputs are
// registered and mutually aligned.
module vga_gen #(
  parameter int H_ACTIVE = 1024,
  parameter int H_FP     = 24,
  parameter int H_SYNC   = 136,
  parameter int H_TOTAL  = 1344,
  parameter int V_ACTIVE = 768,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 6,
  parameter int V_TOTAL  = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount_out,
  output logic [9:0]  vcount_out,
  output logic        hsync_out,
  output logic        vsync_out,
  output logic        blank_out,
  output logic        frame_start_out
);
  logic [10:0] h;
  logic [9:0]  v;

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0; v <= '0;
    end else if (h == 11'(H_TOTAL - 1)) begin
      h <= '0;
      v <= (v == 10'(V_TOTAL - 1)) ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount_out <= '0; vcount_out <= '0;
      hsync_out <= 1'b1; vsync_out <= 1'b1; blank_out <= 1'b1; frame_start_out <= 1'b0;
    end else begin
      hcount_out      <= h;
      vcount_out      <= v;
      hsync_out       <= !((h >= 11'(H_ACTIVE + H_FP)) && (h < 11'(H_ACTIVE + H_FP + H_SYNC)));
      vsync_out       <= !((v >= 10'(V_ACTIVE + V_FP)) && (v < 10'(V_ACTIVE + V_FP + V_SYNC)));
      blank_out       <= (h >= 11'(H_ACTIVE)) || (v >= 10'(V_ACTIVE));
      frame_start_out <= (h == '0) && (v == '0);
    end
  end
endmodule
