// Threshold detector: decides whether a camera pixel has the colour of one of
// the card's coloured regions.
//
// The RGB565 pixel is widened to three 6-bit channels. The pixel is detected
// when the channel chosen by CHANNEL (0 red, 1 green, 2 blue) is at least HI and
// both other channels are at most LO. A true/false threshold test follows the
// source design; the channel rule and the default levels are this design's.
// Purely combinational.
module threshold #(
  parameter int         CHANNEL = 0,
  parameter logic [5:0] HI      = 6'd20,
  parameter logic [5:0] LO      = 6'd12
) (
  input  logic [15:0] pixel_in,
  output logic        detect_out
);
  logic [5:0] r, g, b, sel, o1, o2;
  always_comb begin
    r = {pixel_in[15:11], pixel_in[15]};
    g = pixel_in[10:5];
    b = {pixel_in[4:0], pixel_in[4]};
    case (CHANNEL)
      0:       begin sel = r; o1 = g; o2 = b; end
      1:       begin sel = g; o1 = r; o2 = b; end
      default: begin sel = b; o1 = r; o2 = g; end
    endcase
    detect_out = (sel >= HI) && (o1 <= LO) && (o2 <= LO);
  end
endmodule
