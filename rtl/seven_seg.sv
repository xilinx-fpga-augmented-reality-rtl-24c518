// Seven-segment converter: shows a 32-bit value as eight hexadecimal digits on
// the board's multiplexed display.
//
// A free-running counter picks one digit at a time; its top three bits select
// the anode (an_out, active low) and the matching nibble, which is decoded to
// segments cat_out = {g,f,e,d,c,b,a}, active low. With COUNT_W = 17 each digit
// is lit for 16384 cycles, refreshing the display at about 500 Hz from 65 MHz.
// Driving the board's digit display follows the source design; the hex coding
// and refresh rate are this design's choices.
module seven_seg #(
  parameter int COUNT_W = 17
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] val_in,
  output logic [6:0]  cat_out,
  output logic [7:0]  an_out
);
  logic [COUNT_W-1:0] cnt;
  logic [2:0]         digit;
  logic [3:0]         nib;
  logic [6:0]         seg;   // {g,f,e,d,c,b,a}, active high

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  always_comb begin
    digit = cnt[COUNT_W-1 -: 3];
    nib   = val_in[4*digit +: 4];
    case (nib)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;
    endcase
    cat_out = ~seg;
    an_out  = ~(8'b1 << digit);
  end
endmodule
