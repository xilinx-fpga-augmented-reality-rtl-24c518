// Address picker: finds the frame-buffer word behind a monitor position.
//
// The camera image is shown magnified by 8/3, so a monitor position (h, v)
// shows frame-buffer column (3h)>>3 and row (3v)>>3. in_image_out says whether
// that lies inside the FB_W x FB_H image. The 8/3 factor and the hcount/vcount
// widths follow the source design; the truncating arithmetic and the 17-bit
// address are this design's choices. Latency: one cycle.
module addr_picker #(
  parameter int FB_W = 240,
  parameter int FB_H = 320,
  parameter int AW   = $clog2(FB_W * FB_H)
) (
  input  logic          clk,
  input  logic [10:0]   hcount_in,
  input  logic [9:0]    vcount_in,
  output logic [AW-1:0] addr_out,
  output logic          in_image_out
);
  logic [10:0] fx, fy;
  always_comb begin
    fx = 11'((13'(hcount_in) * 13'd3) >> 3);
    fy = 11'((13'(vcount_in) * 13'd3) >> 3);
  end

  always_ff @(posedge clk) begin
    in_image_out <= (fx < 11'(FB_W)) && (fy < 11'(FB_H));
    addr_out     <= AW'(fy * FB_W + fx);
  end
endmodule
