// Rasterizer: finds the pixels of the 64x64 render image covered by a projected
// triangle, testing one pixel per cycle.
//
// When a triangle is taken, its three edge functions E = A*x + B*y + C are set
// up for the vertex pairs (v0,v1), (v1,v2), (v2,v0) with
//   A = y_i - y_j,  B = x_j - x_i,  C = x_i*y_j - x_j*y_i,
// together with the bounding box of the vertices, clipped to the image. The box
// is then scanned row by row, one pixel per cycle; a pixel whose three edge
// values are all >= 0 or all <= 0 is sent on with the triangle's depth and
// colour. Edge functions, the bounding box and one pixel per cycle (4096 cycles
// for a box covering the image) follow the source design. Accepting both
// windings and the pixels on an edge, clipping the box and skipping triangles
// of zero area are this design's choices.
//
// Handshake: a triangle is taken when valid_in is high and busy_out is low;
// busy_out stays high until the last pixel of its box has been tested. The
// first pixel's result appears two cycles after the triangle is taken and a
// box of W x H pixels keeps the block busy for W*H cycles.
module rasterize
  import ar_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  valid_in,
  input  tri2_t tri_in,
  output logic  busy_out,
  output logic  pix_valid,
  output frag_t pix_out
);
  typedef logic signed [31:0] s32_t;

  s32_t xs [3], ys [3];
  s32_t a_d [3], b_d [3], c_d [3];
  s32_t a_q [3], b_q [3], c_q [3];
  s32_t xmin, xmax, ymin, ymax, area;
  logic [5:0] x_lo, x_hi, y_hi;
  logic [5:0] cx, cy;
  logic [DEPTH_W-1:0] z_q;
  logic [COLOR_W-1:0] col_q;
  logic accept, box_ok;

  function automatic s32_t clip(input s32_t val);
    if (val < 0)        return 0;
    if (val > IMG - 1)  return IMG - 1;
    return val;
  endfunction

  always_comb begin
    xs[0] = s32_t'(tri_in.v0.x); ys[0] = s32_t'(tri_in.v0.y);
    xs[1] = s32_t'(tri_in.v1.x); ys[1] = s32_t'(tri_in.v1.y);
    xs[2] = s32_t'(tri_in.v2.x); ys[2] = s32_t'(tri_in.v2.y);
    for (int k = 0; k < 3; k++) begin
      a_d[k] = ys[k] - ys[(k + 1) % 3];
      b_d[k] = xs[(k + 1) % 3] - xs[k];
      c_d[k] = xs[k] * ys[(k + 1) % 3] - xs[(k + 1) % 3] * ys[k];
    end
    area = c_d[0] + c_d[1] + c_d[2];             // twice the signed area
    xmin = xs[0]; xmax = xs[0]; ymin = ys[0]; ymax = ys[0];
    for (int k = 1; k < 3; k++) begin
      if (xs[k] < xmin) xmin = xs[k];
      if (xs[k] > xmax) xmax = xs[k];
      if (ys[k] < ymin) ymin = ys[k];
      if (ys[k] > ymax) ymax = ys[k];
    end
    box_ok = (xmax >= 0) && (ymax >= 0) && (xmin <= IMG - 1) && (ymin <= IMG - 1) && (area != 0);
    accept = valid_in && !busy_out;
  end

  // edge values at the current scan position
  s32_t e [3];
  logic in_tri;
  always_comb begin
    for (int k = 0; k < 3; k++)
      e[k] = a_q[k] * s32_t'({26'd0, cx}) + b_q[k] * s32_t'({26'd0, cy}) + c_q[k];
    in_tri = ((e[0] >= 0) && (e[1] >= 0) && (e[2] >= 0)) ||
             ((e[0] <= 0) && (e[1] <= 0) && (e[2] <= 0));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_out <= 1'b0; pix_valid <= 1'b0; pix_out <= '0;
      cx <= '0; cy <= '0; x_lo <= '0; x_hi <= '0; y_hi <= '0;
    end else begin
      pix_valid <= 1'b0;
      if (accept && box_ok) begin
        a_q <= a_d; b_q <= b_d; c_q <= c_d;
        x_lo <= 6'(clip(xmin)); x_hi <= 6'(clip(xmax));
        y_hi <= 6'(clip(ymax));
        cx <= 6'(clip(xmin)); cy <= 6'(clip(ymin));
        z_q <= tri_in.z; col_q <= tri_in.color;
        busy_out <= 1'b1;
      end else if (busy_out) begin
        pix_valid     <= in_tri;
        pix_out.x     <= cx;
        pix_out.y     <= cy;
        pix_out.z     <= z_q;
        pix_out.color <= col_q;
        if (cx == x_hi) begin
          cx <= x_lo;
          if (cy == y_hi) busy_out <= 1'b0;
          else            cy <= cy + 1'b1;
        end else begin
          cx <= cx + 1'b1;
        end
      end
    end
  end
endmodule
