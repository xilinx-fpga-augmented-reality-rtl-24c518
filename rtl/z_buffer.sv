// Z-buffer: keeps, for every pixel of the 64x64 render image, only the colour
// of the nearest triangle.
//
// A depth memory (4096 x 9 bits) sits inside the block; the colour memory is
// outside and is written through the color_* port. An incoming pixel reads the
// stored depth at its address in one cycle; in the next cycle its depth is
// compared with it and, if the stored depth is larger (the new pixel is
// nearer), both depth and colour are written. The value written in the
// previous cycle is forwarded to the compare so two pixels in a row at the same
// address are handled correctly. A pulse on clear_in starts a sweep of 4096
// cycles (busy_out high) that sets every depth to the far value 511 and every
// colour to 0, which the display treats as transparent.
// Separate depth and colour memories, read-then-conditional-write and a full
// throughput of one pixel per cycle follow the source design; the clear sweep
// and the forwarding are this design's choices.
// Timing: a pixel presented in cycle t is written (if nearer) at the end of
// cycle t+1; pipe_busy_out is high while a pixel is in the compare stage.
module z_buffer
  import ar_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               clear_in,
  output logic               busy_out,
  input  logic               pix_valid,
  input  frag_t              pix_in,
  output logic               pipe_busy_out,
  output logic               color_we,
  output logic [IMG_AW-1:0]  color_addr,
  output logic [COLOR_W-1:0] color_data,
  output logic               reject_out      // a pixel lost the depth test
);
  logic [DEPTH_W-1:0] depth_mem [IMG * IMG];
  logic [IMG_AW-1:0]  clr_cnt;
  logic               s1_v;
  frag_t              s1;
  logic [DEPTH_W-1:0] rd_q, old_d;
  logic               fwd_v;
  logic [IMG_AW-1:0]  fwd_addr;
  logic [DEPTH_W-1:0] fwd_d;
  logic [IMG_AW-1:0]  s1_addr;
  logic               wr;

  always_comb begin
    s1_addr    = {s1.y, s1.x};
    old_d      = (fwd_v && (fwd_addr == s1_addr)) ? fwd_d : rd_q;
    wr         = s1_v && (s1.z < old_d);
    reject_out = s1_v && !wr;
    color_we   = busy_out || wr;
    color_addr = busy_out ? clr_cnt : s1_addr;
    color_data = busy_out ? '0 : s1.color;
    pipe_busy_out = s1_v;
  end

  always_ff @(posedge clk) begin
    rd_q <= depth_mem[{pix_in.y, pix_in.x}];
    if (busy_out) depth_mem[clr_cnt] <= '1;
    else if (wr)  depth_mem[s1_addr] <= s1.z;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_out <= 1'b0; clr_cnt <= '0; s1_v <= 1'b0; s1 <= '0;
      fwd_v <= 1'b0; fwd_addr <= '0; fwd_d <= '0;
    end else begin
      s1_v  <= pix_valid && !busy_out;
      s1    <= pix_in;
      fwd_v    <= wr;
      fwd_addr <= s1_addr;
      fwd_d    <= s1.z;
      if (clear_in && !busy_out) begin
        busy_out <= 1'b1;
        clr_cnt  <= '0;
      end else if (busy_out) begin
        if (clr_cnt == IMG_AW'(IMG * IMG - 1)) busy_out <= 1'b0;
        clr_cnt <= clr_cnt + 1'b1;
      end
    end
  end
endmodule
