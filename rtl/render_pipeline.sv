// Rendering pipeline: draws the 3D model, as seen from the current camera
// location, into a 64x64 colour image that the display side reads.
//
// A valid camera location starts a pass: the z-buffer clears the depth and
// colour memories (4096 cycles), then the model triangles are read one by one
// from the model memory and flow through projection (project_3dto2d),
// rasterization and the z-buffer into the colour memory. The projection stalls
// while the rasterizer is still busy and a projected triangle is waiting. A
// location that arrives during a pass is kept and starts the next pass. The
// order of the stages, the memories (model, depth 64x64x9, colour 64x64x10)
// and the stall rule follow the source design; the clear before each pass and
// the restart rule are this design's choices.
// Timing: the first colour write of a pass comes 14 cycles after the first
// model read (when the first pixel of the first triangle's bounding box is
// covered); a pass takes about 4096 + sum over triangles of their box areas
// plus the pipeline depth. done_out pulses at the end of a pass. The colour
// memory is read on rd_addr/rd_color with one cycle of latency.
module render_pipeline
  import ar_pkg::*;
#(
  parameter int    N_TRI   = 12,
  parameter string FILE    = "rtl/model_cube.hex",
  parameter int    PHI_DEG = 40
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cam_valid,
  input  campos_t            cam_in,
  input  logic [IMG_AW-1:0]  rd_addr,
  output logic [COLOR_W-1:0] rd_color,
  output logic               busy_out,
  output logic               done_out
);
  localparam int TAW = (N_TRI > 1) ? $clog2(N_TRI) : 1;

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_STREAM, S_DRAIN} state_t;
  state_t state;

  campos_t cam_q, cam_pend;
  logic    pend;
  logic [TAW:0] feed_idx;
  logic    feed_valid, rom_en, start, clear_pulse;
  logic [63:0] rom_data;

  logic    proj_ready, proj_valid, proj_busy;
  tri2_t   proj_tri;
  logic    rast_busy, pix_valid;
  frag_t   pix;
  logic    zb_busy, zb_pipe_busy, zb_reject;
  logic    color_we;
  logic [IMG_AW-1:0]  color_addr;
  logic [COLOR_W-1:0] color_data;

  always_comb begin
    start       = (state == S_IDLE) && (cam_valid || pend);
    clear_pulse = start;
    rom_en      = (state == S_STREAM) && (proj_ready || !feed_valid) && (feed_idx < (TAW+1)'(N_TRI));
    busy_out    = (state != S_IDLE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; pend <= 1'b0; feed_idx <= '0; feed_valid <= 1'b0;
      done_out <= 1'b0; cam_q <= '0; cam_pend <= '0;
    end else begin
      done_out <= 1'b0;
      if (cam_valid && !start) begin
        pend     <= 1'b1;
        cam_pend <= cam_in;
      end
      case (state)
        S_IDLE: if (start) begin
          cam_q <= cam_valid ? cam_in : cam_pend;
          pend  <= 1'b0;
          state <= S_CLEAR;
        end
        S_CLEAR: if (!zb_busy) begin
          feed_idx   <= '0;
          feed_valid <= 1'b0;
          state      <= S_STREAM;
        end
        S_STREAM: begin
          if (proj_ready && feed_valid) feed_valid <= 1'b0;
          if (rom_en) begin
            feed_valid <= 1'b1;
            feed_idx   <= feed_idx + 1'b1;
          end
          if ((feed_idx == (TAW+1)'(N_TRI)) && (!feed_valid || proj_ready))
            state <= S_DRAIN;
        end
        default: if (!proj_busy && !feed_valid && !rast_busy && !pix_valid && !zb_pipe_busy) begin
          done_out <= 1'b1;
          state    <= S_IDLE;
        end
      endcase
    end
  end

  model_rom #(.N_TRI(N_TRI), .FILE(FILE)) u_model (
    .clk(clk), .en(rom_en), .addr(TAW'(feed_idx)), .data(rom_data));

  project_3dto2d #(.PHI_DEG(PHI_DEG)) u_proj (
    .clk(clk), .rst(rst), .valid_in(feed_valid), .ready_out(proj_ready),
    .tri_in(tri3_t'(rom_data)), .cam_in(cam_q),
    .valid_out(proj_valid), .ready_in(!rast_busy), .tri_out(proj_tri), .busy_out(proj_busy));

  rasterize u_rast (
    .clk(clk), .rst(rst), .valid_in(proj_valid), .tri_in(proj_tri), .busy_out(rast_busy),
    .pix_valid(pix_valid), .pix_out(pix));

  z_buffer u_zbuf (
    .clk(clk), .rst(rst), .clear_in(clear_pulse), .busy_out(zb_busy),
    .pix_valid(pix_valid), .pix_in(pix), .pipe_busy_out(zb_pipe_busy),
    .color_we(color_we), .color_addr(color_addr), .color_data(color_data), .reject_out(zb_reject));

  frame_buffer #(.WIDTH(COLOR_W), .DEPTH(IMG * IMG)) u_color (
    .clk(clk), .wr_en(color_we), .wr_addr(color_addr), .wr_data(color_data),
    .rd_addr(rd_addr), .rd_data(rd_color));
endmodule
