// 3D-to-2D projection: moves one model triangle into the camera's view and
// projects it onto the 64x64 render image.
//
// For each of the three vertices the pipeline
//   1. subtracts the camera position (vector from camera to vertex);
//   2. turns the vector about the vertical axis by the camera heading:
//        a = cos(t)*dx + sin(t)*dy,   X = cos(t)*dy - sin(t)*dx;
//   3. tilts it by the fixed camera elevation PHI:
//        Y = cos(PHI)*dz - sin(PHI)*a,   D = -(cos(PHI)*a + sin(PHI)*dz);
//      X is the screen-right, Y the screen-up and D the depth coordinate;
//   4. rounds X, Y, D to integers (D at least 1, at most 511), multiplies X and
//      Y by 32 with a shift, and keeps the smallest D as the triangle's depth;
//   5-10. divides 32X and 32Y by D in six pipelined stages, then adds the image
//      centre (32) and flips Y so that screen rows grow downwards.
// Only the heading varies: the elevation is a constant of the design.
// The steps, the scale of 32, rounding before a six-cycle pipelined division,
// the 10-cycle latency and the stall rule follow the source design; the axis
// conventions, Q2.14 arithmetic and the clamping of D are this design's.
//
// Handshake: a triangle is taken when valid_in and ready_out are both high.
// The result is offered on valid_out/tri_out and taken when ready_in is high.
// All stages advance together unless a result is waiting and ready_in is low,
// so the pipeline keeps computing while the rasterizer is busy until its last
// stage holds a result. Latency: 10 cycles from acceptance to valid_out.
module project_3dto2d
  import ar_pkg::*;
#(
  parameter int PHI_DEG     = 40,
  parameter int DIV_STAGES  = 6,
  parameter int SCALE_SHIFT = 5
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  output logic    ready_out,
  input  tri3_t   tri_in,
  input  campos_t cam_in,
  output logic    valid_out,
  input  logic    ready_in,
  output tri2_t   tri_out,
  output logic    busy_out      // some triangle is inside the pipeline
);
  localparam int SPHI = q_sin_deg(PHI_DEG);
  localparam int CPHI = q_cos_deg(PHI_DEG);
  localparam int NW   = 14;      // width of the scaled coordinates
  localparam int LAT  = 4 + DIV_STAGES;

  logic adv;
  logic [LAT:1] v;
  assign adv       = !(v[LAT] && !ready_in);
  assign ready_out = adv;
  assign valid_out = v[LAT];
  assign busy_out  = |v;

  vert3_t in_v [3];
  always_comb begin
    in_v[0] = tri_in.v0;
    in_v[1] = tri_in.v1;
    in_v[2] = tri_in.v2;
  end

  // ---- stage 1: camera-to-vertex vectors
  logic signed [9:0]  s1_dx [3], s1_dy [3], s1_dz [3];
  logic signed [15:0] s1_sin, s1_cos;
  logic [COLOR_W-1:0] s1_col;
  // ---- stage 2: heading rotation (values scaled by 2^14)
  logic signed [27:0] s2_a [3], s2_x [3];
  logic signed [9:0]  s2_dz [3];
  logic [COLOR_W-1:0] s2_col;
  // ---- stage 3: elevation tilt (Y and D scaled by 2^28)
  logic signed [27:0] s3_x [3];
  logic signed [47:0] s3_y [3], s3_d [3];
  logic [COLOR_W-1:0] s3_col;
  // ---- stage 4: rounded, scaled numerators as sign and magnitude
  logic [NW-1:0]      s4_nx [3], s4_ny [3];
  logic               s4_sx [3], s4_sy [3];
  logic [DEPTH_W-1:0] s4_d [3], s4_zmin;
  logic [COLOR_W-1:0] s4_col;
  // ---- stages 5..10: division, with the side data shifted alongside
  logic [5:0]         sg_pipe [DIV_STAGES];     // signs of x0,y0,x1,y1,x2,y2
  logic [DEPTH_W-1:0] z_pipe  [DIV_STAGES];
  logic [COLOR_W-1:0] c_pipe  [DIV_STAGES];
  logic [NW-1:0]      qx [3], qy [3];

  // stage 4 arithmetic
  logic signed [47:0] xr [3], yr [3], dr [3];
  logic [DEPTH_W-1:0] dcl [3];
  logic signed [47:0] nxs [3], nys [3];
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      xr[k] = (48'(s3_x[k]) + 48'sd8192) >>> Q;
      yr[k] = (s3_y[k] + (48'sd1 <<< (2 * Q - 1))) >>> (2 * Q);
      dr[k] = (s3_d[k] + (48'sd1 <<< (2 * Q - 1))) >>> (2 * Q);
      if (dr[k] < 48'sd1)        dcl[k] = DEPTH_W'(1);
      else if (dr[k] > 48'sd511) dcl[k] = DEPTH_W'(511);
      else                       dcl[k] = DEPTH_W'(dr[k]);
      nxs[k] = xr[k] <<< SCALE_SHIFT;
      nys[k] = -(yr[k] <<< SCALE_SHIFT);        // screen rows grow downwards
    end
  end

  function automatic logic [NW-1:0] mag(input logic signed [47:0] val);
    logic signed [47:0] m;
    m = (val < 0) ? -val : val;
    return (m > 48'sd16383) ? NW'(16383) : NW'(m);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
    end else if (adv) begin
      v <= {v[LAT-1:1], valid_in};
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      // stage 1
      for (int k = 0; k < 3; k++) begin
        s1_dx[k] <= 10'(in_v[k].x) - 10'(cam_in.x);
        s1_dy[k] <= 10'(in_v[k].y) - 10'(cam_in.y);
        s1_dz[k] <= 10'(in_v[k].z) - $signed({2'b00, cam_in.z});
      end
      s1_sin <= cam_in.sin_t;
      s1_cos <= cam_in.cos_t;
      s1_col <= tri_in.color;
      // stage 2
      for (int k = 0; k < 3; k++) begin
        s2_a[k]  <= 28'(s1_cos) * 28'(s1_dx[k]) + 28'(s1_sin) * 28'(s1_dy[k]);
        s2_x[k]  <= 28'(s1_cos) * 28'(s1_dy[k]) - 28'(s1_sin) * 28'(s1_dx[k]);
        s2_dz[k] <= s1_dz[k];
      end
      s2_col <= s1_col;
      // stage 3
      for (int k = 0; k < 3; k++) begin
        s3_x[k] <= s2_x[k];
        s3_y[k] <= 48'(CPHI) * (48'(s2_dz[k]) <<< Q) - 48'(SPHI) * 48'(s2_a[k]);
        s3_d[k] <= -(48'(CPHI) * 48'(s2_a[k]) + 48'(SPHI) * (48'(s2_dz[k]) <<< Q));
      end
      s3_col <= s2_col;
      // stage 4
      for (int k = 0; k < 3; k++) begin
        s4_nx[k] <= mag(nxs[k]);
        s4_ny[k] <= mag(nys[k]);
        s4_sx[k] <= nxs[k] < 0;
        s4_sy[k] <= nys[k] < 0;
        s4_d[k]  <= dcl[k];
      end
      s4_zmin <= (dcl[0] < dcl[1]) ? ((dcl[0] < dcl[2]) ? dcl[0] : dcl[2])
                                   : ((dcl[1] < dcl[2]) ? dcl[1] : dcl[2]);
      s4_col  <= s3_col;
      // side data of the division stages
      sg_pipe[0] <= {s4_sy[2], s4_sx[2], s4_sy[1], s4_sx[1], s4_sy[0], s4_sx[0]};
      z_pipe[0]  <= s4_zmin;
      c_pipe[0]  <= s4_col;
      for (int s = 1; s < DIV_STAGES; s++) begin
        sg_pipe[s] <= sg_pipe[s-1];
        z_pipe[s]  <= z_pipe[s-1];
        c_pipe[s]  <= c_pipe[s-1];
      end
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_div
    pipe_div #(.NW(NW), .DW(DEPTH_W), .STAGES(DIV_STAGES)) u_dx (
      .clk(clk), .en(adv), .num(s4_nx[k]), .den(s4_d[k]), .quot(qx[k]));
    pipe_div #(.NW(NW), .DW(DEPTH_W), .STAGES(DIV_STAGES)) u_dy (
      .clk(clk), .en(adv), .num(s4_ny[k]), .den(s4_d[k]), .quot(qy[k]));
  end

  // signed quotient plus image centre, saturated to the screen coordinate width
  function automatic logic signed [SC_W-1:0] to_screen(input logic [NW-1:0] q, input logic neg);
    logic signed [NW+1:0] s;
    s = neg ? -$signed({2'b00, q}) : $signed({2'b00, q});
    s = s + (NW+2)'(IMG / 2);
    if (s > (NW+2)'((1 << (SC_W - 1)) - 1))   return SC_W'((1 << (SC_W - 1)) - 1);
    if (s < -(NW+2)'(1 << (SC_W - 1)))        return SC_W'(-(1 << (SC_W - 1)));
    return SC_W'(s);
  endfunction

  logic [5:0] sg;
  always_comb begin
    sg = sg_pipe[DIV_STAGES-1];
    tri_out.v0.x  = to_screen(qx[0], sg[0]);
    tri_out.v0.y  = to_screen(qy[0], sg[1]);
    tri_out.v1.x  = to_screen(qx[1], sg[2]);
    tri_out.v1.y  = to_screen(qy[1], sg[3]);
    tri_out.v2.x  = to_screen(qx[2], sg[4]);
    tri_out.v2.y  = to_screen(qy[2], sg[5]);
    tri_out.z     = z_pipe[DIV_STAGES-1];
    tri_out.color = c_pipe[DIV_STAGES-1];
  end
endmodule
