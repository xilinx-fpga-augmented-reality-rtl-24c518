// Angle to coordinate converter: places the virtual camera around the model.
//
// The camera sits on a sphere of radius RADIUS around the model origin, at a
// fixed elevation PHI_DEG above the card plane, and turns about the vertical
// axis with the card angle theta. Its position is
//   x = RADIUS*cos(PHI)*cos(theta), y = RADIUS*cos(PHI)*sin(theta),
//   z = RADIUS*sin(PHI)
// in model units. The block also hands sin(theta) and cos(theta) to the
// projection, so the design needs only one sine table. sin and cos come from
// the table on two consecutive cycles (cos = sin(theta + 90)).
// Output widths (x, y 9-bit signed, z 8-bit), the radius of 64 and elevation of
// 40 degrees follow the source design; reading the 40 degrees as an elevation
// and the 64 as model units are this design's choices.
// Timing: valid_out pulses four cycles after valid_in; angle_in must hold for
// the first two of them. Outputs hold until the next update. The elevation is
// fixed, so cam_out.z is the constant RADIUS*sin(PHI) (41) once the first
// angle has arrived; synthesis ties its zero bits to 0, which is expected.
module angle_to_coord
  import ar_pkg::*;
#(
  parameter int RADIUS  = 64,
  parameter int PHI_DEG = 40
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] angle_in,
  input  logic       valid_in,
  output campos_t    cam_out,
  output logic       valid_out
);
  // RADIUS*cos(PHI) and RADIUS*sin(PHI), rounded to whole model units.
  localparam int RC = (RADIUS * q_cos_deg(PHI_DEG) + Q_ONE / 2) / Q_ONE;
  localparam int RS = (RADIUS * q_sin_deg(PHI_DEG) + Q_ONE / 2) / Q_ONE;

  logic [8:0]         theta_q;
  logic [3:0]         vpipe;
  logic [8:0]         tab_theta;
  logic signed [15:0] tab_out, sin_q;

  always_comb tab_theta = vpipe[0] ? theta_q + 9'd90 : angle_in;

  sine_table u_sine (.clk(clk), .theta_in(tab_theta), .sin_out(tab_out));

  logic signed [31:0] px, py;
  always_comb begin
    px = (32'(RC) * 32'(tab_out) + 32'(Q_ONE / 2)) >>> Q;   // tab_out = cos here
    py = (32'(RC) * 32'(sin_q)   + 32'(Q_ONE / 2)) >>> Q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vpipe <= '0; theta_q <= '0; sin_q <= '0;
      cam_out <= '0; valid_out <= 1'b0;
    end else begin
      vpipe     <= {vpipe[2:0], valid_in};
      valid_out <= 1'b0;
      if (valid_in) theta_q <= angle_in;
      if (vpipe[1]) sin_q <= tab_out;          // sin(theta) arrives
      if (vpipe[2]) begin                      // cos(theta) arrives
        cam_out.x     <= 9'(px);
        cam_out.y     <= 9'(py);
        cam_out.z     <= 8'(RS);
        cam_out.sin_t <= sin_q;
        cam_out.cos_t <= tab_out;
        valid_out     <= 1'b1;
      end
    end
  end
endmodule
