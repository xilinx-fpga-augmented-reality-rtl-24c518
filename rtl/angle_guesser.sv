// Angle guesser: estimates how far the card is turned, in whole degrees 0..359.
//
// The card carries a coloured mark off its centre, so the direction from the
// card-body centroid to the mark centroid turns with the card. That direction
// is measured with a 12-iteration CORDIC in vectoring mode (angle counted
// anticlockwise from the monitor's x axis, y pointing up), rounded to a whole
// degree. The first measurement is taken as it is; after that the estimate
// moves halfway from the previous estimate towards the new measurement along
// the shorter arc, which damps jitter from camera noise. Using the two
// centroids and the previous angle, and a 9-bit result, follow the source
// design; the CORDIC and the halfway blend are this design's choices.
// Timing: valid_out pulses 15 cycles after valid_in; angle_out then holds.
module angle_guesser (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] body_x,
  input  logic [9:0]  body_y,
  input  logic [10:0] mark_x,
  input  logic [9:0]  mark_y,
  input  logic        valid_in,
  output logic [8:0]  angle_out,
  output logic        valid_out
);
  localparam int ITER = 12;

  // round(atan(2^-i) in degrees * 256)
  function automatic logic signed [19:0] atan_tab(input logic [3:0] i);
    case (i)
      4'd0: return 20'sd11520;  4'd1: return 20'sd6801;  4'd2: return 20'sd3593;
      4'd3: return 20'sd1824;   4'd4: return 20'sd916;   4'd5: return 20'sd458;
      4'd6: return 20'sd229;    4'd7: return 20'sd115;   4'd8: return 20'sd57;
      4'd9: return 20'sd29;     4'd10: return 20'sd14;   default: return 20'sd7;
    endcase
  endfunction

  typedef enum logic [1:0] {A_IDLE, A_ITER, A_ROUND, A_BLEND} astate_t;
  astate_t state;

  logic signed [19:0] x, y, z;      // z: degrees * 256
  logic [3:0]         it;
  logic signed [11:0] dx, dy;
  logic signed [19:0] x0, y0;
  logic signed [10:0] meas, prev, diff, nxt;
  logic               have_prev;

  always_comb begin
    dx = $signed({1'b0, mark_x}) - $signed({1'b0, body_x});
    dy = $signed({2'b0, body_y}) - $signed({2'b0, mark_y});
    x0 = 20'(dx) <<< 3;
    y0 = 20'(dy) <<< 3;
    diff = meas - prev;
    if (diff > 11'sd180)        diff = diff - 11'sd360;
    else if (diff <= -11'sd180) diff = diff + 11'sd360;
    nxt = prev + (diff >>> 1);
    if (nxt < 0)                nxt = nxt + 11'sd360;
    else if (nxt >= 11'sd360)   nxt = nxt - 11'sd360;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE; valid_out <= 1'b0; angle_out <= '0; have_prev <= 1'b0;
      x <= '0; y <= '0; z <= '0; it <= '0; meas <= '0; prev <= '0;
    end else begin
      valid_out <= 1'b0;
      case (state)
        A_IDLE: if (valid_in) begin
          // bring the vector into the right half plane first
          if (x0 < 0) begin x <= -x0; y <= -y0; z <= 20'sd46080; end   // 180 deg
          else        begin x <= x0;  y <= y0;  z <= '0;        end
          it    <= '0;
          state <= A_ITER;
        end
        A_ITER: begin
          if (y > 0) begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + atan_tab(it);
          end else begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - atan_tab(it);
          end
          it <= it + 1'b1;
          if (it == 4'(ITER - 1)) state <= A_ROUND;
        end
        A_ROUND: begin
          meas  <= (11'((z + 20'sd128) >>> 8) < 0) ? 11'((z + 20'sd128) >>> 8) + 11'sd360
                 : ((11'((z + 20'sd128) >>> 8) >= 11'sd360) ? 11'((z + 20'sd128) >>> 8) - 11'sd360
                 : 11'((z + 20'sd128) >>> 8));
          state <= A_BLEND;
        end
        default: begin
          prev      <= have_prev ? nxt : meas;
          angle_out <= have_prev ? 9'(nxt) : 9'(meas);
          have_prev <= 1'b1;
          valid_out <= 1'b1;
          state     <= A_IDLE;
        end
      endcase
    end
  end
endmodule
