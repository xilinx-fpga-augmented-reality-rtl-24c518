// Centre of mass: the centroid of the pixels flagged during one display frame.
//
// Each flagged pixel adds its x and y to two running sums and 1 to a count.
// At frame_done_in the sums and count are handed to two sequential dividers
// and cleared for the next frame; 35 cycles later x_out and y_out hold the
// average position and valid_out pulses. A frame without any flagged pixel
// leaves the outputs unchanged and gives no pulse. Summing positions and
// dividing by the pixel count, with an 11-bit x and a 10-bit y result, follows
// the source design; the sequential divider is this design's choice. The
// design uses two of these: one for the card body and one for the card's marks.
module center_of_mass (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] x_in,
  input  logic [9:0]  y_in,
  input  logic        valid_in,
  input  logic        frame_done_in,
  output logic [10:0] x_out,
  output logic [9:0]  y_out,
  output logic        valid_out
);
  logic [31:0] sx, sy, qx, qy;
  logic [19:0] cnt;
  logic        start, dx_done, dy_done;
  logic [31:0] sx_snap, sy_snap;
  logic [19:0] cnt_snap;

  always_ff @(posedge clk) begin
    if (rst) begin
      sx <= '0; sy <= '0; cnt <= '0; start <= 1'b0;
      sx_snap <= '0; sy_snap <= '0; cnt_snap <= '0;
    end else begin
      start <= 1'b0;
      if (frame_done_in) begin
        sx_snap  <= sx;
        sy_snap  <= sy;
        cnt_snap <= cnt;
        start    <= (cnt != '0);
        sx  <= valid_in ? 32'(x_in) : '0;
        sy  <= valid_in ? 32'(y_in) : '0;
        cnt <= valid_in ? 20'd1 : '0;
      end else if (valid_in) begin
        sx  <= sx + 32'(x_in);
        sy  <= sy + 32'(y_in);
        cnt <= cnt + 1'b1;
      end
    end
  end

  seq_divider #(.NW(32), .DW(20)) u_divx (
    .clk(clk), .rst(rst), .start(start), .num(sx_snap), .den(cnt_snap), .quot(qx), .done(dx_done));
  seq_divider #(.NW(32), .DW(20)) u_divy (
    .clk(clk), .rst(rst), .start(start), .num(sy_snap), .den(cnt_snap), .quot(qy), .done(dy_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      x_out <= '0; y_out <= '0; valid_out <= 1'b0;
    end else begin
      valid_out <= dx_done && dy_done;
      if (dx_done && dy_done) begin
        x_out <= 11'(qx);
        y_out <= 10'(qy);
      end
    end
  end
endmodule
