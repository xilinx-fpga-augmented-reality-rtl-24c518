// Frame buffer: a simple dual-port memory, one write port and one read port on
// the same clock, as a block RAM would provide.
//
// Used twice: for the rotated camera frame (76800 x 16 bits, the default) and
// for the 64x64 x 10-bit image the renderer draws. A read returns the word at
// rd_addr one cycle later; a read and a write of the same address in one cycle
// return the old word. Holding the camera frame in a 16-bit memory read by
// address follows the source design; the size and the one-cycle latency are
// this design's choices.
module frame_buffer #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 76800,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
