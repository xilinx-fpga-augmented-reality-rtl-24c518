// Model memory: the 3D model, stored directly as triangles.
//
// Each 64-bit line is one triangle, {x0,y0,z0, x1,y1,z1, x2,y2,z2, colour}, with
// signed 6-bit coordinates and a 10-bit colour (R3 G4 B3). The default model,
// from rtl/model_cube.hex, is a cube of side 32 centred on the origin with a
// differently coloured pair of triangles on each face. Storing triangles rather
// than vertices, one per 64-bit line with one colour each, follows the source
// design; the field order and the cube are this design's choices.
// Timing: data is registered; it shows the line at addr one cycle after a cycle
// with en high and holds while en is low.
module model_rom #(
  parameter int    N_TRI = 12,
  parameter string FILE  = "rtl/model_cube.hex",
  parameter int    AW    = (N_TRI > 1) ? $clog2(N_TRI) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [63:0]   data
);
  logic [63:0] rom [N_TRI];
  initial $readmemh(FILE, rom);

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end
endmodule
