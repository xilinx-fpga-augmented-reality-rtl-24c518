// Shared types and constants of the AR card renderer.
//
// A model triangle is one 64-bit word: three vertices of signed 6-bit x, y, z
// (model space, z pointing up from the card) followed by a 10-bit colour. After
// projection a triangle carries 10-bit signed screen coordinates inside a 64x64
// render image, one 9-bit depth (the nearest of its three vertices) and its
// colour. Angles are whole degrees; sines and cosines are signed Q2.14
// (1.0 = 16384). The 64x64 image, the 10-bit colour, the 9-bit depth, the
// 64-bit triangle word and the 6-bit coordinates follow the source design; the
// field order inside the word and the Q2.14 format are this design's choice.
package ar_pkg;

  localparam int IMG       = 64;   // render image is IMG x IMG pixels
  localparam int IMG_AW    = 12;   // address width of the render image
  localparam int COLOR_W   = 10;
  localparam int DEPTH_W   = 9;
  localparam int SC_W      = 10;   // projected screen coordinate width (signed)
  localparam int Q         = 14;   // fractional bits of sine/cosine values
  localparam int Q_ONE     = 1 << Q;

  typedef struct packed {
    logic signed [5:0] x;
    logic signed [5:0] y;
    logic signed [5:0] z;
  } vert3_t;

  typedef struct packed {
    vert3_t               v0;
    vert3_t               v1;
    vert3_t               v2;
    logic [COLOR_W-1:0]   color;
  } tri3_t;                         // 64 bits, one model memory line

  typedef struct packed {
    logic signed [SC_W-1:0] x;
    logic signed [SC_W-1:0] y;
  } vert2_t;

  typedef struct packed {
    vert2_t               v0;
    vert2_t               v1;
    vert2_t               v2;
    logic [DEPTH_W-1:0]   z;
    logic [COLOR_W-1:0]   color;
  } tri2_t;

  // One pixel leaving the rasterizer towards the z-buffer.
  typedef struct packed {
    logic [5:0]           x;
    logic [5:0]           y;
    logic [DEPTH_W-1:0]   z;
    logic [COLOR_W-1:0]   color;
  } frag_t;

  // Camera location plus the sine and cosine of its heading.
  typedef struct packed {
    logic signed [8:0]    x;
    logic signed [8:0]    y;
    logic        [7:0]    z;
    logic signed [15:0]   sin_t;
    logic signed [15:0]   cos_t;
  } campos_t;

  // Q2.14 sine and cosine of a constant angle, evaluated at elaboration.
  function automatic int q_sin_deg(input int deg);
    return int'($floor($sin(real'(deg) * 3.14159265358979 / 180.0) * real'(Q_ONE) + 0.5));
  endfunction

  function automatic int q_cos_deg(input int deg);
    return int'($floor($cos(real'(deg) * 3.14159265358979 / 180.0) * real'(Q_ONE) + 0.5));
  endfunction

endpackage
