// rt_pkg: types and constants shared by the ray-traced game renderer.
//
// Scene geometry lives in a small integer world space: every vertex and the
// camera position are signed COORD_W-bit integers. Surface normals and the
// light direction are unit vectors in signed fixed point, where UNIT (128)
// stands for 1.0. Colours are 18 bits, 6 per channel, which packs two pixels
// into one 36-bit ZBT SRAM word. The screen is 1024x768, so pixel
// coordinates are 10 bits each; a finished result (colour, hit bit and x, y)
// is 39 bits and, with its valid bit, 40 bits in the output sequencer.
// Each triangle also carries a reflectivity, in eighths, used by the ray
// tracer's single reflection bounce.
// The screen size, the 18-bit colour and the 40-bit result come from the
// project description; the coordinate width, the fixed-point format and the
// polygon record are this design's own choices.
package rt_pkg;

  localparam int H_RES   = 1024;  // visible pixels per line
  localparam int V_RES   = 768;   // visible lines per frame
  localparam int XW      = 10;    // pixel x width
  localparam int YW      = 10;    // pixel y width

  localparam int COORD_W = 12;    // world coordinate width (signed)
  localparam int NORM_W  = 9;     // unit-vector component width (signed)
  localparam int UNIT    = 128;   // 1.0 in the unit-vector format
  localparam int KFRAC   = 16;    // fraction bits of the hit-point ray parameter

  typedef logic [5:0] chan_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } color_t;                      // 18-bit colour

  typedef struct packed {
    logic signed [COORD_W-1:0] x;
    logic signed [COORD_W-1:0] y;
    logic signed [COORD_W-1:0] z;
  } vec3_t;                       // world-space point

  typedef struct packed {
    logic signed [NORM_W-1:0] x;
    logic signed [NORM_W-1:0] y;
    logic signed [NORM_W-1:0] z;
  } unorm_t;                      // unit vector, UNIT = 1.0

  typedef struct packed {
    vec3_t  v0;
    vec3_t  v1;
    vec3_t  v2;
    unorm_t n;                    // unit normal of the lit face
    color_t color;                // surface colour
    logic [2:0] refl;             // reflectivity in eighths (0 = matt)
  } poly_t;                       // one scene triangle

  typedef struct packed {
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } pixel_t;                      // screen coordinate

  typedef struct packed {
    color_t        color;
    logic          hit;           // ray met a polygon
    logic [XW-1:0] x;
    logic [YW-1:0] y;
  } result_t;                     // 39 bits: colour, hit, x, y

endpackage
