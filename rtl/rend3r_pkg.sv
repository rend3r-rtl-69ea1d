// rend3r_pkg: instruction-set encodings, property indices, scene record
// types and screen constants shared by the REND3R renderer.
//
// Instruction fields (32 bits, opcode in [2:0]):
//   F-type : [10:9] func, all other bits zero
//   C-type : [31:16] data, [15:11] prop
//   L-type : [31:16] data, [15:11] prop, [8:3] light index
//   SE-type: [31:16] index[18:3], [15:11] prop, [10:6] prop2, [5:3] index[2:0]
//   SD-type: [31:16] data (for prop), [15:0] data2 (for prop2); has no opcode
//            and always follows an SE-type instruction.
// The field layout follows the published encoding table. The numeric opcode
// values are this design's choice: the encoding table shows only that the
// opcode is three bits wide.
package rend3r_pkg;

  import fp16_pkg::*;

  typedef enum logic [2:0] {
    OP_F = 3'd1,
    OP_C = 3'd2,
    OP_L = 3'd3,
    OP_S = 3'd4
  } opcode_e;

  typedef enum logic [1:0] {
    F_END_RENDER  = 2'b00,
    F_NEW_RENDER  = 2'b01,
    F_NEW_FRAME   = 2'b10,
    F_LOOP_RENDER = 2'b11
  } ffunc_e;

  // Camera property indices (0 is the null property).
  localparam int CAM_XLOC = 1, CAM_YLOC = 2, CAM_ZLOC = 3;
  localparam int CAM_RROT = 4, CAM_IROT = 5, CAM_JROT = 6, CAM_KROT = 7;
  localparam int CAM_NCLIP = 8, CAM_FCLIP = 9, CAM_FOVH = 10, CAM_FOVV = 11;
  localparam int CAM_NPROPS = 12;

  // Light property indices.
  localparam int LT_SRC = 0, LT_XLOC = 1, LT_YLOC = 2, LT_ZLOC = 3;
  localparam int LT_XFOR = 4, LT_YFOR = 5, LT_ZFOR = 6, LT_COL = 7, LT_INT = 8;
  localparam int LT_NPROPS = 9;

  // Shape properties (raytracing interpretation).
  localparam int SH_XLOC = 1, SH_YLOC = 2, SH_ZLOC = 3;
  localparam int SH_RROT = 4, SH_IROT = 5, SH_JROT = 6, SH_KROT = 7;
  localparam int SH_XSCL = 8, SH_YSCL = 9, SH_ZSCL = 10;
  localparam int SH_COL = 11, SH_MAT = 12, SH_TYPE = 13;
  localparam int SH_NPROPS = 14;
  // Triangle properties (rasterization interpretation of the same record):
  // x1..z3 are properties 1..9, colour 11, material 12.
  localparam int TR_X1 = 1, TR_COL = 11;

  // Light source types (low two bits of the source property).
  localparam logic [1:0] SRC_OFF = 2'b00, SRC_DIRECTIONAL = 2'b01;

  // Analytic shape types (low four bits of the shape-type property).
  localparam logic [3:0] SHAPE_OFF = 4'd0, SHAPE_SPHERE = 4'd1;
  localparam logic [3:0] SHAPE_CYLINDER = 4'd2, SHAPE_CONE = 4'd3;

  typedef struct packed {
    fp16_t x, y, z;
  } vec3_t;

  typedef struct packed {
    fp16_t r, i, j, k;
  } quat_t;

  typedef struct packed {
    vec3_t loc;
    quat_t rot;
    fp16_t nclip, fclip, fovh, fovv;
  } camera_t;

  typedef struct packed {
    logic [1:0]  src;
    vec3_t       loc;
    vec3_t       fwd;
    logic [15:0] color;   // RGB565
    fp16_t       intensity;
  } light_t;

  // One 16-bit word per property, indexed by property number.
  typedef logic [SH_NPROPS-1:0][15:0] shape_rec_t;

  // A projected triangle: integer pixel coordinates, depth, colour.
  typedef struct packed {
    logic signed [15:0] x0, y0, x1, y1, x2, y2;
    fp16_t              z;
    logic [15:0]        color;
  } tri2d_t;

  // Output of the raycaster for one ray/shape pair.
  typedef struct packed {
    logic        hit;
    fp16_t       t;
    vec3_t       point;
    vec3_t       normal;   // not normalised
    logic [15:0] color;
    logic [7:0]  tag;
  } ray_hit_t;

  // --- vector helpers (combinational, half precision) -------------------
  function automatic vec3_t v_add(input vec3_t a, input vec3_t b);
    return '{fp_add(a.x, b.x), fp_add(a.y, b.y), fp_add(a.z, b.z)};
  endfunction

  function automatic vec3_t v_sub(input vec3_t a, input vec3_t b);
    return '{fp_sub(a.x, b.x), fp_sub(a.y, b.y), fp_sub(a.z, b.z)};
  endfunction

  function automatic vec3_t v_scale(input vec3_t a, input fp16_t s);
    return '{fp_mul(a.x, s), fp_mul(a.y, s), fp_mul(a.z, s)};
  endfunction

  function automatic vec3_t v_mul(input vec3_t a, input vec3_t b);
    return '{fp_mul(a.x, b.x), fp_mul(a.y, b.y), fp_mul(a.z, b.z)};
  endfunction

  function automatic fp16_t v_dot(input vec3_t a, input vec3_t b);
    return fp_add(fp_add(fp_mul(a.x, b.x), fp_mul(a.y, b.y)), fp_mul(a.z, b.z));
  endfunction

  function automatic vec3_t v_cross(input vec3_t a, input vec3_t b);
    return '{fp_sub(fp_mul(a.y, b.z), fp_mul(a.z, b.y)),
             fp_sub(fp_mul(a.z, b.x), fp_mul(a.x, b.z)),
             fp_sub(fp_mul(a.x, b.y), fp_mul(a.y, b.x))};
  endfunction

  // Rotate v by unit quaternion q: v' = v + 2r(u x v) + 2 u x (u x v).
  function automatic vec3_t q_rotate(input quat_t q, input vec3_t v);
    vec3_t u, t;
    u = '{q.i, q.j, q.k};
    t = v_scale(v_cross(u, v), FP_TWO);
    return v_add(v_add(v, v_scale(t, q.r)), v_cross(u, t));
  endfunction

  function automatic quat_t q_conj(input quat_t q);
    return '{q.r, fp_neg(q.i), fp_neg(q.j), fp_neg(q.k)};
  endfunction

  // Scale each RGB565 channel by a non-negative factor, saturating.
  function automatic logic [15:0] color_scale(input logic [15:0] c, input fp16_t f);
    logic signed [31:0] k;
    logic [31:0] r, g, b;
    k = fp_to_fix(fp_max0(f), 8);
    if (k > 32'sh0001_0000) k = 32'sh0001_0000;
    r = ({27'd0, c[15:11]} * 32'(k)) >> 8;
    g = ({26'd0, c[10:5]}  * 32'(k)) >> 8;
    b = ({27'd0, c[4:0]}   * 32'(k)) >> 8;
    if (r > 31) r = 31;
    if (g > 63) g = 63;
    if (b > 31) b = 31;
    return {r[4:0], g[5:0], b[4:0]};
  endfunction

  // Per-channel saturating sum of two RGB565 colours.
  function automatic logic [15:0] color_add(input logic [15:0] a, input logic [15:0] b);
    logic [5:0] r, bl;
    logic [6:0] g;
    r  = {1'b0, a[15:11]} + {1'b0, b[15:11]};
    g  = {1'b0, a[10:5]} + {1'b0, b[10:5]};
    bl = {1'b0, a[4:0]} + {1'b0, b[4:0]};
    return {r[5] ? 5'd31 : r[4:0], g[6] ? 6'd63 : g[5:0], bl[5] ? 5'd31 : bl[4:0]};
  endfunction

  // Channel-wise product of two RGB565 colours (light colour masks surface).
  function automatic logic [15:0] color_mask(input logic [15:0] a, input logic [15:0] b);
    logic [9:0] r, bl;
    logic [11:0] g;
    r  = a[15:11] * b[15:11];
    g  = a[10:5] * b[10:5];
    bl = a[4:0] * b[4:0];
    return {5'(r / 31), 6'(g / 63), 5'(bl / 31)};
  endfunction

endpackage
