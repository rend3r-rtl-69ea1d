// raycaster: intersects one ray with one analytic shape per cycle.
//
// Shapes are a unit sphere, an infinite unit-radius cylinder along z, or an
// infinite double cone z^2 = x^2 + y^2, each placed in the world by a
// translation T, a rotation R (unit quaternion) and a scale S, given as the
// inverse scale factors. Rather than transforming the shape, the ray is moved
// into the shape's normal space:
//   s' = S^-1 R^-1 (s - T),  d' = S^-1 R^-1 d.
// There all three shapes reduce to the quadratic a t^2 + 2 h t + c = 0 with
//   sphere:   a = d'.d',            h = s'.d',            c = s'.s' - 1
//   cylinder: a = dx^2 + dy^2,      h = sx dx + sy dy,    c = sx^2 + sy^2 - 1
//   cone:     a = dx^2 + dy^2 - dz^2, h = sx dx + sy dy - sz dz,
//             c = sx^2 + sy^2 - sz^2
// (primes dropped). The smallest root above T_EPS is the hit distance; t is
// the same in both spaces, so the world hit point is s + t d. The normal is
// the gradient of the normal-form surface at s' + t d', taken back to the
// world as R S^-1 n' (not normalised).
// Timing: fully pipelined; a ray/shape pair may enter every cycle and its
// result leaves exactly LATENCY cycles later with the same `tag`. The
// arithmetic takes 10 register stages; a delay line brings the total to the
// published 205-cycle latency. Ray transformation into normal space, the
// three normal forms and the quadratic solution follow the published method;
// the half-b formulation, the T_EPS self-intersection threshold and the
// gradient normals are this design's choices.
module raycaster
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int    LATENCY = 205,
  parameter fp16_t T_EPS   = 16'h3400   // 1/4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  vec3_t      in_src,
  input  vec3_t      in_dir,
  input  shape_rec_t in_shape,
  input  logic [7:0] in_tag,
  output logic       out_valid,
  output ray_hit_t   out_hit
);
  localparam int CORE = 10;

  typedef struct packed {
    logic [3:0]  stype;
    vec3_t       sinv;
    quat_t       rot;
    logic [15:0] color;
    logic [7:0]  tag;
    vec3_t       src;
    vec3_t       dir;
  } ctx_t;

  ctx_t  c [1:CORE];
  logic  v [1:CORE];
  vec3_t rel, rs, rd, ls, ld, lp, wn;
  fp16_t a, h, cc, disc, sq, t1, t2, t, a5, h5, a6, h6;
  logic  neg6;
  logic  hit7, hit8, hit9, hit10;
  vec3_t wp9, wp10;
  vec3_t ls_d [4:8];   // normal-space source and direction delayed to stage 9
  vec3_t ld_d [4:8];
  vec3_t ls_d2, ld_d2;
  fp16_t t_d [9:10];

  function automatic fp16_t sq2(input fp16_t x, input fp16_t y);
    return fp_add(fp_mul(x, x), fp_mul(y, y));
  endfunction

  always_ff @(posedge clk) begin
    for (int k = 1; k <= CORE; k++) v[k] <= rst ? 1'b0 : (k == 1 ? in_valid : v[k-1]);
    // stage 1: unpack shape, s - T
    c[1] <= '{in_shape[SH_TYPE][3:0],
              '{in_shape[SH_XSCL], in_shape[SH_YSCL], in_shape[SH_ZSCL]},
              '{in_shape[SH_RROT], in_shape[SH_IROT], in_shape[SH_JROT], in_shape[SH_KROT]},
              in_shape[SH_COL], in_tag, in_src, in_dir};
    rel <= v_sub(in_src, '{in_shape[SH_XLOC], in_shape[SH_YLOC], in_shape[SH_ZLOC]});
    for (int k = 2; k <= CORE; k++) c[k] <= c[k-1];
    // stage 2: inverse rotation
    rs <= q_rotate(q_conj(c[1].rot), rel);
    rd <= q_rotate(q_conj(c[1].rot), c[1].dir);
    // stage 3: inverse scale
    ls <= v_mul(rs, c[2].sinv);
    ld <= v_mul(rd, c[2].sinv);
    // stage 4: quadratic coefficients
    unique case (c[3].stype)
      SHAPE_SPHERE: begin
        a  <= v_dot(ld, ld);
        h  <= v_dot(ls, ld);
        cc <= fp_sub(v_dot(ls, ls), FP_ONE);
      end
      SHAPE_CYLINDER: begin
        a  <= sq2(ld.x, ld.y);
        h  <= fp_add(fp_mul(ls.x, ld.x), fp_mul(ls.y, ld.y));
        cc <= fp_sub(sq2(ls.x, ls.y), FP_ONE);
      end
      default: begin // cone (other types are discarded at stage 7)
        a  <= fp_sub(sq2(ld.x, ld.y), fp_mul(ld.z, ld.z));
        h  <= fp_sub(fp_add(fp_mul(ls.x, ld.x), fp_mul(ls.y, ld.y)), fp_mul(ls.z, ld.z));
        cc <= fp_sub(sq2(ls.x, ls.y), fp_mul(ls.z, ls.z));
      end
    endcase
    // stage 5: discriminant
    disc <= fp_sub(fp_mul(h, h), fp_mul(a, cc));
    a5 <= a;
    h5 <= h;
    // stage 6: square root
    sq <= fp_sqrt(disc);
    neg6 <= disc[15] && !fp_is_zero(disc);
    a6 <= a5;
    h6 <= h5;
    // stage 7: both roots
    t1 <= fp_div(fp_sub(fp_neg(h6), sq), a6);
    t2 <= fp_div(fp_add(fp_neg(h6), sq), a6);
    hit7 <= (c[6].stype == SHAPE_SPHERE || c[6].stype == SHAPE_CYLINDER || c[6].stype == SHAPE_CONE)
            && !neg6 && !fp_is_zero(a6);
    // stage 8: nearest root in front of the source
    begin
      fp16_t lo, hi;
      lo = fp_lt(t1, t2) ? t1 : t2;
      hi = fp_lt(t1, t2) ? t2 : t1;
      t <= fp_lt(T_EPS, lo) ? lo : hi;
      hit8 <= hit7 && (fp_lt(T_EPS, lo) || fp_lt(T_EPS, hi));
    end
    // stage 9: hit points
    lp <= v_add(ls_d2, v_scale(ld_d2, t));
    wp9 <= v_add(c[8].src, v_scale(c[8].dir, t));
    hit9 <= hit8;
    // stage 10: world normal
    unique case (c[9].stype)
      SHAPE_SPHERE:   wn <= q_rotate(c[9].rot, v_mul(lp, c[9].sinv));
      SHAPE_CYLINDER: wn <= q_rotate(c[9].rot, v_mul('{lp.x, lp.y, FP_ZERO}, c[9].sinv));
      default:        wn <= q_rotate(c[9].rot, v_mul('{lp.x, lp.y, fp_neg(lp.z)}, c[9].sinv));
    endcase
    wp10 <= wp9;
    hit10 <= hit9;
  end

  always_ff @(posedge clk) begin
    ls_d[4] <= ls;
    ld_d[4] <= ld;
    for (int k = 5; k <= 8; k++) begin
      ls_d[k] <= ls_d[k-1];
      ld_d[k] <= ld_d[k-1];
    end
    t_d[9] <= t;
    t_d[10] <= t_d[9];
  end
  assign ls_d2 = ls_d[8];
  assign ld_d2 = ld_d[8];

  ray_hit_t core_hit;
  assign core_hit = '{hit10, t_d[10], wp10, wn, c[CORE].color, c[CORE].tag};

  localparam int PAD = LATENCY - CORE;
  logic     pv [PAD+1];
  ray_hit_t ph [PAD+1];
  assign pv[0] = v[CORE];
  assign ph[0] = core_hit;
  for (genvar k = 1; k <= PAD; k++) begin : g_pad
    always_ff @(posedge clk) begin
      pv[k] <= rst ? 1'b0 : pv[k-1];
      ph[k] <= ph[k-1];
    end
  end
  assign out_valid = pv[PAD];
  assign out_hit = ph[PAD];

  initial assert (LATENCY >= CORE) else $error("LATENCY below the arithmetic depth");
endmodule
