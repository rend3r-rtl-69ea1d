// vertex_project: perspective projection of one world-space vertex onto the
// camera's near-clip plane (first of the three vertex stages of the
// rasterizer's 3D-to-2D transform).
//
// Stage 1 moves the vertex into camera-relative coordinates (p - camera
// location). Stage 2 rotates it by the conjugate of the camera quaternion, so
// that the camera looks down -z. Stage 3 divides by the depth: the projected
// point is (nclip * x / d, nclip * y / d) with d = -z, i.e. its position on
// the near-clip plane in world units. All arithmetic is half precision.
// Timing: fully pipelined, one vertex per cycle, latency 3 cycles. The
// projection geometry follows the published camera conventions (default view
// direction -z, near-clip plane as the viewport); the split into three
// register stages is this design's choice.
module vertex_project
  import fp16_pkg::*;
  import rend3r_pkg::*;
(
  input  logic    clk,
  input  logic    in_valid,
  input  vec3_t   in_p,
  input  camera_t cam,
  output logic    out_valid,
  output fp16_t   out_x,      // on the near-clip plane, world units
  output fp16_t   out_y,
  output fp16_t   out_depth   // distance in front of the camera (-z in camera space)
);
  logic  v1, v2;
  vec3_t rel, cs;

  always_ff @(posedge clk) begin
    v1 <= in_valid;
    rel <= v_sub(in_p, cam.loc);
    v2 <= v1;
    cs <= q_rotate(q_conj(cam.rot), rel);
    out_valid <= v2;
    out_depth <= fp_neg(cs.z);
    out_x <= fp_div(fp_mul(cam.nclip, cs.x), fp_neg(cs.z));
    out_y <= fp_div(fp_mul(cam.nclip, cs.y), fp_neg(cs.z));
  end
endmodule
