// vertex_ndc_map: maps a point on the near-clip plane to normalised device
// coordinates, so that the visible viewport spans [-1, 1] on both axes.
//
// The default viewport is 10 units wide and 7.5 units high (at near clip 1);
// the horizontal and vertical field-of-view properties scale it. So
// ndc_x = x / (5 * fovh) and ndc_y = y / (3.75 * fovv). The viewport size
// follows the published camera description; reading the field-of-view
// properties as plain scale factors on the viewport is this design's choice.
// Timing: one register stage, one point per cycle.
module vertex_ndc_map
  import fp16_pkg::*;
  import rend3r_pkg::*;
(
  input  logic    clk,
  input  logic    in_valid,
  input  fp16_t   in_x,
  input  fp16_t   in_y,
  input  camera_t cam,
  output logic    out_valid,
  output fp16_t   out_x,
  output fp16_t   out_y
);
  localparam fp16_t HALF_W = 16'h4500; // 5.0
  localparam fp16_t HALF_H = 16'h4380; // 3.75

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    out_x <= fp_div(in_x, fp_mul(HALF_W, cam.fovh));
    out_y <= fp_div(in_y, fp_mul(HALF_H, cam.fovv));
  end
endmodule
