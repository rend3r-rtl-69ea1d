// triangle_3d_to_2d: turns one 3D triangle into a screen-space triangle.
//
// Each of the three vertices goes through vertex_project -> vertex_ndc_map ->
// vertex_rasterize (three copies side by side). In parallel the triangle's
// depth key is computed: the distance from its centroid to the camera, which
// the painter uses to decide which triangle is in front. The triangle is
// reported `visible` when all three vertices lie beyond the near-clip plane,
// its centroid is no farther than the far-clip distance, and its bounding
// box overlaps the screen; otherwise it is dropped.
// Timing: fully pipelined (one triangle per cycle), latency LATENCY cycles
// from in_valid to out_valid. The arithmetic needs 5 cycles; the rest is a
// delay line so that the latency equals the published 63 cycles of this
// stage. The visibility rule is this design's choice.
module triangle_3d_to_2d
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int SCREEN_W = 512,
  parameter int SCREEN_H = 384,
  parameter int LATENCY  = 63
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  vec3_t [2:0] in_v,
  input  logic [15:0] in_color,
  input  camera_t     cam,
  output logic        out_valid,
  output logic        out_visible,
  output tri2d_t      out_tri
);
  localparam int CORE = 5;

  logic [2:0]              pv, nv, rv;
  fp16_t [2:0]             px, py, pd, nx, ny;
  logic signed [15:0]      sx [3];
  logic signed [15:0]      sy [3];
  fp16_t [2:0]             d1, d2;          // depth delayed to the rasterize output

  for (genvar i = 0; i < 3; i++) begin : g_vtx
    vertex_project u_proj (
      .clk, .in_valid(in_valid), .in_p(in_v[i]), .cam,
      .out_valid(pv[i]), .out_x(px[i]), .out_y(py[i]), .out_depth(pd[i]));
    vertex_ndc_map u_ndc (
      .clk, .in_valid(pv[i]), .in_x(px[i]), .in_y(py[i]), .cam,
      .out_valid(nv[i]), .out_x(nx[i]), .out_y(ny[i]));
    vertex_rasterize #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_rast (
      .clk, .in_valid(nv[i]), .in_x(nx[i]), .in_y(ny[i]),
      .out_valid(rv[i]), .out_px(sx[i]), .out_py(sy[i]));
    always_ff @(posedge clk) begin
      d1[i] <= pd[i];
      d2[i] <= d1[i];
    end
  end

  // Centroid distance and colour, aligned with the vertex pipeline.
  fp16_t        dist_sq, cdist;
  vec3_t        cen;
  logic [15:0]  col [CORE];
  fp16_t        dist_d [CORE];
  localparam fp16_t THIRD = 16'h3555;

  always_ff @(posedge clk) begin
    cen <= v_sub(v_scale(v_add(v_add(in_v[0], in_v[1]), in_v[2]), THIRD), cam.loc);
    dist_sq <= v_dot(cen, cen);
    cdist <= fp_sqrt(dist_sq);
    col[0] <= in_color;
    for (int k = 1; k < CORE; k++) col[k] <= col[k-1];
    dist_d[0] <= cdist;
    for (int k = 1; k < CORE; k++) dist_d[k] <= dist_d[k-1];
  end

  // Assemble the result after CORE cycles.
  tri2d_t core_tri;
  logic   core_vis;
  always_comb begin
    logic signed [15:0] xmin, xmax, ymin, ymax;
    core_tri = '{sx[0], sy[0], sx[1], sy[1], sx[2], sy[2], dist_d[1], col[CORE-1]};
    xmin = sx[0]; xmax = sx[0]; ymin = sy[0]; ymax = sy[0];
    for (int i = 1; i < 3; i++) begin
      if (sx[i] < xmin) xmin = sx[i];
      if (sx[i] > xmax) xmax = sx[i];
      if (sy[i] < ymin) ymin = sy[i];
      if (sy[i] > ymax) ymax = sy[i];
    end
    core_vis = !fp_lt(d2[0], cam.nclip) && !fp_lt(d2[1], cam.nclip) && !fp_lt(d2[2], cam.nclip)
             && !fp_lt(cam.fclip, dist_d[1])
             && xmax >= 0 && ymax >= 0
             && xmin < 16'(SCREEN_W) && ymin < 16'(SCREEN_H);
  end

  // Delay line up to the specified latency.
  localparam int PAD = LATENCY - CORE;
  logic   pad_v   [PAD+1];
  logic   pad_vis [PAD+1];
  tri2d_t pad_tri [PAD+1];
  assign pad_v[0] = rv[0];
  assign pad_vis[0] = core_vis;
  assign pad_tri[0] = core_tri;
  for (genvar k = 1; k <= PAD; k++) begin : g_pad
    always_ff @(posedge clk) begin
      pad_v[k] <= rst ? 1'b0 : pad_v[k-1];
      pad_vis[k] <= pad_vis[k-1];
      pad_tri[k] <= pad_tri[k-1];
    end
  end
  assign out_valid = pad_v[PAD];
  assign out_visible = pad_vis[PAD];
  assign out_tri = pad_tri[PAD];

  initial assert (LATENCY >= CORE) else $error("LATENCY below the arithmetic depth");
endmodule
