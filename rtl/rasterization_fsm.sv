// rasterization_fsm: draws one 3D triangle into the frame buffer.
//
// When idle (`pause` low) it accepts a triangle from the rasterization
// controller. It then starts triangle_shade (lighting) and
// triangle_3d_to_2d (projection) together and waits for both. A triangle that
// is not visible is dropped. Otherwise the bounding box of the projected
// triangle, clipped to the screen, is scanned one pixel per cycle through
// triangle_2d_fill. For every pixel inside the triangle the depth stored in
// the frame z-buffer is read; the pixel and its depth are written when the
// triangle's centroid distance is smaller, so nearer triangles win whatever
// the drawing order.
// Timing per visible triangle: 1 accept cycle, max(63, NUM_LIGHTS + 3) cycles
// of projection and lighting, 1 set-up cycle, one cycle per bounding-box
// pixel, then 6 cycles to drain the fill pipeline and the depth test.
// `pause` is high from the cycle after acceptance until the FSM is idle again.
// The bounding-box scan, the half-plane test and the colouring rule follow
// the published rasterization description. Resolving visibility with a
// per-pixel depth test is this design's reading of the painter's ordering
// by centroid distance (see the README).
module rasterization_fsm
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int SCREEN_W    = 512,
  parameter int SCREEN_H    = 384,
  parameter int NUM_LIGHTS  = 64,
  parameter int T3D_LATENCY = 63,
  localparam int AW = $clog2(SCREEN_W * SCREEN_H),
  localparam int LW = $clog2(NUM_LIGHTS)
) (
  input  logic          clk,
  input  logic          rst,
  input  camera_t       cam,
  // controller_tri (3D)
  input  logic          tri_valid,
  input  vec3_t [2:0]   tri_v,
  input  logic [15:0]   tri_color,
  output logic          pause,
  // light records
  output logic [LW-1:0] lt_rd_idx,
  input  light_t        lt_rd_rec,
  // frame buffer write port
  output logic          fb_we,
  output logic [AW-1:0] fb_addr,
  output logic [15:0]   fb_data,
  // frame z-buffer
  output logic [AW-1:0] zb_raddr,
  input  logic [15:0]   zb_rdata,
  output logic          zb_we,
  output logic [AW-1:0] zb_waddr,
  output logic [15:0]   zb_wdata,
  // statistics
  output logic          ev_drawn,     // one-cycle: a visible triangle finished
  output logic          ev_culled,    // one-cycle: a triangle was dropped
  output logic          ev_zreject    // one-cycle: a pixel lost the depth test
);
  typedef enum logic [2:0] {S_IDLE, S_WORK, S_SETUP, S_SCAN, S_DRAIN} state_e;
  state_e state;

  vec3_t [2:0] v_q;
  logic [15:0] col_q, shaded;
  logic        shade_start, shade_done, shade_ok;
  logic        t_valid, t_vis, t_ok, t_vis_q;
  tri2d_t      t_tri, tri_q;

  logic signed [15:0] h, v, hmin, hmax, vmax;
  logic               scan_valid;
  logic               f_valid, f_within;
  logic signed [15:0] f_h, f_v;
  logic [2:0]         drain;

  triangle_shade #(.NUM_LIGHTS(NUM_LIGHTS)) u_shade (
    .clk, .rst, .start(shade_start), .tri_v(v_q), .tri_color(col_q),
    .lt_rd_idx, .lt_rd_rec, .done(shade_done), .color(shaded));

  triangle_3d_to_2d #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H), .LATENCY(T3D_LATENCY)) u_t3d (
    .clk, .rst, .in_valid(shade_start), .in_v(v_q), .in_color(col_q), .cam,
    .out_valid(t_valid), .out_visible(t_vis), .out_tri(t_tri));

  triangle_2d_fill u_fill (
    .clk, .rst, .tri_in(tri_q), .in_valid(scan_valid), .hcount(h), .vcount(v),
    .out_valid(f_valid), .is_within(f_within), .out_h(f_h), .out_v(f_v));

  assign pause = (state != S_IDLE);
  assign scan_valid = (state == S_SCAN);

  function automatic logic signed [15:0] smax(input logic signed [15:0] a, input logic signed [15:0] b);
    return a > b ? a : b;
  endfunction
  function automatic logic signed [15:0] smin(input logic signed [15:0] a, input logic signed [15:0] b);
    return a < b ? a : b;
  endfunction

  // Depth test, one cycle behind the fill output (z-buffer read latency).
  logic               d_valid;
  logic [AW-1:0]      d_addr;
  assign zb_raddr = AW'(32'(f_v) * SCREEN_W + 32'(f_h));
  always_ff @(posedge clk) begin
    if (rst) d_valid <= 1'b0;
    else     d_valid <= f_valid && f_within;
    d_addr <= zb_raddr;
  end
  logic closer;
  assign closer = fp_lt(tri_q.z, zb_rdata);
  assign fb_we = d_valid && closer;
  assign fb_addr = d_addr;
  assign fb_data = shaded;
  assign zb_we = d_valid && closer;
  assign zb_waddr = d_addr;
  assign zb_wdata = tri_q.z;
  assign ev_zreject = d_valid && !closer;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      shade_start <= 1'b0;
      shade_ok <= 1'b0;
      t_ok <= 1'b0;
      ev_drawn <= 1'b0;
      ev_culled <= 1'b0;
      drain <= '0;
    end else begin
      shade_start <= 1'b0;
      ev_drawn <= 1'b0;
      ev_culled <= 1'b0;
      unique case (state)
        S_IDLE: if (tri_valid) begin
          v_q <= tri_v;
          col_q <= tri_color;
          shade_start <= 1'b1;
          shade_ok <= 1'b0;
          t_ok <= 1'b0;
          state <= S_WORK;
        end
        S_WORK: begin
          if (shade_done) shade_ok <= 1'b1;
          if (t_valid) begin
            t_ok <= 1'b1;
            tri_q <= t_tri;
            t_vis_q <= t_vis;
          end
          if ((shade_ok || shade_done) && (t_ok || t_valid)) begin
            if (t_ok ? t_vis_q : t_vis) state <= S_SETUP;
            else begin
              ev_culled <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        S_SETUP: begin
          hmin <= smax(smin(smin(tri_q.x0, tri_q.x1), tri_q.x2), 16'sd0);
          hmax <= smin(smax(smax(tri_q.x0, tri_q.x1), tri_q.x2), 16'(SCREEN_W - 1));
          vmax <= smin(smax(smax(tri_q.y0, tri_q.y1), tri_q.y2), 16'(SCREEN_H - 1));
          h    <= smax(smin(smin(tri_q.x0, tri_q.x1), tri_q.x2), 16'sd0);
          v    <= smax(smin(smin(tri_q.y0, tri_q.y1), tri_q.y2), 16'sd0);
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (h == hmax) begin
            h <= hmin;
            if (v == vmax) begin
              drain <= 3'd5;
              state <= S_DRAIN;
            end else v <= v + 16'sd1;
          end else h <= h + 16'sd1;
        end
        S_DRAIN: begin
          drain <= drain - 3'd1;
          if (drain == 3'd0) begin
            ev_drawn <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
