// raytrace_controller: schedules a raytraced frame pixel by pixel and turns
// raycaster results into pixel colours.
//
// For every pixel (row by row) it builds the camera ray: from the camera
// location through the pixel's centre on the viewport (10 x 7.5 units at the
// near-clip distance, scaled by the field-of-view factors), rotated by the
// camera quaternion. The ray is cast against every shape slot, one per cycle
// into the pipelined raycaster, and the nearest hit is kept. A pixel whose ray
// hits nothing is black. Otherwise, for every directional light, a shadow ray
// is cast from the hit point against the light's direction through all
// shapes; if nothing blocks it, the light adds the shape colour scaled by
// intensity * max(0, n . (-forward)) / |n| and masked by the light colour.
// With no light switched on, the shape keeps its own colour.
// Timing: one ray pass takes NUM_SHAPES issue cycles plus the raycaster
// latency plus 3 cycles; a pixel needs one pass, plus one pass per
// switched-on light when it hits something, plus 2 cycles per light slot and
// 3 cycles of set-up and write. The schedule (one ray per shape per cycle, one
// primary ray then one lighting ray per light, no lighting rays for pixels
// that hit nothing) follows the published raytracing mode; the colour rule,
// the unlit fallback and black background are this design's choices.
// A clear request clears the frame buffer and pulses `done`.
module raytrace_controller
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int SCREEN_W   = 512,
  parameter int SCREEN_H   = 384,
  parameter int NUM_SHAPES = 4096,
  parameter int NUM_LIGHTS = 64,
  parameter int RC_LATENCY = 205,
  localparam int SW = $clog2(NUM_SHAPES),
  localparam int LW = $clog2(NUM_LIGHTS),
  localparam int AW = $clog2(SCREEN_W * SCREEN_H)
) (
  input  logic          clk,
  input  logic          rst,
  input  camera_t       cam,
  input  logic          render_req,
  input  logic          clear_req,
  output logic          done,
  // memory bank read ports
  output logic [SW-1:0] sh_rd_idx,
  input  shape_rec_t    sh_rd_rec,
  output logic [LW-1:0] lt_rd_idx,
  input  light_t        lt_rd_rec,
  // frame buffer
  output logic          clear_start,
  input  logic          clear_busy,
  output logic          fb_we,
  output logic [AW-1:0] fb_addr,
  output logic [15:0]   fb_data,
  // statistics
  output logic          ev_pixel_hit,   // a primary ray hit a shape
  output logic          ev_shadowed,    // a lighting ray was blocked
  output logic          ev_lit          // a lighting ray reached the light
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR0, S_CLR1, S_RAYGEN, S_ISSUE, S_COLLECT, S_NORM,
    S_LREAD, S_LCHECK, S_LACC, S_WRITE
  } state_e;
  state_e state;

  logic [15:0] px, py;
  logic        shadow_pass;
  vec3_t       ray_src, ray_dir;
  logic [SW:0] issue_cnt, res_cnt;
  logic        issued;          // a read was issued last cycle
  logic        best_hit, blocked, any_light;
  fp16_t       best_t, nlen;
  vec3_t       best_p, best_n;
  logic [15:0] best_col, acc;
  logic [LW:0] lidx;
  light_t      lt_q;

  logic       rc_valid;
  ray_hit_t   rc_hit;

  raycaster #(.LATENCY(RC_LATENCY)) u_rc (
    .clk, .rst, .in_valid(issued), .in_src(ray_src), .in_dir(ray_dir),
    .in_shape(sh_rd_rec), .in_tag({7'd0, shadow_pass}),
    .out_valid(rc_valid), .out_hit(rc_hit));

  assign sh_rd_idx = issue_cnt[SW-1:0];
  assign lt_rd_idx = lidx[LW-1:0];

  // Camera ray through the centre of pixel (px, py).
  localparam fp16_t VP_HALF_W = 16'h4500; // 5.0
  localparam fp16_t VP_HALF_H = 16'h4380; // 3.75
  vec3_t cam_dir;
  always_comb begin
    vec3_t dc;
    dc.x = fp_mul(fp_sub(fp_div(fp_from_int(32'(2 * px + 1)), fp_from_int(SCREEN_W)), FP_ONE),
                  fp_mul(VP_HALF_W, cam.fovh));
    dc.y = fp_mul(fp_sub(FP_ONE, fp_div(fp_from_int(32'(2 * py + 1)), fp_from_int(SCREEN_H))),
                  fp_mul(VP_HALF_H, cam.fovv));
    dc.z = fp_neg(cam.nclip);
    cam_dir = q_rotate(cam.rot, dc);
  end

  logic [15:0] contrib;
  always_comb begin
    fp16_t facing;
    facing = fp_max0(fp_div(fp_neg(v_dot(best_n, lt_q.fwd)), nlen));
    contrib = color_mask(color_scale(best_col, fp_mul(facing, lt_q.intensity)), lt_q.color);
  end

  assign fb_addr = AW'(32'(py) * SCREEN_W + 32'(px));
  assign fb_data = best_hit ? (any_light ? acc : best_col) : 16'h0000;
  assign fb_we = (state == S_WRITE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done <= 1'b0;
      clear_start <= 1'b0;
      issued <= 1'b0;
      issue_cnt <= '0;
      res_cnt <= '0;
      px <= '0;
      py <= '0;
      lidx <= '0;
      shadow_pass <= 1'b0;
      best_hit <= 1'b0;
      blocked <= 1'b0;
      any_light <= 1'b0;
      acc <= '0;
      ev_pixel_hit <= 1'b0;
      ev_shadowed <= 1'b0;
      ev_lit <= 1'b0;
    end else begin
      done <= 1'b0;
      clear_start <= 1'b0;
      issued <= 1'b0;
      ev_pixel_hit <= 1'b0;
      ev_shadowed <= 1'b0;
      ev_lit <= 1'b0;

      // Tabulate raycaster results of the current pass.
      if (rc_valid) begin
        res_cnt <= res_cnt + 1'b1;
        if (!shadow_pass) begin
          if (rc_hit.hit && (!best_hit || fp_lt(rc_hit.t, best_t))) begin
            best_hit <= 1'b1;
            best_t <= rc_hit.t;
            best_p <= rc_hit.point;
            best_n <= rc_hit.normal;
            best_col <= rc_hit.color;
          end
        end else if (rc_hit.hit) begin
          blocked <= 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (render_req) begin
            px <= '0;
            py <= '0;
            state <= S_RAYGEN;
          end else if (clear_req) begin
            clear_start <= 1'b1;
            state <= S_CLR0;
          end
        end
        S_CLR0: state <= S_CLR1;
        S_CLR1: if (!clear_busy) begin
          done <= 1'b1;
          state <= S_IDLE;
        end
        S_RAYGEN: begin
          ray_src <= cam.loc;
          ray_dir <= cam_dir;
          shadow_pass <= 1'b0;
          best_hit <= 1'b0;
          any_light <= 1'b0;
          acc <= '0;
          issue_cnt <= '0;
          res_cnt <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          issued <= 1'b1;
          if (issue_cnt == (SW+1)'(NUM_SHAPES - 1)) state <= S_COLLECT;
          else issue_cnt <= issue_cnt + 1'b1;
        end
        S_COLLECT: begin
          if (res_cnt == (SW+1)'(NUM_SHAPES)) begin
            if (!shadow_pass) begin
              if (best_hit) begin
                ev_pixel_hit <= 1'b1;
                state <= S_NORM;
              end else state <= S_WRITE;
            end else state <= S_LACC;
          end
        end
        S_NORM: begin
          nlen <= fp_sqrt(v_dot(best_n, best_n));
          lidx <= '0;
          state <= S_LREAD;
        end
        S_LREAD: state <= S_LCHECK;          // light record arrives next cycle
        S_LCHECK: begin
          lt_q <= lt_rd_rec;
          if (lt_rd_rec.src == SRC_DIRECTIONAL) begin
            any_light <= 1'b1;
            ray_src <= best_p;
            ray_dir <= v_scale(lt_rd_rec.fwd, 16'hBC00); // towards the light
            shadow_pass <= 1'b1;
            blocked <= 1'b0;
            issue_cnt <= '0;
            res_cnt <= '0;
            state <= S_ISSUE;
          end else if (lidx == (LW+1)'(NUM_LIGHTS - 1)) begin
            state <= S_WRITE;
          end else begin
            lidx <= lidx + 1'b1;
            state <= S_LREAD;
          end
        end
        S_LACC: begin
          if (blocked) ev_shadowed <= 1'b1;
          else begin
            ev_lit <= 1'b1;
            acc <= color_add(acc, contrib);
          end
          if (lidx == (LW+1)'(NUM_LIGHTS - 1)) state <= S_WRITE;
          else begin
            lidx <= lidx + 1'b1;
            state <= S_LREAD;
          end
        end
        S_WRITE: begin
          if (px == 16'(SCREEN_W - 1)) begin
            px <= '0;
            if (py == 16'(SCREEN_H - 1)) begin
              done <= 1'b1;
              state <= S_IDLE;
            end else begin
              py <= py + 1'b1;
              state <= S_RAYGEN;
            end
          end else begin
            px <= px + 1'b1;
            state <= S_RAYGEN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
