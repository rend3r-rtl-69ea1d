// triangle_shade: flat lighting of one triangle.
//
// The surface normal is the cross product of two edges, n = (v2 - v1) x
// (v3 - v1), so the vertex order decides which side of the triangle is lit.
// For every directional light the facing factor max(0, n . (-forward) / |n|)
// is scaled by the light's intensity; the triangle colour is scaled by that
// factor and masked channel by channel with the light colour, and the results
// of all lights are summed with saturation. When no light is switched on the
// triangle keeps its own colour.
// Timing: `start` is a one-cycle pulse with the triangle on the inputs (held
// until `done`). Two cycles compute the normal and its length, then one light
// record is read per cycle over all NUM_LIGHTS slots (read latency one
// cycle); `done` pulses with the colour NUM_LIGHTS + 3 cycles after `start`.
// The cross-product normal and the dot product with the light direction
// follow the published description; the Lambert factor, the colour mixing
// rule and the unlit fallback are this design's choices.
module triangle_shade
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int NUM_LIGHTS = 64,
  localparam int LW = $clog2(NUM_LIGHTS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  vec3_t [2:0]   tri_v,
  input  logic [15:0]   tri_color,
  output logic [LW-1:0] lt_rd_idx,
  input  light_t        lt_rd_rec,
  output logic          done,
  output logic [15:0]   color
);
  typedef enum logic [1:0] {S_IDLE, S_NORM, S_LIGHTS} state_e;
  state_e state;

  vec3_t       n;
  fp16_t       nlen;
  logic [LW:0] cnt;        // light slot being read
  logic        rd_valid;   // lt_rd_rec holds slot cnt-1
  logic [15:0] acc;
  logic        any_light;

  assign lt_rd_idx = cnt[LW-1:0];

  fp16_t      facing, factor;
  logic [15:0] contrib;
  always_comb begin
    facing = fp_max0(fp_div(fp_neg(v_dot(n, lt_rd_rec.fwd)), nlen));
    factor = fp_mul(facing, lt_rd_rec.intensity);
    contrib = color_mask(color_scale(tri_color, factor), lt_rd_rec.color);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done <= 1'b0;
      cnt <= '0;
      rd_valid <= 1'b0;
      acc <= '0;
      any_light <= 1'b0;
      color <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n <= v_cross(v_sub(tri_v[1], tri_v[0]), v_sub(tri_v[2], tri_v[0]));
          state <= S_NORM;
        end
        S_NORM: begin
          nlen <= fp_sqrt(v_dot(n, n));
          cnt <= '0;
          rd_valid <= 1'b0;
          acc <= '0;
          any_light <= 1'b0;
          state <= S_LIGHTS;
        end
        S_LIGHTS: begin
          if (cnt != (LW+1)'(NUM_LIGHTS)) cnt <= cnt + 1'b1;
          rd_valid <= (cnt != (LW+1)'(NUM_LIGHTS));
          if (rd_valid && lt_rd_rec.src == SRC_DIRECTIONAL) begin
            any_light <= 1'b1;
            acc <= color_add(acc, contrib);
          end
          if (!rd_valid && cnt == (LW+1)'(NUM_LIGHTS)) begin
            color <= any_light ? acc : tri_color;
            done <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
