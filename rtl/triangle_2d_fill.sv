// triangle_2d_fill: half-plane test - is pixel (hcount, vcount) inside the
// screen-space triangle?
//
// For each edge i -> i+1 the edge function
//   E_i = (h - x_i) * (y_(i+1) - y_i) - (v - y_i) * (x_(i+1) - x_i)
// is evaluated in exact integer arithmetic; the pixel is inside (or on the
// boundary) when all three have the same sign, so either vertex winding is
// accepted. The triangle input must stay stable while pixels stream through.
// Timing: fully pipelined, one pixel per cycle, latency 4 cycles (differences,
// products, edge sums, sign test), matching the published four-cycle latency
// of the half-plane check. The pixel coordinates travel with the result.
module triangle_2d_fill
  import rend3r_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  tri2d_t             tri_in,
  input  logic               in_valid,
  input  logic signed [15:0] hcount,
  input  logic signed [15:0] vcount,
  output logic               out_valid,
  output logic               is_within,
  output logic signed [15:0] out_h,
  output logic signed [15:0] out_v
);
  logic signed [15:0] xs [3];
  logic signed [15:0] ys [3];
  assign xs = '{tri_in.x0, tri_in.x1, tri_in.x2};
  assign ys = '{tri_in.y0, tri_in.y1, tri_in.y2};

  logic [3:0]              vld;
  logic signed [15:0]      h_d [4];
  logic signed [15:0]      v_d [4];
  logic signed [16:0] ex [3];
  logic signed [16:0] ey [3];
  logic signed [16:0] ax [3];
  logic signed [16:0] ay [3];
  logic signed [33:0] p [3];
  logic signed [33:0] q [3];
  logic signed [34:0] e [3];

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[2:0], in_valid};
    h_d[0] <= hcount;
    v_d[0] <= vcount;
    for (int k = 1; k < 4; k++) begin
      h_d[k] <= h_d[k-1];
      v_d[k] <= v_d[k-1];
    end
    for (int i = 0; i < 3; i++) begin
      // stage 1
      ex[i] <= 17'(hcount) - 17'(xs[i]);
      ey[i] <= 17'(vcount) - 17'(ys[i]);
      ax[i] <= 17'(xs[(i + 1) % 3]) - 17'(xs[i]);
      ay[i] <= 17'(ys[(i + 1) % 3]) - 17'(ys[i]);
      // stage 2
      p[i] <= 34'(ex[i]) * 34'(ay[i]);
      q[i] <= 34'(ey[i]) * 34'(ax[i]);
      // stage 3
      e[i] <= 35'(p[i]) - 35'(q[i]);
    end
    // stage 4
    is_within <= (e[0] >= 0 && e[1] >= 0 && e[2] >= 0) ||
                 (e[0] <= 0 && e[1] <= 0 && e[2] <= 0);
  end

  assign out_valid = vld[3];
  assign out_h = h_d[3];
  assign out_v = v_d[3];
endmodule
