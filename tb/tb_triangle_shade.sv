// tb_triangle_shade: random triangles lit by a random set of directional
// lights (some slots switched off) read from a one-cycle-latency light
// memory. The expected colour uses a real-arithmetic facing factor and the
// same channel rules; each channel may differ by at most one count per active
// light. Also checks the unlit fallback and the NUM_LIGHTS + 3 cycle timing.
module tb_triangle_shade;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int NL = 4;
  logic clk = 0, rst = 1, start = 0, done;
  vec3_t [2:0] tri_v;
  logic [15:0] tri_color, color;
  logic [1:0] lt_rd_idx;
  light_t lt_rd_rec;
  light_t lights[NL];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) lt_rd_rec <= lights[lt_rd_idx];

  triangle_shade #(.NUM_LIGHTS(NL)) dut (.*);

  function automatic int chan_diff(input logic [15:0] a, input logic [15:0] b);
    int d[3], m;
    d[0] = int'(a[15:11]) - int'(b[15:11]);
    d[1] = int'(a[10:5]) - int'(b[10:5]);
    d[2] = int'(a[4:0]) - int'(b[4:0]);
    m = 0;
    foreach (d[i]) begin
      if (d[i] < 0) d[i] = -d[i];
      if (d[i] > m) m = d[i];
    end
    return m;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      real e1[3], e2[3], n[3], nl, f;
      logic [15:0] expc;
      int nact, t0;
      for (int j = 0; j < 3; j++) begin
        tri_v[j].x = r2fp(rnd(-500, 500, 100.0));
        tri_v[j].y = r2fp(rnd(-500, 500, 100.0));
        tri_v[j].z = r2fp(rnd(-500, 500, 100.0));
      end
      tri_color = 16'($urandom);
      for (int l = 0; l < NL; l++) begin
        real fx, fy, fz, fn;
        lights[l] = '0;
        lights[l].src = (k % 8 == 0) ? SRC_OFF : 2'($urandom_range(0, 1));
        fx = rnd(-100, 100, 100.0);
        fy = rnd(-100, 100, 100.0);
        fz = rnd(-100, 100, 100.0);
        fn = $sqrt(fx * fx + fy * fy + fz * fz) + 0.01;
        lights[l].fwd = '{r2fp(fx / fn), r2fp(fy / fn), r2fp(fz / fn)};
        lights[l].color = (l % 2) ? 16'hFFFF : 16'($urandom);
        lights[l].intensity = r2fp(rnd(0, 150, 100.0));
      end
      // model on the quantised values
      e1 = '{fp2r(tri_v[1].x) - fp2r(tri_v[0].x), fp2r(tri_v[1].y) - fp2r(tri_v[0].y), fp2r(tri_v[1].z) - fp2r(tri_v[0].z)};
      e2 = '{fp2r(tri_v[2].x) - fp2r(tri_v[0].x), fp2r(tri_v[2].y) - fp2r(tri_v[0].y), fp2r(tri_v[2].z) - fp2r(tri_v[0].z)};
      n = '{e1[1] * e2[2] - e1[2] * e2[1], e1[2] * e2[0] - e1[0] * e2[2], e1[0] * e2[1] - e1[1] * e2[0]};
      nl = $sqrt(n[0] * n[0] + n[1] * n[1] + n[2] * n[2]);
      if (nl < 0.5) continue;   // skip near-degenerate triangles
      expc = 16'h0000;
      nact = 0;
      for (int l = 0; l < NL; l++) if (lights[l].src == SRC_DIRECTIONAL) begin
        f = -(n[0] * fp2r(lights[l].fwd.x) + n[1] * fp2r(lights[l].fwd.y) + n[2] * fp2r(lights[l].fwd.z)) / nl;
        if (f < 0) f = 0;
        f = f * fp2r(lights[l].intensity);
        expc = color_add(expc, color_mask(color_scale(tri_color, r2fp(f)), lights[l].color));
        nact++;
      end
      if (nact == 0) expc = tri_color;
      @(negedge clk);
      start = 1;
      t0 = cyc + 1;   // number of the clock edge that samples start
      @(negedge clk);
      start = 0;
      wait (done);
      checks++;
      if (cyc - t0 != NL + 3) begin failures++; $display("FAIL timing %0d", cyc - t0); end
      checks++;
      if (chan_diff(color, expc) > (nact == 0 ? 0 : nact)) begin
        failures++;
        $display("FAIL shade %0d: got %h expected %h (%0d lights)", k, color, expc, nact);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
