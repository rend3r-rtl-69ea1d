// tb_vertex_project: random vertices seen from random cameras (position and
// unit-quaternion rotation) against a real-arithmetic model; checks the
// projected point, the depth and the three-cycle latency.
module tb_vertex_project;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  logic clk = 0, in_valid = 0, out_valid;
  vec3_t in_p;
  camera_t cam;
  fp16_t out_x, out_y, out_depth;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vertex_project dut (.*);

  function automatic logic near(input real got, input real e);
    real d;
    d = got - e;
    if (d < 0) d = -d;
    return d <= 0.02 * (e < 0 ? -e : e) + 0.05;  // half-precision sums of terms up to ~20
  endfunction

  initial begin
    for (int k = 0; k < 300; k++) begin
      real q[4], nq, p[3], c[3], v[3], r[3], t[3], ex, ey, ed, u[3];
      for (int i = 0; i < 4; i++) q[i] = rnd(-1000, 1000, 1000.0);
      nq = $sqrt(q[0]*q[0] + q[1]*q[1] + q[2]*q[2] + q[3]*q[3]);
      if (nq < 0.1) begin q = '{1.0, 0.0, 0.0, 0.0}; nq = 1.0; end
      for (int i = 0; i < 4; i++) q[i] = q[i] / nq;
      for (int i = 0; i < 3; i++) begin
        p[i] = rnd(-1000, 1000, 100.0);
        c[i] = rnd(-1000, 1000, 200.0);
      end
      cam = '0;
      cam.loc = '{r2fp(c[0]), r2fp(c[1]), r2fp(c[2])};
      cam.rot = '{r2fp(q[0]), r2fp(q[1]), r2fp(q[2]), r2fp(q[3])};
      cam.nclip = r2fp(1.5);
      in_p = '{r2fp(p[0]), r2fp(p[1]), r2fp(p[2])};
      // reference on the quantised inputs: rotate (p - c) by the conjugate
      v[0] = fp2r(in_p.x) - fp2r(cam.loc.x);
      v[1] = fp2r(in_p.y) - fp2r(cam.loc.y);
      v[2] = fp2r(in_p.z) - fp2r(cam.loc.z);
      u = '{-fp2r(cam.rot.i), -fp2r(cam.rot.j), -fp2r(cam.rot.k)};
      begin
        real w;
        w = fp2r(cam.rot.r);
        t[0] = 2.0 * (u[1]*v[2] - u[2]*v[1]);
        t[1] = 2.0 * (u[2]*v[0] - u[0]*v[2]);
        t[2] = 2.0 * (u[0]*v[1] - u[1]*v[0]);
        r[0] = v[0] + w*t[0] + (u[1]*t[2] - u[2]*t[1]);
        r[1] = v[1] + w*t[1] + (u[2]*t[0] - u[0]*t[2]);
        r[2] = v[2] + w*t[2] + (u[0]*t[1] - u[1]*t[0]);
      end
      ed = -r[2];
      if (ed < 1.0 && ed > -1.0) continue;     // avoid near-singular divisions
      ex = 1.5 * r[0] / ed;
      ey = 1.5 * r[1] / ed;
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (1) @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL early output"); end
      @(negedge clk);
      checks++;
      if (!out_valid || !near(fp2r(out_x), ex) || !near(fp2r(out_y), ey) || !near(fp2r(out_depth), ed)) begin
        failures++;
        $display("FAIL got (%f,%f,%f) expected (%f,%f,%f)", fp2r(out_x), fp2r(out_y), fp2r(out_depth), ex, ey, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
