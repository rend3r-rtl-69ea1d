// tb_vertex_ndc_map: near-plane points are divided by the half viewport
// (5 x fovh, 3.75 x fovv); checked against real arithmetic, latency one cycle.
module tb_vertex_ndc_map;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  logic clk = 0, in_valid = 0, out_valid;
  fp16_t in_x, in_y, out_x, out_y;
  camera_t cam;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vertex_ndc_map dut (.*);

  function automatic logic near(input real got, input real e);
    real d;
    d = got - e;
    if (d < 0) d = -d;
    return d <= 0.003 * (e < 0 ? -e : e) + 1e-4;
  endfunction

  initial begin
    for (int k = 0; k < 300; k++) begin
      real x, y, fh, fv;
      x = rnd(-1000, 1000, 100.0);
      y = rnd(-1000, 1000, 100.0);
      fh = $urandom_range(10, 300) / 100.0;
      fv = $urandom_range(10, 300) / 100.0;
      cam = '0;
      cam.fovh = r2fp(fh);
      cam.fovv = r2fp(fv);
      in_x = r2fp(x);
      in_y = r2fp(y);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || !near(fp2r(out_x), fp2r(in_x) / (5.0 * fp2r(cam.fovh)))
                     || !near(fp2r(out_y), fp2r(in_y) / (3.75 * fp2r(cam.fovv)))) begin
        failures++;
        $display("FAIL (%f,%f) -> (%f,%f)", fp2r(in_x), fp2r(in_y), fp2r(out_x), fp2r(out_y));
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
