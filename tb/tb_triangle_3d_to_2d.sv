// tb_triangle_3d_to_2d: triangles streamed one per cycle through the
// projection pipeline on a 512 x 384 screen. A real-arithmetic model gives
// the expected pixel corners (within one pixel), the centroid-distance depth
// key and the visibility flag; every result must leave exactly LATENCY
// cycles after it entered, in order.
module tb_triangle_3d_to_2d;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int LAT = 63, N = 200;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, out_visible;
  vec3_t [2:0] in_v;
  logic [15:0] in_color;
  camera_t cam;
  tri2d_t out_tri;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  triangle_3d_to_2d #(.LATENCY(LAT)) dut (.*);

  vec3_t [2:0] tv[N];
  int in_cyc[N];
  int n_out = 0;

  // model: camera at the origin looking down -z, near plane 1, fov 1
  function automatic int px_of(input fp16_t x, input fp16_t z);
    return int'($floor((fp2r(x) / -fp2r(z) / 5.0 + 1.0) * 256.0));
  endfunction
  function automatic int py_of(input fp16_t y, input fp16_t z);
    return int'($floor((1.0 - fp2r(y) / -fp2r(z) / 3.75) * 192.0));
  endfunction

  function automatic logic off_by_one(input int got, input int e);
    return got > e + 1 || got < e - 1;
  endfunction

  initial begin
    cam = '0;
    cam.rot.r = FP_ONE;
    cam.nclip = FP_ONE;
    cam.fclip = r2fp(64.0);
    cam.fovh = FP_ONE;
    cam.fovv = FP_ONE;
    in_color = 16'hF800;
    for (int k = 0; k < N; k++) begin
      for (int j = 0; j < 3; j++) begin
        tv[k][j].x = r2fp(rnd(-400, 400, 100.0));
        tv[k][j].y = r2fp(rnd(-300, 300, 100.0));
        tv[k][j].z = r2fp(rnd(-2000, -150, 100.0));
      end
      case (k % 10)
        7: tv[k][1].z = r2fp(0.5);          // a vertex behind the camera
        8: for (int j = 0; j < 3; j++) tv[k][j].z = r2fp(-100.0);   // beyond the far plane
        9: for (int j = 0; j < 3; j++) tv[k][j].x = r2fp(200.0 + j); // right of the screen
        default: ;
      endcase
    end
    repeat (10) @(negedge clk);   // longer than the unreset vertex stages
    rst = 0;
    for (int k = 0; k < N; k++) begin
      in_v = tv[k];
      in_valid = 1;
      in_cyc[k] = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    vec3_t [2:0] v;
    real cx, cy, cz, d;
    logic vis;
    v = tv[n_out];
    checks++;
    if (cyc - in_cyc[n_out] != LAT) begin
      failures++;
      $display("FAIL latency %0d", cyc - in_cyc[n_out]);
    end
    vis = (n_out % 10) < 7;
    checks++;
    if (out_visible != vis) begin
      failures++;
      $display("FAIL triangle %0d visible=%b", n_out, out_visible);
    end
    if (vis) begin
      cx = (fp2r(v[0].x) + fp2r(v[1].x) + fp2r(v[2].x)) / 3.0;
      cy = (fp2r(v[0].y) + fp2r(v[1].y) + fp2r(v[2].y)) / 3.0;
      cz = (fp2r(v[0].z) + fp2r(v[1].z) + fp2r(v[2].z)) / 3.0;
      d = $sqrt(cx * cx + cy * cy + cz * cz);
      checks++;
      if (off_by_one(out_tri.x0, px_of(v[0].x, v[0].z)) || off_by_one(out_tri.y0, py_of(v[0].y, v[0].z)) ||
          off_by_one(out_tri.x1, px_of(v[1].x, v[1].z)) || off_by_one(out_tri.y1, py_of(v[1].y, v[1].z)) ||
          off_by_one(out_tri.x2, px_of(v[2].x, v[2].z)) || off_by_one(out_tri.y2, py_of(v[2].y, v[2].z)) ||
          fp2r(out_tri.z) > d * 1.01 || fp2r(out_tri.z) < d * 0.99 || out_tri.color != 16'hF800) begin
        failures++;
        $display("FAIL triangle %0d: (%0d,%0d) (%0d,%0d) (%0d,%0d) z=%f, expected (%0d,%0d) z=%f",
                 n_out, out_tri.x0, out_tri.y0, out_tri.x1, out_tri.y1, out_tri.x2, out_tri.y2,
                 fp2r(out_tri.z), px_of(v[0].x, v[0].z), py_of(v[0].y, v[0].z), d);
      end
    end
    n_out <= n_out + 1;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
