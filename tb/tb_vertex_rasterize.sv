// tb_vertex_rasterize: NDC points to pixel coordinates on a 512 x 384
// screen, against floor((x+1)*256) and floor((1-y)*192), latency one cycle.
module tb_vertex_rasterize;
  import fp16_pkg::*;
  import tb_fp_util_pkg::*;
  logic clk = 0, in_valid = 0, out_valid;
  fp16_t in_x, in_y;
  logic signed [15:0] out_px, out_py;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vertex_rasterize dut (.*);

  initial begin
    // exact corners
    real xs[6] = '{-1.0, 1.0, 0.0, 0.5, -0.25, 1.5};
    real ys[6] = '{1.0, -1.0, 0.0, -0.5, 0.25, -1.5};
    for (int k = 0; k < 306; k++) begin
      real x, y;
      int ex, ey;
      if (k < 6) begin x = xs[k]; y = ys[k]; end
      else begin
        x = rnd(-1500, 1500, 1000.0);
        y = rnd(-1500, 1500, 1000.0);
      end
      in_x = r2fp(x);
      in_y = r2fp(y);
      ex = int'($floor((fp2r(in_x) + 1.0) * 256.0));
      ey = int'($floor((1.0 - fp2r(in_y)) * 192.0));
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      // exact cases must match exactly; others within one pixel (half-precision sums)
      if (!out_valid || (k < 6 && (out_px != ex || out_py != ey)) ||
          out_px > ex + 1 || out_px < ex - 1 || out_py > ey + 1 || out_py < ey - 1) begin
        failures++;
        $display("FAIL (%f,%f) -> (%0d,%0d) expected (%0d,%0d)", x, y, out_px, out_py, ex, ey);
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
