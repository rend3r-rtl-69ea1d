// tb_rasterization_fsm: draws four triangles on a 32 x 24 screen with all
// lights off (each triangle keeps its colour), using behavioural frame
// buffer and z-buffer memories. Vertices are placed so that their pixel
// corners are exact integers, which lets an integer model predict the frame:
// the nearest covering triangle (by centroid distance) owns each pixel.
// Checked: every pixel of the final frame, the number of depth-test
// rejections, the culled/drawn events, and the cycle count of each triangle
// (1 + 63 + 1 + bounding-box pixels + 6).
module tb_rasterization_fsm;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int W = 32, H = 24, NL = 2, NT = 4, AW = $clog2(W * H);
  logic clk = 0, rst = 1, tri_valid = 0, pause;
  camera_t cam;
  vec3_t [2:0] tri_v;
  logic [15:0] tri_color;
  logic lt_rd_idx;
  light_t lt_rd_rec;
  logic fb_we, zb_we, ev_drawn, ev_culled, ev_zreject;
  logic [AW-1:0] fb_addr, zb_raddr, zb_waddr;
  logic [15:0] fb_data, zb_rdata, zb_wdata;
  logic [15:0] fb[W * H], zb[W * H];
  int checks = 0, failures = 0, cyc = 0, n_drawn = 0, n_culled = 0, n_zrej = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign lt_rd_rec = '0;   // every light slot switched off
  always @(posedge clk) begin
    zb_rdata <= zb[zb_raddr];
    if (zb_we) zb[zb_waddr] <= zb_wdata;
    if (fb_we) fb[fb_addr] <= fb_data;
    n_drawn  += int'(ev_drawn);
    n_culled += int'(ev_culled);
    n_zrej   += int'(ev_zreject);
  end

  rasterization_fsm #(.SCREEN_W(W), .SCREEN_H(H), .NUM_LIGHTS(NL)) dut (.*);

  // triangle k: pixel corners (px, py), depth d (camera looks down -z)
  int px[NT][3] = '{'{2, 28, 15}, '{6, 20, 8}, '{4, 10, 20}, '{-8, 40, 10}};
  int py[NT][3] = '{'{3, 3, 21}, '{6, 9, 18}, '{0, 12, 6}, '{0, 12, 30}};
  real dep[NT] = '{10.0, 5.0, 10.0, 20.0};
  logic [15:0] col[NT] = '{16'hF800, 16'h07E0, 16'h001F, 16'hFFFF};

  function automatic logic covers(input int k, input int x, input int y);
    longint e0, e1, e2;
    e0 = longint'(x - px[k][0]) * (py[k][1] - py[k][0]) - longint'(y - py[k][0]) * (px[k][1] - px[k][0]);
    e1 = longint'(x - px[k][1]) * (py[k][2] - py[k][1]) - longint'(y - py[k][1]) * (px[k][2] - px[k][1]);
    e2 = longint'(x - px[k][2]) * (py[k][0] - py[k][2]) - longint'(y - py[k][2]) * (px[k][0] - px[k][2]);
    return (e0 >= 0 && e1 >= 0 && e2 >= 0) || (e0 <= 0 && e1 <= 0 && e2 <= 0);
  endfunction

  initial begin
    real wx[3], wy[3], cx, cy, cdist[NT];
    logic [15:0] ef[W * H];
    real ez[W * H];
    int exp_zrej, bb, t0, lo_x, hi_x, lo_y, hi_y;
    cam = '0;
    cam.rot.r = FP_ONE;
    cam.nclip = FP_ONE;
    cam.fclip = r2fp(100.0);
    cam.fovh = FP_ONE;
    cam.fovv = FP_ONE;
    for (int i = 0; i < W * H; i++) begin
      zb[i] = FP_INF;
      fb[i] = 16'h0000;
      ef[i] = 16'h0000;
      ez[i] = 1.0e9;
    end
    exp_zrej = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < NT; k++) begin
      for (int j = 0; j < 3; j++) begin
        wx[j] = (px[k][j] / 16.0 - 1.0) * 5.0 * dep[k];
        wy[j] = (1.0 - py[k][j] / 12.0) * 3.75 * dep[k];
        tri_v[j] = '{r2fp(wx[j]), r2fp(wy[j]), r2fp(-dep[k])};
      end
      if (k == 2) tri_v[1].z = r2fp(2.0);   // behind the camera: culled
      tri_color = col[k];
      cx = (wx[0] + wx[1] + wx[2]) / 3.0;
      cy = (wy[0] + wy[1] + wy[2]) / 3.0;
      cdist[k] = $sqrt(cx * cx + cy * cy + dep[k] * dep[k]);
      // model
      lo_x = W; hi_x = -1; lo_y = H; hi_y = -1;
      foreach (px[k][j]) begin
        lo_x = px[k][j] < lo_x ? px[k][j] : lo_x;
        hi_x = px[k][j] > hi_x ? px[k][j] : hi_x;
        lo_y = py[k][j] < lo_y ? py[k][j] : lo_y;
        hi_y = py[k][j] > hi_y ? py[k][j] : hi_y;
      end
      lo_x = lo_x < 0 ? 0 : lo_x;  hi_x = hi_x > W - 1 ? W - 1 : hi_x;
      lo_y = lo_y < 0 ? 0 : lo_y;  hi_y = hi_y > H - 1 ? H - 1 : hi_y;
      bb = (hi_x - lo_x + 1) * (hi_y - lo_y + 1);
      if (k != 2)
        for (int y = lo_y; y <= hi_y; y++)
          for (int x = lo_x; x <= hi_x; x++)
            if (covers(k, x, y)) begin
              if (cdist[k] < ez[y * W + x]) begin
                ez[y * W + x] = cdist[k];
                ef[y * W + x] = col[k];
              end else exp_zrej++;
            end
      // drive
      tri_valid = 1;
      @(negedge clk);
      tri_valid = 0;
      t0 = cyc;      // edge that accepted the triangle
      wait (!pause);
      @(negedge clk);
      checks++;
      if (k != 2 && cyc - t0 != 1 + 63 + 1 + bb + 6) begin
        failures++;
        $display("FAIL triangle %0d took %0d cycles, expected %0d", k, cyc - t0, 71 + bb);
      end
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < W * H; i++) begin
      checks++;
      if (fb[i] != ef[i]) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d) = %h expected %h", i % W, i / W, fb[i], ef[i]);
      end
    end
    checks++;
    if (n_drawn != 3 || n_culled != 1 || n_zrej != exp_zrej) begin
      failures++;
      $display("FAIL events drawn=%0d culled=%0d zreject=%0d (expected %0d)", n_drawn, n_culled, n_zrej, exp_zrej);
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
