// tb_raytrace_controller: the controller drives a real raycaster (short
// delay line) over a 16 x 12 screen with behavioural shape, light and frame
// memories. Scene: a large blue sphere, a small green sphere in front of it
// and one white directional light; two shape slots and one light slot empty.
// Every pixel is compared with a real-arithmetic model (hit or miss, shadow
// ray blocked or not, Lambert factor; channels within 2 counts); pixels that
// sit on a silhouette or shadow edge are skipped. Also checked: the exact
// frame cycle count against the per-pixel schedule, the event counts, the
// unlit fallback (light switched off: shapes keep their colour) and a clear
// request.
module tb_raytrace_controller;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int W = 16, H = 12, NS = 4, NL = 2, LAT = 12, AW = $clog2(W * H);
  localparam real CAMZ = 10.0, FOV = 0.125, LX = 0.70710678, LZ = 0.70710678;
  logic clk = 0, rst = 1, render_req = 0, clear_req = 0, done;
  camera_t cam;
  logic [1:0] sh_rd_idx;
  logic lt_rd_idx;
  shape_rec_t sh_rd_rec;
  light_t lt_rd_rec;
  logic clear_start, clear_busy, fb_we, ev_pixel_hit, ev_shadowed, ev_lit;
  logic [AW-1:0] fb_addr;
  logic [15:0] fb_data;
  shape_rec_t recs[NS];
  light_t lights[NL];
  logic [15:0] fb[W * H];
  int checks = 0, failures = 0, busy_cnt = 0, n_hit = 0, n_shadow = 0, n_lit = 0, n_done = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    sh_rd_rec <= recs[sh_rd_idx];
    lt_rd_rec <= lights[lt_rd_idx];
    if (fb_we) fb[fb_addr] <= fb_data;
    if (clear_start) busy_cnt <= 5;
    else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) foreach (fb[i]) fb[i] <= 16'h0000;
    end
    n_hit += int'(ev_pixel_hit);
    n_shadow += int'(ev_shadowed);
    n_lit += int'(ev_lit);
    n_done += int'(done);
  end
  assign clear_busy = busy_cnt > 0;

  raytrace_controller #(.SCREEN_W(W), .SCREEN_H(H), .NUM_SHAPES(NS), .NUM_LIGHTS(NL),
                        .RC_LATENCY(LAT)) dut (.*);

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void pixel_ray(input int px, input int py, output real d[3]);
    d[0] = ((2.0 * px + 1.0) / W - 1.0) * 5.0 * FOV;
    d[1] = (1.0 - (2.0 * py + 1.0) / H) * 3.75 * FOV;
    d[2] = -1.0;
  endfunction

  // Nearest t above the threshold; margin = discriminant / a (negative: miss).
  function automatic real sphere_t(input real s[3], input real d[3], input real c[3],
                                   input real r, output real margin);
    real ox, oy, oz, a, hb, cc, disc, t;
    ox = s[0] - c[0]; oy = s[1] - c[1]; oz = s[2] - c[2];
    a = d[0] * d[0] + d[1] * d[1] + d[2] * d[2];
    hb = ox * d[0] + oy * d[1] + oz * d[2];
    cc = ox * ox + oy * oy + oz * oz - r * r;
    disc = hb * hb - a * cc;
    margin = disc / a;
    if (disc < 0) return -1.0;
    t = (-hb - $sqrt(disc)) / a;
    if (t > 0.25) return t;
    t = (-hb + $sqrt(disc)) / a;
    return t > 0.25 ? t : -1.0;
  endfunction

  task automatic put_sphere(input int k, input real x, input real y, input real z,
                            input real r, input logic [15:0] col);
    recs[k] = '0;
    recs[k][SH_TYPE] = 16'(SHAPE_SPHERE);
    recs[k][SH_XLOC] = r2fp(x);
    recs[k][SH_YLOC] = r2fp(y);
    recs[k][SH_ZLOC] = r2fp(z);
    recs[k][SH_RROT] = FP_ONE;
    recs[k][SH_XSCL] = r2fp(1.0 / r);
    recs[k][SH_YSCL] = r2fp(1.0 / r);
    recs[k][SH_ZSCL] = r2fp(1.0 / r);
    recs[k][SH_COL] = col;
  endtask

  task automatic render(output longint cycles);
    longint t0;
    @(negedge clk);
    render_req = 1;
    @(negedge clk);
    render_req = 0;
    t0 = cyc;
    wait (done);
    cycles = cyc - t0;
    @(negedge clk);
  endtask

  real cen[2][3] = '{'{0.0, 0.0, 0.0}, '{0.0, 0.0, 3.0}};
  real rad[2] = '{3.0, 1.0};
  logic [15:0] scol[2] = '{16'h001F, 16'h07E0};

  initial begin
    longint cycles, expect_cyc;
    int ref_hits, n_strict, hit0;
    cam = '0;
    cam.loc.z = r2fp(CAMZ);
    cam.rot.r = FP_ONE;
    cam.nclip = FP_ONE;
    cam.fclip = r2fp(100.0);
    cam.fovh = r2fp(FOV);
    cam.fovv = r2fp(FOV);
    put_sphere(2, 0.0, 0.0, 0.0, 3.0, scol[0]);   // far sphere in the later slot
    put_sphere(0, 0.0, 0.0, 3.0, 1.0, scol[1]);
    recs[1] = '0;
    recs[3] = '0;
    lights[0] = '0;
    lights[0].src = SRC_DIRECTIONAL;
    lights[0].fwd = '{r2fp(-LX), FP_ZERO, r2fp(-LZ)};
    lights[0].color = 16'hFFFF;
    lights[0].intensity = FP_ONE;
    lights[1] = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- lit frame ----
    render(cycles);
    ref_hits = 0;
    n_strict = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      real s[3], d[3], t[2], m[2], p[3], nrm[3], f, tS, mS, sd[3];
      int best, exp_c[3], got[3];
      logic strict, lit;
      s = '{0.0, 0.0, CAMZ};
      pixel_ray(x, y, d);
      strict = 1'b1;
      best = -1;
      for (int k = 0; k < 2; k++) begin
        t[k] = sphere_t(s, d, cen[k], rad[k], m[k]);
        if (m[k] < 0.3 && m[k] > -0.3) strict = 1'b0;
        if (t[k] > 0 && (best < 0 || t[k] < t[best])) best = k;
      end
      if (best >= 0) ref_hits++;
      exp_c = '{0, 0, 0};
      if (best >= 0) begin
        for (int k = 0; k < 3; k++) p[k] = s[k] + t[best] * d[k];
        for (int k = 0; k < 3; k++) nrm[k] = (p[k] - cen[best][k]) / rad[best];
        f = nrm[0] * LX + nrm[2] * LZ;
        if (f < 0.1 && f > -0.1) strict = 1'b0;
        lit = f > 0;
        sd = '{LX, 0.0, LZ};
        for (int k = 0; k < 2; k++) if (k != best) begin
          tS = sphere_t(p, sd, cen[k], rad[k], mS);
          if (mS < 0.3 && mS > -0.3) strict = 1'b0;
          if (tS > 0) lit = 1'b0;
        end
        if (lit) begin
          exp_c[0] = (int'(scol[best][15:11]) * int'($floor(f * 256.0))) / 256;
          exp_c[1] = (int'(scol[best][10:5]) * int'($floor(f * 256.0))) / 256;
          exp_c[2] = (int'(scol[best][4:0]) * int'($floor(f * 256.0))) / 256;
        end
      end
      if (strict) begin
        n_strict++;
        got = '{int'(fb[y * W + x][15:11]), int'(fb[y * W + x][10:5]), int'(fb[y * W + x][4:0])};
        check($sformatf("pixel (%0d,%0d) = %h, expected %0d/%0d/%0d", x, y, fb[y * W + x],
                        exp_c[0], exp_c[1], exp_c[2]),
              got[0] <= exp_c[0] + 2 && got[0] >= exp_c[0] - 2 && got[1] <= exp_c[1] + 2 &&
              got[1] >= exp_c[1] - 2 && got[2] <= exp_c[2] + 2 && got[2] >= exp_c[2] - 2);
      end
    end
    check($sformatf("enough pixels checked strictly (%0d)", n_strict), n_strict > W * H / 2);
    check($sformatf("hit events %0d near the model's %0d", n_hit, ref_hits),
          n_hit <= ref_hits + (W * H - n_strict) && n_hit >= ref_hits - (W * H - n_strict));
    check($sformatf("one lighting ray per hit pixel: %0d lit + %0d shadowed", n_lit, n_shadow),
          n_lit + n_shadow == n_hit && n_lit > 0 && n_shadow > 0);
    // request edge to done: clear (5 + 2 cycles) then the pixels
    expect_cyc = longint'(W * H - n_hit) * (NS + LAT + 4)
               + longint'(n_hit) * ((NS + LAT + 3) * 2 + 2 * NL + 2);
    check($sformatf("frame cycles %0d, schedule %0d plus clear", cycles, expect_cyc),
          cycles >= expect_cyc && cycles <= expect_cyc + 12);
    $display("raytrace frame: %0d cycles, %0d hit pixels, %0d lit, %0d shadowed", cycles, n_hit, n_lit, n_shadow);

    // ---- unlit fallback: no light switched on ----
    hit0 = n_hit;
    lights[0].src = SRC_OFF;
    render(cycles);
    check("no lighting rays without lights", n_lit + n_shadow == n_hit - hit0);
    check("centre pixel keeps the green colour", fb[(H / 2) * W + W / 2] == scol[1]);
    check("left part of the big sphere keeps the blue colour", fb[(H / 2) * W + W / 2 - 3] == scol[0]);
    check("corner pixel is black", fb[0] == 16'h0000);

    // ---- clear ----
    @(negedge clk);
    clear_req = 1;
    @(negedge clk);
    clear_req = 0;
    wait (done);
    repeat (2) @(negedge clk);
    check("clear request empties the frame", fb[(H / 2) * W + W / 2] == 16'h0000 && n_done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
