// tb_rend3r_top: end-to-end test of the whole pipeline at a reduced screen
// (32 x 24) and scene capacity (8 shapes, 2 lights).
//
// A program is written into the instruction bank through the network-side
// port. It starts a new render (nr), sets the camera, stores three triangles
// and one light and renders a rasterized frame (nf). The testbench then
// switches the design to raytracing mode, and the program stores two spheres
// and a cylinder, re-aims the light, renders a raytraced frame, loops once
// (lr) through a short tail, and ends: the network side overwrites the lr word with er (end render)
// while the second pass runs. Pixels are compared with values
// computed here in real arithmetic; every mechanism (clear, cull, depth
// reject, draw, mode switch, primary hit and miss, lit and shadowed lighting
// rays, loop, halt, compute-mode stall) must occur at least once, and the
// raytraced frame time is checked against the per-pixel schedule.
module tb_rend3r_top;
  import tb_fp_util_pkg::*;

  localparam int W = 32, H = 24, NS = 8, NL = 2, LAT = 205;
  localparam int NPIX = W * H;

  logic clk = 0, pix_clk = 0, net_clk = 0, rst = 1, run = 0, raytrace_mode = 0;
  logic ib_we = 0;
  logic [6:0] ib_waddr;
  logic [31:0] ib_wdata;
  logic vga_hsync, vga_vsync, compute_mode, halted, frame_done;
  logic [3:0] vga_r, vga_g, vga_b;

  always #5 clk = ~clk;
  always #7.5 pix_clk = ~pix_clk;
  always #10 net_clk = ~net_clk;

  rend3r_top #(.SCREEN_W(W), .SCREEN_H(H), .NUM_INSTRUCTIONS(128), .NUM_SHAPES(NS),
               .NUM_LIGHTS(NL)) dut (
    .clk, .pix_clk, .net_clk, .rst, .run, .raytrace_mode, .ib_we, .ib_waddr, .ib_wdata,
    .vga_hsync, .vga_vsync, .vga_r, .vga_g, .vga_b, .compute_mode, .halted, .frame_done);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program ----------------
  logic [31:0] prog [$];
  task automatic tri_put(input int idx, input real v[9], input logic [15:0] col);
    for (int p = 0; p < 9; p += 2) begin
      if (p == 8) begin
        prog.push_back(asm_se(idx, 9, 11));
        prog.push_back(asm_sd(r2fp(v[8]), col));
      end else begin
        prog.push_back(asm_se(idx, p + 1, p + 2));
        prog.push_back(asm_sd(r2fp(v[p]), r2fp(v[p + 1])));
      end
    end
  endtask
  task automatic sphere_put(input int idx, input real x, input real y, input real z,
                            input real q[4], input real sinv[3], input logic [15:0] col,
                            input int stype);
    prog.push_back(asm_se(idx, 1, 2));  prog.push_back(asm_sd(r2fp(x), r2fp(y)));
    prog.push_back(asm_se(idx, 3, 4));  prog.push_back(asm_sd(r2fp(z), r2fp(q[0])));
    prog.push_back(asm_se(idx, 5, 6));  prog.push_back(asm_sd(r2fp(q[1]), r2fp(q[2])));
    prog.push_back(asm_se(idx, 7, 8));  prog.push_back(asm_sd(r2fp(q[3]), r2fp(sinv[0])));
    prog.push_back(asm_se(idx, 9, 10)); prog.push_back(asm_sd(r2fp(sinv[1]), r2fp(sinv[2])));
    prog.push_back(asm_se(idx, 11, 13)); prog.push_back(asm_sd(col, 16'(stype)));
  endtask

  localparam real CAMZ = 6.0, FOV = 0.25;
  localparam real LX = 0.70710678, LZ = 0.70710678; // direction towards the light (raytrace)
  int loop_target;

  task automatic build_program();
    prog.push_back(asm_f(2'b01));                          // nr
    prog.push_back(asm_cam(3, r2fp(CAMZ)));                // camera z
    prog.push_back(asm_cam(10, r2fp(FOV)));                // fov-h scale
    prog.push_back(asm_cam(11, r2fp(FOV)));                // fov-v scale
    tri_put(0, '{-4.0, -3.0, 0.0, 4.0, -3.0, 0.0, 0.0, 3.0, 0.0}, 16'hF800);   // red, near
    tri_put(1, '{-8.0, -6.0, -3.0, 8.0, -6.0, -3.0, 0.0, 6.0, -3.0}, 16'h07E0); // green, far
    tri_put(2, '{-1.0, -1.0, 8.0, 1.0, -1.0, 8.0, 0.0, 1.0, 8.0}, 16'hFFFF);    // behind camera
    prog.push_back(asm_lt(0, 0, 16'h0001));                // directional
    prog.push_back(asm_lt(0, 6, r2fp(-1.0)));              // forward (0,0,-1)
    prog.push_back(asm_lt(0, 7, 16'hFFFF));                // white
    prog.push_back(asm_lt(0, 8, r2fp(1.0)));               // intensity
    prog.push_back(asm_f(2'b10));                          // nf (rasterized)
    sphere_put(4, 0.0, 0.0, 0.0, '{1.0, 0.0, 0.0, 0.0}, '{1.0/3.0, 1.0/3.0, 1.0/3.0}, 16'h001F, 1);
    sphere_put(5, 0.0, 0.0, 3.0, '{1.0, 0.0, 0.0, 0.0}, '{1.0, 1.0, 1.0}, 16'h07E0, 1);
    sphere_put(6, 0.0, -5.0, 0.0, '{0.70710678, 0.0, 0.70710678, 0.0}, '{2.0, 2.0, 1.0}, 16'hF800, 2);
    prog.push_back(asm_lt(0, 4, r2fp(-LX)));               // forward (-x, 0, -z)
    prog.push_back(asm_lt(0, 6, r2fp(-LZ)));
    prog.push_back(asm_f(2'b10));                          // nf (raytraced)
    loop_target = prog.size();
    prog.push_back(asm_f(2'b11));                          // lr: back to the top
  endtask

  // ---------------- reference raytrace (spheres only, real arithmetic) ----------------
  function automatic void pixel_ray(input int px, input int py, output real d[3]);
    d[0] = ((2.0 * px + 1.0) / W - 1.0) * 5.0 * FOV;
    d[1] = (1.0 - (2.0 * py + 1.0) / H) * 3.75 * FOV;
    d[2] = -1.0;
  endfunction

  // Nearest t > eps of a sphere; margin = discriminant / a (negative: miss).
  function automatic real sphere_t(input real s[3], input real d[3], input real c[3],
                                   input real r, output real margin);
    real ox, oy, oz, a, hb, cc, disc, t;
    ox = s[0] - c[0]; oy = s[1] - c[1]; oz = s[2] - c[2];
    a = d[0]*d[0] + d[1]*d[1] + d[2]*d[2];
    hb = ox*d[0] + oy*d[1] + oz*d[2];
    cc = ox*ox + oy*oy + oz*oz - r*r;
    disc = hb*hb - a*cc;
    margin = disc / a;
    if (disc < 0) return -1.0;
    t = (-hb - $sqrt(disc)) / a;
    if (t > 0.25) return t;
    t = (-hb + $sqrt(disc)) / a;
    return t > 0.25 ? t : -1.0;
  endfunction

  function automatic logic [15:0] fbpix(input int x, input int y);
    return dut.u_fb.mem[y * W + x];
  endfunction

  function automatic logic close_ch(input int got, input int exp_v, input int tol);
    return (got >= exp_v - tol) && (got <= exp_v + tol);
  endfunction

  // ---------------- event counters ----------------
  int n_clear, n_drawn, n_culled, n_zrej, n_hit, n_shadow, n_lit, n_loop, n_stall;
  int n_sphere_hits, n_cyl_hits, n_miss_pix, n_mode_switch, n_frames;
  logic [15:0] last_pc;
  always @(posedge clk) begin
    if (dut.u_fb.clear_start) n_clear++;
    if (dut.ev_drawn) n_drawn++;
    if (dut.ev_culled) n_culled++;
    if (dut.ev_zreject) n_zrej++;
    if (dut.ev_pixel_hit) n_hit++;
    if (dut.ev_shadowed) n_shadow++;
    if (dut.ev_lit) n_lit++;
    if (compute_mode) n_stall++;
    if (dut.u_rt.fb_we && !dut.u_rt.best_hit) n_miss_pix++;
    if (dut.u_rt.rc_valid && dut.u_rt.rc_hit.hit && !dut.u_rt.shadow_pass) begin
      if (dut.u_rt.rc_hit.color == 16'hF800) n_cyl_hits++;
      else n_sphere_hits++;
    end
    if (!rst && dut.u_proc.state == 2 && dut.u_proc.ib_data == asm_f(2'b11)) n_loop++;
    if (frame_done) n_frames++;
  end

  // ---------------- stimulus ----------------
  longint t_rt_start, t_rt_end, cycle;
  int miss0, miss1;
  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;
  initial begin
    build_program();
    repeat (5) @(posedge net_clk);
    rst = 1;
    foreach (prog[i]) begin
      @(negedge net_clk);
      ib_we = 1;
      ib_waddr = 7'(i);
      ib_wdata = prog[i];
    end
    @(negedge net_clk);
    ib_we = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    @(negedge clk);
    run = 1;

    // Frame 1: nr's clear, then the rasterized frame.
    @(posedge frame_done);           // clear done
    @(posedge frame_done);           // raster frame done
    @(negedge clk);
    check("red triangle in front at the screen centre", fbpix(16, 12) == 16'hF800);
    check("green triangle behind, visible outside the red one", fbpix(8, 19) == 16'h07E0);
    check("background is black", fbpix(0, 0) == 16'h0000);
    check("two triangles drawn", n_drawn == 2);
    check("one triangle culled (behind the camera)", n_culled == 1);
    check("depth test rejected pixels of the far triangle", n_zrej > 0);

    raytrace_mode = 1;
    n_mode_switch++;
    @(posedge compute_mode);
    t_rt_start = cycle;
    miss0 = n_miss_pix;
    @(posedge frame_done);
    t_rt_end = cycle;
    miss1 = n_miss_pix - miss0;
    @(negedge clk);

    begin
      real s[3], d[3], mA, mB, tA, tB, p[3], n[3], f, sd[3], mS, tS;
      real ca[3], cb[3];
      int exp_v, found_lit, found_shadow;
      logic [15:0] px_v;
      ca = '{0.0, 0.0, 0.0};
      cb = '{0.0, 0.0, 3.0};
      s = '{0.0, 0.0, CAMZ};
      // centre pixel: front of sphere B, lit
      pixel_ray(16, 12, d);
      tB = sphere_t(s, d, cb, 1.0, mB);
      for (int k = 0; k < 3; k++) p[k] = s[k] + tB * d[k];
      n = '{p[0], p[1], p[2] - 3.0};
      f = n[0] * LX + n[2] * LZ;
      exp_v = (63 * int'($floor(f * 256.0))) / 256;
      px_v = fbpix(16, 12);
      check($sformatf("centre pixel lit green %h (expected green %0d)", px_v, exp_v),
            close_ch(int'(px_v[10:5]), exp_v, 2) && px_v[15:11] == 0 && px_v[4:0] == 0);
      check("corner pixel misses everything", fbpix(0, 0) == 16'h0000);
      // one clearly lit and one clearly shadowed pixel of sphere A
      found_lit = 0;
      found_shadow = 0;
      for (int y = 0; y <= H / 2; y++) begin
        for (int x = 0; x < W; x++) begin
          pixel_ray(x, y, d);
          tA = sphere_t(s, d, ca, 3.0, mA);
          tB = sphere_t(s, d, cb, 1.0, mB);
          if (tA > 0 && mA > 0.5 && mB < -0.2) begin
            for (int k = 0; k < 3; k++) p[k] = s[k] + tA * d[k];
            sd = '{LX, 0.0, LZ};
            tS = sphere_t(p, sd, cb, 1.0, mS);
            px_v = fbpix(x, y);
            if (tS > 0 && mS > 0.3 && found_shadow < 3) begin
              found_shadow++;
              check($sformatf("pixel (%0d,%0d) of sphere A in the shadow of B is black: %h", x, y, px_v),
                    px_v == 16'h0000);
            end else if (mS < -0.3 && found_lit < 3) begin
              f = (p[0] * LX + p[2] * LZ) / 3.0;
              if (f > 0.1) begin
                found_lit++;
                exp_v = (31 * int'($floor(f * 256.0))) / 256;
                check($sformatf("pixel (%0d,%0d) of sphere A lit blue %h (expected %0d)", x, y, px_v, exp_v),
                      close_ch(int'(px_v[4:0]), exp_v, 2) && px_v[15:5] == 0);
              end
            end
          end
        end
      end
      check("scene has a shadowed test pixel", found_shadow > 0);
      check("scene has a lit test pixel", found_lit > 0);
    end

    // Frame time: each pixel costs one pass (NS + LAT + 4 cycles) if it misses;
    // a hit adds the normal cycle, two cycles per light slot and one pass plus
    // an accumulate cycle for the active light.
    begin
      longint cyc, expect_cyc;
      cyc = t_rt_end - t_rt_start;
      expect_cyc = longint'(miss1) * (NS + LAT + 4)
                 + longint'(NPIX - miss1) * ((NS + LAT + 3) * 2 + 2 * NL + 2);
      check($sformatf("raytraced frame cycles %0d vs schedule %0d", cyc, expect_cyc),
            cyc >= expect_cyc - 4 && cyc <= expect_cyc + 4);
      check("per-pixel cost follows (NUM_SHAPES + latency) * (lights + 1)",
            expect_cyc <= longint'(NPIX) * (NS + LAT + 8) * (1 + 1));
    end

    // lr loops to the top once; the network side then replaces lr by er.
    wait (n_loop > 0);
    @(negedge net_clk);
    ib_we = 1;
    ib_waddr = 7'(loop_target);
    ib_wdata = asm_f(2'b00);
    @(negedge net_clk);
    ib_we = 0;
    wait (halted === 1'b1);
    repeat (10) @(posedge clk);

    check("frame buffer clears happened", n_clear >= 2);
    check("processor stalled in compute mode", n_stall > 0);
    check("primary rays hit shapes", n_hit > 0);
    check("primary rays missed everything", n_miss_pix > 0);
    check("lighting rays blocked", n_shadow > 0);
    check("lighting rays reached the light", n_lit > 0);
    check("sphere hits", n_sphere_hits > 0);
    check("cylinder hits", n_cyl_hits > 0);
    check("loop render taken", n_loop > 0);
    check("mode switched", n_mode_switch > 0);
    check("end render halts the processor", halted);
    $display("events: clears=%0d drawn=%0d culled=%0d zreject=%0d hits=%0d misses=%0d shadowed=%0d lit=%0d loop=%0d stall=%0d frames=%0d",
             n_clear, n_drawn, n_culled, n_zrej, n_hit, n_miss_pix, n_shadow, n_lit, n_loop, n_stall, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
