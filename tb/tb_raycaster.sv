// tb_raycaster: random rays against random spheres, cylinders and cones
// (random position, rotation and scale, plus switched-off shapes), issued one
// pair per cycle. A double-precision model moves the ray into the shape's
// normal space, solves the same quadratic and returns the nearest root above
// the threshold. Checked: hit flag, distance t and hit point (a few percent,
// half-precision error), normal direction (cosine above 0.98), colour, tag
// and the exact LATENCY. Grazing rays, where the discriminant or a root sits
// on a decision boundary, are only checked for latency and tag.
module tb_raycaster;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int LAT = 205, N = 400;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  vec3_t in_src, in_dir;
  shape_rec_t in_shape;
  logic [7:0] in_tag;
  ray_hit_t out_hit;
  int checks = 0, failures = 0, cyc = 0, n_out = 0, n_hit = 0, n_strict = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  raycaster #(.LATENCY(LAT)) dut (.*);

  typedef real r3_t[3];
  vec3_t      srcs[N], dirs[N];
  shape_rec_t shs[N];
  int         in_cyc[N];

  function automatic r3_t rot(input real q[4], input r3_t v);
    r3_t t, o;
    t[0] = 2.0 * (q[2] * v[2] - q[3] * v[1]);
    t[1] = 2.0 * (q[3] * v[0] - q[1] * v[2]);
    t[2] = 2.0 * (q[1] * v[1] - q[2] * v[0]);
    o[0] = v[0] + q[0] * t[0] + (q[2] * t[2] - q[3] * t[1]);
    o[1] = v[1] + q[0] * t[1] + (q[3] * t[0] - q[1] * t[2]);
    o[2] = v[2] + q[0] * t[2] + (q[1] * t[1] - q[2] * t[0]);
    return o;
  endfunction

  function automatic r3_t v3(input vec3_t v);
    return '{fp2r(v.x), fp2r(v.y), fp2r(v.z)};
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      real q[4], qn, d[3];
      shs[k] = '0;
      shs[k][SH_TYPE] = 16'(k % 4 == 3 ? (k % 16 == 15 ? 0 : 3) : (k % 4) + 1);
      shs[k][SH_XLOC] = r2fp(rnd(-300, 300, 100.0));
      shs[k][SH_YLOC] = r2fp(rnd(-300, 300, 100.0));
      shs[k][SH_ZLOC] = r2fp(rnd(-300, 300, 100.0));
      for (int i = 0; i < 4; i++) q[i] = rnd(-1000, 1000, 1000.0);
      qn = $sqrt(q[0] * q[0] + q[1] * q[1] + q[2] * q[2] + q[3] * q[3]) + 1e-6;
      shs[k][SH_RROT] = r2fp(q[0] / qn);
      shs[k][SH_IROT] = r2fp(q[1] / qn);
      shs[k][SH_JROT] = r2fp(q[2] / qn);
      shs[k][SH_KROT] = r2fp(q[3] / qn);
      shs[k][SH_XSCL] = r2fp(rnd(50, 200, 100.0));
      shs[k][SH_YSCL] = r2fp(rnd(50, 200, 100.0));
      shs[k][SH_ZSCL] = r2fp(rnd(50, 200, 100.0));
      shs[k][SH_COL]  = 16'($urandom);
      srcs[k] = '{r2fp(rnd(-800, 800, 100.0)), r2fp(rnd(-800, 800, 100.0)), r2fp(rnd(-800, 800, 100.0))};
      // aim roughly at the shape so that about half of the rays hit
      d[0] = fp2r(shs[k][SH_XLOC]) - fp2r(srcs[k].x) + rnd(-150, 150, 100.0);
      d[1] = fp2r(shs[k][SH_YLOC]) - fp2r(srcs[k].y) + rnd(-150, 150, 100.0);
      d[2] = fp2r(shs[k][SH_ZLOC]) - fp2r(srcs[k].z) + rnd(-150, 150, 100.0);
      qn = $sqrt(d[0] * d[0] + d[1] * d[1] + d[2] * d[2]) + 1e-6;
      dirs[k] = '{r2fp(d[0] / qn), r2fp(d[1] / qn), r2fp(d[2] / qn)};
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < N; k++) begin
      in_valid = 1;
      in_src = srcs[k];
      in_dir = dirs[k];
      in_shape = shs[k];
      in_tag = 8'(k);
      in_cyc[k] = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d outputs", n_out); end
    // the random set must exercise hits and strictly checked cases
    checks++;
    if (n_hit < N / 5 || n_strict < N / 3) begin
      failures++;
      $display("FAIL weak coverage: %0d hits, %0d strict", n_hit, n_strict);
    end
    $display("raycaster: %0d hits, %0d strictly checked of %0d", n_hit, n_strict, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    shape_rec_t sh;
    real q[4], qc[4], a, h, c, disc, sq, t1, t2, t, eps, si[3], err;
    r3_t rel, ls, ld, lp, gn, wn, s, d;
    logic exp_hit, strict;
    int ty;
    sh = shs[n_out];
    ty = int'(sh[SH_TYPE]);
    q = '{fp2r(sh[SH_RROT]), fp2r(sh[SH_IROT]), fp2r(sh[SH_JROT]), fp2r(sh[SH_KROT])};
    qc = '{q[0], -q[1], -q[2], -q[3]};
    si = '{fp2r(sh[SH_XSCL]), fp2r(sh[SH_YSCL]), fp2r(sh[SH_ZSCL])};
    s = v3(srcs[n_out]);
    d = v3(dirs[n_out]);
    rel = '{s[0] - fp2r(sh[SH_XLOC]), s[1] - fp2r(sh[SH_YLOC]), s[2] - fp2r(sh[SH_ZLOC])};
    ls = rot(qc, rel);
    ld = rot(qc, d);
    for (int i = 0; i < 3; i++) begin ls[i] *= si[i]; ld[i] *= si[i]; end
    case (ty)
      1: begin
        a = ld[0] * ld[0] + ld[1] * ld[1] + ld[2] * ld[2];
        h = ls[0] * ld[0] + ls[1] * ld[1] + ls[2] * ld[2];
        c = ls[0] * ls[0] + ls[1] * ls[1] + ls[2] * ls[2] - 1.0;
      end
      2: begin
        a = ld[0] * ld[0] + ld[1] * ld[1];
        h = ls[0] * ld[0] + ls[1] * ld[1];
        c = ls[0] * ls[0] + ls[1] * ls[1] - 1.0;
      end
      default: begin
        a = ld[0] * ld[0] + ld[1] * ld[1] - ld[2] * ld[2];
        h = ls[0] * ld[0] + ls[1] * ld[1] - ls[2] * ld[2];
        c = ls[0] * ls[0] + ls[1] * ls[1] - ls[2] * ls[2];
      end
    endcase
    disc = h * h - a * c;
    eps = 0.25;
    strict = 1'b1;
    exp_hit = 1'b0;
    t = 0.0;
    if (ty >= 1 && ty <= 3) begin
      if (disc < 0.01 * (h * h + (a * c < 0 ? -a * c : a * c)) + 0.01 && disc > -(0.01 * (h * h + (a * c < 0 ? -a * c : a * c)) + 0.01))
        strict = 1'b0;
      if (a < 0.02 && a > -0.02) strict = 1'b0;
      if (disc >= 0 && a != 0.0) begin
        sq = $sqrt(disc);
        t1 = (-h - sq) / a;
        t2 = (-h + sq) / a;
        if (t1 > t2) begin t = t1; t1 = t2; t2 = t; end
        if (t1 > eps) begin t = t1; exp_hit = 1'b1; end
        else if (t2 > eps) begin t = t2; exp_hit = 1'b1; end
        // roots near the threshold, and roots too large for half precision
        if ((t1 - eps < 0.1 && t1 - eps > -0.1) || (t2 - eps < 0.1 && t2 - eps > -0.1)) strict = 1'b0;
        if (exp_hit && t > 200.0) strict = 1'b0;
      end
    end
    checks++;
    if (cyc - in_cyc[n_out] != LAT || out_hit.tag != 8'(n_out)) begin
      failures++;
      $display("FAIL latency %0d tag %0d", cyc - in_cyc[n_out], out_hit.tag);
    end
    if (strict) begin
      n_strict++;
      checks++;
      if (out_hit.hit != exp_hit) begin
        failures++;
        $display("FAIL ray %0d type %0d: hit=%b expected %b (t=%f disc=%f)", n_out, ty, out_hit.hit, exp_hit, t, disc);
      end else if (exp_hit) begin
        n_hit++;
        err = fp2r(out_hit.t) - t;
        if (err < 0) err = -err;
        checks++;
        if (err > 0.03 * t + 0.03 || out_hit.color != sh[SH_COL]) begin
          failures++;
          $display("FAIL ray %0d type %0d: t=%f expected %f", n_out, ty, fp2r(out_hit.t), t);
        end
        // world hit point and normal direction
        lp = '{ls[0] + t * ld[0], ls[1] + t * ld[1], ls[2] + t * ld[2]};
        gn = (ty == 1) ? lp : (ty == 2) ? '{lp[0], lp[1], 0.0} : '{lp[0], lp[1], -lp[2]};
        for (int i = 0; i < 3; i++) gn[i] *= si[i];
        wn = rot(q, gn);
        begin
          r3_t gp, gw;
          real dotv, la, lb, perr;
          gp = v3(out_hit.point);
          gw = v3(out_hit.normal);
          perr = 0.0;
          for (int i = 0; i < 3; i++) begin
            real e1;
            e1 = gp[i] - (s[i] + t * d[i]);
            perr += e1 < 0 ? -e1 : e1;
          end
          dotv = gw[0] * wn[0] + gw[1] * wn[1] + gw[2] * wn[2];
          la = $sqrt(gw[0] * gw[0] + gw[1] * gw[1] + gw[2] * gw[2]);
          lb = $sqrt(wn[0] * wn[0] + wn[1] * wn[1] + wn[2] * wn[2]);
          checks++;
          if (perr > 0.03 * t + 0.1 || (lb > 0.05 && dotv < 0.98 * la * lb)) begin
            failures++;
            $display("FAIL ray %0d type %0d: point error %f, normal cos %f", n_out, ty, perr, dotv / (la * lb + 1e-9));
          end
        end
      end
    end
    n_out <= n_out + 1;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
