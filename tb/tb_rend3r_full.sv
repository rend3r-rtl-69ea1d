// tb_rend3r_full: the renderer at its default sizes (512 x 384 frame,
// 4096-word instruction bank, 4096 shape slots, 64 light slots).
// A short program is loaded through the network-side write port: new render,
// camera position, three triangles (one behind the camera) and one
// directional light facing the triangles, new frame (rasterized), end render.
// Checked: the near red triangle covers the screen centre, the far green
// triangle shows below it, the background is black, two triangles are drawn
// and one culled, the processor halts, and the VGA port produces sync pulses.
module tb_rend3r_full;
  import tb_fp_util_pkg::*;

  localparam int W = 512, H = 384;

  logic clk = 0, pix_clk = 0, net_clk = 0, rst = 1, run = 0, raytrace_mode = 0;
  logic ib_we = 0;
  logic [11:0] ib_waddr;
  logic [31:0] ib_wdata;
  logic vga_hsync, vga_vsync, compute_mode, halted, frame_done;
  logic [3:0] vga_r, vga_g, vga_b;

  always #5 clk = ~clk;
  always #7.5 pix_clk = ~pix_clk;
  always #10 net_clk = ~net_clk;

  rend3r_top dut (
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

  function automatic logic [15:0] fbpix(input int x, input int y);
    return dut.u_fb.mem[y * W + x];
  endfunction

  int n_drawn = 0, n_culled = 0, n_hs = 0, n_frames = 0;
  longint cycle = 0;
  logic hs_q;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dut.ev_drawn) n_drawn++;
    if (dut.ev_culled) n_culled++;
    if (frame_done) n_frames++;
  end
  always @(posedge pix_clk) begin
    hs_q <= vga_hsync;
    if (hs_q && !vga_hsync) n_hs++;
  end

  initial begin
    prog.push_back(asm_f(2'b01));                                              // nr
    prog.push_back(asm_cam(3, r2fp(6.0)));                                     // camera z = 6
    tri_put(0, '{-4.0, -3.0, 0.0, 4.0, -3.0, 0.0, 0.0, 3.0, 0.0}, 16'hF800);   // red, near
    tri_put(5, '{-8.0, -6.0, -3.0, 8.0, -6.0, -3.0, 0.0, 6.0, -3.0}, 16'h07E0); // green, far
    tri_put(4095, '{-1.0, -1.0, 8.0, 1.0, -1.0, 8.0, 0.0, 1.0, 8.0}, 16'hFFFF); // behind the camera
    prog.push_back(asm_lt(63, 0, 16'h0001));                                   // directional
    prog.push_back(asm_lt(63, 6, r2fp(-1.0)));                                 // forward (0,0,-1)
    prog.push_back(asm_lt(63, 7, 16'hFFFF));                                   // white
    prog.push_back(asm_lt(63, 8, r2fp(1.0)));                                  // intensity 1
    prog.push_back(asm_f(2'b10));                                              // nf
    prog.push_back(asm_f(2'b00));                                              // er
    foreach (prog[i]) begin
      @(negedge net_clk);
      ib_we = 1;
      ib_waddr = 12'(i);
      ib_wdata = prog[i];
    end
    @(negedge net_clk);
    ib_we = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    @(negedge clk);
    run = 1;
    wait (halted);
    repeat (4) @(negedge clk);
    $display("rendered in %0d cycles", cycle);
    check("two frame-done pulses (clear, frame)", n_frames == 2);
    check("red triangle at the screen centre", fbpix(256, 192) == 16'hF800);
    check("green triangle below the red one", fbpix(221, 223) == 16'h07E0);
    check("red apex region is red", fbpix(256, 172) == 16'hF800);
    check("background is black", fbpix(0, 0) == 16'h0000 && fbpix(511, 383) == 16'h0000);
    check("two triangles drawn", n_drawn == 2);
    check("one triangle culled", n_culled == 1);
    check("VGA produced horizontal sync pulses", n_hs > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
