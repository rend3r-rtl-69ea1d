// rend3r_top: the complete REND3R graphics pipeline - from a buffer of
// graphics instructions to a VGA picture.
//
// interpreter : instruction_bank -> instruction_processor, which writes the
//               scene (camera, lights, shapes/triangles) into memory_bank and
//               issues render / clear requests;
// geometry    : in rasterization mode rasterization_controller feeds
//               rasterization_fsm (shading, 3D-to-2D projection, bounding-box
//               fill, depth test against frame_zbuffer); in raytracing mode
//               raytrace_controller drives the pipelined raycaster;
// display     : frame_buffer (512 x 384, dual clock) read by vga at 65 MHz
//               and shown doubled as 1024 x 768.
// `raytrace_mode` selects which renderer owns the scene read ports and the
// frame buffer; it should only change while the processor is idle or in
// update mode. The instruction bank's write port (the network side) runs on
// its own clock. Reset is synchronous and must be held for a few cycles of
// each clock. Both renderers in one design with a mode input is this
// design's choice (the two rendering modes were built separately); the block
// structure and the three clock domains follow the published system
// overview.
module rend3r_top
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int    SCREEN_W         = 512,
  parameter int    SCREEN_H         = 384,
  parameter int    NUM_INSTRUCTIONS = 4096,
  parameter int    NUM_SHAPES       = 4096,
  parameter int    NUM_LIGHTS       = 64,
  parameter int    T3D_LATENCY      = 63,
  parameter int    RC_LATENCY       = 205,
  parameter string INIT_FILE        = "",
  localparam int   IAW = $clog2(NUM_INSTRUCTIONS)
) (
  input  logic           clk,            // system clock, 100 MHz
  input  logic           pix_clk,        // pixel clock, 65 MHz
  input  logic           net_clk,        // network-side clock, 50 MHz
  input  logic           rst,
  input  logic           run,            // start executing the instruction bank
  input  logic           raytrace_mode,  // 0 = rasterization, 1 = raytracing
  // network side: instruction bank write port
  input  logic           ib_we,
  input  logic [IAW-1:0] ib_waddr,
  input  logic [31:0]    ib_wdata,
  // VGA
  output logic           vga_hsync,
  output logic           vga_vsync,
  output logic [3:0]     vga_r,
  output logic [3:0]     vga_g,
  output logic [3:0]     vga_b,
  // status
  output logic           compute_mode,
  output logic           halted,
  output logic           frame_done
);
  localparam int SW = $clog2(NUM_SHAPES);
  localparam int LW = $clog2(NUM_LIGHTS);
  localparam int AW = $clog2(SCREEN_W * SCREEN_H);

  // ---------------- interpreter ----------------
  logic [IAW-1:0] ib_raddr;
  logic [31:0]    ib_rdata;

  instruction_bank #(.DEPTH(NUM_INSTRUCTIONS), .INIT_FILE(INIT_FILE)) u_ibank (
    .wr_clk(net_clk), .wr_en(ib_we), .wr_addr(ib_waddr), .wr_data(ib_wdata),
    .rd_clk(clk), .rd_addr(ib_raddr), .rd_data(ib_rdata));

  logic        bank_clear, cam_we, lt_we, sh_we;
  logic [4:0]  cam_prop, lt_prop, sh_prop, sh_prop2;
  logic [15:0] cam_data, lt_data, sh_data, sh_data2;
  logic [5:0]  lt_idx;
  logic [18:0] sh_idx;
  logic        ctrl_render, ctrl_clear, ctrl_done;

  instruction_processor #(.IADDR_W(IAW)) u_proc (
    .clk, .rst, .run, .ib_addr(ib_raddr), .ib_data(ib_rdata),
    .bank_clear, .cam_we, .cam_prop, .cam_data, .lt_we, .lt_idx, .lt_prop, .lt_data,
    .sh_we, .sh_idx, .sh_prop, .sh_data, .sh_prop2, .sh_data2,
    .ctrl_render, .ctrl_clear, .ctrl_done, .compute_mode, .halted);

  // ---------------- scene memory ----------------
  camera_t    cam;
  logic [SW-1:0] sh_rd_idx, ras_sh_idx, rt_sh_idx;
  shape_rec_t sh_rd_rec;
  logic       sh_rd_valid;
  logic [LW-1:0] lt_rd_idx, ras_lt_idx, rt_lt_idx;
  light_t     lt_rd_rec;

  memory_bank #(.NUM_SHAPES(NUM_SHAPES), .NUM_LIGHTS(NUM_LIGHTS)) u_bank (
    .clk, .rst, .clear(bank_clear),
    .cam_we, .cam_prop, .cam_data, .lt_we, .lt_idx, .lt_prop, .lt_data,
    .sh_we, .sh_idx, .sh_prop, .sh_data, .sh_prop2, .sh_data2,
    .camera(cam), .sh_rd_idx, .sh_rd_rec, .sh_rd_valid, .lt_rd_idx, .lt_rd_rec);

  assign sh_rd_idx = raytrace_mode ? rt_sh_idx : ras_sh_idx;
  assign lt_rd_idx = raytrace_mode ? rt_lt_idx : ras_lt_idx;

  // ---------------- rasterization renderer ----------------
  logic        fb_clear_busy;
  logic        ras_done, ras_clear_start, tri_valid, pause;
  vec3_t [2:0] tri_v;
  logic [15:0] tri_color;
  logic        ras_fb_we, zb_we;
  logic [AW-1:0] ras_fb_addr, zb_raddr, zb_waddr;
  logic [15:0] ras_fb_data, zb_rdata, zb_wdata;
  logic        ev_drawn, ev_culled, ev_zreject;

  rasterization_controller #(.NUM_TRIANGLES(NUM_SHAPES)) u_rctl (
    .clk, .rst,
    .render_req(ctrl_render && !raytrace_mode), .clear_req(ctrl_clear && !raytrace_mode),
    .done(ras_done), .sh_rd_idx(ras_sh_idx), .sh_rd_rec, .sh_rd_valid,
    .clear_start(ras_clear_start), .clear_busy(fb_clear_busy),
    .tri_valid, .tri_v, .tri_color, .pause);

  rasterization_fsm #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H), .NUM_LIGHTS(NUM_LIGHTS),
                      .T3D_LATENCY(T3D_LATENCY)) u_rfsm (
    .clk, .rst, .cam, .tri_valid, .tri_v, .tri_color, .pause,
    .lt_rd_idx(ras_lt_idx), .lt_rd_rec,
    .fb_we(ras_fb_we), .fb_addr(ras_fb_addr), .fb_data(ras_fb_data),
    .zb_raddr, .zb_rdata, .zb_we, .zb_waddr, .zb_wdata,
    .ev_drawn, .ev_culled, .ev_zreject);

  logic zb_clear_busy;
  frame_zbuffer #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_zbuf (
    .clk, .rst, .clear_start(ras_clear_start), .clear_busy(zb_clear_busy),
    .raddr(zb_raddr), .rdata(zb_rdata), .we(zb_we), .waddr(zb_waddr), .wdata(zb_wdata));

  // ---------------- raytracing renderer ----------------
  logic        rt_done, rt_clear_start, rt_fb_we;
  logic [AW-1:0] rt_fb_addr;
  logic [15:0] rt_fb_data;
  logic        ev_pixel_hit, ev_shadowed, ev_lit;

  raytrace_controller #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H), .NUM_SHAPES(NUM_SHAPES),
                        .NUM_LIGHTS(NUM_LIGHTS), .RC_LATENCY(RC_LATENCY)) u_rt (
    .clk, .rst, .cam,
    .render_req(ctrl_render && raytrace_mode), .clear_req(ctrl_clear && raytrace_mode),
    .done(rt_done), .sh_rd_idx(rt_sh_idx), .sh_rd_rec, .lt_rd_idx(rt_lt_idx), .lt_rd_rec,
    .clear_start(rt_clear_start), .clear_busy(fb_clear_busy),
    .fb_we(rt_fb_we), .fb_addr(rt_fb_addr), .fb_data(rt_fb_data),
    .ev_pixel_hit, .ev_shadowed, .ev_lit);

  assign ctrl_done = ras_done || rt_done;
  assign frame_done = ctrl_done;

  // ---------------- display ----------------
  logic [AW-1:0] vga_addr;
  logic [15:0]   vga_pixel;

  frame_buffer #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_fb (
    .clk, .rst, .clear_start(ras_clear_start || rt_clear_start), .clear_busy(fb_clear_busy),
    .we(raytrace_mode ? rt_fb_we : ras_fb_we),
    .waddr(raytrace_mode ? rt_fb_addr : ras_fb_addr),
    .wdata(raytrace_mode ? rt_fb_data : ras_fb_data),
    .rd_clk(pix_clk), .raddr(vga_addr), .rdata(vga_pixel));

  logic vga_frame_start;
  vga #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H), .H_VIS(2 * SCREEN_W), .V_VIS(2 * SCREEN_H)) u_vga (
    .pix_clk, .rst, .fb_raddr(vga_addr), .fb_rdata(vga_pixel),
    .hsync(vga_hsync), .vsync(vga_vsync), .red(vga_r), .green(vga_g), .blue(vga_b),
    .frame_start(vga_frame_start));
endmodule
