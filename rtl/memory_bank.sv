// memory_bank: the scene store - camera properties, light records and
// shape (raytracing) / triangle (rasterization) records.
//
// Written by the instruction processor one property at a time (camera,
// lights) or two at a time (a shape update from an SE/SD pair; property 0 is
// the null property and is never stored). Read by the rendering controller
// through two synchronous ports, one shape record and one light record, each
// with one cycle of latency. The camera is held in registers and is always
// visible.
//
// `clear` (new render) drops all shapes and lights in one cycle: each record
// has a valid bit, and an invalid record reads as all zeros (shape type 0 =
// off, light source 0 = off, triangle colour 0). It also restores the default
// camera: at the origin, no rotation (r = 1), near clip 1, and unit
// field-of-view scale factors. The default camera follows the published
// description; the far-clip default (256), the valid-bit clearing and the
// record capacities are this design's choices.
module memory_bank
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int NUM_SHAPES = 4096,
  parameter int NUM_LIGHTS = 64,
  localparam int SW = $clog2(NUM_SHAPES),
  localparam int LW = $clog2(NUM_LIGHTS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  // writes from the instruction processor
  input  logic          cam_we,
  input  logic [4:0]    cam_prop,
  input  logic [15:0]   cam_data,
  input  logic          lt_we,
  input  logic [5:0]    lt_idx,
  input  logic [4:0]    lt_prop,
  input  logic [15:0]   lt_data,
  input  logic          sh_we,
  input  logic [18:0]   sh_idx,
  input  logic [4:0]    sh_prop,
  input  logic [15:0]   sh_data,
  input  logic [4:0]    sh_prop2,
  input  logic [15:0]   sh_data2,
  // reads from the rendering controller
  output camera_t       camera,
  input  logic [SW-1:0] sh_rd_idx,
  output shape_rec_t    sh_rd_rec,
  output logic          sh_rd_valid,
  input  logic [LW-1:0] lt_rd_idx,
  output light_t        lt_rd_rec
);
  logic [15:0] cam_regs [CAM_NPROPS];
  logic [15:0] shapes [NUM_SHAPES][SH_NPROPS];
  logic [15:0] lights [NUM_LIGHTS][LT_NPROPS];
  logic [NUM_SHAPES-1:0] sh_valid;
  logic [NUM_LIGHTS-1:0] lt_valid;

  function automatic logic [15:0] cam_default(input int p);
    case (p)
      CAM_RROT, CAM_NCLIP, CAM_FOVH, CAM_FOVV: return FP_ONE;
      CAM_FCLIP: return 16'h5C00; // 256.0
      default: return 16'h0000;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int p = 0; p < CAM_NPROPS; p++) cam_regs[p] <= cam_default(p);
    end else if (cam_we && cam_prop != 0 && int'(cam_prop) < CAM_NPROPS) begin
      cam_regs[4'(cam_prop)] <= cam_data;
    end
  end

  assign camera.loc   = '{cam_regs[CAM_XLOC], cam_regs[CAM_YLOC], cam_regs[CAM_ZLOC]};
  assign camera.rot   = '{cam_regs[CAM_RROT], cam_regs[CAM_IROT], cam_regs[CAM_JROT], cam_regs[CAM_KROT]};
  assign camera.nclip = cam_regs[CAM_NCLIP];
  assign camera.fclip = cam_regs[CAM_FCLIP];
  assign camera.fovh  = cam_regs[CAM_FOVH];
  assign camera.fovv  = cam_regs[CAM_FOVV];

  // Valid bits.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sh_valid <= '0;
      lt_valid <= '0;
    end else begin
      if (sh_we && int'(sh_idx) < NUM_SHAPES) sh_valid[sh_idx[SW-1:0]] <= 1'b1;
      if (lt_we && int'(lt_idx) < NUM_LIGHTS)  lt_valid[lt_idx[LW-1:0]] <= 1'b1;
    end
  end

  // Record storage. A record that is (re)validated has its other words
  // zeroed first, so stale data from before a clear never reappears.
  always_ff @(posedge clk) begin
    if (sh_we && int'(sh_idx) < NUM_SHAPES) begin
      if (!sh_valid[sh_idx[SW-1:0]])
        for (int p = 1; p < SH_NPROPS; p++) shapes[sh_idx[SW-1:0]][p] <= 16'h0000;
      if (sh_prop != 0 && int'(sh_prop) < SH_NPROPS) shapes[sh_idx[SW-1:0]][4'(sh_prop)] <= sh_data;
      if (sh_prop2 != 0 && int'(sh_prop2) < SH_NPROPS) shapes[sh_idx[SW-1:0]][4'(sh_prop2)] <= sh_data2;
    end
    if (lt_we && int'(lt_idx) < NUM_LIGHTS) begin
      if (!lt_valid[lt_idx[LW-1:0]])
        for (int p = 0; p < LT_NPROPS; p++) lights[lt_idx[LW-1:0]][p] <= 16'h0000;
      if (int'(lt_prop) < LT_NPROPS) lights[lt_idx[LW-1:0]][4'(lt_prop)] <= lt_data;
    end
  end

  always_ff @(posedge clk) begin
    sh_rd_valid <= sh_valid[sh_rd_idx];
    for (int p = 0; p < SH_NPROPS; p++)
      sh_rd_rec[p] <= (p == 0 || !sh_valid[sh_rd_idx]) ? 16'h0000 : shapes[sh_rd_idx][p];
    lt_rd_rec.src       <= lt_valid[lt_rd_idx] ? lights[lt_rd_idx][LT_SRC][1:0] : SRC_OFF;
    lt_rd_rec.loc       <= '{lights[lt_rd_idx][LT_XLOC], lights[lt_rd_idx][LT_YLOC], lights[lt_rd_idx][LT_ZLOC]};
    lt_rd_rec.fwd       <= '{lights[lt_rd_idx][LT_XFOR], lights[lt_rd_idx][LT_YFOR], lights[lt_rd_idx][LT_ZFOR]};
    lt_rd_rec.color     <= lights[lt_rd_idx][LT_COL];
    lt_rd_rec.intensity <= lights[lt_rd_idx][LT_INT];
  end
endmodule
