// vertex_rasterize: converts normalised device coordinates into integer pixel
// coordinates of the SCREEN_W x SCREEN_H frame buffer.
//
// px = floor((ndc_x + 1) * SCREEN_W / 2), py = floor((1 - ndc_y) * SCREEN_H / 2),
// so +y in the world is up on the screen and pixel (0, 0) is the top-left
// corner. Results are saturated to +/-16383; points off screen keep their
// (out-of-range) coordinates so that partly visible triangles still fill
// correctly. Timing: one register stage, one point per cycle. The screen
// size is the published 512 x 384; the mapping formula is this design's.
module vertex_rasterize
  import fp16_pkg::*;
#(
  parameter int SCREEN_W = 512,
  parameter int SCREEN_H = 384
) (
  input  logic               clk,
  input  logic               in_valid,
  input  fp16_t              in_x,
  input  fp16_t              in_y,
  output logic               out_valid,
  output logic signed [15:0] out_px,
  output logic signed [15:0] out_py
);
  function automatic logic signed [15:0] sat16(input logic signed [31:0] v);
    if (v > 32'sd16383) return 16'sd16383;
    if (v < -32'sd16383) return -16'sd16383;
    return v[15:0];
  endfunction

  localparam fp16_t HW = fp_from_int(SCREEN_W / 2);
  localparam fp16_t HH = fp_from_int(SCREEN_H / 2);

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    out_px <= sat16(fp_floor(fp_mul(fp_add(in_x, FP_ONE), HW)));
    out_py <= sat16(fp_floor(fp_mul(fp_sub(FP_ONE, in_y), HH)));
  end
endmodule
