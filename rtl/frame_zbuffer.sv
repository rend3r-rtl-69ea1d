// frame_zbuffer: per-pixel depth store used by the rasterizer to keep the
// nearest triangle in front.
//
// Each entry is a half-precision distance. A one-cycle `clear_start` pulse
// sets every entry to +infinity, one address per cycle (`clear_busy` as in the
// frame buffer). Read port: one cycle of latency; write port: one pixel per
// cycle, ignored while clearing. Both ports run on the system clock.
// The presence of a frame z-buffer next to the frame buffer follows the
// published system overview; its depth format and clear engine are this
// design's choices.
module frame_zbuffer #(
  parameter int SCREEN_W = 512,
  parameter int SCREEN_H = 384,
  localparam int NPIX = SCREEN_W * SCREEN_H,
  localparam int AW = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear_start,
  output logic          clear_busy,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata
);
  logic [15:0]   mem [NPIX];
  logic [AW-1:0] clr_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      clear_busy <= 1'b0;
      clr_addr <= '0;
    end else if (clear_start) begin
      clear_busy <= 1'b1;
      clr_addr <= '0;
    end else if (clear_busy) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(NPIX - 1)) clear_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clear_busy) mem[clr_addr] <= 16'h7C00;
    else if (we)    mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
