// vga: VGA timing generator and pixel fetch for a 1024 x 768 display at
// 60 Hz on a 65 MHz pixel clock.
//
// Horizontal: 1024 visible, 24 front porch, 136 sync, 160 back porch (1344
// total); vertical: 768 visible, 3 front porch, 6 sync, 29 back porch (806
// total); both syncs active low. The frame buffer holds a quarter-size
// SCREEN_W x SCREEN_H picture, so each stored pixel is shown as a 2 x 2 block:
// the read address is (vcount/2) * SCREEN_W + hcount/2. The buffer answers one
// cycle later, so syncs and blanking are delayed by one cycle to stay aligned
// with the colour. Colour leaves as 4 bits per channel (the upper bits of
// RGB565). The 65 MHz pixel clock, the 1024 x 768 target and the 2 x 2 scaling
// follow the published design; the porch and sync values are the standard
// XGA timing and the 4-bit colour outputs are this design's choice.
module vga #(
  parameter int SCREEN_W = 512,
  parameter int SCREEN_H = 384,
  parameter int H_VIS = 1024, parameter int H_FP = 24, parameter int H_SYNC = 136, parameter int H_BP = 160,
  parameter int V_VIS = 768,  parameter int V_FP = 3,  parameter int V_SYNC = 6,   parameter int V_BP = 29,
  localparam int AW = $clog2(SCREEN_W * SCREEN_H)
) (
  input  logic          pix_clk,
  input  logic          rst,
  output logic [AW-1:0] fb_raddr,
  input  logic [15:0]   fb_rdata,
  output logic          hsync,
  output logic          vsync,
  output logic [3:0]    red,
  output logic [3:0]    green,
  output logic [3:0]    blue,
  output logic          frame_start   // one cycle at pixel (0,0)
);
  localparam int H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [11:0] hcount, vcount;
  logic        active_d, hs_d, vs_d;

  always_ff @(posedge pix_clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 12'(H_TOT - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 12'(V_TOT - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign fb_raddr = AW'(32'(vcount >> 1) * SCREEN_W + 32'(hcount >> 1));

  always_ff @(posedge pix_clk) begin
    active_d <= (hcount < 12'(H_VIS)) && (vcount < 12'(V_VIS));
    hs_d <= !((hcount >= 12'(H_VIS + H_FP)) && (hcount < 12'(H_VIS + H_FP + H_SYNC)));
    vs_d <= !((vcount >= 12'(V_VIS + V_FP)) && (vcount < 12'(V_VIS + V_FP + V_SYNC)));
    frame_start <= (hcount == 0) && (vcount == 0);
  end

  assign hsync = hs_d;
  assign vsync = vs_d;
  assign red   = active_d ? fb_rdata[15:12] : 4'h0;
  assign green = active_d ? fb_rdata[10:7]  : 4'h0;
  assign blue  = active_d ? fb_rdata[4:1]   : 4'h0;

  initial assert (H_VIS == 2 * SCREEN_W && V_VIS == 2 * SCREEN_H)
    else $error("display must be twice the frame-buffer size");
endmodule
