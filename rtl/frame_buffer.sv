// frame_buffer: the SCREEN_W x SCREEN_H RGB565 picture, a simple dual-port
// memory between the renderer (system clock) and the VGA output (pixel clock).
//
// Write port on clk: one pixel per cycle. Read port on rd_clk: one cycle of
// latency. A one-cycle `clear_start` pulse makes the buffer blank itself to
// black, one address per cycle (SCREEN_W * SCREEN_H cycles); `clear_busy` is
// high from the cycle after the pulse until the last address has been
// written, and renderer writes are ignored meanwhile. The dual-port block-RAM
// organisation and the 512 x 384 size follow the published design; the
// built-in clear engine is this design's choice.
module frame_buffer #(
  parameter int SCREEN_W = 512,
  parameter int SCREEN_H = 384,
  localparam int NPIX = SCREEN_W * SCREEN_H,
  localparam int AW = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear_start,
  output logic          clear_busy,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic          rd_clk,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
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
    if (clear_busy) mem[clr_addr] <= 16'h0000;
    else if (we)    mem[waddr] <= wdata;
  end

  always_ff @(posedge rd_clk) begin
    rdata <= mem[raddr];
  end
endmodule
