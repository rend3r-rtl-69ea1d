// tb_vga: one full 1024 x 768 frame. Checks the line and frame periods
// (1344 x 806 pixel clocks), the sync pulse widths and positions, blanking,
// and that each stored pixel is shown as a 2 x 2 block in its own colour.
module tb_vga;
  localparam int W = 512, H = 384;
  logic pix_clk = 0, rst = 1;
  logic [17:0] fb_raddr;
  logic [15:0] fb_rdata;
  logic hsync, vsync, frame_start;
  logic [3:0] red, green, blue;
  int checks = 0, failures = 0;

  always #1 pix_clk = ~pix_clk;

  vga dut (.*);

  // frame buffer model: colour is a function of the address, one cycle late
  function automatic logic [15:0] pat(input logic [17:0] a);
    return {a[4:0], a[10:5], a[15:11]} ^ 16'h5A5A;
  endfunction
  always_ff @(posedge pix_clk) fb_rdata <= pat(fb_raddr);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int h, v, hs_len, vs_lines, hs_start;
    logic [15:0] e;
    repeat (4) @(posedge pix_clk);
    @(negedge pix_clk);
    rst = 0;
    // hcount/vcount as seen at the (one-cycle delayed) outputs
    h = -1; v = 0;
    hs_len = 0; vs_lines = 0; hs_start = -1;
    for (int c = 0; c < 1344 * 806 + 2; c++) begin
      @(posedge pix_clk);
      #0.1;
      h++;
      if (h == 1344) begin h = 0; v++; end
      if (v == 806) break;
      if (h < 1024 && v < 768) begin
        e = pat(18'((v / 2) * W + h / 2));
        if (h % 97 == 0 && v % 41 == 0)
          chk($sformatf("pixel (%0d,%0d) got %h%h%h exp %h", h, v, red, green, blue, e), red == e[15:12] && green == e[10:7] && blue == e[4:1]);
      end else if (h % 50 == 0) begin
        chk("blank outside the visible area", red == 0 && green == 0 && blue == 0);
      end
      if (v == 10) begin
        if (!hsync) begin
          hs_len++;
          if (hs_start < 0) hs_start = h;
        end
      end
      if (h == 0 && !vsync) vs_lines++;
    end
    chk($sformatf("hsync width %0d", hs_len), hs_len == 136);
    chk($sformatf("hsync starts at %0d", hs_start), hs_start == 1048);
    chk($sformatf("vsync lines %0d", vs_lines), vs_lines == 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
