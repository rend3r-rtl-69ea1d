// tb_triangle_2d_fill: random triangles (both windings) and random pixels
// against an integer edge-function model; checks the four-cycle latency.
module tb_triangle_2d_fill;
  import rend3r_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0;
  tri2d_t tri_in;
  logic signed [15:0] hcount, vcount, out_h, out_v;
  logic out_valid, is_within;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  triangle_2d_fill dut (.*);

  function automatic logic ref_in(input tri2d_t t, input int x, input int y);
    longint e0, e1, e2;
    e0 = longint'(x - t.x0) * (t.y1 - t.y0) - longint'(y - t.y0) * (t.x1 - t.x0);
    e1 = longint'(x - t.x1) * (t.y2 - t.y1) - longint'(y - t.y1) * (t.x2 - t.x1);
    e2 = longint'(x - t.x2) * (t.y0 - t.y2) - longint'(y - t.y2) * (t.x0 - t.x2);
    return (e0 >= 0 && e1 >= 0 && e2 >= 0) || (e0 <= 0 && e1 <= 0 && e2 <= 0);
  endfunction

  int sent_h [$], sent_v [$], sent_c [$];
  int ins = 0;
  always @(posedge clk) begin
    if (in_valid) begin
      sent_h.push_back(hcount);
      sent_v.push_back(vcount);
      sent_c.push_back(cyc);
    end
    if (out_valid) begin
      int eh, ev, ec;
      eh = sent_h.pop_front();
      ev = sent_v.pop_front();
      ec = sent_c.pop_front();
      checks++;
      if (is_within != ref_in(tri_in, eh, ev) || out_h != eh || out_v != ev || cyc - ec != 4) begin
        failures++;
        $display("FAIL pixel (%0d,%0d) within=%b latency=%0d", eh, ev, is_within, cyc - ec);
      end
      if (is_within) ins++;
    end
  end
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      tri_in = '{16'($urandom_range(0, 60)) - 16'sd5, 16'($urandom_range(0, 40)) - 16'sd5,
                 16'($urandom_range(0, 60)) - 16'sd5, 16'($urandom_range(0, 40)) - 16'sd5,
                 16'($urandom_range(0, 60)) - 16'sd5, 16'($urandom_range(0, 40)) - 16'sd5,
                 16'h0, 16'h0};
      for (int p = 0; p < 100; p++) begin
        @(negedge clk);
        in_valid = 1;
        hcount = 16'($urandom_range(0, 55));
        vcount = 16'($urandom_range(0, 35));
      end
      @(negedge clk);
      in_valid = 0;
      repeat (6) @(negedge clk);
    end
    if (ins == 0) begin failures++; $display("FAIL no inside pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
