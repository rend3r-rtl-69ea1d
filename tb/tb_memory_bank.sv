// tb_memory_bank: camera defaults and updates, light and shape updates
// (including double-property shape writes and the null property), record
// reads with one cycle of latency, and clearing.
module tb_memory_bank;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  localparam int NS = 16, NL = 4;
  logic clk = 0, rst = 1, clear = 0;
  logic cam_we = 0, lt_we = 0, sh_we = 0;
  logic [4:0] cam_prop, lt_prop, sh_prop, sh_prop2;
  logic [15:0] cam_data, lt_data, sh_data, sh_data2;
  logic [5:0] lt_idx;
  logic [18:0] sh_idx;
  camera_t camera;
  logic [3:0] sh_rd_idx;
  shape_rec_t sh_rd_rec;
  logic sh_rd_valid;
  logic [1:0] lt_rd_idx;
  light_t lt_rd_rec;
  int checks = 0, failures = 0;
  logic [15:0] model [NS][SH_NPROPS];
  always #5 clk = ~clk;

  memory_bank #(.NUM_SHAPES(NS), .NUM_LIGHTS(NL)) dut (.*);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic shape_w(input int idx, input int p, input logic [15:0] d, input int p2, input logic [15:0] d2);
    @(negedge clk);
    sh_we = 1; sh_idx = 19'(idx); sh_prop = 5'(p); sh_data = d; sh_prop2 = 5'(p2); sh_data2 = d2;
    if (p != 0 && idx < NS) model[idx][p] = d;
    if (p2 != 0 && idx < NS) model[idx][p2] = d2;
    @(negedge clk);
    sh_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    chk("default camera", camera.rot.r == FP_ONE && camera.nclip == FP_ONE && camera.loc.z == 0
        && camera.fovh == FP_ONE);
    @(negedge clk);
    cam_we = 1; cam_prop = 3; cam_data = 16'h4600;
    @(negedge clk);
    cam_prop = 0; cam_data = 16'h1234;     // null property: ignored
    @(negedge clk);
    cam_we = 0;
    chk("camera z written", camera.loc.z == 16'h4600);
    chk("null camera property ignored", camera.loc.x == 0 && camera.rot.r == FP_ONE);
    for (int i = 0; i < NS; i++) for (int p = 0; p < SH_NPROPS; p++) model[i][p] = 0;
    for (int k = 0; k < 60; k++) begin
      int i, p, p2;
      i = $urandom_range(0, NS - 1);
      p = $urandom_range(0, SH_NPROPS - 1);
      p2 = $urandom_range(0, SH_NPROPS - 1);
      if (p2 == p) p2 = 0;
      shape_w(i, p, 16'($urandom), p2, 16'($urandom));
    end
    shape_w(NS + 3, 1, 16'hBEEF, 2, 16'hBEEF); // out of range: ignored
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      sh_rd_idx = 4'(i);
      @(negedge clk);
      for (int p = 0; p < SH_NPROPS; p++)
        chk($sformatf("shape %0d prop %0d = %h expected %h", i, p, sh_rd_rec[p], model[i][p]),
            sh_rd_rec[p] == model[i][p]);
    end
    @(negedge clk);
    lt_we = 1; lt_idx = 2; lt_prop = 0; lt_data = 16'h0001;
    @(negedge clk);
    lt_prop = 7; lt_data = 16'hF00F;
    @(negedge clk);
    lt_prop = 5; lt_data = 16'hBC00;
    @(negedge clk);
    lt_we = 0;
    lt_rd_idx = 2;
    @(negedge clk);
    chk("light record", lt_rd_rec.src == SRC_DIRECTIONAL && lt_rd_rec.color == 16'hF00F
        && lt_rd_rec.fwd.y == 16'hBC00 && lt_rd_rec.fwd.x == 0);
    lt_rd_idx = 1;
    @(negedge clk);
    chk("unwritten light is off", lt_rd_rec.src == SRC_OFF);
    // clear
    clear = 1;
    @(negedge clk);
    clear = 0;
    lt_rd_idx = 2;
    sh_rd_idx = 4'(0);
    @(negedge clk);
    chk("light off after clear", lt_rd_rec.src == SRC_OFF);
    chk("camera back to defaults", camera.loc.z == 0);
    begin
      int any;
      any = 0;
      for (int i = 0; i < NS; i++) begin
        sh_rd_idx = 4'(i);
        @(negedge clk);
        if (sh_rd_rec != '0 || sh_rd_valid) any++;
      end
      chk("all shapes empty after clear", any == 0);
    end
    shape_w(3, 13, 16'h0001, 0, 16'h0);
    sh_rd_idx = 4'(3);
    @(negedge clk);
    chk("rewritten shape holds only new data", sh_rd_valid && sh_rd_rec[13] == 1 && sh_rd_rec[1] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
