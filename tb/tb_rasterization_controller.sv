// tb_rasterization_controller: an 8-slot triangle memory (some slots empty,
// one-cycle read latency), a buffer-clear model that stays busy for a set
// time, and a model FSM that holds `pause` high for a random time after
// each accepted triangle. Checked: the clear comes first and nothing is
// offered until it ends; exactly the stored triangles are accepted, in slot
// order, with the vertex and colour fields unpacked correctly; `done` pulses
// once, only after the last triangle finished; a clear request alone clears
// and finishes without offering triangles.
module tb_rasterization_controller;
  import fp16_pkg::*;
  import rend3r_pkg::*;
  localparam int NT = 8, CLR = 20;
  logic clk = 0, rst = 1, render_req = 0, clear_req = 0, done;
  logic [2:0] sh_rd_idx;
  shape_rec_t sh_rd_rec;
  logic sh_rd_valid, clear_start, clear_busy, tri_valid, pause = 0;
  vec3_t [2:0] tri_v;
  logic [15:0] tri_color;
  shape_rec_t recs[NT];
  logic valid[NT];
  int checks = 0, failures = 0, n_acc = 0, n_done = 0, n_clear = 0, busy_cnt = 0, pause_cnt = 0;
  int acc_slot[$];
  always #5 clk = ~clk;

  rasterization_controller #(.NUM_TRIANGLES(NT)) dut (.*);

  // memory bank model
  always @(posedge clk) begin
    sh_rd_rec <= recs[sh_rd_idx];
    sh_rd_valid <= valid[sh_rd_idx];
  end

  // buffer clear model
  always @(posedge clk) begin
    if (clear_start) begin
      busy_cnt <= CLR;
      n_clear++;
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign clear_busy = busy_cnt > 0;

  // rasterization FSM model
  always @(posedge clk) begin
    if (tri_valid && !pause) begin
      int s;
      checks++;
      if (clear_busy) begin failures++; $display("FAIL triangle offered during clear"); end
      // find which slot this is by its colour
      s = int'(tri_color[2:0]);
      acc_slot.push_back(s);
      checks++;
      if (tri_v[0].x != recs[s][TR_X1] || tri_v[1].y != recs[s][TR_X1 + 4] || tri_v[2].z != recs[s][TR_X1 + 8]) begin
        failures++;
        $display("FAIL vertex fields of slot %0d", s);
      end
      pause <= 1;
      pause_cnt <= $urandom_range(2, 12);
    end else if (pause_cnt > 1) pause_cnt <= pause_cnt - 1;
    else begin
      pause_cnt <= 0;
      pause <= 0;
    end
    if (done) begin
      n_done++;
      checks++;
      if (pause || pause_cnt != 0) begin failures++; $display("FAIL done while the FSM is busy"); end
    end
  end

  initial begin
    int expect_slots[$];
    for (int s = 0; s < NT; s++) begin
      valid[s] = (s != 1 && s != 4 && s != 5);
      for (int p = 0; p < SH_NPROPS; p++) recs[s][p] = 16'($urandom);
      recs[s][TR_COL] = 16'(s);
      if (valid[s]) expect_slots.push_back(s);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    render_req = 1;
    @(negedge clk);
    render_req = 0;
    wait (n_done == 1);
    checks++;
    if (acc_slot != expect_slots || n_clear != 1) begin
      failures++;
      $display("FAIL accepted %p expected %p, %0d clears", acc_slot, expect_slots, n_clear);
    end
    // clear only
    acc_slot.delete();
    @(negedge clk);
    clear_req = 1;
    @(negedge clk);
    clear_req = 0;
    wait (n_done == 2);
    repeat (5) @(negedge clk);
    checks++;
    if (acc_slot.size() != 0 || n_clear != 2 || n_done != 2) begin
      failures++;
      $display("FAIL clear-only: %0d triangles, %0d clears, %0d done", acc_slot.size(), n_clear, n_done);
    end
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
