// rasterization_controller: schedules a rasterized frame one triangle at a
// time.
//
// On a render request it first clears the frame buffer and z-buffer (so
// uncovered pixels are black), then walks every triangle slot of the memory
// bank in index order: it reads the record (one cycle of latency), skips
// empty slots, and offers each stored triangle to the rasterization FSM,
// waiting while the FSM's `pause` is high. When the last triangle has been
// drawn it pulses `done`. A clear request only clears the buffers.
// Timing: NPIX cycles of clearing, then 2 cycles per slot plus the FSM's time
// per triangle. The one-triangle-at-a-time schedule with a pause signal from
// the renderer follows the published design; the request/done handshake and
// the per-frame clear are this design's choices.
module rasterization_controller
  import fp16_pkg::*;
  import rend3r_pkg::*;
#(
  parameter int NUM_TRIANGLES = 4096,
  localparam int SW = $clog2(NUM_TRIANGLES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          render_req,
  input  logic          clear_req,
  output logic          done,
  // memory bank shape/triangle read port
  output logic [SW-1:0] sh_rd_idx,
  input  shape_rec_t    sh_rd_rec,
  input  logic          sh_rd_valid,
  // buffer clear
  output logic          clear_start,
  input  logic          clear_busy,
  // controller_tri (3D) to the rasterization FSM
  output logic          tri_valid,
  output vec3_t [2:0]   tri_v,
  output logic [15:0]   tri_color,
  input  logic          pause
);
  typedef enum logic [2:0] {S_IDLE, S_CLR0, S_CLR1, S_READ, S_OFFER, S_WAIT, S_FINISH} state_e;
  state_e state;
  logic render;
  logic [SW:0] idx;

  assign sh_rd_idx = idx[SW-1:0];
  assign tri_v = '{'{sh_rd_rec[TR_X1+6], sh_rd_rec[TR_X1+7], sh_rd_rec[TR_X1+8]},
                   '{sh_rd_rec[TR_X1+3], sh_rd_rec[TR_X1+4], sh_rd_rec[TR_X1+5]},
                   '{sh_rd_rec[TR_X1+0], sh_rd_rec[TR_X1+1], sh_rd_rec[TR_X1+2]}};
  assign tri_color = sh_rd_rec[TR_COL];
  assign tri_valid = (state == S_OFFER) && sh_rd_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      render <= 1'b0;
      idx <= '0;
      done <= 1'b0;
      clear_start <= 1'b0;
    end else begin
      done <= 1'b0;
      clear_start <= 1'b0;
      unique case (state)
        S_IDLE: if (render_req || clear_req) begin
          render <= render_req;
          clear_start <= 1'b1;
          state <= S_CLR0;
        end
        S_CLR0: state <= S_CLR1;
        S_CLR1: if (!clear_busy) begin
          idx <= '0;
          state <= render ? S_READ : S_FINISH;
        end
        S_READ: state <= S_OFFER;            // record arrives next cycle
        S_OFFER: begin
          if (!sh_rd_valid || !pause) begin  // skipped, or accepted
            if (idx == (SW+1)'(NUM_TRIANGLES - 1)) state <= S_WAIT;
            else begin
              idx <= idx + 1'b1;
              state <= S_READ;
            end
          end
        end
        S_WAIT: state <= S_FINISH;           // let the FSM raise pause
        S_FINISH: if (!pause) begin
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
