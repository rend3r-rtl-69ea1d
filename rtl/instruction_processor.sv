// instruction_processor: fetches REND3R instructions from the instruction
// bank, decodes them and executes them.
//
// C-, L- and S-type instructions update the memory bank (camera, light or
// shape record, addressed by property and object index). An SE-type
// instruction names a shape and two properties; the word that follows it is
// always taken as the SD-type data word, whatever its bits. F-type
// instructions control the system:
//   nf (new frame)   - requests a render from the rendering controller and
//                      stalls (compute mode) until the controller reports done;
//   nr (new render)  - clears the memory bank and asks the controller to clear
//                      the frame buffer, also stalling until it is done;
//   lr (loop render) - jumps back to address 0 of the instruction bank;
//   er (end render)  - stops fetching for good (until reset).
// The update/compute split and the meaning of the four F-type functions follow
// the published ISA. The request/done handshake with the controller, the
// stall of nr until the frame-buffer clear finishes, the `run` start input and
// the skipping of words with an unknown opcode are this design's choices.
//
// Timing: the bank has one cycle of read latency, so each instruction takes
// two cycles (FETCH, EXEC). Property writes are single-cycle pulses.
module instruction_processor
  import rend3r_pkg::*;
#(
  parameter int IADDR_W = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run,
  // instruction bank read port
  output logic [IADDR_W-1:0] ib_addr,
  input  logic [31:0]        ib_data,
  // memory bank write port
  output logic               bank_clear,
  output logic               cam_we,
  output logic [4:0]         cam_prop,
  output logic [15:0]        cam_data,
  output logic               lt_we,
  output logic [5:0]         lt_idx,
  output logic [4:0]         lt_prop,
  output logic [15:0]        lt_data,
  output logic               sh_we,
  output logic [18:0]        sh_idx,
  output logic [4:0]         sh_prop,
  output logic [15:0]        sh_data,
  output logic [4:0]         sh_prop2,
  output logic [15:0]        sh_data2,
  // rendering controller handshake
  output logic               ctrl_render,   // one-cycle request: render a frame
  output logic               ctrl_clear,    // one-cycle request: clear frame buffer
  input  logic               ctrl_done,     // one-cycle: request finished
  // status
  output logic               compute_mode,
  output logic               halted
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_EXEC, S_COMPUTE, S_HALT} state_e;
  state_e state;

  logic [IADDR_W-1:0] pc;
  logic               sd_next;       // next word is the SD half of a shape update
  logic [18:0]        se_idx;
  logic [4:0]         se_prop, se_prop2;

  opcode_e op;
  assign op = opcode_e'(ib_data[2:0]);
  assign ib_addr = pc;
  assign compute_mode = (state == S_COMPUTE);
  assign halted = (state == S_HALT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      pc <= '0;
      sd_next <= 1'b0;
      se_idx <= '0;
      se_prop <= '0;
      se_prop2 <= '0;
      bank_clear <= 1'b0;
      cam_we <= 1'b0; cam_prop <= '0; cam_data <= '0;
      lt_we <= 1'b0; lt_idx <= '0; lt_prop <= '0; lt_data <= '0;
      sh_we <= 1'b0; sh_idx <= '0; sh_prop <= '0; sh_data <= '0; sh_prop2 <= '0; sh_data2 <= '0;
      ctrl_render <= 1'b0;
      ctrl_clear <= 1'b0;
    end else begin
      bank_clear <= 1'b0;
      cam_we <= 1'b0;
      lt_we <= 1'b0;
      sh_we <= 1'b0;
      ctrl_render <= 1'b0;
      ctrl_clear <= 1'b0;
      unique case (state)
        S_IDLE:  if (run) state <= S_FETCH;
        S_FETCH: state <= S_EXEC;
        S_EXEC: begin
          state <= S_FETCH;
          pc <= pc + 1'b1;
          if (sd_next) begin
            sd_next <= 1'b0;
            sh_we <= 1'b1;
            sh_idx <= se_idx;
            sh_prop <= se_prop;
            sh_prop2 <= se_prop2;
            sh_data <= ib_data[31:16];
            sh_data2 <= ib_data[15:0];
          end else begin
            case (op)
              OP_F: begin
                unique case (ffunc_e'(ib_data[10:9]))
                  F_END_RENDER: begin
                    state <= S_HALT;
                    pc <= pc;
                  end
                  F_NEW_RENDER: begin
                    bank_clear <= 1'b1;
                    ctrl_clear <= 1'b1;
                    state <= S_COMPUTE;
                  end
                  F_NEW_FRAME: begin
                    ctrl_render <= 1'b1;
                    state <= S_COMPUTE;
                  end
                  F_LOOP_RENDER: pc <= '0;
                endcase
              end
              OP_C: begin
                cam_we <= 1'b1;
                cam_prop <= ib_data[15:11];
                cam_data <= ib_data[31:16];
              end
              OP_L: begin
                lt_we <= 1'b1;
                lt_prop <= ib_data[15:11];
                lt_idx <= ib_data[8:3];
                lt_data <= ib_data[31:16];
              end
              OP_S: begin
                sd_next <= 1'b1;
                se_idx <= {ib_data[31:16], ib_data[5:3]};
                se_prop <= ib_data[15:11];
                se_prop2 <= ib_data[10:6];
              end
              default: ;
            endcase
          end
        end
        S_COMPUTE: if (ctrl_done) state <= S_FETCH;
        S_HALT: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A render or clear request is only issued from update mode.
  assert property (@(posedge clk) disable iff (rst) (ctrl_render || ctrl_clear) |-> state == S_COMPUTE);
endmodule
