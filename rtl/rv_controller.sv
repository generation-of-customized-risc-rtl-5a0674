// rv_controller: controller of the microcode front end, including the
// control-flow-operation detector that feeds it.
//
// Each cycle it decides whether the incoming instruction is issued (its
// operand moves go to the decoder) or a bubble is inserted, and whether the
// fetch unit must hold its word:
//  - after a multi-cycle operation of latency L it bubbles L-1 cycles, so the
//    delayed result move is released exactly when the result is ready;
//  - a branch or JALR is issued and then one bubble follows while the control
//    unit executes it and redirects the fetch unit (no prediction, no flush);
//  - a JAL is issued and redirects the fetch unit directly (jump_o), without
//    waiting for the execute stage;
//  - without bypass connectivity (BYPASS=0) an instruction that depends on the
//    previous result is held for one cycle, during which the result move is
//    performed.
// release_o is high when no wait is in progress: the pending result move is
// emitted and the hazard/output-port registers advance. Latency counting and
// the single-cycle hazard stall are this design's own choices.
module rv_controller
  import rv_pkg::*;
#(
  parameter bit BYPASS = 1'b1
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       valid_i,
  input  rvop_e      op_i,
  input  logic [5:0] lat_i,
  input  logic       hazard_i,
  output logic       issue_o,
  output logic       bubble_o,
  output logic       release_o,
  output logic       stall_ifetch_o,
  output logic       jump_o,
  output logic       hazard_stall_o
);
  // Control flow operation detection.
  logic is_ctrl_op, is_jal;
  assign is_ctrl_op = op_i inside {RV_BEQ, RV_BNE, RV_BLT, RV_BGE, RV_BLTU, RV_BGEU, RV_JALR};
  assign is_jal     = (op_i == RV_JAL);

  logic [5:0] wait_q;
  logic       waiting;
  assign waiting = (wait_q != 6'd0);

  always_comb begin
    issue_o        = 1'b0;
    stall_ifetch_o = 1'b0;
    hazard_stall_o = 1'b0;
    if (waiting) begin
      stall_ifetch_o = 1'b1;
    end else if (valid_i) begin
      if (!BYPASS && hazard_i) begin
        stall_ifetch_o = 1'b1;
        hazard_stall_o = 1'b1;
      end else begin
        issue_o = 1'b1;
      end
    end
  end

  assign bubble_o  = !issue_o;
  assign release_o = !waiting;
  assign jump_o    = issue_o && is_jal;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wait_q <= '0;
    end else if (waiting) begin
      wait_q <= wait_q - 6'd1;
    end else if (issue_o) begin
      wait_q <= is_ctrl_op ? 6'd1 : (lat_i - 6'd1);
    end
  end
endmodule
