// rv_uop_seq: register-index merging and micro-operation control of the
// microcode front end.
//
// The operand moves from the lookup tables get their register indexes
// (rs1 on the rs1 bus, rs2 on the rs2 bus, where the register file is the
// source; U-format words carry no rs1, so x0 is read). The result move gets
// rd and is held in a delay register instead of being emitted. The output
// TTA instruction merges the current operand moves with the delayed result
// move of the previous operation; a bubble replaces the operand moves with
// no-operations. The delayed move leaves the register only when release_i is
// high, so a multi-cycle operation's result move waits for its result.
// Timing: the output is combinational; the delay register is loaded on
// release_i with the current result move when issue_i, else a no-operation.
//
// Holding the result move in a register follows the original design. So does
// emitting it later. Keeping a pending result move in a bubble cycle is this
// design's own choice. That choice gives the one-cycle hazard stall of the
// no-bypass core.
module rv_uop_seq
  import rv_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  tta_instr_t moves_i,   // BUS_RD slot: result move template
  input  fmt_e       fmt_i,
  input  logic [4:0] rs1_i,
  input  logic [4:0] rs2_i,
  input  logic [4:0] rd_i,
  input  logic       issue_i,
  input  logic       release_i,
  output tta_instr_t instr_o
);
  tta_instr_t merged;
  move_t      rd_move_q;

  always_comb begin
    merged = moves_i;
    if (merged[BUS_RS1].src == SRC_RF) merged[BUS_RS1].idx = (fmt_i == FMT_U) ? 5'd0 : rs1_i;
    if (merged[BUS_RS2].src == SRC_RF) merged[BUS_RS2].idx = rs2_i;
    if (merged[BUS_RD].dst == DST_RF)  merged[BUS_RD].idx  = rd_i;
  end

  always_comb begin
    instr_o          = issue_i ? merged : TTA_NOP;
    instr_o[BUS_RD]  = release_i ? rd_move_q : MOVE_NOP;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        rd_move_q <= MOVE_NOP;
    else if (release_i) rd_move_q <= issue_i ? merged[BUS_RD] : MOVE_NOP;
  end

  // The rd bus is reserved for result moves.
  always_comb if (rst_ni && issue_i) assert (moves_i[BUS_RD].src == SRC_NONE || moves_i[BUS_RD].dst == DST_RF);
endmodule
