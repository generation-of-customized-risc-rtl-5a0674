// rv_microcode: the RISC-V front end. Translates each 32-bit RISC-V
// instruction into one TTA instruction of bus moves and sequences it.
//
// Structure: format decoding, immediate handling, data hazard detection,
// lookup tables (instruction, output port, latency, forwarding), register
// index merging, micro-operation control (delayed result move, bubble) and
// the controller with its control-flow detector. Register indexes and the
// immediate never pass through a table: indexes are merged into the moves,
// the sign-extended immediate goes straight to immediate_o.
//
// Timing: combinational from instruction_i to instruction_o in the cycle the
// word is presented (the decoder registers it). A result move appears on
// instruction_o one cycle after the operand moves for single-cycle
// operations, L cycles after for latency L. stall_ifetch_o asks the fetch
// unit to present the same word again; jump_o asks it to jump to
// pc_i + immediate_o (JAL). trace_* report every issued instruction.
//
// The sub-blocks and how they connect follow the original block diagram; the
// signals between them are this design's own.
module rv_microcode
  import rv_pkg::*;
#(
  parameter bit BYPASS   = 1'b1,
  parameter bit ENABLE_M = 1'b1,
  parameter int LAT_MUL  = 1,
  parameter int LAT_MULH = 4,
  parameter int LAT_DIV  = 35
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] instruction_i,
  input  logic [31:0] pc_i,
  input  logic        valid_i,
  output tta_instr_t  instruction_o,
  output logic [31:0] immediate_o,
  output logic [31:0] pc_o,
  output logic        stall_ifetch_o,
  output logic        jump_o,
  output logic        trace_valid_o,
  output logic [31:0] trace_pc_o,
  output logic [31:0] trace_instr_o,
  output logic        stat_bubble_o,
  output logic        stat_fwd_o,
  output logic        stat_hazard_stall_o
);
  fmt_e       fmt;
  logic [4:0] rs1, rs2, rd;
  logic       rs1_hz, rs2_hz;
  logic       issue, bubble, release_w, hazard_stall;
  rvop_e      op;
  tta_instr_t moves;
  logic [5:0] lat;
  logic       fwd1, fwd2;

  assign rs1 = instruction_i[19:15];
  assign rs2 = instruction_i[24:20];
  assign rd  = instruction_i[11:7];

  rv_format_decode u_fmt (.instr_i(instruction_i), .fmt_o(fmt));

  rv_imm_gen u_imm (.instr_i(instruction_i), .fmt_i(fmt), .imm_o(immediate_o));

  rv_hazard_detect u_hz (
    .clk_i, .rst_ni, .fmt_i(fmt), .rs1_i(rs1), .rs2_i(rs2), .rd_i(rd),
    .update_i(release_w), .issue_i(issue),
    .rs1_hazard_o(rs1_hz), .rs2_hazard_o(rs2_hz)
  );

  rv_translate #(
    .BYPASS(BYPASS), .ENABLE_M(ENABLE_M),
    .LAT_MUL(LAT_MUL), .LAT_MULH(LAT_MULH), .LAT_DIV(LAT_DIV)
  ) u_lut (
    .clk_i, .rst_ni, .instr_i(instruction_i),
    .rs1_hazard_i(rs1_hz), .rs2_hazard_i(rs2_hz),
    .update_i(release_w), .issue_i(issue),
    .op_o(op), .moves_o(moves), .lat_o(lat), .fwd_rs1_o(fwd1), .fwd_rs2_o(fwd2)
  );

  rv_controller #(.BYPASS(BYPASS)) u_ctrl (
    .clk_i, .rst_ni, .valid_i, .op_i(op), .lat_i(lat),
    .hazard_i(rs1_hz || rs2_hz),
    .issue_o(issue), .bubble_o(bubble), .release_o(release_w),
    .stall_ifetch_o, .jump_o, .hazard_stall_o(hazard_stall)
  );

  rv_uop_seq u_seq (
    .clk_i, .rst_ni, .moves_i(moves), .fmt_i(fmt),
    .rs1_i(rs1), .rs2_i(rs2), .rd_i(rd),
    .issue_i(issue), .release_i(release_w), .instr_o(instruction_o)
  );

  assign pc_o                = pc_i;
  assign trace_valid_o       = issue;
  assign trace_pc_o          = pc_i;
  assign trace_instr_o       = instruction_i;
  assign stat_bubble_o       = bubble;
  assign stat_fwd_o          = issue && (fwd1 || fwd2);
  assign stat_hazard_stall_o = hazard_stall;
endmodule
