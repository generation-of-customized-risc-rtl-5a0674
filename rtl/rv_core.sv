// rv_core: an RV32IM processor built from a transport triggered (TTA)
// datapath and a microcode front end that turns each RISC-V instruction into
// TTA bus moves.
//
// Pipeline (three stages by default):
//   1. fetch + translate + decode: the instruction word from the memory is
//      translated by the microcode unit into moves and decoded into controls,
//      all in one combinational path, ending in the decode registers;
//   2. register read + execute: the buses carry the operands from the
//      register file (or, on a data hazard, straight from a unit's output
//      port) to units M and C, which execute;
//   3. write back: a result move on the rd bus, issued one cycle after the
//      operand moves (L cycles for latency L), writes the register file.
// PIPELINE_STAGES=4 adds an instruction register after the memory.
//
// Performance: one instruction per cycle for single-cycle operations
// including loads and stores; MULH 4 and DIV/REM 35 cycles by default;
// branches and JALR take PIPELINE_STAGES cycles whether taken or not; JAL
// takes PIPELINE_STAGES-1. Without bypass connectivity (BYPASS=0) a use of
// the previous result costs one stall cycle.
//
// Memories are outside the core: both are synchronous, one-cycle, without
// wait states; the data memory takes a word address with byte enables. The
// trace ports report each issued instruction and each register write.
//
// The stage split, the four dedicated buses, the units R, M and C, the
// latencies and the branch/JAL costs follow the original design. The memory
// interface, the reset behaviour and the trace/statistics ports are this
// design's own choices.
module rv_core
  import rv_pkg::*;
#(
  parameter int          PIPELINE_STAGES = 3,
  parameter bit          BYPASS          = 1'b1,
  parameter int          NREGS           = 32,
  parameter bit          ENABLE_M        = 1'b1,
  parameter int          LAT_MUL         = 1,
  parameter int          LAT_MULH        = 4,
  parameter int          LAT_DIV         = 35,
  parameter logic [31:0] BOOT_ADDR       = 32'h0000_0000
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // instruction memory
  output logic [31:0] imem_addr_o,
  input  logic [31:0] imem_rdata_i,
  // data memory
  output logic        dmem_req_o,
  output logic        dmem_we_o,
  output logic [3:0]  dmem_be_o,
  output logic [31:0] dmem_addr_o,
  output logic [31:0] dmem_wdata_o,
  input  logic [31:0] dmem_rdata_i,
  // instruction trace
  output logic        trace_valid_o,
  output logic [31:0] trace_pc_o,
  output logic [31:0] trace_instr_o,
  // datapath trace
  output logic        rf_we_o,
  output logic [4:0]  rf_wa_o,
  output logic [31:0] rf_wd_o,
  // pipeline events, one pulse per occurrence
  output logic        stat_bubble_o,       // no operand moves issued this cycle
  output logic        stat_fwd_o,          // an operand was forwarded from a unit output
  output logic        stat_hazard_stall_o, // dependent instruction held (no bypass)
  output logic        stat_redirect_o,     // branch or JALR redirected the fetch unit
  output logic        stat_taken_o         // the redirect was a taken branch
);
  initial assert (PIPELINE_STAGES == 3 || PIPELINE_STAGES == 4)
    else $fatal(1, "PIPELINE_STAGES must be 3 or 4");
  initial assert (NREGS == 32 || NREGS == 16)
    else $fatal(1, "NREGS must be 32 (RV32I) or 16 (RV32E)");

  // fetch <-> front end
  logic [31:0] if_instr, if_pc;
  logic        if_valid, stall_ifetch, jump;
  // front end -> decoder
  tta_instr_t  uinstr;
  logic [31:0] imm, mc_pc;
  // decoder -> datapath
  ctrl_t       ctrl;
  // datapath
  logic [31:0] rf_rd1, rf_rd2, rf_wd;
  logic [31:0] m_in1, m_in2, m_trig, c_in1, c_in2, c_trig;
  logic [31:0] m_out, c_ra, c_auipc, c_target;
  logic        c_redirect, c_taken;

  rv_ifetch #(.INSTR_REG(PIPELINE_STAGES == 4), .BOOT_ADDR(BOOT_ADDR)) u_ifetch (
    .clk_i, .rst_ni,
    .addr_o(imem_addr_o), .rdata_i(imem_rdata_i),
    .instr_o(if_instr), .pc_o(if_pc), .valid_o(if_valid),
    .stall_i(stall_ifetch), .jump_i(jump), .jump_offset_i(imm),
    .redirect_i(c_redirect), .redirect_target_i(c_target)
  );

  rv_microcode #(
    .BYPASS(BYPASS), .ENABLE_M(ENABLE_M),
    .LAT_MUL(LAT_MUL), .LAT_MULH(LAT_MULH), .LAT_DIV(LAT_DIV)
  ) u_microcode (
    .clk_i, .rst_ni,
    .instruction_i(if_instr), .pc_i(if_pc), .valid_i(if_valid),
    .instruction_o(uinstr), .immediate_o(imm), .pc_o(mc_pc),
    .stall_ifetch_o(stall_ifetch), .jump_o(jump),
    .trace_valid_o, .trace_pc_o, .trace_instr_o,
    .stat_bubble_o, .stat_fwd_o, .stat_hazard_stall_o
  );

  rv_decoder #(.BYPASS(BYPASS)) u_decoder (
    .clk_i, .rst_ni, .instr_i(uinstr), .imm_i(imm), .pc_i(mc_pc), .ctrl_o(ctrl)
  );

  rv_regfile #(.NREGS(NREGS)) u_rf (
    .clk_i,
    .ra1_i(ctrl.rf_ra1), .rd1_o(rf_rd1),
    .ra2_i(ctrl.rf_ra2), .rd2_o(rf_rd2),
    .we_i(ctrl.rf_we), .wa_i(ctrl.rf_wa), .wd_i(rf_wd)
  );

  rv_interconnect #(.BYPASS(BYPASS)) u_ic (
    .ctrl_i(ctrl), .rf_rd1_i(rf_rd1), .rf_rd2_i(rf_rd2),
    .m_out_i(m_out), .c_ra_i(c_ra), .c_auipc_i(c_auipc),
    .m_in1_o(m_in1), .m_in2_o(m_in2), .m_trig_o(m_trig),
    .c_in1_o(c_in1), .c_in2_o(c_in2), .c_trig_o(c_trig), .rf_wd_o(rf_wd)
  );

  rv_fu_m #(
    .ENABLE_M(ENABLE_M), .LAT_MUL(LAT_MUL), .LAT_MULH(LAT_MULH), .LAT_DIV(LAT_DIV)
  ) u_fu_m (
    .clk_i, .rst_ni,
    .trig_i(ctrl.m_trig), .opc_i(ctrl.m_opc),
    .in1_i(m_in1), .in2_i(m_in2), .trig_data_i(m_trig), .out_o(m_out),
    .dmem_req_o, .dmem_we_o, .dmem_be_o, .dmem_addr_o, .dmem_wdata_o, .dmem_rdata_i
  );

  rv_fu_c u_fu_c (
    .clk_i, .rst_ni,
    .trig_i(ctrl.c_trig), .opc_i(ctrl.c_opc),
    .in1_i(c_in1), .in2_i(c_in2), .trig_data_i(c_trig), .pc_i(ctrl.pc),
    .ra_o(c_ra), .auipc_o(c_auipc),
    .redirect_o(c_redirect), .target_o(c_target), .taken_o(c_taken)
  );

  assign stat_redirect_o = c_redirect;
  assign stat_taken_o    = c_taken;
  assign rf_we_o = ctrl.rf_we;
  assign rf_wa_o = ctrl.rf_wa;
  assign rf_wd_o = rf_wd;
endmodule
