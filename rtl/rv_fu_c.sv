// rv_fu_c: the control unit C of the TTA datapath.
//
// Ports: in1 (rs1), in2 (rs2), trigger (immediate, with the opcode), and two
// result ports: the return address and the AUIPC result, each with its own
// register. The unit also owns the redirect to the fetch unit.
//  - branches: compare in1 with in2; redirect_o in the trigger cycle to
//    pc + immediate when taken, else to pc + 4 (every branch redirects; there
//    is no prediction or flush).
//  - JALR:  redirect to (in1 + immediate) with bit 0 cleared; return
//           address pc + 4.
//  - JAL:   return address pc + 4 only; the jump itself was already taken by
//           the fetch unit when the instruction was translated.
//  - AUIPC: AUIPC result pc + immediate.
// pc_i is the PC of the instruction in the execute stage. Results are ready
// in the cycle after the trigger (latency 1); the redirect is combinational.
//
// The two output ports and the unit's role follow the original datapath
// drawing; which operand arrives on which port and the comparator structure
// are this design's own choices.
module rv_fu_c
  import rv_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        trig_i,
  input  cop_e        opc_i,
  input  logic [31:0] in1_i,
  input  logic [31:0] in2_i,
  input  logic [31:0] trig_data_i,
  input  logic [31:0] pc_i,
  output logic [31:0] ra_o,
  output logic [31:0] auipc_o,
  output logic        redirect_o,
  output logic [31:0] target_o,
  output logic        taken_o
);
  logic taken;
  always_comb begin
    unique case (opc_i)
      C_BEQ:   taken = (in1_i == in2_i);
      C_BNE:   taken = (in1_i != in2_i);
      C_BLT:   taken = ($signed(in1_i) < $signed(in2_i));
      C_BGE:   taken = ($signed(in1_i) >= $signed(in2_i));
      C_BLTU:  taken = (in1_i < in2_i);
      C_BGEU:  taken = (in1_i >= in2_i);
      default: taken = 1'b0;
    endcase
  end

  logic is_branch;
  assign is_branch = opc_i inside {C_BEQ, C_BNE, C_BLT, C_BGE, C_BLTU, C_BGEU};

  assign redirect_o = trig_i && (is_branch || opc_i == C_JALR);
  assign taken_o    = trig_i && is_branch && taken;
  always_comb begin
    if (opc_i == C_JALR)  target_o = (in1_i + trig_data_i) & ~32'd1;
    else if (taken)       target_o = pc_i + trig_data_i;
    else                  target_o = pc_i + 32'd4;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ra_o    <= '0;
      auipc_o <= '0;
    end else if (trig_i) begin
      if (opc_i == C_JAL || opc_i == C_JALR) ra_o    <= pc_i + 32'd4;
      if (opc_i == C_AUIPC)                  auipc_o <= pc_i + trig_data_i;
    end
  end
endmodule
