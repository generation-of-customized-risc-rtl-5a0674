// rv_translate: the lookup tables of the microcode front end and the
// data-forwarding multiplexers in front of them.
//
// The RISC-V operation is identified from the opcode and function fields
// only (register indexes and immediates never enter the tables). It indexes:
//  - the instruction table: the operand moves on the rs2, rs1 and imm buses
//    and the result move template on the rd bus, without register indexes;
//  - the output table: which output port holds the result; this is stored
//    in a register so the next instruction knows where the previous result
//    sits;
//  - the latency table: cycles from trigger to result;
//  - the rs1 and rs2 forwarding tables, indexed by operation and the stored
//    output port: the operand move rewritten to come from that port.
// On an rs1 (rs2) hazard the forwarding move replaces the register file move
// on that bus; all other moves and the result move are unchanged.
//
// Parameters: BYPASS generates the forwarding tables (off: hazards are left
// to the controller), ENABLE_M decodes the M extension, LAT_* are the
// operation latencies. update_i/issue_i clock the output-port register with
// the same rule as the hazard detector. Tables are combinational.
//
// The table set (instruction, output port, latency, per-operand forwarding)
// follows the original design. The table contents (which port each operand
// uses) are this design's own, derived from the bus connectivity. The tables
// are written as case statements.
module rv_translate
  import rv_pkg::*;
#(
  parameter bit BYPASS   = 1'b1,
  parameter bit ENABLE_M = 1'b1,
  parameter int LAT_ALU  = 1,
  parameter int LAT_LSU  = 1,
  parameter int LAT_MUL  = 1,
  parameter int LAT_MULH = 4,
  parameter int LAT_DIV  = 35
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic [31:0] instr_i,
  input  logic       rs1_hazard_i,
  input  logic       rs2_hazard_i,
  input  logic       update_i,
  input  logic       issue_i,
  output rvop_e      op_o,
  output tta_instr_t moves_o,   // index BUS_RD holds the result move template
  output logic [5:0] lat_o,
  output logic       fwd_rs1_o, // a forwarding move was used (for statistics)
  output logic       fwd_rs2_o
);

  // ---------------- operation identification ----------------
  function automatic rvop_e decode_op(logic [31:0] i);
    logic [2:0] f3;
    logic [6:0] f7;
    f3 = i[14:12];
    f7 = i[31:25];
    decode_op = RV_ILLEGAL;
    unique case (i[6:0])
      7'b0110011: begin
        if (f7 == 7'b0000000) begin
          unique case (f3)
            3'd0: decode_op = RV_ADD;  3'd1: decode_op = RV_SLL;
            3'd2: decode_op = RV_SLT;  3'd3: decode_op = RV_SLTU;
            3'd4: decode_op = RV_XOR;  3'd5: decode_op = RV_SRL;
            3'd6: decode_op = RV_OR;   3'd7: decode_op = RV_AND;
          endcase
        end else if (f7 == 7'b0100000) begin
          if (f3 == 3'd0) decode_op = RV_SUB;
          else if (f3 == 3'd5) decode_op = RV_SRA;
        end else if (f7 == 7'b0000001 && ENABLE_M) begin
          unique case (f3)
            3'd0: decode_op = RV_MUL;  3'd1: decode_op = RV_MULH;
            3'd2: decode_op = RV_MULHSU; 3'd3: decode_op = RV_MULHU;
            3'd4: decode_op = RV_DIV;  3'd5: decode_op = RV_DIVU;
            3'd6: decode_op = RV_REM;  3'd7: decode_op = RV_REMU;
          endcase
        end
      end
      7'b0010011: begin
        unique case (f3)
          3'd0: decode_op = RV_ADDI;  3'd2: decode_op = RV_SLTI;
          3'd3: decode_op = RV_SLTIU; 3'd4: decode_op = RV_XORI;
          3'd6: decode_op = RV_ORI;   3'd7: decode_op = RV_ANDI;
          3'd1: if (f7 == 7'b0000000) decode_op = RV_SLLI;
          3'd5: if (f7 == 7'b0000000) decode_op = RV_SRLI;
                else if (f7 == 7'b0100000) decode_op = RV_SRAI;
        endcase
      end
      7'b0110111: decode_op = RV_LUI;
      7'b0010111: decode_op = RV_AUIPC;
      7'b1101111: decode_op = RV_JAL;
      7'b1100111: if (f3 == 3'd0) decode_op = RV_JALR;
      7'b1100011: begin
        unique case (f3)
          3'd0: decode_op = RV_BEQ;  3'd1: decode_op = RV_BNE;
          3'd4: decode_op = RV_BLT;  3'd5: decode_op = RV_BGE;
          3'd6: decode_op = RV_BLTU; 3'd7: decode_op = RV_BGEU;
          default: decode_op = RV_ILLEGAL;
        endcase
      end
      7'b0000011: begin
        unique case (f3)
          3'd0: decode_op = RV_LB;  3'd1: decode_op = RV_LH;
          3'd2: decode_op = RV_LW;  3'd4: decode_op = RV_LBU;
          3'd5: decode_op = RV_LHU;
          default: decode_op = RV_ILLEGAL;
        endcase
      end
      7'b0100011: begin
        unique case (f3)
          3'd0: decode_op = RV_SB; 3'd1: decode_op = RV_SH; 3'd2: decode_op = RV_SW;
          default: decode_op = RV_ILLEGAL;
        endcase
      end
      default: decode_op = RV_ILLEGAL;
    endcase
  endfunction

  // ---------------- instruction table ----------------
  function automatic move_t mv(src_e s, dst_e d, logic [4:0] o);
    mv = '{src: s, dst: d, opc: o, idx: 5'd0};
  endfunction

  // M operation with rs1 on the trigger and rs2 or imm on in1.
  function automatic tta_instr_t m_rr(mop_e o);
    m_rr = TTA_NOP;
    m_rr[BUS_RS1] = mv(SRC_RF, DST_M_TRIG, o);
    m_rr[BUS_RS2] = mv(SRC_RF, DST_M_IN1, 5'd0);
    m_rr[BUS_RD]  = mv(SRC_M_OUT, DST_RF, 5'd0);
  endfunction
  function automatic tta_instr_t m_ri(mop_e o);
    m_ri = TTA_NOP;
    m_ri[BUS_RS1] = mv(SRC_RF, DST_M_TRIG, o);
    m_ri[BUS_IMM] = mv(SRC_IMM, DST_M_IN1, 5'd0);
    m_ri[BUS_RD]  = mv(SRC_M_OUT, DST_RF, 5'd0);
  endfunction
  function automatic tta_instr_t m_ld(mop_e o);
    m_ld = TTA_NOP;
    m_ld[BUS_RS1] = mv(SRC_RF, DST_M_TRIG, o);
    m_ld[BUS_IMM] = mv(SRC_IMM, DST_M_IN2, 5'd0);
    m_ld[BUS_RD]  = mv(SRC_M_OUT, DST_RF, 5'd0);
  endfunction
  function automatic tta_instr_t m_st(mop_e o);
    m_st = TTA_NOP;
    m_st[BUS_RS1] = mv(SRC_RF, DST_M_TRIG, o);
    m_st[BUS_RS2] = mv(SRC_RF, DST_M_IN1, 5'd0);
    m_st[BUS_IMM] = mv(SRC_IMM, DST_M_IN2, 5'd0);
  endfunction
  function automatic tta_instr_t c_br(cop_e o);
    c_br = TTA_NOP;
    c_br[BUS_RS1] = mv(SRC_RF, DST_C_IN1, 5'd0);
    c_br[BUS_RS2] = mv(SRC_RF, DST_C_IN2, 5'd0);
    c_br[BUS_IMM] = mv(SRC_IMM, DST_C_TRIG, o);
  endfunction

  function automatic tta_instr_t instr_lut(rvop_e op);
    unique case (op)
      RV_ADD:   return m_rr(M_ADD);   RV_SUB:   return m_rr(M_SUB);
      RV_SLL:   return m_rr(M_SLL);   RV_SLT:   return m_rr(M_SLT);
      RV_SLTU:  return m_rr(M_SLTU);  RV_XOR:   return m_rr(M_XOR);
      RV_SRL:   return m_rr(M_SRL);   RV_SRA:   return m_rr(M_SRA);
      RV_OR:    return m_rr(M_OR);    RV_AND:   return m_rr(M_AND);
      RV_MUL:   return m_rr(M_MUL);   RV_MULH:  return m_rr(M_MULH);
      RV_MULHSU:return m_rr(M_MULHSU);RV_MULHU: return m_rr(M_MULHU);
      RV_DIV:   return m_rr(M_DIV);   RV_DIVU:  return m_rr(M_DIVU);
      RV_REM:   return m_rr(M_REM);   RV_REMU:  return m_rr(M_REMU);
      RV_ADDI:  return m_ri(M_ADD);   RV_SLTI:  return m_ri(M_SLT);
      RV_SLTIU: return m_ri(M_SLTU);  RV_XORI:  return m_ri(M_XOR);
      RV_ORI:   return m_ri(M_OR);    RV_ANDI:  return m_ri(M_AND);
      RV_SLLI:  return m_ri(M_SLL);   RV_SRLI:  return m_ri(M_SRL);
      RV_SRAI:  return m_ri(M_SRA);
      // LUI is routed through the adder: x0 + immediate.
      RV_LUI:   return m_ri(M_ADD);
      RV_LB:    return m_ld(M_LB);    RV_LH:    return m_ld(M_LH);
      RV_LW:    return m_ld(M_LW);    RV_LBU:   return m_ld(M_LBU);
      RV_LHU:   return m_ld(M_LHU);
      RV_SB:    return m_st(M_SB);    RV_SH:    return m_st(M_SH);
      RV_SW:    return m_st(M_SW);
      RV_BEQ:   return c_br(C_BEQ);   RV_BNE:   return c_br(C_BNE);
      RV_BLT:   return c_br(C_BLT);   RV_BGE:   return c_br(C_BGE);
      RV_BLTU:  return c_br(C_BLTU);  RV_BGEU:  return c_br(C_BGEU);
      RV_JAL: begin
        tta_instr_t t;
        t = TTA_NOP;
        t[BUS_IMM] = mv(SRC_IMM, DST_C_TRIG, C_JAL);
        t[BUS_RD]  = mv(SRC_C_RA, DST_RF, 5'd0);
        return t;
      end
      RV_JALR: begin
        tta_instr_t t;
        t = TTA_NOP;
        t[BUS_RS1] = mv(SRC_RF, DST_C_IN1, 5'd0);
        t[BUS_IMM] = mv(SRC_IMM, DST_C_TRIG, C_JALR);
        t[BUS_RD]  = mv(SRC_C_RA, DST_RF, 5'd0);
        return t;
      end
      RV_AUIPC: begin
        tta_instr_t t;
        t = TTA_NOP;
        t[BUS_IMM] = mv(SRC_IMM, DST_C_TRIG, C_AUIPC);
        t[BUS_RD]  = mv(SRC_C_AUIPC, DST_RF, 5'd0);
        return t;
      end
      default:  return TTA_NOP;
    endcase
  endfunction

  // ---------------- latency table ----------------
  function automatic logic [5:0] lat_lut(rvop_e op);
    unique case (op)
      RV_MUL:                                  return 6'(LAT_MUL);
      RV_MULH, RV_MULHSU, RV_MULHU:            return 6'(LAT_MULH);
      RV_DIV, RV_DIVU, RV_REM, RV_REMU:        return 6'(LAT_DIV);
      RV_LB, RV_LH, RV_LW, RV_LBU, RV_LHU,
      RV_SB, RV_SH, RV_SW:                     return 6'(LAT_LSU);
      default:                                 return 6'(LAT_ALU);
    endcase
  endfunction

  // ---------------- output table and register ----------------
  // The result port is the source of the result move.
  function automatic src_e out_lut(rvop_e op);
    tta_instr_t t;
    t = instr_lut(op);
    return t[BUS_RD].src;
  endfunction

  // ---------------- forwarding tables ----------------
  function automatic move_t fwd_lut(rvop_e op, int bus, src_e port);
    tta_instr_t t;
    move_t      m;
    t     = instr_lut(op);
    m     = t[bus];
    m.src = port;
    return m;
  endfunction

  rvop_e      op;
  tta_instr_t base;
  src_e       out_port_q;

  assign op    = decode_op(instr_i);
  assign base  = instr_lut(op);
  assign op_o  = op;
  assign lat_o = lat_lut(op);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)       out_port_q <= SRC_NONE;
    else if (update_i) out_port_q <= issue_i ? out_lut(op) : SRC_NONE;
  end

  logic use1, use2;
  assign use1 = BYPASS && rs1_hazard_i && base[BUS_RS1].src == SRC_RF && out_port_q != SRC_NONE;
  assign use2 = BYPASS && rs2_hazard_i && base[BUS_RS2].src == SRC_RF && out_port_q != SRC_NONE;

  always_comb begin
    moves_o = base;
    if (use1) moves_o[BUS_RS1] = fwd_lut(op, BUS_RS1, out_port_q);
    if (use2) moves_o[BUS_RS2] = fwd_lut(op, BUS_RS2, out_port_q);
  end

  assign fwd_rs1_o = use1;
  assign fwd_rs2_o = use2;

endmodule
