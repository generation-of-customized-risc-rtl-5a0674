// tb_rv_asm_pkg: RV32IM instruction encoders and a reference instruction-set
// model used by the testbenches. The model executes one instruction on an
// architectural state (registers, PC, word-addressed data memory) and reports
// the register write it makes, so a testbench can compare the core's
// instruction trace and register-write trace with it.
//
// The encodings and semantics are those of the RISC-V RV32IM specification;
// the model is written independently of the RTL.
package tb_rv_asm_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction
  function automatic logic [31:0] i_type(logic [6:0] opc, logic [11:0] imm, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd);
    return {imm, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] s_type(logic [11:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(logic [12:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(logic [6:0] opc, logic [19:0] imm, logic [4:0] rd);
    return {imm, rd, opc};
  endfunction
  function automatic logic [31:0] j_type(logic [20:0] imm, logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_type(7'h00, 5'(rs2), 5'(rs1), 3'd0, 5'(rd)); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_type(7'h20, 5'(rs2), 5'(rs1), 3'd0, 5'(rd)); endfunction
  function automatic logic [31:0] MUL (int rd, int rs1, int rs2); return r_type(7'h01, 5'(rs2), 5'(rs1), 3'd0, 5'(rd)); endfunction
  function automatic logic [31:0] MULH(int rd, int rs1, int rs2); return r_type(7'h01, 5'(rs2), 5'(rs1), 3'd1, 5'(rd)); endfunction
  function automatic logic [31:0] DIV (int rd, int rs1, int rs2); return r_type(7'h01, 5'(rs2), 5'(rs1), 3'd4, 5'(rd)); endfunction
  function automatic logic [31:0] REM (int rd, int rs1, int rs2); return r_type(7'h01, 5'(rs2), 5'(rs1), 3'd6, 5'(rd)); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(7'b0010011, 12'(imm), 5'(rs1), 3'd0, 5'(rd)); endfunction
  function automatic logic [31:0] LW  (int rd, int rs1, int imm); return i_type(7'b0000011, 12'(imm), 5'(rs1), 3'd2, 5'(rd)); endfunction
  function automatic logic [31:0] SW  (int rs2, int rs1, int imm); return s_type(12'(imm), 5'(rs2), 5'(rs1), 3'd2); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return b_type(13'(off), 5'(rs2), 5'(rs1), 3'd0); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return b_type(13'(off), 5'(rs2), 5'(rs1), 3'd1); endfunction
  function automatic logic [31:0] BLT (int rs1, int rs2, int off); return b_type(13'(off), 5'(rs2), 5'(rs1), 3'd4); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20); return u_type(7'b0110111, 20'(imm20), 5'(rd)); endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20); return u_type(7'b0010111, 20'(imm20), 5'(rd)); endfunction
  function automatic logic [31:0] JAL (int rd, int off); return j_type(21'(off), 5'(rd)); endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm); return i_type(7'b1100111, 12'(imm), 5'(rs1), 3'd0, 5'(rd)); endfunction

  // ---------------- instruction classes ----------------
  typedef enum int {K_ALU, K_LOAD, K_STORE, K_BRANCH, K_JAL, K_JALR, K_MUL, K_MULH, K_DIV, K_AUIPC, K_OTHER} kind_e;

  function automatic kind_e kind_of(logic [31:0] w);
    unique case (w[6:0])
      7'b0110011: begin
        if (w[31:25] == 7'h01) begin
          if (w[14:12] == 3'd0) return K_MUL;
          if (w[14]) return K_DIV;
          return K_MULH;
        end
        return K_ALU;
      end
      7'b0010011, 7'b0110111: return K_ALU;
      7'b0010111: return K_AUIPC;
      7'b0000011: return K_LOAD;
      7'b0100011: return K_STORE;
      7'b1100011: return K_BRANCH;
      7'b1101111: return K_JAL;
      7'b1100111: return K_JALR;
      default:    return K_OTHER;
    endcase
  endfunction

  function automatic bit reads_rs1(logic [31:0] w);
    return w[6:0] inside {7'b0110011, 7'b0010011, 7'b0000011, 7'b0100011, 7'b1100011, 7'b1100111};
  endfunction
  function automatic bit reads_rs2(logic [31:0] w);
    return w[6:0] inside {7'b0110011, 7'b0100011, 7'b1100011};
  endfunction
  function automatic bit writes_rd(logic [31:0] w);
    return w[6:0] inside {7'b0110011, 7'b0010011, 7'b0000011, 7'b0110111, 7'b0010111,
                          7'b1101111, 7'b1100111} && w[11:7] != 5'd0;
  endfunction

  // ---------------- reference model ----------------
  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] dmem [];
    int          dwords;

    function new(int words);
      dwords = words;
      dmem = new[words];
      foreach (dmem[i]) dmem[i] = '0;
      foreach (x[i]) x[i] = '0;
      pc = '0;
    endfunction

    // Executes w at pc. Returns 1 and the write in wr_rd/wr_val when it
    // writes a register other than x0.
    function automatic bit step(logic [31:0] w, output logic [4:0] wr_rd, output logic [31:0] wr_val);
      logic [31:0] a, b, imm_i, imm_s, imm_b, imm_u, imm_j, res, addr, npc, word, sh;
      logic [4:0]  rd;
      logic [2:0]  f3;
      bit          wr;
      int          idx;
      a  = x[w[19:15]];
      b  = x[w[24:20]];
      rd = w[11:7];
      f3 = w[14:12];
      imm_i = {{20{w[31]}}, w[31:20]};
      imm_s = {{20{w[31]}}, w[31:25], w[11:7]};
      imm_b = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
      imm_u = {w[31:12], 12'b0};
      imm_j = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
      npc = pc + 4;
      wr  = 0;
      res = '0;
      unique case (w[6:0])
        7'b0110011: begin
          wr = 1;
          if (w[31:25] == 7'h01) begin
            logic signed [63:0] ss, su;
            logic [63:0] uu;
            ss = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
            su = $signed({{32{a[31]}}, a}) * $signed({32'd0, b});
            uu = {32'd0, a} * {32'd0, b};
            unique case (f3)
              3'd0: res = uu[31:0];
              3'd1: res = ss[63:32];
              3'd2: res = su[63:32];
              3'd3: res = uu[63:32];
              3'd4: res = (b == 0) ? 32'hFFFFFFFF : (a == 32'h80000000 && b == 32'hFFFFFFFF) ? a : $unsigned($signed(a) / $signed(b));
              3'd5: res = (b == 0) ? 32'hFFFFFFFF : a / b;
              3'd6: res = (b == 0) ? a : (a == 32'h80000000 && b == 32'hFFFFFFFF) ? 0 : $unsigned($signed(a) % $signed(b));
              3'd7: res = (b == 0) ? a : a % b;
            endcase
          end else begin
            unique case (f3)
              3'd0: res = w[30] ? a - b : a + b;
              3'd1: res = a << b[4:0];
              3'd2: res = {31'd0, $signed(a) < $signed(b)};
              3'd3: res = {31'd0, a < b};
              3'd4: res = a ^ b;
              3'd5: res = w[30] ? $unsigned($signed(a) >>> b[4:0]) : a >> b[4:0];
              3'd6: res = a | b;
              3'd7: res = a & b;
            endcase
          end
        end
        7'b0010011: begin
          wr = 1;
          unique case (f3)
            3'd0: res = a + imm_i;
            3'd1: res = a << w[24:20];
            3'd2: res = {31'd0, $signed(a) < $signed(imm_i)};
            3'd3: res = {31'd0, a < imm_i};
            3'd4: res = a ^ imm_i;
            3'd5: res = w[30] ? $unsigned($signed(a) >>> w[24:20]) : a >> w[24:20];
            3'd6: res = a | imm_i;
            3'd7: res = a & imm_i;
          endcase
        end
        7'b0110111: begin wr = 1; res = imm_u; end
        7'b0010111: begin wr = 1; res = pc + imm_u; end
        7'b1101111: begin wr = 1; res = pc + 4; npc = pc + imm_j; end
        7'b1100111: begin wr = 1; res = pc + 4; npc = (a + imm_i) & ~32'd1; end
        7'b1100011: begin
          bit t;
          unique case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            3'd7: t = (a >= b);
            default: t = 0;
          endcase
          if (t) npc = pc + imm_b;
        end
        7'b0000011: begin
          wr   = 1;
          addr = a + imm_i;
          idx  = int'(addr[31:2]) % dwords;
          word = dmem[idx];
          sh   = word >> {addr[1:0], 3'b000};
          unique case (f3)
            3'd0: res = {{24{sh[7]}}, sh[7:0]};
            3'd1: res = {{16{sh[15]}}, sh[15:0]};
            3'd4: res = {24'd0, sh[7:0]};
            3'd5: res = {16'd0, sh[15:0]};
            default: res = word;
          endcase
        end
        7'b0100011: begin
          addr = a + imm_s;
          idx  = int'(addr[31:2]) % dwords;
          unique case (f3)
            3'd0: dmem[idx][8*addr[1:0] +: 8] = b[7:0];
            3'd1: dmem[idx][16*addr[1] +: 16] = b[15:0];
            default: dmem[idx] = b;
          endcase
        end
        default: ;
      endcase
      pc     = npc;
      wr_rd  = rd;
      wr_val = res;
      if (wr && rd != 0) begin
        x[rd] = res;
        return 1;
      end
      return 0;
    endfunction
  endclass

endpackage
