// tb_rv_translate: the lookup tables. For representative instructions of
// every class it checks the operand moves, the result move template and the
// latency against the intended mapping, written out independently here.
// It then issues an operation and checks that a hazard on the next
// instruction replaces the register-file move with a move from the previous
// operation's output port (M.out, C.ra, C.auipc), on rs1 and rs2 separately.
//
// The expected moves follow this design's table contents, which are derived
// from the bus connectivity. The latencies checked are the specified ones.
module tb_rv_translate;
  import rv_pkg::*;
  import tb_rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] instr;
  logic        h1, h2, upd, iss, f1, f2;
  rvop_e       op;
  tta_instr_t  mv;
  logic [5:0]  lat;

  rv_translate dut (.clk_i(clk), .rst_ni(rst_n), .instr_i(instr), .rs1_hazard_i(h1),
                    .rs2_hazard_i(h2), .update_i(upd), .issue_i(iss), .op_o(op), .moves_o(mv),
                    .lat_o(lat), .fwd_rs1_o(f1), .fwd_rs2_o(f2));

  task automatic expect_move(string what, move_t m, src_e s, dst_e d, int o);
    checks++;
    if (m.src != s || m.dst != d || (o >= 0 && m.opc != 5'(o)) || m.idx != 0) begin
      failures++;
      $display("FAIL %s: move %s->%s opc %0d, expected %s->%s opc %0d", what, m.src.name(),
               m.dst.name(), m.opc, s.name(), d.name(), o);
    end
  endtask

  task automatic expect_lat(string what, int l);
    checks++;
    if (lat != 6'(l)) begin failures++; $display("FAIL %s latency %0d expected %0d", what, lat, l); end
  endtask

  initial begin
    instr = 32'h13; h1 = 0; h2 = 0; upd = 0; iss = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // R-type: rs1 -> M.trigger(op), rs2 -> M.in1, result M.out -> RF
    instr = SUB(3, 1, 2); #1;
    expect_move("sub rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_SUB);
    expect_move("sub rs2", mv[BUS_RS2], SRC_RF, DST_M_IN1, -1);
    expect_move("sub imm", mv[BUS_IMM], SRC_NONE, DST_NONE, -1);
    expect_move("sub rd",  mv[BUS_RD],  SRC_M_OUT, DST_RF, -1);
    expect_lat("sub", 1);
    // I-type: imm -> M.in1
    instr = ADDI(3, 1, -7); #1;
    expect_move("addi rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_ADD);
    expect_move("addi imm", mv[BUS_IMM], SRC_IMM, DST_M_IN1, -1);
    expect_move("addi rs2", mv[BUS_RS2], SRC_NONE, DST_NONE, -1);
    // LUI: x0 + immediate through the adder
    instr = LUI(3, 5); #1;
    expect_move("lui rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_ADD);
    expect_move("lui imm", mv[BUS_IMM], SRC_IMM, DST_M_IN1, -1);
    // load: imm -> M.in2
    instr = LW(3, 1, 8); #1;
    expect_move("lw rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_LW);
    expect_move("lw imm", mv[BUS_IMM], SRC_IMM, DST_M_IN2, -1);
    expect_lat("lw", 1);
    // store: rs2 -> M.in1 (data), imm -> M.in2, no result move
    instr = SW(2, 1, 8); #1;
    expect_move("sw rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_SW);
    expect_move("sw rs2", mv[BUS_RS2], SRC_RF, DST_M_IN1, -1);
    expect_move("sw imm", mv[BUS_IMM], SRC_IMM, DST_M_IN2, -1);
    expect_move("sw rd",  mv[BUS_RD],  SRC_NONE, DST_NONE, -1);
    // branch: rs1 -> C.in1, rs2 -> C.in2, imm -> C.trigger
    instr = BLT(1, 2, 16); #1;
    expect_move("blt rs1", mv[BUS_RS1], SRC_RF, DST_C_IN1, -1);
    expect_move("blt rs2", mv[BUS_RS2], SRC_RF, DST_C_IN2, -1);
    expect_move("blt imm", mv[BUS_IMM], SRC_IMM, DST_C_TRIG, C_BLT);
    expect_move("blt rd",  mv[BUS_RD],  SRC_NONE, DST_NONE, -1);
    instr = JAL(1, 16); #1;
    expect_move("jal imm", mv[BUS_IMM], SRC_IMM, DST_C_TRIG, C_JAL);
    expect_move("jal rd",  mv[BUS_RD],  SRC_C_RA, DST_RF, -1);
    instr = JALR(1, 5, 4); #1;
    expect_move("jalr rs1", mv[BUS_RS1], SRC_RF, DST_C_IN1, -1);
    expect_move("jalr imm", mv[BUS_IMM], SRC_IMM, DST_C_TRIG, C_JALR);
    expect_move("jalr rd",  mv[BUS_RD],  SRC_C_RA, DST_RF, -1);
    instr = AUIPC(1, 5); #1;
    expect_move("auipc imm", mv[BUS_IMM], SRC_IMM, DST_C_TRIG, C_AUIPC);
    expect_move("auipc rd",  mv[BUS_RD],  SRC_C_AUIPC, DST_RF, -1);
    instr = MUL(1, 2, 3);  #1; expect_lat("mul", 1);
    instr = MULH(1, 2, 3); #1; expect_lat("mulh", 4);
    instr = DIV(1, 2, 3);  #1; expect_lat("div", 35);
    instr = REM(1, 2, 3);  #1; expect_lat("rem", 35);
    expect_move("rem rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_REM);
    instr = 32'h0000_0073; #1; // ECALL: not supported, no moves
    expect_move("ecall rs1", mv[BUS_RS1], SRC_NONE, DST_NONE, -1);
    expect_move("ecall rd",  mv[BUS_RD],  SRC_NONE, DST_NONE, -1);

    // every supported operation: templates, opcodes and latency
    begin
      mop_e alu_r[8], alu_alt[8];
      alu_r   = '{M_ADD, M_SLL, M_SLT, M_SLTU, M_XOR, M_SRL, M_OR, M_AND};
      alu_alt = '{M_SUB, M_SLL, M_SLT, M_SLTU, M_XOR, M_SRA, M_OR, M_AND};
      for (int f3 = 0; f3 < 8; f3++) begin
        for (int alt = 0; alt < 2; alt++) begin
          if (alt == 1 && f3 != 0 && f3 != 5) continue;
          instr = r_type(alt ? 7'h20 : 7'h00, 5'd2, 5'd1, 3'(f3), 5'd3); #1;
          expect_move("R rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, alt ? alu_alt[f3] : alu_r[f3]);
          expect_move("R rs2", mv[BUS_RS2], SRC_RF, DST_M_IN1, -1);
          expect_move("R imm", mv[BUS_IMM], SRC_NONE, DST_NONE, -1);
          expect_move("R rd",  mv[BUS_RD],  SRC_M_OUT, DST_RF, -1);
          expect_lat("R", 1);
          // immediate form: SUB has none, shifts carry funct7 in the immediate
          if (f3 == 0 && alt == 1) continue;
          instr = i_type(7'b0010011, {(alt ? 7'h20 : 7'h00), 5'd3}, 5'd1, 3'(f3), 5'd3); #1;
          expect_move("I rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, alt ? alu_alt[f3] : alu_r[f3]);
          expect_move("I imm", mv[BUS_IMM], SRC_IMM, DST_M_IN1, -1);
          expect_move("I rs2", mv[BUS_RS2], SRC_NONE, DST_NONE, -1);
          expect_move("I rd",  mv[BUS_RD],  SRC_M_OUT, DST_RF, -1);
        end
      end
      for (int f3 = 0; f3 < 8; f3++) begin
        mop_e mexp[8];
        int   lexp[8];
        mexp = '{M_MUL, M_MULH, M_MULHSU, M_MULHU, M_DIV, M_DIVU, M_REM, M_REMU};
        lexp = '{1, 4, 4, 4, 35, 35, 35, 35};
        instr = r_type(7'h01, 5'd2, 5'd1, 3'(f3), 5'd3); #1;
        expect_move("M-ext rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, mexp[f3]);
        expect_move("M-ext rs2", mv[BUS_RS2], SRC_RF, DST_M_IN1, -1);
        expect_move("M-ext rd",  mv[BUS_RD],  SRC_M_OUT, DST_RF, -1);
        expect_lat("M-ext", lexp[f3]);
      end
      for (int f3 = 0; f3 < 8; f3++) begin
        mop_e lop[8], sop[8];
        lop = '{M_LB, M_LH, M_LW, M_ADD, M_LBU, M_LHU, M_ADD, M_ADD};
        sop = '{M_SB, M_SH, M_SW, M_ADD, M_ADD, M_ADD, M_ADD, M_ADD};
        instr = i_type(7'b0000011, 12'd8, 5'd1, 3'(f3), 5'd3); #1;
        if (f3 inside {0, 1, 2, 4, 5}) begin
          expect_move("load rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, lop[f3]);
          expect_move("load imm", mv[BUS_IMM], SRC_IMM, DST_M_IN2, -1);
          expect_move("load rd",  mv[BUS_RD],  SRC_M_OUT, DST_RF, -1);
          expect_lat("load", 1);
        end else begin
          expect_move("bad load", mv[BUS_RS1], SRC_NONE, DST_NONE, -1);
          expect_move("bad load rd", mv[BUS_RD], SRC_NONE, DST_NONE, -1);
        end
        instr = s_type(12'd8, 5'd2, 5'd1, 3'(f3)); #1;
        if (f3 < 3) begin
          expect_move("store rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, sop[f3]);
          expect_move("store rs2", mv[BUS_RS2], SRC_RF, DST_M_IN1, -1);
          expect_move("store imm", mv[BUS_IMM], SRC_IMM, DST_M_IN2, -1);
          expect_move("store rd",  mv[BUS_RD],  SRC_NONE, DST_NONE, -1);
        end else begin
          expect_move("bad store", mv[BUS_RS1], SRC_NONE, DST_NONE, -1);
        end
      end
      for (int f3 = 0; f3 < 8; f3++) begin
        cop_e bop[8];
        bop = '{C_BEQ, C_BNE, C_BEQ, C_BEQ, C_BLT, C_BGE, C_BLTU, C_BGEU};
        instr = b_type(13'd16, 5'd2, 5'd1, 3'(f3)); #1;
        if (f3 != 2 && f3 != 3) begin
          expect_move("branch rs1", mv[BUS_RS1], SRC_RF, DST_C_IN1, -1);
          expect_move("branch rs2", mv[BUS_RS2], SRC_RF, DST_C_IN2, -1);
          expect_move("branch imm", mv[BUS_IMM], SRC_IMM, DST_C_TRIG, bop[f3]);
          expect_move("branch rd",  mv[BUS_RD],  SRC_NONE, DST_NONE, -1);
        end else begin
          expect_move("bad branch", mv[BUS_IMM], SRC_NONE, DST_NONE, -1);
        end
      end
    end

    // forwarding from each output port
    for (int k = 0; k < 3; k++) begin
      src_e port;
      port = (k == 0) ? SRC_M_OUT : (k == 1) ? SRC_C_RA : SRC_C_AUIPC;
      instr = (k == 0) ? ADD(4, 1, 2) : (k == 1) ? JAL(4, 8) : AUIPC(4, 1);
      upd = 1; iss = 1;
      @(negedge clk);
      upd = 0; iss = 0;
      instr = ADD(5, 4, 4); h1 = 1; h2 = 0; #1;
      expect_move("fwd rs1", mv[BUS_RS1], port, DST_M_TRIG, M_ADD);
      expect_move("fwd keeps rs2", mv[BUS_RS2], SRC_RF, DST_M_IN1, -1);
      checks++; if (!f1 || f2) failures++;
      h1 = 0; h2 = 1; #1;
      expect_move("fwd rs2", mv[BUS_RS2], port, DST_M_IN1, -1);
      expect_move("fwd keeps rs1", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_ADD);
      instr = BEQ(4, 4, 8); h1 = 1; h2 = 1; #1;
      expect_move("fwd branch rs1", mv[BUS_RS1], port, DST_C_IN1, -1);
      expect_move("fwd branch rs2", mv[BUS_RS2], port, DST_C_IN2, -1);
      h1 = 0; h2 = 0;
    end
    // after a bubble update there is nothing to forward from
    upd = 1; iss = 0;
    @(negedge clk);
    upd = 0;
    instr = ADD(5, 4, 4); h1 = 1; #1;
    expect_move("no port after bubble", mv[BUS_RS1], SRC_RF, DST_M_TRIG, M_ADD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
