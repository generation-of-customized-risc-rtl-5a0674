// tb_rv_microcode: the complete front end (format decode, immediates, hazard
// detection, lookup tables, controller, sequencer) on a short program that
// exercises back-to-back dependences, a multi-cycle operation, a JAL and a
// branch. Two instances are checked cycle by cycle, with and without bypass:
// the issue cycles, the source socket on the rs1/rs2 buses (register file or
// a forwarded unit output), and the delayed result move on the rd bus.
// The expected tables follow from the operation latencies (MULH 4, branch
// 2 issue slots) and a one-cycle hazard stall when there is no bypass.
//
// The expected tables follow the specified latencies; the program is this
// testbench's own.
module tb_rv_microcode;
  import rv_pkg::*;
  import tb_rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NPROG = 6;
  logic [31:0] prog[NPROG];

  typedef struct packed {
    logic issue;
    src_e s1, s2;   // sources on rs1/rs2 in an issue cycle
    src_e rd;       // result move source on the rd bus (SRC_NONE: no move)
    logic [4:0] rd_idx;
  } exp_t;

  exp_t EXP_B[10];
  exp_t EXP_N[13];
  initial EXP_B = '{
    '{1, SRC_RF,    SRC_NONE,  SRC_NONE,  0},  // addi x1
    '{1, SRC_M_OUT, SRC_M_OUT, SRC_M_OUT, 1},  // add x2,x1,x1: both forwarded
    '{1, SRC_M_OUT, SRC_M_OUT, SRC_M_OUT, 2},  // mulh x3,x2,x2
    '{0, SRC_NONE,  SRC_NONE,  SRC_NONE,  0},
    '{0, SRC_NONE,  SRC_NONE,  SRC_NONE,  0},
    '{0, SRC_NONE,  SRC_NONE,  SRC_NONE,  0},
    '{1, SRC_NONE,  SRC_NONE,  SRC_M_OUT, 3},  // jal x4
    '{1, SRC_RF,    SRC_C_RA,  SRC_C_RA,  4},  // beq x3,x4: rs2 forwarded
    '{0, SRC_NONE,  SRC_NONE,  SRC_NONE,  0},
    '{1, SRC_RF,    SRC_RF,    SRC_NONE,  0}}; // add x5,x0,x0
  initial EXP_N = '{
    '{1, SRC_RF,   SRC_NONE, SRC_NONE,  0},
    '{0, SRC_NONE, SRC_NONE, SRC_M_OUT, 1},   // hazard stall, addi result written
    '{1, SRC_RF,   SRC_RF,   SRC_NONE,  0},
    '{0, SRC_NONE, SRC_NONE, SRC_M_OUT, 2},
    '{1, SRC_RF,   SRC_RF,   SRC_NONE,  0},   // mulh
    '{0, SRC_NONE, SRC_NONE, SRC_NONE,  0},
    '{0, SRC_NONE, SRC_NONE, SRC_NONE,  0},
    '{0, SRC_NONE, SRC_NONE, SRC_NONE,  0},
    '{1, SRC_NONE, SRC_NONE, SRC_M_OUT, 3},   // jal
    '{0, SRC_NONE, SRC_NONE, SRC_C_RA,  4},
    '{1, SRC_RF,   SRC_RF,   SRC_NONE,  0},   // beq
    '{0, SRC_NONE, SRC_NONE, SRC_NONE,  0},
    '{1, SRC_RF,   SRC_RF,   SRC_NONE,  0}};

  for (genvar g = 0; g < 2; g++) begin : g_inst
    int          k = 0;
    logic [31:0] instr, imm, pc_o, tpc, tinstr;
    tta_instr_t  tta;
    logic        stall, jump, tvalid, sb, sf, sh;
    rv_microcode #(.BYPASS(g == 0)) dut (
      .clk_i(clk), .rst_ni(rst_n), .instruction_i(instr), .pc_i(32'(k * 4)), .valid_i(rst_n),
      .instruction_o(tta), .immediate_o(imm), .pc_o(pc_o), .stall_ifetch_o(stall), .jump_o(jump),
      .trace_valid_o(tvalid), .trace_pc_o(tpc), .trace_instr_o(tinstr), .stat_bubble_o(sb),
      .stat_fwd_o(sf), .stat_hazard_stall_o(sh));
    assign instr = (k < NPROG) ? prog[k] : 32'h13;

    task automatic check_cycle(int c);
      exp_t e;
      e = (g == 0) ? ((c < 10) ? EXP_B[c] : '{1, SRC_NONE, SRC_NONE, SRC_NONE, 0})
                   : ((c < 13) ? EXP_N[c] : '{1, SRC_NONE, SRC_NONE, SRC_NONE, 0});
      if (!((g == 0) ? (c < 10) : (c < 13))) return;
      checks++;
      if (tvalid != e.issue || stall != !e.issue || sb != !e.issue) begin
        failures++; $display("FAIL bypass=%0d cycle %0d: issue %0b expected %0b", g == 0, c, tvalid, e.issue);
      end
      if (e.issue) begin
        checks++;
        if (tta[BUS_RS1].src != e.s1 || (e.s2 != SRC_NONE && tta[BUS_RS2].src != e.s2)) begin
          failures++;
          $display("FAIL bypass=%0d cycle %0d: sources %s/%s expected %s/%s", g == 0, c,
                   tta[BUS_RS1].src.name(), tta[BUS_RS2].src.name(), e.s1.name(), e.s2.name());
        end
        checks++;
        if (jump != (instr[6:0] == 7'b1101111) || tpc != 32'(k * 4)) begin
          failures++; $display("FAIL bypass=%0d cycle %0d: jump/trace", g == 0, c);
        end
      end else begin
        checks++;
        if (tta[BUS_RS1] != MOVE_NOP || tta[BUS_RS2] != MOVE_NOP || tta[BUS_IMM] != MOVE_NOP) begin
          failures++; $display("FAIL bypass=%0d cycle %0d: operand move in a bubble", g == 0, c);
        end
      end
      checks++;
      if (tta[BUS_RD].src != e.rd || (e.rd != SRC_NONE &&
          (tta[BUS_RD].dst != DST_RF || tta[BUS_RD].idx != 5'(e.rd_idx)))) begin
        failures++;
        $display("FAIL bypass=%0d cycle %0d: rd move %s x%0d expected %s x%0d", g == 0, c,
                 tta[BUS_RD].src.name(), tta[BUS_RD].idx, e.rd.name(), e.rd_idx);
      end
      if (c == 0) begin
        checks++;
        if (imm != 32'd5) begin failures++; $display("FAIL immediate %0d", imm); end
      end
    endtask

    initial begin
      @(posedge rst_n);
      for (int c = 0; c < 16; c++) begin
        logic issued;
        @(negedge clk);
        #1;
        check_cycle(c);
        issued = tvalid;
        @(posedge clk);
        if (issued) k <= k + 1;
      end
    end
  end

  initial begin
    prog = '{ADDI(1, 0, 5), ADD(2, 1, 1), MULH(3, 2, 2), JAL(4, 8), BEQ(3, 4, 8), ADD(5, 0, 0)};
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
