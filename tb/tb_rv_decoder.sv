// tb_rv_decoder: random legal TTA instructions (any mix of moves the bypass
// interconnect supports) are decoded; one cycle later the control word must
// hold the register read/write indexes, the source of every bus, the M.in1
// selection, and the trigger flags with their opcodes. The expected fields
// are derived slot by slot from the generated moves.
//
// Expected fields follow the move-slot encoding of this design.
module tb_rv_decoder;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tta_instr_t  instr;
  logic [31:0] imm, pc;
  ctrl_t       ctrl;

  rv_decoder #(.BYPASS(1'b1)) dut (.clk_i(clk), .rst_ni(rst_n), .instr_i(instr), .imm_i(imm),
                                   .pc_i(pc), .ctrl_o(ctrl));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [4:0] i1, i2, iw, mo, co;
    bit         m_imm, use_m, use_c, wr;
    instr = TTA_NOP; imm = 0; pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk("reset we", ctrl.rf_we, 0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      instr = TTA_NOP;
      i1 = 5'($urandom); i2 = 5'($urandom); iw = 5'($urandom);
      mo = 5'($urandom_range(0, 25)); co = 5'($urandom_range(0, 8));
      use_m = ($urandom_range(0, 1) == 1); use_c = !use_m && ($urandom_range(0, 1) == 1);
      m_imm = ($urandom_range(0, 1) == 1);
      wr = ($urandom_range(0, 1) == 1);
      imm = $urandom; pc = $urandom;
      if (use_m) begin
        instr[BUS_RS1] = '{src: SRC_RF, dst: DST_M_TRIG, opc: mo, idx: i1};
        if (m_imm) instr[BUS_IMM] = '{src: SRC_IMM, dst: DST_M_IN1, opc: 0, idx: 0};
        else       instr[BUS_RS2] = '{src: SRC_RF, dst: DST_M_IN1, opc: 0, idx: i2};
      end else if (use_c) begin
        instr[BUS_RS1] = '{src: SRC_C_AUIPC, dst: DST_C_IN1, opc: 0, idx: 0};
        instr[BUS_RS2] = '{src: SRC_RF, dst: DST_C_IN2, opc: 0, idx: i2};
        instr[BUS_IMM] = '{src: SRC_IMM, dst: DST_C_TRIG, opc: co, idx: 0};
      end
      if (wr) instr[BUS_RD] = '{src: src_e'($urandom_range(2, 4)), dst: DST_RF, opc: 0, idx: iw};
      @(negedge clk);
      chk("we", ctrl.rf_we, wr);
      if (wr) chk("wa", ctrl.rf_wa, iw);
      for (int b = 0; b < NBUS; b++) chk("bus src", ctrl.bus_src[b], instr[b].src);
      chk("m trig", ctrl.m_trig, use_m);
      chk("c trig", ctrl.c_trig, use_c);
      if (use_m) begin
        chk("m opc", ctrl.m_opc, mo);
        chk("ra1", ctrl.rf_ra1, i1);
        chk("in1 sel", ctrl.m_in1_imm, m_imm);
        if (!m_imm) chk("ra2", ctrl.rf_ra2, i2);
      end
      if (use_c) begin
        chk("c opc", ctrl.c_opc, co);
        chk("ra2", ctrl.rf_ra2, i2);
      end
      chk("imm", ctrl.imm, imm);
      chk("pc", ctrl.pc, pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
