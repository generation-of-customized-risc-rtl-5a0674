// tb_rv_uop_seq: merging register indexes into the move templates and
// delaying the result move. Random templates, indexes and issue/release
// patterns are applied. Operand moves must appear (with the instruction's
// rs1/rs2 indexes, rs1 forced to x0 for U-format) only in issue cycles; the
// result move of an issued instruction, with its rd index, must appear on
// the rd bus exactly once, in the next cycle in which release is high.
//
// The expected behaviour is the delayed result move of the design.
module tb_rv_uop_seq;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tta_instr_t moves, out;
  fmt_e       fmt;
  logic [4:0] rs1, rs2, rd;
  logic       issue, rel;

  rv_uop_seq dut (.clk_i(clk), .rst_ni(rst_n), .moves_i(moves), .fmt_i(fmt), .rs1_i(rs1),
                  .rs2_i(rs2), .rd_i(rd), .issue_i(issue), .release_i(rel), .instr_o(out));

  function automatic move_t rnd_move(int bus);
    move_t m;
    m     = MOVE_NOP;
    m.opc = 5'($urandom);
    unique case (bus)
      BUS_RS1: begin m.src = src_e'($urandom_range(0, 4)); m.dst = (($urandom_range(0, 1) == 1)) ? DST_M_TRIG : DST_C_IN1; end
      BUS_RS2: begin m.src = src_e'($urandom_range(0, 4)); m.dst = (($urandom_range(0, 1) == 1)) ? DST_M_IN1 : DST_C_IN2; end
      BUS_IMM: begin m.src = (($urandom_range(0, 1) == 1)) ? SRC_IMM : SRC_NONE; m.dst = DST_C_TRIG; end
      default: begin m.src = (($urandom_range(0, 1) == 1)) ? SRC_M_OUT : SRC_NONE; m.dst = (m.src == SRC_NONE) ? DST_NONE : DST_RF; m.opc = 0; end
    endcase
    return m;
  endfunction

  move_t pending, exp_m;
  bit    have_pending;

  initial begin
    moves = TTA_NOP; fmt = FMT_R; rs1 = 0; rs2 = 0; rd = 0; issue = 0; rel = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    have_pending = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int b = 0; b < NBUS; b++) moves[b] = rnd_move(b);
      fmt = fmt_e'($urandom_range(1, 6));
      rs1 = 5'($urandom); rs2 = 5'($urandom); rd = 5'($urandom);
      rel = ($urandom_range(0, 3) != 0);
      issue = rel && ($urandom_range(0, 4) != 0); // the controller never issues while waiting
      #1;
      for (int b = 0; b < NBUS; b++) begin
        if (b == BUS_RD) continue;
        exp_m = issue ? moves[b] : MOVE_NOP;
        if (issue && moves[b].src == SRC_RF)
          exp_m.idx = (b == BUS_RS1) ? ((fmt == FMT_U) ? 5'd0 : rs1) : (b == BUS_RS2) ? rs2 : exp_m.idx;
        checks++;
        if (out[b] != exp_m) begin failures++; $display("FAIL bus %0d: %p vs %p", b, out[b], exp_m); end
      end
      exp_m = (rel && have_pending) ? pending : MOVE_NOP;
      checks++;
      if (out[BUS_RD] != exp_m) begin failures++; $display("FAIL rd bus: %p vs %p", out[BUS_RD], exp_m); end
      if (rel) begin
        have_pending = issue && moves[BUS_RD].dst == DST_RF;
        pending      = moves[BUS_RD];
        pending.idx  = rd;
      end
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
