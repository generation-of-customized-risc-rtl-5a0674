// tb_rv_imm_gen: encodes random immediates into I, S, B, U and J words with
// the reference encoders and checks that the unit recovers them.
//
// The reference is the RISC-V immediate encoding.
module tb_rv_imm_gen;
  import rv_pkg::*;
  import tb_rv_asm_pkg::*;
  logic [31:0] instr, imm;
  fmt_e        fmt;
  int checks = 0, failures = 0;

  rv_imm_gen dut (.instr_i(instr), .fmt_i(fmt), .imm_o(imm));

  task automatic check(logic [31:0] w, fmt_e f, logic [31:0] exp);
    instr = w; fmt = f;
    #1;
    checks++;
    if (imm != exp) begin
      failures++;
      $display("FAIL %s word %h: %h expected %h", f.name(), w, imm, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [31:0] r;
      r = $urandom;
      check(i_type(7'h13, r[11:0], 5'($urandom), 3'($urandom), 5'($urandom)), FMT_I,
            {{20{r[11]}}, r[11:0]});
      check(s_type(r[11:0], 5'($urandom), 5'($urandom), 3'($urandom)), FMT_S,
            {{20{r[11]}}, r[11:0]});
      check(b_type({r[12:1], 1'b0}, 5'($urandom), 5'($urandom), 3'($urandom)), FMT_B,
            {{19{r[12]}}, r[12:1], 1'b0});
      check(u_type(7'h37, r[19:0], 5'($urandom)), FMT_U, {r[19:0], 12'd0});
      check(j_type({r[20:1], 1'b0}, 5'($urandom)), FMT_J, {{11{r[20]}}, r[20:1], 1'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
