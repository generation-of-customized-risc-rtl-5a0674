// tb_rv_hazard_detect: random sequences of formats and register indexes with
// random issue/update; a behavioural model of the previous-result register
// gives the expected rs1/rs2 hazards.
//
// The hazard rule checked is the one the design specifies: a read of the
// previous operation's destination.
module tb_rv_hazard_detect;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fmt_e       fmt;
  logic [4:0] rs1, rs2, rd;
  logic       upd, iss, h1, h2;
  int checks = 0, failures = 0;

  rv_hazard_detect dut (.clk_i(clk), .rst_ni(rst_n), .fmt_i(fmt), .rs1_i(rs1), .rs2_i(rs2),
                        .rd_i(rd), .update_i(upd), .issue_i(iss),
                        .rs1_hazard_o(h1), .rs2_hazard_o(h2));

  logic [4:0] m_rd;   // model: destination of the previous operation, 0 if none
  int n1 = 0, n2 = 0;

  initial begin
    fmt = FMT_NONE; rs1 = 0; rs2 = 0; rd = 0; upd = 0; iss = 0;
    m_rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      fmt = fmt_e'($urandom_range(0, 6));
      rs1 = 5'($urandom_range(0, 3));
      rs2 = 5'($urandom_range(0, 3));
      rd  = 5'($urandom_range(0, 3));
      upd = ($urandom_range(0, 3) != 0);
      iss = ($urandom_range(0, 1) == 1);
      #1;
      checks += 2;
      if (h1 !== (m_rd != 0 && fmt inside {FMT_R, FMT_I, FMT_S, FMT_B} && rs1 == m_rd)) begin
        failures++; $display("FAIL rs1 hazard fmt=%s rs1=%0d prev=%0d", fmt.name(), rs1, m_rd);
      end
      if (h2 !== (m_rd != 0 && fmt inside {FMT_R, FMT_S, FMT_B} && rs2 == m_rd)) begin
        failures++; $display("FAIL rs2 hazard fmt=%s rs2=%0d prev=%0d", fmt.name(), rs2, m_rd);
      end
      n1 += h1; n2 += h2;
      @(posedge clk);
      if (upd) m_rd = (iss && fmt inside {FMT_R, FMT_I, FMT_U, FMT_J}) ? rd : 5'd0;
    end
    checks++;
    if (n1 == 0 || n2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
