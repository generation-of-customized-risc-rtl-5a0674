// rv_hazard_detect: data hazard detection of the microcode front end.
//
// Keeps the format and result register index of the previous operation,
// that is, the operation whose result move will be performed in the same
// cycle as the current instruction's operand moves. The current instruction
// has an rs1 (rs2) hazard when its format reads rs1 (rs2), the previous
// format writes rd, rd is not x0, and the indexes match.
//
// Interface: update_i marks a cycle in which the pending result move is
// released; the registers then take the current instruction when issue_i is
// set and are cleared otherwise. While a multi-cycle operation is waiting
// (update_i low) they hold. The outputs are combinational in the same cycle.
//
// Keeping the previous format and result index in registers follows the
// original design; the update rule around bubbles and multi-cycle waits is
// this design's own.
module rv_hazard_detect
  import rv_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  fmt_e       fmt_i,
  input  logic [4:0] rs1_i,
  input  logic [4:0] rs2_i,
  input  logic [4:0] rd_i,
  input  logic       update_i,
  input  logic       issue_i,
  output logic       rs1_hazard_o,
  output logic       rs2_hazard_o
);
  fmt_e       prev_fmt_q;
  logic [4:0] prev_rd_q;

  function automatic logic reads_rs1(fmt_e f);
    return f inside {FMT_R, FMT_I, FMT_S, FMT_B};
  endfunction
  function automatic logic reads_rs2(fmt_e f);
    return f inside {FMT_R, FMT_S, FMT_B};
  endfunction
  function automatic logic writes_rd(fmt_e f);
    return f inside {FMT_R, FMT_I, FMT_U, FMT_J};
  endfunction

  logic prev_writes;
  assign prev_writes  = writes_rd(prev_fmt_q) && (prev_rd_q != 5'd0);
  assign rs1_hazard_o = prev_writes && reads_rs1(fmt_i) && (rs1_i == prev_rd_q);
  assign rs2_hazard_o = prev_writes && reads_rs2(fmt_i) && (rs2_i == prev_rd_q);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      prev_fmt_q <= FMT_NONE;
      prev_rd_q  <= '0;
    end else if (update_i) begin
      prev_fmt_q <= issue_i ? fmt_i : FMT_NONE;
      prev_rd_q  <= issue_i ? rd_i  : 5'd0;
    end
  end
endmodule
