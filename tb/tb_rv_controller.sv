// tb_rv_controller: issue, bubble and stall sequences of the controller, with
// and without bypass connectivity: one-cycle operations issue every cycle, an
// operation of latency L is followed by L-1 bubbles with the fetch held, a
// branch/JALR by exactly one, JAL issues with jump_o, and without bypass a
// hazard holds the instruction for one cycle.
//
// The expected counts follow the specified latencies and the one-bubble
// branch rule; the stimulus is this testbench's own.
module tb_rv_controller;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       valid, hazard;
  rvop_e      op;
  logic [5:0] lat;
  logic       issue[2], bubble[2], rel[2], stall[2], jump[2], hst[2];

  rv_controller #(.BYPASS(1'b1)) dut_b (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .op_i(op),
    .lat_i(lat), .hazard_i(hazard), .issue_o(issue[0]), .bubble_o(bubble[0]), .release_o(rel[0]),
    .stall_ifetch_o(stall[0]), .jump_o(jump[0]), .hazard_stall_o(hst[0]));
  rv_controller #(.BYPASS(1'b0)) dut_n (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .op_i(op),
    .lat_i(lat), .hazard_i(hazard), .issue_o(issue[1]), .bubble_o(bubble[1]), .release_o(rel[1]),
    .stall_ifetch_o(stall[1]), .jump_o(jump[1]), .hazard_stall_o(hst[1]));

  // Presents one instruction until it issues on instance k; returns cycles taken.
  task automatic present(int k, rvop_e o, int l, bit hz, output int cyc);
    cyc = 0;
    op = o; lat = 6'(l); hazard = hz; valid = 1;
    forever begin
      #1;
      cyc++;
      if (bubble[k] != !issue[k]) begin checks++; failures++; end
      if (issue[k]) begin
        checks++;
        if (jump[k] != (o == RV_JAL)) begin failures++; $display("FAIL jump for %s", o.name()); end
        if (stall[k]) begin checks++; failures++; $display("FAIL stall while issuing"); end
        @(negedge clk);
        hazard = 0;
        break;
      end
      checks++;
      if (!stall[k]) begin failures++; $display("FAIL bubble without fetch stall"); end
      @(negedge clk);
      hazard = 0;
    end
  endtask

  task automatic seq(int k, rvop_e o, int l, bit hz, int exp_cycles_to_issue_next);
    int c;
    present(k, o, l, hz, c);
    present(k, RV_ADD, 1, 0, c);
    checks++;
    if (c != exp_cycles_to_issue_next) begin
      failures++;
      $display("FAIL inst %0d after %s: next issued after %0d cycles, expected %0d", k, o.name(), c,
               exp_cycles_to_issue_next);
    end
  endtask

  initial begin
    valid = 0; hazard = 0; op = RV_ADD; lat = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      seq(k, RV_ADD, 1, 0, 1);
      seq(k, RV_MULH, 4, 0, 4);
      seq(k, RV_DIV, 35, 0, 35);
      seq(k, RV_BEQ, 1, 0, 2);
      seq(k, RV_JALR, 1, 0, 2);
      seq(k, RV_JAL, 1, 0, 1);
    end
    // hazard: held one cycle only without bypass
    begin
      int c;
      present(0, RV_ADD, 1, 1, c); checks++; if (c != 1) failures++;
      present(1, RV_ADD, 1, 1, c); checks++; if (c != 2) begin failures++; $display("FAIL no-bypass hazard %0d", c); end
    end
    // invalid words are bubbles without a fetch stall
    valid = 0; #1;
    checks++;
    if (issue[0] || stall[0] || !rel[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
