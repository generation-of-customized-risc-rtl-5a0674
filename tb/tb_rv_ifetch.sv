// tb_rv_ifetch: the fetch unit with and without the extra instruction
// register. A synchronous one-cycle memory returns a word derived from its
// address. Random stalls, JAL-style jumps (taken by the consumer in the cycle
// it accepts the jump instruction) and branch-style redirects (arriving in a
// stalled cycle, as the core issues them from the execute stage) are applied.
// Every accepted word must be the word at the expected address in program
// order, and after a jump or redirect the first word must arrive after the
// fixed latency: 2 cycles without and 3 with the instruction register.
//
// The redirect latencies follow from the three- and four-stage branch and
// jump costs of the design; the memory model is this testbench's own.
module tb_rv_ifetch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit running = 0;

  function automatic logic [31:0] word_at(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5a5a_0000;
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_inst
    logic [31:0] addr, rdata, instr, pc, joff, rtgt;
    logic        valid, stall, jump, redir;
    rv_ifetch #(.INSTR_REG(g == 1), .BOOT_ADDR(32'h100)) dut (
      .clk_i(clk), .rst_ni(rst_n), .addr_o(addr), .rdata_i(rdata), .instr_o(instr), .pc_o(pc),
      .valid_o(valid), .stall_i(stall), .jump_i(jump), .jump_offset_i(joff), .redirect_i(redir),
      .redirect_target_i(rtgt));

    always_ff @(posedge clk) rdata <= word_at(addr);

    logic [31:0] exp_pc = 32'h100;
    int          since_flush = -1; // cycles since the last jump/redirect, -1: none pending
    int          lat = (g == 1) ? 3 : 2;
    int          cyc = 0;

    always @(negedge clk) begin
      if (running) begin
        cyc++;
        stall = ($urandom_range(0, 3) == 0);
        redir = 1'b0; jump = 1'b0;
        joff  = {$urandom_range(0, 255), 2'b00} - 32'd512;
        rtgt  = {$urandom_range(64, 4000), 2'b00};
        // after a flush the stall is released so the latency is measurable
        if (since_flush >= 0) stall = 1'b0;
        if (valid && !stall) begin
          checks++;
          if (pc != exp_pc || instr != word_at(pc)) begin
            failures++;
            $display("FAIL ir=%0d: got pc %h word %h, expected pc %h", g, pc, instr, exp_pc);
          end
          if (since_flush >= 0) begin
            checks++;
            if (since_flush != lat) begin
              failures++; $display("FAIL ir=%0d: first word %0d cycles after flush", g, since_flush);
            end
          end
          since_flush = -1;
          exp_pc = pc + 4;
          if ($urandom_range(0, 7) == 0) begin
            jump = 1'b1; exp_pc = pc + joff; since_flush = 0;
          end
        end else if (stall && $urandom_range(0, 9) == 0) begin
          redir = 1'b1; exp_pc = rtgt; since_flush = 0;
        end
        if (since_flush >= 0) since_flush++;
        if (!valid && since_flush < 0 && !stall && cyc > lat) begin
          checks++; failures++; $display("FAIL ir=%0d: bubble in a straight-line stream", g);
        end
      end else begin
        stall = 0; jump = 0; redir = 0; joff = 0; rtgt = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    running = 1;
    repeat (20000) @(posedge clk);
    running = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
