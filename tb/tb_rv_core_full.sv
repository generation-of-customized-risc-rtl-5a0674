// tb_rv_core_full: the core with every parameter at its default (three
// stages, bypass network, 32 registers, M extension, MULH 4 and DIV 35
// cycles) runs a longer program to its halt loop: the directed part of the
// test environment, the sort-and-checksum workload kernel, then 3000 random
// RV32IM instructions. The
// environment checks the issue trace, the cycle count of every instruction,
// every register write and the final data memory against the reference
// instruction-set model.
//
// The default parameters are those of the original main configuration; the
// program is generated by the test environment.
module tb_rv_core_full;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_req, dmem_we;
  logic [3:0]  dmem_be;
  logic        trace_valid, rf_we;
  logic [31:0] trace_pc, trace_instr, rf_wd;
  logic [4:0]  rf_wa;
  logic        s_bub, s_fwd, s_hz, s_redir, s_taken;
  bit          done;
  int          checks, failures;

  rv_core u_dut (
    .clk_i(clk), .rst_ni(rst_n),
    .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
    .dmem_req_o(dmem_req), .dmem_we_o(dmem_we), .dmem_be_o(dmem_be),
    .dmem_addr_o(dmem_addr), .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(dmem_rdata),
    .trace_valid_o(trace_valid), .trace_pc_o(trace_pc), .trace_instr_o(trace_instr),
    .rf_we_o(rf_we), .rf_wa_o(rf_wa), .rf_wd_o(rf_wd),
    .stat_bubble_o(s_bub), .stat_fwd_o(s_fwd), .stat_hazard_stall_o(s_hz),
    .stat_redirect_o(s_redir), .stat_taken_o(s_taken)
  );

  tb_core_env #(.STAGES(3), .BYPASS(1'b1), .KERNEL(1'b1), .NRAND(3000), .SEED(7)) u_env (
    .clk, .rst_n, .imem_addr, .imem_rdata, .dmem_req, .dmem_we, .dmem_be, .dmem_addr,
    .dmem_wdata, .dmem_rdata, .trace_valid, .trace_pc, .trace_instr, .rf_we, .rf_wa, .rf_wd,
    .stat_fwd(s_fwd), .stat_hazard_stall(s_hz), .stat_redirect(s_redir),
    .done(done), .checks(checks), .failures(failures)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
