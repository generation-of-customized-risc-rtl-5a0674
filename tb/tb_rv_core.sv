// tb_rv_core: end-to-end test of five core configurations side by side. The
// first three are the evaluated ones: three stages with bypass network, three
// stages without, four stages with bypass. The other two exercise the
// remaining customisation points: an RV32E-sized register file (16 entries)
// without the M extension, and four stages without bypass using latencies
// other than the defaults (MUL 2, MULH 6, DIV 40). Each runs a directed +
// workload kernel (sort and checksum) + random program against the
// reference model (see tb_core_env), which also
// checks the cycle count of every instruction.
//
// The configurations come from the customisation points of the original
// design; the programs are generated by this testbench.
module tb_rv_core;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  bit done [NCFG];
  int chk  [NCFG];
  int fail [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int STAGES = (g == 2 || g == 4) ? 4 : 3;
    localparam bit BYP    = (g != 1 && g != 4);
    localparam int NREG   = (g == 3) ? 16 : 32;
    localparam bit HAS_M  = (g != 3);
    localparam int BASE   = (g == 3) ? 14 : 20;
    localparam int L_MUL  = (g == 4) ? 2 : 1;
    localparam int L_MULH = (g == 4) ? 6 : 4;
    localparam int L_DIV  = (g == 4) ? 40 : 35;
    logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
    logic        dmem_req, dmem_we;
    logic [3:0]  dmem_be;
    logic        trace_valid, rf_we;
    logic [31:0] trace_pc, trace_instr, rf_wd;
    logic [4:0]  rf_wa;
    logic        s_bub, s_fwd, s_hz, s_redir, s_taken;

    rv_core #(.PIPELINE_STAGES(STAGES), .BYPASS(BYP), .NREGS(NREG), .ENABLE_M(HAS_M),
              .LAT_MUL(L_MUL), .LAT_MULH(L_MULH), .LAT_DIV(L_DIV)) u_dut (
      .clk_i(clk), .rst_ni(rst_n),
      .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
      .dmem_req_o(dmem_req), .dmem_we_o(dmem_we), .dmem_be_o(dmem_be),
      .dmem_addr_o(dmem_addr), .dmem_wdata_o(dmem_wdata), .dmem_rdata_i(dmem_rdata),
      .trace_valid_o(trace_valid), .trace_pc_o(trace_pc), .trace_instr_o(trace_instr),
      .rf_we_o(rf_we), .rf_wa_o(rf_wa), .rf_wd_o(rf_wd),
      .stat_bubble_o(s_bub), .stat_fwd_o(s_fwd), .stat_hazard_stall_o(s_hz),
      .stat_redirect_o(s_redir), .stat_taken_o(s_taken)
    );

    tb_core_env #(.STAGES(STAGES), .BYPASS(BYP), .ENABLE_M(HAS_M), .BASE(BASE), .LAT_MUL(L_MUL),
                  .LAT_MULH(L_MULH), .LAT_DIV(L_DIV), .KERNEL(1'b1), .NRAND(400), .SEED(11)) u_env (
      .clk, .rst_n, .imem_addr, .imem_rdata, .dmem_req, .dmem_we, .dmem_be, .dmem_addr,
      .dmem_wdata, .dmem_rdata, .trace_valid, .trace_pc, .trace_instr, .rf_we, .rf_wa, .rf_wd,
      .stat_fwd(s_fwd), .stat_hazard_stall(s_hz), .stat_redirect(s_redir),
      .done(done[g]), .checks(chk[g]), .failures(fail[g])
    );
  end

  int checks, failures;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0; failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks += chk[g];
      failures += fail[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks += chk[g];
      failures += fail[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
