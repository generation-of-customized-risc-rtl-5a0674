// tb_rv_fu_c: control unit C. Random branches, JAL, JALR and AUIPC are
// compared with the RISC-V definitions: redirect and target in the trigger
// cycle, return address and AUIPC result on their ports one cycle later.
//
// Reference results follow the RISC-V specification; the one-cycle result
// latency is the one specified for the generated core.
module tb_rv_fu_c;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        trig, redirect, taken;
  cop_e        opc;
  logic [31:0] in1, in2, tdata, pc, ra, au, target;

  rv_fu_c dut (.clk_i(clk), .rst_ni(rst_n), .trig_i(trig), .opc_i(opc), .in1_i(in1), .in2_i(in2),
               .trig_data_i(tdata), .pc_i(pc), .ra_o(ra), .auipc_o(au), .redirect_o(redirect),
               .target_o(target), .taken_o(taken));

  int n_taken = 0, n_not = 0;

  initial begin
    trig = 0; opc = C_BEQ; in1 = 0; in2 = 0; tdata = 0; pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bit t, exp_redirect;
      logic [31:0] exp_target;
      @(negedge clk);
      opc   = cop_e'($urandom_range(0, 8));
      in1   = $urandom;
      in2   = (i % 3 == 0) ? in1 : $urandom;
      if (i % 5 == 0) in2 = {~in1[31], in1[30:0]};
      tdata = {{20{1'b1}}, 12'($urandom)} ^ ((i % 2) ? 32'hFFFF_F000 : 0);
      pc    = {$urandom, 2'b00};
      trig  = 1;
      case (opc)
        C_BEQ:  t = in1 == in2;
        C_BNE:  t = in1 != in2;
        C_BLT:  t = $signed(in1) < $signed(in2);
        C_BGE:  t = $signed(in1) >= $signed(in2);
        C_BLTU: t = in1 < in2;
        C_BGEU: t = in1 >= in2;
        default: t = 0;
      endcase
      exp_redirect = opc inside {C_BEQ, C_BNE, C_BLT, C_BGE, C_BLTU, C_BGEU, C_JALR};
      exp_target   = (opc == C_JALR) ? ((in1 + tdata) & ~32'd1) : t ? pc + tdata : pc + 4;
      #1;
      checks++;
      if (redirect != exp_redirect || (exp_redirect && target != exp_target)) begin
        failures++;
        $display("FAIL %s redirect=%b target=%h expected %b %h", opc.name(), redirect, target,
                 exp_redirect, exp_target);
      end
      if (exp_redirect && opc != C_JALR) begin
        if (t) n_taken++; else n_not++;
      end
      @(negedge clk);
      trig = 0;
      if (opc inside {C_JAL, C_JALR}) begin
        checks++;
        if (ra != pc + 4) begin failures++; $display("FAIL %s ra=%h", opc.name(), ra); end
      end
      if (opc == C_AUIPC) begin
        checks++;
        if (au != pc + tdata) begin failures++; $display("FAIL AUIPC %h", au); end
      end
    end
    checks++;
    if (n_taken == 0 || n_not == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
