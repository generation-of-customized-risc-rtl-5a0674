// tb_rv_interconnect: random control words and data. Each function unit
// input must carry the value of the bus it is wired to (M.in1 from rs2 or
// imm, M.in2 and C.trigger from imm, M.trigger and C.in1 from rs1, C.in2 from
// rs2, register write data from rd), where each bus carries the source its
// control field selects. The instance without bypass must return zero on
// rs1/rs2 for unit-output sources, since those connections do not exist.
//
// The expected connectivity is that of the original bus drawings.
module tb_rv_interconnect;
  import rv_pkg::*;
  int checks = 0, failures = 0;

  ctrl_t       ctrl;
  logic [31:0] rd1, rd2, mo, ra, au;
  logic [31:0] o[2][7];

  for (genvar g = 0; g < 2; g++) begin : g_inst
    rv_interconnect #(.BYPASS(g == 0)) dut (
      .ctrl_i(ctrl), .rf_rd1_i(rd1), .rf_rd2_i(rd2), .m_out_i(mo), .c_ra_i(ra), .c_auipc_i(au),
      .m_in1_o(o[g][0]), .m_in2_o(o[g][1]), .m_trig_o(o[g][2]), .c_in1_o(o[g][3]),
      .c_in2_o(o[g][4]), .c_trig_o(o[g][5]), .rf_wd_o(o[g][6]));
  end

  function automatic logic [31:0] value(src_e s, logic [31:0] rf, bit bypass_bus);
    case (s)
      SRC_RF:      return rf;
      SRC_M_OUT:   return bypass_bus ? mo : '0;
      SRC_C_RA:    return bypass_bus ? ra : '0;
      SRC_C_AUIPC: return bypass_bus ? au : '0;
      SRC_IMM:     return ctrl.imm;
      default:     return '0;
    endcase
  endfunction

  initial begin
    logic [31:0] v_rs1, v_rs2, v_rd, v_imm, e[7];
    for (int n = 0; n < 3000; n++) begin
      ctrl = '0;
      ctrl.bus_src[BUS_RS1] = src_e'($urandom_range(0, 4));
      ctrl.bus_src[BUS_RS2] = src_e'($urandom_range(0, 4));
      ctrl.bus_src[BUS_RD]  = src_e'(($urandom_range(0, 1) == 1) ? $urandom_range(2, 4) : 0);
      ctrl.bus_src[BUS_IMM] = ($urandom_range(0, 1) == 1) ? SRC_IMM : SRC_NONE;
      ctrl.m_in1_imm = ($urandom_range(0, 1) == 1);
      ctrl.imm = $urandom;
      rd1 = $urandom; rd2 = $urandom; mo = $urandom; ra = $urandom; au = $urandom;
      #1;
      for (int g = 0; g < 2; g++) begin
        v_rs1 = value(ctrl.bus_src[BUS_RS1], rd1, g == 0);
        v_rs2 = value(ctrl.bus_src[BUS_RS2], rd2, g == 0);
        v_rd  = value(ctrl.bus_src[BUS_RD], 0, 1);
        v_imm = value(ctrl.bus_src[BUS_IMM], 0, 0);
        e = '{ctrl.m_in1_imm ? v_imm : v_rs2, v_imm, v_rs1, v_rs1, v_rs2, v_imm, v_rd};
        for (int p = 0; p < 7; p++) begin
          checks++;
          if (o[g][p] != e[p]) begin
            failures++; $display("FAIL bypass=%0d port %0d: %h expected %h", g == 0, p, o[g][p], e[p]);
          end
        end
      end
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
