// rv_fu_m: function unit M, the arithmetic-logic unit and the load-store
// unit merged into one unit, plus the M extension operations.
//
// Ports: in1 (rs2 or immediate), in2 (immediate offset), trigger (rs1, with
// the opcode) and one result port. An operation starts when the trigger is
// written and all operands arrive in the same cycle, so the unit has no
// operand registers.
//  - ALU:   result = trigger OP in1, written to the result register at the
//           end of the trigger cycle (latency 1).
//  - loads: address = trigger + in2; the data memory answers in the next
//           cycle and the result port shows the aligned, extended data then
//           (latency 1, no extra stall); it is also kept in the result
//           register.
//  - stores: address = trigger + in2, data = in1, byte enables from the
//           size and the low address bits. Accesses are assumed aligned.
//  - MUL/MULH*: product formed at the trigger, released after LAT_MUL /
//           LAT_MULH cycles. DIV/REM*: iterative divider, LAT_DIV cycles
//           (at least 34).
// Latency L means the result port holds the value from L cycles after the
// trigger cycle. Data memory: request in the trigger cycle, read data one
// cycle later, no wait states.
module rv_fu_m
  import rv_pkg::*;
#(
  parameter bit ENABLE_M = 1'b1,
  parameter int LAT_MUL  = 1,
  parameter int LAT_MULH = 4,
  parameter int LAT_DIV  = 35
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        trig_i,
  input  mop_e        opc_i,
  input  logic [31:0] in1_i,
  input  logic [31:0] in2_i,
  input  logic [31:0] trig_data_i,
  output logic [31:0] out_o,
  output logic        dmem_req_o,
  output logic        dmem_we_o,
  output logic [3:0]  dmem_be_o,
  output logic [31:0] dmem_addr_o,
  output logic [31:0] dmem_wdata_o,
  input  logic [31:0] dmem_rdata_i
);
  initial begin
    assert (LAT_DIV >= 34) else $fatal(1, "LAT_DIV must be at least 34");
    assert (LAT_MUL >= 1 && LAT_MULH >= 1) else $fatal(1, "latencies must be at least 1");
  end

  logic [31:0] a, b;
  assign a = trig_data_i;
  assign b = in1_i;

  // ---------------- ALU ----------------
  logic [31:0] alu;
  always_comb begin
    unique case (opc_i)
      M_ADD:   alu = a + b;
      M_SUB:   alu = a - b;
      M_SLL:   alu = a << b[4:0];
      M_SLT:   alu = {31'd0, $signed(a) < $signed(b)};
      M_SLTU:  alu = {31'd0, a < b};
      M_XOR:   alu = a ^ b;
      M_SRL:   alu = a >> b[4:0];
      M_SRA:   alu = $unsigned($signed(a) >>> b[4:0]);
      M_OR:    alu = a | b;
      M_AND:   alu = a & b;
      default: alu = '0;
    endcase
  end

  // ---------------- multiplier ----------------
  logic [63:0] prod_ss, prod_su, prod_uu;
  logic [31:0] mul;
  assign prod_ss = ENABLE_M ? 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b})) : '0;
  assign prod_su = ENABLE_M ? 64'($signed({{32{a[31]}}, a}) * $signed({32'd0, b})) : '0;
  assign prod_uu = ENABLE_M ? ({32'd0, a} * {32'd0, b}) : '0;
  always_comb begin
    unique case (opc_i)
      M_MUL:    mul = prod_uu[31:0];
      M_MULH:   mul = prod_ss[63:32];
      M_MULHSU: mul = prod_su[63:32];
      M_MULHU:  mul = prod_uu[63:32];
      default:  mul = '0;
    endcase
  end

  // ---------------- divider ----------------
  logic        is_div, div_start;
  logic [31:0] div_res;
  assign is_div    = opc_i inside {M_DIV, M_DIVU, M_REM, M_REMU};
  assign div_start = ENABLE_M && trig_i && is_div;

  rv_divider u_div (
    .clk_i, .rst_ni, .start_i(div_start), .a_i(a), .b_i(b),
    .signed_i(opc_i == M_DIV || opc_i == M_REM),
    .rem_i(opc_i == M_REM || opc_i == M_REMU),
    .result_o(div_res)
  );

  // ---------------- load-store ----------------
  logic        is_ld, is_st;
  logic [31:0] addr;
  assign is_ld = opc_i inside {M_LB, M_LH, M_LW, M_LBU, M_LHU};
  assign is_st = opc_i inside {M_SB, M_SH, M_SW};
  assign addr  = trig_data_i + in2_i;

  assign dmem_req_o   = trig_i && (is_ld || is_st);
  assign dmem_we_o    = trig_i && is_st;
  assign dmem_addr_o  = {addr[31:2], 2'b00};
  always_comb begin
    unique case (opc_i)
      M_SB, M_LB, M_LBU: dmem_be_o = 4'b0001 << addr[1:0];
      M_SH, M_LH, M_LHU: dmem_be_o = 4'b0011 << {addr[1], 1'b0};
      default:           dmem_be_o = 4'b1111;
    endcase
    unique case (opc_i)
      M_SB:    dmem_wdata_o = {4{in1_i[7:0]}};
      M_SH:    dmem_wdata_o = {2{in1_i[15:0]}};
      default: dmem_wdata_o = in1_i;
    endcase
  end

  logic       ld_pend_q;
  mop_e       ld_op_q;
  logic [1:0] ld_off_q;
  logic [31:0] ld_data;
  always_comb begin
    logic [31:0] sh;
    sh = dmem_rdata_i >> {ld_off_q, 3'b000};
    unique case (ld_op_q)
      M_LB:    ld_data = {{24{sh[7]}}, sh[7:0]};
      M_LBU:   ld_data = {24'd0, sh[7:0]};
      M_LH:    ld_data = {{16{sh[15]}}, sh[15:0]};
      M_LHU:   ld_data = {16'd0, sh[15:0]};
      default: ld_data = dmem_rdata_i;
    endcase
  end

  // ---------------- result register and latency timing ----------------
  logic [31:0] out_q, mc_res_q;
  logic [5:0]  mc_cnt_q;
  logic        mc_div_q;
  logic        is_mul;
  logic [5:0]  mul_lat;
  assign is_mul  = opc_i inside {M_MUL, M_MULH, M_MULHSU, M_MULHU};
  assign mul_lat = (opc_i == M_MUL) ? 6'(LAT_MUL) : 6'(LAT_MULH);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_q     <= '0;
      mc_res_q  <= '0;
      mc_cnt_q  <= '0;
      mc_div_q  <= 1'b0;
      ld_pend_q <= 1'b0;
      ld_op_q   <= M_LW;
      ld_off_q  <= '0;
    end else begin
      ld_pend_q <= trig_i && is_ld;
      if (trig_i && is_ld) begin
        ld_op_q  <= opc_i;
        ld_off_q <= addr[1:0];
      end
      if (mc_cnt_q != 6'd0) begin
        mc_cnt_q <= mc_cnt_q - 6'd1;
        if (mc_cnt_q == 6'd1) out_q <= mc_div_q ? div_res : mc_res_q;
      end
      if (ld_pend_q) out_q <= ld_data;
      if (trig_i) begin
        if (is_mul) begin
          if (mul_lat == 6'd1) out_q <= mul;
          else begin
            mc_res_q <= mul;
            mc_cnt_q <= mul_lat - 6'd1;
            mc_div_q <= 1'b0;
          end
        end else if (is_div) begin
          mc_cnt_q <= 6'(LAT_DIV - 1);
          mc_div_q <= 1'b1;
        end else if (!is_ld && !is_st) begin
          out_q <= alu;
        end
      end
    end
  end

  assign out_o = ld_pend_q ? ld_data : out_q;

  // Multi-cycle operations are never overlapped: the front end bubbles.
  a_not_busy: assert property (@(posedge clk_i) disable iff (!rst_ni)
    trig_i |-> mc_cnt_q <= 6'd1) else $error("M triggered while busy");
endmodule
