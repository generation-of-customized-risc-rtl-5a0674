// rv_decoder: the TTA instruction decoder and its decode registers.
//
// Turns the four move slots of a TTA instruction into datapath controls:
// register file read indexes (from the rs1/rs2 slots whose source is the
// register file), register file write enable and index (rd slot), the source
// select of every bus, the M.in1 socket select (rs2 bus or imm bus) and the
// trigger and opcode of units M and C. The controls, the immediate and the
// instruction's PC are registered: they act on the datapath in the next
// cycle (the execute / register-read stage). The immediate is carried next to
// the moves rather than inside them. An assertion flags moves the
// interconnect cannot perform (BYPASS selects the connectivity).
//
// The decode registers between translation and execution follow the
// original design; the move-slot encoding and the control-word layout are
// this design's own.
module rv_decoder
  import rv_pkg::*;
#(
  parameter bit BYPASS = 1'b1
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  tta_instr_t  instr_i,
  input  logic [31:0] imm_i,
  input  logic [31:0] pc_i,
  output ctrl_t       ctrl_o
);
  ctrl_t d;

  always_comb begin
    d           = '0;
    d.m_opc     = M_ADD;
    d.c_opc     = C_BEQ;
    d.imm       = imm_i;
    d.pc        = pc_i;
    for (int b = 0; b < NBUS; b++) begin
      d.bus_src[b] = instr_i[b].src;
      unique case (instr_i[b].dst)
        DST_RF: begin
          d.rf_we = 1'b1;
          d.rf_wa = instr_i[b].idx;
        end
        DST_M_IN1:  d.m_in1_imm = (b == BUS_IMM);
        DST_M_TRIG: begin
          d.m_trig = 1'b1;
          d.m_opc  = mop_e'(instr_i[b].opc);
        end
        DST_C_TRIG: begin
          d.c_trig = 1'b1;
          d.c_opc  = cop_e'(instr_i[b].opc);
        end
        default: ;
      endcase
    end
    if (instr_i[BUS_RS1].src == SRC_RF) d.rf_ra1 = instr_i[BUS_RS1].idx;
    if (instr_i[BUS_RS2].src == SRC_RF) d.rf_ra2 = instr_i[BUS_RS2].idx;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ctrl_o       <= '0;
    end else begin
      ctrl_o       <= d;
    end
  end

  always_comb begin
    if (rst_ni) begin
      for (int b = 0; b < NBUS; b++)
        assert (move_legal(b, instr_i[b], BYPASS))
          else $error("move on bus %0d not supported by the interconnect", b);
    end
  end
endmodule
