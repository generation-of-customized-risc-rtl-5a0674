// rv_interconnect: the four transport buses and their sockets.
//
// Buses, top to bottom: rs2, rs1, rd, imm. Output sockets put a unit's output
// port on a bus; input sockets take a unit's input port from a bus.
//   rs2 bus: sources R.read2 (+ M.out, C.ra, C.auipc with bypass);
//            sinks M.in1, C.in2
//   rs1 bus: sources R.read1 (+ M.out, C.ra, C.auipc with bypass);
//            sinks M.trigger, C.in1
//   rd bus:  sources M.out, C.ra, C.auipc; sink R.write
//   imm bus: source immediate; sinks M.in1, M.in2, C.trigger
// With BYPASS=0 the unit outputs reach only the rd bus, as in the no-bypass
// architecture. Purely combinational: a bus carries the selected source in
// the same cycle; an idle bus carries zero.
//
// The bus order and connectivity, with and without bypass, follow the
// original architecture drawings; building the buses as multiplexers that
// read zero when idle is this design's own choice.
module rv_interconnect
  import rv_pkg::*;
#(
  parameter bit BYPASS = 1'b1
) (
  input  ctrl_t       ctrl_i,
  input  logic [31:0] rf_rd1_i,
  input  logic [31:0] rf_rd2_i,
  input  logic [31:0] m_out_i,
  input  logic [31:0] c_ra_i,
  input  logic [31:0] c_auipc_i,
  output logic [31:0] m_in1_o,
  output logic [31:0] m_in2_o,
  output logic [31:0] m_trig_o,
  output logic [31:0] c_in1_o,
  output logic [31:0] c_in2_o,
  output logic [31:0] c_trig_o,
  output logic [31:0] rf_wd_o
);
  logic [31:0] bus_o [NBUS];

  function automatic logic [31:0] fu_out(src_e s, logic [31:0] m, logic [31:0] ra,
                                         logic [31:0] au);
    unique case (s)
      SRC_M_OUT:   return m;
      SRC_C_RA:    return ra;
      SRC_C_AUIPC: return au;
      default:     return '0;
    endcase
  endfunction

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      bus_o[b] = '0;
      unique case (b)
        BUS_RS2: bus_o[b] = (ctrl_i.bus_src[b] == SRC_RF) ? rf_rd2_i :
                            (BYPASS ? fu_out(ctrl_i.bus_src[b], m_out_i, c_ra_i, c_auipc_i) : '0);
        BUS_RS1: bus_o[b] = (ctrl_i.bus_src[b] == SRC_RF) ? rf_rd1_i :
                            (BYPASS ? fu_out(ctrl_i.bus_src[b], m_out_i, c_ra_i, c_auipc_i) : '0);
        BUS_RD:  bus_o[b] = fu_out(ctrl_i.bus_src[b], m_out_i, c_ra_i, c_auipc_i);
        BUS_IMM: bus_o[b] = (ctrl_i.bus_src[b] == SRC_IMM) ? ctrl_i.imm : '0;
        default: ;
      endcase
    end
  end

  assign m_in1_o  = ctrl_i.m_in1_imm ? bus_o[BUS_IMM] : bus_o[BUS_RS2];
  assign m_in2_o  = bus_o[BUS_IMM];
  assign m_trig_o = bus_o[BUS_RS1];
  assign c_in1_o  = bus_o[BUS_RS1];
  assign c_in2_o  = bus_o[BUS_RS2];
  assign c_trig_o = bus_o[BUS_IMM];
  assign rf_wd_o  = bus_o[BUS_RD];
endmodule
