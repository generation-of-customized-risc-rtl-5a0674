// rv_pkg: types and constants shared by the RV32IM core built around a
// transport triggered (TTA) datapath with a microcode front end.
//
// The core's internal instruction is a TTA instruction of four move slots,
// one per transport bus. The buses are dedicated to RISC-V operands: rs2, rs1,
// rd (result) and imm, as in the minimal RISC-V-capable TTA architecture. A
// move names a source socket, a destination socket, an operation code when the
// destination is a triggering port, and a register index when the register
// file is the source (read index) or the destination (write index).
//
// The datapath has three units: R (register file, read ports on the rs1 and
// rs2 buses, write port on the rd bus), M (ALU + load-store unit + M
// extension, ports in1/in2/trigger/out) and C (control unit, ports
// in1/in2/trigger and two outputs: return address and AUIPC result).
// Numeric encodings of the fields below are this design's own choice.
package rv_pkg;

  localparam int XLEN = 32;

  // Transport buses, ordered top to bottom as in the architecture drawing.
  localparam int NBUS    = 4;
  localparam int BUS_RS2 = 0;
  localparam int BUS_RS1 = 1;
  localparam int BUS_RD  = 2;
  localparam int BUS_IMM = 3;

  // RISC-V instruction formats.
  typedef enum logic [2:0] {
    FMT_NONE = 3'd0,
    FMT_R    = 3'd1,
    FMT_I    = 3'd2,
    FMT_S    = 3'd3,
    FMT_B    = 3'd4,
    FMT_U    = 3'd5,
    FMT_J    = 3'd6
  } fmt_e;

  // RISC-V operations recognised by the front end (the lookup-table index).
  typedef enum logic [5:0] {
    RV_ILLEGAL, // anything not listed: executed as a no-operation
    RV_ADD, RV_SUB, RV_SLL, RV_SLT, RV_SLTU, RV_XOR, RV_SRL, RV_SRA, RV_OR, RV_AND,
    RV_ADDI, RV_SLTI, RV_SLTIU, RV_XORI, RV_ORI, RV_ANDI, RV_SLLI, RV_SRLI, RV_SRAI,
    RV_LUI, RV_AUIPC, RV_JAL, RV_JALR,
    RV_BEQ, RV_BNE, RV_BLT, RV_BGE, RV_BLTU, RV_BGEU,
    RV_LB, RV_LH, RV_LW, RV_LBU, RV_LHU, RV_SB, RV_SH, RV_SW,
    RV_MUL, RV_MULH, RV_MULHSU, RV_MULHU, RV_DIV, RV_DIVU, RV_REM, RV_REMU
  } rvop_e;

  // Source sockets (output ports) that can drive a bus.
  typedef enum logic [2:0] {
    SRC_NONE    = 3'd0,
    SRC_RF      = 3'd1, // register file read port of this bus
    SRC_M_OUT   = 3'd2, // M result port
    SRC_C_RA    = 3'd3, // C return-address port
    SRC_C_AUIPC = 3'd4, // C AUIPC result port
    SRC_IMM     = 3'd5  // immediate unit (imm bus only)
  } src_e;

  // Destination sockets (input ports) that a bus can drive.
  typedef enum logic [2:0] {
    DST_NONE   = 3'd0,
    DST_RF     = 3'd1, // register file write port
    DST_M_IN1  = 3'd2, // M operand 1 (rs2 or immediate)
    DST_M_IN2  = 3'd3, // M operand 2 (immediate offset)
    DST_M_TRIG = 3'd4, // M triggering port (rs1), carries an opcode
    DST_C_IN1  = 3'd5, // C operand 1 (rs1)
    DST_C_IN2  = 3'd6, // C operand 2 (rs2)
    DST_C_TRIG = 3'd7  // C triggering port (immediate), carries an opcode
  } dst_e;

  // Operations of function unit M.
  typedef enum logic [4:0] {
    M_ADD, M_SUB, M_SLL, M_SLT, M_SLTU, M_XOR, M_SRL, M_SRA, M_OR, M_AND,
    M_LB, M_LH, M_LW, M_LBU, M_LHU, M_SB, M_SH, M_SW,
    M_MUL, M_MULH, M_MULHSU, M_MULHU, M_DIV, M_DIVU, M_REM, M_REMU
  } mop_e;

  // Operations of the control unit C.
  typedef enum logic [4:0] {
    C_BEQ, C_BNE, C_BLT, C_BGE, C_BLTU, C_BGEU, C_JAL, C_JALR, C_AUIPC
  } cop_e;

  typedef struct packed {
    src_e       src;
    dst_e       dst;
    logic [4:0] opc; // mop_e or cop_e when dst is a triggering port
    logic [4:0] idx; // register index when src or dst is the register file
  } move_t;

  localparam move_t MOVE_NOP = '{src: SRC_NONE, dst: DST_NONE, opc: '0, idx: '0};

  // One TTA instruction: a move slot per bus, index = bus number.
  typedef move_t [NBUS-1:0] tta_instr_t;

  localparam tta_instr_t TTA_NOP = {NBUS{MOVE_NOP}};

  // Control word produced by the decoder for the execute stage.
  typedef struct packed {
    logic [4:0]            rf_ra1;     // read index, port on the rs1 bus
    logic [4:0]            rf_ra2;     // read index, port on the rs2 bus
    logic                  rf_we;
    logic [4:0]            rf_wa;
    src_e [NBUS-1:0]       bus_src;    // what drives each bus
    logic                  m_in1_imm;  // M.in1 taken from the imm bus (else rs2 bus)
    logic                  m_trig;
    mop_e                  m_opc;
    logic                  c_trig;
    cop_e                  c_opc;
    logic [XLEN-1:0]       imm;
    logic [XLEN-1:0]       pc;
  } ctrl_t;

  // Interconnect connectivity. With bypass the function unit outputs also
  // reach the rs1 and rs2 buses; without it they reach only the rd bus.
  function automatic logic src_connected(int bus, src_e s, logic bypass);
    unique case (bus)
      BUS_RS1, BUS_RS2: return (s == SRC_RF) ||
                               (bypass && (s == SRC_M_OUT || s == SRC_C_RA || s == SRC_C_AUIPC));
      BUS_RD:           return (s == SRC_M_OUT || s == SRC_C_RA || s == SRC_C_AUIPC);
      BUS_IMM:          return (s == SRC_IMM);
      default:          return 1'b0;
    endcase
  endfunction

  function automatic logic dst_connected(int bus, dst_e d);
    unique case (bus)
      BUS_RS2: return (d == DST_M_IN1 || d == DST_C_IN2);
      BUS_RS1: return (d == DST_M_TRIG || d == DST_C_IN1);
      BUS_RD:  return (d == DST_RF);
      BUS_IMM: return (d == DST_M_IN1 || d == DST_M_IN2 || d == DST_C_TRIG);
      default: return 1'b0;
    endcase
  endfunction

  // A move is legal when it is a no-operation or both ends reach the bus.
  function automatic logic move_legal(int bus, move_t m, logic bypass);
    if (m.src == SRC_NONE && m.dst == DST_NONE) return 1'b1;
    return src_connected(bus, m.src, bypass) && dst_connected(bus, m.dst);
  endfunction

endpackage
