// rv_format_decode: identifies the RISC-V instruction format (R, I, S, B, U,
// J) of a 32-bit instruction word from its major opcode, bits [6:0].
//
// The format steers immediate handling, the data hazard check (which register
// operands an instruction reads and writes) and the insertion of register
// indexes into the translated moves. Purely combinational. Opcodes outside
// RV32IM (FENCE, SYSTEM and the rest) give FMT_NONE; treating them as
// no-operations is this design's choice.
module rv_format_decode
  import rv_pkg::*;
(
  input  logic [31:0] instr_i,
  output fmt_e        fmt_o
);
  always_comb begin
    unique case (instr_i[6:0])
      7'b0110011:                         fmt_o = FMT_R; // OP (incl. M extension)
      7'b0010011, 7'b0000011, 7'b1100111: fmt_o = FMT_I; // OP-IMM, LOAD, JALR
      7'b0100011:                         fmt_o = FMT_S; // STORE
      7'b1100011:                         fmt_o = FMT_B; // BRANCH
      7'b0110111, 7'b0010111:             fmt_o = FMT_U; // LUI, AUIPC
      7'b1101111:                         fmt_o = FMT_J; // JAL
      default:                            fmt_o = FMT_NONE;
    endcase
  end
endmodule
