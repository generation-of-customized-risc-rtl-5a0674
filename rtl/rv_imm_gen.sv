// rv_imm_gen: immediate handling of the microcode front end.
//
// Slices the immediate bits out of the instruction word, puts them in order
// for the given format and sign-extends them to 32 bits, always from
// instruction bit 31. The result bypasses the lookup tables and goes straight
// to the decoder output (the imm bus), so the internal instruction format
// needs no immediate field. U-format immediates keep their 20 bits in the
// upper half with zeros below. Combinational.
//
// Passing the immediate around the tables follows the original design; the
// bit layout is the standard RISC-V one.
module rv_imm_gen
  import rv_pkg::*;
(
  input  logic [31:0] instr_i,
  input  fmt_e        fmt_i,
  output logic [31:0] imm_o
);
  logic [31:0] ins;
  assign ins = instr_i;

  always_comb begin
    unique case (fmt_i)
      FMT_I:   imm_o = {{21{ins[31]}}, ins[30:20]};
      FMT_S:   imm_o = {{21{ins[31]}}, ins[30:25], ins[11:7]};
      FMT_B:   imm_o = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      FMT_U:   imm_o = {ins[31:12], 12'b0};
      FMT_J:   imm_o = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
      default: imm_o = '0;
    endcase
  end
endmodule
