// tb_rv_format_decode: checks the format of all 128 major opcodes against the
// RV32 base opcode map, over random instruction bodies.
//
// The reference is the RV32 base opcode map.
module tb_rv_format_decode;
  import rv_pkg::*;
  logic [31:0] instr;
  fmt_e        fmt;
  int checks = 0, failures = 0;

  rv_format_decode dut (.instr_i(instr), .fmt_o(fmt));

  function automatic fmt_e ref_fmt(logic [6:0] op);
    case (op)
      7'h33:             return FMT_R;
      7'h13, 7'h03, 7'h67: return FMT_I;
      7'h23:             return FMT_S;
      7'h63:             return FMT_B;
      7'h37, 7'h17:      return FMT_U;
      7'h6f:             return FMT_J;
      default:           return FMT_NONE;
    endcase
  endfunction

  initial begin
    for (int op = 0; op < 128; op++) begin
      for (int r = 0; r < 4; r++) begin
        instr = {$urandom, 7'(op)};
        instr[6:0] = 7'(op);
        #1;
        checks++;
        if (fmt != ref_fmt(7'(op))) begin
          failures++;
          $display("FAIL opcode %h: %s", op, fmt.name());
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
