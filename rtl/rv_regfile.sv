// rv_regfile: the register file unit R of the TTA datapath.
//
// NREGS entries of 32 bits (32 for RV32I, 16 for RV32E), two read ports and
// one write port, which is what a RISC-V instruction needs per cycle. The
// read port on the rs1 bus and the one on the rs2 bus are combinational; the
// write port on the rd bus writes at the clock edge. Register 0 always reads
// zero and ignores writes. Index bits above the register count are ignored.
// A write and a read of the same register in one cycle return the old value:
// results reach a following instruction through the bypass network instead.
//
// Two read ports, one write port and the asynchronous read follow the
// original design; the lack of reset and of write-through are this design's
// own choices.
module rv_regfile #(
  parameter int NREGS = 32
) (
  input  logic        clk_i,
  input  logic [4:0]  ra1_i,
  output logic [31:0] rd1_o,
  input  logic [4:0]  ra2_i,
  output logic [31:0] rd2_o,
  input  logic        we_i,
  input  logic [4:0]  wa_i,
  input  logic [31:0] wd_i
);
  localparam int AW = $clog2(NREGS);

  logic [31:0] regs [1:NREGS-1];

  logic [AW-1:0] a1, a2, aw;
  assign a1 = ra1_i[AW-1:0];
  assign a2 = ra2_i[AW-1:0];
  assign aw = wa_i[AW-1:0];

  assign rd1_o = (a1 == '0) ? 32'd0 : regs[a1];
  assign rd2_o = (a2 == '0) ? 32'd0 : regs[a2];

  always_ff @(posedge clk_i) begin
    if (we_i && aw != '0) regs[aw] <= wd_i;
  end
endmodule
