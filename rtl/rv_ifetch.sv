// rv_ifetch: the instruction fetch unit.
//
// Holds the program counter and drives the instruction memory, which is
// assumed synchronous: the word for addr_o appears on rdata_i one cycle
// later, with no wait states. The unit presents to the microcode front end
// the word, its PC and a valid flag.
//  - INSTR_REG=0 (three-stage core): the memory output goes straight to the
//    front end, so fetch, translation and decoding share one cycle.
//  - INSTR_REG=1 (four-stage core): an instruction register sits between the
//    memory and the front end, adding one stage.
// stall_i: the presented word was not consumed and must be presented again;
// it is parked in a hold register while the memory keeps fetching the next
// address. jump_i (JAL, from the front end) moves the PC to
// pc_o + jump_offset_i; redirect_i (branch/JALR, from the control unit)
// moves it to redirect_target_i. Either one discards the words in flight, so
// the front end sees invalid words until the new target arrives.
// Reset: PC = BOOT_ADDR, nothing valid.
module rv_ifetch #(
  parameter bit          INSTR_REG = 1'b0,
  parameter logic [31:0] BOOT_ADDR = 32'h0000_0000
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic [31:0] addr_o,
  input  logic [31:0] rdata_i,
  output logic [31:0] instr_o,
  output logic [31:0] pc_o,
  output logic        valid_o,
  input  logic        stall_i,
  input  logic        jump_i,
  input  logic [31:0] jump_offset_i,
  input  logic        redirect_i,
  input  logic [31:0] redirect_target_i
);
  // Memory-response stage: the word on rdata_i (or parked in hold_q).
  logic [31:0] pc_q, rsp_pc_q, hold_q;
  logic        rsp_valid_q, hold_valid_q;
  logic [31:0] rsp_word;
  assign rsp_word = hold_valid_q ? hold_q : rdata_i;
  assign addr_o   = pc_q;

  // Whether the response stage advances this cycle.
  logic rsp_take;
  // Instruction register stage (used when INSTR_REG).
  logic [31:0] ir_q, ir_pc_q;
  logic        ir_valid_q;

  logic flush;
  logic [31:0] flush_target;
  assign flush        = redirect_i || jump_i;
  assign flush_target = redirect_i ? redirect_target_i : (pc_o + jump_offset_i);

  if (INSTR_REG) begin : g_ir
    assign instr_o  = ir_q;
    assign pc_o     = ir_pc_q;
    assign valid_o  = ir_valid_q;
    // The IR takes a new word when it is empty or its word is consumed.
    assign rsp_take = !(ir_valid_q && stall_i);
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        ir_q <= '0; ir_pc_q <= '0; ir_valid_q <= 1'b0;
      end else if (flush) begin
        ir_valid_q <= 1'b0;
      end else if (rsp_take) begin
        ir_q       <= rsp_word;
        ir_pc_q    <= rsp_pc_q;
        ir_valid_q <= rsp_valid_q;
      end
    end
  end else begin : g_no_ir
    assign instr_o  = rsp_word;
    assign pc_o     = rsp_pc_q;
    assign valid_o  = rsp_valid_q;
    assign rsp_take = !(rsp_valid_q && stall_i);
    always_comb begin
      ir_q = '0; ir_pc_q = '0; ir_valid_q = 1'b0;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pc_q         <= BOOT_ADDR;
      rsp_pc_q     <= '0;
      rsp_valid_q  <= 1'b0;
      hold_q       <= '0;
      hold_valid_q <= 1'b0;
    end else if (flush) begin
      pc_q         <= flush_target;
      rsp_valid_q  <= 1'b0;
      hold_valid_q <= 1'b0;
    end else if (rsp_take) begin
      rsp_pc_q     <= pc_q;
      rsp_valid_q  <= 1'b1;
      pc_q         <= pc_q + 32'd4;
      hold_valid_q <= 1'b0;
    end else if (!hold_valid_q) begin
      hold_q       <= rdata_i;
      hold_valid_q <= 1'b1;
    end
  end
endmodule
