// rv_divider: iterative radix-2 restoring divider for the M extension
// (DIV, DIVU, REM, REMU), used inside function unit M.
//
// start_i latches the operands (magnitudes and signs); 32 shift-subtract
// steps follow, one per cycle; result_o is valid from the cycle after the
// last step (33 cycles after start) until the next start. Division by zero
// gives all ones as quotient and the dividend as remainder; -2^31 / -1 gives
// -2^31, remainder 0, as RISC-V requires. The iterative structure is this
// design's choice; only the fixed latency of the operation is specified.
module rv_divider (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic        signed_i,
  input  logic        rem_i,
  output logic [31:0] result_o
);
  logic [31:0] quo_q, rem_q, div_q, a_q;
  logic [5:0]  cnt_q;
  logic        neg_q_q, neg_r_q, rem_sel_q, zero_q;

  logic        sa, sb;
  logic [31:0] ma, mb;
  assign sa = signed_i && a_i[31];
  assign sb = signed_i && b_i[31];
  assign ma = sa ? -a_i : a_i;
  assign mb = sb ? -b_i : b_i;

  logic [32:0] trial;
  assign trial = {rem_q, quo_q[31]} - {1'b0, div_q};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      quo_q <= '0; rem_q <= '0; div_q <= '0; a_q <= '0; cnt_q <= '0;
      neg_q_q <= 1'b0; neg_r_q <= 1'b0; rem_sel_q <= 1'b0; zero_q <= 1'b0;
    end else if (start_i) begin
      quo_q     <= ma;
      rem_q     <= '0;
      div_q     <= mb;
      a_q       <= a_i;
      cnt_q     <= 6'd32;
      neg_q_q   <= sa ^ sb;
      neg_r_q   <= sa;
      rem_sel_q <= rem_i;
      zero_q    <= (b_i == 32'd0);
    end else if (cnt_q != 6'd0) begin
      cnt_q <= cnt_q - 6'd1;
      if (!trial[32]) begin
        rem_q <= trial[31:0];
        quo_q <= {quo_q[30:0], 1'b1};
      end else begin
        rem_q <= {rem_q[30:0], quo_q[31]};
        quo_q <= {quo_q[30:0], 1'b0};
      end
    end
  end

  always_comb begin
    if (zero_q)         result_o = rem_sel_q ? a_q : 32'hFFFF_FFFF;
    else if (rem_sel_q) result_o = neg_r_q ? -rem_q : rem_q;
    else                result_o = neg_q_q ? -quo_q : quo_q;
  end
endmodule
