// tb_rv_fu_m: function unit M. Random ALU and M-extension operations are
// compared with reference arithmetic, including the cycle in which the
// result appears (1 for ALU and MUL, 4 for MULH*, 35 for DIV/REM). Stores
// and loads of all sizes run against a one-cycle data memory model and a
// byte-array reference.
//
// Reference results follow the RISC-V specification; the latencies checked
// are the specified ones (1, MULH 4, DIV 35).
module tb_rv_fu_m;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        trig;
  mop_e        opc;
  logic [31:0] in1, in2, tdata, out;
  logic        req, we;
  logic [3:0]  be;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] mem [64];
  logic [7:0]  bytes [256];

  rv_fu_m dut (.clk_i(clk), .rst_ni(rst_n), .trig_i(trig), .opc_i(opc), .in1_i(in1), .in2_i(in2),
               .trig_data_i(tdata), .out_o(out), .dmem_req_o(req), .dmem_we_o(we), .dmem_be_o(be),
               .dmem_addr_o(addr), .dmem_wdata_o(wdata), .dmem_rdata_i(rdata));

  always_ff @(posedge clk) if (req) begin
    rdata <= mem[addr[7:2]];
    if (we) for (int b = 0; b < 4; b++) if (be[b]) mem[addr[7:2]][8*b +: 8] <= wdata[8*b +: 8];
  end

  function automatic logic [31:0] ref_op(mop_e o, logic [31:0] a, logic [31:0] b);
    logic signed [63:0] ss, su;
    logic [63:0] uu;
    ss = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
    su = $signed({{32{a[31]}}, a}) * $signed({32'd0, b});
    uu = {32'd0, a} * {32'd0, b};
    case (o)
      M_ADD: return a + b;   M_SUB: return a - b;
      M_SLL: return a << b[4:0];
      M_SLT: return ($signed(a) < $signed(b)) ? 1 : 0;
      M_SLTU: return (a < b) ? 1 : 0;
      M_XOR: return a ^ b;   M_SRL: return a >> b[4:0];
      M_SRA: return $unsigned($signed(a) >>> b[4:0]);
      M_OR: return a | b;    M_AND: return a & b;
      M_MUL: return uu[31:0]; M_MULH: return ss[63:32];
      M_MULHSU: return su[63:32]; M_MULHU: return uu[63:32];
      M_DIV: return (b == 0) ? '1 : (a == 32'h80000000 && b == '1) ? a : $unsigned($signed(a) / $signed(b));
      M_DIVU: return (b == 0) ? '1 : a / b;
      M_REM: return (b == 0) ? a : (a == 32'h80000000 && b == '1) ? 0 : $unsigned($signed(a) % $signed(b));
      M_REMU: return (b == 0) ? a : a % b;
      default: return 0;
    endcase
  endfunction

  function automatic int lat_of(mop_e o);
    if (o inside {M_MULH, M_MULHSU, M_MULHU}) return 4;
    if (o inside {M_DIV, M_DIVU, M_REM, M_REMU}) return 35;
    return 1;
  endfunction

  // Triggers one operation and checks the result port L cycles later, and
  // that it was not yet there one cycle earlier when L > 1.
  task automatic run_op(mop_e o, logic [31:0] a, logic [31:0] b);
    logic [31:0] exp;
    int L;
    exp = ref_op(o, a, b);
    L = lat_of(o);
    @(negedge clk);
    trig = 1; opc = o; tdata = a; in1 = b; in2 = $urandom;
    @(negedge clk);
    trig = 0; tdata = $urandom; in1 = $urandom;
    for (int c = 1; c < L; c++) begin
      if (c == L - 1 && out == exp && exp != ref_op(M_ADD, 0, 0) && L > 1) begin
        // an early result would mean a shorter latency than specified
        checks++; failures++; $display("FAIL %s result early", o.name());
      end
      @(negedge clk);
    end
    checks++;
    if (out != exp) begin
      failures++;
      $display("FAIL %s(%h,%h)=%h expected %h", o.name(), a, b, out, exp);
    end
  endtask

  task automatic store(mop_e o, logic [31:0] base, logic [31:0] off, logic [31:0] d);
    logic [31:0] ea;
    ea = base + off;
    @(negedge clk);
    trig = 1; opc = o; tdata = base; in2 = off; in1 = d;
    case (o)
      M_SB: bytes[ea[7:0]] = d[7:0];
      M_SH: begin bytes[ea[7:0]] = d[7:0]; bytes[ea[7:0] + 1] = d[15:8]; end
      default: for (int k = 0; k < 4; k++) bytes[ea[7:0] + k] = d[8*k +: 8];
    endcase
    @(negedge clk);
    trig = 0;
  endtask

  task automatic load(mop_e o, logic [31:0] base, logic [31:0] off);
    logic [31:0] ea, exp;
    ea = base + off;
    case (o)
      M_LB:  exp = {{24{bytes[ea[7:0]][7]}}, bytes[ea[7:0]]};
      M_LBU: exp = {24'd0, bytes[ea[7:0]]};
      M_LH:  exp = {{16{bytes[ea[7:0] + 1][7]}}, bytes[ea[7:0] + 1], bytes[ea[7:0]]};
      M_LHU: exp = {16'd0, bytes[ea[7:0] + 1], bytes[ea[7:0]]};
      default: exp = {bytes[ea[7:0] + 3], bytes[ea[7:0] + 2], bytes[ea[7:0] + 1], bytes[ea[7:0]]};
    endcase
    @(negedge clk);
    trig = 1; opc = o; tdata = base; in2 = off; in1 = $urandom;
    @(negedge clk);
    trig = 0;
    checks++;
    if (out != exp) begin
      failures++;
      $display("FAIL %s @%h = %h expected %h", o.name(), ea, out, exp);
    end
    @(negedge clk);
    checks++;
    if (out != exp) begin failures++; $display("FAIL %s result not held", o.name()); end
  endtask

  initial begin
    trig = 0; opc = M_ADD; in1 = 0; in2 = 0; tdata = 0;
    foreach (mem[i]) mem[i] = 0;
    foreach (bytes[i]) bytes[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      mop_e o;
      logic [31:0] a, b;
      do o = mop_e'($urandom_range(0, 25)); while (o inside {M_LB, M_LH, M_LW, M_LBU, M_LHU, M_SB, M_SH, M_SW});
      if (o inside {M_DIV, M_DIVU, M_REM, M_REMU} && i % 4 != 0) o = M_XOR;
      a = $urandom; b = $urandom;
      if (i % 17 == 0) b = 0;
      if (i % 23 == 0) begin a = 32'h80000000; b = '1; end
      if (i % 5 == 0) b = b >> $urandom_range(0, 31);
      run_op(o, a, b);
    end
    for (int i = 0; i < 300; i++) begin
      logic [31:0] base, off;
      mop_e so, lo;
      base = 32'h100 + 4 * $urandom_range(0, 8);
      off  = 4 * $urandom_range(0, 40);
      so = mop_e'($urandom_range(M_SB, M_SW));
      if (so == M_SB) off += $urandom_range(0, 3);
      if (so == M_SH) off += 2 * $urandom_range(0, 1);
      store(so, base, off, $urandom);
      lo = mop_e'($urandom_range(M_LB, M_LHU));
      off = 4 * $urandom_range(0, 40);
      if (lo inside {M_LB, M_LBU}) off += $urandom_range(0, 3);
      if (lo inside {M_LH, M_LHU}) off += 2 * $urandom_range(0, 1);
      load(lo, base, off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
