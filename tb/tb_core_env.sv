// tb_core_env: test environment for the core. It holds the instruction and
// data memories (synchronous, one-cycle read, 32 KiB each), builds a test
// program, and checks the core against the reference instruction-set model:
//  - instruction trace: every issued instruction must be the one the model
//    executes next, at the same PC;
//  - datapath trace: every register write must match the model's, in order;
//  - timing: the cycles between two issued instructions must equal the
//    expected latency of the first (1 for single-cycle operations, the
//    operation latency for MUL/MULH/DIV, STAGES for branches and JALR,
//    STAGES-1 for JAL, plus one stall for a dependent instruction when the
//    core has no bypass network);
//  - at the end the data memory must equal the model's.
// The program is a directed part (forwarding from every output port,
// load-use, multi-cycle operations, loop, call and return) followed by NRAND
// random instructions with forward branches and jumps. It counts how often
// each pipeline mechanism occurred and fails if one never did.
//
// The expected cycle counts are the latencies the design specifies: 1 for
// most operations, MULH 4, DIV 35, a branch as many as there are stages and
// JAL one fewer.
// The memory model, the program generator and the reference model are this
// testbench's own.
module tb_core_env
  import tb_rv_asm_pkg::*;
#(
  parameter int STAGES   = 3,
  parameter bit BYPASS   = 1'b1,
  parameter int LAT_MUL  = 1,
  parameter int LAT_MULH = 4,
  parameter int LAT_DIV  = 35,
  parameter bit ENABLE_M = 1'b1,
  parameter int BASE     = 20,
  parameter bit KERNEL   = 1'b0,
  parameter int NRAND    = 300,
  parameter int SEED     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] imem_addr,
  output logic [31:0] imem_rdata,
  input  logic        dmem_req,
  input  logic        dmem_we,
  input  logic [3:0]  dmem_be,
  input  logic [31:0] dmem_addr,
  input  logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata,
  input  logic        trace_valid,
  input  logic [31:0] trace_pc,
  input  logic [31:0] trace_instr,
  input  logic        rf_we,
  input  logic [4:0]  rf_wa,
  input  logic [31:0] rf_wd,
  input  logic        stat_fwd,
  input  logic        stat_hazard_stall,
  input  logic        stat_redirect,
  output bit          done,
  output int          checks,
  output int          failures
);
  localparam int WORDS = 8192;

  logic [31:0] imem [WORDS];
  logic [31:0] dmem [WORDS];
  rv_iss       iss;
  int          halt_pc;
  int          kernel_end_pc = -1;
  longint      kernel_cycles;

  // ---------------- memories ----------------
  always_ff @(posedge clk) begin
    imem_rdata <= imem[imem_addr[14:2]];
    if (dmem_req) begin
      dmem_rdata <= dmem[dmem_addr[14:2]];
      if (dmem_we)
        for (int b = 0; b < 4; b++)
          if (dmem_be[b]) dmem[dmem_addr[14:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
    end
  end

  // ---------------- program ----------------
  logic [31:0] prog [$];

  function automatic logic [31:0] rand_instr(int idx, int n_total);
    int k, rd, rs1, rs2, f3, off;
    rd  = $urandom_range(1, 15);
    if (rd == BASE) rd = 1;
    rs1 = ($urandom_range(0, 9) == 0) ? BASE : $urandom_range(0, 15);
    rs2 = $urandom_range(0, 15);
    k   = $urandom_range(0, 99);
    if (k < 25) begin
      f3 = $urandom_range(0, 7);
      return r_type((f3 == 0 || f3 == 5) && ($urandom_range(0, 1) == 1) ? 7'h20 : 7'h00,
                    5'(rs2), 5'(rs1), 3'(f3), 5'(rd));
    end else if (k < 45) begin
      f3 = $urandom_range(0, 7);
      if (f3 == 1) return i_type(7'b0010011, {7'h00, 5'($urandom_range(0, 31))}, 5'(rs1), 3'd1, 5'(rd));
      if (f3 == 5) return i_type(7'b0010011, {($urandom_range(0, 1) == 1) ? 7'h20 : 7'h00, 5'($urandom_range(0, 31))},
                                 5'(rs1), 3'd5, 5'(rd));
      return i_type(7'b0010011, 12'($urandom), 5'(rs1), 3'(f3), 5'(rd));
    end else if (k < 48) begin
      return LUI(rd, $urandom);
    end else if (k < 50) begin
      return AUIPC(rd, $urandom_range(0, 15));
    end else if (k < 60 && !ENABLE_M) begin
      return ADDI(rd, rs1, $urandom_range(0, 100));
    end else if (k < 58) begin
      f3 = $urandom_range(0, 3);
      return r_type(7'h01, 5'(rs2), 5'(rs1), 3'(f3), 5'(rd));
    end else if (k < 60) begin
      f3 = $urandom_range(4, 7);
      return r_type(7'h01, 5'(rs2), 5'(rs1), 3'(f3), 5'(rd));
    end else if (k < 72) begin
      f3 = $urandom_range(0, 4);
      if (f3 == 3) f3 = 5;
      off = 4 * $urandom_range(0, 63);
      if (f3 == 0 || f3 == 4) off += $urandom_range(0, 3);
      if (f3 == 1 || f3 == 5) off += 2 * $urandom_range(0, 1);
      return i_type(7'b0000011, 12'(off), 5'(BASE), 3'(f3), 5'(rd));
    end else if (k < 82) begin
      f3 = $urandom_range(0, 2);
      off = 4 * $urandom_range(0, 63);
      if (f3 == 0) off += $urandom_range(0, 3);
      if (f3 == 1) off += 2 * $urandom_range(0, 1);
      return s_type(12'(off), 5'(rs2), 5'(BASE), 3'(f3));
    end else if (k < 95 && idx + 4 < n_total) begin
      f3 = $urandom_range(0, 5);
      if (f3 >= 2) f3 += 2;
      return b_type(13'(4 * $urandom_range(1, 3)), 5'(rs2), 5'(rs1), 3'(f3));
    end else if (idx + 4 < n_total) begin
      return JAL(($urandom_range(0, 1) == 1) ? 0 : rd, 4 * $urandom_range(1, 3));
    end
    return ADDI(rd, rs1, $urandom_range(0, 100));
  endfunction


  // Workload kernel: fills KN words with a linear congruential sequence (MUL),
  // bubble-sorts them with two nested backward loops (load-use on the
  // compare), then calls a checksum routine (MUL, REMU, return through
  // JALR). The array lives at base + 1024, clear of the random part's data.
  localparam int KN = 32;
  localparam int KARR = 32'h1400;

  function automatic int here();
    return prog.size();
  endfunction

  task automatic build_kernel();
    int l_fill, l_outer, l_inner, l_csum, l_cloop, p_call;
    prog.push_back(LUI(7, KARR >> 12));
    prog.push_back(ADDI(7, 7, KARR % 4096));
    prog.push_back(ADDI(6, 0, KN));
    prog.push_back(LUI(8, 32'h41C65));           // 1103515245
    prog.push_back(ADDI(8, 8, -403));
    prog.push_back(ADDI(5, 0, 1));
    l_fill = here();
    prog.push_back(ENABLE_M ? MUL(5, 5, 8) : ADD(5, 5, 8));
    prog.push_back(ADDI(5, 5, 1234));
    prog.push_back(i_type(7'b0010011, 12'd16, 5'd5, 3'd5, 5'd9));   // srli x9, x5, 16
    prog.push_back(SW(9, 7, 0));
    prog.push_back(ADDI(7, 7, 4));
    prog.push_back(ADDI(6, 6, -1));
    prog.push_back(BNE(6, 0, 4 * (l_fill - here())));
    prog.push_back(ADDI(10, 0, KN - 1));
    l_outer = here();
    prog.push_back(LUI(7, KARR >> 12));
    prog.push_back(ADDI(7, 7, KARR % 4096));
    prog.push_back(ADDI(11, 10, 0));
    l_inner = here();
    prog.push_back(LW(12, 7, 0));
    prog.push_back(LW(13, 7, 4));
    prog.push_back(b_type(13'd12, 5'd12, 5'd13, 3'd5));             // bge x13, x12, +12
    prog.push_back(SW(13, 7, 0));
    prog.push_back(SW(12, 7, 4));
    prog.push_back(ADDI(7, 7, 4));
    prog.push_back(ADDI(11, 11, -1));
    prog.push_back(BNE(11, 0, 4 * (l_inner - here())));
    prog.push_back(ADDI(10, 10, -1));
    prog.push_back(BNE(10, 0, 4 * (l_outer - here())));
    p_call = here();
    prog.push_back(JAL(1, 8));                                       // call csum
    prog.push_back(JAL(0, 4 * 12));                                  // skip the routine
    l_csum = here();
    prog.push_back(ADDI(4, 0, 0));
    prog.push_back(LUI(7, KARR >> 12));
    prog.push_back(ADDI(7, 7, KARR % 4096));
    prog.push_back(ADDI(6, 0, KN));
    l_cloop = here();
    prog.push_back(LW(3, 7, 0));
    prog.push_back(ADDI(7, 7, 4));
    prog.push_back(ADD(4, 4, 3));
    prog.push_back(ADDI(6, 6, -1));
    prog.push_back(BNE(6, 0, 4 * (l_cloop - here())));
    prog.push_back(ENABLE_M ? r_type(7'h01, 5'd3, 5'd4, 3'd7, 5'd4) : ADD(4, 4, 3)); // remu x4, x4, x3
    prog.push_back(JALR(0, 1, 0));
    if (l_csum != p_call + 2 || here() != p_call + 13) $fatal(1, "kernel layout");
  endtask

  initial begin
    void'($urandom(SEED));
    prog.push_back(ADDI(1, 0, 5));
    prog.push_back(ADDI(2, 1, 7));
    prog.push_back(ADD(3, 1, 2));
    prog.push_back(LUI(BASE, 1));
    prog.push_back(SW(3, BASE, 0));
    prog.push_back(LW(4, BASE, 0));
    prog.push_back(ADD(5, 4, 4));
    prog.push_back(AUIPC(6, 0));
    prog.push_back(ADDI(7, 6, 1));
    prog.push_back(ENABLE_M ? MUL(8, 5, 3) : SUB(8, 5, 3));
    prog.push_back(ENABLE_M ? MULH(9, 8, 8) : SUB(9, 8, 8));
    prog.push_back(ADD(10, 9, 1));
    prog.push_back(ENABLE_M ? DIV(11, 8, 1) : SUB(11, 8, 1));
    prog.push_back(ENABLE_M ? REM(12, 11, 2) : ADD(12, 11, 2));
    prog.push_back(ADDI(13, 0, 3));
    prog.push_back(ADDI(13, 13, -1));    // loop:
    prog.push_back(BNE(13, 0, -4));
    prog.push_back(JAL(1, 12));          // call func
    prog.push_back(ADDI(14, 1, 0));
    prog.push_back(JAL(0, 12));
    prog.push_back(ADDI(15, 0, 99));     // func:
    prog.push_back(JALR(0, 1, 0));
    if (KERNEL) begin
      build_kernel();
      kernel_end_pc = 4 * prog.size();
    end
    prog.push_back(LUI(BASE, 1));        // the directed part may have reused the base register
    for (int i = 0; i < NRAND; i++) prog.push_back(rand_instr(i, NRAND));
    halt_pc = 4 * prog.size();
    prog.push_back(JAL(0, 0));
    foreach (imem[i]) imem[i] = (i < prog.size()) ? prog[i] : 32'h0000_0013;
    foreach (dmem[i]) dmem[i] = '0;
    iss = new(WORDS);
  end

  // ---------------- checking ----------------
  typedef struct { logic [4:0] rd; logic [31:0] val; } wr_t;
  wr_t         exp_wr [$];
  longint      cycle, last_issue_cycle;
  logic [31:0] last_instr;
  bit          have_last, halted;
  int          halt_wait;
  int          n_fwd, n_fwd_load, n_fwd_c, n_hz_stall, n_multi, n_br_taken, n_br_not,
               n_jal, n_jalr, n_issued;
  int          hw_fwd, hw_stall, hw_redir;

  function automatic int expected_gap(logic [31:0] p, logic [31:0] c);
    int g;
    unique case (kind_of(p))
      K_JAL:            return STAGES - 1;
      K_BRANCH, K_JALR: return STAGES;
      K_MUL:            g = LAT_MUL;
      K_MULH:           g = LAT_MULH;
      K_DIV:            g = LAT_DIV;
      default:          g = 1;
    endcase
    if (!BYPASS && writes_rd(p) &&
        ((reads_rs1(c) && c[19:15] == p[11:7]) || (reads_rs2(c) && c[24:20] == p[11:7])))
      g++;
    return g;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cycle <= 0;
    end else begin
      cycle <= cycle + 1;
      if (!halted) begin
        hw_fwd   += int'(stat_fwd);
        hw_stall += int'(stat_hazard_stall);
        hw_redir += int'(stat_redirect);
      end
      if (trace_valid && !halted) begin
        logic [4:0]  wrd;
        logic [31:0] wval, exp_pc;
        bit          dep;
        exp_pc = iss.pc;
        checks++;
        if (trace_pc != exp_pc || trace_instr != prog[exp_pc/4]) begin
          failures++;
          $display("FAIL issue pc=%h instr=%h, expected pc=%h instr=%h",
                   trace_pc, trace_instr, exp_pc, prog[exp_pc/4]);
        end
        if (have_last) begin
          int g;
          g = expected_gap(last_instr, trace_instr);
          checks++;
          if (cycle - last_issue_cycle != longint'(g)) begin
            failures++;
            $display("FAIL timing at pc=%h: %0d cycles after %h, expected %0d",
                     trace_pc, cycle - last_issue_cycle, last_instr, g);
          end
          dep = writes_rd(last_instr) &&
                ((reads_rs1(trace_instr) && trace_instr[19:15] == last_instr[11:7]) ||
                 (reads_rs2(trace_instr) && trace_instr[24:20] == last_instr[11:7]));
          if (dep && !(kind_of(last_instr) inside {K_JAL, K_JALR})) begin
            if (BYPASS) begin
              n_fwd++;
              if (kind_of(last_instr) == K_LOAD) n_fwd_load++;
              if (kind_of(last_instr) == K_AUIPC) n_fwd_c++;
            end else n_hz_stall++;
          end
        end
        unique case (kind_of(trace_instr))
          K_MULH, K_DIV: n_multi++;
          K_JAL:         n_jal++;
          K_JALR:        n_jalr++;
          default: ;
        endcase
        if (int'(trace_pc) == kernel_end_pc) kernel_cycles = cycle;
        if (trace_pc == halt_pc) begin
          halted <= 1'b1;
        end else begin
          if (iss.step(trace_instr, wrd, wval)) exp_wr.push_back('{wrd, wval});
          if (kind_of(trace_instr) == K_BRANCH) begin
            if (iss.pc != trace_pc + 4) n_br_taken++; else n_br_not++;
          end
        end
        n_issued++;
        have_last        <= 1'b1;
        last_instr       <= trace_instr;
        last_issue_cycle <= cycle;
      end
      if (rf_we && rf_wa != 5'd0 && !done) begin
        checks++;
        if (exp_wr.size() == 0) begin
          failures++;
          $display("FAIL unexpected write x%0d=%h", rf_wa, rf_wd);
        end else begin
          wr_t e;
          e = exp_wr.pop_front();
          if (e.rd != rf_wa || e.val != rf_wd) begin
            failures++;
            $display("FAIL write x%0d=%h, expected x%0d=%h", rf_wa, rf_wd, e.rd, e.val);
          end
        end
      end
      if (halted && !done) begin
        halt_wait++;
        if (halt_wait == 10) begin
          int bad;
          checks++;
          if (exp_wr.size() != 0) begin
            failures++;
            $display("FAIL %0d register writes missing", exp_wr.size());
          end
          bad = 0;
          for (int i = 0; i < WORDS; i++) if (dmem[i] != iss.dmem[i]) bad++;
          checks++;
          if (bad != 0) begin
            failures++;
            $display("FAIL %0d data memory words differ", bad);
          end
          // the workload kernel must have left its array sorted
          if (KERNEL) begin
            checks++;
            bad = 0;
            for (int i = 0; i + 1 < KN; i++)
              if (dmem[KARR / 4 + i] > dmem[KARR / 4 + i + 1]) bad++;
            if (bad != 0) begin
              failures++;
              $display("FAIL kernel array not sorted");
            end
            $display("env kernel: %0d words sorted and summed, finished at cycle %0d", KN, kernel_cycles);
          end
          // the core's own event outputs must agree with the trace analysis
          checks++;
          if (hw_fwd != n_fwd || hw_stall != n_hz_stall || hw_redir != n_br_taken + n_br_not + n_jalr) begin
            failures++;
            $display("FAIL event counts: fwd %0d/%0d stalls %0d/%0d redirects %0d/%0d", hw_fwd, n_fwd,
                     hw_stall, n_hz_stall, hw_redir, n_br_taken + n_br_not + n_jalr);
          end
          // every mechanism of this configuration must have happened
          checks++;
          if ((ENABLE_M && n_multi == 0) || n_br_taken == 0 || n_br_not == 0 || n_jal == 0 || n_jalr == 0 ||
              (BYPASS && (n_fwd == 0 || n_fwd_load == 0 || n_fwd_c == 0)) ||
              (!BYPASS && n_hz_stall == 0)) begin
            failures++;
            $display("FAIL a mechanism never occurred");
          end
          $display("env stages=%0d bypass=%0d m=%0d lat=%0d/%0d/%0d: %0d instructions in %0d cycles; forwards=%0d (from load %0d, from C %0d) hazard_stalls=%0d multicycle=%0d branches taken=%0d not_taken=%0d jal=%0d jalr=%0d",
                   STAGES, BYPASS, ENABLE_M, LAT_MUL, LAT_MULH, LAT_DIV, n_issued, cycle, n_fwd, n_fwd_load, n_fwd_c, n_hz_stall,
                   n_multi, n_br_taken, n_br_not, n_jal, n_jalr);
          done <= 1'b1;
        end
      end
    end
  end
endmodule
