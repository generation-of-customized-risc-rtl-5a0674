// tb_rv_regfile: random writes and reads against an array model; x0 must
// read zero, a write is visible from the next cycle. Also RV32E (16 entries).
//
// The expected behaviour is that of a RISC-V register file with x0 fixed.
module tb_rv_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0]  ra1, ra2, wa;
  logic        we;
  logic [31:0] wd, rd1, rd2, rd1e, rd2e;
  logic [31:0] model [32];

  rv_regfile dut (.clk_i(clk), .ra1_i(ra1), .rd1_o(rd1), .ra2_i(ra2), .rd2_o(rd2),
                  .we_i(we), .wa_i(wa), .wd_i(wd));
  rv_regfile #(.NREGS(16)) dut_e (.clk_i(clk), .ra1_i(ra1), .rd1_o(rd1e), .ra2_i(ra2), .rd2_o(rd2e),
                  .we_i(we && wa < 16), .wa_i(wa), .wd_i(wd));

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    // initialise every register through the write port
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wa = 5'(r); wd = $urandom;
      model[r] = (r == 0) ? 32'd0 : wd;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 1) == 1);
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = 5'($urandom);
      ra2 = (i % 7 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 != model[ra1] || rd2 != model[ra2]) begin
        failures++;
        $display("FAIL read x%0d=%h x%0d=%h, expected %h %h", ra1, rd1, ra2, rd2, model[ra1], model[ra2]);
      end
      if (ra1 < 16) begin
        checks++;
        if (rd1e != model[ra1]) begin failures++; $display("FAIL RV32E read x%0d", ra1); end
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
