// pf_stage_tb: random interrupt and jump requests; the PC must follow
// int ? TN : (jmp ? JA : pc + 4) with the interrupt first. Counts that interrupt and jump
// were requested together at least once.
module pf_stage_tb;
  logic        clk = 0, rst_n = 0, int_req = 0, jmp = 0;
  logic [31:0] int_addr = 0, jmp_addr = 0, pc, exp_pc;
  int checks = 0, failures = 0, both = 0;

  pf_stage dut (.clk, .rst_n, .int_req, .int_addr, .jmp, .jmp_addr, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pc !== 32'hBFC0_0000) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst_n = 1;
    exp_pc = 32'hBFC0_0000;
    for (int i = 0; i < 20000; i++) begin
      int_req  = $urandom_range(0, 7) == 0;
      jmp      = $urandom_range(0, 3) == 0;
      int_addr = $urandom;
      jmp_addr = $urandom;
      if (int_req && jmp) both++;
      @(posedge clk);
      exp_pc = int_req ? int_addr : jmp ? jmp_addr : exp_pc + 4;
      #1;
      checks++;
      if (pc !== exp_pc) begin
        failures++;
        $display("FAIL i=%0d int=%b jmp=%b pc=%h exp=%h", i, int_req, jmp, pc, exp_pc);
      end
    end
    checks++;
    if (both == 0) begin failures++; $display("FAIL interrupt and jump never together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
