// coprocessor_tb: random instructions leaving MEM with random exception flags, ERETs and
// external interrupt requests, compared every cycle with a reference model of the
// exception unit (priority HIT > OVERF > ERINS > BREAK > SCALL > ITMAT, ITMAT only when
// enabled, handler addresses, EPC rule, mode save / restore). Also a directed check that
// the hidden interrupt taken in user mode with interrupts disabled leads to privileged
// mode at the user-zone vector. Counts every cause taken.
module coprocessor_tb;
  import hit_pkg::*;

  logic        clk = 0, rst_n = 0, mem_valid = 0, mem_eret = 0, it_mat = 0;
  logic [31:0] mem_pc = 0;
  exc_t        mem_exc = '0;
  logic        redirect, taken, priv, ie;
  logic [31:0] redirect_pc, epc;
  cause_e      taken_cause, cause;
  int checks = 0, failures = 0;
  int count [NUM_CAUSES];

  // reference state
  logic m_priv, m_ie, m_psave, m_isave;
  logic [31:0] m_epc;

  coprocessor dut (.clk, .rst_n, .mem_valid, .mem_pc, .mem_exc, .mem_eret, .it_mat,
                   .redirect, .redirect_pc, .taken, .taken_cause, .priv, .ie, .epc, .cause);

  always #5 clk = ~clk;

  task automatic step_and_check(string what);
    logic   e_taken, e_redirect;
    cause_e e_cause;
    logic [31:0] e_pc;
    e_taken = 0; e_cause = C_ITMAT; e_redirect = 0; e_pc = m_epc;
    if (mem_valid) begin
      e_taken = 1;
      if      (mem_exc.hit)   e_cause = C_HIT;
      else if (mem_exc.overf) e_cause = C_OVERF;
      else if (mem_exc.erins) e_cause = C_ERINS;
      else if (mem_exc.brk)   e_cause = C_BREAK;
      else if (mem_exc.scall) e_cause = C_SCALL;
      else if (it_mat && m_ie) e_cause = C_ITMAT;
      else e_taken = 0;
    end
    e_redirect = e_taken || (mem_valid && mem_eret);
    if (e_taken) e_pc = (e_cause == C_HIT)   ? 32'h0008_0000 :
                        (e_cause == C_ITMAT) ? 32'h8000_0200 : 32'h8000_0080;
    #1;
    checks++;
    if (taken !== e_taken || redirect !== e_redirect || (e_redirect && redirect_pc !== e_pc) ||
        (e_taken && taken_cause !== e_cause)) begin
      failures++;
      $display("FAIL %s: taken=%b/%b redirect=%b/%b pc=%h/%h cause=%0d/%0d", what, taken,
               e_taken, redirect, e_redirect, redirect_pc, e_pc, taken_cause, e_cause);
    end
    if (e_taken) count[e_cause]++;
    @(posedge clk);
    if (e_taken) begin
      m_psave = m_priv; m_isave = m_ie; m_priv = 1; m_ie = 0;
      m_epc = (e_cause == C_ITMAT) ? mem_pc : mem_pc + 4;
    end else if (mem_valid && mem_eret) begin
      m_priv = m_psave; m_ie = m_isave;
    end
    #1;
    checks++;
    if (priv !== m_priv || ie !== m_ie || epc !== m_epc || (e_taken && cause !== e_cause)) begin
      failures++;
      $display("FAIL %s state: priv=%b/%b ie=%b/%b epc=%h/%h", what, priv, m_priv, ie, m_ie,
               epc, m_epc);
    end
  endtask

  initial begin
    foreach (count[i]) count[i] = 0;
    m_priv = 1; m_ie = 0; m_psave = 0; m_isave = 1; m_epc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // directed: ERET into user mode, then the hidden interrupt with interrupts masked
    mem_valid = 1; mem_eret = 1; mem_pc = 32'h8000_0010;
    step_and_check("eret");
    checks++;
    if (priv !== 0 || ie !== 1) begin failures++; $display("FAIL not in user mode"); end
    mem_eret = 0; mem_exc = '0; mem_exc.hit = 1; mem_pc = 32'h0000_1000;
    it_mat = 1;
    step_and_check("hit");
    checks++;
    if (priv !== 1 || epc !== 32'h0000_1004) begin failures++; $display("FAIL hit entry"); end
    mem_exc = '0;
    step_and_check("itmat masked");
    it_mat = 0;
    // random
    for (int i = 0; i < 30000; i++) begin
      if (i % 100 == 0) begin
        // nested exceptions leave interrupts disabled for good: restart from reset
        rst_n = 0; mem_valid = 0; @(posedge clk); #1 rst_n = 1;
        m_priv = 1; m_ie = 0; m_psave = 0; m_isave = 1; m_epc = 0;
        mem_valid = 1; mem_exc = '0; mem_eret = 1;
        step_and_check("eret");
      end
      mem_valid = $urandom_range(0, 3) != 0;
      mem_pc    = {$urandom} & ~32'h3;
      mem_exc   = '0;
      case ($urandom_range(0, 15))
        0: mem_exc.hit   = 1;
        1: mem_exc.overf = 1;
        2: mem_exc.erins = 1;
        3: mem_exc.brk   = 1;
        4: mem_exc.scall = 1;
        5: mem_exc       = exc_t'($urandom);
        default: ;
      endcase
      mem_eret = (|mem_exc) ? 1'b0 : ($urandom_range(0, 3) == 0);
      it_mat   = $urandom_range(0, 5) == 0;
      step_and_check("random");
    end
    for (int c = 0; c < NUM_CAUSES; c++) begin
      checks++;
      if (count[c] == 0) begin failures++; $display("FAIL cause %0d never taken", c); end
    end
    $display("taken: ITMAT=%0d OVERF=%0d ERINS=%0d BREAK=%0d SCALL=%0d HIT=%0d",
             count[0], count[1], count[2], count[3], count[4], count[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
