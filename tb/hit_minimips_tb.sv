// hit_minimips_tb: end-to-end run of the processor front end with the Trojan, at the
// default parameters.
//
// The testbench plays the parts that are not in the design: the instruction memory (an
// associative array), the branch unit (it decides which branches are taken), the EX
// overflow flag and a data access that is always aimed at the system zone.
//
// Program:
//   reset vector      ERET                     -> first user task at address 0, user mode
//   exception vector  ERET                     (ERINS, BREAK, SCALL, OVERF handler)
//   ITMAT vector      ERET
//   user task, part 1 12105 random instructions (rare ones, among them the 11 boot
//                     instructions, drawn less often), with 2 Trojan illegal words and 2
//                     other reserved words, 2 BREAK, 1 SYSCALL and 11 ADDs flagged as
//                     overflowing inserted at random places; branches are taken at random
//                     and skip one filler word. The external interrupt is raised 3 times.
//   user task, part 2 SYSCALL whose exception meets a taken branch in decode (interrupt
//                     beats jump), then the boot sequence with its two branches (BLTZAL, BGEZAL) taken
//                     (each skipping a word that would break the sequence if it were read),
//                     then the Trojan's illegal word -> hidden interrupt.
//   HIT handler       in the user zone: 5 words during which the external interrupt is
//                     raised (it must stay masked), then ERET back to the user task.
// Checked: the FSM state against a reference model run on the decoded stream; every
// decoded word against memory; the privilege level by zone of the decoded pc; data
// access grant / fault against the privilege level; the number of exceptions of each
// cause (part 1 must never produce the hidden interrupt, and its illegal words must give
// ERINS); that the Trojan's mask keeps toggling while its FSM sits in init; the 3-cycle
// latency from decoding the triggering word to fetching the handler.
// Every mechanism is counted and must have occurred.
module hit_minimips_tb;
  import hit_pkg::*;
  import tb_mips_pkg::*;

  localparam int N        = BOOT_LEN_DEF;
  localparam int RAND_LEN = 12105;
  localparam logic [31:0] HIT_VEC = HIT_VECTOR_DEF;

  logic        clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_rdata, di_pc, di_instr, epc;
  logic        di_valid, di_jump, ex_overflow, dmem_req, dmem_grant, dmem_fault, it_mat;
  logic [31:0] di_jump_addr, dmem_addr;
  logic [3:0]  hit_state;
  logic [7:0]  hit_mask;
  logic        exc_taken, priv, ie;
  cause_e      exc_cause, last_cause;

  hit_minimips dut (
    .clk, .rst_n, .imem_addr, .imem_rdata, .di_valid, .di_pc, .di_instr, .di_jump,
    .di_jump_addr, .ex_overflow, .dmem_req, .dmem_addr, .dmem_grant, .dmem_fault, .it_mat,
    .hit_state, .hit_mask, .exc_taken, .exc_cause, .priv, .ie, .epc, .last_cause);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- program
  logic [31:0] mem [logic [31:0]];
  bit          take [logic [31:0]];   // branch addresses the branch unit takes
  logic [31:0] end_pc, trig_pc, hit_handler_end;
  int exp_count [NUM_CAUSES];

  localparam logic [31:0] NOP_FILL = 32'h3400_0000;   // ORI r0, r0, 0

  function automatic logic [31:0] plain_add();
    logic [31:0] w;
    w = enc(I_ADD);
    w[10:6] = 5'($urandom_range(0, 30));               // shamt 31 marks an overflow
    return w;
  endfunction

  function automatic inst_id_e random_id();
    int r;
    r = $urandom_range(0, 999);
    // common instructions most of the time, any instruction now and then
    if (r < 960) begin
      inst_id_e common [] = '{I_ADDU, I_ADDIU, I_LW, I_SW, I_OR, I_AND, I_SLL, I_SLT,
                              I_LUI, I_ORI, I_BEQ, I_BNE, I_SUBU, I_ANDI, I_LB, I_SB,
                              I_ADD, I_J, I_JAL, I_JR, I_SRL, I_XOR, I_MFLO, I_MULT};
      return common[$urandom_range(0, common.size() - 1)];
    end
    return inst_id_e'($urandom_range(1, num_ids()));
  endfunction

  task automatic put(inout logic [31:0] a, input logic [31:0] w);
    mem[a] = w;
    a += 4;
  endtask

  task automatic build_program();
    logic [31:0] a;
    int          special [int];
    inst_id_e    id;
    mem[RESET_PC_DEF]     = enc(I_ERET);
    mem[EXC_VECTOR_DEF]   = enc(I_ERET);
    mem[ITMAT_VECTOR_DEF] = enc(I_ERET);
    // special words of part 1 at random distinct positions
    for (int s = 0; s < 2 + 2 + 2 + 1 + 11; s++) begin
      int p;
      do p = $urandom_range(5, RAND_LEN - 5); while (special.exists(p));
      special[p] = s;
    end
    a = 32'h0;
    for (int i = 0; i < RAND_LEN; i++) begin
      if (special.exists(i)) begin
        int s = special[i];
        if      (s < 2)  put(a, {6'h1D, 26'($urandom)});
        else if (s < 4)  put(a, reserved_word(6'h1D));
        else if (s < 6)  put(a, enc(I_BREAK));
        else if (s < 7)  put(a, enc(I_SYSCALL));
        else begin
          logic [31:0] w = enc(I_ADD);
          w[10:6] = 5'd31;
          put(a, w);
        end
        continue;
      end
      id = random_id();
      if (id inside {I_SYSCALL, I_BREAK, I_ERET}) id = I_ADDU;
      if (id == I_ADD) put(a, plain_add());
      else             put(a, enc(id));
      if (id inside {I_JR, I_JALR, I_BLTZ, I_BGEZ, I_BLTZAL, I_BGEZAL, I_J, I_JAL,
                     I_BEQ, I_BNE, I_BLEZ, I_BGTZ}) begin
        if ($urandom_range(0, 1) == 1) take[a - 4] = 1;
        put(a, NOP_FILL);
      end
    end
    // part 2: exception meets taken branch
    put(a, enc(I_SYSCALL));
    put(a, NOP_FILL);
    take[a] = 1;
    put(a, enc(I_BEQ));
    put(a, NOP_FILL);
    put(a, NOP_FILL);
    put(a, NOP_FILL);
    // boot sequence, branches at elements 1 and 8 taken, each over a breaking word
    for (int k = 0; k < N; k++) begin
      put(a, enc(BOOT_SEQ_DEF[k]));
      if (BOOT_SEQ_DEF[k] inside {I_BLTZAL, I_BGEZAL}) begin
        take[a - 4] = 1;
        put(a, enc(I_ADDU));
      end
    end
    trig_pc = a;
    put(a, {6'h1D, 26'($urandom)});
    put(a, NOP_FILL);
    put(a, NOP_FILL);
    end_pc = a;
    put(a, NOP_FILL);
    // HIT handler
    a = HIT_VEC;
    repeat (5) put(a, NOP_FILL);
    hit_handler_end = a;
    put(a, enc(I_ERET));
    // expected exceptions (ITMAT: 3 in part 1, 1 after the handler)
    exp_count[C_ITMAT] = 4;
    exp_count[C_OVERF] = 11;
    exp_count[C_ERINS] = 4;
    exp_count[C_BREAK] = 2;
    exp_count[C_SCALL] = 2;
    exp_count[C_HIT]   = 1;
  endtask

  function automatic logic [31:0] mem_at(logic [31:0] a);
    return mem.exists(a) ? mem[a] : NOP_FILL;
  endfunction

  assign imem_rdata = mem_at(imem_addr);

  // ---------------------------------------------------------------- environment
  logic [31:0] prev_di_instr;
  logic        prev_di_valid;
  always_ff @(posedge clk) begin
    prev_di_valid <= di_valid;
    prev_di_instr <= di_instr;
  end
  assign ex_overflow  = prev_di_valid && prev_di_instr[31:26] == 6'h00 &&
                        prev_di_instr[5:0] == 6'h20 && prev_di_instr[10:6] == 5'd31;
  assign di_jump      = di_valid && take.exists(di_pc);
  assign di_jump_addr = di_pc + 32'd8;
  assign dmem_req     = 1'b1;
  assign dmem_addr    = 32'h9000_0000;   // in the system zone

  // ---------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  int count [NUM_CAUSES];
  int ref_state = 0, cycle = 0;
  int entered [N+2];
  int n_break_seq = 0, n_null_in_seq = 0, n_illegal_no_boot = 0, n_int_vs_jump = 0;
  int n_itmat_masked = 0, n_denied = 0, n_granted_handler = 0, n_jumps = 0;
  int trig_cycle = -1, n_latency_ok = 0, n_mask_toggle_init = 0;
  logic [7:0] prev_mask;
  logic [3:0] prev_state;
  bit in_part2 = 0;
  bit done = 0;
  int itmat_left = 3, itmat_at = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  // external interrupt driver
  always_ff @(posedge clk) begin
    if (!rst_n) it_mat <= 1'b0;
    else if (exc_taken && exc_cause == C_ITMAT) it_mat <= 1'b0;
    else if (!priv && itmat_left > 0 && cycle == itmat_at) begin
      it_mat <= 1'b1;
      itmat_left--;
    end else if (di_valid && di_pc == HIT_VEC) it_mat <= 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    // decoded word must be the memory word at its pc
    if (di_valid) begin
      checks++;
      if (di_instr !== mem_at(di_pc))
        fail($sformatf("decoded %h at %h, memory holds another word", di_instr, di_pc));
    end
    // FSM reference
    checks++;
    if (int'(hit_state) != ref_state) fail($sformatf("state %0d, expected %0d", hit_state, ref_state));
    if (!di_valid && ref_state > 0) n_null_in_seq++;
    if (di_valid && di_instr[31:26] == 6'h1D && ref_state != N) n_illegal_no_boot++;
    if (di_valid && di_instr[31:26] == 6'h1D && ref_state == N) begin
      trig_cycle = cycle;
      checks++;
      if (di_pc != trig_pc) fail("Trojan armed at an unexpected place");
    end
    if (di_valid) begin
      if (ref_state < N && is_inst(di_instr, BOOT_SEQ_DEF[ref_state])) begin
        ref_state++;
        entered[ref_state]++;
      end else begin
        if (ref_state > 0 && ref_state < N) n_break_seq++;
        ref_state = 0;
      end
    end
    // hidden interrupt latency: handler fetched 3 cycles after the trigger is decoded
    if (trig_cycle >= 0 && cycle == trig_cycle + 3) begin
      checks++;
      if (imem_addr !== HIT_VEC) fail($sformatf("pc %h, handler expected", imem_addr));
      else n_latency_ok++;
    end
    // privilege by zone of the decoded instruction
    if (di_valid) begin
      checks++;
      if (di_pc < HIT_VEC && priv !== 1'b0) fail("user task running privileged");
      if (di_pc >= HIT_VEC && priv !== 1'b1) fail("handler / kernel not privileged");
      if (di_pc >= trig_pc - 64 && di_pc < HIT_VEC) in_part2 = 1;
    end
    // data access protection
    checks++;
    if (dmem_grant !== priv || dmem_fault !== !priv) fail("zone guard disagrees with mode");
    if (dmem_fault) n_denied++;
    if (dmem_grant && di_valid && di_pc >= HIT_VEC && di_pc < hit_handler_end) n_granted_handler++;
    // exceptions
    if (exc_taken) begin
      count[exc_cause]++;
      if (exc_cause == C_HIT) begin
        checks++;
        if (!in_part2) fail("hidden interrupt from the random program");
      end
    end
    if (it_mat && !ie) n_itmat_masked++;
    if (exc_taken && di_jump && di_valid) n_int_vs_jump++;
    if (di_jump) n_jumps++;
    if (prev_state == 0 && hit_state == 0 && hit_mask != prev_mask) n_mask_toggle_init++;
    prev_mask  = hit_mask;
    prev_state = hit_state;
    if (di_valid && di_pc == end_pc) done = 1;
  end

  initial begin
    foreach (count[i]) count[i] = 0;
    foreach (entered[i]) entered[i] = 0;
    itmat_at = $urandom_range(2000, 4000);
    build_program();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      forever begin
        @(posedge clk);
        if (itmat_left > 0 && cycle > itmat_at) itmat_at = cycle + $urandom_range(2000, 3000);
      end
    join_none
    wait (done);
    repeat (5) @(posedge clk);
    for (int c = 0; c < NUM_CAUSES; c++) begin
      checks++;
      if (count[c] != exp_count[c])
        fail($sformatf("cause %0d taken %0d times, expected %0d", c, count[c], exp_count[c]));
    end
    checks += 11;
    if (n_mask_toggle_init == 0) fail("mask never toggled in init");
    if (entered[N] == 0)        fail("boot sequence never completed");
    if (n_break_seq == 0)       fail("boot sequence never broken");
    if (n_null_in_seq == 0)     fail("no null inside a boot sequence");
    if (n_illegal_no_boot < 2)  fail("illegal word without boot sequence not seen");
    if (n_int_vs_jump == 0)     fail("interrupt and jump never met");
    if (n_itmat_masked == 0)    fail("external interrupt never masked");
    if (n_denied == 0)          fail("no user access refused");
    if (n_granted_handler == 0) fail("handler never granted a system access");
    if (n_jumps == 0)           fail("no jump taken");
    if (n_latency_ok != 1)      fail("hidden interrupt latency not seen");
    $display("FSM states entered (init -> state k):");
    for (int k = 1; k <= N; k++) $display("  state%0d: %0d", k, entered[k]);
    $display("interrupts: ITMAT=%0d OVERF=%0d ERINS=%0d BREAK=%0d SCALL=%0d HIT=%0d",
             count[C_ITMAT], count[C_OVERF], count[C_ERINS], count[C_BREAK], count[C_SCALL],
             count[C_HIT]);
    $display("mechanisms: break=%0d null_in_seq=%0d illegal_no_boot=%0d int_vs_jump=%0d itmat_masked=%0d denied=%0d granted_in_handler=%0d jumps=%0d mask_toggles_in_init=%0d cycles=%0d",
             n_break_seq, n_null_in_seq, n_illegal_no_boot, n_int_vs_jump, n_itmat_masked,
             n_denied, n_granted_handler, n_jumps, n_mask_toggle_init, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
