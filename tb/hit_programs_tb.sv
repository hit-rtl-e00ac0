// hit_programs_tb: the concealment experiment. Four random programs run back to back on
// hit_minimips at its default parameters, in user mode:
//   compute-intensive  arithmetic, logic, shifts, multiply / divide
//   jump-intensive     branches and jumps (taken at random, each skipping one filler)
//   memory-intensive   loads and stores of every width
//   control-intensive  branches, coprocessor moves, and the words that exercise the
//                      exception logic: 11 overflowing ADDs, 2 BREAK, 1 SYSCALL
// 12105 instructions in all. Four reserved words are inserted at random places, two of
// them carrying the Trojan's opcode. Each program also draws any instruction now and
// then, so the boot instructions do occur.
// Expected: the hidden interrupt never fires; the Trojan's words give ERINS like the
// other two; OVERF 11, BREAK 2, SCALL 1, ITMAT 0. The FSM state is compared every cycle
// with a reference model, and the number of times each state is entered is printed
// (init -> state1 -> ... -> state11). The Trojan's mask must change in at least half of
// the cycles, although the FSM hardly leaves init.
module hit_programs_tb;
  import hit_pkg::*;
  import tb_mips_pkg::*;

  localparam int N = BOOT_LEN_DEF;
  localparam int PROG_LEN [4] = '{3026, 3026, 3026, 3027};
  localparam logic [31:0] NOP_FILL = 32'h3400_0000;   // ORI r0, r0, 0

  logic        clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_rdata, di_pc, di_instr, epc;
  logic        di_valid, di_jump, ex_overflow, dmem_req, dmem_grant, dmem_fault;
  logic        it_mat = 0;
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

  logic [31:0] mem [logic [31:0]];
  bit          take [logic [31:0]];
  logic [31:0] end_pc;
  int          n_instr = 0;

  function automatic logic [31:0] mem_at(logic [31:0] a);
    return mem.exists(a) ? mem[a] : NOP_FILL;
  endfunction

  function automatic bit is_branch(inst_id_e id);
    return id inside {I_JR, I_JALR, I_BLTZ, I_BGEZ, I_BLTZAL, I_BGEZAL, I_J, I_JAL,
                      I_BEQ, I_BNE, I_BLEZ, I_BGTZ};
  endfunction

  function automatic inst_id_e pick(int kind);
    inst_id_e compute [] = '{I_ADDU, I_SUBU, I_ADDIU, I_MULT, I_MULTU, I_MFLO, I_MFHI,
                             I_DIV, I_DIVU, I_SLL, I_SRL, I_SRA, I_AND, I_OR, I_XOR,
                             I_NOR, I_SLT, I_SLTU, I_SLTI, I_ORI, I_ANDI, I_LUI, I_ADD};
    inst_id_e jump    [] = '{I_BEQ, I_BNE, I_BLEZ, I_BGTZ, I_BLTZ, I_BGEZ, I_J, I_JAL,
                             I_JR, I_JALR, I_ADDU, I_ADDIU, I_SLT};
    inst_id_e memory  [] = '{I_LW, I_SW, I_LB, I_LBU, I_LH, I_SB, I_SH, I_LW, I_SW,
                             I_ADDIU, I_LUI};
    inst_id_e control [] = '{I_BEQ, I_BNE, I_MFC0, I_MTC0, I_ADDU, I_ORI, I_SLT, I_J,
                             I_JR};
    inst_id_e id;
    if ($urandom_range(0, 99) < 4) id = inst_id_e'($urandom_range(1, num_ids()));
    else case (kind)
      0: id = compute[$urandom_range(0, compute.size() - 1)];
      1: id = jump[$urandom_range(0, jump.size() - 1)];
      2: id = memory[$urandom_range(0, memory.size() - 1)];
      default: id = control[$urandom_range(0, control.size() - 1)];
    endcase
    if (id inside {I_SYSCALL, I_BREAK, I_ERET}) id = I_ADDU;
    return id;
  endfunction

  task automatic put(inout logic [31:0] a, input logic [31:0] w);
    mem[a] = w;
    a += 4;
  endtask

  task automatic build();
    logic [31:0] a = 0;
    int rsvd [int], ctl [int];
    mem[RESET_PC_DEF]   = enc(I_ERET);
    mem[EXC_VECTOR_DEF] = enc(I_ERET);
    // four reserved words anywhere in the 12105, control-program extras in program 3
    for (int s = 0; s < 4; s++) begin
      int p;
      do p = $urandom_range(5, 12100); while (rsvd.exists(p));
      rsvd[p] = s;
    end
    for (int s = 0; s < 14; s++) begin
      int p;
      do p = $urandom_range(3, PROG_LEN[3] - 3); while (ctl.exists(p));
      ctl[p] = s;
    end
    for (int kind = 0; kind < 4; kind++) begin
      for (int i = 0; i < PROG_LEN[kind]; i++) begin
        inst_id_e id;
        logic [31:0] w;
        n_instr++;
        if (rsvd.exists(n_instr)) begin
          put(a, rsvd[n_instr] < 2 ? {6'h1D, 26'($urandom)} : reserved_word(6'h1D));
          continue;
        end
        if (kind == 3 && ctl.exists(i)) begin
          if (ctl[i] < 11) begin w = enc(I_ADD); w[10:6] = 5'd31; end
          else if (ctl[i] < 13) w = enc(I_BREAK);
          else w = enc(I_SYSCALL);
          put(a, w);
          continue;
        end
        id = pick(kind);
        w  = enc(id);
        if (id == I_ADD) w[10:6] = 5'($urandom_range(0, 30));
        put(a, w);
        if (is_branch(id)) begin
          if ($urandom_range(0, 1) == 1) take[a - 4] = 1;
          put(a, NOP_FILL);
        end
      end
    end
    end_pc = a;
  endtask

  assign imem_rdata = mem_at(imem_addr);

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
  assign dmem_req     = 1'b0;
  assign dmem_addr    = 32'h0;

  int checks = 0, failures = 0, cycle = 0, ref_state = 0, decoded = 0;
  int count [NUM_CAUSES];
  int entered [N+1];
  bit done = 0;
  int mask_toggles = 0;
  logic [7:0] prev_mask;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    checks++;
    if (int'(hit_state) != ref_state) begin
      failures++;
      $display("FAIL cycle %0d: state %0d, expected %0d", cycle, hit_state, ref_state);
    end
    if (di_valid) begin
      if (di_pc < 32'h8000_0000) decoded++;
      if (ref_state < N && is_inst(di_instr, BOOT_SEQ_DEF[ref_state])) begin
        ref_state++;
        entered[ref_state]++;
      end else ref_state = 0;
    end
    if (exc_taken) count[exc_cause]++;
    if (hit_mask != prev_mask) mask_toggles++;
    prev_mask = hit_mask;
    if (di_valid && di_pc == end_pc) done = 1;
  end

  initial begin
    foreach (count[i]) count[i] = 0;
    foreach (entered[i]) entered[i] = 0;
    build();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    checks += 6;
    if (count[C_HIT] != 0)   begin failures++; $display("FAIL hidden interrupt fired"); end
    if (count[C_ERINS] != 4) begin failures++; $display("FAIL ERINS %0d, expected 4", count[C_ERINS]); end
    if (count[C_OVERF] != 11) begin failures++; $display("FAIL OVERF %0d", count[C_OVERF]); end
    if (count[C_BREAK] != 2) begin failures++; $display("FAIL BREAK %0d", count[C_BREAK]); end
    if (count[C_SCALL] != 1) begin failures++; $display("FAIL SCALL %0d", count[C_SCALL]); end
    if (count[C_ITMAT] != 0) begin failures++; $display("FAIL ITMAT %0d", count[C_ITMAT]); end
    checks++;
    if (entered[1] == 0) begin failures++; $display("FAIL boot instructions never seen"); end
    $display("program instructions: %0d, decoded in user mode (branch fillers and re-fetches included): %0d",
             n_instr, decoded);
    $display("Trojan mask changed in %0d of %0d cycles", mask_toggles, cycle);
    checks++;
    if (mask_toggles * 2 < cycle) begin failures++; $display("FAIL Trojan mask keeps quiet"); end
    $write("FSM entries:");
    for (int k = 1; k <= N; k++) $write(" state%0d=%0d", k, entered[k]);
    $display("");
    $display("interrupts: ITMAT=%0d OVERF=%0d ERINS=%0d BREAK=%0d SCALL=%0d HIT=%0d",
             count[C_ITMAT], count[C_OVERF], count[C_ERINS], count[C_BREAK], count[C_SCALL],
             count[C_HIT]);
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
