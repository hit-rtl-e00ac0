// mips_decoder_tb: checks the decoder on random words of every supported instruction
// (identity and flags against the MIPS-I tables in tb_mips_pkg) and on words with
// reserved opcodes, function codes, REGIMM codes and COP0 codes.
module mips_decoder_tb;
  import hit_pkg::*;
  import tb_mips_pkg::*;

  logic [31:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;

  mips_decoder dut (.instr, .dec);

  task automatic check(inst_id_e exp, string what);
    logic br;
    br = exp inside {I_JR, I_JALR, I_BLTZ, I_BGEZ, I_BLTZAL, I_BGEZAL, I_J, I_JAL,
                     I_BEQ, I_BNE, I_BLEZ, I_BGTZ};
    checks++;
    if (dec.id !== exp || dec.reserved !== (exp == I_RSVD) ||
        dec.syscall !== (exp == I_SYSCALL) || dec.brk !== (exp == I_BREAK) ||
        dec.eret !== (exp == I_ERET) || dec.branch !== br) begin
      failures++;
      $display("FAIL %s word=%h got id=%0d exp=%0d", what, instr, dec.id, exp);
    end
  endtask

  initial begin
    for (int i = 1; i <= num_ids(); i++) begin
      for (int r = 0; r < 40; r++) begin
        instr = enc(inst_id_e'(i));
        #1 check(inst_id_e'(i), "known");
      end
    end
    for (int r = 0; r < 500; r++) begin
      instr = reserved_word(6'h3F);
      #1 check(I_RSVD, "rsvd-op");
    end
    // reserved function codes under opcode 0
    for (int f = 0; f < 64; f++) begin
      if (f inside {0,2,3,4,6,7,8,9,12,13,16,17,18,19,24,25,26,27,32,33,34,35,36,37,38,39,42,43})
        continue;
      instr = {6'h00, 20'($urandom), 6'(f)};
      #1 check(I_RSVD, "rsvd-fn");
    end
    for (int t = 0; t < 32; t++) begin
      if (t inside {0, 1, 16, 17}) continue;
      instr = {6'h01, 5'($urandom), 5'(t), 16'($urandom)};
      #1 check(I_RSVD, "rsvd-regimm");
    end
    instr = {6'h10, 5'h10, 15'h0, 6'h01};
    #1 check(I_RSVD, "rsvd-cop0");
    instr = {6'h10, 5'h02, 21'h0};
    #1 check(I_RSVD, "rsvd-cop0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
