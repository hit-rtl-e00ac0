// hit_inst_tb: checks the boot-instruction recogniser. Three copies are tested: the
// default mix of decoder reuse and opcode comparators, all elements by reuse, and all by
// opcode comparators. For every boot element and random words of every instruction,
// match[k] must be 1 exactly when the word is boot instruction k; reserved words must
// match nothing.
module hit_inst_tb;
  import hit_pkg::*;
  import tb_mips_pkg::*;

  localparam int N = BOOT_LEN_DEF;

  logic [31:0] instr;
  dec_t        dec;
  logic [N-1:0] m_mix, m_reuse, m_op, exp_m;
  int checks = 0, failures = 0;

  mips_decoder u_dec (.instr, .dec);
  hit_inst dut_mix (.instr, .dec_id(dec.id), .match(m_mix));
  hit_inst #(.REUSE('1)) dut_reuse (.instr, .dec_id(dec.id), .match(m_reuse));
  hit_inst #(.REUSE('0)) dut_op    (.instr, .dec_id(dec.id), .match(m_op));

  task automatic check(string what);
    checks++;
    if (m_mix !== exp_m || m_reuse !== exp_m || m_op !== exp_m) begin
      failures++;
      $display("FAIL %s word=%h exp=%b mix=%b reuse=%b op=%b", what, instr, exp_m,
               m_mix, m_reuse, m_op);
    end
  endtask

  initial begin
    for (int i = 1; i <= num_ids(); i++) begin
      for (int r = 0; r < 30; r++) begin
        instr = enc(inst_id_e'(i));
        for (int k = 0; k < N; k++) exp_m[k] = (BOOT_SEQ_DEF[k] == inst_id_e'(i));
        #1 check("known");
      end
    end
    for (int r = 0; r < 300; r++) begin
      instr = reserved_word(6'h3F);
      exp_m = '0;
      #1 check("reserved");
    end
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
