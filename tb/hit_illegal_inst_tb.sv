// hit_illegal_inst_tb: the illegal-instruction detector must fire exactly for valid words
// whose opcode is the Trojan's reserved opcode, and never for nulls or other opcodes.
module hit_illegal_inst_tb;
  import hit_pkg::*;

  logic        valid, illegal, exp;
  logic [31:0] instr;
  int checks = 0, failures = 0;

  hit_illegal_inst dut (.valid, .instr, .illegal);

  initial begin
    for (int op = 0; op < 64; op++) begin
      for (int r = 0; r < 20; r++) begin
        instr = {6'(op), 26'($urandom)};
        valid = 1'($urandom);
        exp   = valid && (op == 29);   // 0x1D
        #1;
        checks++;
        if (illegal !== exp) begin
          failures++;
          $display("FAIL op=%h valid=%b got=%b", op, valid, illegal);
        end
      end
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
