// hit_trojan_tb: feeds instruction words through the decoder into the Trojan.
//  1. full boot sequence, then the illegal instruction: hit_int on that instruction;
//  2. the same with nulls (valid = 0) scattered inside the sequence: still triggers;
//  3. the illegal instruction alone, after a partial sequence, or after the full
//     sequence with one instruction in between: no hit_int;
//  4. a broken sequence (wrong instruction at a random position) then illegal: none;
//  5. random traffic: hit_int must only ever come out right after a full sequence,
//     compared with a reference state model.
module hit_trojan_tb;
  import hit_pkg::*;
  import tb_mips_pkg::*;

  localparam int N = BOOT_LEN_DEF;

  logic        clk = 0, rst_n = 0, valid = 0, hit_int;
  logic [31:0] instr = 0;
  dec_t        dec;
  logic [3:0]  state;
  logic [7:0]  mask;
  int checks = 0, failures = 0, triggers = 0, ref_state = 0;

  mips_decoder u_dec (.instr, .dec);
  hit_trojan dut (.clk, .rst_n, .valid, .instr, .dec_id(dec.id), .hit_int, .state, .mask);

  always #5 clk = ~clk;

  function automatic logic [31:0] illegal_word();
    return {6'h1D, 26'($urandom)};
  endfunction

  // Present one word for one cycle; check hit_int against the expectation.
  task automatic feed(logic v, logic [31:0] w, logic exp_hit, string what);
    logic is_boot;
    valid = v; instr = w;
    #1;
    checks++;
    if (hit_int !== exp_hit) begin
      failures++;
      $display("FAIL %s: word=%h state=%0d hit_int=%b exp=%b", what, w, state, hit_int, exp_hit);
    end
    if (hit_int) triggers++;
    is_boot = (ref_state < N) && (dec.id == BOOT_SEQ_DEF[ref_state]);
    @(posedge clk);
    if (v) ref_state = is_boot ? ref_state + 1 : 0;
    #1;
    checks++;
    if (int'(state) != ref_state) begin
      failures++;
      $display("FAIL %s: state=%0d exp=%0d", what, state, ref_state);
    end
  endtask

  task automatic boot(int upto, logic with_nulls);
    for (int k = 0; k < upto; k++) begin
      if (with_nulls) while ($urandom_range(0, 2) == 0) feed(0, $urandom, 0, "null");
      feed(1, enc(BOOT_SEQ_DEF[k]), 0, "boot");
    end
  endtask

  function automatic inst_id_e other_than(inst_id_e x);
    inst_id_e y;
    do y = inst_id_e'($urandom_range(1, num_ids())); while (y == x);
    return y;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1
    boot(N, 0); feed(1, illegal_word(), 1, "trigger");
    // 2
    repeat (5) begin boot(N, 1); feed(0, 0, 0, "null"); feed(1, illegal_word(), 1, "trigger-nulls"); end
    // 3
    feed(1, illegal_word(), 0, "alone");
    for (int p = 0; p < N; p++) begin boot(p, 0); feed(1, illegal_word(), 0, "partial"); end
    boot(N, 0); feed(1, enc(I_ADDU), 0, "between"); feed(1, illegal_word(), 0, "late");
    // 4
    for (int p = 0; p < N; p++) begin
      boot(p, 0);
      feed(1, enc(other_than(BOOT_SEQ_DEF[p])), 0, "wrong");
      for (int k = p + 1; k < N; k++) feed(1, enc(BOOT_SEQ_DEF[k]), 0, "rest");
      feed(1, illegal_word(), 0, "broken");
    end
    // 5
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] w;
      logic v, e;
      v = $urandom_range(0, 5) != 0;
      case ($urandom_range(0, 9))
        0, 1, 2, 3, 4: w = (ref_state < N) ? enc(BOOT_SEQ_DEF[ref_state]) : illegal_word();
        5:             w = illegal_word();
        default:       w = enc(inst_id_e'($urandom_range(1, num_ids())));
      endcase
      e = v && ref_state == N && w[31:26] == 6'h1D;
      feed(v, w, e, "random");
    end
    checks++;
    if (triggers < 7) begin failures++; $display("FAIL only %0d triggers", triggers); end
    $display("triggers=%0d", triggers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
