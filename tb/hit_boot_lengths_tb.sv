// hit_boot_lengths_tb: the Trojan with boot sequences of 3, 6 and 9 instructions (the
// first 3, 6 or 9 elements of the default sequence), side by side on the same instruction
// stream. For each length: the full sequence followed by the illegal word triggers, a
// sequence one element short does not, and the illegal word alone does not.
module hit_boot_lengths_tb;
  import hit_pkg::*;
  import tb_mips_pkg::*;

  localparam inst_id_e [2:0] SEQ3 = BOOT_SEQ_DEF[2:0];
  localparam inst_id_e [5:0] SEQ6 = BOOT_SEQ_DEF[5:0];
  localparam inst_id_e [8:0] SEQ9 = BOOT_SEQ_DEF[8:0];

  logic        clk = 0, rst_n = 0, valid = 0;
  logic [31:0] instr = 0;
  dec_t        dec;
  logic [2:0]  hit;
  logic [1:0]  st3;
  logic [2:0]  st6;
  logic [3:0]  st9;
  logic [7:0]  m3, m6, m9;
  int checks = 0, failures = 0;

  mips_decoder u_dec (.instr, .dec);
  hit_trojan #(.BOOT_LEN(3), .BOOT_SEQ(SEQ3), .REUSE(3'b101)) t3 (
    .clk, .rst_n, .valid, .instr, .dec_id(dec.id), .hit_int(hit[0]), .state(st3), .mask(m3));
  hit_trojan #(.BOOT_LEN(6), .BOOT_SEQ(SEQ6), .REUSE(6'b011011)) t6 (
    .clk, .rst_n, .valid, .instr, .dec_id(dec.id), .hit_int(hit[1]), .state(st6), .mask(m6));
  hit_trojan #(.BOOT_LEN(9), .BOOT_SEQ(SEQ9), .REUSE(9'b101101101)) t9 (
    .clk, .rst_n, .valid, .instr, .dec_id(dec.id), .hit_int(hit[2]), .state(st9), .mask(m9));

  always #5 clk = ~clk;

  task automatic feed(logic [31:0] w, logic [2:0] exp, string what);
    valid = 1; instr = w;
    #1;
    checks++;
    if (hit !== exp) begin
      failures++;
      $display("FAIL %s: hit=%b expected %b", what, hit, exp);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int li = 0; li < 3; li++) begin
      automatic int len = 3 * (li + 1);
      // full sequence of this length
      for (int k = 0; k < len; k++) feed(enc(BOOT_SEQ_DEF[k]), 3'b000, "boot");
      // longer Trojans sharing the prefix are still in the middle of their sequence
      feed({6'h1D, 26'($urandom)}, 3'(1 << li), "trigger");
      // one short
      for (int k = 0; k < len - 1; k++) feed(enc(BOOT_SEQ_DEF[k]), 3'b000, "short");
      feed({6'h1D, 26'($urandom)}, 3'b000, "short-illegal");
      feed({6'h1D, 26'($urandom)}, 3'b000, "alone");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
