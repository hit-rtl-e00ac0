// hit_state_tb: drives the boot FSM with random valid / null cycles and match vectors
// biased towards the expected next element, and compares state and mask every cycle
// with a reference model: advance on a valid matching instruction, return to init on a
// valid non-matching one or after state N, hold on a null. Also checks the mask: all
// ones exactly in state N, unchanged across a null, and changing on most valid
// instructions even while the FSM stays in init (it must not keep quiet). Counts that
// every state was reached.
module hit_state_tb;
  import hit_pkg::*;

  localparam int N = BOOT_LEN_DEF;
  localparam int W = MASK_W_DEF;

  logic          clk = 0, rst_n = 0, valid;
  logic [N-1:0]  match;
  logic [W-1:0]  salt, prev_mask;
  int            init_valid = 0, init_toggles = 0;
  logic [3:0]    state;
  logic [W-1:0]  mask;
  int            ref_state;
  int checks = 0, failures = 0;
  int reached [N+1];

  hit_state dut (.clk, .rst_n, .valid, .match, .salt, .state, .mask);

  always #5 clk = ~clk;

  initial begin
    valid = 0; match = '0; ref_state = 0;
    foreach (reached[i]) reached[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      valid = ($urandom_range(0, 4) != 0);
      match = N'($urandom) & N'($urandom);
      salt  = W'($urandom);
      if (cyc % 4000 > 2000) match = '0;   // stretches of ordinary code: FSM stays in init
      else if (ref_state < N && $urandom_range(0, 9) < 8) match[ref_state] = 1'b1;
      else if (ref_state < N) match[ref_state] = 1'b0;
      prev_mask = mask;
      @(posedge clk);
      if (valid && ref_state == 0 && !match[0]) begin
        init_valid++;
        #1 if (mask != prev_mask) init_toggles++;
      end else #1;
      if (valid) ref_state = (ref_state < N && match[ref_state]) ? ref_state + 1 : 0;
      if (!valid) begin
        checks++;
        if (mask !== prev_mask) begin failures++; $display("FAIL cyc=%0d mask changed on a null", cyc); end
      end
      checks++;
      if (int'(state) != ref_state) begin
        failures++;
        $display("FAIL cyc=%0d state=%0d exp=%0d", cyc, state, ref_state);
      end
      reached[ref_state]++;
      checks++;
      if ((mask == '1) != (ref_state == N)) begin
        failures++;
        $display("FAIL cyc=%0d mask=%h in state %0d", cyc, mask, ref_state);
      end
    end
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (reached[i] == 0) begin failures++; $display("FAIL state %0d never reached", i); end
    end
    checks++;
    if (init_toggles * 10 < init_valid * 8) begin
      failures++;
      $display("FAIL mask changed on only %0d of %0d instructions in init", init_toggles, init_valid);
    end
    $display("mask toggled on %0d of %0d valid instructions in init", init_toggles, init_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
