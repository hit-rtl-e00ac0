// hit_state: the "State" unit of the Trojan, the boot-sequence finite state machine.
//
// States: 0 = init, 1..BOOT_LEN = state 1..N. Only valid instructions are read: a null
// (valid = 0, the bubble inserted after a jump or a flush) leaves the state unchanged,
// so a taken jump inside the boot sequence does not break it. On a valid instruction:
//   - in state k < N: go to k+1 if it is boot instruction k (match[k]), otherwise back
//     to init (a mismatch always returns to init, even if the instruction happens to be
//     the first boot instruction);
//   - in state N: back to init whatever it is. The instruction read in state N is the
//     one that can trigger the Trojan (see hit_mask), so a trigger is one-shot.
// Each state has its own MASK_W-bit mask (hit_pkg::mask_of_state); only state N holds
// the all-ones mask that lets the illegal instruction through. The mask is a register
// reloaded on every valid instruction from the next state and a few bits of that
// instruction (salt), so it toggles with the instruction stream instead of staying quiet
// until the last state; it holds on a null. The state machine, the per-state masks and a
// mask that flips with the input instructions follow the source model; the mask width,
// the mask formula, binary state encoding and the synchronous, active-low reset are this
// design's choices.
module hit_state
  import hit_pkg::*;
#(
  parameter int BOOT_LEN = BOOT_LEN_DEF,
  parameter int MASK_W   = MASK_W_DEF,
  localparam int SW      = $clog2(BOOT_LEN + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,    // a real (non-null) instruction is in decode
  input  logic [BOOT_LEN-1:0] match,    // from hit_inst
  input  logic [MASK_W-1:0]   salt,     // low bits of the instruction in decode
  output logic [SW-1:0]       state,    // 0 = init, k = state k
  output logic [MASK_W-1:0]   mask      // mask of the current state
);
  logic [SW-1:0] state_d;

  always_comb begin
    if (int'(state) < BOOT_LEN && match[state]) state_d = state + SW'(1);
    else                                        state_d = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      mask  <= MASK_W'(mask_of_state(0, BOOT_LEN, MASK_W, 32'd0));
    end else if (valid) begin
      state <= state_d;
      mask  <= MASK_W'(mask_of_state(int'(state_d), BOOT_LEN, MASK_W, 32'(salt)));
    end
  end

  initial begin
    assert (MASK_W >= 2 && MASK_W <= 32) else $error("MASK_W must be 2..32");
  end
endmodule
