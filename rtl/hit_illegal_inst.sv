// hit_illegal_inst: the "Illegal Inst" unit of the Trojan.
//
// Combinational. Raises illegal when a valid instruction in decode carries the Trojan's
// reserved opcode ILLEGAL_OPCODE in bits 31:26. As in the source model the illegal
// instruction is recognised by its code alone (one opcode out of 64, so its occurrence
// probability is 1/64); which reserved opcode is used is this design's choice.
module hit_illegal_inst
  import hit_pkg::*;
#(
  parameter logic [5:0] ILLEGAL_OPCODE = ILLEGAL_OPCODE_DEF
) (
  input  logic        valid,
  input  logic [31:0] instr,
  output logic        illegal
);
  assign illegal = valid && (instr[31:26] == ILLEGAL_OPCODE);
endmodule
