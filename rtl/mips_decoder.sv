// mips_decoder: instruction decoder of the DI (decode) stage.
//
// Purely combinational. It classifies a 32-bit MIPS-I integer instruction word into an
// instruction identity (hit_pkg::inst_id_e) and a few control flags: reserved encoding,
// SYSCALL, BREAK, ERET and "may redirect the fetch" (jumps and branches). The identity is
// the decoder output that the Trojan's Inst unit reuses to recognise boot-sequence
// instructions without comparators of its own.
//
// The source model only names the decoder and relies on it providing a distinct output
// value for each instruction; the instruction set coverage (MIPS-I integer subset plus
// MFC0/MTC0/ERET) and the flags are this design's choice. Any encoding not listed,
// including the Trojan's reserved opcode, decodes to I_RSVD with reserved = 1.
module mips_decoder
  import hit_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);
  logic [5:0] op, fn;
  logic [4:0] rs, rt;
  inst_id_e   id;

  assign op = instr[31:26];
  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign fn = instr[5:0];

  always_comb begin
    id = I_RSVD;
    unique case (op)
      6'h00: unique case (fn)
        6'h00: id = I_SLL;   6'h02: id = I_SRL;   6'h03: id = I_SRA;   6'h04: id = I_SLLV;
        6'h06: id = I_SRLV;  6'h07: id = I_SRAV;  6'h08: id = I_JR;    6'h09: id = I_JALR;
        6'h0C: id = I_SYSCALL; 6'h0D: id = I_BREAK;
        6'h10: id = I_MFHI;  6'h11: id = I_MTHI;  6'h12: id = I_MFLO;  6'h13: id = I_MTLO;
        6'h18: id = I_MULT;  6'h19: id = I_MULTU; 6'h1A: id = I_DIV;   6'h1B: id = I_DIVU;
        6'h20: id = I_ADD;   6'h21: id = I_ADDU;  6'h22: id = I_SUB;   6'h23: id = I_SUBU;
        6'h24: id = I_AND;   6'h25: id = I_OR;    6'h26: id = I_XOR;   6'h27: id = I_NOR;
        6'h2A: id = I_SLT;   6'h2B: id = I_SLTU;
        default: id = I_RSVD;
      endcase
      6'h01: unique case (rt)
        5'h00: id = I_BLTZ;  5'h01: id = I_BGEZ;  5'h10: id = I_BLTZAL; 5'h11: id = I_BGEZAL;
        default: id = I_RSVD;
      endcase
      6'h02: id = I_J;     6'h03: id = I_JAL;   6'h04: id = I_BEQ;   6'h05: id = I_BNE;
      6'h06: id = I_BLEZ;  6'h07: id = I_BGTZ;  6'h08: id = I_ADDI;  6'h09: id = I_ADDIU;
      6'h0A: id = I_SLTI;  6'h0B: id = I_SLTIU; 6'h0C: id = I_ANDI;  6'h0D: id = I_ORI;
      6'h0E: id = I_XORI;  6'h0F: id = I_LUI;
      6'h10: begin
        if (rs == 5'h00)                    id = I_MFC0;
        else if (rs == 5'h04)               id = I_MTC0;
        else if (rs == 5'h10 && fn == 6'h18) id = I_ERET;
        else                                id = I_RSVD;
      end
      6'h20: id = I_LB;    6'h21: id = I_LH;    6'h22: id = I_LWL;   6'h23: id = I_LW;
      6'h24: id = I_LBU;   6'h25: id = I_LHU;   6'h26: id = I_LWR;
      6'h28: id = I_SB;    6'h29: id = I_SH;    6'h2A: id = I_SWL;   6'h2B: id = I_SW;
      6'h2E: id = I_SWR;
      default: id = I_RSVD;
    endcase
  end

  always_comb begin
    dec.id       = id;
    dec.reserved = (id == I_RSVD);
    dec.syscall  = (id == I_SYSCALL);
    dec.brk      = (id == I_BREAK);
    dec.eret     = (id == I_ERET);
    dec.branch   = id inside {I_JR, I_JALR, I_BLTZ, I_BGEZ, I_BLTZAL, I_BGEZAL,
                              I_J, I_JAL, I_BEQ, I_BNE, I_BLEZ, I_BGTZ};
  end
endmodule
