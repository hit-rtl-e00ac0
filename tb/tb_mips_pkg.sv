// tb_mips_pkg: test-side helpers shared by the testbenches.
//
// enc() builds a MIPS-I instruction word for a given instruction identity, with its fixed
// fields set from the MIPS-I encoding tables and all free fields (registers, shift
// amount, immediate) random. It is written independently of the decoder and of the
// Trojan's opcode patterns, so the testbenches can check both against it.
package tb_mips_pkg;
  import hit_pkg::*;

  function automatic logic [31:0] enc(inst_id_e id);
    logic [31:0] w;
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt;
    w  = $urandom;
    op = 6'h00; fn = w[5:0]; rs = w[25:21]; rt = w[20:16];
    case (id)
      I_SLL:  fn = 6'd0;   I_SRL:  fn = 6'd2;   I_SRA:  fn = 6'd3;   I_SLLV: fn = 6'd4;
      I_SRLV: fn = 6'd6;   I_SRAV: fn = 6'd7;   I_JR:   fn = 6'd8;   I_JALR: fn = 6'd9;
      I_SYSCALL: fn = 6'd12; I_BREAK: fn = 6'd13;
      I_MFHI: fn = 6'd16;  I_MTHI: fn = 6'd17;  I_MFLO: fn = 6'd18;  I_MTLO: fn = 6'd19;
      I_MULT: fn = 6'd24;  I_MULTU: fn = 6'd25; I_DIV:  fn = 6'd26;  I_DIVU: fn = 6'd27;
      I_ADD:  fn = 6'd32;  I_ADDU: fn = 6'd33;  I_SUB:  fn = 6'd34;  I_SUBU: fn = 6'd35;
      I_AND:  fn = 6'd36;  I_OR:   fn = 6'd37;  I_XOR:  fn = 6'd38;  I_NOR:  fn = 6'd39;
      I_SLT:  fn = 6'd42;  I_SLTU: fn = 6'd43;
      I_BLTZ:   begin op = 6'd1; rt = 5'd0;  end
      I_BGEZ:   begin op = 6'd1; rt = 5'd1;  end
      I_BLTZAL: begin op = 6'd1; rt = 5'd16; end
      I_BGEZAL: begin op = 6'd1; rt = 5'd17; end
      I_J: op = 6'd2;   I_JAL: op = 6'd3;   I_BEQ: op = 6'd4;   I_BNE: op = 6'd5;
      I_BLEZ: op = 6'd6; I_BGTZ: op = 6'd7; I_ADDI: op = 6'd8;  I_ADDIU: op = 6'd9;
      I_SLTI: op = 6'd10; I_SLTIU: op = 6'd11; I_ANDI: op = 6'd12; I_ORI: op = 6'd13;
      I_XORI: op = 6'd14; I_LUI: op = 6'd15;
      I_MFC0: begin op = 6'd16; rs = 5'd0; end
      I_MTC0: begin op = 6'd16; rs = 5'd4; end
      I_ERET: begin op = 6'd16; rs = 5'd16; fn = 6'd24; end
      I_LB: op = 6'd32;  I_LH: op = 6'd33;  I_LWL: op = 6'd34; I_LW: op = 6'd35;
      I_LBU: op = 6'd36; I_LHU: op = 6'd37; I_LWR: op = 6'd38;
      I_SB: op = 6'd40;  I_SH: op = 6'd41;  I_SWL: op = 6'd42; I_SW: op = 6'd43;
      I_SWR: op = 6'd46;
      default: begin op = 6'd29; end   // a reserved opcode
    endcase
    return {op, rs, rt, w[15:6], fn};
  endfunction

  // A word whose opcode is reserved in MIPS-I (0x14..0x1F, 0x27, 0x2C, 0x2D, 0x2F,
  // 0x30..0x3F), never the given one.
  function automatic logic [31:0] reserved_word(logic [5:0] avoid);
    logic [5:0] op;
    do begin
      case ($urandom_range(0, 3))
        0: op = 6'(20 + $urandom_range(0, 11));
        1: op = 6'h27;
        2: op = 6'(44 + $urandom_range(0, 1));
        default: op = 6'(48 + $urandom_range(0, 15));
      endcase
    end while (op == avoid);
    return {op, 26'($urandom)};
  endfunction

  // True when word w is an instance of instruction id: its fixed fields equal those enc()
  // produces for id.
  function automatic bit is_inst(logic [31:0] w, inst_id_e id);
    logic [31:0] e, care;
    e = enc(id);
    case (e[31:26])
      6'h00:   care = 32'hFC00_003F;
      6'h01:   care = 32'hFC1F_0000;
      6'h10:   care = (e[25:21] == 5'h10) ? 32'hFFE0_003F : 32'hFFE0_0000;
      default: care = 32'hFC00_0000;
    endcase
    return (w & care) == (e & care);
  endfunction

  function automatic int num_ids();
    return int'(I_SWR);
  endfunction
endpackage
