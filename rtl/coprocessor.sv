// coprocessor: exception and interrupt unit, including the Trojan's hidden interrupt.
//
// It looks at the instruction leaving the MEM stage. If that instruction is valid and
// carries an exception, or the external interrupt line it_mat is high while interrupts
// are enabled, the unit redirects the fetch (redirect = 1, redirect_pc = handler address
// from its interrupt table), which also flushes every younger instruction, and in the
// same clock edge saves EPC, the cause and the previous mode, and enters privileged mode
// with interrupts disabled. Priority, highest first: HIT, OVERF, ERINS, BREAK, SCALL,
// then ITMAT. HIT is non-maskable, and its handler address (HIT_VECTOR) is held in this
// unit and points into the user zone; the other handlers are in the system zone. An
// ERET reaching MEM without exception redirects to EPC and restores the saved mode and
// interrupt enable.
//
// EPC is the address after the excepting instruction for the synchronous causes (the
// instruction is dropped and execution resumes after it) and the address of the
// interrupted instruction for ITMAT (it is re-executed). After reset the unit is in
// privileged mode, interrupts disabled, EPC = EPC_RESET and the saved mode "user,
// interrupts enabled", so a first ERET starts the first user task.
//
// What follows the source model: the cause names, a hidden interrupt that is
// non-maskable and privileged, whose ID and handler address are stored in the hardware,
// whose handler is in the user zone, and whose address the PF stage takes before any
// other. The priority order, the vector addresses, the EPC rule, the reset state and
// the one-level mode stack are this design's choices.
module coprocessor
  import hit_pkg::*;
#(
  parameter logic [31:0] EXC_VECTOR   = EXC_VECTOR_DEF,
  parameter logic [31:0] ITMAT_VECTOR = ITMAT_VECTOR_DEF,
  parameter logic [31:0] HIT_VECTOR   = HIT_VECTOR_DEF,
  parameter logic [31:0] EPC_RESET    = EPC_RESET_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_valid,    // instruction leaving MEM is real
  input  logic [31:0] mem_pc,
  input  exc_t        mem_exc,      // its exception flags
  input  logic        mem_eret,     // it is an ERET
  input  logic        it_mat,       // external hardware interrupt (level)
  output logic        redirect,     // INT to the PF stage; flushes the pipeline
  output logic [31:0] redirect_pc,  // TN
  output logic        taken,        // an exception or interrupt is entered this cycle
  output cause_e      taken_cause,
  output logic        priv,         // 1: privileged mode
  output logic        ie,           // interrupt (ITMAT) enable
  output logic [31:0] epc,
  output cause_e      cause         // cause of the last exception entered
);
  logic   sync_exc;
  cause_e sel;
  logic   priv_save, ie_save;

  // Interrupt table: one handler address per interrupt ID.
  function automatic logic [31:0] vector_of(cause_e c);
    unique case (c)
      C_HIT:   return HIT_VECTOR;
      C_ITMAT: return ITMAT_VECTOR;
      default: return EXC_VECTOR;
    endcase
  endfunction

  always_comb begin
    sync_exc = mem_valid && (|mem_exc);
    if      (mem_exc.hit)   sel = C_HIT;
    else if (mem_exc.overf) sel = C_OVERF;
    else if (mem_exc.erins) sel = C_ERINS;
    else if (mem_exc.brk)   sel = C_BREAK;
    else if (mem_exc.scall) sel = C_SCALL;
    else                    sel = C_ITMAT;
    taken       = sync_exc || (mem_valid && it_mat && ie);
    taken_cause = sel;
    redirect    = taken || (mem_valid && mem_eret);
    redirect_pc = taken ? vector_of(sel) : epc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      priv      <= 1'b1;
      ie        <= 1'b0;
      priv_save <= 1'b0;   // an ERET after reset starts the first task in user mode
      ie_save   <= 1'b1;
      epc       <= EPC_RESET;
      cause     <= C_ITMAT;
    end else if (taken) begin
      priv_save <= priv;
      ie_save   <= ie;
      priv      <= 1'b1;
      ie        <= 1'b0;
      epc       <= sync_exc ? mem_pc + 32'd4 : mem_pc;
      cause     <= sel;
    end else if (mem_valid && mem_eret) begin
      priv <= priv_save;
      ie   <= ie_save;
    end
  end
endmodule
