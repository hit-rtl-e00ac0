// pf_stage: PF (program fetch) stage, the program counter and its next-PC selection.
//
// One register. Each cycle the PC becomes, in this order of priority:
//   int_req ? int_addr : (jmp ? jmp_addr : pc + 4)
// so an address supplied by the coprocessor (interrupt handler, or the return address of
// ERET) always wins over a jump, which is what lets the hidden interrupt take the fetch
// away from whatever program is running. The priority rule is the source model's; the
// reset address and synchronous active-low reset are this design's. The instruction
// memory is read with pc in the same cycle (fetch is assumed never to stall).
module pf_stage #(
  parameter logic [31:0] RESET_PC = hit_pkg::RESET_PC_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        int_req,    // INT: redirect from the coprocessor
  input  logic [31:0] int_addr,   // TN: handler (or return) address
  input  logic        jmp,        // taken jump or branch
  input  logic [31:0] jmp_addr,   // JA: its target
  output logic [31:0] pc
);
  logic [31:0] pc_d;

  always_comb begin
    if (int_req)  pc_d = int_addr;
    else if (jmp) pc_d = jmp_addr;
    else          pc_d = pc + 32'd4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_d;
  end
endmodule
