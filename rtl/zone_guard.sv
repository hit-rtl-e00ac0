// zone_guard: system-zone / user-zone protection of data accesses.
//
// Combinational. The address space is split into a user zone [0, USER_ZONE_TOP] and a
// system zone above it. In user mode (priv = 0) an access to the system zone is refused
// (grant = 0, fault = 1); in privileged mode every address is granted. This is the
// protection that keeps a user task inside its user zone and that the hidden privileged
// interrupt defeats: its handler, although placed in the user zone, runs with priv = 1.
// The split into zones follows the source model; the boundary address and the refusal
// signalled as a fault line (rather than an exception) are this design's choices.
module zone_guard #(
  parameter logic [31:0] USER_ZONE_TOP = hit_pkg::USER_ZONE_TOP_DEF
) (
  input  logic        priv,    // 1: privileged (kernel or hidden handler)
  input  logic        req,     // data access request
  input  logic [31:0] addr,
  output logic        grant,
  output logic        fault    // request refused
);
  logic in_user;
  assign in_user = (addr <= USER_ZONE_TOP);
  assign grant   = req && (priv || in_user);
  assign fault   = req && !priv && !in_user;
endmodule
