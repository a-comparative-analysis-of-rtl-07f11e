// bit_pg -- pre-computation cell of a prefix adder.
//
// For one bit position it forms the generate term g = a AND b (the position
// produces a carry on its own) and the propagate term p = a XOR b (the
// position passes an incoming carry on). The XOR form of p is used, as in the
// adders this library describes, so the same p also gives the sum bit in the
// post-computation stage (s = p XOR carry-in).
//
// Interface: a, b are one bit of each operand; gp carries {g, p}.
// Timing: purely combinational, one AND and one XOR gate deep.
module bit_pg
  import ppa_pkg::*;
(
  input  logic a,
  input  logic b,
  output gp_t  gp
);

  always_comb begin
    gp.g = a & b;
    gp.p = a ^ b;
  end

endmodule
