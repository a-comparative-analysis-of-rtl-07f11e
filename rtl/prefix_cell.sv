// prefix_cell -- the prefix operator of a parallel prefix adder.
//
// It merges the generate/propagate pair of a more significant group (hi)
// with that of the adjacent or overlapping less significant group (lo):
//   g = hi.g OR (hi.p AND lo.g)    -- an AND-OR (AO21) gate
//   p = hi.p AND lo.p              -- an AND2 gate
// The operator is associative and idempotent, which is what lets the prefix
// trees evaluate it in parallel and with overlapping groups. The AND-OR plus
// AND gate split follows the cell-level adders this library reproduces; the
// RTL states only the Boolean function and leaves the choice of inverting or
// non-inverting cells, and any buffering, to synthesis.
//
// Interface: hi, lo are the two input pairs, gp the merged pair.
// Timing: purely combinational, one complex gate deep.
module prefix_cell
  import ppa_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t gp
);

  always_comb begin
    gp.g = hi.g | (hi.p & lo.g);
    gp.p = hi.p & lo.p;
  end

endmodule
