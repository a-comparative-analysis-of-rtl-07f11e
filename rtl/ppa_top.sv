// ppa_top -- the adder comparison set: the five parallel prefix adder
// families, each at the three operand widths that are compared (8, 16 and 32
// bits), fifteen adders in all.
//
// The adders are independent combinational blocks. The eight-bit adders
// share one operand pair, the sixteen-bit ones another and the 32-bit ones a
// third, so a single input vector exercises all five trees of one width at
// once and their results can be compared directly. The Knowles adder at each
// width uses the tree picked for that width ([2,1,1], [4,4,2,1],
// [16,2,2,2,1]).
//
// Interface: for each width W in {8, 16, 32}, operands aW, bW, and per
// family f (index ppa_pkg::arch_e: Brent-Kung, Kogge-Stone, Han-Carlson,
// Ladner-Fischer, Knowles) the result sumW[f] and carry out coutW[f].
// Timing: purely combinational; there are no clocks or registers, as in the
// adders being compared.
module ppa_top
  import ppa_pkg::*;
(
  input  logic [7:0]                 a8,
  input  logic [7:0]                 b8,
  output logic [NUM_ARCH-1:0][7:0]   sum8,
  output logic [NUM_ARCH-1:0]        cout8,
  input  logic [15:0]                a16,
  input  logic [15:0]                b16,
  output logic [NUM_ARCH-1:0][15:0]  sum16,
  output logic [NUM_ARCH-1:0]        cout16,
  input  logic [31:0]                a32,
  input  logic [31:0]                b32,
  output logic [NUM_ARCH-1:0][31:0]  sum32,
  output logic [NUM_ARCH-1:0]        cout32
);

  ppa_width_set #(.WIDTH(8)) u_w8 (
    .a(a8), .b(b8), .sum(sum8), .cout(cout8)
  );

  ppa_width_set #(.WIDTH(16)) u_w16 (
    .a(a16), .b(b16), .sum(sum16), .cout(cout16)
  );

  ppa_width_set #(.WIDTH(32)) u_w32 (
    .a(a32), .b(b32), .sum(sum32), .cout(cout32)
  );

endmodule
