// ppa_width_set -- the five prefix adder families at one operand width, fed
// with the same operands.
//
// Brent-Kung, Kogge-Stone, Han-Carlson, Ladner-Fischer and Knowles adders of
// WIDTH bits sit side by side; result f of sum/cout belongs to family f in
// the order of ppa_pkg::arch_e. The Knowles adder takes the default tree for
// WIDTH (ppa_pkg::knowles_default).
//
// Interface: a, b operands; sum[f], cout[f] per family.
// Timing: combinational.
module ppa_width_set
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 32
)
(
  input  logic [WIDTH-1:0]               a,
  input  logic [WIDTH-1:0]               b,
  output logic [NUM_ARCH-1:0][WIDTH-1:0] sum,
  output logic [NUM_ARCH-1:0]            cout
);

  brent_kung_adder #(.WIDTH(WIDTH)) u_bk (
    .a(a), .b(b), .sum(sum[ARCH_BRENT_KUNG]), .cout(cout[ARCH_BRENT_KUNG])
  );

  kogge_stone_adder #(.WIDTH(WIDTH)) u_ks (
    .a(a), .b(b), .sum(sum[ARCH_KOGGE_STONE]), .cout(cout[ARCH_KOGGE_STONE])
  );

  han_carlson_adder #(.WIDTH(WIDTH)) u_hc (
    .a(a), .b(b), .sum(sum[ARCH_HAN_CARLSON]), .cout(cout[ARCH_HAN_CARLSON])
  );

  ladner_fischer_adder #(.WIDTH(WIDTH)) u_lf (
    .a(a), .b(b), .sum(sum[ARCH_LADNER_FISCHER]), .cout(cout[ARCH_LADNER_FISCHER])
  );

  knowles_adder #(.WIDTH(WIDTH)) u_kn (
    .a(a), .b(b), .sum(sum[ARCH_KNOWLES]), .cout(cout[ARCH_KNOWLES])
  );

endmodule
