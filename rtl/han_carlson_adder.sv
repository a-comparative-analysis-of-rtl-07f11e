// han_carlson_adder -- WIDTH-bit Han-Carlson parallel prefix adder.
//
// A Kogge-Stone tree run on every other column. Level 1 merges each odd
// column with the even column below it. Levels 2..log2 n are Kogge-Stone on
// the odd columns only (span 2^(k-1), which is even, so odd columns only feed
// odd columns). After that every odd column holds the generate of all columns
// down to 0, and one extra level merges each even column with the odd column
// just below it. One level more than Kogge-Stone buys half the operators,
// (n/2)*log2(n) (32 at 16 bits), and half the lateral wires, with fan-out 2.
//
// Interface: a, b are the operands, sum = (a + b) mod 2^WIDTH and cout the
// carry out of the top column. No carry in.
// Timing: combinational, log2(WIDTH)+1 operator levels. WIDTH must be a power
// of two; the default, 32, is the widest evaluated size (8, 16, 32).
module han_carlson_adder
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 32
)
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS  = arch_levels(ARCH_HAN_CARLSON, WIDTH);
  localparam int unsigned LOG2W   = log2c(WIDTH);
  // Bit-level generate/propagate pairs, the input row of the prefix tree.
  gp_t bit_gp [WIDTH];

  if (WIDTH < 2 || WIDTH != (1 << LOG2W) || LOG2W > MAX_LEVELS) begin : g_bad_width
    $error("WIDTH must be a power of two from 2 to %0d", 1 << MAX_LEVELS);
  end

  // Pre-computation: per-bit generate and propagate.
  for (genvar i = 0; i < WIDTH; i++) begin : g_pg
    bit_pg u_pg (.a(a[i]), .b(b[i]), .gp(bit_gp[i]));
  end

  // Prefix tree. Each level is one row of WIDTH nodes; a node is either an
  // operator or a wire that carries the pair of the row below it.
  for (genvar k = 1; k <= LEVELS; k++) begin : g_level
    gp_t row_in [WIDTH];
    gp_t row [WIDTH];
    if (k == 1) begin : g_first
      assign row_in = bit_gp;
    end else begin : g_next
      assign row_in = g_level[k-1].row;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if (hc_has_op(i, k, LOG2W)) begin : g_op
        prefix_cell u_op (.hi(row_in[i]), .lo(row_in[hc_src(i, k, LOG2W)]), .gp(row[i]));
      end else begin : g_wire
        assign row[i] = row_in[i];
      end
    end
  end

  // Post-computation: the carry into column i is the group generate of
  // columns i-1..0; the sum is that carry XOR the bit propagate.
  gp_t prefix [WIDTH];
  assign prefix = g_level[LEVELS].row;

  always_comb begin
    sum[0] = bit_gp[0].p;
    for (int i = 1; i < WIDTH; i++) sum[i] = bit_gp[i].p ^ prefix[i-1].g;
    cout = prefix[WIDTH-1].g;
  end

endmodule
