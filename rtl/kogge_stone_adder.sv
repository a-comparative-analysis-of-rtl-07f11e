// kogge_stone_adder -- WIDTH-bit Kogge-Stone parallel prefix adder.
//
// The adder has the usual three stages: per-bit generate/propagate, a prefix
// tree that forms the carry into every column, and an XOR per column for the
// sum. In the Kogge-Stone tree every column gets an operator at every level
// it can: at level k the operator in column i merges its own group with the
// group ending 2^(k-1) columns lower. After log2(WIDTH) levels each column
// holds the generate of all columns down to 0. Each lateral wire feeds a
// single operator, so fan-out stays at 2, but the number of lateral wires per
// level is the largest of all prefix trees: n*log2(n)-n+1 operators in all
// (49 at 16 bits).
//
// Interface: a, b are the operands, sum = (a + b) mod 2^WIDTH and cout the
// carry out of the top column. There is no carry in, as in the adders this
// structure is taken from.
// Timing: combinational, log2(WIDTH) operator levels between the bit cells
// and the sum XORs. WIDTH must be a power of two; the default, 32, is the
// widest of the three sizes (8, 16, 32) the comparison evaluates.
module kogge_stone_adder
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

  localparam int unsigned LEVELS  = arch_levels(ARCH_KOGGE_STONE, WIDTH);
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
      if (ks_has_op(i, k)) begin : g_op
        prefix_cell u_op (.hi(row_in[i]), .lo(row_in[i - (1 << (k - 1))]), .gp(row[i]));
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
