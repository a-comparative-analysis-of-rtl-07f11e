// ladner_fischer_adder -- WIDTH-bit Ladner-Fischer parallel prefix adder, in
// the minimum-depth (Sklansky) form.
//
// The prefix tree is a binary tree of operators that uses associativity
// only, never idempotency: at level k the columns are cut into blocks of 2^k,
// and every column in the upper half of a block merges with the last column
// of the lower half. That column already holds the generate of everything
// below it, so after log2(WIDTH) levels every column does too. Each level has
// WIDTH/2 operators, (n/2)*log2(n) in all (32 at 16 bits), and the lateral
// wire of level k drives 2^(k-1) operators, up to WIDTH/2 at the last level:
// the large fan-out that makes this tree slow at 32 bits.
//
// Interface: a, b are the operands, sum = (a + b) mod 2^WIDTH and cout the
// carry out of the top column. No carry in.
// Timing: combinational, log2(WIDTH) operator levels. WIDTH must be a power
// of two; the default, 32, is the widest evaluated size (8, 16, 32).
module ladner_fischer_adder
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

  localparam int unsigned LEVELS  = arch_levels(ARCH_LADNER_FISCHER, WIDTH);
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
      if (lf_has_op(i, k)) begin : g_op
        prefix_cell u_op (.hi(row_in[i]), .lo(row_in[lf_src(i, k)]), .gp(row[i]));
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
