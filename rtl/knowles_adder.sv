// knowles_adder -- WIDTH-bit adder from the Knowles family of minimum-depth
// parallel prefix adders.
//
// All Knowles trees have log2(WIDTH) levels and an operator in every column
// that can have one, like Kogge-Stone; they differ in where the lateral input
// of each operator comes from. FANOUT lists the lateral fan-out of each level,
// last level first: [1,1,1,1] is the 16-bit Kogge-Stone tree and [8,4,2,1]
// the 16-bit Ladner-Fischer one. At level k with fan-out f, the operator in
// column i takes its lateral input from column (i - 2^(k-1)) with its low
// log2(f) bits forced to one, so f neighbouring operators share one lateral
// wire. Because the fan-out never shrinks from one level to the next, the
// shared source has always already reached far enough down, and every
// column ends with the generate of all columns below it. Larger fan-outs
// trade lateral wire tracks for load on each wire. The operator count is the
// Kogge-Stone one, n*log2(n)-n+1.
//
// Default FANOUT is the tree chosen for each width in the comparison:
// [2,1,1] at 8 bits, [4,4,2,1] at 16, [16,2,2,2,1] at 32. Any list that
// ppa_pkg::knowles_valid accepts can be given instead.
//
// Interface: a, b are the operands, sum = (a + b) mod 2^WIDTH and cout the
// carry out of the top column. No carry in.
// Timing: combinational, log2(WIDTH) operator levels. WIDTH must be a power
// of two.
module knowles_adder
  import ppa_pkg::*;
#(
  parameter int unsigned  WIDTH  = 32,
  parameter fanout_list_t FANOUT = knowles_default(WIDTH)
)
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS  = arch_levels(ARCH_KNOWLES, WIDTH);
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

  if (!knowles_valid(FANOUT, LEVELS)) begin : g_bad_fanout
    $error("FANOUT is not a valid Knowles fan-out list for WIDTH=%0d", WIDTH);
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
        prefix_cell u_op (.hi(row_in[i]), .lo(row_in[knowles_src(i, k, knowles_fanout(FANOUT, LEVELS, k))]), .gp(row[i]));
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
