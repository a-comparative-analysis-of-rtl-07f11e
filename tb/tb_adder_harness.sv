// tb_adder_harness -- drives one prefix adder with the comparison's test
// vectors and checks every result against the behavioural sum a + b.
//
// ARCH selects the adder family, WIDTH its operand width and FANOUT the
// Knowles tree (ignored by the other families). One vector is applied per
// clk cycle, on the rising edge, and the result is checked half a cycle
// later: the adders are combinational and must settle within the cycle they
// are given. The vector set is:
//   - corner cases: 0+0, all-ones + 1 (the carry ripples through every
//     column), all-ones + all-ones, alternating patterns;
//   - for every column i, a carry generated in column i that has to travel
//     through all propagating columns above it to the carry out;
//   - NUM_RANDOM pseudo-random operand pairs (1250, the vector count of the
//     power simulations), half of them uniform and half biased towards long
//     propagate runs.
// It also checks the tree's logic level count, operator count, maximum
// fan-out and lateral wire tracks against the closed-form expressions of the
// comparison table.
//
// Outputs: done rises when the last vector is checked; checks/failures count
// the comparisons; long_chains counts vectors whose carry crossed every
// column and couts counts vectors with a carry out, so a caller can prove
// those cases happened.
module tb_adder_harness
  import ppa_pkg::*;
#(
  parameter arch_e        ARCH       = ARCH_KOGGE_STONE,
  parameter int unsigned  WIDTH      = 16,
  parameter fanout_list_t FANOUT     = knowles_default(WIDTH),
  parameter int unsigned  NUM_RANDOM = 1250,
  parameter int unsigned  SEED       = 1
)
(
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   long_chains,
  output int   couts
);

  localparam int unsigned L = log2c(WIDTH);

  logic [WIDTH-1:0] a, b, sum;
  logic             cout;

  if (ARCH == ARCH_KOGGE_STONE) begin : g_ks
    kogge_stone_adder #(.WIDTH(WIDTH)) u_dut (.a(a), .b(b), .sum(sum), .cout(cout));
  end else if (ARCH == ARCH_BRENT_KUNG) begin : g_bk
    brent_kung_adder #(.WIDTH(WIDTH)) u_dut (.a(a), .b(b), .sum(sum), .cout(cout));
  end else if (ARCH == ARCH_HAN_CARLSON) begin : g_hc
    han_carlson_adder #(.WIDTH(WIDTH)) u_dut (.a(a), .b(b), .sum(sum), .cout(cout));
  end else if (ARCH == ARCH_LADNER_FISCHER) begin : g_lf
    ladner_fischer_adder #(.WIDTH(WIDTH)) u_dut (.a(a), .b(b), .sum(sum), .cout(cout));
  end else begin : g_kn
    knowles_adder #(.WIDTH(WIDTH), .FANOUT(FANOUT)) u_dut (.a(a), .b(b), .sum(sum), .cout(cout));
  end

  // Closed-form level and operator counts from the comparison table.
  function automatic int unsigned expected_levels();
    case (ARCH)
      ARCH_BRENT_KUNG:  return 2 * L - 1;
      ARCH_HAN_CARLSON: return L + 1;
      default:          return L;
    endcase
  endfunction

  function automatic int unsigned expected_ops();
    case (ARCH)
      ARCH_BRENT_KUNG:                       return 2 * (WIDTH - 1) - L;
      ARCH_HAN_CARLSON, ARCH_LADNER_FISCHER: return (WIDTH / 2) * L;
      default:                               return WIDTH * L - WIDTH + 1;
    endcase
  endfunction

  // Closed-form maximum fan-out from the comparison table; for a Knowles
  // tree it is the largest lateral fan-out plus the node's own column.
  function automatic int unsigned expected_fanout();
    int unsigned m = 1;
    case (ARCH)
      ARCH_LADNER_FISCHER: return WIDTH / 2 + 1;
      ARCH_KNOWLES: begin
        for (int e = 0; e < int'(L); e++)
          if (fanout_entry(FANOUT, e) > m) m = fanout_entry(FANOUT, e);
        return m + 1;
      end
      default: return 2;
    endcase
  endfunction

  // Closed-form lateral wire tracks from the comparison table. For a
  // Knowles tree, levels share one wire per group of f operators, so level k
  // needs 2^(k-1)/f tracks.
  function automatic int unsigned expected_tracks();
    int unsigned m = 1;
    case (ARCH)
      ARCH_KOGGE_STONE:                     return WIDTH / 2;
      ARCH_HAN_CARLSON:                     return WIDTH / 4;
      ARCH_BRENT_KUNG, ARCH_LADNER_FISCHER: return 1;
      default: begin
        for (int unsigned k = 1; k <= L; k++)
          if ((1 << (k - 1)) / knowles_fanout(FANOUT, L, k) > m)
            m = (1 << (k - 1)) / knowles_fanout(FANOUT, L, k);
        return m;
      end
    endcase
  endfunction

  task automatic check_count(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s W=%0d %s: got %0d expected %0d", ARCH.name(), WIDTH, what, got, exp);
    end
  endtask

  // Apply one vector on the rising edge and check it on the falling edge.
  task automatic apply(logic [WIDTH-1:0] va, logic [WIDTH-1:0] vb);
    logic [WIDTH:0]   exp;
    logic [WIDTH-1:0] ones = '1;
    @(posedge clk);
    a <= va;
    b <= vb;
    @(negedge clk);
    exp = {1'b0, va} + {1'b0, vb};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s W=%0d: %h + %h = %h_%h, expected %h", ARCH.name(), WIDTH,
                 va, vb, cout, sum, exp);
    end
    if (exp[WIDTH]) couts++;
    // A carry that enters column 0's neighbour and leaves the top column.
    if ((va[0] & vb[0]) && ((va ^ vb) >> 1) == (ones >> 1)) long_chains++;
  endtask

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH+31:0] w = '0;
    for (int i = 0; i < int'(WIDTH); i += 32) w = (w << 32) | {{WIDTH{1'b0}}, $urandom};
    return w[WIDTH-1:0];
  endfunction

  initial begin
    logic [WIDTH-1:0] ones, va, vb, flip;
    void'($urandom(SEED));
    done = 0; checks = 0; failures = 0; long_chains = 0; couts = 0;
    a = '0; b = '0;
    ones = '1;

    check_count("logic levels", arch_levels(ARCH, WIDTH), expected_levels());
    check_count("prefix operators", arch_op_count(ARCH, WIDTH), expected_ops());
    check_count("maximum fan-out", arch_max_fanout(ARCH, WIDTH, FANOUT), expected_fanout());
    check_count("lateral wire tracks", arch_max_tracks(ARCH, WIDTH, FANOUT), expected_tracks());
    if (ARCH == ARCH_KNOWLES) begin
      checks++;
      if (!knowles_valid(FANOUT, L)) begin
        failures++;
        $display("FAIL Knowles fan-out list rejected");
      end
    end

    // Corner cases.
    apply('0, '0);
    apply(ones, {{(WIDTH-1){1'b0}}, 1'b1});
    apply({{(WIDTH-1){1'b0}}, 1'b1}, ones);
    apply(ones, ones);
    apply({(WIDTH/2){2'b10}}, {(WIDTH/2){2'b01}});
    apply({(WIDTH/2){2'b10}}, {(WIDTH/2){2'b10}});
    // A carry generated in column i propagating through every column above.
    for (int i = 0; i < int'(WIDTH); i++) begin
      va = ones << i;
      vb = {{(WIDTH-1){1'b0}}, 1'b1} << i;
      apply(va, vb);
      apply(vb, va);
    end
    // Random vectors: uniform, then mostly-propagating.
    for (int n = 0; n < int'(NUM_RANDOM); n++) begin
      va = rand_word();
      if (n % 2 == 0) begin
        vb = rand_word();
      end else begin
        flip = rand_word() & rand_word() & rand_word();
        vb = ~va ^ flip;
      end
      apply(va, vb);
    end
    @(posedge clk);
    done = 1;
  end

endmodule
