// ppa_pkg -- types, constants and structure functions shared by the parallel
// prefix adders.
//
// Every adder in this library is built from the same three pieces: a per-bit
// generate/propagate pair (gp_t), the prefix operator that merges two such
// pairs, and a prefix tree that decides which pairs are merged at which
// logic level. The trees differ only in that last choice, so the rules that
// place the operators live here as constant functions. The adders call them
// from their generate loops, and the same functions measure the trees -- the
// operator count, the largest fan-out and the number of lateral wire tracks
// -- so a testbench can compare them with the closed-form expressions of the
// adder comparison (for example n*log2(n)-n+1 operators for Kogge-Stone and
// Knowles, 2(n-1)-log2(n) for Brent-Kung, (n/2)*log2(n) for Ladner-Fischer
// and Han-Carlson). The measuring functions are for elaboration and
// simulation only; no hardware is built from them.
//
// A Knowles tree is described by its list of lateral fan-outs, written as in
// the literature from the last logic level down to the first: [4,4,2,1] is a
// 16-bit tree whose level 4 fans each lateral wire out to 4 operators, level 3
// to 4, level 2 to 2 and level 1 to 1. The list is stored left-aligned in a
// fixed array of MAX_LEVELS entries; unused entries are 0.
package ppa_pkg;

  // Largest number of prefix logic levels supported (64-bit operands).
  localparam int unsigned MAX_LEVELS = 6;

  // Generate/propagate pair of one bit or of a group of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // The five adder families, in the order of the comparison tables.
  typedef enum logic [2:0] {
    ARCH_BRENT_KUNG     = 3'd0,
    ARCH_KOGGE_STONE    = 3'd1,
    ARCH_HAN_CARLSON    = 3'd2,
    ARCH_LADNER_FISCHER = 3'd3,
    ARCH_KNOWLES        = 3'd4
  } arch_e;

  localparam int unsigned NUM_ARCH = 5;

  // Knowles lateral fan-out list, last level first, left-aligned: entry e
  // (0 = leftmost) of a literal such as {8'd4, 8'd4, 8'd2, 8'd1, 8'd0, 8'd0}
  // is byte MAX_LEVELS-1-e.
  typedef logic [MAX_LEVELS-1:0][7:0] fanout_list_t;

  // Entry e of a fan-out list, counted from the left.
  function automatic int unsigned fanout_entry(fanout_list_t f, int unsigned e);
    return int'(f[MAX_LEVELS - 1 - e]);
  endfunction

  // ceil(log2(n)), with log2(1) = 0.
  function automatic int unsigned log2c(int unsigned n);
    int unsigned r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // The Knowles tree evaluated for each operand width in the comparison:
  // [2,1,1] at 8 bits, [4,4,2,1] at 16 bits, [16,2,2,2,1] at 32 bits. Other
  // widths fall back to the Kogge-Stone limit case, all fan-outs 1.
  function automatic fanout_list_t knowles_default(int unsigned width);
    fanout_list_t f;
    int unsigned  lv = log2c(width);
    for (int unsigned e = 0; e < MAX_LEVELS; e++) f[MAX_LEVELS - 1 - e] = (e < lv) ? 8'd1 : 8'd0;
    case (width)
      8:  f = {8'd2, 8'd1, 8'd1, 8'd0, 8'd0, 8'd0};
      16: f = {8'd4, 8'd4, 8'd2, 8'd1, 8'd0, 8'd0};
      32: f = {8'd16, 8'd2, 8'd2, 8'd2, 8'd1, 8'd0};
      default: ;
    endcase
    return f;
  endfunction

  // Lateral fan-out of Knowles logic level lvl (1 = first) in a tree of
  // levels levels.
  function automatic int unsigned knowles_fanout(fanout_list_t f, int unsigned levels,
                                                 int unsigned lvl);
    return fanout_entry(f, levels - lvl);
  endfunction

  // True when the list is a legal Knowles tree for this many levels: every
  // entry a power of two, level k at most 2^(k-1), and the fan-out never
  // shrinking from one level to the next.
  function automatic bit knowles_valid(fanout_list_t f, int unsigned levels);
    if (levels > MAX_LEVELS || levels == 0) return 1'b0;
    for (int unsigned k = 1; k <= levels; k++) begin
      int unsigned fk = knowles_fanout(f, levels, k);
      if (fk == 0 || (fk & (fk - 1)) != 0) return 1'b0;
      if (fk > (1 << (k - 1))) return 1'b0;
      if (k > 1 && fk < knowles_fanout(f, levels, k - 1)) return 1'b0;
    end
    for (int unsigned k = levels; k < MAX_LEVELS; k++)
      if (fanout_entry(f, k) != 0) return 1'b0;
    return 1'b1;
  endfunction

  // Source column of the lateral input of the Knowles operator in column i
  // at level lvl: the column one span (2^(lvl-1)) to the right, rounded up to
  // the last column of its group of fan-out f. With f = 1 this is Kogge-Stone.
  function automatic int knowles_src(int i, int unsigned lvl, int unsigned fan);
    return (i - (1 << (lvl - 1))) | int'(fan - 1);
  endfunction

  // ---- Operator placement rules (column i, logic level lvl, both from the
  // ---- least significant end; lvl starts at 1) ----

  // Kogge-Stone and Knowles: an operator in every column that reaches past
  // column 0 by at least one span.
  function automatic bit ks_has_op(int i, int unsigned lvl);
    return i >= (1 << (lvl - 1));
  endfunction

  // Ladner-Fischer (Sklansky form): columns whose bit lvl-1 is set.
  function automatic bit lf_has_op(int i, int unsigned lvl);
    return ((i >> (lvl - 1)) & 1) == 1;
  endfunction

  function automatic int lf_src(int i, int unsigned lvl);
    return ((i >> (lvl - 1)) << (lvl - 1)) - 1;
  endfunction

  // Brent-Kung, levels 1..L (reduction tree): columns 2^lvl-1 mod 2^lvl.
  // Levels L+1..2L-1 (distribution tree): level L+d places operators with a
  // span of 2^(L-d-1) in the columns halfway between reduction nodes.
  function automatic int unsigned bk_span(int unsigned lvl, int unsigned levels);
    return (lvl <= levels) ? (1 << (lvl - 1)) : (1 << (2 * levels - lvl - 1));
  endfunction

  function automatic bit bk_has_op(int i, int unsigned lvl, int unsigned levels);
    int unsigned s = bk_span(lvl, levels);
    if (lvl <= levels) return ((i + 1) % (2 * s)) == 0;
    return (i >= int'(2 * s)) && (((i + 1) % (2 * s)) == s);
  endfunction

  // Han-Carlson: level 1 pairs the odd columns with their even neighbour,
  // levels 2..L run Kogge-Stone on the odd columns only, and level L+1 fills
  // in the even columns from their odd neighbour.
  function automatic bit hc_has_op(int i, int unsigned lvl, int unsigned levels);
    if (lvl == 1) return (i % 2) == 1;
    if (lvl == levels + 1) return (i % 2) == 0 && i >= 2;
    return (i % 2) == 1 && i >= (1 << (lvl - 1));
  endfunction

  function automatic int hc_src(int i, int unsigned lvl, int unsigned levels);
    if (lvl == 1 || lvl == levels + 1) return i - 1;
    return i - (1 << (lvl - 1));
  endfunction

  // Number of logic levels of each tree.
  function automatic int unsigned arch_levels(arch_e a, int unsigned width);
    int unsigned l = log2c(width);
    case (a)
      ARCH_BRENT_KUNG:  return 2 * l - 1;
      ARCH_HAN_CARLSON: return l + 1;
      default:          return l;
    endcase
  endfunction

  // Operator placement and lateral source column of any family, for the
  // analysis functions below. FANOUT matters only for Knowles.
  function automatic bit arch_has_op(arch_e a, int i, int unsigned lvl, int unsigned l);
    case (a)
      ARCH_BRENT_KUNG:     return bk_has_op(i, lvl, l);
      ARCH_HAN_CARLSON:    return hc_has_op(i, lvl, l);
      ARCH_LADNER_FISCHER: return lf_has_op(i, lvl);
      default:             return ks_has_op(i, lvl);
    endcase
  endfunction

  function automatic int arch_src(arch_e a, int i, int unsigned lvl, int unsigned l,
                                  fanout_list_t f);
    case (a)
      ARCH_BRENT_KUNG:     return i - int'(bk_span(lvl, l));
      ARCH_HAN_CARLSON:    return hc_src(i, lvl, l);
      ARCH_LADNER_FISCHER: return lf_src(i, lvl);
      ARCH_KNOWLES:        return knowles_src(i, lvl, knowles_fanout(f, l, lvl));
      default:             return i - (1 << (lvl - 1));
    endcase
  endfunction

  // Largest fan-out of any node: the number of nodes of the next level that
  // read it, its own column (operator or wire) included. This is the fan-out
  // column of the comparison table (2 for Kogge-Stone, n/2+1 for
  // Ladner-Fischer, lateral fan-out + 1 for Knowles).
  function automatic int unsigned arch_max_fanout(arch_e a, int unsigned width, fanout_list_t f);
    int unsigned l    = log2c(width);
    int unsigned lv   = arch_levels(a, width);
    int unsigned best = 1;
    for (int unsigned k = 1; k <= lv; k++)
      for (int j = 0; j < int'(width); j++) begin
        int unsigned n = 1;
        for (int i = 0; i < int'(width); i++)
          if (arch_has_op(a, i, k, l) && arch_src(a, i, k, l, f) == j) n++;
        if (n > best) best = n;
      end
    return best;
  endfunction

  // Largest number of lateral wire tracks: at any level, the number of
  // distinct lateral wires that cross one column boundary. A wire from
  // source column j crosses every boundary between j and the highest column
  // it feeds. This is the wire-track column of the comparison table (n/2 for
  // Kogge-Stone, 1 for Brent-Kung and Ladner-Fischer).
  function automatic int unsigned arch_max_tracks(arch_e a, int unsigned width, fanout_list_t f);
    int unsigned l    = log2c(width);
    int unsigned lv   = arch_levels(a, width);
    int unsigned best = 0;
    for (int unsigned k = 1; k <= lv; k++) begin
      int reach [64];
      for (int j = 0; j < 64; j++) reach[j] = -1;
      for (int i = 0; i < int'(width); i++)
        if (arch_has_op(a, i, k, l)) begin
          int j = arch_src(a, i, k, l, f);
          if (j >= 0 && i > reach[j]) reach[j] = i;
        end
      for (int b = 1; b < int'(width); b++) begin
        int unsigned n = 0;
        for (int j = 0; j < b; j++) n += (reach[j] >= b);
        if (n > best) best = n;
      end
    end
    return best;
  endfunction

  // Number of prefix operators the placement rules above produce.
  function automatic int unsigned arch_op_count(arch_e a, int unsigned width);
    int unsigned n  = 0;
    int unsigned l  = log2c(width);
    int unsigned lv = arch_levels(a, width);
    for (int unsigned k = 1; k <= lv; k++)
      for (int i = 0; i < int'(width); i++)
        n += arch_has_op(a, i, k, l);
    return n;
  endfunction

endpackage
