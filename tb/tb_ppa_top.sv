// tb_ppa_top -- end-to-end test of the full comparison set at its default
// sizes: all five adder families at 8, 16 and 32 bits.
//
// Each width gets the same kind of stimulus the comparison used, 1250
// pseudo-random operand pairs, plus corner cases and a carry generated in
// every column that must ripple to the carry out. Every result of all
// fifteen adders is checked against the behavioural sum a + b, and the five
// families of one width are also checked against each other. The test counts
// how often the events that separate the trees happened -- a carry out, a
// carry crossing every column, a carry killed midway -- and fails if any of
// them never occurred at some width. One vector is applied per clock cycle
// and the combinational results are checked in that same cycle.
module tb_ppa_top;
  import ppa_pkg::*;

  localparam int NUM_RANDOM = 1250;
  localparam int MAX_CYCLES = 10000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]                 a8, b8;
  logic [NUM_ARCH-1:0][7:0]   sum8;
  logic [NUM_ARCH-1:0]        cout8;
  logic [15:0]                a16, b16;
  logic [NUM_ARCH-1:0][15:0]  sum16;
  logic [NUM_ARCH-1:0]        cout16;
  logic [31:0]                a32, b32;
  logic [NUM_ARCH-1:0][31:0]  sum32;
  logic [NUM_ARCH-1:0]        cout32;

  int checks = 0, failures = 0;
  // Event counters per width (0: 8 bits, 1: 16 bits, 2: 32 bits).
  int n_cout [3], n_full_chain [3], n_kill [3];

  ppa_top u_dut (.*);

  // Classify one addition by how its carries behaved.
  task automatic count_events(int w, logic [31:0] a, logic [31:0] b, int width);
    logic [32:0] s   = {1'b0, a} + {1'b0, b};
    logic [31:0] msk = (width == 32) ? 32'hffff_ffff : ((32'd1 << width) - 1);
    logic [31:0] p   = (a ^ b) & msk;
    logic [31:0] g   = a & b & msk;
    if (s[width]) n_cout[w]++;
    if (g[0] && (p >> 1) == (msk >> 1)) n_full_chain[w]++;
    // A carry generated and then stopped by a column with both bits zero.
    for (int i = 0; i + 1 < width; i++)
      if (g[i] && !(a[i+1] | b[i+1])) begin n_kill[w]++; break; end
  endtask

  task automatic check_width(string name, int width, logic [31:0] a, logic [31:0] b,
                             logic [NUM_ARCH-1:0][31:0] sums, logic [NUM_ARCH-1:0] couts);
    logic [32:0] exp = {1'b0, a} + {1'b0, b};
    logic [31:0] msk = (width == 32) ? 32'hffff_ffff : ((32'd1 << width) - 1);
    for (int f = 0; f < NUM_ARCH; f++) begin
      checks++;
      if ((sums[f] & msk) !== (exp[31:0] & msk) || couts[f] !== exp[width]) begin
        failures++;
        if (failures <= 20)
          $display("FAIL %s %s: %h + %h = %0b_%h, expected %0b_%h", name,
                   arch_e'(f), a, b, couts[f], sums[f] & msk, exp[width], exp[31:0] & msk);
      end
      // All families must agree with each other.
      checks++;
      if (sums[f] !== sums[0] || couts[f] !== couts[0]) failures++;
    end
  endtask

  task automatic apply(logic [31:0] va8, logic [31:0] vb8, logic [31:0] va16,
                       logic [31:0] vb16, logic [31:0] va32, logic [31:0] vb32);
    logic [NUM_ARCH-1:0][31:0] s;
    @(posedge clk);
    a8 <= va8[7:0];    b8 <= vb8[7:0];
    a16 <= va16[15:0]; b16 <= vb16[15:0];
    a32 <= va32;       b32 <= vb32;
    @(negedge clk);
    for (int f = 0; f < NUM_ARCH; f++) s[f] = 32'(sum8[f]);
    check_width("8-bit", 8, 32'(a8), 32'(b8), s, cout8);
    count_events(0, 32'(a8), 32'(b8), 8);
    for (int f = 0; f < NUM_ARCH; f++) s[f] = 32'(sum16[f]);
    check_width("16-bit", 16, 32'(a16), 32'(b16), s, cout16);
    count_events(1, 32'(a16), 32'(b16), 16);
    for (int f = 0; f < NUM_ARCH; f++) s[f] = sum32[f];
    check_width("32-bit", 32, a32, b32, s, cout32);
    count_events(2, a32, b32, 32);
  endtask

  initial begin
    logic [31:0] r [6];
    a8 = '0; b8 = '0; a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    for (int w = 0; w < 3; w++) begin n_cout[w] = 0; n_full_chain[w] = 0; n_kill[w] = 0; end
    void'($urandom(7));

    apply('0, '0, '0, '0, '0, '0);
    apply('1, 1, '1, 1, '1, 1);
    apply('1, '1, '1, '1, '1, '1);
    for (int i = 0; i < 32; i++)
      apply('1 << (i % 8), 1 << (i % 8), '1 << (i % 16), 1 << (i % 16), '1 << i, 1 << i);
    for (int n = 0; n < NUM_RANDOM; n++) begin
      for (int k = 0; k < 6; k++) r[k] = $urandom;
      // Every other vector is biased towards long propagate runs.
      if (n % 2 == 1) begin
        r[1] = ~r[0] ^ ($urandom & $urandom & $urandom);
        r[3] = ~r[2] ^ ($urandom & $urandom & $urandom);
        r[5] = ~r[4] ^ ($urandom & $urandom & $urandom);
      end
      apply(r[0], r[1], r[2], r[3], r[4], r[5]);
    end

    for (int w = 0; w < 3; w++) begin
      $display("width %0d bits: carry out %0d, full-width carry chain %0d, killed carry %0d",
               8 << w, n_cout[w], n_full_chain[w], n_kill[w]);
      checks += 3;
      if (n_cout[w] == 0)       begin failures++; $display("FAIL no carry out"); end
      if (n_full_chain[w] == 0) begin failures++; $display("FAIL no full carry chain"); end
      if (n_kill[w] == 0)       begin failures++; $display("FAIL no killed carry"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
