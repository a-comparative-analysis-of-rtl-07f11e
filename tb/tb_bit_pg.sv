// tb_bit_pg -- exhaustive self-checking test of the bit generate/propagate
// cell: all four input combinations, each checked against the truth table of
// generate (both bits set) and propagate (exactly one bit set).
module tb_bit_pg;
  import ppa_pkg::*;

  localparam int MAX_CYCLES = 100;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b;
  gp_t  gp;
  int   checks = 0, failures = 0;

  bit_pg u_dut (.a(a), .b(b), .gp(gp));

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(posedge clk);
      {a, b} = 2'(v);
      @(negedge clk);
      checks++;
      // Expected values from the truth table, not from gates.
      if (gp.g !== (v == 3) || gp.p !== (v == 1 || v == 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b: g=%0b p=%0b", a, b, gp.g, gp.p);
      end
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
