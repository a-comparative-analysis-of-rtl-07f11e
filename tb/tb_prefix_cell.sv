// tb_prefix_cell -- exhaustive self-checking test of the prefix operator.
//
// All 16 combinations of the two input pairs are applied. The expected result
// is worked out from what the pairs mean: a merged group generates a carry if
// the upper group generates one, or the upper group propagates and the lower
// one generates; it propagates only if both groups propagate. The test also
// checks associativity over all 64 triples through three chained cells, the
// property the prefix trees rely on.
module tb_prefix_cell;
  import ppa_pkg::*;

  localparam int MAX_CYCLES = 200;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  gp_t x, y, z, xy, xy_z, yz, x_yz;
  int  checks = 0, failures = 0;

  prefix_cell u_dut  (.hi(x),  .lo(y), .gp(xy));
  prefix_cell u_xy_z (.hi(xy), .lo(z), .gp(xy_z));
  prefix_cell u_yz   (.hi(y),  .lo(z), .gp(yz));
  prefix_cell u_x_yz (.hi(x),  .lo(yz), .gp(x_yz));

  initial begin
    logic exp_g, exp_p;
    x = '0; y = '0; z = '0;
    for (int v = 0; v < 64; v++) begin
      @(posedge clk);
      {x, y, z} = 6'(v);
      @(negedge clk);
      if (v < 16 || z == '0) begin
        exp_g = x.g ? 1'b1 : (x.p ? y.g : 1'b0);
        exp_p = (x.p == 1'b1) && (y.p == 1'b1);
        checks++;
        if (xy.g !== exp_g || xy.p !== exp_p) begin
          failures++;
          $display("FAIL hi=%b lo=%b: got %b expected %b%b", x, y, xy, exp_g, exp_p);
        end
      end
      checks++;
      if (xy_z !== x_yz) begin
        failures++;
        $display("FAIL associativity x=%b y=%b z=%b", x, y, z);
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
