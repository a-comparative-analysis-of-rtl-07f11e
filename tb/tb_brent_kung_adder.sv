// tb_brent_kung_adder -- self-checking test of the Brent-Kung adder at the
// three evaluated widths (8, 16 and 32 bits), each with the corner-case,
// carry-chain and 1250 random vectors of tb_adder_harness.
module tb_brent_kung_adder;
  import ppa_pkg::*;

  localparam arch_e ARCH = ARCH_BRENT_KUNG;
  localparam int    MAX_CYCLES = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] done;
  int checks_w [3], failures_w [3], chains_w [3], couts_w [3];
  int checks = 0, failures = 0;

  tb_adder_harness #(.ARCH(ARCH), .WIDTH(8),  .SEED(11)) u_w8  (.clk(clk), .done(done[0]),
    .checks(checks_w[0]), .failures(failures_w[0]), .long_chains(chains_w[0]), .couts(couts_w[0]));
  tb_adder_harness #(.ARCH(ARCH), .WIDTH(16), .SEED(12)) u_w16 (.clk(clk), .done(done[1]),
    .checks(checks_w[1]), .failures(failures_w[1]), .long_chains(chains_w[1]), .couts(couts_w[1]));
  tb_adder_harness #(.ARCH(ARCH), .WIDTH(32), .SEED(13)) u_w32 (.clk(clk), .done(done[2]),
    .checks(checks_w[2]), .failures(failures_w[2]), .long_chains(chains_w[2]), .couts(couts_w[2]));

  initial begin
    wait (&done);
    for (int w = 0; w < 3; w++) begin
      checks += checks_w[w] + 2;
      failures += failures_w[w];
      // The full-width carry chain and the carry out must both have occurred.
      if (chains_w[w] == 0) begin failures++; $display("FAIL width %0d: no full carry chain", w); end
      if (couts_w[w] == 0)  begin failures++; $display("FAIL width %0d: no carry out", w); end
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
