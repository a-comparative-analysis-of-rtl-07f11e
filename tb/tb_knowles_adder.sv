// tb_knowles_adder -- self-checking test of the Knowles adder family.
//
// Every Knowles tree of the comparison's detailed Knowles table is built and
// checked: three 8-bit trees, twelve 16-bit trees and four 32-bit trees, plus
// the two 16-bit limit cases, Kogge-Stone [1,1,1,1] and Ladner-Fischer
// [8,4,2,1], and the default tree of each width (which must be [2,1,1],
// [4,4,2,1] and [16,2,2,2,1]). It also checks that exactly 14 fan-out lists
// are legal at 16 bits, the size of the 16-bit family. Each instance gets the
// corner-case, carry-chain and 1250 random vectors of tb_adder_harness.
module tb_knowles_adder;
  import ppa_pkg::*;

  localparam int MAX_CYCLES = 20000;
  localparam int NCFG = 21;

  // Operand width and fan-out list (last level first) of configuration c.
  function automatic int unsigned cfg_width(int c);
    return (c < 3) ? 8 : (c < 15) ? 16 : (c < 19) ? 32 : 16;
  endfunction

  function automatic fanout_list_t cfg_fanout(int c);
    case (c)
      0:  return {8'd2,  8'd1, 8'd1, 8'd0, 8'd0, 8'd0};
      1:  return {8'd2,  8'd2, 8'd1, 8'd0, 8'd0, 8'd0};
      2:  return {8'd4,  8'd1, 8'd1, 8'd0, 8'd0, 8'd0};
      3:  return {8'd2,  8'd1, 8'd1, 8'd1, 8'd0, 8'd0};
      4:  return {8'd2,  8'd2, 8'd1, 8'd1, 8'd0, 8'd0};
      5:  return {8'd2,  8'd2, 8'd2, 8'd1, 8'd0, 8'd0};
      6:  return {8'd4,  8'd1, 8'd1, 8'd1, 8'd0, 8'd0};
      7:  return {8'd4,  8'd2, 8'd1, 8'd1, 8'd0, 8'd0};
      8:  return {8'd4,  8'd2, 8'd2, 8'd1, 8'd0, 8'd0};
      9:  return {8'd4,  8'd4, 8'd1, 8'd1, 8'd0, 8'd0};
      10: return {8'd4,  8'd4, 8'd2, 8'd1, 8'd0, 8'd0};
      11: return {8'd8,  8'd1, 8'd1, 8'd1, 8'd0, 8'd0};
      12: return {8'd8,  8'd2, 8'd1, 8'd1, 8'd0, 8'd0};
      13: return {8'd8,  8'd2, 8'd2, 8'd1, 8'd0, 8'd0};
      14: return {8'd8,  8'd4, 8'd1, 8'd1, 8'd0, 8'd0};
      15: return {8'd16, 8'd2, 8'd2, 8'd2, 8'd1, 8'd0};
      16: return {8'd16, 8'd4, 8'd2, 8'd2, 8'd1, 8'd0};
      17: return {8'd2,  8'd2, 8'd2, 8'd1, 8'd1, 8'd0};
      18: return {8'd4,  8'd4, 8'd2, 8'd2, 8'd1, 8'd0};
      19: return {8'd1,  8'd1, 8'd1, 8'd1, 8'd0, 8'd0};
      default: return {8'd8, 8'd4, 8'd2, 8'd1, 8'd0, 8'd0};
    endcase
  endfunction

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG+2:0] done;
  int checks_c [NCFG+3], failures_c [NCFG+3], chains_c [NCFG+3], couts_c [NCFG+3];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    tb_adder_harness #(.ARCH(ARCH_KNOWLES), .WIDTH(cfg_width(c)), .FANOUT(cfg_fanout(c)), .SEED(100 + c))
      u_h (.clk(clk), .done(done[c]), .checks(checks_c[c]), .failures(failures_c[c]),
           .long_chains(chains_c[c]), .couts(couts_c[c]));
  end

  // Default trees, FANOUT left to the adder.
  tb_adder_harness #(.ARCH(ARCH_KNOWLES), .WIDTH(8), .SEED(200)) u_d8 (.clk(clk),
    .done(done[NCFG]), .checks(checks_c[NCFG]), .failures(failures_c[NCFG]),
    .long_chains(chains_c[NCFG]), .couts(couts_c[NCFG]));
  tb_adder_harness #(.ARCH(ARCH_KNOWLES), .WIDTH(16), .SEED(201)) u_d16 (.clk(clk),
    .done(done[NCFG+1]), .checks(checks_c[NCFG+1]), .failures(failures_c[NCFG+1]),
    .long_chains(chains_c[NCFG+1]), .couts(couts_c[NCFG+1]));
  tb_adder_harness #(.ARCH(ARCH_KNOWLES), .WIDTH(32), .SEED(202)) u_d32 (.clk(clk),
    .done(done[NCFG+2]), .checks(checks_c[NCFG+2]), .failures(failures_c[NCFG+2]),
    .long_chains(chains_c[NCFG+2]), .couts(couts_c[NCFG+2]));

  task automatic check_default(int unsigned w, fanout_list_t exp);
    fanout_list_t got = knowles_default(w);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL default Knowles tree for %0d bits", w);
    end
  endtask

  initial begin
    check_default(8,  {8'd2, 8'd1, 8'd1, 8'd0, 8'd0, 8'd0});
    check_default(16, {8'd4, 8'd4, 8'd2, 8'd1, 8'd0, 8'd0});
    check_default(32, {8'd16, 8'd2, 8'd2, 8'd2, 8'd1, 8'd0});
    // A list that breaks the rules must be rejected.
    checks++;
    if (knowles_valid({8'd1, 8'd2, 8'd1, 8'd1, 8'd0, 8'd0}, 4)) begin
      failures++;
      $display("FAIL invalid fan-out list accepted");
    end
    // The legality rule must admit exactly the 14 distinct 16-bit trees of
    // the family, Kogge-Stone and Ladner-Fischer included.
    begin
      automatic int n16 = 0;
      for (int e0 = 0; e0 < 4; e0++)
        for (int e1 = 0; e1 < 4; e1++)
          for (int e2 = 0; e2 < 4; e2++)
            for (int e3 = 0; e3 < 4; e3++)
              n16 += knowles_valid({8'(1 << e0), 8'(1 << e1), 8'(1 << e2), 8'(1 << e3),
                                    8'd0, 8'd0}, 4);
      checks++;
      if (n16 != 14) begin
        failures++;
        $display("FAIL %0d legal 16-bit Knowles trees, expected 14", n16);
      end
    end
    wait (&done);
    for (int c = 0; c < NCFG + 3; c++) begin
      checks += checks_c[c] + 2;
      failures += failures_c[c];
      if (chains_c[c] == 0) begin failures++; $display("FAIL cfg %0d: no full carry chain", c); end
      if (couts_c[c] == 0)  begin failures++; $display("FAIL cfg %0d: no carry out", c); end
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
