// tb_ascon_bus_sweep: runs the unrolled 12-round Ascon permutation on the core with
// 1 to 6 transport buses, each with a single ALU and with the dual ALU, once using
// the custom ASCON operations and once built from general ALU operations only
// (24 core instances, each driven by tb_bus_harness). It checks every result and
// prints the cycle counts as a table. It also checks that more buses never cost
// cycles, that the second ALU never costs cycles from two buses up, that the custom
// operations always save cycles, and that going from 1 to 4 buses gives a real
// speed-up.
module tb_ascon_bus_sweep;
  logic clk = 0, rst_n = 0, go = 0;
  logic [23:0] done;
  int chk [24], fail [24], cyc [24];
  int checks = 0, failures = 0;

  // index of the run with n buses, custom operations c, dual ALU d
  function automatic int ix(int n, int c, int d);
    return 4 * (n - 1) + 2 * c + d;
  endfunction

  task automatic expect_le(int a, int b, string what);
    checks++;
    if (cyc[a] > cyc[b]) begin failures++; $display("FAIL %s: %0d > %0d cycles", what, cyc[a], cyc[b]); end
  endtask

  always #5 clk = ~clk;

  for (genvar n = 1; n <= 6; n++) begin : g_bus
    for (genvar c = 0; c < 2; c++) begin : g_ops
      for (genvar d = 0; d < 2; d++) begin : g_alu
        localparam int I = 4 * (n - 1) + 2 * c + d;
        tb_bus_harness #(.NB(n), .DUAL(d), .CUSTOM(c)) h (
          .clk, .rst_n, .go, .done(done[I]), .checks(chk[I]), .failures(fail[I]), .cycles(cyc[I]));
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    go = 1;
    wait (&done);
    @(posedge clk);
    $display("       ---- custom operations ----  ---- general operations ---");
    $display("buses  single ALU      dual ALU      single ALU      dual ALU");
    for (int n = 1; n <= 6; n++)
      $display("%5d  %10d  %12d  %14d  %12d", n, cyc[ix(n, 1, 0)], cyc[ix(n, 1, 1)], cyc[ix(n, 0, 0)], cyc[ix(n, 0, 1)]);
    for (int i = 0; i < 24; i++) begin checks += chk[i]; failures += fail[i]; end
    for (int c = 0; c < 2; c++)
      for (int d = 0; d < 2; d++) begin
        for (int n = 2; n <= 6; n++)
          expect_le(ix(n, c, d), ix(n - 1, c, d), $sformatf("%0d buses vs %0d (custom=%0d dual=%0d)", n, n - 1, c, d));
        // with a single bus the bus is the bottleneck and the greedy choice of ALU
        // can cost a cycle, so the two ALU variants are compared from two buses up
        for (int n = 2; n <= 6; n++)
          expect_le(ix(n, c, 1), ix(n, c, 0), $sformatf("dual vs single ALU at %0d buses (custom=%0d)", n, c));
      end
    for (int n = 1; n <= 6; n++)
      for (int d = 0; d < 2; d++)
        expect_le(ix(n, 1, d), ix(n, 0, d), $sformatf("custom vs general operations at %0d buses (dual=%0d)", n, d));
    checks++;
    if (2 * cyc[ix(4, 1, 1)] > cyc[ix(1, 1, 1)]) begin failures++; $display("FAIL 4 buses not at least twice as fast as 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
