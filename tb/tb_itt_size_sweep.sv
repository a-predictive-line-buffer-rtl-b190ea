// tb_itt_size_sweep: table-size study of the predictive line buffer cache.
// Eight copies of the unit (16 KB 4-way cache, 64-byte line buffer) with ITT
// sizes 0, 4, 8, 16, 32, 64, 128 and 256 play the same fetch trace side by
// side.  Each copy checks its own instructions and latency; size 0 is a plain
// line buffer and is checked against a model of one.  The testbench prints
// the line buffer hit ratio of every size and checks that every table size
// raises the hit count above the plain line buffer, and that the largest
// table does at least as well as the default one (8).
module tb_itt_size_sweep;
  localparam int NSIZES = 8;
  localparam int SIZES [NSIZES] = '{0, 4, 8, 16, 32, 64, 128, 256};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bit done    [NSIZES];
  int fetches [NSIZES], lb_hits [NSIZES], predicts [NSIZES], hchecks [NSIZES], hfail [NSIZES];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NSIZES; k++) begin : g_size
    kitps_sweep_harness #(.ITT_SIZE(SIZES[k])) u_h (
      .clk, .rst_n, .done(done[k]), .fetches(fetches[k]), .lb_hits(lb_hits[k]),
      .predicts(predicts[k]), .checks(hchecks[k]), .failures(hfail[k])
    );
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_done();
    foreach (done[k]) if (!done[k]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    for (int k = 0; k < NSIZES; k++) begin
      checks += hchecks[k];
      failures += hfail[k];
      $display("ITT size %3d: line buffer hits %0d of %0d fetches (%0d.%01d %%), predicted loads %0d",
               SIZES[k], lb_hits[k], fetches[k], lb_hits[k] * 100 / fetches[k],
               (lb_hits[k] * 1000 / fetches[k]) % 10, predicts[k]);
    end
    for (int k = 1; k < NSIZES; k++) begin
      check(fetches[k] == fetches[0], "same trace in every copy");
      check(lb_hits[k] > lb_hits[0], $sformatf("ITT size %0d beats the plain line buffer", SIZES[k]));
      check(predicts[k] > 0, $sformatf("ITT size %0d made predictions", SIZES[k]));
    end
    check(predicts[0] == 0, "no predictions without a table");
    check(lb_hits[NSIZES-1] >= lb_hits[2], "largest table at least as good as the default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
