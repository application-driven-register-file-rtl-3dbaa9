// tb_task_sets -- the multi-task workloads in every evaluated configuration.
//
// Runs tb_task_set_runner on six configurations of rfmap_top: register
// files of 64 and 128 registers, each with a pool of 25 %, 50 % and 75 %
// of its size (64: 2, 4, 6 pages; 128: 4, 8, 12 pages). The 128-register,
// 8-page runner is the top at its default size. Each runner plays 12 task
// sets at two optimisation levels in MP and MB mode, checks that every
// task's live registers survive its preemptions, and prints per set how
// many tasks fit in the pool. The six run side by side; the result line
// sums their checks.
module tb_task_sets;
  localparam int N = 6;
  bit done [N];
  int chk [N];
  int fl [N];

  tb_task_set_runner #(.RF_ENTRIES(64),  .POOL_PAGES(2))  r0 (.done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_task_set_runner #(.RF_ENTRIES(64),  .POOL_PAGES(4))  r1 (.done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tb_task_set_runner #(.RF_ENTRIES(64),  .POOL_PAGES(6))  r2 (.done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tb_task_set_runner #(.RF_ENTRIES(128), .POOL_PAGES(4))  r3 (.done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tb_task_set_runner #(.RF_ENTRIES(128), .POOL_PAGES(8))  r4 (.done(done[4]), .checks(chk[4]), .failures(fl[4]));
  tb_task_set_runner #(.RF_ENTRIES(128), .POOL_PAGES(12)) r5 (.done(done[5]), .checks(chk[5]), .failures(fl[5]));

  logic clk = 1'b0;
  always #5 clk = ~clk;

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : main
    int checks, failures;
    for (int cyc = 0; cyc < 2000000; cyc++) begin
      @(posedge clk);
      if (all_done()) break;
    end
    checks = 0; failures = 0;
    foreach (done[i]) begin
      checks += chk[i];
      failures += fl[i];
      if (!done[i]) begin
        failures++;
        $display("watchdog expired: runner %0d did not finish", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
