// tb_mc_workloads: the controller under the synthetic workloads it is
// evaluated with.
//
// Nine complete systems (mc_workload: controller, DDR3 device model,
// request generator, bound monitor) run side by side on one clock, each
// with a different configuration of the evaluation:
//   - 4 requestors on 1, 2 and 4 ranks and 16 requestors on 2 and 4 ranks,
//     DDR3-1333H, 40 % row hits, 20 % stores (16 requestors cannot have
//     private banks on one rank of 8 banks);
//   - 4 requestors on one rank with DDR3-800D and DDR3-2133M timing
//     (device comparison, 40 % hits, 20 % stores);
//   - 4 requestors on one rank with 0 % and 100 % row hits.
// Each system checks its completions, its JEDEC timing, the tIP/tIA wait
// bounds for its own number of requestors per rank, and its row hit ratio.
// Requests arrive at random, on average about one per core every 150 ns
// (the per-cycle rate is scaled with the clock period of each device).
// Across systems the testbench checks the two trends the open-row design
// is built for: requests get faster (average latency in ns) as the row hit
// ratio rises from 0 to 100 %, and as the device gets faster from
// DDR3-800D to DDR3-1333H to DDR3-2133M.
// Watchdog: 300000 cycles.
module tb_mc_workloads;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic done [9];

  mc_workload #(.NAME("4 req, 1 rank, DDR3-1333H"),  .NC(4),  .NR(1)) w0 (.clk, .rst_n, .done(done[0]));
  mc_workload #(.NAME("4 req, 2 ranks, DDR3-1333H"), .NC(4),  .NR(2)) w1 (.clk, .rst_n, .done(done[1]));
  mc_workload #(.NAME("4 req, 4 ranks, DDR3-1333H"), .NC(4),  .NR(4)) w2 (.clk, .rst_n, .done(done[2]));
  mc_workload #(.NAME("16 req, 2 ranks, DDR3-1333H"), .NC(16), .NR(2), .N_REQ(100)) w3 (.clk, .rst_n, .done(done[3]));
  mc_workload #(.NAME("16 req, 4 ranks, DDR3-1333H"), .NC(16), .NR(4), .N_REQ(100)) w4 (.clk, .rst_n, .done(done[4]));
  mc_workload #(.NAME("4 req, 1 rank, DDR3-800D"),   .NC(4),  .NR(1), .TP(DDR3_800D),  .TCK_PS(2500), .RATE_PM(17)) w5 (.clk, .rst_n, .done(done[5]));
  mc_workload #(.NAME("4 req, 1 rank, DDR3-2133M"),  .NC(4),  .NR(1), .TP(DDR3_2133M), .TCK_PS(938),  .RATE_PM(6))  w6 (.clk, .rst_n, .done(done[6]));
  mc_workload #(.NAME("4 req, 1 rank, 0% hits"),     .NC(4),  .NR(1), .HIT_PCT(0))   w7 (.clk, .rst_n, .done(done[7]));
  mc_workload #(.NAME("4 req, 1 rank, 100% hits"),   .NC(4),  .NR(1), .HIT_PCT(100)) w8 (.clk, .rst_n, .done(done[8]));

  int checks = 0, failures = 0;

  task automatic finish_test();
    w0.report(checks, failures); w1.report(checks, failures); w2.report(checks, failures);
    w3.report(checks, failures); w4.report(checks, failures); w5.report(checks, failures);
    w6.report(checks, failures); w7.report(checks, failures); w8.report(checks, failures);
    checks++;
    if (!(w8.avg_ns() < w0.avg_ns() && w0.avg_ns() < w7.avg_ns())) begin
      failures++;
      $display("latency does not fall with the row hit ratio: 0%% %0.1f, 40%% %0.1f, 100%% %0.1f ns",
               w7.avg_ns(), w0.avg_ns(), w8.avg_ns());
    end
    checks++;
    if (!(w6.avg_ns() < w0.avg_ns() && w0.avg_ns() < w5.avg_ns())) begin
      failures++;
      $display("latency does not fall with device speed: 800D %0.1f, 1333H %0.1f, 2133M %0.1f ns",
               w5.avg_ns(), w0.avg_ns(), w6.avg_ns());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    automatic bit all;
    repeat (5) @(posedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      all = 1;
      foreach (done[i]) if (!done[i]) all = 0;
      if (all) break;
    end
    repeat (50) @(posedge clk);
    finish_test();
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    finish_test();
  end

endmodule
