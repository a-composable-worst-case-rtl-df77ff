// tb_mc_top_full: the controller at its default, full size.
//
// mc_top is instantiated with no parameter changes: 7 cores with private
// banks, one shared partition (the eighth, virtual requestor), one rank,
// DDR3-1333H timing with the real refresh interval of 5200 cycles (7.8 us
// at 1.5 ns). The DRAM model is set to the same device.
//
// Every core sends 700 private requests and 40 shared ones with random
// gaps, rows and types, which keeps the controller busy for well over four
// refresh intervals. Checked:
//   - every completion against a reference memory (data and order);
//   - every JEDEC constraint on the command and data buses (DRAM model);
//   - PRE waits in the global FIFO <= tIP = M-1 = 7 (Eq. 3) and ACT waits
//     <= tIA (Eq. 5); with M = Mr = 8 on one rank tIA = (tFAW - 4 tRRD)
//     + 1*tFAW + 3*tRRD = 0 + 20 + 15 = 35 cycles;
//   - the interval from a CAS entering the FIFO to the end of its data
//     <= F_R + (M-1) D_WR = 18 + 7*18 = 144 cycles (Eq. 10, 11);
//   - REF commands exactly tREFI = 5200 cycles apart, at least 4 of them.
// Watchdog: 400000 cycles.
module tb_mc_top_full;
  import mc_pkg::*;

  localparam int unsigned NC = 7, NS = 1, NR = 1;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic      core_req_valid [NC], core_req_ready [NC], core_resp_valid [NC];
  mem_req_t  core_req [NC];
  mem_resp_t core_resp [NC];
  logic      shr_req_valid [NS][NC], shr_req_ready [NS][NC], shr_resp_valid [NS][NC];
  mem_req_t  shr_req [NS][NC];
  mem_resp_t shr_resp [NS][NC];
  logic      cmd_valid, dq_oe, refresh_busy;
  dram_cmd_t cmd;
  logic [BEAT2_W-1:0] dq_out, dq_in;
  mc_events_t events;

  mc_top dut (.*);

  dram_model #(.NUM_RANKS(NR), .TP(DDR3_1333H)) u_dram (
    .clk, .cmd_valid(cmd_valid && rst_n), .cmd, .dq_out, .dq_oe, .dq_in);

  mc_stim #(.NUM_CORES(NC), .NUM_SHARED(NS), .N_REQ(700), .N_SHR(40)) u_stim (.*);

  mc_monitor #(.NUM_CORES(NC), .NUM_SHARED(NS), .NUM_RANKS(NR), .TP(DDR3_1333H)) u_mon (
    .clk, .rst_n, .enq_valid(dut.enq_valid), .issued(dut.issued),
    .cmd_valid, .cmd, .refresh_busy, .events);

  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;

  task automatic finish_test();
    $display("cycles %0d, loads %0d, stores %0d, shared completions %0d, row hits %0d, ACTs %0d",
             cyc, u_stim.loads, u_stim.stores, u_stim.shared_done, u_mon.n_hit, u_dram.n_act);
    u_mon.report();
    u_stim.checks += u_mon.n_pre_bound + u_mon.n_act_bound + u_mon.n_cas_bound + u_mon.n_ref_cmd;
    u_stim.failures += u_mon.bound_fail;
    u_stim.checks++;
    if (u_mon.max_act_wait > 35 || u_mon.max_pre_wait > 7) u_stim.failures++;
    u_stim.checks++;
    if (u_mon.n_ref_cmd < 4) begin
      u_stim.failures++;
      $display("only %0d refreshes", u_mon.n_ref_cmd);
    end
    u_stim.checks++;
    if (u_dram.violations != 0) begin
      u_stim.failures += u_dram.violations;
      $display("DRAM timing violations: %0d", u_dram.violations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", u_stim.checks, u_stim.failures);
    $finish;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (u_stim.done);
    repeat (50) @(posedge clk);
    finish_test();
  end

  initial begin
    repeat (400000) @(posedge clk);
    u_stim.failures++;
    $display("watchdog: test did not finish");
    finish_test();
  end

endmodule
