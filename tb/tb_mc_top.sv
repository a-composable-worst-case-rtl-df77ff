// tb_mc_top: end-to-end test of the controller at a reduced size.
//
// 9 cores and one shared partition spread over 2 ranks (5 banks per rank,
// so both rank switching and the four-activate window can occur).
// DDR3-1333H timing with two changes: the refresh interval is shortened to
// 1500 cycles so that several refresh sequences fall inside the run, and
// tRRD is lowered from 5 to 4 cycles, because with 4*tRRD = tFAW the
// four-activate window would never be the binding constraint.
//
// The DRAM model checks every JEDEC constraint on the buses and stores the
// data; the stimulus checks every completion against a reference memory.
// The monitor checks the PRE and ACT waits in the global FIFO against the
// bounds tIP (Eq. 3) and tIA (Eq. 5), the CAS-to-data interval against
// F_R + (M-1) D_WR, and the REF spacing against tREFI.
// The test also counts each mechanism of the controller -- row hit, row
// conflict (PRE+ACT), first activation, reordering of PRE/ACT past a
// blocked command (Rule-3), a CAS held behind a blocked CAS (Rule-4), tRRD
// and tFAW stalls, write-to-read and read-to-write turnarounds, rank
// switches, refresh and shared-partition traffic -- and fails if any of
// them never happened. Watchdog: 200000 cycles.
module tb_mc_top;
  import mc_pkg::*;

  localparam int unsigned NC = 9, NS = 1, NR = 2;
  localparam timing_t TPT = '{rcd: 9, rl: 9, wl: 7, bus: 4, rp: 9, wr: 10,
      rtp: 5, ras: 24, rc: 33, rrd: 4, faw: 20, rtw: 8, wtr: 5, rtr: 2,
      rfc: 107, refi: 1500};

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

  mc_top #(.NUM_CORES(NC), .NUM_SHARED(NS), .NUM_RANKS(NR), .TP(TPT)) dut (.*);

  dram_model #(.NUM_RANKS(NR), .TP(TPT)) u_dram (
    .clk, .cmd_valid(cmd_valid && rst_n), .cmd, .dq_out, .dq_oe, .dq_in);

  mc_stim #(.NUM_CORES(NC), .NUM_SHARED(NS), .N_REQ(120), .N_SHR(12)) u_stim (.*);

  mc_monitor #(.NUM_CORES(NC), .NUM_SHARED(NS), .NUM_RANKS(NR), .TP(TPT)) u_mon (
    .clk, .rst_n, .enq_valid(dut.enq_valid), .issued(dut.issued),
    .cmd_valid, .cmd, .refresh_busy, .events);

  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;

  task automatic need(string what, int n);
    u_stim.checks++;
    if (n == 0) begin
      u_stim.failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  task automatic finish_test();
    $display("cycles %0d, loads %0d, stores %0d, shared completions %0d",
             cyc, u_stim.loads, u_stim.stores, u_stim.shared_done);
    need("row hit (CAS only)", u_mon.n_hit);
    need("row conflict (PRE)", u_dram.n_pre);
    need("activation (ACT)", u_dram.n_act);
    need("Rule-3 reorder", u_mon.n_reorder);
    need("Rule-4 CAS hold", u_mon.n_cas_hold);
    need("tRRD stall", u_mon.n_rrd);
    need("tFAW stall", u_mon.n_faw);
    need("write-to-read", u_mon.n_w2r);
    need("read-to-write", u_mon.n_r2w);
    need("rank switch", u_mon.n_rank);
    need("refresh sequence", u_mon.n_refresh);
    need("REF command", u_dram.n_ref);
    need("shared completion", u_stim.shared_done);
    u_mon.report();
    u_stim.checks += u_mon.n_pre_bound + u_mon.n_act_bound + u_mon.n_cas_bound + u_mon.n_ref_cmd;
    u_stim.failures += u_mon.bound_fail;
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
    repeat (200000) @(posedge clk);
    u_stim.failures++;
    $display("watchdog: test did not finish");
    finish_test();
  end
endmodule
