// mc_workload: one complete controller system running a synthetic workload.
//
// Wraps mc_top with the behavioural DDR3 device (dram_model), the request
// generator and scoreboard (mc_stim) and the bound monitor (mc_monitor), so
// that a testbench can run several system configurations side by side.
// The workload is characterised as in the evaluation of the controller:
// number of requestors, number of ranks (requestors spread evenly over
// them), device timing set, row hit ratio and store ratio. There are no
// shared partitions here (synthetic workloads use private data only).
// A core with no pending request starts one with probability RATE_PM per
// mille per cycle.
//
// report() prints one line per configuration and returns the number of
// checks and failures:
//   - every completion correct (scoreboard) and no JEDEC violation;
//   - PRE and ACT waits within tIP and tIA of the rank (monitor);
//   - the measured row hit ratio (CAS without an own ACT since the bank's
//     previous CAS) within 10 points of HIT_PCT;
//   - at least one request served.
// The average private request latency in ns (accept to completion, using
// TCK_PS per cycle) is returned for comparisons across configurations.
module mc_workload
  import mc_pkg::*;
#(
  parameter string       NAME      = "workload",
  parameter int unsigned NC        = 4,
  parameter int unsigned NR        = 1,
  parameter timing_t     TP        = DDR3_1333H,
  parameter int unsigned TCK_PS    = 1500,
  parameter int unsigned HIT_PCT   = 40,
  parameter int unsigned STORE_PCT = 20,
  parameter int unsigned N_REQ     = 200,
  parameter int unsigned RATE_PM   = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic done
);

  localparam int unsigned NS = 0, SH_P = 1;

  logic      core_req_valid [NC], core_req_ready [NC], core_resp_valid [NC];
  mem_req_t  core_req [NC];
  mem_resp_t core_resp [NC];
  logic      shr_req_valid [SH_P][NC], shr_req_ready [SH_P][NC], shr_resp_valid [SH_P][NC];
  mem_req_t  shr_req [SH_P][NC];
  mem_resp_t shr_resp [SH_P][NC];
  logic      cmd_valid, dq_oe, refresh_busy;
  dram_cmd_t cmd;
  logic [BEAT2_W-1:0] dq_out, dq_in;
  mc_events_t events;

  mc_top #(.NUM_CORES(NC), .NUM_SHARED(NS), .NUM_RANKS(NR), .TP(TP)) dut (.*);

  dram_model #(.NUM_RANKS(NR), .TP(TP)) u_dram (
    .clk, .cmd_valid(cmd_valid && rst_n), .cmd, .dq_out, .dq_oe, .dq_in);

  mc_stim #(.NUM_CORES(NC), .NUM_SHARED(NS), .N_REQ(N_REQ), .N_SHR(0),
            .RATE_PM(RATE_PM), .HIT_PCT(HIT_PCT), .STORE_PCT(STORE_PCT)) u_stim (.*);

  mc_monitor #(.NUM_CORES(NC), .NUM_SHARED(NS), .NUM_RANKS(NR), .TP(TP)) u_mon (
    .clk, .rst_n, .enq_valid(dut.enq_valid), .issued(dut.issued),
    .cmd_valid, .cmd, .refresh_busy, .events);

  assign done = u_stim.done;

  function automatic real avg_ns();
    if (u_stim.lat_n == 0) return 0.0;
    return real'(u_stim.lat_sum) / real'(u_stim.lat_n) * real'(TCK_PS) / 1000.0;
  endfunction

  task automatic report(inout int checks, inout int failures);
    automatic int n_cas = u_dram.n_rd + u_dram.n_wr;
    automatic int hit = (n_cas == 0) ? 0 : (100 * u_mon.n_hit) / n_cas;
    $display("%-34s req %0d, hits %0d%%, stores %0d, avg latency %0.1f ns (max %0d cyc), PRE wait max %0d (tIP %0d), ACT wait max %0d (tIA %0d), REF %0d",
             NAME, u_stim.lat_n, hit, u_stim.stores, avg_ns(), u_stim.lat_max,
             u_mon.max_pre_wait, NC - 1, u_mon.max_act_wait, u_mon.t_ia(0), u_mon.n_ref_cmd);
    checks   += u_stim.checks + u_mon.n_pre_bound + u_mon.n_act_bound + u_mon.n_cas_bound + u_mon.n_ref_cmd + 3;
    failures += u_stim.failures + u_mon.bound_fail + u_dram.violations;
    if (u_dram.violations != 0) $display("%s: %0d DRAM timing violations", NAME, u_dram.violations);
    if (hit < int'(HIT_PCT) - 10 || hit > int'(HIT_PCT) + 10) begin
      failures++;
      $display("%s: row hit ratio %0d%%, expected about %0d%%", NAME, hit, HIT_PCT);
    end
    if (u_stim.lat_n != int'(NC * N_REQ)) begin
      failures++;
      $display("%s: %0d of %0d requests completed", NAME, u_stim.lat_n, NC * N_REQ);
    end
    if (!u_stim.done) failures++;
  endtask

endmodule
