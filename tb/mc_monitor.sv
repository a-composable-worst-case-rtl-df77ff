// mc_monitor: bus and bound monitor for whole-controller testbenches.
//
// Watches the controller's command bus, its event outputs and, through
// ports the testbench connects to the controller's insides, the insertion
// of commands into the global FIFO (enq_valid) and their issue (issued).
// It counts every mechanism the end-to-end tests must see, and it checks
// measured delays against the bounds of the worst case analysis:
//
//   tIP = M - 1                  (Eq. 3) wait of a PRE in the global FIFO
//   tIA = (tFAW - 4 tRRD) + floor((Mr-1)/4) tFAW + ((Mr-1) mod 4) tRRD
//         + (M - Mr)             (Eq. 5) wait of an ACT, Mr = requestors
//                                 of the ACT's rank
//   tCD <= F_R + (M - 1) D_WR    CAS in the FIFO to the end of its data,
//         F_R = tWTR + tRL + tBUS, D_WR = tWTR + tRL + tBUS (Eq. 10, 11):
//         the exact bound picks the worst mix of write-to-read, read-to-write
//         and rank-to-rank steps; counting every step as the largest one,
//         write-to-read, gives this simpler bound that is never smaller.
//
// A command inserted in cycle t is visible in the FIFO from t+1; its wait
// is issue cycle - (t+1). Waits that overlap a refresh sequence, or start
// less than tFAW after one (its ACTs still count in the window), are not
// checked: the bounds exclude refresh, which the analysis adds separately.
// Refresh itself is checked: consecutive REF commands exactly tREFI apart.
//
// Row hit: a CAS with no ACT of its own requestor since that bank's last
// CAS (a refresh re-activation does not count as the requestor's ACT).
// All checks are sampled on the falling clock edge. The enclosing
// testbench reads the counters and bound_fail.
module mc_monitor
  import mc_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 7,
  parameter int unsigned NUM_SHARED = 1,
  parameter int unsigned NUM_RANKS  = 1,
  parameter timing_t     TP         = DDR3_1333H,
  localparam int unsigned M = NUM_CORES + NUM_SHARED
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M-1:0] enq_valid,
  input  logic [M-1:0] issued,
  input  logic       cmd_valid,
  input  dram_cmd_t  cmd,
  input  logic       refresh_busy,
  input  mc_events_t events
);

  localparam int FAW = int'(TP.faw), RRD = int'(TP.rrd);
  localparam int F_R = int'(TP.wtr + TP.rl + TP.bus);
  localparam int T_CD = F_R + (int'(M) - 1) * F_R;

  function automatic int t_ia(int i);
    int mr = 0;
    for (int j = 0; j < int'(M); j++) if (j % int'(NUM_RANKS) == i % int'(NUM_RANKS)) mr++;
    return (FAW - 4 * RRD) + ((mr - 1) / 4) * FAW + ((mr - 1) % 4) * RRD + (int'(M) - mr);
  endfunction

  int cyc = 0, last_ref = -100000, last_ref_cmd = -1;
  int ins_at [M];
  int n_pre_bound = 0, n_act_bound = 0, max_pre_wait = 0, max_act_wait = 0;
  int bound_fail = 0, n_ref_cmd = 0, n_cas_bound = 0, max_cas_cd = 0;
  int n_reorder = 0, n_cas_hold = 0, n_faw = 0, n_rrd = 0, n_rank = 0;
  int n_w2r = 0, n_r2w = 0, n_refresh = 0, n_hit = 0;
  bit act_fresh [NUM_RANKS][BANKS];

  initial begin
    for (int i = 0; i < int'(M); i++) ins_at[i] = 0;
    for (int r = 0; r < int'(NUM_RANKS); r++)
      for (int b = 0; b < BANKS; b++) act_fresh[r][b] = 0;
  end

  always @(negedge clk) if (rst_n) begin
    n_reorder  += int'(events.reorder);
    n_cas_hold += int'(events.cas_hold);
    n_faw      += int'(events.faw_stall);
    n_rrd      += int'(events.rrd_stall);
    n_rank     += int'(events.rank_switch);
    n_w2r      += int'(events.wr_to_rd);
    n_r2w      += int'(events.rd_to_wr);
    n_refresh  += int'(events.refresh);
    if (refresh_busy || events.refresh) last_ref = cyc;
    if (cmd_valid && cmd.cmd == CMD_REF) begin
      if (last_ref_cmd >= 0 && cyc - last_ref_cmd != int'(TP.refi)) begin
        bound_fail++;
        $display("[%0d] REF %0d cycles after the previous one, tREFI is %0d",
                 cyc, cyc - last_ref_cmd, TP.refi);
      end
      last_ref_cmd = cyc;
      n_ref_cmd++;
    end
    if (cmd_valid && !refresh_busy && cmd.cmd == CMD_ACT)
      act_fresh[int'(cmd.rank) % NUM_RANKS][cmd.bank] = 1;
    if (cmd_valid && cmd.cmd inside {CMD_RD, CMD_WR}) begin
      if (!act_fresh[int'(cmd.rank) % NUM_RANKS][cmd.bank]) n_hit++;
      act_fresh[int'(cmd.rank) % NUM_RANKS][cmd.bank] = 0;
    end
    for (int i = 0; i < int'(M); i++) begin
      if (enq_valid[i]) ins_at[i] = cyc;
      if (issued[i] && cmd_valid && cmd.cmd inside {CMD_PRE, CMD_ACT, CMD_RD, CMD_WR}) begin
        automatic int w = cyc - (ins_at[i] + 1);
        if (last_ref < ins_at[i] - FAW) begin
          if (cmd.cmd == CMD_PRE) begin
            n_pre_bound++;
            if (w > max_pre_wait) max_pre_wait = w;
            if (w > int'(M) - 1) begin
              bound_fail++;
              $display("[%0d] PRE of requestor %0d waited %0d > tIP %0d", cyc, i, w, M - 1);
            end
          end else if (cmd.cmd == CMD_ACT) begin
            n_act_bound++;
            if (w > max_act_wait) max_act_wait = w;
            if (w > t_ia(i)) begin
              bound_fail++;
              $display("[%0d] ACT of requestor %0d waited %0d > tIA %0d", cyc, i, w, t_ia(i));
            end
          end else begin
            automatic int cd = w + int'(cmd.cmd == CMD_RD ? TP.rl : TP.wl) + int'(TP.bus);
            n_cas_bound++;
            if (cd > max_cas_cd) max_cas_cd = cd;
            if (cd > T_CD) begin
              bound_fail++;
              $display("[%0d] CAS of requestor %0d took %0d to the end of its data > %0d", cyc, i, cd, T_CD);
            end
          end
        end
      end
    end
    cyc++;
  end

  task automatic report();
    $display("PRE waits checked %0d (max %0d, tIP %0d), ACT waits checked %0d (max %0d, tIA %0d..%0d), REF commands %0d",
             n_pre_bound, max_pre_wait, M - 1, n_act_bound, max_act_wait,
             t_ia(0), t_ia(int'(M) - 1), n_ref_cmd);
    $display("CAS-to-data intervals checked %0d (max %0d, bound %0d)", n_cas_bound, max_cas_cd, T_CD);
  endtask

endmodule
