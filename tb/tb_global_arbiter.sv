// tb_global_arbiter: self-checking test of the global command arbiter.
//
// Environment: 10 requestors on 2 ranks (requestor k owns rank k%2, bank
// k/2; five banks per rank so that five ACTs can meet in one tFAW window), the global FIFO, the data bus unit and the DRAM model. The
// requestors are modelled in the testbench: each turns random loads and
// stores into PRE/ACT/CAS for its bank, keeps its own-bank constraints and
// Rule-1 (one command in the FIFO; a CAS counts until its data end), and
// inserts a command when allowed, sometimes a few cycles late. Timing is
// DDR3-1333H with tREFI shortened to 1000 cycles (several refreshes) and
// tRRD lowered to 4 (so the four-activate window can bind).
//
// Checked every cycle against a reference model of the arbitration:
//   - a command is blocked if an ACT would break tRRD or tFAW of its rank,
//     or a CAS would start its burst before the data bus is free (plus
//     tRTR after another rank's burst) or break tWTR / tRTW of its rank;
//     refresh ACTs count too. PRE is never blocked.
//   - Rule-4: every CAS behind a blocked CAS is blocked.
//   - Rule-3: the arbiter must issue exactly the oldest unblocked entry,
//     in the same cycle, or nothing if every entry is blocked; the issue
//     acknowledgement goes to that entry's requestor only.
//   - Rule-5: refresh starts exactly every tREFI cycles, the FIFO is not
//     served from the start cycle for tREFS cycles, and the sequence is
//     PREA, REF, ACTs (checked in detail by the refresh sequencer's test).
// The DRAM model independently checks every JEDEC constraint of the
// resulting command stream. Coverage: reordering, CAS held behind a
// blocked CAS, tRRD and tFAW stalls, rank switches and both turnarounds
// must all occur.
module tb_global_arbiter;
  import mc_pkg::*;

  localparam int unsigned N = 10, NR = 2, ID_W = 4;
  localparam timing_t TP = '{rcd: 9, rl: 9, wl: 7, bus: 4, rp: 9, wr: 10,
      rtp: 5, ras: 24, rc: 33, rrd: 4, faw: 20, rtw: 8, wtr: 5, rtr: 2,
      rfc: 107, refi: 1000};
  localparam int RL = int'(TP.rl), WL = int'(TP.wl), BUS = int'(TP.bus);
  // signed copies: differences of cycle numbers may be negative
  localparam int RAS = int'(TP.ras), RTP = int'(TP.rtp), WR = int'(TP.wr);
  localparam int RC = int'(TP.rc), RP = int'(TP.rp), RCD = int'(TP.rcd);
  localparam int RTW = int'(TP.rtw), WTR = int'(TP.wtr), RTR = int'(TP.rtr);
  localparam int RRD = int'(TP.rrd), FAW = int'(TP.faw), REFI = int'(TP.refi);
  localparam longint NEVER = -100000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT + env
  logic [N-1:0]    ins_valid = '0;
  dram_cmd_t       ins_cmd [N];
  logic [N-1:0]    ent_valid;
  logic [ID_W-1:0] ent_id  [N];
  dram_cmd_t       ent_cmd [N];
  logic            rm_valid;
  logic [ID_W-1:0] rm_idx;
  logic [N-1:0]    issued;
  logic            bus_valid, cas_valid, cas_write, refresh_busy;
  dram_cmd_t       bus_cmd;
  logic [ID_W-1:0] cas_id;
  mc_events_t      events;
  logic [BEAT2_W-1:0] dq_out, dq_in;
  logic            dq_oe, done_valid, done_store;
  logic [ID_W-1:0] done_id;
  logic [LINE_W-1:0] done_rdata;

  global_fifo #(.N(N)) u_fifo (
    .clk, .rst_n, .ins_valid, .ins_cmd, .rm_valid, .rm_idx,
    .ent_valid, .ent_id, .ent_cmd, .count());

  global_arbiter #(.N(N), .NUM_RANKS(NR), .TP(TP)) dut (
    .clk, .rst_n, .ent_valid, .ent_id, .ent_cmd, .rm_valid, .rm_idx, .issued,
    .bus_valid, .bus_cmd, .cas_valid, .cas_id, .cas_write, .refresh_busy, .events);

  data_path #(.N(N), .TP(TP)) u_data (
    .clk, .rst_n, .cas_valid, .cas_id, .cas_write, .cas_wdata({16{32'h5a5a_0000}}),
    .dq_out, .dq_oe, .dq_in, .done_valid, .done_id, .done_store, .done_rdata);

  dram_model #(.NUM_RANKS(NR), .TP(TP)) u_dram (
    .clk, .cmd_valid(bus_valid), .cmd(bus_cmd), .dq_out, .dq_oe, .dq_in);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  function automatic longint lmax(longint a, longint b);
    return (a > b) ? a : b;
  endfunction

  // ------------------------------------------------------------ requestors
  buf_cmd_t list [N][$];
  bit       m_open [N];
  int       m_row  [N];
  bit       inq    [N];
  longint   free_at [N];                     // may insert from this cycle
  longint   o_act [N], o_pre [N], o_rd [N], o_wr [N];
  int       n_served = 0;

  task automatic add_request(int k);
    buf_cmd_t b = '0;
    int row = $urandom_range(0, 2);
    if ($urandom_range(0, 99) < 40 && m_open[k]) row = m_row[k];
    b.c.rank = RANK_W'(k % NR); b.c.bank = BANK_W'(k / NR); b.c.col = COL_W'($urandom);
    if (m_open[k] && m_row[k] != row) begin
      b.c.cmd = CMD_PRE; b.c.row = ROW_W'(m_row[k]); list[k].push_back(b); m_open[k] = 0;
    end
    if (!m_open[k]) begin
      b.c.cmd = CMD_ACT; b.c.row = ROW_W'(row); list[k].push_back(b);
      m_open[k] = 1; m_row[k] = row;
    end
    b.c.cmd = $urandom_range(0, 1) ? CMD_WR : CMD_RD; b.c.row = ROW_W'(row);
    list[k].push_back(b);
  endtask

  // own-bank earliest issue cycle of command c of requestor k
  function automatic longint own_earliest(int k, cmd_e c);
    longint e = NEVER;
    longint wend = o_wr[k] + WL + BUS;
    case (c)
      CMD_PRE: e = lmax(lmax(o_act[k] + RAS, o_rd[k] + RTP), wend + WR);
      CMD_ACT: e = lmax(o_act[k] + RC, o_pre[k] + RP);
      CMD_RD:  e = lmax(lmax(o_act[k] + RCD, wend + WTR), o_rd[k] + BUS);
      CMD_WR:  e = lmax(lmax(o_act[k] + RCD, o_rd[k] + RTW), o_wr[k] + BUS);
      default: ;
    endcase
    return e;
  endfunction

  // ------------------------------------------------------------ reference
  longint r_act [NR][4];                     // last four ACTs per rank
  longint r_rd [NR], r_wend [NR];
  longint bus_end = NEVER;
  int     bus_rank = -1;

  function automatic bit act_ok(int r, longint c);
    return (c - r_act[r][0] >= RRD) && (c - r_act[r][3] >= FAW);
  endfunction
  function automatic bit cas_ok(int r, bit wr, longint c);
    longint start = c + (wr ? WL : RL);
    longint need  = bus_end + ((bus_rank >= 0 && bus_rank != r) ? RTR : 0);
    if (start < need) return 0;
    if (wr && c - r_rd[r] < RTW) return 0;
    if (!wr && c - r_wend[r] < WTR) return 0;
    return 1;
  endfunction

  // ------------------------------------------------------------ main loop
  longint cyc = 0;
  longint last_ref_start = NEVER, hold_until = NEVER;
  int     n_ref_start = 0, n_reorder = 0, n_hold = 0, n_faw = 0, n_rrd = 0;
  int     n_rank = 0, n_w2r = 0, n_r2w = 0, n_issue = 0, n_cas = 0;
  localparam int S_SEQ   = (int'(RRD) > NR) ? int'(RRD) : NR;
  localparam int T_AP    = 23;   // max(tRAS, tRTP, tWL+tBUS+tWR) - 1
  localparam int T_REFS  = T_AP + int'(RP) + int'(TP.rfc)
                         + ((int'(FAW) > 4 * S_SEQ) ? int'(FAW) : 4 * S_SEQ)
                         + 3 * S_SEQ + NR - 1 + 24;

  initial begin
    for (int k = 0; k < N; k++) begin
      ins_cmd[k] = '0; m_open[k] = 0; m_row[k] = 0; inq[k] = 0; free_at[k] = 0;
      o_act[k] = NEVER; o_pre[k] = NEVER; o_rd[k] = NEVER; o_wr[k] = NEVER;
    end
    for (int r = 0; r < NR; r++) begin
      r_rd[r] = NEVER; r_wend[r] = NEVER;
      for (int j = 0; j < 4; j++) r_act[r][j] = NEVER;
    end
  end

  always @(negedge clk) if (rst_n) begin
    automatic bit cas_blocked = 0;
    automatic int exp_i = -1;
    automatic bit hold = (events.refresh || refresh_busy);
    automatic int nvalid = 0;
    // ---------------- refresh schedule (Rule-5)
    if (events.refresh) begin
      if (n_ref_start != 0) check(cyc - last_ref_start == REFI,
                 $sformatf("refresh interval %0d", cyc - last_ref_start));
      last_ref_start = cyc;
      hold_until = cyc + T_REFS - 1;
      n_ref_start++;
    end
    check(hold == (cyc >= last_ref_start && cyc <= hold_until),
          $sformatf("FIFO frozen exactly tREFS=%0d cycles", T_REFS));
    // ---------------- reference selection (Rules 3, 4)
    for (int i = 0; i < N; i++) begin
      automatic bit ok = 0;
      automatic int r;
      if (!ent_valid[i]) continue;
      nvalid++;
      r = int'(ent_cmd[i].rank);
      case (ent_cmd[i].cmd)
        CMD_PRE: ok = 1;
        CMD_ACT: ok = act_ok(r, cyc);
        CMD_RD, CMD_WR: begin
          ok = cas_ok(r, ent_cmd[i].cmd == CMD_WR, cyc) && !cas_blocked;
          if (!cas_ok(r, ent_cmd[i].cmd == CMD_WR, cyc)) cas_blocked = 1;
          else if (cas_blocked) n_hold++;
        end
        default: ;
      endcase
      if (ok && exp_i < 0) exp_i = i;
    end
    if (hold) exp_i = -1;
    check(rm_valid == (exp_i >= 0), $sformatf("issue %0b, expected %0b (entry %0d)", rm_valid, exp_i >= 0, exp_i));
    if (exp_i >= 0 && rm_valid) begin
      check(int'(rm_idx) == exp_i, $sformatf("issued entry %0d, expected oldest unblocked %0d", rm_idx, exp_i));
      check(bus_valid && bus_cmd == ent_cmd[exp_i], "command bus carries the chosen entry");
      check(issued == (N'(1) << ent_id[exp_i]), "acknowledge to the owner only");
      if (exp_i > 0) n_reorder++;
    end else if (!rm_valid) check(issued == '0, "no acknowledge without issue");
    if (events.faw_stall) n_faw++;
    if (events.rrd_stall) n_rrd++;
    if (events.rank_switch) n_rank++;
    if (events.wr_to_rd) n_w2r++;
    if (events.rd_to_wr) n_r2w++;
    // ---------------- reference state update from the command bus
    if (bus_valid) begin
      automatic int r = int'(bus_cmd.rank);
      case (bus_cmd.cmd)
        CMD_ACT: begin
          for (int j = 3; j > 0; j--) r_act[r][j] = r_act[r][j-1];
          r_act[r][0] = cyc;
        end
        CMD_RD, CMD_WR: begin
          automatic bit wr = (bus_cmd.cmd == CMD_WR);
          n_cas++;
          bus_end  = cyc + (wr ? WL : RL) + BUS;
          bus_rank = r;
          if (wr) r_wend[r] = cyc + WL + BUS; else r_rd[r] = cyc;
        end
        default: ;
      endcase
    end
    // ---------------- requestors: issue feedback
    for (int k = 0; k < N; k++) begin
      if (issued[k]) begin
        automatic cmd_e c = list[k][0].c.cmd;
        n_issue++;
        inq[k] = 0;
        case (c)
          CMD_PRE: begin o_pre[k] = cyc; free_at[k] = cyc + 1; end
          CMD_ACT: begin o_act[k] = cyc; free_at[k] = cyc + 1; end
          CMD_RD:  begin o_rd[k]  = cyc; free_at[k] = cyc + RL + BUS + 1; n_served++; end
          CMD_WR:  begin o_wr[k]  = cyc; free_at[k] = cyc + WL + BUS + 1; n_served++; end
          default: ;
        endcase
        void'(list[k].pop_front());
      end
    end
    // ---------------- requestors: insert for this cycle (visible next)
    ins_valid = '0;
    for (int k = 0; k < N; k++) begin
      if (list[k].size() < 3 && $urandom_range(0, 99) < 30) add_request(k);
      if (!inq[k] && list[k].size() != 0 && cyc >= free_at[k] &&
          cyc + 1 >= own_earliest(k, list[k][0].c.cmd) && $urandom_range(0, 99) < 85) begin
        ins_valid[k] = 1;
        ins_cmd[k]   = list[k][0].c;
        inq[k]       = 1;
      end
    end
    cyc++;
  end

  initial begin
    repeat (3) @(negedge clk);
    #1 rst_n = 1;
    wait (cyc >= 6000);
    @(negedge clk);
    $display("issued %0d (CAS %0d), refreshes %0d, reordered %0d, CAS held %0d, tRRD %0d, tFAW %0d, rank switches %0d, W->R %0d, R->W %0d",
             n_issue, n_cas, n_ref_start, n_reorder, n_hold, n_rrd, n_faw, n_rank, n_w2r, n_r2w);
    check(n_ref_start == 6, "six refresh sequences in 6000 cycles");
    check(n_reorder > 0 && n_hold > 0 && n_rrd > 0 && n_faw > 0, "Rule-3/4 and ACT window situations covered");
    check(n_rank > 0 && n_w2r > 0 && n_r2w > 0, "bus turnarounds covered");
    check(u_dram.violations == 0, $sformatf("DRAM model: %0d timing violations", u_dram.violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
