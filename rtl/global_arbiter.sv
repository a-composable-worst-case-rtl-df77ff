// global_arbiter: global command arbiter of the back end.
//
// Every memory cycle it looks at all commands in the global FIFO, decides
// which are blocked by timing constraints that other requestors' commands
// caused, and issues the oldest non-blocked one on the command bus
// (Rule-3). CAS commands are never reordered among themselves: once a CAS
// in the FIFO is blocked, every later CAS is blocked too (Rule-4); PRE and
// ACT commands may still pass it. The requestor whose command was issued
// gets a one-cycle acknowledgement (issued), and a RD/WR is also handed to
// the data bus unit.
//
// Constraints checked here are the ones that involve several requestors
// (a requestor's own-bank constraints were already met when its command
// entered the FIFO, Rule-2):
//   ACT : tRRD to the previous ACT of the same rank; at most four ACTs of
//         a rank in any tFAW window.
//   CAS : the data bus. A CAS may start its burst only after the previous
//         burst ended (tBUS apart for equal types of one rank), plus tRTR
//         when the previous burst came from another rank; RD after WR of
//         the same rank waits tWTR after the end of the write data; WR after
//         RD of the same rank waits tRTW after the RD.
//   PRE : none (private banks).
// Each constraint is a countdown timer loaded on issue with the largest
// pending requirement, so one timer per rank and command class holds the
// constraint of every earlier command.
//
// Refresh (Rule-5): every tREFI cycles the FIFO is frozen and the static
// sequence of refresh_seq is issued instead; FIFO service resumes when it
// ends. The arbiter also keeps the open/closed state and open row of every
// bank, updated from the PRE and ACT commands it issues, which the refresh
// sequence uses to re-open the rows it closed.
//
// The issue decision is combinational from registered state: a command is
// on the command bus in the cycle it is chosen. The global FIFO is the one
// the document describes; the timer realisation is this design's own.
module global_arbiter
  import mc_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned NUM_RANKS = 1,
  parameter timing_t     TP        = DDR3_1333H,
  localparam int unsigned ID_W     = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // global FIFO contents
  input  logic [N-1:0]    ent_valid,
  input  logic [ID_W-1:0] ent_id  [N],
  input  dram_cmd_t       ent_cmd [N],
  output logic            rm_valid,
  output logic [ID_W-1:0] rm_idx,
  // acknowledgement to the per-requestor arbiters
  output logic [N-1:0]    issued,
  // command bus
  output logic            bus_valid,
  output dram_cmd_t       bus_cmd,
  // CAS handed to the data bus unit
  output logic            cas_valid,
  output logic [ID_W-1:0] cas_id,
  output logic            cas_write,
  // status
  output logic            refresh_busy,
  output mc_events_t      events
);

  typedef logic [TMR_W-1:0] tmr_t;

  function automatic tmr_t dec(tmr_t v);
    return (v == '0) ? '0 : v - 1'b1;
  endfunction
  function automatic tmr_t ld(tmr_t d, logic load, int g);
    // g is a gap in cycles between two issues; the timer holds g-1
    return (load && g > 0 && tmr_t'(g - 1) > d) ? tmr_t'(g - 1) : d;
  endfunction

  // CAS-to-CAS issue gaps (cycles) from the previous CAS to the next one
  localparam int G_RR_S = int'(TP.bus);
  localparam int G_WW_S = int'(TP.bus);
  localparam int G_RW_S = (int'(TP.rtw) > int'(TP.rl + TP.bus) - int'(TP.wl)) ?
                          int'(TP.rtw) : int'(TP.rl + TP.bus) - int'(TP.wl);
  localparam int G_WR_S = int'(TP.wl + TP.bus + TP.wtr);
  localparam int G_RR_D = int'(TP.bus + TP.rtr);
  localparam int G_WW_D = int'(TP.bus + TP.rtr);
  localparam int G_RW_D = int'(TP.rl + TP.bus + TP.rtr) - int'(TP.wl);
  localparam int G_WR_D = int'(TP.wl + TP.bus + TP.rtr) - int'(TP.rl);

  // ------------------------------------------------------------ state
  tmr_t t_rrd [NUM_RANKS];
  tmr_t t_faw [NUM_RANKS][4];
  tmr_t t_rd  [NUM_RANKS];
  tmr_t t_wr  [NUM_RANKS];
  logic             bank_open [NUM_RANKS][BANKS];
  logic [ROW_W-1:0] bank_row  [NUM_RANKS][BANKS];
  logic [$clog2(TP.refi)-1:0] refi_cnt;
  logic             last_cas_valid, last_cas_wr;
  logic [RANK_W-1:0] last_cas_rank;

  // ------------------------------------------------------------ refresh
  logic      ref_start, ref_valid;
  dram_cmd_t ref_cmd;
  assign ref_start = (refi_cnt == '0) && !refresh_busy;

  refresh_seq #(.NUM_RANKS(NUM_RANKS), .TP(TP)) u_refresh (
    .clk, .rst_n,
    .start     (ref_start),
    .bank_open (bank_open),
    .bank_row  (bank_row),
    .busy      (refresh_busy),
    .cmd_valid (ref_valid),
    .cmd       (ref_cmd)
  );

  logic hold;
  assign hold = ref_start || refresh_busy;

  // ------------------------------------------------------------ selection
  logic            found;
  logic [ID_W-1:0] sel;
  logic            any_cas_hold, any_faw, any_rrd;

  function automatic logic faw_ok(int unsigned r);
    logic ok = 1'b0;
    for (int unsigned k = 0; k < 4; k++) if (t_faw[r][k] == '0) ok = 1'b1;
    return ok;
  endfunction

  always_comb begin
    logic cas_blocked;
    logic ok, t_ok;
    int unsigned r;
    r            = 0;
    t_ok         = 1'b0;
    found        = 1'b0;
    sel          = '0;
    cas_blocked  = 1'b0;
    any_cas_hold = 1'b0;
    any_faw      = 1'b0;
    any_rrd      = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      ok = 1'b0;
      if (ent_valid[i] && !hold) begin
        r = 32'(ent_cmd[i].rank) % NUM_RANKS;
        unique case (ent_cmd[i].cmd)
          CMD_PRE: ok = 1'b1;
          CMD_ACT: begin
            ok = (t_rrd[r] == '0) && faw_ok(r);
            if (t_rrd[r] != '0) any_rrd = 1'b1;
            else if (!faw_ok(r)) any_faw = 1'b1;
          end
          CMD_RD, CMD_WR: begin
            t_ok = (ent_cmd[i].cmd == CMD_RD) ? (t_rd[r] == '0) : (t_wr[r] == '0);
            ok   = t_ok && !cas_blocked;
            if (t_ok && cas_blocked) any_cas_hold = 1'b1;
            if (!t_ok) cas_blocked = 1'b1;
          end
          default: ok = 1'b0;
        endcase
      end
      if (ok && !found) begin
        found = 1'b1;
        sel   = ID_W'(i);
      end
    end
  end

  // ------------------------------------------------------------ issue
  dram_cmd_t sel_cmd;
  logic [ID_W-1:0] sel_id;
  assign sel_cmd = ent_cmd[sel];
  assign sel_id  = ent_id[sel];

  always_comb begin
    rm_valid  = found;
    rm_idx    = sel;
    issued    = '0;
    if (found) issued[sel_id] = 1'b1;
    bus_valid = found || ref_valid;
    bus_cmd   = ref_valid ? ref_cmd : (found ? sel_cmd : '0);
    cas_valid = found && (sel_cmd.cmd == CMD_RD || sel_cmd.cmd == CMD_WR);
    cas_id    = sel_id;
    cas_write = (sel_cmd.cmd == CMD_WR);
  end

  logic              b_act, b_cas, b_wr;
  int unsigned       b_rank;
  assign b_act  = bus_valid && bus_cmd.cmd == CMD_ACT;
  assign b_cas  = cas_valid;
  assign b_wr   = cas_write;
  assign b_rank = 32'(bus_cmd.rank) % NUM_RANKS;

  always_comb begin
    events             = '0;
    events.reorder     = found && (sel != '0);
    events.cas_hold    = any_cas_hold;
    events.faw_stall   = any_faw;
    events.rrd_stall   = any_rrd;
    events.rank_switch = b_cas && last_cas_valid && (last_cas_rank != bus_cmd.rank);
    events.wr_to_rd    = b_cas && !b_wr && last_cas_valid && last_cas_wr &&
                         (last_cas_rank == bus_cmd.rank);
    events.rd_to_wr    = b_cas && b_wr && last_cas_valid && !last_cas_wr &&
                         (last_cas_rank == bus_cmd.rank);
    events.refresh     = ref_start;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NUM_RANKS; r++) begin
        t_rrd[r] <= '0;
        t_rd[r]  <= '0;
        t_wr[r]  <= '0;
        for (int unsigned k = 0; k < 4; k++) t_faw[r][k] <= '0;
        for (int unsigned b = 0; b < BANKS; b++) begin
          bank_open[r][b] <= 1'b0;
          bank_row[r][b]  <= '0;
        end
      end
      refi_cnt       <= ($clog2(TP.refi))'(TP.refi - 1);
      last_cas_valid <= 1'b0;
      last_cas_wr    <= 1'b0;
      last_cas_rank  <= '0;
    end else begin
      refi_cnt <= (refi_cnt == '0) ? ($clog2(TP.refi))'(TP.refi - 1) : refi_cnt - 1'b1;

      for (int unsigned r = 0; r < NUM_RANKS; r++) begin
        logic same, faw_loaded;
        same = (b_rank == r);
        // ACT timing of the rank (FIFO and refresh ACTs alike)
        t_rrd[r] <= ld(dec(t_rrd[r]), b_act && same, int'(TP.rrd));
        faw_loaded = 1'b0;
        for (int unsigned k = 0; k < 4; k++) begin
          if (b_act && same && !faw_loaded && t_faw[r][k] == '0) begin
            t_faw[r][k] <= tmr_t'(TP.faw - 1);
            faw_loaded = 1'b1;
          end else begin
            t_faw[r][k] <= dec(t_faw[r][k]);
          end
        end
        // data bus and read/write turnaround
        if (b_cas && !b_wr) begin
          t_rd[r] <= ld(dec(t_rd[r]), 1'b1, same ? G_RR_S : G_RR_D);
          t_wr[r] <= ld(dec(t_wr[r]), 1'b1, same ? G_RW_S : G_RW_D);
        end else if (b_cas && b_wr) begin
          t_rd[r] <= ld(dec(t_rd[r]), 1'b1, same ? G_WR_S : G_WR_D);
          t_wr[r] <= ld(dec(t_wr[r]), 1'b1, same ? G_WW_S : G_WW_D);
        end else begin
          t_rd[r] <= dec(t_rd[r]);
          t_wr[r] <= dec(t_wr[r]);
        end
      end

      // bank state, from the requestors' commands only (refresh restores it)
      if (found && sel_cmd.cmd == CMD_ACT) begin
        bank_open[32'(sel_cmd.rank) % NUM_RANKS][sel_cmd.bank] <= 1'b1;
        bank_row[32'(sel_cmd.rank) % NUM_RANKS][sel_cmd.bank]  <= sel_cmd.row;
      end else if (found && sel_cmd.cmd == CMD_PRE) begin
        bank_open[32'(sel_cmd.rank) % NUM_RANKS][sel_cmd.bank] <= 1'b0;
      end

      if (b_cas) begin
        last_cas_valid <= 1'b1;
        last_cas_wr    <= b_wr;
        last_cas_rank  <= bus_cmd.rank;
      end
    end
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              !(ref_valid && found))
    else $error("global_arbiter: refresh and FIFO command in the same cycle");

endmodule
