// tb_refresh_seq: self-checking test of the static refresh sequence.
//
// Two sequencers run side by side with DDR3-1333H timing, one for a single
// rank and one for four ranks. Each is started several times with a random
// table of open banks and rows; the table is scrambled right after the
// start to check that the sequence re-opens the rows open at the start.
//
// For every cycle k after the start cycle t0 the expected command is
// computed from the equations of the refresh analysis:
//   tAP  = max(tRAS, tRTP, tWL+tBUS+tWR) - 1      PREA at k = tAP
//   REF at k = tAP + tRP
//   ACT of bank g, rank r at k = tAP + tRP + tRFC + o(g) + r with
//       S = max(tRRD, R), o(g) = g*S for g < 4, max(tFAW, 4S) + (g-4)*S
//       otherwise; only for banks open at t0, with their row
//   tRA  = max(tFAW, 4S) + 3S + R - 1,  tAE = max(tRAS, tRCD, tRC - tRP)
//   tREFS = tAP + tRP + tRFC + tRA + tAE
// and every other cycle must carry no command. busy must be high exactly
// for k = 1 .. tREFS-1 (together with the start cycle the FIFO is frozen
// for tREFS cycles). Numeric check: tREFS = 198 cycles for one rank of
// DDR3-1333H (23 + 9 + 107 + 35 + 24). Each sequencer also drives a DRAM
// model that checks tRP before REF, tRFC before the ACTs, tRRD and tFAW.
module tb_refresh_seq;
  import mc_pkg::*;

  localparam timing_t TP = DDR3_1333H;
  localparam int NCFG = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  int  refs_len [NCFG];
  int  n_seq    [NCFG];
  int  n_act    [NCFG];
  logic start = 0;
  int   cyc = 0;
  int   t0  = -1000;

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    localparam int R = (k == 0) ? 1 : 4;
    localparam int S = imax(int'(TP.rrd), R);
    localparam int W = imax(int'(TP.faw), 4 * S);
    localparam int T_AP = imax(imax(int'(TP.ras), int'(TP.rtp)), int'(TP.wl + TP.bus + TP.wr)) - 1;
    localparam int T_RA = W + 3 * S + R - 1;
    localparam int T_AE = imax(imax(int'(TP.ras), int'(TP.rcd)), int'(TP.rc) - int'(TP.rp));
    localparam int K_REF  = T_AP + int'(TP.rp);
    localparam int K_ACT0 = K_REF + int'(TP.rfc);
    localparam int T_REFS = K_ACT0 + T_RA + T_AE;

    logic             bank_open [R][BANKS];
    logic [ROW_W-1:0] bank_row  [R][BANKS];
    logic             snap_open [R][BANKS];
    logic [ROW_W-1:0] snap_row  [R][BANKS];
    logic             busy, cmd_valid;
    dram_cmd_t        cmd;
    logic [BEAT2_W-1:0] dq_in;

    refresh_seq #(.NUM_RANKS(R), .TP(TP)) dut (
      .clk, .rst_n, .start, .bank_open, .bank_row, .busy, .cmd_valid, .cmd);

    dram_model #(.NUM_RANKS(R), .TP(TP)) u_dram (
      .clk, .cmd_valid, .cmd, .dq_out('0), .dq_oe(1'b0), .dq_in);

    initial begin
      refs_len[k] = T_REFS;
      n_seq[k] = 0; n_act[k] = 0;
      for (int r = 0; r < R; r++)
        for (int b = 0; b < BANKS; b++) begin
          bank_open[r][b] = 0; bank_row[r][b] = '0;
          snap_open[r][b] = 0; snap_row[r][b] = '0;
        end
    end

    // new random table every cycle (just after the rising edge); the
    // checker keeps the one present in the start cycle
    always @(posedge clk) begin
      #1;
      for (int r = 0; r < R; r++)
        for (int b = 0; b < BANKS; b++) begin
          bank_open[r][b] = 1'($urandom);
          bank_row[r][b]  = ROW_W'($urandom);
        end
    end

    // expected command at offset kk from the start
    function automatic bit exp_cmd(int kk, output dram_cmd_t c);
      c = '0;
      c.cmd = CMD_NOP;
      if (kk == T_AP)  begin c.cmd = CMD_PREA; return 1; end
      if (kk == K_REF) begin c.cmd = CMD_REF;  return 1; end
      for (int g = 0; g < BANKS; g++)
        for (int r = 0; r < R; r++)
          if (kk == K_ACT0 + ((g < 4) ? g * S : W + (g - 4) * S) + r && snap_open[r][g]) begin
            c.cmd = CMD_ACT; c.rank = RANK_W'(r); c.bank = BANK_W'(g); c.row = snap_row[r][g];
            return 1;
          end
      return 0;
    endfunction

    // checked in the middle of each cycle, when the outputs are stable
    always @(negedge clk) if (rst_n) begin
      automatic int kk = cyc - t0;
      automatic dram_cmd_t e;
      automatic bit ev;
      if (start) begin
        snap_open = bank_open;
        snap_row  = bank_row;
        n_seq[k]++;
      end
      if (kk >= 0 && kk < T_REFS + 10) begin
        ev = exp_cmd(kk, e);
        check(cmd_valid == ev, $sformatf("R=%0d offset %0d: cmd_valid %0b, expected %0b", R, kk, cmd_valid, ev));
        if (ev && cmd_valid) begin
          check(cmd.cmd == e.cmd, $sformatf("R=%0d offset %0d: %s, expected %s", R, kk, cmd.cmd.name(), e.cmd.name()));
          if (e.cmd == CMD_ACT) begin
            n_act[k]++;
            check(cmd.rank == e.rank && cmd.bank == e.bank && cmd.row == e.row,
                  $sformatf("R=%0d offset %0d: ACT address", R, kk));
          end
        end
        check(busy == (kk >= 1 && kk <= T_REFS - 1),
              $sformatf("R=%0d offset %0d: busy %0b", R, kk, busy));
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(refs_len[0] == 198, $sformatf("tREFS for one rank of DDR3-1333H is %0d, expected 198", refs_len[0]));
    $display("tREFS: R=1 %0d cycles, R=4 %0d cycles", refs_len[0], refs_len[1]);
    for (int n = 0; n < 6; n++) begin
      #2 start = 1; t0 = cyc;
      @(posedge clk);
      #2 start = 0;
      repeat (refs_len[1] + 20 + $urandom_range(0, 30)) @(posedge clk);
    end
    check(n_seq[0] == 6 && n_seq[1] == 6, "six sequences run");
    check(n_act[0] > 10 && n_act[1] > 40, "ACTs re-opened rows");
    check(g_cfg[0].u_dram.violations == 0 && g_cfg[1].u_dram.violations == 0,
          "DRAM model found no timing violation");
    check(g_cfg[0].u_dram.n_ref == 6 && g_cfg[1].u_dram.n_prea == 6, "one PREA and REF per sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
