// refresh_seq: static refresh command sequence of the global arbiter.
//
// Every tREFI the global arbiter stops serving its FIFO and starts this
// sequence (Rule-5). The sequence is fixed in time, so its length tREFS is
// known in advance. Counting from the start cycle t0 it issues:
//   t0 + tAP                 PREA (precharge all), tAP = max(tRAS, tRTP,
//                            tWL+tBUS+tWR) - 1, which covers any command
//                            issued in the cycle before t0
//   + tRP                    REF
//   + tRFC                   first re-activation: 8 groups, one per bank,
//                            of R ACTs, one per rank on consecutive cycles;
//                            groups are S = max(tRRD, R) apart and the
//                            fifth group waits for the four-activate window
//                            (max(tFAW, 4S) after the first). An ACT whose
//                            bank had no open row becomes a NOP.
//   last ACT + tAE           end, tAE = max(tRAS, tRCD, tRC - tRP)
// so tREFS = tAP + tRP + tRFC + tRA + tAE with
// tRA = max(tFAW, 4S) + 3S + R - 1, as the document derives it. The row
// re-opened in each bank is the one open when the sequence started
// (captured at start), so the requestors' view of their row buffers holds.
//
// PREA and REF are issued to all ranks at once (all chip selects); the
// document draws a single precharge-all and refresh for the device and
// does not say how ranks are addressed, so that is this design's choice.
//
// Interface: start is a one-cycle pulse in t0; busy is high from t0 up to
// the last cycle of the sequence (the global FIFO may be served again in
// the cycle busy falls); cmd_valid/cmd is the command for this cycle.
module refresh_seq
  import mc_pkg::*;
#(
  parameter int unsigned NUM_RANKS = 1,
  parameter timing_t     TP        = DDR3_1333H
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             bank_open [NUM_RANKS][BANKS],
  input  logic [ROW_W-1:0] bank_row  [NUM_RANKS][BANKS],
  output logic             busy,
  output logic             cmd_valid,
  output dram_cmd_t        cmd
);

  localparam int unsigned S      = max2(TP.rrd, NUM_RANKS);
  localparam int unsigned W      = max2(TP.faw, 4 * S);
  localparam int unsigned T_AP   = max2(max2(TP.ras, TP.rtp), TP.wl + TP.bus + TP.wr) - 1;
  localparam int unsigned T_RA   = W + 3 * S + NUM_RANKS - 1;
  localparam int unsigned T_AE   = max2(max2(TP.ras, TP.rcd), TP.rc - TP.rp);
  localparam int unsigned C_PREA = T_AP;
  localparam int unsigned C_REF  = C_PREA + TP.rp;
  localparam int unsigned C_ACT0 = C_REF + TP.rfc;
  localparam int unsigned C_END  = C_ACT0 + T_RA + T_AE;   // = tREFS
  localparam int unsigned CNT_W  = $clog2(C_END + 1);

  logic [CNT_W-1:0] cnt;
  logic             snap_open [NUM_RANKS][BANKS];
  logic [ROW_W-1:0] snap_row  [NUM_RANKS][BANKS];

  function automatic int unsigned act_off(int unsigned g, int unsigned r);
    return C_ACT0 + ((g < 4) ? g * S : W + (g - 4) * S) + r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      for (int unsigned r = 0; r < NUM_RANKS; r++)
        for (int unsigned b = 0; b < BANKS; b++) begin
          snap_open[r][b] <= 1'b0;
          snap_row[r][b]  <= '0;
        end
    end else if (start && !busy) begin
      busy      <= 1'b1;
      cnt       <= CNT_W'(1);
      snap_open <= bank_open;
      snap_row  <= bank_row;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt == CNT_W'(C_END - 1)) busy <= 1'b0;
    end
  end

  always_comb begin
    cmd_valid = 1'b0;
    cmd       = '0;
    cmd.cmd   = CMD_NOP;
    if (busy) begin
      if (cnt == CNT_W'(C_PREA)) begin
        cmd_valid = 1'b1;
        cmd.cmd   = CMD_PREA;
      end
      if (cnt == CNT_W'(C_REF)) begin
        cmd_valid = 1'b1;
        cmd.cmd   = CMD_REF;
      end
      for (int unsigned g = 0; g < BANKS; g++)
        for (int unsigned r = 0; r < NUM_RANKS; r++)
          if (cnt == CNT_W'(act_off(g, r)) && snap_open[r][g]) begin
            cmd_valid = 1'b1;
            cmd.cmd   = CMD_ACT;
            cmd.rank  = RANK_W'(r);
            cmd.bank  = BANK_W'(g);
            cmd.row   = snap_row[r][g];
          end
    end
  end

  initial begin
    assert (NUM_RANKS >= 1 && NUM_RANKS <= MAX_RANKS)
      else $error("refresh_seq: NUM_RANKS out of range");
  end

endmodule
