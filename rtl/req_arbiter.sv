// req_arbiter: per-requestor command arbiter of the back end.
//
// It sits between a requestor's command buffer and the global arbitration
// FIFO and enforces the two per-requestor arbitration rules:
//   Rule-1  at most one command of the requestor is in the global FIFO.
//           A PRE or ACT is serviced (and popped from the command buffer)
//           when the global arbiter acknowledges its issue; a RD/WR stays
//           at the head of the buffer until the data bus unit reports the
//           end of its data transfer (data_done).
//   Rule-2  the head command is only inserted once every timing constraint
//           caused by the requestor's own earlier commands has expired,
//           so that it could be issued at once if nobody else were present.
// Own-bank constraints tracked (Table 1 names): ACT->PRE tRAS, ACT->ACT
// tRC, ACT->CAS tRCD, PRE->ACT tRP, RD->PRE tRTP, end of write data->PRE
// tWR (tWL+tBUS+tWR after the WR), RD->WR tRTW, end of write data->RD
// tWTR (tWL+tBUS+tWTR after the WR), CAS->CAS tBUS.
//
// Each constraint is a countdown timer per command class loaded with T-2
// in the cycle the constraining command is issued; the command class may
// be inserted when its timer is 0, i.e. T-1 cycles after that issue.
// Insertion (enq_valid) is combinational and the global FIFO registers it,
// so without interference the command is issued exactly T cycles after
// the one that constrained it -- the JEDEC minimum, as the document's
// analysis assumes (insertion and issue fall in the same memory cycle
// there; here the FIFO register takes that cycle, one earlier). All
// constraints are at least 2 cycles. A requestor's next command enters
// the FIFO one cycle after its PRE/ACT was issued or after data_done of
// its CAS (the head of the command buffer changes then). The timer style
// and these fixed cycles are this design's own choice.
module req_arbiter
  import mc_pkg::*;
#(
  parameter timing_t TP = DDR3_1333H
) (
  input  logic      clk,
  input  logic      rst_n,
  // command buffer head
  input  logic      head_valid,
  input  buf_cmd_t  head,
  output logic      head_pop,
  // insertion into the global FIFO
  output logic      enq_valid,
  output dram_cmd_t enq_cmd,
  // feedback
  input  logic      issued,      // global arbiter issued this requestor's command
  input  logic      data_done,   // end of data of this requestor's CAS
  output logic      busy         // a command is in the FIFO or its data is pending
);

  typedef logic [TMR_W-1:0] tmr_t;

  // timer load for a minimum issue-to-issue distance of g cycles
  function automatic tmr_t lv(int unsigned g);
    return (g > 2) ? tmr_t'(g - 2) : '0;
  endfunction

  localparam tmr_t L_RAS   = lv(TP.ras);
  localparam tmr_t L_RC    = lv(TP.rc);
  localparam tmr_t L_RCD   = lv(TP.rcd);
  localparam tmr_t L_RP    = lv(TP.rp);
  localparam tmr_t L_RTP   = lv(TP.rtp);
  localparam tmr_t L_RTW   = lv(TP.rtw);
  localparam tmr_t L_BUS   = lv(TP.bus);
  localparam tmr_t L_WRPRE = lv(TP.wl + TP.bus + TP.wr);
  localparam tmr_t L_WTR   = lv(TP.wl + TP.bus + TP.wtr);

  tmr_t t_pre, t_act, t_rd, t_wr;
  logic pending, in_data;
  cmd_e pend_cmd;
  logic ready_now;

  function automatic tmr_t dec(tmr_t v);
    return (v == '0) ? '0 : v - 1'b1;
  endfunction
  // raise a (already decremented) timer to l when a constraint starts
  function automatic tmr_t ld(tmr_t d, logic load, tmr_t l);
    return (load && l > d) ? l : d;
  endfunction

  always_comb begin
    unique case (head.c.cmd)
      CMD_PRE: ready_now = (t_pre == '0);
      CMD_ACT: ready_now = (t_act == '0);
      CMD_RD:  ready_now = (t_rd  == '0);
      CMD_WR:  ready_now = (t_wr  == '0);
      default: ready_now = 1'b0;
    endcase
  end

  assign busy      = pending || in_data;
  assign enq_valid = head_valid && !busy && ready_now;
  assign enq_cmd   = head.c;
  assign head_pop  = (issued && (pend_cmd == CMD_PRE || pend_cmd == CMD_ACT))
                     || data_done;

  logic is_act, is_pre, is_rd, is_wr;
  assign is_act = issued && pend_cmd == CMD_ACT;
  assign is_pre = issued && pend_cmd == CMD_PRE;
  assign is_rd  = issued && pend_cmd == CMD_RD;
  assign is_wr  = issued && pend_cmd == CMD_WR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_pre    <= '0;
      t_act    <= '0;
      t_rd     <= '0;
      t_wr     <= '0;
      pending  <= 1'b0;
      in_data  <= 1'b0;
      pend_cmd <= CMD_NOP;
    end else begin
      // PRE waits for tRAS after ACT, tRTP after RD, write recovery after WR
      t_pre <= ld(ld(ld(dec(t_pre), is_act, L_RAS), is_rd, L_RTP), is_wr, L_WRPRE);
      // ACT waits for tRC after ACT and tRP after PRE
      t_act <= ld(ld(dec(t_act), is_act, L_RC), is_pre, L_RP);
      // RD waits for tRCD after ACT, tWTR after write data, tBUS after RD
      t_rd  <= ld(ld(ld(dec(t_rd), is_act, L_RCD), is_wr, L_WTR), is_rd, L_BUS);
      // WR waits for tRCD after ACT, tRTW after RD, tBUS after WR
      t_wr  <= ld(ld(ld(dec(t_wr), is_act, L_RCD), is_rd, L_RTW), is_wr, L_BUS);

      if (enq_valid) begin
        pending  <= 1'b1;
        pend_cmd <= head.c.cmd;
      end
      if (issued) begin
        pending <= 1'b0;
        if (pend_cmd == CMD_RD || pend_cmd == CMD_WR) in_data <= 1'b1;
      end
      if (data_done) in_data <= 1'b0;
    end
  end

  a_issue_only_pending: assert property (@(posedge clk) disable iff (!rst_n)
                                         issued |-> pending)
    else $error("req_arbiter: issue acknowledged with no command in the FIFO");
  a_done_only_in_data: assert property (@(posedge clk) disable iff (!rst_n)
                                        data_done |-> in_data)
    else $error("req_arbiter: data done with no CAS outstanding");

endmodule
