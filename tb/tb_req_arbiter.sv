// tb_req_arbiter: self-checking test of the per-requestor arbiter.
//
// The testbench plays the command buffer (a list of commands for one
// private bank, produced from random loads and stores with a bank model),
// the global FIFO/arbiter (acknowledges an inserted command after a delay)
// and the data bus unit (data_done tRL+tBUS or tWL+tBUS cycles after a RD
// or WR is issued, the cycle after its last data beat). DDR3-1333H timing.
//
// Checked:
//   Rule-1  no insertion while an earlier command of the requestor is in
//           the FIFO or its data transfer is not finished; the head is
//           popped when a PRE/ACT is issued and when a CAS's data is done.
//   Rule-2  at every issue, all own-bank constraints hold: ACT->PRE tRAS,
//           RD->PRE tRTP, WR->PRE tWL+tBUS+tWR, ACT->ACT tRC, PRE->ACT tRP,
//           ACT->CAS tRCD, WR->RD tWL+tBUS+tWTR, RD->WR tRTW, CAS->CAS tBUS.
//   Cycle counts (phase 1, the FIFO acknowledges in the cycle after the
//   insertion, i.e. no interference): each command is issued exactly at
//   the larger of (a) the earliest cycle its constraints allow and (b) two
//   cycles after the previous command left the head of the buffer. So an
//   ACT->RD pair is exactly tRCD apart and a PRE->ACT pair exactly tRP.
//   Phase 2 acknowledges after a random 1..6 cycles (interference) and
//   checks the rules only.
module tb_req_arbiter;
  import mc_pkg::*;

  localparam timing_t TP = DDR3_1333H;
  localparam longint  NEVER = -100000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      head_valid = 0, issued = 0, data_done = 0;
  buf_cmd_t  head = '0;
  logic      head_pop, enq_valid, busy;
  dram_cmd_t enq_cmd;

  req_arbiter #(.TP(TP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  // ------------------------------------------------ command list (buffer)
  buf_cmd_t list [$];
  bit m_open = 0;
  int m_row = 0;
  task automatic add_request(bit store, int row);
    buf_cmd_t b = '0;
    b.c.rank = 0; b.c.bank = 3; b.c.col = COL_W'($urandom);
    if (m_open && m_row != row) begin
      b.c.cmd = CMD_PRE; b.c.row = ROW_W'(m_row); list.push_back(b); m_open = 0;
    end
    if (!m_open) begin
      b.c.cmd = CMD_ACT; b.c.row = ROW_W'(row); list.push_back(b); m_open = 1; m_row = row;
    end
    b.c.cmd = store ? CMD_WR : CMD_RD; b.c.row = ROW_W'(row);
    list.push_back(b);
  endtask

  // ------------------------------------------------ FIFO / data bus model
  longint cyc = 0;
  bit     pend = 0, in_data = 0;
  cmd_e   pend_cmd = CMD_NOP;
  longint ack_at = 0, done_at = 0;
  longint last_act = NEVER, last_pre = NEVER, last_rd = NEVER, last_wr = NEVER;
  longint head_free = 0;      // cycle the current head became available
  bit     exact = 1;
  int     max_ack = 1;
  int     n_exact = 0;

  function automatic longint earliest(cmd_e c);
    longint e = NEVER;
    longint wend = last_wr + longint'(TP.wl + TP.bus);
    case (c)
      CMD_PRE: begin
        e = max_l(e, last_act + longint'(TP.ras));
        e = max_l(e, last_rd + longint'(TP.rtp));
        e = max_l(e, wend + longint'(TP.wr));
      end
      CMD_ACT: begin
        e = max_l(e, last_act + longint'(TP.rc));
        e = max_l(e, last_pre + longint'(TP.rp));
      end
      CMD_RD: begin
        e = max_l(e, last_act + longint'(TP.rcd));
        e = max_l(e, wend + longint'(TP.wtr));
        e = max_l(e, last_rd + longint'(TP.bus));
      end
      CMD_WR: begin
        e = max_l(e, last_act + longint'(TP.rcd));
        e = max_l(e, last_rd + longint'(TP.rtw));
        e = max_l(e, last_wr + longint'(TP.bus));
      end
      default: ;
    endcase
    return e;
  endfunction
  function automatic longint max_l(longint a, longint b);
    return (a > b) ? a : b;
  endfunction

  task automatic step();
    // inputs for this cycle
    head_valid = (list.size() != 0);
    head       = head_valid ? list[0] : '0;
    issued     = pend && cyc >= ack_at;
    data_done  = in_data && cyc == done_at;
    #4;
    // ---- checks
    if (enq_valid) begin
      check(!pend && !in_data, "Rule-1: insertion while a command is outstanding");
      check(head_valid && enq_cmd == head.c, "inserted command is the head");
    end
    check(head_pop == ((issued && pend_cmd inside {CMD_PRE, CMD_ACT}) || data_done),
          "head popped on PRE/ACT issue or CAS data end");
    check(busy == (pend || in_data), "busy");
    if (issued) begin
      longint e = earliest(pend_cmd);
      check(cyc >= e, $sformatf("Rule-2: %s issued at %0d before %0d", pend_cmd.name(), cyc, e));
      if (exact) begin
        longint want = max_l(e, head_free + 1);
        n_exact++;
        check(cyc == want, $sformatf("%s issued at %0d, expected exactly %0d",
                                     pend_cmd.name(), cyc, want));
      end
    end
    @(posedge clk);
    // ---- model update
    if (issued) begin
      pend = 0;
      case (pend_cmd)
        CMD_PRE: last_pre = cyc;
        CMD_ACT: last_act = cyc;
        CMD_RD:  begin last_rd = cyc; in_data = 1; done_at = cyc + longint'(TP.rl + TP.bus); end
        CMD_WR:  begin last_wr = cyc; in_data = 1; done_at = cyc + longint'(TP.wl + TP.bus); end
        default: ;
      endcase
    end
    if (data_done) in_data = 0;
    if (head_pop) begin
      void'(list.pop_front());
      head_free = cyc + 1;
    end
    if (enq_valid) begin
      pend = 1; pend_cmd = enq_cmd.cmd;
      ack_at = cyc + longint'($urandom_range(1, max_ack));
    end
    cyc++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------- phase 1: exact timing
    for (int n = 0; n < 400; n++) add_request(1'($urandom), $urandom_range(0, 3));
    head_free = 0;
    while (list.size() != 0 || pend || in_data) step();
    // ---------------------------------------------- phase 2: interference
    exact = 0; max_ack = 6;
    for (int n = 0; n < 400; n++) add_request(1'($urandom), $urandom_range(0, 3));
    while (list.size() != 0 || pend || in_data) step();
    repeat (5) step();
    check(n_exact > 500, "enough exact-timing issues checked");
    $display("exact issue times checked: %0d", n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
