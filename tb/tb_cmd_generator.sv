// tb_cmd_generator: self-checking test of the front-end command generator.
//
// The generator of one requestor (here rank 1, bank 5) turns the request at
// the head of its request queue into DRAM commands for its private bank:
//   bank closed              -> ACT, then CAS            (close request)
//   open, other row (miss)   -> PRE, ACT, then CAS       (close request)
//   open, same row (hit)     -> CAS only                 (open request)
// with CAS = RD for a load and WR for a store; the bank stays open after
// the CAS (open row policy). A reference model of the bank drives the
// expected command each cycle; the command buffer's ready is random, so
// stalls are covered. Checked every cycle: cmd_valid, command type, rank,
// bank, row (the old row for PRE), column and write data, req_pop only
// with the CAS, and row_open/open_row. Also checked: each request yields
// exactly 1, 2 or 3 commands as listed above, and with ready held high the
// commands of one request come in consecutive cycles (one per cycle).
module tb_cmd_generator;
  import mc_pkg::*;

  localparam int unsigned RANK = 1, BANK = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     req_valid = 0, cmd_ready = 0;
  mem_req_t req = '0;
  logic     req_pop, cmd_valid, row_open;
  buf_cmd_t cmd;
  logic [ROW_W-1:0] open_row;

  cmd_generator #(.RANK(RANK), .BANK(BANK)) dut (.*);

  int checks = 0, failures = 0;
  bit m_open = 0;
  int m_row = 0;
  int n_cmds = 0;             // commands pushed for the current request
  int n_hit = 0, n_closed = 0, n_miss = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  function automatic cmd_e expected();
    if (!m_open) return CMD_ACT;
    if (m_row != int'(req.row)) return CMD_PRE;
    return req.store ? CMD_WR : CMD_RD;
  endfunction

  task automatic step();
    cmd_e e;
    #4;
    e = expected();
    check(row_open == m_open, "row_open");
    if (m_open) check(int'(open_row) == m_row, "open_row");
    check(cmd_valid == req_valid, "cmd_valid follows req_valid");
    if (req_valid) begin
      check(cmd.c.cmd == e, $sformatf("command %s, expected %s", cmd.c.cmd.name(), e.name()));
      check(cmd.c.rank == RANK_W'(RANK) && cmd.c.bank == BANK_W'(BANK), "rank/bank");
      check(int'(cmd.c.row) == ((e == CMD_PRE) ? m_row : int'(req.row)), "row field");
      if (e inside {CMD_RD, CMD_WR})
        check(cmd.c.col == req.col && cmd.wdata == req.wdata, "column/data of CAS");
      check(req_pop == (cmd_ready && e inside {CMD_RD, CMD_WR}), "req_pop only with CAS");
    end else check(!req_pop, "no pop without request");
    @(posedge clk);
    if (req_valid && cmd_ready) begin
      n_cmds++;
      case (e)
        CMD_ACT: begin m_open = 1; m_row = int'(req.row); end
        CMD_PRE: m_open = 0;
        default: ;
      endcase
    end
    @(negedge clk);
  endtask

  // run one request to completion; returns the number of commands and the
  // number of cycles it took
  task automatic run_req(bit store, int row, int ready_pct, output int nc, output int cyc);
    int exp_n;
    req.store = store;
    req.row   = ROW_W'(row);
    req.col   = COL_W'($urandom);
    req.wdata = {16{$urandom}};
    req_valid = 1;
    exp_n = !m_open ? 2 : (m_row != row) ? 3 : 1;
    if (exp_n == 1) n_hit++; else if (exp_n == 2) n_closed++; else n_miss++;
    n_cmds = 0;
    cyc = 0;
    forever begin
      bit popped;
      cmd_ready = ($urandom_range(0, 99) < ready_pct);
      popped = req_valid && cmd_ready && m_open && m_row == row;
      step();
      cyc++;
      if (popped) break;
      if (cyc > 100) begin check(0, "request never completed"); break; end
    end
    nc = n_cmds;
    req_valid = 0;
    cmd_ready = 0;
    check(nc == exp_n, $sformatf("request took %0d commands, expected %0d", nc, exp_n));
  endtask

  initial begin
    int nc, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    step();
    // ---------------------------------------------- directed, ready always
    run_req(0, 7, 100, nc, cyc);    // closed bank: ACT, RD
    check(cyc == 2, "ACT+CAS in 2 cycles");
    run_req(1, 7, 100, nc, cyc);    // hit: WR
    check(cyc == 1, "CAS in 1 cycle");
    run_req(0, 9, 100, nc, cyc);    // miss: PRE, ACT, RD
    check(cyc == 3, "PRE+ACT+CAS in 3 cycles");
    // ---------------------------------------------- random, ready random
    for (int n = 0; n < 1500; n++) begin
      automatic int row = (m_open && $urandom_range(0, 1) == 0) ? m_row : $urandom_range(0, 5);
      run_req(1'($urandom), row, 60, nc, cyc);
      repeat ($urandom_range(0, 2)) step();
    end
    $display("hit %0d, closed-bank %0d, miss %0d requests", n_hit, n_closed, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
