// dram_model: behavioural model of a multi-rank DDR3 device, for testbenches.
//
// Not synthesizable and not part of the controller. It plays the DRAM chip
// at the other end of the command and data buses: it keeps every bank's
// row buffer state, stores written lines (sparse associative array keyed by
// rank/bank/row/column), returns read lines tRL cycles after a RD, and
// checks every command against the JEDEC constraints of the timing set:
// tRCD, tRP, tRAS, tRC, tRRD, tFAW, tRTP, tWR, tWTR, tRTW, tRTR, tRFC,
// data-bus overlap, commands to closed banks, REF with open banks and
// write data missing on the bus. Each broken rule counts one violation and
// prints a message; the testbench adds the violations to its failures.
//
// Timing: the command present during a clock cycle is taken at the rising
// edge that ends it; read data for cycle c is driven from the edge that
// starts cycle c. A line moves as tBUS clocks of 128 bits, lowest beat first.
module dram_model
  import mc_pkg::*;
#(
  parameter int unsigned NUM_RANKS = 1,
  parameter timing_t     TP        = DDR3_1333H
) (
  input  logic               clk,
  input  logic               cmd_valid,
  input  dram_cmd_t          cmd,
  input  logic [BEAT2_W-1:0] dq_out,
  input  logic               dq_oe,
  output logic [BEAT2_W-1:0] dq_in
);

  localparam longint NEVER = -100000;

  longint cyc = 0;
  int     violations = 0;
  int     n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0, n_ref = 0, n_prea = 0;

  bit     open_b [NUM_RANKS][BANKS];
  int     row_b  [NUM_RANKS][BANKS];
  longint t_act  [NUM_RANKS][BANKS];
  longint t_pre  [NUM_RANKS][BANKS];
  longint t_rd   [NUM_RANKS][BANKS];
  longint t_wend [NUM_RANKS][BANKS];   // end of last write data of the bank
  longint r_act  [NUM_RANKS][4];       // last four ACTs of the rank, [0] newest
  longint r_rd   [NUM_RANKS];
  longint r_wend [NUM_RANKS];
  longint t_ref  = NEVER;
  longint bus_end = NEVER;             // first free data cycle
  int     bus_rank = -1;

  logic [LINE_W-1:0] mem [longint];

  typedef struct {
    longint            start;
    bit                write;
    longint            key;
    logic [LINE_W-1:0] data;
  } burst_t;
  burst_t bursts [$];

  initial begin
    dq_in = '0;
    for (int r = 0; r < NUM_RANKS; r++) begin
      r_rd[r] = NEVER;
      r_wend[r] = NEVER;
      for (int k = 0; k < 4; k++) r_act[r][k] = NEVER;
      for (int b = 0; b < BANKS; b++) begin
        open_b[r][b] = 0; row_b[r][b] = 0;
        t_act[r][b] = NEVER; t_pre[r][b] = NEVER;
        t_rd[r][b] = NEVER; t_wend[r][b] = NEVER;
      end
    end
  end

  function automatic longint key_of(int r, int b, int row, int col);
    return (longint'(r) << 40) | (longint'(b) << 32) | (longint'(row) << 12) | longint'(col);
  endfunction

  task automatic viol(string what);
    violations++;
    $display("[%0t] %m: %s (cycle %0d)", $time, what, cyc);
  endtask

  task automatic check_pre(int r, int b, longint c);
    if (c - t_act[r][b] < longint'(TP.ras)) viol($sformatf("tRAS r%0d b%0d", r, b));
    if (c - t_rd[r][b]  < longint'(TP.rtp)) viol($sformatf("tRTP r%0d b%0d", r, b));
    if (c - t_wend[r][b] < longint'(TP.wr)) viol($sformatf("tWR r%0d b%0d", r, b));
  endtask

  // data bus booking for a CAS issued in cycle c
  task automatic book_bus(int r, longint start);
    automatic longint need = bus_end + ((bus_rank >= 0 && bus_rank != r) ? longint'(TP.rtr) : 0);
    if (start < need) viol($sformatf("data bus overlap or tRTR, rank %0d", r));
    bus_end  = start + longint'(TP.bus);
    bus_rank = r;
  endtask

  always @(posedge clk) begin
    automatic longint c = cyc;
    // ---------------------------------------------------------- command
    if (cmd_valid && $test$plusargs("trace")) $display("%m cyc %0d cmd %s r%0d b%0d row %0d", c, cmd.cmd.name(), cmd.rank, cmd.bank, cmd.row);
    if (cmd_valid) begin
      automatic int r = int'(cmd.rank);
      automatic int b = int'(cmd.bank);
      if (r >= NUM_RANKS && cmd.cmd inside {CMD_ACT, CMD_PRE, CMD_RD, CMD_WR}) begin
        viol("rank out of range");
      end else begin
        case (cmd.cmd)
          CMD_ACT: begin
            n_act++;
            if (open_b[r][b])                 viol($sformatf("ACT to open bank r%0d b%0d", r, b));
            if (c - t_pre[r][b] < longint'(TP.rp))      viol($sformatf("tRP r%0d b%0d", r, b));
            if (c - t_act[r][b] < longint'(TP.rc))      viol($sformatf("tRC r%0d b%0d", r, b));
            if (c - r_act[r][0] < longint'(TP.rrd))     viol($sformatf("tRRD r%0d", r));
            if (c - r_act[r][3] < longint'(TP.faw))     viol($sformatf("tFAW r%0d", r));
            if (c - t_ref < longint'(TP.rfc))           viol("tRFC");
            open_b[r][b] = 1; row_b[r][b] = int'(cmd.row); t_act[r][b] = c;
            for (int k = 3; k > 0; k--) r_act[r][k] = r_act[r][k-1];
            r_act[r][0] = c;
          end
          CMD_PRE: begin
            n_pre++;
            if (!open_b[r][b]) viol($sformatf("PRE to closed bank r%0d b%0d", r, b));
            check_pre(r, b, c);
            open_b[r][b] = 0; t_pre[r][b] = c;
          end
          CMD_PREA: begin
            n_prea++;
            for (int rr = 0; rr < NUM_RANKS; rr++)
              for (int bb = 0; bb < BANKS; bb++) begin
                if (open_b[rr][bb]) check_pre(rr, bb, c);
                open_b[rr][bb] = 0; t_pre[rr][bb] = c;
              end
          end
          CMD_REF: begin
            n_ref++;
            for (int rr = 0; rr < NUM_RANKS; rr++)
              for (int bb = 0; bb < BANKS; bb++) begin
                if (open_b[rr][bb])           viol("REF with an open bank");
                if (c - t_pre[rr][bb] < longint'(TP.rp)) viol("tRP before REF");
              end
            if (c - t_ref < longint'(TP.rfc)) viol("tRFC between REFs");
            t_ref = c;
          end
          CMD_RD, CMD_WR: begin
            automatic bit     wr  = (cmd.cmd == CMD_WR);
            burst_t bu;
            if (!open_b[r][b])            viol($sformatf("CAS to closed bank r%0d b%0d", r, b));
            if (c - t_act[r][b] < longint'(TP.rcd)) viol($sformatf("tRCD r%0d b%0d", r, b));
            bu.write = wr;
            bu.key   = key_of(r, b, row_b[r][b], int'(cmd.col));
            if (wr) begin
              n_wr++;
              if (c - r_rd[r] < longint'(TP.rtw)) viol($sformatf("tRTW r%0d", r));
              bu.start = c + longint'(TP.wl);
              bu.data  = '0;
              book_bus(r, bu.start);
              t_wend[r][b] = bu.start + longint'(TP.bus);
              r_wend[r]    = bu.start + longint'(TP.bus);
            end else begin
              n_rd++;
              if (c - r_wend[r] < longint'(TP.wtr)) viol($sformatf("tWTR r%0d", r));
              bu.start = c + longint'(TP.rl);
              bu.data  = mem.exists(bu.key) ? mem[bu.key] : '0;
              book_bus(r, bu.start);
              t_rd[r][b] = c;
              r_rd[r]    = c;
            end
            bursts.push_back(bu);
          end
          default: ;
        endcase
      end
    end
    // ---------------------------------------------------------- data bus
    // write beats of the cycle that just ended
    for (int i = 0; i < bursts.size(); i++) begin
      if (bursts[i].write && c >= bursts[i].start && c < bursts[i].start + longint'(TP.bus)) begin
        if (!dq_oe) viol("write data not driven");
        bursts[i].data[(c - bursts[i].start) * BEAT2_W +: BEAT2_W] = dq_out;
        if (c == bursts[i].start + longint'(TP.bus) - 1) mem[bursts[i].key] = bursts[i].data;
      end
    end
    // read beat for the next cycle
    dq_in <= '0;
    for (int i = 0; i < bursts.size(); i++) begin
      if (!bursts[i].write && c + 1 >= bursts[i].start && c + 1 < bursts[i].start + longint'(TP.bus))
        dq_in <= bursts[i].data[(c + 1 - bursts[i].start) * BEAT2_W +: BEAT2_W];
    end
    while (bursts.size() > 0 && bursts[0].start + longint'(TP.bus) <= c) void'(bursts.pop_front());
    cyc <= cyc + 1;
  end

endmodule
