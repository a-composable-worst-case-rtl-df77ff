// mc_pkg: types and constants shared by the predictable open-row DRAM
// controller.
//
// The controller talks to a multi-rank DDR3 device through one command bus
// and one data bus. Every requestor (core, DMA, or a "virtual" requestor that
// stands for a shared-data partition) owns one private bank, so its row
// buffer is never disturbed by anybody else and open-row policy can be used.
//
// Timing: every constraint is counted in memory clock cycles. The default
// set is the DDR3-1333H column of the JEDEC table the design is evaluated
// with (tRCD=9, tRL=9, tWL=7, tBUS=4, tRP=9, tWR=10, tRTP=5, tRAS=24,
// tRC=33, tRRD=5, tFAW=20, tRTW=8, tWTR=5, tRTR=2). tRFC (160 ns) and
// tREFI (7.8 us) are given in time; at the 1.5 ns clock of a DDR3-1333
// device they become 107 and 5200 cycles (rounded up and down
// respectively, which is the safe direction for each). The other columns
// (DDR2-800E, DDR3-800D, DDR3-2133M) are provided as alternative constants.
//
// Widths of row/column fields and of the data bus are this design's own
// choice: a 64-bit DQ bus with burst length 8, so one CAS moves a 64-byte
// line in tBUS = 4 clock cycles, 128 bits per clock (two DDR beats).
package mc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned MAX_RANKS  = 4;   // ranks addressable by a command
  localparam int unsigned RANK_W     = 2;
  localparam int unsigned BANKS      = 8;   // banks per DDR3 rank
  localparam int unsigned BANK_W     = 3;
  localparam int unsigned ROW_W      = 15;
  localparam int unsigned COL_W      = 10;
  localparam int unsigned DQ_W       = 64;  // data bus width in bits
  localparam int unsigned BL         = 8;   // burst length
  localparam int unsigned LINE_W     = DQ_W * BL;     // bits per CAS (512)
  localparam int unsigned BEAT2_W    = 2 * DQ_W;      // bits per clock (DDR)

  // ------------------------------------------------------------- commands
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,
    CMD_PRE  = 3'd2,
    CMD_RD   = 3'd3,
    CMD_WR   = 3'd4,
    CMD_PREA = 3'd5,   // precharge all banks (all ranks)
    CMD_REF  = 3'd6    // auto refresh (all ranks)
  } cmd_e;

  // One command on the command bus.
  typedef struct packed {
    cmd_e              cmd;
    logic [RANK_W-1:0] rank;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
  } dram_cmd_t;

  // A load or store request as sent by a requestor. Private banks: the
  // request carries only row and column, the bank is the requestor's own.
  typedef struct packed {
    logic              store;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [LINE_W-1:0] wdata;
  } mem_req_t;

  // Completion returned to a requestor at the end of the data transfer.
  typedef struct packed {
    logic              store;
    logic [LINE_W-1:0] rdata;
  } mem_resp_t;

  // Entry of a command buffer: the command plus the line a WR will write.
  typedef struct packed {
    dram_cmd_t         c;
    logic [LINE_W-1:0] wdata;
  } buf_cmd_t;

  // Per-cycle events of the global arbiter, for observation and statistics.
  typedef struct packed {
    logic reorder;      // issued a command that was not the oldest in the FIFO
    logic cas_hold;     // a ready CAS was held behind a blocked CAS (Rule-4)
    logic faw_stall;    // an ACT was held by the four-activate window
    logic rrd_stall;    // an ACT was held by tRRD
    logic rank_switch;  // issued a CAS to another rank than the previous CAS
    logic wr_to_rd;     // issued a RD after a WR of the same rank
    logic rd_to_wr;     // issued a WR after a RD of the same rank
    logic refresh;      // a refresh sequence started
  } mc_events_t;

  // ---------------------------------------------------------- timing sets
  typedef struct packed {
    int unsigned rcd;
    int unsigned rl;
    int unsigned wl;
    int unsigned bus;
    int unsigned rp;
    int unsigned wr;
    int unsigned rtp;
    int unsigned ras;
    int unsigned rc;
    int unsigned rrd;
    int unsigned faw;
    int unsigned rtw;
    int unsigned wtr;
    int unsigned rtr;
    int unsigned rfc;
    int unsigned refi;
  } timing_t;

  localparam timing_t DDR3_1333H = '{rcd: 9, rl: 9, wl: 7, bus: 4, rp: 9,
      wr: 10, rtp: 5, ras: 24, rc: 33, rrd: 5, faw: 20, rtw: 8, wtr: 5,
      rtr: 2, rfc: 107, refi: 5200};

  // DDR3-800D: 2.5 ns clock, tRFC 160 ns = 64, tREFI 7.8 us = 3120.
  localparam timing_t DDR3_800D = '{rcd: 5, rl: 5, wl: 5, bus: 4, rp: 5,
      wr: 6, rtp: 4, ras: 15, rc: 20, rrd: 4, faw: 16, rtw: 7, wtr: 4,
      rtr: 2, rfc: 64, refi: 3120};

  // DDR3-2133M: 0.9375 ns clock, tRFC 160 ns = 171, tREFI 7.8 us = 8320.
  localparam timing_t DDR3_2133M = '{rcd: 13, rl: 13, wl: 10, bus: 4, rp: 13,
      wr: 16, rtp: 8, ras: 35, rc: 48, rrd: 6, faw: 26, rtw: 9, wtr: 8,
      rtr: 2, rfc: 171, refi: 8320};

  // DDR2-800E: 2.5 ns clock, tRFC 195 ns = 78, tREFI 7.8 us = 3120.
  localparam timing_t DDR2_800E = '{rcd: 6, rl: 6, wl: 5, bus: 4, rp: 6,
      wr: 6, rtp: 3, ras: 18, rc: 24, rrd: 3, faw: 14, rtw: 6, wtr: 3,
      rtr: 1, rfc: 78, refi: 3120};

  // Width of the countdown timers that enforce the constraints.
  localparam int unsigned TMR_W = 8;

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Static private bank map: requestor i uses rank (i mod R), bank (i div R),
  // so requestors are spread evenly over the ranks.
  function automatic int unsigned rank_of(int unsigned i, int unsigned nranks);
    return i % nranks;
  endfunction
  function automatic int unsigned bank_of(int unsigned i, int unsigned nranks);
    return i / nranks;
  endfunction

endpackage
