// mc_top: predictable open-row DRAM memory controller with private banks.
//
// Requestors (cores, DMA engines) each own one private DRAM bank, so no
// requestor can close another's row and open row policy becomes
// predictable. A shared-data partition adds a "virtual" requestor whose
// bank several cores reach through round-robin arbitrated shared queues.
//
// Structure (front end -> back end -> device):
//   per core:      request queue -> command generator -> command buffer
//                  -> per-requestor arbiter
//   per partition: shared queues -> round robin -> command generator
//                  -> virtual command buffer -> per-requestor arbiter
//   shared:        global FIFO (one slot per requestor) -> global command
//                  arbiter (issue, refresh) -> command bus
//                  data bus unit (write bursts out, read bursts in)
// Requestor i (cores first, then the virtual requestors) uses rank
// i mod NUM_RANKS and bank i div NUM_RANKS, so requestors are spread evenly
// over the ranks; NUM_CORES + NUM_SHARED must not exceed 8 * NUM_RANKS.
//
// Default size: 7 cores, 1 shared partition, 1 rank, DDR3-1333H timing --
// the system used for the shared-data evaluation (7 real requestors plus
// one virtual requestor, 64-bit bus, one rank). The other evaluated sizes
// (4 or 16 requestors over 1, 2 or 4 ranks) are reached with the
// parameters; 16 requestors need at least 2 ranks with one bank each.
//
// Interface: per-core valid/ready request ports and completion pulses
// (private and shared separately), the command bus (one command per clock,
// cmd_valid qualifies it) and the data bus at two 64-bit beats per clock.
// A completion pulse comes in the cycle after the last data beat.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned NUM_CORES     = 7,
  parameter int unsigned NUM_SHARED    = 1,
  parameter int unsigned NUM_RANKS     = 1,
  parameter timing_t     TP            = DDR3_1333H,
  parameter int unsigned REQ_Q_DEPTH   = 4,
  parameter int unsigned CMD_BUF_DEPTH = 4,
  localparam int unsigned N    = NUM_CORES + NUM_SHARED,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SH_P = (NUM_SHARED > 0) ? NUM_SHARED : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // private requests of the cores
  input  logic               core_req_valid  [NUM_CORES],
  output logic               core_req_ready  [NUM_CORES],
  input  mem_req_t           core_req        [NUM_CORES],
  output logic               core_resp_valid [NUM_CORES],
  output mem_resp_t          core_resp       [NUM_CORES],
  // shared-data requests of the cores, per partition
  input  logic               shr_req_valid   [SH_P][NUM_CORES],
  output logic               shr_req_ready   [SH_P][NUM_CORES],
  input  mem_req_t           shr_req         [SH_P][NUM_CORES],
  output logic               shr_resp_valid  [SH_P][NUM_CORES],
  output mem_resp_t          shr_resp        [SH_P][NUM_CORES],
  // DRAM command bus
  output logic               cmd_valid,
  output dram_cmd_t          cmd,
  // DRAM data bus
  output logic [BEAT2_W-1:0] dq_out,
  output logic               dq_oe,
  input  logic [BEAT2_W-1:0] dq_in,
  // status
  output logic               refresh_busy,
  output mc_events_t         events
);

  // ------------------------------------------------------ per requestor
  logic      rq_valid [N];
  mem_req_t  rq_head  [N];
  logic      rq_pop   [N];
  logic      gen_valid[N];
  logic      gen_ready[N];
  buf_cmd_t  gen_cmd  [N];
  logic      cb_valid [N];
  buf_cmd_t  cb_head  [N];
  logic      cb_pop   [N];
  logic [N-1:0] enq_valid;
  dram_cmd_t enq_cmd  [N];
  logic [N-1:0] issued;
  logic [N-1:0] data_done;
  logic      resp_v   [N];
  mem_resp_t resp_d   [N];

  // private request queues of the cores
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    mc_fifo #(.T(mem_req_t), .DEPTH(REQ_Q_DEPTH)) u_req_q (
      .clk, .rst_n,
      .push_valid (core_req_valid[c]),
      .push_ready (core_req_ready[c]),
      .push_data  (core_req[c]),
      .pop_valid  (rq_valid[c]),
      .pop        (rq_pop[c]),
      .pop_data   (rq_head[c]),
      .count      ()
    );
    assign core_resp_valid[c] = resp_v[c];
    assign core_resp[c]       = resp_d[c];
  end

  // shared-data partitions feeding the virtual requestors
  for (genvar s = 0; s < NUM_SHARED; s++) begin : g_shared
    shared_partition #(.NUM_CORES(NUM_CORES), .Q_DEPTH(REQ_Q_DEPTH),
                       .OUTSTANDING(CMD_BUF_DEPTH + 2)) u_part (
      .clk, .rst_n,
      .core_req_valid  (shr_req_valid[s]),
      .core_req_ready  (shr_req_ready[s]),
      .core_req        (shr_req[s]),
      .core_resp_valid (shr_resp_valid[s]),
      .core_resp       (shr_resp[s]),
      .out_valid       (rq_valid[NUM_CORES+s]),
      .out_req         (rq_head[NUM_CORES+s]),
      .out_pop         (rq_pop[NUM_CORES+s]),
      .resp_valid      (resp_v[NUM_CORES+s]),
      .resp            (resp_d[NUM_CORES+s])
    );
  end
  if (NUM_SHARED == 0) begin : g_no_shared
    always_comb
      for (int unsigned c = 0; c < NUM_CORES; c++) begin
        shr_req_ready[0][c]  = 1'b0;
        shr_resp_valid[0][c] = 1'b0;
        shr_resp[0][c]       = '0;
      end
  end

  // front end generator, command buffer and arbiter of every requestor
  for (genvar i = 0; i < N; i++) begin : g_req
    cmd_generator #(.RANK(rank_of(i, NUM_RANKS)), .BANK(bank_of(i, NUM_RANKS))) u_gen (
      .clk, .rst_n,
      .req_valid (rq_valid[i]),
      .req       (rq_head[i]),
      .req_pop   (rq_pop[i]),
      .cmd_valid (gen_valid[i]),
      .cmd_ready (gen_ready[i]),
      .cmd       (gen_cmd[i]),
      .row_open  (),
      .open_row  ()
    );

    mc_fifo #(.T(buf_cmd_t), .DEPTH(CMD_BUF_DEPTH)) u_cmd_buf (
      .clk, .rst_n,
      .push_valid (gen_valid[i]),
      .push_ready (gen_ready[i]),
      .push_data  (gen_cmd[i]),
      .pop_valid  (cb_valid[i]),
      .pop        (cb_pop[i]),
      .pop_data   (cb_head[i]),
      .count      ()
    );

    req_arbiter #(.TP(TP)) u_arb (
      .clk, .rst_n,
      .head_valid (cb_valid[i]),
      .head       (cb_head[i]),
      .head_pop   (cb_pop[i]),
      .enq_valid  (enq_valid[i]),
      .enq_cmd    (enq_cmd[i]),
      .issued     (issued[i]),
      .data_done  (data_done[i]),
      .busy       ()
    );
  end

  // ------------------------------------------------------ back end
  logic [N-1:0]    ent_valid;
  logic [ID_W-1:0] ent_id  [N];
  dram_cmd_t       ent_cmd [N];
  logic            rm_valid;
  logic [ID_W-1:0] rm_idx;
  logic            cas_valid, cas_write;
  logic [ID_W-1:0] cas_id;
  logic            done_valid, done_store;
  logic [ID_W-1:0] done_id;
  logic [LINE_W-1:0] done_rdata;

  global_fifo #(.N(N)) u_gfifo (
    .clk, .rst_n,
    .ins_valid (enq_valid),
    .ins_cmd   (enq_cmd),
    .rm_valid  (rm_valid),
    .rm_idx    (rm_idx),
    .ent_valid (ent_valid),
    .ent_id    (ent_id),
    .ent_cmd   (ent_cmd),
    .count     ()
  );

  global_arbiter #(.N(N), .NUM_RANKS(NUM_RANKS), .TP(TP)) u_garb (
    .clk, .rst_n,
    .ent_valid    (ent_valid),
    .ent_id       (ent_id),
    .ent_cmd      (ent_cmd),
    .rm_valid     (rm_valid),
    .rm_idx       (rm_idx),
    .issued       (issued),
    .bus_valid    (cmd_valid),
    .bus_cmd      (cmd),
    .cas_valid    (cas_valid),
    .cas_id       (cas_id),
    .cas_write    (cas_write),
    .refresh_busy (refresh_busy),
    .events       (events)
  );

  // a WR's line is still at the head of its command buffer when issued
  data_path #(.N(N), .TP(TP)) u_data (
    .clk, .rst_n,
    .cas_valid  (cas_valid),
    .cas_id     (cas_id),
    .cas_write  (cas_write),
    .cas_wdata  (cb_head[cas_id].wdata),
    .dq_out     (dq_out),
    .dq_oe      (dq_oe),
    .dq_in      (dq_in),
    .done_valid (done_valid),
    .done_id    (done_id),
    .done_store (done_store),
    .done_rdata (done_rdata)
  );

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      data_done[i]    = done_valid && (32'(done_id) == i);
      resp_v[i]       = data_done[i];
      resp_d[i].store = done_store;
      resp_d[i].rdata = done_rdata;
    end
  end

  initial begin
    assert (N <= NUM_RANKS * BANKS)
      else $error("mc_top: more requestors than banks; private bank mapping impossible");
    assert (NUM_RANKS >= 1 && NUM_RANKS <= MAX_RANKS)
      else $error("mc_top: NUM_RANKS out of range");
  end

endmodule
