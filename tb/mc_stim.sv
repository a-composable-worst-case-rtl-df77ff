// mc_stim: request generator and scoreboard for whole-controller testbenches.
//
// Plays the cores. Every core sends N_REQ private requests (loads and stores
// to its own bank) and N_SHR requests to every shared partition, with random
// gaps. A request reuses the previous row of its bank with probability
// HIT_PCT and otherwise takes one of the three other rows, so row hits, row
// conflicts and first accesses to an idle bank all happen; STORE_PCT of the
// requests are stores. Each core uses its own set of columns in a
// shared bank, so the expected data never depends on how the round robin
// interleaves the cores.
//
// Expected data: a store updates a reference memory when the controller
// accepts it; a load's expected line is the reference content at the time
// it is accepted (requests of one core to one bank complete in order).
// Every completion is compared with the next expected one of that core and
// port. checks/failures/done are read by the enclosing testbench.
// A core with no pending private request starts one with probability
// RATE_PM per mille each cycle (RATE_PCT percent unless set).
//
// Private request latency, from the cycle a request is accepted to the
// cycle of its completion, is summed in lat_sum / lat_max (lat_n requests).
module mc_stim
  import mc_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 7,
  parameter int unsigned NUM_SHARED = 1,
  parameter int unsigned N_REQ      = 40,
  parameter int unsigned N_SHR      = 10,
  parameter int unsigned RATE_PCT   = 60,
  parameter int unsigned RATE_PM    = 10 * RATE_PCT,
  parameter int unsigned HIT_PCT    = 45,
  parameter int unsigned STORE_PCT  = 40,
  localparam int unsigned SH_P = (NUM_SHARED > 0) ? NUM_SHARED : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      core_req_valid  [NUM_CORES],
  input  logic      core_req_ready  [NUM_CORES],
  output mem_req_t  core_req        [NUM_CORES],
  input  logic      core_resp_valid [NUM_CORES],
  input  mem_resp_t core_resp       [NUM_CORES],
  output logic      shr_req_valid   [SH_P][NUM_CORES],
  input  logic      shr_req_ready   [SH_P][NUM_CORES],
  output mem_req_t  shr_req         [SH_P][NUM_CORES],
  input  logic      shr_resp_valid  [SH_P][NUM_CORES],
  input  mem_resp_t shr_resp        [SH_P][NUM_CORES]
);

  int checks = 0, failures = 0;
  int loads = 0, stores = 0, shared_done = 0, private_done = 0;
  bit done = 0;
  longint lat_sum = 0;
  int     lat_max = 0, lat_n = 0, cyc = 0;
  int     acc_t [NUM_CORES][$];

  logic [LINE_W-1:0] refmem [longint];
  typedef struct { bit store; logic [LINE_W-1:0] data; } exp_t;
  exp_t pexp [NUM_CORES][$];
  exp_t sexp [SH_P][NUM_CORES][$];
  int   psent [NUM_CORES];
  int   ssent [SH_P][NUM_CORES];
  int   prow  [NUM_CORES];
  int   srow  [SH_P];

  function automatic longint key(int part, int unit, int row, int col);
    // part 0: private (unit = core), part 1+s: shared partition s
    return (longint'(part) << 48) | (longint'(unit) << 40) | (longint'(row) << 12) | longint'(col);
  endfunction

  function automatic mem_req_t rand_req(int unsigned base_col, inout int last_row);
    mem_req_t q;
    automatic int pick = $urandom_range(0, 99);
    // HIT_PCT % same row as before (row hit), otherwise another of four rows
    if (pick >= int'(HIT_PCT)) last_row = (last_row + $urandom_range(1, 3)) % 4;
    q.store = ($urandom_range(0, 99) < int'(STORE_PCT));
    q.row   = ROW_W'(last_row);
    q.col   = COL_W'((base_col + $urandom_range(0, 7)) * 8);
    for (int w = 0; w < LINE_W / 32; w++) q.wdata[w*32 +: 32] = $urandom;
    return q;
  endfunction

  initial begin
    for (int c = 0; c < NUM_CORES; c++) begin
      core_req_valid[c] = 0; core_req[c] = '0; psent[c] = 0; prow[c] = 0;
      for (int s = 0; s < SH_P; s++) begin
        shr_req_valid[s][c] = 0; shr_req[s][c] = '0; ssent[s][c] = 0;
      end
    end
    for (int s = 0; s < SH_P; s++) srow[s] = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // ---------------------------------------------- completions
      for (int c = 0; c < NUM_CORES; c++) begin
        if (core_resp_valid[c]) begin
          checks++;
          private_done++;
          if (acc_t[c].size() != 0) begin
            automatic int l = cyc - acc_t[c].pop_front();
            lat_sum += l; lat_n++;
            if (l > lat_max) lat_max = l;
          end
          if (pexp[c].size() == 0) begin
            failures++; $display("core %0d: unexpected private completion", c);
          end else begin
            automatic exp_t e = pexp[c].pop_front();
            if (e.store != core_resp[c].store || (!e.store && e.data != core_resp[c].rdata)) begin
              failures++; $display("core %0d: private completion mismatch (store=%0d)", c, e.store);
            end
          end
        end
        for (int s = 0; s < NUM_SHARED; s++) begin
          if (shr_resp_valid[s][c]) begin
            checks++;
            shared_done++;
            if (sexp[s][c].size() == 0) begin
              failures++; $display("core %0d: unexpected shared completion", c);
            end else begin
              automatic exp_t e = sexp[s][c].pop_front();
              if (e.store != shr_resp[s][c].store || (!e.store && e.data != shr_resp[s][c].rdata)) begin
                failures++; $display("core %0d: shared completion mismatch", c);
              end
            end
          end
        end
      end
      // ---------------------------------------------- requests
      for (int c = 0; c < NUM_CORES; c++) begin
        automatic bit free = !core_req_valid[c];
        if (core_req_valid[c] && core_req_ready[c]) begin
          exp_t e;
          automatic longint k = key(0, c, int'(core_req[c].row), int'(core_req[c].col));
          e.store = core_req[c].store;
          e.data  = refmem.exists(k) ? refmem[k] : '0;
          if (e.store) begin refmem[k] = core_req[c].wdata; stores++; end
          else loads++;
          pexp[c].push_back(e);
          acc_t[c].push_back(cyc);
          psent[c]++;
          free = 1;
        end
        if (free) begin
          if (psent[c] < N_REQ && $urandom_range(0, 999) < RATE_PM) begin
            automatic int r = prow[c];
            core_req[c]       <= rand_req(0, r);
            prow[c]            = r;
            core_req_valid[c] <= 1'b1;
          end else core_req_valid[c] <= 1'b0;
        end
        for (int s = 0; s < NUM_SHARED; s++) begin
          automatic bit sfree = !shr_req_valid[s][c];
          if (shr_req_valid[s][c] && shr_req_ready[s][c]) begin
            exp_t e;
            automatic longint k = key(1 + s, 0, int'(shr_req[s][c].row), int'(shr_req[s][c].col));
            e.store = shr_req[s][c].store;
            e.data  = refmem.exists(k) ? refmem[k] : '0;
            if (e.store) refmem[k] = shr_req[s][c].wdata;
            sexp[s][c].push_back(e);
            ssent[s][c]++;
            sfree = 1;
          end
          if (sfree) begin
            if (ssent[s][c] < N_SHR && $urandom_range(0, 99) < RATE_PCT / 4) begin
              automatic int r = srow[s];
              shr_req[s][c]       <= rand_req(8 * c, r);
              srow[s]              = r;
              shr_req_valid[s][c] <= 1'b1;
            end else shr_req_valid[s][c] <= 1'b0;
          end
        end
      end
      cyc++;
      // ---------------------------------------------- finished?
      begin
        automatic bit all = 1;
        for (int c = 0; c < NUM_CORES; c++) begin
          if (psent[c] < N_REQ || pexp[c].size() != 0) all = 0;
          for (int s = 0; s < NUM_SHARED; s++)
            if (ssent[s][c] < N_SHR || sexp[s][c].size() != 0) all = 0;
        end
        done = all;
      end
    end
  end

endmodule
