// shared_partition: front end of one shared-data partition.
//
// Cores that communicate through shared memory reach a bank that none of
// them owns. The partition gives every core its own shared request queue;
// a round robin arbiter picks the next request among them and forwards it
// to the command generator of the partition's "virtual" requestor, which
// then competes in the back end like any private requestor (one global
// FIFO slot, its own command buffer, called the virtual buffer). As rows
// of the shared bank can be changed by any of the cores, the analysis
// treats every shared request as a close request; the command generator
// still applies open row policy and skips PRE/ACT on a real row hit.
//
// Once a request is presented to the command generator it stays selected
// until the generator takes it (with its CAS), even if a core of higher
// round robin priority gets a request meanwhile; otherwise the PRE/ACT
// already issued for the presented request could be wasted.
//
// Requests complete in order, so a small FIFO of core indices (one entry
// per request forwarded and not yet completed) routes each completion of
// the virtual requestor back to the core that issued it.
//
// Interface: per-core valid/ready request ports and completion outputs;
// out_* is a request-queue-head style port (out_pop takes the request);
// resp_valid/resp is the virtual requestor's completion.
// The queue depth is this design's choice (the document gives none).
module shared_partition
  import mc_pkg::*;
#(
  parameter int unsigned NUM_CORES = 7,
  parameter int unsigned Q_DEPTH   = 4,
  parameter int unsigned OUTSTANDING = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // per-core shared request queues
  input  logic      core_req_valid [NUM_CORES],
  output logic      core_req_ready [NUM_CORES],
  input  mem_req_t  core_req       [NUM_CORES],
  output logic      core_resp_valid[NUM_CORES],
  output mem_resp_t core_resp      [NUM_CORES],
  // towards the virtual requestor's command generator
  output logic      out_valid,
  output mem_req_t  out_req,
  input  logic      out_pop,
  // completion of the virtual requestor
  input  logic      resp_valid,
  input  mem_resp_t resp
);
  localparam int unsigned IW = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;

  logic [NUM_CORES-1:0] q_valid, grant;
  mem_req_t             q_head [NUM_CORES];
  logic [IW-1:0]        gidx;
  logic                 id_ready, id_valid;
  logic [IW-1:0]        id_head;
  logic                 held;        // out_req presented, not yet taken
  logic [IW-1:0]        held_idx;
  logic [NUM_CORES-1:0] rr_req;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_q
    mc_fifo #(.T(mem_req_t), .DEPTH(Q_DEPTH)) u_q (
      .clk, .rst_n,
      .push_valid (core_req_valid[c]),
      .push_ready (core_req_ready[c]),
      .push_data  (core_req[c]),
      .pop_valid  (q_valid[c]),
      .pop        (out_pop && grant[c]),
      .pop_data   (q_head[c]),
      .count      ()
    );
  end

  rr_arbiter #(.N(NUM_CORES)) u_rr (
    .clk, .rst_n,
    .req       (rr_req),
    .accept    (out_pop),
    .grant     (grant),
    .grant_idx (gidx)
  );

  always_comb begin
    rr_req = '0;
    if (held)          rr_req[held_idx] = 1'b1;
    else if (id_ready) rr_req = q_valid;
  end

  assign out_valid = |grant;
  assign out_req   = q_head[gidx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= 1'b0;
      held_idx <= '0;
    end else if (out_pop) begin
      held     <= 1'b0;
    end else if (out_valid) begin
      held     <= 1'b1;
      held_idx <= gidx;
    end
  end

  mc_fifo #(.T(logic [IW-1:0]), .DEPTH(OUTSTANDING)) u_ids (
    .clk, .rst_n,
    .push_valid (out_pop),
    .push_ready (id_ready),
    .push_data  (gidx),
    .pop_valid  (id_valid),
    .pop        (resp_valid),
    .pop_data   (id_head),
    .count      ()
  );

  always_comb begin
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      core_resp_valid[c] = resp_valid && id_valid && (32'(id_head) == c);
      core_resp[c]       = resp;
    end
  end

  a_resp_known: assert property (@(posedge clk) disable iff (!rst_n)
                                 resp_valid |-> id_valid)
    else $error("shared_partition: completion with no request outstanding");

endmodule
