// global_fifo: the global arbitration FIFO queue of the back end.
//
// Holds the commands that the per-requestor arbiters have inserted, in
// arrival order, for the global command arbiter. Because a requestor may
// have only one command in the queue (Rule-1), N entries (one per private
// or virtual requestor) always suffice, as the document states.
//
// Several requestors may insert in the same cycle (their arbiters run in
// parallel); same-cycle insertions are appended in ascending requestor
// index, which is this design's own tie-break. The global arbiter may
// remove the entry at any position (Rule-3 lets a non-blocked command pass
// blocked ones); the entries behind it move forward by one, so entry 0 is
// always the oldest. Removal and insertion in the same cycle are allowed,
// and a command inserted in cycle t is visible from cycle t+1.
module global_fifo
  import mc_pkg::*;
#(
  parameter int unsigned N    = 8,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    ins_valid,
  input  dram_cmd_t       ins_cmd [N],
  input  logic            rm_valid,
  input  logic [ID_W-1:0] rm_idx,
  output logic [N-1:0]    ent_valid,
  output logic [ID_W-1:0] ent_id  [N],
  output dram_cmd_t       ent_cmd [N],
  output logic [ID_W:0]   count
);

  logic [ID_W-1:0] q_id  [N];
  dram_cmd_t       q_cmd [N];
  logic [ID_W-1:0] n_id  [N];
  dram_cmd_t       n_cmd [N];
  logic [ID_W:0]   n_count;

  always_comb begin
    n_id    = q_id;
    n_cmd   = q_cmd;
    n_count = count;
    if (rm_valid) begin
      for (int unsigned i = 0; i < N - 1; i++) begin
        if (i >= rm_idx) begin
          n_id[i]  = q_id[i+1];
          n_cmd[i] = q_cmd[i+1];
        end
      end
      n_count = n_count - 1'b1;
    end
    for (int unsigned r = 0; r < N; r++) begin
      if (ins_valid[r] && n_count < (ID_W+1)'(N)) begin
        n_id[n_count[ID_W-1:0]]  = ID_W'(r);
        n_cmd[n_count[ID_W-1:0]] = ins_cmd[r];
        n_count = n_count + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int unsigned i = 0; i < N; i++) begin
        q_id[i]  <= '0;
        q_cmd[i] <= '0;
      end
    end else begin
      count <= n_count;
      q_id  <= n_id;
      q_cmd <= n_cmd;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      ent_valid[i] = (i < count);
      ent_id[i]    = q_id[i];
      ent_cmd[i]   = q_cmd[i];
    end
  end

  a_rm_valid_entry: assert property (@(posedge clk) disable iff (!rst_n)
                                     rm_valid |-> ({1'b0, rm_idx} < count))
    else $error("global_fifo: removal of an empty slot");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      (32'(count) - 32'(rm_valid) + 32'($countones(ins_valid))) <= N)
    else $error("global_fifo: more commands than requestors");

endmodule
