// tb_global_fifo: self-checking test of the global arbitration FIFO.
//
// An 8-entry global FIFO is driven the way the back end drives it: a
// requestor inserts only when it has no command in the queue (Rule-1), any
// number of requestors may insert in the same cycle, and the arbiter may
// remove the entry at any position (Rule-3), possibly in the same cycle as
// inserts. A reference model keeps the expected order: removal closes the
// gap, same-cycle inserts are appended in ascending requestor index.
// Every cycle the test compares ent_valid, ent_id, ent_cmd and count with
// the model. Directed part first (one insert, eight same-cycle inserts,
// removal from the middle and the tail with inserts in the same cycle),
// then 5000 random cycles.
//
// Timing checked: a command inserted in cycle t is visible from t+1 and a
// removed entry is gone in t+1 (one register stage).
module tb_global_fifo;
  import mc_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned ID_W = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]    ins_valid = '0;
  dram_cmd_t       ins_cmd [N];
  logic            rm_valid = 0;
  logic [ID_W-1:0] rm_idx = '0;
  logic [N-1:0]    ent_valid;
  logic [ID_W-1:0] ent_id  [N];
  dram_cmd_t       ent_cmd [N];
  logic [ID_W:0]   count;

  global_fifo #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { int id; dram_cmd_t c; } ent_t;
  ent_t model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  function automatic dram_cmd_t rand_cmd(int id);
    dram_cmd_t c;
    c.cmd  = cmd_e'($urandom_range(1, 4));
    c.rank = RANK_W'(id % 2);
    c.bank = BANK_W'(id / 2);
    c.row  = ROW_W'($urandom);
    c.col  = COL_W'($urandom);
    return c;
  endfunction

  function automatic bit in_queue(int id);
    foreach (model[k]) if (model[k].id == id) return 1;
    return 0;
  endfunction

  task automatic compare();
    check(int'(count) == model.size(), $sformatf("count %0d, expected %0d", count, model.size()));
    for (int k = 0; k < N; k++) begin
      check(ent_valid[k] == (k < model.size()), $sformatf("ent_valid[%0d]", k));
      if (k < model.size())
        check(int'(ent_id[k]) == model[k].id && ent_cmd[k] == model[k].c,
              $sformatf("entry %0d: id %0d, expected %0d", k, ent_id[k], model[k].id));
    end
  endtask

  // one cycle with the present inputs: check, clock, update the model
  task automatic step();
    #4 compare();
    @(posedge clk);
    if (rm_valid) model.delete(int'(rm_idx));
    for (int r = 0; r < N; r++)
      if (ins_valid[r]) model.push_back('{id: r, c: ins_cmd[r]});
    @(negedge clk);
    ins_valid = '0;
    rm_valid  = 0;
  endtask

  initial begin
    for (int r = 0; r < N; r++) ins_cmd[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------- directed
    ins_valid[5] = 1; ins_cmd[5] = rand_cmd(5);
    step();
    check(ent_valid[0] && ent_id[0] == 5, "insert visible in the next cycle");
    rm_valid = 1; rm_idx = 0;
    step();
    check(count == 0 && ent_valid == '0, "removal gone in the next cycle");
    for (int r = 0; r < N; r++) begin
      ins_valid[r] = 1; ins_cmd[r] = rand_cmd(r);
    end
    step();                                       // 8 same-cycle inserts
    rm_valid = 1; rm_idx = 3;
    step();                                       // remove from the middle
    rm_valid = 1; rm_idx = ID_W'(N - 2);
    ins_valid[3] = 1; ins_cmd[3] = rand_cmd(3);
    step();                                       // remove tail + insert
    rm_valid = 1; rm_idx = 0;
    ins_valid[7] = 0;
    step();
    while (model.size() != 0) begin
      rm_valid = 1; rm_idx = ID_W'($urandom_range(0, model.size() - 1));
      step();
    end
    // ---------------------------------------------- random
    for (int n = 0; n < 5000; n++) begin
      if (model.size() != 0 && $urandom_range(0, 99) < 60) begin
        rm_valid = 1;
        rm_idx   = ID_W'($urandom_range(0, model.size() - 1));
      end
      for (int r = 0; r < N; r++)
        if (!in_queue(r) && !(rm_valid && model[rm_idx].id == r) && $urandom_range(0, 99) < 30) begin
          ins_valid[r] = 1;
          ins_cmd[r]   = rand_cmd(r);
        end
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
