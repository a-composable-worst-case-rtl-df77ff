// tb_shared_partition: self-checking test of a shared-data partition.
//
// Seven cores send shared requests at random times into their shared
// queues. The testbench plays the virtual requestor behind the partition:
// it takes the presented request (out_pop) after a random 0..6 cycle delay
// (as the command generator does after PRE/ACT) and returns completions in
// order after a random delay. Each request carries its core and sequence
// number in the write data; a completion returns that tag in rdata.
//
// Checked:
//   - every request of every core is forwarded exactly once and the
//     requests of one core keep their order;
//   - a presented request stays the same until it is taken;
//   - each completion goes to exactly the core that issued the oldest
//     outstanding forwarded request, with the right tag;
//   - round robin bound: while a core has a request waiting, at most
//     NUM_CORES-1 requests of other cores are forwarded before it is
//     served (each other core at most once per round).
module tb_shared_partition;
  import mc_pkg::*;

  localparam int unsigned NC = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      core_req_valid [NC], core_req_ready [NC], core_resp_valid [NC];
  mem_req_t  core_req [NC];
  mem_resp_t core_resp [NC];
  logic      out_valid, out_pop = 0, resp_valid = 0;
  mem_req_t  out_req;
  mem_resp_t resp = '0;

  shared_partition #(.NUM_CORES(NC), .Q_DEPTH(4), .OUTSTANDING(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  int       sent [NC];          // requests accepted by the partition
  int       fwd  [NC];          // requests forwarded (taken by out_pop)
  int       done [NC];
  int       waiting_others [NC];
  int       max_others = 0;
  int       rate = 50;
  int       n_resp_total = 0;
  mem_req_t outstanding [$];    // forwarded, not completed, in order
  int       resp_wait = 0, pop_wait = 0;
  mem_req_t last_out;
  bit       last_out_valid = 0;

  function automatic int tag_core(mem_req_t q);  return int'(q.wdata[15:0]);  endfunction
  function automatic int tag_seq(mem_req_t q);   return int'(q.wdata[31:16]); endfunction

  initial
    for (int c = 0; c < NC; c++) begin
      core_req_valid[c] = 0; core_req[c] = '0;
      sent[c] = 0; fwd[c] = 0; done[c] = 0; waiting_others[c] = 0;
    end

  // inputs are changed just after the rising edge, outputs checked in the
  // middle of the cycle, and the model updated from what was sampled there
  always @(negedge clk) if (rst_n) begin
    automatic bit acc [NC];
    automatic bit popped = out_pop && out_valid;
    // ---- presented request stable until taken
    if (last_out_valid) check(out_valid && out_req == last_out, "presented request changed before it was taken");
    last_out_valid = out_valid && !out_pop;
    last_out       = out_req;
    // ---- completions
    for (int c = 0; c < NC; c++) begin
      if (core_resp_valid[c]) begin
        check(resp_valid && outstanding.size() != 0 && tag_core(outstanding[0]) == c,
              $sformatf("completion routed to core %0d", c));
        check(core_resp[c].rdata[31:0] == resp.rdata[31:0], "completion data");
        done[c]++;
      end
    end
    if (resp_valid) begin
      automatic int n = 0;
      for (int c = 0; c < NC; c++) n += int'(core_resp_valid[c]);
      check(n == 1, "one core gets each completion");
      n_resp_total++;
      void'(outstanding.pop_front());
    end
    // ---- forwarding
    if (popped) begin
      automatic int c = tag_core(out_req);
      check(c < NC && tag_seq(out_req) == fwd[c], $sformatf("core %0d request order", c));
      fwd[c]++;
      outstanding.push_back(out_req);
      for (int k = 0; k < NC; k++) begin
        if (k == c) waiting_others[k] = 0;
        else if (sent[k] > fwd[k]) begin
          waiting_others[k]++;
          if (waiting_others[k] > max_others) max_others = waiting_others[k];
          check(waiting_others[k] <= NC - 1,
                $sformatf("core %0d passed over %0d times", k, waiting_others[k]));
        end
      end
    end
    for (int c = 0; c < NC; c++) begin
      acc[c] = core_req_valid[c] && core_req_ready[c];
      if (acc[c]) sent[c]++;
      if (sent[c] == fwd[c]) waiting_others[c] = 0;
    end
  end

  // ---- drive requests
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int c = 0; c < NC; c++) begin
      // a request stays until accepted (accept is seen at the negedge)
      if (!core_req_valid[c] || sent[c] > tag_seq(core_req[c])) begin
        if (sent[c] < 60 && $urandom_range(0, 99) < rate) begin
          core_req_valid[c] = 1;
          core_req[c].store = 1'($urandom);
          core_req[c].row   = ROW_W'($urandom_range(0, 3));
          core_req[c].col   = COL_W'($urandom);
          core_req[c].wdata = '0;
          core_req[c].wdata[15:0]  = 16'(c);
          core_req[c].wdata[31:16] = 16'(sent[c]);
        end else core_req_valid[c] = 0;
      end
    end
  end

  // ---- virtual requestor: take presented requests, complete in order
  always @(posedge clk) if (rst_n) begin
    #1;
    out_pop = 0;
    if (out_valid) begin
      if (pop_wait == 0) begin
        out_pop  = 1;
        pop_wait = $urandom_range(0, 6);
      end else pop_wait--;
    end
    resp_valid = 0;
    if (outstanding.size() != 0) begin
      if (resp_wait == 0) begin
        resp_valid = 1;
        resp.store = outstanding[0].store;
        resp.rdata = '0;
        resp.rdata[31:0] = outstanding[0].wdata[31:0];
        resp_wait  = $urandom_range(0, 8);
      end else resp_wait--;
    end
  end

  initial begin
    automatic bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      all = 1;
      for (int c = 0; c < NC; c++) if (sent[c] < 60 || done[c] < 60) all = 0;
      if (all) break;
    end
    for (int c = 0; c < NC; c++) check(fwd[c] == 60 && done[c] == 60, $sformatf("core %0d all served", c));
    $display("largest number of other requests forwarded while a core waited: %0d (bound %0d)",
             max_others, NC - 1);
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
