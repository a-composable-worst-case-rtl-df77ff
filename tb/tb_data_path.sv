// tb_data_path: self-checking test of the data bus unit.
//
// The testbench issues random RD and WR commands (8 requestor ids, random
// lines) with random gaps, keeping the bursts on the data bus apart as the
// global arbiter does, and plays the DRAM side of the bus. DDR3-1333H
// timing (tRL 9, tWL 7, tBUS 4 clocks of 128 bits).
//
// Checked, for a CAS issued in cycle t:
//   WR  dq_oe is high and dq_out carries beat k of the line (lowest first)
//       in cycle t+tWL+k, k = 0..tBUS-1; dq_oe is low in every cycle that
//       belongs to no write burst;
//   RD  the line the device drives in cycles t+tRL .. t+tRL+tBUS-1 is
//       returned whole;
//   done_valid with the CAS's id and type exactly in cycle t+tRL+tBUS (RD)
//       or t+tWL+tBUS (WR), the cycle after the last data beat, and in no
//       other cycle.
// Reads and writes are mixed so that write-to-read and read-to-write bus
// turnarounds with back-to-back bursts occur.
module tb_data_path;
  import mc_pkg::*;

  localparam int unsigned N = 8;
  localparam timing_t TP = DDR3_1333H;
  localparam int RL = int'(TP.rl), WL = int'(TP.wl), BUS = int'(TP.bus);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               cas_valid = 0, cas_write = 0;
  logic [2:0]         cas_id = '0;
  logic [LINE_W-1:0]  cas_wdata = '0;
  logic [BEAT2_W-1:0] dq_out, dq_in = '0;
  logic               dq_oe, done_valid, done_store;
  logic [2:0]         done_id;
  logic [LINE_W-1:0]  done_rdata;

  data_path #(.N(N), .TP(TP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  typedef struct {
    int                t;
    bit                wr;
    int                id;
    logic [LINE_W-1:0] data;
  } cas_t;
  cas_t inflight [$];
  int   cyc = 0;
  int   bus_free = 0;          // first data cycle not booked
  int   n_rd = 0, n_wr = 0, n_done = 0, n_b2b = 0;

  // device side: drive the read beat of the cycle that starts now
  always @(posedge clk) begin
    #1;
    dq_in = '0;
    foreach (inflight[i])
      if (!inflight[i].wr && cyc >= inflight[i].t + RL && cyc < inflight[i].t + RL + BUS)
        dq_in = inflight[i].data[(cyc - inflight[i].t - RL) * BEAT2_W +: BEAT2_W];
  end

  // checks in the middle of the cycle
  always @(negedge clk) if (rst_n) begin
    automatic bit wbeat = 0, dexp = 0;
    automatic cas_t d;
    foreach (inflight[i]) begin
      if (inflight[i].wr && cyc >= inflight[i].t + WL && cyc < inflight[i].t + WL + BUS) begin
        wbeat = 1;
        check(dq_oe && dq_out == inflight[i].data[(cyc - inflight[i].t - WL) * BEAT2_W +: BEAT2_W],
              $sformatf("write beat %0d of CAS at %0d", cyc - inflight[i].t - WL, inflight[i].t));
      end
      if (cyc == inflight[i].t + (inflight[i].wr ? WL : RL) + BUS) begin
        dexp = 1; d = inflight[i];
      end
    end
    if (!wbeat) check(!dq_oe, "dq_oe outside write bursts");
    check(done_valid == dexp, $sformatf("done_valid %0b, expected %0b", done_valid, dexp));
    if (dexp && done_valid) begin
      n_done++;
      check(int'(done_id) == d.id && done_store == d.wr,
            $sformatf("done id %0d store %0b, expected %0d %0b", done_id, done_store, d.id, d.wr));
      if (!d.wr) check(done_rdata == d.data, "read line");
    end
    while (inflight.size() != 0 && cyc > inflight[0].t + RL + BUS + 1) void'(inflight.pop_front());
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // drive the CAS of the coming cycle just after the rising edge
      @(posedge clk);
      #2;
      cas_valid = 0;
      if ($urandom_range(0, 99) < 40) begin
        automatic bit wr = 1'($urandom);
        automatic int start = cyc + (wr ? WL : RL);
        if (start >= bus_free) begin
          automatic cas_t c;
          if (start == bus_free) n_b2b++;
          c.t = cyc; c.wr = wr; c.id = $urandom_range(0, N - 1);
          for (int w = 0; w < LINE_W / 32; w++) c.data[w*32 +: 32] = $urandom;
          inflight.push_back(c);
          cas_valid = 1; cas_write = wr; cas_id = 3'(c.id); cas_wdata = wr ? c.data : '0;
          bus_free = start + BUS;
          if (wr) n_wr++; else n_rd++;
        end
      end
    end
    @(posedge clk);
    #2 cas_valid = 0;
    repeat (30) @(posedge clk);
    check(n_done == n_rd + n_wr, $sformatf("%0d completions for %0d CAS", n_done, n_rd + n_wr));
    check(n_b2b > 20, "back-to-back bursts exercised");
    $display("RD %0d, WR %0d, back-to-back bursts %0d", n_rd, n_wr, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
