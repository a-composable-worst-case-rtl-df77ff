// tb_rr_arbiter: self-checking test of the round robin arbiter.
//
// The arbiter picks which core's shared queue feeds the virtual requestor
// next. This test uses 5 inputs (not a power of two, so the wrap of the
// pointer is exercised). Parts:
//   1. all inputs requesting and every grant accepted: the grants must
//      rotate 0,1,2,3,4,0,... so each input is served once in every 5
//      cycles (the round robin service the shared queues rely on);
//   2. a grant that is not accepted must not move the pointer;
//   3. 4000 cycles of random requests and accepts against a reference
//      model; grant must be one-hot, name a requesting input, and be the
//      first requesting input at or after the pointer.
// The arbiter is combinational from its pointer: a grant is valid in the
// cycle the requests are present, and the pointer moves at the clock edge
// after an accepted grant.
module tb_rr_arbiter;

  localparam int unsigned N  = 5;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]  req = '0;
  logic          accept = 0;
  logic [N-1:0]  grant;
  logic [IW-1:0] grant_idx;

  rr_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int ptr = 0;   // model pointer

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  function automatic int model_grant();
    for (int i = 0; i < N; i++) begin
      int k = (ptr + i) % N;
      if (req[k]) return k;
    end
    return -1;
  endfunction

  // check the grant of this cycle, then take the clock edge
  task automatic step();
    int g;
    #4;
    g = model_grant();
    check($onehot0(grant), "grant one-hot");
    if (g < 0) check(grant == '0, "no grant without request");
    else check(grant == N'(1) << g && int'(grant_idx) == g,
               $sformatf("grant %b idx %0d, expected %0d", grant, grant_idx, g));
    @(posedge clk);
    if (accept && g >= 0) ptr = (g + 1) % N;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------- 1: rotation
    req = '1; accept = 1;
    for (int n = 0; n < 3 * N; n++) begin
      #4 check(int'(grant_idx) == n % N, "rotation order with all requesting");
      @(negedge clk);
      ptr = (n + 1) % N;
    end
    // ---------------------------------------------- 2: no accept, no move
    accept = 0;
    begin
      int first;
      #4 first = int'(grant_idx);
      @(negedge clk);
      repeat (3) begin
        #4 check(int'(grant_idx) == first, "pointer held without accept");
        @(negedge clk);
      end
    end
    // ---------------------------------------------- 3: random
    for (int n = 0; n < 4000; n++) begin
      req    = N'($urandom);
      if ($urandom_range(0, 3) == 0) req = '0;
      accept = ($urandom_range(0, 99) < 70);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
