// tb_mc_fifo: self-checking test of the synchronous FIFO (mc_fifo).
//
// The FIFO is used for the request queues, the command buffers, the shared
// queues and the virtual buffer. This test runs a 4-deep FIFO of 16-bit
// words: a directed part (reset state, fill to full, push refused while
// full, drain, push/pop in the same cycle) and 3000 cycles of random pushes
// and pops against a queue model. Every cycle it compares pop_valid,
// pop_data, push_ready and count with the model.
//
// Timing checked: a word pushed in cycle t is at the head in cycle t+1 (one
// cycle through the FIFO, this design's choice; the document gives no
// latency for its queues). Inputs are driven after the falling edge and
// outputs checked just before the next rising edge.
module tb_mc_fifo;

  localparam int unsigned DEPTH = 4;
  typedef logic [15:0] word_t;

  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  push_valid = 0, pop = 0;
  word_t push_data = '0;
  logic  push_ready, pop_valid;
  word_t pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  mc_fifo #(.T(word_t), .DEPTH(DEPTH)) dut (.*);

  int    checks = 0, failures = 0;
  word_t model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] FAIL: %s", $time, what);
    end
  endtask

  // compare outputs with the model, then let the clock edge happen and
  // update the model with whatever was accepted in this cycle
  task automatic step();
    #4;
    check(pop_valid == (model.size() != 0), "pop_valid");
    check(push_ready == (model.size() < DEPTH), "push_ready");
    check(int'(count) == model.size(), "count");
    if (model.size() != 0) check(pop_data == model[0], "pop_data");
    begin
      automatic bit do_pop  = pop && model.size() != 0;
      automatic bit do_push = push_valid && push_ready;
      @(posedge clk);
      if (do_pop)  void'(model.pop_front());
      if (do_push) model.push_back(push_data);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------- reset state
    #4;
    check(!pop_valid && push_ready && count == 0, "reset state");
    @(negedge clk);
    // ---------------------------------------------- one push, one cycle
    push_valid = 1; push_data = 16'h1234;
    step();
    push_valid = 0;
    check(pop_valid && pop_data == 16'h1234, "word at head one cycle after push");
    // ---------------------------------------------- fill up
    for (int k = 0; k < DEPTH + 2; k++) begin
      push_valid = 1; push_data = word_t'(16'h100 + k);
      step();
    end
    push_valid = 0;
    check(!push_ready && count == DEPTH, "full after DEPTH pushes");
    // ---------------------------------------------- pop and push while full
    pop = 1; push_valid = 1; push_data = 16'hbeef;
    step();
    pop = 0; push_valid = 0;
    // ---------------------------------------------- drain
    while (model.size() != 0) begin
      pop = 1;
      step();
    end
    pop = 0;
    step();
    // ---------------------------------------------- random
    for (int n = 0; n < 3000; n++) begin
      push_valid = ($urandom_range(0, 99) < 55);
      push_data  = word_t'($urandom);
      pop        = (model.size() != 0) && ($urandom_range(0, 99) < 50);
      step();
    end
    push_valid = 0; pop = 0;
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
