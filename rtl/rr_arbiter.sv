// rr_arbiter: round robin arbiter.
//
// Used in front of the virtual requestor of a shared-data partition: the
// cores that share the partition each have a request queue, and this
// arbiter picks the next one to serve in round robin order, as the
// document requires for predictable access to shared data.
//
// grant is one-hot among the asserted req bits, starting the search at the
// position after the last accepted grant. The pointer moves only when the
// granted request is accepted (accept high), so a grant is stable while
// the consumer is busy. Purely combinational grant, registered pointer.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant,
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] grant_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;   // highest priority position

  always_comb begin
    logic found;
    logic [IW-1:0] k;
    grant     = '0;
    grant_idx = '0;
    found     = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      k = IW'((32'(ptr) + i) % N);
      if (!found && req[k]) begin
        found     = 1'b1;
        grant[k]  = 1'b1;
        grant_idx = k;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (accept && (grant != '0))
      ptr <= (32'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("rr_arbiter: grant not one-hot");

endmodule
