// mc_fifo: synchronous first-in first-out queue.
//
// Used for every queue of the controller: the per-requestor request queues
// and command buffers of the front and back end, the shared request queues
// of a shared-data partition and its virtual command buffer. The document
// names these queues but gives neither their depth nor their handshake;
// the default depth of 4 and the valid/ready style are this design's own.
//
// Interface: push when push_valid && push_ready (push_ready = !full);
// the head is presented on pop_data with pop_valid = !empty and leaves
// on pop (pop must only be raised while pop_valid). A push and a pop may
// happen in the same cycle. Data written in cycle t is visible at the head
// from cycle t+1. Storage is a register array with wrap-around pointers.
module mc_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid,
  output logic push_ready,
  input  T     push_data,
  output logic pop_valid,
  input  logic pop,
  output T     pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign push_ready = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop_valid  = (count != '0);
  assign pop_data   = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop && pop_valid;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> pop_valid)
    else $error("mc_fifo: pop while empty");

endmodule
