// cmd_generator: front-end command generator of one requestor.
//
// Under private bank mapping the requestor owns one bank (RANK, BANK), so
// the generator alone knows the state of that bank's row buffer. It keeps
// a copy of it (open flag and open row) and turns the request at the head
// of the request queue into DRAM commands, following open row policy:
//   row open and equal to the request's row  -> CAS           (open request)
//   row open with another row                 -> PRE, ACT, CAS (close request)
//   no row open                               -> ACT, CAS      (close request)
// A CAS is RD for a load and WR for a store. A row is left open after the
// access; it is only closed by the PRE of a later miss (or temporarily by
// refresh, which re-opens it, so the copy stays valid).
//
// Operation: one command per cycle is pushed into the command buffer. Each
// pushed PRE/ACT updates the local row-buffer copy, so the next cycle
// re-evaluates the same request and pushes the next command; the request is
// popped in the cycle its CAS is pushed. A hit therefore takes 1 cycle, an
// empty-bank access 2 and a row conflict 3 (the document only assumes a
// constant conversion time). Which commands are generated follows the
// document; the one-command-per-cycle structure is this design's own.
module cmd_generator
  import mc_pkg::*;
#(
  parameter int unsigned RANK = 0,
  parameter int unsigned BANK = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  // request queue head
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_pop,
  // command buffer
  output logic     cmd_valid,
  input  logic     cmd_ready,
  output buf_cmd_t cmd,
  // status of the private bank as seen by the front end
  output logic     row_open,
  output logic [ROW_W-1:0] open_row
);

  logic hit;
  assign hit = row_open && (open_row == req.row);

  always_comb begin
    cmd         = '0;
    cmd.c.rank  = RANK_W'(RANK);
    cmd.c.bank  = BANK_W'(BANK);
    cmd.c.row   = req.row;
    cmd.c.col   = req.col;
    cmd.wdata   = req.wdata;
    if (!row_open)  cmd.c.cmd = CMD_ACT;
    else if (!hit)  cmd.c.cmd = CMD_PRE;
    else            cmd.c.cmd = req.store ? CMD_WR : CMD_RD;
    if (cmd.c.cmd == CMD_PRE) cmd.c.row = open_row;
  end

  assign cmd_valid = req_valid;
  assign req_pop   = req_valid && cmd_ready && hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_open <= 1'b0;
      open_row <= '0;
    end else if (req_valid && cmd_ready) begin
      if (!row_open) begin
        row_open <= 1'b1;
        open_row <= req.row;
      end else if (!hit) begin
        row_open <= 1'b0;
      end
    end
  end

endmodule
