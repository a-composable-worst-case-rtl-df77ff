// data_path: data bus unit of the back end.
//
// Once a CAS is on the command bus the data bus is reserved for it for
// tBUS cycles, starting tWL cycles (write) or tRL cycles (read) later. This
// unit carries every issued CAS through a delay line of
// max(tRL, tWL) + tBUS stages. A WR drives its 512-bit line on the bus,
// 128 bits (two DDR beats of 64 bits) per clock, in cycles
// t+tWL .. t+tWL+tBUS-1; a RD captures the device's data in cycles
// t+tRL .. t+tRL+tBUS-1. In the cycle after the last beat the unit reports
// done for the CAS (requestor id, type, read line). That is the moment the
// CAS counts as serviced (Rule-1), which frees the requestor to insert its
// next command and completes the request.
//
// The global arbiter guarantees the bursts never overlap, so at most one
// stage drives the bus and at most one completion happens per cycle.
// The bus is modelled as separate out/in/enable signals at two beats per
// clock; the I/O cells and the DDR beat serialisation of a real PHY are
// outside this design.
module data_path
  import mc_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter timing_t     TP = DDR3_1333H,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // issued CAS
  input  logic               cas_valid,
  input  logic [ID_W-1:0]    cas_id,
  input  logic               cas_write,
  input  logic [LINE_W-1:0]  cas_wdata,
  // data bus
  output logic [BEAT2_W-1:0] dq_out,
  output logic               dq_oe,
  input  logic [BEAT2_W-1:0] dq_in,
  // completion
  output logic               done_valid,
  output logic [ID_W-1:0]    done_id,
  output logic               done_store,
  output logic [LINE_W-1:0]  done_rdata
);

  localparam int unsigned L = max2(TP.rl, TP.wl) + TP.bus;

  logic              st_v    [L];
  logic [ID_W-1:0]   st_id   [L];
  logic              st_wr   [L];
  logic [LINE_W-1:0] st_data [L];

  // stage s holds, in cycle t+s+1, the CAS issued in cycle t
  function automatic logic rd_beat(int unsigned s);
    return (s + 1 >= TP.rl) && (s + 1 < TP.rl + TP.bus);
  endfunction
  function automatic logic wr_beat(int unsigned s);
    return (s + 1 >= TP.wl) && (s + 1 < TP.wl + TP.bus);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < L; s++) begin
        st_v[s]    <= 1'b0;
        st_id[s]   <= '0;
        st_wr[s]   <= 1'b0;
        st_data[s] <= '0;
      end
    end else begin
      st_v[0]    <= cas_valid;
      st_id[0]   <= cas_id;
      st_wr[0]   <= cas_write;
      st_data[0] <= cas_write ? cas_wdata : '0;
      for (int unsigned s = 1; s < L; s++) begin
        st_v[s]    <= st_v[s-1];
        st_id[s]   <= st_id[s-1];
        st_wr[s]   <= st_wr[s-1];
        st_data[s] <= st_data[s-1];
        if (st_v[s-1] && !st_wr[s-1] && rd_beat(s - 1))
          st_data[s][(s - TP.rl) * BEAT2_W +: BEAT2_W] <= dq_in;
      end
    end
  end

  always_comb begin
    dq_out = '0;
    dq_oe  = 1'b0;
    for (int unsigned s = 0; s < L; s++) begin
      if (st_v[s] && st_wr[s] && wr_beat(s)) begin
        dq_oe  = 1'b1;
        dq_out = st_data[s][(s + 1 - TP.wl) * BEAT2_W +: BEAT2_W];
      end
    end
  end

  localparam int unsigned S_RD_DONE = TP.rl + TP.bus - 1;
  localparam int unsigned S_WR_DONE = TP.wl + TP.bus - 1;

  always_comb begin
    done_valid = 1'b0;
    done_id    = '0;
    done_store = 1'b0;
    done_rdata = '0;
    if (st_v[S_RD_DONE] && !st_wr[S_RD_DONE]) begin
      done_valid = 1'b1;
      done_id    = st_id[S_RD_DONE];
      done_rdata = st_data[S_RD_DONE];
    end
    if (st_v[S_WR_DONE] && st_wr[S_WR_DONE]) begin
      done_valid = 1'b1;
      done_id    = st_id[S_WR_DONE];
      done_store = 1'b1;
    end
  end

  a_one_done: assert property (@(posedge clk) disable iff (!rst_n)
      !(st_v[S_RD_DONE] && !st_wr[S_RD_DONE] && st_v[S_WR_DONE] && st_wr[S_WR_DONE]))
    else $error("data_path: two bursts end in the same cycle");

endmodule
