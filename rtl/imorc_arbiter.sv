// imorc_arbiter: slave-side arbiter that lets N IMORC masters share one slave.
//
// IMORC builds n:1 connections by placing an arbiter on the slave side; the
// accelerator has one in front of the host interface (three stream buffers)
// and one in front of the external-memory controller (four stream buffers).
// The policy below is this design's: round-robin over the requesting ports,
// one request granted per cycle.
//  * A granted write locks the arbiter until its len/(DW/8) write-data words
//    have been passed from that master to the slave, so write data stays in
//    request order.
//  * A granted read only records {port, words} in a route FIFO and releases
//    the arbiter, so several reads can be outstanding; read data coming back
//    from the slave (which must answer in request order) is steered to the
//    port at the head of the route FIFO.
// All ports are in one clock domain (the slave's); the links in front of it
// do the clock crossing.
module imorc_arbiter
  import imorc_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned DW    = 256,
  parameter int unsigned RT_AW = 3     // route FIFO: 8 outstanding reads
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the masters (slave ends of their links)
  input  logic [N-1:0]        in_req_valid,
  output logic [N-1:0]        in_req_ready,
  input  imorc_req_t          in_req [N],
  input  logic [N-1:0]        in_wd_valid,
  output logic [N-1:0]        in_wd_ready,
  input  logic [DW-1:0]       in_wd_data [N],
  output logic [N-1:0]        in_rd_valid,
  input  logic [N-1:0]        in_rd_ready,
  output logic [DW-1:0]       in_rd_data [N],
  // to the slave
  output logic                out_req_valid,
  input  logic                out_req_ready,
  output imorc_req_t          out_req,
  output logic                out_wd_valid,
  input  logic                out_wd_ready,
  output logic [DW-1:0]       out_wd_data,
  input  logic                out_rd_valid,
  output logic                out_rd_ready,
  input  logic [DW-1:0]       out_rd_data
);

  localparam int unsigned IW  = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned BPW = DW / 8;           // bytes per word

  // ---------------- grant ----------------
  logic [IW-1:0] last, grant;
  logic          any_req;

  always_comb begin
    grant   = last;
    any_req = 1'b0;
    for (int k = 1; k <= N; k++) begin
      logic [IW:0] idx;
      idx = (IW+1)'((int'(last) + k) % N);
      if (!any_req && in_req_valid[idx]) begin
        grant   = IW'(idx);
        any_req = 1'b1;
      end
    end
  end

  logic          wr_busy;
  logic [IW-1:0] wr_idx;
  logic [LEN_W-1:0] wr_left;

  // route FIFO for reads
  logic [IW-1:0]    rt_idx  [2**RT_AW];
  logic [LEN_W-1:0] rt_cnt  [2**RT_AW];
  logic [RT_AW:0]   rt_wp, rt_rp;
  logic             rt_full, rt_empty;
  assign rt_full  = (rt_wp[RT_AW] != rt_rp[RT_AW]) && (rt_wp[RT_AW-1:0] == rt_rp[RT_AW-1:0]);
  assign rt_empty = (rt_wp == rt_rp);

  logic can_grant;
  assign can_grant     = !wr_busy && !rt_full;
  assign out_req_valid = any_req && can_grant;
  assign out_req       = in_req[grant];

  logic req_fire;
  assign req_fire = out_req_valid && out_req_ready;

  always_comb begin
    in_req_ready = '0;
    if (can_grant && out_req_ready && any_req) in_req_ready[grant] = 1'b1;
  end

  // ---------------- write data ----------------
  assign out_wd_valid = wr_busy && in_wd_valid[wr_idx];
  assign out_wd_data  = in_wd_data[wr_idx];
  always_comb begin
    in_wd_ready = '0;
    if (wr_busy) in_wd_ready[wr_idx] = out_wd_ready;
  end

  // ---------------- read data ----------------
  logic [IW-1:0]    rd_idx;
  logic [LEN_W-1:0] rd_done;   // words of the head read already returned
  assign rd_idx       = rt_idx[rt_rp[RT_AW-1:0]];
  assign out_rd_ready = !rt_empty && in_rd_ready[rd_idx];
  always_comb begin
    in_rd_valid = '0;
    for (int i = 0; i < N; i++) in_rd_data[i] = out_rd_data;
    if (!rt_empty) in_rd_valid[rd_idx] = out_rd_valid;
  end

  logic rd_fire;
  assign rd_fire = out_rd_valid && out_rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last    <= IW'(N-1);
      wr_busy <= 1'b0;
      wr_idx  <= '0;
      wr_left <= '0;
      rt_wp   <= '0;
      rt_rp   <= '0;
      rd_done <= '0;
    end else begin
      if (req_fire) begin
        last <= grant;
        if (out_req.write) begin
          wr_busy <= 1'b1;
          wr_idx  <= grant;
          wr_left <= LEN_W'(out_req.len / BPW);
        end else begin
          rt_idx[rt_wp[RT_AW-1:0]] <= grant;
          rt_cnt[rt_wp[RT_AW-1:0]] <= LEN_W'(out_req.len / BPW);
          rt_wp <= rt_wp + 1'b1;
        end
      end
      if (out_wd_valid && out_wd_ready) begin
        wr_left <= wr_left - 1'b1;
        if (wr_left == LEN_W'(1)) wr_busy <= 1'b0;
      end
      if (rd_fire) begin
        if (rd_done + 1'b1 == rt_cnt[rt_rp[RT_AW-1:0]]) begin
          rd_done <= '0;
          rt_rp   <= rt_rp + 1'b1;
        end else begin
          rd_done <= rd_done + 1'b1;
        end
      end
    end
  end

  // A request must carry a whole number of link words.
  a_req_len: assert property (@(posedge clk) disable iff (!rst_n)
      req_fire |-> (out_req.len != 0 && out_req.len[$clog2(BPW)-1:0] == '0))
    else $error("imorc_arbiter: request length %0d is not a whole number of words", out_req.len);
  // The slave must not return read data that nobody asked for.
  a_no_stray_read: assert property (@(posedge clk) disable iff (!rst_n) !(out_rd_valid && rt_empty))
    else $error("imorc_arbiter: unexpected read data");

endmodule
