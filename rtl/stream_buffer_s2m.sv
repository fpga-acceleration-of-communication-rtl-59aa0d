// stream_buffer_s2m: read stream buffer ("S2M" in the accelerator diagram),
// turning a memory region into a continuous data stream for the composer.
//
// The request core hands it commands {addr, len} on its REQ port; the buffer
// forwards each one as an IMORC read request on its master link and stores
// the returned words in a FIFO of 2**BUF_AW words, from which the composer
// pulls the stream. A read is only issued when the FIFO is sure to have room
// for all of its data (words already requested but not yet pulled are counted
// against the free space), so the link's read data never waits on this core
// and several requests can be outstanding. The 128-byte request size and the
// one-buffer-per-access structure follow the accelerator description; the
// credit scheme and the depth (four requests) are this design's choices.
// idle is high when no read is outstanding and the FIFO is empty.
module stream_buffer_s2m
  import imorc_pkg::*;
#(
  parameter int unsigned DW     = 64,
  parameter int unsigned BUF_AW = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // REQ port from the request core
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [LEN_W-1:0]  cmd_len,
  // IMORC master port
  output logic              req_valid,
  input  logic              req_ready,
  output imorc_req_t        req,
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [DW-1:0]     rd_data,
  // stream to the composer
  output logic              st_valid,
  input  logic              st_ready,
  output logic [DW-1:0]     st_data,
  output logic              idle
);

  localparam int unsigned BPW   = DW / 8;
  localparam int unsigned DEPTH = 2**BUF_AW;

  logic [BUF_AW:0] count;
  logic [LEN_W:0]  reserved;     // words requested and not yet pulled
  logic [LEN_W:0]  cmd_words;

  assign cmd_words = (LEN_W+1)'(cmd_len / BPW);

  logic room;
  assign room = (reserved + cmd_words) <= (LEN_W+1)'(DEPTH);

  assign req_valid = cmd_valid && room;
  assign cmd_ready = req_ready && room;
  assign req.write = 1'b0;
  assign req.addr  = cmd_addr;
  assign req.len   = cmd_len;

  logic fifo_w_ready, pop;

  sync_fifo #(.W(DW), .AW(BUF_AW)) u_buf (
    .clk, .rst_n,
    .w_valid(rd_valid), .w_ready(fifo_w_ready), .w_data(rd_data),
    .r_valid(st_valid), .r_ready(st_ready), .r_data(st_data),
    .count
  );
  assign rd_ready = fifo_w_ready;
  assign pop      = st_valid && st_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reserved <= '0;
    end else begin
      reserved <= reserved + ((req_valid && req_ready) ? cmd_words : '0) - (LEN_W+1)'(pop);
    end
  end

  assign idle = (reserved == '0);

  a_cmd_len: assert property (@(posedge clk) disable iff (!rst_n)
      cmd_valid |-> (cmd_words != 0 && cmd_words <= (LEN_W+1)'(DEPTH) && cmd_len[$clog2(BPW)-1:0] == '0))
    else $error("stream_buffer_s2m: command length %0d does not fit the buffer", cmd_len);

endmodule
