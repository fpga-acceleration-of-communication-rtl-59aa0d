// stream_buffer_m2s: write stream buffer ("M2S" in the accelerator diagram),
// collecting the composer's output stream and writing it to memory.
//
// The composer pushes words into a FIFO of 2**BUF_AW words. The request core
// hands the buffer commands {addr, len} on its REQ port; once the FIFO holds
// all len bytes of the oldest command, the buffer issues one IMORC write
// request on its master link and then sends the len/(DW/8) data words back to
// back. Waiting for the whole block keeps the slave-side arbiter locked only
// while data actually flows. The 128-byte requests and one buffer per stream
// follow the accelerator description; the rest is this design's choice.
// idle is high when the FIFO is empty and no write is in progress.
module stream_buffer_m2s
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
  // stream from the composer
  input  logic              st_valid,
  output logic              st_ready,
  input  logic [DW-1:0]     st_data,
  // IMORC master port
  output logic              req_valid,
  input  logic              req_ready,
  output imorc_req_t        req,
  output logic              wd_valid,
  input  logic              wd_ready,
  output logic [DW-1:0]     wd_data,
  output logic              idle
);

  localparam int unsigned BPW   = DW / 8;
  localparam int unsigned DEPTH = 2**BUF_AW;

  logic [BUF_AW:0] count;
  logic [LEN_W:0]  cmd_words;
  logic            sending;
  logic [LEN_W:0]  left;
  logic            f_valid;

  assign cmd_words = (LEN_W+1)'(cmd_len / BPW);

  sync_fifo #(.W(DW), .AW(BUF_AW)) u_buf (
    .clk, .rst_n,
    .w_valid(st_valid), .w_ready(st_ready), .w_data(st_data),
    .r_valid(f_valid), .r_ready(wd_valid && wd_ready), .r_data(wd_data),
    .count
  );

  assign req_valid = cmd_valid && !sending && ((LEN_W+1)'(count) >= cmd_words);
  assign cmd_ready = req_ready && !sending && ((LEN_W+1)'(count) >= cmd_words);
  assign req.write = 1'b1;
  assign req.addr  = cmd_addr;
  assign req.len   = cmd_len;

  assign wd_valid = sending && f_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      left    <= '0;
    end else begin
      if (req_valid && req_ready) begin
        sending <= 1'b1;
        left    <= cmd_words;
      end else if (wd_valid && wd_ready) begin
        left <= left - 1'b1;
        if (left == (LEN_W+1)'(1)) sending <= 1'b0;
      end
    end
  end

  assign idle = !sending && (count == '0);

  a_cmd_len: assert property (@(posedge clk) disable iff (!rst_n)
      cmd_valid |-> (cmd_words != 0 && cmd_words <= (LEN_W+1)'(DEPTH) && cmd_len[$clog2(BPW)-1:0] == '0))
    else $error("stream_buffer_m2s: command length %0d does not fit the buffer", cmd_len);

endmodule
