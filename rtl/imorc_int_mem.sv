// imorc_int_mem: IMORC slave interface to on-chip memory.
//
// Gives cores the same request/data interface for on-chip block RAM that
// ddr_ctrl gives for the external memory: a request {write, addr, len} moves
// len bytes, as len/(DW/8) whole DW-bit words, from or to a RAM of 2**AW words.
// Requests are served one at a time:
//   * write: wd_ready is high while the request's words arrive, one per
//     cycle, each written at once;
//   * read: the RAM is read synchronously into an output register, one word
//     per cycle while the master takes them (rd_valid/rd_ready), the first
//     word one cycle after the request is accepted.
// Addresses wrap at the RAM size. Because requests always cover whole words,
// no byte enables are used.
//
// Following the platform description: an on-chip memory port functionally
// equal to the external-memory port, and the 1 MB capacity of the on-chip
// memory (2**15 words of 256 bits). The word width, the one-request-at-a-time
// service and the output register are this design's choices.
module imorc_int_mem
  import imorc_pkg::*;
#(
  parameter int unsigned DW = 256,
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_req_valid,
  output logic          s_req_ready,
  input  imorc_req_t    s_req,
  input  logic          s_wd_valid,
  output logic          s_wd_ready,
  input  logic [DW-1:0] s_wd_data,
  output logic          s_rd_valid,
  input  logic          s_rd_ready,
  output logic [DW-1:0] s_rd_data
);

  localparam int unsigned BPW = DW / 8;
  localparam int unsigned OB  = $clog2(BPW);

  logic [DW-1:0] ram [2**AW];

  typedef enum logic [1:0] {IDLE, WRITE, READ} state_e;
  state_e state;

  logic [AW-1:0]    ptr;
  logic [LEN_W-1:0] left;       // words still to write, or still to read from the RAM

  assign s_req_ready = (state == IDLE);
  assign s_wd_ready  = (state == WRITE);

  logic load;                   // read the next word into the output register
  assign load = (state == READ) && (left != '0) && (!s_rd_valid || s_rd_ready);

  always_ff @(posedge clk) begin
    if (state == WRITE && s_wd_valid) ram[ptr] <= s_wd_data;
    if (load) s_rd_data <= ram[ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      ptr        <= '0;
      left       <= '0;
      s_rd_valid <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (s_req_valid) begin
          ptr   <= s_req.addr[OB +: AW];
          left  <= LEN_W'(s_req.len >> OB);
          state <= s_req.write ? WRITE : READ;
        end
        WRITE: if (s_wd_valid) begin
          ptr  <= ptr + 1'b1;
          left <= left - 1'b1;
          if (left == LEN_W'(1)) state <= IDLE;
        end
        READ: begin
          if (load) begin
            ptr        <= ptr + 1'b1;
            left       <= left - 1'b1;
            s_rd_valid <= 1'b1;
          end else if (s_rd_ready) begin
            s_rd_valid <= 1'b0;
          end
          if (left == '0 && (!s_rd_valid || s_rd_ready)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!rst_n)
      (s_req_valid && s_req_ready) |-> (s_req.len != 0 && s_req.len[OB-1:0] == '0 && s_req.addr[OB-1:0] == '0))
    else $error("imorc_int_mem: request must cover whole %0d-byte words", BPW);

endmodule
