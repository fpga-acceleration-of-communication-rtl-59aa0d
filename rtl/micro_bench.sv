// micro_bench: bandwidth micro-benchmark core for one memory.
//
// An IMORC master that measures what a memory behind its link delivers. It is
// made of a request generator, a data source and a data sink. After a start
// pulse it moves cfg.total bytes from (read) or to (write) the memory at
// cfg.base, in requests of cfg.req_bytes (the last one shorter if needed).
// Requests go out one at a time. For each one the core counts the clock cycles
// from the request handshake to the handshake of its last data word. It
// reports that count on res_valid/res_cycles (one pulse per request) and keeps
// the last, smallest, largest and summed counts in stat.
//   * data source (writes): every 64-bit lane of a word holds its own byte
//     address, so the memory contents can be checked afterwards;
//   * data sink (reads): accepts every word at once (rd_ready is held high
//     during a read) and folds the data into a 64-bit XOR checksum.
// stat.total_cycles counts from start to done; done waits, after the last
// data word, until the link reports that it has handed every request and
// write word to the memory side (link_drained), so a write test includes the
// time to empty the link's buffers. A start while busy is ignored.
// cfg.req_bytes and cfg.total must be non-zero multiples of DW/8.
//
// Following the platform description: the three parts, one link per tested
// memory (64 bit to the host interface, 256 bit to the memory controller),
// the configuration (test type, total size, request size) and the per-request
// cycle count. One request in flight, the data pattern, the checksum and the
// statistics set are this design's choices.
module micro_bench
  import imorc_pkg::*;
#(
  parameter int unsigned DW = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  bench_cfg_t        cfg,
  output bench_stat_t       stat,
  output logic              res_valid,
  output logic [31:0]       res_cycles,
  // IMORC master link
  output logic              req_valid,
  input  logic              req_ready,
  output imorc_req_t        req,
  output logic              wd_valid,
  input  logic              wd_ready,
  output logic [DW-1:0]     wd_data,
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [DW-1:0]     rd_data,
  input  logic              link_drained   // the link holds no request or write data
);

  localparam int unsigned BPW   = DW / 8;
  localparam int unsigned LANES = DW / 64;

  typedef enum logic [1:0] {IDLE, REQ, DATA, DRAIN} state_e;
  state_e state;

  bench_cfg_t        c;            // configuration latched at start
  logic [31:0]       remaining;    // bytes not yet requested
  logic [ADDR_W-1:0] addr;         // address of the next request
  logic [ADDR_W-1:0] waddr;        // byte address of the next data word
  logic [LEN_W-1:0]  words_left;   // data words left in the current request
  logic [31:0]       timer;

  logic [LEN_W-1:0]  this_len;
  assign this_len = (remaining < 32'(c.req_bytes)) ? LEN_W'(remaining) : c.req_bytes;

  // request generator
  assign req_valid = (state == REQ);
  assign req.write = c.write;
  assign req.addr  = addr;
  assign req.len   = this_len;

  // data source
  always_comb begin
    for (int l = 0; l < LANES; l++) wd_data[64*l +: 64] = 64'(waddr) + 64'(8 * l);
  end
  assign wd_valid = (state == DATA) && c.write;

  // data sink
  assign rd_ready = (state == DATA) && !c.write;

  logic [63:0] fold;
  always_comb begin
    fold = '0;
    for (int l = 0; l < LANES; l++) fold ^= rd_data[64*l +: 64];
  end

  logic beat, last_beat;
  assign beat      = (state == DATA) && (c.write ? wd_ready : rd_valid);
  assign last_beat = beat && (words_left == LEN_W'(1));

  assign res_valid  = last_beat;
  assign res_cycles = timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      c          <= '0;
      remaining  <= '0;
      addr       <= '0;
      waddr      <= '0;
      words_left <= '0;
      timer      <= '0;
      stat       <= '0;
    end else begin
      if (state != IDLE) stat.total_cycles <= stat.total_cycles + 1'b1;
      timer <= timer + 1'b1;
      unique case (state)
        IDLE: if (start) begin
          c         <= cfg;
          remaining <= cfg.total;
          addr      <= cfg.base;
          waddr     <= cfg.base;
          stat      <= '0;
          stat.busy <= 1'b1;
          stat.min_cycles <= '1;
          state     <= REQ;
        end
        REQ: if (req_ready) begin
          remaining  <= remaining - 32'(this_len);
          addr       <= addr + ADDR_W'(this_len);
          words_left <= LEN_W'(this_len / BPW);
          timer      <= 32'd1;
          state      <= DATA;
        end
        DATA: if (beat) begin
          waddr      <= waddr + ADDR_W'(BPW);
          words_left <= words_left - 1'b1;
          if (!c.write) stat.checksum <= stat.checksum ^ fold;
          if (last_beat) begin
            stat.n_req       <= stat.n_req + 1'b1;
            stat.last_cycles <= timer;
            stat.sum_cycles  <= stat.sum_cycles + timer;
            if (timer < stat.min_cycles) stat.min_cycles <= timer;
            if (timer > stat.max_cycles) stat.max_cycles <= timer;
            if (remaining == '0) begin
              state <= DRAIN;
            end else begin
              state <= REQ;
            end
          end
        end
        // a run ends when the link has delivered everything to the memory side
        DRAIN: if (link_drained) begin
          state     <= IDLE;
          stat.busy <= 1'b0;
          stat.done <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_cfg: assert property (@(posedge clk) disable iff (!rst_n)
      (state == IDLE && start) |-> (cfg.req_bytes != 0 && cfg.total != 0 &&
                                    cfg.req_bytes % BPW == 0 && cfg.total % BPW == 0))
    else $error("micro_bench: sizes must be non-zero multiples of %0d bytes", BPW);

endmodule
