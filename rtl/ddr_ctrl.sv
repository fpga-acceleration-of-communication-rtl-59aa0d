// ddr_ctrl: IMORC slave wrapper around the DDR SDRAM controller.
//
// The external memory of the accelerator module is 128 bits wide and is
// written only in whole bursts of BURST cycles (2, 4 or 8; the accelerator
// uses 8, i.e. 128-byte bursts), and the board has no data-mask pins. This
// core accepts IMORC requests of any length and alignment in whole LW-bit link
// words and turns them into burst commands for the memory controller:
//   * a read fetches every burst the request touches and passes on only the
//     link words inside the request;
//   * a write that covers a whole burst is written directly;
//   * a write that covers only part of a burst becomes a read-modify-write:
//     the burst is read, the new words are merged in, and the burst is
//     written back (rmw_count counts these).
// That behaviour is the platform's. Its insides are this design's: a burst
// buffer of BURST*MW bits and a state machine handling one burst at a time
// (no overlap between bursts), and the controller-side signalling, a
// command channel (mem_cmd_*, address in bursts) with write data (mem_wd_*,
// BURST words after each write command) and returned read data (mem_rd_*,
// BURST words per read, in order). Error correction on the read-modify-write
// path is left to the memory controller.
module ddr_ctrl
  import imorc_pkg::*;
#(
  parameter int unsigned LW    = 256,  // IMORC link width
  parameter int unsigned MW    = 128,  // memory data width
  parameter int unsigned BURST = 8,    // memory cycles per burst
  parameter int unsigned BA_W  = 25    // burst address width: 4 GiB / 128 B
) (
  input  logic              clk,
  input  logic              rst_n,
  // IMORC slave port
  input  logic              s_req_valid,
  output logic              s_req_ready,
  input  imorc_req_t        s_req,
  input  logic              s_wd_valid,
  output logic              s_wd_ready,
  input  logic [LW-1:0]     s_wd_data,
  output logic              s_rd_valid,
  input  logic              s_rd_ready,
  output logic [LW-1:0]     s_rd_data,
  // memory controller local side
  output logic              mem_cmd_valid,
  input  logic              mem_cmd_ready,
  output logic              mem_cmd_write,
  output logic [BA_W-1:0]   mem_cmd_addr,
  output logic              mem_wd_valid,
  input  logic              mem_wd_ready,
  output logic [MW-1:0]     mem_wd_data,
  input  logic              mem_rd_valid,
  input  logic [MW-1:0]     mem_rd_data,
  output logic [31:0]       rmw_count
);

  localparam int unsigned BB   = BURST * MW / 8;     // bytes per burst
  localparam int unsigned LWB  = LW / 8;             // bytes per link word
  localparam int unsigned R    = LW / MW;            // memory words per link word
  localparam int unsigned NLW  = BB / LWB;           // link words per burst
  localparam int unsigned BSH  = $clog2(BB);
  localparam int unsigned LSH  = $clog2(LWB);
  localparam int unsigned BCW  = $clog2(BURST) + 1;
  localparam int unsigned JW   = (NLW > 1) ? $clog2(NLW) + 1 : 1;

  typedef enum logic [2:0] {IDLE, START, RD_CMD, RD_DATA, OUT, FILL, WR_CMD, WR_DATA} state_e;
  state_e state;

  logic              wr;
  logic [ADDR_W-1:0] req_end;      // one past the last byte
  logic [ADDR_W-1:0] cur;          // burst start
  logic [ADDR_W-1:0] lo;           // first byte of the request inside this burst
  logic [JW-1:0]     j, j_end;     // link-word index inside the burst
  logic [BCW-1:0]    beat;
  logic [LW-1:0]     buf_q [NLW];  // one burst

  // request window inside the current burst, in link words
  logic [ADDR_W-1:0] hi_byte, lo_byte;
  always_comb begin
    lo_byte = (lo > cur) ? lo : cur;
    hi_byte = (req_end < cur + ADDR_W'(BB)) ? req_end : cur + ADDR_W'(BB);
  end

  logic full_cover;
  assign full_cover = (lo_byte == cur) && (hi_byte == cur + ADDR_W'(BB));

  assign s_req_ready   = (state == IDLE);
  assign mem_cmd_valid = (state == RD_CMD) || (state == WR_CMD);
  assign mem_cmd_write = (state == WR_CMD);
  assign mem_cmd_addr  = BA_W'(cur >> BSH);

  assign mem_wd_valid = (state == WR_DATA);
  assign mem_wd_data  = buf_q[beat / BCW'(R)][(beat % BCW'(R)) * MW +: MW];

  assign s_rd_valid = (state == OUT);
  assign s_rd_data  = buf_q[j[JW-1:0]];
  assign s_wd_ready = (state == FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; wr <= 1'b0; req_end <= '0; cur <= '0; lo <= '0;
      j <= '0; j_end <= '0; beat <= '0; rmw_count <= '0;
      for (int k = 0; k < NLW; k++) buf_q[k] <= '0;
    end else begin
      unique case (state)
        IDLE: if (s_req_valid) begin
          wr      <= s_req.write;
          lo      <= s_req.addr;
          req_end <= s_req.addr + ADDR_W'(s_req.len);
          cur     <= (s_req.addr >> BSH) << BSH;
          state   <= START;
        end
        START: begin
          j     <= JW'((lo_byte - cur) >> LSH);
          j_end <= JW'((hi_byte - cur) >> LSH);
          beat  <= '0;
          if (wr && full_cover) state <= FILL;
          else                  state <= RD_CMD;
        end
        RD_CMD: if (mem_cmd_ready) state <= RD_DATA;
        RD_DATA: if (mem_rd_valid) begin
          buf_q[beat / BCW'(R)][(beat % BCW'(R)) * MW +: MW] <= mem_rd_data;
          beat <= beat + 1'b1;
          if (beat == BCW'(BURST - 1)) begin
            beat <= '0;
            if (wr) begin
              state     <= FILL;
              rmw_count <= rmw_count + 1;
            end else begin
              state <= OUT;
            end
          end
        end
        OUT: if (s_rd_ready) begin
          j <= j + 1'b1;
          if (j + 1'b1 == j_end) begin
            cur   <= cur + ADDR_W'(BB);
            state <= (cur + ADDR_W'(BB) >= req_end) ? IDLE : START;
          end
        end
        FILL: if (s_wd_valid) begin
          buf_q[j[JW-1:0]] <= s_wd_data;
          j <= j + 1'b1;
          if (j + 1'b1 == j_end) state <= WR_CMD;
        end
        WR_CMD: if (mem_cmd_ready) state <= WR_DATA;
        WR_DATA: if (mem_wd_ready) begin
          beat <= beat + 1'b1;
          if (beat == BCW'(BURST - 1)) begin
            cur   <= cur + ADDR_W'(BB);
            state <= (cur + ADDR_W'(BB) >= req_end) ? IDLE : START;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_whole_words: assert property (@(posedge clk) disable iff (!rst_n)
      (s_req_valid && s_req_ready) |-> (s_req.len != 0 && s_req.len[LSH-1:0] == '0 && s_req.addr[LSH-1:0] == '0))
    else $error("ddr_ctrl: request must cover whole %0d-byte link words", LWB);

endmodule
