// host_mem_model: behavioural model of the HyperTransport cave's packet side
// and of host memory, for simulation only. It answers the packet commands of
// host_if one at a time: a write packet takes bytes/8 data words, a read
// packet returns bytes/8 words after LAT cycles. When STALL is non-zero the
// command and write-data ready signals drop at random, about one cycle in
// STALL, to exercise back-pressure. Storage is sparse, one 64-bit word per
// entry indexed by byte address / 8. Not synthesizable.
module host_mem_model #(
  parameter int unsigned AW    = 40,
  parameter int unsigned LAT   = 10,
  parameter int unsigned STALL = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_write,
  input  logic [AW-1:0] cmd_addr,
  input  logic [6:0]    cmd_bytes,
  input  logic          wd_valid,
  output logic          wd_ready,
  input  logic [63:0]   wd_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [63:0]   rd_data
);

  logic [63:0] mem [longint];
  int unsigned n_packets, max_bytes, n_stall_cycles;

  typedef enum logic [1:0] {IDLE, WR, RD_WAIT, RD} state_e;
  state_e      state;
  longint      base;
  int unsigned words, beat, wait_cnt;
  logic        stall;

  function automatic logic [63:0] peek(longint word_addr);
    if (mem.exists(word_addr)) return mem[word_addr];
    return 64'hbad0_0000_0000_0000 | 64'(word_addr);
  endfunction

  always_ff @(posedge clk) stall <= (STALL != 0) && ($urandom_range(STALL - 1) == 0);

  assign cmd_ready = (state == IDLE) && !stall;
  assign wd_ready  = (state == WR) && !stall;
  assign rd_valid  = (state == RD);
  assign rd_data   = peek(base + longint'(beat));

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; base <= 0; words <= 0; beat <= 0; wait_cnt <= 0;
      n_packets <= 0; max_bytes <= 0; n_stall_cycles <= 0;
    end else begin
      if (stall && (cmd_valid || wd_valid)) n_stall_cycles <= n_stall_cycles + 1;
      case (state)
        IDLE: if (cmd_valid && cmd_ready) begin
          base  <= longint'(cmd_addr) >> 3;
          words <= int'(cmd_bytes) / 8;
          beat  <= 0;
          n_packets <= n_packets + 1;
          if (int'(cmd_bytes) > max_bytes) max_bytes <= int'(cmd_bytes);
          if (cmd_write) state <= WR;
          else begin
            state    <= RD_WAIT;
            wait_cnt <= LAT;
          end
        end
        WR: if (wd_valid && wd_ready) begin
          mem[base + longint'(beat)] = wd_data;
          beat <= beat + 1;
          if (beat + 1 == words) state <= IDLE;
        end
        RD_WAIT: begin
          if (wait_cnt <= 1) state <= RD;
          wait_cnt <= wait_cnt - 1;
        end
        RD: if (rd_ready) begin
          beat <= beat + 1;
          if (beat + 1 == words) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
