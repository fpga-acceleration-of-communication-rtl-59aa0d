// request_core: address generator of the compositing accelerator.
//
// For one compositing pass it cuts every buffer involved into REQ_BYTES-byte
// requests (128 bytes in the accelerator, matching the 8-cycle bursts of the
// external memory) and hands them to the seven stream buffers through their
// REQ ports. The frame layout follows the reference compositing routine: a
// frame is its colour buffer of SIZE 32-bit pixels directly followed by its
// depth buffer, so depth starts at base + 4*SIZE. Stream numbering:
//   0 Z0  read  stored depth   (external memory, mem_base)
//   1 F0  read  stored colour  (external memory, mem_base)
//   2 Z1  read  new depth      (host memory, host_base)
//   3 F1  read  new colour     (host memory, host_base)
//   4 ZC  write composed depth (external memory, mem_base)
//   5 FC  write composed colour(external memory, mem_base)
//   6 FH  write final colour   (host memory, out_base)
// Streams 0/1 are skipped in a load pass, 4/5 run when mode.write_mem and 6
// when mode.write_host. Each stream has its own offset counter and issues
// independently, one request per cycle when its buffer accepts; the last
// request of a buffer carries the remainder. busy is high from start until
// every request of the pass has been handed over. The per-stream counters are
// this design's reading of "issues read/write requests to the stream buffers".
module request_core
  import imorc_pkg::*;
#(
  parameter int unsigned NS        = 7,
  parameter int unsigned REQ_BYTES = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  pass_mode_t        mode,
  input  logic [31:0]       size,        // pixels per buffer
  input  logic [ADDR_W-1:0] mem_base,    // stored image in external memory
  input  logic [ADDR_W-1:0] host_base,   // new frame in host memory
  input  logic [ADDR_W-1:0] out_base,    // final colour buffer in host memory
  output logic              busy,
  output logic [NS-1:0]     cmd_valid,
  input  logic [NS-1:0]     cmd_ready,
  output logic [ADDR_W-1:0] cmd_addr [NS],
  output logic [LEN_W-1:0]  cmd_len  [NS]
);

  typedef enum logic [2:0] {S_Z0, S_F0, S_Z1, S_F1, S_ZC, S_FC, S_FH} stream_e;

  logic [NS-1:0]     en;
  logic [ADDR_W-1:0] base  [NS];
  logic [ADDR_W-1:0] off   [NS];
  logic [ADDR_W-1:0] bytes;          // bytes per buffer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en    <= '0;
      bytes <= '0;
      for (int s = 0; s < NS; s++) begin
        base[s] <= '0;
        off[s]  <= '0;
      end
    end else if (start && !busy) begin
      bytes <= ADDR_W'(size) << 2;
      en[S_Z0] <= !mode.load;
      en[S_F0] <= !mode.load;
      en[S_Z1] <= 1'b1;
      en[S_F1] <= 1'b1;
      en[S_ZC] <= mode.write_mem;
      en[S_FC] <= mode.write_mem;
      en[S_FH] <= mode.write_host;
      base[S_Z0] <= mem_base  + (ADDR_W'(size) << 2);
      base[S_F0] <= mem_base;
      base[S_Z1] <= host_base + (ADDR_W'(size) << 2);
      base[S_F1] <= host_base;
      base[S_ZC] <= mem_base  + (ADDR_W'(size) << 2);
      base[S_FC] <= mem_base;
      base[S_FH] <= out_base;
      for (int s = 0; s < NS; s++) off[s] <= '0;
    end else begin
      for (int s = 0; s < NS; s++)
        if (cmd_valid[s] && cmd_ready[s]) begin
          off[s] <= off[s] + ADDR_W'(cmd_len[s]);
          if (off[s] + ADDR_W'(cmd_len[s]) >= bytes) en[s] <= 1'b0;
        end
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      cmd_valid[s] = en[s];
      cmd_addr[s]  = base[s] + off[s];
      cmd_len[s]   = (bytes - off[s] >= ADDR_W'(REQ_BYTES)) ? LEN_W'(REQ_BYTES)
                                                            : LEN_W'(bytes - off[s]);
    end
  end

  assign busy = |en;

endmodule
