// imorc_async_fifo: dual-clock FIFO, the buffer inside every IMORC link.
//
// IMORC links buffer requests and data in asynchronous FIFOs so that each core
// runs at full speed in its own clock domain; that much is the architecture's.
// The construction is the usual one and this design's choice: a register
// array of 2**AW words, binary read/write pointers one bit wider than the
// address, exchanged between the domains as Gray code through two-flop
// synchronisers.
//
// Write side (w_clk): w_valid/w_ready/w_data; w_ready is low while full.
// w_empty is high when the write side sees the FIFO drained (it lags the read
// side by the synchroniser delay, so it is never early).
// Read side (r_clk): r_valid/r_ready/r_data, first-word fall-through: r_data
// shows the head word whenever r_valid is high. A written word becomes visible
// to the reader three r_clk edges after it was written.
// Resets are active low, one per domain; both must be applied together.
module imorc_async_fifo #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 4
) (
  input  logic         w_clk,
  input  logic         w_rst_n,
  input  logic         w_valid,
  output logic         w_ready,
  input  logic [W-1:0] w_data,
  output logic         w_empty,

  input  logic         r_clk,
  input  logic         r_rst_n,
  output logic         r_valid,
  input  logic         r_ready,
  output logic [W-1:0] r_data
);

  logic [W-1:0] mem [2**AW];

  logic [AW:0] wptr, wptr_gray, rptr, rptr_gray;
  logic [AW:0] rptr_gray_s1, rptr_gray_s2;   // read pointer in write domain
  logic [AW:0] wptr_gray_s1, wptr_gray_s2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  logic w_fire, r_fire;
  assign w_fire = w_valid && w_ready;
  assign r_fire = r_valid && r_ready;

  // ---------------- write domain ----------------
  logic [AW:0] wptr_next;
  assign wptr_next = wptr + 1'b1;

  always_ff @(posedge w_clk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      wptr         <= '0;
      wptr_gray    <= '0;
      rptr_gray_s1 <= '0;
      rptr_gray_s2 <= '0;
    end else begin
      rptr_gray_s1 <= rptr_gray;
      rptr_gray_s2 <= rptr_gray_s1;
      if (w_fire) begin
        wptr      <= wptr_next;
        wptr_gray <= bin2gray(wptr_next);
      end
    end
  end

  always_ff @(posedge w_clk) begin
    if (w_fire) mem[wptr[AW-1:0]] <= w_data;
  end

  // Full: the Gray codes differ in exactly the two top bits.
  assign w_ready = (wptr_gray != {~rptr_gray_s2[AW:AW-1], rptr_gray_s2[AW-2:0]});
  assign w_empty = (wptr_gray == rptr_gray_s2);

  // ---------------- read domain ----------------
  logic [AW:0] rptr_next;
  assign rptr_next = rptr + 1'b1;

  always_ff @(posedge r_clk or negedge r_rst_n) begin
    if (!r_rst_n) begin
      rptr         <= '0;
      rptr_gray    <= '0;
      wptr_gray_s1 <= '0;
      wptr_gray_s2 <= '0;
    end else begin
      wptr_gray_s1 <= wptr_gray;
      wptr_gray_s2 <= wptr_gray_s1;
      if (r_fire) begin
        rptr      <= rptr_next;
        rptr_gray <= bin2gray(rptr_next);
      end
    end
  end

  assign r_valid = (rptr_gray != wptr_gray_s2);
  assign r_data  = mem[rptr[AW-1:0]];

endmodule
