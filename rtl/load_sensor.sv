// load_sensor: run-time statistics on how often FIFOs run full or drain empty.
//
// The sensor watches N FIFOs through two flags each, full[i] and empty[i],
// and keeps four counters per FIFO while enable is high:
//   register 4*i + 0   full events   (times the FIFO became full)
//   register 4*i + 1   full cycles   (clock cycles spent full)
//   register 4*i + 2   empty events  (times the FIFO drained empty)
//   register 4*i + 3   empty cycles  (clock cycles spent empty)
// An event is counted on the first enabled cycle of a full (empty) stretch;
// a stretch that began while enable was low counts when enable rises. The
// counters are read through a register port with a combinational read
// (rd_addr -> rd_data) and all cleared by a one-cycle clear pulse; clear wins
// over counting in the same cycle. Counters are CW bits wide and wrap.
//
// That such sensors exist and what they measure (FIFOs running full or
// empty, to find the bottleneck links of an accelerator) follows the IMORC
// infrastructure description; the counter set, the register layout, the
// enable and clear inputs and the widths are this design's choice.
module load_sensor #(
  parameter int unsigned N  = 7,   // monitored FIFOs
  parameter int unsigned CW = 32,  // counter width
  parameter int unsigned RA = 5    // register index width, 2**RA >= 4*N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          clear,
  input  logic [N-1:0]  full,
  input  logic [N-1:0]  empty,
  input  logic [RA-1:0] rd_addr,
  output logic [CW-1:0] rd_data
);

  logic [CW-1:0] cnt [4*N];
  logic [N-1:0]  full_q, empty_q;   // flag seen in the last enabled cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4 * N; i++) cnt[i] <= '0;
      full_q  <= '0;
      empty_q <= '0;
    end else if (clear) begin
      for (int i = 0; i < 4 * N; i++) cnt[i] <= '0;
      full_q  <= '0;
      empty_q <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (enable) begin
          if (full[i] && !full_q[i])   cnt[4*i+0] <= cnt[4*i+0] + 1'b1;
          if (full[i])                 cnt[4*i+1] <= cnt[4*i+1] + 1'b1;
          if (empty[i] && !empty_q[i]) cnt[4*i+2] <= cnt[4*i+2] + 1'b1;
          if (empty[i])                cnt[4*i+3] <= cnt[4*i+3] + 1'b1;
        end
      end
      full_q  <= enable ? full  : '0;
      empty_q <= enable ? empty : '0;
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(rd_addr) < 4 * N) rd_data = cnt[rd_addr];
  end

  initial assert (2**RA >= 4 * N) else $error("load_sensor: RA too small for %0d counters", 4 * N);

endmodule
