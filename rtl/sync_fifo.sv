// sync_fifo: single-clock first-word-fall-through FIFO used as the data store
// of the stream buffers. 2**AW words of W bits; count gives the fill level.
// w_ready is low when full, r_valid high when not empty; r_data shows the head
// word combinationally. A word written in one cycle can be read in the next.
module sync_fifo #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         w_valid,
  output logic         w_ready,
  input  logic [W-1:0] w_data,
  output logic         r_valid,
  input  logic         r_ready,
  output logic [W-1:0] r_data,
  output logic [AW:0]  count
);

  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wp, rp;

  assign count   = wp - rp;
  assign w_ready = (count != (AW+1)'(2**AW));
  assign r_valid = (count != '0);
  assign r_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (w_valid && w_ready) mem[wp[AW-1:0]] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (w_valid && w_ready) wp <= wp + 1'b1;
      if (r_valid && r_ready) rp <= rp + 1'b1;
    end
  end

endmodule
