// imorc_slave_model: behavioural memory on the slave side of an IMORC link,
// for simulation only. It serves one request at a time: a write takes
// len/(DW/8) data words, a read returns them after LAT cycles. With STALL
// non-zero, req_ready, wd_ready and rd_valid drop at random, about one cycle
// in STALL. Storage is sparse, one DW-bit word per entry (byte address /
// (DW/8)); unwritten words read as their own word index. Not synthesizable.
module imorc_slave_model
  import imorc_pkg::*;
#(
  parameter int unsigned DW    = 64,
  parameter int unsigned LAT   = 5,
  parameter int unsigned STALL = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  imorc_req_t    req,
  input  logic          wd_valid,
  output logic          wd_ready,
  input  logic [DW-1:0] wd_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data
);
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned BPW = DW / 8;

  logic [DW-1:0] mem [longint];
  int unsigned   n_reads = 0, n_writes = 0;

  function automatic logic [DW-1:0] peek(longint idx);
    return mem.exists(idx) ? mem[idx] : DW'(idx);
  endfunction

  logic   busy_q = 1'b0, wr_q = 1'b0;
  longint idx_q = 0;
  int     left_q = 0, wait_q = 0;
  logic   stall;

  always @(negedge clk) stall = (STALL != 0) && ($urandom % STALL == 0);

  assign req_ready = rst_n && !busy_q && !stall;
  assign wd_ready  = busy_q && wr_q && !stall;
  assign rd_valid  = busy_q && !wr_q && wait_q == 0 && !stall;
  assign rd_data   = peek(idx_q);

  always @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
    end else if (!busy_q) begin
      if (req_valid && req_ready) begin
        busy_q <= 1'b1;
        wr_q   <= req.write;
        idx_q  <= longint'(req.addr) / BPW;
        left_q <= int'(req.len) / BPW;
        wait_q <= LAT;
        if (req.write) n_writes++; else n_reads++;
      end
    end else if (wr_q) begin
      if (wd_valid && wd_ready) begin
        mem[idx_q] = wd_data;
        idx_q  <= idx_q + 1;
        left_q <= left_q - 1;
        if (left_q == 1) busy_q <= 1'b0;
      end
    end else begin
      if (wait_q > 0) wait_q <= wait_q - 1;
      else if (rd_valid && rd_ready) begin
        idx_q  <= idx_q + 1;
        left_q <= left_q - 1;
        if (left_q == 1) busy_q <= 1'b0;
      end
    end
  end
endmodule
