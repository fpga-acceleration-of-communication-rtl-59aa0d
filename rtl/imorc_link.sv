// imorc_link: point-to-point IMORC link between a master port and a slave port.
//
// As in the IMORC architecture template, the link buffers requests and data in
// asynchronous FIFOs, so master and slave may run on unrelated clocks, and it
// inserts bitwidth conversion so each side uses its own data width (MW at the
// master, SW at the slave). The channel set, the FIFO depths and where the
// converters sit are this design's choices:
//   request     m_req_*  -> FIFO -> s_req_*
//   write data  m_wd_*   -> converter MW->SW (m_clk) -> FIFO -> s_wd_*
//   read data   s_rd_*   -> FIFO -> converter SW->MW (m_clk) -> m_rd_*
// m_drained (master clock) is high when the request and write-data paths hold
// nothing, i.e. every request and write word the master issued has been taken
// by the slave. Crossing adds three to four destination-clock cycles of latency.
module imorc_link
  import imorc_pkg::*;
#(
  parameter int unsigned MW      = 64,
  parameter int unsigned SW      = 256,
  parameter int unsigned REQ_AW  = 2,   // request FIFO: 4 entries
  parameter int unsigned DATA_AW = 4    // data FIFOs: 16 words of SW bits
) (
  // master side
  input  logic          m_clk,
  input  logic          m_rst_n,
  input  logic          m_req_valid,
  output logic          m_req_ready,
  input  imorc_req_t    m_req,
  input  logic          m_wd_valid,
  output logic          m_wd_ready,
  input  logic [MW-1:0] m_wd_data,
  output logic          m_rd_valid,
  input  logic          m_rd_ready,
  output logic [MW-1:0] m_rd_data,
  output logic          m_drained,
  // slave side
  input  logic          s_clk,
  input  logic          s_rst_n,
  output logic          s_req_valid,
  input  logic          s_req_ready,
  output imorc_req_t    s_req,
  output logic          s_wd_valid,
  input  logic          s_wd_ready,
  output logic [SW-1:0] s_wd_data,
  input  logic          s_rd_valid,
  output logic          s_rd_ready,
  input  logic [SW-1:0] s_rd_data
);

  logic req_empty_m, wd_empty_m, rd_empty_s_unused;

  imorc_async_fifo #(.W(REQ_W), .AW(REQ_AW)) u_req_fifo (
    .w_clk(m_clk), .w_rst_n(m_rst_n),
    .w_valid(m_req_valid), .w_ready(m_req_ready), .w_data(m_req), .w_empty(req_empty_m),
    .r_clk(s_clk), .r_rst_n(s_rst_n),
    .r_valid(s_req_valid), .r_ready(s_req_ready), .r_data(s_req)
  );

  // write data: convert in the master domain, then cross
  logic          wc_valid, wc_ready;
  logic [SW-1:0] wc_data;

  imorc_width_conv #(.IN_W(MW), .OUT_W(SW)) u_wd_conv (
    .clk(m_clk), .rst_n(m_rst_n),
    .in_valid(m_wd_valid), .in_ready(m_wd_ready), .in_data(m_wd_data),
    .out_valid(wc_valid), .out_ready(wc_ready), .out_data(wc_data)
  );

  imorc_async_fifo #(.W(SW), .AW(DATA_AW)) u_wd_fifo (
    .w_clk(m_clk), .w_rst_n(m_rst_n),
    .w_valid(wc_valid), .w_ready(wc_ready), .w_data(wc_data), .w_empty(wd_empty_m),
    .r_clk(s_clk), .r_rst_n(s_rst_n),
    .r_valid(s_wd_valid), .r_ready(s_wd_ready), .r_data(s_wd_data)
  );

  // read data: cross, then convert in the master domain
  logic          rc_valid, rc_ready;
  logic [SW-1:0] rc_data;

  imorc_async_fifo #(.W(SW), .AW(DATA_AW)) u_rd_fifo (
    .w_clk(s_clk), .w_rst_n(s_rst_n),
    .w_valid(s_rd_valid), .w_ready(s_rd_ready), .w_data(s_rd_data), .w_empty(rd_empty_s_unused),
    .r_clk(m_clk), .r_rst_n(m_rst_n),
    .r_valid(rc_valid), .r_ready(rc_ready), .r_data(rc_data)
  );

  imorc_width_conv #(.IN_W(SW), .OUT_W(MW)) u_rd_conv (
    .clk(m_clk), .rst_n(m_rst_n),
    .in_valid(rc_valid), .in_ready(rc_ready), .in_data(rc_data),
    .out_valid(m_rd_valid), .out_ready(m_rd_ready), .out_data(m_rd_data)
  );

  assign m_drained = req_empty_m && wd_empty_m && !wc_valid;

endmodule
