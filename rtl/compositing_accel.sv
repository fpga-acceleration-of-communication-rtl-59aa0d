// compositing_accel: FPGA accelerator for z-buffer compositing (sort-last
// parallel rendering), built from IMORC cores.
//
// The master node of a parallel renderer receives, per displayed frame, one
// colour buffer and one depth buffer from each of its rendering nodes and must
// keep, per pixel, the colour of the nearest fragment. The accelerator streams
// the frames from host memory over HyperTransport, keeps the running result in
// the external DDR memory of the FPGA module, and writes the final colour
// image back to host memory:
//   pass 0      frame 0: host -> external memory (load);
//   pass k      frame k from the host and the stored image from external
//               memory through the composer, result back to external memory;
//   last pass   as pass k, but only the colour goes back, to the host.
// Both memories stream at the same time, and the HyperTransport link is the
// bottleneck; the composer therefore handles two pixels per cycle on 64-bit
// links, which is enough to keep that link busy.
//
// Structure (as in the accelerator's block diagram):
//   host_if     HyperTransport interface: master link 0 to the registers,
//               master link 1 brought out (bulk CPU writes, unused here),
//               slave link shared by three stream buffers via an arbiter
//               (plus a fourth port for the host benchmark core);
//   ddr_ctrl    external-memory wrapper, shared by four stream buffers via an
//               arbiter, 256-bit link, 8-cycle bursts of 128 bits (plus a
//               fifth port for the external-memory benchmark core);
//   7 stream buffers: Z0/F0 read external memory, Z1/F1 read host memory,
//               ZC/FC write external memory, FH writes host memory;
//   request_core, compositing_controller (+ imorc_reg_if), composer;
//   load_sensor on the stream buffers, read through the same registers;
//   three bandwidth micro-benchmark cores (host, external and on-chip memory)
//   with the on-chip memory interface, controlled through their own ports.
// Every connection between cores is an imorc_link (asynchronous FIFOs plus
// width conversion). clk is the HyperTransport/core clock (200 MHz in the
// accelerator; the composer runs synchronously to the HT core); mem_clk is the
// memory controller's clock. Each domain has its own active-low reset; apply
// both together.
module compositing_accel
  import imorc_pkg::*;
#(
  parameter int unsigned REQ_BYTES = 128,  // stream-buffer request size
  parameter int unsigned BURST     = 8,    // memory burst length in cycles
  parameter int unsigned SB_AW     = 6,    // stream buffer depth: 64 x 64 bit
  parameter int unsigned PT_AW     = 15,   // page table: 32768 x 4 KiB pages
  parameter int unsigned IM_AW     = 15    // on-chip memory: 32768 x 256 bit = 1 MB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_clk,
  input  logic              mem_rst_n,
  // HT cave: CPU accesses
  input  logic              cpu_valid,
  output logic              cpu_ready,
  input  logic              cpu_write,
  input  logic [1:0]        cpu_region,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [63:0]       cpu_wdata,
  output logic              cpu_rsp_valid,
  output logic [63:0]       cpu_rsp_data,
  // HT cave: packets to host memory
  output logic              ht_cmd_valid,
  input  logic              ht_cmd_ready,
  output logic              ht_cmd_write,
  output logic [ADDR_W-1:0] ht_cmd_addr,
  output logic [6:0]        ht_cmd_bytes,
  output logic              ht_wd_valid,
  input  logic              ht_wd_ready,
  output logic [63:0]       ht_wd_data,
  input  logic              ht_rd_valid,
  output logic              ht_rd_ready,
  input  logic [63:0]       ht_rd_data,
  // host_if master link 1 (bulk CPU data), not used by the compositor
  output logic              bulk_req_valid,
  input  logic              bulk_req_ready,
  output imorc_req_t        bulk_req,
  output logic              bulk_wd_valid,
  input  logic              bulk_wd_ready,
  output logic [63:0]       bulk_wd_data,
  input  logic              bulk_rd_valid,
  output logic              bulk_rd_ready,
  input  logic [63:0]       bulk_rd_data,
  // DDR SDRAM controller local side (mem_clk)
  output logic              mem_cmd_valid,
  input  logic              mem_cmd_ready,
  output logic              mem_cmd_write,
  output logic [24:0]       mem_cmd_addr,
  output logic              mem_wd_valid,
  input  logic              mem_wd_ready,
  output logic [127:0]      mem_wd_data,
  input  logic              mem_rd_valid,
  input  logic [127:0]      mem_rd_data,
  // status
  output logic              busy,
  output logic              done,
  output logic [31:0]       rmw_count,     // mem_clk domain
  output logic [31:0]       taken_new,     // pixels taken from the new frame, last pass
  // bandwidth micro-benchmark: 0 host memory, 1 external memory, 2 on-chip memory
  input  logic [2:0]        bench_start,
  input  bench_cfg_t        bench_cfg  [3],
  output bench_stat_t       bench_stat [3],
  output logic [2:0]        bench_res_valid,
  output logic [31:0]       bench_res_cycles [3]
);

  localparam int unsigned NS = 7;
  localparam int unsigned DW = 64;
  localparam int unsigned LW = 256;

  // stream indices (as in request_core)
  localparam int unsigned Z0 = 0, F0 = 1, Z1 = 2, F1 = 3, ZC = 4, FC = 5, FH = 6;

  // ================= host interface =================
  logic [1:0]  hm_req_valid, hm_req_ready, hm_wd_valid, hm_wd_ready, hm_rd_valid, hm_rd_ready;
  imorc_req_t  hm_req;
  logic [63:0] hm_wd_data;
  logic [63:0] hm_rd_data [2];

  logic        hs_req_valid, hs_req_ready, hs_wd_valid, hs_wd_ready, hs_rd_valid, hs_rd_ready;
  imorc_req_t  hs_req;
  logic [63:0] hs_wd_data, hs_rd_data;

  host_if #(.PT_AW(PT_AW)) u_host_if (
    .clk, .rst_n,
    .cpu_valid, .cpu_ready, .cpu_write, .cpu_region, .cpu_addr, .cpu_wdata,
    .cpu_rsp_valid, .cpu_rsp_data,
    .ht_cmd_valid, .ht_cmd_ready, .ht_cmd_write, .ht_cmd_addr, .ht_cmd_bytes,
    .ht_wd_valid, .ht_wd_ready, .ht_wd_data, .ht_rd_valid, .ht_rd_ready, .ht_rd_data,
    .m_req_valid(hm_req_valid), .m_req_ready(hm_req_ready), .m_req(hm_req),
    .m_wd_valid(hm_wd_valid), .m_wd_ready(hm_wd_ready), .m_wd_data(hm_wd_data),
    .m_rd_valid(hm_rd_valid), .m_rd_ready(hm_rd_ready), .m_rd_data(hm_rd_data),
    .s_req_valid(hs_req_valid), .s_req_ready(hs_req_ready), .s_req(hs_req),
    .s_wd_valid(hs_wd_valid), .s_wd_ready(hs_wd_ready), .s_wd_data(hs_wd_data),
    .s_rd_valid(hs_rd_valid), .s_rd_ready(hs_rd_ready), .s_rd_data(hs_rd_data)
  );

  // master link 1 leaves the accelerator
  assign bulk_req_valid  = hm_req_valid[1];
  assign hm_req_ready[1] = bulk_req_ready;
  assign bulk_req        = hm_req;
  assign bulk_wd_valid   = hm_wd_valid[1];
  assign hm_wd_ready[1]  = bulk_wd_ready;
  assign bulk_wd_data    = hm_wd_data;
  assign hm_rd_valid[1]  = bulk_rd_valid;
  assign bulk_rd_ready   = hm_rd_ready[1];
  assign hm_rd_data[1]   = bulk_rd_data;

  // ================= register path =================
  logic        rg_req_valid, rg_req_ready, rg_wd_valid, rg_wd_ready, rg_rd_valid, rg_rd_ready;
  imorc_req_t  rg_req;
  logic [63:0] rg_wd_data, rg_rd_data;
  logic        rg_drained_unused;

  imorc_link #(.MW(DW), .SW(DW)) u_link_reg (
    .m_clk(clk), .m_rst_n(rst_n),
    .m_req_valid(hm_req_valid[0]), .m_req_ready(hm_req_ready[0]), .m_req(hm_req),
    .m_wd_valid(hm_wd_valid[0]), .m_wd_ready(hm_wd_ready[0]), .m_wd_data(hm_wd_data),
    .m_rd_valid(hm_rd_valid[0]), .m_rd_ready(hm_rd_ready[0]), .m_rd_data(hm_rd_data[0]),
    .m_drained(rg_drained_unused),
    .s_clk(clk), .s_rst_n(rst_n),
    .s_req_valid(rg_req_valid), .s_req_ready(rg_req_ready), .s_req(rg_req),
    .s_wd_valid(rg_wd_valid), .s_wd_ready(rg_wd_ready), .s_wd_data(rg_wd_data),
    .s_rd_valid(rg_rd_valid), .s_rd_ready(rg_rd_ready), .s_rd_data(rg_rd_data)
  );

  logic        reg_we, reg_re;
  logic [7:0]  reg_addr;
  logic [63:0] reg_wdata, reg_rdata, ctrl_rdata;
  logic [31:0] ls_rdata;

  imorc_reg_if #(.DW(DW), .RA(8)) u_reg_if (
    .clk, .rst_n,
    .s_req_valid(rg_req_valid), .s_req_ready(rg_req_ready), .s_req(rg_req),
    .s_wd_valid(rg_wd_valid), .s_wd_ready(rg_wd_ready), .s_wd_data(rg_wd_data),
    .s_rd_valid(rg_rd_valid), .s_rd_ready(rg_rd_ready), .s_rd_data(rg_rd_data),
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata
  );

  // ================= control =================
  logic              pass_start;
  pass_mode_t        pass_mode;
  logic [31:0]       size, words;
  logic [ADDR_W-1:0] mem_base, host_base, out_base;
  logic              req_busy, comp_busy, wr_drained;

  compositing_controller #(.DW(DW), .RA(8)) u_ctrl (
    .clk, .rst_n,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata(ctrl_rdata),
    .pass_start, .pass_mode, .size, .words, .mem_base, .host_base, .out_base,
    .req_busy, .comp_busy, .wr_drained, .busy, .done
  );

  logic [NS-1:0]     cmd_valid, cmd_ready;
  logic [ADDR_W-1:0] cmd_addr [NS];
  logic [LEN_W-1:0]  cmd_len  [NS];

  request_core #(.NS(NS), .REQ_BYTES(REQ_BYTES)) u_req (
    .clk, .rst_n, .start(pass_start), .mode(pass_mode), .size,
    .mem_base, .host_base, .out_base, .busy(req_busy),
    .cmd_valid, .cmd_ready, .cmd_addr, .cmd_len
  );

  // ================= stream buffers =================
  // per-stream master-side link signals
  logic [NS-1:0]   sb_req_valid, sb_req_ready, sb_wd_valid, sb_wd_ready, sb_rd_valid, sb_rd_ready;
  imorc_req_t      sb_req     [NS];
  logic [DW-1:0]   sb_wd_data [NS];
  logic [DW-1:0]   sb_rd_data [NS];
  logic [NS-1:0]   sb_idle, sb_drained;

  // composer-side streams
  logic [NS-1:0]   st_valid, st_ready;
  logic [DW-1:0]   st_data [NS];

  for (genvar s = 0; s < 4; s++) begin : g_s2m
    stream_buffer_s2m #(.DW(DW), .BUF_AW(SB_AW)) u_sb (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[s]), .cmd_ready(cmd_ready[s]), .cmd_addr(cmd_addr[s]), .cmd_len(cmd_len[s]),
      .req_valid(sb_req_valid[s]), .req_ready(sb_req_ready[s]), .req(sb_req[s]),
      .rd_valid(sb_rd_valid[s]), .rd_ready(sb_rd_ready[s]), .rd_data(sb_rd_data[s]),
      .st_valid(st_valid[s]), .st_ready(st_ready[s]), .st_data(st_data[s]),
      .idle(sb_idle[s])
    );
    assign sb_wd_valid[s] = 1'b0;
    assign sb_wd_data[s]  = '0;
  end

  for (genvar s = 4; s < NS; s++) begin : g_m2s
    stream_buffer_m2s #(.DW(DW), .BUF_AW(SB_AW)) u_sb (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[s]), .cmd_ready(cmd_ready[s]), .cmd_addr(cmd_addr[s]), .cmd_len(cmd_len[s]),
      .st_valid(st_valid[s]), .st_ready(st_ready[s]), .st_data(st_data[s]),
      .req_valid(sb_req_valid[s]), .req_ready(sb_req_ready[s]), .req(sb_req[s]),
      .wd_valid(sb_wd_valid[s]), .wd_ready(sb_wd_ready[s]), .wd_data(sb_wd_data[s]),
      .idle(sb_idle[s])
    );
    assign sb_rd_ready[s] = 1'b1;
  end

  // ================= composer =================
  composer #(.DW(DW)) u_composer (
    .clk, .rst_n, .start(pass_start), .mode(pass_mode), .words, .busy(comp_busy),
    .z0_valid(st_valid[Z0]), .z0_ready(st_ready[Z0]), .z0_data(st_data[Z0]),
    .f0_valid(st_valid[F0]), .f0_ready(st_ready[F0]), .f0_data(st_data[F0]),
    .z1_valid(st_valid[Z1]), .z1_ready(st_ready[Z1]), .z1_data(st_data[Z1]),
    .f1_valid(st_valid[F1]), .f1_ready(st_ready[F1]), .f1_data(st_data[F1]),
    .zc_valid(st_valid[ZC]), .zc_ready(st_ready[ZC]), .zc_data(st_data[ZC]),
    .fc_valid(st_valid[FC]), .fc_ready(st_ready[FC]), .fc_data(st_data[FC]),
    .fh_valid(st_valid[FH]), .fh_ready(st_ready[FH]), .fh_data(st_data[FH]),
    .taken_new
  );

  // ================= links to external memory (Z0, F0, ZC, FC) =================
  localparam int unsigned NM = 5;          // four stream buffers + benchmark
  localparam int unsigned MEM_STREAM [4] = '{Z0, F0, ZC, FC};

  logic [NM-1:0]  ma_req_valid, ma_req_ready, ma_wd_valid, ma_wd_ready, ma_rd_valid, ma_rd_ready;
  imorc_req_t     ma_req     [NM];
  logic [LW-1:0]  ma_wd_data [NM];
  logic [LW-1:0]  ma_rd_data [NM];

  for (genvar i = 0; i < 4; i++) begin : g_mem_link
    localparam int unsigned S = MEM_STREAM[i];
    imorc_link #(.MW(DW), .SW(LW)) u_link (
      .m_clk(clk), .m_rst_n(rst_n),
      .m_req_valid(sb_req_valid[S]), .m_req_ready(sb_req_ready[S]), .m_req(sb_req[S]),
      .m_wd_valid(sb_wd_valid[S]), .m_wd_ready(sb_wd_ready[S]), .m_wd_data(sb_wd_data[S]),
      .m_rd_valid(sb_rd_valid[S]), .m_rd_ready(sb_rd_ready[S]), .m_rd_data(sb_rd_data[S]),
      .m_drained(sb_drained[S]),
      .s_clk(mem_clk), .s_rst_n(mem_rst_n),
      .s_req_valid(ma_req_valid[i]), .s_req_ready(ma_req_ready[i]), .s_req(ma_req[i]),
      .s_wd_valid(ma_wd_valid[i]), .s_wd_ready(ma_wd_ready[i]), .s_wd_data(ma_wd_data[i]),
      .s_rd_valid(ma_rd_valid[i]), .s_rd_ready(ma_rd_ready[i]), .s_rd_data(ma_rd_data[i])
    );
  end

  logic          md_req_valid, md_req_ready, md_wd_valid, md_wd_ready, md_rd_valid, md_rd_ready;
  imorc_req_t    md_req;
  logic [LW-1:0] md_wd_data, md_rd_data;

  imorc_arbiter #(.N(NM), .DW(LW)) u_mem_arb (
    .clk(mem_clk), .rst_n(mem_rst_n),
    .in_req_valid(ma_req_valid), .in_req_ready(ma_req_ready), .in_req(ma_req),
    .in_wd_valid(ma_wd_valid), .in_wd_ready(ma_wd_ready), .in_wd_data(ma_wd_data),
    .in_rd_valid(ma_rd_valid), .in_rd_ready(ma_rd_ready), .in_rd_data(ma_rd_data),
    .out_req_valid(md_req_valid), .out_req_ready(md_req_ready), .out_req(md_req),
    .out_wd_valid(md_wd_valid), .out_wd_ready(md_wd_ready), .out_wd_data(md_wd_data),
    .out_rd_valid(md_rd_valid), .out_rd_ready(md_rd_ready), .out_rd_data(md_rd_data)
  );

  ddr_ctrl #(.LW(LW), .MW(128), .BURST(BURST), .BA_W(25)) u_ddr (
    .clk(mem_clk), .rst_n(mem_rst_n),
    .s_req_valid(md_req_valid), .s_req_ready(md_req_ready), .s_req(md_req),
    .s_wd_valid(md_wd_valid), .s_wd_ready(md_wd_ready), .s_wd_data(md_wd_data),
    .s_rd_valid(md_rd_valid), .s_rd_ready(md_rd_ready), .s_rd_data(md_rd_data),
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_write, .mem_cmd_addr,
    .mem_wd_valid, .mem_wd_ready, .mem_wd_data, .mem_rd_valid, .mem_rd_data,
    .rmw_count
  );

  // ================= links to host memory (Z1, F1, FH) =================
  localparam int unsigned NH = 4;          // three stream buffers + benchmark
  localparam int unsigned HOST_STREAM [3] = '{Z1, F1, FH};

  logic [NH-1:0]  ha_req_valid, ha_req_ready, ha_wd_valid, ha_wd_ready, ha_rd_valid, ha_rd_ready;
  imorc_req_t     ha_req     [NH];
  logic [DW-1:0]  ha_wd_data [NH];
  logic [DW-1:0]  ha_rd_data [NH];

  for (genvar i = 0; i < 3; i++) begin : g_host_link
    localparam int unsigned S = HOST_STREAM[i];
    imorc_link #(.MW(DW), .SW(DW)) u_link (
      .m_clk(clk), .m_rst_n(rst_n),
      .m_req_valid(sb_req_valid[S]), .m_req_ready(sb_req_ready[S]), .m_req(sb_req[S]),
      .m_wd_valid(sb_wd_valid[S]), .m_wd_ready(sb_wd_ready[S]), .m_wd_data(sb_wd_data[S]),
      .m_rd_valid(sb_rd_valid[S]), .m_rd_ready(sb_rd_ready[S]), .m_rd_data(sb_rd_data[S]),
      .m_drained(sb_drained[S]),
      .s_clk(clk), .s_rst_n(rst_n),
      .s_req_valid(ha_req_valid[i]), .s_req_ready(ha_req_ready[i]), .s_req(ha_req[i]),
      .s_wd_valid(ha_wd_valid[i]), .s_wd_ready(ha_wd_ready[i]), .s_wd_data(ha_wd_data[i]),
      .s_rd_valid(ha_rd_valid[i]), .s_rd_ready(ha_rd_ready[i]), .s_rd_data(ha_rd_data[i])
    );
  end

  imorc_arbiter #(.N(NH), .DW(DW)) u_host_arb (
    .clk, .rst_n,
    .in_req_valid(ha_req_valid), .in_req_ready(ha_req_ready), .in_req(ha_req),
    .in_wd_valid(ha_wd_valid), .in_wd_ready(ha_wd_ready), .in_wd_data(ha_wd_data),
    .in_rd_valid(ha_rd_valid), .in_rd_ready(ha_rd_ready), .in_rd_data(ha_rd_data),
    .out_req_valid(hs_req_valid), .out_req_ready(hs_req_ready), .out_req(hs_req),
    .out_wd_valid(hs_wd_valid), .out_wd_ready(hs_wd_ready), .out_wd_data(hs_wd_data),
    .out_rd_valid(hs_rd_valid), .out_rd_ready(hs_rd_ready), .out_rd_data(hs_rd_data)
  );

  // ================= bandwidth micro-benchmark =================
  // One benchmark core per memory, each on its own link: host memory through
  // a fourth port of the host-interface arbiter (64 bit), external memory
  // through a fifth port of the memory arbiter (256 bit, crossing to
  // mem_clk), on-chip memory through a link of its own. The benchmark shares
  // the host interface and the memory controller with the compositor, so the
  // two are meant to run one at a time.
  logic [2:0]    bq_req_valid, bq_req_ready, bq_wd_valid, bq_wd_ready, bq_rd_valid, bq_rd_ready;
  imorc_req_t    bq_req [3];
  logic [DW-1:0] bh_wd_data, bh_rd_data;
  logic [LW-1:0] bm_wd_data, bm_rd_data, bi_wd_data, bi_rd_data;
  logic [2:0]    bq_drained;

  micro_bench #(.DW(DW)) u_bench_host (
    .clk, .rst_n, .start(bench_start[0]), .cfg(bench_cfg[0]), .stat(bench_stat[0]),
    .res_valid(bench_res_valid[0]), .res_cycles(bench_res_cycles[0]),
    .req_valid(bq_req_valid[0]), .req_ready(bq_req_ready[0]), .req(bq_req[0]),
    .wd_valid(bq_wd_valid[0]), .wd_ready(bq_wd_ready[0]), .wd_data(bh_wd_data),
    .rd_valid(bq_rd_valid[0]), .rd_ready(bq_rd_ready[0]), .rd_data(bh_rd_data),
    .link_drained(bq_drained[0])
  );

  imorc_link #(.MW(DW), .SW(DW)) u_link_bench_host (
    .m_clk(clk), .m_rst_n(rst_n),
    .m_req_valid(bq_req_valid[0]), .m_req_ready(bq_req_ready[0]), .m_req(bq_req[0]),
    .m_wd_valid(bq_wd_valid[0]), .m_wd_ready(bq_wd_ready[0]), .m_wd_data(bh_wd_data),
    .m_rd_valid(bq_rd_valid[0]), .m_rd_ready(bq_rd_ready[0]), .m_rd_data(bh_rd_data),
    .m_drained(bq_drained[0]),
    .s_clk(clk), .s_rst_n(rst_n),
    .s_req_valid(ha_req_valid[3]), .s_req_ready(ha_req_ready[3]), .s_req(ha_req[3]),
    .s_wd_valid(ha_wd_valid[3]), .s_wd_ready(ha_wd_ready[3]), .s_wd_data(ha_wd_data[3]),
    .s_rd_valid(ha_rd_valid[3]), .s_rd_ready(ha_rd_ready[3]), .s_rd_data(ha_rd_data[3])
  );

  micro_bench #(.DW(LW)) u_bench_mem (
    .clk, .rst_n, .start(bench_start[1]), .cfg(bench_cfg[1]), .stat(bench_stat[1]),
    .res_valid(bench_res_valid[1]), .res_cycles(bench_res_cycles[1]),
    .req_valid(bq_req_valid[1]), .req_ready(bq_req_ready[1]), .req(bq_req[1]),
    .wd_valid(bq_wd_valid[1]), .wd_ready(bq_wd_ready[1]), .wd_data(bm_wd_data),
    .rd_valid(bq_rd_valid[1]), .rd_ready(bq_rd_ready[1]), .rd_data(bm_rd_data),
    .link_drained(bq_drained[1])
  );

  imorc_link #(.MW(LW), .SW(LW)) u_link_bench_mem (
    .m_clk(clk), .m_rst_n(rst_n),
    .m_req_valid(bq_req_valid[1]), .m_req_ready(bq_req_ready[1]), .m_req(bq_req[1]),
    .m_wd_valid(bq_wd_valid[1]), .m_wd_ready(bq_wd_ready[1]), .m_wd_data(bm_wd_data),
    .m_rd_valid(bq_rd_valid[1]), .m_rd_ready(bq_rd_ready[1]), .m_rd_data(bm_rd_data),
    .m_drained(bq_drained[1]),
    .s_clk(mem_clk), .s_rst_n(mem_rst_n),
    .s_req_valid(ma_req_valid[4]), .s_req_ready(ma_req_ready[4]), .s_req(ma_req[4]),
    .s_wd_valid(ma_wd_valid[4]), .s_wd_ready(ma_wd_ready[4]), .s_wd_data(ma_wd_data[4]),
    .s_rd_valid(ma_rd_valid[4]), .s_rd_ready(ma_rd_ready[4]), .s_rd_data(ma_rd_data[4])
  );

  logic          im_req_valid, im_req_ready, im_wd_valid, im_wd_ready, im_rd_valid, im_rd_ready;
  imorc_req_t    im_req;
  logic [LW-1:0] im_wd_data, im_rd_data;

  micro_bench #(.DW(LW)) u_bench_int (
    .clk, .rst_n, .start(bench_start[2]), .cfg(bench_cfg[2]), .stat(bench_stat[2]),
    .res_valid(bench_res_valid[2]), .res_cycles(bench_res_cycles[2]),
    .req_valid(bq_req_valid[2]), .req_ready(bq_req_ready[2]), .req(bq_req[2]),
    .wd_valid(bq_wd_valid[2]), .wd_ready(bq_wd_ready[2]), .wd_data(bi_wd_data),
    .rd_valid(bq_rd_valid[2]), .rd_ready(bq_rd_ready[2]), .rd_data(bi_rd_data),
    .link_drained(bq_drained[2])
  );

  imorc_link #(.MW(LW), .SW(LW)) u_link_bench_int (
    .m_clk(clk), .m_rst_n(rst_n),
    .m_req_valid(bq_req_valid[2]), .m_req_ready(bq_req_ready[2]), .m_req(bq_req[2]),
    .m_wd_valid(bq_wd_valid[2]), .m_wd_ready(bq_wd_ready[2]), .m_wd_data(bi_wd_data),
    .m_rd_valid(bq_rd_valid[2]), .m_rd_ready(bq_rd_ready[2]), .m_rd_data(bi_rd_data),
    .m_drained(bq_drained[2]),
    .s_clk(clk), .s_rst_n(rst_n),
    .s_req_valid(im_req_valid), .s_req_ready(im_req_ready), .s_req(im_req),
    .s_wd_valid(im_wd_valid), .s_wd_ready(im_wd_ready), .s_wd_data(im_wd_data),
    .s_rd_valid(im_rd_valid), .s_rd_ready(im_rd_ready), .s_rd_data(im_rd_data)
  );

  imorc_int_mem #(.DW(LW), .AW(IM_AW)) u_int_mem (
    .clk, .rst_n,
    .s_req_valid(im_req_valid), .s_req_ready(im_req_ready), .s_req(im_req),
    .s_wd_valid(im_wd_valid), .s_wd_ready(im_wd_ready), .s_wd_data(im_wd_data),
    .s_rd_valid(im_rd_valid), .s_rd_ready(im_rd_ready), .s_rd_data(im_rd_data)
  );

  // ================= load sensor =================
  // Watches the seven stream buffers while a run is in progress and is
  // cleared when a run starts. Read buffers are full when they refuse link
  // data and empty when they have nothing for the composer; write buffers are
  // full when they refuse composer data and empty when idle. Its 28 counters
  // appear at register indices 32..59 (byte offsets 0x100..0x1d8).
  logic          busy_q, ls_clear;
  logic [NS-1:0] ls_full, ls_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= 1'b0;
    else        busy_q <= busy;
  end
  assign ls_clear = busy && !busy_q;

  for (genvar s = 0; s < NS; s++) begin : g_ls_flags
    if (s < 4) begin : g_rd
      assign ls_full[s]  = !sb_rd_ready[s];
      assign ls_empty[s] = !st_valid[s];
    end else begin : g_wr
      assign ls_full[s]  = !st_ready[s];
      assign ls_empty[s] = sb_idle[s];
    end
  end

  load_sensor #(.N(NS), .CW(32), .RA(5)) u_load_sensor (
    .clk, .rst_n, .enable(busy), .clear(ls_clear),
    .full(ls_full), .empty(ls_empty),
    .rd_addr(reg_addr[4:0]), .rd_data(ls_rdata)
  );

  assign reg_rdata = (reg_addr[7:5] == 3'd1) ? 64'(ls_rdata) : ctrl_rdata;

  // a pass is over for the writers when their buffers are empty and their
  // links have handed every request and word to the memory side
  assign wr_drained = &(sb_idle[NS-1:4] & sb_drained[NS-1:4]);

endmodule
