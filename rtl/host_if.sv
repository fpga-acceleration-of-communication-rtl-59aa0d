// host_if: IMORC interface to HyperTransport (the "Host IF" core).
//
// It sits behind an HT cave, which maps three address regions of the FPGA into
// the CPU's address space and forwards the CPU's requests. Per region:
//   region 0  becomes IMORC requests on master link 0 (control registers);
//   region 1  becomes IMORC requests on master link 1 (large data transfers);
//   region 2  reads and writes the page mapping table directly (one 64-bit
//             word per entry: the physical address of a host page).
// In the other direction the IMORC slave port lets cores reach host memory:
// the upper address bits index the page mapping table, the lower PAGE_BITS are
// the offset in the page, and each IMORC request is cut into HyperTransport
// packets of at most 64 bytes (HT's largest packet) that never cross a 64-byte
// boundary. Writes carry their data behind the command; read data returns in
// order and is passed straight to the slave port.
// All of the above follows the interface as described for the platform. The
// cave-side signalling below is a simplified packet interface of this design,
// not the cave's own: CPU requests one 64-bit word at a time (cpu_*, with a
// cpu_rsp_* answer for reads), outgoing packets as a command channel
// (ht_cmd_*, length in bytes) with a 64-bit data channel (ht_wd_*), returned
// read data on ht_rd_*. PAGE_BITS (4 KiB pages) and the table size are
// assumptions. The table is read with one cycle of latency per packet.
module host_if
  import imorc_pkg::*;
#(
  parameter int unsigned PT_AW     = 15,   // 32768 page-table entries
  parameter int unsigned PAGE_BITS = 12    // 4 KiB pages
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the HT cave: CPU accesses, one 64-bit word at a time
  input  logic              cpu_valid,
  output logic              cpu_ready,
  input  logic              cpu_write,
  input  logic [1:0]        cpu_region,
  input  logic [ADDR_W-1:0] cpu_addr,     // byte offset inside the region
  input  logic [63:0]       cpu_wdata,
  output logic              cpu_rsp_valid,
  output logic [63:0]       cpu_rsp_data,
  // to the HT cave: packets towards host memory
  output logic              ht_cmd_valid,
  input  logic              ht_cmd_ready,
  output logic              ht_cmd_write,
  output logic [ADDR_W-1:0] ht_cmd_addr,
  output logic [6:0]        ht_cmd_bytes,  // 8 .. 64
  output logic              ht_wd_valid,
  input  logic              ht_wd_ready,
  output logic [63:0]       ht_wd_data,
  input  logic              ht_rd_valid,
  output logic              ht_rd_ready,
  input  logic [63:0]       ht_rd_data,
  // IMORC master links 0 (registers) and 1 (bulk data)
  output logic [1:0]        m_req_valid,
  input  logic [1:0]        m_req_ready,
  output imorc_req_t        m_req,         // shared by both links
  output logic [1:0]        m_wd_valid,
  input  logic [1:0]        m_wd_ready,
  output logic [63:0]       m_wd_data,
  input  logic [1:0]        m_rd_valid,
  output logic [1:0]        m_rd_ready,
  input  logic [63:0]       m_rd_data [2],
  // IMORC slave link: cores accessing host memory
  input  logic              s_req_valid,
  output logic              s_req_ready,
  input  imorc_req_t        s_req,
  input  logic              s_wd_valid,
  output logic              s_wd_ready,
  input  logic [63:0]       s_wd_data,
  output logic              s_rd_valid,
  input  logic              s_rd_ready,
  output logic [63:0]       s_rd_data
);

  localparam int unsigned PFN_W = ADDR_W - PAGE_BITS;

  // ---------------- page mapping table ----------------
  logic [PFN_W-1:0] page_table [2**PT_AW];

  // ---------------- CPU side ----------------
  typedef enum logic [2:0] {C_IDLE, C_REQ, C_DATA, C_WAIT, C_PT_RD} cstate_e;
  cstate_e     cst;
  logic        c_write, c_link;
  logic [ADDR_W-1:0] c_addr;
  logic [63:0] c_wdata;
  logic [PT_AW-1:0] c_pt_idx;

  assign cpu_ready = (cst == C_IDLE);
  assign c_pt_idx  = PT_AW'(cpu_addr >> 3);

  always_comb begin
    m_req_valid = '0;
    m_wd_valid  = '0;
    m_rd_ready  = '0;
    m_req.write = c_write;
    m_req.addr  = c_addr;
    m_req.len   = LEN_W'(8);
    m_wd_data   = c_wdata;
    if (cst == C_REQ)  m_req_valid[c_link] = 1'b1;
    if (cst == C_DATA) m_wd_valid[c_link]  = 1'b1;
    if (cst == C_WAIT) m_rd_ready[c_link]  = 1'b1;
  end

  logic [PFN_W-1:0] pt_cpu_q;

  always_ff @(posedge clk) begin
    if (cpu_valid && cpu_ready && cpu_region == 2'd2) begin
      if (cpu_write) page_table[c_pt_idx] <= cpu_wdata[ADDR_W-1:PAGE_BITS];
      pt_cpu_q <= page_table[c_pt_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE; c_write <= 1'b0; c_link <= 1'b0; c_addr <= '0; c_wdata <= '0;
      cpu_rsp_valid <= 1'b0; cpu_rsp_data <= '0;
    end else begin
      cpu_rsp_valid <= 1'b0;
      unique case (cst)
        C_IDLE: if (cpu_valid) begin
          c_write <= cpu_write;
          c_addr  <= cpu_addr;
          c_wdata <= cpu_wdata;
          c_link  <= cpu_region[0];
          if (cpu_region == 2'd2) cst <= cpu_write ? C_IDLE : C_PT_RD;
          else if (cpu_region != 2'd3) cst <= C_REQ;
        end
        C_REQ:  if (m_req_ready[c_link]) cst <= c_write ? C_DATA : C_WAIT;
        C_DATA: if (m_wd_ready[c_link])  cst <= C_IDLE;
        C_WAIT: if (m_rd_valid[c_link]) begin
          cpu_rsp_valid <= 1'b1;
          cpu_rsp_data  <= m_rd_data[c_link];
          cst           <= C_IDLE;
        end
        C_PT_RD: begin
          cpu_rsp_valid <= 1'b1;
          cpu_rsp_data  <= {{(64-ADDR_W){1'b0}}, pt_cpu_q, {PAGE_BITS{1'b0}}};
          cst           <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // ---------------- core side: IMORC requests to HT packets ----------------
  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_CMD, S_DATA} sstate_e;
  sstate_e            sst;
  logic               s_write;
  logic [ADDR_W-1:0]  s_addr;
  logic [LEN_W-1:0]   s_left;
  logic [PFN_W-1:0]   pfn_q;
  logic [6:0]         pkt_bytes;
  logic [3:0]         pkt_words;   // data words still to send for a write packet

  // bytes up to the next 64-byte boundary, capped by what is left
  always_comb begin
    logic [6:0] to_bound;
    to_bound  = 7'd64 - 7'(s_addr[5:0]);
    pkt_bytes = (s_left < LEN_W'(to_bound)) ? 7'(s_left) : to_bound;
  end

  assign s_req_ready  = (sst == S_IDLE);
  assign ht_cmd_valid = (sst == S_CMD);
  assign ht_cmd_write = s_write;
  assign ht_cmd_addr  = {pfn_q, s_addr[PAGE_BITS-1:0]};
  assign ht_cmd_bytes = pkt_bytes;

  assign ht_wd_valid = (sst == S_DATA) && s_wd_valid;
  assign ht_wd_data  = s_wd_data;
  assign s_wd_ready  = (sst == S_DATA) && ht_wd_ready;

  assign s_rd_valid  = ht_rd_valid;
  assign s_rd_data   = ht_rd_data;
  assign ht_rd_ready = s_rd_ready;

  always_ff @(posedge clk) begin
    if (sst == S_LOOKUP) pfn_q <= page_table[PT_AW'(s_addr >> PAGE_BITS)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sst <= S_IDLE; s_write <= 1'b0; s_addr <= '0; s_left <= '0; pkt_words <= '0;
    end else begin
      unique case (sst)
        S_IDLE: if (s_req_valid) begin
          s_write <= s_req.write;
          s_addr  <= s_req.addr;
          s_left  <= s_req.len;
          sst     <= S_LOOKUP;
        end
        S_LOOKUP: sst <= S_CMD;
        S_CMD: if (ht_cmd_ready) begin
          s_addr <= s_addr + ADDR_W'(pkt_bytes);
          s_left <= s_left - LEN_W'(pkt_bytes);
          if (s_write) begin
            pkt_words <= 4'(pkt_bytes >> 3);
            sst       <= S_DATA;
          end else begin
            sst <= (s_left == LEN_W'(pkt_bytes)) ? S_IDLE : S_LOOKUP;
          end
        end
        S_DATA: if (ht_wd_valid && ht_wd_ready) begin
          pkt_words <= pkt_words - 1'b1;
          if (pkt_words == 4'd1) sst <= (s_left == '0) ? S_IDLE : S_LOOKUP;
        end
        default: sst <= S_IDLE;
      endcase
    end
  end

  a_len_words: assert property (@(posedge clk) disable iff (!rst_n)
      (s_req_valid && s_req_ready) |-> (s_req.len != 0 && s_req.len[2:0] == 3'd0 && s_req.addr[2:0] == 3'd0))
    else $error("host_if: request must cover whole 64-bit words");

endmodule
