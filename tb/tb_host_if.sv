// tb_host_if: HyperTransport interface core with a host-memory model.
// CPU side: region 0 and region 1 accesses must appear as 8-byte IMORC
// requests on master links 0 and 1 (a register model answers reads on link
// 0); region 2 writes and reads back the page mapping table. Core side:
// writes and reads through the slave port, placed across 64-byte and page
// boundaries, must be split into packets of at most 64 bytes that never cross
// a 64-byte boundary, with each packet's address translated through the page
// table; the data read back must equal the data written.
module tb_host_if;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic cpu_valid, cpu_ready, cpu_write, cpu_rsp_valid;
  logic [1:0] cpu_region;
  logic [ADDR_W-1:0] cpu_addr, ht_cmd_addr;
  logic [63:0] cpu_wdata, cpu_rsp_data;
  logic ht_cmd_valid, ht_cmd_ready, ht_cmd_write, ht_wd_valid, ht_wd_ready, ht_rd_valid, ht_rd_ready;
  logic [6:0] ht_cmd_bytes;
  logic [63:0] ht_wd_data, ht_rd_data;
  logic [1:0] m_req_valid, m_req_ready, m_wd_valid, m_wd_ready, m_rd_valid, m_rd_ready;
  imorc_req_t m_req, s_req;
  logic [63:0] m_wd_data;
  logic [63:0] m_rd_data [2];
  logic s_req_valid, s_req_ready, s_wd_valid, s_wd_ready, s_rd_valid, s_rd_ready;
  logic [63:0] s_wd_data, s_rd_data;

  host_if #(.PT_AW(6), .PAGE_BITS(12)) u_dut (.*);

  host_mem_model #(.AW(ADDR_W), .LAT(5), .STALL(4)) u_hmem (
    .clk, .rst_n,
    .cmd_valid(ht_cmd_valid), .cmd_ready(ht_cmd_ready), .cmd_write(ht_cmd_write),
    .cmd_addr(ht_cmd_addr), .cmd_bytes(ht_cmd_bytes),
    .wd_valid(ht_wd_valid), .wd_ready(ht_wd_ready), .wd_data(ht_wd_data),
    .rd_valid(ht_rd_valid), .rd_ready(ht_rd_ready), .rd_data(ht_rd_data));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint phys_page(int v);
    return longint'(v * 13 + 5);
  endfunction
  function automatic longint xlate(longint va);
    return (phys_page(int'(va >> 12)) << 12) | (va & 4095);
  endfunction

  // ---------- master-link models: link 0 = 16 registers, link 1 = log ----------
  logic [63:0] regs [16];
  imorc_req_t  m0_req;
  int          m0_state = 0;    // 0 idle, 1 write data, 2 read data
  assign m_req_ready = {1'b1, m0_state == 0};
  assign m_wd_ready  = {1'b1, m0_state == 1};
  assign m_rd_valid  = {1'b0, m0_state == 2};
  assign m_rd_data[0] = regs[m0_req.addr[6:3]];
  assign m_rd_data[1] = '0;
  int n_link1 = 0;
  logic [ADDR_W-1:0] link1_addr;
  always @(posedge clk) begin
    if (rst_n && m_req_valid[1]) begin n_link1++; link1_addr = m_req.addr; end
    case (m0_state)
      0: if (m_req_valid[0]) begin m0_req <= m_req; m0_state <= m_req.write ? 1 : 2; end
      1: if (m_wd_valid[0]) begin regs[m0_req.addr[6:3]] <= m_wd_data; m0_state <= 0; end
      2: if (m_rd_ready[0]) m0_state <= 0;
      default: m0_state <= 0;
    endcase
  end

  // ---------- packet monitor ----------
  int n_pkt = 0, n_bad_pkt = 0;
  longint exp_pkt [$];     // expected physical addresses, in order
  always @(posedge clk) if (rst_n && ht_cmd_valid && ht_cmd_ready) begin
    longint a, e;
    a = longint'(ht_cmd_addr);
    e = (exp_pkt.size() > 0) ? exp_pkt.pop_front() : -1;
    if (a != e || ht_cmd_bytes > 64 || ht_cmd_bytes == 0 ||
        ((a & 63) + longint'(ht_cmd_bytes)) > 64) begin
      n_bad_pkt++;
      $display("bad packet addr %h bytes %0d (expected %h)", a, ht_cmd_bytes, e);
    end
    n_pkt++;
  end

  // ---------- CPU tasks (falling edge) ----------
  task automatic cpu_wr(input logic [1:0] region, input longint addr, input logic [63:0] data);
    @(negedge clk); while (!cpu_ready) @(negedge clk);
    cpu_valid = 1; cpu_write = 1; cpu_region = region; cpu_addr = ADDR_W'(addr); cpu_wdata = data;
    @(negedge clk); cpu_valid = 0;
  endtask
  task automatic cpu_rd(input logic [1:0] region, input longint addr, output logic [63:0] data);
    @(negedge clk); while (!cpu_ready) @(negedge clk);
    cpu_valid = 1; cpu_write = 0; cpu_region = region; cpu_addr = ADDR_W'(addr);
    @(negedge clk); cpu_valid = 0;
    while (!cpu_rsp_valid) @(negedge clk);
    data = cpu_rsp_data;
  endtask

  // ---------- core-side tasks ----------
  task automatic expect_packets(input longint va, input int len);
    longint a;
    a = va;
    while (a < va + len) begin
      longint nb;
      exp_pkt.push_back(xlate(a));
      nb = 64 - (a & 63);
      if (nb > va + len - a) nb = va + len - a;
      a += nb;
    end
  endtask

  task automatic core_write(input longint va, input int len, input int seed);
    expect_packets(va, len);
    @(negedge clk);
    s_req_valid = 1; s_req = '{write: 1, addr: ADDR_W'(va), len: LEN_W'(len)};
    @(posedge clk); while (!s_req_ready) @(posedge clk);
    @(negedge clk); s_req_valid = 0;
    for (int i = 0; i < len / 8; i++) begin
      s_wd_valid = 1; s_wd_data = {32'(seed), 32'(i)};
      @(posedge clk); while (!s_wd_ready) @(posedge clk);
      @(negedge clk); s_wd_valid = 0;
    end
  endtask

  task automatic core_read_check(input longint va, input int len, input int seed);
    expect_packets(va, len);
    @(negedge clk);
    s_req_valid = 1; s_req = '{write: 0, addr: ADDR_W'(va), len: LEN_W'(len)};
    @(posedge clk); while (!s_req_ready) @(posedge clk);
    @(negedge clk); s_req_valid = 0;
    for (int i = 0; i < len / 8; i++) begin
      s_rd_ready = 1;
      @(posedge clk); while (!s_rd_valid) @(posedge clk);
      chk(s_rd_data == {32'(seed), 32'(i)}, $sformatf("read-back word %0d at %h", i, va));
      @(negedge clk); s_rd_ready = 0;
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    cpu_valid = 0; cpu_write = 0; cpu_region = 0; cpu_addr = 0; cpu_wdata = 0;
    s_req_valid = 0; s_wd_valid = 0; s_rd_ready = 0; s_req = '0; s_wd_data = 0;
    for (int i = 0; i < 16; i++) regs[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // region 0: registers through master link 0
    cpu_wr(2'd0, 'h18, 64'hfeed_0018);
    cpu_wr(2'd0, 'h20, 64'hfeed_0020);
    cpu_rd(2'd0, 'h18, d);
    chk(d == 64'hfeed_0018, "register read through link 0");
    chk(regs[4] == 64'hfeed_0020, "register write through link 0");
    // region 1: bulk link
    cpu_wr(2'd1, 'h1230, 64'h1);
    repeat (5) @(posedge clk);
    chk(n_link1 == 1 && link1_addr == 40'h1230, "region 1 goes to link 1");

    // region 2: page table
    for (int v = 0; v < 8; v++) cpu_wr(2'd2, v * 8, 64'(phys_page(v) << 12));
    cpu_rd(2'd2, 3 * 8, d);
    chk(d == 64'(phys_page(3) << 12), "page-table read-back");

    // core side: aligned 128-byte block, a block across a page boundary,
    // and an unaligned short block
    core_write(64'h0100, 128, 1);
    core_write(64'h1000 - 72, 200, 2);
    core_write(64'h2038, 24, 3);
    core_read_check(64'h0100, 128, 1);
    core_read_check(64'h1000 - 72, 200, 2);
    core_read_check(64'h2038, 24, 3);
    repeat (20) @(posedge clk);
    chk(n_bad_pkt == 0, "packets split at 64 bytes and translated");
    chk(n_pkt == 2 * (2 + 5 + 1), $sformatf("%0d packets", n_pkt));
    chk(u_hmem.max_bytes == 64, "full 64-byte packets used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
