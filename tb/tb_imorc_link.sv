// tb_imorc_link: an IMORC link from a 64-bit master (5 ns clock) to a 256-bit
// slave (3.3 ns clock). The master writes random blocks to a memory model on
// the slave side and reads them back; the test checks the requests arriving
// at the slave, the packing of write data into 256-bit words, the read data
// returned through the 256->64 conversion, and m_drained once all writes
// have been taken by the slave.
module tb_imorc_link;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic m_clk = 0, s_clk = 0, m_rst_n = 0, s_rst_n = 0;
  always #2.5 m_clk = ~m_clk;
  always #1.65 s_clk = ~s_clk;

  logic m_req_valid, m_req_ready, m_wd_valid, m_wd_ready, m_rd_valid, m_rd_ready, m_drained;
  imorc_req_t m_req, s_req;
  logic [63:0] m_wd_data, m_rd_data;
  logic s_req_valid, s_req_ready, s_wd_valid, s_wd_ready, s_rd_valid, s_rd_ready;
  logic [255:0] s_wd_data, s_rd_data;

  imorc_link #(.MW(64), .SW(256)) u_dut (.*);

  int checks = 0, failures = 0;

  // ---------- slave: memory of 64-bit words, serves one request at a time ----------
  logic [63:0] smem [int];
  imorc_req_t  cur;
  int          sw_left, s_idx, n_req_seen;
  logic        s_busy;
  assign s_req_ready = !s_busy;
  assign s_wd_ready  = s_busy && cur.write;
  assign s_rd_valid  = s_busy && !cur.write;
  always_comb begin
    for (int k = 0; k < 4; k++)
      s_rd_data[k*64 +: 64] = smem.exists(s_idx + k) ? smem[s_idx + k] : 64'hx0;
  end
  always @(posedge s_clk or negedge s_rst_n) begin
    if (!s_rst_n) begin s_busy <= 0; n_req_seen <= 0; end
    else if (!s_busy) begin
      if (s_req_valid) begin
        cur <= s_req; s_busy <= 1; s_idx <= int'(s_req.addr >> 3); sw_left <= int'(s_req.len) / 32;
        n_req_seen <= n_req_seen + 1;
      end
    end else if ((s_wd_valid && s_wd_ready) || (s_rd_valid && s_rd_ready)) begin
      if (cur.write) for (int k = 0; k < 4; k++) smem[s_idx + k] = s_wd_data[k*64 +: 64];
      s_idx <= s_idx + 4;
      sw_left <= sw_left - 1;
      if (sw_left == 1) s_busy <= 0;
    end
  end

  // ---------- master tasks (driven on the falling edge) ----------
  task automatic m_request(input bit wr, input int addr, input int len);
    @(negedge m_clk);
    m_req_valid = 1; m_req = '{write: wr, addr: ADDR_W'(addr), len: LEN_W'(len)};
    @(posedge m_clk);
    while (!m_req_ready) @(posedge m_clk);
    @(negedge m_clk);
    m_req_valid = 0;
  endtask

  task automatic m_write(input int addr, input int len, input int seed);
    m_request(1, addr, len);
    for (int i = 0; i < len / 8; i++) begin
      m_wd_valid = 1; m_wd_data = {32'(seed), 32'(addr + 8 * i)};
      @(posedge m_clk);
      while (!m_wd_ready) @(posedge m_clk);
      @(negedge m_clk);
      m_wd_valid = 0;
    end
  endtask

  task automatic m_read_check(input int addr, input int len, input int seed);
    m_request(0, addr, len);
    for (int i = 0; i < len / 8; i++) begin
      m_rd_ready = 1;
      @(posedge m_clk);
      while (!m_rd_valid) @(posedge m_clk);
      checks++;
      if (m_rd_data != {32'(seed), 32'(addr + 8 * i)}) begin
        failures++; $display("FAIL: read %h at %0d", m_rd_data, addr + 8 * i);
      end
      @(negedge m_clk);
      m_rd_ready = 0;
    end
  endtask

  initial begin
    #500_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_req_valid = 0; m_wd_valid = 0; m_rd_ready = 0; m_req = '0; m_wd_data = '0;
    #20 m_rst_n = 1; s_rst_n = 1;
    for (int b = 0; b < 12; b++) m_write(b * 512, 32 * (1 + b % 4), b + 100);
    repeat (20) @(posedge m_clk);
    checks++;
    if (!m_drained) begin failures++; $display("FAIL: link not drained after writes"); end
    // slave saw the data packed 4 words per 256-bit word
    checks++;
    if (smem[(3 * 512) / 8 + 1] != {32'd103, 32'(3 * 512 + 8)}) begin
      failures++; $display("FAIL: slave memory content");
    end
    for (int b = 0; b < 12; b++) m_read_check(b * 512, 32 * (1 + b % 4), b + 100);
    checks++;
    if (n_req_seen != 24) begin failures++; $display("FAIL: %0d requests seen", n_req_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
