// tb_ddr_ctrl: external-memory wrapper with a DDR controller model (8-cycle
// bursts of 128 bits, i.e. 128-byte bursts). Random reads and writes of 1..10
// link words (32 bytes each) at random 32-byte aligned addresses in a 2 KiB
// window, with random write-data gaps and read back-pressure; a shadow copy
// of the window predicts every read. Checks: read data, the number of
// read-modify-write bursts (one per partly covered burst of a write), that a
// write covering whole bursts reads nothing, and a final sweep of the window.
// BURST can be overridden (2, 4 or 8 memory cycles per burst); the expected
// read-modify-write counts follow the burst size.
module tb_ddr_ctrl #(
  parameter int unsigned BURST = 8
);
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic s_req_valid, s_req_ready, s_wd_valid, s_wd_ready, s_rd_valid, s_rd_ready;
  imorc_req_t s_req;
  logic [255:0] s_wd_data, s_rd_data;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_write, mem_wd_valid, mem_wd_ready, mem_rd_valid;
  localparam int unsigned BA_W = 32 - $clog2(16 * BURST);   // 4 GiB in bursts
  localparam int WPB = BURST / 2;                           // link words per burst
  logic [BA_W-1:0] mem_cmd_addr;
  logic [127:0] mem_wd_data, mem_rd_data;
  logic [31:0] rmw_count;

  ddr_ctrl #(.LW(256), .MW(128), .BURST(BURST), .BA_W(BA_W)) u_dut (.*);
  ddr_mem_model #(.MW(128), .BURST(BURST), .BA_W(BA_W), .LAT(4)) u_mem (
    .clk, .rst_n, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_write(mem_cmd_write),
    .cmd_addr(mem_cmd_addr), .wd_valid(mem_wd_valid), .wd_ready(mem_wd_ready), .wd_data(mem_wd_data),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  localparam int WORDS = 64;              // 2 KiB window of 32-byte words
  logic [255:0] shadow [WORDS];

  function automatic logic [255:0] model_word(int w);
    logic [255:0] r;
    for (int k = 0; k < 2; k++)
      r[k*128 +: 128] = u_mem.peek(longint'(w) * 2 + k);
    return r;
  endfunction

  task automatic request(input bit wr, input int w, input int n);
    @(negedge clk);
    s_req_valid = 1; s_req = '{write: wr, addr: ADDR_W'(w * 32), len: LEN_W'(n * 32)};
    @(posedge clk); while (!s_req_ready) @(posedge clk);
    @(negedge clk); s_req_valid = 0;
    for (int i = 0; i < n; i++) begin
      if (wr) begin
        while ($urandom_range(2) == 0) @(negedge clk);
        s_wd_valid = 1;
        s_wd_data  = {8{$urandom}};
        shadow[w + i] = s_wd_data;
        @(posedge clk); while (!s_wd_ready) @(posedge clk);
        @(negedge clk); s_wd_valid = 0;
      end else begin
        while ($urandom_range(2) == 0) @(negedge clk);
        s_rd_ready = 1;
        @(posedge clk); while (!s_rd_valid) @(posedge clk);
        chk(s_rd_data == shadow[w + i], $sformatf("read word %0d", w + i));
        @(negedge clk); s_rd_ready = 0;
      end
    end
    // let the last burst finish
    while (!s_req_ready) @(negedge clk);
  endtask

  // bursts of [w, w+n) only partly covered (WPB link words per burst)
  function automatic int partial_bursts(int w, int n);
    int c = 0;
    for (int b = w / WPB; b <= (w + n - 1) / WPB; b++)
      if (!(w <= b * WPB && w + n >= b * WPB + WPB)) c++;
    return c;
  endfunction

  initial begin
    #500_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_rmw = 0, rd0;
    s_req_valid = 0; s_wd_valid = 0; s_rd_ready = 0; s_req = '0; s_wd_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) shadow[w] = model_word(w);

    // a whole-burst write must not read
    rd0 = u_mem.n_rd_bursts;
    request(1, 8, 8);
    chk(u_mem.n_rd_bursts == rd0 && rmw_count == 0, "aligned two-burst write without reads");
    // a partial write is a read-modify-write
    request(1, 15, 2);
    exp_rmw = partial_bursts(15, 2);
    chk(rmw_count == 32'(exp_rmw), "partial write: one read-modify-write per partly covered burst");
    request(0, 12, 4);

    for (int it = 0; it < 150; it++) begin
      int n, w;
      bit wr;
      n  = $urandom_range(1, 10);
      w  = $urandom_range(0, WORDS - n);
      wr = $urandom_range(1) == 1;
      if (wr) exp_rmw += partial_bursts(w, n);
      request(wr, w, n);
    end
    chk(rmw_count == 32'(exp_rmw), $sformatf("read-modify-write count %0d expected %0d", rmw_count, exp_rmw));
    for (int w = 0; w < WORDS; w++) chk(model_word(w) == shadow[w], $sformatf("memory word %0d", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
