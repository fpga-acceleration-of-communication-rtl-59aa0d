// tb_stream_buffer_s2m: read stream buffer. Twenty 128-byte commands (the
// last one 32 bytes) arrive on the REQ port; a link model answers each read
// request after a random delay with words derived from the address; the
// consumer pulls the stream with random back-pressure. Checks: the requests
// match the commands, the stream carries the words in address order, the
// buffer never has more words requested than it can hold (so read data is
// never refused), and it reports idle at the end.
module tb_stream_buffer_s2m;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic cmd_valid, cmd_ready, req_valid, req_ready, rd_valid, rd_ready, st_valid, st_ready, idle;
  logic [ADDR_W-1:0] cmd_addr;
  logic [LEN_W-1:0]  cmd_len;
  imorc_req_t req;
  logic [63:0] rd_data, st_data;

  stream_buffer_s2m #(.DW(64), .BUF_AW(6)) u_dut (.*);

  int checks = 0, failures = 0;
  localparam int NCMD = 20;

  function automatic logic [63:0] word_at(longint a);
    return {32'(a * 3), 32'(a)};
  endfunction

  // ---------- commands ----------
  int n_cmd = 0;
  always @(negedge clk) begin
    cmd_valid = rst_n && (n_cmd < NCMD);
    cmd_addr  = ADDR_W'(40'h1000 + n_cmd * 128);
    cmd_len   = (n_cmd == NCMD - 1) ? LEN_W'(32) : LEN_W'(128);
  end
  always @(posedge clk) if (cmd_valid && cmd_ready) n_cmd++;

  // ---------- link model: queue of words to return ----------
  longint pend [$];
  int     outstanding = 0, max_outstanding = 0, n_req = 0, delay = 0;
  assign req_ready = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      checks++;
      if (req.write || req.addr != ADDR_W'(40'h1000 + n_req * 128) ||
          req.len != ((n_req == NCMD - 1) ? LEN_W'(32) : LEN_W'(128))) begin
        failures++; $display("FAIL: request %0d wrong", n_req);
      end
      for (int i = 0; i < int'(req.len) / 8; i++) pend.push_back(longint'(req.addr) + 8 * i);
      outstanding += int'(req.len) / 8;
      n_req++;
    end
    if (rd_valid && rd_ready) void'(pend.pop_front());
    if (st_valid && st_ready) outstanding--;
    if (outstanding > max_outstanding) max_outstanding = outstanding;
    checks++;
    if (rd_valid && !rd_ready) begin failures++; $display("FAIL: read data refused"); end
  end
  logic gap;
  always @(negedge clk) begin
    gap      = ($urandom_range(4) == 0);
    rd_valid = (pend.size() > 0) && !gap;
    rd_data  = (pend.size() > 0) ? word_at(pend[0]) : '0;
    st_ready = ($urandom_range(2) == 0);
  end

  // ---------- stream check ----------
  int n_st = 0;
  always @(posedge clk) if (rst_n && st_valid && st_ready) begin
    checks++;
    if (st_data != word_at(40'h1000 + 8 * n_st)) begin failures++; $display("FAIL: stream word %0d", n_st); end
    n_st++;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_st == (NCMD - 1) * 16 + 4);
    repeat (5) @(posedge clk);
    checks++;
    if (max_outstanding > 64) begin failures++; $display("FAIL: %0d words outstanding", max_outstanding); end
    checks++;
    if (!idle) begin failures++; $display("FAIL: not idle at the end"); end
    $display("max words outstanding: %0d", max_outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
