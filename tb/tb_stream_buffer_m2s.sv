// tb_stream_buffer_m2s: write stream buffer. The producer pushes a numbered
// word stream with random gaps; commands for consecutive 128-byte blocks (the
// last one 64 bytes) arrive on the REQ port; the link accepts with random
// back-pressure. Checks: each write request matches its command and is issued
// only once the whole block is buffered, the data words follow in order and
// are exactly len/8 per request, and the buffer reports idle at the end.
module tb_stream_buffer_m2s;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic cmd_valid, cmd_ready, st_valid, st_ready, req_valid, req_ready, wd_valid, wd_ready, idle;
  logic [ADDR_W-1:0] cmd_addr;
  logic [LEN_W-1:0]  cmd_len;
  imorc_req_t req;
  logic [63:0] st_data, wd_data;

  stream_buffer_m2s #(.DW(64), .BUF_AW(6)) u_dut (.*);

  int checks = 0, failures = 0;
  localparam int NCMD = 12;
  localparam int TOTAL = (NCMD - 1) * 16 + 8;

  int n_cmd = 0, n_st = 0, n_req = 0, n_wd = 0, words_owed = 0, pushed = 0;
  always @(negedge clk) begin
    cmd_valid = rst_n && (n_cmd < NCMD);
    cmd_addr  = ADDR_W'(40'h8000 + n_cmd * 128);
    cmd_len   = (n_cmd == NCMD - 1) ? LEN_W'(64) : LEN_W'(128);
    st_valid  = rst_n && (n_st < TOTAL) && ($urandom_range(3) != 0);
    st_data   = {32'hc0de, 32'(n_st)};
    req_ready = ($urandom_range(2) != 0);
    wd_ready  = ($urandom_range(3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) n_cmd++;
    if (st_valid && st_ready) n_st++;
    if (req_valid && req_ready) begin
      checks++;
      if (!req.write || req.addr != ADDR_W'(40'h8000 + n_req * 128) ||
          req.len != ((n_req == NCMD - 1) ? LEN_W'(64) : LEN_W'(128)) || words_owed != 0 ||
          n_st - n_wd < int'(req.len) / 8) begin
        failures++; $display("FAIL: write request %0d", n_req);
      end
      words_owed = int'(req.len) / 8;
      n_req++;
    end
    if (wd_valid && wd_ready) begin
      checks++;
      if (wd_data != {32'hc0de, 32'(n_wd)} || words_owed == 0) begin
        failures++; $display("FAIL: data word %0d", n_wd);
      end
      words_owed--;
      n_wd++;
    end
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
    wait (n_wd == TOTAL);
    repeat (3) @(posedge clk);
    checks++;
    if (!idle || n_req != NCMD) begin failures++; $display("FAIL: end state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
