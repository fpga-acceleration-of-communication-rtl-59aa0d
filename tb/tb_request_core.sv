// tb_request_core: address generation for the three kinds of pass. For each
// pass the seven REQ ports are drained with random back-pressure and every
// command is compared with the expected sequence: 128-byte steps through the
// colour buffer (base) or the depth buffer (base + 4*size), the last command
// carrying the remainder, and only the streams the pass mode enables.
module tb_request_core;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  localparam int NS = 7;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic start, busy;
  pass_mode_t mode;
  logic [31:0] size;
  logic [ADDR_W-1:0] mem_base, host_base, out_base;
  logic [NS-1:0] cmd_valid, cmd_ready;
  logic [ADDR_W-1:0] cmd_addr [NS];
  logic [LEN_W-1:0]  cmd_len  [NS];

  request_core #(.NS(NS), .REQ_BYTES(128)) u_dut (.*);

  int checks = 0, failures = 0;
  int n [NS];

  always @(negedge clk) for (int s = 0; s < NS; s++) cmd_ready[s] = ($urandom_range(2) != 0);

  function automatic longint base_of(int s);
    longint zoff;
    zoff = longint'(size) * 4;
    case (s)
      0: return longint'(mem_base) + zoff;   1: return longint'(mem_base);
      2: return longint'(host_base) + zoff;  3: return longint'(host_base);
      4: return longint'(mem_base) + zoff;   5: return longint'(mem_base);
      default: return longint'(out_base);
    endcase
  endfunction

  always @(posedge clk) if (rst_n)
    for (int s = 0; s < NS; s++) if (cmd_valid[s] && cmd_ready[s]) begin
      longint bytes, off, len;
      bytes = longint'(size) * 4;
      off   = longint'(n[s]) * 128;
      len   = (bytes - off >= 128) ? 128 : bytes - off;
      checks++;
      if (cmd_addr[s] != ADDR_W'(base_of(s) + off) || cmd_len[s] != LEN_W'(len)) begin
        failures++;
        $display("FAIL: stream %0d cmd %0d addr %h len %0d", s, n[s], cmd_addr[s], cmd_len[s]);
      end
      n[s]++;
    end

  task automatic pass(input bit load, input bit wm, input bit wh, input int pixels);
    int chunks;
    bit en [NS];
    for (int s = 0; s < NS; s++) n[s] = 0;
    @(negedge clk);
    size = 32'(pixels); mode = '{load: load, write_mem: wm, write_host: wh};
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    chunks = (pixels * 4 + 127) / 128;
    en = '{!load, !load, 1, 1, wm, wm, wh};
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (n[s] != (en[s] ? chunks : 0)) begin
        failures++; $display("FAIL: stream %0d issued %0d commands, expected %0d", s, n[s], en[s] ? chunks : 0);
      end
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; size = 0; mode = '0;
    mem_base = 40'h10_0000; host_base = 40'h4000; out_base = 40'h9_0000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pass(1, 1, 0, 520);     // load
    host_base = 40'h6000;
    pass(0, 1, 0, 520);     // compose
    host_base = 40'h8000;
    pass(0, 0, 1, 256);     // final, buffers a whole number of requests
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
