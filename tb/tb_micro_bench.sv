// tb_micro_bench: bandwidth micro-benchmark core on a 256-bit link to a
// behavioural memory with read latency and random back-pressure. Runs a write
// test and then a read test over the same region, with a request size that
// does not divide the total (so the last request is shorter), and checks:
// the memory contents after the write (each 64-bit lane holds its byte
// address), the read checksum, the request count, and every per-request
// cycle count against the testbench's own measurement at the link, as well
// as the min/max/sum statistics and the total run time.
module tb_micro_bench;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  localparam int unsigned DW = 256, BPW = DW / 8;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  bench_cfg_t  cfg;
  bench_stat_t stat;
  logic        res_valid;
  logic [31:0] res_cycles;
  logic        req_valid, req_ready, wd_valid, wd_ready, rd_valid, rd_ready;
  imorc_req_t  req;
  logic [DW-1:0] wd_data, rd_data;

  int unsigned checks = 0, failures = 0;

  logic link_drained;
  assign link_drained = !u_mem.busy_q;
  micro_bench #(.DW(DW)) u_dut (.*);
  imorc_slave_model #(.DW(DW), .LAT(7), .STALL(4)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // own measurement at the link: request handshake to last data handshake
  longint cyc = 0, t_req = 0;
  int     words_left = 0, n_seen = 0, n_res = 0;
  longint sum_seen = 0, min_seen = 0, max_seen = 0;
  bit     cur_write;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (res_valid) n_res++;
      if (req_valid && req_ready) begin
        t_req = cyc;
        words_left = int'(req.len) / BPW;
        cur_write = req.write;
      end else if ((cur_write && wd_valid && wd_ready) || (!cur_write && rd_valid && rd_ready)) begin
        words_left--;
        if (words_left == 0) begin
          longint d;
          d = cyc - t_req;
          n_seen++;
          checks++;
          if (!res_valid || longint'(res_cycles) != d) begin
            failures++;
            $display("FAIL: request %0d took %0d cycles, core reports %0d (valid %b)", n_seen, d, res_cycles, res_valid);
          end
          sum_seen += d;
          if (n_seen == 1 || d < min_seen) min_seen = d;
          if (d > max_seen) max_seen = d;
        end
      end
    end
  end

  task automatic run(input bit write, input longint base, input int total, input int rbytes);
    longint t0;
    n_seen = 0; sum_seen = 0; min_seen = 0; max_seen = 0; n_res = 0;
    @(negedge clk);
    cfg.write = write; cfg.base = ADDR_W'(base); cfg.total = 32'(total); cfg.req_bytes = LEN_W'(rbytes);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!stat.done) @(negedge clk);
    check(stat.n_req == 32'((total + rbytes - 1) / rbytes), "request count");
    check(n_seen == int'(stat.n_req) && n_res == n_seen, "one result per request");
    check(longint'(stat.sum_cycles) == sum_seen, "sum of request cycles");
    check(longint'(stat.min_cycles) == min_seen && longint'(stat.max_cycles) == max_seen, "min/max request cycles");
    check(longint'(stat.total_cycles) >= sum_seen && longint'(stat.total_cycles) <= cyc - t0, "total cycles");
    check(!u_mem.busy_q, "done only after the memory has finished");
    if (total > 4 * rbytes) check(max_seen > min_seen, "request times vary with back-pressure");
    $display("%s: %0d requests, %0d..%0d cycles, total %0d", write ? "write" : "read",
             stat.n_req, stat.min_cycles, stat.max_cycles, stat.total_cycles);
  endtask

  localparam longint BASE  = 'h4000;
  localparam int     TOTAL = 3200, RBYTES = 384;   // 8 full requests + one of 128 bytes

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    run(1'b1, BASE, TOTAL, RBYTES);
    begin
      int bad = 0;
      for (int w = 0; w < TOTAL / BPW; w++) begin
        logic [DW-1:0] exp, got;
        for (int l = 0; l < DW / 64; l++) exp[64*l +: 64] = 64'(BASE + w * BPW + 8 * l);
        got = u_mem.peek((BASE / BPW) + w);
        if (got != exp) bad++;
        checks++;
      end
      failures += bad;
      if (bad != 0) $display("FAIL: %0d memory words wrong after the write test", bad);
      check(!u_mem.mem.exists(BASE / BPW + TOTAL / BPW) && !u_mem.mem.exists(BASE / BPW - 1), "no write outside the region");
    end

    // read back part of it plus unwritten memory
    run(1'b0, BASE + 1024, TOTAL, RBYTES);
    begin
      logic [63:0] sum = '0;
      for (int w = 0; w < TOTAL / BPW; w++) begin
        logic [DW-1:0] v;
        v = u_mem.peek((BASE + 1024) / BPW + w);
        for (int l = 0; l < DW / 64; l++) sum ^= v[64*l +: 64];
      end
      check(stat.checksum == sum, "read checksum");
    end

    // a start while busy is ignored, and a new run clears the statistics
    run(1'b0, 0, 2 * BPW, BPW);
    check(stat.n_req == 2, "statistics cleared by a new run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
