// tb_imorc_arbiter: three masters share one slave through the arbiter. Each
// master owns an address window and issues a random mix of writes and reads
// of 1..4 words, keeping a shadow copy of its window; every read result is
// compared with that copy, which checks the write-data locking and the read
// routing back to the right port. The slave model answers requests in order
// with a fixed latency. The test also checks that every master was granted
// while others were waiting (round-robin fairness) and that contention occurred.
module tb_imorc_arbiter;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic [N-1:0] in_req_valid, in_req_ready, in_wd_valid, in_wd_ready, in_rd_valid, in_rd_ready;
  imorc_req_t   in_req [N];
  logic [63:0]  in_wd_data [N];
  logic [63:0]  in_rd_data [N];
  logic         out_req_valid, out_req_ready, out_wd_valid, out_wd_ready, out_rd_valid, out_rd_ready;
  imorc_req_t   out_req;
  logic [63:0]  out_wd_data, out_rd_data;

  imorc_arbiter #(.N(N), .DW(64)) u_dut (.*);

  int checks = 0, failures = 0;

  // ---------------- slave: in-order memory, reads queued with latency ----------------
  logic [63:0] smem [int];
  imorc_req_t  q [$];
  int          s_words, s_addr;
  logic        s_active;
  assign out_req_ready = (q.size() < 4);
  always @(posedge clk) if (rst_n && out_req_valid && out_req_ready) q.push_back(out_req);

  assign out_wd_ready = s_active && q[0].write;
  assign out_rd_valid = s_active && !q[0].write;
  assign out_rd_data  = smem.exists(s_addr) ? smem[s_addr] : 64'hdead;
  always @(posedge clk) begin
    if (!rst_n) s_active <= 0;
    else if (!s_active) begin
      if (q.size() > 0) begin s_active <= 1; s_addr <= int'(q[0].addr) / 8; s_words <= int'(q[0].len) / 8; end
    end else if ((out_wd_valid && out_wd_ready) || (out_rd_valid && out_rd_ready)) begin
      if (q[0].write) smem[s_addr] = out_wd_data;
      s_addr <= s_addr + 1;
      s_words <= s_words - 1;
      if (s_words == 1) begin s_active <= 0; void'(q.pop_front()); end
    end
  end

  // ---------------- masters ----------------
  int grants [N];
  int n_conflict = 0;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) if (in_req_valid[m] && in_req_ready[m]) grants[m]++;
    if ($countones(in_req_valid) > 1) n_conflict++;
  end

  for (genvar m = 0; m < N; m++) begin : g_m
    logic [63:0] shadow [16];
    initial begin
      in_req_valid[m] = 0; in_wd_valid[m] = 0; in_rd_ready[m] = 0;
      in_req[m] = '0; in_wd_data[m] = '0;
      for (int k = 0; k < 16; k++) shadow[k] = 64'hdead;
      wait (rst_n);
      for (int it = 0; it < 60; it++) begin
        bit wr;
        int a, n;
        wr = (it < 4) || ($urandom_range(1) == 1);
        n  = $urandom_range(1, 4);
        a  = $urandom_range(0, 16 - n);
        @(negedge clk);
        in_req_valid[m] = 1;
        in_req[m] = '{write: wr, addr: ADDR_W'((m * 16 + a) * 8), len: LEN_W'(n * 8)};
        @(posedge clk);
        while (!in_req_ready[m]) @(posedge clk);
        @(negedge clk);
        in_req_valid[m] = 0;
        for (int i = 0; i < n; i++) begin
          if (wr) begin
            in_wd_valid[m] = 1;
            in_wd_data[m]  = {32'(m), 32'($urandom)};
            shadow[a + i]  = in_wd_data[m];
            @(posedge clk);
            while (!in_wd_ready[m]) @(posedge clk);
            @(negedge clk);
            in_wd_valid[m] = 0;
          end else begin
            in_rd_ready[m] = 1;
            @(posedge clk);
            while (!in_rd_valid[m]) @(posedge clk);
            checks++;
            if (in_rd_data[m] != shadow[a + i]) begin
              failures++;
              $display("FAIL: master %0d word %0d got %h expected %h", m, a + i, in_rd_data[m], shadow[a + i]);
            end
            @(negedge clk);
            in_rd_ready[m] = 0;
          end
        end
      end
    end
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < N; m++) grants[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (grants[0] == 60 && grants[1] == 60 && grants[2] == 60);
    repeat (20) @(posedge clk);
    checks++;
    if (n_conflict == 0) begin failures++; $display("FAIL: no contention happened"); end
    $display("contention cycles: %0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
