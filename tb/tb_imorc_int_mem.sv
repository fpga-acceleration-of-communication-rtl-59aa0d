// tb_imorc_int_mem: on-chip memory interface. Random write and read requests
// (1..8 words, random word addresses in a small window, so reads hit earlier
// writes) with random gaps in the write data and random read back-pressure;
// every word read is compared with a reference copy kept in the testbench.
// Also checks the read timing without back-pressure: the first word is valid
// one cycle after the request is accepted (taken at the second clock edge),
// then one word per cycle: 8 words in 9 cycles.
module tb_imorc_int_mem;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  localparam int unsigned DW = 256, AW = 15, BPW = DW / 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          s_req_valid, s_req_ready, s_wd_valid, s_wd_ready, s_rd_valid, s_rd_ready;
  imorc_req_t    s_req;
  logic [DW-1:0] s_wd_data, s_rd_data;

  int unsigned checks = 0, failures = 0;

  imorc_int_mem #(.DW(DW), .AW(AW)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_mem [int];
  bit            rd_bp = 1'b1;     // random read back-pressure on/off

  function automatic logic [DW-1:0] rnd_word();
    logic [DW-1:0] v;
    for (int i = 0; i < DW / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  always @(negedge clk) s_rd_ready = rd_bp ? ($urandom % 3 != 0) : 1'b1;

  task automatic do_req(input bit write, input int word, input int n, output longint first_lat, output longint cycles);
    longint t0, t;
    int got = 0, sent = 0;
    @(negedge clk);
    s_req_valid = 1'b1;
    s_req.write = write;
    s_req.addr  = ADDR_W'(longint'(word) * BPW);
    s_req.len   = LEN_W'(n * BPW);
    t0 = 0;
    while (!s_req_ready) begin @(negedge clk); end
    @(posedge clk);
    t = 0;
    @(negedge clk);
    s_req_valid = 1'b0;
    first_lat = -1;
    if (write) begin
      while (sent < n) begin
        s_wd_valid = ($urandom % 4 != 0);
        s_wd_data  = rnd_word();
        @(posedge clk);
        if (s_wd_valid && s_wd_ready) begin
          ref_mem[(word + sent) % (2**AW)] = s_wd_data;
          sent++;
        end
        @(negedge clk);
        s_wd_valid = 1'b0;
      end
    end else begin
      while (got < n) begin
        @(posedge clk);
        t++;
        if (s_rd_valid && s_rd_ready) begin
          logic [DW-1:0] exp;
          int a;
          a = (word + got) % (2**AW);
          exp = ref_mem.exists(a) ? ref_mem[a] : 'x;
          if (first_lat < 0) first_lat = t;
          checks++;
          if (ref_mem.exists(a) && s_rd_data != exp) begin
            failures++;
            if (failures < 10) $display("FAIL: word %0d read %h expected %h", a, s_rd_data, exp);
          end
          got++;
        end
        @(negedge clk);
      end
    end
    cycles = t;
  endtask

  initial begin
    longint fl, cy;
    int n_rd = 0, n_wr = 0;
    s_req_valid = 1'b0; s_req = '0; s_wd_valid = 1'b0; s_wd_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // fill a window, with one request wrapping at the top of the RAM
    do_req(1'b1, 0, 8, fl, cy);
    do_req(1'b1, 2**AW - 3, 6, fl, cy);
    n_wr += 2;
    for (int i = 0; i < 600; i++) begin
      int n, w;
      n = 1 + $urandom % 8;
      w = $urandom % 40;
      if ($urandom % 2) begin
        do_req(1'b1, w, n, fl, cy); n_wr++;
      end else begin
        // read only what has been written
        bit ok;
        ok = 1'b1;
        for (int k = 0; k < n; k++) if (!ref_mem.exists(w + k)) ok = 1'b0;
        if (ok) begin do_req(1'b0, w, n, fl, cy); n_rd++; end
      end
    end
    // wrapped read
    do_req(1'b0, 2**AW - 3, 6, fl, cy);
    // timing without back-pressure
    rd_bp = 1'b0;
    @(negedge clk);
    do_req(1'b0, 0, 8, fl, cy);
    checks++;
    if (fl != 2 || cy != 9) begin
      failures++;
      $display("FAIL: 8-word read: first word after %0d cycles, last after %0d (expected 2 and 9)", fl, cy);
    end
    $display("reads=%0d writes=%0d", n_rd, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
