// tb_imorc_reg_if: IMORC-to-register conversion. A register file of 32
// 64-bit registers sits on the register bus; single and multi-word writes
// and reads arrive on the IMORC slave port. Checks that writes land in the
// addressed registers (byte address / 8) and reads return them in order.
// A fixed sequence is followed by 400 random accesses (1..8 words, random
// start register, random gaps on write-data valid and read-data ready)
// checked against a reference copy of the register file; reg_re pulses are
// counted against the words read.
module tb_imorc_reg_if;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic s_req_valid, s_req_ready, s_wd_valid, s_wd_ready, s_rd_valid, s_rd_ready;
  imorc_req_t s_req;
  logic [63:0] s_wd_data, s_rd_data;
  logic reg_we, reg_re;
  logic [7:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata;

  imorc_reg_if #(.DW(64), .RA(8)) u_dut (.*);

  logic [63:0] regs [256];
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) if (reg_we) regs[reg_addr] <= reg_wdata;

  int checks = 0, failures = 0;
  int re_pulses = 0;
  always @(posedge clk) if (reg_re) re_pulses++;

  logic [63:0] model [256];

  task automatic rand_access(input bit wr, input int first, input int n);
    logic [63:0] d;
    @(negedge clk);
    s_req_valid = 1; s_req = '{write: wr, addr: ADDR_W'(8 * first), len: LEN_W'(8 * n)};
    @(posedge clk); while (!s_req_ready) @(posedge clk);
    @(negedge clk); s_req_valid = 0;
    for (int i = 0; i < n; i++) begin
      while ($urandom % 3 == 0) @(negedge clk);
      if (wr) begin
        d = {$urandom, $urandom};
        s_wd_valid = 1; s_wd_data = d;
        @(posedge clk); while (!s_wd_ready) @(posedge clk);
        model[(first + i) % 256] = d;
        @(negedge clk); s_wd_valid = 0;
      end else begin
        s_rd_ready = 1;
        @(posedge clk); while (!s_rd_valid) @(posedge clk);
        checks++;
        if (s_rd_data !== model[(first + i) % 256]) begin
          failures++;
          if (failures < 10) $display("FAIL: random read reg %0d got %h, expected %h",
                                      (first + i) % 256, s_rd_data, model[(first + i) % 256]);
        end
        @(negedge clk); s_rd_ready = 0;
      end
    end
  endtask

  task automatic access(input bit wr, input int addr, input int n, input logic [63:0] seed);
    @(negedge clk);
    s_req_valid = 1; s_req = '{write: wr, addr: ADDR_W'(addr), len: LEN_W'(8 * n)};
    @(posedge clk); while (!s_req_ready) @(posedge clk);
    @(negedge clk); s_req_valid = 0;
    for (int i = 0; i < n; i++) begin
      if (wr) begin
        s_wd_valid = 1; s_wd_data = seed + 64'(i);
        @(posedge clk); while (!s_wd_ready) @(posedge clk);
        @(negedge clk); s_wd_valid = 0;
      end else begin
        s_rd_ready = 1;
        @(posedge clk); while (!s_rd_valid) @(posedge clk);
        checks++;
        if (s_rd_data != seed + 64'(i)) begin
          failures++; $display("FAIL: read reg %0d got %h", addr / 8 + i, s_rd_data);
        end
        @(negedge clk); s_rd_ready = 0;
      end
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_req_valid = 0; s_wd_valid = 0; s_rd_ready = 0; s_req = '0; s_wd_data = '0;
    for (int i = 0; i < 256; i++) regs[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    access(1, 'h10, 1, 64'h1111);
    access(1, 'h40, 4, 64'h4000);
    access(1, 'h18, 1, 64'h2222);
    access(0, 'h10, 1, 64'h1111);
    access(0, 'h40, 4, 64'h4000);
    access(0, 'h18, 1, 64'h2222);
    checks++;
    if (regs[8'h48 / 8] != 64'h4001 || regs[8'h10 / 8] != 64'h1111) begin
      failures++; $display("FAIL: register contents");
    end
    // random phase
    for (int i = 0; i < 256; i++) model[i] = regs[i];
    begin
      int words_read;
      int first, n;
      bit wr;
      words_read = 0;
      re_pulses = 0;
      for (int k = 0; k < 400; k++) begin
        wr = ($urandom % 2 == 0);
        first = $urandom % 248;
        n = 1 + $urandom % 8;
        rand_access(wr, first, n);
        if (!wr) words_read += n;
      end
      @(negedge clk);
      checks++;
      if (re_pulses != words_read) begin
        failures++; $display("FAIL: %0d reg_re pulses for %0d words read", re_pulses, words_read);
      end
      for (int i = 0; i < 256; i++) begin
        checks++;
        if (regs[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: reg %0d = %h, expected %h", i, regs[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
