// tb_composer: checks the compositing datapath against a software model.
// Four input streams with random gaps and three output sinks with random
// back-pressure; every output word is compared with the expected
// compare-and-select result (signed depth, new frame wins only when strictly
// nearer). Runs a load pass, a compose pass writing external memory, and a
// final pass writing the host. A last pass with no gaps checks the rate of
// one 64-bit word (two pixels) per cycle.
module tb_composer;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic start, busy;
  pass_mode_t mode;
  logic [31:0] words, taken_new;
  logic z0_valid, f0_valid, z1_valid, f1_valid, z0_ready, f0_ready, z1_ready, f1_ready;
  logic [63:0] z0_data, f0_data, z1_data, f1_data;
  logic zc_valid, fc_valid, fh_valid, zc_ready, fc_ready, fh_ready;
  logic [63:0] zc_data, fc_data, fh_data;

  composer u_dut (.*);

  int checks = 0, failures = 0;
  int gaps = 1, stalls = 1;     // 1: random gaps / back-pressure on

  // input words are functions of (pass, index)
  int pass_no;
  function automatic logic [63:0] zin(int src, int p, int i);
    int a, b;
    // every third word has equal depths in both frames
    a = ((i * 7 + p * 13 + src * (i % 3) * 5) % 19) - 9;
    b = ((i * 11 + p * 3 + src * (i % 3) * 17) % 23) - 11;
    return {32'(b), 32'(a)};
  endfunction
  function automatic logic [63:0] fin(int src, int p, int i);
    return {32'(src * 1000000 + p * 10000 + 2 * i + 1), 32'(src * 1000000 + p * 10000 + 2 * i)};
  endfunction

  int i0, i1;    // input word indices
  always_ff @(posedge clk) begin
    if (z0_valid && z0_ready) i0 <= i0 + 1;
    if (z1_valid && z1_ready) i1 <= i1 + 1;
  end
  logic g0, g1;
  always_ff @(posedge clk) begin
    g0 <= (gaps == 0) || ($urandom_range(3) != 0);
    g1 <= (gaps == 0) || ($urandom_range(3) != 0);
  end
  int nwords;
  assign z0_valid = g0 && (i0 < nwords);
  assign f0_valid = z0_valid;
  assign z1_valid = g1 && (i1 < nwords);
  assign f1_valid = z1_valid;
  assign z0_data = zin(0, pass_no, i0);
  assign f0_data = fin(0, pass_no, i0);
  assign z1_data = zin(1, pass_no, i1);
  assign f1_data = fin(1, pass_no, i1);

  always_ff @(posedge clk) begin
    zc_ready <= (stalls == 0) || ($urandom_range(2) != 0);
    fc_ready <= (stalls == 0) || ($urandom_range(2) != 0);
    fh_ready <= (stalls == 0) || ($urandom_range(2) != 0);
  end

  // expected output for word i of the current pass
  function automatic void expect_word(int i, bit load, output logic [63:0] z, output logic [63:0] f);
    logic [63:0] za, zb, fa, fb;
    za = zin(0, pass_no, i); zb = zin(1, pass_no, i);
    fa = fin(0, pass_no, i); fb = fin(1, pass_no, i);
    for (int p = 0; p < 2; p++) begin
      bit take;
      take = load || ($signed(zb[p*32 +: 32]) < $signed(za[p*32 +: 32]));
      z[p*32 +: 32] = take ? zb[p*32 +: 32] : za[p*32 +: 32];
      f[p*32 +: 32] = take ? fb[p*32 +: 32] : fa[p*32 +: 32];
    end
  endfunction

  int nzc, nfc, nfh, exp_taken;
  always @(posedge clk) if (rst_n) begin
    logic [63:0] z, f;
    if (zc_valid && zc_ready) begin
      expect_word(nzc, mode.load, z, f);
      checks++; if (zc_data != z) begin failures++; $display("FAIL zc word %0d", nzc); end
      nzc++;
    end
    if (fc_valid && fc_ready) begin
      expect_word(nfc, mode.load, z, f);
      checks++; if (fc_data != f) begin failures++; $display("FAIL fc word %0d", nfc); end
      nfc++;
    end
    if (fh_valid && fh_ready) begin
      expect_word(nfh, mode.load, z, f);
      checks++; if (fh_data != f) begin failures++; $display("FAIL fh word %0d", nfh); end
      nfh++;
    end
  end

  task automatic run_pass(input int p, input bit load, input bit wm, input bit wh, input int n,
                          output int cycles);
    int t;
    pass_no = p; nwords = n;
    i0 = load ? n : 0; i1 = 0; nzc = 0; nfc = 0; nfh = 0;
    exp_taken = 0;
    for (int i = 0; i < n; i++) begin
      logic [63:0] za, zb;
      za = zin(0, p, i); zb = zin(1, p, i);
      for (int q = 0; q < 2; q++)
        if (load || $signed(zb[q*32 +: 32]) < $signed(za[q*32 +: 32])) exp_taken++;
    end
    @(negedge clk);
    mode = '{load: load, write_mem: wm, write_host: wh};
    words = 32'(n); start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (busy) begin @(negedge clk); t++; end
    cycles = t;
    checks++;
    if (nzc != (wm ? n : 0) || nfc != (wm ? n : 0) || nfh != (wh ? n : 0)) begin
      failures++; $display("FAIL pass %0d word counts %0d %0d %0d", p, nzc, nfc, nfh);
    end
    checks++;
    if (taken_new != 32'(exp_taken)) begin
      failures++; $display("FAIL pass %0d taken_new %0d expected %0d", p, taken_new, exp_taken);
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
    int cyc;
    start = 0; mode = '0; words = 0; pass_no = 0; nwords = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_pass(0, 1, 1, 0, 50, cyc);   // load
    run_pass(1, 0, 1, 0, 60, cyc);   // compose to memory
    run_pass(2, 0, 0, 1, 40, cyc);   // final, to host
    // rate: no gaps, no back-pressure: one word per cycle plus one cycle latency
    gaps = 0; stalls = 0;
    repeat (3) @(negedge clk);
    run_pass(3, 0, 1, 1, 100, cyc);
    checks++;
    if (cyc != 101) begin failures++; $display("FAIL rate: %0d cycles for 100 words", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
