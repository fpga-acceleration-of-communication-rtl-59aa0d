// tb_imorc_width_conv: bitwidth conversion in both directions. A 64->256
// packer and a 256->64 splitter are chained; random source gaps and sink
// back-pressure. The wide words are compared with the expected little-endian
// packing of the source words, and the narrow words out of the splitter with
// the source sequence. A gap-free run checks one narrow word per cycle.
module tb_imorc_width_conv;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic        a_valid, a_ready, b_valid, b_ready, c_valid, c_ready;
  logic [63:0] a_data, c_data;
  logic [255:0] b_data;

  imorc_width_conv #(.IN_W(64), .OUT_W(256)) u_up (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data));
  imorc_width_conv #(.IN_W(256), .OUT_W(64)) u_down (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data));

  int checks = 0, failures = 0;
  int n_in = 0, n_mid = 0, n_out = 0, total = 400, free_run = 0;

  function automatic logic [63:0] word(int i);
    return {32'(i * 3 + 1), 32'(i ^ 32'h5a5a)};
  endfunction

  always @(negedge clk) begin
    a_valid = rst_n && (n_in < total) && (free_run != 0 || $urandom_range(3) != 0);
    a_data  = word(n_in);
    c_ready = (free_run != 0) || ($urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_valid && a_ready) n_in++;
    if (b_valid && b_ready) begin
      checks++;
      if (b_data != {word(4*n_mid+3), word(4*n_mid+2), word(4*n_mid+1), word(4*n_mid)}) begin
        failures++; $display("FAIL: wide word %0d", n_mid);
      end
      n_mid++;
    end
    if (c_valid && c_ready) begin
      checks++;
      if (c_data != word(n_out)) begin failures++; $display("FAIL: narrow word %0d", n_out); end
      n_out++;
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
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_out == total);
    // gap-free run of 200 more words
    @(negedge clk);
    free_run = 1; total = 600; t0 = 0;
    while (n_out < 600) begin @(negedge clk); t0++; end
    checks++;
    if (t0 > 200 + 8) begin failures++; $display("FAIL: 200 words took %0d cycles", t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
