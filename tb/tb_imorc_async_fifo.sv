// tb_imorc_async_fifo: dual-clock FIFO test. The writer (7 ns clock) and the
// reader (5 ns clock) push and pop at random; every word read is compared
// with a scoreboard queue, so loss, duplication and reordering are caught.
// A phase with the reader stopped checks that the FIFO reports full after
// exactly 2**AW words, and one with the writer stopped that it drains and
// reports empty on both sides.
module tb_imorc_async_fifo;
  timeunit 1ns; timeprecision 1ps;

  localparam int AW = 3;
  logic w_clk = 0, r_clk = 0, w_rst_n = 0, r_rst_n = 0;
  always #3.5 w_clk = ~w_clk;
  always #2.5 r_clk = ~r_clk;

  logic w_valid, w_ready, w_empty, r_valid, r_ready;
  logic [15:0] w_data, r_data;

  imorc_async_fifo #(.W(16), .AW(AW)) u_dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] sb [$];
  int wr_on = 1, rd_on = 1, n_written = 0, n_read = 0;

  always @(negedge w_clk) begin
    w_valid = w_rst_n && wr_on && ($urandom_range(3) != 0);
    w_data  = 16'($urandom);
  end
  always @(posedge w_clk) if (w_valid && w_ready) begin sb.push_back(w_data); n_written++; end

  always @(negedge r_clk) r_ready = rd_on && ($urandom_range(2) != 0);
  always @(posedge r_clk) if (r_rst_n && r_valid && r_ready) begin
    checks++;
    n_read++;
    if (sb.size() == 0) begin failures++; $display("FAIL: read from empty"); end
    else begin
      logic [15:0] e;
      e = sb.pop_front();
      if (e != r_data) begin failures++; $display("FAIL: got %h expected %h", r_data, e); end
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
    w_valid = 0; r_ready = 0;
    #20 w_rst_n = 1; r_rst_n = 1;
    repeat (2000) @(posedge w_clk);
    // fill: stop the reader, let the writer run
    rd_on = 0;
    repeat (60) @(posedge w_clk);
    checks++;
    if (w_ready || sb.size() != 2**AW) begin
      failures++; $display("FAIL: full not reported (%0d words held)", sb.size());
    end
    // drain
    wr_on = 0; rd_on = 1;
    repeat (60) @(posedge w_clk);
    checks++;
    if (r_valid || !w_empty || sb.size() != 0) begin
      failures++; $display("FAIL: not empty after drain");
    end
    checks++;
    if (n_read < 500) begin failures++; $display("FAIL: only %0d words moved", n_read); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
