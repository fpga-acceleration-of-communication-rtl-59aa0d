// tb_load_sensor: FIFO load sensor. Random full/empty flags (held for random
// stretches so that both events and long stretches occur), a random enable
// and occasional clear pulses drive the sensor; a reference model in the
// testbench keeps its own counts, and every 50 cycles all counters are read
// back through the register port (within one clock phase) and compared.
module tb_load_sensor;
  timeunit 1ns;
  timeprecision 10ps;

  localparam int unsigned N = 3, CW = 32, RA = 4;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          enable, clear;
  logic [N-1:0]  full, empty;
  logic [RA-1:0] rd_addr;
  logic [CW-1:0] rd_data;

  int unsigned checks = 0, failures = 0;

  load_sensor #(.N(N), .CW(CW), .RA(RA)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference counts
  longint unsigned ref_cnt [4*N];
  bit [N-1:0] pf, pe;          // flags in the previous cycle
  bit         pen;             // enable in the previous cycle
  int unsigned n_events = 0, n_clears = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (clear) begin
        foreach (ref_cnt[i]) ref_cnt[i] = 0;
        n_clears++;
        pf = '0; pe = '0; pen = 1'b0;
      end else begin
        for (int i = 0; i < N; i++) if (enable) begin
          if (full[i] && !(pen && pf[i]))  begin ref_cnt[4*i+0]++; n_events++; end
          if (full[i])                     ref_cnt[4*i+1]++;
          if (empty[i] && !(pen && pe[i])) begin ref_cnt[4*i+2]++; n_events++; end
          if (empty[i])                    ref_cnt[4*i+3]++;
        end
        pf = full; pe = empty; pen = enable;
      end
    end
  end

  task automatic compare_all();
    for (int r = 0; r < 4 * N; r++) begin
      rd_addr = RA'(r);
      #0.1;
      checks++;
      if (rd_data != CW'(ref_cnt[r])) begin
        failures++;
        if (failures < 10) $display("FAIL: counter %0d = %0d, expected %0d", r, rd_data, ref_cnt[r]);
      end
    end
    // beyond the counters the port reads zero
    rd_addr = RA'(4 * N);
    #0.1;
    checks++;
    if (rd_data != '0) begin
      failures++;
      $display("FAIL: unused register reads %0d", rd_data);
    end
  endtask

  int unsigned hold [2*N];

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    pf = '0; pe = '0; pen = 1'b0;
    enable = 1'b0; clear = 1'b0; full = '0; empty = '0; rd_addr = '0;
    foreach (hold[i]) hold[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      if (c % 50 == 49) compare_all();
      // flags change after a random stretch of 1..8 cycles
      for (int i = 0; i < N; i++) begin
        if (hold[i] == 0)     begin full[i]  = ($urandom % 3 == 0); hold[i]     = 1 + $urandom % 8; end
        else hold[i]--;
        if (hold[N+i] == 0)   begin empty[i] = ($urandom % 2 == 0); hold[N+i]   = 1 + $urandom % 8; end
        else hold[N+i]--;
      end
      if ($urandom % 20 == 0) enable = ~enable;
      if (c < 100) enable = 1'b1;
      clear = ($urandom % 700 == 0);
    end
    @(negedge clk);
    clear = 1'b0;
    @(negedge clk);
    compare_all();
    checks++;
    if (n_events < 100) begin
      failures++;
      $display("FAIL: only %0d events", n_events);
    end
    $display("events=%0d clears=%0d", n_events, n_clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
