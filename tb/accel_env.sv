// accel_env: end-to-end test environment for compositing_accel.
//
// It puts the accelerator (at its default parameters) between a model of the
// HyperTransport side with host memory and a model of the DDR controller with
// external memory, then plays the host's part: it fills the page mapping
// table with a scrambled page mapping, stores NODES rendered frames (colour
// buffer followed by depth buffer) in host memory, programs the control
// registers, starts the accelerator and waits for it. The composed colour
// image in host memory and the intermediate image left in external memory
// are compared pixel by pixel with a reference computed here from the same
// frame data (nearest depth wins, a tie keeps the earlier frame).
// It also counts how often each mechanism of the design was exercised: load,
// compose and final passes, 64-byte packet splitting, page-table translation
// across pages, read-modify-write bursts, arbiter contention, host back-pressure,
// composer input stalls, FIFOs running full and empty (also read back from
// the load sensor and compared), and pixels taken from new and from stored frames; a
// mechanism that never happened counts as a failure. Afterwards the three
// bandwidth micro-benchmark cores write and read back host, external and
// on-chip memory (the host region crosses a page, the external one is not
// burst-aligned), and their data and statistics are checked. With SWEEP set,
// each benchmark core then sweeps the request size in steps of its link word
// (8 bytes to the host, 32 bytes to the memories, up to 256 bytes), writing
// and reading 2 KiB per size; data, checksums and statistics are checked for
// every run and a bandwidth table (2 KiB over the run's cycles at 200 MHz,
// including the drain of posted write data) is printed. With one request in
// flight, reads wait for the memory every time, so the largest read size must
// give more bandwidth than the smallest.
module accel_env #(
  parameter int unsigned W       = 40,
  parameter int unsigned H       = 13,
  parameter int unsigned NODES   = 4,
  parameter int unsigned STALL   = 8,     // host back-pressure: 1 in STALL cycles
  parameter int unsigned HLAT    = 10,    // host read latency in cycles
  parameter longint      MAXCYC  = 2_000_000,
  parameter bit          SWEEP   = 1'b0   // bandwidth sweep over request sizes
);
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  localparam int unsigned SIZE   = W * H;
  localparam longint      STRIDE = ((longint'(SIZE) * 8 + 4095) / 4096) * 4096;
  localparam longint      OUT_VA = STRIDE * NODES;
  localparam longint      BENCH_VA = ((OUT_VA + longint'(SIZE) * 4 + 4095) / 4096) * 4096;
  localparam int unsigned NPAGES = int'(BENCH_VA / 4096) + 2;   // + two pages for the benchmark
  localparam longint      MEM_BASE = 64'h0010_0000;

  logic clk = 1'b0, mem_clk = 1'b0, rst_n = 1'b0, mem_rst_n = 1'b0;
  always #2.5 clk = ~clk;          // 200 MHz
  always #3.3 mem_clk = ~mem_clk;  // unrelated memory clock

  // ---------------- DUT and models ----------------
  logic              cpu_valid, cpu_ready, cpu_write, cpu_rsp_valid;
  logic [1:0]        cpu_region;
  logic [ADDR_W-1:0] cpu_addr;
  logic [63:0]       cpu_wdata, cpu_rsp_data;
  logic              ht_cmd_valid, ht_cmd_ready, ht_cmd_write, ht_wd_valid, ht_wd_ready;
  logic              ht_rd_valid, ht_rd_ready;
  logic [ADDR_W-1:0] ht_cmd_addr;
  logic [6:0]        ht_cmd_bytes;
  logic [63:0]       ht_wd_data, ht_rd_data;
  logic              bulk_req_valid, bulk_wd_valid, bulk_rd_ready;
  imorc_req_t        bulk_req;
  logic [63:0]       bulk_wd_data;
  logic              mem_cmd_valid, mem_cmd_ready, mem_cmd_write, mem_wd_valid, mem_wd_ready, mem_rd_valid;
  logic [24:0]       mem_cmd_addr;
  logic [127:0]      mem_wd_data, mem_rd_data;
  logic              busy, done;
  logic [31:0]       rmw_count, taken_new;
  logic [2:0]        bench_start = '0;
  bench_cfg_t        bench_cfg [3];
  bench_stat_t       bench_stat [3];
  logic [2:0]        bench_res_valid;
  logic [31:0]       bench_res_cycles [3];

  compositing_accel u_dut (
    .clk, .rst_n, .mem_clk, .mem_rst_n,
    .cpu_valid, .cpu_ready, .cpu_write, .cpu_region, .cpu_addr, .cpu_wdata,
    .cpu_rsp_valid, .cpu_rsp_data,
    .ht_cmd_valid, .ht_cmd_ready, .ht_cmd_write, .ht_cmd_addr, .ht_cmd_bytes,
    .ht_wd_valid, .ht_wd_ready, .ht_wd_data, .ht_rd_valid, .ht_rd_ready, .ht_rd_data,
    .bulk_req_valid, .bulk_req_ready(1'b1), .bulk_req,
    .bulk_wd_valid, .bulk_wd_ready(1'b1), .bulk_wd_data,
    .bulk_rd_valid(1'b0), .bulk_rd_ready, .bulk_rd_data(64'd0),
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_write, .mem_cmd_addr,
    .mem_wd_valid, .mem_wd_ready, .mem_wd_data, .mem_rd_valid, .mem_rd_data,
    .busy, .done, .rmw_count, .taken_new,
    .bench_start, .bench_cfg, .bench_stat, .bench_res_valid, .bench_res_cycles
  );

  host_mem_model #(.AW(ADDR_W), .LAT(HLAT), .STALL(STALL)) u_hmem (
    .clk, .rst_n,
    .cmd_valid(ht_cmd_valid), .cmd_ready(ht_cmd_ready), .cmd_write(ht_cmd_write),
    .cmd_addr(ht_cmd_addr), .cmd_bytes(ht_cmd_bytes),
    .wd_valid(ht_wd_valid), .wd_ready(ht_wd_ready), .wd_data(ht_wd_data),
    .rd_valid(ht_rd_valid), .rd_ready(ht_rd_ready), .rd_data(ht_rd_data)
  );

  ddr_mem_model #(.MW(128), .BURST(8), .BA_W(25)) u_dmem (
    .clk(mem_clk), .rst_n(mem_rst_n),
    .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_write(mem_cmd_write),
    .cmd_addr(mem_cmd_addr),
    .wd_valid(mem_wd_valid), .wd_ready(mem_wd_ready), .wd_data(mem_wd_data),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data)
  );

  // ---------------- reference data ----------------
  // page v of the accelerator's host address space lives at physical page
  // 7*v + 3 (distinct pages, never adjacent)
  function automatic longint phys(longint va);
    return ((va >> 12) * 7 + 3) * 4096 + (va & 4095);
  endfunction

  function automatic logic [31:0] colour(int unsigned k, int unsigned i);
    return 32'(k * 32'h0100_0000 + i * 32'h9e37 + 32'h55);
  endfunction

  // small signed depths so that near, far and tied pixels all occur
  function automatic logic [31:0] depth(int unsigned k, int unsigned i);
    int unsigned h;
    h = (i * 2654435761) ^ (k * 40503) ^ (i >> 3);
    h = h ^ (h >> 13);
    return 32'($signed(int'(h % 41)) - 20);
  endfunction

  function automatic logic [63:0] pair(logic [31:0] lo, logic [31:0] hi);
    return {hi, lo};
  endfunction

  logic [31:0] exp_col [SIZE], exp_z [SIZE];   // after all frames
  logic [31:0] mid_col [SIZE], mid_z [SIZE];   // after frames 0 .. NODES-2

  // ---------------- host actions ----------------
  int unsigned checks = 0, failures = 0;
  longint      cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // the CPU port is driven and sampled on the falling edge of clk
  task automatic cpu_wr(input logic [1:0] region, input longint addr, input logic [63:0] data);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    cpu_valid = 1'b1; cpu_write = 1'b1; cpu_region = region;
    cpu_addr = ADDR_W'(addr); cpu_wdata = data;
    @(negedge clk);
    cpu_valid = 1'b0;
  endtask

  task automatic cpu_rd(input logic [1:0] region, input longint addr, output logic [63:0] data);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    cpu_valid = 1'b1; cpu_write = 1'b0; cpu_region = region; cpu_addr = ADDR_W'(addr);
    @(negedge clk);
    cpu_valid = 1'b0;
    while (!cpu_rsp_valid) @(negedge clk);
    data = cpu_rsp_data;
  endtask

  // Runs benchmark core b (0 host, 1 external, 2 on-chip memory) and checks
  // its statistics; write tests leave each 64-bit lane holding its address.
  int unsigned n_bench = 0, n_bench_res = 0;
  always @(posedge clk) if (rst_n) n_bench_res += $countones(bench_res_valid);

  task automatic bench(input int b, input bit write, input longint base, input int total, input int rbytes);
    int unsigned res0;
    @(negedge clk);
    res0 = n_bench_res;
    bench_cfg[b].write = write;
    bench_cfg[b].base = ADDR_W'(base);
    bench_cfg[b].total = 32'(total);
    bench_cfg[b].req_bytes = LEN_W'(rbytes);
    bench_start[b] = 1'b1;
    @(negedge clk);
    bench_start[b] = 1'b0;
    while (!bench_stat[b].done) @(negedge clk);
    repeat (400) @(negedge clk);   // let the memory side finish the last writes
    n_bench++;
    check(bench_stat[b].n_req == 32'((total + rbytes - 1) / rbytes) && n_bench_res - res0 == bench_stat[b].n_req,
          $sformatf("benchmark %0d: request count", b));
    check(bench_stat[b].min_cycles > 0 && bench_stat[b].min_cycles <= bench_stat[b].max_cycles &&
          64'(bench_stat[b].sum_cycles) <= 64'(bench_stat[b].total_cycles),
          $sformatf("benchmark %0d: cycle statistics", b));
    $display("benchmark %0d %s: %0d bytes in %0d requests of %0d, %0d..%0d cycles per request, %0d cycles in all",
             b, write ? "write" : "read", total, bench_stat[b].n_req, rbytes,
             bench_stat[b].min_cycles, bench_stat[b].max_cycles, bench_stat[b].total_cycles);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int unsigned n_load = 0, n_compose = 0, n_final = 0, n_arb_conflict = 0, n_comp_stall = 0;
  int unsigned n_taken_new = 0, n_taken_old = 0, n_page_cross = 0;
  longint      last_page = -1;
  // reference for the load sensor: per stream buffer, full/empty events and
  // cycles during the run
  longint unsigned ls_ref [28];
  bit [6:0] ls_pf, ls_pe;
  bit       ls_pbusy = 1'b0;
  always @(posedge clk) if (rst_n) begin
    bit [6:0] f, e;
    for (int s = 0; s < 4; s++) begin
      f[s] = !u_dut.sb_rd_ready[s];
      e[s] = !u_dut.st_valid[s];
    end
    for (int s = 4; s < 7; s++) begin
      f[s] = !u_dut.st_ready[s];
      e[s] = u_dut.sb_idle[s];
    end
    if (busy && !ls_pbusy) begin
      foreach (ls_ref[i]) ls_ref[i] = 0;
      ls_pf = '0; ls_pe = '0;
    end else if (busy) begin
      for (int s = 0; s < 7; s++) begin
        if (f[s] && !ls_pf[s]) ls_ref[4*s+0]++;
        if (f[s])              ls_ref[4*s+1]++;
        if (e[s] && !ls_pe[s]) ls_ref[4*s+2]++;
        if (e[s])              ls_ref[4*s+3]++;
      end
      ls_pf = f; ls_pe = e;
    end else begin
      ls_pf = '0; ls_pe = '0;
    end
    ls_pbusy = busy;
  end

  always @(posedge clk) if (rst_n) begin
    if (u_dut.pass_start) begin
      if (u_dut.pass_mode.load) n_load++;
      else if (u_dut.pass_mode.write_host) n_final++;
      else n_compose++;
    end
    if (u_dut.u_composer.left != 0 && !u_dut.u_composer.in_ok) n_comp_stall++;
    if (u_dut.u_composer.fire && !u_dut.u_composer.m.load) begin
      for (int p = 0; p < 2; p++)
        if (u_dut.u_composer.take_new[p]) n_taken_new++; else n_taken_old++;
    end
    if (ht_cmd_valid && ht_cmd_ready) begin
      if (last_page >= 0 && (longint'(ht_cmd_addr) >> 12) != last_page + 1 &&
          (longint'(ht_cmd_addr) >> 12) != last_page) n_page_cross++;
      last_page = longint'(ht_cmd_addr) >> 12;
    end
  end
  always @(posedge mem_clk) if (mem_rst_n)
    if ($countones(u_dut.u_mem_arb.in_req_valid) > 1) n_arb_conflict++;

  // ---------------- watchdog ----------------
  initial begin
    wait (cyc >= MAXCYC);
    failures++;
    $display("FAIL: watchdog after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    logic [63:0] rd;
    longint      t0, t1;
    int unsigned rmw_comp;
    cpu_valid = 1'b0; cpu_write = 1'b0; cpu_region = '0; cpu_addr = '0; cpu_wdata = '0;
    foreach (bench_cfg[b]) bench_cfg[b] = '0;

    // reference
    for (int unsigned i = 0; i < SIZE; i++) begin
      exp_col[i] = colour(0, i); exp_z[i] = depth(0, i);
      for (int unsigned k = 1; k < NODES; k++) begin
        if (k == NODES - 1) begin mid_col[i] = exp_col[i]; mid_z[i] = exp_z[i]; end
        if ($signed(depth(k, i)) < $signed(exp_z[i])) begin
          exp_col[i] = colour(k, i); exp_z[i] = depth(k, i);
        end
      end
    end

    // host memory: NODES frames, colour buffer then depth buffer
    for (int unsigned k = 0; k < NODES; k++)
      for (int unsigned i = 0; i < SIZE; i += 2) begin
        longint va;
        va = longint'(k) * STRIDE + longint'(i) * 4;
        u_hmem.mem[phys(va) >> 3] = pair(colour(k, i), colour(k, i + 1));
        va = va + longint'(SIZE) * 4;
        u_hmem.mem[phys(va) >> 3] = pair(depth(k, i), depth(k, i + 1));
      end

    repeat (5) @(posedge clk);
    rst_n = 1'b1; mem_rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // page mapping table
    for (int unsigned v = 0; v < NPAGES; v++)
      cpu_wr(2'd2, longint'(v) * 8, 64'(phys(longint'(v) * 4096)));
    cpu_rd(2'd2, 8, rd);
    check(rd == 64'(phys(4096)), $sformatf("page table read-back %h", rd));

    // registers
    cpu_wr(2'd0, 'h10, 64'(W));
    cpu_wr(2'd0, 'h18, 64'(H));
    cpu_wr(2'd0, 'h20, 64'(NODES));
    cpu_wr(2'd0, 'h28, 64'(MEM_BASE));
    cpu_wr(2'd0, 'h30, 64'd0);
    cpu_wr(2'd0, 'h38, 64'(STRIDE));
    cpu_wr(2'd0, 'h40, 64'(OUT_VA));
    cpu_rd(2'd0, 'h38, rd);
    check(rd == 64'(STRIDE), "FRAME_STRIDE read-back");
    cpu_rd(2'd0, 'h10, rd);
    check(rd == 64'(W), "WIDTH read-back");

    // run
    cpu_wr(2'd0, 'h00, 64'd1);
    t0 = cyc;
    cpu_rd(2'd0, 'h08, rd);
    check(rd[0] == 1'b1, "STATUS.busy while running");
    wait (done);
    t1 = cyc;
    $display("composed %0d frames of %0dx%0d in %0d cycles", NODES, W, H, t1 - t0);
    cpu_rd(2'd0, 'h08, rd);
    check(rd[1:0] == 2'b10 && rd[47:16] == 32'(NODES), "STATUS done, frame count");

    // final colour image in host memory
    begin
      int unsigned bad = 0;
      for (int unsigned i = 0; i < SIZE; i += 2) begin
        logic [63:0] got;
        got = u_hmem.peek(phys(OUT_VA + longint'(i) * 4) >> 3);
        if (got != pair(exp_col[i], exp_col[i + 1])) begin
          bad++;
          if (bad < 5) $display("  pixel %0d: got %h expected %h", i, got, pair(exp_col[i], exp_col[i + 1]));
        end
        checks++;
      end
      failures += bad;
    end
    // intermediate image in external memory (frames 0 .. NODES-2)
    if (NODES > 1) begin
      int unsigned bad = 0;
      for (int unsigned i = 0; i < SIZE; i += 4) begin
        logic [127:0] got_c, got_z;
        got_c = u_dmem.peek((MEM_BASE + longint'(i) * 4) >> 4);
        got_z = u_dmem.peek((MEM_BASE + longint'(SIZE) * 4 + longint'(i) * 4) >> 4);
        if (got_c != {mid_col[i+3], mid_col[i+2], mid_col[i+1], mid_col[i]} ||
            got_z != {mid_z[i+3], mid_z[i+2], mid_z[i+1], mid_z[i]}) bad++;
        checks++;
      end
      if (bad != 0) $display("FAIL: %0d stored words differ", bad);
      failures += bad;
    end

    // load sensor counters against the reference
    begin
      int unsigned bad = 0, full_ev = 0, empty_ev = 0;
      for (int r = 0; r < 28; r++) begin
        cpu_rd(2'd0, 'h100 + 8 * r, rd);
        checks++;
        if (rd != 64'(ls_ref[r] & 32'hffff_ffff)) begin
          bad++;
          if (bad < 5) $display("  load sensor %0d: got %0d expected %0d", r, rd, ls_ref[r]);
        end
        if (r % 4 == 0) full_ev += int'(rd);
        if (r % 4 == 2) empty_ev += int'(rd);
      end
      failures += bad;
      $display("load sensor: full events=%0d empty events=%0d (S2M Z1 full %0d cycles, empty %0d cycles)",
               full_ev, empty_ev, ls_ref[9], ls_ref[11]);
      check(full_ev > 0, "load sensor saw a full FIFO");
      check(empty_ev > 0, "load sensor saw an empty FIFO");
    end

    // read-modify-writes of the compositing run itself
    rmw_comp = rmw_count;

    // bandwidth micro-benchmark on all three memories
    begin
      localparam longint HB = BENCH_VA + 4096 - 1024;   // crosses a page
      localparam longint MB = MEM_BASE + 2 * longint'(SIZE) * 4 + 4096 + 32;  // not burst-aligned
      int unsigned rmw0, bad;
      logic [63:0] sum;
      // host memory
      bench(0, 1'b1, HB, 2048, 192);
      bad = 0;
      for (longint a = HB; a < HB + 2048; a += 8) if (u_hmem.peek(phys(a) >> 3) != 64'(a)) bad++;
      check(bad == 0, $sformatf("benchmark host write: %0d words wrong", bad));
      bench(0, 1'b0, HB, 2048, 64);
      sum = '0;
      for (longint a = HB; a < HB + 2048; a += 8) sum ^= 64'(a);
      check(bench_stat[0].checksum == sum, "benchmark host read checksum");
      // external memory: misaligned, so the writes need read-modify-write
      rmw0 = rmw_count;
      bench(1, 1'b1, MB, 1024, 96);
      check(rmw_count > rmw0, "benchmark external write needed read-modify-write");
      bad = 0;
      for (longint a = MB; a < MB + 1024; a += 16) begin
        logic [127:0] w;
        w = u_dmem.peek(a >> 4);
        if (w != {64'(a + 8), 64'(a)}) bad++;
      end
      check(bad == 0, $sformatf("benchmark external write: %0d words wrong", bad));
      bench(1, 1'b0, MB - 32, 2048, 256);
      sum = '0;
      for (longint a = MB - 32; a < MB - 32 + 2048; a += 16) begin
        logic [127:0] w;
        w = u_dmem.peek(a >> 4);
        sum ^= w[63:0] ^ w[127:64];
      end
      check(bench_stat[1].checksum == sum, "benchmark external read checksum");
      // on-chip memory
      bench(2, 1'b1, 'h400, 4096, 512);
      bad = 0;
      for (int w = 0; w < 4096 / 32; w++)
        for (int l = 0; l < 4; l++)
          if (u_dut.u_int_mem.ram['h400 / 32 + w][64*l +: 64] != 64'('h400 + 32 * w + 8 * l)) bad++;
      check(bad == 0, $sformatf("benchmark on-chip write: %0d lanes wrong", bad));
      bench(2, 1'b0, 'h400, 4096, 128);
      sum = '0;
      for (longint a = 'h400; a < 'h400 + 4096; a += 8) sum ^= 64'(a);
      check(bench_stat[2].checksum == sum, "benchmark on-chip read checksum");
      check(n_bench == 6, "six benchmark runs");
    end

    if (SWEEP) begin
      localparam longint SB [3] = '{BENCH_VA + 4096 - 1024,
                                    MEM_BASE + 2 * longint'(SIZE) * 4 + 8192,
                                    'h2000};
      localparam int STEP [3] = '{8, 32, 32};
      string name [3] = '{"host", "external", "on-chip"};
      for (int b = 0; b < 3; b++) begin
        real bw_first_r, bw_w, bw_r;
        for (int sz = STEP[b]; sz <= 256; sz += STEP[b]) begin
          int unsigned bad;
          logic [63:0] sum, got;
          bench(b, 1'b1, SB[b], 2048, sz);
          bw_w = 200.0 * 2048.0 / real'(bench_stat[b].total_cycles);
          bad = 0;
          sum = '0;
          for (longint a = SB[b]; a < SB[b] + 2048; a += 8) begin
            case (b)
              0: got = u_hmem.peek(phys(a) >> 3);
              1: got = u_dmem.peek(a >> 4) >> (64 * ((a >> 3) & 1));
              default: got = u_dut.u_int_mem.ram[a >> 5][64 * ((a >> 3) & 3) +: 64];
            endcase
            if (got != 64'(a)) bad++;
            sum ^= 64'(a);
          end
          check(bad == 0, $sformatf("sweep %s write %0d B: %0d words wrong", name[b], sz, bad));
          bench(b, 1'b0, SB[b], 2048, sz);
          bw_r = 200.0 * 2048.0 / real'(bench_stat[b].total_cycles);
          check(bench_stat[b].checksum == sum, $sformatf("sweep %s read %0d B checksum", name[b], sz));
          $display("sweep %-8s %3d B requests: write %7.1f MB/s, read %7.1f MB/s", name[b], sz, bw_w, bw_r);
          if (sz == STEP[b]) bw_first_r = bw_r;
        end
        check(bw_r > bw_first_r, $sformatf("sweep %s: read bandwidth grows with the request size", name[b]));
      end
    end

    // every mechanism must have happened
    $display("loads=%0d composes=%0d finals=%0d rmw=%0d packets=%0d max_packet=%0d page_jumps=%0d",
             n_load, n_compose, n_final, rmw_comp, u_hmem.n_packets, u_hmem.max_bytes, n_page_cross);
    $display("arb_conflicts=%0d host_stalls=%0d composer_stalls=%0d taken_new=%0d taken_old=%0d",
             n_arb_conflict, u_hmem.n_stall_cycles, n_comp_stall, n_taken_new, n_taken_old);
    check(n_load == 1, "one load pass");
    check(n_final == 1, "one final pass");
    check(n_compose == NODES - 2, "compose passes");
    // a read-modify-write is needed exactly when a buffer does not end, or the
    // depth buffer does not start, on a 128-byte burst boundary
    check((rmw_comp > 0) == ((SIZE * 4) % 128 != 0), "read-modify-write when and only when needed");
    check(u_hmem.max_bytes == 64, "64-byte HT packets");
    check(n_page_cross > 0, "page mapping across pages");
    check(n_arb_conflict > 0, "arbiter contention");
    check(STALL == 0 || u_hmem.n_stall_cycles > 0, "host back-pressure");
    check(n_comp_stall > 0, "composer waited for data");
    check(n_taken_new > 0 && n_taken_old > 0, "both frames won pixels");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
