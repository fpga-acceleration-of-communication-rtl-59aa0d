// tb_compositing_controller: register file and pass sequencing. The test
// writes the registers over the register bus, starts runs of 4, 2 and 1
// frames, and plays the rest of the accelerator: on every pass_start it
// records the pass mode and frame address, then keeps req_busy, comp_busy and
// a not-drained write path up for random times. Checks: the sequence
// load / compose.. / final (a single frame is load + final), frame addresses
// FRAME_BASE + k*FRAME_STRIDE, no new pass before the previous one has fully
// drained, STATUS and done, read-back of the registers, and that a start
// while busy is ignored.
module tb_compositing_controller;
  timeunit 1ns; timeprecision 1ps;
  import imorc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic reg_we, reg_re;
  logic [7:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata;
  logic pass_start, busy, done;
  pass_mode_t pass_mode;
  logic [31:0] size, words;
  logic [ADDR_W-1:0] mem_base, host_base, out_base;
  logic req_busy, comp_busy, wr_drained;

  compositing_controller #(.DW(64), .RA(8)) u_dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [63:0] d);
    @(negedge clk); reg_we = 1; reg_addr = 8'(a / 8); reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input int a, output logic [63:0] d);
    @(negedge clk); reg_addr = 8'(a / 8); reg_re = 1; #1 d = reg_rdata;
    @(negedge clk); reg_re = 0;
  endtask

  // the rest of the accelerator: busy for a while after each pass start
  pass_mode_t modes [$];
  logic [ADDR_W-1:0] bases [$];
  int busy_cnt = 0, drain_cnt = 0, early = 0;
  always @(posedge clk) begin
    if (pass_start) begin
      modes.push_back(pass_mode);
      bases.push_back(host_base);
      if (busy_cnt != 0 || drain_cnt != 0) early++;
      busy_cnt  <= $urandom_range(3, 30);
      drain_cnt <= $urandom_range(1, 10);
    end else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    else if (drain_cnt != 0) drain_cnt <= drain_cnt - 1;
  end
  assign req_busy   = (busy_cnt > 10);
  assign comp_busy  = (busy_cnt != 0);
  assign wr_drained = (busy_cnt == 0) && (drain_cnt == 0);

  task automatic run(input int nodes);
    logic [63:0] d;
    modes.delete(); bases.delete();
    wr('h20, 64'(nodes));
    wr('h00, 64'd1);
    rd('h08, d);
    chk(d[0] == 1'b1 && busy, "STATUS.busy after start");
    wr('h10, 64'd999);                 // ignored while busy
    wr('h00, 64'd1);                   // ignored while busy
    while (!done) @(negedge clk);
    rd('h08, d);
    chk(d[1:0] == 2'b10 && d[47:16] == 32'(nodes), $sformatf("STATUS after %0d frames: %h", nodes, d));
    chk(modes.size() == nodes, $sformatf("%0d passes for %0d frames", modes.size(), nodes));
    for (int k = 0; k < modes.size(); k++) begin
      bit last;
      last = (k == nodes - 1);
      chk(modes[k].load == (k == 0) && modes[k].write_host == last && modes[k].write_mem == !last,
          $sformatf("mode of pass %0d of %0d", k, nodes));
      chk(bases[k] == ADDR_W'(40'h2_0000 + k * 40'h3000), $sformatf("frame address of pass %0d", k));
    end
    rd('h10, d);
    chk(d == 64'd64, "WIDTH unchanged by a write while busy");
    rd('h48, d);
    chk(d > 0, "CYCLES counted");
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    reg_we = 0; reg_re = 0; reg_addr = 0; reg_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr('h10, 64'd64); wr('h18, 64'd10);
    wr('h28, 64'h10_0000); wr('h30, 64'h2_0000); wr('h38, 64'h3000); wr('h40, 64'h9_0000);
    rd('h18, d); chk(d == 64'd10, "HEIGHT read-back");
    rd('h40, d); chk(d == 64'h9_0000, "OUT_BASE read-back");
    chk(size == 32'd640 && words == 32'd320, "size and word count");
    run(4);
    run(2);
    run(1);
    chk(early == 0, "no pass started before the previous one drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
