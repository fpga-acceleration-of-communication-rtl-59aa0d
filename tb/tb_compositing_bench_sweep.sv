// tb_compositing_bench_sweep: bandwidth micro-benchmark sweep. A small
// compositing run (40x16 pixels, three nodes) is followed by the request-size
// sweep of accel_env on all three memories: host memory over the HT
// interface in 8-byte steps, external and on-chip memory in 32-byte steps,
// up to 256-byte requests, each size written and read back (2 KiB per run).
// Prints bandwidth against request size for reads and writes and checks the
// data of every run.
module tb_compositing_bench_sweep;
  timeunit 1ns; timeprecision 1ps;

  localparam longint MAXCYC = 5_000_000;

  accel_env #(.W(40), .H(16), .NODES(3), .STALL(8), .HLAT(10), .MAXCYC(MAXCYC), .SWEEP(1'b1)) u_env ();

  // outer watchdog, a little after the environment's own
  initial begin
    #(real'(MAXCYC) * 5.0 + 1.0e6);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_env.checks, u_env.failures + 1);
    $finish;
  end
endmodule
