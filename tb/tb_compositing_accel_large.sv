// tb_compositing_accel_large: the largest configuration evaluated for the
// compositing accelerator: eight rendering nodes delivering 1280x1024 frames
// (colour and depth, 10.5 MB per frame), the accelerator at its default
// parameters. The same checks as the other end-to-end tests (see accel_env):
// final image in host memory and intermediate image in external memory pixel
// by pixel, every mechanism counted. 1280x1024 pixels are a whole number of
// 128-byte bursts, so no read-modify-write may occur in the compositing.
module tb_compositing_accel_large;
  timeunit 1ns; timeprecision 1ps;

  localparam longint MAXCYC = 200_000_000;

  accel_env #(.W(1280), .H(1024), .NODES(8), .STALL(16), .HLAT(4), .MAXCYC(MAXCYC)) u_env ();

  // outer watchdog, a little after the environment's own
  initial begin
    #(real'(MAXCYC) * 5.0 + 1.0e6);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_env.checks, u_env.failures + 1);
    $finish;
  end
endmodule
