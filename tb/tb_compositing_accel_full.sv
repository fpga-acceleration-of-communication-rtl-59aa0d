// tb_compositing_accel_full: one complete compositing run at full size: four
// rendering nodes delivering 800x600 frames (colour and depth, 3.84 MB per
// frame), the accelerator at its default parameters. Checks the final image
// in host memory and the intermediate image in external memory pixel by
// pixel (see accel_env). At this size every buffer is a whole number of
// 128-byte bursts, so no read-modify-write may occur.
module tb_compositing_accel_full;
  accel_env #(.W(800), .H(600), .NODES(4), .STALL(16), .HLAT(4), .MAXCYC(40_000_000)) u_env ();
endmodule
