// tb_compositing_accel: end-to-end test of the compositing accelerator at its
// default parameters on a small image: 40x13 pixels (a 2080-byte buffer, so
// the last 128-byte request is partial and needs a read-modify-write, and
// every frame spans two 4 KiB pages), four rendering nodes, host memory with
// random back-pressure. See accel_env for what is checked.
module tb_compositing_accel;
  accel_env #(.W(40), .H(13), .NODES(4), .STALL(8), .HLAT(10), .MAXCYC(400_000)) u_env ();
endmodule
