// composer: the z-buffer compositing datapath of the accelerator.
//
// For every pixel it compares the depth of the stored (already composed) image,
// z0, with the depth of the newly arrived frame, z1, and keeps the colour and
// depth of the new frame where z1 < z0 (signed 32-bit values, strictly less:
// on a tie the stored pixel stays), else those of the stored image. The loop
// is unrolled twice, as in the accelerator, so each 64-bit word carries two
// pixels, the first one in bits 31:0, and one word pair is composed per cycle.
// Colour and depth are always written back, whether or not they changed, so
// the data flow stays regular.
//
// Streams (valid/ready, 64 bits): z0/f0 from external memory, z1/f1 from host
// memory; zc/fc back to external memory, fh (colour only) to host memory.
// A pass starts with a start pulse carrying the mode and the number of words:
//   mode.load       copy the new frame (no z0/f0 read): first frame;
//   mode.write_mem  drive zc and fc;
//   mode.write_host drive fh (last frame).
// Results are registered, one cycle after the inputs are taken; each output has
// its own valid bit, so a stalled sink holds back only that output.
// busy is high from start until the last result word has been taken.
module composer
  import imorc_pkg::*;
#(
  parameter int unsigned DW    = 64,   // two 32-bit pixels per word
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  pass_mode_t        mode,
  input  logic [CNT_W-1:0]  words,
  output logic              busy,
  // stored image (external memory)
  input  logic              z0_valid, f0_valid,
  output logic              z0_ready, f0_ready,
  input  logic [DW-1:0]     z0_data, f0_data,
  // new frame (host memory)
  input  logic              z1_valid, f1_valid,
  output logic              z1_ready, f1_ready,
  input  logic [DW-1:0]     z1_data, f1_data,
  // composed image
  output logic              zc_valid, fc_valid, fh_valid,
  input  logic              zc_ready, fc_ready, fh_ready,
  output logic [DW-1:0]     zc_data, fc_data, fh_data,
  // pixels of the pass that took the new frame's value
  output logic [CNT_W-1:0]  taken_new
);

  localparam int unsigned NPIX = DW / PIXEL_W;

  pass_mode_t       m;
  logic [CNT_W-1:0] left;

  // a new word pair can be composed when all needed inputs are there and
  // every enabled output register is free or being emptied
  logic in_ok, out_ok, fire;
  assign in_ok  = z1_valid && f1_valid && (m.load || (z0_valid && f0_valid));
  assign out_ok = (!zc_valid || zc_ready) && (!fc_valid || fc_ready) && (!fh_valid || fh_ready);
  assign fire   = (left != '0) && in_ok && out_ok;

  assign z1_ready = fire;
  assign f1_ready = fire;
  assign z0_ready = fire && !m.load;
  assign f0_ready = fire && !m.load;

  // compare-and-select, NPIX lanes
  logic [DW-1:0]   z_sel, f_sel;
  logic [NPIX-1:0] take_new;
  always_comb begin
    for (int p = 0; p < NPIX; p++) begin
      take_new[p] = m.load ||
                    ($signed(z1_data[p*PIXEL_W +: PIXEL_W]) < $signed(z0_data[p*PIXEL_W +: PIXEL_W]));
      z_sel[p*PIXEL_W +: PIXEL_W] = take_new[p] ? z1_data[p*PIXEL_W +: PIXEL_W]
                                                : z0_data[p*PIXEL_W +: PIXEL_W];
      f_sel[p*PIXEL_W +: PIXEL_W] = take_new[p] ? f1_data[p*PIXEL_W +: PIXEL_W]
                                                : f0_data[p*PIXEL_W +: PIXEL_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m         <= '0;
      left      <= '0;
      zc_valid  <= 1'b0;
      fc_valid  <= 1'b0;
      fh_valid  <= 1'b0;
      zc_data   <= '0;
      fc_data   <= '0;
      fh_data   <= '0;
      taken_new <= '0;
    end else begin
      if (zc_valid && zc_ready) zc_valid <= 1'b0;
      if (fc_valid && fc_ready) fc_valid <= 1'b0;
      if (fh_valid && fh_ready) fh_valid <= 1'b0;
      if (start && !busy) begin
        m         <= mode;
        left      <= words;
        taken_new <= '0;
      end else if (fire) begin
        left <= left - 1'b1;
        taken_new <= taken_new + CNT_W'($countones(take_new));
        zc_data <= z_sel;
        fc_data <= f_sel;
        fh_data <= f_sel;
        if (m.write_mem)  begin zc_valid <= 1'b1; fc_valid <= 1'b1; end
        if (m.write_host) fh_valid <= 1'b1;
      end
    end
  end

  assign busy = (left != '0) || zc_valid || fc_valid || fh_valid;

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("composer: start while a pass is running");

endmodule
