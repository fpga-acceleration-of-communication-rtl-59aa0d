// compositing_controller: control registers and phase sequencer of the
// compositing accelerator.
//
// The host programs the registers over an IMORC link (through imorc_reg_if)
// and writes CONTROL.start; the controller then composes NODES frames, one
// pass per frame, following the three phases of the accelerator:
//   pass 0            load: copy frame 0 from host memory to external memory
//                     (with one node only, straight back to the host instead);
//   pass 1 .. NODES-2 compose frame k with the stored image, write the result
//                     back to external memory (colour and depth);
//   pass NODES-1      compose the last frame and write only the colour buffer
//                     to host memory.
// Frame k is read from FRAME_BASE + k*FRAME_STRIDE in the host address space.
// A pass ends when the request core has issued everything, the composer has
// produced every word, and the write stream buffers and their links have
// handed all data to the memory controllers (wr_drained), so the next pass
// cannot overtake a write. STATUS and done let the host follow progress.
//
// Registers (64 bit, byte offset):
//   0x00 CONTROL      write bit 0 = 1: start (ignored while busy)
//   0x08 STATUS       bit 0 busy, bit 1 done, bits 47:16 frames composed
//   0x10 WIDTH        0x18 HEIGHT       0x20 NODES (rendering nodes = frames)
//   0x28 MEM_BASE     0x30 FRAME_BASE   0x38 FRAME_STRIDE    0x40 OUT_BASE
//   0x48 CYCLES       clock cycles of the last run
// Width, height and the number of rendering nodes are the registers the
// accelerator description names; the map and the other registers are this
// design's choice. WIDTH*HEIGHT must be a multiple of 8 pixels.
module compositing_controller
  import imorc_pkg::*;
#(
  parameter int unsigned DW = 64,
  parameter int unsigned RA = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              reg_we,
  input  logic              reg_re,
  input  logic [RA-1:0]     reg_addr,
  input  logic [DW-1:0]     reg_wdata,
  output logic [DW-1:0]     reg_rdata,
  // pass control
  output logic              pass_start,
  output pass_mode_t        pass_mode,
  output logic [31:0]       size,
  output logic [31:0]       words,        // 64-bit composer words per buffer
  output logic [ADDR_W-1:0] mem_base,
  output logic [ADDR_W-1:0] host_base,
  output logic [ADDR_W-1:0] out_base,
  input  logic              req_busy,
  input  logic              comp_busy,
  input  logic              wr_drained,
  output logic              busy,
  output logic              done
);

  localparam logic [RA-1:0] R_CONTROL = 0, R_STATUS = 1, R_WIDTH = 2, R_HEIGHT = 3,
                            R_NODES = 4, R_MEM_BASE = 5, R_FRAME_BASE = 6,
                            R_FRAME_STRIDE = 7, R_OUT_BASE = 8, R_CYCLES = 9;

  logic [15:0]       width, height;
  logic [31:0]       nodes;
  logic [ADDR_W-1:0] frame_base, frame_stride;
  logic [31:0]       frame;          // frame of the current pass
  logic [63:0]       cycles;

  typedef enum logic [1:0] {IDLE, START, SETTLE, RUN} state_e;
  state_e state;

  assign busy  = (state != IDLE);
  assign size  = 32'(width) * 32'(height);
  assign words = size >> 1;

  // register reads
  always_comb begin
    unique case (reg_addr)
      R_STATUS:       reg_rdata = DW'({frame, 14'd0, done, busy});
      R_WIDTH:        reg_rdata = DW'(width);
      R_HEIGHT:       reg_rdata = DW'(height);
      R_NODES:        reg_rdata = DW'(nodes);
      R_MEM_BASE:     reg_rdata = DW'(mem_base);
      R_FRAME_BASE:   reg_rdata = DW'(frame_base);
      R_FRAME_STRIDE: reg_rdata = DW'(frame_stride);
      R_OUT_BASE:     reg_rdata = DW'(out_base);
      R_CYCLES:       reg_rdata = DW'(cycles);
      default:        reg_rdata = '0;
    endcase
  end

  logic last_pass;
  assign last_pass = (frame + 1 >= nodes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width <= '0; height <= '0; nodes <= '0;
      mem_base <= '0; frame_base <= '0; frame_stride <= '0; out_base <= '0;
      state <= IDLE; frame <= '0; cycles <= '0; done <= 1'b0;
      pass_start <= 1'b0; pass_mode <= '0; host_base <= '0;
    end else begin
      pass_start <= 1'b0;
      if (reg_we && !busy) begin
        unique case (reg_addr)
          R_WIDTH:        width        <= reg_wdata[15:0];
          R_HEIGHT:       height       <= reg_wdata[15:0];
          R_NODES:        nodes        <= reg_wdata[31:0];
          R_MEM_BASE:     mem_base     <= reg_wdata[ADDR_W-1:0];
          R_FRAME_BASE:   frame_base   <= reg_wdata[ADDR_W-1:0];
          R_FRAME_STRIDE: frame_stride <= reg_wdata[ADDR_W-1:0];
          R_OUT_BASE:     out_base     <= reg_wdata[ADDR_W-1:0];
          default: ;
        endcase
      end
      if (busy) cycles <= cycles + 1'b1;
      unique case (state)
        IDLE: if (reg_we && reg_addr == R_CONTROL && reg_wdata[0] && nodes != 0) begin
          state     <= START;
          frame     <= '0;
          cycles    <= '0;
          done      <= 1'b0;
          host_base <= frame_base;
        end
        START: begin
          pass_start           <= 1'b1;
          pass_mode.load       <= (frame == 0);
          pass_mode.write_host <= last_pass;
          pass_mode.write_mem  <= !last_pass;
          state                <= SETTLE;
        end
        SETTLE: state <= RUN;      // let the busy flags of the pass rise
        RUN: if (!req_busy && !comp_busy && wr_drained) begin
          frame     <= frame + 1;
          host_base <= host_base + frame_stride;
          if (last_pass) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= START;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_size_multiple_of_8: assert property (@(posedge clk) disable iff (!rst_n)
      pass_start |-> (size[2:0] == 3'd0))
    else $error("compositing_controller: frame size %0d is not a multiple of 8 pixels", size);

endmodule
