// imorc_reg_if: IMORC-to-register converter.
//
// Terminates an IMORC link (slave side, DW bits) and turns it into a simple
// register bus for a core's control registers, as IMORC's register converter
// cores do. Registers are DW bits wide and addressed by byte; a request of len
// bytes covers len/(DW/8) consecutive registers starting at addr. A write
// request produces one reg_we pulse per write-data word; a read request
// produces one reg_re pulse per word and returns reg_rdata, which the register
// file must drive combinationally from reg_addr, as read data. reg_addr is the
// register index (byte address divided by DW/8). One register is accessed per
// cycle. The bus format is this design's choice.
module imorc_reg_if
  import imorc_pkg::*;
#(
  parameter int unsigned DW = 64,
  parameter int unsigned RA = 8    // register index width
) (
  input  logic          clk,
  input  logic          rst_n,
  // IMORC slave port
  input  logic          s_req_valid,
  output logic          s_req_ready,
  input  imorc_req_t    s_req,
  input  logic          s_wd_valid,
  output logic          s_wd_ready,
  input  logic [DW-1:0] s_wd_data,
  output logic          s_rd_valid,
  input  logic          s_rd_ready,
  output logic [DW-1:0] s_rd_data,
  // register bus
  output logic          reg_we,
  output logic          reg_re,
  output logic [RA-1:0] reg_addr,
  output logic [DW-1:0] reg_wdata,
  input  logic [DW-1:0] reg_rdata
);

  localparam int unsigned BPW = DW / 8;
  localparam int unsigned SH  = $clog2(BPW);

  typedef enum logic [1:0] {IDLE, WRITE, READ} state_e;
  state_e           state;
  logic [RA-1:0]    idx;
  logic [LEN_W-1:0] left;

  assign s_req_ready = (state == IDLE);
  assign s_wd_ready  = (state == WRITE);
  assign s_rd_valid  = (state == READ);
  assign s_rd_data   = reg_rdata;

  assign reg_addr  = idx;
  assign reg_wdata = s_wd_data;
  assign reg_we    = (state == WRITE) && s_wd_valid;
  assign reg_re    = (state == READ)  && s_rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
      left  <= '0;
    end else begin
      case (state)
        IDLE: if (s_req_valid) begin
          idx   <= RA'(s_req.addr >> SH);
          left  <= LEN_W'(s_req.len >> SH);
          state <= s_req.write ? WRITE : READ;
        end
        WRITE, READ: if (reg_we || reg_re) begin
          idx  <= idx + 1'b1;
          left <= left - 1'b1;
          if (left == LEN_W'(1)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
