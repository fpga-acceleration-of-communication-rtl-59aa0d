// ddr_mem_model: behavioural model of the DDR SDRAM controller and the
// external memory, for simulation only. It serves the command/data
// signalling of ddr_ctrl one command at a time: a write command takes BURST
// data words, a read command returns BURST words after LAT cycles. Storage is
// sparse (an associative array of MW-bit words); unwritten words read as a
// fixed pattern derived from the address. Not synthesizable.
module ddr_mem_model #(
  parameter int unsigned MW    = 128,
  parameter int unsigned BURST = 8,
  parameter int unsigned BA_W  = 25,
  parameter int unsigned LAT   = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic            cmd_write,
  input  logic [BA_W-1:0] cmd_addr,
  input  logic            wd_valid,
  output logic            wd_ready,
  input  logic [MW-1:0]   wd_data,
  output logic            rd_valid,
  output logic [MW-1:0]   rd_data
);

  logic [MW-1:0] mem [longint];
  int unsigned   n_rd_bursts, n_wr_bursts;

  typedef enum logic [1:0] {IDLE, WR, RD_WAIT, RD} state_e;
  state_e      state;
  longint      base;
  int unsigned beat, wait_cnt;

  function automatic logic [MW-1:0] peek(longint word_addr);
    if (mem.exists(word_addr)) return mem[word_addr];
    return {(MW/32){32'hdead_0000 ^ 32'(word_addr)}};
  endfunction

  assign cmd_ready = (state == IDLE);
  assign wd_ready  = (state == WR);
  assign rd_valid  = (state == RD);
  assign rd_data   = peek(base + longint'(beat));

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; base <= 0; beat <= 0; wait_cnt <= 0;
      n_rd_bursts <= 0; n_wr_bursts <= 0;
    end else begin
      case (state)
        IDLE: if (cmd_valid) begin
          base <= longint'(cmd_addr) * BURST;
          beat <= 0;
          if (cmd_write) begin
            state <= WR;
            n_wr_bursts <= n_wr_bursts + 1;
          end else begin
            state    <= RD_WAIT;
            wait_cnt <= LAT;
            n_rd_bursts <= n_rd_bursts + 1;
          end
        end
        WR: if (wd_valid) begin
          mem[base + longint'(beat)] = wd_data;
          beat <= beat + 1;
          if (beat == BURST - 1) state <= IDLE;
        end
        RD_WAIT: begin
          if (wait_cnt <= 1) state <= RD;
          wait_cnt <= wait_cnt - 1;
        end
        RD: begin
          beat <= beat + 1;
          if (beat == BURST - 1) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
