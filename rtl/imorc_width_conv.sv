// imorc_width_conv: bitwidth conversion module of an IMORC link.
//
// IMORC inserts these converters into links so that every core works at its
// native data width without knowing the width of the core at the other end.
// This implementation (its insides are this design's choice) handles integer
// ratios in either direction:
//   IN_W < OUT_W  packs OUT_W/IN_W input words into one output word, the first
//                 input word in the least significant bits (little-endian);
//   IN_W > OUT_W  splits each input word into IN_W/OUT_W output words, least
//                 significant part first;
//   IN_W = OUT_W  is a wire.
// Both directions use a valid/ready handshake and hold at most one output
// word. Packing has no flush: the traffic must be whole wide words, which the
// IMORC requests of this design guarantee (lengths are multiples of the wider
// link width). Throughput is one input word per cycle when packing and one
// output word per cycle when splitting; latency is one cycle after the last
// input word of a group.
module imorc_width_conv #(
  parameter int unsigned IN_W  = 64,
  parameter int unsigned OUT_W = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);

  if (IN_W == OUT_W) begin : g_pass
    assign out_valid = in_valid;
    assign in_ready  = out_ready;
    assign out_data  = in_data;
  end else if (IN_W < OUT_W) begin : g_up
    localparam int unsigned R  = OUT_W / IN_W;
    localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;
    logic [OUT_W-1:0] acc;
    logic [CW-1:0]    cnt;
    logic             full;

    assign in_ready  = !full || out_ready;
    assign out_valid = full;
    assign out_data  = acc;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc  <= '0;
        cnt  <= '0;
        full <= 1'b0;
      end else begin
        if (full && out_ready) full <= 1'b0;
        if (in_valid && in_ready) begin
          acc[cnt*IN_W +: IN_W] <= in_data;
          if (cnt == CW'(R-1)) begin
            cnt  <= '0;
            full <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end
    end

    initial assert (OUT_W % IN_W == 0) else $error("width ratio must be an integer");
  end else begin : g_down
    localparam int unsigned R  = IN_W / OUT_W;
    localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;
    logic [IN_W-1:0] hold;
    logic [CW-1:0]   cnt;
    logic            busy;

    assign in_ready  = !busy || (out_ready && cnt == CW'(R-1));
    assign out_valid = busy;
    assign out_data  = hold[cnt*OUT_W +: OUT_W];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold <= '0;
        cnt  <= '0;
        busy <= 1'b0;
      end else begin
        if (busy && out_ready) begin
          if (cnt == CW'(R-1)) begin
            cnt  <= '0;
            busy <= 1'b0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        if (in_valid && in_ready) begin
          hold <= in_data;
          busy <= 1'b1;
        end
      end
    end

    initial assert (IN_W % OUT_W == 0) else $error("width ratio must be an integer");
  end

endmodule
