// imorc_pkg: types and constants shared by the IMORC infrastructure cores and
// the compositing accelerator.
//
// An IMORC link carries three channels, each with a valid/ready handshake:
//   request     master -> slave   imorc_req_t {write, addr, len}
//   write data  master -> slave   len bytes, packed little-endian into link words
//   read data   slave  -> master  len bytes, packed the same way, in request order
// The address is a byte address and len a byte count. This design requires both
// to be multiples of the wider width of a link, so a request always covers whole
// link words on both sides of a bitwidth converter (a choice of this design; the
// packet format of IMORC itself is not published with the accelerator).
package imorc_pkg;

  localparam int unsigned ADDR_W = 40;   // HyperTransport physical address width
  localparam int unsigned LEN_W  = 16;   // request length in bytes

  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } imorc_req_t;

  localparam int unsigned REQ_W = $bits(imorc_req_t);

  // Pixel format of the compositing accelerator: 32-bit colour, 32-bit depth.
  localparam int unsigned PIXEL_W = 32;

  // What one compositing pass does (one pass per rendered frame).
  typedef struct packed {
    logic load;        // first frame: copy the new frame, no stored frame is read
    logic write_mem;   // write the composed colour and depth back to external memory
    logic write_host;  // write the composed colour to host memory (last frame)
  } pass_mode_t;

  // Configuration and results of the bandwidth micro-benchmark core.
  typedef struct packed {
    logic              write;       // test type: 1 write, 0 read
    logic [ADDR_W-1:0] base;        // first byte address
    logic [31:0]       total;       // bytes to transfer
    logic [LEN_W-1:0]  req_bytes;   // bytes per request
  } bench_cfg_t;

  typedef struct packed {
    logic        busy;
    logic        done;
    logic [31:0] n_req;          // requests completed
    logic [31:0] last_cycles;    // cycles of the last request
    logic [31:0] min_cycles;
    logic [31:0] max_cycles;
    logic [47:0] sum_cycles;
    logic [47:0] total_cycles;   // start to done
    logic [63:0] checksum;       // XOR of all 64-bit lanes read
  } bench_stat_t;

endpackage
